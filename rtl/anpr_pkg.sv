// Shared types, constants and arithmetic helpers of the number-plate
// binarisation and adjustment pipeline.
//
// Image geometry follows the 640x480 greyscale / binary car images that the
// plate localiser stores in two external memories; a pixel address is
// 640*y + x.  The remaining constants (offset of the local threshold, window
// size) are the values chosen for the binarisation algorithm: an 8x8 mean
// window and a threshold offset of 6.  The fixed-point format of the
// rotation factor alpha (ALPHA_FRAC fractional bits) and the rounding rule
// of the coordinate arithmetic are this implementation's own choices.
package anpr_pkg;

  // Car image held in the external frame memories.
  localparam int unsigned IMG_W      = 640;
  localparam int unsigned IMG_H      = 480;
  localparam int unsigned ADDR_W     = 19;   // ceil(log2(640*480))
  localparam int unsigned COORD_W    = 10;   // x in 0..639, y in 0..479
  localparam int unsigned PIX_W      = 8;    // greyscale pixel

  // Local binarisation.
  localparam int unsigned WIN        = 8;    // window side w
  localparam int unsigned WIN_LOG2   = 3;
  localparam int unsigned DELTA_T    = 6;    // threshold offset

  // Signed coordinate arithmetic in the adjustment module.
  localparam int unsigned SC_W       = 12;   // signed coordinate width
  localparam int unsigned ALPHA_FRAC = 4;    // fractional bits of alpha
  localparam int unsigned ALPHA_W    = 16;   // signed alpha width

  typedef logic [COORD_W-1:0]       coord_t;
  typedef logic [ADDR_W-1:0]        addr_t;
  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [SC_W-1:0]   scoord_t;
  typedef logic signed [ALPHA_W-1:0] alpha_t;

  // Corners of the localised plate, inclusive: (x0,y0) top left,
  // (x1,y1) bottom right.
  typedef struct packed {
    coord_t x0;
    coord_t y0;
    coord_t x1;
    coord_t y1;
  } np_box_t;

  // Result of the rotation angle calculator.
  typedef struct packed {
    logic    flat;   // delta d was 0: no rotation, every quotient is 0
    alpha_t  alpha;  // (b - 2c) / delta d, ALPHA_FRAC fractional bits
    coord_t  va;     // crop height |round((b/2) / alpha)|
  } angle_t;

  // n / alpha rounded to the nearest integer (halves away from zero), with
  // alpha in fixed point.  A flat plate (alpha undefined) gives 0.
  function automatic scoord_t div_alpha(input scoord_t n, input alpha_t alpha,
                                        input logic flat);
    logic [SC_W+ALPHA_FRAC-1:0] num;
    logic [ALPHA_W-1:0]         den;
    logic [SC_W+ALPHA_FRAC-1:0] q;
    logic                       neg;
    scoord_t                    n_abs;
    if (flat || alpha == '0) return '0;
    n_abs = (n < 0) ? -n : n;
    num = (SC_W+ALPHA_FRAC)'(unsigned'(n_abs)) << ALPHA_FRAC;
    den = alpha < 0 ? ALPHA_W'(-alpha) : ALPHA_W'(alpha);
    neg = (n < 0) ^ (alpha < 0);
    q   = (num + (SC_W+ALPHA_FRAC)'(den >> 1)) / (SC_W+ALPHA_FRAC)'(den);
    return neg ? -scoord_t'(q) : scoord_t'(q);
  endfunction

endpackage
