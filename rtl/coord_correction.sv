// Coordinates correction: maps an output pixel (x1, y1) of the adjusted
// plate to the pixel (x2, y2) of the binarised plate it is taken from.
//
// With the small-angle simplification (sin = tan, cos = 1) the horizontal
// rotation is
//     y2 = y1 + (x1 - b/2) / alpha
//     x2 = x1 - (y1 - a/2) / alpha - ds
// and the vertical slant correction shifts x2 by ds = (A - y2) / alpha,
// where alpha = 1/tan(theta) and A is the register loaded with a - Va, so
// that ds = (a - 2Va - j) tan(theta) with j = y2 - Va the row in the
// cropped plate.  Each operation takes one clock, intermediate results sit
// in the buffers T1..T7, and X1/Y1 travel alongside: six pipeline stages,
// one coordinate pair per cycle.  The formulas and the stage structure are
// the algorithm's; the fixed-point alpha and round-to-nearest quotients
// (see anpr_pkg::div_alpha) are this design's.
//
// Interface: in_valid with x1/y1 in; out_valid with x2/y2 (signed, may lie
// outside the plate) out six cycles later.  a, b,
// a_minus_va and angle must stay constant while a plate is processed.
module coord_correction
  import anpr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  coord_t  a,
  input  coord_t  b,
  input  coord_t  a_minus_va,
  input  angle_t  angle,
  input  logic    in_valid,
  input  scoord_t x1,
  input  scoord_t y1,
  input  logic    in_last,
  output logic    out_valid,
  output scoord_t x2,
  output scoord_t y2,
  output logic    out_last
);

  localparam int unsigned LAT = 6;

  coord_t  a_half, b_half;
  scoord_t half_a, half_b;
  assign a_half = a >> 1;
  assign b_half = b >> 1;
  assign half_a = scoord_t'(a_half);
  assign half_b = scoord_t'(b_half);

  scoord_t t1, t2, t3, t4, t5, t6, t7, t7b, t5b, ds, t7c, t5c;
  scoord_t x1_s1, y1_s1, x1_s2, y1_s2;
  logic [LAT-1:0] v, l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {t1, t2, t3, t4, t5, t6, t7, t7b, t5b, ds, t7c, t5c} <= '0;
      {x1_s1, y1_s1, x1_s2, y1_s2} <= '0;
      x2 <= '0;
      y2 <= '0;
      v  <= '0;
      l  <= '0;
    end else begin
      // stage 1: offsets from the plate centre
      t1    <= y1 - half_a;
      t2    <= x1 - half_b;
      x1_s1 <= x1;
      y1_s1 <= y1;
      // stage 2: divide by alpha
      t3    <= div_alpha(t1, angle.alpha, angle.flat);
      t4    <= div_alpha(t2, angle.alpha, angle.flat);
      x1_s2 <= x1_s1;
      y1_s2 <= y1_s1;
      // stage 3: rotated coordinates before the slant shift
      t5    <= x1_s2 - t3;
      t7    <= t4 + y1_s2;
      // stage 4: distance from the cropped plate's bottom edge
      t6    <= scoord_t'(a_minus_va) - t7;
      t5b   <= t5;
      t7b   <= t7;
      // stage 5: slant shift
      ds    <= div_alpha(t6, angle.alpha, angle.flat);
      t5c   <= t5b;
      t7c   <= t7b;
      // stage 6: new coordinates
      x2    <= t5c - ds;
      y2    <= t7c;
      v     <= {v[LAT-2:0], in_valid};
      l     <= {l[LAT-2:0], in_valid && in_last};
    end
  end

  assign out_valid = v[LAT-1];
  assign out_last  = l[LAT-1];

endmodule
