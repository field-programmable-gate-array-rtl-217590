// Number-plate pre-processing between plate localisation and character
// segmentation: local-threshold binarisation followed by horizontal
// rotation, cropping and vertical slant correction of the plate.
//
// The localiser leaves a 640x480 greyscale frame and its 640x480 binary
// result in two external memories and reports the plate's corners.  The
// binarisation module reads the greyscale plate and writes its binary image
// into a 256-entry circular buffer; in parallel the adjustment module
// measures the tilt on the binary frame, then follows the binarisation LAG
// pixels behind, reading from that buffer the source pixel of every output
// pixel and writing the adjusted plate into the two RAMs the segmentation
// stage reads.  The partition into the two modules and their blocks is the
// algorithm's; the flow control between them is this design's.
//
// Interface: start (one cycle) with box; gs_* is the greyscale memory port
// (8-bit data, MEM_LAT cycles), nb_* the binary-frame memory port (1-bit
// data, one cycle); vs_*/hs_* are the read ports of the 256x1 and 2048x1
// segmentation RAMs.  out_valid/out_pix show the adjusted plate as it is
// written (column-major, a - 2Va rows), done rises after its last pixel.
// An a x b plate takes the
// binarisation scan of (a+7)*(b+7) cycles plus a pipeline tail of at most
// LAG + 20 cycles.
module np_preproc_top
  import anpr_pkg::*;
#(
  parameter int unsigned MEM_LAT   = 1,
  parameter int unsigned MAX_H     = 64,
  parameter int unsigned BUF_DEPTH = 256,
  parameter int unsigned LAG       = BUF_DEPTH / 2,
  parameter int unsigned VS_DEPTH  = 256,
  parameter int unsigned HS_DEPTH  = 2048,
  localparam int unsigned VAW = $clog2(VS_DEPTH),
  localparam int unsigned HAW = $clog2(HS_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  np_box_t           box,
  // greyscale frame memory
  output logic              gs_rd_en,
  output addr_t             gs_rd_addr,
  input  pix_t              gs_rd_data,
  // binary frame memory of the localiser
  output logic              nb_rd_en,
  output addr_t             nb_rd_addr,
  input  logic              nb_rd_data,
  // binarised plate (observation)
  output logic              bin_valid,
  output logic              bin_pix,
  output logic              bin_done,
  // tilt
  output logic              angle_done,
  output angle_t            angle,
  output scoord_t           delta_d,
  // adjusted plate
  output logic              out_valid,
  output logic              out_pix,
  output logic [ADDR_W-1:0] out_count,
  output logic [ADDR_W-1:0] stall_cycles,
  output logic              done,
  // character segmentation read ports
  input  logic [VAW-1:0]    vs_rd_addr,
  output logic              vs_rd_data,
  input  logic [HAW-1:0]    hs_rd_addr,
  output logic              hs_rd_data
);

  localparam int unsigned BAW = $clog2(BUF_DEPTH);

  logic [ADDR_W-1:0] bin_count;
  logic [BAW-1:0]    bin_rd_addr;
  logic              bin_rd_data;

  binarisation #(.MEM_LAT(MEM_LAT), .MAX_H(MAX_H), .BUF_DEPTH(BUF_DEPTH)) u_bin (
    .clk, .rst_n, .start, .box,
    .gs_rd_en, .gs_rd_addr, .gs_rd_data,
    .bin_valid, .bin_pix,
    .bin_count   (bin_count),
    .done        (bin_done),
    .bin_rd_addr (bin_rd_addr),
    .bin_rd_data (bin_rd_data)
  );

  adjustment #(.BUF_DEPTH(BUF_DEPTH), .LAG(LAG), .VS_DEPTH(VS_DEPTH),
               .HS_DEPTH(HS_DEPTH)) u_adj (
    .clk, .rst_n, .start, .box,
    .nb_rd_en, .nb_rd_addr, .nb_rd_data,
    .bin_count   (bin_count),
    .bin_done    (bin_done),
    .bin_rd_addr (bin_rd_addr),
    .bin_rd_data (bin_rd_data),
    .angle_done, .angle, .delta_d,
    .out_valid, .out_pix, .out_count, .done, .stall_cycles,
    .vs_rd_addr, .vs_rd_data, .hs_rd_addr, .hs_rd_data
  );

endmodule
