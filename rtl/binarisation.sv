// Binarisation module: local-threshold binarisation of a localised plate.
//
// NP reader -> mean filter -> local threshold filter.  The reader fetches
// the plate (with a 3/4-pixel margin for the window) column by column from
// the external greyscale frame memory; the mean filter forms the mean of the
// 8x8 window centred on each plate pixel; the threshold filter writes
// b(x,y) = (f(x,y) > mean - 6) into a 256x1 circular buffer in column-major
// plate order (index x*a + y, a = plate height).  The block chain is the
// algorithm's; the margin handling is this design's choice.
//
// Interface: start (one cycle) with box latches the plate.  The greyscale
// memory is read through gs_rd_en/gs_rd_addr and must return gs_rd_data
// MEM_LAT cycles later.  bin_count tells how many binary pixels have been
// written; bin_rd_addr/bin_rd_data is the adjustment module's read port.
// The plate takes (a+7)*(b+7) read cycles plus a 7 + MEM_LAT cycle pipeline
// before done rises.
module binarisation
  import anpr_pkg::*;
#(
  parameter int unsigned MEM_LAT   = 1,
  parameter int unsigned MAX_H     = 64,
  parameter int unsigned BUF_DEPTH = 256,
  localparam int unsigned BAW = $clog2(BUF_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  np_box_t           box,
  output logic              gs_rd_en,
  output addr_t             gs_rd_addr,
  input  pix_t              gs_rd_data,
  output logic              bin_valid,
  output logic              bin_pix,
  output logic [ADDR_W-1:0] bin_count,
  output logic              done,
  input  logic [BAW-1:0]    bin_rd_addr,
  output logic              bin_rd_data
);

  logic   px_valid, px_last, busy;
  coord_t px_row, px_col;

  np_reader #(.MEM_LAT(MEM_LAT)) u_reader (
    .clk, .rst_n, .start, .box,
    .busy     (busy),
    .rd_en    (gs_rd_en),
    .rd_addr  (gs_rd_addr),
    .px_valid (px_valid),
    .px_row   (px_row),
    .px_col   (px_col),
    .px_last  (px_last)
  );

  logic m_valid, m_last;
  pix_t m_mean, m_centre;

  mean_filter #(.MAX_H(MAX_H)) u_mean (
    .clk, .rst_n,
    .px_valid  (px_valid),
    .px_data   (gs_rd_data),
    .px_row    (px_row),
    .px_col    (px_col),
    .px_last   (px_last),
    .out_valid (m_valid),
    .mean      (m_mean),
    .centre    (m_centre),
    .out_last  (m_last)
  );

  local_threshold_filter #(.BUF_DEPTH(BUF_DEPTH)) u_thr (
    .clk, .rst_n, .start,
    .in_valid  (m_valid),
    .mean      (m_mean),
    .grey      (m_centre),
    .in_last   (m_last),
    .bin_valid (bin_valid),
    .bin_pix   (bin_pix),
    .wr_count  (bin_count),
    .done      (done),
    .rd_addr   (bin_rd_addr),
    .rd_data   (bin_rd_data)
  );

endmodule
