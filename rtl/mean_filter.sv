// Mean filter: the window shifter followed by the averaging filter.
//
// For each pixel of the plate it delivers the mean of the 8x8 window around
// it together with the pixel's own grey value.  Both parts are the
// algorithm's; see window_shifter and averaging_filter for their timing.
//
// Interface: the NP reader's side-band plus the greyscale pixel in; out_valid
// with mean and centre out five cycles after the pixel that completes the
// window, one result per cycle.  out_last marks the plate's last pixel.
module mean_filter
  import anpr_pkg::*;
#(
  parameter int unsigned MAX_H = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   px_valid,
  input  pix_t   px_data,
  input  coord_t px_row,
  input  coord_t px_col,
  input  logic   px_last,
  output logic   out_valid,
  output pix_t   mean,
  output pix_t   centre,
  output logic   out_last
);

  logic win_valid, win_last;
  pix_t win [WIN][WIN];
  pix_t win_centre;

  window_shifter #(.MAX_H(MAX_H)) u_shifter (
    .clk, .rst_n, .px_valid, .px_data, .px_row, .px_col, .px_last,
    .win_valid (win_valid),
    .win       (win),
    .centre    (win_centre),
    .win_last  (win_last)
  );

  averaging_filter u_avg (
    .clk, .rst_n,
    .in_valid   (win_valid),
    .win        (win),
    .centre     (win_centre),
    .in_last    (win_last),
    .out_valid  (out_valid),
    .mean       (mean),
    .out_centre (centre),
    .out_last   (out_last)
  );

endmodule
