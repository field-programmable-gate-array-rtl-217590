// Window shifter: collects the 8x8 neighbourhood of every plate pixel from
// a column-by-column pixel stream.
//
// A LineBuffer RAM has one 64-bit word per scan row; the word holds the last
// eight pixels of that row.  For each incoming pixel Y the word of its row is
// read into Yout, and (Yout << 8) + Y is written back and also pushed into
// the first row of an 8x8 register matrix, whose rows move down by one every
// pixel.  After a row has been shifted in, matrix row k holds the eight
// newest pixels of scan row (r - k), newest pixel in byte 0.  These are the
// algorithm's own structures.  Word width, the LineBuffer depth (enough for
// the widened scan of a plate up to MAX_H rows) and the choice of the centre
// pixel (row 4, byte 4: three pixels before it and four after it in both
// directions) are this design's.
//
// Interface: px_* come from the NP reader together with the greyscale pixel
// px_data.  Two cycles after a pixel enters, win_valid rises if that pixel
// completes the window of a plate pixel, i.e. scan row and column are both
// at least 7; win holds the window and centre its middle pixel.  win_last
// marks the final window of the plate.
module window_shifter
  import anpr_pkg::*;
#(
  parameter int unsigned MAX_H = 64,                  // plate rows supported
  localparam int unsigned LB_DEPTH = MAX_H + WIN - 1  // widened scan rows
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   px_valid,
  input  pix_t   px_data,
  input  coord_t px_row,
  input  coord_t px_col,
  input  logic   px_last,
  output logic   win_valid,
  output pix_t   win [WIN][WIN],   // [row][byte]; row 0 / byte 0 newest
  output pix_t   centre,
  output logic   win_last
);

  localparam int unsigned LB_AW = $clog2(LB_DEPTH);
  localparam int unsigned ROW_W = WIN * PIX_W;

  // Stage 1: register the pixel (Y) while the LineBuffer word is read.
  pix_t   y_q;
  logic   v_q, out_q, last_q;
  logic [LB_AW-1:0] row_q;

  logic [ROW_W-1:0] yout;      // LineBuffer read data (registered in RAM)
  logic [ROW_W-1:0] new_row;

  dp_ram #(.DEPTH(LB_DEPTH), .WIDTH(ROW_W)) u_linebuffer (
    .clk     (clk),
    .we      (v_q),
    .wr_addr (row_q),
    .wr_data (new_row),
    .rd_addr (LB_AW'(px_row)),
    .rd_data (yout)
  );

  assign new_row = {yout[ROW_W-PIX_W-1:0], y_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q    <= 1'b0;
      out_q  <= 1'b0;
      last_q <= 1'b0;
      y_q    <= '0;
      row_q  <= '0;
    end else begin
      v_q    <= px_valid;
      out_q  <= px_valid && (px_row >= coord_t'(WIN-1)) && (px_col >= coord_t'(WIN-1));
      last_q <= px_valid && px_last;
      y_q    <= px_data;
      row_q  <= LB_AW'(px_row);
    end
  end

  // Stage 2: the 8x8 matrix buffer.
  logic [ROW_W-1:0] mat [WIN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < WIN; k++) mat[k] <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else begin
      if (v_q) begin
        mat[0] <= new_row;
        for (int k = 1; k < WIN; k++) mat[k] <= mat[k-1];
      end
      win_valid <= out_q;
      win_last  <= last_q;
    end
  end

  always_comb begin
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        win[r][c] = mat[r][c*PIX_W +: PIX_W];
  end

  assign centre = win[WIN/2][WIN/2];

endmodule
