// Local threshold filter: binarises each plate pixel against the mean of
// its window and stores the result in a 256x1 circular buffer.
//
// The threshold is T = mean - 6; the pixel becomes 0 when its grey value is
// at most T and 1 otherwise.  The bit is written to a BUF_DEPTH x 1
// dual-port RAM whose write address advances by one per pixel and returns to
// 0 after the last location, so the buffer always holds the most recent 256
// binary pixels in column-major order.  The comparison, the offset 6 and the
// 256-entry wrapping buffer are the algorithm's.  Advancing the address per
// valid pixel (rather than per clock), registering the bit before the write
// and the wr_count output are this design's.
//
// Interface: in_valid/mean/grey/in_last from the mean filter.  One cycle
// later the bit is written and appears on bin_valid/bin_pix (an observation
// port).  wr_count is the number of pixels written since start; done rises
// after the last one.  The adjustment module reads the RAM through
// rd_addr/rd_data with one cycle of latency.
module local_threshold_filter
  import anpr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 256,
  localparam int unsigned BAW = $clog2(BUF_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             in_valid,
  input  pix_t             mean,
  input  pix_t             grey,
  input  logic             in_last,
  output logic             bin_valid,
  output logic             bin_pix,
  output logic [ADDR_W-1:0] wr_count,
  output logic             done,
  input  logic [BAW-1:0]   rd_addr,
  output logic             rd_data
);

  // Threshold and comparison (equations 2 and 3).
  logic signed [PIX_W+1:0] thr;
  logic bit_c;
  always_comb begin
    thr   = $signed({2'b00, mean}) - (PIX_W+2)'(DELTA_T);
    bit_c = !($signed({2'b00, grey}) <= thr);
  end

  logic [BAW-1:0] wr_addr;
  logic           bin_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_valid <= 1'b0;
      bin_pix   <= 1'b0;
      bin_last  <= 1'b0;
      wr_addr   <= '0;
      wr_count  <= '0;
      done      <= 1'b0;
    end else begin
      bin_valid <= in_valid;
      bin_pix   <= bit_c;
      bin_last  <= in_valid && in_last;
      if (start) begin
        wr_addr  <= '0;
        wr_count <= '0;
        done     <= 1'b0;
      end else if (bin_valid) begin
        wr_addr  <= wr_addr + 1'b1;   // wraps from BUF_DEPTH-1 to 0
        wr_count <= wr_count + 1'b1;
      end
      if (bin_valid && bin_last) done <= 1'b1;
    end
  end

  dp_ram #(.DEPTH(BUF_DEPTH), .WIDTH(1)) u_binbuf (
    .clk     (clk),
    .we      (bin_valid),
    .wr_addr (wr_addr),
    .wr_data (bin_pix),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

endmodule
