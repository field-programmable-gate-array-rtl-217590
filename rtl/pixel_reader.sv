// Pixel reader: fetches the binarised pixel at each corrected coordinate and
// hands the adjusted plate to character segmentation.
//
// A coordinate checker discards (x2, y2) outside the a x b plate; for those
// the output pixel is 0.  For a valid pair the read address
// (x2*a + y2) mod 256 selects the pixel in the binarisation module's 256x1
// circular buffer (written in the same column-major order), and the bit is
// held in register P.  P is then written at the same time into two
// dual-port RAMs, 256x1 for the vertical and 2048x1 for the horizontal
// segmentation block, each at an address that advances by one per pixel and
// wraps.  The checker, the address rule, P and the two RAM sizes are the
// algorithm's; zero fill, the sequential output addresses and the
// observation port are this design's.
//
// Interface: in_valid/x2/y2/in_last in.  The buffer address leaves on
// bin_rd_addr in the same cycle (the buffer RAM registers it), the next cycle
// the checker's verdict meets the read data, P (out_valid/out_pix) is valid
// in the cycle after that and is written at its end; out_count counts written pixels.  done rises
// after the pixel marked in_last is written.  The segmentation stage reads
// through vs_rd_addr/vs_rd_data and hs_rd_addr/hs_rd_data (one cycle).
module pixel_reader
  import anpr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 256,
  parameter int unsigned VS_DEPTH  = 256,
  parameter int unsigned HS_DEPTH  = 2048,
  localparam int unsigned BAW = $clog2(BUF_DEPTH),
  localparam int unsigned VAW = $clog2(VS_DEPTH),
  localparam int unsigned HAW = $clog2(HS_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  coord_t            a,
  input  coord_t            b,
  input  logic              in_valid,
  input  scoord_t           x2,
  input  scoord_t           y2,
  input  logic              in_last,
  output logic [BAW-1:0]    bin_rd_addr,
  input  logic              bin_rd_data,
  output logic              out_valid,
  output logic              out_pix,
  output logic [ADDR_W-1:0] out_count,
  output logic              done,
  input  logic [VAW-1:0]    vs_rd_addr,
  output logic              vs_rd_data,
  input  logic [HAW-1:0]    hs_rd_addr,
  output logic              hs_rd_data
);

  // Stage 1: coordinate checker and read address.
  logic in_np;
  logic [ADDR_W-1:0] lin;
  assign in_np = (x2 >= 0) && (x2 < scoord_t'(b)) && (y2 >= 0) && (y2 < scoord_t'(a));
  assign lin    = ADDR_W'(x2) * ADDR_W'(a) + ADDR_W'(y2);
  assign bin_rd_addr = lin[BAW-1:0];   // registered in_np the buffer RAM

  logic v1, in1, l1, l2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; in1 <= 1'b0; l1 <= 1'b0;
      l2 <= 1'b0;
      out_valid <= 1'b0;
      out_pix   <= 1'b0;
    end else begin
      v1  <= in_valid;
      in1 <= in_np;
      l1  <= in_valid && in_last;
      // Stage 2: register P
      out_valid <= v1;
      out_pix   <= in1 && bin_rd_data;
      l2        <= v1 && l1;
    end
  end

  // Stage 3: write P into both segmentation buffers.
  logic [VAW-1:0] vs_wa;
  logic [HAW-1:0] hs_wa;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_wa     <= '0;
      hs_wa     <= '0;
      out_count <= '0;
      done      <= 1'b0;
    end else if (start) begin
      vs_wa     <= '0;
      hs_wa     <= '0;
      out_count <= '0;
      done      <= 1'b0;
    end else if (out_valid) begin
      vs_wa     <= vs_wa + 1'b1;
      hs_wa     <= hs_wa + 1'b1;
      out_count <= out_count + 1'b1;
      if (l2) done <= 1'b1;
    end
  end

  dp_ram #(.DEPTH(VS_DEPTH), .WIDTH(1)) u_vs_ram (
    .clk, .we (out_valid), .wr_addr (vs_wa), .wr_data (out_pix),
    .rd_addr (vs_rd_addr), .rd_data (vs_rd_data)
  );

  dp_ram #(.DEPTH(HS_DEPTH), .WIDTH(1)) u_hs_ram (
    .clk, .we (out_valid), .wr_addr (hs_wa), .wr_data (out_pix),
    .rd_addr (hs_rd_addr), .rd_data (hs_rd_data)
  );

endmodule
