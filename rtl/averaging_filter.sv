// Averaging filter: mean of the 64 pixels of an 8x8 window.
//
// The sum is formed by a tree of 21 four-input adders in three registered
// levels: 16 adders sum groups of four pixels of a matrix row, 4 adders sum
// four of those group sums (the sums of two matrix rows each), and one adder
// sums the four results.  The mean is the total shifted right by 6 bits
// (division by 64, truncating).  The adder tree is the algorithm's; the
// register after each level is this design's choice to keep paths short.
//
// Interface: in_valid/win/centre/in_last enter together; three cycles later
// mean, the centre pixel passed alongside, out_valid and out_last appear.
// Fully pipelined: one window per cycle.
module averaging_filter
  import anpr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t win [WIN][WIN],
  input  pix_t centre,
  input  logic in_last,
  output logic out_valid,
  output pix_t mean,
  output pix_t out_centre,
  output logic out_last
);

  localparam int unsigned N1 = WIN * WIN / 4;  // 16 first-level adders
  localparam int unsigned N2 = N1 / 4;         // 4 second-level adders
  localparam int unsigned S1_W = PIX_W + 2;
  localparam int unsigned S2_W = PIX_W + 4;
  localparam int unsigned S3_W = PIX_W + 6;

  logic [S1_W-1:0] s1 [N1];
  logic [S2_W-1:0] s2 [N2];
  logic [S3_W-1:0] s3;
  logic [2:0] v;
  logic [2:0] l;
  pix_t c1, c2, c3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N1; i++) s1[i] <= '0;
      for (int i = 0; i < N2; i++) s2[i] <= '0;
      s3 <= '0;
      v  <= '0;
      l  <= '0;
      c1 <= '0;
      c2 <= '0;
      c3 <= '0;
    end else begin
      // level 1: four neighbouring pixels of one row
      for (int i = 0; i < N1; i++) begin
        s1[i] <= S1_W'(win[i/2][(i%2)*4 + 0]) + S1_W'(win[i/2][(i%2)*4 + 1])
               + S1_W'(win[i/2][(i%2)*4 + 2]) + S1_W'(win[i/2][(i%2)*4 + 3]);
      end
      // level 2: four group sums (two rows)
      for (int i = 0; i < N2; i++) begin
        s2[i] <= S2_W'(s1[4*i]) + S2_W'(s1[4*i+1]) + S2_W'(s1[4*i+2]) + S2_W'(s1[4*i+3]);
      end
      // level 3: the total
      s3 <= S3_W'(s2[0]) + S3_W'(s2[1]) + S3_W'(s2[2]) + S3_W'(s2[3]);
      v  <= {v[1:0], in_valid};
      l  <= {l[1:0], in_valid && in_last};
      c1 <= centre;
      c2 <= c1;
      c3 <= c2;
    end
  end

  assign mean       = pix_t'(s3 >> (2 * WIN_LOG2));
  assign out_centre = c3;
  assign out_valid  = v[2];
  assign out_last   = l[2];

endmodule
