// Test of the window shifter: a 20-row scan of 14 columns of random pixels
// is streamed column by column with random idle cycles.  For every pixel
// that completes a window (scan row and column at least 7) the 8x8 window
// must appear two cycles later, row k / byte j holding the pixel k rows up
// and j columns left, and the centre output must be the pixel 4 up and 4
// left.  No other window may be reported.
module tb_window_shifter;
  import anpr_pkg::*;

  localparam int H = 20, W = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   px_valid = 1'b0, px_last = 1'b0;
  pix_t   px_data = '0;
  coord_t px_row = '0, px_col = '0;
  logic   win_valid, win_last;
  pix_t   win [WIN][WIN];
  pix_t   centre;

  window_shifter #(.MAX_H(H)) dut (.clk, .rst_n, .px_valid, .px_data, .px_row, .px_col,
                                     .px_last, .win_valid, .win, .centre, .win_last);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [W][H];
  int exp_r[$], exp_c[$], exp_t[$];
  int cyc = 0, seen = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (win_valid && rst_n) begin
      int r, c, t;
      seen++;
      if (exp_r.size() == 0) check(1'b0, $sformatf("unexpected window at %0d", cyc));
      else begin
        r = exp_r.pop_front(); c = exp_c.pop_front(); t = exp_t.pop_front();
        check(cyc - t == 2, $sformatf("latency %0d", cyc - t));
        for (int k = 0; k < WIN; k++)
          for (int j = 0; j < WIN; j++)
            check(int'(win[k][j]) == img[c - j][r - k], $sformatf("win[%0d][%0d] at (%0d,%0d)", k, j, c, r));
        check(int'(centre) == img[c - 4][r - 4], "centre");
        check(win_last == (r == H - 1 && c == W - 1), "last flag");
      end
    end
  end

  initial begin
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) img[c][r] = int'($urandom % 256);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // two passes: the second starts with stale LineBuffer and matrix contents
    for (int pass = 0; pass < 2; pass++)
      for (int c = 0; c < W; c++)
        for (int r = 0; r < H; r++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin
            px_valid = 1'b0;
            @(negedge clk);
          end
          px_valid = 1'b1;
          px_data  = 8'(img[c][r]);
          px_row   = 10'(r);
          px_col   = 10'(c);
          px_last  = (r == H - 1 && c == W - 1);
          if (r >= 7 && c >= 7) begin
            exp_r.push_back(r); exp_c.push_back(c); exp_t.push_back(cyc);
          end
        end
    @(negedge clk);
    px_valid = 1'b0;
    repeat (5) @(negedge clk);
    check(seen == 2 * (H - 7) * (W - 7), $sformatf("windows %0d at %0d", seen, cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
