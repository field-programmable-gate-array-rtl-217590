// Test of the mean filter: a 24-row by 16-column scan of random pixels with
// a bright/dark gradient is streamed with random idle cycles.  For every
// pixel completing a window the filter must report, five cycles later, the
// mean floor(sum/64) of the 8x8 block ending at that pixel and the grey value
// of the block's centre (4 rows up, 4 columns left).
module tb_mean_filter;
  import anpr_pkg::*;

  localparam int H = 24, W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   px_valid = 1'b0, px_last = 1'b0;
  pix_t   px_data = '0;
  coord_t px_row = '0, px_col = '0;
  logic   out_valid, out_last;
  pix_t   mean, centre;

  mean_filter #(.MAX_H(H)) dut (.clk, .rst_n, .px_valid, .px_data, .px_row, .px_col, .px_last,
                                .out_valid, .mean, .centre, .out_last);

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
    if (out_valid && rst_n) begin
      int r, c, t, sum;
      seen++;
      if (exp_r.size() == 0) check(1'b0, "unexpected output");
      else begin
        r = exp_r.pop_front(); c = exp_c.pop_front(); t = exp_t.pop_front();
        sum = 0;
        for (int k = 0; k < 8; k++) for (int j = 0; j < 8; j++) sum += img[c - j][r - k];
        check(cyc - t == 5, $sformatf("latency %0d", cyc - t));
        check(int'(mean) == sum / 64, $sformatf("mean at (%0d,%0d): %0d vs %0d", c, r, mean, sum / 64));
        check(int'(centre) == img[c - 4][r - 4], "centre");
        check(out_last == (r == H - 1 && c == W - 1), "last");
      end
    end
  end

  initial begin
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) img[c][r] = (c * 12 + int'($urandom % 64)) % 256;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < W; c++)
      for (int r = 0; r < H; r++) begin
        @(negedge clk);
        while ($urandom % 5 == 0) begin
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
    repeat (8) @(negedge clk);
    check(seen == (H - 7) * (W - 7), $sformatf("outputs %0d", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
