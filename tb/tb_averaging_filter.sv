// Test of the averaging filter: random 8x8 windows (plus all-255 and all-0
// corner cases) enter one per cycle with random gaps; each mean must equal
// floor(sum / 64) three cycles later, with the centre pixel passed along.
module tb_averaging_filter;
  import anpr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_last = 1'b0;
  pix_t win [WIN][WIN];
  pix_t centre = '0;
  logic out_valid, out_last;
  pix_t mean, out_centre;

  averaging_filter dut (.clk, .rst_n, .in_valid, .win, .centre, .in_last,
                        .out_valid, .mean, .out_centre, .out_last);

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

  int exp_m[$], exp_c[$], exp_t[$], exp_l[$];
  int cyc = 0, got = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (out_valid && rst_n) begin
      got++;
      if (exp_m.size() == 0) check(1'b0, "unexpected output");
      else begin
        check(int'(mean) == exp_m[0], $sformatf("mean %0d vs %0d", mean, exp_m[0]));
        check(int'(out_centre) == exp_c[0], "centre");
        check(cyc - exp_t[0] == 3, $sformatf("latency %0d", cyc - exp_t[0]));
        check(int'(out_last) == exp_l[0], "last");
        void'(exp_m.pop_front()); void'(exp_c.pop_front());
        void'(exp_t.pop_front()); void'(exp_l.pop_front());
      end
    end
  end

  initial begin
    int sum, n;
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) win[r][c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    n = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 1'b0;
        continue;
      end
      sum = 0;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          win[r][c] = (t == 1) ? 8'd255 : (t == 2) ? 8'd0 : 8'($urandom);
          sum += int'(win[r][c]);
        end
      centre   = 8'($urandom);
      in_valid = 1'b1;
      in_last  = (t == 1999);
      exp_m.push_back(sum / 64);
      exp_c.push_back(int'(centre));
      exp_t.push_back(cyc);
      exp_l.push_back(int'(in_last));
      n++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    check(got == n && exp_m.size() == 0, $sformatf("outputs %0d of %0d", got, n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
