// Test of the local threshold filter: 600 random (mean, grey) pairs,
// including the boundary grey = mean - 6 and small means where mean - 6 is
// negative.  Each output bit must be 0 exactly when grey <= mean - 6; the
// write counter must count every pixel; and after the run the 256-entry
// buffer must hold the last 256 bits at address index mod 256 (the address
// wraps).  done must rise after the pixel flagged last.
module tb_local_threshold_filter;
  import anpr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, in_valid = 1'b0, in_last = 1'b0;
  pix_t mean = '0, grey = '0;
  logic bin_valid, bin_pix, done, rd_data;
  logic [ADDR_W-1:0] wr_count;
  logic [7:0] rd_addr = '0;

  local_threshold_filter dut (.clk, .rst_n, .start, .in_valid, .mean, .grey, .in_last,
                              .bin_valid, .bin_pix, .wr_count, .done, .rd_addr, .rd_data);

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

  localparam int N = 600;
  bit exp_b [N];
  int got = 0;

  always @(posedge clk) begin
    if (bin_valid && rst_n) begin
      if (got < N) check(bin_pix == exp_b[got], $sformatf("bit %0d", got));
      got++;
    end
  end

  initial begin
    int m, g, k;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    k = 0;
    while (k < N) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin in_valid = 1'b0; continue; end
      m = int'($urandom % 256);
      case ($urandom % 4)
        0: g = m - 6;
        1: g = m - 5;
        default: g = int'($urandom % 256);
      endcase
      if (k < 10) m = k;          // threshold below zero
      if (g < 0) g = 0;
      if (g > 255) g = 255;
      mean = 8'(m); grey = 8'(g);
      in_valid = 1'b1;
      in_last  = (k == N - 1);
      exp_b[k] = !(g <= m - 6);
      k++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(got == N, "all bits out");
    check(int'(wr_count) == N, $sformatf("wr_count %0d", wr_count));
    check(done == 1'b1, "done");
    // buffer holds the newest 256 bits
    for (int i = N - 256; i < N; i++) begin
      rd_addr = 8'(i % 256);
      @(negedge clk);
      check(rd_data == exp_b[i], $sformatf("buffer entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
