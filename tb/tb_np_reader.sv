// Test of the NP reader: the address sequence of a plate (column by column,
// widened by 3/4 pixels, clamped to the frame), the side-band delayed by the
// memory latency, and the scan length (a+7)(b+7).  Two plates: one inside
// the frame and one in the top-left corner.
module tb_np_reader;
  import anpr_pkg::*;

  localparam int LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b0;
  np_box_t box = '0;
  logic    busy, rd_en, px_valid, px_last;
  addr_t   rd_addr;
  coord_t  px_row, px_col;

  np_reader #(.MEM_LAT(LAT)) dut (.clk, .rst_n, .start, .box, .busy, .rd_en, .rd_addr,
                                   .px_valid, .px_row, .px_col, .px_last);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // capture
  int    addr_q[$];
  int    row_q[$], col_q[$], last_q[$];
  int    rd_cycle[$], px_cycle[$];
  int    cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_en) begin addr_q.push_back(int'(rd_addr)); rd_cycle.push_back(cyc); end
    if (px_valid) begin
      row_q.push_back(int'(px_row)); col_q.push_back(int'(px_col));
      last_q.push_back(int'(px_last)); px_cycle.push_back(cyc);
    end
  end

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  task automatic run(int x0, int y0, int x1, int y1);
    int n, k, h, w;
    addr_q.delete(); row_q.delete(); col_q.delete(); last_q.delete();
    rd_cycle.delete(); px_cycle.delete();
    @(negedge clk);
    box = '{x0: 10'(x0), y0: 10'(y0), x1: 10'(x1), y1: 10'(y1)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (busy == 1'b0);
    repeat (LAT + 2) @(negedge clk);
    h = y1 - y0 + 8;
    w = x1 - x0 + 8;
    n = h * w;
    check(addr_q.size() == n, $sformatf("reads %0d vs %0d", addr_q.size(), n));
    check(row_q.size() == n, "side-band count");
    k = 0;
    for (int c = 0; c < w; c++)
      for (int r = 0; r < h; r++) begin
        if (k < addr_q.size() && k < row_q.size()) begin
          check(addr_q[k] == 640 * clampi(y0 - 3 + r, 0, 479) + clampi(x0 - 3 + c, 0, 639),
                $sformatf("address %0d", k));
          check(row_q[k] == r && col_q[k] == c, $sformatf("side-band %0d", k));
          check(last_q[k] == (k == n - 1), "last flag");
          check(px_cycle[k] - rd_cycle[k] == LAT, "side-band delay");
        end
        k++;
      end
    // one read per clock, back to back
    if (rd_cycle.size() == n)
      check(rd_cycle[n-1] - rd_cycle[0] == n - 1, "scan length (a+7)(b+7) cycles");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(100, 200, 140, 215);
    run(0, 1, 30, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
