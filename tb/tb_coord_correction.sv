// Test of the coordinates correction pipeline: for several plates (sizes,
// positive and negative alpha, a level plate) random output coordinates are
// fed one per cycle with gaps, and every (x2, y2) must match the reference
// mapping six cycles later.
module tb_coord_correction;
  import anpr_pkg::*;
  import anpr_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  coord_t  a = '0, b = '0, a_minus_va = '0;
  angle_t  angle = '0;
  logic    in_valid = 1'b0, in_last = 1'b0;
  scoord_t x1 = '0, y1 = '0;
  logic    out_valid, out_last;
  scoord_t x2, y2;

  coord_correction dut (.clk, .rst_n, .a, .b, .a_minus_va, .angle, .in_valid, .x1, .y1,
                        .in_last, .out_valid, .x2, .y2, .out_last);

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

  int ex[$], ey[$], et[$];
  int cyc = 0, got = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      got++;
      if (ex.size() == 0) check(1'b0, "unexpected output");
      else begin
        check(int'(x2) == ex[0] && int'(y2) == ey[0],
              $sformatf("(%0d,%0d) vs (%0d,%0d)", x2, y2, ex[0], ey[0]));
        check(cyc - et[0] == 6, $sformatf("latency %0d", cyc - et[0]));
        void'(ex.pop_front()); void'(ey.pop_front()); void'(et.pop_front());
      end
    end
  end

  task automatic run(int pa, int pb, int alpha_fx, bit flat, int va);
    int xx, yy, rx, ry, n;
    @(negedge clk);
    a = 10'(pa); b = 10'(pb); a_minus_va = 10'(pa - va);
    angle = '{flat: flat, alpha: 16'(alpha_fx), va: 10'(va)};
    n = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if ($urandom % 4 == 0) begin in_valid = 1'b0; continue; end
      xx = int'($urandom % pb);
      yy = va + int'($urandom % (pa - 2 * va));
      if (t == 1) begin xx = pb / 2; yy = pa / 2; end
      x1 = 12'(xx); y1 = 12'(yy);
      in_valid = 1'b1;
      ref_map(xx, yy, pa, pb, alpha_fx, flat, va, rx, ry);
      ex.push_back(rx); ey.push_back(ry); et.push_back(cyc);
      n++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    check(ex.size() == 0, "all results out");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(18, 99, 163, 1'b0, 5);       // about 5.6 degrees
    run(60, 300, 1200, 1'b0, 2);
    run(24, 140, -224, 1'b0, 5);     // negative tilt
    run(40, 200, 91, 1'b0, 10);      // about 10 degrees
    run(30, 120, 0, 1'b1, 0);        // level plate
    run(50, 250, -97, 1'b0, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
