// Test of the rotation angle calculator on binary localiser frames with a
// tilted plate top edge: rising, falling, level, steep enough that Va is
// limited, and a column with no plate pixel at all.  d2 - d1, alpha (4
// fractional bits), Va and the flat flag are compared with the reference,
// the number of memory reads must be d1 + d2 plus one look-ahead read per
// column, and done must stay high until the next start.
module tb_rotation_angle_calc;
  import anpr_pkg::*;
  import anpr_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b0;
  np_box_t box = '0;
  logic    rd_en, rd_data, done;
  addr_t   rd_addr;
  angle_t  angle;
  scoord_t delta_d;

  rotation_angle_calc dut (.clk, .rst_n, .start, .box, .rd_en, .rd_addr, .rd_data,
                           .done, .angle, .delta_d);

  frame_mem_model #(.WIDTH(1), .LAT(1)) u_nb (.clk, .rd_en, .rd_addr, .rd_data);

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

  int reads = 0;
  always @(posedge clk) if (rst_n && rd_en) reads++;

  task automatic run(scene_t s, bit blank_col2);
    ref_angle_t r;
    int b, c;
    for (int i = 0; i < IMG_W * IMG_H; i++) u_nb.mem[i] = nb_pix(s, i % IMG_W, i / IMG_W);
    b = s.x1 - s.x0 + 1;
    c = b / 4;
    if (blank_col2)
      for (int y = 0; y < IMG_H; y++) u_nb.mem[y * IMG_W + s.x0 + b - c] = 1'b0;
    r = ref_angle(s);
    if (blank_col2) begin
      // reference with an empty second column: d2 = a
      r.d2 = s.y1 - s.y0 + 1;
      r.flat = (r.d2 == r.d1);
      r.alpha = round_away(16.0 * real'(b - 2 * c) / real'(r.d2 - r.d1));
      r.va = ref_div(b / 2, r.alpha, r.flat);
      if (r.va < 0) r.va = -r.va;
      if (r.va > (s.y1 - s.y0) / 2) r.va = (s.y1 - s.y0) / 2;
    end
    reads = 0;
    @(negedge clk);
    box = '{x0: 10'(s.x0), y0: 10'(s.y0), x1: 10'(s.x1), y1: 10'(s.y1)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(done == 1'b0, "done cleared by start");
    wait (done === 1'b1);
    @(negedge clk);
    check(int'(delta_d) == r.d2 - r.d1, $sformatf("delta d %0d vs %0d", delta_d, r.d2 - r.d1));
    check(angle.flat == r.flat, "flat");
    check(r.flat || int'(angle.alpha) == r.alpha, $sformatf("alpha %0d vs %0d", angle.alpha, r.alpha));
    check(int'(angle.va) == r.va, $sformatf("va %0d vs %0d", angle.va, r.va));
    check(reads >= r.d1 + r.d2 && reads <= r.d1 + r.d2 + 2, $sformatf("reads %0d", reads));
    repeat (5) @(negedge clk);
    check(done == 1'b1, "done held");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('{x0: 100, y0: 100, x1: 198, y1: 117, tilt_num: 4,  tilt_den: 50, seed: 0}, 0);
    run('{x0: 300, y0: 50,  x1: 599, y1: 109, tilt_num: -1, tilt_den: 10, seed: 0}, 0);
    run('{x0: 20,  y0: 400, x1: 139, y1: 423, tilt_num: 0,  tilt_den: 1,  seed: 0}, 0);
    run('{x0: 200, y0: 200, x1: 299, y1: 219, tilt_num: 1,  tilt_den: 4,  seed: 0}, 0);
    run('{x0: 200, y0: 300, x1: 279, y1: 329, tilt_num: 1,  tilt_den: 20, seed: 0}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
