// Test of the adjustment module.  The testbench plays the binarisation
// module: it writes a random binary plate, pixel by pixel in column-major
// order with random idle cycles, into a behavioural 256x1 circular buffer
// and reports the running count.  The localiser's binary frame comes from a
// frame-memory model with a tilted plate top edge.  Checked: the measured
// tilt, every adjusted output pixel (source pixel from the reference mapping,
// 0 outside the plate), the number of output pixels b(a - 2Va), that the
// scan never reads a pixel before it is written, and that the scan stalls.
module tb_adjustment;
  import anpr_pkg::*;
  import anpr_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b0;
  np_box_t box = '0;
  logic    nb_rd_en, nb_rd_data;
  addr_t   nb_rd_addr;
  logic [ADDR_W-1:0] bin_count = '0, out_count, stall_cycles;
  logic    bin_done = 1'b0;
  logic [7:0] bin_rd_addr;
  logic    bin_rd_data;
  logic    angle_done, out_valid, out_pix, done, vs_rd_data, hs_rd_data;
  angle_t  angle;
  scoord_t delta_d;

  adjustment dut (.clk, .rst_n, .start, .box, .nb_rd_en, .nb_rd_addr, .nb_rd_data,
                  .bin_count, .bin_done, .bin_rd_addr, .bin_rd_data, .angle_done, .angle,
                  .delta_d, .out_valid, .out_pix, .out_count, .done, .stall_cycles,
                  .vs_rd_addr (8'd0), .vs_rd_data, .hs_rd_addr (11'd0), .hs_rd_data);

  frame_mem_model #(.WIDTH(1), .LAT(1)) u_nb (
    .clk, .rd_en (nb_rd_en), .rd_addr (nb_rd_addr), .rd_data (nb_rd_data));

  // behavioural binary buffer (registered read)
  bit bufm [256];
  always_ff @(posedge clk) bin_rd_data <= bufm[bin_rd_addr];

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit outs[$];
  always @(posedge clk) if (rst_n && out_valid) outs.push_back(out_pix);

  bit img [];
  int n_stall = 0, n_zero = 0;

  task automatic run(scene_t s);
    int a, b, x2, y2, rows, idx, e;
    ref_angle_t r;
    a = s.y1 - s.y0 + 1;
    b = s.x1 - s.x0 + 1;
    img = new[a * b];
    foreach (img[i]) img[i] = 1'($urandom);
    for (int i = 0; i < IMG_W * IMG_H; i++) u_nb.mem[i] = nb_pix(s, i % IMG_W, i / IMG_W);
    outs.delete();
    @(negedge clk);
    box = '{x0: 10'(s.x0), y0: 10'(s.y0), x1: 10'(s.x1), y1: 10'(s.y1)};
    start = 1'b1;
    bin_count = '0;
    bin_done = 1'b0;
    @(negedge clk);
    start = 1'b0;
    // feed the binary plate
    for (int i = 0; i < a * b; i++) begin
      while ($urandom % 3 == 0) @(negedge clk);
      bufm[i % 256] = img[i];
      @(negedge clk);
      bin_count = ADDR_W'(i + 1);
    end
    bin_done = 1'b1;
    wait (done === 1'b1);
    @(negedge clk);
    r = ref_angle(s);
    check(int'(delta_d) == r.d2 - r.d1 && angle.flat == r.flat, "tilt");
    check(r.flat || int'(angle.alpha) == r.alpha, "alpha");
    check(int'(angle.va) == r.va, "Va");
    rows = a - 2 * r.va;
    check(outs.size() == b * rows && int'(out_count) == b * rows,
          $sformatf("out count %0d vs %0d", outs.size(), b * rows));
    for (int x1 = 0; x1 < b; x1++)
      for (int y1 = r.va; y1 < a - r.va; y1++) begin
        idx = x1 * rows + y1 - r.va;
        ref_map(x1, y1, a, b, r.alpha, r.flat, r.va, x2, y2);
        if (x2 < 0 || x2 >= b || y2 < 0 || y2 >= a) begin
          e = 0;
          n_zero++;
        end else e = int'(img[x2 * a + y2]);
        if (idx < outs.size()) check(int'(outs[idx]) == e, $sformatf("out (%0d,%0d)", x1, y1));
      end
    if (stall_cycles > 0) n_stall++;
    $display("plate %0dx%0d dd=%0d Va=%0d stalls=%0d", a, b, delta_d, angle.va, stall_cycles);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('{x0: 200, y0: 300, x1: 298, y1: 317, tilt_num: 4,  tilt_den: 50, seed: 0});
    run('{x0: 10,  y0: 10,  x1: 149, y1: 33,  tilt_num: -3, tilt_den: 40, seed: 0});
    run('{x0: 400, y0: 200, x1: 519, y1: 229, tilt_num: 0,  tilt_den: 1,  seed: 0});
    check(n_stall == 3, "scan stalled behind the binarisation");
    check(n_zero > 0, "zero fill of out-of-plate sources");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
