// End-to-end test of the plate pre-processing pipeline at its default
// parameters.  Five scenes are processed back to back: the smallest plate
// size of the evaluation (18x99) tilted by about 5.6 degrees, the largest
// (60x300) touching the bottom-right image corner, a level plate, a plate in
// the top-left corner tilted the other way, and an 18x99 plate tilted by
// about 9 degrees.  For each scene the testbench
// fills two frame-memory models, pulses start and compares
//   - every binarised pixel with the local-threshold reference,
//   - d2 - d1, alpha and Va with the reference tilt measurement,
//   - every adjusted output pixel with the reference mapping,
//   - the final contents of both segmentation RAMs,
//   - the cycle count against the scan length (a+7)(b+7) plus the tail.
// It also counts how often each mechanism occurred (scan stall, circular
// buffer wrap, zero fill of out-of-plate sources, cropping, level plate,
// image-border clamp, negative tilt) and fails a mechanism never seen.
module tb_np_preproc_top;
  import anpr_pkg::*;
  import anpr_ref_pkg::*;

  localparam int LAG_T  = 128;
  localparam int BUF_T  = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b0;
  np_box_t box = '0;
  logic    gs_rd_en, nb_rd_en;
  addr_t   gs_rd_addr, nb_rd_addr;
  pix_t    gs_rd_data;
  logic    nb_rd_data;
  logic    bin_valid, bin_pix, bin_done, angle_done, out_valid, out_pix, done;
  angle_t  angle;
  scoord_t delta_d;
  logic [ADDR_W-1:0] out_count, stall_cycles;
  logic [7:0]  vs_rd_addr = '0;
  logic [10:0] hs_rd_addr = '0;
  logic        vs_rd_data, hs_rd_data;

  np_preproc_top dut (
    .clk, .rst_n, .start, .box,
    .gs_rd_en, .gs_rd_addr, .gs_rd_data,
    .nb_rd_en, .nb_rd_addr, .nb_rd_data,
    .bin_valid, .bin_pix, .bin_done,
    .angle_done, .angle, .delta_d,
    .out_valid, .out_pix, .out_count, .stall_cycles, .done,
    .vs_rd_addr, .vs_rd_data, .hs_rd_addr, .hs_rd_data
  );

  frame_mem_model #(.WIDTH(8), .LAT(1)) u_gs (
    .clk, .rd_en (gs_rd_en), .rd_addr (gs_rd_addr), .rd_data (gs_rd_data));
  frame_mem_model #(.WIDTH(1), .LAT(1)) u_nb (
    .clk, .rd_en (nb_rd_en), .rd_addr (nb_rd_addr), .rd_data (nb_rd_data));

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_stall = 0, n_wrap = 0, n_zero = 0, n_crop = 0, n_flat = 0, n_clamp = 0, n_neg = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bin_q[$];
  bit out_q[$];
  always @(posedge clk) begin
    if (bin_valid) bin_q.push_back(bin_pix);
    if (out_valid) out_q.push_back(out_pix);
  end

  task automatic run_scene(scene_t s);
    int a, b, n_bin, n_out, idx, t0, t1, x2, y2, src, scan, rows;
    int mism_bin, mism_out;
    ref_angle_t ra;
    bit exp_out[];
    a = s.y1 - s.y0 + 1;
    b = s.x1 - s.x0 + 1;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        u_gs.mem[y * IMG_W + x] = 8'(gs_pix(s, x, y));
        u_nb.mem[y * IMG_W + x] = nb_pix(s, x, y);
      end
    bin_q.delete();
    out_q.delete();
    @(negedge clk);
    box   = '{x0: 10'(s.x0), y0: 10'(s.y0), x1: 10'(s.x1), y1: 10'(s.y1)};
    start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    wait (done === 1'b1);
    t1 = cycle;
    @(negedge clk);

    // binarised plate
    n_bin = a * b;
    check(bin_q.size() == n_bin, $sformatf("bin count %0d vs %0d", bin_q.size(), n_bin));
    mism_bin = 0;
    for (int x = 0; x < b; x++)
      for (int y = 0; y < a; y++) begin
        idx = x * a + y;
        if (idx < bin_q.size()) begin
          check(bin_q[idx] == ref_bin(s, x, y), $sformatf("bin pixel (%0d,%0d)", x, y));
          if (bin_q[idx] != ref_bin(s, x, y)) mism_bin++;
        end
      end
    if (n_bin > BUF_T) n_wrap++;
    if (s.x0 < 3 || s.y0 < 3 || s.x1 > IMG_W - 5 || s.y1 > IMG_H - 5) n_clamp++;

    // tilt
    ra = ref_angle(s);
    check(angle.flat == ra.flat, "flat flag");
    check(int'(delta_d) == ra.d2 - ra.d1, $sformatf("delta d %0d vs %0d", delta_d, ra.d2 - ra.d1));
    check(ra.flat || int'(angle.alpha) == ra.alpha, $sformatf("alpha %0d vs %0d", angle.alpha, ra.alpha));
    check(int'(angle.va) == ra.va, $sformatf("Va %0d vs %0d", angle.va, ra.va));
    if (ra.flat) n_flat++;
    if (ra.d2 - ra.d1 < 0) n_neg++;
    if (ra.va > 0) n_crop++;

    // adjusted plate
    rows  = a - 2 * ra.va;
    n_out = b * rows;
    exp_out = new[n_out];
    check(out_q.size() == n_out, $sformatf("out count %0d vs %0d", out_q.size(), n_out));
    mism_out = 0;
    for (int x1 = 0; x1 < b; x1++)
      for (int y1 = ra.va; y1 < a - ra.va; y1++) begin
        idx = x1 * rows + (y1 - ra.va);
        ref_map(x1, y1, a, b, ra.alpha, ra.flat, ra.va, x2, y2);
        if (x2 < 0 || x2 >= b || y2 < 0 || y2 >= a) begin
          exp_out[idx] = 1'b0;
          n_zero++;
        end else begin
          exp_out[idx] = ref_bin(s, x2, y2);
          // the scene must keep sources inside the circular buffer's reach
          src  = x2 * a + y2;
          scan = x1 * a + y1;
          check(src - scan <= LAG_T && scan - src <= BUF_T - LAG_T - 16,
                $sformatf("scene keeps source (%0d,%0d) in reach", x2, y2));
        end
        if (idx < out_q.size()) begin
          check(out_q[idx] == exp_out[idx], $sformatf("out pixel (%0d,%0d)", x1, y1));
          if (out_q[idx] != exp_out[idx]) mism_out++;
        end
      end

    // segmentation RAMs hold the newest pixels, address = index mod depth
    for (int k = 0; k < 256 && k < n_out; k++) begin
      idx = n_out - 1 - k;
      vs_rd_addr = 8'(idx % 256);
      hs_rd_addr = 11'(idx % 2048);
      @(negedge clk);
      check(vs_rd_data == exp_out[idx], $sformatf("vs ram %0d", idx));
      check(hs_rd_data == exp_out[idx], $sformatf("hs ram %0d", idx));
    end

    // timing: scan of (a+7)(b+7) cycles plus a bounded tail
    check(t1 - t0 >= (a + 7) * (b + 7), "cycles not below the scan length");
    check(t1 - t0 <= (a + 7) * (b + 7) + LAG_T + 24,
          $sformatf("cycles %0d within scan + tail", t1 - t0));
    if (stall_cycles > 0) n_stall++;
    $display("scene %0dx%0d: cycles=%0d (scan %0d) dd=%0d alpha=%0d Va=%0d stalls=%0d bin_mism=%0d out_mism=%0d",
             a, b, t1 - t0, (a + 7) * (b + 7), delta_d, $signed(angle.alpha), angle.va, stall_cycles,
             mism_bin, mism_out);
  endtask

  initial begin
    scene_t s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    s = '{x0: 200, y0: 300, x1: 298, y1: 317, tilt_num: 4,  tilt_den: 50,  seed: 1};
    run_scene(s);
    s = '{x0: 340, y0: 420, x1: 639, y1: 479, tilt_num: 1,  tilt_den: 100, seed: 2};
    run_scene(s);
    s = '{x0: 100, y0: 100, x1: 219, y1: 129, tilt_num: 0,  tilt_den: 1,   seed: 3};
    run_scene(s);
    s = '{x0: 0,   y0: 0,   x1: 139, y1: 23,  tilt_num: -3, tilt_den: 40,  seed: 4};
    run_scene(s);
    s = '{x0: 420, y0: 60,  x1: 518, y1: 77,  tilt_num: 17, tilt_den: 100, seed: 5};
    run_scene(s);

    $display("mechanisms: stall=%0d wrap=%0d zero_fill=%0d crop=%0d flat=%0d clamp=%0d negative=%0d",
             n_stall, n_wrap, n_zero, n_crop, n_flat, n_clamp, n_neg);
    check(n_stall > 0, "scan stall seen");
    check(n_wrap  > 0, "buffer wrap seen");
    check(n_zero  > 0, "zero fill seen");
    check(n_crop  > 0, "crop seen");
    check(n_flat  > 0, "level plate seen");
    check(n_clamp > 0, "border clamp seen");
    check(n_neg   > 0, "negative tilt seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
