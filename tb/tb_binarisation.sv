// Test of the binarisation module with a greyscale frame-memory model of
// two-cycle latency.  Three plates (one against the left/top frame edges,
// one against the right/bottom edges) are binarised; every output pixel is
// compared with b = f > mean8x8 - 6 computed from the frame, the binary
// buffer is read back at the end (the newest 256 pixels, address index
// mod 256), and the run must take (a+7)(b+7) memory reads back to back.
module tb_binarisation;
  import anpr_pkg::*;
  import anpr_ref_pkg::*;

  localparam int LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b0;
  np_box_t box = '0;
  logic    gs_rd_en, bin_valid, bin_pix, done, bin_rd_data;
  addr_t   gs_rd_addr;
  pix_t    gs_rd_data;
  logic [ADDR_W-1:0] bin_count;
  logic [7:0] bin_rd_addr = '0;

  binarisation #(.MEM_LAT(LAT)) dut (
    .clk, .rst_n, .start, .box, .gs_rd_en, .gs_rd_addr, .gs_rd_data,
    .bin_valid, .bin_pix, .bin_count, .done, .bin_rd_addr, .bin_rd_data);

  frame_mem_model #(.WIDTH(8), .LAT(LAT)) u_gs (
    .clk, .rd_en (gs_rd_en), .rd_addr (gs_rd_addr), .rd_data (gs_rd_data));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit bin_q[$];
  int cyc = 0, reads = 0, first_rd = -1, last_rd = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && bin_valid) bin_q.push_back(bin_pix);
    if (rst_n && gs_rd_en) begin
      reads++;
      if (first_rd < 0) first_rd = cyc;
      last_rd = cyc;
    end
  end

  task automatic run(scene_t s);
    int a, b, ones;
    bit e[];
    a = s.y1 - s.y0 + 1;
    b = s.x1 - s.x0 + 1;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) u_gs.mem[y * IMG_W + x] = 8'(gs_pix(s, x, y));
    bin_q.delete();
    reads = 0;
    first_rd = -1;
    @(negedge clk);
    box = '{x0: 10'(s.x0), y0: 10'(s.y0), x1: 10'(s.x1), y1: 10'(s.y1)};
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done === 1'b1);
    @(negedge clk);
    e = new[a * b];
    ones = 0;
    for (int x = 0; x < b; x++)
      for (int y = 0; y < a; y++) begin
        e[x * a + y] = ref_bin(s, x, y);
        ones += e[x * a + y];
      end
    check(bin_q.size() == a * b, $sformatf("pixel count %0d", bin_q.size()));
    check(int'(bin_count) == a * b, "bin_count");
    for (int i = 0; i < a * b && i < bin_q.size(); i++)
      check(bin_q[i] == e[i], $sformatf("pixel %0d (x=%0d y=%0d)", i, i / a, i % a));
    check(ones > 0 && ones < a * b, "plate has both colours");
    check(reads == (a + 7) * (b + 7), $sformatf("reads %0d", reads));
    check(last_rd - first_rd == (a + 7) * (b + 7) - 1, "one read per cycle");
    for (int i = a * b - 256; i < a * b; i++) begin
      bin_rd_addr = 8'(i % 256);
      @(negedge clk);
      check(bin_rd_data == e[i], $sformatf("buffer %0d", i));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('{x0: 250, y0: 200, x1: 348, y1: 217, tilt_num: 0, tilt_den: 1, seed: 11});
    run('{x0: 1,   y0: 0,   x1: 120, y1: 30,  tilt_num: 0, tilt_den: 1, seed: 12});
    run('{x0: 560, y0: 440, x1: 639, y1: 479, tilt_num: 0, tilt_den: 1, seed: 13});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
