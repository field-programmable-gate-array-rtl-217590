// Test of the pixel reader against a behavioural 256x1 binary buffer that
// holds pixel index i of a 20-row plate at address i mod 256.  Random source
// coordinates, some outside the plate, are fed with gaps; each output pixel
// must be the buffered bit for an inside coordinate and 0 otherwise, appear
// three cycles after its coordinate, and end up in both segmentation RAMs at
// its sequence number mod 256 and mod 2048.  done must follow the last pixel.
module tb_pixel_reader;
  import anpr_pkg::*;

  localparam int A = 20, B = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b0, in_valid = 1'b0, in_last = 1'b0;
  scoord_t x2 = '0, y2 = '0;
  logic [7:0]  bin_rd_addr;
  logic        bin_rd_data;
  logic        out_valid, out_pix, done, vs_rd_data, hs_rd_data;
  logic [ADDR_W-1:0] out_count;
  logic [7:0]  vs_rd_addr = '0;
  logic [10:0] hs_rd_addr = '0;

  pixel_reader dut (.clk, .rst_n, .start, .a (10'(A)), .b (10'(B)), .in_valid, .x2, .y2,
                    .in_last, .bin_rd_addr, .bin_rd_data, .out_valid, .out_pix, .out_count,
                    .done, .vs_rd_addr, .vs_rd_data, .hs_rd_addr, .hs_rd_data);

  // behavioural binary buffer: registered read
  bit bufm [256];
  always_ff @(posedge clk) bin_rd_data <= bufm[bin_rd_addr];

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

  int ep[$], et[$];
  bit outs[$];
  int cyc = 0, n_out_of_plate = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      outs.push_back(out_pix);
      if (ep.size() == 0) check(1'b0, "unexpected output");
      else begin
        check(int'(out_pix) == ep[0], $sformatf("pixel %0d", outs.size() - 1));
        check(cyc - et[0] == 2, $sformatf("latency %0d", cyc - et[0]));
        void'(ep.pop_front()); void'(et.pop_front());
      end
    end
  end

  initial begin
    int xx, yy, n;
    localparam int N = 2300;
    for (int i = 0; i < 256; i++) bufm[i] = 1'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (n < N) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin in_valid = 1'b0; continue; end
      xx = int'($urandom % (B + 8)) - 4;
      yy = int'($urandom % (A + 8)) - 4;
      x2 = 12'(xx); y2 = 12'(yy);
      in_valid = 1'b1;
      in_last = (n == N - 1);
      if (xx < 0 || xx >= B || yy < 0 || yy >= A) begin
        ep.push_back(0);
        n_out_of_plate++;
      end else ep.push_back(int'(bufm[(xx * A + yy) % 256]));
      et.push_back(cyc);
      n++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    in_last = 1'b0;
    repeat (5) @(negedge clk);
    check(outs.size() == N && int'(out_count) == N, "count");
    check(done == 1'b1, "done");
    check(n_out_of_plate > 0, "out-of-plate coordinates exercised");
    for (int k = 0; k < 256; k++) begin
      vs_rd_addr = 8'((N - 1 - k) % 256);
      hs_rd_addr = 11'((N - 1 - k) % 2048);
      @(negedge clk);
      check(vs_rd_data == outs[N - 1 - k], "vertical segmentation RAM");
      check(hs_rd_data == outs[N - 1 - k], "horizontal segmentation RAM");
    end
    for (int k = 256; k < 2048; k += 37) begin
      hs_rd_addr = 11'((N - 1 - k) % 2048);
      @(negedge clk);
      check(hs_rd_data == outs[N - 1 - k], "horizontal segmentation RAM, older");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
