// Test of the simple dual-port RAM: random writes and reads against an
// array model, one-cycle read latency, old data on a same-address collision.
module tb_dp_ram;
  localparam int DEPTH = 256;
  localparam int WIDTH = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             we = 1'b0;
  logic [7:0]       wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .wr_addr, .wr_data, .rd_addr, .rd_data);

  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp_q;
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = 8'(i); wr_data = WIDTH'($urandom); model[i] = wr_data;
    end
    @(negedge clk);
    we = 1'b0;
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      rd_addr = 8'($urandom);
      we      = 1'($urandom);
      wr_addr = (n % 7 == 0) ? rd_addr : 8'($urandom);
      wr_data = WIDTH'($urandom);
      exp_q   = model[rd_addr];            // old data wins on collision
      if (we) model[wr_addr] = wr_data;
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d: %h vs %h", rd_addr, rd_data, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
