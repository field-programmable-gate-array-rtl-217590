// Behavioural model of an external 640x480 frame memory (the board SRAM
// holding a greyscale or binary car frame).  Not synthesisable design: the
// testbench fills mem directly.  A read issued with rd_en returns rd_data
// LAT cycles later; the output keeps its last value otherwise.
module frame_mem_model #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned LAT   = 1,
  parameter int unsigned WORDS = 640 * 480
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [18:0]      rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [WORDS];
  logic [WIDTH-1:0] pipe [LAT];
  int unsigned      reads = 0;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      pipe[0] <= mem[rd_addr];
      reads   <= reads + 1;
    end
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  assign rd_data = pipe[LAT-1];

endmodule
