// Simple dual-port RAM: one write port and one synchronous read port on a
// common clock.  It models the on-chip block RAMs of the design: the window
// shifter's LineBuffer, the 256x1 buffer of binarised pixels and the 256x1
// and 2048x1 buffers handed to character segmentation.
//
// Interface: a write happens on the rising edge when we is high; rd_data
// shows the word at rd_addr one cycle after the address is presented
// (registered read).  A read and a write of the same address in one cycle
// return the old word.  The array has no reset, as block RAM has none; the
// users never read a word before they have written it.
module dp_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
