// hit_buffer: the per-pixel circular buffer of the simple readout.
//
// A RAM of DEPTH words of WIDTH bits (defaults 256 x 30, as in the design
// note). Writes are synchronous: on a rising clk edge with we=1 the word din
// is stored at addr. Reads are asynchronous: the word at addr appears on
// dout in the same cycle, but only while oe=1; with oe=0 dout is all zeros.
// The pixel drives a column bus that four pixels share, and the bus is
// built as the OR of the pixels' gated outputs (on chip it is a tri-state
// bus; zero-when-disabled is this design's choice so that the bus can be
// written as plain logic). The RAM itself is not reset.
module hit_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 30,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  input  logic             oe,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
  end

  assign dout = oe ? mem[addr] : '0;

endmodule
