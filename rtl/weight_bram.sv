// weight_bram: weight and threshold store, one row per neuron.
//
// A single-port synchronous RAM of DEPTH rows of WIDTH bits. Row r holds one
// neuron: its bias (threshold) word in the least significant WEIGHT_WIDTH bits
// and its MAX_NET_WIDTH input weights above it, so a row is
// (24 + 1) * 24 = 600 bits and the default depth is 4 * 24 = 96 rows (57,600 bits),
// the sizes of the original block-RAM core. That core was a vendor IP; this is
// an inferred equivalent.
//
// Timing: with en high, a write (we = 1) stores din at addr on the clock edge; a
// read (we = 0) presents the row at addr on dout after that edge (one cycle of
// read latency). Contents are not affected by reset.
module weight_bram
  import nn_pkg::*;
#(
  parameter int DEPTH = MAX_NET_DEPTH * MAX_NET_WIDTH,
  parameter int WIDTH = (MAX_NET_WIDTH + 1) * WEIGHT_WIDTH
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         din,
  output logic [WIDTH-1:0]         dout
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= din;
      else    dout      <= mem[addr];
    end
  end
endmodule
