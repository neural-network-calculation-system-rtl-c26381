// relu: rectified linear unit for a signed WIDTH-bit value.
//
// The sign bit is inverted and ANDed with every lower bit, so the output is the
// input's magnitude bits when the input is non-negative and all zeros when it is
// negative. The output is WIDTH-1 bits wide (the sign bit is dropped), which is
// the gate-level structure of the original neuron's activation stage.
// Purely combinational.
module relu #(
  parameter int WIDTH = 41
) (
  input  logic [WIDTH-1:0] din,   // signed two's complement
  output logic [WIDTH-2:0] dout   // non-negative result
);
  always_comb dout = din[WIDTH-2:0] & {(WIDTH-1){~din[WIDTH-1]}};
endmodule
