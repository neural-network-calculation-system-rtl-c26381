// tree_adder: pipelined binary adder tree for one neuron's products.
//
// NUM_INPUTS signed IN_WIDTH-bit values are summed pairwise level by level; each
// level is registered and one bit wider than the one above it, so the sum is
// exact. The input count is padded with zeros to the next power of two (24 ->
// 32, five levels; the padding costs no registers). The structure (pairwise adders, +1 bit per level) follows the
// original tree adder; the generic size and the zero padding are this design's.
//
// Timing: in_valid is a one-cycle pulse sampled together with data. The inputs
// are registered on that edge and out_valid pulses LEVELS+1 cycles after
// in_valid, with sum valid in that cycle and held until the next operation.
// Synchronous active-high reset clears all levels.
module tree_adder #(
  parameter int NUM_INPUTS = 24,
  parameter int IN_WIDTH   = 37,
  localparam int LEVELS    = (NUM_INPUTS > 1) ? $clog2(NUM_INPUTS) : 1,
  localparam int OUT_WIDTH = IN_WIDTH + LEVELS
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,
  input  logic [NUM_INPUTS*IN_WIDTH-1:0] data,
  output logic                           out_valid,
  output logic signed [OUT_WIDTH-1:0]    sum
);
  localparam int LEAVES = 1 << LEVELS;

  // node[l][i] is the i-th partial sum of level l (level 0: the registered
  // inputs), sign-extended to the output width. Level l is computed in
  // IN_WIDTH+l bits; unused positions (zero padding, i >= LEAVES>>l) are 0.
  logic signed [OUT_WIDTH-1:0] node [LEVELS+1][LEAVES];
  logic [LEVELS:0]             vld;

  for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
    if (i < NUM_INPUTS) begin : g_in
      logic signed [IN_WIDTH-1:0] r;
      always_ff @(posedge clk) begin
        if (rst)           r <= '0;
        else if (in_valid) r <= data[i*IN_WIDTH +: IN_WIDTH];
      end
      assign node[0][i] = OUT_WIDTH'(r);
    end else begin : g_pad
      assign node[0][i] = '0;
    end
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar i = 0; i < LEAVES; i++) begin : g_node
      if (i < (LEAVES >> l)) begin : g_add
        logic signed [IN_WIDTH+l-1:0] r;
        always_ff @(posedge clk) begin
          if (rst) r <= '0;
          else     r <= (IN_WIDTH+l)'(node[l-1][2*i]) + (IN_WIDTH+l)'(node[l-1][2*i+1]);
        end
        assign node[l][i] = OUT_WIDTH'(r);
      end else begin : g_unused
        assign node[l][i] = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LEVELS-1:0], in_valid};
  end

  assign out_valid = vld[LEVELS];
  assign sum       = node[LEVELS][0];
endmodule
