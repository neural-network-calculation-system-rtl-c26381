// layer_computation: the arithmetic of one computation step.
//
// For each of up to I neurons k and each input j, the signed N-bit input x[j] is
// multiplied by the signed M-bit weight w[k][j] (I*I multipliers; on the FPGA
// these map to DSP slices). Each product is shifted right arithmetically by S1,
// the I shifted products of a neuron are summed by a pipelined tree adder, the
// sum is shifted right by S2, the neuron's bias word b[k] is added, and a ReLU
// removes negative results. The low N bits of the ReLU output are the neuron's
// new activation:
//
//     y[k] = low_N( relu( ((sum_j (x[j]*w[k][j]) >>> S1) >>> S2) + b[k] ) )
//
// Widths follow the neuron diagram of the original design: N+M after the
// multiply, N+M-S1 after the first shift, N+M+ceil(log2(I+1))-S1 after the sum,
// minus S2 after the second shift. The bias is the node's first stored weight
// (the host stores the negated threshold there); it is added after the S2 shift.
//
// Control: an FSM with states S_WAITING, S_SUM and S_DONE. A start pulse in
// S_WAITING registers all products; the tree adder then takes LEVELS+1 cycles;
// the finished values are registered and out_valid (the output pool's write
// enable) is high for exactly one cycle. out_valid rises on the (clog2(I)+3)-th
// clock edge, counting the edge that samples start as the first (8 at I = 24).
// Inputs must be stable from start until out_valid. Synchronous active-high
// reset.
module layer_computation
  import nn_pkg::*;
#(
  parameter int I  = MAX_NET_WIDTH,
  parameter int N  = INPUT_WIDTH,
  parameter int M  = WEIGHT_WIDTH,
  parameter int S1 = SHIFT_1,
  parameter int S2 = SHIFT_2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [I*I*M-1:0] weights,      // neuron k, input j at (k*I+j)*M
  input  logic [I*M-1:0]   thresholds,   // bias word of neuron k at k*M
  input  logic [I*N-1:0]   inputs,       // input j at j*N
  output logic [I*N-1:0]   outputs,      // activation of neuron k at k*N
  output logic             out_valid
);
  localparam int PROD_W = N + M;
  localparam int SH1_W  = PROD_W - S1;
  localparam int LEVELS = (I > 1) ? $clog2(I) : 1;
  localparam int SUM_W  = SH1_W + LEVELS;
  localparam int SH2_W  = SUM_W - S2;
  localparam int ACC_W  = ((SH2_W > M) ? SH2_W : M) + 1;

  typedef enum logic [1:0] {S_WAITING, S_SUM, S_DONE} state_e;
  state_e state;

  logic [I*I*SH1_W-1:0]           products;    // shifted products, neuron-major
  logic                           sum_start;
  logic [I-1:0]                   sum_valid;
  logic signed [SUM_W-1:0]        sums [I];
  logic [I*N-1:0]                 finished;

  // Multiply and shift: one multiplier per (neuron, input) pair, registered
  // when the start pulse arrives.
  for (genvar k = 0; k < I; k++) begin : g_row
    for (genvar j = 0; j < I; j++) begin : g_mul
      logic signed [PROD_W-1:0] p;
      logic signed [SH1_W-1:0]  r;
      assign p = $signed(inputs[j*N +: N]) * $signed(weights[(k*I+j)*M +: M]);
      always_ff @(posedge clk) begin
        if (rst)                          r <= '0;
        else if (state == S_WAITING && start) r <= SH1_W'(p >>> S1);
      end
      assign products[(k*I+j)*SH1_W +: SH1_W] = r;
    end
  end

  // One tree adder per neuron.
  for (genvar k = 0; k < I; k++) begin : g_neuron
    logic signed [SH2_W-1:0] shifted;
    logic signed [ACC_W-1:0] biased;
    logic [ACC_W-2:0]        activated;

    tree_adder #(.NUM_INPUTS(I), .IN_WIDTH(SH1_W)) u_tree (
      .clk      (clk),
      .rst      (rst),
      .in_valid (sum_start),
      .data     (products[k*I*SH1_W +: I*SH1_W]),
      .out_valid(sum_valid[k]),
      .sum      (sums[k])
    );

    assign shifted = SH2_W'(sums[k] >>> S2);
    assign biased  = ACC_W'(shifted) + ACC_W'($signed(thresholds[k*M +: M]));

    relu #(.WIDTH(ACC_W)) u_relu (.din(biased), .dout(activated));

    assign finished[k*N +: N] = activated[N-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_WAITING;
      sum_start <= 1'b0;
      out_valid <= 1'b0;
      outputs   <= '0;
    end else begin
      sum_start <= 1'b0;
      out_valid <= 1'b0;
      unique case (state)
        S_WAITING: if (start) begin
          sum_start <= 1'b1;
          state     <= S_SUM;
        end
        S_SUM: if (sum_valid[0]) begin
          outputs   <= finished;
          out_valid <= 1'b1;
          state     <= S_DONE;
        end
        S_DONE: state <= S_WAITING;
        default: state <= S_WAITING;
      endcase
    end
  end
endmodule
