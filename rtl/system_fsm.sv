// system_fsm: the forward-propagation loop of the whole system.
//
// Four phases: weight transfer (the host loads weights and layer metadata),
// input transfer (the host loads the input vector), network compute (the layer
// controller runs every layer) and output transfer (the results are sent back).
// The phase advances on the first decoded input stream, on the end-of-transfer
// marker, on the layer controller's completion and, after the last output
// stream, returns to weight transfer; the top-level soft reset that follows the
// output transfer has the same effect. The phases are those of the original
// design; collecting them into one register is this design's choice, used for
// observation (phase output) only.
//
// Timing: all inputs are sampled on the clock edge; synchronous active-high
// reset returns to weight transfer.
module system_fsm
  import nn_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   input_stream_seen,
  input  logic   in_transfer_done,
  input  logic   compute_done,
  input  logic   out_transfer_done,
  output phase_e phase
);
  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_WEIGHT_TRANSFER;
    end else begin
      unique case (phase)
        PH_WEIGHT_TRANSFER: if (input_stream_seen) phase <= PH_INPUT_TRANSFER;
                            else if (in_transfer_done) phase <= PH_NETWORK_COMPUTE;
        PH_INPUT_TRANSFER:  if (in_transfer_done)  phase <= PH_NETWORK_COMPUTE;
        PH_NETWORK_COMPUTE: if (compute_done)      phase <= PH_OUTPUT_TRANSFER;
        PH_OUTPUT_TRANSFER: if (out_transfer_done) phase <= PH_WEIGHT_TRANSFER;
      endcase
    end
  end
endmodule
