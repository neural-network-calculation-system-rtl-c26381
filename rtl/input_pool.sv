// input_pool: the activation vector fed to the layer computation.
//
// An I x N register file. It is loaded whole, either with the network inputs
// decoded by the communication module (comm_write_en, "data valid") or with the
// previous layer's results from the output pool (get_from_output_pool), so that
// the next layer is computed from them. Write enable is the OR of the two
// strobes and get_from_output_pool selects the output pool data, as in the
// original block diagram. The valid flag (this design's addition) says the
// register holds data; it is set by any load and cleared by reset.
//
// Timing: the load happens on the clock edge on which a strobe is high;
// read_data is the register output. Synchronous active-high reset clears both.
module input_pool
  import nn_pkg::*;
#(
  parameter int MAX_NET_WIDTH_P = MAX_NET_WIDTH,
  parameter int INPUT_WIDTH_P   = INPUT_WIDTH
) (
  input  logic                                    clk,
  input  logic                                    rst,
  input  logic                                    comm_write_en,
  input  logic                                    get_from_output_pool,
  input  logic [MAX_NET_WIDTH_P*INPUT_WIDTH_P-1:0] comm_data,
  input  logic [MAX_NET_WIDTH_P*INPUT_WIDTH_P-1:0] output_pool_data,
  output logic [MAX_NET_WIDTH_P*INPUT_WIDTH_P-1:0] read_data,
  output logic                                    valid
);
  logic load;
  logic [MAX_NET_WIDTH_P*INPUT_WIDTH_P-1:0] next_data;

  assign load      = comm_write_en | get_from_output_pool;
  assign next_data = get_from_output_pool ? output_pool_data : comm_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      read_data <= '0;
      valid     <= 1'b0;
    end else if (load) begin
      read_data <= next_data;
      valid     <= 1'b1;
    end
  end
endmodule
