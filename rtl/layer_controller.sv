// layer_controller: the control FSM that walks the network layer by layer.
//
// Once the communication module reports that the host has finished sending
// (depth_ready, with network_depth = number of layers), the controller reads the
// first layer's parallelism P and largest neuron index from the two parameter
// pools, then requests the weights of neurons cur_node .. cur_node+P-1 from the
// memory controller. When both the weights and the input pool are ready it
// pulses comp_start and waits for the layer computation (S_WAITING_LAYERCOMP).
// The computation writes its results straight into the output pool, which uses
// cur_node and P from this controller as start address and width. Then:
//   - if neurons remain in the layer (cur_node + P <= max_node_id), cur_node
//     advances by P and the next group's weights are requested;
//   - else if this was the last layer, all_done rises and stays high until reset
//     (the communication module then sends the outputs);
//   - else get_from_output_pool pulses, copying the results into the input pool,
//     and the next layer begins with a new metadata read.
// The state names S_WAITING_INPUTS, S_WAITING_LAYERCOMP and S_DONE and the
// sequence are the original design's; issuing the weight read only after P is
// known and delaying the pool copy by one cycle are this design's.
//
// Timing: all request outputs (pool_read_en, mem_read_en, comp_start,
// get_from_output_pool) are one-cycle pulses. comp_done is the layer
// computation's one-cycle write enable. Synchronous active-high reset.
module layer_controller
  import nn_pkg::*;
#(
  parameter int I = MAX_NET_WIDTH,
  parameter int D = MAX_NET_DEPTH,
  localparam int LID_W = (D > 1) ? $clog2(D) : 1,
  localparam int DEP_W = $clog2(D + 1),
  localparam int NID_W = $clog2(I),
  localparam int P_W   = $clog2(I + 1)
) (
  input  logic             clk,
  input  logic             rst,
  // communication module
  input  logic             depth_ready,
  input  logic [DEP_W-1:0] network_depth,
  output logic             all_done,
  // parameter pools
  output logic             pool_read_en,
  output logic [LID_W-1:0] cur_layer,
  input  logic [P_W-1:0]   pool_parallelism,
  input  logic             pool_parallelism_rdy,
  input  logic [NID_W-1:0] pool_max_node_id,
  input  logic             pool_max_node_rdy,
  // memory controller
  output logic             mem_read_en,
  output logic [NID_W-1:0] cur_node,
  output logic [P_W-1:0]   parallelism,
  input  logic             weights_rdy,
  // input pool / output pool
  input  logic             inputs_rdy,
  output logic [NID_W-1:0] max_node_id,
  output logic             get_from_output_pool,
  // layer computation
  output logic             comp_start,
  input  logic             comp_done
);
  typedef enum logic [2:0] {
    S_IDLE,              // waiting for the host to finish sending
    S_LOAD_ARCH,         // waiting for P and max node id of cur_layer
    S_WAITING_WEIGHTS,   // weight read outstanding
    S_WAITING_INPUTS,    // weights here, waiting for the input pool
    S_WAITING_LAYERCOMP, // computation running
    S_NEXT_LAYER,        // copying outputs to inputs
    S_DONE
  } state_e;
  state_e state;

  logic [DEP_W-1:0] depth;
  logic             have_p, have_max;
  logic             last_group, last_layer;

  assign last_group = (NID_W + 2)'(cur_node) + (NID_W + 2)'(parallelism) > (NID_W + 2)'(max_node_id);
  assign last_layer = (DEP_W + 1)'(cur_layer) + 1 >= (DEP_W + 1)'(depth);
  assign all_done   = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state                <= S_IDLE;
      depth                <= '0;
      cur_layer            <= '0;
      cur_node             <= '0;
      parallelism          <= '0;
      max_node_id          <= '0;
      have_p               <= 1'b0;
      have_max             <= 1'b0;
      pool_read_en         <= 1'b0;
      mem_read_en          <= 1'b0;
      comp_start           <= 1'b0;
      get_from_output_pool <= 1'b0;
    end else begin
      pool_read_en         <= 1'b0;
      mem_read_en          <= 1'b0;
      comp_start           <= 1'b0;
      get_from_output_pool <= 1'b0;
      unique case (state)
        S_IDLE: if (depth_ready) begin
          depth        <= network_depth;
          cur_layer    <= '0;
          cur_node     <= '0;
          have_p       <= 1'b0;
          have_max     <= 1'b0;
          pool_read_en <= 1'b1;
          state        <= S_LOAD_ARCH;
        end
        S_LOAD_ARCH: begin
          if (pool_parallelism_rdy) begin
            parallelism <= pool_parallelism;
            have_p      <= 1'b1;
          end
          if (pool_max_node_rdy) begin
            max_node_id <= pool_max_node_id;
            have_max    <= 1'b1;
          end
          if ((have_p || pool_parallelism_rdy) && (have_max || pool_max_node_rdy)) begin
            mem_read_en <= 1'b1;
            state       <= S_WAITING_WEIGHTS;
          end
        end
        S_WAITING_WEIGHTS: if (weights_rdy) state <= S_WAITING_INPUTS;
        S_WAITING_INPUTS: if (inputs_rdy) begin
          comp_start <= 1'b1;
          state      <= S_WAITING_LAYERCOMP;
        end
        S_WAITING_LAYERCOMP: if (comp_done) begin
          if (!last_group) begin
            cur_node    <= cur_node + NID_W'(parallelism);
            mem_read_en <= 1'b1;
            state       <= S_WAITING_WEIGHTS;
          end else if (last_layer) begin
            state <= S_DONE;
          end else begin
            get_from_output_pool <= 1'b1;
            state                <= S_NEXT_LAYER;
          end
        end
        S_NEXT_LAYER: begin
          cur_layer    <= cur_layer + 1'b1;
          cur_node     <= '0;
          have_p       <= 1'b0;
          have_max     <= 1'b0;
          pool_read_en <= 1'b1;
          state        <= S_LOAD_ARCH;
        end
        S_DONE: ;  // held until reset
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
