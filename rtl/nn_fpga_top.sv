// nn_fpga_top: neural-network inference engine controlled over a UART link.
//
// The host loads a fully connected ReLU network (up to MAX_NET_DEPTH layers of
// up to MAX_NET_WIDTH neurons, 24-bit weights) and an input vector (16-bit
// values) as 10-byte packet streams, then marks the end of its transfer. The
// FPGA computes one layer per step: the layer controller reads the layer's
// parallelism and size from the parameter pools, fetches the neurons' weights
// from the weight RAM through the memory controller, and starts the layer
// computation, which multiplies every input by every weight in parallel and
// sums each neuron's products in an adder tree. Results land in the output pool
// and are copied back to the input pool for the next layer. After the last layer
// the communication module streams the output pool back to the host, and a soft
// reset returns the system to weight transfer, ready for the next inference
// (weight transfer -> input transfer -> network compute -> output transfer).
//
// Ports: clk (100 MHz), cpu_resetn (active-low button, debounced), uart_txd_in /
// uart_rxd_out (host transmit / host receive lines of the USB-UART bridge), led
// (status) and phase (the current phase, nn_pkg::phase_e).
// LEDs: [1:0] low bits of the last layer's P and max node id, [2] host transfer
// complete, [3] all layers computed, [4] output transfer complete, [5] first
// output byte non-zero, [6] first input byte equal to 1.
// The block structure, wiring, soft reset and LED use follow the original board
// design; the phase output and the input pool's valid flag are this design's.
module nn_fpga_top
  import nn_pkg::*;
#(
  parameter int I                   = MAX_NET_WIDTH,
  parameter int D                   = MAX_NET_DEPTH,
  parameter int N                   = INPUT_WIDTH,
  parameter int M                   = WEIGHT_WIDTH,
  parameter int CLK_DIV             = 54,
  parameter int TX_BIT_CYCLES       = 868,
  parameter int RX_IDLE_SAMPLES     = 230,
  parameter int TX_START_DELAY_BITS = 100,
  parameter int DEBOUNCE_CYCLES     = 1000000
) (
  input  logic       clk,
  input  logic       cpu_resetn,
  input  logic       uart_txd_in,
  output logic       uart_rxd_out,
  output logic [6:0] led,
  output phase_e     phase
);
  localparam int LID_W = (D > 1) ? $clog2(D) : 1;
  localparam int DEP_W = $clog2(D + 1);
  localparam int NID_W = $clog2(I);
  localparam int P_W   = $clog2(I + 1);

  // Reset: debounced button, or the end of the output transfer.
  logic btn_reset, rst;
  logic out_transfer_done;

  reset_debounce #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_debounce (
    .clk(clk), .noisy(~cpu_resetn), .clean(btn_reset)
  );
  assign rst = btn_reset | out_transfer_done;

  // Communication module
  logic [(I+1)*M-1:0] comm_node;
  logic               comm_weight_rdy;
  logic [LID_W-1:0]   comm_layer_id;
  logic [P_W-1:0]     comm_parallelism;
  logic [NID_W-1:0]   comm_max_node_id;
  logic [I*N-1:0]     comm_inputs;
  logic               comm_input_rdy, comm_input_seen;
  logic [DEP_W-1:0]   comm_depth;
  logic               comm_in_done;
  logic [1:0]         comm_debug_state;

  // Layer controller
  logic               ctl_pool_read, ctl_mem_read, ctl_comp_start, ctl_get_outputs, ctl_done;
  logic [LID_W-1:0]   ctl_layer;
  logic [NID_W-1:0]   ctl_node, ctl_max_node_id;
  logic [P_W-1:0]     ctl_parallelism;

  // Pools, memory, computation
  logic [P_W-1:0]     pool_p;
  logic [NID_W-1:0]   pool_max;
  logic               pool_p_rdy, pool_max_rdy;
  logic [LID_W-1:0]   pool_index;
  logic [I*I*M-1:0]   mem_weights;
  logic [I*M-1:0]     mem_thresholds;
  logic               mem_rdy, mem_busy;
  logic [I*N-1:0]     input_vec, output_vec, comp_out;
  logic               inputs_valid, comp_valid;

  communication_module #(
    .I(I), .D(D), .N(N), .M(M), .CLK_DIV(CLK_DIV), .TX_BIT_CYCLES(TX_BIT_CYCLES),
    .RX_IDLE_SAMPLES(RX_IDLE_SAMPLES), .TX_START_DELAY_BITS(TX_START_DELAY_BITS)
  ) u_comm (
    .clk(clk), .rst(rst), .uart_rx_i(uart_txd_in), .uart_tx_o(uart_rxd_out),
    .layer_weights(comm_node), .weight_rdy(comm_weight_rdy), .layer_id(comm_layer_id),
    .layer_parallelism(comm_parallelism), .layer_max_node_id(comm_max_node_id),
    .network_inputs(comm_inputs), .input_rdy(comm_input_rdy), .input_stream_seen(comm_input_seen),
    .network_depth(comm_depth), .in_transfer_done(comm_in_done),
    .start_output_transfer(ctl_done), .network_outputs(output_vec),
    .out_transfer_done(out_transfer_done), .debug_state(comm_debug_state)
  );

  memory_controller #(.I(I), .D(D), .M(M)) u_mem (
    .clk(clk), .rst(rst),
    .write_en(comm_weight_rdy), .write_node(comm_node), .write_layer_id(comm_layer_id),
    .read_en(ctl_mem_read), .read_layer_id(ctl_layer), .read_node_id(ctl_node),
    .read_parallelism(ctl_parallelism), .read_weights(mem_weights),
    .read_thresholds(mem_thresholds), .read_rdy(mem_rdy), .busy(mem_busy)
  );

  // The pools are written at the receiving layer's index and read at the
  // controller's layer index.
  assign pool_index = comm_weight_rdy ? comm_layer_id : ctl_layer;

  param_pool #(.DATA_WIDTH(P_W), .DEPTH(D)) u_parallelism_pool (
    .clk(clk), .rst(rst), .write_en(comm_weight_rdy), .write_data(comm_parallelism),
    .read_en(ctl_pool_read), .index(pool_index), .read_data(pool_p), .data_rdy(pool_p_rdy)
  );

  param_pool #(.DATA_WIDTH(NID_W), .DEPTH(D)) u_max_node_pool (
    .clk(clk), .rst(rst), .write_en(comm_weight_rdy), .write_data(comm_max_node_id),
    .read_en(ctl_pool_read), .index(pool_index), .read_data(pool_max), .data_rdy(pool_max_rdy)
  );

  layer_controller #(.I(I), .D(D)) u_ctl (
    .clk(clk), .rst(rst),
    .depth_ready(comm_in_done), .network_depth(comm_depth), .all_done(ctl_done),
    .pool_read_en(ctl_pool_read), .cur_layer(ctl_layer),
    .pool_parallelism(pool_p), .pool_parallelism_rdy(pool_p_rdy),
    .pool_max_node_id(pool_max), .pool_max_node_rdy(pool_max_rdy),
    .mem_read_en(ctl_mem_read), .cur_node(ctl_node), .parallelism(ctl_parallelism),
    .weights_rdy(mem_rdy), .inputs_rdy(inputs_valid), .max_node_id(ctl_max_node_id),
    .get_from_output_pool(ctl_get_outputs), .comp_start(ctl_comp_start), .comp_done(comp_valid)
  );

  input_pool #(.MAX_NET_WIDTH_P(I), .INPUT_WIDTH_P(N)) u_input_pool (
    .clk(clk), .rst(rst), .comm_write_en(comm_input_rdy), .get_from_output_pool(ctl_get_outputs),
    .comm_data(comm_inputs), .output_pool_data(output_vec), .read_data(input_vec), .valid(inputs_valid)
  );

  layer_computation #(.I(I), .N(N), .M(M)) u_comp (
    .clk(clk), .rst(rst), .start(ctl_comp_start), .weights(mem_weights),
    .thresholds(mem_thresholds), .inputs(input_vec), .outputs(comp_out), .out_valid(comp_valid)
  );

  output_pool #(.MAX_NET_WIDTH_P(I), .INPUT_WIDTH_P(N)) u_output_pool (
    .clk(clk), .rst(rst), .write_en(comp_valid), .start_addr(ctl_node),
    .data_width(ctl_parallelism), .max_node_id(ctl_max_node_id),
    .write_data(comp_out), .data_out(output_vec)
  );

  system_fsm u_fsm (
    .clk(clk), .rst(rst), .input_stream_seen(comm_input_seen), .in_transfer_done(comm_in_done),
    .compute_done(ctl_done), .out_transfer_done(out_transfer_done), .phase(phase)
  );

  assign led[1:0] = comm_debug_state;
  assign led[2]   = comm_in_done;
  assign led[3]   = ctl_done;
  assign led[4]   = out_transfer_done;
  assign led[5]   = output_vec[7:0] != '0;
  assign led[6]   = input_vec[7:0] == 8'd1;

  // The memory controller accepts requests only while idle; the protocol never
  // overlaps a weight write with a weight read.
  assert property (@(posedge clk) disable iff (rst) ctl_mem_read |-> !mem_busy);
endmodule
