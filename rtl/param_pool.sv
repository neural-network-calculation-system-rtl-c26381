// param_pool: per-layer store for one item of network metadata.
//
// Two instances hold, for each layer, its parallelism P (neurons computed per
// step) and its largest neuron index. The communication module writes the value
// of the layer being received at index = that layer's id (it repeats the write
// once per received neuron, which is harmless); the layer controller reads the
// value for the layer it is about to compute.
//
// Timing: write_en has priority. A read (read_en with index) loads read_data on
// the clock edge and data_rdy is high for the following cycle. Synchronous
// active-high reset clears the storage and data_rdy.
module param_pool
  import nn_pkg::*;
#(
  parameter int DATA_WIDTH = $clog2(MAX_NET_WIDTH),
  parameter int DEPTH      = MAX_NET_DEPTH
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           write_en,
  input  logic [DATA_WIDTH-1:0]          write_data,
  input  logic                           read_en,
  input  logic [$clog2(DEPTH)-1:0]       index,
  output logic [DATA_WIDTH-1:0]          read_data,
  output logic                           data_rdy
);
  logic [DATA_WIDTH-1:0] storage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) storage[i] <= '0;
      read_data <= '0;
      data_rdy  <= 1'b0;
    end else begin
      data_rdy <= 1'b0;
      if (write_en) begin
        storage[index] <= write_data;
      end else if (read_en) begin
        read_data <= storage[index];
        data_rdy  <= 1'b1;
      end
    end
  end
endmodule
