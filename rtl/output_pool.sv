// output_pool: collects the results of a layer.
//
// An I x N register file written by the layer computation. On write_en the
// results write_data[k] (k = 0 .. data_width-1) are stored at entries
// start_addr + k, but never above max_node_id; every entry above the written
// range is cleared, so neurons a layer does not have read as zero. This lets a
// layer be computed in several groups of P neurons (start_addr advancing by P);
// when P covers the whole layer a single write does. The contents
// go to the input pool (next layer) and to the communication module (final
// outputs).
//
// Timing: writes take effect on the clock edge with write_en high; data_out is
// the register output. Synchronous active-high reset clears the file.
module output_pool
  import nn_pkg::*;
#(
  parameter int MAX_NET_WIDTH_P = MAX_NET_WIDTH,
  parameter int INPUT_WIDTH_P   = INPUT_WIDTH
) (
  input  logic                                     clk,
  input  logic                                     rst,
  input  logic                                     write_en,
  input  logic [$clog2(MAX_NET_WIDTH_P)-1:0]        start_addr,
  input  logic [$clog2(MAX_NET_WIDTH_P+1)-1:0]      data_width,
  input  logic [$clog2(MAX_NET_WIDTH_P)-1:0]        max_node_id,
  input  logic [MAX_NET_WIDTH_P*INPUT_WIDTH_P-1:0]  write_data,
  output logic [MAX_NET_WIDTH_P*INPUT_WIDTH_P-1:0]  data_out
);
  localparam int AW = $clog2(MAX_NET_WIDTH_P) + 2;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
    end else if (write_en) begin
      for (int i = 0; i < MAX_NET_WIDTH_P; i++) begin
        if (AW'(i) >= AW'(start_addr)) begin
          if (AW'(i) < AW'(start_addr) + AW'(data_width) && AW'(i) <= AW'(max_node_id))
            data_out[i*INPUT_WIDTH_P +: INPUT_WIDTH_P] <=
              write_data[(i - int'(start_addr))*INPUT_WIDTH_P +: INPUT_WIDTH_P];
          else
            data_out[i*INPUT_WIDTH_P +: INPUT_WIDTH_P] <= '0;
        end
      end
    end
  end
endmodule
