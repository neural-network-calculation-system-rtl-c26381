// tb_communication_module: the host model sends a random network (several
// layers, random parallelism and widths, values straddling streams), an input
// vector and the end-of-transfer stream over the serial line. The testbench
// checks every decoded neuron (bias and I weights, with layer id, P and max node
// id), the input vector, input_stream_seen, network_depth and in_transfer_done.
// Then it requests an output transfer and checks the output streams received by
// the host (header, 72 data bits each, zero padding) and the single
// out_transfer_done pulse. Reduced UART timing: one sample tick per clock
// (16 clocks per bit), short transmit start delay.
module tb_communication_module;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  localparam int I = MAX_NET_WIDTH, D = MAX_NET_DEPTH, N = INPUT_WIDTH, M = WEIGHT_WIDTH;
  localparam int BITC = 16, DELAY = 4;
  localparam int OUT_STREAMS = (I * N + 71) / 72;

  logic clk = 0, rst = 1, host_txd, dut_txd;
  logic [(I+1)*M-1:0] layer_weights;
  logic weight_rdy, input_rdy, input_stream_seen, in_transfer_done;
  logic start_output_transfer = 0, out_transfer_done;
  logic [$clog2(D)-1:0] layer_id;
  logic [$clog2(I+1)-1:0] layer_parallelism;
  logic [$clog2(I)-1:0] layer_max_node_id;
  logic [I*N-1:0] network_inputs, network_outputs;
  logic [$clog2(D+1)-1:0] network_depth;
  logic [1:0] debug_state;

  int checks = 0, failures = 0;
  int n_weight = 0, n_input = 0, n_seen = 0, n_outdone = 0;

  typedef struct {int layer; int p; int maxid; logic [(I+1)*M-1:0] node;} node_t;
  node_t expq[$];

  communication_module #(.CLK_DIV(1), .TX_BIT_CYCLES(BITC), .TX_START_DELAY_BITS(DELAY)) dut (
    .clk(clk), .rst(rst), .uart_rx_i(host_txd), .uart_tx_o(dut_txd), .*);
  tb_uart_host #(.BIT_CYCLES(BITC), .GAP_CYCLES(300)) host (.clk(clk), .txd(host_txd), .rxd(dut_txd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (weight_rdy) begin
      node_t e;
      n_weight++;
      if (expq.size() == 0) check(0, "unexpected weight_rdy");
      else begin
        e = expq.pop_front();
        check(layer_weights == e.node, $sformatf("neuron %0d data", n_weight));
        check(int'(layer_id) == e.layer && int'(layer_parallelism) == e.p &&
              int'(layer_max_node_id) == e.maxid,
              $sformatf("neuron %0d metadata %0d/%0d/%0d", n_weight, layer_id, layer_parallelism, layer_max_node_id));
      end
    end
    if (input_rdy) n_input++;
    if (input_stream_seen) n_seen++;
    if (out_transfer_done) n_outdone++;
  end

  initial begin
    int depth;
    logic [I*N-1:0] xin;
    byte unsigned q[$];
    int t0;
    repeat (3) @(posedge clk); #1 rst = 0;
    depth = D;
    for (int l = 0; l < depth; l++) begin
      int width, p;
      width = (l == 1) ? I : $urandom_range(1, I);
      p = $urandom_range(1, width);
      q.delete();
      push_word(q, p, 3);
      push_word(q, width - 1, 3);
      for (int n = 0; n < width; n++) begin
        node_t e;
        e.layer = l; e.p = p; e.maxid = width - 1;
        for (int k = 0; k <= I; k++) begin
          logic [M-1:0] w;
          w = M'($urandom);
          e.node[k*M +: M] = w;
          push_word(q, w, 3);
        end
        expq.push_back(e);
      end
      host.send_array(0, l, q);
    end
    repeat (40) @(posedge clk);
    check(expq.size() == 0, "all neurons decoded before inputs");
    check(n_seen == 0, "no input stream seen during weights");
    q.delete();
    for (int k = 0; k < I; k++) begin
      xin[k*N +: N] = N'($urandom);
      push_word(q, xin[k*N +: N], 2);
    end
    host.send_array(1, 0, q);
    repeat (40) @(posedge clk);
    check(n_input == 1, $sformatf("input_rdy pulses %0d", n_input));
    check(network_inputs == xin, "input vector");
    check(n_seen == (I * 2 + 8) / 9, $sformatf("input_stream_seen pulses %0d", n_seen));
    check(!in_transfer_done, "not done before debug stream");
    host.send_done();
    repeat (40) @(posedge clk);
    check(in_transfer_done, "in_transfer_done");
    check(int'(network_depth) == depth, $sformatf("network_depth %0d", network_depth));
    check(expq.size() == 0 && n_weight > 0, $sformatf("%0d neurons not decoded", expq.size()));

    // Output transfer.
    for (int k = 0; k < I * N; k += 16) network_outputs[k +: 16] = 16'($urandom);
    host.rx_bytes.delete();
    @(posedge clk); #1 start_output_transfer = 1;
    t0 = 0;
    while (n_outdone == 0 && t0 < 100000) begin @(posedge clk); t0++; end
    #1 start_output_transfer = 0;
    check(t0 >= OUT_STREAMS * (DELAY + 100) * BITC && t0 <= OUT_STREAMS * ((DELAY + 100) * BITC + 4) + 4,
          $sformatf("output transfer took %0d cycles", t0));
    repeat (3 * BITC) @(posedge clk);
    check(n_outdone == 1, $sformatf("out_transfer_done pulses %0d", n_outdone));
    check(host.rx_bytes.size() == OUT_STREAMS * 10 && host.framing_errors == 0,
          $sformatf("%0d output bytes", host.rx_bytes.size()));
    for (int s = 0; s < OUT_STREAMS && host.rx_bytes.size() == OUT_STREAMS * 10; s++) begin
      check(host.rx_bytes[s*10] == 8'h02, $sformatf("output header %h", host.rx_bytes[s*10]));
      for (int b = 0; b < 9; b++) begin
        int bit0;
        byte unsigned e;
        bit0 = (s * 9 + b) * 8;
        e = (bit0 < I * N) ? network_outputs[bit0 +: 8] : 8'h00;
        check(host.rx_bytes[s*10 + 1 + b] == e, $sformatf("output stream %0d byte %0d", s, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
