// tb_nn_fpga_top: end-to-end test of the accelerator through its serial port.
//
// The host model sends complete inferences the way the host software does:
// for every layer its parallelism P, its largest neuron index and each neuron's
// bias and I weights (3-byte words, least significant byte first), then the
// input vector (2-byte words), then the all-zero debug stream. The testbench
// computes every layer with the reference model, checks the output pool at each
// output-to-input copy and at the end of the network, and checks the output
// streams the board sends back. It also checks the phase sequence (weight,
// input, compute, output, then the soft reset back to weight transfer), the
// layer computation latency at system level (8 edges per step) and the number
// of computation steps (sum of ceil(width / P) over the layers).
//
// Networks: the small (2-2-1), medium (2-3-2-1) and large (2-10-10-5-1) example
// networks, a full 24-wide 4-deep network with random P, and a network with
// P = 1 layers; one inference is interrupted by the reset button and redone.
// Mechanism counters are printed at the end and each must be non-zero.
// Reduced serial timing: 16 clock cycles per bit, short gaps and delays.
module tb_nn_fpga_top;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  localparam int I = MAX_NET_WIDTH, D = MAX_NET_DEPTH, N = INPUT_WIDTH, M = WEIGHT_WIDTH;
  localparam int BITC = 16, IDLE = 40, DELAY = 4, DB = 20;
  localparam int OUT_STREAMS = (I * N + 71) / 72;
  localparam int COMP_EDGES = $clog2(I) + 3;

  logic clk = 0, cpu_resetn = 0, host_txd, board_txd;
  logic [6:0] led;
  phase_e phase;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_inferences = 0, m_split_values = 0, m_new_layers = 0, m_partial_groups = 0;
  int m_multi_group_layers = 0, m_copies = 0, m_soft_resets = 0, m_button_resets = 0;
  int m_steps = 0, m_full_width = 0, m_zero_outputs = 0, m_clipped = 0;
  int m_phase_seen[4] = '{0, 0, 0, 0};

  nn_fpga_top #(
    .CLK_DIV(1), .TX_BIT_CYCLES(BITC), .RX_IDLE_SAMPLES(IDLE),
    .TX_START_DELAY_BITS(DELAY), .DEBOUNCE_CYCLES(DB)
  ) dut (.clk(clk), .cpu_resetn(cpu_resetn), .uart_txd_in(host_txd), .uart_rxd_out(board_txd),
         .led(led), .phase(phase));
  tb_uart_host #(.BIT_CYCLES(BITC), .GAP_CYCLES(IDLE + 30)) host (.clk(clk), .txd(host_txd), .rxd(board_txd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ------------------------------------------------------------ network model
  int             widths[$];          // neurons per layer
  int             pars[$];            // P per layer
  int             n_in;               // inputs used by layer 0
  longint         wts[D][I][I];       // [layer][neuron][input]
  longint         bias[D][I];
  longint         xin[I];
  logic [I*N-1:0] layer_out[D];       // expected output pool after each layer
  int             exp_steps;

  function automatic void compute_reference();
    longint x[] = new[I];
    longint w[] = new[I];
    for (int j = 0; j < I; j++) x[j] = xin[j];
    exp_steps = 0;
    for (int l = 0; l < widths.size(); l++) begin
      logic [I*N-1:0] v = '0;
      exp_steps += (widths[l] + pars[l] - 1) / pars[l];
      for (int k = 0; k < widths[l]; k++) begin
        longint y;
        for (int j = 0; j < I; j++) w[j] = wts[l][k][j];
        y = ref_neuron(x, w, bias[l][k], N, SHIFT_1, SHIFT_2);
        v[k*N +: N] = N'(y);
      end
      layer_out[l] = v;
      for (int j = 0; j < I; j++) x[j] = sx(v[j*N +: N], N);
    end
  endfunction

  // Random network: values drawn from +-range (range 0: full width).
  task automatic make_network(input int ws[$], input int ps[$], input int nin,
                              input int wr, input int br, input int xr);
    widths = ws; pars = ps; n_in = nin;
    for (int l = 0; l < ws.size(); l++)
      for (int k = 0; k < I; k++) begin
        bias[l][k] = (br == 0) ? sx($urandom, M) : longint'($urandom_range(0, 2 * br)) - br;
        for (int j = 0; j < I; j++)
          wts[l][k][j] = (wr == 0) ? sx($urandom, M) : longint'($urandom_range(0, 2 * wr)) - wr;
      end
    for (int j = 0; j < I; j++)
      xin[j] = (j >= nin) ? 0 : (xr == 0) ? sx($urandom, N) : longint'($urandom_range(0, 2 * xr)) - xr;
    compute_reference();
  endtask

  function automatic void count_splits(input int nbytes_total, input int word_bytes, input int offset0);
    for (int o = offset0; o + word_bytes <= nbytes_total; o += word_bytes)
      if (o / 9 != (o + word_bytes - 1) / 9) m_split_values++;
  endfunction

  task automatic send_weights(input int stop_after_layer);
    for (int l = 0; l < widths.size() && l <= stop_after_layer; l++) begin
      byte unsigned q[$];
      push_word(q, pars[l], 3);
      push_word(q, widths[l] - 1, 3);
      for (int k = 0; k < widths[l]; k++) begin
        push_word(q, bias[l][k], 3);
        for (int j = 0; j < I; j++) push_word(q, wts[l][k][j], 3);
      end
      count_splits(q.size(), 3, 0);
      m_new_layers++;
      if (widths[l] % pars[l] != 0) m_partial_groups++;
      if (widths[l] > pars[l]) m_multi_group_layers++;
      if (widths[l] == I) m_full_width++;
      host.send_array(0, l, q);
    end
  endtask

  task automatic send_inputs();
    byte unsigned q[$];
    for (int j = 0; j < I; j++) push_word(q, xin[j], 2);
    count_splits(q.size(), 2, 0);
    host.send_array(1, 0, q);
  endtask

  // ------------------------------------------------------------ monitors
  int copies_seen, steps_seen, outdone_seen;
  phase_e last_phase;

  always @(posedge clk) if (!dut.rst) begin
    m_phase_seen[phase]++;
    if (dut.ctl_get_outputs) begin
      check(copies_seen < widths.size() - 1, "extra output-to-input copy");
      if (copies_seen < widths.size() - 1)
        check(dut.output_vec == layer_out[copies_seen],
              $sformatf("output pool after layer %0d: %h exp %h", copies_seen, dut.output_vec, layer_out[copies_seen]));
      copies_seen++;
      m_copies++;
    end
    if (dut.ctl_comp_start) begin
      steps_seen++;
      m_steps++;
    end
  end

  // Layer computation latency at system level: out_valid must rise on the
  // COMP_EDGES-th edge, counting the edge that samples comp_start as the first.
  always @(posedge clk) if (!dut.rst && dut.ctl_comp_start) begin
    int e;
    e = 1;
    #1;
    while (!dut.comp_valid && e < 50) begin @(posedge clk); #1; e++; end
    check(e == COMP_EDGES, $sformatf("compute step took %0d edges", e));
  end

  // ------------------------------------------------------------ inference
  task automatic run_inference(input string name);
    int t;
    copies_seen = 0; steps_seen = 0;
    check(phase == PH_WEIGHT_TRANSFER, $sformatf("%s: starts in weight transfer", name));
    send_weights(D);
    check(phase == PH_WEIGHT_TRANSFER, $sformatf("%s: weight transfer phase", name));
    send_inputs();
    check(phase == PH_INPUT_TRANSFER, $sformatf("%s: input transfer phase", name));
    host.rx_bytes.delete();
    host.send_done();
    t = 0;
    while (!dut.ctl_done && t < 100000) begin @(posedge clk); #1; t++; end
    check(dut.ctl_done, $sformatf("%s: network computed", name));
    check(copies_seen == widths.size() - 1, $sformatf("%s: %0d copies", name, copies_seen));
    check(steps_seen == exp_steps, $sformatf("%s: %0d steps, expected %0d", name, steps_seen, exp_steps));
    @(posedge clk); #1;
    check(phase == PH_OUTPUT_TRANSFER, $sformatf("%s: output transfer phase", name));
    check(dut.output_vec == layer_out[widths.size() - 1],
          $sformatf("%s: final outputs %h exp %h", name, dut.output_vec, layer_out[widths.size() - 1]));
    // Wait for the soft reset that ends the output transfer.
    t = 0;
    while (!dut.out_transfer_done && t < 100000) begin @(posedge clk); #1; t++; end
    check(dut.out_transfer_done && led[4], $sformatf("%s: output transfer done", name));
    @(posedge clk); #1;
    check(phase == PH_WEIGHT_TRANSFER && !led[2] && !led[3], $sformatf("%s: soft reset", name));
    m_soft_resets++;
    repeat (3 * BITC) @(posedge clk);
    check(host.rx_bytes.size() == OUT_STREAMS * 10 && host.framing_errors == 0,
          $sformatf("%s: %0d bytes returned", name, host.rx_bytes.size()));
    if (host.rx_bytes.size() == OUT_STREAMS * 10)
      for (int s = 0; s < OUT_STREAMS; s++) begin
        check(host.rx_bytes[s*10] == 8'h02, $sformatf("%s: output header", name));
        for (int b = 0; b < 9; b++) begin
          int bit0;
          byte unsigned e;
          bit0 = (s * 9 + b) * 8;
          e = (bit0 < I * N) ? layer_out[widths.size() - 1][bit0 +: 8] : 8'h00;
          check(host.rx_bytes[s*10 + 1 + b] == e, $sformatf("%s: returned stream %0d byte %0d", name, s, b));
        end
      end
    for (int k = 0; k < widths[widths.size() - 1]; k++)
      if (layer_out[widths.size() - 1][k*N +: N] == '0) m_zero_outputs++;
    m_inferences++;
    repeat (50) @(posedge clk);
  endtask

  task automatic press_reset();
    cpu_resetn = 0;
    repeat (DB + 10) @(posedge clk);
    cpu_resetn = 1;
    repeat (DB + 10) @(posedge clk);
  endtask

  initial begin
    press_reset();
    check(phase == PH_WEIGHT_TRANSFER && led[3:2] == 2'b00, "power-up reset");

    // small example network: 2 inputs, layers of 2 and 1 neurons
    make_network('{2, 1}, '{2, 1}, 2, 64, 256, 100);
    run_inference("small");
    // medium: 3, 2, 1 neurons; P = 2 leaves a partial group
    make_network('{3, 2, 1}, '{2, 2, 1}, 2, 256, 1024, 500);
    run_inference("medium");
    // large: 10, 10, 5, 1 neurons
    make_network('{10, 10, 5, 1}, '{4, 10, 3, 1}, 2, 1024, 4096, 2000);
    run_inference("large");
    // full capacity: 24 inputs, four 24-neuron layers, random P, full-range values
    make_network('{I, I, I, I}, '{$urandom_range(1, I), I, $urandom_range(1, I), 7}, I, 0, 0, 0);
    run_inference("full-random");
    // interrupted by the reset button during the weight transfer, then redone
    make_network('{5, 24, 3}, '{1, 5, 3}, 24, 512, 2048, 1000);
    send_weights(1);
    press_reset();
    m_button_resets++;
    check(phase == PH_WEIGHT_TRANSFER && led[2] == 1'b0, "button reset during weight transfer");
    run_inference("after-button");
    // serial layers (P = 1) and a second run of the same network
    make_network('{4, 1}, '{1, 1}, 3, 2048, 8192, 8000);
    run_inference("serial");
    run_inference("serial-again");

    for (int l = 0; l < 4; l++) check(m_phase_seen[l] > 0, $sformatf("phase %0d seen", l));
    $display("mechanisms: inferences=%0d values_split_across_streams=%0d layers_started=%0d",
             m_inferences, m_split_values, m_new_layers);
    $display("mechanisms: partial_groups=%0d multi_group_layers=%0d compute_steps=%0d output_to_input_copies=%0d",
             m_partial_groups, m_multi_group_layers, m_steps, m_copies);
    $display("mechanisms: full_width_layers=%0d zero_outputs=%0d soft_resets=%0d button_resets=%0d",
             m_full_width, m_zero_outputs, m_soft_resets, m_button_resets);
    $display("mechanisms: phase_cycles weight=%0d input=%0d compute=%0d output=%0d",
             m_phase_seen[0], m_phase_seen[1], m_phase_seen[2], m_phase_seen[3]);
    check(m_inferences == 7 && m_split_values > 0 && m_partial_groups > 0 && m_multi_group_layers > 0 &&
          m_copies > 0 && m_soft_resets == 7 && m_button_resets == 1 && m_full_width > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
