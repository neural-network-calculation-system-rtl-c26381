// tb_nn_fpga_top_full: the accelerator at its real size and timing.
//
// nn_fpga_top is instantiated without parameter overrides: 24 x 4 network
// limits, 100 MHz clock, 115200-baud serial link (868 clock cycles per bit,
// 16x oversampling with a divider of 54), 230-sample idle check, 100-bit
// transmit start delay and a 1,000,000-cycle reset debounce. The host model
// sends the medium example network (2 inputs, layers of 3, 2 and 1 neurons)
// and an input vector at 115200 baud, then the end-of-transfer stream. The
// testbench checks the final output pool against the reference model, the
// returned output streams, the phase sequence, the time from the end of the
// computation to the first returned start bit (100 bit times), and the soft
// reset after the output transfer.
module tb_nn_fpga_top_full;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  localparam int I = MAX_NET_WIDTH, N = INPUT_WIDTH, M = WEIGHT_WIDTH;
  localparam int BITC = 868;
  localparam int OUT_STREAMS = (I * N + 71) / 72;

  logic clk = 0, cpu_resetn = 0, host_txd, board_txd;
  logic [6:0] led;
  phase_e phase;
  int checks = 0, failures = 0;

  nn_fpga_top dut (.clk(clk), .cpu_resetn(cpu_resetn), .uart_txd_in(host_txd),
                   .uart_rxd_out(board_txd), .led(led), .phase(phase));
  tb_uart_host #(.BIT_CYCLES(BITC), .GAP_CYCLES(15000)) host (.clk(clk), .txd(host_txd), .rxd(board_txd));

  always #5 clk = ~clk;   // 100 MHz

  // Cycle on which the network finished (all_done first seen high).
  longint cycle = 0, done_cycle = -1;
  always @(posedge clk) begin
    cycle++;
    if (dut.ctl_done && done_cycle < 0) done_cycle = cycle;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int     widths[3] = '{3, 2, 1};
  int     pars[3]   = '{2, 2, 1};
  longint wts[3][I][I];
  longint bias[3][I];
  longint xin[I];
  logic [I*N-1:0] expect_out;

  initial begin
    byte unsigned q[$];
    longint x[];
    longint w[];
    int t;
    x = new[I];
    w = new[I];

    // Network and reference result.
    for (int l = 0; l < 3; l++)
      for (int k = 0; k < I; k++) begin
        bias[l][k] = longint'($urandom_range(0, 2048)) - 1024;
        for (int j = 0; j < I; j++) wts[l][k][j] = longint'($urandom_range(0, 512)) - 256;
      end
    for (int j = 0; j < I; j++) xin[j] = (j < 2) ? longint'($urandom_range(0, 1000)) - 500 : 0;
    for (int j = 0; j < I; j++) x[j] = xin[j];
    for (int l = 0; l < 3; l++) begin
      logic [I*N-1:0] v;
      v = '0;
      for (int k = 0; k < widths[l]; k++) begin
        for (int j = 0; j < I; j++) w[j] = wts[l][k][j];
        v[k*N +: N] = N'(ref_neuron(x, w, bias[l][k], N, SHIFT_1, SHIFT_2));
      end
      for (int j = 0; j < I; j++) x[j] = sx(v[j*N +: N], N);
      expect_out = v;
    end
    // Power-up: hold the reset button past the debounce time.
    repeat (1000100) @(posedge clk);
    cpu_resetn = 1;
    repeat (1000100) @(posedge clk);
    check(phase == PH_WEIGHT_TRANSFER, "weight transfer after reset");

    for (int l = 0; l < 3; l++) begin
      q.delete();
      push_word(q, pars[l], 3);
      push_word(q, widths[l] - 1, 3);
      for (int k = 0; k < widths[l]; k++) begin
        push_word(q, bias[l][k], 3);
        for (int j = 0; j < I; j++) push_word(q, wts[l][k][j], 3);
      end
      host.send_array(0, l, q);
    end
    check(phase == PH_WEIGHT_TRANSFER, "still in weight transfer");
    q.delete();
    for (int j = 0; j < I; j++) push_word(q, xin[j], 2);
    host.send_array(1, 0, q);
    check(phase == PH_INPUT_TRANSFER, "input transfer phase");
    host.send_done();
    t = 0;
    while (!dut.ctl_done && t < 200000) begin @(posedge clk); #1; t++; end
    check(dut.ctl_done && led[3], "network computed");
    check(dut.output_vec == expect_out, $sformatf("outputs %h exp %h", dut.output_vec, expect_out));
    @(posedge clk); #1;
    check(phase == PH_OUTPUT_TRANSFER, "output transfer phase");
    // First start bit after 100 idle bit times.
    t = 0;
    while (board_txd && t < 200000) begin @(posedge clk); #1; t++; end
    check(cycle - done_cycle >= 100 * BITC && cycle - done_cycle <= 100 * BITC + 3,
          $sformatf("first start bit %0d cycles after the network finished", cycle - done_cycle));
    t = 0;
    while (!dut.out_transfer_done && t < 2000000) begin @(posedge clk); #1; t++; end
    check(dut.out_transfer_done, "output transfer done");
    @(posedge clk); #1;
    check(phase == PH_WEIGHT_TRANSFER && !led[3], "soft reset back to weight transfer");
    repeat (3 * BITC) @(posedge clk);
    check(host.rx_bytes.size() == OUT_STREAMS * 10 && host.framing_errors == 0,
          $sformatf("%0d bytes returned", host.rx_bytes.size()));
    if (host.rx_bytes.size() == OUT_STREAMS * 10)
      for (int s = 0; s < OUT_STREAMS; s++) begin
        check(host.rx_bytes[s*10] == 8'h02, "output header");
        for (int b = 0; b < 9; b++) begin
          int bit0;
          byte unsigned e;
          bit0 = (s * 9 + b) * 8;
          e = (bit0 < I * N) ? expect_out[bit0 +: 8] : 8'h00;
          check(host.rx_bytes[s*10 + 1 + b] == e, $sformatf("returned stream %0d byte %0d", s, b));
        end
      end
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
