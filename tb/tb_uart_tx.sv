// tb_uart_tx: random streams sent by the transmitter must be decoded by the
// host model's receiver byte for byte without framing errors; checks the time
// from start to done ((START_DELAY_BITS + 100) bit periods), busy, and that the
// line stays high during the start delay.
module tb_uart_tx;
  localparam int BITC = 16, DELAY = 100;
  logic clk = 0, rst = 1, start = 0, tx, busy, done, host_txd;
  logic [79:0] stream;
  byte unsigned expb[$];
  int checks = 0, failures = 0;

  uart_tx #(.BIT_CYCLES(BITC), .START_DELAY_BITS(DELAY)) dut (.*);
  tb_uart_host #(.BIT_CYCLES(BITC)) host (.clk(clk), .txd(host_txd), .rxd(tx));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 6; k++) begin
      int cyc;
      bit low_in_delay;
      cyc = 0; low_in_delay = 0;
      for (int i = 0; i < 80; i += 16) stream[i +: 16] = 16'($urandom);
      for (int i = 0; i < 10; i++) expb.push_back(stream[8*i +: 8]);
      start = 1; @(posedge clk); #1; start = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low after start"); end
      while (!done && cyc < 100000) begin
        @(posedge clk); #1; cyc++;
        if (cyc < DELAY * BITC - 2 && tx == 0) low_in_delay = 1;
      end
      checks += 2;
      if (cyc < (DELAY + 100) * BITC || cyc > (DELAY + 100) * BITC + 2) begin
        failures++; $display("FAIL stream time %0d cycles", cyc);
      end
      if (low_in_delay) begin failures++; $display("FAIL line low during start delay"); end
      repeat ($urandom_range(0, 40)) @(posedge clk); #1;
    end
    repeat (3 * BITC) @(posedge clk);
    checks += 2;
    if (host.framing_errors != 0) begin failures++; $display("FAIL framing errors"); end
    if (host.rx_bytes.size() != expb.size()) begin failures++; $display("FAIL %0d bytes", host.rx_bytes.size()); end
    for (int i = 0; i < expb.size() && i < host.rx_bytes.size(); i++) begin
      checks++;
      if (host.rx_bytes[i] != expb[i]) begin failures++; $display("FAIL byte %0d %h exp %h", i, host.rx_bytes[i], expb[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
