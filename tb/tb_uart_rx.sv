// tb_uart_rx: random packet streams sent by the host model (16 samples per bit,
// a tick every clock) must come out byte for byte with one stream_valid pulse
// each; a byte whose stop bit is low must be dropped and the stream completed
// by the following byte.
module tb_uart_rx;
  localparam int BITC = 16;
  logic clk = 0, rst = 1, host_tx, rx, local_tx = 1, use_local = 0, stream_valid;
  logic [79:0] stream;
  logic [79:0] expq[$];
  int checks = 0, failures = 0, valids = 0;

  tb_uart_host #(.BIT_CYCLES(BITC), .GAP_CYCLES(300)) host (.clk(clk), .txd(host_tx), .rxd(1'b1));
  uart_rx dut (.clk(clk), .rst(rst), .sample_tick(1'b1), .rx(rx), .stream(stream), .stream_valid(stream_valid));

  assign rx = use_local ? local_tx : host_tx;
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst && stream_valid) begin
    logic [79:0] e;
    valids++;
    e = expq.pop_front();
    checks++;
    if (stream !== e) begin failures++; $display("FAIL stream %0d %h exp %h t=%0t", valids, stream, e, $time); end
  end

  task automatic local_byte(input byte unsigned b, input logic stop);
    local_tx = 0; repeat (BITC) @(posedge clk);
    for (int i = 0; i < 8; i++) begin local_tx = b[i]; repeat (BITC) @(posedge clk); end
    // A bad stop bit is low only around its sampling point (a short glitch),
    // so that the tail of the bit cannot look like the next start bit.
    local_tx = stop; repeat (BITC - 4) @(posedge clk);
    local_tx = 1; repeat (4) @(posedge clk);
    if (!stop) repeat (BITC) @(posedge clk);  // one idle bit so the next start bit is clean
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 15; k++) begin
      byte unsigned h, d[9];
      logic [79:0] e;
      h = byte'($urandom);
      foreach (d[i]) d[i] = byte'($urandom);
      e[7:0] = h;
      foreach (d[i]) e[8*(i+1) +: 8] = d[i];
      expq.push_back(e);
      host.send_stream(h, d);
    end
    repeat (20 * BITC) @(posedge clk);
    // Stream with a corrupted 4th byte followed by an 11th byte.
    begin
      logic [79:0] e;
      int o;
      o = 0;
      use_local = 1;
      repeat (300) @(posedge clk);
      for (int i = 0; i < 11; i++)
        if (i != 3) begin e[8*o +: 8] = byte'(8'h30 + i); o++; end
      expq.push_back(e);
      for (int i = 0; i < 11; i++) local_byte(byte'(8'h30 + i), i != 3);
      repeat (300) @(posedge clk);
      use_local = 0;
    end
    repeat (40 * BITC) @(posedge clk);
    checks++;
    if (valids != 16 || expq.size() != 0) begin failures++; $display("FAIL %0d streams, %0d missing", valids, expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
