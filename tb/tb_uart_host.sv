// tb_uart_host: behavioural model of the host side of the serial link.
//
// Plays the part of the host software and USB-UART bridge in simulation. Its
// tasks send bytes (start bit, 8 data bits LSB first, stop bit, each BIT_CYCLES
// clock cycles long) and packet streams (GAP_CYCLES of idle line, then a header
// byte and nine data bytes); send_array cuts a byte sequence into streams of nine
// data bytes, zero padding the last one. A receiver process decodes every byte
// arriving on rxd (sampled mid-bit) into the queue rx_bytes.
module tb_uart_host #(
  parameter int BIT_CYCLES = 16,
  parameter int GAP_CYCLES = 400
) (
  input  logic clk,
  output logic txd,
  input  logic rxd
);
  byte unsigned rx_bytes[$];
  int           framing_errors = 0;

  initial txd = 1'b1;

  task automatic send_byte(input byte unsigned b);
    txd = 1'b0;
    repeat (BIT_CYCLES) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      txd = b[i];
      repeat (BIT_CYCLES) @(posedge clk);
    end
    txd = 1'b1;
    repeat (BIT_CYCLES) @(posedge clk);
  endtask

  task automatic send_stream(input byte unsigned hdr, input byte unsigned data[9]);
    txd = 1'b1;
    repeat (GAP_CYCLES) @(posedge clk);
    send_byte(hdr);
    for (int i = 0; i < 9; i++) send_byte(data[i]);
  endtask

  // mode in bits [1:0], CRC_EN = 0, mode data in bits [7:3]
  task automatic send_array(input int mode, input int mode_data, input byte unsigned bytes[$]);
    int i = 0;
    while (i < bytes.size()) begin
      byte unsigned d[9];
      for (int k = 0; k < 9; k++) d[k] = (i + k < bytes.size()) ? bytes[i+k] : 8'h00;
      send_stream(byte'((mode & 3) | ((mode_data & 31) << 3)), d);
      i += 9;
    end
  endtask

  task automatic send_done();
    byte unsigned z[9];
    foreach (z[k]) z[k] = 8'h00;
    send_stream(8'h03, z);
  endtask

  // Receiver
  initial begin
    forever begin
      byte unsigned b;
      @(negedge rxd);
      repeat (BIT_CYCLES / 2) @(posedge clk);
      if (rxd == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (BIT_CYCLES) @(posedge clk);
          b[i] = rxd;
        end
        repeat (BIT_CYCLES) @(posedge clk);
        if (rxd != 1'b1) framing_errors++;
        rx_bytes.push_back(b);
      end
    end
  end
endmodule
