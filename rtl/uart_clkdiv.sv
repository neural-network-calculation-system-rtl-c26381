// uart_clkdiv: 16x oversampling tick for the UART receiver.
//
// A counter runs from 0 to CLK_DIV-1 and tick is high for the one cycle in which
// it is zero, so tick pulses once every CLK_DIV clock cycles. The default 54
// gives 100 MHz / 54 = 1.85 MHz, 16 samples per bit at 115200 baud, the rate of
// the original design. Synchronous active-high reset restarts the count at 0.
module uart_clkdiv #(
  parameter int CLK_DIV = 54
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  logic [$clog2(CLK_DIV+1)-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || count == $bits(count)'(CLK_DIV - 1)) count <= '0;
    else                              count <= count + 1'b1;
  end

  assign tick = (count == '0);
endmodule
