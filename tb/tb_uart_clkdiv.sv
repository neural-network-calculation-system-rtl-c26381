// tb_uart_clkdiv: the tick must be a single-cycle pulse every CLK_DIV = 54
// cycles, starting in the first cycle after reset.
module tb_uart_clkdiv;
  localparam int DIV = 54;
  logic clk = 0, rst = 1, tick;
  int checks = 0, failures = 0, last = -1, cycle = 0, ticks = 0;

  uart_clkdiv #(.CLK_DIV(DIV)) dut (.clk(clk), .rst(rst), .tick(tick));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (!tick) begin failures++; $display("FAIL no tick right after reset"); end
    repeat (DIV * 20) begin
      @(posedge clk); #1;
      cycle++;
      if (tick) begin
        ticks++;
        checks++;
        if (cycle - last != DIV && last >= 0) begin failures++; $display("FAIL period %0d", cycle - last); end
        if (last < 0 && cycle != DIV) begin failures++; $display("FAIL first period %0d", cycle); end
        last = cycle;
      end
    end
    checks++;
    if (ticks != 20) begin failures++; $display("FAIL %0d ticks", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (DIV * 40) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
