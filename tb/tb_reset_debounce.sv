// tb_reset_debounce: glitches shorter than DEBOUNCE_CYCLES must not reach the
// output; a level held long enough must appear after the window (plus the two
// synchroniser stages), for both edges. The output starts high (power-on
// reset) and falls once the released button has been stable for the window.
module tb_reset_debounce;
  localparam int DB = 50;
  logic clk = 0, noisy = 0, clean;
  int checks = 0, failures = 0;

  reset_debounce #(.DEBOUNCE_CYCLES(DB)) dut (.clk(clk), .noisy(noisy), .clean(clean));

  always #5 clk = ~clk;

  task automatic expect_level(input logic v, input string what);
    checks++;
    if (clean !== v) begin failures++; $display("FAIL %s: clean=%b", what, clean); end
  endtask

  initial begin
    repeat (5) @(posedge clk); #1;
    expect_level(1, "power-up");
    repeat (DB - 10) @(posedge clk); #1;
    expect_level(1, "power-on reset held");
    repeat (10) @(posedge clk); #1;
    expect_level(0, "power-on reset released");
    // short glitches
    repeat (5) begin
      noisy = 1; repeat (DB / 2) @(posedge clk); #1;
      noisy = 0; repeat (DB / 2) @(posedge clk); #1;
      expect_level(0, "glitch filtered");
    end
    // long press
    noisy = 1;
    repeat (DB - 5) @(posedge clk); #1;
    expect_level(0, "before window");
    repeat (10) @(posedge clk); #1;
    expect_level(1, "after window");
    noisy = 0; repeat (DB / 3) @(posedge clk); #1;
    noisy = 1; repeat (DB / 3) @(posedge clk); #1;
    expect_level(1, "release glitch filtered");
    noisy = 0; repeat (DB + 5) @(posedge clk); #1;
    expect_level(0, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
