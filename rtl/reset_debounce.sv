// reset_debounce: clean reset from the board's push button.
//
// The raw button level is brought into the clock domain by two flip-flops; the
// clean output takes a new level only after the synchronised input has held that
// level for DEBOUNCE_CYCLES consecutive clock cycles (default 1,000,000 = 10 ms
// at 100 MHz). The original design names a debouncer on the reset button but
// does not describe it; this structure and the 10 ms window are this design's
// choice. The button is the only reset source, so the state has power-up values
// (FPGA configuration values) instead of a reset: the output starts at 1, so it
// also acts as the power-on reset, released once the button has been seen
// released for DEBOUNCE_CYCLES cycles.
//
// Timing: a level change on noisy appears on clean DEBOUNCE_CYCLES + 2 cycles
// later if noisy holds it that long.
module reset_debounce #(
  parameter int DEBOUNCE_CYCLES = 1000000
) (
  input  logic clk,
  input  logic noisy,
  output logic clean = 1'b1
);
  logic [1:0] sync = '1;
  logic [$clog2(DEBOUNCE_CYCLES+1)-1:0] count = '0;

  always_ff @(posedge clk) begin
    sync <= {sync[0], noisy};
    if (sync[1] == clean) begin
      count <= '0;
    end else if (count == $bits(count)'(DEBOUNCE_CYCLES - 1)) begin
      clean <= sync[1];
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
