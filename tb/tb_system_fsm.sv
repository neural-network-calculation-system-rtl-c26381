// tb_system_fsm: walks the four phases in order, checks that out-of-order
// events are ignored, the direct weight -> compute step (no input stream) and
// reset.
module tb_system_fsm;
  import nn_pkg::*;
  logic clk = 0, rst = 1;
  logic input_stream_seen = 0, in_transfer_done = 0, compute_done = 0, out_transfer_done = 0;
  phase_e phase;
  int checks = 0, failures = 0;

  system_fsm dut (.*);

  always #5 clk = ~clk;

  task automatic ev(input int which, input phase_e exp);
    {input_stream_seen, in_transfer_done, compute_done, out_transfer_done} = 4'b1000 >> which;
    @(posedge clk); #1;
    {input_stream_seen, in_transfer_done, compute_done, out_transfer_done} = '0;
    checks++;
    if (phase !== exp) begin failures++; $display("FAIL event %0d: phase %s exp %s", which, phase.name(), exp.name()); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    checks++;
    if (phase !== PH_WEIGHT_TRANSFER) begin failures++; $display("FAIL reset phase"); end
    repeat (2) begin
      ev(2, PH_WEIGHT_TRANSFER);   // compute_done ignored
      ev(3, PH_WEIGHT_TRANSFER);   // out_transfer_done ignored
      ev(0, PH_INPUT_TRANSFER);
      ev(0, PH_INPUT_TRANSFER);
      ev(2, PH_INPUT_TRANSFER);
      ev(1, PH_NETWORK_COMPUTE);
      ev(0, PH_NETWORK_COMPUTE);
      ev(2, PH_OUTPUT_TRANSFER);
      ev(1, PH_OUTPUT_TRANSFER);
      ev(3, PH_WEIGHT_TRANSFER);
    end
    ev(1, PH_NETWORK_COMPUTE);     // no input stream
    rst = 1; @(posedge clk); #1 rst = 0;
    checks++;
    if (phase !== PH_WEIGHT_TRANSFER) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
