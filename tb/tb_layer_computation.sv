// tb_layer_computation: full-size (I = 24) layer steps with random signed
// inputs, weights and biases, small values (the common case) and full-range
// values (wrap-around of the N-bit result), against the reference neuron;
// checks the start-to-out_valid latency of clog2(I) + 3 = 8 clock edges and
// that out_valid is a single-cycle pulse.
module tb_layer_computation;
  import nn_ref_pkg::*;
  localparam int I = 24, N = 16, M = 24, S1 = 3, S2 = 1, LAT = 8;
  logic clk = 0, rst = 1, start = 0, out_valid;
  logic [I*I*M-1:0] weights;
  logic [I*M-1:0] thresholds;
  logic [I*N-1:0] inputs, outputs;
  int checks = 0, failures = 0, positives = 0, zeros = 0;

  layer_computation dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int range_in, input int range_w, input int range_b);
    longint x[] = new[I];
    longint w[] = new[I];
    int edges = 0;
    for (int j = 0; j < I; j++) begin
      x[j] = (range_in == 0) ? sx($urandom, N) : $urandom_range(0, 2 * range_in) - range_in;
      inputs[j*N +: N] = N'(x[j]);
    end
    for (int k = 0; k < I; k++) begin
      for (int j = 0; j < I; j++)
        weights[(k*I+j)*M +: M] = (range_w == 0) ? M'($urandom) : M'($urandom_range(0, 2 * range_w) - range_w);
      thresholds[k*M +: M] = (range_b == 0) ? M'($urandom) : M'($urandom_range(0, 2 * range_b) - range_b);
    end
    start = 1;
    @(posedge clk); #1;
    start = 0;
    edges = 1;
    while (!out_valid && edges < 50) begin @(posedge clk); #1; edges++; end
    checks++;
    if (edges != LAT) begin failures++; $display("FAIL latency %0d", edges); end
    for (int k = 0; k < I; k++) begin
      longint e;
      for (int j = 0; j < I; j++) w[j] = sx(weights[(k*I+j)*M +: M], M);
      e = ref_neuron(x, w, sx(thresholds[k*M +: M], M), N, S1, S2);
      if (e == 0) zeros++; else positives++;
      checks++;
      if (longint'(outputs[k*N +: N]) != e) begin
        failures++; $display("FAIL neuron %0d got %0d exp %0d", k, outputs[k*N +: N], e);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid longer than one cycle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    repeat (10) run(100, 50, 200);
    repeat (5) run(1000, 1000, 100000);
    repeat (5) run(0, 0, 0);
    checks++;
    if (positives == 0 || zeros == 0) begin failures++; $display("FAIL ReLU not exercised both ways"); end
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
