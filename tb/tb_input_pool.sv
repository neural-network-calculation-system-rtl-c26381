// tb_input_pool: loads from the communication side and from the output pool
// (getFromOutputPool selects the output pool when both strobes are high), holds
// the value when neither strobe is high, and tracks the valid flag.
module tb_input_pool;
  localparam int I = 24, N = 16;
  logic clk = 0, rst = 1, comm_write_en = 0, get_from_output_pool = 0, valid;
  logic [I*N-1:0] comm_data, output_pool_data, read_data, model;
  int checks = 0, failures = 0;

  input_pool dut (.*);

  always #5 clk = ~clk;

  function automatic logic [I*N-1:0] rnd();
    logic [I*N-1:0] v;
    for (int i = 0; i < I*N; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    checks += 2;
    if (valid) begin failures++; $display("FAIL valid after reset"); end
    if (read_data != '0) begin failures++; $display("FAIL data after reset"); end
    model = '0;
    for (int k = 0; k < 100; k++) begin
      comm_data = rnd(); output_pool_data = rnd();
      comm_write_en = $urandom_range(0, 1); get_from_output_pool = $urandom_range(0, 1);
      if (get_from_output_pool) model = output_pool_data;
      else if (comm_write_en) model = comm_data;
      @(posedge clk); #1;
      checks++;
      if (read_data !== model) begin failures++; $display("FAIL k=%0d", k); end
      if (model != '0) begin
        checks++;
        if (!valid) begin failures++; $display("FAIL valid low after load"); end
      end
    end
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
