// tb_param_pool: per-layer writes and reads against a model array, the
// one-cycle data_rdy pulse, write priority over read, and reset clearing.
module tb_param_pool;
  localparam int W = 5, D = 4;
  logic clk = 0, rst = 1, write_en = 0, read_en = 0, data_rdy;
  logic [W-1:0] write_data, read_data;
  logic [1:0] index;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  param_pool #(.DATA_WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic rd(input int i);
    index = i[1:0]; read_en = 1;
    @(posedge clk); #1;
    read_en = 0;
    checks += 2;
    if (!data_rdy) begin failures++; $display("FAIL no data_rdy"); end
    if (read_data !== model[i]) begin failures++; $display("FAIL idx %0d got %0d exp %0d", i, read_data, model[i]); end
    @(posedge clk); #1;
    checks++;
    if (data_rdy) begin failures++; $display("FAIL data_rdy not a pulse"); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < D; i++) model[i] = '0;
    for (int i = 0; i < D; i++) rd(i);
    for (int k = 0; k < 40; k++) begin
      int i;
      i = $urandom_range(0, D - 1);
      write_data = W'($urandom); index = i[1:0]; write_en = 1;
      // repeated writes of the same value, as one per neuron
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1 write_en = 0; model[i] = write_data;
      rd($urandom_range(0, D - 1));
    end
    // write has priority over read
    write_en = 1; read_en = 1; index = 2; write_data = 5'd17;
    @(posedge clk); #1;
    write_en = 0; read_en = 0; model[2] = 5'd17;
    checks++;
    if (data_rdy) begin failures++; $display("FAIL read served during write"); end
    rd(2);
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int i = 0; i < D; i++) model[i] = '0;
    for (int i = 0; i < D; i++) rd(i);
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
