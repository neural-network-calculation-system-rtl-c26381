// tb_output_pool: random start address, width and max node id; checks the
// written window, the cleared entries above it and the untouched ones below,
// then a whole layer computed in several groups of P.
module tb_output_pool;
  localparam int I = 24, N = 16;
  logic clk = 0, rst = 1, write_en = 0;
  logic [4:0] start_addr, max_node_id;
  logic [4:0] data_width;
  logic [I*N-1:0] write_data, data_out;
  logic [N-1:0] model [I];
  int checks = 0, failures = 0;

  output_pool dut (.*);

  always #5 clk = ~clk;

  task automatic wr(input int s, input int w, input int mx);
    for (int i = 0; i < I; i++) write_data[i*N +: N] = N'($urandom);
    start_addr = s[4:0]; data_width = w[4:0]; max_node_id = mx[4:0]; write_en = 1;
    for (int i = s; i < I; i++)
      model[i] = (i < s + w && i <= mx) ? write_data[(i-s)*N +: N] : '0;
    @(posedge clk); #1;
    write_en = 0;
    for (int i = 0; i < I; i++) begin
      checks++;
      if (data_out[i*N +: N] !== model[i]) begin
        failures++; $display("FAIL s=%0d w=%0d mx=%0d entry %0d", s, w, mx, i);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < I; i++) model[i] = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    wr(0, 24, 23);
    wr(0, 3, 2);
    for (int k = 0; k < 50; k++) wr($urandom_range(0, 23), $urandom_range(1, 24), $urandom_range(0, 23));
    // a 10-neuron layer in groups of 4: 0..3, 4..7, 8..9
    wr(0, 4, 9); wr(4, 4, 9); wr(8, 4, 9);
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
