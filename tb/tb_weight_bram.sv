// tb_weight_bram: writes random 600-bit rows to every one of the 96 rows, reads
// them back in random order and checks data and the one-cycle read latency;
// also checks that en = 0 blocks a write.
module tb_weight_bram;
  localparam int DEPTH = 96, W = 600;
  logic clk = 0, en = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] addr;
  logic [W-1:0] din, dout;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  weight_bram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #1;
    for (int r = 0; r < DEPTH; r++) begin
      en = 1; we = 1; addr = r[$clog2(DEPTH)-1:0]; din = rnd(); model[r] = din;
      @(posedge clk); #1;
    end
    // write with en low must not land
    en = 0; we = 1; addr = 7; din = ~model[7];
    @(posedge clk); #1;
    we = 0;
    for (int k = 0; k < 300; k++) begin
      int r;
      r = $urandom_range(0, DEPTH - 1);
      en = 1; addr = r[$clog2(DEPTH)-1:0];
      @(posedge clk); #1;
      en = 0;
      checks++;
      if (dout !== model[r]) begin failures++; $display("FAIL row %0d", r); end
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
