// tb_tree_adder: sums of 24 random signed 37-bit values (plus all-max and
// all-min corners) against a 64-bit reference; checks the pipeline latency of
// LEVELS+1 = 6 cycles from in_valid to out_valid and back-to-back operation.
module tb_tree_adder;
  localparam int NI = 24, W = 37, LEVELS = 5, OW = W + LEVELS;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [NI*W-1:0] data;
  logic signed [OW-1:0] sum;
  int checks = 0, failures = 0;
  longint expq[$];
  int sent_cycle[$];
  int cycle = 0;

  tree_adder #(.NUM_INPUTS(NI), .IN_WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(posedge clk) if (out_valid) begin
    longint e;
    int c;
    e = expq.pop_front();
    c = sent_cycle.pop_front();
    checks += 2;
    if (longint'(sum) != e) begin failures++; $display("FAIL sum=%0d exp=%0d", sum, e); end
    if (cycle - c != LEVELS + 1) begin failures++; $display("FAIL latency %0d", cycle - c); end
  end

  task automatic push(input int mode);
    longint e = 0;
    for (int i = 0; i < NI; i++) begin
      logic [W-1:0] v;
      v = (mode == 1) ? {1'b0, {(W-1){1'b1}}} : (mode == 2) ? {1'b1, {(W-1){1'b0}}} : W'({$urandom, $urandom});
      data[i*W +: W] = v;
      e += longint'($signed(v));
    end
    in_valid = 1;
    expq.push_back(e);
    sent_cycle.push_back(cycle + 1);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    push(1); repeat (8) @(posedge clk); #1;
    push(2); repeat (8) @(posedge clk); #1;
    for (int k = 0; k < 20; k++) push(0);      // back to back
    repeat (10) @(posedge clk);
    #1;
    for (int k = 0; k < 20; k++) begin push(0); repeat ($urandom_range(0, 7)) @(posedge clk); #1; end
    repeat (12) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
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
