// tb_relu: checks the ReLU against "negative -> 0, else the value" for random
// and corner-case signed inputs at the default width.
module tb_relu;
  localparam int W = 41;
  logic [W-1:0] din;
  logic [W-2:0] dout;
  int checks = 0, failures = 0;

  relu #(.WIDTH(W)) dut (.din(din), .dout(dout));

  task automatic check(input logic [W-1:0] v);
    logic [W-2:0] exp;
    din = v;
    #1;
    exp = v[W-1] ? '0 : v[W-2:0];
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL din=%h dout=%h exp=%h", v, dout, exp);
    end
  endtask

  initial begin
    check('0);
    check({1'b0, {(W-1){1'b1}}});
    check({1'b1, {(W-1){1'b0}}});
    check('1);
    check(W'(1));
    for (int i = 0; i < 200; i++) check({$urandom, $urandom} & {W{1'b1}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
