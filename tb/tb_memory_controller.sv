// tb_memory_controller: loads full-size random neurons (threshold word plus 24
// weights) for layers of different widths, including a layer id that changes
// back and forth, then performs random group reads (layer, first node, P) and
// checks weights, thresholds, the cleared slots above P and the read latency
// (read_rdy rises on the (P+3)-th edge, counting the one that samples read_en).
module tb_memory_controller;
  localparam int I = 24, D = 4, M = 24, ROW = (I + 1) * M;
  logic clk = 0, rst = 1;
  logic write_en = 0, read_en = 0, read_rdy, busy;
  logic [ROW-1:0] write_node;
  logic [1:0] write_layer_id, read_layer_id;
  logic [4:0] read_node_id;
  logic [4:0] read_parallelism;
  logic [I*I*M-1:0] read_weights;
  logic [I*M-1:0] read_thresholds;
  logic [ROW-1:0] model [D][I];
  int checks = 0, failures = 0;
  int widths[D] = '{24, 10, 5, 1};

  memory_controller dut (.*);

  always #5 clk = ~clk;

  task automatic write_one(input int layer, input int node);
    for (int i = 0; i < ROW; i += 24) write_node[i +: 24] = 24'($urandom);
    model[layer][node] = write_node;
    write_layer_id = layer[1:0];
    write_en = 1;
    @(posedge clk); #1;
    write_en = 0;
    while (busy) begin @(posedge clk); #1; end
  endtask

  task automatic read_group(input int layer, input int node, input int p);
    int edges;
    read_layer_id = layer[1:0]; read_node_id = node[4:0]; read_parallelism = p[4:0];
    read_en = 1;
    @(posedge clk); #1;
    read_en = 0;
    edges = 1;
    while (!read_rdy && edges < 100) begin @(posedge clk); #1; edges++; end
    checks++;
    if (edges != p + 3) begin failures++; $display("FAIL latency %0d for P=%0d", edges, p); end
    for (int k = 0; k < I; k++) begin
      logic [ROW-1:0] exp;
      exp = (k < p) ? model[layer][node + k] : '0;
      checks += 2;
      if (read_thresholds[k*M +: M] !== exp[M-1:0]) begin
        failures++; $display("FAIL thr L%0d n%0d P%0d slot %0d", layer, node, p, k);
      end
      if (read_weights[k*I*M +: I*M] !== exp[ROW-1:M]) begin
        failures++; $display("FAIL wts L%0d n%0d P%0d slot %0d", layer, node, p, k);
      end
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int l = 0; l < D; l++) for (int n = 0; n < widths[l]; n++) write_one(l, n);
    for (int l = 0; l < D; l++) read_group(l, 0, widths[l]);
    for (int k = 0; k < 30; k++) begin
      int l, n, p;
      l = $urandom_range(0, D - 1);
      n = $urandom_range(0, widths[l] - 1);
      p = $urandom_range(1, widths[l] - n);
      read_group(l, n, p);
    end
    // rewrite layer 1 after other layers: offsets restart at 0
    for (int n = 0; n < 3; n++) write_one(1, n);
    write_one(2, 0);
    read_group(1, 0, 10);
    read_group(2, 0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
