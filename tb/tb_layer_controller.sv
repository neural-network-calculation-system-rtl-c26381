// tb_layer_controller: the controller runs against behavioural stand-ins for
// the pools, the memory controller and the layer computation (random response
// delays). For networks whose P divides or does not divide the layer width it
// checks the exact order of (layer, first node, P) steps, that weights are
// requested for the right group, that the output-to-input copy happens once per
// layer boundary and only after the results were written, and that all_done
// rises after the last layer and stays high.
module tb_layer_controller;
  localparam int I = 24, D = 4;
  logic clk = 0, rst = 1;
  logic depth_ready = 0, all_done;
  logic [2:0] network_depth;
  logic pool_read_en, pool_parallelism_rdy = 0, pool_max_node_rdy = 0;
  logic [1:0] cur_layer;
  logic [4:0] pool_parallelism, pool_max_node_id;
  logic mem_read_en, weights_rdy = 0, inputs_rdy = 1;
  logic [4:0] cur_node, parallelism, max_node_id;
  logic get_from_output_pool, comp_start, comp_done = 0;
  int checks = 0, failures = 0;
  int p_tab[D], max_tab[D];
  int exp_q[$], got_q[$];       // encoded (layer, node, P)
  int copies = 0, last_done_cycle = -10, cycle = 0;

  layer_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Pools: data one cycle after the read request.
  always @(posedge clk) begin
    pool_parallelism_rdy <= pool_read_en;
    pool_max_node_rdy    <= pool_read_en;
    if (pool_read_en) begin
      pool_parallelism <= p_tab[cur_layer][4:0];
      pool_max_node_id <= max_tab[cur_layer][4:0];
    end
  end

  // Memory controller and layer computation stand-ins.
  initial forever begin
    @(posedge clk);
    if (mem_read_en) begin
      got_q.push_back(cur_layer * 10000 + cur_node * 100 + parallelism);
      repeat ($urandom_range(1, 6)) @(posedge clk);
      weights_rdy <= 1; @(posedge clk); weights_rdy <= 0;
    end
  end
  initial forever begin
    @(posedge clk);
    if (comp_start) begin
      repeat ($urandom_range(2, 9)) @(posedge clk);
      comp_done <= 1; last_done_cycle = cycle; @(posedge clk); comp_done <= 0;
    end
  end
  always @(posedge clk) if (get_from_output_pool) begin
    copies++;
    checks++;
    if (cycle - last_done_cycle < 1) begin failures++; $display("FAIL copy in the same cycle as the write"); end
  end

  task automatic run_net(input int depth, input int widths[D], input int ps[D]);
    exp_q.delete(); got_q.delete(); copies = 0;
    for (int l = 0; l < D; l++) begin p_tab[l] = ps[l]; max_tab[l] = widths[l] - 1; end
    for (int l = 0; l < depth; l++)
      for (int n = 0; n < widths[l]; n += ps[l]) exp_q.push_back(l * 10000 + n * 100 + ps[l]);
    rst = 1; @(posedge clk); #1 rst = 0;
    network_depth = depth[2:0]; depth_ready = 1;
    fork
      begin : wait_done
        while (!all_done) @(posedge clk);
      end
      begin repeat (5000) @(posedge clk); end
    join_any
    disable fork;
    #1;
    checks++;
    if (!all_done) begin failures++; $display("FAIL no all_done"); end
    repeat (20) @(posedge clk); #1;
    checks++;
    if (!all_done) begin failures++; $display("FAIL all_done not held"); end
    checks++;
    if (got_q != exp_q) begin
      failures++; $display("FAIL step order: got %p exp %p", got_q, exp_q);
    end
    checks++;
    if (copies != depth - 1) begin failures++; $display("FAIL %0d copies for depth %0d", copies, depth); end
    depth_ready = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    run_net(4, '{10, 10, 5, 1}, '{10, 10, 5, 1});   // a full layer per step
    run_net(4, '{10, 10, 5, 1}, '{4, 10, 2, 1});    // partial groups
    run_net(3, '{3, 2, 1, 0}, '{3, 2, 1, 1});
    run_net(1, '{24, 0, 0, 0}, '{24, 1, 1, 1});
    run_net(4, '{24, 24, 24, 24}, '{24, 7, 24, 5});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
