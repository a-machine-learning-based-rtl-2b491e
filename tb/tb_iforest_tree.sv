// tb_iforest_tree: self-checking test of one isolation tree unit.
//
// Loads random trees (63-node table, depth limit 5) through the node write
// port, walks 200 random samples per tree and compares the path length with
// the reference walk of tb_tree_pkg. Also checks the walk latency (depth + 2
// cycles from start to done) and that done stays up until the next start.
module tb_iforest_tree;
  import iforest_pkg::*;
  import tb_tree_pkg::*;

  localparam int unsigned N_NODES = 63;
  localparam int unsigned N_FEAT  = 4;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  cfg_we = 1'b0;
  logic [$clog2(N_NODES)-1:0] cfg_addr = '0;
  node_t cfg_node = '0;
  logic  start = 1'b0;
  feat_t sample [N_FEAT];
  logic  busy, done;
  path_t path_len;

  int checks = 0, failures = 0;

  iforest_tree #(.N_NODES(N_NODES), .N_FEAT(N_FEAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    tree_t t;
    feat_t x [4];
    int    depth, cycles, max_depth;
    path_t exp_len;
    foreach (sample[i]) sample[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    max_depth = 0;
    for (int tr = 0; tr < 20; tr++) begin
      t = gen_tree(N_NODES, N_FEAT, 25, 30, 1000);
      for (int n = 0; n < N_NODES; n++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_addr = 6'(n); cfg_node = t[n];
      end
      @(negedge clk);
      cfg_we = 1'b0;
      for (int s = 0; s < 200; s++) begin
        foreach (x[i]) x[i] = feat_t'($urandom_range(1100));
        if (s % 10 == 0) x[s % 4] = '1;               // extreme value
        exp_len = ref_walk(t, x, depth);
        if (depth > max_depth) max_depth = depth;
        @(negedge clk);
        foreach (sample[i]) sample[i] = x[i];
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        foreach (sample[i]) sample[i] = '0;           // sample must be latched
        cycles = 1;
        while (!done) begin
          @(negedge clk);
          cycles++;
          if (cycles > 50) break;
        end
        check(done, "walk did not finish");
        check(path_len == exp_len,
              $sformatf("tree %0d sample %0d: path %h expected %h", tr, s, path_len, exp_len));
        check(cycles == depth + 2,
              $sformatf("latency %0d cycles for depth %0d, expected %0d", cycles, depth, depth + 2));
        repeat (2) @(negedge clk);
        check(done && path_len == exp_len, "result not held");
      end
    end
    check(max_depth >= 4, "deep paths never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
