// tb_iforest_predictor: self-checking test of the forest's decision stage.
//
// Seven trees report their path lengths after random delays. The testbench
// computes the integer mean itself and checks mean, outlier flag (mean below
// the threshold), that `valid` pulses exactly one cycle after the last tree
// is done, and that no result comes while a tree is still busy.
module tb_iforest_predictor;
  import iforest_pkg::*;

  localparam int unsigned N_TREES = 7;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  start = 1'b0;
  logic  tree_done [N_TREES];
  path_t tree_len  [N_TREES];
  path_t threshold = '0;
  logic  valid, outlier;
  path_t mean;

  int checks = 0, failures = 0;
  int n_out = 0, n_in = 0;

  iforest_predictor #(.N_TREES(N_TREES)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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
    int    delay [N_TREES];
    int    maxd, sum, cyc, seen;
    path_t exp_mean;
    foreach (tree_done[i]) begin tree_done[i] = 1'b1; tree_len[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 500; s++) begin
      sum = 0; maxd = 0;
      foreach (delay[i]) begin
        delay[i]    = $urandom_range(1, 12);
        tree_len[i] = path_t'($urandom_range(16'h1400));
        sum += int'(tree_len[i]);
        if (delay[i] > maxd) maxd = delay[i];
      end
      exp_mean  = path_t'(sum / N_TREES);
      threshold = (s % 50 == 0) ? '0 : path_t'($urandom_range(16'h1000));
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      foreach (tree_done[i]) tree_done[i] = 1'b0;
      seen = 0;
      for (cyc = 1; cyc <= maxd + 3; cyc++) begin
        foreach (tree_done[i]) if (cyc == delay[i]) tree_done[i] = 1'b1;
        @(posedge clk);
        #1;
        if (valid) begin
          seen++;
          check(cyc == maxd, $sformatf("valid after %0d cycles, last tree at %0d", cyc, maxd));
          check(mean == exp_mean, $sformatf("mean %h expected %h", mean, exp_mean));
          check(outlier == (exp_mean < threshold), "outlier decision");
          if (outlier) n_out++; else n_in++;
        end
        @(negedge clk);
      end
      check(seen == 1, $sformatf("%0d results for one sample", seen));
    end
    check(n_out > 10 && n_in > 10, "both decisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
