// tb_workload_iforest: the detector running a trained forest of the shape used
// for every evaluated cipher/attack pair: 100 isolation trees, each grown on
// 256 samples with 2 of the 4 features, and a decision threshold set for 1%
// contamination. The module runs at its default parameters. Only the WINDOW
// register is set short (2,000 cycles) so that many windows fit in a run.
//
// Training happens inside the testbench, the way scikit-learn's IsolationForest
// grows trees:
//   * Draw 512 attack-free samples from the same counter model that drives the
//     CPU during the run: per-cycle event counts summed over a window.
//   * For each tree, pick 2 distinct features and 256 of the samples.
//   * Split each node on one of the 2 features, at a random integer threshold
//     between the node's smallest and largest value.
//   * A node becomes a leaf when it holds one sample, when its samples are
//     equal on both features, or at depth 8.
//   * A leaf stores round(256*c(n)).
//   * The threshold comes from the 1st percentile of the training scores:
//     THRESH = 256 * (-c(256) * log2(-offset)).
// Only the nodes a tree uses are written over AXI.
//
// Run:
//   * 24 normal windows, then 6 attack windows, then 6 normal windows.
//   * In attack windows two of the three HPC events count faster. Slot 1
//     counts fetch transfers, as in a feature set that includes fetch
//     activity.
//   * The attack state switches right after a sample is read, so every
//     sample is wholly normal or wholly under attack.
//
// Checks:
//   * Every decision equals the reference forest's result on the sample the
//     testbench collected.
//   * Every attack window raises an alert.
//   * At most 3 of the normal windows do (about 1% are expected).
// The counter rates are this testbench's own. They stand in for real cipher
// and attack traces, which are not available here.
module tb_workload_iforest;
  import iforest_pkg::*;
  import tb_tree_pkg::*;

  localparam int unsigned N_TREES = 100;
  localparam int unsigned N_NODES = 511;
  localparam int unsigned N_FEAT  = 4;
  localparam int unsigned W       = 2000;
  localparam int unsigned N_TRAIN = 512;
  localparam int unsigned PSI     = 256;    // samples per tree
  localparam int unsigned MAXD    = 8;      // ceil(log2(PSI))

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic hpc_req, hpc_ack;
  hpc_op_e hpc_op;
  logic [$clog2(N_FEAT)-1:0] hpc_idx;
  logic [EVT_W-1:0] hpc_wdata;
  feat_t hpc_rdata;
  logic fetch_valid = 1'b0, fetch_ready = 1'b0;
  logic alert, alert_irq;
  path_t alert_mean;
  feat_t ev_inc [N_FEAT];
  logic [EVT_W-1:0] evsel [N_FEAT];
  int unsigned n_config, n_read;

  pmu_model #(.N_FEAT(N_FEAT), .LATENCY(2)) u_pmu (.*);
  axil_bfm bfm (.*);

  security_module dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .hpc_req, .hpc_op, .hpc_idx, .hpc_wdata, .hpc_ack, .hpc_rdata,
    .fetch_valid, .fetch_ready, .alert, .alert_mean, .alert_irq
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
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

  // ---------------- counter model ----------------
  // Events per cycle of HPC slots 0, 2 and 3; slot 1 is the fetch bus.
  function automatic feat_t ev_draw(int slot, bit atk);
    case (slot)
      0:       return atk ? feat_t'($urandom_range(4, 2)) : feat_t'($urandom_range(2));
      2:       return feat_t'($urandom_range(3));
      3:       return atk ? feat_t'($urandom_range(3, 1)) : feat_t'($urandom_range(1));
      default: return '0;
    endcase
  endfunction

  bit attack = 1'b0;
  always @(negedge clk) begin
    for (int i = 0; i < N_FEAT; i++) ev_inc[i] = ev_draw(i, attack);
    fetch_valid = ($urandom_range(3) != 0);
    fetch_ready = ($urandom_range(3) != 0);
  end

  // ---------------- training ----------------
  typedef logic [3:0][FEAT_W-1:0] xpk_t;
  xpk_t  train [N_TRAIN];
  tree_t trees [N_TREES];
  bit    used  [N_TREES][N_NODES];

  function automatic real c_of(int n);
    if (n <= 1) return 0.0;
    if (n == 2) return 1.0;
    return 2.0 * ($ln(real'(n - 1)) + 0.5772156649) - 2.0 * real'(n - 1) / real'(n);
  endfunction

  function automatic xpk_t draw_sample();
    xpk_t x = '0;
    for (int c = 0; c < int'(W); c++) begin
      x[0] += ev_draw(0, 1'b0);
      x[2] += ev_draw(2, 1'b0);
      x[3] += ev_draw(3, 1'b0);
      x[1] += feat_t'(($urandom_range(3) != 0) && ($urandom_range(3) != 0));
    end
    return x;
  endfunction

  function automatic void grow(int t);
    int    pick [PSI];
    int    node_of [PSI];
    int    f [2];
    int    perm [N_TRAIN];
    trees[t] = new[N_NODES];
    for (int i = 0; i < int'(N_NODES); i++) begin
      trees[t][i] = '0;
      used[t][i]  = 1'b0;
    end
    f[0] = $urandom_range(3);
    f[1] = (f[0] + 1 + $urandom_range(2)) % 4;
    for (int i = 0; i < int'(N_TRAIN); i++) perm[i] = i;
    for (int i = 0; i < int'(PSI); i++) begin
      int j, tmp;
      j = i + $urandom_range(int'(N_TRAIN) - 1 - i);
      tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      pick[i] = perm[i];
      node_of[i] = 0;
    end
    used[t][0] = 1'b1;
    for (int nd = 0; nd < int'(N_NODES); nd++) begin
      int    n, depth, fs;
      feat_t lo [2], hi [2];
      if (!used[t][nd]) continue;
      n = 0;
      lo = '{'1, '1};
      hi = '{'0, '0};
      for (int s = 0; s < int'(PSI); s++) begin
        if (node_of[s] == nd) begin
          n++;
          for (int k = 0; k < 2; k++) begin
            if (train[pick[s]][f[k]] < lo[k]) lo[k] = train[pick[s]][f[k]];
            if (train[pick[s]][f[k]] > hi[k]) hi[k] = train[pick[s]][f[k]];
          end
        end
      end
      depth = $clog2(nd + 2) - 1;
      fs = $urandom_range(1);
      if (lo[fs] == hi[fs]) fs = 1 - fs;
      if (n <= 1 || depth >= int'(MAXD) || lo[fs] == hi[fs]) begin
        trees[t][nd].leaf     = 1'b1;
        trees[t][nd].leaf_adj = path_t'(longint'(c_of(n) * 256.0 + 0.5));
      end else begin
        trees[t][nd].leaf      = 1'b0;
        trees[t][nd].feature   = FIDX_W'(f[fs]);
        trees[t][nd].threshold = lo[fs] + feat_t'($urandom_range(int'(hi[fs] - lo[fs]) - 1));
        used[t][2 * nd + 1] = 1'b1;
        used[t][2 * nd + 2] = 1'b1;
        for (int s = 0; s < int'(PSI); s++)
          if (node_of[s] == nd)
            node_of[s] = (train[pick[s]][f[fs]] <= trees[t][nd].threshold) ? 2 * nd + 1 : 2 * nd + 2;
      end
    end
  endfunction

  function automatic path_t ref_mean(xpk_t xp);
    feat_t  x [4];
    longint sum = 0;
    int     d;
    for (int i = 0; i < 4; i++) x[i] = xp[i];
    for (int t = 0; t < int'(N_TREES); t++) sum += longint'(ref_walk(trees[t], x, d));
    return path_t'(sum / longint'(N_TREES));
  endfunction

  // sklearn-style threshold: offset = 1st percentile of training scores
  function automatic path_t train_threshold();
    real sc [$];
    real pos, offset, e;
    int  k;
    for (int i = 0; i < int'(N_TRAIN); i++) begin
      e = real'(ref_mean(train[i])) / 256.0;
      sc.push_back(-$pow(2.0, -e / c_of(PSI)));
    end
    sc.sort();
    pos = real'(N_TRAIN - 1) * 0.01;
    k = int'($floor(pos));
    offset = sc[k] + (pos - real'(k)) * (sc[k + 1] - sc[k]);
    return path_t'(longint'(256.0 * (-c_of(PSI) * $ln(-offset) / $ln(2.0)) + 0.5));
  endfunction

  // ---------------- reference sample collection ----------------
  xpk_t  cur_x;
  feat_t fetch_win, fetch_last;
  xpk_t  queued_x [$];
  bit    queued_atk [$];
  bit    checking = 1'b0;
  int    n_norm = 0, n_norm_flag = 0, n_atk = 0, n_atk_flag = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      fetch_win  <= '0;
      fetch_last <= '0;
    end else begin
      if (hpc_req && hpc_ack && hpc_op == HPC_OP_READ_CLEAR) cur_x[hpc_idx] = hpc_rdata;
      if (dut.tick) begin
        fetch_last <= fetch_win + feat_t'(fetch_valid && fetch_ready);
        fetch_win  <= '0;
      end else if (dut.enable && dut.setup_done && fetch_valid && fetch_ready) begin
        fetch_win <= fetch_win + 1'b1;
      end
      if (dut.sample_valid) begin
        xpk_t x;
        x = cur_x;
        x[1] = fetch_last;
        queued_x.push_back(x);
        queued_atk.push_back(attack);
      end
      if (dut.res_valid) begin
        xpk_t  xp;
        bit    atk;
        path_t m;
        xp  = queued_x.pop_front();
        atk = queued_atk.pop_front();
        m = ref_mean(xp);
        if (checking) begin
          check(dut.res_mean == m, $sformatf("mean %h expected %h", dut.res_mean, m));
          check(dut.res_outlier == (m < dut.threshold), "decision against threshold");
          if (atk) begin
            n_atk++;
            if (dut.res_outlier) n_atk_flag++;
          end else begin
            n_norm++;
            if (dut.res_outlier) n_norm_flag++;
          end
        end
      end
    end
  end

  int n_samples_seen = 0;
  always @(posedge clk) if (dut.sample_valid) n_samples_seen++;

  initial begin : main
    logic [31:0] d;
    logic [1:0]  resp;
    path_t thr;
    int n_written = 0;

    for (int i = 0; i < int'(N_TRAIN); i++) train[i] = draw_sample();
    for (int t = 0; t < int'(N_TREES); t++) grow(t);
    thr = train_threshold();
    $display("trained %0d trees, threshold %h (%0.3f)", N_TREES, thr, real'(thr) / 256.0);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bfm.write(32'h004, 32'(W), resp);
    for (int t = 0; t < int'(N_TREES); t++)
      for (int n = 0; n < int'(N_NODES); n++)
        if (used[t][n]) begin
          bfm.write(32'(1 << 21) | 32'(t << 12) | 32'(n << 3), trees[t][n].threshold, resp);
          bfm.write(32'(1 << 21) | 32'(t << 12) | 32'(n << 3) | 32'h4,
                    {trees[t][n].leaf, 13'b0, 2'(trees[t][n].feature), trees[t][n].leaf_adj}, resp);
          check(resp == 2'b00, "node write accepted");
          n_written++;
        end
    $display("%0d nodes loaded", n_written);
    bfm.write(32'h008, 32'(thr), resp);
    bfm.read(32'h008, d);
    check(d[15:0] == thr, "threshold read back");
    bfm.write(32'h020, {1'b1, 1'b0, 14'b0, 16'h0011}, resp);
    bfm.write(32'h024, {1'b1, 1'b1, 30'b0}, resp);
    bfm.write(32'h028, {1'b1, 1'b0, 14'b0, 16'h002A}, resp);
    bfm.write(32'h02C, {1'b1, 1'b0, 14'b0, 16'h003C}, resp);
    bfm.write(32'h000, 32'h1, resp);

    // first window starts a few cycles after the counters are programmed:
    // leave it out of the statistics
    do @(posedge clk); while (!dut.sample_valid);
    @(negedge clk);
    checking = 1'b1;
    for (int w = 0; w < 36; w++) begin
      do @(posedge clk); while (!dut.sample_valid);
      #1 attack = (w >= 23 && w < 29);
    end
    do @(posedge clk); while (!dut.res_valid);
    repeat (5) @(negedge clk);

    $display("normal windows %0d flagged %0d; attack windows %0d flagged %0d",
             n_norm, n_norm_flag, n_atk, n_atk_flag);
    check(n_atk == 6, $sformatf("%0d attack windows", n_atk));
    check(n_norm >= 29, $sformatf("%0d normal windows", n_norm));
    check(n_atk_flag == n_atk, "every attack window raises an alert");
    check(n_norm_flag <= 3, "few false alerts on normal windows");
    bfm.read(32'h01C, d);
    check(d == 32'(n_atk_flag + n_norm_flag), $sformatf("ALERTS %0d", d));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
