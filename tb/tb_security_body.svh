// Shared body of the end-to-end testbenches of security_module. The including
// module declares N_TREES, N_NODES, N_FEAT, W (window used in the test),
// DEFAULT_W (the module's reset window) and instantiates `dut` wired to the
// signals declared here.
//
// Flow: check the reset window; load N_TREES random trees through AXI; set
// the threshold between the mean path length of a typical normal and a
// typical attack sample; program the feature table (three HPC events and the
// fetch activity); enable. The CPU model (pmu_model) counts 0-2 events per
// cycle in normal windows and 8-10 in attack windows. Every decision of the
// module is compared with a reference forest walk over the sample the
// testbench itself collected (HPC values seen on the line, fetch transfers
// counted between window ticks). Mechanisms counted and required at least
// once: HPC set-up, HPC read, fetch feature, normal decision, alert, alert
// clear, refused node write while enabled, dropped (missed) window tick.

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

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  tree_t trees [N_TREES];
  bit    attack = 1'b0;
  bit    checking = 1'b0;
  int    n_results = 0, n_alerts_seen = 0, n_normal = 0, n_alert_pulses = 0;
  int    n_fetch_nonzero = 0, n_alert_clear = 0, n_refused = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic path_t ref_mean(feat_t x [4], output longint sum);
    int d;
    sum = 0;
    for (int t = 0; t < N_TREES; t++) sum += longint'(ref_walk(trees[t], x, d));
    return path_t'(sum / longint'(N_TREES));
  endfunction

  // ---------------- CPU and fetch-bus activity ----------------
  always @(negedge clk) begin
    for (int i = 0; i < N_FEAT; i++)
      ev_inc[i] = attack ? feat_t'($urandom_range(10, 8)) : feat_t'($urandom_range(2));
    fetch_valid = ($urandom_range(3) != 0);
    fetch_ready = ($urandom_range(3) != 0);
  end

  // ---------------- reference sample collection ----------------
  feat_t cur_x [4];          // sample being gathered for the current decision
  feat_t fetch_win;          // transfers counted in the running window
  feat_t fetch_last;         // transfers of the last finished window
  typedef logic [3:0][FEAT_W-1:0] xpk_t;
  xpk_t  queued_x [$];
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
        feat_t x [4];
        x = cur_x;
        x[1] = fetch_last;
        if (fetch_last != 0) n_fetch_nonzero++;
        queued_x.push_back({x[3], x[2], x[1], x[0]});
      end
      if (dut.res_valid) begin
        feat_t x [4];
        longint s;
        path_t m;
        xpk_t xp;
        xp = queued_x.pop_front();
        for (int i = 0; i < 4; i++) x[i] = xp[i];
        m = ref_mean(x, s);
        n_results++;
        if (checking) begin
          check(dut.res_mean == m, $sformatf("result %0d: mean %h expected %h", n_results, dut.res_mean, m));
          check(dut.res_outlier == (m < dut.threshold), $sformatf("result %0d: decision", n_results));
          check(alert == dut.res_outlier, "alert pulse follows decision");
        end
        if (dut.res_outlier) n_alerts_seen++; else n_normal++;
      end
      if (alert) begin
        n_alert_pulses++;
        check(alert_mean == dut.res_mean, "alert bus carries the mean");
      end
    end
  end

  initial begin : main
    logic [31:0] d;
    logic [1:0]  resp;
    feat_t xn [4], xa [4];
    longint s;
    path_t mn, ma, thr;
    int i_win;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bfm.read(32'h004, d);
    check(d == 32'(DEFAULT_W), $sformatf("reset window %0d", d));
    if (W != DEFAULT_W) bfm.write(32'h004, 32'(W), resp);

    // load the forest
    for (int t = 0; t < N_TREES; t++) begin
      trees[t] = gen_tree(N_NODES, N_FEAT, 15, 60, feat_t'(2 * W));
      for (int n = 0; n < N_NODES; n++) begin
        bfm.write(32'(1 << 21) | 32'(t << 12) | 32'(n << 3), trees[t][n].threshold, resp);
        bfm.write(32'(1 << 21) | 32'(t << 12) | 32'(n << 3) | 32'h4,
                  {trees[t][n].leaf, 13'b0, 2'(trees[t][n].feature), trees[t][n].leaf_adj}, resp);
        check(resp == 2'b00, "node write accepted");
      end
    end
    // threshold between a typical normal and a typical attack sample
    xn = '{feat_t'(W), feat_t'(W * 9 / 16), feat_t'(W), feat_t'(W)};
    xa = '{feat_t'(9 * W), feat_t'(W * 9 / 16), feat_t'(9 * W), feat_t'(9 * W)};
    mn = ref_mean(xn, s);
    ma = ref_mean(xa, s);
    thr = path_t'((32'(mn) + 32'(ma)) / 2);
    $display("typical normal mean %h, attack mean %h, threshold %h", mn, ma, thr);
    check(ma < mn, "attack samples isolate faster in this forest");
    bfm.write(32'h008, 32'(thr), resp);
    bfm.write(32'h020, {1'b1, 1'b0, 14'b0, 16'h0011}, resp);   // HPC event 0x11
    bfm.write(32'h024, {1'b1, 1'b1, 30'b0}, resp);             // fetch activity
    bfm.write(32'h028, {1'b1, 1'b0, 14'b0, 16'h002A}, resp);   // HPC event 0x2A
    bfm.write(32'h02C, {1'b1, 1'b0, 14'b0, 16'h003C}, resp);   // HPC event 0x3C
    checking = 1'b1;
    bfm.write(32'h000, 32'h1, resp);
    repeat (40) @(negedge clk);
    check(n_config == 3, $sformatf("%0d counters programmed, expected 3", n_config));
    check(evsel[0] == 16'h0011 && evsel[2] == 16'h002A && evsel[3] == 16'h003C, "event codes");
    bfm.read(32'h00C, d);
    check(d[1], "set-up done in STATUS");
    bfm.write(32'h0020_0004, 32'h0, resp);
    check(resp == 2'b10, "node write refused while enabled");
    if (resp == 2'b10) n_refused++;

    // windows: 3 normal, 2 under attack, 2 normal
    for (i_win = 0; i_win < 7; i_win++) begin
      attack = (i_win == 3 || i_win == 4);
      do @(posedge clk); while (!dut.tick);
    end
    attack = 1'b0;
    repeat (60) @(negedge clk);
    check(alert_irq, "alert interrupt raised");
    bfm.write(32'h00C, 32'h1, resp);
    @(negedge clk);
    check(!alert_irq, "alert interrupt cleared");
    if (!alert_irq) n_alert_clear++;
    bfm.read(32'h010, d);
    check(d == 32'(n_results), $sformatf("SAMPLES %0d, results seen %0d", d, n_results));
    bfm.read(32'h01C, d);
    check(d == 32'(n_alerts_seen), $sformatf("ALERTS %0d, seen %0d", d, n_alerts_seen));

    // windows shorter than a sample read: ticks are dropped
    checking = 1'b0;
    bfm.write(32'h004, 32'd6, resp);
    repeat (100) @(negedge clk);
    bfm.write(32'h004, 32'(W), resp);
    bfm.read(32'h014, d);
    check(d > 0, $sformatf("MISSED %0d", d));

    check(n_config > 0,       "mechanism: HPC set-up");
    check(n_read > 0,         "mechanism: HPC read");
    check(n_fetch_nonzero > 0,"mechanism: fetch feature");
    check(n_normal > 0,       "mechanism: normal decision");
    check(n_alert_pulses > 0, "mechanism: alert");
    check(n_alert_clear > 0,  "mechanism: alert clear");
    check(n_refused > 0,      "mechanism: refused node write");
    $display("mechanisms: setup=%0d reads=%0d fetch=%0d normal=%0d alerts=%0d clear=%0d refused=%0d missed=%0d",
             n_config, n_read, n_fetch_nonzero, n_normal, n_alert_pulses, n_alert_clear, n_refused, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

