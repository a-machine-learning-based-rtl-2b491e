// tb_hpc_sampler: self-checking test of the HPC line master.
//
// A behavioural counter unit (pmu_model) answers the HPC line after LATENCY
// cycles. Each counter counts a fixed number of events per cycle, so with
// back-to-back windows of W cycles every HPC feature after the first window
// must be rate*W. Checks: the set-up programs exactly the enabled HPC slots
// with their event codes; samples carry the HPC values, the fetch count for
// fetch slots and 0 for disabled slots; the sample arrives
// k*(LATENCY+2) + (N_FEAT-k) + 2 cycles after the tick for k HPC slots; a
// tick during a read is reported as missed; a second configuration (all
// four slots HPC) is set up again after re-enabling.
module tb_hpc_sampler;
  import iforest_pkg::*;

  localparam int unsigned N_FEAT  = 4;
  localparam int unsigned LATENCY = 3;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      enable = 1'b0;
  feat_cfg_t feat_cfg [N_FEAT];
  logic      tick = 1'b0;
  feat_t     fetch_count = '0;
  logic      hpc_req;
  hpc_op_e   hpc_op;
  logic [1:0] hpc_idx;
  logic [EVT_W-1:0] hpc_wdata;
  logic      hpc_ack;
  feat_t     hpc_rdata;
  logic      setup_done, missed, sample_valid;
  feat_t     sample [N_FEAT];
  feat_t     ev_inc [N_FEAT];
  logic [EVT_W-1:0] evsel [N_FEAT];
  int unsigned n_config, n_read;

  int checks = 0, failures = 0;
  int n_missed = 0;

  hpc_sampler #(.N_FEAT(N_FEAT)) dut (.*);
  pmu_model #(.N_FEAT(N_FEAT), .LATENCY(LATENCY)) u_pmu (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && missed) n_missed++;

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

  // run `nwin` back-to-back windows of W cycles, tick in the last cycle of
  // each, and check every sample as it comes out
  task automatic run_windows(int nwin, int W, int k_hpc, feat_t rate [N_FEAT]);
    int since, nsamp;
    bit ticked;
    since = 0; nsamp = 0; ticked = 1'b0;
    fetch_count = feat_t'($urandom);
    for (int c = 0; c < nwin * W + 60; c++) begin
      tick = (c < nwin * W) && ((c % W) == W - 1);
      @(negedge clk);
      if (tick) begin since = 1; ticked = 1'b1; end
      else since++;
      if (sample_valid) begin
        check(ticked, "sample without tick");
        check(since == k_hpc * (LATENCY + 2) + (N_FEAT - k_hpc) + 3,
              $sformatf("sample latency %0d", since));
        for (int i = 0; i < N_FEAT; i++) begin
          feat_t exp;
          if (!feat_cfg[i].en) exp = '0;
          else if (feat_cfg[i].src == SRC_FETCH) exp = fetch_count;
          else exp = rate[i] * feat_t'(W);
          // the first window starts at set-up, not at a tick
          if (nsamp > 0 || !(feat_cfg[i].en && feat_cfg[i].src == SRC_HPC))
            check(sample[i] == exp, $sformatf("window %0d slot %0d: %0d expected %0d",
                                              nsamp, i, sample[i], exp));
        end
        nsamp++;
        fetch_count = feat_t'($urandom);
      end
    end
    tick = 1'b0;
    check(nsamp == nwin, $sformatf("%0d samples for %0d windows", nsamp, nwin));
  endtask

  initial begin
    feat_t rate [N_FEAT];
    int    cyc;
    foreach (ev_inc[i]) ev_inc[i] = '0;
    feat_cfg[0] = '{en: 1'b1, src: SRC_HPC,   event_code: 16'h0011};
    feat_cfg[1] = '{en: 1'b1, src: SRC_FETCH, event_code: 16'h0000};
    feat_cfg[2] = '{en: 1'b1, src: SRC_HPC,   event_code: 16'h002A};
    feat_cfg[3] = '{en: 1'b0, src: SRC_HPC,   event_code: 16'h0077};
    rate = '{3, 0, 7, 5};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (ev_inc[i]) ev_inc[i] = rate[i];
    enable = 1'b1;
    cyc = 0;
    while (!setup_done && cyc < 100) begin @(negedge clk); cyc++; end
    check(setup_done, "set-up did not finish");
    check(n_config == 2, $sformatf("%0d counters programmed, expected 2", n_config));
    check(evsel[0] == 16'h0011 && evsel[2] == 16'h002A && evsel[3] == '0,
          "event codes programmed");
    run_windows(6, 100, 2, rate);

    // tick while a sample is being read: dropped and reported
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
    @(negedge clk);
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
    repeat (50) @(negedge clk);
    check(n_missed == 1, $sformatf("%0d missed ticks reported, expected 1", n_missed));

    // reconfigure: all four slots on HPC events
    enable = 1'b0;
    @(negedge clk);
    foreach (feat_cfg[i]) feat_cfg[i] = '{en: 1'b1, src: SRC_HPC, event_code: EVT_W'(16'h0100 + i)};
    rate = '{1, 2, 4, 9};
    foreach (ev_inc[i]) ev_inc[i] = rate[i];
    enable = 1'b1;
    cyc = 0;
    @(negedge clk);
    while (!setup_done && cyc < 100) begin @(negedge clk); cyc++; end
    check(n_config == 6, $sformatf("%0d counters programmed in total, expected 6", n_config));
    check(evsel[3] == 16'h0103, "slot 3 event code");
    run_windows(3, 150, 4, rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
