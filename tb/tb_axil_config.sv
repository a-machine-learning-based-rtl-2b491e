// tb_axil_config: self-checking test of the AXI4-Lite configuration port.
//
// An AXI4-Lite master (axil_bfm) with random channel order and back-pressure
// writes and reads every register. Checks: reset values; read-back of CTRL,
// WINDOW, THRESH and the feature slots (through a feature_table); node writes
// come out as one node_we pulse with the right tree, node and fields; node
// writes while enabled or to a tree/node out of range get SLVERR and write
// nothing; sample/alert/missed counters, last mean, sticky alert and its
// clear.
module tb_axil_config;
  import iforest_pkg::*;

  localparam int unsigned N_TREES = 5;
  localparam int unsigned N_NODES = 15;
  localparam int unsigned N_FEAT  = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic enable;
  logic [31:0] window;
  path_t threshold;
  logic feat_we;
  logic [1:0] feat_idx;
  feat_cfg_t feat_data;
  feat_cfg_t feat_entries [N_FEAT];
  logic node_we;
  logic [2:0] node_tree;
  logic [3:0] node_addr;
  node_t node_data;
  logic setup_done = 1'b0, result_valid = 1'b0, result_outlier = 1'b0, missed = 1'b0;
  path_t result_mean = '0;
  logic alert_irq;

  int checks = 0, failures = 0;
  int n_node_we = 0;
  logic [2:0] last_tree;
  logic [3:0] last_node;
  node_t      last_data;

  axil_config #(.N_TREES(N_TREES), .N_NODES(N_NODES), .N_FEAT(N_FEAT), .WINDOW_DEFAULT(1600000)) dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .enable, .window, .threshold, .feat_we, .feat_idx, .feat_data, .feat_entries,
    .node_we, .node_tree, .node_addr, .node_data, .setup_done,
    .result_valid, .result_outlier, .result_mean, .missed, .alert_irq
  );

  feature_table #(.N_FEAT(N_FEAT)) u_feat (
    .clk, .rst_n, .wr_en(feat_we), .wr_idx(feat_idx), .wr_data(feat_data), .entries(feat_entries)
  );

  axil_bfm bfm (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && node_we) begin
    n_node_we++;
    last_tree = node_tree;
    last_node = node_addr;
    last_data = node_data;
  end

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

  function automatic logic [31:0] node_addr_of(int t, int n, int word);
    return 32'(1 << 21) | 32'(t << 12) | 32'(n << 3) | 32'(word << 2);
  endfunction

  task automatic pulse_result(bit outl, path_t m);
    @(negedge clk);
    result_valid = 1'b1; result_outlier = outl; result_mean = m;
    @(negedge clk);
    result_valid = 1'b0; result_outlier = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  resp;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bfm.read(32'h004, d); check(d == 32'd1600000, $sformatf("WINDOW reset %0d", d));
    bfm.read(32'h008, d); check(d == 0, "THRESH reset");
    bfm.read(32'h000, d); check(d == 0, "CTRL reset");
    bfm.read(32'h00C, d); check(d == 0, "STATUS reset");

    for (int k = 0; k < 20; k++) begin
      logic [31:0] v;
      v = $urandom;
      bfm.write(32'h004, v, resp); check(resp == 2'b00, "WINDOW resp");
      bfm.read(32'h004, d); check(d == v && window == v, "WINDOW read-back");
      bfm.write(32'h008, v, resp);
      bfm.read(32'h008, d); check(d == {16'b0, v[15:0]} && threshold == v[15:0], "THRESH read-back");
    end
    for (int i = 0; i < N_FEAT; i++) begin
      logic [31:0] v;
      v = {1'b1, 1'(i % 2), 14'b0, 16'($urandom)};
      bfm.write(32'h020 + 32'(4 * i), v, resp);
      bfm.read(32'h020 + 32'(4 * i), d);
      check(d == v, $sformatf("FEAT %0d read-back %h expected %h", i, d, v));
      check(feat_entries[i].en && feat_entries[i].src == feat_src_e'(i % 2) &&
            feat_entries[i].event_code == v[15:0], "feature table entry");
    end

    // node writes
    for (int k = 0; k < 30; k++) begin
      int t, n, n_before;
      logic [31:0] thr, w1;
      t = $urandom_range(N_TREES - 1);
      n = $urandom_range(N_NODES - 1);
      thr = $urandom;
      w1 = $urandom & 32'h8003_FFFF;
      n_before = n_node_we;
      bfm.write(node_addr_of(t, n, 0), thr, resp); check(resp == 2'b00, "node word 0 resp");
      check(n_node_we == n_before, "word 0 must not store the node");
      bfm.write(node_addr_of(t, n, 1), w1, resp);  check(resp == 2'b00, "node word 1 resp");
      repeat (2) @(negedge clk);
      check(n_node_we == n_before + 1, "one node write");
      check(last_tree == 3'(t) && last_node == 4'(n), "node address");
      check(last_data.threshold == thr && last_data.leaf == w1[31] &&
            last_data.feature == w1[17:16] && last_data.leaf_adj == w1[15:0], "node fields");
    end
    begin
      int n_before;
      n_before = n_node_we;
      bfm.write(node_addr_of(N_TREES, 0, 1), 32'h1, resp); check(resp == 2'b10, "tree out of range -> SLVERR");
      bfm.write(node_addr_of(0, N_NODES, 1), 32'h1, resp); check(resp == 2'b10, "node out of range -> SLVERR");
      bfm.write(32'h000, 32'h1, resp);
      check(enable, "enable set");
      bfm.write(node_addr_of(1, 1, 1), 32'h1, resp); check(resp == 2'b10, "node write while enabled -> SLVERR");
      repeat (2) @(negedge clk);
      check(n_node_we == n_before, "refused node writes stored nothing");
      bfm.read(32'h000, d); check(d == 1, "CTRL read-back");
    end

    // status
    setup_done = 1'b1;
    pulse_result(1'b0, 16'h0A00);
    pulse_result(1'b1, 16'h0311);
    pulse_result(1'b0, 16'h0B80);
    @(negedge clk); missed = 1'b1; @(negedge clk); missed = 1'b0;
    check(alert_irq, "alert_irq set by outlier");
    bfm.read(32'h00C, d); check(d == 32'h3, $sformatf("STATUS %h", d));
    bfm.read(32'h010, d); check(d == 3, "SAMPLES");
    bfm.read(32'h01C, d); check(d == 1, "ALERTS");
    bfm.read(32'h014, d); check(d == 1, "MISSED");
    bfm.read(32'h018, d); check(d == 32'h0B80, "MEAN");
    bfm.write(32'h00C, 32'h0, resp);
    check(alert_irq, "writing 0 does not clear the alert");
    bfm.write(32'h00C, 32'h1, resp);
    check(!alert_irq, "alert cleared");
    bfm.read(32'h3F0, d); check(d == 0, "unmapped read returns 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
