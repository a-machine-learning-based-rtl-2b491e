// security_module: hardware detector of cache-based side-channel attacks.
//
// The module sits beside a CPU whose main job is encryption. Every time
// window it reads up to four hardware performance counters of the CPU (and/or
// the count of instruction-fetch transfers) as one sample, and classifies the
// sample with an Isolation Forest trained offline on attack-free runs only.
// A sample that the forest isolates in few steps on average is an outlier:
// the module then raises an alert towards the operating system.
//
// Inside: axil_config (AXI4-Lite port that loads the trees, feature table,
// window and threshold), feature_table, sample_timer (window ticks),
// fetch_monitor (fetch-bus transfers per window), hpc_sampler (programs and
// reads the CPU's counters), N_TREES iforest_tree units that all walk the
// same sample in parallel, and iforest_predictor (mean path length against
// the threshold).
//
// External lines: the AXI4-Lite slave; the HPC line to the CPU
// (req/ack, see hpc_sampler); a read-only snoop of the fetch bus
// (fetch_valid/fetch_ready); and the alert bus: `alert` pulses for one cycle
// per outlier sample with `alert_mean` its mean path length, `alert_irq`
// stays high until cleared through STATUS.
//
// Timing: a sample enters the trees k*(L+2) + (N_FEAT-k) + 2 cycles after the
// window tick (k HPC slots, L cycles of CPU answer latency); the trees take at
// most depth+2 cycles and the predictor one more, so a decision is out about
// 30 cycles after the window ends, far inside the next 1.6 ms window.
// The structure (trees, predictor, timer, feature table, AXI configuration,
// HPC and fetch lines, alert bus) follows the design; widths, encodings and
// handshakes are this design's own.
module security_module
  import iforest_pkg::*;
#(
  parameter int unsigned N_TREES        = 100,
  parameter int unsigned N_NODES        = 511,
  parameter int unsigned N_FEAT         = 4,
  parameter int unsigned WINDOW_DEFAULT = 1600000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // AXI4-Lite configuration slave
  input  logic [31:0]               s_axil_awaddr,
  input  logic                      s_axil_awvalid,
  output logic                      s_axil_awready,
  input  logic [31:0]               s_axil_wdata,
  input  logic [3:0]                s_axil_wstrb,
  input  logic                      s_axil_wvalid,
  output logic                      s_axil_wready,
  output logic [1:0]                s_axil_bresp,
  output logic                      s_axil_bvalid,
  input  logic                      s_axil_bready,
  input  logic [31:0]               s_axil_araddr,
  input  logic                      s_axil_arvalid,
  output logic                      s_axil_arready,
  output logic [31:0]               s_axil_rdata,
  output logic [1:0]                s_axil_rresp,
  output logic                      s_axil_rvalid,
  input  logic                      s_axil_rready,
  // HPC line to the CPU
  output logic                      hpc_req,
  output hpc_op_e                   hpc_op,
  output logic [$clog2(N_FEAT)-1:0] hpc_idx,
  output logic [EVT_W-1:0]          hpc_wdata,
  input  logic                      hpc_ack,
  input  feat_t                     hpc_rdata,
  // fetch-bus snoop
  input  logic                      fetch_valid,
  input  logic                      fetch_ready,
  // alert bus
  output logic                      alert,
  output path_t                     alert_mean,
  output logic                      alert_irq
);

  logic                       enable;
  logic [31:0]                window;
  path_t                      threshold;
  logic                       feat_we;
  logic [$clog2(N_FEAT)-1:0]  feat_idx;
  feat_cfg_t                  feat_data;
  feat_cfg_t                  feat_entries [N_FEAT];
  logic                       node_we;
  logic [$clog2(N_TREES)-1:0] node_tree;
  logic [$clog2(N_NODES)-1:0] node_addr;
  node_t                      node_data;
  logic                       setup_done;
  logic                       missed;
  logic                       tick;
  feat_t                      fetch_count;
  logic                       sample_valid;
  feat_t                      sample [N_FEAT];
  logic                       tree_done [N_TREES];
  path_t                      tree_len  [N_TREES];
  logic                       res_valid;
  logic                       res_outlier;
  path_t                      res_mean;

  axil_config #(
    .N_TREES(N_TREES), .N_NODES(N_NODES), .N_FEAT(N_FEAT), .WINDOW_DEFAULT(WINDOW_DEFAULT)
  ) u_cfg (
    .clk, .rst_n,
    .s_awaddr (s_axil_awaddr),  .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata  (s_axil_wdata),   .s_wstrb  (s_axil_wstrb),   .s_wvalid (s_axil_wvalid),
    .s_wready (s_axil_wready),  .s_bresp  (s_axil_bresp),   .s_bvalid (s_axil_bvalid),
    .s_bready (s_axil_bready),  .s_araddr (s_axil_araddr),  .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata  (s_axil_rdata),   .s_rresp  (s_axil_rresp),
    .s_rvalid (s_axil_rvalid),  .s_rready (s_axil_rready),
    .enable, .window, .threshold,
    .feat_we, .feat_idx, .feat_data, .feat_entries,
    .node_we, .node_tree, .node_addr, .node_data,
    .setup_done,
    .result_valid(res_valid), .result_outlier(res_outlier), .result_mean(res_mean),
    .missed, .alert_irq
  );

  feature_table #(.N_FEAT(N_FEAT)) u_feat (
    .clk, .rst_n,
    .wr_en(feat_we), .wr_idx(feat_idx), .wr_data(feat_data), .entries(feat_entries)
  );

  // windows only run once the CPU's counters are programmed
  sample_timer #(.CNT_W(32)) u_timer (
    .clk, .rst_n, .enable(enable && setup_done), .period(window), .tick
  );

  fetch_monitor #(.CNT_W(FEAT_W)) u_fetch (
    .clk, .rst_n, .enable(enable && setup_done), .fetch_valid, .fetch_ready,
    .tick, .last_count(fetch_count)
  );

  hpc_sampler #(.N_FEAT(N_FEAT)) u_sampler (
    .clk, .rst_n, .enable, .feat_cfg(feat_entries), .tick, .fetch_count,
    .hpc_req, .hpc_op, .hpc_idx, .hpc_wdata, .hpc_ack, .hpc_rdata,
    .setup_done, .missed, .sample_valid, .sample
  );

  for (genvar t = 0; t < N_TREES; t++) begin : g_tree
    iforest_tree #(.N_NODES(N_NODES), .N_FEAT(N_FEAT)) u_tree (
      .clk, .rst_n,
      .cfg_we  (node_we && node_tree == ($clog2(N_TREES))'(t)),
      .cfg_addr(node_addr),
      .cfg_node(node_data),
      .start   (sample_valid),
      .sample  (sample),
      .busy    (),
      .done    (tree_done[t]),
      .path_len(tree_len[t])
    );
  end

  iforest_predictor #(.N_TREES(N_TREES)) u_pred (
    .clk, .rst_n, .start(sample_valid), .tree_done, .tree_len, .threshold,
    .valid(res_valid), .outlier(res_outlier), .mean(res_mean)
  );

  assign alert      = res_valid && res_outlier;
  assign alert_mean = res_mean;

endmodule
