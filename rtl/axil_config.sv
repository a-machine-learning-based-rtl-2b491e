// axil_config: AXI4-Lite configuration and status port of the detector.
//
// The operating system loads a trained model through this port: the node
// tables of the trees, the feature table, the window length and the decision
// threshold, and then sets CTRL.enable. It also reads the status.
//
// Register map (byte addresses, 32-bit registers):
//   0x000 CTRL      rw  bit0 enable (monitoring on)
//   0x004 WINDOW    rw  window length in clock cycles (reset WINDOW_DEFAULT)
//   0x008 THRESH    rw  [15:0] mean-path-length threshold, unsigned Q8.8
//   0x00C STATUS    r   bit0 alert (sticky), bit1 HPC set-up done;
//                   w   write 1 to bit0 clears the alert
//   0x010 SAMPLES   r   samples classified since reset
//   0x014 MISSED    r   window ticks dropped because a sample was still read
//   0x018 MEAN      r   [15:0] mean path length of the last sample
//   0x01C ALERTS    r   samples flagged as outliers since reset
//   0x020+4i FEAT i rw  bit31 enable, bit30 source (0 HPC, 1 fetch),
//                       [15:0] HPC event code
//   node region, address bit 21 set, write only:
//     tree = addr[20:12], node = addr[11:3], word = addr[2]
//     word 0: [31:0] threshold (staged)
//     word 1: bit31 leaf, [17:16] feature index, [15:0] leaf c(n) term, Q8.8;
//             writing word 1 stores the whole node.
//   Node writes while CTRL.enable is set are refused with SLVERR.
//
// AXI: AW and W may come in any order; the write is done and B is sent once
// both are held. One read at a time; R follows AR by one cycle. Unmapped
// reads return 0 with OKAY. Write strobes are ignored: every write is a full
// 32-bit write. The design loads its configuration through an
// AXI interface; the register map and protocol details are this design's own.
module axil_config
  import iforest_pkg::*;
#(
  parameter int unsigned N_TREES        = 100,
  parameter int unsigned N_NODES        = 511,
  parameter int unsigned N_FEAT         = 4,
  parameter int unsigned WINDOW_DEFAULT = 1600000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // AXI4-Lite slave
  input  logic [31:0]                s_awaddr,
  input  logic                       s_awvalid,
  output logic                       s_awready,
  input  logic [31:0]                s_wdata,
  input  logic [3:0]                 s_wstrb,
  input  logic                       s_wvalid,
  output logic                       s_wready,
  output logic [1:0]                 s_bresp,
  output logic                       s_bvalid,
  input  logic                       s_bready,
  input  logic [31:0]                s_araddr,
  input  logic                       s_arvalid,
  output logic                       s_arready,
  output logic [31:0]                s_rdata,
  output logic [1:0]                 s_rresp,
  output logic                       s_rvalid,
  input  logic                       s_rready,
  // configuration outputs
  output logic                       enable,
  output logic [31:0]                window,
  output path_t                      threshold,
  output logic                       feat_we,
  output logic [$clog2(N_FEAT)-1:0]  feat_idx,
  output feat_cfg_t                  feat_data,
  input  feat_cfg_t                  feat_entries [N_FEAT],
  output logic                       node_we,
  output logic [$clog2(N_TREES)-1:0] node_tree,
  output logic [$clog2(N_NODES)-1:0] node_addr,
  output node_t                      node_data,
  // status inputs
  input  logic                       setup_done,
  input  logic                       result_valid,
  input  logic                       result_outlier,
  input  path_t                      result_mean,
  input  logic                       missed,
  output logic                       alert_irq
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  // ---------------- write channel ----------------
  logic        aw_full_q, w_full_q;
  logic [31:0] awaddr_q, wdata_q;
  logic        do_write;
  feat_t       node_thr_q;
  logic [31:0] samples_q, missed_q, alerts_q;
  path_t       mean_q;

  assign s_awready = !aw_full_q && !s_bvalid;
  assign s_wready  = !w_full_q  && !s_bvalid;
  assign do_write  = aw_full_q && w_full_q && !s_bvalid;

  logic        in_node_region;
  logic [8:0]  a_tree;
  logic [8:0]  a_node;
  assign in_node_region = awaddr_q[21];
  assign a_tree = awaddr_q[20:12];
  assign a_node = awaddr_q[11:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_full_q  <= 1'b0;
      w_full_q   <= 1'b0;
      awaddr_q   <= '0;
      wdata_q    <= '0;
      s_bvalid   <= 1'b0;
      s_bresp    <= RESP_OKAY;
      enable     <= 1'b0;
      window     <= 32'(WINDOW_DEFAULT);
      threshold  <= '0;
      alert_irq  <= 1'b0;
      node_thr_q <= '0;
      feat_we    <= 1'b0;
      feat_idx   <= '0;
      feat_data  <= '0;
      node_we    <= 1'b0;
      node_tree  <= '0;
      node_addr  <= '0;
      node_data  <= '0;
    end else begin
      feat_we <= 1'b0;
      node_we <= 1'b0;
      if (s_awvalid && s_awready) begin
        aw_full_q <= 1'b1;
        awaddr_q  <= s_awaddr;
      end
      if (s_wvalid && s_wready) begin
        w_full_q <= 1'b1;
        wdata_q  <= s_wdata;
      end
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;

      if (do_write) begin
        aw_full_q <= 1'b0;
        w_full_q  <= 1'b0;
        s_bvalid  <= 1'b1;
        s_bresp   <= RESP_OKAY;
        if (in_node_region) begin
          if (enable || 32'(a_tree) >= N_TREES || 32'(a_node) >= N_NODES) begin
            s_bresp <= RESP_SLVERR;
          end else if (!awaddr_q[2]) begin
            node_thr_q <= wdata_q;
          end else begin
            node_we   <= 1'b1;
            node_tree <= a_tree[$clog2(N_TREES)-1:0];
            node_addr <= a_node[$clog2(N_NODES)-1:0];
            node_data <= '{leaf: wdata_q[31], feature: wdata_q[17:16],
                           leaf_adj: wdata_q[15:0], threshold: node_thr_q};
          end
        end else begin
          case (awaddr_q[11:0])
            12'h000: enable    <= wdata_q[0];
            12'h004: window    <= wdata_q;
            12'h008: threshold <= wdata_q[PATH_W-1:0];
            12'h00C: if (wdata_q[0]) alert_irq <= 1'b0;
            default: begin
              if (awaddr_q[11:0] >= 12'h020 && 32'(awaddr_q[11:2]) < 8 + N_FEAT) begin
                feat_we   <= 1'b1;
                feat_idx  <= $clog2(N_FEAT)'(awaddr_q[11:2] - 10'd8);
                feat_data <= '{en: wdata_q[31], src: feat_src_e'(wdata_q[30]),
                               event_code: wdata_q[EVT_W-1:0]};
              end
            end
          endcase
        end
      end
      // a new alert wins over a clear in the same cycle
      if (result_valid && result_outlier) alert_irq <= 1'b1;
    end
  end

  // ---------------- status counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samples_q <= '0;
      missed_q  <= '0;
      alerts_q  <= '0;
      mean_q    <= '0;
    end else begin
      if (result_valid) begin
        samples_q <= samples_q + 1'b1;
        mean_q    <= result_mean;
        if (result_outlier) alerts_q <= alerts_q + 1'b1;
      end
      if (missed) missed_q <= missed_q + 1'b1;
    end
  end

  // ---------------- read channel ----------------
  logic [31:0] rd_mux;
  logic [9:0]  rd_word;
  assign rd_word = s_araddr[11:2];

  always_comb begin
    rd_mux = '0;
    if (!s_araddr[21]) begin
      case (s_araddr[11:0])
        12'h000: rd_mux = {31'b0, enable};
        12'h004: rd_mux = window;
        12'h008: rd_mux = 32'(threshold);
        12'h00C: rd_mux = {30'b0, setup_done, alert_irq};
        12'h010: rd_mux = samples_q;
        12'h014: rd_mux = missed_q;
        12'h018: rd_mux = 32'(mean_q);
        12'h01C: rd_mux = alerts_q;
        default: begin
          for (int i = 0; i < N_FEAT; i++) begin
            if (32'(rd_word) == 8 + i)
              rd_mux = {feat_entries[i].en, feat_entries[i].src, 14'b0,
                        feat_entries[i].event_code};
          end
        end
      endcase
    end
  end

  assign s_arready = !s_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rresp  <= RESP_OKAY;
    end else begin
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_mux;
        s_rresp  <= RESP_OKAY;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // B and R must stay up until taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
