// pmu_model: behavioural model of the CPU's performance-monitoring unit, as
// seen on the detector's HPC line. Not synthesizable design content: it stands
// in for the host processor in testbenches.
//
// It has N_FEAT counters. Each cycle counter i adds ev_inc[i] (the testbench
// says how many selected events happened). A request is answered LATENCY
// cycles after it appears, with hpc_ack for one cycle:
//   HPC_OP_CONFIG     stores the event code in evsel[idx] and clears the counter
//   HPC_OP_READ_CLEAR returns the counter (events of the answering cycle not
//                     included) and restarts it from that cycle's increment
module pmu_model
  import iforest_pkg::*;
#(
  parameter int unsigned N_FEAT  = 4,
  parameter int unsigned LATENCY = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      hpc_req,
  input  hpc_op_e                   hpc_op,
  input  logic [$clog2(N_FEAT)-1:0] hpc_idx,
  input  logic [EVT_W-1:0]          hpc_wdata,
  output logic                      hpc_ack,
  output feat_t                     hpc_rdata,
  input  feat_t                     ev_inc [N_FEAT],
  output logic [EVT_W-1:0]          evsel  [N_FEAT],
  output int unsigned               n_config,
  output int unsigned               n_read
);

  feat_t       cnt [N_FEAT];
  int unsigned wait_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hpc_ack   <= 1'b0;
      hpc_rdata <= '0;
      wait_q    <= 0;
      n_config  <= 0;
      n_read    <= 0;
      for (int i = 0; i < N_FEAT; i++) begin
        cnt[i]   <= '0;
        evsel[i] <= '0;
      end
    end else begin
      for (int i = 0; i < N_FEAT; i++) cnt[i] <= cnt[i] + ev_inc[i];
      hpc_ack <= 1'b0;
      if (hpc_req && !hpc_ack) begin
        if (wait_q + 1 >= LATENCY) begin
          wait_q  <= 0;
          hpc_ack <= 1'b1;
          if (hpc_op == HPC_OP_CONFIG) begin
            evsel[hpc_idx] <= hpc_wdata;
            cnt[hpc_idx]   <= '0;
            n_config       <= n_config + 1;
          end else begin
            hpc_rdata    <= cnt[hpc_idx];
            cnt[hpc_idx] <= ev_inc[hpc_idx];
            n_read       <= n_read + 1;
          end
        end else begin
          wait_q <= wait_q + 1;
        end
      end
    end
  end

endmodule
