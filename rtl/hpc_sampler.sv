// hpc_sampler: master of the HPC line to the CPU; builds one sample per window.
//
// Set-up: on the rising edge of `enable` it programs, one after the other,
// every enabled HPC slot of the feature table by sending HPC_OP_CONFIG with
// the slot number as counter index and the event code as data (the CPU also
// clears the counter), then raises `setup_done`.
// Sampling: on every `tick` (end of a window) it reads each enabled HPC slot
// with HPC_OP_READ_CLEAR, so the counter starts the next window from zero,
// takes the fetch-activity count for slots whose source is the fetch bus,
// and gives 0 for disabled slots. When all slots are in, `sample_valid`
// pulses for one cycle with the sample. A tick that comes while a sample is
// still being read is dropped and reported on `missed` (one-cycle pulse).
//
// HPC line: `hpc_req` is held, with op/idx/wdata stable, until the cycle in
// which the CPU answers `hpc_ack` (and `hpc_rdata` for a read); one request
// at a time. Timing: with k HPC slots, each answered L cycles after its
// request appears, sample_valid rises k*(L+2) + (N_FEAT-k) + 2 clock edges
// after the edge that samples `tick`.
// The set-up-then-read role of this line follows the design; the handshake,
// the read-and-clear and the handling of missed ticks are this design's own.
module hpc_sampler
  import iforest_pkg::*;
#(
  parameter int unsigned N_FEAT = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      enable,
  input  feat_cfg_t                 feat_cfg [N_FEAT],
  input  logic                      tick,
  input  feat_t                     fetch_count,
  // HPC line to the CPU
  output logic                      hpc_req,
  output hpc_op_e                   hpc_op,
  output logic [$clog2(N_FEAT)-1:0] hpc_idx,
  output logic [EVT_W-1:0]          hpc_wdata,
  input  logic                      hpc_ack,
  input  feat_t                     hpc_rdata,
  // status and sample
  output logic                      setup_done,
  output logic                      missed,
  output logic                      sample_valid,
  output feat_t                     sample [N_FEAT]
);

  localparam int unsigned IW = $clog2(N_FEAT);

  typedef enum logic [2:0] {S_OFF, S_SETUP, S_SETUP_REQ, S_IDLE, S_READ, S_READ_REQ, S_DONE} state_e;

  state_e        state_q;
  logic [IW:0]   slot_q;     // one bit wider so it can run past the last slot
  logic          enable_q;
  feat_t         acc_q [N_FEAT];

  logic          slot_is_hpc;
  logic [IW-1:0] slot_idx;

  assign slot_idx    = slot_q[IW-1:0];
  assign slot_is_hpc = (32'(slot_q) < N_FEAT) && feat_cfg[slot_idx].en
                       && (feat_cfg[slot_idx].src == SRC_HPC);

  assign hpc_req   = (state_q == S_SETUP_REQ) || (state_q == S_READ_REQ);
  assign hpc_op    = (state_q == S_SETUP_REQ) ? HPC_OP_CONFIG : HPC_OP_READ_CLEAR;
  assign hpc_idx   = slot_idx;
  assign hpc_wdata = feat_cfg[slot_idx].event_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_OFF;
      slot_q       <= '0;
      enable_q     <= 1'b0;
      setup_done   <= 1'b0;
      missed       <= 1'b0;
      sample_valid <= 1'b0;
      for (int i = 0; i < N_FEAT; i++) begin
        acc_q[i]  <= '0;
        sample[i] <= '0;
      end
    end else begin
      enable_q     <= enable;
      missed       <= 1'b0;
      sample_valid <= 1'b0;
      if (!enable) begin
        state_q    <= S_OFF;
        setup_done <= 1'b0;
      end else begin
        case (state_q)
          S_OFF: if (!enable_q) begin          // rising edge of enable
            slot_q  <= '0;
            state_q <= S_SETUP;
          end
          // walk the slots, programming the HPC ones
          S_SETUP: begin
            if (32'(slot_q) >= N_FEAT) begin
              setup_done <= 1'b1;
              state_q    <= S_IDLE;
            end else if (slot_is_hpc) begin
              state_q <= S_SETUP_REQ;
            end else begin
              slot_q <= slot_q + 1'b1;
            end
          end
          S_SETUP_REQ: if (hpc_ack) begin
            slot_q  <= slot_q + 1'b1;
            state_q <= S_SETUP;
          end
          S_IDLE: if (tick) begin
            slot_q  <= '0;
            state_q <= S_READ;
          end
          // walk the slots, reading the HPC ones
          S_READ: begin
            if (32'(slot_q) >= N_FEAT) begin
              state_q <= S_DONE;
            end else if (slot_is_hpc) begin
              state_q <= S_READ_REQ;
            end else begin
              acc_q[slot_idx] <= (feat_cfg[slot_idx].en && feat_cfg[slot_idx].src == SRC_FETCH)
                                 ? fetch_count : '0;
              slot_q <= slot_q + 1'b1;
            end
          end
          S_READ_REQ: if (hpc_ack) begin
            acc_q[slot_idx] <= hpc_rdata;
            slot_q  <= slot_q + 1'b1;
            state_q <= S_READ;
          end
          S_DONE: begin
            sample       <= acc_q;
            sample_valid <= 1'b1;
            state_q      <= S_IDLE;
          end
          default: state_q <= S_OFF;
        endcase
        if (tick && state_q != S_IDLE) missed <= 1'b1;
      end
    end
  end

  // request must stay up with stable command until acknowledged
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n || !enable)
    hpc_req && !hpc_ack |=> hpc_req && $stable(hpc_op) && $stable(hpc_idx));

endmodule
