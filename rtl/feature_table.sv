// feature_table: the table of features the detector monitors.
//
// Holds N_FEAT entries. Each entry says whether its slot is used, whether the
// value comes from a hardware performance counter or from the fetch-bus
// activity count, and for an HPC slot the event code the CPU's counter is
// programmed with. The table is written one entry per cycle through the
// configuration port (wr_en/wr_idx/wr_data, taking effect at the next clock
// edge) and all entries are visible at once on `entries` for the HPC sampler
// and for read-back. The content of an entry is described by the design; the
// encoding is this design's own. Entries reset to disabled.
module feature_table
  import iforest_pkg::*;
#(
  parameter int unsigned N_FEAT = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(N_FEAT)-1:0] wr_idx,
  input  feat_cfg_t                 wr_data,
  output feat_cfg_t                 entries [N_FEAT]
);

  feat_cfg_t table_q [N_FEAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_FEAT; i++) table_q[i] <= '0;
    end else if (wr_en) begin
      table_q[wr_idx] <= wr_data;
    end
  end

  assign entries = table_q;

endmodule
