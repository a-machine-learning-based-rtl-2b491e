// fetch_monitor: fetch-activity feature from the instruction bus.
//
// Snoops the bus that carries instructions from the instruction memory to the
// processor's fetch unit (read-only, it drives nothing on that bus) and counts
// the transfers (fetch_valid && fetch_ready) of the current window. On `tick`
// the count of the window that just ended, including a transfer in the tick
// cycle itself, is copied to `last_count` (valid from the next cycle) and
// counting restarts from zero. The counter saturates. The design names the
// fetch activity as a possible feature and connects the module to the fetch
// bus; counting transfers per window is this design's reading of it.
module fetch_monitor #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             fetch_valid,
  input  logic             fetch_ready,
  input  logic             tick,
  output logic [CNT_W-1:0] last_count
);

  logic [CNT_W-1:0] count_q;
  logic [CNT_W-1:0] count_inc;
  logic             beat;

  assign beat      = enable && fetch_valid && fetch_ready;
  assign count_inc = (beat && count_q != '1) ? count_q + 1'b1 : count_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q    <= '0;
      last_count <= '0;
    end else if (!enable) begin
      count_q    <= '0;
    end else if (tick) begin
      last_count <= count_inc;
      count_q    <= '0;
    end else begin
      count_q    <= count_inc;
    end
  end

endmodule
