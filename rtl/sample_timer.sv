// sample_timer: the time-window timer of the detector.
//
// While `enable` is high it counts clock cycles and pulses `tick` for one
// cycle at the end of every window of `period` cycles; the next window starts
// on the following cycle, so windows tile time without gaps. Dropping
// `enable` clears the count, so the first window after enabling is a full
// one. A period of 0 or 1 ticks every cycle. The design samples every 1.6 ms
// at 1 GHz (1,600,000 cycles, set through the configuration port); running
// the windows back to back instead of restarting after each decision is this
// design's choice.
module sample_timer #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] period,
  output logic             tick
);

  logic [CNT_W-1:0] count_q;
  logic             last;

  assign last = (count_q + 1'b1 >= period);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      tick    <= 1'b0;
    end else if (!enable) begin
      count_q <= '0;
      tick    <= 1'b0;
    end else if (last) begin
      count_q <= '0;
      tick    <= 1'b1;
    end else begin
      count_q <= count_q + 1'b1;
      tick    <= 1'b0;
    end
  end

endmodule
