// iforest_predictor: the decision stage of the Isolation Forest.
//
// After `start` (the same pulse that starts the trees) it waits until every
// tree reports `tree_done`, adds the N_TREES path lengths, divides by N_TREES
// to get the mean path length E(h(x)) and flags the sample as an outlier when
// that mean is below `threshold`. A short mean path means the sample was easy
// to isolate, which is what an anomalous sample looks like. Comparing the
// mean path length with a threshold is the same test as comparing the
// anomaly score 2^(-E(h)/c(n)) with its threshold, since the score only falls
// as E(h) rises; the threshold is therefore configured as a path length
// (unsigned Q8.8). A threshold of 0 never flags anything.
//
// Timing: `valid` pulses for one cycle, one cycle after the last tree is done;
// `outlier` and `mean` are valid with it and held until the next result.
// Averaging the trees' path lengths and raising an alert follows the design;
// the fixed-point format and the integer division are this design's choices.
module iforest_predictor
  import iforest_pkg::*;
#(
  parameter int unsigned N_TREES = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  logic  tree_done [N_TREES],
  input  path_t tree_len  [N_TREES],
  input  path_t threshold,
  output logic  valid,
  output logic  outlier,
  output path_t mean
);

  localparam int unsigned SUM_W = PATH_W + $clog2(N_TREES + 1);

  logic             pending_q;
  logic             all_done;
  logic [SUM_W-1:0] sum;
  logic [SUM_W-1:0] mean_full;

  always_comb begin
    all_done = 1'b1;
    sum      = '0;
    for (int t = 0; t < N_TREES; t++) begin
      all_done = all_done & tree_done[t];
      sum      = sum + SUM_W'(tree_len[t]);
    end
  end

  assign mean_full = sum / SUM_W'(N_TREES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= 1'b0;
      valid     <= 1'b0;
      outlier   <= 1'b0;
      mean      <= '0;
    end else begin
      valid <= 1'b0;
      if (start) begin
        pending_q <= 1'b1;
      end else if (pending_q && all_done) begin
        pending_q <= 1'b0;
        valid     <= 1'b1;
        mean      <= path_t'(mean_full);
        outlier   <= path_t'(mean_full) < threshold;
      end
    end
  end

endmodule
