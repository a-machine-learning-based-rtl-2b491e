// iforest_tree: one isolation tree of the forest.
//
// The tree is kept in a node table laid out as a complete binary tree: the
// root is node 0 and the children of node i are 2i+1 (left) and 2i+2 (right),
// so an unbalanced tree simply leaves slots unused. A start pulse latches the
// sample and the walk begins at the root. Each clock the walker looks at one
// node: at an inner node it compares the selected feature with the node's
// threshold (left when x <= threshold), counts one more edge and reads the
// child; at a leaf it stops and outputs the path length
//     h(x) = depth * 2^FRAC_W + leaf_adj          (unsigned Q8.8)
// where leaf_adj is the average-path correction c(n) stored with the leaf.
// A child index past the table, or a depth of NODE_AW levels, also ends the
// walk (leaf_adj 0 in the first case), so a bad table cannot hang the unit.
//
// Interface: cfg_we/cfg_addr/cfg_node write one node (not while busy).
// start/sample begin a walk; `done` rises when `path_len` is valid and stays
// high until the next start.
// Timing: a walk that ends at depth d takes d+2 cycles from start to done
// (the root is read on the start edge, then one cycle per level plus the
// output register).
//
// The architecture this follows builds each tree as an FSM with one state per
// node, rebuilt for every trained tree; here one walker serves a loadable
// node table so the forest can be reconfigured without new hardware. The
// complete-tree layout, the comparison direction and the Q8.8 format are
// this design's choices.
module iforest_tree
  import iforest_pkg::*;
#(
  parameter int unsigned N_NODES = 511,
  parameter int unsigned N_FEAT  = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration
  input  logic                       cfg_we,
  input  logic [$clog2(N_NODES)-1:0] cfg_addr,
  input  node_t                      cfg_node,
  // detection
  input  logic                       start,
  input  feat_t                      sample [N_FEAT],
  output logic                       busy,
  output logic                       done,
  output path_t                      path_len
);

  localparam int unsigned NODE_AW = $clog2(N_NODES);
  localparam int unsigned DEPTH_W = $clog2(NODE_AW + 1);

  typedef enum logic {S_IDLE, S_WALK} state_e;

  node_t               mem [N_NODES];
  node_t               node_q;
  state_e              state_q;
  logic [NODE_AW-1:0]  idx_q;
  logic [DEPTH_W-1:0]  depth_q;
  feat_t               sample_q [N_FEAT];

  // next node to read
  logic [NODE_AW:0]    child;     // one bit wider to detect overflow
  logic                go_right;
  feat_t               x;
  logic [NODE_AW-1:0]  rd_addr;
  logic                child_ok;
  logic                at_leaf;

  assign x        = (32'(node_q.feature) < N_FEAT) ? sample_q[node_q.feature] : '0;
  assign go_right = x > node_q.threshold;
  assign child    = {idx_q, 1'b1} + {{NODE_AW{1'b0}}, go_right};
  assign child_ok = child < (NODE_AW+1)'(N_NODES);
  assign at_leaf  = node_q.leaf || !child_ok || (32'(depth_q) >= NODE_AW);

  always_comb begin
    rd_addr = idx_q;
    if (state_q == S_IDLE && start) rd_addr = '0;
    else if (state_q == S_WALK && !at_leaf) rd_addr = child[NODE_AW-1:0];
  end

  // node table: one write port, one registered read port
  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_node;
    node_q <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      idx_q    <= '0;
      depth_q  <= '0;
      done     <= 1'b0;
      path_len <= '0;
      for (int i = 0; i < N_FEAT; i++) sample_q[i] <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (start) begin
          sample_q <= sample;
          idx_q    <= '0;
          depth_q  <= '0;
          done     <= 1'b0;
          state_q  <= S_WALK;     // root is read in this same cycle
        end
        S_WALK: begin
          if (at_leaf) begin
            path_len <= path_t'({depth_q, {FRAC_W{1'b0}}})
                      + (node_q.leaf ? node_q.leaf_adj : '0);
            done     <= 1'b1;
            state_q  <= S_IDLE;
          end else begin
            idx_q   <= child[NODE_AW-1:0];
            depth_q <= depth_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // a node must not be rewritten while a walk is using the table
  a_no_cfg_while_busy: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !busy);

endmodule
