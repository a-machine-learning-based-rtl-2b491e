// tb_tree_pkg: random isolation trees and a reference walk for testbenches.
//
// gen_tree builds a random tree in the complete-binary-tree layout used by the
// tree units (children of node i at 2i+1 and 2i+2). A node becomes a leaf with
// probability leaf_pct percent, a right child with right_leaf_pct percent, and
// always when its children would fall outside the table. Thresholds are drawn
// uniformly in [0, thr_max]. ref_walk gives the path length the hardware must
// return: depth * 256 + leaf c(n) term, Q8.8, going left when x <= threshold.
package tb_tree_pkg;
  import iforest_pkg::*;

  typedef node_t tree_t [];

  function automatic tree_t gen_tree(int n_nodes, int n_feat, int leaf_pct,
                                     int right_leaf_pct, feat_t thr_max);
    tree_t t = new[n_nodes];
    bit    live [] = new[n_nodes];
    foreach (live[i]) live[i] = 1'b0;
    live[0] = 1'b1;
    for (int i = 0; i < n_nodes; i++) begin
      t[i] = '0;
      if (live[i]) begin
        bit is_right = (i > 0) && (i % 2 == 0);
        int pct      = (i == 0) ? 0 : (is_right ? right_leaf_pct : leaf_pct);
        if (2 * i + 2 >= n_nodes || int'($urandom_range(99)) < pct) begin
          t[i].leaf     = 1'b1;
          t[i].leaf_adj = path_t'($urandom_range(1023));   // c(n) up to 4.0
        end else begin
          t[i].leaf      = 1'b0;
          t[i].feature   = FIDX_W'($urandom_range(n_feat - 1));
          t[i].threshold = feat_t'($urandom_range(int'(thr_max)));
          live[2 * i + 1] = 1'b1;
          live[2 * i + 2] = 1'b1;
        end
      end
    end
    return t;
  endfunction

  function automatic path_t ref_walk(tree_t t, feat_t x [4], output int depth);
    int i = 0;
    depth = 0;
    while (!t[i].leaf) begin
      i = (x[t[i].feature] <= t[i].threshold) ? 2 * i + 1 : 2 * i + 2;
      depth++;
    end
    return path_t'(depth * 256) + t[i].leaf_adj;
  endfunction

endpackage
