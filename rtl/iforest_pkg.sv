// iforest_pkg: types and constants shared by the Isolation Forest detector.
//
// A sample is a vector of N_FEAT unsigned 32-bit feature values (window
// counts of hardware performance counters or of fetch-bus transfers). A tree
// node is either an inner node (feature index + threshold) or a leaf (the
// fixed-point correction c(n) added to the depth at which the walk stopped).
// Path lengths are unsigned Q8.8. The four-feature limit follows the design
// description; the widths and encodings are this design's own choices.
package iforest_pkg;

  localparam int unsigned FEAT_W     = 32;  // width of one feature value
  localparam int unsigned FIDX_W     = 2;   // width of a feature index
  localparam int unsigned PATH_W     = 16;  // path length, unsigned Q8.8
  localparam int unsigned FRAC_W     = 8;   // fractional bits of PATH_W
  localparam int unsigned EVT_W      = 16;  // HPC event selector code

  typedef logic [FEAT_W-1:0] feat_t;
  typedef logic [PATH_W-1:0] path_t;

  // One node of a tree. For an inner node `feature` and `threshold` are used
  // (go left when x <= threshold); for a leaf `leaf_adj` is the c(n) term
  // for the training samples that ended in that leaf.
  typedef struct packed {
    logic              leaf;
    logic [FIDX_W-1:0] feature;
    path_t             leaf_adj;
    feat_t             threshold;
  } node_t;

  // Where a feature slot takes its value from.
  typedef enum logic {
    SRC_HPC   = 1'b0,
    SRC_FETCH = 1'b1
  } feat_src_e;

  // One entry of the feature table.
  typedef struct packed {
    logic             en;
    feat_src_e        src;
    logic [EVT_W-1:0] event_code;
  } feat_cfg_t;

  // Operations on the HPC line to the CPU.
  typedef enum logic {
    HPC_OP_CONFIG     = 1'b0,  // program counter `idx` with event `wdata`, clear it
    HPC_OP_READ_CLEAR = 1'b1   // return counter `idx` and clear it
  } hpc_op_e;

endpackage
