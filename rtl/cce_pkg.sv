// cce_pkg: types and helpers shared by the composite confidence estimator RTL.
//
// A branch that has been predicted carries a checkpoint (bp_ckpt_t) down the
// pipeline and hands it back when it resolves. It holds the global history
// the branch saw, the direction that was predicted and, for the perceptron
// predictor, the dot product used for training. With the checkpoint, every
// table can be trained, and the history repaired, without per-branch storage
// inside the estimator. The checkpoint layout and the 32-bit history width
// are this design's choices; the document does not give them.
package cce_pkg;

  // Widest global history any predictor here uses (perceptron, h = 28).
  localparam int unsigned GHR_W = 32;
  // Width of the perceptron dot product carried in the checkpoint.
  localparam int unsigned Y_W   = 16;
  // Width of a composite raw output: three 4-bit terms add up to at most 45.
  localparam int unsigned RAW_W = 6;

  typedef enum logic [1:0] {
    PRED_GSHARE     = 2'd0,
    PRED_HYBRID     = 2'd1,
    PRED_PERCEPTRON = 2'd2
  } pred_kind_e;

  typedef struct packed {
    logic [GHR_W-1:0]    ghist;      // global history before this branch
    logic                pred_taken; // predicted direction
    logic signed [Y_W-1:0] perc_y;   // perceptron output (0 for the others)
  } bp_ckpt_t;

  // History as the enhanced JRS estimator sees it: the prediction of the
  // branch being estimated is shifted in before the table is read.
  function automatic logic [GHR_W-1:0] hist_with_pred(input logic [GHR_W-1:0] h,
                                                      input logic p);
    return {h[GHR_W-2:0], p};
  endfunction

endpackage
