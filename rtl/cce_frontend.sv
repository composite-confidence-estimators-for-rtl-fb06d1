// cce_frontend: one branch predictor with a composite confidence estimator.
//
// This is the unit a processor front end would instantiate. It holds the
// speculative global history register (GHR), one branch predictor chosen by
// PRED, and the three estimators whose raw outputs the composite adds:
//   * an enhanced JRS table (JRS_ENTRIES 4-bit miss distance counters),
//   * an Up/Down table (UD_ENTRIES 4-bit up/down counters),
//   * the predictor's own self-estimate (folded counters for gshare and the
//     hybrid, scaled |y| for the perceptron), all 4 bits wide.
// Both tables are indexed with the branch's own prediction already shifted
// into the history, as the enhanced JRS scheme requires. The 6-bit sum is
// compared with the static threshold input: pred_high_conf = sum > threshold.
//
// Predict (combinational, same cycle): pred_valid/pred_pc give pred_taken,
// the component raw outputs, pred_raw, pred_high_conf and a checkpoint
// (pred_ckpt) that the pipeline must return with the branch at resolve. At
// the rising edge the GHR shifts the prediction in.
// Resolve: upd_valid/upd_pc/upd_taken/upd_ckpt train the predictor and both
// tables at the rising edge (correct = outcome matches the checkpointed
// prediction). upd_mispredict flags a wrong prediction; the GHR is then
// rebuilt from the checkpoint plus the real outcome, and this repair wins
// over a prediction in the same cycle. ready is low while the tables are
// being initialised after reset. The JRS + Up/Down + Self composition, the
// 512-entry tables and the thresholded sum follow the document; speculative
// history with checkpoint repair is this design's choice.
module cce_frontend
  import cce_pkg::*;
#(
  parameter pred_kind_e  PRED        = PRED_PERCEPTRON,
  parameter int unsigned JRS_ENTRIES = 512,
  parameter int unsigned UD_ENTRIES  = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RAW_W-1:0] threshold,
  output logic             ready,
  // predict
  input  logic             pred_valid,
  input  logic [31:0]      pred_pc,
  output logic             pred_taken,
  output logic [3:0]       pred_jrs_raw,
  output logic [3:0]       pred_ud_raw,
  output logic [3:0]       pred_self_raw,
  output logic [RAW_W-1:0] pred_raw,
  output logic             pred_high_conf,
  output bp_ckpt_t         pred_ckpt,
  // resolve
  input  logic             upd_valid,
  input  logic [31:0]      upd_pc,
  input  logic             upd_taken,
  input  bp_ckpt_t         upd_ckpt,
  output logic             upd_mispredict
);
  logic [GHR_W-1:0] ghr_q;
  logic             pred_rdy, jrs_rdy, ud_rdy;
  logic             upd_correct;
  logic signed [Y_W-1:0] perc_y;
  logic [GHR_W-1:0] lk_hist_p, up_hist_p;

  assign upd_correct    = upd_taken == upd_ckpt.pred_taken;
  assign upd_mispredict = upd_valid && !upd_correct;
  assign lk_hist_p      = hist_with_pred(ghr_q, pred_taken);
  assign up_hist_p      = hist_with_pred(upd_ckpt.ghist, upd_ckpt.pred_taken);
  assign ready          = pred_rdy && jrs_rdy && ud_rdy;

  always_ff @(posedge clk) begin
    if (!rst_n)              ghr_q <= '0;
    else if (upd_mispredict) ghr_q <= hist_with_pred(upd_ckpt.ghist, upd_taken);
    else if (pred_valid)     ghr_q <= lk_hist_p;
  end

  // ---------------- predictor and self-estimator ----------------
  if (PRED == PRED_GSHARE) begin : g_gshare
    logic [1:0] ctr;
    gshare_predictor u_pred (
      .clk, .rst_n, .lk_pc(pred_pc), .lk_hist(ghr_q), .taken(pred_taken), .ctr,
      .up_valid(upd_valid), .up_pc(upd_pc), .up_hist(upd_ckpt.ghist),
      .up_taken(upd_taken), .ready(pred_rdy));
    logic [1:0] cp;
    self_estimator #(.N(2)) u_self (.ctr, .pred_taken, .cprime(cp));
    assign pred_self_raw = 4'(cp);
    assign perc_y        = '0;
  end else if (PRED == PRED_HYBRID) begin : g_hybrid
    hybrid_predictor u_pred (
      .clk, .rst_n, .lk_pc(pred_pc), .lk_hist(ghr_q), .taken(pred_taken),
      .self_raw(pred_self_raw), .up_valid(upd_valid), .up_pc(upd_pc),
      .up_hist(upd_ckpt.ghist), .up_taken(upd_taken), .ready(pred_rdy));
    assign perc_y = '0;
  end else begin : g_perceptron
    perceptron_predictor u_pred (
      .clk, .rst_n, .lk_pc(pred_pc), .lk_hist(ghr_q), .y(perc_y), .taken(pred_taken),
      .up_valid(upd_valid), .up_pc(upd_pc), .up_hist(upd_ckpt.ghist),
      .up_taken(upd_taken), .up_y(upd_ckpt.perc_y), .ready(pred_rdy));
    perceptron_self_est u_self (.y(perc_y), .raw(pred_self_raw));
  end

  // ---------------- JRS and Up/Down tables ----------------
  jrs_estimator #(.ENTRIES(JRS_ENTRIES)) u_jrs (
    .clk, .rst_n, .lk_pc(pred_pc), .lk_hist(lk_hist_p), .raw(pred_jrs_raw),
    .up_valid(upd_valid), .up_pc(upd_pc), .up_hist(up_hist_p),
    .up_correct(upd_correct), .ready(jrs_rdy));

  updown_estimator #(.ENTRIES(UD_ENTRIES)) u_ud (
    .clk, .rst_n, .lk_pc(pred_pc), .lk_hist(lk_hist_p), .raw(pred_ud_raw),
    .up_valid(upd_valid), .up_pc(upd_pc), .up_hist(up_hist_p),
    .up_correct(upd_correct), .ready(ud_rdy));

  // ---------------- composite ----------------
  composite_estimator #(.N_IN(3), .IN_W(4)) u_comp (
    .raw_in({pred_self_raw, pred_ud_raw, pred_jrs_raw}), .threshold,
    .raw_sum(pred_raw), .high_conf(pred_high_conf));

  assign pred_ckpt.ghist      = ghr_q;
  assign pred_ckpt.pred_taken = pred_taken;
  assign pred_ckpt.perc_y     = perc_y;
endmodule
