// cce_top: composite confidence estimation with pipeline gating.
//
// The main lane (p_*) is a perceptron-predicted front end whose composite
// JRS + Up/Down + Self estimator labels every fetched branch high or low
// confidence; a pipeline_gating controller tracks the branches in flight and
// raises p_fetch_gate while three or more unresolved branches are low
// confidence. A branch is accepted (p_pred_ready) only when the controller
// has a free slot and the tables are initialised; it receives a tag
// (p_pred_tag) that must come back with it at resolve together with its
// checkpoint. A mispredicted resolve also squashes the younger branches in
// the controller.
// Two further lanes stand beside it with their own ports: a gshare lane
// (g_*) and a McFarling hybrid lane (h_*), each with the same composite
// estimator built on that predictor's self-estimate. They show the estimator
// with the other predictors and do not drive gating. All lookups are
// combinational and all state changes at the rising edge of clk; see
// cce_frontend for the per-lane timing. Putting the three lanes side by side
// and gating only on the perceptron lane is this design's arrangement.
module cce_top
  import cce_pkg::*;
#(
  parameter int unsigned GATE_DEPTH = 32,
  parameter int unsigned GATE_COUNT = 3,
  localparam int unsigned TW        = $clog2(GATE_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---- perceptron lane with pipeline gating ----
  input  logic [RAW_W-1:0] p_threshold,
  input  logic             p_pred_valid,
  input  logic [31:0]      p_pred_pc,
  output logic             p_pred_ready,
  output logic             p_pred_taken,
  output logic [RAW_W-1:0] p_pred_raw,
  output logic             p_pred_high_conf,
  output bp_ckpt_t         p_pred_ckpt,
  output logic [TW-1:0]    p_pred_tag,
  input  logic             p_upd_valid,
  input  logic [31:0]      p_upd_pc,
  input  logic             p_upd_taken,
  input  bp_ckpt_t         p_upd_ckpt,
  input  logic [TW-1:0]    p_upd_tag,
  output logic             p_upd_mispredict,
  output logic [TW:0]      p_lc_count,
  output logic             p_fetch_gate,
  // ---- gshare lane ----
  input  logic [RAW_W-1:0] g_threshold,
  output logic             g_ready,
  input  logic             g_pred_valid,
  input  logic [31:0]      g_pred_pc,
  output logic             g_pred_taken,
  output logic [RAW_W-1:0] g_pred_raw,
  output logic             g_pred_high_conf,
  output bp_ckpt_t         g_pred_ckpt,
  input  logic             g_upd_valid,
  input  logic [31:0]      g_upd_pc,
  input  logic             g_upd_taken,
  input  bp_ckpt_t         g_upd_ckpt,
  output logic             g_upd_mispredict,
  // ---- hybrid lane ----
  input  logic [RAW_W-1:0] h_threshold,
  output logic             h_ready,
  input  logic             h_pred_valid,
  input  logic [31:0]      h_pred_pc,
  output logic             h_pred_taken,
  output logic [RAW_W-1:0] h_pred_raw,
  output logic             h_pred_high_conf,
  output bp_ckpt_t         h_pred_ckpt,
  input  logic             h_upd_valid,
  input  logic [31:0]      h_upd_pc,
  input  logic             h_upd_taken,
  input  bp_ckpt_t         h_upd_ckpt,
  output logic             h_upd_mispredict
);
  logic       p_ready, p_alloc_ready, p_accept;
  logic [3:0] p_jrs, p_ud, p_self, g_jrs, g_ud, g_self, h_jrs, h_ud, h_self;

  assign p_pred_ready = p_ready && p_alloc_ready;
  assign p_accept     = p_pred_valid && p_pred_ready;

  cce_frontend #(.PRED(PRED_PERCEPTRON)) u_perc (
    .clk, .rst_n, .threshold(p_threshold), .ready(p_ready),
    .pred_valid(p_accept), .pred_pc(p_pred_pc), .pred_taken(p_pred_taken),
    .pred_jrs_raw(p_jrs), .pred_ud_raw(p_ud), .pred_self_raw(p_self),
    .pred_raw(p_pred_raw), .pred_high_conf(p_pred_high_conf), .pred_ckpt(p_pred_ckpt),
    .upd_valid(p_upd_valid), .upd_pc(p_upd_pc), .upd_taken(p_upd_taken),
    .upd_ckpt(p_upd_ckpt), .upd_mispredict(p_upd_mispredict));

  pipeline_gating #(.DEPTH(GATE_DEPTH), .GATE_COUNT(GATE_COUNT)) u_gate (
    .clk, .rst_n, .alloc_valid(p_accept), .alloc_low_conf(!p_pred_high_conf),
    .alloc_ready(p_alloc_ready), .alloc_tag(p_pred_tag),
    .resolve_valid(p_upd_valid), .resolve_tag(p_upd_tag),
    .resolve_mispredict(p_upd_mispredict), .lc_count(p_lc_count),
    .fetch_gate(p_fetch_gate));

  cce_frontend #(.PRED(PRED_GSHARE)) u_gshare (
    .clk, .rst_n, .threshold(g_threshold), .ready(g_ready),
    .pred_valid(g_pred_valid), .pred_pc(g_pred_pc), .pred_taken(g_pred_taken),
    .pred_jrs_raw(g_jrs), .pred_ud_raw(g_ud), .pred_self_raw(g_self),
    .pred_raw(g_pred_raw), .pred_high_conf(g_pred_high_conf), .pred_ckpt(g_pred_ckpt),
    .upd_valid(g_upd_valid), .upd_pc(g_upd_pc), .upd_taken(g_upd_taken),
    .upd_ckpt(g_upd_ckpt), .upd_mispredict(g_upd_mispredict));

  cce_frontend #(.PRED(PRED_HYBRID)) u_hybrid (
    .clk, .rst_n, .threshold(h_threshold), .ready(h_ready),
    .pred_valid(h_pred_valid), .pred_pc(h_pred_pc), .pred_taken(h_pred_taken),
    .pred_jrs_raw(h_jrs), .pred_ud_raw(h_ud), .pred_self_raw(h_self),
    .pred_raw(h_pred_raw), .pred_high_conf(h_pred_high_conf), .pred_ckpt(h_pred_ckpt),
    .upd_valid(h_upd_valid), .upd_pc(h_upd_pc), .upd_taken(h_upd_taken),
    .upd_ckpt(h_upd_ckpt), .upd_mispredict(h_upd_mispredict));
endmodule
