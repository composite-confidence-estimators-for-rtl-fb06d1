// hybrid_predictor: McFarling-style hybrid (tournament) predictor, 21264 shape.
//
// Two components vote on each branch:
//   * global (GAg): G_ENTRIES two-bit counters indexed only by the global
//     history;
//   * local (PAg): L_HISTS per-branch L_HIST_LEN-bit history registers,
//     selected by PC, whose value indexes L_ENTRIES three-bit counters.
// A chooser of C_ENTRIES two-bit counters, indexed by the global history,
// picks the global component when its high bit is set. The self-estimate is
// the sum of each component's folded counter c' (2-bit c' + 3-bit c', 0..10),
// both folded towards the final prediction, so a component that disagrees
// with the final prediction lowers the confidence. At resolve both component
// counters train towards the outcome, the local history shifts the outcome
// in, and, if the components disagreed, the chooser moves towards the one
// that was right.
// The table sizes and counter widths follow the document. The chooser index
// and width, the direction the c' values are folded towards, training by
// re-reading the tables at resolve and the non-speculative local histories
// are this design's choices.
//
// Interface and timing: lk_* is a combinational lookup; up_* writes at the
// rising edge. After reset all tables are swept to their initial values
// (counters weakly not taken, chooser weakly local, histories zero); ready
// rises when the largest table is done.
module hybrid_predictor
  import cce_pkg::*;
#(
  parameter int unsigned G_ENTRIES  = 4096,
  parameter int unsigned L_HISTS    = 1024,
  parameter int unsigned L_HIST_LEN = 10,
  parameter int unsigned L_ENTRIES  = 1024,
  parameter int unsigned C_ENTRIES  = 4096
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      lk_pc,
  input  logic [GHR_W-1:0] lk_hist,
  output logic             taken,
  output logic [3:0]       self_raw,
  input  logic             up_valid,
  input  logic [31:0]      up_pc,
  input  logic [GHR_W-1:0] up_hist,
  input  logic             up_taken,
  output logic             ready
);
  localparam int unsigned GW = $clog2(G_ENTRIES);
  localparam int unsigned HW = $clog2(L_HISTS);
  localparam int unsigned LW = $clog2(L_ENTRIES);
  localparam int unsigned CW = $clog2(C_ENTRIES);
  localparam int unsigned MAXN = (G_ENTRIES > C_ENTRIES) ?
                                 ((G_ENTRIES > L_HISTS) ? G_ENTRIES : L_HISTS) :
                                 ((C_ENTRIES > L_HISTS) ? C_ENTRIES : L_HISTS);
  localparam int unsigned MW = $clog2(MAXN) + 1;

  logic [1:0]            gpht [G_ENTRIES];
  logic [L_HIST_LEN-1:0] lhist[L_HISTS];
  logic [2:0]            lpht [L_ENTRIES];
  logic [1:0]            chooser[C_ENTRIES];

  logic          init_busy;
  logic [MW-1:0] init_idx;

  // ---------------- lookup ----------------
  logic [GW-1:0] lk_g_idx;
  logic [CW-1:0] lk_c_idx;
  logic [HW-1:0] lk_h_idx;
  logic [LW-1:0] lk_l_idx;
  logic [1:0]    lk_g, lk_c;
  logic [2:0]    lk_l;
  logic [1:0]    g_cp;
  logic [2:0]    l_cp;

  assign lk_g_idx = lk_hist[GW-1:0];
  assign lk_c_idx = lk_hist[CW-1:0];
  assign lk_h_idx = lk_pc[HW+1:2];
  assign lk_l_idx = LW'(lhist[lk_h_idx]);
  assign lk_g     = gpht[lk_g_idx];
  assign lk_l     = lpht[lk_l_idx];
  assign lk_c     = chooser[lk_c_idx];
  assign taken    = lk_c[1] ? lk_g[1] : lk_l[2];
  assign ready    = !init_busy;

  self_estimator #(.N(2)) u_self_g (.ctr(lk_g), .pred_taken(taken), .cprime(g_cp));
  self_estimator #(.N(3)) u_self_l (.ctr(lk_l), .pred_taken(taken), .cprime(l_cp));
  assign self_raw = 4'(g_cp) + 4'(l_cp);

  // ---------------- update ----------------
  logic [GW-1:0] up_g_idx;
  logic [CW-1:0] up_c_idx;
  logic [HW-1:0] up_h_idx;
  logic [LW-1:0] up_l_idx;
  logic [1:0]    up_g, up_c, g_nxt, c_nxt;
  logic [2:0]    up_l, l_nxt;
  logic          g_right, l_right;

  assign up_g_idx = up_hist[GW-1:0];
  assign up_c_idx = up_hist[CW-1:0];
  assign up_h_idx = up_pc[HW+1:2];
  assign up_l_idx = LW'(lhist[up_h_idx]);
  assign up_g     = gpht[up_g_idx];
  assign up_l     = lpht[up_l_idx];
  assign up_c     = chooser[up_c_idx];
  assign g_right  = up_g[1] == up_taken;
  assign l_right  = up_l[2] == up_taken;

  always_comb begin
    g_nxt = up_g;
    if (up_taken && up_g != 2'b11)       g_nxt = up_g + 2'd1;
    else if (!up_taken && up_g != 2'b00) g_nxt = up_g - 2'd1;
    l_nxt = up_l;
    if (up_taken && up_l != 3'b111)      l_nxt = up_l + 3'd1;
    else if (!up_taken && up_l != 3'b000) l_nxt = up_l - 3'd1;
    c_nxt = up_c;
    if (g_right && !l_right && up_c != 2'b11)      c_nxt = up_c + 2'd1;
    else if (!g_right && l_right && up_c != 2'b00) c_nxt = up_c - 2'd1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == MW'(MAXN-1)) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy) begin
      if (init_idx < MW'(G_ENTRIES)) gpht[GW'(init_idx)]    <= 2'b01;
      if (init_idx < MW'(C_ENTRIES)) chooser[CW'(init_idx)] <= 2'b01;
      if (init_idx < MW'(L_HISTS))   lhist[HW'(init_idx)]   <= '0;
      if (init_idx < MW'(L_ENTRIES)) lpht[LW'(init_idx)]    <= 3'b011;
    end else if (up_valid) begin
      gpht[up_g_idx]    <= g_nxt;
      lpht[up_l_idx]    <= l_nxt;
      chooser[up_c_idx] <= c_nxt;
      lhist[up_h_idx]   <= {lhist[up_h_idx][L_HIST_LEN-2:0], up_taken};
    end
  end
endmodule
