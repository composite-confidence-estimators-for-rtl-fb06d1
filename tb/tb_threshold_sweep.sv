// tb_threshold_sweep: SPEC / PVN over every threshold, per estimator.
//
// Four lanes run the synthetic eight-branch loop program: a gshare and a
// perceptron lane at the default 512-counter estimator tables, and the same
// two predictors with 1024-counter JRS and Up/Down tables (the size at which
// the single estimators and two-term composites are usually compared). Each
// branch is resolved the cycle after it is predicted. For every resolved
// branch the testbench records the raw output of each estimator (JRS,
// Up/Down, Self, JRS + Up/Down, JRS + Up/Down + Self, JRS + Self,
// Up/Down + Self) and whether the prediction was right. For every threshold
// t a branch is low confidence when raw <= t, and the table printed gives
//   LC%  = share of branches flagged low confidence,
//   SPEC = P[low confidence | mispredicted],
//   PVN  = P[mispredicted | low confidence].
// Checks: each lane's pred_raw equals the sum of its three components; the
// three-term composite offers more distinct operating points (distinct LC%)
// than JRS alone; at the lowest useful threshold the composite's PVN is
// higher than the base misprediction rate (a low-confidence flag carries
// information); SPEC never falls as the threshold rises.
module tb_threshold_sweep;
  import cce_pkg::*;
  localparam int NL = 4, NE = 7, MAXV = 46, WARM = 4000, N = 30000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // four lanes, identical port sets
  logic             rdy[NL], pv[NL], pt[NL], phc[NL], uv[NL], ut[NL], um[NL];
  logic [31:0]      ppc[NL], upc[NL];
  logic [3:0]       pj[NL], pu[NL], ps[NL];
  logic [RAW_W-1:0] praw[NL];
  bp_ckpt_t         pck[NL], uck[NL];
  string            lname[NL] = '{"gshare", "perceptron", "gshare, 1024-counter tables",
                                  "perceptron, 1024-counter tables"};

  cce_frontend #(.PRED(PRED_GSHARE)) u_g (
    .clk, .rst_n, .threshold(6'd0), .ready(rdy[0]), .pred_valid(pv[0]), .pred_pc(ppc[0]),
    .pred_taken(pt[0]), .pred_jrs_raw(pj[0]), .pred_ud_raw(pu[0]), .pred_self_raw(ps[0]),
    .pred_raw(praw[0]), .pred_high_conf(phc[0]), .pred_ckpt(pck[0]), .upd_valid(uv[0]),
    .upd_pc(upc[0]), .upd_taken(ut[0]), .upd_ckpt(uck[0]), .upd_mispredict(um[0]));
  cce_frontend #(.PRED(PRED_PERCEPTRON)) u_p (
    .clk, .rst_n, .threshold(6'd0), .ready(rdy[1]), .pred_valid(pv[1]), .pred_pc(ppc[1]),
    .pred_taken(pt[1]), .pred_jrs_raw(pj[1]), .pred_ud_raw(pu[1]), .pred_self_raw(ps[1]),
    .pred_raw(praw[1]), .pred_high_conf(phc[1]), .pred_ckpt(pck[1]), .upd_valid(uv[1]),
    .upd_pc(upc[1]), .upd_taken(ut[1]), .upd_ckpt(uck[1]), .upd_mispredict(um[1]));
  cce_frontend #(.PRED(PRED_GSHARE), .JRS_ENTRIES(1024), .UD_ENTRIES(1024)) u_g1k (
    .clk, .rst_n, .threshold(6'd0), .ready(rdy[2]), .pred_valid(pv[2]), .pred_pc(ppc[2]),
    .pred_taken(pt[2]), .pred_jrs_raw(pj[2]), .pred_ud_raw(pu[2]), .pred_self_raw(ps[2]),
    .pred_raw(praw[2]), .pred_high_conf(phc[2]), .pred_ckpt(pck[2]), .upd_valid(uv[2]),
    .upd_pc(upc[2]), .upd_taken(ut[2]), .upd_ckpt(uck[2]), .upd_mispredict(um[2]));
  cce_frontend #(.PRED(PRED_PERCEPTRON), .JRS_ENTRIES(1024), .UD_ENTRIES(1024)) u_p1k (
    .clk, .rst_n, .threshold(6'd0), .ready(rdy[3]), .pred_valid(pv[3]), .pred_pc(ppc[3]),
    .pred_taken(pt[3]), .pred_jrs_raw(pj[3]), .pred_ud_raw(pu[3]), .pred_self_raw(ps[3]),
    .pred_raw(praw[3]), .pred_high_conf(phc[3]), .pred_ckpt(pck[3]), .upd_valid(uv[3]),
    .upd_pc(upc[3]), .upd_taken(ut[3]), .upd_ckpt(uck[3]), .upd_mispredict(um[3]));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] br_pc(input int i);
    return 32'h0000_4000 + 32'((i % 8) * 4);
  endfunction
  function automatic bit br_taken(input int i);
    int it = i / 8;
    case (i % 8)
      0, 7: return 1;
      1: return it[0];
      2: return (it % 5) != 4;
      3: return (it % 5) == 4;
      4: return ((it * 7) % 10) != 0;
      5: return ((it * 1103515245 + 12345) >>> 16) % 2 == 1;
      default: return (it % 3) == 0;
    endcase
  endfunction

  // hist[lane][estimator][value][0 = right, 1 = wrong]
  int hist [NL][NE][MAXV][2];
  string ename [NE] = '{"JRS", "Up/Down", "Self", "JRS+UD", "JRS+UD+Self", "JRS+Self", "UD+Self"};
  int    emax  [NE] = '{15, 15, 15, 30, 45, 30, 30};

  initial begin
    foreach (hist[l, e, v, k]) hist[l][e][v][k] = 0;
    for (int l = 0; l < NL; l++) begin pv[l] = 0; uv[l] = 0; ppc[l] = 0; upc[l] = 0; ut[l] = 0; uck[l] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!(rdy[0] && rdy[1] && rdy[2] && rdy[3])) @(negedge clk);
    for (int i = 0; i < WARM + N; i++) begin
      bp_ckpt_t ck[NL];
      int r[NL][NE];
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin uv[l] = 0; pv[l] = 1; ppc[l] = br_pc(i); end
      #1;
      for (int l = 0; l < NL; l++) begin
        ck[l] = pck[l];
        r[l][0] = int'(pj[l]); r[l][1] = int'(pu[l]); r[l][2] = int'(ps[l]);
        r[l][3] = r[l][0] + r[l][1]; r[l][4] = r[l][3] + r[l][2];
        r[l][5] = r[l][0] + r[l][2]; r[l][6] = r[l][1] + r[l][2];
        checks++;
        if (int'(praw[l]) != r[l][4]) begin
          failures++; $display("FAIL lane %0d raw %0d != %0d", l, praw[l], r[l][4]);
        end
      end
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        pv[l] = 0; uv[l] = 1; upc[l] = br_pc(i); ut[l] = br_taken(i); uck[l] = ck[l];
        if (i >= WARM)
          for (int e = 0; e < NE; e++) hist[l][e][r[l][e]][int'(ck[l].pred_taken != br_taken(i))]++;
      end
    end
    @(negedge clk);
    for (int l = 0; l < NL; l++) uv[l] = 0;

    for (int l = 0; l < NL; l++) begin
      int tot_w;
      tot_w = 0;
      for (int v = 0; v < MAXV; v++) tot_w += hist[l][0][v][1];
      $display("==== %s lane: %0d branches, %0d mispredicted ====", lname[l], N, tot_w);
      for (int e = 0; e < NE; e++) begin
        int lc_r, lc_w, distinct, prev_lc, prev_spec;
        lc_r = 0; lc_w = 0; distinct = 0; prev_lc = -1; prev_spec = -1;
        $display("  %s", ename[e]);
        for (int t = 0; t <= emax[e]; t++) begin
          lc_r += hist[l][e][t][0];
          lc_w += hist[l][e][t][1];
          if (lc_r + lc_w != prev_lc) distinct++;
          prev_lc = lc_r + lc_w;
          checks++;
          if (tot_w > 0 && lc_w * 1000 / tot_w < prev_spec) begin
            failures++; $display("FAIL SPEC fell at t=%0d", t);
          end
          if (tot_w > 0) prev_spec = lc_w * 1000 / tot_w;
          if (lc_r + lc_w > 0 && lc_r + lc_w < N)
            $display("    t=%2d  LC%%=%5.1f  SPEC=%5.3f  PVN=%5.3f", t, 100.0 * (lc_r + lc_w) / N,
                     real'(lc_w) / tot_w, real'(lc_w) / (lc_r + lc_w));
        end
        $display("    distinct operating points: %0d", distinct);
        if (e == 0) hist[l][0][MAXV-1][0] = distinct;      // remember JRS count
        if (e == 4) begin
          int t0;
          checks++;
          if (distinct <= hist[l][0][MAXV-1][0]) begin
            failures++; $display("FAIL composite does not widen the range (%0d vs %0d)", distinct, hist[l][0][MAXV-1][0]);
          end
          // lowest threshold that flags at least 1% of branches
          lc_r = 0; lc_w = 0; t0 = 0;
          while (t0 <= emax[e] && (lc_r + lc_w) * 100 < N) begin
            lc_r += hist[l][e][t0][0]; lc_w += hist[l][e][t0][1]; t0++;
          end
          checks++;
          if (lc_w * N <= tot_w * (lc_r + lc_w)) begin
            failures++; $display("FAIL composite PVN not above the misprediction rate");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
