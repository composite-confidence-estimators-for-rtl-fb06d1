// frontend_checker: drives one cce_frontend lane with a small synthetic
// program and checks it against software models.
//
// The program is a loop over eight static branches whose outcomes are a
// fixed function of the dynamic branch number i (always taken, alternating,
// a period-5 loop exit, a branch correlated with the loop exit, a biased
// branch and a pseudo-random one), so the correct path can be replayed after
// a misprediction. Predicted branches wait in an in-order queue and resolve
// LAT_MIN..LAT_MAX cycles later. After a misprediction the lane fetches
// wrong-path branches until the mispredicted one resolves; the queue then
// drops them and fetch restarts at i+1.
// Checked every prediction: the JRS and Up/Down raw outputs against model
// tables, pred_raw = JRS + Up/Down + Self, pred_high_conf = pred_raw >
// threshold, the checkpointed history against a model of the speculative
// history with repair, and (perceptron lane) Self = min(|y| >> 3, 15).
// At the end, high-confidence predictions must be more often right than
// low-confidence ones. done rises when N_BRANCHES have resolved.
module frontend_checker
  import cce_pkg::*;
#(
  parameter pred_kind_e PRED       = PRED_PERCEPTRON,
  parameter int         N_BRANCHES = 20000,
  parameter int         THRESH     = 24
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LAT_MIN = 3, LAT_MAX = 8, QMAX = 16, JE = 512;

  logic             ready, pred_valid, pred_taken, pred_high_conf, upd_valid, upd_taken, upd_mispredict;
  logic [31:0]      pred_pc, upd_pc;
  logic [3:0]       pred_jrs_raw, pred_ud_raw, pred_self_raw;
  logic [RAW_W-1:0] pred_raw, threshold;
  bp_ckpt_t         pred_ckpt, upd_ckpt;

  cce_frontend #(.PRED(PRED)) dut (.*);

  typedef struct { int i; logic [31:0] pc; bit on_path; bp_ckpt_t ck; bit hc; int age; } inflight_t;
  inflight_t q[$];
  int jrs_m[JE], ud_m[JE];
  logic [GHR_W-1:0] ghr_m;
  int fi;            // next correct-path branch number
  bit on_path;
  int resolved, n_mis, n_hc, n_lc, hc_right, lc_right, n_jrs_clear, n_ud_dec;

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
  function automatic int jidx(input logic [31:0] pc, input logic [GHR_W-1:0] h);
    return int'((pc >> 2) ^ 32'(h)) % JE;
  endfunction

  assign threshold = RAW_W'(THRESH);

  initial begin
    checks = 0; failures = 0; done = 0;
    pred_valid = 0; pred_pc = 0; upd_valid = 0; upd_pc = 0; upd_taken = 0; upd_ckpt = '0;
    foreach (jrs_m[k]) begin jrs_m[k] = 0; ud_m[k] = 0; end
    ghr_m = '0; fi = 0; on_path = 1;
    resolved = 0; n_mis = 0; n_hc = 0; n_lc = 0; hc_right = 0; lc_right = 0; n_jrs_clear = 0; n_ud_dec = 0;
    @(posedge rst_n);
    while (!ready) @(negedge clk);
    while (resolved < N_BRANCHES) begin
      bit mis, s_hc, s_tk;
      bp_ckpt_t s_ck;
      @(negedge clk);
      foreach (q[k]) q[k].age++;
      // ---- resolve the oldest branch when its latency has passed ----
      upd_valid = 0; mis = 0;
      if (q.size() > 0 && q[0].age >= LAT_MIN + (q[0].i % (LAT_MAX - LAT_MIN + 1))) begin
        upd_valid = 1;
        upd_pc    = q[0].pc;
        upd_taken = br_taken(q[0].i);
        upd_ckpt  = q[0].ck;
        mis       = upd_taken != q[0].ck.pred_taken;
      end
      // ---- predict ----
      pred_valid = !mis && q.size() < QMAX && ($urandom_range(0, 9) < 8);
      pred_pc    = on_path ? br_pc(fi) : (32'h0000_8000 + 32'($urandom_range(0, 63) * 4));
      #1;
      if (upd_valid) begin
        checks++;
        if (upd_mispredict != mis) begin
          failures++; $display("FAIL[%0d] upd_mispredict=%0d expected %0d", PRED, upd_mispredict, mis);
        end
      end
      if (pred_valid) begin
        automatic logic [GHR_W-1:0] hp = {ghr_m[GHR_W-2:0], pred_taken};
        automatic int j = jidx(pred_pc, hp);
        automatic int es = int'(pred_jrs_raw) + int'(pred_ud_raw) + int'(pred_self_raw);
        checks++;
        if (pred_ckpt.ghist != ghr_m || int'(pred_jrs_raw) != jrs_m[j] || int'(pred_ud_raw) != ud_m[j] ||
            int'(pred_raw) != es || pred_high_conf != (es > THRESH) || pred_ckpt.pred_taken != pred_taken) begin
          failures++;
          if (failures < 10)
            $display("FAIL[%0d] pc=%h ghist %h/%h jrs %0d/%0d ud %0d/%0d raw %0d/%0d", PRED, pred_pc,
                     pred_ckpt.ghist, ghr_m, pred_jrs_raw, jrs_m[j], pred_ud_raw, ud_m[j], pred_raw, es);
        end
        if (PRED == PRED_PERCEPTRON) begin
          automatic int m = (pred_ckpt.perc_y < 0) ? -int'(pred_ckpt.perc_y) : int'(pred_ckpt.perc_y);
          checks++;
          if (int'(pred_self_raw) != ((m / 8 > 15) ? 15 : m / 8)) begin
            failures++; $display("FAIL[%0d] self=%0d y=%0d", PRED, pred_self_raw, pred_ckpt.perc_y);
          end
        end
      end
      s_ck = pred_ckpt; s_hc = pred_high_conf; s_tk = pred_taken;
      @(posedge clk);
      // ---- update the models with what the lane just did ----
      if (upd_valid) begin
        automatic int j = jidx(upd_pc, {upd_ckpt.ghist[GHR_W-2:0], upd_ckpt.pred_taken});
        resolved++;
        if (q[0].hc) begin n_hc++; hc_right += int'(!mis); end
        else         begin n_lc++; lc_right += int'(!mis); end
        if (!mis) begin
          if (jrs_m[j] < 15) jrs_m[j]++;
          if (ud_m[j] < 15) ud_m[j]++;
        end else begin
          n_mis++;
          if (jrs_m[j] != 0) n_jrs_clear++;
          if (ud_m[j] > 1) n_ud_dec++;
          jrs_m[j] = 0;
          if (ud_m[j] > 0) ud_m[j]--;
        end
        if (mis) begin
          ghr_m = {upd_ckpt.ghist[GHR_W-2:0], upd_taken};
          fi = q[0].i + 1; on_path = 1;
          q = {};
        end else void'(q.pop_front());
      end
      if (pred_valid) begin
        q.push_back('{i: on_path ? fi : -1, pc: pred_pc, on_path: on_path, ck: s_ck, hc: s_hc, age: 0});
        ghr_m = {ghr_m[GHR_W-2:0], s_tk};
        if (on_path) begin
          if (s_tk != br_taken(fi)) on_path = 0;
          fi++;
        end
      end
    end
    checks++;
    if (n_hc == 0 || n_lc == 0 || n_mis == 0 || n_jrs_clear == 0 || n_ud_dec == 0) begin
      failures++; $display("FAIL[%0d] a mechanism never happened", PRED);
    end
    checks++;
    if (n_hc > 0 && n_lc > 0 && hc_right * n_lc <= lc_right * n_hc) begin
      failures++; $display("FAIL[%0d] high confidence not more accurate than low", PRED);
    end
    $display("lane %0d: resolved=%0d mispredicts=%0d HC=%0d (right %0d) LC=%0d (right %0d) jrs_clears=%0d ud_decs=%0d",
             PRED, resolved, n_mis, n_hc, hc_right, n_lc, lc_right, n_jrs_clear, n_ud_dec);
    done = 1;
  end
endmodule
