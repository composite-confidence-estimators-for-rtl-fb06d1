// tb_cce_top: end-to-end test of cce_top at its default parameters.
//
// Perceptron lane: a small pipeline model fetches branches of a synthetic
// eight-branch loop program, holds them in flight in order and resolves each
// one a fixed number of cycles after fetch. A misprediction sends fetch down
// a wrong path (random branches) until the branch resolves; the model then
// squashes the younger branches and refetches the correct path. Fetch stops
// while p_fetch_gate is high, and a branch is fetched only when p_pred_ready.
// Every cycle the model's count of unresolved low-confidence branches must
// equal p_lc_count and p_fetch_gate must equal (count >= 3); each resolve
// must hand back the tag given at fetch, and p_upd_mispredict must be right.
// The program runs twice: once with threshold 0 (almost every branch high
// confidence, gating nearly off) and once with threshold 24; gating must cut
// the wrong-path branches fetched per misprediction (the extra work).
// A phase with long resolve latency fills the 32-slot in-flight ring.
// The gshare and hybrid lanes run the same program with each branch resolved
// the cycle after it is predicted; in all lanes high-confidence predictions
// must be right more often than low-confidence ones.
// Counts: gate raised, gate released, squashes of younger branches, ring-full
// stalls, history repairs, fetch-gated cycles; any that stays 0 fails.
module tb_cce_top;
  import cce_pkg::*;
  localparam int TW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic [RAW_W-1:0] p_threshold, g_threshold, h_threshold;
  logic p_pred_valid, p_pred_ready, p_pred_taken, p_pred_high_conf, p_upd_valid, p_upd_taken;
  logic p_upd_mispredict, p_fetch_gate;
  logic [31:0] p_pred_pc, p_upd_pc;
  logic [RAW_W-1:0] p_pred_raw;
  bp_ckpt_t p_pred_ckpt, p_upd_ckpt;
  logic [TW-1:0] p_pred_tag, p_upd_tag;
  logic [TW:0] p_lc_count;
  logic g_ready, g_pred_valid, g_pred_taken, g_pred_high_conf, g_upd_valid, g_upd_taken, g_upd_mispredict;
  logic [31:0] g_pred_pc, g_upd_pc;
  logic [RAW_W-1:0] g_pred_raw;
  bp_ckpt_t g_pred_ckpt, g_upd_ckpt;
  logic h_ready, h_pred_valid, h_pred_taken, h_pred_high_conf, h_upd_valid, h_upd_taken, h_upd_mispredict;
  logic [31:0] h_pred_pc, h_upd_pc;
  logic [RAW_W-1:0] h_pred_raw;
  bp_ckpt_t h_pred_ckpt, h_upd_ckpt;

  cce_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
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

  // ------------------------------------------------------------------
  // Perceptron lane with gating
  // ------------------------------------------------------------------
  typedef struct { int i; logic [31:0] pc; bp_ckpt_t ck; bit hc; int age; logic [TW-1:0] tag; } fl_t;
  fl_t q[$];
  int n_gate_on = 0, n_gate_off = 0, n_squash = 0, n_full = 0, n_repair = 0, n_gated_cycles = 0;
  bit prev_gate = 0;

  function automatic int model_lc();
    int n = 0;
    foreach (q[k]) n += int'(!q[k].hc);
    return n;
  endfunction

  // Runs n_branches correct-path branches through the lane; returns the
  // number of wrong-path branches fetched, mispredictions and cycles.
  task automatic run_lane(input int n_branches, input int th, input int lat,
                          output int wrong, output int mis_n, output int cycles);
    int fi = 0, resolved = 0;
    bit on_path = 1;
    wrong = 0; mis_n = 0; cycles = 0;
    p_threshold = RAW_W'(th);
    while (resolved < n_branches) begin
      bit mis, acc, s_hc, s_tk;
      logic [TW-1:0] s_tag;
      bp_ckpt_t s_ck;
      @(negedge clk);
      cycles++;
      foreach (q[k]) q[k].age++;
      checks++;
      if (int'(p_lc_count) != model_lc() || p_fetch_gate != (model_lc() >= 3)) begin
        failures++;
        if (failures < 10) $display("FAIL lc_count=%0d model=%0d gate=%0d", p_lc_count, model_lc(), p_fetch_gate);
      end
      if (p_fetch_gate && !prev_gate) n_gate_on++;
      if (!p_fetch_gate && prev_gate) n_gate_off++;
      if (p_fetch_gate) n_gated_cycles++;
      prev_gate = p_fetch_gate;
      // resolve oldest
      p_upd_valid = 0; mis = 0;
      if (q.size() > 0 && q[0].age >= lat) begin
        p_upd_valid = 1;
        p_upd_pc    = q[0].pc;
        p_upd_taken = br_taken(q[0].i);
        p_upd_ckpt  = q[0].ck;
        p_upd_tag   = q[0].tag;
        mis         = p_upd_taken != q[0].ck.pred_taken;
      end
      // fetch unless gated
      p_pred_valid = !p_fetch_gate && (q.size() < 40);
      p_pred_pc    = on_path ? br_pc(fi) : (32'h0000_8000 + 32'($urandom_range(0, 63) * 4));
      #1;
      if (p_upd_valid) begin
        checks++;
        if (p_upd_mispredict != mis) begin
          failures++; $display("FAIL p_upd_mispredict=%0d expected %0d", p_upd_mispredict, mis);
        end
      end
      // The ring frees a resolved slot one cycle after the resolve, so it
      // may refuse with 31 branches in flight right after a resolve.
      if (p_pred_valid && !p_pred_ready && !mis && q.size() >= 31) n_full++;
      if (p_pred_valid && !p_pred_ready && !mis && q.size() < 31) begin
        failures++; $display("FAIL fetch refused with %0d in flight", q.size());
      end
      checks++;
      if (p_pred_high_conf != (p_pred_raw > RAW_W'(th))) begin
        failures++; $display("FAIL high_conf");
      end
      acc = p_pred_valid && p_pred_ready;
      s_tag = p_pred_tag; s_ck = p_pred_ckpt; s_hc = p_pred_high_conf; s_tk = p_pred_taken;
      @(posedge clk);
      if (p_upd_valid) begin
        resolved += int'(q[0].i >= 0);
        if (mis) begin
          mis_n++; n_repair++;
          if (q.size() > 1) n_squash++;
          fi = q[0].i + 1; on_path = 1;
          q = {};
        end else void'(q.pop_front());
      end
      if (acc) begin
        if (q.size() > 0) begin
          checks++;
          if (s_tag != q[$].tag + 1'b1) begin
            failures++; $display("FAIL tag %0d after %0d", s_tag, q[$].tag);
          end
        end
        q.push_back('{i: on_path ? fi : -1, pc: p_pred_pc, ck: s_ck, hc: s_hc, age: 0, tag: s_tag});
        if (on_path) begin
          if (s_tk != br_taken(fi)) on_path = 0;
          fi++;
        end else wrong++;
      end
    end
    // drain (inputs change only at the falling edge)
    while (q.size() > 0) begin
      @(negedge clk);
      p_pred_valid = 0;
      foreach (q[k]) q[k].age++;
      p_upd_valid = 0;
      if (q[0].age >= lat) begin
        p_upd_valid = 1; p_upd_pc = q[0].pc; p_upd_taken = br_taken(q[0].i);
        p_upd_ckpt = q[0].ck; p_upd_tag = q[0].tag;
        if (q[0].i < 0) p_upd_taken = !q[0].ck.pred_taken;
      end
      @(posedge clk);
      if (p_upd_valid) begin
        if (p_upd_taken != q[0].ck.pred_taken) q = {};
        else void'(q.pop_front());
      end
    end
    @(negedge clk);
    p_upd_valid = 0;
  endtask

  // ------------------------------------------------------------------
  // gshare / hybrid lanes: predict, resolve next cycle
  // ------------------------------------------------------------------
  int gh_hc[2] = '{0, 0}, gh_hc_right[2] = '{0, 0}, gh_lc[2] = '{0, 0}, gh_lc_right[2] = '{0, 0};

  task automatic run_side(input int n);
    for (int i = 0; i < n; i++) begin
      bp_ckpt_t gck, hck;
      bit ghc, hhc;
      @(negedge clk);
      g_upd_valid = 0; h_upd_valid = 0;
      g_pred_valid = 1; h_pred_valid = 1;
      g_pred_pc = br_pc(i); h_pred_pc = br_pc(i);
      #1;
      gck = g_pred_ckpt; hck = h_pred_ckpt; ghc = g_pred_high_conf; hhc = h_pred_high_conf;
      checks++;
      if (ghc != (g_pred_raw > g_threshold) || hhc != (h_pred_raw > h_threshold)) begin
        failures++; $display("FAIL side lane threshold");
      end
      @(negedge clk);
      g_pred_valid = 0; h_pred_valid = 0;
      g_upd_valid = 1; g_upd_pc = br_pc(i); g_upd_taken = br_taken(i); g_upd_ckpt = gck;
      h_upd_valid = 1; h_upd_pc = br_pc(i); h_upd_taken = br_taken(i); h_upd_ckpt = hck;
      #1;
      checks++;
      if (g_upd_mispredict != (gck.pred_taken != br_taken(i)) || h_upd_mispredict != (hck.pred_taken != br_taken(i))) begin
        failures++; $display("FAIL side lane mispredict flag");
      end
      if (ghc) begin gh_hc[0]++; gh_hc_right[0] += int'(gck.pred_taken == br_taken(i)); end
      else     begin gh_lc[0]++; gh_lc_right[0] += int'(gck.pred_taken == br_taken(i)); end
      if (hhc) begin gh_hc[1]++; gh_hc_right[1] += int'(hck.pred_taken == br_taken(i)); end
      else     begin gh_lc[1]++; gh_lc_right[1] += int'(hck.pred_taken == br_taken(i)); end
    end
    @(negedge clk);
    g_upd_valid = 0; h_upd_valid = 0;
  endtask

  initial begin
    int w0, m0, c0, w1, m1, c1, w2, m2, c2;
    p_pred_valid = 0; p_pred_pc = 0; p_upd_valid = 0; p_upd_pc = 0; p_upd_taken = 0;
    p_upd_ckpt = '0; p_upd_tag = '0; p_threshold = '0;
    g_pred_valid = 0; g_pred_pc = 0; g_upd_valid = 0; g_upd_pc = 0; g_upd_taken = 0; g_upd_ckpt = '0;
    h_pred_valid = 0; h_pred_pc = 0; h_upd_valid = 0; h_upd_pc = 0; h_upd_taken = 0; h_upd_ckpt = '0;
    g_threshold = 6'd8; h_threshold = 6'd20;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!(g_ready && h_ready && p_pred_ready)) @(negedge clk);
    // warm up the predictor and the estimators
    run_lane(8000, 0, 7, w0, m0, c0);
    // gating nearly off vs gating at threshold 24
    run_lane(16000, 0, 7, w0, m0, c0);
    run_lane(16000, 24, 7, w1, m1, c1);
    // long latency: many branches in flight, fills the ring
    run_lane(2000, 0, 60, w2, m2, c2);
    run_side(12000);
    $display("threshold  0: %0d cycles, %0d mispredicts, %0d wrong-path branches fetched", c0, m0, w0);
    $display("threshold 24: %0d cycles, %0d mispredicts, %0d wrong-path branches fetched", c1, m1, w1);
    $display("gate_on=%0d gate_off=%0d gated_cycles=%0d squashes=%0d ring_full=%0d repairs=%0d",
             n_gate_on, n_gate_off, n_gated_cycles, n_squash, n_full, n_repair);
    for (int k = 0; k < 2; k++)
      $display("%s lane: HC %0d (right %0d) LC %0d (right %0d)", (k != 0) ? "hybrid" : "gshare",
               gh_hc[k], gh_hc_right[k], gh_lc[k], gh_lc_right[k]);
    checks++;
    if (n_gate_on == 0 || n_gate_off == 0 || n_gated_cycles == 0 || n_squash == 0 || n_full == 0 || n_repair == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (m1 == 0 || m0 == 0 || (w1 * m0) >= (w0 * m1)) begin
      failures++; $display("FAIL gating did not reduce wrong-path fetch per misprediction");
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (gh_hc[k] == 0 || gh_lc[k] == 0 || gh_hc_right[k] * gh_lc[k] <= gh_lc_right[k] * gh_hc[k]) begin
        failures++; $display("FAIL lane %0d: high confidence not more accurate", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
