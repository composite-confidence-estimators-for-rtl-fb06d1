// tb_gating_sweep: pipeline gating driven by different estimators.
//
// A perceptron lane (cce_frontend) feeds a pipeline_gating controller. A
// pipeline model fetches the synthetic eight-branch loop program, resolves
// branches in order LAT cycles after fetch, fetches wrong-path branches
// after a misprediction, squashes them when it resolves, and stops fetching
// while fetch_gate is high. The low-confidence flag handed to the gating
// controller is computed here from the lane's component outputs, so the
// same hardware can be gated by JRS alone, by JRS + Up/Down, by the full
// JRS + Up/Down + Self composite, or by the perceptron self-estimate alone
// (no extra tables), at every threshold of each.
// Each run covers N branches on warm tables. Against a run with gating off,
// it reports the loss in branch throughput (cycles per branch; the IPC
// proxy) and the reduction in wrong-path branches fetched (the extra-work
// proxy).
// Checks: every run matches the gating rule (gate = 3 or more unresolved
// low-confidence branches, checked each cycle); gating at the highest
// threshold of each estimator cuts wrong-path fetch; the three-term
// composite offers more distinct operating points than JRS alone.
module tb_gating_sweep;
  import cce_pkg::*;
  localparam int N = 3000, LAT = 7, TW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic ready, pred_valid, pred_taken, pred_high_conf, upd_valid, upd_taken, upd_mispredict;
  logic [31:0] pred_pc, upd_pc;
  logic [3:0] pred_jrs_raw, pred_ud_raw, pred_self_raw;
  logic [RAW_W-1:0] pred_raw;
  bp_ckpt_t pred_ckpt, upd_ckpt;
  logic alloc_low_conf, alloc_ready, fetch_gate;
  logic [TW-1:0] alloc_tag, upd_tag;
  logic [TW:0] lc_count;

  cce_frontend #(.PRED(PRED_PERCEPTRON)) u_lane (
    .clk, .rst_n, .threshold(6'd0), .ready, .pred_valid(pred_valid && alloc_ready), .pred_pc,
    .pred_taken, .pred_jrs_raw, .pred_ud_raw, .pred_self_raw, .pred_raw, .pred_high_conf,
    .pred_ckpt, .upd_valid, .upd_pc, .upd_taken, .upd_ckpt, .upd_mispredict);
  pipeline_gating u_gate (
    .clk, .rst_n, .alloc_valid(pred_valid), .alloc_low_conf, .alloc_ready, .alloc_tag,
    .resolve_valid(upd_valid), .resolve_tag(upd_tag), .resolve_mispredict(upd_mispredict),
    .lc_count, .fetch_gate);

  always #5 clk = ~clk;

  initial begin
    #200000000;
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

  typedef struct { int i; logic [31:0] pc; bp_ckpt_t ck; bit lc; int age; logic [TW-1:0] tag; } fl_t;
  fl_t q[$];
  int fi = 0;

  // est: -1 = gating off, 0 = JRS, 1 = JRS + Up/Down, 2 = JRS + Up/Down + Self,
  //      3 = Self
  task automatic run(input int est, input int th, output int cycles, output int wrong);
    int resolved, nlc;
    bit on_path;
    resolved = 0; cycles = 0; wrong = 0; on_path = 1;
    while (resolved < N) begin
      bit mis, acc, s_lc, s_tk;
      logic [TW-1:0] s_tag;
      bp_ckpt_t s_ck;
      int raw;
      @(negedge clk);
      cycles++;
      foreach (q[k]) q[k].age++;
      nlc = 0;
      foreach (q[k]) nlc += int'(q[k].lc);
      checks++;
      if (int'(lc_count) != nlc || fetch_gate != (nlc >= 3)) begin
        failures++;
        if (failures < 10) $display("FAIL lc_count=%0d model=%0d", lc_count, nlc);
      end
      upd_valid = 0; mis = 0;
      if (q.size() > 0 && q[0].age >= LAT) begin
        upd_valid = 1; upd_pc = q[0].pc; upd_taken = br_taken(q[0].i);
        upd_ckpt = q[0].ck; upd_tag = q[0].tag;
        mis = upd_taken != q[0].ck.pred_taken;
      end
      pred_valid = !fetch_gate && !mis;
      pred_pc = on_path ? br_pc(fi) : (32'h0000_8000 + 32'($urandom_range(0, 63) * 4));
      #1;
      raw = (est == 0) ? int'(pred_jrs_raw) :
            (est == 1) ? int'(pred_jrs_raw) + int'(pred_ud_raw) :
            (est == 3) ? int'(pred_self_raw) : int'(pred_raw);
      alloc_low_conf = (est >= 0) && (raw <= th);
      #1;
      acc = pred_valid && alloc_ready;
      s_lc = alloc_low_conf; s_tk = pred_taken; s_ck = pred_ckpt; s_tag = alloc_tag;
      @(posedge clk);
      if (upd_valid) begin
        resolved++;
        if (mis) begin
          fi = q[0].i + 1; on_path = 1;
          q = {};
        end else void'(q.pop_front());
      end
      if (acc) begin
        q.push_back('{i: on_path ? fi : -1, pc: pred_pc, ck: s_ck, lc: s_lc, age: 0, tag: s_tag});
        if (on_path) begin
          if (s_tk != br_taken(fi)) on_path = 0;
          fi++;
        end else wrong++;
      end
    end
    // drain: let the in-flight branches resolve without fetching
    while (q.size() > 0) begin
      bit mis;
      @(negedge clk);
      pred_valid = 0;
      foreach (q[k]) q[k].age++;
      upd_valid = 0;
      if (q[0].age >= LAT) begin
        upd_valid = 1; upd_pc = q[0].pc; upd_taken = br_taken(q[0].i);
        upd_ckpt = q[0].ck; upd_tag = q[0].tag;
        mis = upd_taken != q[0].ck.pred_taken;
      end
      @(posedge clk);
      if (upd_valid) begin
        if (mis) begin fi = q[0].i + 1; q = {}; end
        else begin fi = q[0].i + 1; void'(q.pop_front()); end
      end
    end
    @(negedge clk);
    upd_valid = 0;
  endtask

  initial begin
    int base_c, base_w, c, w, maxth[4], distinct[4], last_w;
    static string nm[4] = '{"JRS", "JRS+UD", "JRS+UD+Self", "Self"};
    maxth = '{15, 30, 45, 15};
    pred_valid = 0; pred_pc = 0; upd_valid = 0; upd_pc = 0; upd_taken = 0; upd_ckpt = '0;
    upd_tag = '0; alloc_low_conf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!ready) @(negedge clk);
    repeat (10) run(-1, 0, base_c, base_w);    // warm-up
    run(-1, 0, base_c, base_w);                // baseline, gating off
    $display("no gating: %0d cycles, %0d wrong-path branches for %0d branches", base_c, base_w, N);
    for (int e = 0; e < 4; e++) begin
      distinct[e] = 0; last_w = -1;
      $display("%s", nm[e]);
      for (int t = 0; t <= maxth[e]; t++) begin
        run(e, t, c, w);
        if (w != last_w) distinct[e]++;
        last_w = w;
        $display("  t=%2d  IPC loss %5.1f%%  extra-work reduction %5.1f%%", t,
                 100.0 * (c - base_c) / c, 100.0 * (base_w - w) / base_w);
        if (t == maxth[e]) begin
          checks++;
          if (w >= base_w) begin
            failures++; $display("FAIL %s: gating did not cut wrong-path fetch", nm[e]);
          end
        end
      end
    end
    run(-1, 0, c, w);                          // baseline again, after the sweep
    $display("no gating after the sweep: %0d cycles, %0d wrong-path branches", c, w);
    $display("distinct operating points: JRS %0d, JRS+UD %0d, JRS+UD+Self %0d, Self %0d",
             distinct[0], distinct[1], distinct[2], distinct[3]);
    checks++;
    if (distinct[2] <= distinct[0]) begin
      failures++; $display("FAIL composite does not widen the range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
