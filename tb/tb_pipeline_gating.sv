// tb_pipeline_gating: drives random allocations (with random confidence),
// in-order-ish and out-of-order resolutions and mispredictions into the
// gating controller and compares it each cycle with a queue model of the
// branches in flight: tag handed out, lc_count = unresolved low-confidence
// branches, fetch_gate = lc_count >= 3, a misprediction removes every
// younger branch, and the ring refuses allocation when 32 slots are in use.
// Counts gate on/off transitions, squashes and full-ring stalls and fails
// if any never happened.
module tb_pipeline_gating;
  localparam int DEPTH = 32, TW = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic alloc_valid, alloc_low_conf, alloc_ready, resolve_valid, resolve_mispredict, fetch_gate;
  logic [TW-1:0] alloc_tag, resolve_tag;
  logic [TW:0] lc_count;

  typedef struct { int tag; bit lc; bit resolved; int res_cycle; } br_t;
  br_t q[$];
  int next_tag = 0;
  int n_gate_on = 0, n_gate_off = 0, n_squash = 0, n_full = 0;
  bit prev_gate = 0;

  pipeline_gating #(.DEPTH(DEPTH), .GATE_COUNT(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_lc();
    int n = 0;
    foreach (q[i]) if (q[i].lc && !q[i].resolved) n++;
    return n;
  endfunction

  initial begin
    alloc_valid = 0; alloc_low_conf = 0; resolve_valid = 0; resolve_tag = 0; resolve_mispredict = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cycle = 0; cycle < 40000; cycle++) begin
      int phase, cand[$];
      bit exp_ready;
      @(negedge clk);
      phase = (cycle / 2000) % 3;   // 0: balanced, 1: fill up, 2: drain
      // check state
      checks++;
      if (int'(lc_count) != model_lc() || fetch_gate != (model_lc() >= 3)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d lc_count=%0d model=%0d", cycle, lc_count, model_lc());
      end
      if (fetch_gate && !prev_gate) n_gate_on++;
      if (!fetch_gate && prev_gate) n_gate_off++;
      prev_gate = fetch_gate;
      // resolve
      cand = {};
      foreach (q[i]) if (!q[i].resolved) cand.push_back(i);
      resolve_valid = cand.size() > 0 && $urandom_range(0, 9) < ((phase == 1) ? 1 : (phase == 2 ? 8 : 4));
      resolve_mispredict = 0;
      if (resolve_valid) begin
        automatic int k = ($urandom_range(0, 1) == 0) ? cand[0] : cand[$urandom_range(0, cand.size() - 1)];
        resolve_tag = TW'(q[k].tag);
        resolve_mispredict = $urandom_range(0, 19) == 0;
        q[k].resolved = 1;
        q[k].res_cycle = cycle;
        if (resolve_mispredict) begin
          n_squash++;
          while (q.size() > k + 1) void'(q.pop_back());
          next_tag = (q[k].tag + 1) % DEPTH;
        end
      end
      alloc_valid = $urandom_range(0, 9) < ((phase == 2) ? 1 : 7);
      alloc_low_conf = $urandom_range(0, 3) == 0;
      exp_ready = (q.size() < DEPTH) && !resolve_mispredict;
      #1;
      checks++;
      if (alloc_ready != exp_ready || (exp_ready && int'(alloc_tag) != next_tag)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d alloc_ready=%0d exp=%0d tag=%0d exp=%0d", cycle, alloc_ready, exp_ready, alloc_tag, next_tag);
      end
      if (alloc_valid && !exp_ready && q.size() == DEPTH) n_full++;
      if (alloc_valid && alloc_ready) begin
        q.push_back('{tag: next_tag, lc: alloc_low_conf, resolved: 0, res_cycle: 0});
        next_tag = (next_tag + 1) % DEPTH;
      end
      @(posedge clk);
      // retire one branch resolved in an earlier cycle from the head, as the ring does
      if (q.size() > 0 && q[0].resolved && q[0].res_cycle < cycle) void'(q.pop_front());
    end
    checks++;
    if (n_gate_on == 0 || n_gate_off == 0 || n_squash == 0 || n_full == 0) begin
      failures++;
    end
    $display("gate_on=%0d gate_off=%0d squash=%0d full_stalls=%0d", n_gate_on, n_gate_off, n_squash, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
