// tb_hybrid_predictor: compares the hybrid predictor at its full size with a
// software model of all four tables (global PHT, local histories, local PHT,
// chooser): prediction from the chooser-selected component, self output as
// the sum of both components' c' folded towards the final prediction, and
// training of counters, local history and chooser at resolve. A few PCs and
// short histories make tables collide, saturate and switch components.
module tb_hybrid_predictor;
  import cce_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, up_pc;
  logic [GHR_W-1:0] lk_hist, up_hist;
  logic taken, up_valid, up_taken, ready;
  logic [3:0] self_raw;
  int g[4096], c[4096], lh[1024], l[1024];
  int cyc = 0, sel_g = 0, sel_l = 0;

  hybrid_predictor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    up_valid = 0; up_taken = 0; lk_pc = 0; up_pc = 0; lk_hist = 0; up_hist = 0;
    foreach (g[i]) begin g[i] = 1; c[i] = 1; end
    foreach (l[i]) begin l[i] = 3; lh[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = cyc;
    while (!ready) @(negedge clk);
    checks++;
    if (cyc - start != 4096) begin
      failures++; $display("FAIL ready after %0d cycles", cyc - start);
    end
    repeat (30000) begin
      int gi, ci, hi, li, ep, es, gc, lc;
      @(negedge clk);
      lk_pc   = 32'($urandom_range(0, 7) * 4);
      lk_hist = GHR_W'($urandom_range(0, 7));
      up_valid = $urandom_range(0, 3) != 0;
      up_pc    = 32'($urandom_range(0, 7) * 4);
      up_hist  = GHR_W'($urandom_range(0, 7));
      up_taken = (up_pc[2] ^ up_hist[0]) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 2) == 0);
      #1;
      gi = int'(lk_hist) % 4096; ci = gi; hi = int'(lk_pc >> 2) % 1024; li = lh[hi];
      gc = g[gi]; lc = l[li];
      ep = (c[ci] >= 2) ? int'(gc >= 2) : int'(lc >= 4);
      if (c[ci] >= 2) sel_g++; else sel_l++;
      es = ((ep != 0) ? gc : 3 - gc) + ((ep != 0) ? lc : 7 - lc);
      checks++;
      if (int'(taken) != ep || int'(self_raw) != es) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%h taken=%0d/%0d self=%0d/%0d", lk_pc, taken, ep, self_raw, es);
      end
      if (up_valid) begin
        automatic int ugi = int'(up_hist) % 4096, uhi = int'(up_pc >> 2) % 1024;
        automatic int uli = lh[uhi];
        automatic bit gr = (g[ugi] >= 2) == up_taken, lr = (l[uli] >= 4) == up_taken;
        if (gr && !lr && c[ugi] < 3) c[ugi]++;
        else if (!gr && lr && c[ugi] > 0) c[ugi]--;
        if (up_taken) begin if (g[ugi] < 3) g[ugi]++; if (l[uli] < 7) l[uli]++; end
        else          begin if (g[ugi] > 0) g[ugi]--; if (l[uli] > 0) l[uli]--; end
        lh[uhi] = ((lh[uhi] << 1) | int'(up_taken)) & 1023;
      end
    end
    checks++;
    if (sel_g == 0 || sel_l == 0) begin
      failures++; $display("FAIL chooser never used one component (g=%0d l=%0d)", sel_g, sel_l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
