// tb_jrs_estimator: drives random lookups and trainings into the jrs
// table and compares every raw output with a software copy of the table:
// index = PC word address XOR history, counter +1 (saturating at 15) on a
// correct prediction, cleared on a misprediction. A small set of PCs makes
// counters saturate and collide. It also checks that ready rises exactly
// ENTRIES cycles after reset.
module tb_jrs_estimator;
  import cce_pkg::*;
  localparam int ENTRIES = 512;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, up_pc;
  logic [GHR_W-1:0] lk_hist, up_hist;
  logic [3:0] raw;
  logic up_valid, up_correct, ready;
  int m [ENTRIES];
  int cyc = 0, n_sat = 0, n_miss = 0;

  jrs_estimator #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(input logic [31:0] pc, input logic [GHR_W-1:0] h);
    return int'((pc >> 2) ^ 32'(h)) % ENTRIES;
  endfunction

  initial begin
    int start;
    up_valid = 0; up_correct = 0; lk_pc = 0; up_pc = 0; lk_hist = 0; up_hist = 0;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = cyc;
    while (!ready) @(negedge clk);
    checks++;
    if (cyc - start != ENTRIES) begin
      failures++; $display("FAIL ready after %0d cycles, expected %0d", cyc - start, ENTRIES);
    end
    repeat (20000) begin
      @(negedge clk);
      lk_pc   = 32'($urandom_range(0, 15) * 4);
      lk_hist = GHR_W'($urandom_range(0, 3));
      up_valid   = $urandom_range(0, 3) != 0;
      up_pc      = 32'($urandom_range(0, 15) * 4);
      up_hist    = GHR_W'($urandom_range(0, 3));
      up_correct = $urandom_range(0, 15) != 0;
      #1;
      checks++;
      if (int'(raw) != m[idx(lk_pc, lk_hist)]) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%h h=%h raw=%0d model=%0d", lk_pc, lk_hist, raw, m[idx(lk_pc, lk_hist)]);
      end
      if (up_valid) begin
        automatic int i = idx(up_pc, up_hist);
        if (up_correct) begin
          if (m[i] != 15) m[i]++; else n_sat++;
        end else begin
          n_miss++;
          m[i] = 0;
        end
      end
    end
    $display("saturated=%0d mispredicts=%0d", n_sat, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
