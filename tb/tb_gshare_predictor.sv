// tb_gshare_predictor: random lookups and trainings on a reduced gshare
// (1K entries, 10 history bits) compared each cycle with a software table:
// index = PC word address XOR history, prediction = counter MSB, counter
// +1/-1 saturating on taken/not taken. Also checks the counters start weakly
// not taken and that ready rises ENTRIES cycles after reset.
module tb_gshare_predictor;
  import cce_pkg::*;
  localparam int ENTRIES = 1024, HL = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, up_pc;
  logic [GHR_W-1:0] lk_hist, up_hist;
  logic taken, up_valid, up_taken, ready;
  logic [1:0] ctr;
  int m [ENTRIES];
  int cyc = 0;

  gshare_predictor #(.ENTRIES(ENTRIES), .HIST_LEN(HL)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(input logic [31:0] pc, input logic [GHR_W-1:0] h);
    return int'(((pc >> 2) ^ (32'(h) & ((1 << HL) - 1)))) % ENTRIES;
  endfunction

  initial begin
    int start;
    up_valid = 0; up_taken = 0; lk_pc = 0; up_pc = 0; lk_hist = 0; up_hist = 0;
    foreach (m[i]) m[i] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = cyc;
    while (!ready) @(negedge clk);
    checks++;
    if (cyc - start != ENTRIES) begin
      failures++; $display("FAIL ready after %0d cycles", cyc - start);
    end
    repeat (20000) begin
      @(negedge clk);
      lk_pc   = $urandom;
      lk_hist = GHR_W'({$urandom, $urandom});
      if ($urandom_range(0, 1) == 0) lk_pc = 32'($urandom_range(0, 7) * 4);
      up_valid = $urandom_range(0, 3) != 0;
      up_pc    = 32'($urandom_range(0, 7) * 4);
      up_hist  = GHR_W'($urandom_range(0, 3)) | (GHR_W'($urandom) << HL);
      up_taken = $urandom_range(0, 4) != 0;
      #1;
      checks++;
      if (int'(ctr) != m[idx(lk_pc, lk_hist)] || taken != (m[idx(lk_pc, lk_hist)] >= 2)) begin
        failures++;
        if (failures < 10) $display("FAIL pc=%h ctr=%0d model=%0d", lk_pc, ctr, m[idx(lk_pc, lk_hist)]);
      end
      if (up_valid) begin
        automatic int i = idx(up_pc, up_hist);
        if (up_taken && m[i] < 3) m[i]++;
        else if (!up_taken && m[i] > 0) m[i]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
