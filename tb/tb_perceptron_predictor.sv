// tb_perceptron_predictor: compares the perceptron predictor at full size
// with a software copy of the weights. Each cycle it checks y (bias plus
// signed weights summed over 28 history bits) and taken = (y >= 0), then
// trains a perceptron with the y seen at prediction; the model applies the
// rule: train on a misprediction or |y| <= 68, bias towards the outcome,
// weight i up when history bit i agrees with the outcome, saturating at
// -128..127. Counts trainings skipped because |y| was large, so both paths
// of the rule are exercised.
module tb_perceptron_predictor;
  import cce_pkg::*;
  localparam int NP = 128, H = 28, TH = 68;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, up_pc;
  logic [GHR_W-1:0] lk_hist, up_hist;
  logic signed [Y_W-1:0] y, up_y;
  logic taken, up_valid, up_taken, ready;
  int w [NP][H+1];
  int cyc = 0, skipped = 0, trained = 0, saturated = 0;

  perceptron_predictor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dot(input int p, input logic [GHR_W-1:0] h);
    int s = w[p][0];
    for (int i = 1; i <= H; i++) s += h[i-1] ? w[p][i] : -w[p][i];
    return s;
  endfunction

  initial begin
    int start;
    up_valid = 0; up_taken = 0; lk_pc = 0; up_pc = 0; lk_hist = 0; up_hist = 0; up_y = 0;
    foreach (w[p, i]) w[p][i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = cyc;
    while (!ready) @(negedge clk);
    checks++;
    if (cyc - start != NP) begin
      failures++; $display("FAIL ready after %0d cycles", cyc - start);
    end
    repeat (30000) begin
      int p, e;
      logic [GHR_W-1:0] hh;
      @(negedge clk);
      // A fixed branch whose outcome follows history bit 3 drives weights
      // towards saturation; other branches see random history.
      p = ($urandom_range(0, 1) == 0) ? 5 : int'($urandom_range(0, NP - 1));
      hh = GHR_W'({$urandom, $urandom});
      lk_pc = 32'(p) << 2; lk_hist = hh;
      up_valid = 0;
      #1;
      e = dot(p, hh);
      checks++;
      if (int'(y) != e || taken != (e >= 0)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d y=%0d model=%0d", p, y, e);
      end
      // train the same branch with the y it was predicted with
      up_valid = 1; up_pc = lk_pc; up_hist = hh; up_y = Y_W'(e);
      up_taken = (p == 5) ? hh[3] : ($urandom_range(0, 1) == 1);
      if ((up_taken != (e >= 0)) || ((e < 0 ? -e : e) <= TH)) begin
        trained++;
        for (int i = 0; i <= H; i++) begin
          automatic bit agree = (i == 0) ? up_taken : (hh[i-1] == up_taken);
          if (agree) begin if (w[p][i] < 127) w[p][i]++; else saturated++; end
          else       begin if (w[p][i] > -128) w[p][i]--; else saturated++; end
        end
      end else skipped++;
      @(posedge clk);
      #1 up_valid = 0;
    end
    checks++;
    if (skipped == 0 || trained == 0) begin
      failures++; $display("FAIL training paths: trained=%0d skipped=%0d", trained, skipped);
    end
    $display("trained=%0d skipped=%0d saturated_weights=%0d", trained, skipped, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
