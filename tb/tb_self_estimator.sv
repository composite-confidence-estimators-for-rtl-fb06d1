// tb_self_estimator: exhaustive check of the folded-counter self-estimate.
// For 2-bit and 3-bit counters and both directions, c' must equal c when the
// prediction is taken and 2^N - c - 1 when it is not.
module tb_self_estimator;
  int checks = 0, failures = 0;
  logic [1:0] c2, o2;
  logic [2:0] c3, o3;
  logic       t;

  self_estimator #(.N(2)) dut2 (.ctr(c2), .pred_taken(t), .cprime(o2));
  self_estimator #(.N(3)) dut3 (.ctr(c3), .pred_taken(t), .cprime(o3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tk = 0; tk < 2; tk++) begin
      for (int c = 0; c < 8; c++) begin
        t = tk[0]; c2 = c[1:0]; c3 = c[2:0];
        #1;
        checks += 2;
        if (int'(o2) != ((tk != 0) ? (c % 4) : (4 - (c % 4) - 1))) begin
          failures++; $display("FAIL N=2 c=%0d t=%0d got %0d", c % 4, tk, o2);
        end
        if (int'(o3) != ((tk != 0) ? c : (8 - c - 1))) begin
          failures++; $display("FAIL N=3 c=%0d t=%0d got %0d", c, tk, o3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
