// tb_composite_estimator: checks the three-input sum and the strict
// greater-than threshold against integer arithmetic, for all extreme inputs
// and random ones, including the threshold boundary sum == threshold.
module tb_composite_estimator;
  int checks = 0, failures = 0;
  logic [2:0][3:0] raw_in;
  logic [5:0] threshold, raw_sum;
  logic high_conf;

  composite_estimator #(.N_IN(3), .IN_W(4)) dut (.raw_in, .threshold, .raw_sum, .high_conf);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int b, input int c, input int th);
    int s;
    raw_in = {4'(c), 4'(b), 4'(a)};
    threshold = 6'(th);
    #1;
    s = a + b + c;
    checks++;
    if (int'(raw_sum) != s || high_conf != (s > th)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d th=%0d got sum=%0d hc=%0d", a, b, c, th, raw_sum, high_conf);
    end
  endtask

  initial begin
    check(15, 15, 15, 44); check(15, 15, 15, 45); check(0, 0, 0, 0);
    check(15, 0, 15, 29);  check(15, 0, 15, 30);
    repeat (3000) begin
      int a, b, c;
      a = int'($urandom_range(0, 15)); b = int'($urandom_range(0, 15)); c = int'($urandom_range(0, 15));
      check(a, b, c, ($urandom_range(0, 3) == 0) ? a + b + c : int'($urandom_range(0, 46)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
