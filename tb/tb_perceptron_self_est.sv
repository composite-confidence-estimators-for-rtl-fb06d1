// tb_perceptron_self_est: checks that |y| >> 3, saturated at 15, is produced
// for edge values and random perceptron outputs of both signs.
module tb_perceptron_self_est;
  import cce_pkg::*;
  int checks = 0, failures = 0;
  logic signed [Y_W-1:0] y;
  logic [3:0] raw;

  perceptron_self_est dut (.y, .raw);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int v);
    int m, e;
    y = Y_W'(v);
    #1;
    m = (v < 0) ? -v : v;
    e = (m / 8 > 15) ? 15 : m / 8;
    checks++;
    if (int'(raw) != e) begin
      failures++; $display("FAIL y=%0d raw=%0d expected %0d", v, raw, e);
    end
  endtask

  initial begin
    static int edges[] = '{0, 7, 8, -8, -7, 68, -68, 127, 128, -128, -129, 3683, -3683, 32767, -32767};
    foreach (edges[i]) check(edges[i]);
    repeat (2000) check(int'($urandom_range(0, 800)) - 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
