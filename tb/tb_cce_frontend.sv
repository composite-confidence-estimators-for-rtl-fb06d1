// tb_cce_frontend: runs frontend_checker on one lane of each predictor kind
// (perceptron, gshare, hybrid) at full size and sums their results.
module tb_cce_frontend;
  import cce_pkg::*;
  logic clk = 0, rst_n = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  frontend_checker #(.PRED(PRED_PERCEPTRON)) u_p (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  frontend_checker #(.PRED(PRED_GSHARE))     u_g (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  frontend_checker #(.PRED(PRED_HYBRID))     u_h (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
