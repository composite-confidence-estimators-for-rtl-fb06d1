// composite_estimator: sums component confidence estimates and thresholds them.
//
// The composite estimator treats each component (JRS, Up/Down, self) as a
// classifier whose raw output grows with the chance that the prediction is
// correct. It adds the N_IN raw outputs and calls the prediction high
// confidence when the sum is strictly greater than a static threshold. For
// three 4-bit inputs this is a 4+4 -> 5-bit adder followed by a 5-bit adder
// with carry out, giving a 6-bit raw sum. Summing and thresholding follow the
// document; providing the threshold as an input (held static by software so
// that any operating point can be chosen) is this design's choice. Purely
// combinational.
module composite_estimator #(
  parameter int unsigned N_IN  = 3,
  parameter int unsigned IN_W  = 4,
  parameter int unsigned SUM_W = IN_W + $clog2(N_IN)
) (
  input  logic [N_IN-1:0][IN_W-1:0] raw_in,
  input  logic [SUM_W-1:0]          threshold,
  output logic [SUM_W-1:0]          raw_sum,
  output logic                      high_conf
);
  always_comb begin
    raw_sum = '0;
    for (int i = 0; i < int'(N_IN); i++) raw_sum = raw_sum + SUM_W'(raw_in[i]);
    high_conf = raw_sum > threshold;
  end
endmodule
