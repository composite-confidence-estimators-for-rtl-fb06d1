// perceptron_self_est: self-estimator of the perceptron predictor.
//
// The magnitude of the perceptron output y grows with the probability that
// the prediction is right. This block takes |y|, shifts it right by SHIFT and
// saturates the result at 15, giving a 4-bit raw output on the same scale as
// the JRS and Up/Down counters. Using the scaled magnitude follows the
// document; the shift amount (3, which puts the training threshold of 68 at
// 8, mid-range) and the saturation are this design's choices. Purely
// combinational.
module perceptron_self_est
  import cce_pkg::*;
#(
  parameter int unsigned SHIFT = 3
) (
  input  logic signed [Y_W-1:0] y,
  output logic [3:0]            raw
);
  logic [Y_W-1:0] mag, scaled;
  always_comb begin
    mag    = y[Y_W-1] ? Y_W'(-y) : Y_W'(y);
    scaled = mag >> SHIFT;
    raw    = (scaled > Y_W'(15)) ? 4'd15 : scaled[3:0];
  end
endmodule
