// self_estimator: saturating-counter self-estimator of a PHT-based predictor.
//
// The counter c that produced a prediction already says how sure the
// predictor is. This block folds it so that a larger value always means a
// stronger vote for the predicted direction: c' = c when the prediction is
// taken and c' = 2^N - 1 - c when it is not taken (the bitwise complement of
// c). The formula is the document's. Purely combinational.
module self_estimator #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] ctr,
  input  logic         pred_taken,
  output logic [N-1:0] cprime
);
  assign cprime = pred_taken ? ctr : ~ctr;
endmodule
