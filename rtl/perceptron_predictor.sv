// perceptron_predictor: perceptron branch predictor (neural learning).
//
// The PC selects one of N_PERC perceptrons, each a vector of HIST+1 signed
// W_BITS-bit weights (a bias weight plus one per history bit). The output is
//   y = w0 + sum_i (h_i ? +w_i : -w_i)
// over the HIST most recent global history bits; y >= 0 predicts taken. At
// resolve the perceptron is trained when the prediction was wrong or |y| did
// not exceed THETA: the bias moves towards the outcome, and each w_i moves up
// if history bit i agreed with the outcome and down otherwise, saturating at
// the weight range. y is also the raw material for the self-estimate. The
// algorithm follows the document; the sizes (128 perceptrons, 28 history
// bits, 8-bit weights, THETA = floor(1.93*28 + 14) = 68, about 3.6 KB) are
// taken from the published perceptron predictor for a 4 KB budget, which
// the document uses without restating.
//
// Interface and timing: lk_* is a combinational lookup (the dot product is a
// single combinational adder tree). up_* gives the history and y the branch
// saw at prediction and writes at the rising edge. After reset the weights
// are cleared one perceptron per cycle; ready rises after N_PERC cycles.
module perceptron_predictor
  import cce_pkg::*;
#(
  parameter int unsigned N_PERC = 128,
  parameter int unsigned HIST   = 28,
  parameter int unsigned W_BITS = 8,
  parameter int          THETA  = 68
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [31:0]           lk_pc,
  input  logic [GHR_W-1:0]      lk_hist,
  output logic signed [Y_W-1:0] y,
  output logic                  taken,
  input  logic                  up_valid,
  input  logic [31:0]           up_pc,
  input  logic [GHR_W-1:0]      up_hist,
  input  logic                  up_taken,
  input  logic signed [Y_W-1:0] up_y,
  output logic                  ready
);
  localparam int unsigned IW = $clog2(N_PERC);
  localparam int          WMAX = (1 << (W_BITS-1)) - 1;
  localparam int          WMIN = -(1 << (W_BITS-1));

  typedef logic signed [W_BITS-1:0] weight_t;
  typedef weight_t [HIST:0] wvec_t;      // [0] is the bias weight

  wvec_t         weights [N_PERC];
  logic [IW-1:0] lk_idx, up_idx, init_idx;
  logic          init_busy;
  wvec_t         lk_w, up_w, up_nxt;

  assign lk_idx = lk_pc[IW+1:2];
  assign up_idx = up_pc[IW+1:2];
  assign lk_w   = weights[lk_idx];
  assign up_w   = weights[up_idx];
  assign ready  = !init_busy;

  always_comb begin
    y = Y_W'(lk_w[0]);
    for (int i = 1; i <= int'(HIST); i++) begin
      if (lk_hist[i-1]) y = y + Y_W'(lk_w[i]);
      else              y = y - Y_W'(lk_w[i]);
    end
  end
  assign taken = !y[Y_W-1];

  logic                  mispred, low_mag, train;
  logic signed [Y_W-1:0] mag;
  always_comb begin
    mispred = (!up_y[Y_W-1]) != up_taken;
    mag     = up_y[Y_W-1] ? -up_y : up_y;
    low_mag    = mag <= Y_W'(THETA);
    train   = mispred || low_mag;
    up_nxt  = up_w;
    for (int i = 0; i <= int'(HIST); i++) begin
      // Agreement of the input (1 for the bias) with the outcome.
      automatic logic agree = (i == 0) ? up_taken : (up_hist[i-1] == up_taken);
      if (agree) begin
        if (int'(up_w[i]) < WMAX) up_nxt[i] = up_w[i] + 1'b1;
      end else begin
        if (int'(up_w[i]) > WMIN) up_nxt[i] = up_w[i] - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == IW'(N_PERC-1)) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy)              weights[init_idx] <= '0;
    else if (up_valid && train) weights[up_idx]   <= up_nxt;
  end
endmodule
