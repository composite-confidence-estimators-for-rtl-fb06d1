// jrs_estimator: enhanced JRS confidence estimator (miss distance counters).
//
// A table of ENTRIES counters, CTR_W bits each, is indexed by the branch PC
// (word address) XOR the global history into which the prediction of the
// branch itself has already been shifted (the "enhanced" variant). The raw
// output is the counter value: the number of correct predictions seen by this
// entry since its last misprediction. On resolve the entry counts up,
// saturating at 2^CTR_W-1, if the prediction was correct, and is cleared if
// it was wrong. The table, counter width and clear-on-miss rule follow the
// document; the XOR hash, the saturation and the reset sweep are this
// design's choices.
//
// Interface and timing: lk_* is a combinational lookup (raw valid in the same
// cycle). up_* writes at the rising edge. After reset the table is cleared
// one entry per cycle; ready rises after ENTRIES cycles and up_* is ignored
// until then.
module jrs_estimator
  import cce_pkg::*;
#(
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned CTR_W   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      lk_pc,
  input  logic [GHR_W-1:0] lk_hist,
  output logic [CTR_W-1:0] raw,
  input  logic             up_valid,
  input  logic [31:0]      up_pc,
  input  logic [GHR_W-1:0] up_hist,
  input  logic             up_correct,
  output logic             ready
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [CTR_W-1:0] table_q [ENTRIES];
  logic [IW-1:0]    lk_idx, up_idx, init_idx;
  logic             init_busy;
  logic [CTR_W-1:0] cur, nxt;

  assign lk_idx = lk_pc[IW+1:2] ^ lk_hist[IW-1:0];
  assign up_idx = up_pc[IW+1:2] ^ up_hist[IW-1:0];
  assign raw    = table_q[lk_idx];
  assign ready  = !init_busy;

  always_comb begin
    cur = table_q[up_idx];
    if (!up_correct)         nxt = '0;          // misprediction: clear
    else if (cur != '1)      nxt = cur + 1'b1;  // correct: count up
    else                     nxt = cur;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      init_idx <= init_idx + 1'b1;
      if (init_idx == IW'(ENTRIES-1)) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy)     table_q[init_idx] <= '0;
    else if (up_valid) table_q[up_idx]   <= nxt;
  end
endmodule
