// updown_estimator: Up/Down counter confidence estimator.
//
// Same organisation as the enhanced JRS estimator: ENTRIES counters of CTR_W
// bits indexed by the branch PC (word address) XOR the global history with
// the branch's own prediction shifted in. The difference is the training
// rule: a correct prediction counts the entry up (saturating at 2^CTR_W-1)
// and a misprediction counts it down (saturating at 0) instead of clearing
// it, so one miss costs confidence without wiping it out. Four-bit counters
// follow the document; the hash, the saturation at zero and the reset sweep
// are this design's choices.
//
// Interface and timing: lk_* is a combinational lookup. up_* writes at the
// rising edge. After reset the table is cleared one entry per cycle; ready
// rises after ENTRIES cycles and up_* is ignored until then.
module updown_estimator
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
    nxt = cur;
    if (up_correct) begin
      if (cur != '1) nxt = cur + 1'b1;
    end else begin
      if (cur != '0) nxt = cur - 1'b1;
    end
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
