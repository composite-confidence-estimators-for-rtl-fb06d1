// gshare_predictor: gshare branch direction predictor with its self-estimate.
//
// A pattern history table of ENTRIES two-bit saturating counters is indexed
// by the branch PC (word address) XOR the low HIST_LEN bits of the global
// history. The high bit of the counter is the prediction (1 = taken). At
// resolve the counter of the same index counts up if the branch was taken
// and down otherwise. The counter read for the prediction is brought out so
// that a self_estimator can turn it into a confidence value. The 16K-entry
// table and the counter rules follow the document; the history length (the
// document picks it by search and does not report it), the initial counter
// value and the re-read of the counter at resolve are this design's choices.
//
// Interface and timing: lk_* is a combinational lookup. up_* writes at the
// rising edge. After reset the table is set to weakly-not-taken, one entry
// per cycle; ready rises after ENTRIES cycles.
module gshare_predictor
  import cce_pkg::*;
#(
  parameter int unsigned ENTRIES  = 16384,
  parameter int unsigned HIST_LEN = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [31:0]      lk_pc,
  input  logic [GHR_W-1:0] lk_hist,
  output logic             taken,
  output logic [1:0]       ctr,
  input  logic             up_valid,
  input  logic [31:0]      up_pc,
  input  logic [GHR_W-1:0] up_hist,
  input  logic             up_taken,
  output logic             ready
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0]    pht [ENTRIES];
  logic [IW-1:0] lk_idx, up_idx, init_idx;
  logic [IW-1:0] lk_h, up_h;
  logic          init_busy;
  logic [1:0]    cur, nxt;

  // Only the low HIST_LEN bits of history take part in the hash.
  assign lk_h   = IW'(lk_hist & ((GHR_W'(1) << HIST_LEN) - 1));
  assign up_h   = IW'(up_hist & ((GHR_W'(1) << HIST_LEN) - 1));
  assign lk_idx = lk_pc[IW+1:2] ^ lk_h;
  assign up_idx = up_pc[IW+1:2] ^ up_h;
  assign ctr    = pht[lk_idx];
  assign taken  = ctr[1];
  assign ready  = !init_busy;

  always_comb begin
    cur = pht[up_idx];
    nxt = cur;
    if (up_taken && cur != 2'b11)       nxt = cur + 2'd1;
    else if (!up_taken && cur != 2'b00) nxt = cur - 2'd1;
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
    if (init_busy)     pht[init_idx] <= 2'b01;
    else if (up_valid) pht[up_idx]   <= nxt;
  end
endmodule
