// pipeline_gating: fetch gating on the count of unresolved low-confidence branches.
//
// Every branch that is fetched is given a slot in an age-ordered ring of
// DEPTH in-flight branches, together with its confidence (low or high). The
// controller keeps lc_count, the number of slots that are unresolved and low
// confidence, and raises fetch_gate while lc_count >= GATE_COUNT, so the
// front end stops fetching down a path that is probably wrong. Fetch resumes
// as soon as enough of those branches have resolved. When a branch resolves
// as mispredicted, every younger branch is on the wrong path: their slots
// are squashed (and stop counting) and the ring's tail moves back to just
// after the mispredicted branch. Resolved slots are retired from the head of
// the ring, one per cycle. Gating at three low-confidence branches follows
// the document; the ring, its depth and the squash rule are this design's
// choices.
//
// Interface and timing: alloc_valid with alloc_ready allocates slot alloc_tag
// at the rising edge; alloc_ready is low when the ring is full or when a
// misprediction is being resolved in the same cycle. resolve_valid frees
// resolve_tag at the rising edge. lc_count and fetch_gate are registered
// state decoded combinationally, so they reflect every allocation and
// resolution from the next cycle on.
module pipeline_gating #(
  parameter int unsigned DEPTH      = 32,
  parameter int unsigned GATE_COUNT = 3,
  localparam int unsigned TW        = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_valid,
  input  logic          alloc_low_conf,
  output logic          alloc_ready,
  output logic [TW-1:0] alloc_tag,
  input  logic          resolve_valid,
  input  logic [TW-1:0] resolve_tag,
  input  logic          resolve_mispredict,
  output logic [TW:0]   lc_count,
  output logic          fetch_gate
);
  logic [DEPTH-1:0] inflight_q;   // allocated and not yet resolved
  logic [DEPTH-1:0] lowconf_q;    // allocated as low confidence
  logic [TW:0]      head_q, tail_q;
  logic [TW:0]      occupancy;
  logic             squash;

  assign occupancy   = tail_q - head_q;
  assign squash      = resolve_valid && resolve_mispredict;
  assign alloc_ready = (occupancy != (TW+1)'(DEPTH)) && !squash;
  assign alloc_tag   = tail_q[TW-1:0];

  always_comb begin
    lc_count = '0;
    for (int i = 0; i < int'(DEPTH); i++)
      lc_count = lc_count + (TW+1)'(inflight_q[i] && lowconf_q[i]);
  end
  assign fetch_gate = lc_count >= (TW+1)'(GATE_COUNT);

  // Age of slot i relative to the head (0 = oldest).
  function automatic logic [TW-1:0] age(input logic [TW-1:0] slot, input logic [TW:0] head);
    return slot - head[TW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inflight_q <= '0;
      lowconf_q  <= '0;
      head_q     <= '0;
      tail_q     <= '0;
    end else begin
      // Retire one resolved slot from the head.
      if (occupancy != '0 && !inflight_q[head_q[TW-1:0]]) head_q <= head_q + 1'b1;
      if (resolve_valid) begin
        inflight_q[resolve_tag] <= 1'b0;
        if (resolve_mispredict) begin
          // Squash everything younger than the mispredicted branch.
          for (int i = 0; i < int'(DEPTH); i++)
            if (age(TW'(i), head_q) > age(resolve_tag, head_q)) inflight_q[i] <= 1'b0;
          tail_q <= head_q + (TW+1)'(age(resolve_tag, head_q)) + 1'b1;
        end
      end
      if (alloc_valid && alloc_ready) begin
        inflight_q[tail_q[TW-1:0]] <= 1'b1;
        lowconf_q[tail_q[TW-1:0]]  <= alloc_low_conf;
        tail_q                     <= tail_q + 1'b1;
      end
    end
  end

`ifndef SYNTHESIS
  // A resolving branch must be one that is in flight.
  a_resolve_inflight: assert property (@(posedge clk) disable iff (!rst_n)
    resolve_valid |-> inflight_q[resolve_tag]);
`endif
endmodule
