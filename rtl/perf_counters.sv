// perf_counters: execution-time and miss statistics of the processor/cache.
//
// Counts, while `running` is set: cycles (execution time), cycles in which the
// processor is blocked, primary and secondary misses, completed implicit loads
// and cycles spent waiting on a pending frame of another tag. In every blocked
// cycle it adds the number of pending primary misses to pending_sum, so
// pending_sum / blocked_cycles is the miss overlap factor: the average number of
// primary misses outstanding while the processor is blocked. The metrics are
// the document's; the counter set and the 32-bit widths are this design's.
// Timing: inputs are sampled at the clock edge; counters clear on reset.
module perf_counters
  import nb_pkg::*;
#(
  parameter int unsigned PEND_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              running,
  input  logic              blocked,
  input  logic              ev_primary,
  input  logic              ev_secondary,
  input  logic              ev_implicit,
  input  logic              ev_conflict,
  input  logic [PEND_W-1:0] n_pending,
  output perf_t             perf
);

  perf_t q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (running) begin
      q.cycles <= q.cycles + 1;
      if (blocked) begin
        q.blocked_cycles <= q.blocked_cycles + 1;
        q.pending_sum    <= q.pending_sum + 32'(n_pending);
      end
      if (ev_primary)   q.primary_misses   <= q.primary_misses + 1;
      if (ev_secondary) q.secondary_misses <= q.secondary_misses + 1;
      if (ev_implicit)  q.implicit_loads   <= q.implicit_loads + 1;
      if (ev_conflict)  q.conflict_cycles  <= q.conflict_cycles + 1;
    end
  end

  assign perf = q;

endmodule
