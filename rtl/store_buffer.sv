// store_buffer: FIFO of pending stores between the processor and the cache.
//
// Stores are pushed by the processor and leave in program order when the cache
// accepts the entry at the head. The processor therefore never waits for a
// store miss, only when the buffer is full. A load must not bypass an older
// store to the same word (a read-after-write dependency): the lookup port
// reports whether any buffered store writes the word of lookup_addr, and the
// processor holds such a load until that store has drained.
// The document's buffer is of unbounded size; this one has DEPTH entries.
//
// Interface
//   push/push_addr/push_data, full   : enqueue side (push ignored when full)
//   head_valid/head_addr/head_data, pop : dequeue side, pop when the cache takes it
//   lookup_addr -> lookup_hit         : combinational word-address match
//   count                             : number of buffered stores
// Timing: push and pop take effect at the clock edge; a store pushed in cycle t
// can be at the head in cycle t+1.
module store_buffer
  import nb_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  word_t                  push_addr,
  input  word_t                  push_data,
  output logic                   full,
  output logic                   head_valid,
  output word_t                  head_addr,
  output word_t                  head_data,
  input  logic                   pop,
  input  word_t                  lookup_addr,
  output logic                   lookup_hit,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned WB = $clog2(WORD_BYTES);

  word_t   addr_q [DEPTH];
  word_t   data_q [DEPTH];
  logic [DEPTH-1:0] valid_q;
  logic [PW-1:0] head_q, tail_q;
  logic [$clog2(DEPTH):0] count_q;

  logic do_push, do_pop;
  assign full    = (count_q == DEPTH[$clog2(DEPTH):0]);
  assign do_push = push && !full;
  assign do_pop  = pop && head_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      valid_q <= '0;
    end else begin
      if (do_push) begin
        addr_q[tail_q]  <= push_addr;
        data_q[tail_q]  <= push_data;
        valid_q[tail_q] <= 1'b1;
        tail_q <= (tail_q == PW'(DEPTH - 1)) ? '0 : tail_q + 1'b1;
      end
      if (do_pop) begin
        valid_q[head_q] <= 1'b0;
        head_q <= (head_q == PW'(DEPTH - 1)) ? '0 : head_q + 1'b1;
      end
      count_q <= count_q + ($clog2(DEPTH)+1)'(do_push) - ($clog2(DEPTH)+1)'(do_pop);
    end
  end

  assign head_valid = valid_q[head_q];
  assign head_addr  = addr_q[head_q];
  assign head_data  = data_q[head_q];
  assign count      = count_q;

  always_comb begin
    lookup_hit = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if (valid_q[i] && addr_q[i][XLEN-1:WB] == lookup_addr[XLEN-1:WB]) lookup_hit = 1'b1;
  end

endmodule
