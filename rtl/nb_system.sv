// nb_system: processor with non-blocking loads, store buffer and lockup-free
// data cache.
//
// The processor (nb_core, with its busy-tagged register file) issues loads to
// the cache (nb_cache) and stores to the store buffer (store_buffer), which
// drains into the cache whenever the processor leaves the cache free.
// perf_counters measures execution time and the miss overlap factor.
// Main memory and the instruction cache are outside: the memory is reached
// through one request channel (block reads and word writes) and a fill channel
// that returns whole blocks; instructions come from imem_addr/imem_instr.
// The defaults are the document's: 8 KB direct-mapped data cache with 32-byte
// blocks, 32 registers, and 3-cycle multiplies (the document's floating-point
// operations take 3 to 5 cycles). The store buffer depth is this design's
// choice (the document assumes an unbounded buffer). WRITE_POSTING selects the
// cache's write-posting mode, the refinement the document proposes for
// read-after-write dependences; it is off by default, as in the basic design.
// done is set when the processor has halted, the store buffer is empty and no
// miss is pending, that is, when memory holds the program's final state.
module nb_system
  import nb_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned BLOCK_BYTES = 32,
  parameter int unsigned SB_DEPTH    = 16,
  parameter int unsigned MUL_CYCLES  = 3,
  parameter bit          WRITE_POSTING = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output word_t                    imem_addr,
  input  instr_t                   imem_instr,
  output logic                     m_req_valid,
  input  logic                     m_req_ready,
  output logic                     m_req_we,
  output word_t                    m_req_addr,
  output word_t                    m_req_wdata,
  input  logic                     f_valid,
  input  word_t                    f_addr,
  input  logic [BLOCK_BYTES*8-1:0] f_data,
  output logic                     halted,
  output logic                     done,
  output perf_t                    perf,
  output logic                     ev_raw_stall,
  output logic                     ev_sb_full,
  output logic                     ev_war_load
);

  localparam int unsigned PEND_W = $clog2(CACHE_BYTES / BLOCK_BYTES) + 1;

  logic      c_valid, c_ack, c_hit;
  acc_kind_e c_kind;
  word_t     c_addr, c_rdata;
  logic      sb_push, sb_full, sb_hit, sb_hv, sb_pop;
  word_t     sb_addr, sb_data, sb_look, sb_haddr, sb_hdata;
  logic [$clog2(SB_DEPTH):0] sb_count;
  logic      blocked, ev_implicit, ev_primary, ev_secondary, ev_conflict;
  logic [PEND_W-1:0] n_pending;

  nb_core #(.MUL_CYCLES(MUL_CYCLES)) u_core (
    .clk, .rst_n,
    .imem_addr, .imem_instr,
    .c_valid, .c_kind, .c_addr, .c_ack, .c_hit, .c_rdata,
    .sb_push, .sb_addr, .sb_data, .sb_full,
    .sb_lookup_addr(sb_look), .sb_lookup_hit(sb_hit),
    .halted, .blocked, .ev_implicit, .ev_raw_stall, .ev_sb_full, .ev_war_load
  );

  store_buffer #(.DEPTH(SB_DEPTH)) u_sb (
    .clk, .rst_n,
    .push(sb_push), .push_addr(sb_addr), .push_data(sb_data), .full(sb_full),
    .head_valid(sb_hv), .head_addr(sb_haddr), .head_data(sb_hdata), .pop(sb_pop),
    .lookup_addr(sb_look), .lookup_hit(sb_hit), .count(sb_count)
  );

  nb_cache #(.CACHE_BYTES(CACHE_BYTES), .BLOCK_BYTES(BLOCK_BYTES), .WRITE_POSTING(WRITE_POSTING)) u_cache (
    .clk, .rst_n,
    .p_valid(c_valid), .p_kind(c_kind), .p_addr(c_addr),
    .p_ack(c_ack), .p_hit(c_hit), .p_rdata(c_rdata), .p_wait_fill(),
    .s_valid(sb_hv), .s_addr(sb_haddr), .s_wdata(sb_hdata), .s_ack(sb_pop),
    .m_req_valid, .m_req_ready, .m_req_we, .m_req_addr, .m_req_wdata,
    .f_valid, .f_addr, .f_data,
    .ev_primary, .ev_secondary, .ev_conflict, .n_pending
  );

  perf_counters #(.PEND_W(PEND_W)) u_perf (
    .clk, .rst_n,
    .running(!halted), .blocked,
    .ev_primary, .ev_secondary, .ev_implicit, .ev_conflict,
    .n_pending, .perf
  );

  assign done = halted && (sb_count == '0) && (n_pending == '0);

endmodule
