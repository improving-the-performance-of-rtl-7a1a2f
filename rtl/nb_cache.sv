// nb_cache: lockup-free direct-mapped data cache without miss status registers.
//
// Outstanding misses are recorded in the cache itself: each block frame is
// invalid, valid or pending. A processor access is handled as follows.
//   hit                  : data returned in the same cycle.
//   primary miss         : the frame (invalid, or valid with another tag) is
//                          allocated and marked pending, and one block read is
//                          sent to memory. An explicit load completes at once
//                          with hit=0; the processor then keeps the address in
//                          the target register and marks it busy.
//   secondary miss       : the frame is pending for the same tag. An explicit
//                          load completes at once with hit=0 and no memory
//                          request is sent.
//   conflict miss        : the frame is pending for another tag. A pending frame
//                          cannot be replaced, so the access waits until the
//                          fill arrives and is then retried.
//   implicit load        : completes only on a hit. On a miss it allocates (if
//                          needed) and waits, so the processor blocks until the
//                          block has been filled.
// A fill from memory writes the whole block and turns the frame valid.
// There is no limit on the number of pending misses other than the number of
// frames. All of this follows the document.
//
// Stores come from the store buffer, which gets the cache when the processor is
// not using it (the processor does not access it, or waits on a pending frame).
// Stores are write-through without allocation: a store updates the word if the
// block is valid and always writes the word to memory. A store to a pending
// block waits in the buffer until the fill, so the filled block cannot
// overwrite it. This write policy is this design's choice; the document only
// says stores are buffered.
//
// WRITE_POSTING = 1 adds the refinement the document proposes for
// read-after-write dependences. A store that misses allocates the frame
// (pending) and sends a block read; once the frame is pending for its block,
// the store writes its word into the frame, marks that word full and writes it
// through to memory. A load or implicit load of a full word in a pending frame
// hits; a load of an empty word is a secondary miss as before. The fill writes
// only the words not marked full. A store to a frame pending for another block
// cannot allocate and is written through only. Doing the allocation and the
// posting in two cycles, so the one request channel carries the block read and
// then the word write, is this design's choice. The default (0) is the basic
// architecture.
//
// Interfaces
//   processor : p_valid, p_kind, p_addr -> p_ack, p_hit, p_rdata (combinational);
//               p_wait_fill says the access waits for a fill this cycle.
//   stores    : s_valid, s_addr, s_wdata -> s_ack (combinational)
//   memory    : one request channel m_req_* (valid/ready; we=1 word write,
//               we=0 block read of the block holding m_req_addr), and a fill
//               channel f_valid/f_addr/f_data that carries a whole block and
//               cannot be stalled.
//   events    : ev_primary (load misses only), ev_secondary, ev_conflict
//               pulse per cycle; n_pending counts pending frames, including
//               frames allocated by stores.
// Timing: tag, state and data arrays are read combinationally and written at
// the clock edge, so a hit costs one cycle and a frame filled at edge t can hit
// in the cycle after.
module nb_cache
  import nb_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned BLOCK_BYTES = 32,
  parameter bit          WRITE_POSTING = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // processor port
  input  logic                     p_valid,
  input  acc_kind_e                p_kind,
  input  word_t                    p_addr,
  output logic                     p_ack,
  output logic                     p_hit,
  output word_t                    p_rdata,
  output logic                     p_wait_fill,
  // store buffer port
  input  logic                     s_valid,
  input  word_t                    s_addr,
  input  word_t                    s_wdata,
  output logic                     s_ack,
  // memory request channel
  output logic                     m_req_valid,
  input  logic                     m_req_ready,
  output logic                     m_req_we,
  output word_t                    m_req_addr,
  output word_t                    m_req_wdata,
  // memory fill channel
  input  logic                     f_valid,
  input  word_t                    f_addr,
  input  logic [BLOCK_BYTES*8-1:0] f_data,
  // events
  output logic                     ev_primary,
  output logic                     ev_secondary,
  output logic                     ev_conflict,
  output logic [$clog2(CACHE_BYTES/BLOCK_BYTES):0] n_pending
);

  localparam int unsigned NFRAMES  = CACHE_BYTES / BLOCK_BYTES;
  localparam int unsigned OFF_W    = $clog2(BLOCK_BYTES);
  localparam int unsigned IDX_W    = $clog2(NFRAMES);
  localparam int unsigned TAG_W    = XLEN - OFF_W - IDX_W;
  localparam int unsigned WB       = $clog2(WORD_BYTES);
  localparam int unsigned WSEL_W   = OFF_W - WB;
  localparam int unsigned BLK_BITS = BLOCK_BYTES * 8;
  localparam int unsigned WPB      = BLOCK_BYTES / WORD_BYTES;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  blk_state_e                  state_q [NFRAMES];
  tag_t                        tag_q   [NFRAMES];
  logic [BLK_BITS-1:0]         data_q  [NFRAMES];
  logic [WPB-1:0]              full_q  [NFRAMES];  // posted words of a pending frame
  logic [$clog2(NFRAMES):0]    npend_q;

  function automatic idx_t idx_of(word_t a);
    return a[OFF_W +: IDX_W];
  endfunction
  function automatic tag_t tag_of(word_t a);
    return a[XLEN-1 -: TAG_W];
  endfunction
  function automatic logic [WSEL_W-1:0] wsel_of(word_t a);
    return a[WB +: WSEL_W];
  endfunction

  // ---------------- processor access classification ----------------
  idx_t       p_idx;
  blk_state_e p_state;
  logic       p_tag_eq, p_is_hit, p_is_pend_same, p_is_conflict, p_word_full;

  assign p_idx          = idx_of(p_addr);
  assign p_state        = state_q[p_idx];
  assign p_tag_eq       = (tag_q[p_idx] == tag_of(p_addr));
  assign p_is_hit       = (p_state == BLK_VALID) && p_tag_eq;
  assign p_is_pend_same = (p_state == BLK_PENDING) && p_tag_eq;
  assign p_is_conflict  = (p_state == BLK_PENDING) && !p_tag_eq;
  assign p_word_full    = WRITE_POSTING && p_is_pend_same && full_q[p_idx][wsel_of(p_addr)];
  assign p_rdata        = data_q[p_idx][wsel_of(p_addr)*XLEN +: XLEN];

  logic p_alloc;     // processor access allocates a frame this cycle
  logic p_uses;      // processor owns the cache this cycle

  always_comb begin
    p_ack        = 1'b0;
    p_hit        = 1'b0;
    p_alloc      = 1'b0;
    p_wait_fill  = 1'b0;
    ev_secondary = 1'b0;
    ev_conflict  = 1'b0;
    if (p_valid) begin
      if (p_is_hit || p_word_full) begin
        p_ack = 1'b1;
        p_hit = 1'b1;
      end else if (p_is_pend_same) begin
        if (p_kind == ACC_LOAD) begin
          p_ack        = 1'b1;   // secondary miss: no memory request
          ev_secondary = 1'b1;
        end else begin
          p_wait_fill  = 1'b1;   // implicit load waits for its block
        end
      end else if (p_is_conflict) begin
        p_wait_fill = 1'b1;      // pending frame cannot be replaced
        ev_conflict = 1'b1;
      end else begin
        // primary miss: allocate when the memory takes the request
        p_alloc = m_req_ready;
        p_ack   = m_req_ready && (p_kind == ACC_LOAD);
      end
    end
  end

  assign p_uses = p_valid && !p_wait_fill;

  // ---------------- store access ----------------
  idx_t s_idx;
  logic s_go, s_tag_eq, s_pend_same, s_valid_same, s_need_alloc, s_alloc, s_write, s_upd;

  assign s_idx        = idx_of(s_addr);
  assign s_go         = s_valid && !p_uses;
  assign s_tag_eq     = (tag_q[s_idx] == tag_of(s_addr));
  assign s_pend_same  = (state_q[s_idx] == BLK_PENDING) && s_tag_eq;
  assign s_valid_same = (state_q[s_idx] == BLK_VALID) && s_tag_eq;
  // write posting: a store whose frame is neither valid nor pending for its
  // block first allocates it
  assign s_need_alloc = WRITE_POSTING && (state_q[s_idx] != BLK_PENDING) && !s_valid_same;
  assign s_alloc      = s_go && s_need_alloc && m_req_ready;
  // the word write: held while its block is pending, unless posting
  assign s_write      = s_go && !s_need_alloc && (!s_pend_same || WRITE_POSTING);
  assign s_ack        = s_write && m_req_ready;
  assign s_upd        = s_ack && (s_valid_same || s_pend_same);

  // ---------------- memory request ----------------
  always_comb begin
    m_req_valid = 1'b0;
    m_req_we    = 1'b0;
    m_req_addr  = '0;
    m_req_wdata = '0;
    if (p_valid && !p_is_hit && !p_is_pend_same && !p_is_conflict) begin
      m_req_valid = 1'b1;
      m_req_addr  = {p_addr[XLEN-1:OFF_W], {OFF_W{1'b0}}};
    end else if (s_go && s_need_alloc) begin
      m_req_valid = 1'b1;
      m_req_addr  = {s_addr[XLEN-1:OFF_W], {OFF_W{1'b0}}};
    end else if (s_write) begin
      m_req_valid = 1'b1;
      m_req_we    = 1'b1;
      m_req_addr  = s_addr;
      m_req_wdata = s_wdata;
    end
  end

  assign ev_primary = p_alloc;

  // ---------------- state update ----------------
  idx_t f_idx;
  assign f_idx = idx_of(f_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NFRAMES; i++) state_q[i] <= BLK_INVALID;
      npend_q <= '0;
    end else begin
      if (f_valid) state_q[f_idx] <= BLK_VALID;
      if (p_alloc) state_q[p_idx] <= BLK_PENDING;
      if (s_alloc) state_q[s_idx] <= BLK_PENDING;
      npend_q <= npend_q + ($clog2(NFRAMES)+1)'(p_alloc) + ($clog2(NFRAMES)+1)'(s_alloc)
                 - ($clog2(NFRAMES)+1)'(f_valid);
    end
  end

  always_ff @(posedge clk) begin
    if (p_alloc) begin
      tag_q[p_idx]  <= tag_of(p_addr);
      full_q[p_idx] <= '0;
    end
    if (s_alloc) begin
      tag_q[s_idx]  <= tag_of(s_addr);
      full_q[s_idx] <= '0;
    end
    // the fill keeps posted words; a store in the same cycle is newer still
    if (f_valid)
      for (int w = 0; w < WPB; w++)
        if (!(WRITE_POSTING && full_q[f_idx][w]))
          data_q[f_idx][w*XLEN +: XLEN] <= f_data[w*XLEN +: XLEN];
    if (s_upd) begin
      data_q[s_idx][wsel_of(s_addr)*XLEN +: XLEN] <= s_wdata;
      if (s_pend_same) full_q[s_idx][wsel_of(s_addr)] <= 1'b1;
    end
  end

  assign n_pending = npend_q;

  // A fill must be for a frame that is pending with the same tag; a frame is
  // never allocated and filled in the same cycle.
  a_fill_pending: assert property (@(posedge clk) disable iff (!rst_n)
      f_valid |-> (state_q[f_idx] == BLK_PENDING && tag_q[f_idx] == tag_of(f_addr)))
    else $error("nb_cache: fill for a frame that is not pending");
  a_no_alloc_fill: assert property (@(posedge clk) disable iff (!rst_n)
      !(f_valid && ((p_alloc && p_idx == f_idx) || (s_alloc && s_idx == f_idx))))
    else $error("nb_cache: allocation and fill of one frame in one cycle");

endmodule
