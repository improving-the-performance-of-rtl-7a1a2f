// tb_nb_cache: directed test of the lockup-free cache against a fixed-latency
// memory model. It checks hit, primary, secondary and conflict handling, the
// cycle at which an implicit load completes (LATENCY cycles after the primary
// miss was sent), several primary misses pending at once, write-through
// stores to valid, pending and absent blocks, and a memory that refuses
// requests.
module tb_nb_cache;
  import nb_pkg::*;
  import tb_nb_pkg::*;
  localparam int L = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic p_valid, p_ack, p_hit, p_wait, s_valid, s_ack;
  acc_kind_e p_kind;
  word_t p_addr, p_rdata, s_addr, s_wdata;
  logic m_valid, m_ready, m_we, f_valid, accept;
  word_t m_addr, m_wdata, f_addr;
  logic [255:0] f_data;
  logic ev_p, ev_s, ev_c;
  logic [8:0] npend;
  int unsigned mreads, mwrites;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  nb_cache #(.CACHE_BYTES(8192), .BLOCK_BYTES(32)) dut (.clk, .rst_n,
    .p_valid, .p_kind, .p_addr, .p_ack, .p_hit, .p_rdata, .p_wait_fill(p_wait),
    .s_valid, .s_addr, .s_wdata, .s_ack,
    .m_req_valid(m_valid), .m_req_ready(m_ready), .m_req_we(m_we), .m_req_addr(m_addr),
    .m_req_wdata(m_wdata), .f_valid, .f_addr, .f_data,
    .ev_primary(ev_p), .ev_secondary(ev_s), .ev_conflict(ev_c), .n_pending(npend));

  mem_model #(.LATENCY(L), .BLOCK_BYTES(32), .MEM_WORDS(65536)) mem (.clk, .rst_n, .accept,
    .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .f_valid, .f_addr, .f_data, .reads(mreads), .writes(mwrites));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic word_t ival(word_t a);
    return init_word(32'(a[17:2]));
  endfunction

  // one processor access; returns the cycle it was acknowledged in
  int n_conf, n_prim, n_sec;
  task automatic pacc(input acc_kind_e k, input word_t a, output int ack_cyc,
                      output bit hit, output word_t data);
    @(negedge clk);
    p_valid = 1; p_kind = k; p_addr = a;
    forever begin
      #4;
      if (ev_c) n_conf++;
      if (ev_p) n_prim++;
      if (ev_s) n_sec++;
      if (p_ack) begin
        ack_cyc = cyc; hit = p_hit; data = p_rdata;
        @(posedge clk); #1;
        p_valid = 0;
        return;
      end
      @(negedge clk);
    end
  endtask

  task automatic sacc(input word_t a, input word_t d, output int ack_cyc);
    @(negedge clk);
    s_valid = 1; s_addr = a; s_wdata = d;
    forever begin
      #4;
      if (s_ack) begin
        ack_cyc = cyc;
        @(posedge clk); #1;
        s_valid = 0;
        return;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam word_t A = 32'h0000_1000, B = 32'h0000_2000, C = 32'h0000_0400, D = 32'h0000_0800,
                    E = 32'h0000_0c00, CONF = 32'h0000_2000 + 32'd8192;

  initial begin
    int c0, c1, cb0, cs, sa;
    bit h;
    word_t d;
    n_conf = 0; n_prim = 0; n_sec = 0;
    p_valid = 0; p_kind = ACC_LOAD; p_addr = 0; s_valid = 0; s_addr = 0; s_wdata = 0;
    accept = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. primary miss of an explicit load: completes at once without data
    pacc(ACC_LOAD, A, c0, h, d);
    chk(!h && n_prim == 1, "load A is a primary miss that does not block");
    chk(npend == 1, "one pending frame");
    // 2. secondary miss: same block, no memory request
    pacc(ACC_LOAD, A + 4, c1, h, d);
    chk(!h && n_sec == 1 && c1 == c0 + 1, "load A+4 is a secondary miss");
    chk(mreads == 1, "secondary miss sends no memory request");
    // 3. implicit load waits for the fill; data valid LATENCY cycles after the miss
    pacc(ACC_IMPLICIT, A + 4, c1, h, d);
    chk(h && d == ival(A + 4), "implicit load returns memory data");
    chk(c1 == c0 + L, $sformatf("implicit load completes at +%0d, expected +%0d", c1 - c0, L));
    chk(npend == 0, "no pending frame after the fill");
    // hit: one cycle
    pacc(ACC_LOAD, A + 28, c1, h, d);
    chk(h && d == ival(A + 28), "hit after fill");

    // 4. six primary misses pending together
    for (int k = 0; k < 6; k++) begin
      pacc(ACC_LOAD, B + 32 * k, c1, h, d);
      if (k == 0) cb0 = c1;
      chk(!h, "pipelined primary miss");
    end
    chk(npend == 6, $sformatf("six pending primary misses (%0d)", npend));
    // conflict miss to the pending frame of B: waits for the fill, then replaces it
    pacc(ACC_LOAD, CONF, c1, h, d);
    chk(!h && n_conf > 0, "conflict miss waited on the pending frame");
    chk(c1 == cb0 + L, $sformatf("conflict miss proceeds at +%0d, expected +%0d", c1 - cb0, L));
    for (int k = 1; k < 6; k++) begin
      pacc(ACC_IMPLICIT, B + 32 * k + 8, c1, h, d);
      chk(h && d == ival(B + 32 * k + 8), "implicit load of pipelined miss");
    end
    // B's block was replaced: its implicit load misses again and still completes
    pacc(ACC_IMPLICIT, B + 12, c1, h, d);
    chk(h && d == ival(B + 12), "implicit load after replacement");
    pacc(ACC_IMPLICIT, CONF, c1, h, d);
    chk(h && d == ival(CONF), "implicit load after the frame went back to B");
    pacc(ACC_IMPLICIT, CONF + 4, c1, h, d);
    chk(h && d == ival(CONF + 4), "conflicting block data");

    // 5. store to a valid block: cache and memory updated
    pacc(ACC_IMPLICIT, A, c1, h, d);
    sacc(A + 8, 32'hCAFE_0001, sa);
    pacc(ACC_LOAD, A + 8, c1, h, d);
    chk(h && d == 32'hCAFE_0001, "store updates a valid block");
    @(negedge clk);
    chk(mem.mem[(A + 8) >> 2] == 32'hCAFE_0001, "store written through to memory");

    // 6. store to a pending block waits for the fill
    pacc(ACC_LOAD, C, c0, h, d);
    sacc(C + 8, 32'hBEEF_0002, sa);
    chk(sa >= c0 + L, $sformatf("store to pending block held until fill (+%0d)", sa - c0));
    pacc(ACC_LOAD, C + 8, c1, h, d);
    chk(h && d == 32'hBEEF_0002, "store to pending block survives the fill");

    // 7. store to an absent block does not allocate
    sacc(D + 4, 32'h1234_5678, sa);
    pacc(ACC_LOAD, D + 4, c1, h, d);
    chk(!h, "store miss does not allocate");
    pacc(ACC_IMPLICIT, D + 4, c1, h, d);
    chk(h && d == 32'h1234_5678, "memory holds the stored word");

    // 8. memory refuses requests: the primary miss waits
    accept = 0;
    fork
      begin pacc(ACC_LOAD, E, c1, h, d); end
      begin repeat (4) @(posedge clk); cs = cyc; #1 accept = 1; end
    join
    chk(c1 >= cs, "primary miss waits for the memory to accept");

    // 9. the store port is served while the processor waits on a fill
    pacc(ACC_LOAD, E + 8192, c0, h, d);   // conflict with pending E: waits, then misses
    chk(!h, "conflict with E then primary miss");
    fork
      begin pacc(ACC_IMPLICIT, A + 4096 * 4, c1, h, d); end
      begin sacc(A + 12, 32'h7777_0003, sa); end
    join
    chk(sa < c1, "store drains while the processor waits for a fill");

    $display("hits/misses: primary=%0d secondary=%0d conflict-cycles=%0d", n_prim, n_sec, n_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
