// tb_nb_core: runs short programs on the processor connected to the cache,
// a two-entry store buffer and the memory model, and checks register and
// memory results and cycle counts: a load miss that does not block, a
// secondary miss, implicit loads that block until the fill, a load held by a
// buffered store to the same word, a store that forces the implicit load of a
// pending register, a full store buffer, a conflict miss, the 3-cycle
// multiply, and the signed BLT branch.
module tb_nb_core;
  import nb_pkg::*;
  import tb_nb_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  word_t imem_addr;
  instr_t prog [64];
  instr_t imem_instr;
  assign imem_instr = prog[imem_addr[5:0]];

  logic c_valid, c_ack, c_hit, sb_push, sb_full, sb_hit, halted, blocked;
  logic ev_impl, ev_raw, ev_sbf, ev_war;
  acc_kind_e c_kind;
  word_t c_addr, c_rdata, sb_addr, sb_data, sb_look, sb_ha, sb_hd;
  logic sb_hv, sb_pop;
  logic [1:0] sb_cnt;
  logic m_valid, m_ready, m_we, f_valid;
  word_t m_addr, m_wdata, f_addr;
  logic [255:0] f_data;
  logic ev_p, ev_s, ev_c;
  logic [8:0] npend;
  int unsigned mreads, mwrites;

  nb_core dut (.clk, .rst_n, .imem_addr, .imem_instr,
    .c_valid, .c_kind, .c_addr, .c_ack, .c_hit, .c_rdata,
    .sb_push, .sb_addr, .sb_data, .sb_full, .sb_lookup_addr(sb_look), .sb_lookup_hit(sb_hit),
    .halted, .blocked, .ev_implicit(ev_impl), .ev_raw_stall(ev_raw), .ev_sb_full(ev_sbf),
    .ev_war_load(ev_war));

  store_buffer #(.DEPTH(2)) sb (.clk, .rst_n, .push(sb_push), .push_addr(sb_addr),
    .push_data(sb_data), .full(sb_full), .head_valid(sb_hv), .head_addr(sb_ha),
    .head_data(sb_hd), .pop(sb_pop), .lookup_addr(sb_look), .lookup_hit(sb_hit), .count(sb_cnt));

  nb_cache #(.CACHE_BYTES(8192), .BLOCK_BYTES(32)) cache (.clk, .rst_n,
    .p_valid(c_valid), .p_kind(c_kind), .p_addr(c_addr), .p_ack(c_ack), .p_hit(c_hit),
    .p_rdata(c_rdata), .p_wait_fill(),
    .s_valid(sb_hv), .s_addr(sb_ha), .s_wdata(sb_hd), .s_ack(sb_pop),
    .m_req_valid(m_valid), .m_req_ready(m_ready), .m_req_we(m_we), .m_req_addr(m_addr),
    .m_req_wdata(m_wdata), .f_valid, .f_addr, .f_data,
    .ev_primary(ev_p), .ev_secondary(ev_s), .ev_conflict(ev_c), .n_pending(npend));

  mem_model #(.LATENCY(L), .BLOCK_BYTES(32), .MEM_WORDS(65536)) mem (.clk, .rst_n,
    .accept(1'b1), .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .f_valid, .f_addr, .f_data, .reads(mreads), .writes(mwrites));

  int checks = 0, failures = 0;
  int cycles = 0, nblocked = 0, n_impl = 0, n_raw = 0, n_sbf = 0, n_war = 0, n_conf = 0;
  int n_prim = 0, n_sec = 0;
  always @(posedge clk) if (rst_n && !halted) begin
    cycles++;
    if (blocked) nblocked++;
    if (ev_impl) n_impl++;
    if (ev_raw) n_raw++;
    if (ev_sbf) n_sbf++;
    if (ev_war) n_war++;
    if (ev_c) n_conf++;
    if (ev_p) n_prim++;
    if (ev_s) n_sec++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t ival(word_t a);
    return init_word(32'(a[17:2]));
  endfunction
  function automatic word_t rg(int r);
    return dut.u_rf.regs_q[r];
  endfunction

  task automatic run();
    rst_n = 0;
    repeat (3) @(posedge clk);
    cycles = 0; nblocked = 0; n_impl = 0; n_raw = 0; n_sbf = 0; n_war = 0; n_conf = 0;
    n_prim = 0; n_sec = 0;
    @(negedge clk) rst_n = 1;
    wait (halted);
    repeat (3 * L) @(posedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) prog[i] = i_halt();
    // program 1: miss, secondary miss, use, store, read-after-write
    prog[0] = i_addi(1, 0, 32'h100);
    prog[1] = i_ld(2, 1, 0);
    prog[2] = i_ld(3, 1, 4);
    prog[3] = i_add(4, 2, 3);
    prog[4] = i_st(4, 1, 8);
    prog[5] = i_ld(5, 1, 8);
    prog[6] = i_halt();
    run();
    chk(rg(2) == ival(32'h100) && rg(3) == ival(32'h104), "loaded values");
    chk(rg(4) == ival(32'h100) + ival(32'h104), "sum of loaded values");
    chk(rg(5) == rg(4), "load after store reads the stored value");
    chk(mem.mem[32'h108 >> 2] == rg(4), "store reached memory");
    chk(n_prim == 1 && n_sec == 1, $sformatf("one primary (%0d) and one secondary (%0d) miss", n_prim, n_sec));
    chk(n_impl == 2, "two implicit loads");
    chk(n_raw == 1, $sformatf("one RAW stall cycle (%0d)", n_raw));
    // blocked: implicit load waits from cycle 3 to the fill (L-1 cycles), the
    // second implicit load hits (1 cycle), the RAW stall (1 cycle)
    chk(nblocked == L + 1, $sformatf("blocked cycles %0d, expected %0d", nblocked, L + 1));
    chk(cycles == 7 + L + 1, $sformatf("execution time %0d, expected %0d", cycles, 7 + L + 1));

    // program 2: write-after-read, full store buffer, conflict miss
    for (int i = 0; i < 64; i++) prog[i] = i_halt();
    prog[0]  = i_addi(1, 0, 32'h100);
    prog[1]  = i_addi(7, 0, 55);
    prog[2]  = i_ld(6, 1, 64);          // primary miss, r6 busy
    prog[3]  = i_st(7, 1, 64);          // must first complete r6
    prog[4]  = i_ld(10, 1, 128);        // primary miss
    prog[5]  = i_st(7, 1, 132);         // held in buffer (pending block)
    prog[6]  = i_st(7, 1, 136);
    prog[7]  = i_st(7, 1, 140);         // buffer full
    prog[8]  = i_lui(11, 1);            // 8192
    prog[9]  = i_add(12, 1, 11);
    prog[10] = i_ld(14, 1, 192);        // primary miss
    prog[11] = i_ld(13, 12, 192);       // conflict with pending frame
    prog[12] = i_add(15, 13, 14);
    prog[13] = i_halt();
    run();
    chk(rg(6) == ival(32'h140), "pending load returns the value from before the store");
    chk(mem.mem[32'h140 >> 2] == 55, "store after pending load reached memory");
    chk(mem.mem[32'h184 >> 2] == 55 && mem.mem[32'h188 >> 2] == 55 && mem.mem[32'h18c >> 2] == 55,
        "buffered stores reached memory");
    chk(n_war == 1, "store forced one implicit load");
    chk(n_sbf > 0, "store buffer was full");
    chk(n_conf > 0, "conflict miss waited");
    chk(rg(13) == ival(32'h1c0 + 8192) && rg(14) == ival(32'h1c0), "conflicting loads");
    chk(rg(15) == rg(13) + rg(14), "sum after conflict");
    chk(rg(11) == 8192, "LUI");

    // program 3: a counted loop with a branch and multiply
    for (int i = 0; i < 64; i++) prog[i] = i_halt();
    prog[0] = i_addi(1, 0, 5);          // counter
    prog[1] = i_addi(2, 0, 1);          // product
    prog[2] = i_addi(3, 0, 3);
    prog[3] = i_mul(2, 2, 3);
    prog[4] = i_addi(1, 1, -1);
    prog[5] = i_bne(1, 0, -2);
    prog[6] = i_sub(4, 0, 2);
    prog[7] = i_halt();
    run();
    chk(rg(2) == 243 && rg(4) == -243, "loop with branch and multiply");
    // each MUL occupies the processor for 3 cycles; those are not blocked cycles
    chk(cycles == 3 + 5 * (3 + 2) + 2, $sformatf("loop time %0d", cycles));
    chk(nblocked == 0, "a multi-cycle MUL is not counted as blocked");
    chk(rg(0) == 0, "register 0 stays zero");

    // program 4: BLT compares signed values
    for (int i = 0; i < 64; i++) prog[i] = i_halt();
    prog[0] = i_addi(1, 0, -3);
    prog[1] = i_addi(2, 0, 2);
    prog[2] = i_blt(1, 2, 2);           // -3 < 2: taken
    prog[3] = i_addi(3, 3, 1);
    prog[4] = i_blt(2, 1, 2);           // 2 < -3: not taken
    prog[5] = i_addi(3, 3, 10);
    prog[6] = i_blt(2, 2, 2);           // equal: not taken
    prog[7] = i_addi(3, 3, 100);
    run();
    chk(rg(3) == 110, $sformatf("signed BLT (%0d)", rg(3)));
    chk(cycles == 8, $sformatf("BLT program time %0d", cycles));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
