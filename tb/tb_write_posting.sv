// tb_write_posting: the system with the cache's write-posting mode switched on
// (WRITE_POSTING = 1), default sizes otherwise, and a 200-cycle memory.
//
// A short directed program checks the mechanism itself:
//   * a store to an absent block allocates the frame and posts its word;
//   * a load of that word then hits while the block is still pending, and a
//     load of another word of the block is a secondary miss;
//   * the fill does not overwrite the posted word;
//   * a store to a frame pending for another block is only written through.
// Then the two loops whose loads follow the stores that produce them run with
// write posting: Loop 11 (X(k) = X(k-1) + Y(k)) and Loop 20 (the XX
// recurrence). Results are compared with a reference, and the checks require
// that the loads of stored words no longer miss: Loop 11 has only its Y
// misses left (and that of X(1)), and both loops finish sooner than without
// write posting (taken from a second copy of the system with the mode off,
// running the same program).
module tb_write_posting;
  import nb_pkg::*;
  import tb_nb_pkg::*;
  localparam int L = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // two systems, write posting on (w) and off (b), running the same program
  word_t  ia_w, ia_b;
  instr_t ii_w, ii_b;
  assign ii_w = prog[ia_w[9:0]];
  assign ii_b = prog[ia_b[9:0]];

  logic mv_w, mr_w, mwe_w, fv_w, hl_w, done_w, raw_w, sbf_w, war_w;
  logic mv_b, mr_b, mwe_b, fv_b, hl_b, done_b, raw_b, sbf_b, war_b;
  word_t ma_w, md_w, fa_w, ma_b, md_b, fa_b;
  logic [255:0] fd_w, fd_b;
  perf_t perf_w, perf_b;
  int unsigned rd_w, wr_w, rd_b, wr_b;

  nb_system #(.WRITE_POSTING(1'b1)) dut (.clk, .rst_n, .imem_addr(ia_w), .imem_instr(ii_w),
    .m_req_valid(mv_w), .m_req_ready(mr_w), .m_req_we(mwe_w), .m_req_addr(ma_w),
    .m_req_wdata(md_w), .f_valid(fv_w), .f_addr(fa_w), .f_data(fd_w),
    .halted(hl_w), .done(done_w), .perf(perf_w), .ev_raw_stall(raw_w), .ev_sb_full(sbf_w),
    .ev_war_load(war_w));
  mem_model #(.LATENCY(L), .BLOCK_BYTES(32), .MEM_WORDS(65536)) mem (.clk, .rst_n,
    .accept(1'b1), .req_valid(mv_w), .req_ready(mr_w), .req_we(mwe_w), .req_addr(ma_w),
    .req_wdata(md_w), .f_valid(fv_w), .f_addr(fa_w), .f_data(fd_w), .reads(rd_w), .writes(wr_w));

  nb_system base (.clk, .rst_n, .imem_addr(ia_b), .imem_instr(ii_b),
    .m_req_valid(mv_b), .m_req_ready(mr_b), .m_req_we(mwe_b), .m_req_addr(ma_b),
    .m_req_wdata(md_b), .f_valid(fv_b), .f_addr(fa_b), .f_data(fd_b),
    .halted(hl_b), .done(done_b), .perf(perf_b), .ev_raw_stall(raw_b), .ev_sb_full(sbf_b),
    .ev_war_load(war_b));
  mem_model #(.LATENCY(L), .BLOCK_BYTES(32), .MEM_WORDS(65536)) mem_b (.clk, .rst_n,
    .accept(1'b1), .req_valid(mv_b), .req_ready(mr_b), .req_we(mwe_b), .req_addr(ma_b),
    .req_wdata(md_b), .f_valid(fv_b), .f_addr(fa_b), .f_data(fd_b), .reads(rd_b), .writes(wr_b));

  int checks = 0, failures = 0;
  // stores posted into a pending frame, and frames allocated by stores
  int n_post = 0, n_salloc = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cache.s_upd && dut.u_cache.s_pend_same) n_post++;
    if (dut.u_cache.s_alloc) n_salloc++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(64'd10 * 64'd500_000);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic word_t sw(word_t a);
    return snap[a[17:2]];
  endfunction

  // runs prog[] on both systems from reset; memories are made equal first
  task automatic run(string name, output int cyc_w, output int cyc_b);
    for (int i = 0; i < 65536; i++) begin
      snap[i] = mem.mem[i];
      mem_b.mem[i] = mem.mem[i];
    end
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    do @(posedge clk); while (!(done_w && done_b));
    @(posedge clk);
    cyc_w = int'(perf_w.cycles);
    cyc_b = int'(perf_b.cycles);
    $display("%-18s posting: cycles=%0d primary=%0d secondary=%0d | without: cycles=%0d primary=%0d",
             name, perf_w.cycles, perf_w.primary_misses, perf_w.secondary_misses,
             perf_b.cycles, perf_b.primary_misses);
  endtask

  task automatic check_loop11(string name, int n);
    int bad = 0;
    word_t x;
    x = sw(XB);
    for (int k = 1; k < n; k++) begin
      x = x + sw(YB + 4 * k);
      if (mem.mem[(XB >> 2) + k] != x || mem_b.mem[(XB >> 2) + k] != x) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d wrong elements of X", name, bad));
  endtask

  task automatic check_loop20(string name, int n);
    int bad = 0;
    word_t xx, di, dn, x, v;
    xx = sw(L20B + OXX * L20_D);
    for (int k = 0; k < n; k++) begin
      word_t a;
      a  = L20B + 4 * k;
      di = sw(a + OY * L20_D) - sw(a + OG * L20_D) * (xx + DK);
      dn = 2;
      if (di != 0) dn = sw(a + OZ * L20_D) - di;
      v  = sw(a + OV * L20_D);
      x  = ((sw(a + OW * L20_D) + v * dn) * xx + sw(a + OU * L20_D)) * sw(a + OVX * L20_D) + v * dn;
      xx = (x - xx) * dn + xx;
      if (mem.mem[(a + OX * L20_D) >> 2] != x) bad++;
      if (mem.mem[(a + OXX * L20_D + 4) >> 2] != xx) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d wrong elements of X and XX", name, bad));
  endtask

  initial begin
    int cw, cb;
    // ---- directed program ----
    clear_prog();
    emit(i_lui(1, 32'h30000 >> 13));
    emit(i_lui(2, 32'h32000 >> 13));     // same frame as 0x30000, other block
    emit(i_addi(7, 0, 99));
    emit(i_addi(13, 0, 55));
    emit(i_st(7, 1, 4));                 // allocates the frame, then posts
    emit(i_ld(6, 1, 4));                 // waits for the store, then hits
    emit(i_ld(8, 1, 8));                 // empty word: secondary miss
    emit(i_st(13, 2, 12));               // frame pending for 0x30000: write-through only
    emit(i_add(9, 6, 0));
    emit(i_add(10, 8, 0));               // implicit load, waits for the fill
    emit(i_ld(11, 1, 4));                // after the fill: still the posted value
    emit(i_ld(12, 2, 12));               // reads the written-through word
    emit(i_add(12, 12, 0));
    emit(i_halt());
    run("directed", cw, cb);
    chk(dut.u_core.u_rf.regs_q[9] == 99, "a load of a posted word returns it");
    chk(dut.u_core.u_rf.regs_q[10] == sw(32'h30008), "an empty word of the posted block comes from memory");
    chk(dut.u_core.u_rf.regs_q[11] == 99, "the fill keeps the posted word");
    chk(dut.u_core.u_rf.regs_q[12] == 55, "a store to a frame pending for another block is written through");
    chk(mem.mem[32'h30004 >> 2] == 99 && mem.mem[32'h3200c >> 2] == 55, "posted stores reach memory");
    chk(perf_w.primary_misses == 1 && perf_w.secondary_misses == 1,
        $sformatf("only the final conflict load misses (primary %0d, secondary %0d)",
                  perf_w.primary_misses, perf_w.secondary_misses));
    chk(cw < cb, $sformatf("write posting shortens the directed program (%0d vs %0d)", cw, cb));

    // ---- Loop 11, as compiled and hoisted ----
    build_loop11(128, 0); run("Loop 11 original", cw, cb); check_loop11("Loop 11 original", 128);
    // 16 blocks of Y, plus the block of X(1), which is read before any store
    chk(perf_w.primary_misses == 17, $sformatf("Loop 11: only Y misses remain (%0d)", perf_w.primary_misses));
    chk(cw * 10 < cb * 7, $sformatf("write posting cuts Loop 11 time by 30%% or more (%0d vs %0d)", cw, cb));
    build_loop11(128, 1); run("Loop 11 hoisted", cw, cb); check_loop11("Loop 11 hoisted", 128);
    chk(perf_w.primary_misses == 17, $sformatf("Loop 11 hoisted: only Y misses remain (%0d)", perf_w.primary_misses));
    chk(cw * 10 < cb * 7, $sformatf("write posting cuts hoisted Loop 11 time by 30%% or more (%0d vs %0d)", cw, cb));

    // ---- Loop 20, 1-stage pipelined ----
    for (int k = 1; k < 101; k += 3) begin
      mem.mem[(L20B + OY * L20_D + 4 * k) >> 2] = 0;
      mem.mem[(L20B + OG * L20_D + 4 * k) >> 2] = 0;
    end
    build_loop20(100, 1, 0); run("Loop 20 1-stage", cw, cb); check_loop20("Loop 20 1-stage", 100);
    chk(cw < cb, $sformatf("write posting shortens Loop 20 (%0d vs %0d)", cw, cb));

    $display("write posting: %0d stores posted into pending frames, %0d frames allocated by stores",
             n_post, n_salloc);
    chk(n_post > 0, "stores were posted into pending frames");
    chk(n_salloc > 0, "stores allocated frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
