// tb_nb_system: end-to-end test of the processor/cache system at its default
// sizes (8 KB direct-mapped cache, 32-byte blocks, 32 registers, 16-entry
// store buffer) with a memory latency of 200 cycles.
//
// It runs integer versions of four Livermore loops in the code shapes that the
// design is meant for:
//   Loop 1  X(k) = Q + Y(k)*(R*Z(k+10) + T*Z(k+11)), k = 1..990
//           as compiled (each load right before its use), with loads hoisted
//           to the top of the body, and load-pipelined by 1, 2 and 3 stages
//           (3 stages over 988 iterations, so the unrolled body divides evenly)
//           (loads for iteration k+S issued in iteration k, body unrolled S+1
//           times so each stage has its own registers);
//   Loop 9  PX(1,i) = PX(3,i) + CO*(PX(5,i)+PX(6,i)) + sum DMm*PX(m-15,i),
//           i = 1..101, as compiled and with all ten loads hoisted, and
//           1-stage pipelined and unrolled once over 100 iterations;
//   Loop 11 X(k) = X(k-1) + Y(k), k = 2..128, a read-after-write recurrence,
//           as compiled, with the Y load hoisted, and with Y loads
//           pipelined by 1 to 3 stages;
//   Loop 15 two nested loops with arithmetic IFs (integer form, see
//           tb_nb_pkg), j = 2..7, k = 2..101: as compiled, and with all
//           eleven loads hoisted out of the IFs (speculative loads);
//   Loop 20 a recurrence through XX with an IF whose THEN part loads Z(k)
//           (integer form, see tb_nb_pkg), 100 iterations: as compiled,
//           hoisted, 1-stage pipelined, and 2-stage pipelined (99 iterations)
//           with Z loaded inside the IF or speculatively before it;
// plus a short program that fills the store buffer, makes a store complete
// a pending load, and prefetches a block with a load into r0. Every result
// array is compared with a reference computed from a snapshot of memory taken
// before the run. The test also checks that
// hoisting and pipelining shorten the execution time, that pipelining raises
// the miss overlap factor, and that every mechanism of the design occurred.
module tb_nb_system;
  import nb_pkg::*;
  import tb_nb_pkg::*;
  localparam int L = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  word_t  imem_addr;
  instr_t imem_instr;
  assign imem_instr = prog[imem_addr[9:0]];

  logic m_valid, m_ready, m_we, f_valid, halted, done, ev_raw, ev_sbf, ev_war;
  word_t m_addr, m_wdata, f_addr;
  logic [255:0] f_data;
  perf_t perf;
  int unsigned mreads, mwrites;

  nb_system dut (.clk, .rst_n, .imem_addr, .imem_instr,
    .m_req_valid(m_valid), .m_req_ready(m_ready), .m_req_we(m_we), .m_req_addr(m_addr),
    .m_req_wdata(m_wdata), .f_valid, .f_addr, .f_data,
    .halted, .done, .perf, .ev_raw_stall(ev_raw), .ev_sb_full(ev_sbf), .ev_war_load(ev_war));

  mem_model #(.LATENCY(L), .BLOCK_BYTES(32), .MEM_WORDS(65536)) mem (.clk, .rst_n,
    .accept(1'b1), .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we), .req_addr(m_addr),
    .req_wdata(m_wdata), .f_valid, .f_addr, .f_data, .reads(mreads), .writes(mwrites));

  int checks = 0, failures = 0;
  // mechanism counters over the whole test
  int n_raw = 0, n_sbf = 0, n_war = 0, n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_raw) n_raw++;
    if (ev_sbf) n_sbf++;
    if (ev_war) n_war++;
    if (dut.n_pending > 1) n_overlap++;
  end
  int tot_prim = 0, tot_sec = 0, tot_impl = 0, tot_conf = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(64'd10 * 64'd2_000_000);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_loop9(string name, int n);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      word_t c, e;
      c = PB + 100 * i;
      e = sw(c + 8) + CO * (sw(c + 16) + sw(c + 20));
      for (int j = 7; j <= 13; j++) e += (DM22 + j - 7) * sw(c + 4 * (j - 1));
      if (mem.mem[c >> 2] != e) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d wrong elements of PX(1,*)", name, bad));
  endtask

  function automatic word_t sw(word_t a);
    return snap[a[17:2]];
  endfunction

  task automatic run(string name, output int cyc, output real mof, output real sp);
    real tex;
    for (int i = 0; i < 65536; i++) snap[i] = mem.mem[i];
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done);
    @(posedge clk);
    cyc = int'(perf.cycles);
    mof = (perf.blocked_cycles == 0) ? 0.0 : real'(perf.pending_sum) / real'(perf.blocked_cycles);
    // time on a blocking cache: every cycle that was not blocked, plus the full
    // latency for every primary miss
    tex = real'(perf.cycles - perf.blocked_cycles);
    sp  = (tex + real'(perf.primary_misses) * L) / real'(perf.cycles);
    tot_prim += int'(perf.primary_misses); tot_sec += int'(perf.secondary_misses);
    tot_impl += int'(perf.implicit_loads); tot_conf += int'(perf.conflict_cycles);
    $display("%-22s cycles=%0d blocked=%0d primary=%0d secondary=%0d implicit=%0d overlap=%.3f speedup=%.3f",
             name, perf.cycles, perf.blocked_cycles, perf.primary_misses, perf.secondary_misses,
             perf.implicit_loads, mof, sp);
  endtask

  task automatic check_loop1(string name, int n);
    int bad = 0;
    for (int k = 0; k < n; k++) begin
      word_t e;
      e = Q + sw(YB + 4 * k) * (R * sw(ZB + 4 * (k + 10)) + T * sw(ZB + 4 * (k + 11)));
      if (mem.mem[(XB >> 2) + k] != e) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d wrong elements of X", name, bad));
  endtask

  task automatic check_loop11(string name, int n);
    int bad = 0;
    word_t x;
    x = sw(XB);
    for (int k = 1; k < n; k++) begin
      x = x + sw(YB + 4 * k);
      if (mem.mem[(XB >> 2) + k] != x) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d wrong elements of X", name, bad));
  endtask


  // Loop 15 reference
  function automatic word_t l15(word_t base, int k, int j);
    return sw(base + 4 * ((k - 1) + 101 * (j - 1)));
  endfunction
  function automatic word_t smax(word_t a, word_t b);
    return ($signed(a) < $signed(b)) ? b : a;
  endfunction
  task automatic check_loop15(string name, int n);
    int bad = 0;
    word_t fb, gb, hb, yb, t, r, sv, e;
    fb = L15_GB - L15_D; gb = L15_GB; hb = L15_GB + L15_D; yb = L15_SB + L15_D;
    for (int j = 2; j <= 7; j++)
      for (int k = 2; k <= n; k++) begin
        if (j == 7) begin
          if (mem.mem[(yb + 4 * ((k - 1) + 101 * (j - 1))) >> 2] != 0) bad++;
          continue;
        end
        t = ($signed(l15(hb, k, j + 1)) > $signed(l15(hb, k, j))) ? 53 : 73;
        if ($signed(l15(fb, k, j)) < $signed(l15(fb, k - 1, j))) begin
          r = smax(l15(hb, k - 1, j), l15(hb, k - 1, j + 1)); sv = l15(fb, k - 1, j);
        end else begin
          r = smax(l15(hb, k, j), l15(hb, k, j + 1));         sv = l15(fb, k, j);
        end
        e = (l15(gb, k, j) * l15(gb, k, j) + r * r) * t * sv;
        if (mem.mem[(yb + 4 * ((k - 1) + 101 * (j - 1))) >> 2] != e) bad++;
        if (k == n) e = 0;
        else begin
          if ($signed(l15(fb, k, j)) < $signed(l15(fb, k, j - 1))) begin
            r = smax(l15(gb, k, j - 1), l15(gb, k + 1, j - 1)); sv = l15(fb, k, j - 1); t = 73;
          end else begin
            r = smax(l15(gb, k, j), l15(gb, k + 1, j));         sv = l15(fb, k, j);     t = 53;
          end
          e = (l15(hb, k, j) * l15(hb, k, j) + r * r) * t * sv;
        end
        if (mem.mem[(L15_SB + 4 * ((k - 1) + 101 * (j - 1))) >> 2] != e) bad++;
      end
    chk(bad == 0, $sformatf("%s: %0d wrong elements of VY and VS", name, bad));
  endtask

  // Loop 20 reference; returns how many iterations took the THEN part
  task automatic check_loop20(string name, int n, output int n_then);
    int bad = 0;
    word_t xx, di, dn, x, v;
    n_then = 0;
    xx = sw(L20B + OXX * L20_D);
    for (int k = 0; k < n; k++) begin
      word_t a;
      a  = L20B + 4 * k;
      di = sw(a + OY * L20_D) - sw(a + OG * L20_D) * (xx + DK);
      dn = 2;
      if (di != 0) begin dn = sw(a + OZ * L20_D) - di; n_then++; end
      v  = sw(a + OV * L20_D);
      x  = ((sw(a + OW * L20_D) + v * dn) * xx + sw(a + OU * L20_D)) * sw(a + OVX * L20_D) + v * dn;
      xx = (x - xx) * dn + xx;
      if (mem.mem[(a + OX * L20_D) >> 2] != x) bad++;
      if (mem.mem[(a + OXX * L20_D + 4) >> 2] != xx) bad++;
    end
    chk(bad == 0, $sformatf("%s: %0d wrong elements of X and XX", name, bad));
  endtask

  initial begin
    int c_p3;
    int c20o, c20h, c20p1, c20p2, c20s, nthen, c15o, c15h;
    real f15o, f15h, s15o, s15h;
    real f20o, f20h, f20p1, f20p2, f20s, s20o, s20h, s20p1, s20p2, s20s;
    real f_p3, s_p3;
    int c_orig, c_hoist, c_p1, c_p2, c11o, c11h, c_m, c9o, c9h, c9p, c9u;
    real f9o, f9h, s9o, s9h, f9p, s9p, f9u, s9u;
    real f_orig, f_hoist, f_p1, f_p2, f11, s_orig, s_hoist, s_p1, s_p2, s11, s_m, f_m;

    build_loop1(990, -1); run("Loop 1 original", c_orig, f_orig, s_orig);  check_loop1("Loop 1 original", 990);
    build_loop1(990, 0);  run("Loop 1 hoisted", c_hoist, f_hoist, s_hoist); check_loop1("Loop 1 hoisted", 990);
    build_loop1(990, 1);  run("Loop 1 1-stage", c_p1, f_p1, s_p1);         check_loop1("Loop 1 1-stage", 990);
    build_loop1(990, 2);  run("Loop 1 2-stage", c_p2, f_p2, s_p2);         check_loop1("Loop 1 2-stage", 990);
    // 3 stages need a body unrolled 4 times, so 988 iterations
    build_loop1(988, 3);  run("Loop 1 3-stage", c_p3, f_p3, s_p3);         check_loop1("Loop 1 3-stage", 988);
    chk(real'(c_p3) / 988.0 < real'(c_p2) / 990.0, "a third stage shortens Loop 1 further");
    chk(c_hoist < c_orig, "hoisting shortens Loop 1");
    chk(c_p1 < c_hoist && c_p2 < c_p1, "each pipeline stage shortens Loop 1");
    chk(f_orig < 1.1, $sformatf("original Loop 1 overlaps almost no misses (%.3f)", f_orig));
    chk(f_p1 > 1.5, $sformatf("1-stage Loop 1 overlaps misses (%.3f)", f_p1));
    chk(s_p2 > 1.3, $sformatf("2-stage Loop 1 speedup (%.3f)", s_p2));

    build_loop9(101, 0); run("Loop 9 original", c9o, f9o, s9o); check_loop9("Loop 9 original", 101);
    // Table 2: 2.36 load misses per iteration of Loop 9
    chk(perf.primary_misses >= 101 * 2 && perf.primary_misses <= 101 * 3,
        $sformatf("Loop 9 misses per iteration %.2f", real'(perf.primary_misses) / 101.0));
    build_loop9(101, 1); run("Loop 9 hoisted", c9h, f9h, s9h);   check_loop9("Loop 9 hoisted", 101);
    chk(c9h < c9o, "hoisting shortens Loop 9");
    chk(f9h > 1.5 && f9o < 1.3, $sformatf("hoisting raises Loop 9 miss overlap (%.3f -> %.3f)", f9o, f9h));
    build_loop9_x2(100, 0); run("Loop 9 1-stage", c9p, f9p, s9p);    check_loop9("Loop 9 1-stage", 100);
    build_loop9_x2(100, 1); run("Loop 9 unrolled", c9u, f9u, s9u);   check_loop9("Loop 9 unrolled", 100);
    chk(c9p < c9u, "load pipelining beats unrolling once for Loop 9");
    chk(real'(c9p) / 100.0 < real'(c9h) / 101.0, "1-stage pipelining shortens Loop 9 further");
    chk(f9p > f9h, $sformatf("pipelining raises Loop 9 miss overlap (%.3f -> %.3f)", f9h, f9p));

    build_loop11(128, 0); run("Loop 11 original", c11o, f11, s11); check_loop11("Loop 11 original", 128);
    build_loop11(128, 1); run("Loop 11 hoisted", c11h, f11, s11);  check_loop11("Loop 11 hoisted", 128);
    chk(c11h * 20 < c11o * 21 && c11o * 20 < c11h * 21, "hoisting changes Loop 11 by less than 5%");
    // pipelined: n-1 iterations must divide by S+1
    for (int st = 1; st <= 3; st++) begin
      int nn, cc;
      real ff, ss;
      nn = (st == 2) ? 127 : 129;
      build_loop11_pipe(nn, st);
      run($sformatf("Loop 11 %0d-stage", st), cc, ff, ss);
      check_loop11($sformatf("Loop 11 %0d-stage", st), nn);
      chk(ff < 1.2, $sformatf("the recurrence keeps Loop 11 overlap near one at %0d stages (%.3f)", st, ff));
    end

    build_loop15(101, 0); run("Loop 15 original", c15o, f15o, s15o); check_loop15("Loop 15 original", 101);
    build_loop15(101, 1); run("Loop 15 hoisted", c15h, f15h, s15h);  check_loop15("Loop 15 hoisted", 101);
    chk(c15h < c15o, "hoisting, with speculative loads, shortens Loop 15");
    chk(f15h > f15o, $sformatf("hoisting raises Loop 15 miss overlap (%.3f -> %.3f)", f15o, f15h));

    // Loop 20: Y(k) = G(k) = 0 for every third k makes DI zero there, so both
    // sides of the IF are taken
    for (int k = 1; k < 101; k += 3) begin
      mem.mem[(L20B + OY * L20_D + 4 * k) >> 2] = 0;
      mem.mem[(L20B + OG * L20_D + 4 * k) >> 2] = 0;
    end
    build_loop20(100, -1, 0); run("Loop 20 original", c20o, f20o, s20o);  check_loop20("Loop 20 original", 100, nthen);
    chk(nthen > 0 && nthen < 100, $sformatf("Loop 20 takes both sides of the IF (%0d of 100)", nthen));
    build_loop20(100, 0, 0);  run("Loop 20 hoisted", c20h, f20h, s20h);   check_loop20("Loop 20 hoisted", 100, nthen);
    build_loop20(100, 1, 0);  run("Loop 20 1-stage", c20p1, f20p1, s20p1); check_loop20("Loop 20 1-stage", 100, nthen);
    build_loop20(99, 2, 0);   run("Loop 20 2-stage", c20p2, f20p2, s20p2); check_loop20("Loop 20 2-stage", 99, nthen);
    build_loop20(99, 2, 1);   run("Loop 20 2-stage spec", c20s, f20s, s20s); check_loop20("Loop 20 2-stage spec", 99, nthen);
    chk(c20h < c20o && c20p1 < c20h, "hoisting and pipelining shorten Loop 20");
    chk(f20p1 > f20o, $sformatf("pipelining raises Loop 20 miss overlap (%.3f -> %.3f)", f20o, f20p1));
    chk(c20s < c20p2, "the speculative Z load shortens 2-stage Loop 20");

    // store buffer full and a store that completes a pending load
    clear_prog();
    emit(i_lui(1, 32'h30000 >> 13));
    emit(i_addi(7, 0, 99));
    emit(i_ld(6, 1, 0));                 // primary miss, r6 busy
    for (int i = 0; i < 20; i++) emit(i_st(7, 1, 4 + 4 * (i % 7)));  // held: block pending
    emit(i_st(7, 1, 0));                 // same word as r6's pending load
    emit(i_add(8, 6, 0));
    emit(i_lui(2, 32'h32000 >> 13));
    emit(i_ld(9, 1, 64));                // primary miss
    emit(i_ld(10, 2, 64));               // same frame, other tag: conflict
    emit(i_add(11, 9, 10));
    emit(i_lui(3, 32'h34000 >> 13));
    emit(i_ld(0, 3, 0));                 // load into r0: an in-cache load (prefetch)
    emit(i_ld(12, 3, 4));                // same block: secondary miss
    emit(i_add(13, 12, 0));
    emit(i_halt());
    run("store buffer program", c_m, f_m, s_m);
    chk(perf.secondary_misses == 1 && dut.u_core.u_rf.regs_q[13] == sw(32'h34004),
        "a load into r0 fetches the block without reserving a register");
    chk(dut.u_core.u_rf.regs_q[8] == sw(32'h30000), "pending load keeps the old value");
    chk(dut.u_core.u_rf.regs_q[11] == sw(32'h30040) + sw(32'h32040), "conflicting loads");
    chk(mem.mem[32'h30000 >> 2] == 99 && mem.mem[(32'h30000 >> 2) + 3] == 99, "buffered stores reached memory");

    $display("mechanisms: primary=%0d secondary=%0d implicit=%0d conflict-cycles=%0d raw-stalls=%0d sb-full=%0d war-loads=%0d overlap-cycles=%0d",
             tot_prim, tot_sec, tot_impl, tot_conf, n_raw, n_sbf, n_war, n_overlap);
    chk(tot_prim > 0, "primary misses occurred");
    chk(tot_sec > 0, "secondary misses occurred");
    chk(tot_impl > 0, "implicit loads occurred");
    chk(tot_conf > 0, "conflict misses occurred");
    chk(n_raw > 0, "read-after-write stalls occurred");
    chk(n_sbf > 0, "store buffer became full");
    chk(n_war > 0, "a store completed a pending load");
    chk(n_overlap > 0, "several primary misses were pending at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
