// tb_latency_sweep: the same programs on five copies of the system at default
// sizes, each with its own memory model of latency 5, 10, 50, 100 or 200
// cycles, as in a sweep of miss latency. It runs Loop 1 as compiled, Loop 1
// with 2-stage load pipelining and Loop 9 with 1-stage load pipelining,
// checks every result array, and checks the
// shape predicted by the simple performance model of a lockup-free cache:
//   * code with loads right before their uses gains almost nothing: its time
//     grows by about one full latency per primary miss;
//   * pipelined code is flat while the latency is below its dependency
//     distance, and beyond it grows by about latency / f per miss, f being the
//     miss overlap factor (about 2 for this loop);
//   * the speedup over a blocking cache therefore rises with latency.
module tb_latency_sweep;
  import nb_pkg::*;
  import tb_nb_pkg::*;
  localparam int NL = 5;
  localparam int LATS [NL] = '{5, 10, 50, 100, 200};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  perf_t perf_a [NL];
  logic  done_a [NL];
  int    bad_a  [NL];
  event  snap_ev, check_ev;
  int    n_iter;
  int    which;        // program being checked: 1 = Loop 1, 9 = Loop 9

  for (genvar g = 0; g < NL; g++) begin : sys
    word_t  imem_addr;
    instr_t imem_instr;
    logic m_valid, m_ready, m_we, f_valid, halted, done;
    word_t m_addr, m_wdata, f_addr;
    logic [255:0] f_data;
    perf_t perf;
    int unsigned mreads, mwrites;
    word_t snap [65536];
    assign imem_instr = prog[imem_addr[9:0]];

    nb_system dut (.clk, .rst_n, .imem_addr, .imem_instr,
      .m_req_valid(m_valid), .m_req_ready(m_ready), .m_req_we(m_we), .m_req_addr(m_addr),
      .m_req_wdata(m_wdata), .f_valid, .f_addr, .f_data,
      .halted, .done, .perf, .ev_raw_stall(), .ev_sb_full(), .ev_war_load());

    mem_model #(.LATENCY(LATS[g]), .BLOCK_BYTES(32), .MEM_WORDS(65536)) mem (.clk, .rst_n,
      .accept(1'b1), .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we), .req_addr(m_addr),
      .req_wdata(m_wdata), .f_valid, .f_addr, .f_data, .reads(mreads), .writes(mwrites));

    assign perf_a[g] = perf;
    assign done_a[g] = done;

    always @(snap_ev) for (int i = 0; i < 65536; i++) snap[i] = mem.mem[i];
    always @(check_ev) begin
      int bad;
      bad = 0;
      if (which == 1)
        for (int k = 0; k < n_iter; k++) begin
          word_t e;
          e = Q + snap[(YB >> 2) + k] * (R * snap[(ZB >> 2) + k + 10] + T * snap[(ZB >> 2) + k + 11]);
          if (mem.mem[(XB >> 2) + k] != e) bad++;
        end
      else
        for (int i = 0; i < n_iter; i++) begin
          word_t c, e;
          c = (PB >> 2) + 25 * i;
          e = snap[c + 2] + CO * (snap[c + 4] + snap[c + 5]);
          for (int j = 7; j <= 13; j++) e += (DM22 + j - 7) * snap[c + j - 1];
          if (mem.mem[c] != e) bad++;
        end
      bad_a[g] = bad;
    end
  end

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #(64'd10 * 64'd1_000_000);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic bit all_done();
    for (int i = 0; i < NL; i++) if (!done_a[i]) return 0;
    return 1;
  endfunction

  task automatic run_all(string name, output int cyc [NL], output real sp [NL], output real f [NL]);
    ->snap_ev;
    #1;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    do @(posedge clk); while (!all_done());
    @(posedge clk);
    ->check_ev;
    #1;
    for (int i = 0; i < NL; i++) begin
      real tex;
      cyc[i] = int'(perf_a[i].cycles);
      tex    = real'(perf_a[i].cycles - perf_a[i].blocked_cycles);
      sp[i]  = (tex + real'(perf_a[i].primary_misses) * LATS[i]) / real'(perf_a[i].cycles);
      f[i]   = real'(perf_a[i].pending_sum) / real'(perf_a[i].blocked_cycles);
      chk(bad_a[i] == 0, $sformatf("%s latency %0d: %0d wrong elements", name, LATS[i], bad_a[i]));
      $display("%-16s latency=%3d cycles=%0d primary=%0d overlap=%.3f speedup=%.3f",
               name, LATS[i], cyc[i], perf_a[i].primary_misses, f[i], sp[i]);
    end
  endtask

  initial begin
    int co [NL], cp [NL];
    real so [NL], sp [NL], fo [NL], fp [NL];
    int c9 [NL];
    real s9 [NL], f9 [NL];
    int m;
    n_iter = 990;
    which  = 1;

    build_loop1(990, -1);
    run_all("Loop 1 original", co, so, fo);
    m = int'(perf_a[NL-1].primary_misses);
    // blocking-like: each extra cycle of latency costs one cycle per miss
    chk(co[4] - co[3] > m * 100 * 9 / 10 && co[4] - co[3] < m * 100 * 21 / 20,
        $sformatf("original code grows by about one latency per miss (%0d for %0d misses)", co[4] - co[3], m));

    build_loop1(990, 2);
    run_all("Loop 1 2-stage", cp, sp, fp);
    // flat while the latency is below the dependency distance
    chk(cp[1] * 100 < cp[0] * 103, $sformatf("pipelined code flat at low latency (%0d, %0d)", cp[0], cp[1]));
    // beyond it, about latency / f per miss with f near 2
    chk(cp[4] - cp[3] > int'(real'(m) * 100.0 / 2.5) && cp[4] - cp[3] < int'(real'(m) * 100.0 / 1.5),
        $sformatf("pipelined code grows by about latency/2 per miss (%0d)", cp[4] - cp[3]));
    for (int i = 0; i < NL; i++) chk(cp[i] <= co[i], $sformatf("pipelining never slower (latency %0d)", LATS[i]));
    for (int i = 1; i < NL; i++) chk(sp[i] > sp[i-1], $sformatf("speedup rises with latency (%0d)", LATS[i]));
    chk(fp[4] > 1.5 && fo[4] < 1.1, "miss overlap factor at 200 cycles");

    // Loop 9 pipelined by one stage: about 2.3 misses per iteration and a
    // long body, so it stays flat up to a higher latency than Loop 1
    n_iter = 100;
    which  = 9;
    build_loop9_x2(100, 0);
    run_all("Loop 9 1-stage", c9, s9, f9);
    chk(c9[2] * 100 < c9[0] * 105, $sformatf("Loop 9 1-stage flat up to 50 cycles (%0d, %0d)", c9[0], c9[2]));
    for (int i = 1; i < NL; i++) chk(s9[i] > s9[i-1], $sformatf("Loop 9 speedup rises with latency (%0d)", LATS[i]));
    chk(f9[4] > 3.0, $sformatf("Loop 9 1-stage overlaps about four misses at 200 cycles (%.3f)", f9[4]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
