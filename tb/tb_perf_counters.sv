// tb_perf_counters: random event streams against reference counts, including
// the pending-miss sum used for the miss overlap factor.
module tb_perf_counters;
  import nb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic running, blocked, ep, es, ei, ec;
  logic [8:0] np;
  perf_t perf, r;
  int checks = 0, failures = 0;

  perf_counters #(.PEND_W(9)) dut (.clk, .rst_n, .running, .blocked, .ev_primary(ep),
    .ev_secondary(es), .ev_implicit(ei), .ev_conflict(ec), .n_pending(np), .perf);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    {running, blocked, ep, es, ei, ec} = '0; np = 0; r = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      chk(perf == r, "counters");
      running = (n % 700) < 600;
      blocked = 1'($urandom % 2); ep = 1'($urandom % 2); es = 1'($urandom % 2);
      ei = 1'($urandom % 2); ec = 1'($urandom % 2); np = 9'($urandom % 300);
      @(posedge clk);
      if (running) begin
        r.cycles++;
        if (blocked) begin r.blocked_cycles++; r.pending_sum += 32'(np); end
        if (ep) r.primary_misses++;
        if (es) r.secondary_misses++;
        if (ei) r.implicit_loads++;
        if (ec) r.conflict_cycles++;
      end
    end
    @(negedge clk);
    chk(perf == r, "final counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
