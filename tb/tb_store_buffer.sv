// tb_store_buffer: random pushes and pops against a reference queue; checks
// order, the full flag, the count and the word-address lookup.
module tb_store_buffer;
  import nb_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, full, hv, pop, lhit;
  word_t pa, pd, ha, hd, la;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, nfull = 0;

  store_buffer #(.DEPTH(D)) dut (.clk, .rst_n, .push, .push_addr(pa), .push_data(pd), .full,
    .head_valid(hv), .head_addr(ha), .head_data(hd), .pop, .lookup_addr(la),
    .lookup_hit(lhit), .count);

  word_t qa[$], qd[$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit eh;
    push = 0; pop = 0; pa = 0; pd = 0; la = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      push = ($urandom % 3) != 0 ^ (n / 500) % 2 == 1;
      pop  = ($urandom % 3) == 0 ^ (n / 500) % 2 == 1;
      pa   = {24'h0, 6'($urandom), 2'($urandom)};
      pd   = $urandom;
      la   = {24'h0, 6'($urandom), 2'($urandom)};
      #1;
      chk(full == (qa.size() == D), "full");
      chk(count == ($clog2(D)+1)'(qa.size()), "count");
      chk(hv == (qa.size() != 0), "head_valid");
      if (qa.size() != 0) chk(ha == qa[0] && hd == qd[0], "head order");
      eh = 0;
      foreach (qa[i]) if (qa[i][31:2] == la[31:2]) eh = 1;
      chk(lhit == eh, "lookup");
      if (full) nfull++;
      @(posedge clk);
      if (pop && qa.size() != 0) begin void'(qa.pop_front()); void'(qd.pop_front()); end
      if (push && qa.size() < D + ((pop && qa.size() != 0) ? 1 : 0) && !full) begin
        qa.push_back(pa); qd.push_back(pd);
      end
    end
    chk(nfull > 0, "buffer was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
