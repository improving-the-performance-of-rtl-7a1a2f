// tb_busy_regfile: random writes and reads of the busy-tagged register file
// against a reference array, including the busy-address probe and register 0.
module tb_busy_regfile;
  import nb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] i1, i2, wi, pidx;
  word_t d1, d2, wd, paddr;
  logic b1, b2, we, wb, phit;
  int checks = 0, failures = 0;

  busy_regfile #(.N(32)) dut (.clk, .rst_n, .rd_idx1(i1), .rd_data1(d1), .rd_busy1(b1),
    .rd_idx2(i2), .rd_data2(d2), .rd_busy2(b2), .wr_en(we), .wr_idx(wi), .wr_data(wd),
    .wr_busy(wb), .probe_addr(paddr), .probe_hit(phit), .probe_idx(pidx));

  word_t ref_v [32];
  logic  ref_b [32];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit eh; int e;
    we = 0; wi = 0; wd = 0; wb = 0; i1 = 0; i2 = 0; paddr = 0;
    for (int i = 0; i < 32; i++) begin ref_v[i] = 0; ref_b[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = ($urandom % 2) == 1; wi = 5'($urandom); wb = ($urandom % 3) == 0;
      // small address space so probes hit often
      wd = {20'h0, 10'($urandom), 2'($urandom)};
      i1 = 5'($urandom); i2 = 5'($urandom);
      paddr = (n % 2 == 0 && ref_b[i1]) ? ref_v[i1] ^ 32'($urandom % 4) : {20'h0, 10'($urandom), 2'b0};
      #1;
      chk(d1 == ref_v[i1] && b1 == ref_b[i1], $sformatf("read1 r%0d", i1));
      chk(d2 == ref_v[i2] && b2 == ref_b[i2], $sformatf("read2 r%0d", i2));
      eh = 0; e = 0;
      for (int r = 31; r > 0; r--)
        if (ref_b[r] && ref_v[r][31:2] == paddr[31:2]) begin eh = 1; e = r; end
      chk(phit == eh && (!eh || pidx == 5'(e)), $sformatf("probe %h", paddr));
      @(posedge clk);
      if (we && wi != 0) begin ref_v[wi] = wd; ref_b[wi] = wb; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
