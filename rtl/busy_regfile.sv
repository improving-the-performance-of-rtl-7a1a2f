// busy_regfile: register file with a one-bit busy tag per register.
//
// A register whose busy bit is set does not hold data: it holds the byte
// address of a load that missed in the cache (a primary or secondary miss).
// Reading such a register makes the processor issue an implicit load with that
// address; when the implicit load completes the register is written with the
// data and its busy bit is cleared. The busy tag and the address-in-register
// idea follow the document. Register 0 always reads as zero and is never busy,
// as on SPARC; that and the probe port are this design's choices.
//
// Interface
//   two combinational read ports (value and busy bit)
//   one write port: on wr_en, reg[wr_idx] <= wr_data, busy <= wr_busy
//   probe port: probe_hit is set if any busy register holds an address in the
//     same word as probe_addr; probe_idx names the lowest such register. The
//     processor uses it before a store so that a pending load is completed
//     before a later store to the same word changes the value in memory.
// Timing: reads are combinational; writes take effect at the next clock edge.
module busy_regfile
  import nb_pkg::*;
#(
  parameter int unsigned N = NREGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] rd_idx1,
  output word_t                rd_data1,
  output logic                 rd_busy1,
  input  logic [$clog2(N)-1:0] rd_idx2,
  output word_t                rd_data2,
  output logic                 rd_busy2,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  word_t                wr_data,
  input  logic                 wr_busy,
  input  word_t                probe_addr,
  output logic                 probe_hit,
  output logic [$clog2(N)-1:0] probe_idx
);

  word_t  regs_q [N];
  logic [N-1:0] busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs_q[i] <= '0;
      busy_q <= '0;
    end else if (wr_en && wr_idx != '0) begin
      regs_q[wr_idx] <= wr_data;
      busy_q[wr_idx] <= wr_busy;
    end
  end

  assign rd_data1 = regs_q[rd_idx1];
  assign rd_busy1 = busy_q[rd_idx1];
  assign rd_data2 = regs_q[rd_idx2];
  assign rd_busy2 = busy_q[rd_idx2];

  always_comb begin
    probe_hit = 1'b0;
    probe_idx = '0;
    for (int i = N - 1; i > 0; i--) begin
      if (busy_q[i] &&
          regs_q[i][XLEN-1:$clog2(WORD_BYTES)] == probe_addr[XLEN-1:$clog2(WORD_BYTES)]) begin
        probe_hit = 1'b1;
        probe_idx = i[$clog2(N)-1:0];
      end
    end
  end

endmodule
