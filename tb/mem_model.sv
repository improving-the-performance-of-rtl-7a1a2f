// mem_model: behavioural main memory for the testbenches (not synthesizable
// intent). It models an idealised memory with unlimited interleaved banks: it
// takes one request per cycle when `accept` is set, applies word writes at
// once, and returns every block read exactly LATENCY cycles after the cycle
// in which it was accepted, on a fill channel that is never stalled. The data
// of a read is taken when the read is accepted. Word i initially holds
// tb_nb_pkg::init_word(i).
module mem_model
  import nb_pkg::*;
#(
  parameter int unsigned LATENCY     = 20,
  parameter int unsigned BLOCK_BYTES = 32,
  parameter int unsigned MEM_WORDS   = 65536
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     accept,
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_we,
  input  word_t                    req_addr,
  input  word_t                    req_wdata,
  output logic                     f_valid,
  output word_t                    f_addr,
  output logic [BLOCK_BYTES*8-1:0] f_data,
  output int unsigned              reads,
  output int unsigned              writes
);
  localparam int unsigned WPB = BLOCK_BYTES / WORD_BYTES;
  localparam int unsigned AW  = $clog2(MEM_WORDS);

  word_t mem [MEM_WORDS];
  logic                     v_q [LATENCY];
  word_t                    a_q [LATENCY];
  logic [BLOCK_BYTES*8-1:0] d_q [LATENCY];

  initial for (int i = 0; i < MEM_WORDS; i++) mem[i] = tb_nb_pkg::init_word(i);

  assign req_ready = accept;

  function automatic logic [AW-1:0] widx(word_t a);
    return a[2 +: AW];
  endfunction

  logic [BLOCK_BYTES*8-1:0] rd_blk;
  always_comb
    for (int w = 0; w < WPB; w++) rd_blk[w*32 +: 32] = mem[widx(req_addr) + AW'(w)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) v_q[i] <= 1'b0;
      reads  <= 0;
      writes <= 0;
    end else begin
      for (int i = LATENCY - 1; i > 0; i--) begin
        v_q[i] <= v_q[i-1];
        a_q[i] <= a_q[i-1];
        d_q[i] <= d_q[i-1];
      end
      v_q[0] <= req_valid && req_ready && !req_we;
      a_q[0] <= req_addr;
      d_q[0] <= rd_blk;
      if (req_valid && req_ready && !req_we) reads <= reads + 1;
      if (req_valid && req_ready && req_we) begin
        mem[widx(req_addr)] <= req_wdata;
        writes <= writes + 1;
      end
    end
  end

  // the request cycle counts as the first cycle of the latency
  assign f_valid = v_q[LATENCY-2];
  assign f_addr  = a_q[LATENCY-2];
  assign f_data  = d_q[LATENCY-2];
endmodule
