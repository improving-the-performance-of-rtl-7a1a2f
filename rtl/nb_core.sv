// nb_core: in-order processor with non-blocking in-register loads.
//
// One instruction per cycle when nothing blocks; instructions come from an
// instruction port that always answers in the same cycle (a perfect
// instruction cache). The load handling is the document's:
//   * An explicit load (LD) that hits writes the data into its target register.
//     One that misses (primary or secondary) writes the load address into the
//     register and sets its busy bit; the processor does not wait.
//   * An instruction that reads a busy register first performs an implicit load
//     with the address held in that register. The processor blocks until the
//     cache returns the data, writes it into the register, clears the busy bit,
//     and only then executes the instruction (one cycle later).
//   * A load that meets a pending frame of another tag waits until that frame
//     has been filled.
//   * A load into r0 needs no register, since r0 is never busy: it only
//     fetches the block, which makes it the document's in-cache load.
// This design adds two ordering rules where the document is silent:
//   * a load waits while the store buffer holds a store to the same word
//     (read after write), and
//   * before a store enters the buffer, any busy register holding an address
//     in the same word is completed by an implicit load, so that a pending load
//     returns the value from before the store (write after read).
// Stores go to the store buffer and block only when it is full.
// MUL stands in for the floating-point operations of the workloads: like them
// it occupies the processor for MUL_CYCLES cycles (3 to 5 in the document's
// processor) and nothing else executes meanwhile. Those cycles are execution,
// not blocking, and do not raise `blocked`.
//
// Interface: imem_addr/imem_instr (word-indexed program counter), the cache's
// processor port, the store buffer's push and lookup ports, and status:
// halted, blocked (no instruction retired this cycle for a reason other than
// a multi-cycle MUL), and event pulses.
module nb_core
  import nb_pkg::*;
#(
  parameter int unsigned MUL_CYCLES = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  // instruction port
  output word_t     imem_addr,
  input  instr_t    imem_instr,
  // data cache port
  output logic      c_valid,
  output acc_kind_e c_kind,
  output word_t     c_addr,
  input  logic      c_ack,
  input  logic      c_hit,
  input  word_t     c_rdata,
  // store buffer
  output logic      sb_push,
  output word_t     sb_addr,
  output word_t     sb_data,
  input  logic      sb_full,
  output word_t     sb_lookup_addr,
  input  logic      sb_lookup_hit,
  // status
  output logic      halted,
  output logic      blocked,
  output logic      ev_implicit,   // an implicit load completed
  output logic      ev_raw_stall,  // load held by an older buffered store
  output logic      ev_sb_full,    // store held by a full store buffer
  output logic      ev_war_load    // implicit load forced by a store
);

  word_t  pc_q;
  logic   halted_q;
  instr_t ins;

  assign ins       = imem_instr;
  assign imem_addr = pc_q;
  assign halted    = halted_q;

  // register file
  word_t    r1, r2, probe_unused;
  logic     b1, b2, probe_hit;
  reg_idx_t probe_idx;
  logic     wr_en, wr_busy;
  reg_idx_t wr_idx;
  word_t    wr_data;

  busy_regfile #(.N(NREGS)) u_rf (
    .clk, .rst_n,
    .rd_idx1(ins.rs1), .rd_data1(r1), .rd_busy1(b1),
    .rd_idx2(ins.rs2), .rd_data2(r2), .rd_busy2(b2),
    .wr_en, .wr_idx, .wr_data, .wr_busy,
    .probe_addr(probe_unused), .probe_hit, .probe_idx
  );

  logic uses1, uses2;
  always_comb begin
    uses1 = 1'b0;
    uses2 = 1'b0;
    unique case (ins.op)
      OP_ADD, OP_SUB, OP_MUL, OP_BNE, OP_BLT, OP_ST: begin uses1 = 1'b1; uses2 = 1'b1; end
      OP_ADDI, OP_LD:                        uses1 = 1'b1;
      default: ;
    endcase
  end

  word_t simm, ea;
  assign simm           = {{(XLEN-13){ins.imm[12]}}, ins.imm};
  assign ea             = r1 + simm;
  assign probe_unused   = ea;            // store address checked against busy registers
  assign sb_lookup_addr = ea;

  logic  advance;
  logic  exec_wait;     // multi-cycle MUL still executing
  word_t next_pc;
  logic [7:0] mul_cnt_q;

  always_comb begin
    c_valid      = 1'b0;
    c_kind       = ACC_LOAD;
    c_addr       = ea;
    sb_push      = 1'b0;
    sb_addr      = ea;
    sb_data      = r2;
    wr_en        = 1'b0;
    wr_idx       = ins.rd;
    wr_data      = '0;
    wr_busy      = 1'b0;
    advance      = 1'b0;
    exec_wait    = 1'b0;
    next_pc      = pc_q + 1;
    ev_implicit  = 1'b0;
    ev_raw_stall = 1'b0;
    ev_sb_full   = 1'b0;
    ev_war_load  = 1'b0;
    if (!halted_q) begin
      if ((uses1 && b1) || (uses2 && b2)) begin
        // implicit load of the first busy source register
        c_valid     = 1'b1;
        c_kind      = ACC_IMPLICIT;
        c_addr      = (uses1 && b1) ? r1 : r2;
        wr_idx      = (uses1 && b1) ? ins.rs1 : ins.rs2;
        wr_en       = c_ack;
        wr_data     = c_rdata;
        ev_implicit = c_ack;
      end else if (ins.op == OP_ST && probe_hit) begin
        // complete a pending load of the word this store overwrites
        c_valid     = 1'b1;
        c_kind      = ACC_IMPLICIT;
        c_addr      = ea;
        wr_idx      = probe_idx;
        wr_en       = c_ack;
        wr_data     = c_rdata;
        ev_implicit = c_ack;
        ev_war_load = c_ack;
      end else begin
        unique case (ins.op)
          OP_ADD:  begin wr_en = 1'b1; wr_data = r1 + r2; advance = 1'b1; end
          OP_SUB:  begin wr_en = 1'b1; wr_data = r1 - r2; advance = 1'b1; end
          OP_MUL: begin
            if (mul_cnt_q >= 8'(MUL_CYCLES - 1)) begin
              wr_en = 1'b1; wr_data = r1 * r2; advance = 1'b1;
            end else begin
              exec_wait = 1'b1;
            end
          end
          OP_ADDI: begin wr_en = 1'b1; wr_data = ea;      advance = 1'b1; end
          OP_LUI:  begin wr_en = 1'b1; wr_data = {{(XLEN-26){1'b0}}, ins.imm, 13'b0}; advance = 1'b1; end
          OP_LD: begin
            if (sb_lookup_hit) begin
              ev_raw_stall = 1'b1;
            end else begin
              c_valid = 1'b1;
              c_kind  = ACC_LOAD;
              wr_en   = c_ack;
              wr_data = c_hit ? c_rdata : ea;
              wr_busy = !c_hit;
              advance = c_ack;
            end
          end
          OP_ST: begin
            sb_push    = !sb_full;
            advance    = !sb_full;
            ev_sb_full = sb_full;
          end
          OP_BNE: begin
            advance = 1'b1;
            if (r1 != r2) next_pc = pc_q + simm;
          end
          OP_BLT: begin
            advance = 1'b1;
            if ($signed(r1) < $signed(r2)) next_pc = pc_q + simm;
          end
          default: advance = 1'b1;  // NOP, HALT
        endcase
      end
    end
  end

  assign blocked = !halted_q && !advance && !exec_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q      <= '0;
      halted_q  <= 1'b0;
      mul_cnt_q <= '0;
    end else begin
      mul_cnt_q <= exec_wait ? mul_cnt_q + 1'b1 : '0;
      if (advance) begin
        if (ins.op == OP_HALT) halted_q <= 1'b1;
        else                   pc_q     <= next_pc;
      end
    end
  end

endmodule
