// nb_pkg: types and constants shared by the non-blocking cache/processor design.
//
// The machine is a 32-bit processor with byte addresses and 32-bit words.
// The data cache is direct-mapped (8 KB, 32-byte blocks in the default
// configuration); every block frame is in one of three states: invalid,
// valid, or pending (a miss for the frame's tag is outstanding in memory).
// The three-state frame and the sizes follow the document; the instruction
// format below is this design's own minimal instruction set, just large enough
// to write load-hoisted and load-pipelined loops.
package nb_pkg;

  parameter int unsigned XLEN       = 32;  // data and address width
  parameter int unsigned WORD_BYTES = XLEN / 8;
  parameter int unsigned NREGS      = 32;  // architectural registers (5-bit fields)

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // State of a cache block frame.
  typedef enum logic [1:0] {
    BLK_INVALID = 2'd0,
    BLK_VALID   = 2'd1,
    BLK_PENDING = 2'd2
  } blk_state_e;

  // Kind of processor access presented to the cache.
  //   ACC_LOAD     : explicit in-register load; never blocks on a miss
  //   ACC_IMPLICIT : load triggered by reading a busy register; completes
  //                  only when the data is in the cache
  typedef enum logic {
    ACC_LOAD     = 1'b0,
    ACC_IMPLICIT = 1'b1
  } acc_kind_e;

  // Instruction set (one instruction per cycle when nothing blocks).
  //   ADD/SUB/MUL rd = rs1 op rs2
  //   ADDI        rd = rs1 + sext(imm)
  //   LUI         rd = imm << 13
  //   LD          rd = mem[rs1 + sext(imm)]
  //   ST          mem[rs1 + sext(imm)] = rs2
  //   BNE         if (rs1 != rs2) pc = pc + sext(imm) else pc = pc + 1
  //   BLT         if (rs1 < rs2, signed) pc = pc + sext(imm) else pc = pc + 1
  //   HALT        stop fetching
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_MUL  = 4'd3,
    OP_ADDI = 4'd4,
    OP_LUI  = 4'd5,
    OP_LD   = 4'd6,
    OP_ST   = 4'd7,
    OP_BNE  = 4'd8,
    OP_HALT = 4'd9,
    OP_BLT  = 4'd10
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    reg_idx_t    rd;
    reg_idx_t    rs1;
    reg_idx_t    rs2;
    logic [12:0] imm;
  } instr_t;

  // Event and performance counters (see perf_counters).
  typedef struct packed {
    logic [31:0] cycles;          // execution time
    logic [31:0] blocked_cycles;  // cycles in which the processor did not advance
    logic [31:0] pending_sum;     // sum of pending primary misses over blocked cycles
    logic [31:0] primary_misses;
    logic [31:0] secondary_misses;
    logic [31:0] implicit_loads;
    logic [31:0] conflict_cycles; // cycles an access waited on a pending frame of another tag
  } perf_t;

endpackage
