// tb_nb_pkg: helpers shared by the testbenches: the initial contents of the
// memory model, an assembler for the instruction format of nb_pkg, and
// builders for integer versions of Livermore Loops 1, 9, 11, 15 and 20 in several code
// shapes (as compiled, loads hoisted, loads pipelined). A builder writes the
// program into prog[]; the data layout is given by the constants below.
package tb_nb_pkg;
  import nb_pkg::*;

  // initial value of memory word i (a simple hash, so no two nearby words match)
  function automatic word_t init_word(int unsigned i);
    return word_t'(i * 32'd2654435761 + 32'd12345) >> 8;
  endfunction

  function automatic instr_t mk(opcode_e op, int rd, int rs1, int rs2, int imm);
    instr_t x;
    x.op  = op;
    x.rd  = reg_idx_t'(rd);
    x.rs1 = reg_idx_t'(rs1);
    x.rs2 = reg_idx_t'(rs2);
    x.imm = 13'(imm);
    return x;
  endfunction

  function automatic instr_t i_add (int rd, int a, int b);  return mk(OP_ADD,  rd, a, b, 0); endfunction
  function automatic instr_t i_sub (int rd, int a, int b);  return mk(OP_SUB,  rd, a, b, 0); endfunction
  function automatic instr_t i_mul (int rd, int a, int b);  return mk(OP_MUL,  rd, a, b, 0); endfunction
  function automatic instr_t i_addi(int rd, int a, int imm); return mk(OP_ADDI, rd, a, 0, imm); endfunction
  function automatic instr_t i_lui (int rd, int imm);        return mk(OP_LUI,  rd, 0, 0, imm); endfunction
  function automatic instr_t i_ld  (int rd, int a, int imm); return mk(OP_LD,   rd, a, 0, imm); endfunction
  function automatic instr_t i_st  (int s,  int a, int imm); return mk(OP_ST,   0, a, s, imm);  endfunction
  function automatic instr_t i_bne (int a,  int b, int off); return mk(OP_BNE,  0, a, b, off);  endfunction
  function automatic instr_t i_blt (int a,  int b, int off); return mk(OP_BLT,  0, a, b, off);  endfunction
  function automatic instr_t i_nop ();                       return mk(OP_NOP,  0, 0, 0, 0);    endfunction
  function automatic instr_t i_halt();                       return mk(OP_HALT, 0, 0, 0, 0);    endfunction

  // ---------------- program construction ----------------
  // Programs are built into prog[]; np is the next free slot.
  instr_t prog [1024];
  int     np;

function automatic void emit(instr_t x);
  prog[np] = x;
  np++;
endfunction
function automatic void clear_prog();
  for (int i = 0; i < 1024; i++) prog[i] = i_halt();
  np = 0;
endfunction

localparam word_t YB = 32'h20000, ZB = 32'h22054, XB = 32'h24080;
// Z is placed so that Z(k+11) enters a new block in the same iteration as
// Y(k): both streams then miss together, once every 8 iterations.
localparam int Q = 7, R = 3, T = 5;
word_t snap [65536];

// registers: r1 byte offset of iteration k, r2 end offset, r3 Q, r4 R, r5 T,
// r6 Y base, r7 Z base, r8 X base, r9/r14/r16 addresses, r11/r13 temporaries,
// r20.. loaded values (3 per stage set)
function automatic void loop1_setup(int n);
  emit(i_addi(1, 0, 0));
  emit(i_addi(2, 0, 4 * n));
  emit(i_addi(3, 0, Q));
  emit(i_addi(4, 0, R));
  emit(i_addi(5, 0, T));
  emit(i_lui(6, YB >> 13)); emit(i_addi(6, 6, YB & 32'h1fff));
  emit(i_lui(7, ZB >> 13)); emit(i_addi(7, 7, ZB & 32'h1fff));
  emit(i_lui(8, XB >> 13)); emit(i_addi(8, 8, XB & 32'h1fff));
endfunction

// loads of iteration (k + it) into register set s
function automatic void loop1_loads(int it, int s);
  emit(i_ld(20 + 3 * s, 9, 4 * it + 40));    // Z(k+10)
  emit(i_ld(21 + 3 * s, 9, 4 * it + 44));    // Z(k+11)
  emit(i_ld(22 + 3 * s, 14, 4 * it));        // Y(k)
endfunction
function automatic void loop1_compute(int it, int s);
  emit(i_mul(11, 4, 20 + 3 * s));
  emit(i_mul(13, 5, 21 + 3 * s));
  emit(i_add(11, 11, 13));
  emit(i_mul(11, 22 + 3 * s, 11));
  emit(i_add(11, 3, 11));
  emit(i_st(11, 16, 4 * it));
endfunction

// stages < 0: as compiled; 0: hoisted; S > 0: S-stage load pipelining
function automatic void build_loop1(int n, int stages);
  int top;
  clear_prog();
  loop1_setup(n);
  emit(i_add(9, 7, 1)); emit(i_add(14, 6, 1)); emit(i_add(16, 8, 1));
  if (stages < 0) begin
    top = np;
    emit(i_ld(20, 9, 40));
    emit(i_mul(11, 4, 20));
    emit(i_ld(21, 9, 44));
    emit(i_mul(13, 5, 21));
    emit(i_add(11, 11, 13));
    emit(i_ld(22, 14, 0));
    emit(i_mul(11, 22, 11));
    emit(i_add(11, 3, 11));
    emit(i_st(11, 16, 0));
    emit(i_addi(1, 1, 4));
    emit(i_add(9, 7, 1)); emit(i_add(14, 6, 1)); emit(i_add(16, 8, 1));
    emit(i_bne(1, 2, top - np));
  end else begin
    for (int j = 0; j < stages; j++) loop1_loads(j, j);      // prologue
    top = np;
    for (int u = 0; u <= stages; u++) begin
      loop1_loads(u + stages, (u + stages) % (stages + 1));
      loop1_compute(u, u % (stages + 1));
    end
    emit(i_addi(1, 1, 4 * (stages + 1)));
    emit(i_add(9, 7, 1)); emit(i_add(14, 6, 1)); emit(i_add(16, 8, 1));
    emit(i_bne(1, 2, top - np));
  end
  emit(i_halt());
endfunction

// Loop 11: r1 offset of X(k), starting at k = 2 (offset 4)
function automatic void build_loop11(int n, bit hoist);
  int top;
  clear_prog();
  emit(i_addi(1, 0, 4));
  emit(i_addi(2, 0, 4 * n));
  emit(i_lui(6, YB >> 13)); emit(i_addi(6, 6, YB & 32'h1fff));
  emit(i_lui(8, XB >> 13)); emit(i_addi(8, 8, XB & 32'h1fff));
  if (!hoist) begin
    top = np;
    emit(i_add(9, 8, 1));
    emit(i_add(14, 6, 1));
    emit(i_ld(10, 9, -4));        // X(k-1), written by the previous iteration
    emit(i_ld(12, 14, 0));        // Y(k)
    emit(i_add(11, 10, 12));
    emit(i_st(11, 9, 0));
    emit(i_addi(1, 1, 4));
    emit(i_bne(1, 2, top - np));
  end else begin
    // the X load of the next iteration moves up to just after the store
    // that writes it; the Y load moves to the top of the body
    emit(i_ld(10, 8, 0));         // X(1)
    top = np;
    emit(i_add(14, 6, 1));
    emit(i_ld(12, 14, 0));        // Y(k)
    emit(i_add(9, 8, 1));
    emit(i_add(11, 10, 12));
    emit(i_st(11, 9, 0));
    emit(i_ld(10, 9, 0));         // X(k) for iteration k+1: held by the store
    emit(i_addi(1, 1, 4));
    emit(i_bne(1, 2, top - np));
  end
  emit(i_halt());
endfunction

// Loop 11 with S-stage load pipelining of Y (n-1 iterations, a multiple of
// S+1): Y(k+S) is loaded S iterations ahead into its own register, r16 + set;
// the X load still follows the store that writes it.
function automatic void build_loop11_pipe(int n, int stages);
  int top;
  clear_prog();
  emit(i_addi(1, 0, 4));
  emit(i_addi(2, 0, 4 * n));
  emit(i_lui(6, YB >> 13)); emit(i_addi(6, 6, YB & 32'h1fff));
  emit(i_lui(8, XB >> 13)); emit(i_addi(8, 8, XB & 32'h1fff));
  emit(i_ld(10, 8, 0));                             // X(1)
  emit(i_add(14, 6, 1));
  for (int j = 0; j < stages; j++) emit(i_ld(16 + j, 14, 4 * j));   // prologue
  top = np;
  emit(i_add(9, 8, 1));
  emit(i_add(14, 6, 1));
  for (int u = 0; u <= stages; u++) begin
    emit(i_ld(16 + (u + stages) % (stages + 1), 14, 4 * (u + stages)));
    emit(i_add(11, 10, 16 + u % (stages + 1)));
    emit(i_st(11, 9, 4 * u));
    emit(i_ld(10, 9, 4 * u));                       // X(k+u) for the next iteration
  end
  emit(i_addi(1, 1, 4 * (stages + 1)));
  emit(i_bne(1, 2, top - np));
  emit(i_halt());
endfunction

// Loop 9: PX(25,101) stored by columns of 25 words (100 bytes) from PB.
// r1 address of PX(1,i), r2 end address, r3 CO, r4..r10 DM22..DM28,
// r11 PX(3,i), r12..r20 PX(5..13,i), r21 sum, r22 temporary
localparam word_t PB = 32'h28000;
localparam int CO = 2, DM22 = 3;     // DMm = DM22 + (m - 22)
function automatic int px_reg(int j);  // register holding PX(j,i)
  return (j == 3) ? 11 : 7 + j;
endfunction
function automatic void build_loop9(int n, bit hoist);
  int top;
  clear_prog();
  emit(i_lui(1, PB >> 13));
  // end address; its low 13 bits must stay below 4096 for the signed ADDI
  emit(i_lui(2, (PB + 100 * n) >> 13)); emit(i_addi(2, 2, (PB + 100 * n) & 32'h1fff));
  emit(i_addi(3, 0, CO));
  for (int m = 22; m <= 28; m++) emit(i_addi(4 + m - 22, 0, DM22 + m - 22));
  top = np;
  if (hoist) begin
    emit(i_ld(px_reg(3), 1, 8));
    for (int j = 5; j <= 13; j++) emit(i_ld(px_reg(j), 1, 4 * (j - 1)));
  end else begin
    emit(i_ld(px_reg(3), 1, 8));
    emit(i_ld(px_reg(5), 1, 16));
    emit(i_ld(px_reg(6), 1, 20));
  end
  emit(i_add(22, px_reg(5), px_reg(6)));
  emit(i_mul(22, 3, 22));
  emit(i_add(21, px_reg(3), 22));
  for (int j = 13; j >= 7; j--) begin
    if (!hoist) emit(i_ld(px_reg(j), 1, 4 * (j - 1)));
    emit(i_mul(22, 4 + (j - 7), px_reg(j)));
    emit(i_add(21, 21, 22));
  end
  emit(i_st(21, 1, 0));
  emit(i_addi(1, 1, 100));
  emit(i_bne(1, 2, top - np));
  emit(i_halt());
endfunction

// Loop 9 with 1-stage load pipelining, or unrolled once (n even). Pipelined:
// the loads of column i+1 are issued while column i is computed. Unrolled:
// the body covers columns i and i+1 and all twenty loads are hoisted to its
// top. Either way the second set of ten registers is r21..r30. To free
// registers, CO*(PX(5)+PX(6)) is formed as a sum of CO copies (no CO
// register); r3 holds the sum and r31 is the temporary.
function automatic int px_reg_set(int j, int s);
  return px_reg(j) + 10 * s;
endfunction
function automatic void loop9_loads(int it, int s);
  emit(i_ld(px_reg_set(3, s), 1, 100 * it + 8));
  for (int j = 5; j <= 13; j++) emit(i_ld(px_reg_set(j, s), 1, 100 * it + 4 * (j - 1)));
endfunction
function automatic void loop9_compute(int u);
  emit(i_add(31, px_reg_set(5, u), px_reg_set(6, u)));
  emit(i_add(3, px_reg_set(3, u), 31));
  for (int c = 1; c < CO; c++) emit(i_add(3, 3, 31));
  for (int j = 13; j >= 7; j--) begin
    emit(i_mul(31, 4 + (j - 7), px_reg_set(j, u)));
    emit(i_add(3, 3, 31));
  end
  emit(i_st(3, 1, 100 * u));
endfunction
function automatic void build_loop9_x2(int n, bit unroll);
  int top;
  clear_prog();
  emit(i_lui(1, PB >> 13));
  emit(i_lui(2, (PB + 100 * n) >> 13)); emit(i_addi(2, 2, (PB + 100 * n) & 32'h1fff));
  for (int m = 22; m <= 28; m++) emit(i_addi(4 + m - 22, 0, DM22 + m - 22));
  if (unroll) begin
    top = np;
    loop9_loads(0, 0);
    loop9_loads(1, 1);
    loop9_compute(0);
    loop9_compute(1);
  end else begin
    loop9_loads(0, 0);                                // prologue
    top = np;
    for (int u = 0; u <= 1; u++) begin
      loop9_loads(u + 1, (u + 1) % 2);
      loop9_compute(u);
    end
  end
  emit(i_addi(1, 1, 200));
  emit(i_bne(1, 2, top - np));
  emit(i_halt());
endfunction

// Loop 20, integer form (each division becomes a multiplication and the
// min/max clamp becomes a subtraction; the IF, the loads and the XX recurrence
// are kept):
//   DI = Y(k) - G(k)*(XX(k) + DK);  DN = 2;  if (DI != 0) DN = Z(k) - DI
//   X(k)    = ((W(k) + V(k)*DN)*XX(k) + U(k))*VX(k) + V(k)*DN
//   XX(k+1) = (X(k) - XX(k))*DN + XX(k)
// The nine arrays lie L20_D bytes apart from L20B, so one pointer with
// immediate offsets reaches them all. r1 pointer (L20B + 4k), r2 end, r3 DK,
// r4 the constant 2 (also the always-taken branch operand), r5/r6 temporaries,
// r7 DI, r8 DN, r9 XX(k), r10 Z(k) when loaded in the THEN part, r11.. one
// register set per stage: Y G W V U VX, plus Z when it is loaded speculatively.
localparam word_t L20B = 32'h2C000;
localparam int L20_D = 424, DK = 5;
localparam int OY = 0, OG = 1, OXX = 2, OZ = 3, OW = 4, OV = 5, OU = 6, OVX = 7, OX = 8;
function automatic int l20_set(int s, bit spec);
  return 11 + s * (spec ? 7 : 6);
endfunction
function automatic void loop20_loads(int it, int s, bit spec);
  int b = l20_set(s, spec);
  emit(i_ld(b + 0, 1, OY * L20_D + 4 * it));
  emit(i_ld(b + 1, 1, OG * L20_D + 4 * it));
  emit(i_ld(b + 2, 1, OW * L20_D + 4 * it));
  emit(i_ld(b + 3, 1, OV * L20_D + 4 * it));
  emit(i_ld(b + 4, 1, OU * L20_D + 4 * it));
  emit(i_ld(b + 5, 1, OVX * L20_D + 4 * it));
  if (spec) emit(i_ld(b + 6, 1, OZ * L20_D + 4 * it));
endfunction
// body of iteration (k + u) using register set s; orig places every load
// right before its first use
function automatic void loop20_compute(int u, int s, bit spec, bit orig);
  int b = l20_set(s, spec);
  if (orig) begin
    emit(i_ld(b + 0, 1, OY * L20_D + 4 * u));
    emit(i_ld(b + 1, 1, OG * L20_D + 4 * u));
  end
  emit(i_ld(9, 1, OXX * L20_D + 4 * u));     // XX(k): stored by the previous iteration
  emit(i_add(5, 9, 3));
  emit(i_mul(5, b + 1, 5));
  emit(i_sub(7, b + 0, 5));                 // DI
  emit(i_addi(8, 0, 2));                    // DN = 2
  emit(i_bne(7, 0, 2));                     // DI != 0: THEN part
  if (spec) begin
    emit(i_bne(4, 0, 2));                   // skip the THEN part
    emit(i_sub(8, b + 6, 7));
  end else begin
    emit(i_bne(4, 0, 3));
    emit(i_ld(10, 1, OZ * L20_D + 4 * u));
    emit(i_sub(8, 10, 7));
  end
  if (orig) begin
    emit(i_ld(b + 2, 1, OW * L20_D + 4 * u));
    emit(i_ld(b + 3, 1, OV * L20_D + 4 * u));
  end
  emit(i_mul(5, b + 3, 8));
  emit(i_add(5, b + 2, 5));
  emit(i_mul(5, 5, 9));
  if (orig) emit(i_ld(b + 4, 1, OU * L20_D + 4 * u));
  emit(i_add(5, 5, b + 4));
  if (orig) emit(i_ld(b + 5, 1, OVX * L20_D + 4 * u));
  emit(i_mul(5, 5, b + 5));
  emit(i_mul(6, b + 3, 8));
  emit(i_add(6, 5, 6));
  emit(i_st(6, 1, OX * L20_D + 4 * u));      // X(k)
  emit(i_sub(5, 6, 9));
  emit(i_mul(5, 5, 8));
  emit(i_add(5, 5, 9));
  emit(i_st(5, 1, OXX * L20_D + 4 * u + 4)); // XX(k+1)
endfunction
// stages < 0: as compiled; 0: hoisted; S > 0: S-stage load pipelining (n a
// multiple of S+1). spec also loads Z(k) before the IF, every iteration.
function automatic void build_loop20(int n, int stages, bit spec);
  int top, ss;
  clear_prog();
  emit(i_lui(1, L20B >> 13)); emit(i_addi(1, 1, L20B & 32'h1fff));
  emit(i_lui(2, (L20B + 4 * n) >> 13)); emit(i_addi(2, 2, (L20B + 4 * n) & 32'h1fff));
  emit(i_addi(3, 0, DK));
  emit(i_addi(4, 0, 2));
  ss = (stages < 0) ? 0 : stages;
  for (int j = 0; j < ss; j++) loop20_loads(j, j, spec);   // prologue
  top = np;
  for (int u = 0; u <= ss; u++) begin
    if (stages >= 0) loop20_loads(u + ss, (u + ss) % (ss + 1), spec);
    loop20_compute(u, u % (ss + 1), spec, stages < 0);
  end
  emit(i_addi(1, 1, 4 * (ss + 1)));
  emit(i_bne(1, 2, top - np));
  emit(i_halt());
endfunction

// Loop 15, integer form (sqrt dropped, the division by S becomes a
// multiplication; the IFs, the max selections and all loads are kept):
//   for j = 2..7, k = 2..n:
//     j = 7: VY(k,7) = 0, next
//     T = VH(k,j+1) > VH(k,j) ? 53 : 73
//     VF(k,j) < VF(k-1,j): R = max(VH(k-1,j), VH(k-1,j+1)), S = VF(k-1,j)
//     otherwise          : R = max(VH(k,j),   VH(k,j+1)),   S = VF(k,j)
//     VY(k,j) = (VG(k,j)^2 + R*R)*T*S
//     k = n: VS(k,j) = 0, next
//     VF(k,j) < VF(k,j-1): R = max(VG(k,j-1), VG(k+1,j-1)), S = VF(k,j-1), T = 73
//     otherwise          : R = max(VG(k,j),   VG(k+1,j)),   S = VF(k,j),   T = 53
//     VS(k,j) = (VH(k,j)^2 + R*R)*T*S
// Arrays are 101 x 7 words stored by columns. VF, VG and VH lie L15_D bytes
// apart, so r1 (address of VG(k,j)) reaches all three; r2 (address of
// VS(k,j)) reaches VS and VY the same way. r3 k, r4 n+1, r5 j, r6 7, r7 8,
// r8 T, r9 R, r10 S, r11/r12 temporaries, r13..r23 the eleven loaded values.
// hoist moves all eleven loads to the top of the body, out of the IFs.
localparam word_t L15_GB = 32'h38B54, L15_SB = 32'h3A400;
localparam int L15_D = 2900, L15_COL = 404;
function automatic void fwd_fix(int at);     // point the branch at prog[at] here
  prog[at].imm = 13'(np - at);
endfunction
function automatic void l15_ld(bit hoist, int rd, int imm);
  if (!hoist) emit(i_ld(rd, 1, imm));
endfunction
function automatic void l15_max(int x, int y);  // r9 = max(x, y)
  emit(i_add(9, x, 0));
  emit(i_blt(y, x, 2));
  emit(i_add(9, y, 0));
endfunction
function automatic void l15_prod(int a);      // r11 = (a^2 + R^2)*T*S
  emit(i_mul(11, a, a));
  emit(i_mul(12, 9, 9));
  emit(i_add(11, 11, 12));
  emit(i_mul(11, 11, 8));
  emit(i_mul(11, 11, 10));
endfunction
function automatic void build_loop15(int n, bit hoist);
  int top, b_next1, b_next2, b_1502, b_1506, b_1508, b_1511, b_1512, b_1514;
  localparam int VH_KJ1 = L15_D + L15_COL, VH_KJ = L15_D, VH_K1J = L15_D - 4,
                 VH_K1J1 = L15_D + L15_COL - 4, VF_KJ = -L15_D, VF_K1J = -L15_D - 4,
                 VF_KJ1 = -L15_D - L15_COL, VG_KJ = 0, VG_K1J = 4, VG_KJm = -L15_COL,
                 VG_K1Jm = -L15_COL + 4;
  clear_prog();
  // k = 2, j = 2: byte offset 4*((k-1) + 101*(j-1)) = 408
  emit(i_lui(1, (L15_GB + 408) >> 13)); emit(i_addi(1, 1, (L15_GB + 408) & 32'h1fff));
  emit(i_lui(2, (L15_SB + 408) >> 13)); emit(i_addi(2, 2, (L15_SB + 408) & 32'h1fff));
  emit(i_addi(3, 0, 2));
  emit(i_addi(4, 0, n + 1));
  emit(i_addi(5, 0, 2));
  emit(i_addi(6, 0, 7));
  emit(i_addi(7, 0, 8));
  top = np;
  if (hoist) begin
    emit(i_ld(13, 1, VH_KJ1)); emit(i_ld(14, 1, VH_KJ));  emit(i_ld(15, 1, VF_KJ));
    emit(i_ld(16, 1, VF_K1J)); emit(i_ld(17, 1, VH_K1J)); emit(i_ld(18, 1, VH_K1J1));
    emit(i_ld(19, 1, VG_KJ));  emit(i_ld(20, 1, VF_KJ1)); emit(i_ld(21, 1, VG_K1J));
    emit(i_ld(22, 1, VG_KJm)); emit(i_ld(23, 1, VG_K1Jm));
  end
  b_1502 = np; emit(i_blt(5, 6, 0));          // j < 7
  emit(i_st(0, 2, L15_D));                    // VY(k,7) = 0
  b_next1 = np; emit(i_bne(6, 0, 0));
  fwd_fix(b_1502);
  l15_ld(hoist, 13, VH_KJ1); l15_ld(hoist, 14, VH_KJ);
  emit(i_addi(8, 0, 53));
  emit(i_blt(14, 13, 2));                     // VH(k,j+1) > VH(k,j): T = 53
  emit(i_addi(8, 0, 73));
  l15_ld(hoist, 15, VF_KJ); l15_ld(hoist, 16, VF_K1J);
  b_1506 = np; emit(i_blt(15, 16, 0));
  l15_max(14, 13);                            // 1507
  emit(i_add(10, 15, 0));
  b_1508 = np; emit(i_bne(6, 0, 0));
  fwd_fix(b_1506);                            // 1506
  l15_ld(hoist, 17, VH_K1J); l15_ld(hoist, 18, VH_K1J1);
  l15_max(17, 18);
  emit(i_add(10, 16, 0));
  fwd_fix(b_1508);                            // 1508
  l15_ld(hoist, 19, VG_KJ);
  l15_prod(19);
  emit(i_st(11, 2, L15_D));                   // VY(k,j)
  emit(i_addi(12, 3, 1));
  b_1511 = np; emit(i_blt(12, 4, 0));         // k < n
  emit(i_st(0, 2, 0));                        // VS(n,j) = 0
  b_next2 = np; emit(i_bne(6, 0, 0));
  fwd_fix(b_1511);                            // 1511
  l15_ld(hoist, 20, VF_KJ1);
  b_1512 = np; emit(i_blt(15, 20, 0));
  l15_ld(hoist, 21, VG_K1J);                  // 1513
  l15_max(19, 21);
  emit(i_add(10, 15, 0));
  emit(i_addi(8, 0, 53));
  b_1514 = np; emit(i_bne(6, 0, 0));
  fwd_fix(b_1512);                            // 1512
  l15_ld(hoist, 22, VG_KJm); l15_ld(hoist, 23, VG_K1Jm);
  l15_max(22, 23);
  emit(i_add(10, 20, 0));
  emit(i_addi(8, 0, 73));
  fwd_fix(b_1514);                            // 1514
  l15_prod(14);
  emit(i_st(11, 2, 0));                       // VS(k,j)
  fwd_fix(b_next1); fwd_fix(b_next2);         // next k
  emit(i_addi(1, 1, 4));
  emit(i_addi(2, 2, 4));
  emit(i_addi(3, 3, 1));
  emit(i_bne(3, 4, top - np));
  emit(i_addi(1, 1, 4));                      // next column, k = 2
  emit(i_addi(2, 2, 4));
  emit(i_addi(3, 0, 2));
  emit(i_addi(5, 5, 1));
  emit(i_bne(5, 7, top - np));
  emit(i_halt());
endfunction

endpackage
