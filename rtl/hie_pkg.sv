// hie_pkg: shared types and constants of the Hybrid Instruction Encoding (HIE)
// variant of MIPS32.
//
// HIE keeps the MIPS32 operations but stores each instruction in 1, 2, 3 or 4
// bytes. Register fields shrink to 4 bits (16 GPRs), the shift amount to 4 bits,
// and I-type immediates/offsets keep only their non-zero bytes, flagged by a
// 2-bit "hl" field:
//   hl=00 imm 0x0000, no imm byte     (16-bit instruction)
//   hl=01 imm 0x00LL, one byte LL      (24-bit)
//   hl=10 imm 0xHH00, one byte HH      (24-bit)
//   hl=11 imm 0xHHLL, two bytes HH LL  (32-bit)
// Nine instruction groups (A..I) and their field layouts follow the published
// HIE-MIPS format table. The primary opcode values below for groups A, B, C and
// I are this design's own choice: the format table only says these groups share
// a common opcode, and the length of every instruction must be known from its
// first byte, so each length class gets opcodes MIPS32 leaves unused.
// Byte order is big-endian, as in MIPS32 listings: the first byte of an
// instruction holds the 6-bit opcode in its upper bits.
package hie_pkg;

  // ---------------- MIPS32 primary opcodes (kept by HIE groups D..H) --------
  localparam logic [5:0] OP_SPECIAL = 6'h00;  // groups D, E, F (24-bit R-types)
  localparam logic [5:0] OP_REGIMM  = 6'h01;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_LUI     = 6'h0F;

  // ---------------- HIE-only primary opcodes (design choice) -----------------
  localparam logic [5:0] HOP_GRP_A  = 6'h14;  // nop / syscall / rfe, 8-bit
  localparam logic [5:0] HOP_GRP_C  = 6'h15;  // jr / mfhi / mthi / mflo / mtlo, 16-bit
  localparam logic [5:0] HOP_BREAK  = 6'h16;  // break, 32-bit
  localparam logic [3:0] HOP_GRP_B_HI = 4'b0110; // 0x18..0x1B: mfcz/mtcz, z = op[1:0]

  // iid values of group A and B (design choice)
  localparam logic [1:0] IID_NOP     = 2'd0;
  localparam logic [1:0] IID_SYSCALL = 2'd1;
  localparam logic [1:0] IID_RFE     = 2'd2;
  localparam logic       IID_MFC     = 1'b0;
  localparam logic       IID_MTC     = 1'b1;

  // ---------------- MIPS32 SPECIAL function codes ---------------------------
  localparam logic [5:0] FN_SLL  = 6'h00, FN_SRL  = 6'h02, FN_SRA  = 6'h03,
                         FN_SLLV = 6'h04, FN_SRLV = 6'h06, FN_SRAV = 6'h07,
                         FN_JR   = 6'h08, FN_JALR = 6'h09, FN_SYSCALL = 6'h0C,
                         FN_BREAK = 6'h0D,
                         FN_MFHI = 6'h10, FN_MTHI = 6'h11, FN_MFLO = 6'h12,
                         FN_MTLO = 6'h13,
                         FN_MULT = 6'h18, FN_MULTU = 6'h19, FN_DIV = 6'h1A,
                         FN_DIVU = 6'h1B,
                         FN_ADD  = 6'h20, FN_ADDU = 6'h21, FN_SUB  = 6'h22,
                         FN_SUBU = 6'h23, FN_AND  = 6'h24, FN_OR   = 6'h25,
                         FN_XOR  = 6'h26, FN_NOR  = 6'h27, FN_SLT  = 6'h2A,
                         FN_SLTU = 6'h2B;

  // MIPS32 words the 8-bit group A instructions stand for
  localparam logic [31:0] MIPS_NOP     = 32'h0000_0000;
  localparam logic [31:0] MIPS_SYSCALL = {26'b0, FN_SYSCALL};
  localparam logic [31:0] MIPS_RFE     = 32'h4200_0010;

  // HIE instruction groups of the mapping table
  typedef enum logic [3:0] {
    GRP_A,   // 8-bit   nop, syscall, rfe
    GRP_B,   // 16-bit  mfcz, mtcz
    GRP_C,   // 16-bit  jr, mfhi, mflo, mthi, mtlo
    GRP_D,   // 24-bit  R-type1 (op rs rt rd fn)
    GRP_E,   // 24-bit  R-type2 (op rt rd sa fn)
    GRP_F,   // 24-bit  R-type3 (op rs rt 0000 fn)
    GRP_G,   // 16/24/32-bit I-type (op hl rs rt imm)
    GRP_H,   // 32-bit  j, jal
    GRP_I,   // 32-bit  break
    GRP_ILLEGAL
  } hie_group_e;

  // Decoded HIE instruction, fields widened to their MIPS32 sizes
  typedef struct packed {
    logic        illegal;  // encoding not defined by HIE
    hie_group_e  group;
    logic [2:0]  len;      // bytes, 1..4
    logic [1:0]  hl;       // immediate length code (group G only)
    logic [5:0]  op;       // MIPS32 primary opcode
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  sa;
    logic [5:0]  fn;
    logic [15:0] imm;      // immediate / offset restored to 16 bits
    logic [25:0] target;   // jump target (group H)
    logic [31:0] mips;     // equivalent MIPS32 instruction word
  } hie_dec_t;

  // Opcodes that take the group G (hybrid immediate) format: MIPS32 I-types
  // addi..lui, branches, coprocessor branches, loads and stores.
  function automatic logic is_grp_g_op(input logic [5:0] op);
    unique case (op)
      6'h01, 6'h04, 6'h05, 6'h06, 6'h07,                 // regimm, beq, bne, blez, bgtz
      6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E,   // addi..xori
      6'h0F,                                             // lui
      6'h10, 6'h11, 6'h12, 6'h13,                        // bczt / bczf
      6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26,   // lb lh lwl lw lbu lhu lwr
      6'h28, 6'h29, 6'h2A, 6'h2B, 6'h2E,                 // sb sh swl sw swr
      6'h30, 6'h31, 6'h32, 6'h33,                        // lwcz
      6'h38, 6'h39, 6'h3A, 6'h3B:                        // swcz
        return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Instruction length in bytes from the first byte of an instruction.
  // Returns 0 for a first byte that starts no HIE instruction.
  function automatic logic [2:0] hie_length(input logic [7:0] b0);
    logic [5:0] op;
    logic [1:0] lo;
    op = b0[7:2];
    lo = b0[1:0];
    if (op == HOP_GRP_A)                         return 3'd1;
    else if (op == HOP_GRP_C)                    return 3'd2;
    else if (op[5:2] == HOP_GRP_B_HI)            return 3'd2;
    else if (op == OP_SPECIAL)                   return 3'd3;
    else if (op == OP_J || op == OP_JAL || op == HOP_BREAK) return 3'd4;
    else if (is_grp_g_op(op)) begin
      unique case (lo)
        2'b00:        return 3'd2;
        2'b01, 2'b10: return 3'd3;
        default:      return 3'd4;
      endcase
    end
    return 3'd0;
  endfunction

endpackage
