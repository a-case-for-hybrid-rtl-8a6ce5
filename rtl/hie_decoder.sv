// hie_decoder: combinational decoder for HIE-MIPS instructions.
//
// The input is a 4-byte window of the instruction stream, big-endian: win[31:24]
// is the first byte of the instruction, win[23:16] the second and so on; bytes
// past the instruction's length are ignored. From the first byte the decoder
// finds the length (1..4 bytes), then picks the fields of the matching HIE
// format and widens them to MIPS32 sizes:
//   - 4-bit register fields are zero-extended to 5 bits (16 GPRs),
//   - the 4-bit shift amount of R-type2 is zero-extended,
//   - the group G immediate is rebuilt from the hl code (0x0000, 0x00LL,
//     0xHH00 or 0xHHLL),
// and assembles the MIPS32 instruction word the HIE instruction stands for, so
// a MIPS32 execution stage can run it unchanged.
//
// Field layouts (bit counts) follow the published formats:
//   A  op6 iid2                     C  op6 r4 fn6
//   B  op6 iid1 rt4 rd5             D  op6 rs4 rt4 rd4 fn6
//   E  op6 rt4 rd4 sa4 fn6          F  op6 rs4 rt4 0000 fn6 (jalr: rs, rd)
//   G  op6 hl2 rs4 rt4 imm0/8/16    H  op6 target26     I  op6 code20 fn6
// Own choices: the opcode values of groups A, B, C and I (see hie_pkg); the
// REGIMM sub-operation codes 0/1/16/17 (bltz/bgez/bltzal/bgezal) travel in the
// 4-bit rt field as {rt[4], rt[2:0]}; bytes that must be zero (R-type3 pad,
// the rs field of lui) and undefined opcodes/function codes set `illegal`.
// An illegal first byte is given length 1 so a fetch unit can step past it.
//
// Timing: purely combinational, no clock.
module hie_decoder
  import hie_pkg::*;
(
  input  logic [31:0] win,
  output hie_dec_t    dec
);

  logic [7:0] b0;
  logic [5:0] op;

  assign b0 = win[31:24];
  assign op = b0[7:2];

  always_comb begin
    dec         = '0;
    dec.group   = GRP_ILLEGAL;
    dec.len     = hie_length(b0);
    dec.op      = op;
    dec.illegal = 1'b0;

    if (op == HOP_GRP_A) begin
      // ---------------- group A: op6 iid2 ---------------------------------
      dec.group = GRP_A;
      unique case (b0[1:0])
        IID_NOP:     dec.mips = MIPS_NOP;
        IID_SYSCALL: dec.mips = MIPS_SYSCALL;
        IID_RFE:     dec.mips = MIPS_RFE;
        default:     dec.illegal = 1'b1;
      endcase
      dec.op = dec.mips[31:26];
      dec.fn = dec.mips[5:0];
    end else if (op[5:2] == HOP_GRP_B_HI) begin
      // ---------------- group B: op6 iid1 rt4 rd5 -------------------------
      dec.group = GRP_B;
      dec.op    = {4'b0100, op[1:0]};               // COPz
      dec.rs    = (win[25] == IID_MFC) ? 5'b00000 : 5'b00100;  // MF / MT
      dec.rt    = {1'b0, win[24:21]};
      dec.rd    = win[20:16];
      dec.mips  = {dec.op, dec.rs, dec.rt, dec.rd, 11'b0};
    end else if (op == HOP_GRP_C) begin
      // ---------------- group C: op6 r4 fn6 --------------------------------
      dec.group = GRP_C;
      dec.op    = OP_SPECIAL;
      dec.fn    = win[21:16];
      unique case (dec.fn)
        FN_JR, FN_MTHI, FN_MTLO: dec.rs = {1'b0, win[25:22]};
        FN_MFHI, FN_MFLO:        dec.rd = {1'b0, win[25:22]};
        default:                 dec.illegal = 1'b1;
      endcase
      dec.mips = {OP_SPECIAL, dec.rs, 5'b0, dec.rd, 5'b0, dec.fn};
    end else if (op == OP_SPECIAL) begin
      // ---------------- groups D, E, F: 24-bit R-types ---------------------
      dec.fn = win[13:8];
      unique case (dec.fn)
        FN_ADD, FN_ADDU, FN_SUB, FN_SUBU, FN_AND, FN_OR, FN_XOR, FN_NOR,
        FN_SLT, FN_SLTU, FN_SLLV, FN_SRLV, FN_SRAV: begin
          dec.group = GRP_D;
          dec.rs = {1'b0, win[25:22]};
          dec.rt = {1'b0, win[21:18]};
          dec.rd = {1'b0, win[17:14]};
        end
        FN_SLL, FN_SRL, FN_SRA: begin
          dec.group = GRP_E;
          dec.rt = {1'b0, win[25:22]};
          dec.rd = {1'b0, win[21:18]};
          dec.sa = {1'b0, win[17:14]};
        end
        FN_JALR: begin
          dec.group   = GRP_F;
          dec.rs      = {1'b0, win[25:22]};
          dec.rd      = {1'b0, win[21:18]};
          dec.illegal = (win[17:14] != 4'b0);
        end
        FN_MULT, FN_MULTU, FN_DIV, FN_DIVU: begin
          dec.group   = GRP_F;
          dec.rs      = {1'b0, win[25:22]};
          dec.rt      = {1'b0, win[21:18]};
          dec.illegal = (win[17:14] != 4'b0);
        end
        default: dec.illegal = 1'b1;
      endcase
      dec.mips = {OP_SPECIAL, dec.rs, dec.rt, dec.rd, dec.sa, dec.fn};
    end else if (op == OP_J || op == OP_JAL) begin
      // ---------------- group H: op6 target26 ------------------------------
      dec.group  = GRP_H;
      dec.target = win[25:0];
      dec.mips   = {op, dec.target};
    end else if (op == HOP_BREAK) begin
      // ---------------- group I: op6 code20 fn6 ----------------------------
      dec.group   = GRP_I;
      dec.op      = OP_SPECIAL;
      dec.fn      = win[5:0];
      dec.illegal = (dec.fn != FN_BREAK);
      dec.mips    = {OP_SPECIAL, win[25:0]};
    end else if (is_grp_g_op(op)) begin
      // ---------------- group G: op6 hl2 rs4 rt4 imm0/8/16 ----------------
      dec.group = GRP_G;
      dec.hl    = b0[1:0];
      dec.rs    = {1'b0, win[23:20]};
      dec.rt    = (op == OP_REGIMM) ? {win[19], 1'b0, win[18:16]}
                                    : {1'b0, win[19:16]};
      unique case (dec.hl)
        2'b00: dec.imm = 16'h0000;
        2'b01: dec.imm = {8'h00, win[15:8]};
        2'b10: dec.imm = {win[15:8], 8'h00};
        default: dec.imm = win[15:0];
      endcase
      if (op == OP_LUI && win[23:20] != 4'b0) dec.illegal = 1'b1;
      if (op[5:2] == 4'b0100 && (win[23:20] != 4'b1000 || win[19:17] != 3'b0))
        dec.illegal = 1'b1;                                   // only bczf / bczt
      if (op == OP_REGIMM && win[18:17] != 2'b00) dec.illegal = 1'b1;
      dec.mips = {op, dec.rs, dec.rt, dec.imm};
    end else begin
      dec.illegal = 1'b1;
    end

    if (dec.len == 3'd0) dec.len = 3'd1;
    if (dec.illegal) dec.group = GRP_ILLEGAL;
  end

endmodule
