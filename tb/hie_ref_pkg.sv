// hie_ref_pkg: reference model used by the testbenches.
//
// mips_to_hie() converts one MIPS32 instruction word into its HIE encoding,
// written from the MIPS32 side (field extraction of the 32-bit word, then
// packing into the shorter format), independently of the RTL decoder which
// works in the opposite direction. It returns 0 when the instruction has no
// HIE form (a register above r15, a shift of 16 or more, an operation outside
// the 66 integer instructions). The HIE bytes come back left-aligned in a
// 32-bit window, first byte in [31:24].
// rand_mips() makes a random, convertible MIPS32 instruction of a given HIE
// group; rand_mips_mix() draws from a mix in which addu/addiu/lw/sw take a
// given share, which is how the testbenches stand in for program code.
package hie_ref_pkg;

  // group numbers: 0..8 = A..I
  localparam int NGROUPS = 9;

  function automatic bit mips_to_hie(input logic [31:0] m, output logic [31:0] win,
                                     output int len, output int grp);
    logic [5:0]  op, fn;
    logic [4:0]  rs, rt, rd, sa;
    logic [15:0] imm;
    logic [31:0] ins;
    logic [1:0]  hl;
    logic [3:0]  rt4;
    op = m[31:26]; rs = m[25:21]; rt = m[20:16]; rd = m[15:11]; sa = m[10:6];
    fn = m[5:0];   imm = m[15:0];
    win = '0; len = 0; grp = -1; ins = '0;
    if (m == 32'h0000_0000) begin ins = {24'h0, 6'h14, 2'd0}; len = 1; grp = 0; end
    else if (m == 32'h0000_000C) begin ins = {24'h0, 6'h14, 2'd1}; len = 1; grp = 0; end
    else if (m == 32'h4200_0010) begin ins = {24'h0, 6'h14, 2'd2}; len = 1; grp = 0; end
    else if (op == 6'h00) begin
      if ((fn inside {6'h20,6'h21,6'h22,6'h23,6'h24,6'h25,6'h26,6'h27,6'h2A,6'h2B,
                        6'h04,6'h06,6'h07})) begin
        if (sa != 0 || rs > 15 || rt > 15 || rd > 15) return 0;
        ins = {8'h0, 6'h00, rs[3:0], rt[3:0], rd[3:0], fn}; len = 3; grp = 3;
      end else if ((fn inside {6'h00, 6'h02, 6'h03})) begin
        if (rs != 0 || rt > 15 || rd > 15 || sa > 15) return 0;
        ins = {8'h0, 6'h00, rt[3:0], rd[3:0], sa[3:0], fn}; len = 3; grp = 4;
      end else if (fn == 6'h09) begin
        if (rt != 0 || sa != 0 || rs > 15 || rd > 15) return 0;
        ins = {8'h0, 6'h00, rs[3:0], rd[3:0], 4'h0, fn}; len = 3; grp = 5;
      end else if ((fn inside {6'h18, 6'h19, 6'h1A, 6'h1B})) begin
        if (rd != 0 || sa != 0 || rs > 15 || rt > 15) return 0;
        ins = {8'h0, 6'h00, rs[3:0], rt[3:0], 4'h0, fn}; len = 3; grp = 5;
      end else if ((fn inside {6'h08, 6'h11, 6'h13})) begin
        if (rt != 0 || rd != 0 || sa != 0 || rs > 15) return 0;
        ins = {16'h0, 6'h15, rs[3:0], fn}; len = 2; grp = 2;
      end else if ((fn inside {6'h10, 6'h12})) begin
        if (rs != 0 || rt != 0 || sa != 0 || rd > 15) return 0;
        ins = {16'h0, 6'h15, rd[3:0], fn}; len = 2; grp = 2;
      end else if (fn == 6'h0D) begin
        ins = {6'h16, m[25:0]}; len = 4; grp = 8;
      end else return 0;
    end else if (op == 6'h02 || op == 6'h03) begin
      ins = m; len = 4; grp = 7;
    end else if (op[5:2] == 4'b0100 && (rs == 5'd0 || rs == 5'd4)) begin
      if (m[10:0] != 0 || rt > 15) return 0;
      ins = {16'h0, 4'b0110, op[1:0], (rs == 5'd4), rt[3:0], rd}; len = 2; grp = 1;
    end else if ((op inside {6'h01,6'h04,6'h05,6'h06,6'h07,6'h08,6'h09,6'h0A,6'h0B,
                               6'h0C,6'h0D,6'h0E,6'h0F,6'h10,6'h11,6'h12,6'h13,
                               6'h20,6'h21,6'h22,6'h23,6'h24,6'h25,6'h26,6'h28,
                               6'h29,6'h2A,6'h2B,6'h2E,6'h30,6'h31,6'h32,6'h33,
                               6'h38,6'h39,6'h3A,6'h3B})) begin
      if (rs > 15) return 0;
      if (op == 6'h0F && rs != 0) return 0;
      if (op[5:2] == 4'b0100 && !(rs == 5'd8 && rt <= 1)) return 0;
      if (op == 6'h01) begin
        if (!(rt == 0 || rt == 1 || rt == 16 || rt == 17)) return 0;
        rt4 = {rt[4], rt[2:0]};
      end else begin
        if (rt > 15) return 0;
        rt4 = rt[3:0];
      end
      hl = {imm[15:8] != 0, imm[7:0] != 0};
      grp = 6;
      unique case (hl)
        2'b00: begin ins = {16'h0, op, hl, rs[3:0], rt4};            len = 2; end
        2'b01: begin ins = {8'h0,  op, hl, rs[3:0], rt4, imm[7:0]};  len = 3; end
        2'b10: begin ins = {8'h0,  op, hl, rs[3:0], rt4, imm[15:8]}; len = 3; end
        2'b11: begin ins = {       op, hl, rs[3:0], rt4, imm};       len = 4; end
      endcase
    end else return 0;
    win = ins << (32 - 8 * len);
    return 1;
  endfunction

  function automatic logic [4:0] rreg();
    return 5'($urandom_range(0, 15));
  endfunction

  // Relative weights of the four immediate forms drawn by rimm(), in hl order:
  // 0x0000, 0x00LL, 0xHH00, 0xHHLL. Equal by default; a testbench may set
  // them, e.g. to a measured distribution.
  int imm_w [4] = '{1, 1, 1, 1};

  // random immediate of one of the four hl forms, drawn with imm_w
  function automatic logic [15:0] rimm();
    int sel, r;
    r = $urandom_range(0, imm_w[0] + imm_w[1] + imm_w[2] + imm_w[3] - 1);
    sel = 3;
    if (r < imm_w[0]) sel = 0;
    else if (r < imm_w[0] + imm_w[1]) sel = 1;
    else if (r < imm_w[0] + imm_w[1] + imm_w[2]) sel = 2;
    unique case (sel)
      0: return 16'h0000;
      1: return {8'h00, 8'($urandom_range(1, 255))};
      2: return {8'($urandom_range(1, 255)), 8'h00};
      default: return {8'($urandom_range(1, 255)), 8'($urandom_range(1, 255))};
    endcase
  endfunction

  localparam logic [5:0] FN_C[5]  = '{6'h08, 6'h10, 6'h11, 6'h12, 6'h13};
  localparam logic [5:0] FN_D[13] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26,
                                      6'h27, 6'h2A, 6'h2B, 6'h04, 6'h06, 6'h07};
  localparam logic [5:0] FN_E[3]  = '{6'h00, 6'h02, 6'h03};
  localparam logic [5:0] FN_F[5]  = '{6'h09, 6'h18, 6'h19, 6'h1A, 6'h1B};
  localparam logic [5:0] OP_G[37] = '{6'h01, 6'h04, 6'h05, 6'h06, 6'h07, 6'h08, 6'h09,
                                      6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F, 6'h10,
                                      6'h11, 6'h12, 6'h13, 6'h20, 6'h21, 6'h22, 6'h23,
                                      6'h24, 6'h25, 6'h26, 6'h28, 6'h29, 6'h2A, 6'h2B,
                                      6'h2E, 6'h30, 6'h31, 6'h32, 6'h33, 6'h38, 6'h39,
                                      6'h3A, 6'h3B};
  localparam logic [4:0] RT_REGIMM[4] = '{5'd0, 5'd1, 5'd16, 5'd17};

  // random convertible MIPS32 instruction of HIE group g (0..8 = A..I)
  function automatic logic [31:0] rand_mips(input int g);
    logic [5:0] op, fn;
    logic [4:0] rt;
    int sel;
    sel = $urandom_range(0, 2);
    unique case (g)
      0: unique case (sel)
           0: return 32'h0000_0000;
           1: return 32'h0000_000C;
           default: return 32'h4200_0010;
         endcase
      1: return {4'b0100, 2'($urandom_range(0, 3)), ($urandom_range(0, 1) != 0) ? 5'd4 : 5'd0,
                 rreg(), 5'($urandom), 11'h0};
      2: begin
           fn = FN_C[$urandom_range(0, 4)];
           if (fn == 6'h10 || fn == 6'h12) return {6'h0, 10'h0, rreg(), 5'h0, fn};
           return {6'h0, rreg(), 10'h0, 5'h0, fn};
         end
      3: begin
           fn = FN_D[$urandom_range(0, 12)];
           return {6'h0, rreg(), rreg(), rreg(), 5'h0, fn};
         end
      4: begin
           logic [4:0] rd, sa;
           fn = FN_E[$urandom_range(0, 2)];
           rt = rreg(); rd = rreg(); sa = rreg();
           if (rd == 0 && rt == 0 && sa == 0 && fn == 6'h00) rd = 5'd1;  // not nop
           return {6'h0, 5'h0, rt, rd, sa, fn};
         end
      5: begin
           fn = FN_F[$urandom_range(0, 4)];
           if (fn == 6'h09) return {6'h0, rreg(), 5'h0, rreg(), 5'h0, fn};
           return {6'h0, rreg(), rreg(), 10'h0, fn};
         end
      6: begin
           op = OP_G[$urandom_range(0, 36)];
           if (op == 6'h01) begin
             rt = RT_REGIMM[$urandom_range(0, 3)];
             return {op, rreg(), rt, rimm()};
           end
           if (op == 6'h0F) return {op, 5'h0, rreg(), rimm()};
           if (op[5:2] == 4'b0100) return {op, 5'd8, 5'($urandom_range(0, 1)), rimm()};
           return {op, rreg(), rreg(), rimm()};
         end
      7: return {($urandom_range(0, 1) != 0) ? 6'h03 : 6'h02, 26'($urandom)};
      default: return {6'h0, 20'($urandom), 6'h0D};
    endcase
  endfunction

  // random instruction from a program-like mix: `major_pct` percent are the
  // four dominant instructions addu, addiu, lw, sw; the rest spread over all
  // groups.
  function automatic logic [31:0] rand_mips_mix(input int major_pct);
    int sel;
    sel = $urandom_range(0, 3);
    if ($urandom_range(0, 99) < major_pct) begin
      unique case (sel)
        0: return {6'h0, rreg(), rreg(), rreg(), 5'h0, 6'h21};          // addu
        1: return {6'h09, rreg(), rreg(), rimm()};                      // addiu
        2: return {6'h23, rreg(), rreg(), rimm()};                      // lw
        default: return {6'h2B, rreg(), rreg(), rimm()};                // sw
      endcase
    end
    return rand_mips($urandom_range(0, NGROUPS - 1));
  endfunction

endpackage
