// tb_hie_decoder: self-checking test of the HIE instruction decoder.
//
// Directed part: the four immediate cases of the HIE immediate table (addiu
// with 0x0000, 0x000F, 0x0F00, 0x0F0F must give 16/24/24/32-bit instructions
// with hl 00/01/10/11), one instruction of each group with hand-built bytes,
// and undefined encodings that must be flagged illegal with length 1.
// Random part: random MIPS32 instructions of every group are converted to HIE
// by the reference model, the bytes after the instruction are filled with
// noise, and the decoder must give back the length, group and the original
// MIPS32 word.
module tb_hie_decoder;
  import hie_pkg::*;
  import hie_ref_pkg::*;

  logic [31:0] win;
  hie_dec_t    dec;
  int checks = 0, failures = 0;

  hie_decoder dut (.win(win), .dec(dec));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: win=%h len=%0d grp=%s mips=%h ill=%0d", what, win, dec.len,
               dec.group.name(), dec.mips, dec.illegal);
    end
  endtask

  task automatic run_one(input logic [31:0] m, input int exp_grp);
    logic [31:0] w, noise;
    int len, grp;
    bit ok;
    ok = mips_to_hie(m, w, len, grp);
    check(ok && grp === exp_grp, $sformatf("reference conversion of %h", m));
    noise = $urandom;
    win = w | (noise >> (8 * len));
    if (len == 4) win = w;
    #1;
    check(dec.len === 3'(len), $sformatf("length of %h", m));
    check(dec.mips === m, $sformatf("MIPS32 word of %h", m));
    check(!dec.illegal && int'(dec.group) === exp_grp, $sformatf("group of %h", m));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // addiu r2, r1, imm : the four cases of the immediate table
    win = {6'h09, 2'b00, 4'd1, 4'd2, 16'hAAAA}; #1;
    check(dec.len === 2 && dec.hl === 2'b00 && dec.imm === 16'h0000 &&
          dec.mips === 32'h2422_0000, "addiu imm 0000");
    win = {6'h09, 2'b01, 4'd1, 4'd2, 8'h0F, 8'hAA}; #1;
    check(dec.len === 3 && dec.hl === 2'b01 && dec.imm === 16'h000F &&
          dec.mips === 32'h2422_000F, "addiu imm 000F");
    win = {6'h09, 2'b10, 4'd1, 4'd2, 8'h0F, 8'hAA}; #1;
    check(dec.len === 3 && dec.hl === 2'b10 && dec.imm === 16'h0F00 &&
          dec.mips === 32'h2422_0F00, "addiu imm 0F00");
    win = {6'h09, 2'b11, 4'd1, 4'd2, 16'h0F0F}; #1;
    check(dec.len === 4 && dec.hl === 2'b11 && dec.imm === 16'h0F0F &&
          dec.mips === 32'h2422_0F0F, "addiu imm 0F0F");

    // and r3, r1, r2 (R-type1, 24 bits) -> MIPS 0x00221824
    win = {6'h00, 4'd1, 4'd2, 4'd3, 6'h24, 8'h55}; #1;
    check(dec.len === 3 && dec.group === GRP_D && dec.mips === 32'h0022_1824, "and");
    // sll r5, r4, 15 (R-type2) -> MIPS 0x00042BC0
    win = {6'h00, 4'd4, 4'd5, 4'd15, 6'h00, 8'h55}; #1;
    check(dec.len === 3 && dec.group === GRP_E && dec.sa === 5'd15 &&
          dec.mips === 32'h0004_2BC0, "sll");
    // mult r6, r7 (R-type3) -> MIPS 0x00C70018
    win = {6'h00, 4'd6, 4'd7, 4'd0, 6'h18, 8'h55}; #1;
    check(dec.len === 3 && dec.group === GRP_F && dec.mips === 32'h00C7_0018, "mult");
    // jalr r9, r8 (R-type3, rs and rd) -> MIPS 0x01004809
    win = {6'h00, 4'd8, 4'd9, 4'd0, 6'h09, 8'h55}; #1;
    check(dec.len === 3 && dec.rd === 5'd9 && dec.mips === 32'h0100_4809, "jalr");
    // mfhi r10 -> 0x00005010; jr r15 -> 0x01E00008 (r31 does not exist with 16 GPRs)
    win = {6'h15, 4'd10, 6'h10, 16'h5555}; #1;
    check(dec.len === 2 && dec.group === GRP_C && dec.mips === 32'h0000_5010, "mfhi");
    win = {6'h15, 4'd15, 6'h08, 16'h5555}; #1;
    check(dec.len === 2 && dec.group === GRP_C && dec.mips === 32'h01E0_0008, "jr");
    // mtc0 r3, cp0 reg 12 -> MIPS 0x40836000
    win = {6'h18, 1'b1, 4'd3, 5'd12, 16'h5555}; #1;
    check(dec.len === 2 && dec.group === GRP_B && dec.mips === 32'h4083_6000, "mtc0");
    // syscall, rfe, nop (8 bits)
    win = {6'h14, 2'd1, 24'h555555}; #1;
    check(dec.len === 1 && dec.group === GRP_A && dec.mips === 32'h0000_000C, "syscall");
    win = {6'h14, 2'd2, 24'h555555}; #1;
    check(dec.len === 1 && dec.mips === 32'h4200_0010, "rfe");
    win = {6'h14, 2'd0, 24'h555555}; #1;
    check(dec.len === 1 && dec.mips === 32'h0000_0000, "nop");
    // j 0x123456 and break
    win = {6'h02, 26'h0123456}; #1;
    check(dec.len === 4 && dec.group === GRP_H && dec.target === 26'h0123456 &&
          dec.mips === 32'h0812_3456, "j");
    win = {6'h16, 20'h00007, 6'h0D}; #1;
    check(dec.len === 4 && dec.group === GRP_I && dec.mips === 32'h0000_01CD, "break");
    // bgezal r4, +8 : REGIMM rt 17 travels as 4'b1001 -> MIPS 0x04910008
    win = {6'h01, 2'b01, 4'd4, 4'b1001, 8'h08, 8'h55}; #1;
    check(dec.len === 3 && dec.rt === 5'd17 && dec.mips === 32'h0491_0008, "bgezal");

    // undefined encodings
    win = {6'h3F, 2'b11, 24'h0}; #1;
    check(dec.illegal && dec.len === 1 && dec.group === GRP_ILLEGAL, "undefined opcode");
    win = {6'h14, 2'd3, 24'h0}; #1;
    check(dec.illegal && dec.len === 1, "undefined iid");
    win = {6'h00, 4'd1, 4'd2, 4'd3, 6'h3F, 8'h0}; #1;
    check(dec.illegal && dec.len === 3, "undefined R-type function");
    win = {6'h00, 4'd1, 4'd2, 4'd3, 6'h18, 8'h0}; #1;
    check(dec.illegal, "R-type3 with non-zero pad");
    win = {6'h0F, 2'b01, 4'd1, 4'd2, 8'h12, 8'h0}; #1;
    check(dec.illegal, "lui with non-zero rs");

    // random instructions of every group
    for (int n = 0; n < 4000; n++) begin
      int g;
      g = n % NGROUPS;
      run_one(rand_mips(g), g);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
