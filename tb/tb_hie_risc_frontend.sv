// tb_hie_risc_frontend: end-to-end test of the HIE-RISC front end at its
// default size (64 KiB code memory, 16-byte fetch queue, 16 GPRs).
//
// A program of 12,750 MIPS32 instructions (51,000 bytes, the size of the
// largest program whose size is published) is made from a mix in which
// addu/addiu/lw/sw take 65% (as published for susan) and the rest is spread
// over all nine HIE groups; immediates follow the published susan counts of
// the four immediate forms.
// The reference converter turns it into HIE code, which is loaded through the
// load port while the core is held in reset. The test then plays the
// execution stage: it stalls at random, redirects now and then to another
// instruction (as a taken branch would), and writes random values to the
// register file. Every decoded instruction must come back as the original
// MIPS32 word, at the right byte address and with the right next address,
// and its rs/rt operands must match a shadow register file.
// Mechanisms counted (each must occur): all nine groups, the four immediate
// lengths, instructions straddling a word boundary, consumer stalls,
// redirects to unaligned addresses, register write-back. The HIE code size is
// compared with the MIPS32 size and the reduction printed.
module tb_hie_risc_frontend;
  import hie_pkg::*;
  import hie_ref_pkg::*;

  localparam int CODE_BYTES = 65536;
  localparam int ADDR_W     = 16;
  localparam int NINST      = 12750;
  localparam int MAJOR_PCT  = 65;

  logic              clk = 0, rst_n = 0;
  logic              load_en = 0;
  logic [ADDR_W-3:0] load_addr = '0;
  logic [3:0]        load_be = '0;
  logic [31:0]       load_data = '0;
  logic              redirect_valid = 0;
  logic [ADDR_W-1:0] redirect_pc = '0;
  logic              dec_ready = 0;
  logic              wb_en = 0;
  logic [3:0]        wb_addr = '0;
  logic [31:0]       wb_data = '0;
  logic              dec_valid;
  hie_dec_t          dec;
  logic [ADDR_W-1:0] dec_pc, dec_next_pc;
  logic [31:0]       rs_data, rt_data;

  hie_risc_frontend dut (.*);

  always #5 clk = ~clk;

  logic [7:0]  image [CODE_BYTES];
  logic [31:0] prog  [NINST];
  int          pc_of [NINST + 1];
  logic [31:0] regs  [16];
  int checks = 0, failures = 0;
  int idx;
  int grp_seen [NGROUPS];
  int hl_seen  [4];
  int n_straddle = 0, n_stall = 0, n_redirect = 0, n_unaligned = 0, n_wb = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s (idx %0d pc %h mips %h)", what, idx, dec_pc, dec.mips);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, len, grp, cycles;
    logic [31:0] w;
    bit ok;

    // immediate/offset forms of the susan program: 1974 all-zero, 6475 with a
    // zero upper byte, 12 with a zero lower byte, 936 with both bytes used
    imm_w = '{1974, 6475, 12, 936};
    for (int g = 0; g < NGROUPS; g++) grp_seen[g] = 0;
    for (int h = 0; h < 4; h++) hl_seen[h] = 0;

    // ---- build the program and its HIE image ----
    for (int i = 0; i < CODE_BYTES; i++) image[i] = 8'h00;
    a = 0;
    for (int i = 0; i < NINST; i++) begin
      prog[i]  = rand_mips_mix(MAJOR_PCT);
      ok = mips_to_hie(prog[i], w, len, grp);
      if (!ok) $fatal(1, "unconvertible instruction %h", prog[i]);
      pc_of[i] = a;
      for (int b = 0; b < len; b++) image[a + b] = w[31 - 8*b -: 8];
      a += len;
    end
    pc_of[NINST] = a;
    if (a > CODE_BYTES) $fatal(1, "program does not fit");
    $display("MIPS32 code %0d bytes, HIE code %0d bytes, reduction %0d.%0d%%",
             4 * NINST, a, (100 * (4 * NINST - a)) / (4 * NINST),
             ((1000 * (4 * NINST - a)) / (4 * NINST)) % 10);
    check(a < 4 * NINST, "HIE code smaller than MIPS32 code");

    // ---- load through the load port, core held in reset ----
    for (int wd = 0; wd < (a + 3) / 4; wd++) begin
      @(negedge clk);
      load_en = 1; load_addr = (ADDR_W-2)'(wd); load_be = 4'hF;
      load_data = {image[4*wd], image[4*wd + 1], image[4*wd + 2], image[4*wd + 3]};
    end
    @(negedge clk) load_en = 0;
    for (int r = 0; r < 16; r++) regs[r] = '0;
    @(negedge clk) rst_n = 1;

    // ---- run ----
    idx = 0;
    cycles = 0;
    while (idx < NINST) begin
      bit ready, redir;
      int target;
      @(negedge clk);
      cycles++;
      ready = ($urandom_range(0, 9) != 0);
      redir = 0;
      // register write-back from the (modelled) execution stage
      wb_en   = ($urandom_range(0, 1) != 0);
      wb_addr = 4'($urandom);
      wb_data = $urandom;
      // now and then a taken branch to a nearby instruction
      if (dec_valid && $urandom_range(0, 299) == 0) begin
        target = idx + $urandom_range(0, 40) - 20;
        if (target < 0) target = 0;
        if (target >= NINST) target = NINST - 1;
        redir = 1;
      end
      dec_ready      = ready;
      redirect_valid = redir;
      redirect_pc    = redir ? ADDR_W'(pc_of[target]) : '0;
      #1;
      if (dec_valid && !dec_ready && !redir) n_stall++;
      if (redir) begin
        n_redirect++;
        if (pc_of[target] % 4 != 0) n_unaligned++;
        idx = target;
      end else if (dec_valid && dec_ready) begin
        int exp_len;
        exp_len = pc_of[idx + 1] - pc_of[idx];
        check(dec.mips === prog[idx], $sformatf("MIPS32 word, expected %h", prog[idx]));
        check(int'(dec_pc) === pc_of[idx], "instruction address");
        check(int'(dec_next_pc) === pc_of[idx + 1] % CODE_BYTES, "next address");
        check(!dec.illegal, "legal");
        check(rs_data === regs[dec.rs[3:0]] && rt_data === regs[dec.rt[3:0]], "operands");
        if (dec.group inside {GRP_D, GRP_G} && prog[idx][31:26] != 6'h01)
          check(rs_data === regs[prog[idx][24:21]] && rt_data === regs[prog[idx][19:16]],
                "operands by MIPS32 fields");
        if (!dec.illegal) grp_seen[int'(dec.group)]++;
        if (dec.group == GRP_G) hl_seen[dec.hl]++;
        if (pc_of[idx] % 4 + exp_len > 4) n_straddle++;
        idx++;
      end
      @(posedge clk);
      if (wb_en && wb_addr != 0) begin
        regs[wb_addr] = wb_data;
        n_wb++;
      end
    end
    @(negedge clk) begin dec_ready = 0; wb_en = 0; end

    $display("cycles %0d for %0d instructions, %0d stalls, %0d redirects (%0d unaligned)",
             cycles, NINST, n_stall, n_redirect, n_unaligned);
    $display("groups A..I: %0d %0d %0d %0d %0d %0d %0d %0d %0d", grp_seen[0], grp_seen[1],
             grp_seen[2], grp_seen[3], grp_seen[4], grp_seen[5], grp_seen[6], grp_seen[7],
             grp_seen[8]);
    $display("hl 00/01/10/11: %0d %0d %0d %0d; straddling %0d; write-backs %0d",
             hl_seen[0], hl_seen[1], hl_seen[2], hl_seen[3], n_straddle, n_wb);
    for (int g = 0; g < NGROUPS; g++) check(grp_seen[g] > 0, $sformatf("group %0d seen", g));
    for (int h = 0; h < 4; h++) check(hl_seen[h] > 0, $sformatf("hl %0d seen", h));
    check(n_straddle > 0, "straddling instruction seen");
    check(n_stall > 0, "stall seen");
    check(n_redirect > 0 && n_unaligned > 0, "unaligned redirect seen");
    check(n_wb > 0, "write-back seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
