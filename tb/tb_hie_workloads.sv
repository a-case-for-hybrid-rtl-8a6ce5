// tb_hie_workloads: the 23 MiBench/MediaBench programs of the HIE evaluation,
// run as synthetic stand-ins through the front end at its default size.
//
// The real program binaries are not part of this design, so each program is
// replaced by random MIPS32 code with the same share of the four dominant
// instructions (addu, addiu, lw, sw) as published for it, immediates drawn
// from the published susan counts of the four immediate forms (the only
// program for which they are given), and with a size
// taken from its published size class: 8 KB for small programs, 32 KB for the
// medium one and 51,000 bytes (the one published large size) for large ones.
// Each is converted to HIE, loaded, and fetched/decoded from start to end with
// the consumer always ready. Checked per program: the HIE image fits the code
// memory, every instruction decodes back to its MIPS32 word, and the front end
// delivers one instruction per cycle (at most a few cycles of start-up).
// The reduction printed comes from the synthetic mix, not from the programs.
module tb_hie_workloads;
  import hie_pkg::*;
  import hie_ref_pkg::*;

  localparam int CODE_BYTES = 65536;
  localparam int ADDR_W     = 16;
  localparam int NPROG      = 23;
  localparam int MAXINST    = 12750;

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

  // program name, share of addu/addiu/lw/sw (%), size class 0 small/1 medium/2 large
  typedef struct { string name; int major; int cls; } prog_t;
  prog_t progs [NPROG] = '{
    '{"basicmath", 33, 0}, '{"bitcnts", 58, 0}, '{"qsort", 57, 0}, '{"susan", 65, 2},
    '{"jpeg", 63, 2}, '{"typeset", 62, 2}, '{"lame", 45, 2}, '{"dijkstra", 59, 2},
    '{"patricia", 59, 2}, '{"rijndael", 59, 2}, '{"blowfish", 59, 2}, '{"sha", 42, 0},
    '{"adpcm", 59, 2}, '{"CRC32", 59, 2}, '{"FFT", 56, 2}, '{"gsm", 58, 2},
    '{"ispell", 53, 2}, '{"rsynth", 47, 1}, '{"stringsearch", 59, 2}, '{"pegwit", 58, 2},
    '{"mpeg2", 56, 2}, '{"G721", 59, 2}, '{"epic", 59, 2}};

  logic [7:0]  image [CODE_BYTES];
  logic [31:0] prog  [MAXINST];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // immediate/offset forms of the susan program: 1974 all-zero, 6475 with a
    // zero upper byte, 12 with a zero lower byte, 936 with both bytes used
    imm_w = '{1974, 6475, 12, 936};
    for (int p = 0; p < NPROG; p++) begin
      int mips_bytes, n, a, len, grp, idx, cycles, first;
      logic [31:0] w;
      mips_bytes = (progs[p].cls == 0) ? 8192 : (progs[p].cls == 1) ? 32768 : 51000;
      n = mips_bytes / 4;
      a = 0;
      for (int i = 0; i < n; i++) begin
        prog[i] = rand_mips_mix(progs[p].major);
        void'(mips_to_hie(prog[i], w, len, grp));
        for (int b = 0; b < len; b++) if (a + b < CODE_BYTES) image[a + b] = w[31 - 8*b -: 8];
        a += len;
      end
      check(a <= CODE_BYTES, $sformatf("%s fits the code memory", progs[p].name));
      $display("%-12s MIPS32 %6d B  HIE %6d B  reduction %0d%%", progs[p].name, mips_bytes, a,
               (100 * (mips_bytes - a) + mips_bytes / 2) / mips_bytes);

      // load with the core in reset
      @(negedge clk) rst_n = 0;
      for (int wd = 0; wd < (a + 3) / 4; wd++) begin
        @(negedge clk);
        load_en = 1; load_addr = (ADDR_W-2)'(wd); load_be = 4'hF;
        load_data = {image[4*wd], image[4*wd + 1], image[4*wd + 2], image[4*wd + 3]};
      end
      @(negedge clk) load_en = 0;
      @(negedge clk) rst_n = 1;

      // run start to end, consumer always ready
      idx = 0; cycles = 0; first = -1;
      dec_ready = 1;
      while (idx < n && cycles < 4 * n) begin
        @(negedge clk);
        cycles++;
        #1;
        if (dec_valid) begin
          if (first < 0) first = cycles;
          check(dec.mips === prog[idx] && !dec.illegal,
                $sformatf("%s instruction %0d", progs[p].name, idx));
          idx++;
        end
      end
      dec_ready = 0;
      check(idx === n, $sformatf("%s ran to the end", progs[p].name));
      check(cycles - first + 1 === n,
            $sformatf("%s: %0d cycles for %0d instructions", progs[p].name,
                      cycles - first + 1, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
