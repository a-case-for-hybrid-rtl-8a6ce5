// tb_hie_fetch_unit: self-checking test of the HIE fetch/align unit.
//
// A behavioural code memory (one-cycle read latency) is filled with two
// programs built by the reference converter:
//   program A at byte 0: random instructions of all groups, so instructions
//     of 1..4 bytes straddle word boundaries in every way;
//   program B at byte 0x801 (unaligned): 32-bit instructions only.
// Every instruction the unit hands over must carry the expected address,
// length and bytes (bytes past the length zero). The test checks:
//   - the first instruction two cycles after reset release,
//   - random consumer stalls (inst_ready low),
//   - redirects to random instruction starts (any byte offset), with the first
//     instruction three cycles after the redirect cycle (four when it
//     straddles two words),
//   - one instruction per cycle on program B (all 4-byte instructions).
module tb_hie_fetch_unit;
  import hie_ref_pkg::*;

  localparam int ADDR_W = 12;
  localparam int MBYTES = 1 << ADDR_W;
  localparam int NA     = 600;
  localparam int NB     = 120;
  localparam int B_BASE = 'h801;

  logic              clk = 0, rst_n = 0;
  logic              mem_req;
  logic [ADDR_W-3:0] mem_addr;
  logic [31:0]       mem_rdata;
  logic              redirect_valid = 0;
  logic [ADDR_W-1:0] redirect_pc = '0;
  logic              inst_valid, inst_ready = 0;
  logic [31:0]       inst_win;
  logic [2:0]        inst_len;
  logic [ADDR_W-1:0] inst_pc;

  logic [7:0]  mem [MBYTES];
  int          e_pc  [NA + NB];
  int          e_len [NA + NB];
  logic [31:0] e_win [NA + NB];
  int checks = 0, failures = 0;
  int idx;

  hie_fetch_unit #(.ADDR_W(ADDR_W), .QBYTES(16)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk)
    if (mem_req) mem_rdata <= {mem[{mem_addr, 2'd0}], mem[{mem_addr, 2'd1}],
                               mem[{mem_addr, 2'd2}], mem[{mem_addr, 2'd3}]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (idx %0d pc %h len %0d win %h)", what, idx, inst_pc, inst_len, inst_win);
    end
  endtask

  // one clock cycle: drive inputs after the falling edge, then check a transfer
  task automatic cycle(input bit ready, input bit redir, input int rpc);
    @(negedge clk);
    inst_ready     = ready;
    redirect_valid = redir;
    redirect_pc    = ADDR_W'(rpc);
    #1;
    if (inst_valid && inst_ready && !redirect_valid) begin
      check(int'(inst_pc) === e_pc[idx], $sformatf("pc, expected %h", e_pc[idx]));
      check(int'(inst_len) === e_len[idx], $sformatf("length, expected %0d", e_len[idx]));
      check(inst_win === e_win[idx], $sformatf("bytes, expected %h", e_win[idx]));
      idx++;
    end
  endtask

  // cycles from a redirect to the first instruction: three when the target
  // word holds the whole instruction, four when it straddles into the next
  function automatic int exp_lat(input int pc, input int len);
    return (4 - pc % 4 >= len) ? 3 : 4;
  endfunction

  // count cycles from now until inst_valid, with the consumer held off
  task automatic latency(output int n);
    n = 0;
    while (1) begin
      @(negedge clk);
      inst_ready = 0; redirect_valid = 0;
      #1;
      n++;
      if (inst_valid || n > 20) break;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, len, grp, lat, start;
    logic [31:0] w;
    for (int i = 0; i < MBYTES; i++) mem[i] = 8'($urandom);
    // program A
    a = 0;
    for (int i = 0; i < NA; i++) begin
      void'(mips_to_hie(rand_mips($urandom_range(0, NGROUPS - 1)), w, len, grp));
      e_pc[i] = a; e_len[i] = len; e_win[i] = w;
      for (int b = 0; b < len; b++) mem[a + b] = w[31 - 8*b -: 8];
      a += len;
    end
    if (a >= B_BASE) $fatal(1, "program A too long");
    // program B: 32-bit instructions only
    a = B_BASE;
    for (int i = NA; i < NA + NB; i++) begin
      void'(mips_to_hie(rand_mips(7), w, len, grp));
      e_pc[i] = a; e_len[i] = len; e_win[i] = w;
      for (int b = 0; b < len; b++) mem[a + b] = w[31 - 8*b -: 8];
      a += len;
    end

    // reset release -> first instruction after two cycles
    @(negedge clk) rst_n = 1;
    idx = 0;
    latency(lat);
    check(lat === 2, $sformatf("first instruction %0d cycles after reset, expected 2", lat));

    // run through part of program A with random stalls
    while (idx < 250) cycle($urandom_range(0, 3) != 0, 0, 0);

    // redirects to random instruction starts in program A
    for (int r = 0; r < 20; r++) begin
      int k;
      k = $urandom_range(0, NA - 60);
      cycle(0, 1, e_pc[k]);
      idx = k;
      latency(lat);
      check(lat === exp_lat(e_pc[k], e_len[k]),
            $sformatf("first instruction %0d cycles after redirect, expected %0d", lat,
                      exp_lat(e_pc[k], e_len[k])));
      start = idx;
      while (idx < start + 40) cycle($urandom_range(0, 4) != 0, 0, 0);
    end

    // redirect inside a stall, while a word is in flight
    cycle(0, 0, 0);
    cycle(0, 1, e_pc[10]);
    idx = 10;
    while (idx < 30) cycle(1, 0, 0);

    // program B: one 4-byte instruction per cycle once started
    cycle(0, 1, B_BASE);
    idx = NA;
    latency(lat);
    check(lat === 4, "first instruction of program B, which straddles two words");
    start = 0;
    while (idx < NA + NB - 10) begin
      cycle(1, 0, 0);
      start++;
    end
    check(start === NB - 10, $sformatf("%0d cycles for %0d 32-bit instructions", start, NB - 10));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
