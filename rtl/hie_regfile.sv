// hie_regfile: general purpose register file of the HIE-RISC core.
//
// HIE register fields are 4 bits wide, so the core has 16 GPRs instead of the
// 32 of MIPS32. Two asynchronous read ports serve the rs and rt fields of the
// instruction in decode; one synchronous write port takes the result written
// back by the execution stage. Register 0 always reads zero and ignores
// writes, as in MIPS32 (a MIPS convention this design keeps; the 16-register
// count is the only property of the file the HIE format fixes).
// Timing: a write at a clock edge is seen by the read ports after that edge;
// there is no write-to-read bypass within the same cycle.
module hie_regfile #(
  parameter int unsigned NREGS = 16,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned RW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [RW-1:0]   ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [RW-1:0]   ra2,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [RW-1:0]   wa,
  input  logic [XLEN-1:0] wd
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];

endmodule
