// hie_risc_frontend: instruction front end of an HIE-RISC core.
//
// An HIE-RISC core runs MIPS32 operations stored in the Hybrid Instruction
// Encoding: 8-, 16-, 24- and 32-bit instructions with 4-bit register fields and
// 0/8/16-bit immediates, which shrinks the on-chip code memory of an embedded
// SoC. What changes in hardware is fetch and decode; this block holds exactly
// that part of the core:
//   code memory (hie_code_mem)  ->  fetch/align (hie_fetch_unit)
//     ->  decoder (hie_decoder)  ->  operand read from 16 GPRs (hie_regfile)
// and hands the execution stage a decoded instruction in MIPS32 form
// (dec.mips and the widened fields) together with its rs/rt operand values.
// The execution stage itself is outside this block: it drives dec_ready,
// redirect_* (taken branches, jumps, exceptions) and the register write port
// wb_*. The load_* port writes the program image into code memory.
//
// Timing: the decoded instruction is valid in the same cycle the fetch unit
// offers it (decoder and register reads are combinational); an instruction is
// consumed on dec_valid && dec_ready. One instruction per cycle is sustained.
// Structure and sizes other than the 16 GPRs and the HIE formats are this
// design's own choices.
module hie_risc_frontend
  import hie_pkg::*;
#(
  parameter int unsigned CODE_BYTES = 65536,
  parameter int unsigned QBYTES     = 16,
  parameter int unsigned NREGS      = 16,
  parameter logic [31:0] RESET_PC   = 32'h0,
  localparam int unsigned ADDR_W    = $clog2(CODE_BYTES),
  localparam int unsigned RW        = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // program load
  input  logic              load_en,
  input  logic [ADDR_W-3:0] load_addr,
  input  logic [3:0]        load_be,
  input  logic [31:0]       load_data,
  // from the execution stage
  input  logic              redirect_valid,
  input  logic [ADDR_W-1:0] redirect_pc,
  input  logic              dec_ready,
  input  logic              wb_en,
  input  logic [RW-1:0]     wb_addr,
  input  logic [31:0]       wb_data,
  // to the execution stage
  output logic              dec_valid,
  output hie_dec_t          dec,
  output logic [ADDR_W-1:0] dec_pc,
  output logic [ADDR_W-1:0] dec_next_pc,
  output logic [31:0]       rs_data,
  output logic [31:0]       rt_data
);

  logic              mem_req;
  logic [ADDR_W-3:0] mem_addr;
  logic [31:0]       mem_rdata;
  logic [31:0]       inst_win;
  logic [2:0]        inst_len;

  hie_code_mem #(.BYTES(CODE_BYTES)) u_code_mem (
    .clk     (clk),
    .rd_en   (mem_req),
    .rd_addr (mem_addr),
    .rd_data (mem_rdata),
    .wr_en   (load_en),
    .wr_addr (load_addr),
    .wr_be   (load_be),
    .wr_data (load_data)
  );

  hie_fetch_unit #(.ADDR_W(ADDR_W), .QBYTES(QBYTES), .RESET_PC(RESET_PC)) u_fetch (
    .clk            (clk),
    .rst_n          (rst_n),
    .mem_req        (mem_req),
    .mem_addr       (mem_addr),
    .mem_rdata      (mem_rdata),
    .redirect_valid (redirect_valid),
    .redirect_pc    (redirect_pc),
    .inst_valid     (dec_valid),
    .inst_ready     (dec_ready),
    .inst_win       (inst_win),
    .inst_len       (inst_len),
    .inst_pc        (dec_pc)
  );

  hie_decoder u_dec (
    .win (inst_win),
    .dec (dec)
  );

  assign dec_next_pc = dec_pc + ADDR_W'(inst_len);

  hie_regfile #(.NREGS(NREGS), .XLEN(32)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (dec.rs[RW-1:0]),
    .rd1   (rs_data),
    .ra2   (dec.rt[RW-1:0]),
    .rd2   (rt_data),
    .we    (wb_en),
    .wa    (wb_addr),
    .wd    (wb_data)
  );

endmodule
