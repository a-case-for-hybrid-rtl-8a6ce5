// hie_fetch_unit: instruction fetch and alignment for variable-length HIE code.
//
// HIE instructions are 1, 2, 3 or 4 bytes long and are packed back to back in
// code memory, so an instruction may start at any byte and straddle two words.
// The fetch unit reads whole 32-bit words and appends their bytes to a byte
// queue of QBYTES entries. The first queued byte is always the first byte of
// the next instruction; its opcode gives the instruction length, and as soon
// as that many bytes are queued the instruction is offered on the inst_*
// port as a 4-byte big-endian window (bytes past the length read zero) with
// its byte address. When the consumer takes it (inst_valid && inst_ready) the
// queue shifts by the length and the PC advances by the length.
//
// Memory side: mem_req/mem_addr ask for a word; the word is expected on
// mem_rdata in the next cycle (synchronous memory, fixed one-cycle latency).
// A word is requested only when the queue has room for it and for the word
// already in flight, so nothing is ever dropped.
// Redirect: redirect_valid with a byte address flushes the queue and the word
// in flight and restarts fetching from the word holding redirect_pc; the
// leading bytes of that word before redirect_pc are discarded. No request is
// made in the redirect cycle.
// Timing: the first instruction is offered two cycles after reset is released
// and three cycles after the redirect cycle (one more in either case when it
// straddles two words); with QBYTES >= 12 the unit then
// sustains one instruction per cycle even when every instruction is 4 bytes.
// The length rule follows the HIE formats; the queue, its size and the
// handshake are this design's own choices (the HIE proposal only states that
// fetch and decode must handle the hybrid lengths).
module hie_fetch_unit
  import hie_pkg::*;
#(
  parameter int unsigned   ADDR_W   = 16,   // byte address width
  parameter int unsigned   QBYTES   = 16,   // byte queue depth
  parameter logic [31:0]   RESET_PC = 32'h0
) (
  input  logic              clk,
  input  logic              rst_n,
  // code memory read port
  output logic              mem_req,
  output logic [ADDR_W-3:0] mem_addr,
  input  logic [31:0]       mem_rdata,
  // control transfer from the execution stage
  input  logic              redirect_valid,
  input  logic [ADDR_W-1:0] redirect_pc,
  // aligned instruction out
  output logic              inst_valid,
  input  logic              inst_ready,
  output logic [31:0]       inst_win,
  output logic [2:0]        inst_len,
  output logic [ADDR_W-1:0] inst_pc
);

  localparam int unsigned CW = $clog2(QBYTES + 1);

  logic [7:0]        q      [QBYTES];
  logic [7:0]        q_n    [QBYTES];
  logic [CW-1:0]     cnt, cnt_n;
  logic [ADDR_W-1:0] head_pc;
  logic [ADDR_W-1:0] fetch_pc;     // byte address of next word to request
  logic [1:0]        drop_next;    // leading bytes to skip in next requested word
  logic              pend;         // a word arrives this cycle
  logic [1:0]        pend_drop;    // leading bytes to skip in the arriving word

  logic [2:0]        len_raw;
  logic              fire;
  logic [CW-1:0]     consumed, kept, nb;

  assign len_raw  = hie_length(q[0]);
  assign inst_len = (len_raw == 3'd0) ? 3'd1 : len_raw;
  assign inst_valid = (cnt != '0) && (cnt >= CW'(inst_len));
  assign inst_pc    = head_pc;
  assign fire       = inst_valid && inst_ready && !redirect_valid;

  always_comb begin
    for (int i = 0; i < 4; i++)
      inst_win[31-8*i -: 8] = (i < int'(inst_len)) ? q[i] : 8'h00;
  end

  // request a word when the queue can hold it on top of the one in flight
  assign mem_req  = !redirect_valid &&
                    (32'(cnt) + (pend ? 32'd4 : 32'd0) + 32'd4 <= 32'(QBYTES));
  assign mem_addr = fetch_pc[ADDR_W-1:2];

  assign consumed = fire ? CW'(inst_len) : '0;
  assign kept     = cnt - consumed;
  assign nb       = (pend && !redirect_valid) ? CW'(3'd4 - {1'b0, pend_drop}) : '0;

  always_comb begin
    for (int i = 0; i < QBYTES; i++) begin
      int src;
      int k;
      src = i + int'(consumed);
      k   = i - int'(kept);
      q_n[i] = 8'h00;
      if (i < int'(kept)) begin
        if (src < QBYTES) q_n[i] = q[src];
      end else if (k < int'(nb)) begin
        q_n[i] = mem_rdata[31 - 8*(k + int'(pend_drop)) -: 8];
      end
    end
    cnt_n = kept + nb;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < QBYTES; i++) q[i] <= 8'h00;
      cnt       <= '0;
      head_pc   <= RESET_PC[ADDR_W-1:0];
      fetch_pc  <= {RESET_PC[ADDR_W-1:2], 2'b00};
      drop_next <= RESET_PC[1:0];
      pend      <= 1'b0;
      pend_drop <= 2'b00;
    end else if (redirect_valid) begin
      cnt       <= '0;
      head_pc   <= redirect_pc;
      fetch_pc  <= {redirect_pc[ADDR_W-1:2], 2'b00};
      drop_next <= redirect_pc[1:0];
      pend      <= 1'b0;
    end else begin
      q    <= q_n;
      cnt  <= cnt_n;
      pend <= mem_req;
      if (mem_req) begin
        pend_drop <= drop_next;
        drop_next <= 2'b00;
        fetch_pc  <= fetch_pc + ADDR_W'(4);
      end
      if (fire) head_pc <= head_pc + ADDR_W'(inst_len);
      // the queue never overflows
      assert (32'(cnt_n) <= 32'(QBYTES)) else $error("fetch byte queue overflow");
    end
  end

  // the queue must hold at least one whole word
  initial assert (QBYTES >= 4) else $error("QBYTES must be at least 4");

endmodule
