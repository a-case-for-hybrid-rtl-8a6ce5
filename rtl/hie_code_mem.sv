// hie_code_mem: on-chip code memory of the SoC.
//
// Holds the program as 32-bit words; the bytes of a word are in big-endian
// order (byte address 4k is word k bits [31:24]), so variable-length HIE
// instructions are packed back to back and may straddle word boundaries.
// Read port: synchronous, one word per cycle; rd_data is the word addressed in
// the previous cycle in which rd_en was high (it holds its value otherwise).
// Write port: one word per cycle with a per-byte write enable, used to load the
// program image.
// The capacity is this design's choice (64 KiB): HIE code of the largest
// program whose size is given (a 51,000-byte MIPS32 image, about 37 KB after
// the 27% reduction reported for it) fits with room to spare.
module hie_code_mem #(
  parameter int unsigned BYTES  = 65536,
  localparam int unsigned WORDS = BYTES / 4,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [3:0]    wr_be,     // wr_be[3] writes bits [31:24] (lowest byte address)
  input  logic [31:0]   wr_data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) mem[wr_addr][8*b +: 8] <= wr_data[8*b +: 8];
    end
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
