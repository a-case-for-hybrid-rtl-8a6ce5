# HIE-MIPS instruction front end

MIPS32 stores every instruction in 32 bits, and in typical embedded code
many of those bits are useless. For example, an R-type `and` carries five
zero bits in its shift-amount field. Most `addiu`, `lw` and `sw` offsets fit
in one byte or are zero. In a system-on-chip, code memory sits on the die, so
these wasted bits cost area and power.

**Hybrid Instruction Encoding (HIE)** keeps the MIPS32 operations but stores
each one in 1, 2, 3 or 4 bytes:

* register fields shrink from 5 to 4 bits, which leaves 16 general purpose
  registers;
* the shift amount shrinks to 4 bits;
* unused zero fields are dropped;
* an I-type immediate or offset keeps only its non-zero bytes. A 2-bit `hl`
  field says which bytes are kept.

Measured statically on 23 MiBench and MediaBench programs, this encoding
made MIPS32 code 18–27% smaller.

This repository holds the hardware that changes when a MIPS-style core
executes HIE code: its instruction front end. The front end reads
variable-length HIE code from on-chip code memory and lines up one
instruction per cycle. It decodes each instruction back into its MIPS32
form and reads its operands from a 16-entry register file. The execution
stage is ordinary MIPS32 and is not part of this repository. It connects
through a small set of ports.

```
          load_*                           redirect_*  dec_ready
            |                                   |          |
     +------v------+   word/cycle   +-----------v----------v--+   4-byte window
     | hie_code_mem|--------------->|     hie_fetch_unit      |-----------------+
     | 64 KiB      |<---------------| 16-byte queue, aligner  |  len, pc         |
     +-------------+   mem_req/addr +-------------------------+                 |
                                                                   +-----------v--+
                         wb_*                                      | hie_decoder  |--> dec (struct,
                          |                                        | length, fields|     incl. MIPS32 word)
                   +------v------+   rs, rt (4-bit)                +--------------+
                   | hie_regfile |<--------------------------------------+
                   | 16 x 32     |--> rs_data, rt_data
                   +-------------+
```

## The encoding

Every HIE instruction starts with the 6-bit opcode in the top bits of its
first byte. Code is big-endian: the lowest byte address holds the opcode
byte, and bits [31:24] of a memory word are its lowest byte. The nine
groups and their layouts (field widths in bits, most significant first):

| group | size | instructions | layout |
|---|---|---|---|
| A | 8  | nop, syscall, rfe | `op6 iid2` |
| B | 16 | mfcz, mtcz | `op6 iid1 rt4 rd5` (rd is a coprocessor register, kept at 5 bits) |
| C | 16 | jr, mfhi, mflo, mthi, mtlo | `op6 r4 fn6` (r is rs for jr/mthi/mtlo, rd for mfhi/mflo) |
| D | 24 | add addu sub subu and or xor nor slt sltu sllv srlv srav | `op6 rs4 rt4 rd4 fn6` (R-type1) |
| E | 24 | sll srl sra | `op6 rt4 rd4 sa4 fn6` (R-type2) |
| F | 24 | mult multu div divu jalr | `op6 rs4 rt4 0000 fn6` (R-type3; for jalr the second field is rd) |
| G | 16/24/32 | 32 I-type, branch, load and store instructions | `op6 hl2 rs4 rt4 imm{0,8,16}` |
| H | 32 | j, jal | `op6 target26`, as MIPS32 |
| I | 32 | break | `op6 code20 fn6` |

In total there are 3 instructions of 8 bits, 7 of 16 bits, 21 of 24 bits
and 3 of 32 bits. The 32 instructions of group G take 16, 24 or 32 bits.

### The hybrid immediate (group G)

| 16-bit MIPS32 immediate | bytes stored | `hl` | instruction size |
|---|---|---|---|
| `0000` | none | 00 | 16 bits |
| `00LL` | `LL` | 01 | 24 bits |
| `HH00` | `HH` | 10 | 24 bits |
| `HHLL` | `HH LL` | 11 | 32 bits |

The decoder rebuilds the 16-bit value exactly. Sign extension and the
meaning of the offset are left to the execution stage, as in MIPS32. A
negative 8-bit offset such as `FFF0` has two non-zero bytes, so it takes
the 32-bit form.

### Opcode values: what is fixed and what was chosen here

Groups D–H keep their MIPS32 primary opcodes and function codes:

* D, E and F share SPECIAL (0). Since all of them are 24 bits, the opcode
  alone fixes the length, and the function code then picks the layout.
* G keeps the MIPS32 I-type opcodes.
* H keeps j (2) and jal (3).

The groups that MIPS32 puts under SPECIAL or COPz but that have another
length need their own opcodes. Otherwise the length could not be read from
the first byte. The values, which are this design's choice, are in
`rtl/hie_pkg.sv`:

| opcode | group | second field |
|---|---|---|
| `0x14` | A | iid: 0 nop, 1 syscall, 2 rfe, 3 undefined |
| `0x15` | C | keeps the MIPS32 fn codes |
| `0x16` | I | MIPS32 bits [25:0] of break follow |
| `0x18`–`0x1B` | B for coprocessor z = op[1:0] | iid: 0 mfcz, 1 mtcz |

A few more encoding choices fill gaps:

* **REGIMM branches.** bltz, bgez, bltzal and bgezal select the operation
  with rt = 0, 1, 16 or 17, and 16 and 17 do not fit in 4 bits. The 4-bit
  field carries `{rt[4], rt[2:0]}`.
* **bczf and bczt** keep rs = 01000 and rt = 0 or 1.
* **lui** keeps a zero rs field.
* **What cannot be encoded.** Registers above r15 and shift amounts of 16
  or more have no HIE form. The compiler has to avoid them, since only 16
  registers exist.

## Fetch and alignment (`hie_fetch_unit`)

This is the unit that does the real work. An instruction can start at any
byte and can straddle two words, so fetch cannot hand out words as they
come. The unit works as follows:

1. It reads whole 32-bit words, one per cycle, and appends their bytes to a
   16-byte queue.
2. The head of the queue is always the first byte of the next instruction.
   `hie_length()` reads the length from that byte alone: A → 1; B, C → 2;
   SPECIAL → 3; j, jal, break → 4; G → 2, 3, 3 or 4 for `hl` = 00, 01, 10
   or 11.
3. When that many bytes are queued, the instruction is offered with its byte
   address as a 4-byte window, first byte in [31:24]. Bytes past the length
   read as zero.
4. When the instruction is taken (`inst_valid && inst_ready`), the queue
   shifts by the length, and the PC advances by the length.
5. A word is requested only while the queue has room for it and for the
   word already in flight, so no fetched byte is ever dropped. An assertion
   guards this.
6. A redirect (a taken branch, a jump, an exception) sets a byte address.
   It empties the queue and discards the word in flight. Fetch restarts at
   the word holding the target, and the bytes of that word before the
   target are skipped.

Memory is synchronous with a fixed one-cycle read latency. Timing:

* The first instruction appears two cycles after reset is released.
* After the redirect cycle, the first instruction appears three cycles
  later, or four if it straddles into the next word.
* After that, the unit sustains one instruction per cycle even when every
  instruction is 4 bytes long. This needs a queue of at least 12 bytes;
  the default is 16.

An undefined first byte gets length 1 and is flagged by the decoder, so
fetch never stalls on bad code.

## Decoding (`hie_decoder`)

The decoder is purely combinational. From the 4-byte window it gives a
`hie_dec_t` struct with:

* the group and the length;
* `hl`;
* the MIPS32 op, rs, rt, rd, sa and fn fields, widened to MIPS32 sizes;
* the 16-bit immediate and the jump target;
* `mips`: the complete equivalent MIPS32 instruction word.

An unchanged MIPS32 execution stage can run that word, so the HIE-specific
logic stays in the front end. The `illegal` flag is set for:

* undefined opcodes, iid values and function codes;
* a non-zero R-type3 pad;
* a non-zero rs field in lui;
* COPz opcodes other than bczf and bczt.

## Register file (`hie_regfile`)

The register file holds 16 × 32 bits, half of MIPS32's 32 registers. This
follows from the 4-bit register fields and also saves core area. It has
two asynchronous read ports, addressed by the decoded rs and rt, and one
synchronous write port for write-back. r0 reads zero and ignores writes, as
in MIPS32. Reset clears all registers. There is no bypass from a write to a
read in the same cycle.

## Code memory (`hie_code_mem`)

The code memory has `BYTES` = 65,536 bytes, organised as 32-bit words. It
has a synchronous read port for fetch and a write port with byte enables
for loading the program; `wr_be[3]` is the lowest byte address. 64 KiB
holds the HIE form of the largest embedded program whose size is known:
51,000 bytes of MIPS32 code become about 37 KB. The memory is written as an
array, for a RAM macro or inference.

## Top level (`hie_risc_frontend`)

| port | dir | meaning |
|---|---|---|
| `load_en, load_addr[13:0], load_be[3:0], load_data[31:0]` | in | write a word of the program image (hold `rst_n` low while loading) |
| `redirect_valid, redirect_pc[15:0]` | in | restart fetch at a byte address |
| `dec_ready` | in | the execution stage takes the decoded instruction |
| `wb_en, wb_addr[3:0], wb_data[31:0]` | in | register write-back |
| `dec_valid, dec` | out | decoded instruction (`hie_dec_t`) |
| `dec_pc, dec_next_pc` | out | its byte address and that of the next sequential instruction |
| `rs_data, rt_data` | out | operand values |

Parameters:

* `CODE_BYTES` (65536);
* `QBYTES` (16), the fetch queue depth;
* `NREGS` (16);
* `RESET_PC` (0).

The decoded instruction and its operands are valid in the same cycle that
fetch offers it.

## What is not here

* **The execution stage.** It holds the ALU, HI/LO, branch resolution and
  load/store. It carries out MIPS32 semantics and is outside this
  repository.
* **The coprocessors**, including the system coprocessor used by
  rfe/mfc0/mtc0.
* **A compiler or converter.** None is included. The testbenches contain a
  MIPS32-to-HIE converter written as SystemVerilog functions
  (`tb/hie_ref_pkg.sv`).
* **Performance and power figures.** The encoding has only been evaluated
  for static code size. This front end has been verified functionally but
  not characterised for speed or power.

## Departures from the published encoding

* **Group C opcode.** The format table says group C keeps the MIPS32 op and
  fn fields. With op = SPECIAL, however, a 16-bit `jr` could not be told
  apart from a 24-bit R-type by its first byte. Group C therefore has its
  own opcode and keeps only the fn codes.
* **break opcode.** break is described as unchanged from MIPS32, but it
  cannot keep op = 0 for the same reason. It has its own opcode, followed
  by the MIPS32 bits [25:0].
* **Chosen values.** Opcode values for groups A, B, C and I, the iid
  values, the REGIMM rt packing and the byte order are all this design's
  choice. The fetch queue, the handshakes and the memory size are as well.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

* **`tb_hie_decoder`** checks the four immediate cases of the table above,
  one hand-built instruction per group, and undefined encodings. It then
  checks 4,000 random instructions of all groups: the reference converter
  encodes each one, and the decoder must return the original MIPS32 word
  and the length.
* **`tb_hie_fetch_unit`** runs random mixed-length code with random stalls
  and redirects to any byte offset. It checks the latencies above and one
  4-byte instruction per cycle.
* **`tb_hie_code_mem`** and **`tb_hie_regfile`** check against shadow
  models, including byte enables, r0 and read-after-write.
* **`tb_hie_risc_frontend`** is the end-to-end test at the default size. It
  runs a 12,750-instruction (51,000-byte MIPS32) synthetic program shaped
  like the susan image-recognition benchmark. In it addu/addiu/lw/sw make
  up 65%. Immediates follow the counts measured on susan: 1974 all-zero,
  6475 with a zero upper byte, 12 with a zero lower byte and 936 with both
  bytes used. The program is loaded through the load
  port. The test plays the execution stage: it stalls at random, takes
  branches to unaligned addresses and writes registers. Every decoded
  instruction, address and operand is checked. The test also counts that
  each group, each `hl`, word-straddling, stalls, unaligned redirects and
  write-back all occur.
* **`tb_hie_workloads`** runs 23 synthetic programs through the front end
  at the default size. Each has the dominant-instruction share and size
  class of one program in the published evaluation (basicmath, susan,
  jpeg, …). The test checks that each fits, decodes correctly and streams
  at one instruction per cycle.

  The code-size reductions these tests print (28–30%) come from the
  synthetic mix, whose non-dominant instructions are spread evenly over the
  nine groups. They are not measurements of the real programs, for which
  18–27% was reported.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/hie_pkg.sv tb/hie_ref_pkg.sv \
    tb/tb_hie_risc_frontend.sv --top-module tb_hie_risc_frontend -Mdir obj
./obj/Vtb_hie_risc_frontend
```

Replace the testbench name to run another test. Every test finishes within
a second.
