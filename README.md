# A 16-bit single-cycle RISC processor with a BEC carry select adder and a Wallace tree multiplier

This is a small 16-bit load/store processor that finishes every instruction in one clock cycle
without a pipeline. There is no pipeline, so a jump cannot leave wrongly fetched instructions
to flush and no instruction ever stalls. Each cycle, the program counter addresses one common
instruction/data memory. The decoder splits the word it reads. The register file delivers two
operands and the ALU computes. At the next rising edge the result is written back and the
counter advances.

The arithmetic is meant to be cheap in area and power:

* **Addition** uses a carry select adder. The adder that would assume carry-in 1 is replaced
  by a Binary-to-Excess-1 Converter (BEC).
* **Multiplication** (8 x 8 bits) uses a Wallace tree of compressors. Its final addition
  reuses that same adder.

The program counter's incrementer is also a BEC.

## Instruction set

Instructions are 16 bits, with the opcode in the top five bits. There are two formats:

| format | [15:11] | [10:8] | [7:5] | [4:0] |
|---|---|---|---|---|
| immediate load | opcode | Rd | imm[7:5] | imm[4:0] |
| register op | opcode | Rs | Rd | 00000 |

The immediate-load format carries an 8-bit immediate in bits [7:0].

| opcode | mnemonic | effect |
|---|---|---|
| 00000 | LHI | Rd[15:8] <= imm (low byte kept) |
| 00001 | LLI | Rd[7:0] <= imm (high byte kept) |
| 00010 | MUL | Rd <= Rd[7:0] * Rs[7:0] (16-bit product) |
| 00011 | XOR | Rd <= Rd ^ Rs |
| 00100 | LS | Rd <= Rd << 1 |
| 00101 | RS | Rd <= Rd >> 1 (zero fill) |
| 00110 | SUM | Rd <= Rd + Rs |
| 00111 | HLT | stop |
| 01000-11111 | (none) | no operation |

A 16-bit constant takes two words: `LHI Rd, hi` then `LLI Rd, lo`. Every instruction that
writes a register also updates three flags:

* **sign**: bit 15 of the result;
* **zero**: the result is 0;
* **carry**: the carry out of SUM, and 0 for every other instruction.

There are no jumps, no memory loads or stores with an address, and no rotate.

With both operands equal to 513 (0x0201) the five operations give:

| operation | result |
|---|---|
| MUL | 1 |
| XOR | 0 |
| LS | 1026 |
| RS | 256 |
| SUM | 1026 |

The opcode values, the one-bit shift distance and the low-byte multiply all come from that
reference run. The LLI code (00001) and the rule that LHI and LLI keep the other byte are this
design's own choices.

## Timing and control

The clock control unit (`clock_control_unit`) drives three enables: PC_en, IDU_en and ALU_en.
It has three states:

* **RESET**: all enables low. The unit stays here while `rst` is high.
* **RUN**: all enables high. The unit enters this state at the first clock edge after `rst`
  falls.
* **HALT**: all enables low. The unit enters this state at the edge that ends the HLT cycle
  and stays there until the next reset.

In the HLT cycle, PC_en drops at once, so the counter stops on the HLT word. HLT marks the
boundary between code and data: the words after it are never fetched. A program of N words
(HLT included) therefore takes N + 1 cycles from the release of reset until `halted` rises.

Memory reads and register reads are combinational. The register write and the PC update
happen at the same rising edge, so there is no hazard to resolve.

## Carry select adder with BEC (`csla_bec16`)

A classic carry select adder computes each group of bits twice, once for carry-in 0 and once
for carry-in 1, and then picks one result with the real carry. Here the carry-in-1 result is
derived from the carry-in-0 result instead. The group's {carry, sum} word with carry-in 1 is
simply that word plus one. A BEC computes the plus one with one XOR per bit and an AND chain:
bit i flips when all lower bits are 1. This needs fewer gates than a second ripple carry adder.

| group | bits | RCA (cin = 0) | BEC | mux | select |
|---|---|---|---|---|---|
| 0 | [1:0] | 2 bits, real cin | - | - | - |
| 1 | [3:2] | 2 bits | 3 bits | 6:3 | c1 |
| 2 | [6:4] | 3 bits | 4 bits | 8:4 | c3 |
| 3 | [10:7] | 4 bits | 5 bits | 10:5 | c6 |
| 4 | [15:11] | 5 bits | 6 bits | 12:6 | c10 |

Each upper group is one `csla_bec_group`. The group sizes grow toward the top (2, 2, 3, 4, 5
bits) so that each group's local sum is ready about when its select carry arrives. The carry
out of group 4 is the adder's `cout`.

## Wallace tree multiplier (`wallace_mul8`)

The multiplier forms eight partial product rows, `(y[j] ? x : 0) << j`. It reduces them in
three stages:

* **Stage A.** Rows 0-3 (part 1) and rows 4-7 (part 2) are each reduced to two rows by a
  4:2 compressor row. Each 4:2 compressor is two 3:2 full-adder rows (`compressor42_row`,
  `csa_row`).
* **Stage B.** The four remaining rows go through another 4:2 compressor row, leaving two
  rows.
* **Stage C.** The BEC carry select adder adds the last two rows.

All rows are 16 bits wide. A carry out of bit 15 can be dropped because the true product
always fits in 16 bits.

The two parts and three stages follow the published structure. The cell-level placement of
the compressors is this design's own. The result is exact for all 65536 operand pairs.

## Modules

| module | role |
|---|---|
| `risc16_top` | processor top: wiring and registered flags |
| `clock_control_unit` | RESET/RUN/HALT sequencer for PC_en, IDU_en, ALU_en |
| `program_counter` | 16-bit PC; reset to 0, +1 through a 16-bit BEC |
| `unified_mem` | common memory: 256 x 16 bits, combinational read, host write port |
| `idu` | decoder: opcode, Rs, Rd, imm, WRENA, halt |
| `register_file` | 8 x 16-bit registers: read ports for source, destination and read-back; one write port |
| `alu` | selects between the three sub-units and the immediate loads; flags |
| `arith_unit` | the adder (carry-in 0) and the multiplier on the low bytes |
| `logic_unit` | XOR |
| `shift_unit` | logical barrel shifter, 0-15 bits left or right; the ALU uses distance 1 |
| `csla_bec16`, `csla_bec_group`, `rca`, `bec`, `full_adder` | the adder |
| `wallace_mul8`, `compressor42_row`, `csa_row` | the multiplier |
| `risc_pkg` | widths, opcode enum, instruction struct, encoding functions |

## Top-level interface (`risc16_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset |
| load_we, load_addr, data_in | in | 1, 16, 16 | host write into memory (use while rst is high) |
| data_out | out | 16 | ALU result of the instruction in progress |
| pc | out | 16 | program counter |
| halted | out | 1 | HLT has executed |
| sign_flag, zero_flag, carry_flag | out | 1 | flags of the last register-writing instruction |
| dbg_addr, dbg_data | in, out | 3, 16 | read any register, at any time |

Parameter: `MEM_WORDS`, the memory depth (default 256). Memory addresses above
log2(MEM_WORDS) bits are ignored.

To run a program:

1. Hold `rst` high.
2. Write the words to addresses 0, 1, ... with `load_we`.
3. Release `rst`.
4. Wait for `halted`.
5. Read the results through `dbg_addr` and `dbg_data`.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv rtl/risc_pkg.sv tb/risc16_top_tb.sv --top-module risc16_top_tb
./obj_dir/Vrisc16_top_tb
```

Testbenches of the other blocks are built the same way with their own names.

`risc16_top_tb` runs the processor at its default size. It compares every cycle with an
instruction-level model inside the testbench, and it runs three kinds of program:

* the 513/513 sequence above;
* a three-tap convolution, y[n] = 3x[n] + 5x[n-1] + 2x[n-2];
* 40 random programs.

Every program has data words behind its HLT, so fetching past HLT would be caught. The test
also checks the N + 1 cycle count and counts each opcode, carry, zero result and negative
result.

The unit testbenches cover:

* the multiplier, exhaustively;
* the decoder, exhaustively over all 65536 instruction words;
* the adder, on its corner cases and on random operands;
* the shifter, every distance in both directions.

Concurrent assertions in `clock_control_unit` and `risc16_top` state the halt rules: once
halted, no enable is high, no register is written and the PC does not move. Build with
`--assert` to check them.

## Where this design departs from, or goes beyond, its source description

* The source mentions a store instruction that copies results back to memory, but it gives no
  encoding and no opcode for it. Results are read through the register read-back
  port instead. The memory has no write port from the processor.
* Rotate is mentioned as an ALU capability but has no opcode, so it is not built.
* The program counter's "modified incrementer" is not described. A plain 16-bit BEC is used.
* The program counter is described as a 16-bit latch. Here it is an edge-triggered register.
* The clock control unit is known only by its outputs. The RESET/RUN/HALT sequencer is this
  design's own.
* The memory size is not given. 256 words is a choice; the address path is 16 bits wide.
* The host load port, the register read-back port, the carry flag and the registering of the
  flags are additions that make the core usable and testable.
* The shifter takes a distance of 0-15 bits, but the instruction set only ever uses 1.
* The source's multiplier diagram shows a column-by-column compressor arrangement with a
  carry passed from stage B into the final adder. That cell-level arrangement is not
  reproduced: stages A and B here are built from whole 4:2 compressor rows. The product is the same; the
  gate count and delay are probably not.
* The multiplier and the adder are separate instances. The source suggests sharing the
  adder's full adders with the multiplier; no sharing is attempted.
* The source reports power and area from an ASIC flow. Nothing here reproduces those numbers.
