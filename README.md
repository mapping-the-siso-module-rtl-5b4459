# FPFA tile running the SISO forward recursion of a turbo decoder

A Field Programmable Function Array (FPFA) is a coarse-grained reconfigurable
array. It works like an FPGA, but its cells are word-level ALUs with small
local memories, not LUT-based logic blocks. The array is a matrix of
processor tiles. Each tile has five ALUs that a control unit reconfigures
every clock cycle. This RTL implements such an array of 25 tiles. It also
implements, as a tile program, the forward state-metric recursion of a
max-log-MAP SISO (soft-input soft-output) decoder, the core of a 3GPP turbo
decoder. One tile computes one trellis step (eight state metrics) every two
clock cycles.

The published description gives the tile's structure, the ALU datapath and
the SISO mapping. It says almost nothing about the control unit, the
communication unit, the instruction format or the network between tiles.
Those parts are this design's own, kept as simple as the SISO mapping
allows. The section "Choices made here" lists every such choice.

## Organisation

```
fpfa (NUM_TILES = 25 tiles, independent; each tile's ports brought out as arrays)
└── fpfa_tile
    ├── fpfa_comm      host commands: load memories / program, start, read back
    ├── fpfa_ctrl      sequencer with one counted loop
    │   └── fpfa_progmem   program memory, 32 instructions
    ├── fpfa_crossbar  10 buses: any ALU output or memory -> any register bank or memory
    └── 5 blocks, each:
        ├── fpfa_alu        three-level ALU (uses fpfa_fn three times)
        ├── 4 x fpfa_regbank  four 20-bit registers in front of ALU inputs a, b, c, d
        └── 2 x fpfa_mem      256 x 20-bit memory with read/write address pointers
```

`fpfa_pkg` holds the sizes, number formats and configuration structs.
`siso_fwd_pkg` builds the SISO program. The tiles of `fpfa` share nothing
but the clock and reset. The network that would connect them is not
specified, so each tile's host port and the two ends of its east-west ALU
chain are ports of the top.

## Number formats

Every word outside the ALU is 20 bits, sign-magnitude: bit 19 is the sign
and bits 18:0 are the magnitude. This covers registers, memories, crossbar
buses and the ALU inputs and outputs. Inside the ALU the adders use two's
complement and the multiplier uses magnitudes. This mix matters in three
places:

* **Level 1 saturates.** f1, f2 and f3 compute in 21 bits. They clamp the
  result to ±(2^19 − 1), the range a 20-bit sign-magnitude word can hold.
  Z1 therefore always fits a word.
* **40-bit values leave as two words.** A level-3 result is converted to a
  sign plus a magnitude, and the magnitude saturates at 38 bits. The high
  word is `{sign, mag[37:19]}` and the low word is `{sign, mag[18:0]}`. A
  value that fits one word comes out exactly as the low word. The `cd`
  operand of level 3 is the reverse: the sign of c with the magnitude
  `{c[18:0], d[18:0]}`.
* **Everything else wraps.** The multiplier takes two 19-bit magnitudes and
  XORs their signs. The level-2 and level-3 adders wrap at 40 bits.

## The ALU (`fpfa_alu`)

The ALU is purely combinational. Its four inputs come from the register
banks, and its two outputs go back into the crossbar.

| level | operation | selections |
|---|---|---|
| 1 | Z1 = f3(f1(a, b), f2(c, d)) | each f: 0, ±x, ±y, \|·\| of those, x+y, min, max, with optional negation of either operand and abs of the result |
| 2 | Z2 = X·Y ± E, or Z2 = Z1 when `l2_en` = 0 (bypass) | X ∈ {a, c, d, b}; Y ∈ {c, a, b, d, Z1}; E ∈ {0, c, d, east} |
| 3 | o1 = B + Z2, o2 = B − Z2 (butterfly) | B ∈ {0, c, d, cd} |
| out | out1, out2 ∈ {o1 high, o1 low, o2 high, o2 low} | |

Z2 also drives `west`. ALU i's `east` input is ALU i+1's `west`, so a
product can be accumulated along the chain within the same cycle. The
multiplexer inputs follow the published datapath drawing. The reading of
the level-2 equation (± applied to E) is this design's.

## Programming a tile

Each clock cycle the control unit issues one `instr_t`, 602 bits wide. The
instruction is the whole tile configuration for that cycle:

* `alu[5]`: the `alu_cfg_t` of every ALU.
* `rd_addr[5][4]`: the register each bank presents to its ALU input.
* `bus[10]`: for each crossbar bus, an enable and a source. Sources 0..9
  are ALU outputs (`alu*2 + out`); sources 10..19 are memory read ports.
* `rwr[5][4]`: for each register bank, a write enable, the register to
  write and the bus to take the data from.
* `mem[10]`: for each memory, a write enable, the bus to write from, a
  read-pointer operation, a write-pointer operation and an 8-bit immediate
  address.
* `loop_end`, `loop_to` and `halt` for the sequencer.

**Timing.** Register and memory reads are combinational. The ALUs compute
within the cycle, and the writes selected by the crossbar happen at the
next rising edge. A value produced in cycle t is therefore an operand in
cycle t+1. A register that is read and written in the same cycle gives its
old value.

**Memory pointers.** Each memory has a read pointer and a write pointer.
Each pointer has five operations:

* hold;
* access then increment;
* access then decrement;
* access the immediate address, then continue upward from it;
* access the immediate address, then continue downward from it.

Writing with increment and later reading with decrement gives the FIFO
store and last-in-first-out read-back that the forward and backward SISO
recursions use. Pointers are 8 bits and wrap around.

**Sequencer.** A `start` loads the loop counter and begins at word 0. A word
with `loop_end` set jumps to `loop_to` while the counter is above 1, so the
body runs `loop_count` times (0 counts as 1). A word with `halt` set is not
executed: `busy` falls and `done` pulses for one cycle.

## The SISO forward recursion on one tile (`siso_fwd_pkg`)

For k = 1..m, with inputs L[k−1] and P[k−1] and LP = L + P, each step
computes

```
A0',A4' = LBut(A0, A1, 0,  LP)     A1',A5' = LBut(A2, A3, L,  P )
A2',A6' = LBut(A4, A5, P,  L )     A3',A7' = LBut(A6, A7, LP, 0 )
LBut(X, Y, H, D) = ( max(X+H, Y+D), max(Y+H, X+D) )
```

ALU j (j = 0..3) owns butterfly j. It produces one max-of-two-sums per
cycle in level 1, with levels 2 and 3 bypassed, and its result leaves on
out1. The fifth ALU adds L + P. Memory i (i = 0..7) holds row A[i][·].
Memories 8 and 9, which belong to the fifth block, hold L and P.

**Register layout.** A step reads register set s = k mod 2 and writes
set 1 − s, so the banks ping-pong between steps. For ALU j:

| bank | entry 2s | entry 2s+1 | other entries |
|---|---|---|---|
| a | X | Y | set 1−s |
| c | Y | X | set 1−s |
| b | H at entry s | | |
| d | D at entry s | | |

Reading address 2s from banks a and c gives (X, Y), which yields
max(X+H, Y+D). Reading 2s+1 gives (Y, X), which yields max(Y+H, X+D). The
two halves of a butterfly thus differ only in one read address. ALU 0 needs
no H and ALU 3 no D, because f1 or f2 simply passes its left operand.

**Two-cycle schedule.** Every new metric A'[i] goes to bank a and bank c of
the ALU that reads it next. Each bank has one write port. The two metrics a
bank needs, A'[2t] and A'[2t+1], must therefore be produced in different
cycles. ALUs 0 and 2 produce their first half in the even cycle, and ALUs 1
and 3 their second half:

| cycle | ALU0 | ALU1 | ALU2 | ALU3 | ALU4 | memories |
|---|---|---|---|---|---|---|
| even | A0' | A5' | A2' | A7' | — | store A0',A5',A2',A7'; fetch L[k], P[k] into set 1−s |
| odd | A4' | A1' | A6' | A3' | L+P → set 1−s | store A4',A1',A6',A3' |

**Program shape.** Words 0 and 1 load column 0 and L[0], P[0] into set 0.
Words 2 to 5 are the loop body, covering two steps. Word 6 is the halt. Start
the tile with loop count m/2. The run takes 2 + 2m cycles plus the halt
word. Column k is stored at address k mod 256 of memories 0..7. When
m = 256, column 256 therefore overwrites column 0.

## Host interface (`fpfa_comm`)

The host port is a valid/ready command port. `cmd_t` carries an op, a
memory number, an address, a data word and an instruction. There are four
commands:

| command | action |
|---|---|
| `CMD_WR_MEM` | write a word into memory `sel` |
| `CMD_RD_MEM` | read a word; `rsp_valid`/`rsp_data` arrive one cycle later |
| `CMD_WR_PROG` | write a program word |
| `CMD_START` | run the program, with loop count `wdata` |

`cmd_ready` is low while a program runs. An assertion checks that a host
holds a command until it is accepted. `done_irq` pulses when a program ends.
To run the SISO on a tile:

1. Write the 7 program words.
2. Write A[i][0] at address 0 of memory i.
3. Write L[k] and P[k] at address k of memories 8 and 9.
4. Send `CMD_START` with m/2.
5. Wait for `done_irq`, then read the metrics back.

## Capacity and speed

* **Block length.** A block may hold at most 256 steps and must be even.
  The limit comes from the 256-word memories. The evenness comes from the
  two-step loop body.
* **Forward recursion time.** It takes 2m + 3 cycles: 515 cycles for
  m = 256.
* **Longer blocks do not fit.** A block of m = 5002 would need 5002 words
  per metric memory, against the 256 built. Such blocks must be split over
  several tiles, and this design has no network to do that.
* **Whole-SISO figure.** The published estimate for the complete SISO,
  backward recursion and soft output included, is 9m cycles. Only the 2m
  forward part is built here.

## Choices made here (not in the published description)

* **Instruction format.** The `instr_t` layout, the ten-bus crossbar with a
  per-bus source selector, the pointer operations, and the one-loop
  sequencer with a 32-word program memory.
* **Timing and reset.** Reads are combinational and writes happen at the
  clock edge. Reset is synchronous and active low. It clears the registers,
  pointers and control state, but not the memory arrays.
* **Arithmetic.** Level 1 saturates. The word split and the `cd` operand
  are as described under "Number formats".
* **SISO schedule.** Register allocation and schedule are this design's.
  The published mapping sketch shows a single operand row per butterfly.
  Here both metrics are stored in banks a and c, so that the second half
  of each butterfly can be formed.
* **Word width.** The SISO's 16-bit metrics and inputs are carried in
  20-bit words.

## Not included

* **Backward recursion and LLR output.** The 7m-cycle part of the SISO is
  not built because its equations and mapping are not given. The memory
  pointers support the reverse-order read-back it needs.
* **Turbo encoder, interleaver and de-interleaver.** The 3GPP turbo
  encoder's recursive coders, the interleaver and the de-interleaver are
  not built.
* **Tile network and wide arithmetic.** The network between tiles is not
  built. Neither is the extra hardware for 80-bit or floating-point numbers
  that spans several ALUs.

## Simulating

All files are SystemVerilog 2017 and simulate with plain Verilator 5. For
example, the full 25-tile test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fpfa_pkg.sv rtl/siso_fwd_pkg.sv tb/fpfa_tb_pkg.sv \
  rtl/fpfa_fn.sv rtl/fpfa_alu.sv rtl/fpfa_regbank.sv rtl/fpfa_mem.sv \
  rtl/fpfa_crossbar.sv rtl/fpfa_progmem.sv rtl/fpfa_ctrl.sv rtl/fpfa_comm.sv rtl/fpfa_tile.sv rtl/fpfa.sv \
  tb/tb_fpfa.sv --top-module tb_fpfa
./obj_dir/Vtb_fpfa
```

Each testbench ends by printing `TB_RESULT checks=N failures=F`. Every
testbench also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fpfa_fn` | all level-1 functions, random operands, saturation |
| `tb_fpfa_alu` | random configurations of all three levels against a 64-bit integer model |
| `tb_fpfa_regbank`, `tb_fpfa_mem`, `tb_fpfa_crossbar` | storage, pointer operations (FIFO, LIFO, wrap) and routing against models |
| `tb_fpfa_progmem`, `tb_fpfa_ctrl`, `tb_fpfa_comm` | program storage; word order, loop counts, done pulse; command decoding and refusal while busy |
| `tb_fpfa_tile` | SISO forward recursion with m = 2, 40 and 24 against a reference model, its cycle count, and a multiply / east-chain / butterfly program |
| `tb_fpfa` | all 25 tiles at default sizes running m = 256 at once (one tile saturating), every metric checked, then the multiply / butterfly program; counts that loop jumps, pointer wrap, refused commands, parallel running, saturation, bypass, east-chain multiply-add and butterfly each occurred |

The reference model in `tb/fpfa_tb_pkg.sv` recomputes the recursion from the
butterfly equations with plain integers, using the same saturation as level 1.
