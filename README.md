# PLX 1.0 processor in SystemVerilog

PLX is a small RISC instruction set built for multimedia code. Its main
features are these:

- **Subword parallelism.** A 64-bit register can be treated as eight bytes,
  four 16-bit halfwords, two 32-bit words or one 64-bit word. One instruction
  operates on all of them at once: add with or without saturation, averages,
  compares, min/max, multiplies, shifts and rearrangements.
- **Full predication.** Every instruction names a 1-bit predicate and does
  nothing unless that predicate is 1. This removes short branches from
  inner loops.

This repository contains RTL for a PLX processor with the default 64-bit
registers. It holds a single-cycle core that executes the whole integer
instruction set, with its instruction and data memories, and a
self-checking testbench for every unit.

## Architectural state

| State | Size | Notes |
|---|---|---|
| General registers R0–R31 | 64 bits each (parameter `W`) | R0 reads 0 and ignores writes. R31 receives the return address of `jmp.link` and `jmp.reg.link`. |
| Predicate sets | 16 sets × 8 predicates P0–P7 | Only one set is active. P0 of the active set always reads 1. |
| PC | `W` bits | Byte address. Instructions are 32 bits, so it steps by 4. |

### Predicates and predicate sets

Most of the instruction set is easy to follow once you know the predicate
machinery:

- **Qualifying predicate.** Every instruction word carries a 3-bit field that
  picks one of P0–P7 in the *active* set. If that predicate is 0, the
  instruction is nullified: no register, predicate, memory or PC effect
  except PC+4. An instruction qualified by P0 always executes.
- **Writing predicates.** `cmp.rel`, `cmpi.rel` and `testbit` write a
  condition into P1 and its complement into P2. Both named predicates are in
  the active set. So one compare sets up an if/else pair, `(p1) … ; (p2) …`.
- **Switching sets.** `changepr imm4` makes set `imm4` active.
  `changepr.ld imm4, imm8` also loads all eight predicates of that set at
  once. A routine can therefore keep its own predicates in its own set and
  leave the caller's untouched.
- **P0.** Writes to P0 are dropped. P0 reads as 1 even after `changepr.ld`.

`plx_predfile` holds the 16 × 8 bits and the active-set number. It is read
asynchronously and written on the clock edge.

## The packed datapath

The `sw` field of a packed instruction gives the subword size. For each
size, `plx_packed_alu` builds one `plx_lane_alu` per lane: 8 lanes of
8 bits, 4 of 16, 2 of 32 and 1 of 64. The `sw` code selects which set of
lanes drives the result, and no carry crosses a lane boundary.

Not every size is allowed for every operation. The decoder rejects sizes the
ISA does not list for an instruction, and a rejected instruction does nothing.

| Instruction | What each lane computes | Sizes (bytes) |
|---|---|---|
| `padd`, `psub` | modular, `.u` unsigned-saturating, `.s` signed-saturating | 1, 2, 4, 8 |
| `paddincr`, `psubdecr` | a+b+1, a−b−1, modular | 1, 2, 4, 8 |
| `pavg` | (a+b)>>1; top bit = carry; low bit = OR of the low two bits of the sum | 1, 2 |
| `pavg.raz` | (a+b+1)>>1; top bit = carry | 1, 2 |
| `psubavg` | (a−b)>>1; top bit = borrow; low bit = OR of the low two bits of the difference | 1, 2 |
| `pcmp.eq`, `pcmp.gt` | all ones or all zeros; gt is signed | 1, 2, 4, 8 |
| `pmax`, `pmin` | signed | 1, 2 |
| `pshiftadd.l/.r` | (a<<sa or a>>>sa) + b, sa = 1..3, signed saturation of the sum | 2 |
| `and`, `andcm`, `or`, `xor`, `not` | bitwise | – |

The rounding rule of `pavg` and `psubavg` deserves a closer look. Taking the
OR of the bit shifted out with the new low bit stops a long run of averages
from drifting in one direction.

`plx_packed_mul` works on 16-bit lanes:

- **`pmul.odd` / `pmul.even`.** These multiply the odd- or even-indexed signed
  halfwords (index 0 is the least significant) and keep the full 32-bit
  products.
- **`pmulshr`.** This multiplies every halfword pair. The plain form is
  unsigned and `.a` is signed. Each product is shifted right by 0, 8, 15 or
  16 and the low 16 bits are kept.

`plx_packed_shift` shifts 2-, 4- and 8-byte lanes. The amount comes from Rs2
(`pshift`) or from a 5-bit immediate (`pshifti`).

### Rearranging subwords

`plx_permute` moves subwords without changing them. Byte positions below are
counted from the most significant byte (position 0) of a 64-bit register.

| Instruction | Result, position by position |
|---|---|
| `mix.sw.l Rd,Rs1,Rs2` | upper subword of each pair: Rs1, Rs2, Rs1, Rs2 … (1-, 2-, 4-byte subwords) |
| `mix.sw.r Rd,Rs1,Rs2` | lower subword of each pair, in the same alternation |
| `mux.rev` | 7 6 5 4 3 2 1 0 |
| `mux.mix` | 0 4 2 6 1 5 3 7 |
| `mux.shuf` | 0 4 1 5 2 6 3 7 |
| `mux.alt` | 0 2 4 6 1 3 5 7 |
| `mux.brcst` | the least significant byte, copied to every byte |
| `perm Rd,Rs1,Rs2` | halfword *i* of Rd = halfword Rs2[2i+1:2i] of Rs1, so any permutation, with or without repeats |

### Scalar units

- **`plx_int_alu`.** `addi` and `subi` use a sign-extended 13-bit immediate;
  `andi`, `ori` and `xori` use a zero-extended one. `loadi.hi` and
  `loadi.lo` write 16 bits of Rd.
- **`plx_shift_bitfield`.** `slli`, `srai` and `srli` use only the low 6 bits
  of the immediate. `shrp` takes a 64-bit window from the pair {Rs1,Rs2}.
  `extract` and `deposit` take a field of length `imm6` at bit `imm7`.
- **`plx_compare`.** This is the predicate generator. It handles the ten
  relations eq, ne, lt, le, gt, ge, ltu, leu, gtu and geu, plus `testbit`.
- **`plx_branch`.** `jmp` and `jmp.link` jump to PC + imm23; `jmp.reg` and
  `jmp.reg.link` jump to PC + Rd. The `.link` forms write PC+4 to R31.
  `trap` halts.
- **`plx_lsu`.** Loads and stores of 1, 2, 4 or 8 bytes at Rs1 +
  sign-extended imm13. The `.update` forms also write that address back into
  Rs1.

## Instruction encoding

The ISA defines nine formats and their operand fields (register numbers,
imm23, imm18, imm13, imm8, imm7/imm6, imm5, imm4, predicate numbers). It does
not fix the bit positions or the opcode values, so the layout in `plx_pkg`
is this implementation's own:

```
[31:26] opcode   [25:23] qualifying predicate   [22:0] operands
 0  jmp/trap       imm23
 1  loadi, jmp.reg rd[22:18] imm18[17:0]
 2  addi … srli    rd[22:18] rs1[17:13] imm13[12:0]
 3  extract/deposit rd rs1 imm7[12:6] imm6[5:0]; mix: rd rs1 rs2[12:8] sw[1:0]
 4a reg-reg        rd rs1 rs2[12:8] func[7:2] sw[1:0]
 4b reg-imm        rd rs1 imm5[12:8] func[7:2] sw[1:0]
 4c shrp           rd rs1 rs2[12:8] imm8[7:0]
 5a cmp            rs1[22:18] rs2[17:13] p1[12:10] p2[9:7] rel[3:0]
 5b cmpi/testbit   rs1|rd[22:18] imm8[17:10] p1[9:7] p2[6:4] rel|imm4[3:0]
load/store: opcode = {100 (load) | 101 (store), update, sw}
```

`sw` is log2 of the subword size in bytes. The `pmulshr` shift code
(0, 8, 15, 16) and the `pshiftadd` amount (1–3) use the same two bits. The
opcode and function numbers are the enums in `rtl/plx_pkg.sv`, and
`tb/plx_asm_pkg.sv` has one encoder function per format for writing test
programs. To match another PLX toolchain, change `plx_decode` and
`plx_pkg` only; nothing else depends on the layout.

## The core

`plx_core` executes one instruction per clock and has no pipeline. Within
one cycle it:

1. fetches the instruction at PC from an asynchronously read instruction
   memory;
2. decodes it (`plx_decode`);
3. reads Rs1, Rs2 and Rd (Rd is a source for store, deposit, loadi, testbit
   and jmp.reg) and the qualifying predicate;
4. runs all execution units in parallel.

At the clock edge the core commits, provided the predicate is 1, the
instruction is valid and the core has not halted:

- the selected unit's result, or the link value, through register write
  port A;
- the `.update` base address through write port B;
- P1/P2, or a new active predicate set;
- a store with byte enables;
- the next PC.

When an `.update` load names the same register as Rd and Rs1, the base
update wins, because the ISA places the update after the load. `trap` sets
`halted`, which freezes PC and blocks every further commit.

`plx_top` adds a 1024-word instruction memory with a program load port and a
1024 × 64-bit data memory. Ports for observing registers and the active
predicate set are brought out as well. To use it:

1. Hold `rst_n` low and write the program through `prog_we/prog_addr/prog_data`.
2. Release reset. Execution starts at address 0.
3. Wait for `halted`.

Synthesis of `plx_top` at the defaults gives about 1,800 word-level cells,
2,245 flip-flop bits (mostly the register file) and 98 Kbit of memory.

## Where this design goes beyond the ISA or reads it in a particular way

- **Implementation choices.** The ISA describes no implementation, so the
  single-cycle organisation, Harvard memories, memory sizes, reset values
  (all registers and predicates 0, set 0 active, PC 0) and the encoding are
  this design's own.
- **Memory access.** Memory is little-endian and accesses are naturally
  aligned. The low address bits below the access size are ignored, and
  `misaligned` reports when that happens. Loads zero-extend.
- **`loadi.hi` / `loadi.lo`** leave the other bits of Rd unchanged.
- **Which register gets the result.** `paddincr`, `pavg`, `pavg.raz` and
  `psubavg` write Rd, as their operand lists show. Their prose says Rs2.
- **`mux.alt`** is the even-then-odd byte pattern shown above. The ISA's prose
  repeats the `mux.shuf` sentence for it.
- **`trap`** obeys its qualifying predicate like every other instruction.
- **Jump offsets.** The `jmp` immediate is a signed byte offset.
  `jmp.reg.link` jumps to PC + Rd.
- **Shift amounts.** A packed shift amount at or above the lane width clears
  the lane, or fills it with the sign bit for `.ra`. `pshiftadd` saturates
  only the final sum, not the shifted operand.
- **`perm` selectors.** Halfword *i* is selected by bits 2i+1:2i of Rs2.
- **Undefined encodings.** Unknown opcodes or function codes, and subword
  sizes not listed for an instruction, execute as no-ops. There are no
  exceptions.
- **Not built.** There is no floating point; the ISA has none. The 128-bit
  configuration is not supported: the ISA calls it incomplete and does not
  define it. The 32-bit register size does work: set `W` = 32. `shrp` then
  ignores the top two bits of its amount, and 8-byte subword operations
  return 0.

## Verification

Each unit has a self-checking testbench in `tb/`, named `tb_<module>`. Each
one compares the unit against a model written differently: wide-integer
arithmetic per lane, bit-by-bit loops, explicit permutation tables, or
array models of the memories. They use random and corner-case operands, and
each ends with a line `TB_RESULT checks=N failures=M`.

- **`tb_plx_core`** runs a directed program that touches every instruction
  class. It checks the final registers, memory and predicates, and that 40
  instructions take 40 cycles.
- **`tb_plx_core_random`** runs four random 1000-instruction programs on the
  core. The programs use every instruction except register jumps, and they
  include random qualifying predicates, predicate-set switches, unused
  opcodes, and loads and stores at random addresses. An instruction-level
  model in the testbench executes the same program. After every clock the
  testbench compares all 32 registers, the PC, the active predicate set and
  its predicates, and the whole data memory. It also fails if any opcode or
  function code in the programs never commits.
- **`tb_plx_top`** is the end-to-end test at full default size. Its program
  generates xorshift data in a subroutine. The subroutine is called with
  `jmp.link` and `jmp.reg.link` and returns with `jmp.reg`. The program then
  stores and reloads the data with `.update` addressing, picks `pavg.1` or
  `pmax.2` by a `testbit` predicate, saturates with `padd.1.u`, keeps a
  packed sum, and loops with `cmpi` and a predicated `jmp`. The loop runs in
  its own predicate set (`changepr.ld`), and the program finally switches
  back with `changepr` and stops with `trap`. The testbench recomputes every
  stored word and checks the cycle count (11 + 31 × iterations). It also
  counts each of these mechanisms and fails if one never happens.
- **`tb_plx_top32`** runs the same system with 32-bit registers. Its directed
  program covers the permutations, memory sizes and immediate-truncation
  rules that change with the word size.

Run one testbench with plain Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/plx_pkg.sv \
    tb/tb_plx_top.sv --top-module tb_plx_top -Mdir obj -o sim && obj/sim
```

`plx_pkg` must come first. Verilator finds the other modules and
`tb/plx_asm_pkg.sv` by name in the `-I` folders.
