# PLX 1.1 decode-and-execute core

PLX is a small 64-bit instruction set with fixed 32-bit instructions. It is
built around two ideas: every instruction is **predicated**, and there is
**subword parallelism**: one register holds several 1-, 2-, 4- or 8-byte
values and one instruction works on all of them. This RTL implements the
PLX 1.1 instruction encoding as hardware:

* a complete **instruction decoder** for all 64 major opcodes and all nine
  instruction formats;
* a single-cycle **core** around it that executes the part of the instruction
  set whose behaviour follows from the encoding: immediate arithmetic and logic,
  immediate shifts, 16-bit load-immediate, shift-right-pair, parallel subword
  shifts and compares that set predicates;
* an **offload port** that hands every other legal instruction, already
  decoded and with its register operands read, to logic outside the core.

The encoding itself (opcodes, formats, field positions, subop codes) is
implemented exactly. The meaning given to each executed instruction is read
from the instruction's name and operand list. Where that left a choice, this
design made one; those choices are listed under
[Where the design makes its own choices](#where-the-design-makes-its-own-choices).

## Instruction word

Every instruction starts with the same two fields:

| bits  | field                                                     |
|-------|-----------------------------------------------------------|
| 31:29 | guarding predicate (0-7)                                  |
| 28:23 | major opcode (0x00-0x3F)                                  |

The remaining 23 bits take one of nine layouts. `R` means a 5-bit register
number and `P` a 3-bit predicate number.

| format | 22:18 | 17:13 | 12:8 | 7:0 | used by |
|--------|-------|-------|------|-----|---------|
| 0  | imm23 (22:0) | | | | jmp, jmp.link, trap |
| 1  | R | pos (17:16), imm16 (15:0) | | | jmp.reg(.link), loadi.z/.k |
| 2  | R | R | imm13 (12:0) | | loads, stores, addi...srli |
| 3  | R | R | imm7 (12:6), imm6 (5:0) | | deposit, extract |
| 4a | R | R | R | subop (7:0) | indexed loads, packed ops, pshift, mix, perm |
| 4b | R | R | imm5 | subop (7:0) | pshifti, mux |
| 4c | R | R | R | imm8 | shrp |
| 5a | R | R | subop3 (12:10), P1 (9:7), P2 (6:4), rel (3:0) | | cmp |
| 5b | R | imm8 (17:10), P1 (9:7), P2 (6:4), rel (3:0) | | | cmpi, testbit, changepr |

For the 8-bit subop of formats 4a and 4b, bits 1:0 give the **subword size**
(00 = 1 byte, 01 = 2, 10 = 4, 11 = 8) and bits 7:2 choose the operation.

Opcode map:

| opcodes | instructions |
|---------|--------------|
| 00-03, 07 | jmp, jmp.link, jmp.reg, jmp.reg.link, trap |
| 04, 05 | loadi.z.pos, loadi.k.pos (pos = 0..3 in bits 17:16) |
| 08, 09 | cmp (with .w0 / .w1 forms), cmpi |
| 0A, 0B, 0C | testbit, changepr, changepr.ld |
| 10-17 | loads: indexed 4/8 byte, 4/8 byte, indexed with update, with update |
| 18-1F | stores of 1/2/4/8 bytes, then the same with update |
| 20-27 | addi, subi, andi, ori, xori, slli, srai, srli |
| 28, 29, 2A | deposit, extract, shrp |
| 30, 31 | packed ALU, packed multiply (operation in subop) |
| 32 | pshift.{2,4,8}.{l,ra,r} (subop 0/1/2), mix.{1,2,4}.{l,r} (0x10/0x11), perm (0x20) |
| 33 | pshifti.{2,4,8}.{l,ra,r} (0/1/2), mux.1.{rev,mix,shuf,alt,brcst} (8-C), mux.2.brcst (D) |
| 06, 0D-0F, 2B-2F, 34-3F | unassigned or reserved: decoded as illegal |

Compare relations (bits 3:0 of formats 5a/5b): 0 eq, 1 ne, 2 lt, 3 le, 4 gt,
5 ge (signed), 6 ltu, 7 leu, 8 gtu, 9 geu (unsigned). The cmp subop (bits 12:10)
is 000 for the plain form, 100 for `.w0` and 101 for `.w1`.

## Decoding (`plx_decoder`)

The decoder is purely combinational. It looks up the format from the opcode,
extracts that format's fields into the `dec_t` struct of `plx_pkg`, sets fields
that the format does not have to zero, and names the operation (`op_e`). It
also checks the sub-encodings and marks as illegal:

* opcodes 06, 0D, 0E, 0F, 2B-2F and 34-3F;
* cmp with a subop other than 000/100/101, cmp or cmpi with relation code 10-15;
* jmp.reg / jmp.reg.link with bits 17:16 other than 00;
* under opcode 32: shifts with 1-byte subwords, mix with 8-byte subwords, and
  unlisted subops;
* under opcode 33: shifts with 1-byte subwords, 1-byte mux forms with another
  size, mux.2.brcst with another size (so the reserved 2-byte mux reverse and
  mix forms are illegal), and unlisted subops.

Format-0 instructions (jmp, jmp.link, trap) carry the full 23-bit immediate
of bits 22:0. Opcode 15 decodes as the 8-byte indexed load with update. This
follows the pattern of opcodes 10-17; the alternative reading would make it a
duplicate of opcode 14.

## Execution and predication (`plx_core`)

Each cycle with `instr_valid` high handles one instruction:

1. The decoder runs. The register file is read at the three register fields:
   `a` = bits 22:18, `b` = 17:13, `c` = 12:8. The guard predicate is read at
   bits 31:29.
2. If the encoding is illegal, `illegal` is raised and nothing changes.
3. If the guard predicate is 0, `squashed` is raised and nothing changes.
4. Otherwise one of these happens:
   * **scalar** (`plx_scalar_unit`): `Rd(a) <= f(Rs1(b), imm13)` for
     addi...srli. loadi writes a 16-bit immediate into bits
     `16*pos+15 : 16*pos` of `Rd(a)`. `shrp` writes
     `Rd(a) <= ({Rs1(b), Rs2(c)} >> imm8)[63:0]`.
   * **parallel shift** (`plx_pshift`): every subword of `Rs1(b)` is shifted
     by `Rs2(c)[5:0]` (pshift) or by imm5 (pshifti), and the result goes to
     `Rd(a)`.
   * **compare** (`plx_compare`): compares `Rs1(a)` with `Rs2(b)` (cmp) or with
     imm8 (cmpi), then writes predicates P1 and P2 (see below).
   * **offload**: any other legal instruction raises `offload`. `off_dec`
     carries its decoded fields and `off_ra/off_rb/off_rc` the values of its
     register fields. This is the connection point for a branch unit, a
     load/store unit, packed ALU and multiply units, and the mix/mux/perm,
     deposit/extract and testbit/changepr logic.

Exactly one of `executed`, `squashed`, `illegal` and `offload` is high for
each presented instruction; an assertion in the core checks this.

Results are written on the clock edge that ends the cycle. The register file
reads asynchronously, so a dependent instruction can be issued in the very
next cycle with no forwarding and no stall.

### Predicates and the three compare forms

There are 8 one-bit predicates (`plx_predfile`). **Predicate 0 always reads
1**, so predicate field 000 means "always execute". Writes to predicate 0 are
ignored. The other predicates reset to 0.

| form | condition true | condition false |
|------|----------------|-----------------|
| `cmp.rel`, `cmpi.rel` | P1 <= 1, P2 <= 0 | P1 <= 0, P2 <= 1 |
| `cmp.rel.w0` (parallel write zero) | no write | P1 <= 0, P2 <= 0 |
| `cmp.rel.w1` (parallel write one)  | P1 <= 1, P2 <= 1 | no write |

The `.w0` and `.w1` forms write only in one direction. Several of them can
therefore combine into one predicate, for example an AND of conditions by
starting from 1 and applying `.w0` compares. If P1 and P2 name the same
predicate, P2's value wins.

cmpi widens its 8-bit immediate by sign extension for eq, ne and the signed
relations, and by zero extension for the unsigned relations.

### Load-immediate

`loadi.k.pos` replaces only the 16-bit field at `pos` and keeps every other
bit. `loadi.z.pos` also replaces the field and keeps the bits below it, but
clears all bits above it. So `loadi.z.0` loads a zero-extended 16-bit value,
and a full 64-bit constant takes `loadi.z.0` followed by `loadi.k.1`,
`loadi.k.2` and `loadi.k.3`.

### Parallel shifts

Subwords are 2, 4 or 8 bytes. Bits never cross a subword boundary. A shift
amount at least as large as the subword width clears the subword (left, right
logical) or fills it with its sign (right arithmetic). pshifti can only encode
amounts 0-31, because its immediate is 5 bits.

## Where the design makes its own choices

The encoding gives names and operand lists, not behaviour. These points are
this design's choices, and a reader adapting the RTL should check them
against their own PLX reference:

* Predication: an instruction takes effect only when its guard is 1, and
  predicate 0 is the constant 1.
* Operand roles of the register fields, as listed above.
* Extension of immediates: addi/subi sign-extend; andi/ori/xori zero-extend;
  cmpi as above.
* Immediate shift amounts use the whole unsigned imm13. Amounts of 64 or more
  give 0, or all sign bits for srai.
* loadi.z behaviour as above ("zero upper bits" read literally).
* The predicate writes of plain, `.w0` and `.w1` compares.
* shrp places Rs1 in the upper half of the pair.
* pshift takes a single amount, the low 6 bits of Rs2, for all subwords.
* Register 0 is an ordinary register. All registers and predicates reset to 0
  (except predicate 0).
* Single-cycle, non-pipelined organisation, and the offload port.

## What is not implemented

These instructions are decoded, checked for legality and sent out on the
offload port, but not executed, because their behaviour is not defined by
the encoding:

* jumps and trap: target computation, link register and trap action;
* loads and stores: addressing, the update forms, extension, byte order, and
  the memory itself;
* packed ALU (0x30) and packed multiply (0x31): their subops are not decoded
  further;
* mix, mux and perm: subword selection patterns;
* deposit and extract: which immediate is position and which length;
* testbit, changepr and changepr.ld, and predicate register *sets*: the core
  holds a single set of 8 predicates.

The reserved opcodes 0D/0E (`cmpi.rel.w0/.w1`) and the reserved 2-byte mux
forms decode as illegal.

## Files

| file | contents |
|------|----------|
| `rtl/plx_pkg.sv` | widths, opcode constants, `fmt_e`, `op_e`, `rel_e`, `psh_e`, the `dec_t` struct |
| `rtl/plx_decoder.sv` | combinational decoder |
| `rtl/plx_scalar_unit.sv` | immediate ALU, load-immediate, shrp |
| `rtl/plx_compare.sv` | compare relations and predicate-write rules |
| `rtl/plx_pshift.sv` | parallel subword shifter |
| `rtl/plx_regfile.sv` | 32 x 64-bit register file (parameters `N`, `W`) |
| `rtl/plx_predfile.sv` | 8 predicates (parameter `N`) |
| `rtl/plx_core.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each module has a self-checking testbench with a reference model written
independently of the RTL, often bit by bit. Each testbench ends by printing
`TB_RESULT checks=N failures=M`:

* `tb_plx_decoder`: 40 random words for each of the 64 opcodes, checking
  format, legality and every field; every named operation; every rejected
  sub-encoding.
* `tb_plx_scalar_unit`, `tb_plx_compare`, `tb_plx_pshift`: random and boundary
  operands for every operation, relation, mode, size and shift amount.
* `tb_plx_regfile`, `tb_plx_predfile`: reset state, random traffic against a
  shadow copy, same-cycle read/write, write-port priority, constant
  predicate 0.
* `tb_plx_core`: the whole core at its default size. It starts with a directed
  program: build a 64-bit constant, a dependent chain of immediate ops,
  predicates set by compares and then used as guards, and every `.w0`/`.w1`
  case. It then runs 4000 random instructions over all formats, including
  illegal and offloaded ones. After every instruction it compares all 32
  registers and all predicates with an instruction-level model, and checks
  the offload port contents. It also counts how often each mechanism occurred
  and fails if any never did: each operation group, each subword size,
  squash, offload, illegal, both outcomes of `.w0` and `.w1`, and back-to-back
  dependences.

To simulate one testbench with Verilator (from the directory that holds
`rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl rtl/plx_pkg.sv rtl/plx_*.sv \
    tb/tb_plx_core.sv --top-module tb_plx_core -o sim
./obj_dir/sim
```

Swap in a different testbench and its top module to run the others. Every
testbench has a cycle-count watchdog and runs in well under a second.
