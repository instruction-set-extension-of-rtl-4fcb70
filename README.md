# Crypto instruction-set extensions for small 32-bit processors

Block ciphers run slowly and burn energy when a general-purpose core has to
build every step out of shifts, masks and table look-ups. This design takes a
different route. It adds the expensive steps of a cipher to the processor's
ALU as new instructions, and leaves the control flow in software. Three
processor-side pieces and one stand-alone accelerator are provided:

| Part | Module | What it is |
|---|---|---|
| AES extension for a SPARC V8 (Leon3-style) integer unit | `leon3_ise_iu` | Execute slice whose logic unit also performs **SubByte**, **ShiftRow** and **MixColumn** on one 32-bit row or column |
| AES first-round hardware | `aes_round1` | The same row and column datapaths chained into one AES-128 round with its round key. Used to check the datapaths outside the processor. |
| PRESENT-80 | `present80_core` | Iterative hardware encryption of the lightweight PRESENT cipher, one round per clock |
| OR1200 custom instruction | `or1200_cust5` | The `l.cust5` unit of an OpenRISC 1000 core: move byte, set bit, clear bit |

`secure_iot_ise_top` places all four side by side. They share only clock and
reset, because in a real system each one sits in a different processor.

## The AES extension

### Idea

AES-128 works on a 4x4 byte matrix called the state. A SPARC register is 32
bits wide, so it holds one row or one column of the state. Every AES step
except AddRoundKey is either row-wise or column-wise:

- **SubByte** substitutes each byte of a row through the S-box: four S-boxes side by side.
- **ShiftRow** rotates row *r* left by *r* byte positions. The count is an operand, so one instruction serves all four rows.
- **MixColumn** multiplies one column by the fixed matrix `02 03 01 01 / 01 02 03 01 / 01 01 02 03 / 03 01 01 02` over GF(2^8).

AddRoundKey is a plain `xor`. The key schedule also needs nothing new. Its T
operation (rotate the last key column one byte, substitute it, XOR in Rc) is
`ShiftRow` by 1, then `SubByte`, then `xor`.

### Where the instructions live

The three instructions use the same format-3 layout as `and rs1, reg_or_imm, rd`,
on op3 codes that SPARC V8 leaves unassigned:

| Instruction | op (31:30) | op3 (24:19) | Operand 1 (`rs1`) | Operand 2 (`rs2` or `simm13`) | Example word |
|---|---|---|---|---|---|
| SubByte  | `10` | `0x0D` | state row | ignored | `82680801` |
| ShiftRow | `10` | `0x19` | state row | shift count in bits 1:0 | `82C88001` |
| MixColumn| `10` | `0x1D` | state column | ignored | `82E88001` |

In the ALU they are added to the logic unit (`leon3_logic_unit`), next to
AND/OR/XOR/ANDN/ORN/XNOR. The old logic unit picked its operation with a
3-bit code that had only one free value. That code is widened to 4 bits
(`ise_pkg::logic_op_e`), which leaves room for the three new operations. They
do not touch the condition codes and have the same latency as `and`. A
compiler that does not know them can emit an `and` with the right registers,
and the binary can then be patched to the new op3.

### Packing convention

Every module and the test program use the same byte order:

- A **row** register holds `s[r][0] s[r][1] s[r][2] s[r][3]`, column 0 in bits 31:24.
- A **column** register holds `s[0][c] .. s[3][c]`, row 0 in bits 31:24.
- A 128-bit block is in the usual byte order. Byte *k* (bits `127-8k -: 8`) is `s[k mod 4][k div 4]`. The block is therefore four columns, column 0 in the top word.

### Converting between rows and columns

MixColumn needs columns, and SubByte and ShiftRow want rows. So the state
must be transposed twice per round. A transpose needs no right shifts, only
the new ShiftRow, an AND with a one-byte mask and an OR:

```
row_r = OR over c of ( ShiftRow(col_c, (r - c) mod 4)  AND  (FF000000 >> 8c) )
```

Each output word costs 4 x (ShiftRow + AND + OR) + 1 move, so a full
transpose is 52 instructions. `tb/tb_secure_iot_ise_top.sv` shows the whole
encryption written this way (tasks `transpose`, `key_step`, `add_round_key`).
An AES-128 block takes **1866 instructions**, which is 1866 cycles on this
slice. That count includes the constant loads, and 1612 of the instructions
are transposes. The count shows that in this row/column scheme the
conversions, not the cipher steps, dominate.

### The execute slice (`leon3_ise_iu`)

This is only the part of a Leon3 integer unit that the extension changes.
The 7-stage pipeline, instruction fetch, branches, register windows, caches
and memory are not modelled. Instructions arrive on the `insn` port, one per
clock while `insn_valid` is high:

- `sparc_ise_decoder` decodes the word. The executed subset is ADD, SUB, ADDX and SUBX (add with carry, subtract with borrow), their cc forms, the six logic operations and their cc forms, SLL, SRL, SRA, SETHI and the three AES instructions. Anything else retires with `illegal = 1` and changes nothing.
- The operands come from `sparc_regfile`: 32 flat registers, with `%g0` reading as zero. The second operand is `r[rs2]` or the sign-extended `simm13`.
- The adder, the shifter or the logic unit produces the result, and it is written at the next rising edge. The following instruction already reads the new value, so there are no stalls and no forwarding paths.
- `wb_valid`, `wb_rd` and `wb_data` report each instruction one clock after it was presented. `icc` holds N Z V C. The logic cc forms clear V and C. The adder cc forms follow SPARC V8, and C is the borrow after a subtract. ADDX and SUBX take `icc.c` as their carry or borrow in, so a 64-bit add is `addcc` on the low words and `addx` on the high words.
- `dbg_addr`/`dbg_data` read any register. `n_subbyte`, `n_shiftrow` and `n_mixcol` count retired AES instructions.

Assertions check that every presented word retires one clock later, and that an illegal word never writes the register file.

### AES first round in hardware (`aes_round1`)

It computes `MixColumn(ShiftRow(SubByte(plain ^ key))) ^ rk1`, with
`rk1 = aes_key_step(key, 1)`. It uses four SubByte, four ShiftRow and four
MixColumn units, and the conversions between them are wiring. The path is
combinational and the output is registered, so `out_valid` follows
`in_valid` by one clock. `aes_key_step` is one full AES-128 key-schedule step
with the Rc table for rounds 1 to 10 (rounds outside that range use Rc = 0).

## PRESENT-80 (`present80_core`)

PRESENT encrypts a 64-bit block in 31 identical rounds. Each round is
addRoundKey with key bits 79:16, then sBoxLayer (16 copies of the 4-bit S-box
`C56B90AD3EF84712`), then pLayer, where bit *i* moves to
`16*(i mod 4) + i div 4`. After each round, the 80-bit key register is
rotated left by 61, its top nibble goes through the S-box, and bits 19:15 are
XORed with the round counter. A last addRoundKey follows round 31.

The core does one round per clock:

- `start` while idle is the load edge.
- `busy` is high during the 31 rounds.
- `done` rises 31 clocks after the load edge and stays high, with `ciphertext` valid, until the next `start`.
- The final addRoundKey is combinational on the output.
- `start` while busy is ignored.

The round structure comes from `present_sbox_layer`, `present_player` and `present_key_update`.

## OR1200 `l.cust5` (`or1200_cust5`)

`l.cust5 rD,rA,rB,L,K` has opcode `0x3C` and the fields D 25:21, A 20:16,
B 15:11, L 10:5 and K 4:0. The unit decodes the word and computes rD from the
values of rA (`a`) and rB (`b`):

| K | Operation | Result |
|---|---|---|
| 1 | move byte | low byte of rB replaces byte lane `L[1:0]` of rA |
| 2 | set bit | rA with bit `L[4:0]` set |
| 3 | clear bit | rA with bit `L[4:0]` cleared |
| other | - | rA |

It is combinational and sits beside the core's ALU. `is_cust5` says whether the word is an `l.cust5` at all.

## How far to trust it

Every block has a self-checking testbench, and the models in `tb/tb_ref_pkg.sv` are written independently of the RTL:

- The AES S-box is computed from the GF(2^8) inverse and the affine map, not copied from a table.
- MixColumn uses a general GF multiply.
- A byte-array AES-128 produces the expected ciphertexts.
- PRESENT uses the 64-entry permutation table and a bit-by-bit key schedule.

Known answers that are checked:

- **AES**:
  - The FIPS-197 example (plain `3243f6a8 885a308d 313198a2 e0370734`, key `2b7e1516 28aed2a6 abf71588 09cf4f3c`) gives the round-1 state `a49c7ff2 689f352b 6b5bea43 026a5049`, the final round key `d014f9a8 c9ee2589 e13f0cc8 b6630ca6` and the ciphertext `3925841d 02dc09fb dc118597 196a0b32`.
  - The ciphertext is reproduced by the instruction program on the execute slice.
- **PRESENT-80**: all four published vectors (key and plaintext all-zero or all-one), e.g. `0/0 -> 5579C138 7B228445`. Random blocks are also checked against the reference, and the 31-clock latency is checked.
- **l.cust5**: the move-byte, set-bit and clear-bit test program, with checksum `0x232402b8`.

Each testbench was also run against a copy of its module with one deliberate bug, and each one caught it.

Departures and choices to know about:

- The execute slice is not a processor. There is no fetch, no branches, no memory, and no register windows (SAVE/RESTORE are illegal). The program in the testbench is straight-line code driven from outside.
- The numeric 4-bit logic-operation codes, the choice of `rs1` as the data operand and of `rs2`/`simm13` as the ShiftRow count, and the single-cycle timing are this design's own.
- The op3 codes 0x0D, 0x19 and 0x1D come from the example instruction words above. Only op and op3 select the operation. The register and operand fields of those words are ordinary SPARC fields.
- `aes_round1` implements only the 128-bit key schedule. AES-192 and AES-256 would need a different schedule. The three instructions themselves do not depend on the key length.
- `present80_core` only encrypts. Decryption is not provided.
- The `l.cust5` opcode and field layout follow the OpenRISC 1000 architecture.
- Not included: the processor cores themselves (Leon3, OR1200, Cortex-M0, RI5CY), their buses, boot ROMs and GPIO, and the PRESENT operations as OR1200 custom instructions, which were never specified.

## Simulating

Everything is plain SystemVerilog 2017. Put `rtl/ise_pkg.sv` (and for
testbenches `tb/tb_ref_pkg.sv`) first and let verilator find the rest by
module name:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ise_pkg.sv tb/tb_ref_pkg.sv tb/tb_secure_iot_ise_top.sv \
    --top-module tb_secure_iot_ise_top -o sim
./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog. `tb_secure_iot_ise_top` is the end-to-end test at default
parameters, and it takes seconds. It runs four AES-128 blocks as instruction
programs (the FIPS-197 one and three random ones), compares round 1 of each
with `aes_round1`, runs the four PRESENT vectors and the `l.cust5` program.
It also counts that every mechanism occurred: each AES instruction, a
condition-code update, a carry passed on by `addx`, an illegal word, the first-round hardware, PRESENT
busy-to-done, and each `l.cust5` operation.

| File | Content |
|---|---|
| `rtl/ise_pkg.sv` | SPARC op3 constants, `logic_op_e`, decoded-instruction struct, `icc_t` |
| `rtl/aes_sbox.sv`, `aes_subbyte.sv`, `aes_shiftrow.sv`, `aes_mixcolumn.sv` | AES row/column datapaths |
| `rtl/leon3_logic_unit.sv`, `sparc_ise_decoder.sv`, `sparc_regfile.sv`, `leon3_ise_iu.sv` | Extended SPARC execute slice |
| `rtl/aes_key_step.sv`, `aes_round1.sv` | AES-128 key step and first-round hardware |
| `rtl/present_*.sv`, `present80_core.sv` | PRESENT-80 |
| `rtl/or1200_cust5.sv` | OR1200 `l.cust5` unit |
| `rtl/secure_iot_ise_top.sv` | Top level |
| `tb/tb_<module>.sv` | One testbench per module; `tb_ref_pkg.sv` holds the reference models and instruction encoders |
