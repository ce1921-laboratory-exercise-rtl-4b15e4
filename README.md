# ARMv4 immediate extender and second-operand path

ARMv4 instructions are 32 bits wide, so a constant written into an
instruction (`ADD R0, R1, #5`) has to fit in a short bit field: 8 bits for
data-processing instructions, 12 bits for load/store offsets and 24 bits for
branch offsets. The ALU works on 32-bit words. The **extender** widens
whichever field the current instruction uses into a 32-bit operand, and a
multiplexer then lets that constant take the place of a register value as the
ALU's second source.

This RTL covers that slice of a single-cycle ARMv4 datapath:

```
 immediate fields ──► extender ──imm32──┐
                                         ├─► src2_mux ──src2_unrotated──► (rotator) ──SRC2──► (ALU)
 (register file) ──────────rf_rd2───────┘
```

The register file, the rotator and the ALU are not part of this RTL; their
connections are ports of the top module.

## The extension rule

The 2-bit select `exts` chooses the format (`ext_pkg::ext_sel_e`):

| `exts` | name         | `imm32`                                        |
|--------|--------------|------------------------------------------------|
| 0      | `EXT_IMM8`   | `{24'b0, imm8}`                                |
| 1      | `EXT_IMM12`  | `{20'b0, imm12}`                               |
| 2      | `EXT_BRANCH` | `{{6{imm24[23]}}, imm24, 2'b00}`               |
| 3      | `EXT_NONE`   | `32'b0` (code unused)                          |

The data-processing and load/store constants are zero-extended: they are
unsigned magnitudes. The branch field is different and is the part worth
understanding: it is a *signed word offset*. Appending two zero bits
multiplies it by four (instructions are 4 bytes), which turns a word count into
a byte offset, and the six copies of bit 23 on top sign-extend the resulting
26-bit value to 32 bits. So a field of `0xFFFFFF` (−1 word) becomes
`0xFFFFFFFC` (−4 bytes), and `0x800000` becomes `0xFE000000`, the most
negative reachable offset. Bits 1:0 of a branch offset are always zero.

Reference vector used by the testbenches:

| input                              | `exts` | `imm32`      |
|------------------------------------|--------|--------------|
| `imm8 = 8'b01101011`               | 0      | `0x0000006B` |
| `imm12 = 12'b010110111111`         | 1      | `0x000005BF` |
| `imm24 = 24'b000000001111010111111111` | 2  | `0x0003D7FC` |
| any                                | 3      | `0x00000000` |
| `imm24 = 24'hFF0A01` (negative)    | 2      | `0xFFFC2804` |

### Where this departs from, or adds to, the usual lab definition

- The three fields are separate inputs. Which instruction bits feed them is
  left to the datapath around the extender.
- The second-operand multiplexer appears in the datapath diagram only as a
  box; its select name and polarity (`src2_sel_imm = 1` takes the immediate)
  are this design's choice.
- The enum names for the select codes are this design's own; the codes
  0..3 are fixed.

## Modules

| file                   | what it is |
|------------------------|-----------|
| `rtl/ext_pkg.sv`       | widths (`WORD_W` 32, `IMM8_W` 8, `IMM12_W` 12, `IMM24_W` 24) and the `ext_sel_e` enum |
| `rtl/extender.sv`      | the extender: a four-way multiplexer of pre-formed 32-bit words |
| `rtl/src2_mux.sv`      | 2:1 multiplexer, parameter `WIDTH` (default 32) |
| `rtl/arm_src2_path.sv` | top: extender feeding `src2_mux` |

Top-level ports of `arm_src2_path`:

| port             | dir | width | meaning |
|------------------|-----|-------|---------|
| `imm8`           | in  | 8     | data-processing immediate field |
| `imm12`          | in  | 12    | load/store immediate field |
| `imm24`          | in  | 24    | branch immediate field |
| `exts`           | in  | 2     | extension select (`ext_sel_e`) |
| `rf_rd2`         | in  | 32    | second read value of the register file |
| `src2_sel_imm`   | in  | 1     | 1: immediate, 0: register |
| `imm32`          | out | 32    | extended constant |
| `src2_unrotated` | out | 32    | selected operand, for the rotator |

Everything is combinational; there is no clock or reset. In a single-cycle
processor the outputs only need to settle within the clock period, and the
path is one 4-way and one 2-way multiplexer deep.

## Not included

The rotator between the multiplexer and the ALU, the ALU, the register
file, and the rest of the processor (instruction ROM, data memory,
controller) are outside this RTL. In particular the rotator's amount and
where it comes from are not defined here, so `src2_unrotated` is exactly the
value before any rotation.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `extender_tb`: the reference vector, extreme and negative branch offsets,
  every `imm8` and every `imm12` value, and 4000 random cases. Expected values
  are computed arithmetically (the signed field times four), independently of
  the bit-concatenation in the RTL.
- `src2_mux_tb`: both select values with differing random inputs.
- `arm_src2_path_tb`: end to end at default sizes. It plays the reference
  sequence (select counting 0..3), a negative branch offset, then 3000 random
  operations, and counts each mode (imm8, imm12, positive branch, negative
  branch, unused code, register operand, immediate operand); a mode that never
  occurs is a failure.

Each testbench was also run against a deliberately broken copy of its module
(branch extension without sign copies; inverted select; swapped multiplexer
inputs) and reports failures there.

Running one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/ext_pkg.sv rtl/extender.sv rtl/src2_mux.sv rtl/arm_src2_path.sv \
  tb/arm_src2_path_tb.sv --top-module arm_src2_path_tb -o sim
./obj_dir/sim
```

Replace the last testbench file and `--top-module` with `extender_tb` or
`src2_mux_tb` to run the others.
