# 64-bit barrel shifter

A barrel shifter moves a word by any number of bit positions in one pass through
combinational logic, instead of one position per clock as a shift register does.
This design shifts or rotates a 64-bit word left or right by 0 to 63 places. It
supports three operations: logical shift, arithmetic shift and rotate. The result
is registered, so an operation presented in one clock cycle is ready after the
next rising edge. A new operation can start every cycle.

The main idea is that only one direction of shifting is built. A right operation
works in three steps:

1. Mirror the word's bit order.
2. Move it left.
3. Mirror it back.

```
 data_in ──► input reversal ──► shift / rotate (left only) ──► output reversal ──► result register ──► data_out
                 ▲                     ▲            ▲                ▲
                dir              mode (shift/rotate) shamt (select)  dir
```

## The left shift/rotate stage

`shift_rotate` is a logarithmic shifter. It has log2(W) rows of W two-input
multiplexers. Row k is steered by bit k of the shift distance `shamt`. When that
bit is 1, the row moves the word 2^k places toward the most significant bit.
Otherwise the word passes straight through. A distance of 37 = 32+4+1 therefore
goes through the 32-, 4- and 1-place rows. A 64-bit word needs 6 rows of 64
multiplexers, 384 in all. In general the count is W·log2(W): 160 for 32 bits, 64
for 16 and 24 for 8.

Each row (`shift_stage`) decides what fills the 2^k low positions it vacates:

- **rotate**: the 2^k bits that were pushed out at the top, so no bit is lost;
- **shift**: the `fill` input, which the datapath sets to 0 or to the sign bit.

## Right operations via bit reversal

`bit_reversal` is one 2:1 multiplexer per bit, and it is used twice. When
`dir` is right, both copies mirror the word (`q[i] = d[W-1-i]`). Mirroring turns
"move right by s" into "move left by s", so the left-only stage does the work.
The second mirror restores the bit order. When `dir` is left, both copies pass
the word unchanged.

The arithmetic right shift has to copy the sign bit into the vacated high
positions. After the first mirror, those positions are the low ones the left
stage fills. The datapath (`barrel_shifter_core`) therefore drives the stage's
`fill` input with `data_in[W-1]`. This happens only for an arithmetic shift to
the right. In every other case `fill` is 0. An arithmetic left shift gives the
same result as a logical left shift.

| `dir` | `mode`               | result                          |
|-------|----------------------|---------------------------------|
| left  | `MODE_SHIFT_LOGICAL` | `d << s`                        |
| left  | `MODE_SHIFT_ARITH`   | `d << s`                        |
| left  | `MODE_ROTATE`        | `(d << s) \| (d >> (W-s))`       |
| right | `MODE_SHIFT_LOGICAL` | `d >> s`                        |
| right | `MODE_SHIFT_ARITH`   | `$signed(d) >>> s`              |
| right | `MODE_ROTATE`        | `(d >> s) \| (d << (W-s))`       |

The encodings are in `bs_pkg`:

- `dir_e`: `DIR_LEFT = 0`, `DIR_RIGHT = 1`;
- `mode_e`: logical 0, arithmetic 1, rotate 2.

Mode value 3 is not an operation. The logic treats it as a logical shift, and an
assertion in the top flags it.

Example: `AAAA_AAAA_AAAA_AAAA`, logically shifted right by 8, gives
`00AA_AAAA_AAAA_AAAA`.

## Top level and timing (`barrel_shifter64`)

| port        | dir | width | meaning                                               |
|-------------|-----|-------|-------------------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                                    |
| `rst_n`     | in  | 1     | asynchronous reset, active low; clears both outputs   |
| `in_valid`  | in  | 1     | an operation is on the inputs this cycle              |
| `data_in`   | in  | W     | word to shift                                         |
| `shamt`     | in  | log2 W| shift distance 0..W-1                                 |
| `dir`       | in  | 1     | `dir_e`                                               |
| `mode`      | in  | 2     | `mode_e`                                              |
| `out_valid` | out | 1     | `data_out` was loaded on the last edge                |
| `data_out`  | out | W     | registered result                                     |

An operation presented while `in_valid` is high is captured on the next rising
edge. The result is then on `data_out`, with `out_valid` high. There are no
stalls and no back-pressure. The output register loads only when `in_valid` is
high, so `data_out` holds its value on idle cycles. This keeps the output from
toggling when there is no work.

The top also carries two assertions:

- a rotate keeps the number of one bits;
- `mode` is never 3 while `in_valid` is high.

`W` is the parameter `WIDTH` and defaults to 64. It must be a power of two. Other
sizes such as 32, 16, 8 or 4 work with the same code.

## What follows the source description and what is this design's own

**Taken from the description:**

- the 64-bit width;
- the chain of blocks: input reversal, shift/rotate, output reversal;
- the Direction, Shift/Rotate and Select controls;
- the multiplexer-row structure with W·log2(W) multiplexers;
- select bit 0 moving each bit to the next more significant position;
- left and right logical and arithmetic shifts, and rotation;
- the single-cycle operation.

**Choices of this design:**

- the binary encodings of `dir` and `mode`;
- the `fill` input and the sign-fill rule for arithmetic right shifts;
- arithmetic left shift treated as equal to logical left shift;
- reversing only for right operations;
- the output register, the valid signals, the register enable and the reset.

**Not built:**

- The description attributes better delay, power, LUT count and area to
  unspecified "low power techniques" and to a 28 nm custom implementation. It
  does not say what those techniques are, so no specific low-power circuit is
  part of this RTL beyond the register enable above.

**Possible discrepancy:**

- A published simulation of the right shift above shows a result word that
  begins with zeros. This design produces `00AA_AAAA_AAAA_AAAA`, the value that
  a logical right shift by 8 defines.

## Files

| file                         | contents                                             |
|------------------------------|------------------------------------------------------|
| `rtl/bs_pkg.sv`              | `DATA_W`, `dir_e`, `mode_e`                          |
| `rtl/bit_reversal.sv`        | conditional bit-order mirror (input/output reversal) |
| `rtl/shift_stage.sv`         | one row of the logarithmic shifter                   |
| `rtl/shift_rotate.sv`        | log2(W) rows: left shift/rotate by `shamt`           |
| `rtl/barrel_shifter_core.sv` | combinational datapath                               |
| `rtl/barrel_shifter64.sv`    | top with output register                             |
| `tb/tb_*.sv`                 | one self-checking testbench per module               |

## Verification

Each testbench compares the hardware with a reference written with
SystemVerilog's own operators (`<<`, `>>`, `>>>`, streaming reversal). It ends by
printing `TB_RESULT checks=N failures=M`.

- `tb_bit_reversal`: walking ones, fixed patterns and random words, both settings
  of `rev`; also checks that reversing twice gives back the original word.
- `tb_shift_rotate`: every distance 0..63 in shift (fill 0 and 1) and rotate
  mode. It also runs an 8-bit instance (select bit 0 moves D0..D6 to Q1..Q7) and
  a 4-bit rotator (ABCD reaches every cyclic order, with no bit lost).
- `tb_barrel_shifter_core`: every direction, operation and distance, with
  random and corner-case words, plus the `AAAA…` right-shift-by-8 vector.
- `tb_barrel_shifter64`: the top at its default 64-bit size. It runs 3000 cycles
  of random operations with random idle cycles, and checks:
  - the one-cycle latency and `out_valid`;
  - that `data_out` holds on idle cycles;
  - the reset values.

  It counts how often each mechanism occurred: left/right logical shift,
  arithmetic right shift with sign fill, left/right rotate, distance 0,
  distance 63 and idle hold. A mechanism that never occurs counts as a failure.
- `tb_word_sizes`: the datapath built at 8, 16, 32 and 64 bits. All four sizes
  get the same 3000 random operations. A bit-by-bit reference checks each result.

Each testbench was also run against a deliberately broken copy of its module,
and every one reported failures. The four copies had these faults:

- one reversal bit stuck;
- the 32-place row never rotating;
- the sign fill taken from the wrong bit;
- the register ignoring `in_valid`.

Running a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/bs_pkg.sv rtl/bit_reversal.sv rtl/shift_stage.sv rtl/shift_rotate.sv \
  rtl/barrel_shifter_core.sv rtl/barrel_shifter64.sv tb/tb_barrel_shifter64.sv \
  --top-module tb_barrel_shifter64 -o sim
./obj_dir/sim
```

To lint the RTL, use the same file list with `--lint-only -Wall` in place of
`--binary --timing --assert`, leave out the testbench, and use
`--top-module barrel_shifter64`. Lint reports `rst_n` as used both
asynchronously and synchronously. The synchronous use is only the assertions'
`disable iff`.

Each testbench also has a watchdog that ends the run with a failure if it does
not finish in time.
