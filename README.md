# A quaternary arithmetic logic block and a multiplierless FIR filter built from it

In an FPGA most of the area, delay and power goes into wires and switches, not logic. A wire that
carries four logic levels instead of two carries two bits. The fabric then needs half the signals,
half the routing switches and half the fan-out for the same function. This design models the logic
side of such a quaternary (radix-4, four-level) fabric:

* a **quaternary lookup table (QLUT)**: two quaternary inputs and sixteen quaternary configuration
  digits, so it can hold any two-input quaternary function. That is as much as two 4-input binary
  LUTs;
* an **arithmetic-oriented logic block** built around the QLUT, with dedicated carry logic and a
  register, so that a column of blocks is a fast radix-4 adder;
* a **four-tap FIR filter**, `y(n) = 117x(n) + 100x(n-1) + 13x(n-2) + 36x(n-3)`, mapped onto those
  blocks. It uses only additions and shifts, and shares one partial product (`3x`) between
  coefficients.

The RTL is two-state, synthesizable SystemVerilog. The four voltage levels are not modelled.
Every quaternary wire is a two-bit code equal to its logic value (`qfpga_pkg::qdigit_t`), and the
circuits are reduced to their logic functions.

## Representing quaternary signals

| Level | Code | Meaning in the circuit |
|---|---|---|
| 0 | `2'd0` | GND |
| 1, 2 | `2'd1`, `2'd2` | intermediate levels |
| 3 | `2'd3` | VDD |

A word of N digits is `qdigit_t [N-1:0]`, with digit 0 the least significant. Its packed bits read
as the same unsigned number in binary, so testbenches can compare with plain integers. The carry
between logic blocks only ever takes the levels 0 and 1, so it is a single bit.

## Down literal circuits: how a quaternary digit selects

Inside the lookup table a digit is never decoded into binary. Each quaternary input drives three
**down literal circuits** (`dlc`). These are inverter-like stages whose switching thresholds sit
between adjacent levels. DLC *k* outputs 3 while the input is below *k*, and 0 otherwise:

| input | DLC 1 | DLC 2 | DLC 3 |
|---|---|---|---|
| 0 | 3 | 3 | 3 |
| 1 | 0 | 3 | 3 |
| 2 | 0 | 0 | 3 |
| 3 | 0 | 0 | 0 |

Together the three outputs form a thermometer code. `qmux4` is a four-input pass-gate
multiplexer steered by such a code:

* input 0 passes while DLC 1 is high;
* input 1 passes when DLC 1 is low and DLC 2 is high;
* input 2 passes when DLC 2 is low and DLC 3 is high;
* input 3 passes when DLC 3 is low.

An assertion in `qmux4` flags steering lines that are not such a code.

The table above is the circuit's defined behaviour. The mapping of DLC outputs to pass gates is
this design's reading of the circuit.

## The quaternary LUT (`qlut`)

The QLUT is a two-stage tree of `qmux4`:

* **First stage:** four multiplexers, steered by the DLCs of `y0`, each pick one digit from
  `C0..C3`, `C4..C7`, `C8..C11` and `C12..C15`.
* **Second stage:** one multiplexer, steered by the DLCs of `y1`, picks among those four.

So `w = C[4*y1 + y0]`. A 4-input binary LUT needs four stages of 2:1 multiplexers for 16 entries.
The quaternary one needs two stages of 4:1. The configuration digits are an input port. How they
are loaded into a real fabric is outside this RTL.

## The logic block (`qclb`) and its carry logic (`qcp`)

One block produces one sum digit:

```
S    = QLUT(X, Y)                 X steers the first stage, Y the second: S = C[4*Y+X]
Cout = QCP(X, Y, S, Cin)
Sum  = Cin ? (S + 1) mod 4 : S
SumQ = Sum, registered on the rising clock edge
```

The correction `S + 1 mod 4` is itself a `qmux4`, steered by the DLCs of S, whose data inputs are
the constants `1, 2, 3, 0`. A 2:1 multiplexer controlled by `Cin` then chooses between that and S.

The table is loaded with `qfpga_pkg::ADD_CFG`, where entry `4Y+X` is `(X+Y) mod 4`. The block is
then a radix-4 full adder. With `Cin = 0` and any other table it is a general two-input
quaternary gate ("random logic") whose output is `S` or `Sum`.

The carry logic is the subtle part. It works out the carry from the operands and S without waiting
for the sum:

* **Propagate.** DLC 3 on S gives `S3`. `S3` is 0 only when `S = 3`, which under the addition table
  means `X + Y = 3`. That is the only case in which the carry out equals the carry in, so `S3 = 0`
  routes `Cin` to `Cout`.
* **Generate.** Otherwise `Cout` is a constant: 1 exactly when `X + Y >= 4`. Two conditions give 1:
  * `K1`: `X = 3` or `Y = 3`. Because `S != 3`, the other digit is then at least 1.
  * `K2`: `X >= 2` and `Y >= 2`. This is the condition that catches `2 + 2`.

A stricter `K2`, `X > 2 and Y > 2`, would give no carry for `2 + 2` and break the adder's truth
table. This RTL uses `>= 2`. The testbench checks all 32 combinations of X, Y and Cin against
the truth table, so it catches the stricter form.

With a table other than addition, `Cout` still follows the rule above (propagate when `S = 3`,
otherwise generate from X and Y). It is meaningful only for arithmetic.

`qdff` is the block's register: one digit, rising-edge, with an asynchronous active-low reset to 0.
The reset is this design's addition.

## Columns and the carry chain (`qclb_column`)

Arithmetic operators are placed in vertical columns of blocks, with each block's `Cout` wired to
the `Cin` of the block above. `qclb_column #(.DIGITS(N))` is such a column. All its blocks share
one configuration. Loaded with `ADD_CFG` it is an N-digit radix-4 ripple-carry adder:

* `sum` and `cout` are combinational. The carry passes through one `qcp` per digit.
* `sumq` is `sum` registered in the blocks' flip-flops.

An 8-bit binary adder needs 8 carry stages. The quaternary column needs 4.

## The FIR filter (`qfpga_fir4`, the top)

The filter is in transposed direct form. All four products are formed from the current input, then
summed along a chain of delays:

```
y(n) = 117x + z^-1( 100x + z^-1( 13x + z^-1( 36x ) ) )
```

The products are a multiple-constant multiplication that uses shifts and additions only, and it
computes `3x` once for all constants:

| product | built as | column |
|---|---|---|
| 3x | `(x << 1) + x` | `u_add3` |
| 13x | `(3x << 2) + x` | `u_add13` |
| 117x | `(13x << 3) + 13x` | `u_add117` |
| 100x | `(3x << 5) + (x << 2)` | `u_add100` |
| 36x | `(3x << 3) + (3x << 2)` | `u_add36` |

Three more columns form the tap chain: `u_tap2`, `u_tap1` and `u_tap0`.

* Every z^-1 is the flip-flop row of the column whose sum it delays. For example, the registers
  of `u_add36` hold `36x(n-1)`.
* The output `y` is the combinational sum of `u_tap0`. It is valid in the same cycle as `x`, with
  no register after the last adder.

That gives eight columns of `X_DIGITS + 5` blocks: 72 blocks at the default size.

**Parameters and ports.**

* `X_DIGITS` (default 4, an 8-bit unsigned input) sets the input width.
* The output has `X_DIGITS + 5` digits. That holds the largest result, `266 * (4^X_DIGITS - 1)`,
  exactly.
* Ports: `clk`; `rst_n` (asynchronous, clears the delay line); `x`; `y`.

**Timing.**

* `x` is sampled into the delay line at the rising edge of `clk`.
* `y(n)` depends on `x(n)` combinationally, and on earlier samples through the registers.
* The impulse response appears as 117, 100, 13, 36 on four consecutive cycles.
* The longest path runs through three MCM columns and one tap column, each rippling its carry over
  up to 9 digits.

## What follows the source design and what was chosen here

Taken from the source design:

* the DLC truth table;
* the two-stage QLUT structure and its grouping of configuration digits;
* the block's datapath: QLUT, QCP with its propagate and generate halves, the `1,2,3,0` increment
  multiplexer, the Cin-controlled sum multiplexer, and the register;
* the adder truth table;
* carry chains running along columns;
* the filter's constants, its transposed form and the sharing of `3x`.

Chosen here:

* the two-bit encoding of levels;
* the gating order inside `qmux4`;
* which block input drives which LUT stage;
* `K2` as `>= 2` (see above);
* register reset;
* which constant belongs to which tap (A0 = 117 … A3 = 36, in the order given);
* the rest of the adder graph;
* the 8-bit unsigned input;
* a single adder width for the whole filter, where the minimum widths would grow from adder to
  adder;
* shifts applied to the binary reading of a digit vector. An odd shift therefore regroups bits
  across digits instead of only moving whole digits;
* delays mapped onto the columns' own registers.

Not modelled:

* the programmable routing (switch matrices and wire segments) and configuration loading. The
  filter's columns are wired directly;
* analog behaviour: levels, thresholds, delay and power;
* the binary Spartan-3-style logic block, which is only a point of comparison for this design;
* filters with other coefficient sets. Each set needs its own adder graph.

## Files

| file | contents |
|---|---|
| `rtl/qfpga_pkg.sv` | `qdigit_t`, `qlut_cfg_t`, level constants, `ADD_CFG` |
| `rtl/dlc.sv` | three down literal circuits of one digit |
| `rtl/qmux4.sv` | DLC-steered 4:1 quaternary multiplexer |
| `rtl/qlut.sv` | two-input quaternary LUT |
| `rtl/qcp.sv` | carry propagate/generate logic |
| `rtl/qdff.sv` | one-digit register |
| `rtl/qclb.sv` | arithmetic logic block |
| `rtl/qclb_column.sv` | column of blocks with chained carry |
| `rtl/qfpga_fir4.sv` | four-tap FIR filter (top) |
| `tb/tb_<module>.sv` | self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog counts a failure
if the test hangs. To build and run one, for example the filter:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/qfpga_pkg.sv tb/tb_qfpga_fir4.sv --top-module tb_qfpga_fir4 -o sim
./obj_dir/sim
```

Replace `qfpga_fir4` with any other module name to run its test.

* `tb_qfpga_fir4` runs the filter at its default size. It checks an impulse response, saturating
  inputs, 2000+ random samples against an integer model, and a reset in mid-stream. It also counts
  carry propagations and generations in the shared `3x` adder and fails if either never happens.
* `tb_qcp`, `tb_qclb` and `tb_dlc` cover their truth tables exhaustively.
* `tb_qlut` and `tb_qclb` also load random configurations.
* `tb_qclb_column` includes a carry that ripples through all nine digits.

To change the filter width, override `X_DIGITS`; the output width follows. To use a logic block as
random logic, drive `cfg` with the function's table (entry `4*Y+X`) and tie `cin` to 0.
