# Binary square rooter from reversible gates

This is a purely combinational circuit. It takes the square root of an 8-bit
binary number using the digit-by-digit method. Every logic operation is a
*reversible* gate, meaning one whose outputs determine its inputs uniquely:

- the Saimur Rahman Gate (SRG) does the subtraction;
- a reversible multiplexer does the select;
- Feynman gates invert and copy signals.

The circuit is an array of identical one-bit cells. Each cell is a
**Reversible Controlled Subtract Multiplexer (RCSM)**: it subtracts, then
either passes the difference on or restores its input.

With the default size the radicand `p` is read as `N7N6N5N4.N3N2N1N0`, a
fixed-point number with four integer and four fraction bits. The root `u` is
`U3U2.U1U0`, truncated, and the remainder `r` is also produced. As integers:

    u = floor(sqrt(p))        r = p - u*u

Where the binary point sits is only a convention. For example:

| radicand            | root            |
|---------------------|-----------------|
| `1101.0000` (13)     | `11.10` (3.5)   |
| `0010.0011` (2.1875) | `01.01` (1.25)  |

## The algorithm: subtract and append 01

Split the radicand into pairs of bits, starting from the most significant.
Keep a partial remainder and the root bits found so far. Then, for each pair:

1. Bring the pair down behind the partial remainder. Call this the minuend `m`.
2. Form the trial subtrahend `t = {root so far, 0, 1}`. In arithmetic this is
   `4*root + 1`. For the first pair the root is empty and `t` is just `01`.
3. If `m - t` is zero or positive, the new root bit is 1 and the new remainder is `m - t`.
4. Otherwise the new root bit is 0 and the remainder stays `m`. The
   subtraction is thrown away; nothing is added back.

Step 4 is why the design needs no adder: a multiplexer picks either the
difference or the untouched minuend. This form only ever subtracts and
appends `01`. Worked for `p = 1101 0000`:

| row | m        | t        | m - t  | root bit | remainder |
|-----|----------|----------|--------|----------|-----------|
| 0   | `11`     | `01`     | `10`   | 1        | `10`      |
| 1   | `1001`   | `101`    | `100`  | 1        | `100`     |
| 2   | `10000`  | `1101`   | `11`   | 1        | `11`      |
| 3   | `1100`   | `11101`  | < 0    | 0        | `1100`    |

The result is root `1110` (`11.10`) and remainder `1100` (12). Check:
14² + 12 = 208 = `11010000`.

## The RCSM cell (`rcsm_cell`)

Each cell handles one bit position of one row. It has inputs `x` (minuend
bit), `y` (subtrahend bit), `bin` (borrow in) and `u` (the row's root bit).

- **Subtractor.** An SRG with its fourth, constant input tied to 0 works as a
  full subtractor:

      w5 = w1 ^ w3                      garbage
      w6 = w1 ^ w2                      garbage
      w7 = ~w1&w2 ^ ~w1&w3 ^ w2&w3      borrow out of  w1 - w2 - w3
      w8 = w1 ^ w2 ^ w3 ^ w4            difference (w4 = 0)

  Here `w1 = x`, `w2 = y` and `w3 = bin`. The gate maps its 16 input words
  onto 16 different output words, so it is reversible.
- **Select.** A reversible 2:1 multiplexer outputs the difference `w8` when
  `u = 1` and `x` when `u = 0`.

The borrow out `bout` does not depend on `u`, so there is no combinational
loop. Within a row, the borrow ripples upward first. The row's final borrow
then sets `u`, and only after that do the cell outputs settle.

Garbage outputs are the extra outputs a reversible gate needs so that it
loses no information. They are left open here: SRG `w5` and `w6`, and the
multiplexer's pass-through and swapped outputs.

## Rows and the array (`rcsm_row`, `binary_sqrt`)

Row `K` (`K = 0` at the top) is a chain of `K+3` RCSM cells:

- minuend `{rem_in, pair}`;
- subtrahend `{0, root_in[K-1:0], 0, 1}`;
- borrow into the least significant cell is 0.

A Feynman gate with a constant-1 target inverts the top borrow into the root
bit `u`. Reversible logic allows each signal to drive only one gate input.
So a chain of Feynman gates with constant-0 targets copies `u` once per cell.

The new remainder never exceeds twice the root. It therefore fits in `K+2`
bits, and the top cell's output is dropped. That cell's output is always 0
when it is selected, and lint reports it as an unused bit.

`binary_sqrt` stacks `N/2` rows, so the array is triangular. Row `k`:

- takes radicand bits `p[N-1-2k : N-2-2k]`;
- takes root bits `u[N/2-1 : N/2-k]` from the rows above;
- produces `u[N/2-1-k]`.

The last row's remainder is `r`. With `N = 8` the array has 4 rows and
3+4+5+6 = 18 cells.

## Interface and timing

| port | dir | width   | meaning                  |
|------|-----|---------|--------------------------|
| `p`  | in  | `N`     | radicand, MSB first      |
| `u`  | out | `N/2`   | root = floor(sqrt(p))    |
| `r`  | out | `N/2+1` | remainder p - u*u        |

Parameter `N` (default 8) must be even. There is no clock and no reset.
Each row adds one borrow ripple of `K+3` cells plus one multiplexer level,
and a row cannot start until the row above has settled. The worst-case path
therefore crosses every row. To pipeline the design, place registers between
rows.

## What is fixed and what was chosen

These parts follow the design as published:

- the subtract-and-append-01 algorithm with a multiplexer that restores the input;
- SRG equations and full-subtractor use with `w4 = 0`;
- one controlled subtract multiplexer per bit;
- a 4-row array for 8 bits;
- radicand and root formats, and port names `p`, `u`.

These are this implementation's own choices:

- **Reversible multiplexer.** A Fredkin-type controlled swap:
  `p = s`, `q = s ? b : a`, `r = s ? a : b`. The source names a reversible
  multiplexer for this job but does not give its equations.
- **Feynman gates.** Their job (root-bit inversion and fan-out copies) is
  this implementation's choice. The source only says Feynman gates are used.
- **Cell layout.** Each row is a uniform chain of `K+3` one-bit cells. The
  source draws each row as one leading block plus one further block per
  previous root bit. The internal split of those blocks is not reproduced;
  the arithmetic is the same.
- **Zero difference.** It counts as "positive" (root bit 1). This is
  required for exact squares, and for the `1101.0000 -> 11.10` example.
- **Remainder output.** `r` is brought out as a port.

Not built: the conventional irreversible-gate square rooter that the design is
compared against. No FPGA area, delay or power figures are reproduced.

## Files

RTL, bottom-up:

- `rtl/srg_gate.sv`: Saimur Rahman Gate
- `rtl/feynman_gate.sv`: Feynman gate
- `rtl/rev_mux.sv`: reversible 2:1 multiplexer
- `rtl/rcsm_cell.sv`: one-bit controlled subtract multiplexer
- `rtl/rcsm_row.sv`: one row of the array, one root bit
- `rtl/binary_sqrt.sv`: the top

Every module has a self-checking testbench, `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- The gate benches run all input combinations and also check that the gates are reversible.
- `rcsm_row_tb` runs rows 0-2 exhaustively over every input that can occur
  in the array, and row 3 on 500 random inputs.
- `binary_sqrt_tb` runs the top at its default size. It applies the two
  examples above, then all 256 radicands, comparing `u` and `r` with an
  integer square root. It counts, for every row, both outcomes (difference
  kept, input restored). A row that never shows one of them counts as a
  failure.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl --top-module binary_sqrt_tb tb/binary_sqrt_tb.sv
    ./obj_dir/Vbinary_sqrt_tb

Replace `binary_sqrt` with any other module name to run its testbench.
Verilator finds submodules through `-Irtl`.

Lint with `verilator --lint-only -Wall -Irtl rtl/binary_sqrt.sv`. It gives
two kinds of warning, both intended:

- empty pin connections, which are the gates' garbage outputs;
- one unused bit per row, which is the top cell's dropped output.

A wider radicand needs only `N`, e.g. `binary_sqrt #(.N(16))`. It gives an
8-bit root and a 9-bit remainder; the testbench's localparam `N` must be
changed to match.
