# DBB subtractor: a full subtractor whose borrow reuses its difference

A conventional full subtractor computes `a - b - c` with two independent
pieces of logic: the difference `D = a ^ b ^ c`, and a borrow built from three
pairwise products, `B = ~a&b | b&c | ~a&c` (three ANDs feeding a three-input OR).
The difference-based-borrow (DBB) subtractor derives the borrow from the
difference that has already been computed:

    D = a ^ b ^ c
    B = (~a & c) | (b & D)

Behind the parity tree this leaves one inverter, two two-input ANDs and one
two-input OR. The idea is aimed at low-power, low-delay arithmetic, where the
shorter borrow logic matters in every bit of a multi-bit subtractor.

This repository gives that cell as synthesizable SystemVerilog, and a
parameterised multi-bit subtractor built by chaining cells.

## Why the borrow equation is right

A borrow leaves the bit whenever `a - b - c < 0`. There are two ways that can
happen:

* **A borrow comes in and the minuend bit is 0** (`~a & c`). Then
  `0 - b - 1` is negative whatever `b` is.
* **The subtrahend bit is 1 and the difference bit is 1** (`b & D`). With
  `b = 1`, `D = ~(a ^ c)`, so it is 1 only for `a = c`:
  `a=0,c=0` gives `0-1-0 = -1`, and `a=1,c=1` gives `1-1-1 = -1`. The other
  two cases with `b = 1` (`a != c`) give 0 or are already covered by the first
  term (`a=0,c=1`).

| a | b | c | D | B |
|---|---|---|---|---|
| 0 | 0 | 0 | 0 | 0 |
| 0 | 0 | 1 | 1 | 1 |
| 0 | 1 | 0 | 1 | 1 |
| 0 | 1 | 1 | 0 | 1 |
| 1 | 0 | 0 | 1 | 0 |
| 1 | 0 | 1 | 0 | 0 |
| 1 | 1 | 0 | 0 | 0 |
| 1 | 1 | 1 | 1 | 1 |

The borrow column is identical to the conventional `~a&b | b&c | ~a&c`; the
cell testbench checks both forms against each other for all eight inputs.

Because `B` depends on `D`, the borrow path of a cell now runs through the
parity tree. In a ripple chain the borrow into a bit (`c`) reaches `B` through
the second XOR and one AND/OR level, or directly through `~a & c`.

## Multi-bit subtractor

`dbb_subtractor` places `WIDTH` cells side by side. Bit `i` subtracts `b[i]`
and the borrow from bit `i-1` from `a[i]`; bit 0 takes the external borrow
`bin`, and the borrow out of the top bit is `bout`:

    diff = (a - b - bin) mod 2**WIDTH        (unsigned operands)
    bout = 1  exactly when  a < b + bin

The worst-case path is a borrow rippling through all `WIDTH` cells, as in
`a == b` with `bin = 1`, which gives `diff` all ones and `bout = 1`.

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH`   | 4       | operand width in bits; the design was evaluated at 1, 4 and 8 bits, and 4 is the size that was laid out |

An 8-bit subtractor is `WIDTH = 8`, or two default instances with the low
instance's `bout` driving the high instance's `bin`.

## Where this RTL makes its own choices

The cell equations are the DBB design's. The following are choices made here
where the design leaves the point open:

* **Ripple-borrow chaining.** The design is evaluated at several bit sizes
  without saying how the cells are joined. A ripple chain is used, the plainest
  arrangement of full subtractor cells.
* **Borrow in and borrow out ports.** `bin` and `bout` are exposed so that the
  full result `a - b - bin` is visible and instances can be chained.
* **Unsigned operands.** `bout` is the unsigned borrow. For two's-complement
  operands `diff` is still the correct difference; overflow detection would be
  the XOR of the borrows into and out of the top cell, which is not brought out.
* **Purely combinational.** There is no clock, register or reset.

What the RTL does not carry: the DBB design is argued for by its transistor-level
delay and power at 0.12 µm. Those depend on the cell's circuit and layout, not on
its logic function, and a synthesis tool is free to restructure the equations.
To keep the DBB structure in silicon, the cell must be kept as a hierarchy
boundary (or mapped by hand) rather than flattened.

## Files

| file | contents |
|------|----------|
| `rtl/dbb_full_subtractor.sv` | one-bit DBB cell: `a`, `b`, `c` in; `d`, `bout` out |
| `rtl/dbb_subtractor.sv` | `WIDTH`-bit ripple-borrow subtractor; the top of the design |
| `tb/tb_dbb_full_subtractor.sv` | exhaustive test of the cell against integer arithmetic and the conventional borrow |
| `tb/tb_dbb_subtractor.sv` | exhaustive test of the subtractor at its default width; also counts borrow-out, no-borrow, borrow-in and full-ripple cases and fails if one never happens |
| `tb/tb_dbb_widths.sv` | exhaustive tests at 1, 4 and 8 bits (the 8-bit run is 131072 vectors) |

Every testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`; a time-based watchdog ends it with a failure if it ever hangs.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module tb_dbb_subtractor tb/tb_dbb_subtractor.sv -o sim
    ./obj_dir/sim

Replace `tb_dbb_subtractor` with `tb_dbb_full_subtractor` or `tb_dbb_widths`
to run the others. Lint the RTL alone with

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/dbb_subtractor.sv

If you change `WIDTH`'s default, change the local parameter `W` in
`tb/tb_dbb_subtractor.sv` to match; the testbench checks that they agree.
Exhaustive testing grows as `2**(2*WIDTH+1)`, so beyond about 12 bits switch
the loops to `$urandom` operands.
