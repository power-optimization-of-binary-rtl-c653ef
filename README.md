# Six ways to build a 16-bit signed binary divider

Digit-recurrence division finds one quotient bit per step: shift the partial
remainder left, compare it with the divisor, keep or undo the subtraction
(restoring) or choose between adding and subtracting the divisor
(non-restoring). The recurrence is the same whatever the hardware, but it can be
mapped onto logic in very different ways. That choice decides how many
flip-flops toggle per division, and so how much dynamic power the divider
burns.

This RTL holds six dividers. Each pairs one of two recurrences with one of three
ways of building the loop:

| | restoring | non-restoring |
|---|---|---|
| **block-diagram datapath**: a counter, a load/shift mux, and an A register and a Q register clocked every cycle | `rdiv_blocks`, 34 cycles | `nrdiv_blocks`, 35 cycles |
| **external loop**: one iteration per clock edge, the clock standing for a pulse generator that steps the loop | `rdiv_external`, 32 cycles | `nrdiv_external`, 32 cycles |
| **internal loop**: all iterations unrolled into one combinational array with no flip-flops | `rdiv_internal`, combinational | `nrdiv_internal`, combinational |

The organisations come from the publication "Power optimization of binary
division based on FPGA". It built all six on a Spartan-3A FPGA and found that
the two combinational versions use far less dynamic power, despite having many
more LUTs. `nrdiv_internal` was the lowest of all. The four sequential versions
use fewer LUTs, but about 70 to 85 flip-flops switch on every cycle.
`div_top` places all six side by side so they can be compared under the same
stimulus.

## Number format

Every divider takes a signed two's-complement dividend `dvd` and divisor `dvr`,
each `N` = 16 bits wide. The result `y` is the signed quotient in fixed point
with N fraction bits:

    y = sign * floor(|dvd| * 2^16 / |dvr|)      (as a 2^-16 multiple)

For example, -10 / 3 gives 0xFFFC_AAAB = -218453 / 65536 = -3.33333.

- **Sign.** The dividers divide magnitudes. The sign is the xor of the two
  operand MSBs, and the quotient is two's-complement negated when that xor is 1.
  The result is therefore truncated toward zero.
- **Output width.** The two block-diagram designs have a 33-bit output (17.16).
  The other four have a 32-bit output (16.16). So the one result that needs 17
  integer bits, -32768 / -1 = +32768, appears correctly only on the 33-bit
  outputs. On the 32-bit outputs it wraps to -32768.0.
- **Division by zero.** It is not detected. The output is whatever the
  recurrence produces.
- **Remainder.** None of the dividers outputs one.

## The recurrences

Both recurrences keep a register `A = {A1, A2}` and a register `Q`:

- `A1` is the partial remainder, which starts at 0.
- `A2` holds the dividend magnitude bits not yet consumed, and then zeros.
- `Q` collects the quotient bits.

There are 2N = 32 iterations: 16 for the integer bits, then 16 more that shift
in zeros and produce the fraction bits. `B` is the divisor magnitude.

**Restoring** (`rdiv_*`). Each iteration does three things:

1. Shift A and Q left.
2. Form `T = A1 - B`.
3. Set `Q[0] = ~sign(T)`. If that bit is 1, `A1 <= T`; otherwise A1 keeps its
   value, which "restores" it.

The quotient bits are exact.

**Non-restoring** (`nrdiv_*`). The partial remainder may go negative and is
never restored. Each iteration:

1. Shifts A and Q left.
2. Takes the digit from the sign `S` of the shifted remainder:
   `Q[0] = ~(S ^ B_sign)`. `B_sign` is the sign bit of the divisor magnitude,
   so it is always 0 here.
3. Subtracts B from A1 when the digit is 1, or adds B when it is 0.

Each digit equals the true quotient bit of the previous step. So after the loop,
the external- and internal-loop versions shift Q once more with a 1 entering the
LSB, which drops the always-1 first digit. There is no correction step for a
negative final remainder. As a result, **the magnitude from `nrdiv_external` and
`nrdiv_internal` is the truncated quotient with its LSB forced to 1**: exact
when the true LSB is 1, and 2^-16 too large when it is 0. This is the known
small error of non-restoring division without the final correction, and it is
kept deliberately. The testbenches check for exactly this behaviour.
`nrdiv_blocks` does not have this error (see below).

## The three organisations

### Block-diagram datapath (`rdiv_blocks`, `nrdiv_blocks`)

These follow a block-level datapath:

- A counter drives a "counter != 0" comparator, which selects the load path or
  the shift path of a mux in front of register A.
- The restoring version has one subtractor. Its restore mux selects `{T, A2}`
  or `A`.
- The non-restoring version has an adder and a subtractor in parallel, with a
  mux selected by the digit.
- A left shift feeds register A back.
- The digit shifts into Q.
- An xor of the operand MSBs and a negate/mux stage form the signed output.

The subtle point: **the add or subtract happens before the shift**, on the value
in register A.

- **Restoring.** The first comparison is 0 against B, so the first bit is always
  0 and is not a quotient bit. It takes 2N+1 = 33 iterations before Q holds the
  32 quotient bits, giving 1 load cycle + 33 = **34 cycles**.
- **Non-restoring.** The first step computes 0 - B. The next step adds B back
  to the shifted value (-2B + a) and lands on the correct first partial
  remainder. From then on each digit equals the true quotient bit of two steps
  earlier. The exact quotient therefore sits in Q after 2N+2 = 34 iterations,
  giving 1 + 34 = **35 cycles**, and no LSB forcing is needed.

These two designs register only A, Q and the counter. The divisor magnitude and
the sign come straight from the `dvd`/`dvr` inputs. **The operands must be held
stable from `start` until `y` has been read.** An assertion (`operands_held`)
checks this while `busy` is high.

### External loop (`rdiv_external`, `nrdiv_external`)

There is one iteration per clock edge, and the first iteration runs on the
`start` edge itself. `done` therefore pulses **32** edges after `start`,
counting the start edge. A, Q, B and the result sign are registered at
`start`, so the operands need only be valid on that edge. `y` is formed
combinationally from Q and the stored sign. It stays valid until the next
`start`.

### Internal loop (`rdiv_internal`, `nrdiv_internal`)

The same iteration is written as a `for` loop in an `always_comb` block, so
synthesis unrolls it into 32 cascaded add/subtract stages. There is no clock
and no state. `y` follows `dvd`/`dvr` after the ripple delay through 32
17-bit adders. The block is meant to sit in a path with a slow clock, or to be
pipelined by the user.

## Interfaces and timing

Sequential dividers:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous active-low reset; clears all registers |
| `start` | in | 1 | request, sampled on a rising edge while idle; ignored while `busy` |
| `dvd`, `dvr` | in | N | signed operands |
| `busy` | out | 1 | high from the edge that samples `start` until the edge that raises `done` |
| `done` | out | 1 | one-cycle pulse: `y` is valid |
| `y` | out | 2N+1 (`*_blocks`) or 2N | signed quotient, N fraction bits |

Latency, in rising edges from the edge that samples `start` to the edge after
which `done` is high:

| module | latency |
|---|---|
| `rdiv_blocks` | 34 |
| `nrdiv_blocks` | 35 |
| `rdiv_external` | 32 |
| `nrdiv_external` | 32 |

A new `start` may be given on the edge after `done`.

Combinational dividers have only `dvd`, `dvr` → `y` (2N bits).

`div_top` brings out every divider's ports with a prefix `p1_` … `p6_`:

| prefix | module |
|---|---|
| `p1_` | `rdiv_blocks` |
| `p2_` | `rdiv_external` |
| `p3_` | `rdiv_internal` |
| `p4_` | `nrdiv_blocks` |
| `p5_` | `nrdiv_external` |
| `p6_` | `nrdiv_internal` |

Only `clk` and `rst_n` are shared.

All modules have one parameter, `N` (operand width, default 16). The quotient
always has 2N bits, N of them fraction bits.

## Where this RTL departs from, or adds to, the source description

- **Iteration count.** The source gives two counts for the external-loop
  designs: 64 cycles (and a "C < 64" loop test) for one, and 32 for the other.
  This RTL uses 2N = 32 for both. With 64 iterations, the 32-bit Q would have
  shifted out every integer bit. The combinational versions use the same count
  of 32.
- **Partial-remainder width.** The source keeps the partial remainder at 16
  bits. Here the remainder arithmetic has one extra sign bit (17 bits), so that
  every 16-bit operand pair divides correctly. This includes divisor
  magnitudes up to 32768, where a 16-bit non-restoring remainder would overflow.
- **Handshake and reset.** `start`, `busy`, `done` and `rst_n` are additions.
  The source designs are free-running simulation models with only clock,
  operands and result.
- **Counter width.** The block-diagram counter is as wide as 34 or 35 cycles
  need, so 6 bits. The source diagram labels it 5 bits, which cannot reach
  those counts.
- **Stored sign.** The external-loop designs store the result sign at `start`.
  The block-diagram designs keep the source's unregistered sign and divisor,
  and therefore require held operands.
- **Non-restoring forced LSB.** The 1-forcing final shift of the external- and
  internal-loop non-restoring designs is implemented as described, error
  included. A final correction (subtract 1 LSB when the last remainder is
  negative) would make them exact. It is not part of the described design.
- **Power.** The power figures that motivate the comparison belong to the
  source's FPGA implementation and are not reproduced by anything here.

## Verification

Each divider has a self-checking testbench in `tb/` (`<module>_tb.sv`). Each one:

- applies directed cases, including -10 / 3, all four sign combinations,
  -32768 and 32767 as either operand, and quotients whose LSB is 0;
- applies thousands of random operand pairs, some with small divisors and some
  with small dividends;
- compares `y` with a 64-bit integer reference computed in the testbench, with
  the LSB forced to 1 for `nrdiv_external` and `nrdiv_internal`;
- for the sequential dividers, also checks the exact latency, that `busy` stays
  high while a division runs, and that `y` holds after `done`;
- for the external-loop dividers, also checks that changing the operands after
  `start` has no effect.

`div_top_tb` drives all six dividers with the same 1007 operand pairs and checks
all six results and the four latencies. It also counts each mechanism and
requires each to happen at least once:

- load-path cycles;
- restore and no-restore iterations;
- add and subtract iterations;
- negated results;
- negative operands;
- results changed by the forced LSB;
- `start` requests ignored while busy.

It runs `div_top` at its default parameters.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`, and each
has a watchdog.

To run one with Verilator 5 (from the directory that holds `rtl/` and `tb/`):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module div_top_tb rtl/div_pkg.sv tb/div_top_tb.sv
    ./obj_dir/Vdiv_top_tb

Replace `div_top_tb` with any other testbench name to run that block alone.
Every testbench finishes in well under a second of simulation time.

## Files

- `rtl/div_pkg.sv`: shared default width `DIV_N = 16`.
- `rtl/rdiv_blocks.sv`, `rtl/nrdiv_blocks.sv`: block-diagram dividers.
- `rtl/rdiv_external.sv`, `rtl/nrdiv_external.sv`: one iteration per clock.
- `rtl/rdiv_internal.sv`, `rtl/nrdiv_internal.sv`: combinational dividers.
- `rtl/div_top.sv`: all six side by side.
- `tb/*_tb.sv`: one testbench per module, plus `div_top_tb`.
