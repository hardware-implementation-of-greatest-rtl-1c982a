# A GCD calculator from a subtractor, a comparator and multiplexers

This is a small sequential circuit that computes the greatest common divisor
of two unsigned binary numbers with Euclid's algorithm. Euclid divides with
remainder; the circuit replaces the division by repeated subtraction, so its
only arithmetic unit is a ripple-borrow subtractor. Beyond that it needs two
magnitude comparators (A < B), seven 2-to-1 multiplexers, three registers and
a few AND gates and inverters. The default width is 4 bits. Every block takes
a `WIDTH` parameter, so the same structure works at any width.

## The algorithm, one step per clock

The circuit keeps two numbers, A' in REG A and B' in REG B, with A' >= B'.
The subtractor always forms SUB = A' - B'. On every rising clock edge in
generate mode, exactly one of three things happens:

| condition          | name     | REG A  | REG B  | RESULT |
|--------------------|----------|--------|--------|--------|
| SUB >= B'          | subtract | SUB    | B'     | 0      |
| 0 < SUB < B'       | swap     | B'     | SUB    | 0      |
| SUB = 0            | done     | A'     | B'     | B'     |

A run of subtract steps takes A' down to A' mod B', the remainder of Euclid's
division. The swap step then makes the old divisor the new dividend and the
remainder the new divisor. The subtraction reaches 0 when A' = B'. B' is then
the GCD. Both registers then hold their values, so RESULT stays constant.

A' >= B' is true after loading and every step keeps it true, so the
subtractor never borrows. An assertion in `gcd_top` checks this.

Worked example, A = 15, B = 12 (4 bits):

| edge in generate mode | A' | B' | SUB | step     | RESULT after edge |
|-----------------------|----|----|-----|----------|-------------------|
| (loaded)              | 15 | 12 | 3   | —        | —                 |
| 1                     | 12 | 3  | 9   | swap     | 0                 |
| 2                     | 9  | 3  | 6   | subtract | 0                 |
| 3                     | 6  | 3  | 3   | subtract | 0                 |
| 4                     | 3  | 3  | 0   | subtract | 0                 |
| 5                     | 3  | 3  | 0   | done     | 3                 |

In each row, A' and B' are the register contents after that edge, and SUB is
formed from them.

## Operating the circuit

Ports of `gcd_top`:

| port             | dir | width | meaning                                          |
|------------------|-----|-------|--------------------------------------------------|
| `clk`            | in  | 1     | clock pulse; everything happens on rising edges  |
| `reset_generate` | in  | 1     | 0 = input mode, 1 = generate mode                |
| `a`, `b`         | in  | WIDTH | the two operands, unsigned                       |
| `result`         | out | WIDTH | 0 while computing, then the GCD                  |

1. Set `reset_generate = 0` and apply `a` and `b`. On each rising edge in
   this mode, REG A loads max(a, b) and REG B loads min(a, b). One edge is
   enough.
2. Set `reset_generate = 1`. The circuit now does one step per edge.
3. Wait for `result` to turn non-zero. That value is the GCD, and it stays
   until the next load.

Latency: call k the number of subtract and swap steps the operands need.
RESULT becomes valid on the (k+1)-th rising edge after the switch to
generate mode. The worst case is one operand equal to 1: the larger
operand is counted down one at a time. For (2^WIDTH − 1, 1) this takes
2^WIDTH − 1 clocks. That is 15 clocks at 4 bits and 255 at 8 bits.
Example counts: GCD(15, 12) = 3 in 5 clocks; at 8 bits, GCD(144, 136) = 8 in
18 clocks and GCD(18, 12) = 6 in 3 clocks.

Details to be aware of:

- **No register reset.** The flip-flops have no reset or enable. Returning to
  input mode is the only reset, and it reloads REG A and REG B. RESULT is
  written on every edge from `B' AND (SUB = 0)`. So it shows the previous
  run's value until the first edge after the new operands are in the
  registers, and only after that does it read 0. Do not take `result != 0`
  as "done" on the loading edge itself.
- **Equal operands.** If a = b, SUB is already 0 after loading. RESULT
  takes the value one edge later. This happens even if the circuit is still
  in input mode.
- **Zero operands.** With both operands 0, RESULT is 0. With exactly one
  operand 0, B' = 0 and SUB = A' never reaches 0, so RESULT stays 0, even
  though gcd(a, 0) = a. The algorithm assumes non-zero operands. If zero
  operands are possible, catch them outside the circuit.
- **Unsigned only.** Negative numbers are not supported. To handle them,
  feed in their magnitudes.

## Datapath

Block names follow the original schematic:

```
 a,b ─► A<B? ─┬─► 2x1 MUX ─► max ─┐                    ┌─► COMB A ─► REG A ─┐
              └─► 2x1 MUX ─► min ─┼────────────────────┼─► COMB B ─► REG B ─┤
                                  │  reset_generate ───┘ (select)           │
                                  │                                         │
   REG A, REG B ─► SUBTRACTOR ─► SUB ─► A<B? (SUB < B') ─► control          │
                                                 │   sub_zero, swap,        │
                                                 │   result_d ─► RESULT     │
   next A' = swap ? B'  : (SUB < B' ? A' : SUB)   (two 2x1 MUXes)  ◄────────┘
   next B' = swap ? SUB : B'                      (one 2x1 MUX)
```

- **Input stage.** `u_cmp_in` and the muxes `u_mux_in_max`/`u_mux_in_min`
  sort the operands. When a < b they are swapped, so REG A starts with the
  larger one.
- **Step logic.** `u_sub` forms SUB and `u_cmp_sub` tests SUB < B'. From
  these, `u_ctrl` makes three signals: `sub_zero` (an AND of the inverted
  SUB bits), `swap = (SUB < B') AND NOT sub_zero`, and the RESULT input
  `B' AND sub_zero`.
- **Feedback muxes.** `u_mux_a_step` keeps A' when SUB < B' and takes SUB
  otherwise. `u_mux_a_swap` replaces that with B' on a swap. `u_mux_b_swap`
  loads SUB into REG B on a swap and keeps B' otherwise. In the done state,
  SUB = 0 < B', so the first mux keeps A' and both registers hold.
- **Mode muxes** (`u_comb_a`, `u_comb_b`). They pass the sorted operands
  when `reset_generate = 0` and the feedback when it is 1.

## Building blocks

| module                | what it is                                                          |
|-----------------------|---------------------------------------------------------------------|
| `gcd_pkg`             | default width `GCD_WIDTH = 4`, enum `gcd_mode_e` for RESET/GENERATE |
| `gcd_register`        | D flip-flops on a common clock, load every edge, no reset           |
| `gcd_mux2`            | per bit `(a & ~s) \| (b & s)`; s = 0 selects a, s = 1 selects b     |
| `gcd_comparator`      | A < B from per-bit terms `~a[i] & b[i]`, qualified by XNOR equality of all higher bits, ORed together |
| `gcd_full_subtractor` | d = a ^ b ^ bin, bout = ~a&b \| ~a&bin \| b&bin                     |
| `gcd_subtractor`      | ripple chain of full subtractors, borrow-in of bit 0 = 0, borrow out|
| `gcd_control`         | SUB = 0 detection, swap condition, RESULT gating                    |
| `gcd_top`             | the whole calculator                                                |

All blocks are purely combinational except the registers. Every module has
one parameter, `WIDTH`, which defaults to 4.

## What follows the original design and what is interpretation

These parts are taken from the original design: the subtraction form of
Euclid's algorithm, the operand ordering at load, the mode input and its
encoding, the 4-bit default width, and the list of components with their
gate structures. That list is a register of D flip-flops, an AND-OR
multiplexer with a select inverter, a comparator built from inverters,
XNORs, ANDs and an OR, a full-subtractor chain with its first borrow
grounded, and ANDs and inverters for the conditions. The number of each
component in `gcd_top` also matches the original schematic.

These parts are interpretations:

- The exact drive of each multiplexer select. It is derived from the
  algorithm's steps.
- Gating RESULT with SUB = 0. The original schematic shows four AND gates in
  front of RESULT.
- Rising-edge clocking.
- Treating a return to input mode as the reset.

The behaviour with zero operands and the RESULT value right after a reload
follow from this structure. No original specification states them.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

- `tb_gcd_register`, `tb_gcd_mux2`, `tb_gcd_comparator`, `tb_gcd_subtractor`
  and `tb_gcd_control` test each block exhaustively at 4 bits. The
  register, mux, comparator and subtractor benches also run random vectors
  at a wider size.
- `tb_gcd_top` runs the calculator at its default width on all 256 operand
  pairs plus the example (12, 15). Edge by edge, it checks that RESULT
  stays 0 until the expected clock, then equals the GCD and holds. It also
  counts load-time swaps, subtract steps, swap steps, done states and
  reloads, and fails if any of them never occurs.
- `tb_gcd_top_wide` builds the calculator at 8 bits. It runs (136, 144),
  (12, 18), (9, 15), the worst case (255, 1) and 3000 random pairs, and
  checks both the values and the clock counts.

The expected GCDs come from the remainder form of Euclid's algorithm. The
expected clock counts come from an integer model of the step sequence.

To run a bench with Verilator, for example the full one:

```
verilator --binary --timing --assert -y rtl rtl/gcd_pkg.sv tb/tb_gcd_top.sv \
          --top-module tb_gcd_top -o sim
./obj_dir/sim
```

## Changing the width

Set `WIDTH` on `gcd_top`, or change `gcd_pkg::GCD_WIDTH` to change every
default at once. Two costs grow with the width. The subtractor and
comparator are ripple structures, so their delay grows linearly. The
worst-case run, 2^WIDTH − 1 clocks, grows exponentially, because
subtraction replaces division.
