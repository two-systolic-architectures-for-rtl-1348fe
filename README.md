# Two systolic Montgomery multipliers

RSA spends nearly all of its time on modular multiplication, `A*B mod N`, with
1024-bit operands. Radix-2 Montgomery multiplication avoids the trial
division. It scans the multiplier `A` one bit per iteration:

    R = 0
    for i = 0 .. M-1:
        q_i = (R + a_i*B) mod 2           # quotient bit: makes the sum even
        R   = (R + a_i*B + q_i*N) / 2     # exact division by two
    # R = A*B*2^-M mod N, possibly plus N

In hardware, each iteration must know `q_i` in every bit position. A
broadcast wire across 1024 bits would set the clock period. A systolic array
avoids the broadcast: each bit cell passes `a_i` and `q_i` to its neighbour
through a register, so an iteration moves across the word one cell per clock.
Many iterations are in flight at once, each one a few cells behind the one
before it.

This repository holds two such arrays. Both are parameterised by the operand
width `M`, which defaults to 1024:

* **Double-layer** (`dl_*`). Each bit cell is split into two small cells, so
  the clock period is short. A new iteration enters every second clock. The
  idle clocks carry a second, independent multiplication.
* **Non-interlaced** (`ni_*`). Each cell handles two bits. A new iteration
  enters every clock, so a stream of multiplications runs with no idle clock
  at the array input.

`modmul_top` places both multipliers side by side. They share only the clock
and reset.

## Arithmetic conventions

* `N` must be odd and `B < N`. `A` may be any `M`-bit value.
* The result `R` is `A*B*2^-M mod N`, possibly plus `N`. It is always below
  `2N`, so it has `M+1` bits. Final reduction and conversion into and out of
  the Montgomery domain are left to the user.
* Each iteration adds the partial product `P_i = a_i*B + q_i*N` to
  `R_{i-1}`. Let `S = R_{i-1} + P_i`. Bit `k` of `R_i` is bit `k+1` of `S`.
  Bit 0 of `S`, written `(R_i)_-1`, is always zero, and both arrays assert
  this on every valid iteration.
* Operand bits at position `M` and above are zero. Because `R` needs bit
  `M`, the arrays have a few more cells than operand bits: `M+2` cells in the
  double-layer array and `(M+3)/2 + 1` cells in the non-interlaced one.

## Double-layer array (`dl_array`)

The sum for one bit splits into two full additions:

    upper cell:  (P_i)_j     + 2(CP_i)_j = a_i*b_j + q_i*n_j + (CP_i)_{j-1}
    lower cell:  (R_i)_{j-1} + 2(CR_i)_j = (R_{i-1})_j + (P_i)_j + (CR_i)_{j-1}

Cell `j` contains an upper cell (`dl_b_cell`, or `dl_a_cell` at `j = 0`) and
a lower cell (`dl_c_cell`). Every cell output is registered. For an
iteration that enters at clock `t`:

* the upper cell of bit `j` works at clock `t + j`;
* the lower cell of bit `j` works at clock `t + j + 1`;
* `(R_i)_0` comes from the lower cell of bit 1 at clock `t + 2`.

The next iteration needs `q_{i+1}`, which depends on `(R_i)_0`. Waiting for
that register would cost four clocks per iteration. Instead, the A-cell
computes the same value from the three operands that the bit-1 lower cell is
adding in that clock:

    (R_i)_0  = (R_{i-1})_1 xor (P_i)_1 xor (CR_i)_0
    q_{i+1}  = a_{i+1}*b_0 xor (R_i)_0
    (P_{i+1})_0 = a_{i+1}*b_0 xor q_{i+1}*n_0,   (CP_{i+1})_0 = a_{i+1}*b_0 and q_{i+1}*n_0

With this precomputation, iterations enter every second clock. The critical
path is one AND layer plus one full adder.

**The gap.** The other clock cannot be used by the same multiplication,
because of the division by two. Every register in the array is read exactly
one clock after it is written, so a second multiplication can run in the
free clocks with no extra storage. Slot 0 uses even clocks and slot 1 uses
odd clocks. Each cell receives `b_j` and `n_j` of both slots and selects by
the slot bit of the iteration it is working on.

## Non-interlaced array (`ni_array`)

Cell `j >= 1` forms two bits of `P` and two bits of `R` per clock:

    4(CP_i)_j     + 2(P_i)_2j   + (P_i)_2j-1 = 2(a_i b_2j + q_i n_2j) + a_i b_2j-1 + q_i n_2j-1 + (CP_i)_{j-1}
    4(CR_i)_{j-1} + 2(R_i)_2j-2 + (R_i)_2j-3 = 2(R_{i-1})_2j-1 + 2(P_i)_2j-1
                                               + (R_{i-1})_2j-2 + (P_i)_2j-2 + (CR_i)_{j-2}

Cell `j` works on iteration `i` at clock `t_i + j`, with `t_{i+1} = t_i + 1`.
Cell `j+1` is therefore one iteration behind cell `j` in the same clock.

The key point is the input `(R_{i-1})_2j-1`. It is the *low* R bit that
cell `j+1` computes **in the same clock**, and it reaches cell `j` with no
register between them (`r_lo_out -> r_nb_in`). This does not create a long
ripple path:

* The low bit of a cell depends only on registered values: its own previous
  high R bit, `P_2j-2` and `CR` from cell `j-1`. It is ready early in the
  clock.
* Only the high bit uses the neighbour's low bit.

So any path crosses at most two neighbouring cells. All other values between
cells are registered.

The three cell types are:

* **D-cell** (`ni_d_cell`, cell 0) performs the quotient precomputation, like
  the A-cell.
* **E-cell** (`ni_e_cell`, cell 1) is an F-cell that also gives the D-cell
  the three operands of its bit-0/bit-1 addition: `(R_{i-2})_1`, `(P_{i-1})_1`
  and the bit-0 carry. The E-cell's low output is `(R_i)_-1`, which is always
  zero.
* **F-cell** (`ni_f_cell`, cells 2 and up) is the general cell. It is written
  as two ripple full-adder pairs, and synthesis is left to optimise them.

## Control: tags, slots and result capture

These parts are this design's own. The architecture defines the cells and
their schedule, not the control.

**Tags.** Each `a_i` travels with a tag `tag_t {valid, first, last, slot}`
from `mm_pkg`:

* `valid` marks a real iteration. Idle clocks carry zeros, and the R
  registers hold their value.
* `first` marks iteration 0. The cells then treat `R_{-1}` as zero, so no
  clearing pass is needed between jobs.
* `last` tells the controller that the R bits this cell just wrote are final.
* `slot` selects the operand set.

**Result capture.** Result bits become final at different times, cell by
cell, as the last iteration passes. The controllers copy each cell's bits
into `result[slot]` at that moment. The job is done when the top cell has
finished.

**Handshake.** `dl_modmul` and `ni_modmul` have the same interface:

| port | dir | meaning |
|---|---|---|
| `start`, `slot` | in | one-clock pulse: load `a`, `b`, `n` into `slot` if `ready[slot]` (a start to a busy slot is ignored) |
| `a`, `b`, `n` | in | operands, `M` bits each |
| `ready[1:0]` | out | slot free |
| `done[1:0]` | out | one-clock pulse when a slot's job has finished |
| `result[1:0]` | out | `M+1` bits per slot, valid from `done` until that slot's next job finishes |

**Timing,** counted from the clock edge that samples `start` to the edge
after which `done` is high:

| multiplier | issue | start to done (M = 1024) |
|---|---|---|
| double-layer | one `a_i` per 2 clocks; 2M clocks per job per slot; two slots interleaved | 3M+2, plus 1 if the start misses the slot's clock parity (3074 or 3075) |
| non-interlaced | one `a_i` per clock; M clocks per job; the next job in the other slot issues on the very next clock | M + (M+3)/2 + 2 when the array input is free (1539) |

Both start-to-done times include the clocks the last iteration needs to
cross the array. A slot can take a new job only after its previous job is
done, because the cells still read that slot's `B` and `N` until then.

## Files

`rtl/` contains one module or package per file:

* `mm_pkg`: tag type, full adder, pair adder and the quotient precomputation
  function;
* `dl_a_cell`, `dl_b_cell`, `dl_c_cell`, `dl_array`, `dl_modmul`;
* `ni_d_cell`, `ni_e_cell`, `ni_f_cell`, `ni_array`, `ni_modmul`;
* `modmul_top`.

`tb/` contains one self-checking testbench per module, `tb_<module>.sv`.
Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* The cell testbenches drive random inputs and compare against integer sums
  of the cell equations.
* The array and controller testbenches use small widths (15, 16 and 30
  bits). They compare every result exactly with the bit-serial recurrence
  above, and they check the start-to-done times in the table.
* `tb_modmul_top` runs both multipliers at the default `M = 1024`. It uses
  random and corner-case operands and checks `R < 2N` and
  `R*2^M mod N = A*B mod N` with wide arithmetic. It also counts that each
  mechanism occurred: interleaved slots, alternate-clock issue, back-to-back
  jobs, and use of slot 1.

`tb_modexp_1024` runs modular exponentiation at `M = 1024`, with the
testbench acting as the exponentiation control. It uses right-to-left
square-and-multiply in the Montgomery domain. For each exponent bit, the
square and the multiply both use the same old value, so they are independent
and go into the two slots together. The testbench checks the final value
against wide-integer `x^e mod N`. Measured cost per exponent bit:

| exponent | double-layer | non-interlaced |
|---|---|---|
| 65537 (17 bits) | 3257 clocks | 1811 clocks |
| random 40 bits | 3153 clocks | 1886 clocks |

Each dependent multiplication waits for the previous one to leave the whole
array. Start-to-done time, not issue rate, therefore sets the pace. Control
that fed result bits into the next multiplication as they become final could
overlap dependent jobs. That control is not part of this RTL.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal rtl/mm_pkg.sv rtl/*.sv \
        tb/tb_modmul_top.sv --top-module tb_modmul_top -Mdir obj
    ./obj/Vtb_modmul_top

The full-size run builds in about a minute and simulates in under a second.
To change the width, set `M` on `modmul_top`, `dl_modmul` or `ni_modmul`.
Widths 15, 16, 30 and 1024 are exercised by the testbenches; odd widths are
handled by the zero operand bits at the top of the non-interlaced array.

## How far to trust it, and where it departs from the architecture

* **Verified by simulation only.** The cell equations, the schedules (two
  clocks per iteration, and one clock per iteration) and the precomputation
  are checked against independent integer models at widths 15, 16, 30 and
  1024. No timing analysis was done. The gate-level optimisation of the
  paired cell, which is what makes the non-interlaced clock short, is not
  reproduced: the F-cell is plain ripple logic.
* **Own additions:**
  * the control tag;
  * two operand sets per cell, used for the interleaved job in the
    double-layer array and for back-to-back jobs in the non-interlaced array;
  * the start/ready/done controllers;
  * the registered copy `res_lo` of each F-cell's low R bit, used for
    read-out;
  * synchronous active-low reset;
  * one or two extra cells at the top for bit `M` of `R`.
* **Only the one-dimensional arrays are built.** The two-dimensional forms
  (one row of cells per iteration, M rows) are the same cells before
  projection and are not provided as RTL.
* **Critical path.** The double-layer cells have one AND layer plus one full
  adder between registers. The non-interlaced pair cell, written as ripple
  logic, has an AND layer plus two full adders. One such path runs through
  the low P adder into the high R adder, and another through the two P
  adders. The neighbour's low R bit, which comes from one full adder fed by
  registers, arrives at the high R adder in parallel. The optimised pair cell
  the architecture aims for, about one AND/OR plus three XOR delays, is left
  to synthesis.
* **Flip-flops.** The double-layer array has about 10 flip-flops per bit and
  the non-interlaced array about 5.5 (10260 and 5645 at `M = 1024`). So
  pairing roughly halves the register count, as intended. The datapath
  alone needs 6 and 3.5 per bit. The rest hold copies of the control tag.
* **Not included:** modular exponentiation. This means the exponent
  scanning, the register file for RSA constants and the Montgomery-domain
  conversions around the multiplier core.
* **Synthesis.** Everything is synthesizable. Yosys coarse synthesis of the
  1024-bit top gives about 74k word-level cells and 32k flip-flops. The two
  multipliers hold both operand slots, which is 6 x 1024 operand bits each,
  plus the result registers.
