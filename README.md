# Digit-serial FIR filter with carry-free digit adders

This is an L-tap FIR filter, y(n) = Σ h_k·x(n−k), that processes its input
N bits per clock cycle. Bit-serial filters are small but slow, and
bit-parallel filters are fast but large. A digit-serial filter sits between
them: a W-bit sample enters as W/N digits, least significant first, and every
arithmetic block handles one digit per cycle.

The structure is meant for skew-tolerant domino logic, which uses N
overlapping clock phases. In that circuit style each of the N bit-slices of a
digit is evaluated in its own phase, so a whole digit is done in one full
clock cycle. In this RTL the N phases of a cycle become one combinational path
between ordinary flip-flops. The throughput is the same: one digit per cycle.

Default configuration: L = 8 taps, W = 8-bit samples and coefficients,
N = 4-bit digits. The filter produces a 19-bit result (2W + 3) every 4 cycles.
N = 2 is also supported and tested. It gives 8-cycle frames and the same
19-bit result.

## Frames and number format

Everything runs in **frames** of F = 2W/N cycles, one frame per sample.

* In cycles 0 … W/N−1 the filter takes the sample's digits on `x_digit`,
  least significant first. The last of these digits holds the sign bit.
* In cycles W/N … F−1 the multipliers are fed zero digits, so the upper half
  of each 2W-bit product can drain out. Whatever is on `x_digit` in these
  cycles is ignored.
* Digit t of output sample n leaves in the same cycle as digit t of input
  sample n. The whole path from input through multiplier, adder and
  accumulator lies inside one cycle. By the end of the sample's own frame,
  all of y(n) has come out.

A free-running counter sets the frame position, starting at digit 0 after
reset. `frame_start` marks digit 0 and `frame_digit` gives the position, so a
source can line its data up with the frames.

How to read the output:

| cycle of frame | meaning of the outputs |
|---|---|
| 0 … F−2 | `y_digit` is an unsigned digit of y; ignore `carry_out` |
| F−1 (`y_last`=1) | `{carry_out, y_digit}` is a signed (N+3)-bit number: the top of y |

y = Σ_{t<F−1} y_digit_t·2^{Nt} + signed({carry_out, y_digit})_{F−1}·2^{N(F−1)}

For the default sizes: three unsigned 4-bit digits plus a signed 7-bit top
part, 3·4 + 7 = 19 bits. The largest output magnitude, 8·128·128 = 2^17,
fits with room to spare.

## The datapath

```
x_digit ──► zero-pad ──┬──────────┬─── … ──────┬──────────┐
                       ▼          ▼            ▼          ▼
                     MUL h7     MUL h6       MUL h1     MUL h0
                       │          │            │          │
                       └─►[F regs]─►(+)─►[F regs]─► … ─►(+)─►[F regs]─►(+)─► ACC ─► y_digit, carry_out
                                                                          ▲   │
                                                                          └─D─┘ carry
```

The filter is in inverted (transposed) form. Each product is added to the
running sum coming from the tap on its left. Between two adders the sum is
delayed by one sample, and one sample here means a chain of F registers.

### Adders that never pass a carry on

This is the central trick of the design. The digit adders (`ds_add`) do
**not** carry from one cycle into the next. Instead, each adder outputs a
digit one bit wider than its inputs, which holds the full sum. After j
products have been added, the digit is N + ⌈log2 j⌉ bits wide. For 8 taps the
widths along the chain are N, N+1, N+2, N+2, N+3, N+3, N+3, N+3. So the chain
never needs a carry path from one cycle to the next, and its critical path
stays short.

The price is that the stream at the end of the chain is *redundant*: its
digits overlap in weight. All digits except the last one of a frame are
unsigned. The last digit is two's complement. Control-3 (`sign_ext`) is high
in the last cycle. It makes the adders sign-extend their operands in that
cycle instead of zero-extending them.

### The accumulator resolves the overlap

The accumulator (`ds_acc`) adds each (N+3)-bit chain digit to the 3 carry
bits it kept from the previous cycle. The low N bits leave as `y_digit`, and
the high 3 bits are stored for the next cycle. In digit 0 the stored carry
belongs to the previous sample, so Control-4 (`acc_cin`) is low and the
carry-in is zero.

The widths always fit:
* For unsigned digits, L(2^N−1) + (2^3−1) < 2^(N+3).
* In the last digit the sum is the signed top of y, and that is known to fit.

### The multiplier

`ds_mul` multiplies a parallel W-bit coefficient A by the digit-serial sample
B. It has N carry-save rows, one per bit of a digit. Rows 0 … N−2 are
`ds_mul_block_a` (Block-A); the last row is `ds_mul_block_b` (Block-B).

Each row does three things:
1. It adds the partial product b_i·A to the incoming sum and carry vectors,
   with one full adder per bit.
2. It emits the lowest sum bit as a finished product bit.
3. It passes the sum vector, shifted right by one, and the carry vector on to
   the next row.

At the end of the cycle the last row's vectors are stored. On the next cycle
they are fed back to row 0. In digit 0 of a frame, Control-1 (`clr_mul`)
selects zeros instead.

The sample is two's complement, so its top bit has weight −2^(W−1). Block-B
handles this. While Control-2 (`neg_msd`) is high, which happens in the cycle
that carries the sample's top digit, Block-B adds −A instead of A. The
coefficient's negation −A is W+1 bits wide, because −(−128) = 128 needs 9
bits. The filter computes it once per tap.

All carry-save vectors are W+1 bits wide and two's complement. The full-adder
identity x+y+z = s+2c holds bit by bit, including for the negative-weight top
bit. So signed(Si)+signed(Ci)+pp = p_out + 2·(signed(So)+signed(Co)) holds
exactly, and the rows need no sign-correction terms. After F cycles all 2W
product bits have come out. The state left over is only a sign extension, and
the next frame's Control-1 discards it.

### Control

`ds_ctrl` counts digit positions 0 … F−1 and decodes them into the
`ds_fir_pkg::ds_ctrl_t` control word:

| field | active in digit | used by |
|---|---|---|
| `clr_mul` (Control-1) | 0 | multiplier: start from zero vectors |
| `neg_msd` (Control-2) | W/N−1 | Block-B: use −A for the sample's sign bit |
| `sign_ext` (Control-3) | F−1 | adders: signed extension of the top digit |
| `acc_cin` (Control-4) | all but 0 | accumulator: add the stored carry |
| `pad_zero` | W/N … F−1 | filter: feed zeros to the multipliers |

## Where this RTL departs from the circuit it models

* **Clocking.** The original structure spreads every block over N
  overlapping clock phases and relies on time borrowing between them. Here a
  single rising-edge clock is used, and each block's N phase-slices are one
  combinational path. The phase generator and the domino gates are not
  modelled, and neither are the cycle-time gains they bring: about 36 % for
  N = 2 and 31 % for N = 4 over two-phase domino.
* **Pipelining.** No registers are placed between multiplier, adder and
  accumulator. Output digits come out with zero cycles of latency relative
  to the input digits.
* **Own choices.** These are not fixed by the circuit this design is based
  on:
  * the frame counter;
  * the zero padding done inside the filter, rather than by the source;
  * Control-1 being active high (Control-4's active-low clearing follows the
    original multiplexer labels);
  * the W+1-bit carry-save vectors of the multiplier (the original draws
    8-bit vectors between rows);
  * the exact width N + ⌈log2 j⌉ at each point of the adder chain (only the
    growth from N to N+3 is given);
  * an asynchronous active-low reset that clears all state.
* **Coefficients** are input ports, held steady. To change them mid-stream,
  change them at a frame boundary. The filter then mixes old and new
  coefficients for L−1 samples, as any transposed FIR does.

## Files

| file | contents |
|---|---|
| `rtl/ds_fir_pkg.sv` | control-word struct, width helper |
| `rtl/ds_fir.sv` | top: the filter |
| `rtl/ds_ctrl.sv` | frame counter and control decoder |
| `rtl/ds_mul.sv` | digit-serial multiplier |
| `rtl/ds_mul_block_a.sv`, `rtl/ds_mul_block_b.sv` | its carry-save rows |
| `rtl/ds_add.sv` | carry-free digit adder with Control-3 extension |
| `rtl/ds_acc.sv` | output accumulator with carry feedback |
| `rtl/ds_delay.sv` | F-register delay line |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ds_fir_n2` for N = 2 |

Parameters: `ds_fir #(L, W, N)`. The code assumes that N divides W and that
L ≥ 2.

## Simulating

Each testbench prints `TB_RESULT checks=… failures=…` and stops. A watchdog
fails the run if it hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ds_fir_pkg.sv tb/tb_ds_fir.sv --top-module tb_ds_fir -Mdir obj
./obj/Vtb_ds_fir
```

What the tests check:

* **End to end.** `tb_ds_fir` (default sizes) and `tb_ds_fir_n2` (N = 2) run
  several coefficient sets. These include all −128, the largest output, and
  alternating ±full-scale samples; the rest are random. Each set runs for up
  to 300 samples. Every 19-bit result is compared with the FIR equation
  evaluated in integer arithmetic. The tests also check the frame markers and
  the 2W/N-cycle result timing.
* **Events that must occur.** Each of these is counted and must happen at
  least once:
  * negative samples (the −A path);
  * negative results (the signed top digit);
  * carries inside a frame;
  * a stale carry that Control-4 must drop;
  * non-zero garbage in the padding cycles;
  * full delay lines.
* **Unit tests.** They check the multiplier against A·B for N = 4 and N = 2,
  for every one of the 2^16 pairs of 8-bit operands. They check the rows
  with the carry-save identity above, the adder against extended integer addition, the accumulator against
  the weighted sum of its input digits, the delay line against a reference
  queue, and the controller cycle by cycle.

How far to trust it: the multiplier is checked exhaustively and the rest of
the arithmetic with random and corner-case data, at the two digit sizes the
design is meant for. Nothing here checks timing. The phase-level behaviour that
motivates the circuit style is outside what RTL can express.
