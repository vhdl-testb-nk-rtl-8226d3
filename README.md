# One-digit code lock with an exhaustive keypad test

A door lock driven by a 12-key telephone-style keypad opens when the key "1"
is pressed and then released. It stays open for 30 clock cycles and then
locks itself again. The logic is a small Moore state machine whose state is a
5-bit counter. The main interest is not the lock but how it is verified: the
keypad has only 7 input lines, so a testbench can try all 2^7 = 128 input
combinations and prove that nothing except key "1" can start an opening. A
hand-optimised version of the key decoder can look right and still be wrong,
and only such a sweep shows it reliably.

## The keypad and its encoding

The keypad is a 3 x 4 switch matrix. Pressing a key drives its column line and
its row line to 1. The lock reads the lines as two vectors whose bits are
numbered from the left, `K[1:3]` and `R[1:4]`:

|            | K3 | K2 | K1 |
|------------|----|----|----|
| **R4**     | 1  | 2  | 3  |
| **R3**     | 4  | 5  | 6  |
| **R2**     | 7  | 8  | 9  |
| **R1**     | *  | 0  | #  |

So key "1" is `K = 3'b001` (only `K[3]` set) and `R = 4'b0001` (only `R[4]`
set). "No key" is all zeros. Several keys held at once set several bits. For
example, `*` and `#` together give `K = 3'b101, R = 4'b1000`. This matters for
the test described below. `codelock_pkg` holds the two vector types and these
constants.

The keypad lines are sampled directly on the clock edge. The design assumes
they are already synchronous and debounced.

## The state machine

| state      | q       | UNLOCK | next state                                                                 |
|------------|---------|--------|----------------------------------------------------------------------------|
| S0         | 0       | 0      | S1 if key "1" is pressed, else S0                                          |
| S1         | 1       | 0      | S1 while key "1" is held, S2 when no key is pressed, S0 on anything else   |
| S2 ... S30 | 2 ... 30| 1      | next state number (keys ignored)                                           |
| S31        | 31      | 1      | S0                                                                         |

S0 waits for the first digit. S1 waits for it to be released. S2 to S31 are
the 30 open states. `UNLOCK` and the debug output `q` (the state number)
depend on the state register alone. The module is written in three parts: a
next-state decoder (`always_comb`), the state register (`always_ff`) and an
output decoder. The code key and the open time are parameters:

| parameter     | default   | meaning                         |
|---------------|-----------|---------------------------------|
| `CODE_COL`    | `3'b001`  | column lines of the code key    |
| `CODE_ROW`    | `4'b0001` | row lines of the code key       |
| `OPEN_CYCLES` | 30        | cycles that UNLOCK stays high   |

`q` is 5 bits wide, as in the original interface. An `OPEN_CYCLES` above 30
would therefore truncate it.

### Timing

With a 20 ns (50 MHz) clock:

- The edge that samples key "1" loads S1.
- Every edge while the key is still held keeps S1.
- The first edge that sees all lines at 0 loads S2, and `UNLOCK` rises right
  after that edge.
- `UNLOCK` falls at the edge that loads S0, 30 edges later.

The shortest sequence from press to open is two clock edges: one with the key
pressed and one with it released.

### Power-up

There is no reset input. The state register has an initial value of S0, which
FPGA and CPLD flows load at configuration. If the register started in another
state, the machine would still reach S0 within 32 cycles. On the way it would
drive `UNLOCK` high unless it started in S0. If your target does not honour
initial values, add a reset.

## Why the exhaustive sweep

A condition like "K is 001 and R is 0001" is easy to check by eye. The same
condition written as a sum of products over single bits is not. One such
rewrite of the S0/S1 decoder, which reads as

    !R[2] & !R[3] & !K[2] & K[3] & ( (!K[1] & !R[1] & R[4]) | (K[1] & R[1] & !R[4]) )

accepts key "1". It also accepts `*` and `#` pressed together. Since it agrees
with the correct decoder on every single-key input, hand testing will almost
never find the difference. The end-to-end testbench steps through all 128
line combinations, 8 column values in an outer loop and 16 row values in an
inner loop, one per clock. Each time the lock enters S1 it checks which
combination caused that. Any combination other than key "1" is reported as a
wrong opening. Against the faulty decoder it reports `K=101 R=1000`.

## Testbenches

- `tb/tb_codelock.sv` is the unit test. A reference model of the state table
  runs next to the lock and is compared with it every cycle. The stimulus is:
  - the power-up state;
  - a held key;
  - the exact 30-cycle open time;
  - all 128 combinations applied in S0 and again in S1;
  - random keys while the lock is open;
  - 3000 cycles of random key traffic.
- `tb/tb_codelock_sweep.sv` is the end-to-end test at the default parameters.
  It has three phases:
  1. The nested-loop sweep described above.
  2. Each of the 128 combinations is pressed and released. The lock must open
     for key "1" only, for exactly 30 cycles.
  3. Each combination is applied in S1.

  The testbench counts how often each behaviour occurs: hold in S1, open on
  release, abort from S1, rejected key in S0, full open period, and wrap from
  S31 to S0. A behaviour that never occurs counts as a failure.

Both testbenches print `TB_RESULT checks=N failures=M` and stop themselves
through a watchdog if anything hangs. The two testbenches also fail when the
faulty decoder above replaces the correct one.

## Simulating

With Verilator 5:

    verilator --binary --timing --top-module tb_codelock_sweep \
        rtl/codelock_pkg.sv rtl/codelock.sv tb/tb_codelock_sweep.sv
    ./obj_dir/Vtb_codelock_sweep

Use `tb_codelock` and `tb/tb_codelock.sv` in the same way for the unit test.
Each testbench finishes in well under a second. To lint the RTL:

    verilator --lint-only -Wall rtl/codelock_pkg.sv rtl/codelock.sv

Verilator reports PROCASSINIT on the state register, because the register has
an initial value and is also assigned in the clocked process. That is the
intended power-up behaviour described above.

## What is original and what is chosen here

These parts follow the original design:

- the state sequence, the 30-cycle open time and the key encoding;
- the port list (`clk`, `K[1:3]`, `R[1:4]`, `q[4:0]`, `UNLOCK`);
- the split into decoder, register and output decoder;
- the 20 ns test clock and the 128-combination sweep.

These are choices of this implementation:

- The code key and the open time are parameters.
- The power-up value comes from an initializer, not from a reset.
- The ascending bit ranges are kept so that `K[1]` and `R[1]` are the leftmost
  bits.
- The keypad inputs are not synchronised or debounced.
- The testbenches check more than the original sweep does: the open time, the
  behaviour in S1, and a cycle-by-cycle reference model.

Not covered: the keypad itself, which is a plain switch matrix, and the
programmable logic device the lock is meant to be programmed into.
