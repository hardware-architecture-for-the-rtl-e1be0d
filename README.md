# Bit-serial Montgomery modular multiplier

Public-key schemes such as RSA spend nearly all their time on modular
multiplications `A*B mod M` with operands of about 1024 bits. Reducing a
2048-bit product modulo `M` needs a division. Montgomery's method avoids the
division. It scans the multiplier one bit at a time, from the least
significant end. At each step it adds the multiple of `M` that makes the
partial sum even, then halves the sum. The price is a spurious factor:
after `WIDTH` steps the result is `A*B*2^-WIDTH mod M`, not `A*B mod M`.

This RTL has two units:

* **`montgomery_multiplier`**: the radix-2 Montgomery multiplier itself. It
  returns `R ≡ A*B*2^-WIDTH (mod M)`.
* **`modular_multiplier`**: the main unit. It runs the same datapath twice to
  remove the factor. It returns `R ≡ A*B (mod M)`.

`modmul_top` places both units side by side. The default operand width is
`WIDTH = 1024`. Each step takes three clock cycles, so one multiplication
takes about `6*WIDTH` cycles. The datapath has only a few full-width
registers and adders.

## The iteration

For an odd modulus `M` and operands `A, B < M`, the datapath repeats the
following for `i = 0 .. WIDTH-1`, starting from `R = 0`:

```
S = R + a_i * B            -- MUX2_1 (0 or B, selected by a_i), ADDER_1
if S is odd: S = S + M     -- MUX2_2 (0 or M, selected by r0 = S[0]), ADDER_2
R = S / 2                  -- accumulator loads S, then shifts right once
```

Because `M` is odd, adding it to an odd `S` makes the sum even, so halving
it is exact. It also keeps `R` congruent to `A*B*2^-i`. By induction
`R < 2M` holds throughout: `(R + B + M)/2 < (2M + M + M)/2`.

**No final subtraction is performed.** This matches the source design. The
results are congruent to the wanted value but not fully reduced:

| unit | result | bound |
|---|---|---|
| `montgomery_multiplier` | `≡ A*B*2^-WIDTH (mod M)` | `< 2M` |
| `modular_multiplier` | `≡ A*B (mod M)` | `< 3M` |

If you need the value in `[0, M)`, subtract `M` up to twice. That step is
not built. Because of these bounds, the result ports are `WIDTH+2` bits
wide. The accumulator and both adders are `WIDTH+3` bits wide. The largest
intermediate sum, in the second pass of the modular multiplier, stays below
`6M < 2^(WIDTH+3)`, so nothing wraps. The source design draws every port
`WIDTH` bits wide and gives no internal widths. These widths are this
design's choice.

## Removing the 2^-WIDTH factor: two passes and the constant C

`modular_multiplier` runs two Montgomery passes on one datapath:

```
step 0:  R0 = Mont(A,  B)  ≡ A*B*2^-WIDTH
step 1:  R  = Mont(C, R0)  ≡ R0*C*2^-WIDTH
```

The result is `≡ A*B` only when **`C = 2^(2*WIDTH) mod M`**. `C` is an input
port. The caller computes it once per modulus, for example by doubling
`1` `2*WIDTH` times modulo `M`. The original description of this design
gives the constant as `2^n mod M`. With that value, the second pass would
only return `A*B*2^-WIDTH` again. The hardware itself does not depend on
the value of `C`.

How the datapath switches between the two passes:

* **MUX2** (A or C) chooses which operand is loaded into the multiplier
  shift register. It takes `A` in step 0 and `C` in step 1.
* **MUX4**, selected by `{step, a0}`, feeds ADDER_1. In step 0 it passes
  `0` or `B`. In step 1 it passes `0` or the contents of `REGISTER`.
* **REGISTER** copies the accumulator at the end of every step-0 iteration.
  After the last step-0 iteration it holds `R0`. The controller then clears
  the accumulator, loads `C`, and starts step 1. `REGISTER` drives MUX4 only
  while `enable_R` is high, which is throughout step 1. It is cleared when a
  new multiplication starts.

The multiplicand for step 1 is `R0 < 2M`, not a value below `M`. This is why
the step-1 bound is `3M` rather than `2M`.

```
            C   A
            |   |
           [ MUX2 ]<-- step
               |
   +--> [SHIFT REGISTER_1] --a0--+
   |                             |
   |  REGISTER   0   0   B       |
   |     |       |   |   |       |
   |    [        MUX4       ]<---+-- {step, a0}
   |               |
   +-acc----->[ ADDER_1 ]
   |               | S1 (r0 = S1[0])
   |        0  M   |
   |       [MUX2_2]<-r0
   |           |   |
   |        [ ADDER_2 ]
   |               |
   |     [SHIFT REGISTER_2] = accumulator R --+--> r
   +------------------------------------------+
            (acc also feeds REGISTER)
```

The Montgomery multiplier has the same datapath without MUX2, MUX4 and
REGISTER. Its first multiplexer (MUX2_1) passes `0` or `B`.

## Controllers and timing

Both controllers are Moore state machines with a built-in down counter.
The counter is loaded with `WIDTH`, stepped down once per iteration, and
tested at the end of each iteration. Each iteration takes three states:

| state | action |
|---|---|
| ADD | the adders settle; the accumulator loads ADDER_2's sum; the counter steps (`count` pulse) |
| SHIFT | both shift registers shift right once |
| CHECK | counter zero → leave the loop; otherwise go back to ADD |

**`mont_controller`** (six states):

| state | action |
|---|---|
| S0 | initialise: clear the accumulator, load the counter; wait for `control` |
| S1 | load A into shift register 1, and B and M into their registers |
| S2 / S3 / S4 | ADD / SHIFT / CHECK |
| S5 | halt: `done` |

**`modmul_controller`** (ten states):

| state | action |
|---|---|
| S0 | initialise: clear the accumulator and REGISTER, load the counter; `step = 0`; wait for `control` |
| S1 | load A, B and M |
| S2 / S3 / S4 | step-0 ADD / SHIFT / CHECK; S4 also loads REGISTER from the accumulator |
| S5 | `step = 1`: load C, clear the accumulator, reload the counter |
| S6 / S7 / S8 | step-1 ADD / SHIFT / CHECK |
| S9 | halt: `done` |

**Handshake.** `control` is a level "run" signal:

1. Present the operands and raise `control`.
2. Keep the operands stable while `control` is high. A, B and M are sampled
   in S1. C is sampled in S5.
3. `done` rises and stays high with the result valid.
4. Lower `control`. The controller returns to S0, and a new operation can
   start on the next cycle.

Latency, counted in rising clock edges from the first edge that sees
`control` high:

| unit | edges to `done` | at WIDTH = 1024 |
|---|---|---|
| `montgomery_multiplier` | `2 + 3*WIDTH` | 3074 |
| `modular_multiplier` | `3 + 6*WIDTH` | 6147 |

`rst_n` is a synchronous, active-low reset into S0. The datapath registers
have no reset. Whatever they hold is cleared or loaded before it is used.

## Interfaces

`modmul_top #(WIDTH = 1024)`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset (shared) |
| `mod_control` | in | 1 | run the modular multiplier |
| `mod_a`, `mod_b`, `mod_m`, `mod_c` | in | WIDTH | A, B < M; odd M; C = 2^(2*WIDTH) mod M |
| `mod_r` | out | WIDTH+2 | result, ≡ A*B mod M, < 3M |
| `mod_done` | out | 1 | result valid (S9) |
| `mod_count` | out | 1 | one pulse per iteration (2*WIDTH per operation) |
| `mod_step` | out | 1 | 0 during the first pass, 1 during the second |
| `mm_control` | in | 1 | run the Montgomery multiplier |
| `mm_a`, `mm_b`, `mm_m` | in | WIDTH | A, B < M; odd M |
| `mm_r` | out | WIDTH+2 | result, ≡ A*B*2^-WIDTH mod M, < 2M |
| `mm_done` | out | 1 | result valid (S5) |
| `mm_count` | out | 1 | one pulse per iteration |

The two controllers also drive the control lines named in the source
design's controller interfaces (`reset`, `resetR`, `step`, `load_SR1`,
`load_SR2`, `load_R`, `enable_SR1`, `enable_SR2`, `enable_R`, `count`). They
add `load_BM`, which loads the B and M registers, and `done`.

## Files

| file | contents |
|---|---|
| `rtl/modmul_pkg.sv` | state enumerations of both controllers |
| `rtl/modmul_top.sv` | both units side by side |
| `rtl/modular_multiplier.sv`, `rtl/modmul_controller.sv` | two-pass modular multiplier and its 10-state controller |
| `rtl/montgomery_multiplier.sv`, `rtl/mont_controller.sv` | Montgomery multiplier and its 6-state controller |
| `rtl/shift_register_a.sv` | multiplier shift register (load, shift right, a0 = bit 0) |
| `rtl/shift_register_r.sv` | accumulator shift register (clear, load, shift right) |
| `rtl/operand_register.sv` | clear/load register for B, M and REGISTER |
| `rtl/mux2.sv`, `rtl/mux4.sv`, `rtl/adder.sv` | the datapath's multiplexers and adders |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself, with
a watchdog that counts a failure if it hangs. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/modmul_pkg.sv tb/tb_modmul_top.sv --top-module tb_modmul_top -o sim
./obj_dir/sim
```

Substitute any other `tb_*` name. Verilator evaluates the design with two
states, so the testbenches reset or load everything they read.

What the testbenches check:

* **`tb_modmul_top`**: the whole design at the default `WIDTH = 1024`, with
  no parameter override. It uses three random 1024-bit odd moduli, the
  largest odd modulus with `A = B = M-1`, a modulus of 3, and zero operands.
  Both units run concurrently and back to back. The testbench checks:
  * the exact result, against a bit-serial software model (two passes for
    the modular unit);
  * congruence with `A*B mod M` (or `A*B*2^-WIDTH`), using separate
    shift-and-subtract arithmetic;
  * the `3M` and `2M` bounds;
  * both latencies.

  It also counts each datapath mechanism and fails if one never occurs:
  iterations with `a0 = 0` and `a0 = 1`, iterations with and without adding
  `M`, the step-0 to step-1 switch, REGISTER loads, the accumulator clear
  before step 1, and the return to S0. It runs in about 15 seconds.
* **`tb_modular_multiplier`** (`WIDTH = 12`) and
  **`tb_montgomery_multiplier`** (`WIDTH = 16`): the same kind of checks
  over 300+ random and corner vectors each.
* **The controller testbenches**: compare every control output, cycle by
  cycle, against the state sequence above, at two widths.
* **The leaf-block testbenches**: compare against reference models.

## Where this design makes its own choices

The datapath structure, the components and the controller state sequences
follow the source design. The following are this implementation's own:

* **Iteration count.** One iteration per operand bit, `WIDTH` in all. The
  source's algorithm loops over all `n+1` bits of `A<n:0>`, while its text
  writes the factor as `2^-n`. Here the factor is `2^-WIDTH`.
* **Counter direction.** The counter counts down and is tested for zero. The
  source mentions both "increment counter" and "a simple down counter".
* **"Reset register" in state S5** is read as clearing the accumulator.
  `REGISTER` must keep the first pass's result for the second pass.
* **The meanings of `control`, `count`, `load_R` and `enable_R`.** The
  source names these signals but does not define them. Here `control` is
  the run level, `count` is the counter step pulse, `load_R` is REGISTER's
  load strobe, and `enable_R` gates REGISTER onto MUX4.
* **Added signals.** `load_BM`, `done`, the synchronous reset and all
  widths are additions.
* **MUX4 select coding.** `{step, a0}` → `0, B, 0, REGISTER`.
* **Result ports** are `WIDTH+2` bits instead of `WIDTH`.
* **The constant C** must be `2^(2*WIDTH) mod M`, as explained above.

## Not included

* **Final conditional subtraction.** It is not part of the source design;
  results may be as large as `2M` or `3M`, see above.
* **Computing C.** `C` is an input.
* **A modular exponentiator.** RSA encryption is the motivating use, but the
  exponentiation sequencer is not designed.
* **FPGA timing and area.** The source reports a small FPGA prototype
  (about 624 equivalent gates, about 58 MHz) of unstated operand width.
  Those numbers cannot be reproduced here, and at 1024 bits the design is
  far larger: about 9,300 flip-flops for both units together.
