# Pipelined chaotic pseudo-random number generator (FDNR oscillator)

This generator produces pseudo-random words by integrating a chaotic
third-order oscillator in fixed-point arithmetic. The oscillator is one with
a frequency-dependent negative resistance (FDNR). Its one nonlinearity is a
piecewise-constant gain B(Y). The step size and both gain values are powers
of two. So the whole datapath is adders, one comparator, multiplexers and
registers, with no multipliers. The critical path is the carry chain of the
adders. The design cuts it with pipeline registers, and it keeps the pipeline
full by running several independent trajectories interleaved in the same
loop. After seeding, every clock cycle yields a new (X, Y, Z) triple, and the
low-order bits of each coordinate form three output bit streams.

## The arithmetic

The oscillator is X''' = -X'' - B(X')·X' - X. Put Y = X' and Z = X''. Then a
forward-Euler step of size h is:

    X' = X + h·Y
    Y' = Y + h·Z
    Z' = Z - h·(Z + B(Y)·Y + X)

    B(Y) = 4  if Y >= 1
    B(Y) = 0  otherwise
    h    = 2^-4

Each multiplication is a shift:

- h·v is an arithmetic right shift by 4. It is sign-filling and rounds
  towards minus infinity.
- B(Y)·Y is Y shifted left by 2 when Y >= 1, and zero otherwise.

**Number format.** Every value is a P_ARITH-bit two's-complement fixed-point
number:

- 1 sign bit;
- 3 integer bits;
- P_ARITH-4 fraction bits.

At the default 64 bits this is a "[4]:[60]" format. The representable range
is [-8, 8). Trajectories of this system stay within about ±5. The term 4·Y
can go beyond the range when Y >= 2. Every add and the left shift wrap at
P_ARITH bits, as a fixed-width datapath does. The reference model in the
testbenches wraps in exactly the same places.

## Datapath

```
            +-------------------- sum_channel ---------------------+
 X,Y,Z ---->| fdnr_by: (1 > Y) ? 0 : Y, <<2  -> Z + BY + X -> z^-S |--- S ----+
   ^        +------------------------------------------------------+          |
   |                                                                          |
   |   X -> DelayX z^-S -> dX --+                                             |
   |   Y -> DelayY z^-S -> dY --+--> step_adder X_hY: dX + dY>>>4 -> z^-H -> nX
   |   Z -> DelayZ z^-S -> dZ --+--> step_adder Y_hZ: dY + dZ>>>4 -> z^-H -> nY
   |                            +--> step_adder Z_hS: dZ - S>>>4  -> z^-H -> nZ
   |                                                                          |
   +--- state_reg (z^-1, mux: init_sel ? init_* : n*) <-----------------------+
```

(S = P_DELAY_S, H = P_DELAY_H.)

| Module | Role |
|---|---|
| `fdnr_by` | Signed comparator `1 > Y`, multiplexer (Y or 0), shift left by 2. Combinational. |
| `sum_channel` | Three-input adder Z + B(Y)·Y + X, followed by P_DELAY_S register stages. |
| `delay_line` | Chain of DEPTH registers. Used as the alignment buffers DelayX/DelayY/DelayZ (DEPTH = P_DELAY_S), and as the register stages of the other blocks. |
| `step_adder` | Shift right by 4, add or subtract (`SUBTRACT`), then P_DELAY_H register stages. |
| `state_reg` | Initialisation multiplexer and the state register of one channel. |
| `chaotic_prng` | Top. Wires the above together and brings out the state and the output words. |
| `prng_pkg` | Shared constants: number format, shift amounts, default depths. |

The delayed Y and Z feed the h·Y and h·Z shifts, not the current register
values. So all three channels apply the equations to the same time step, and
each trajectory is an exact Euler integration.

## Pipelining and interleaved trajectories

This part is the key to the design, and the least obvious.

**Why the registers are there.** With P_DELAY_S = P_DELAY_H = 0 the loop is
purely combinational from the state registers back to themselves. Its
longest path is the Z update: compare, select, three-input add, then
subtract. That path limits the clock. P_DELAY_S registers follow the
three-input sum. The same number of registers (DelayX/Y/Z) hold X, Y and Z so
they stay aligned with the sum. P_DELAY_H registers follow each step adder.
A synthesis tool with retiming moves these registers into the adders' carry
chains.

**What the registers do to the loop.** A value leaves a state register and
comes back, updated, after L cycles:

    L = P_DELAY_S + P_DELAY_H + 1        (6 at the defaults)

Cycle by cycle, the register recurrence is:

    reg(t+1) = init_sel(t) ? init(t) : step(reg(t+1-L))

So the loop holds L unrelated trajectories, one per clock slot. Each one
advances one Euler step every L cycles. Together they produce one new triple
per cycle. The pipeline costs no throughput: it raises the clock rate and
fills the extra slots with independent sequences.

**Seeding.** Hold `init_sel` high for L consecutive cycles, with a different
(init_x, init_y, init_z) each cycle. This gives every slot its own seed. A
slot never seeded keeps what reset put there. Zero is a fixed point of the
equations, so an unseeded slot outputs zeros for ever.

You can raise `init_sel` for fewer cycles while running. Only the slots that
pass the state registers during those cycles are re-seeded; the others keep
going. The first Euler step of a slot seeded at cycle t appears at `out_*` in
cycle t+L.

## Interface and timing

| Port | Dir | Width | |
|---|---|---|---|
| `clk` | in | 1 | All registers are on the rising edge. |
| `rst` | in | 1 | Synchronous, active high. Clears every register. |
| `init_sel` | in | 1 | 1: the state registers load `init_*` on the next edge. |
| `init_x/y/z` | in | P_ARITH | Seeds, in the fixed-point format above. |
| `out_x/y/z` | out | P_ARITH | The state registers. |
| `word_x/y/z` | out | P_WORD | The P_WORD least significant bits of `out_*`. |

The upper bits of the state are far from random: they carry the slow shape
of the attractor. The output words therefore drop them. At 64-bit arithmetic
a word of up to 56 low bits is usable, which is the default. At 32 and 48
bits keep about 16. At 16 bits the streams are not usable.

There is no valid or ready signal. After seeding, every cycle's output is a
fresh sample from one of the L trajectories.

## Parameters and configurations

| Parameter | Default | Range used | Meaning |
|---|---|---|---|
| `P_ARITH` | 64 | 16, 32, 48, 64 | Arithmetic precision (pArith). |
| `P_DELAY_H` | 1 | 0–4 | Register stages after each step adder (pDelayH). |
| `P_DELAY_S` | 4 | 0–4 | Register stages in the sum channel and in DelayX/Y/Z (pDelayS). |
| `P_WORD` | 56 | 16–56 | Output word width. |

The default is the 64-bit configuration with P_DELAY_H = 1 and
P_DELAY_S = 4. This configuration was measured on a Cyclone V at 205 MHz.
Three 56-bit streams at 205 MHz give 11.48 Gbit/s per stream, or 34.4 Gbit/s
in total.

Best configurations reported for the other precisions:

| Precision | P_DELAY_H | P_DELAY_S | Reported clock |
|---|---|---|---|
| 16 bits | 1 | 3 | ≈ 265 MHz |
| 32 bits | 1 | 3 | ≈ 225 MHz |
| 48 bits | 3 | 4 | ≈ 215 MHz |

Nothing here measures clock rates; they depend on the FPGA flow.

## What is taken from the source and what is chosen here

**From the published description of the generator:**

- the equations, h, β1 = 4 and β2 = 0;
- the number format;
- the block structure and names (DelayX/Y/Z, Z_BY_X, X_hY, Y_hZ, Z_hS,
  muxX/Y/Z, InitSelect);
- the meaning of pDelayH and pDelayS;
- the precisions and the output-word truncation.

**Chosen here:**

- **Reset.** The source mentions none. This design uses a synchronous reset
  to zero.
- **init_sel polarity.** 1 selects the seed.
- **Wrap-around.** All arithmetic wraps; saturation is not used.
- **Register placement.** All pipeline registers come after the combinational
  operation. The retiming tool is left to balance them.
- **h·Y and h·Z shifts.** They take the delayed Y and Z. This is the reading
  under which the delay buffers align the channels.

**Known differences:**

- **Flip-flop counts.** The registers here are (3 + 4·P_DELAY_S +
  3·P_DELAY_H)·P_ARITH bits. The reported FPGA counts match this for
  P_DELAY_H, but they grow about twice as fast with P_DELAY_S (about 8
  words per stage rather than 4). The extra registers of the original tool
  flow are not described, so they are not reproduced. The function does not
  depend on them.
- **Seed count.** The source speaks of four seed values per channel. This
  loop needs L of them (6 at the defaults), one per slot.
- **Not included.** The interface that carries the words off-chip to the
  processor system is not included. Connect your own capture logic to
  `word_*`.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `prng_model_pkg` is an independent reference model of the equations. It
  uses 64-bit integers re-wrapped to P_ARITH bits, and floor division instead
  of shifts.
- `prng_stim_check` is the end-to-end stimulus and scoreboard. It resets,
  seeds all L slots with random values in (-2, 2), runs, re-seeds two slots
  mid-run, and runs again. Every cycle it compares the state and the words
  with the model. It also checks the L-cycle latency of a slot explicitly.
  It counts loads, re-seeds, steps taken with B = 4 and with B = 0, and new
  triples per cycle, and it fails if any of these never happened.
- `tb_chaotic_prng` runs the top at its default parameters for 20,000
  cycles.
- `tb_prng_configs` runs eight configurations side by side: the best one for
  each precision, the 64-bit variants with P_DELAY_H = 0, the unpipelined
  loop (L = 1), and the deepest loop (L = 9).
- `tb_nist_workload` runs the default top for 798,916 clocks. That produces
  the 134 million bits of one NIST SP800-22 run (128 sequences of 2^20
  bits). Every state is compared with the model. It then checks that each
  of the 3 × 56 word bit positions is balanced, with a share of ones within
  6σ of one half. This is a necessary property, far weaker than the NIST
  suite.

Simulating with Verilator. The `-y` options let Verilator find each module
in the file of the same name. Substitute any testbench name:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/prng_pkg.sv tb/prng_model_pkg.sv tb/tb_chaotic_prng.sv \
  --top-module tb_chaotic_prng
./obj_dir/Vtb_chaotic_prng
```

Lint the design:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/prng_pkg.sv rtl/chaotic_prng.sv
```

This gives no warnings. Linting a single submodule on its own reports only
the package constants that the submodule does not use.

Apart from the bit-balance check, the statistical quality of the output was
not tested here. The source reports that the 64-bit streams pass NIST SP800-22 (128 sequences of 2^20
bits) for word lengths of 16 to 56 bits.
