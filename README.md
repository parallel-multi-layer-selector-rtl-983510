# PMLS chaotic S-box generator

A substitution box (S-box) is the nonlinear heart of a block cipher: a
bijective table that maps every byte to another byte. This design builds an
8-bit S-box in hardware from a chaotic source. It integrates the Lorenz
system with a fourth-order Runge–Kutta (RK4) solver in 32-bit fixed point and
turns each of the three state variables into a byte. Then it passes the three
bytes through a *parallel multi-layer selector* (PMLS):

- Three multiplexers shuffle the bytes, steered by their most significant bits.
- A fourth multiplexer, steered by the shuffled bytes, picks one of them.

The resulting byte stream fills a 16×16 table, keeping only values not seen
before, until all 256 values are present. The table is then a permutation of
0..255, and the block serves substitution lookups from it.

```
 cfg ──► lorenz_rk4 ──x,y,z──► mod256_unit ──X,Y,Z──► pmls_selector ──byte──► sbox_store ◄── sub_in
 (σ,r,β,     │ 1 sample / 4 clk    (+1 clk)               (+1 clk)                 │        ──► sub_out
  x0,y0,z0)  │                                                                     │
             └──────────────── pmls_ctrl (load, discard, restart, done/fail) ──────┘
```

## Number formats: why the state is scaled

The state x, y, z is a 32-bit signed **Q4.28** word: 4 integer bits,
including the sign, and 28 fraction bits. Q4.28 covers only ±8. On the
attractor at σ = 10, r = 28, β = 8/3, the physical Lorenz variables reach
about ±25 for x and y and up to about 50 for z. The stored word therefore
holds the physical value divided by 2^7:

    stored = physical / 128      (pmls_pkg::SCALE_EXP = 7)

Every state variable is then a fraction well inside (−1, 1). Substituting
into the Lorenz equations gives the scaled vector field that `lorenz_deriv`
computes:

    dx = σ·(y − x)
    dy = r·x − y − 128·x·z
    dz = 128·x·y − β·z

The two linear equations are unchanged. The nonlinear products pick up a
factor 2^7, which is just a smaller right shift after the multiply (by 21
instead of 28). The vector field uses five multipliers: σ(y−x), r·x, x·z,
x·y and β·z.

- **Coefficients.** σ, r, β and the step h are Q8.24, so that 10 and 28
  are representable. They are carried in `lorenz_cfg_t` together with the
  initial state.
- **Rounding.** Every product is truncated toward minus infinity
  (arithmetic shift).
- **Intermediate widths.** The sums inside a derivative are formed at
  40 bits. The RK4 slope sum k1 + 2k2 + 2k3 + k4 is kept at 40 bits, because
  it can exceed ±8.

Values of the specified operating point, as stored:

| quantity | value | word |
|---|---|---|
| σ | 10 | Q8.24 `167772160` |
| r | 28 | Q8.24 `469762048` |
| β | 2.666 | Q8.24 `44728058` |
| h | 0.01 | Q8.24 `167772` |
| x0 = y0 = z0 | 10 | Q4.28 `20971520` (10/128) |

A physical value v is entered as `round(v · 2^21)` in the Q4.28 state word.

## Lorenz generator (`lorenz_rk4`)

A single vector-field unit is shared by the four RK4 stages, one stage per
clock:

| stage | evaluates | updates |
|---|---|---|
| 0 | k1 = f(s) | probe = s + h/2·k1, acc = k1 |
| 1 | k2 = f(probe) | probe = s + h/2·k2, acc += 2·k2 |
| 2 | k3 = f(probe) | probe = s + h·k3, acc += 2·k3 |
| 3 | k4 = f(probe) | s += h/6·(acc + k4), `out_valid` |

A new state leaves every **4 clocks** while `run` is high, and the state
holds while `run` is low. A one-cycle `load` takes a new configuration and
restarts the stage counter. h/2 and h/6 are constants derived from the
parameter `H`. Over the first 300 steps the fixed-point trajectory stays
within 0.03 (physical units) of a double-precision RK4 integration.

## From samples to bytes (`mod256_unit`)

Each of x, y and z becomes a byte:

    X = floor(x · 2^14) mod 256

In hardware this is bits [21:14] of the Q4.28 word. The two's-complement
low byte of the floor is already the mathematical modulus, so negative
samples need no extra logic. With the 2^7 scaling, X is the physical value
in steps of 1/128, wrapped every 2 units. For z, which spans about 50 units,
the byte wraps many times per orbit. The unit adds one register stage.

## The two-layer selector (`pmls_selector`, `layer_mux`)

**Layer 1.** The select code is the *sum* of two bits:
`sel1 = MSB(X) + MSB(Z)`, which gives 0, 1 or 2. Three multiplexers see the
bytes in different orders:

| sel1 | Mux1 → S1 | Mux2 → S2 | Mux3 → S3 |
|---|---|---|---|
| 00 | X | Y | Z |
| 01 | Z | X | Y |
| 10 | Z | X | Y |
| 11 | Y | Z | X |

**Layer 2.** `sel2 = MSB(S1) + MSB(S3)` steers Mux4:

| sel2 | output |
|---|---|
| 00 | S1 |
| 01 | S2 |
| 10 | S3 |

Because the codes are sums of two bits, the layer-1 row 11 never occurs.
It is wired as tabulated anyway. Layer-2 code 11 cannot occur either, and
selects S1. Each multiplexer is a `layer_mux`, a three-input byte mux
configured by a table of four input indices (`MAP`). Both layers are
combinational, followed by one output register. S1..S3 and both select
codes are brought out for observation.

## Building a bijective table (`sbox_store`, `pmls_ctrl`)

The sequencer `pmls_ctrl` runs one generation:

1. **Start.** On `start` it loads the configuration into the generator,
   flushes the pipeline valid bits and empties the table.
2. **Discard.** It drops the first `DISCARD` = 5000 selector bytes. This is
   the transient before the orbit settles on the attractor.
3. **Collect.** It offers every later byte to the table. `sbox_store` writes
   a byte at the next free position only if its bit in a 256-bit `seen`
   vector is clear. Otherwise it counts the byte as a repeat.
4. **Done.** When the table holds 256 distinct bytes, the generator stops
   and `done` rises. The table is then a permutation of 0..255, and the
   S-box is `S(a) = table[a]`, in order of first appearance.
5. **Restart.** If `NUM_SAMPLES` = 2^14 bytes pass without completing the
   table, the attempt is abandoned. The sequencer starts over from the same
   initial state with r increased by `R_STEP` (1.0). After `MAX_ATTEMPTS`
   attempts it raises `fail`.

Sample counting happens at the selector output. On a restart the sequencer
first waits one cycle, so that the last sample's write is visible in `full`.

At the specified operating point the first attempt completes after **6682**
samples: 5000 discarded, then 1682 offered, of which 1426 were repeats.

## Top-level interface (`pmls_sbox_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | one-cycle pulse: begin a generation with `cfg` |
| `cfg` | in | 192 | `lorenz_cfg_t`: σ, r, β (Q8.24), x0, y0, z0 (scaled Q4.28) |
| `busy`, `done`, `fail` | out | 1 | generation running / table complete / gave up |
| `attempts` | out | 8 | attempts used (1 = no restart) |
| `sbox_count` | out | 9 | entries stored so far |
| `repeats` | out | 16 | bytes rejected as repeats in this attempt (saturating) |
| `sample_count` | out | 16 | selector bytes in this attempt |
| `rnd_valid`, `rnd_byte` | out | 1, 8 | raw selector stream |
| `rnd_sel1`, `rnd_sel2` | out | 2, 2 | select codes of `rnd_byte` |
| `sub_valid_in`, `sub_in` | in | 1, 8 | substitution request |
| `sub_valid_out`, `sub_out` | out | 1, 8 | S(`sub_in`), one cycle later |

**Usage.**

1. Hold `cfg`, pulse `start`, and wait for `done` or `fail`.
2. Once `done` is high, issue lookups on `sub_valid_in`/`sub_in`.
3. A new `start` is accepted in the idle, done or fail states.

**Latency.** A selector byte appears 2 cycles after its generator sample,
and one sample is produced every 4 cycles. A complete generation at the
default settings takes about 27,000 cycles.

| parameter | default | meaning |
|---|---|---|
| `DISCARD` | 5000 | transient samples dropped per attempt |
| `NUM_SAMPLES` | 16384 | samples per attempt (≤ 65535) |
| `MAX_ATTEMPTS` | 8 | attempts before `fail` |
| `R_STEP` | 1.0 (Q8.24) | increase of r per restart |
| `H` | 0.01 (Q8.24) | RK4 step |
| `MUL_EXP` | 14 | byte extraction: floor(x·2^MUL_EXP) mod 256 |

## Where this RTL makes its own choices

These points are interpretations of an underspecified or inconsistent
description of the architecture:

- **State scaling.** The state variables are required to be fractions in a
  Q4.28 word, but with x0 = y0 = z0 = 10 and r = 28 the physical state does
  not fit. The 2^−7 scaling above is this design's solution. Negative x and
  y values stay negative; they are not folded into (0, 1).
- **β.** β is given both as 2.666 and as 2.66. 2.666 is used.
- **Step size.** The step size is not given. h = 0.01 is used.
- **Byte extraction.** The byte step is described both as "divide the
  integer by 256" and as "X = mod(x, 256), a value in 0..255". The modulus
  (low byte) is implemented. Dividing would give only 64 distinct values.
- **Select codes.** The select code is described as adding the two MSBs,
  while the first-layer table also lists code 11. The arithmetic sum is
  implemented, so that row is unreachable. The second layer has no entry
  for 11, consistent with a sum.
- **Repeated values.** The S-box is described both as "the last 256 values,
  rejected and regenerated if any repeat" and as "the non-repeated numbers
  stored". 256 raw chaotic bytes are practically never all distinct.
  Therefore the table keeps first appearances after the transient, and a
  full restart with a new r happens only when 2^14 samples do not suffice.
  How r is varied, and the attempt limit, are this design's choices.
- **Throughput and pipelining.** The original implementation reports a
  381.764 MHz clock, with no cycle-level schedule. The four-clock RK4 stage
  sharing and the two register stages are this design's own. No timing
  closure was attempted, and the combinational path through the vector
  field and the step multiply is long.
- **Published S-box not reproduced.** The published S-box lists entries
  from 1 to 256, which is not an 8-bit table. This design produces its own
  table. For the default configuration, row 0 is
  `51 f4 eb bc d5 c8 03 14 a1 2d 36 3d 42 45 46 44` (hex).

## Quality of the generated S-box

`pmls_sbox_analysis_tb` generates the default table and applies the five
usual criteria. Its analysis routines are first validated on the AES S-box,
computed from its definition, which gives nonlinearity 112 and DP 4/256.

| criterion | generated table | figures published for the original design |
|---|---|---|
| bijective (balanced output combinations) | 255 of 255 | yes |
| nonlinearity min / max / avg | 100 / 108 / 104.25 | 104 / 110 / 106.5 |
| SAC min / max / avg | 0.4062 / 0.5938 / 0.5100 | 0.3750 / 0.6094 / 0.5010 |
| BIC nonlinearity avg / BIC-SAC avg | 104.50 / 0.5003 | 103.07 / 0.5022 |
| differential probability | 12/256 = 0.0469 | 0.0391 |

The figures are of the same order, but not identical, since the tables
differ.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT` line. The
reference model (`tb/pmls_ref_pkg.sv`) re-derives the fixed-point
arithmetic with plain 64-bit integers. It also contains a double-precision
Lorenz integrator and integer-division versions of the byte extraction and
the selection tables.

| testbench | what it checks |
|---|---|
| `lorenz_deriv_tb` | vector field, bit-exact, and against the real-valued field, over 2000 random states |
| `lorenz_rk4_tb` | 8,000 RK4 steps bit-exact; 300 against double precision; 4-clock spacing; stall; reload |
| `mod256_unit_tb` | byte extraction for both signs and at step edges; latency; hold; flush |
| `pmls_selector_tb` | both layers against the tables; every reachable select code |
| `sbox_store_tb` | repeat rejection, counts, full, writes after full, readback, permutation, clear |
| `pmls_ctrl_tb` | discard window, restart with r + R_STEP, fail, early done |
| `pmls_sbox_top_tb` | end to end: default instance run twice, plus a short-attempt instance that restarts and fails. Every byte, select code, outcome and table entry is checked, and each mechanism must occur |
| `pmls_sbox_top_full_tb` | one complete generation at the default parameters |
| `pmls_sbox_analysis_tb` | S-box criteria above; generated table must be bijective |

Simulate any of them with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module pmls_sbox_top_tb \
    -y rtl -y tb +libext+.sv rtl/pmls_pkg.sv tb/pmls_ref_pkg.sv tb/pmls_sbox_top_tb.sv
./obj_dir/Vpmls_sbox_top_tb
```

The package files must come first on the command line; `-y` finds the
modules. Drop `tb/pmls_ref_pkg.sv` for the testbenches that do not import
it (`sbox_store_tb`, `pmls_ctrl_tb`, `pmls_sbox_analysis_tb`). Each run
takes a few seconds at most.

## Files

| file | content |
|---|---|
| `rtl/pmls_pkg.sv` | formats, types, default constants, fixed-point helpers |
| `rtl/lorenz_deriv.sv` | Lorenz vector field (combinational) |
| `rtl/lorenz_rk4.sv` | RK4 Lorenz generator |
| `rtl/mod256_unit.sv` | Mod(256) byte extraction, three channels |
| `rtl/layer_mux.sv` | one table-configured 3-input multiplexer |
| `rtl/pmls_selector.sv` | select logic and two multiplexer layers |
| `rtl/sbox_store.sv` | S-box table with repeat rejection and lookup port |
| `rtl/pmls_ctrl.sv` | generation sequencer |
| `rtl/pmls_sbox_top.sv` | top level |
| `tb/*` | testbenches, reference model, end-to-end harness |
