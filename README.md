# Min-sum LDPC decoder with scaled variable-node update

This is a small, fully parallel hardware decoder for low-density parity-check
(LDPC) codes. It uses the min-sum message-passing algorithm. Noisy BPSK samples
go in. Out come the decoded bits, a flag saying whether they form a valid
codeword, and the soft a-posteriori values. The decoder repeats two message
updates until the hard decisions satisfy every parity check or an iteration
limit is reached:

* **Horizontal step.** Each check node takes the sign product and the
  smallest magnitude over its other neighbours.
* **Vertical step.** Each variable node adds its intrinsic value to
  alpha = 0.75 times the messages from its other checks.

Two update orders are built. The default, *flooding*, updates all checks and
then all variables. The *column-layered* option instead walks the columns of
`H` one per cycle, so later columns already use messages refreshed earlier in
the same iteration.

The default configuration is a 4-check, 6-variable example code. The design is
parameterised in the code's parity-check matrix `H`, so other small codes can
be decoded by overriding `M`, `N` and `H`.

## The algorithm in fixed point

Notation: `N(c)` is the set of variables on check `c`, and `M(v)` is the set of
checks on variable `v`.

| step | computed value |
|---|---|
| intrinsic | `Iv = 4 * alpha * y_v` |
| initialise | `Lcv = Iv` for every edge of `H` |
| horizontal | `Rcv = prod_{n in N(c)\v} sgn(Lcn) * min_{n in N(c)\v} abs(Lcn)` |
| vertical | `Lcv = Iv + alpha * sum_{m in M(v)\c} Rmv` |
| a-posteriori | `Lv = Iv + alpha * sum_{m in M(v)} Rmv` |
| hard decision | `bit_v = 1` if `Lv < 0`, else `0` |
| stop | all parity checks of `H` hold on the bits, or `MAX_ITER` iterations have run |

Every message is a signed 10-bit number with 5 fractional bits, in units of
1/32. Values are saturated to a symmetric range of ±511/32 ≈ ±15.97, so a
magnitude always fits. Received samples use the same 1/32 scale in 8 bits
(±3.97). Bit 0 is sent as +1 and bit 1 as −1.

alpha is `ALPHA_NUM / 2^ALPHA_SHIFT`, with a default of 3/4. A product with
alpha is formed as `(x * ALPHA_NUM) >>> ALPHA_SHIFT`, which rounds toward minus
infinity. The intrinsic scaling `4 * alpha = 3` is therefore exact.

**Check node unit (`cnu`).** The check node unit does not build a separate
exclusion tree for each output. It makes one pass over the row and finds:

* the smallest magnitude `min1` and its position;
* the second-smallest magnitude `min2`;
* the XOR of all sign bits.

The output at the position of `min1` gets `min2`, and every other output gets
`min1`. Each output's sign is the total sign XOR its own input's sign. A zero
input counts as positive. When two inputs tie for the minimum, the result is the
same as with a full exclusion, because `min2 = min1`.

**Variable node unit (`vnu`).** It forms the full sum `S` of its incoming `R`
messages once. Each outgoing message uses the extrinsic sum `S − Rcv`. `Lv`
uses `S` itself.

## Schedule and timing

The parameter `COLUMN_LAYERED` selects between two schedules.

### Flooding (`COLUMN_LAYERED = 0`, default)

All check nodes update together, then all variable nodes update together. Each
update takes one clock cycle:

```
cycle      0        1      2      3      4      5      6    ...  3k    3k+1
state    IDLE     HOR    VER    CHK    HOR    VER    CHK   ...  CHK   IDLE
         start&   R<=    L<=    parity R<=    L<=    parity     stop  done=1
         load I,L cnu    vnu    test   ...
```

* In the start cycle, `y` is scaled into `Iv`, and every `Lcv` is set to `Iv`.
* **HOR** registers the outputs of all check node units.
* **VER** registers:
  * all variable-to-check messages;
  * the `Lv` values (`llr`);
  * the hard decisions (`decoded`).
* **CHK** reads the syndrome of `decoded`. If it is zero, or if `k = MAX_ITER`,
  the decode ends. Otherwise the next iteration starts.

A decode of `k` iterations therefore raises `done` exactly `3k + 1` cycles after
the start cycle. The default `MAX_ITER = 10` gives at most 31 cycles.

### Column layered (`COLUMN_LAYERED = 1`)

An iteration takes `N` column cycles and then one check cycle. In the cycle for
column `v`:

1. The check node units read the variable-to-check messages **as they stand**.
   Columns `0 .. v-1` already hold this iteration's values.
2. The `R` messages they produce for column `v` go straight, in the same cycle,
   to the variable node unit of column `v`.
3. That unit's new `L` messages, its `Lv` and its hard bit are written back at
   the end of the cycle. The `R` messages of column `v` are kept too.

Information therefore travels through several columns within one iteration.
This usually lowers the number of iterations needed, at the cost of `N` cycles
per iteration in this fully parallel array. A decode of `k` iterations raises
`done` `(N+1)k + 1` cycles after the start cycle. The CNU-to-VNU path is
combinational within the column cycle.

### Both schedules

After `done`, the outputs `decoded`, `llr`, `syndrome`, `converged` and
`iterations` hold their values until the next `start`. A `start` pulse while
`busy` is ignored.

## Interface of `ldpc_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | sample `y` and begin a decode |
| `y[N]` | in | `Y_W` signed | received samples, 1/32 units |
| `busy` | out | 1 | decode in progress |
| `done` | out | 1 | one-cycle pulse when the decode ends |
| `converged` | out | 1 | the decode ended on a valid codeword |
| `iterations` | out | `$clog2(MAX_ITER+1)` | number of iterations used |
| `decoded` | out | `N` | hard decisions; bit `v` is variable node `v+1` |
| `llr[N]` | out | `W` signed | a-posteriori values `Lv` |
| `syndrome` | out | `M` | parity result of each check on `decoded` |

| parameter | default | meaning |
|---|---|---|
| `M`, `N` | 4, 6 | checks and variables |
| `H` | see below | parity-check matrix, `bit [0:M-1][0:N-1]`; `H[c][v]` = 1 when variable `v` is on check `c` |
| `Y_W`, `W` | 8, 10 | sample and message widths (5 fractional bits each) |
| `ALPHA_NUM`, `ALPHA_SHIFT` | 3, 2 | alpha = 3/4 |
| `MAX_ITER` | 10 | iteration limit |
| `COLUMN_LAYERED` | 0 | 0 = flooding, 1 = column-layered schedule |

The default `H` is shown below. It has rank 3, so the code has 8 codewords and
rate 1/2.

```
        v1 v2 v3 v4 v5 v6
check1   1  1  0  1  0  0
check2   0  1  1  0  1  0
check3   1  0  0  0  1  1
check4   0  0  1  1  0  1
```

## Worked example

Transmitted codeword: `0 0 1 0 1 1`.

Received samples: `−0.1 0.5 −0.8 1 −0.7 −0.5`. On the 1/32 grid these become
−3/32, 16/32, −26/32, 32/32, −22/32 and −16/32.

The decoder finds the codeword in one iteration. `done` rises 4 cycles after
`start`. The registered messages agree with a real-number hand calculation to
within the 1/32 rounding:

| message | real arithmetic | RTL |
|---|---|---|
| intrinsic `I1..I6` | −0.3 1.5 −2.4 3 −2.1 −1.5 | −0.281 1.5 −2.438 3 −2.063 −1.5 |
| `R11 R12 R14` | 1.5 −0.3 −0.3 | 1.5 −0.281 −0.281 |
| `R22 R23 R25` | 2.1 −1.5 −1.5 | 2.063 −1.5 −1.5 |
| `R31 R35 R36` | 1.5 0.3 0.3 | 1.5 0.281 0.281 |
| `R43 R44 R46` | −1.5 1.5 −2.4 | −1.5 1.5 −2.438 |
| `L11 L12 L14` | 0.825 3.075 4.125 | 0.844 3.031 4.125 |
| `L22 L23 L25` | 1.275 −3.525 −1.875 | 1.281 −3.563 −1.875 |
| `L31 L35 L36` | 0.825 −3.225 −3.3 | 0.844 −3.188 −3.344 |
| `L43 L44 L46` | −3.525 2.775 −1.275 | −3.563 2.781 −1.313 |
| `Lv` (formula below, real arithmetic) | 1.95 2.85 −4.65 3.9 −3.0 −3.075 | 1.969 2.813 −4.688 3.906 −3.0 −3.125 |
| bits | 0 0 1 0 1 1 | 0 0 1 0 1 1 |

## Where this design departs from, or adds to, its source description

* **Schedule.** The algorithm is presented under the name "column-layered
  min-sum". However, its pseudo code and its hand-worked example update all
  checks from the previous variable messages, then all variables. That is a
  flooding schedule. It is the default here because it reproduces the worked
  numbers.

  The column-by-column updating that the name refers to is the
  `COLUMN_LAYERED = 1` option. In that option a "column layer" is one column
  of `H`, because the example code has no block-column structure. With it,
  the example's messages differ from the hand calculation (for instance, `R12`
  uses the already updated `L11`). It still decodes the example in one
  iteration.
* **The a-posteriori value.** Two formulas disagree:
  * The published formula for `Lv` sums the check-to-variable messages `R`.
  * The hand-worked example instead adds alpha times the sum of the column's
    variable-to-check messages `L`. That gives 0.9375, 4.7625, −7.6875, 8.175,
    −5.925 and −4.93 for the example.

  The RTL follows the formula, summing over all checks of the variable. Both
  readings give the same hard decisions in the example. The iterative messages
  `Lcv` and `Rcv` do not depend on this choice.
* **alpha as a multiplier of the check sum.** The algorithm scales the summed
  check messages by alpha in the vertical step, which is not the usual
  normalised min-sum. It also uses alpha in the intrinsic scaling
  `4 * alpha * y`, which does not depend on the noise level. Both are kept as
  described.
* **Chosen here:** the word widths, the rounding and saturation, the fully
  parallel structure, the cycle schedules, the handshake, the reset, and
  `MAX_ITER = 10`. The algorithm leaves the iteration limit unspecified.
* **Not built:** the decoder for the rate-7/8 code with block length 4096
  (3584 information bits, 512 checks), which is the code used for the
  bit-error-rate results. Its parity-check matrix is not published with the
  algorithm, so it cannot be supplied as `H`. For the same reason, the
  published BER figures for that code (0.135 at 1 dB down to 0.075 at 20 dB)
  cannot be reproduced. `tb_ldpc_ber` runs the same SNR points on the example
  code instead.
* **Also not built:** two features described for column-layered decoders:
  * starting to decode while the samples of later columns are still arriving
    (here all `N` samples are loaded in the start cycle);
  * arithmetic optimisation of the variable node adders for the critical path
    (the adders here are plain).

  The RTL is generic in `H`, but it creates one register per matrix entry
  (`M × N` pairs, most of them constant zero and removed by synthesis). For a
  code of that size a partially parallel architecture with message memories
  would be the practical choice. That architecture is not part of this design.

## Files

| file | content |
|---|---|
| `rtl/ldpc_pkg.sv` | widths, alpha, `MAX_ITER`, the example `H`, state type |
| `rtl/ldpc_decoder.sv` | top: message registers, one `cnu` per row, one `vnu` per column, `intrinsic_gen` per sample |
| `rtl/cnu.sv` | check node unit (min1/min2) |
| `rtl/vnu.sv` | variable node unit and hard decision |
| `rtl/intrinsic_gen.sv` | `Iv = 4 * alpha * y` with saturation |
| `rtl/syndrome_check.sv` | parity test of the hard decisions |
| `rtl/ldpc_ctrl.sv` | sequencer: load, horizontal, vertical, check; iteration count; assertions |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ldpc_column_layered.sv` and `tb_ldpc_ber.sv` |

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=F`.

* **`tb_ldpc_decoder`** runs the top at its default parameters. It first checks
  the worked example: the bits, 1 iteration, a 4-cycle latency, and every
  `R`/`L` message within 0.2. It then runs 3000 random codewords through
  uniform noise and compares the decoder against a reference model written in
  the testbench. That model computes every edge by brute force, without the
  min1/min2 shortcut. The comparison covers the bits, `Lv`, the iteration count,
  the converged flag, the syndrome, and the `3k+1` latency.

  The testbench counts five mechanisms and fails if any never happens:
  * a stop after one iteration;
  * a stop after several iterations;
  * a stop at the iteration limit without a codeword;
  * a saturated message;
  * a start ignored while busy.
* **`tb_cnu`** and **`tb_vnu`** compare each unit with an edge-by-edge reference
  on the example's values and on 20 000 random vectors. The `tb_vnu` vectors
  include saturation.
* **`tb_intrinsic_gen`** tests every possible 8-bit sample.
* **`tb_syndrome_check`** tests all 64 words and expects exactly 8 codewords.
* **`tb_ldpc_column_layered`** runs the same kind of test with
  `COLUMN_LAYERED = 1`. Its reference model updates column by column, and the
  test compares every stored `R` and `L` message exactly, as well as the
  `(N+1)k+1` latency.
* **`tb_ldpc_ctrl`** checks the strobes, `done`, `iterations` and `converged`
  cycle by cycle in both schedules, for stops in iterations 1 to 10 and for
  non-convergence.
* **`tb_ldpc_ber`** sends random codewords of the example code as BPSK through
  Gaussian noise (Box–Muller) at 1, 5, 10, 15 and 20 dB. SNR is taken as Eb/N0
  at rate 1/2. The testbench prints the decoded BER next to the BER of a plain
  sign decision. It checks that the BER never rises with SNR, that decoding is
  never worse than the sign decision by more than 0.01, and that there are no errors at 20 dB.
  A typical run gives a decoded BER of 0.056, 0.003, 0, 0, 0 against a
  sign-decision BER of 0.13, 0.039, 0.0007, 0, 0.

To simulate one of them with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl --top-module tb_ldpc_decoder \
    rtl/ldpc_pkg.sv rtl/*.sv tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

Each test finishes in well under a second.

## Changing the design

* **Another code:** override `M`, `N` and `H`. `H` is written row by row, with
  the leftmost bit being variable 1. The testbenches other than `tb_cnu`,
  `tb_vnu` and `tb_intrinsic_gen` hard-code the example matrix.
* **Wider messages or a different alpha:** change `W`, `Y_W`, `ALPHA_NUM` and
  `ALPHA_SHIFT`. All message arithmetic sizes itself from these.
* **Iteration limit:** `MAX_ITER`. The `iterations` port width follows it.
