# A reconfigurable rotation-based DSP engine

Many front-end DSP kernels share the same core operation: a 2x2 plane rotation with scaling. Examples are FIR and QMF lattice filters, IIR (ARMA) filters built from second-order sections, time-recursive discrete transforms (DCT, DST, MLT, DFT, DHT) and the QR-decomposition-based least-squares lattice (QRD-LSL) adaptive filter. This engine uses that fact. It is an array of `P` identical *programmable modules* plus one *reconfigurable interconnection network*. A host loads each module's switches and coefficients and chooses one of nine network types. The same hardware then runs any of those functions, fully pipelined: each module holds one lattice section, one second-order IIR half-section, one transform coefficient or one QRD-LSL cell.

Throughput does not depend on the filter order or transform size. A larger problem uses more modules, not more cycles per sample. In a multirate mode the array steps only once per two input samples, so a module clocked at a given rate serves twice that sample rate.

The RTL is synthesizable SystemVerilog with a default of `P = 12` modules. That covers all of the published design examples as their settings tables give them. A multirate 8-point DCT would take 16 modules (see *Sizes*).

## Files

| file | contents |
|---|---|
| `rtl/dsp_pkg.sv` | word lengths, configuration structs and enums, fixed-point multiply |
| `rtl/rotation_circuit.sv` | 4-multiplier circular/hyperbolic rotation |
| `rtl/cordic_processor.sv` | CORDIC with angle-accumulation and vector-rotation modes |
| `rtl/programmable_module.sv` | the unified module (switches, scaling, pipeline, feedback, kernel) |
| `rtl/interconnection_network.sv` | routing for network types I-IX |
| `rtl/downsampling_circuit.sv` / `rtl/upsampling_circuit.sv` | multirate pre/post-processing |
| `rtl/dsp_engine.sv` | top level: configuration registers, step control, array, network |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_dsp_engine` runs the whole engine; `tb_dsp_engine_p16` runs a 16-module engine |

## The programmable module

```
 in  --s0--> [z^-1 if s2] --*f0--|reg|--(+ fb0 if s4)--+--> rotation --*r--> out
 in' --s1--> [z^-1 if s3] --*f1--|reg|--(+ fb1 if s5)--+    kernel   --*r--+--s6--> out'
                   \______________ direct path ______|reg|______________/
 fb0 = out one step ago, fb1 = lower kernel output (after r) one step ago
```

A module has seven switches. They are written here as a string `[s0 s1 s2 s3 s4 s5 s6]`.

| switch | effect |
|---|---|
| s0, s1 | input selection: `00` both branches take `in`, `01` straight, `10` swapped |
| s2, s3 | insert a one-sample delay in the upper/lower branch |
| s4, s5 | close the upper/lower feedback loop (recursive functions) |
| s6 | `out'` takes the delayed lower input directly (QRD-LSL angle computer) |

The kernel is one of two circuits:
- **Multiplier rotation circuit.** Applies `[[c, s], [-s, c]]` (circular) or `[[c, s], [s, c]]` (hyperbolic).
- **CORDIC.** In *angle accumulation* mode it turns the vector onto the x axis and outputs the micro-rotation directions `mu`. In *vector rotation* mode it applies a given `mu`. That `mu` comes either from the neighbouring module (`mu_in`, QRD-LSL) or, with `mu_host` set, from a fixed direction word `mu` in the module's configuration. The fixed word lets any circular-rotation function run on the CORDIC kernel. Bit 1 means counter-clockwise, so the multiplier rotation by `theta` corresponds to the CORDIC word for `-theta`. The usable range is about ±99 degrees; a larger angle is reached with `r = -1` and `theta - pi`.

One register stage after the scaling multipliers splits the critical path. The module advances only when `en` is high. Its outputs come straight from its registers, so every module adds one step of latency and there is no combinational path through a module.

### Roles and settings

The host computes every number below. The testbenches contain the same computations and can serve as worked examples.

- **FIR lattice section, |k| < 1** (`0101000`, the first module `0001000`).
  - Settings: `f0 = f1 = sqrt(1-k^2)`, hyperbolic, `theta = atanh(-k)`, `r = 1`.
  - Result: `out = x(n) - k x'(n-1)` and `out' = -k x(n) + x'(n-1)`.
- **FIR lattice section, |k| > 1** (`1010000`). The same section equations, computed through a hyperbolic rotation of the swapped input pair.
  - Settings: `f = -sign(k) sqrt(k^2-1)`, `theta = atanh(-1/k)`.
  - The delay has to stay with `x'`, which after the swap runs in the upper branch, hence `s2 = 1`.
  - The published switch table gives `100100` for this case, which delays the other input. With this module that setting computes `out = -k x'(n) + x(n-1)` and does not reproduce the published 9th-order example. `1010000` does, to 0.1%.
- **QMF lattice bank** (two-channel paraunitary).
  - Every section uses a circular rotation by `theta_i` with `f = r = 1`. The first module in the chain has no delay (`0100000`); all others use `0101000`.
  - Analysis runs in `IN_POLY` mode: the array receives `x(2k)` and `-x(2k-1)` and delivers the subbands `v0`, `v1` on `y[0]`, `y[1]`.
  - Synthesis uses the same angles in reverse order, again with the first module delay-free. The host feeds `v1(k), v0(k)` as a pair in `IN_BLOCK` mode (`v1` on the upper input). It then forms the output as `y(2k) = -y[0]` and `y(2k+1) = y[1]`.
  - Analysis followed by synthesis returns the input delayed by `2N-1` samples plus the pipeline latency of both banks.
- **IIR section.** Each second-order section `H_i(z) = c_i + z^-1 A_i(z)` uses two modules:
  - The gain module (`0000000`) sets `f0 = c_i`.
  - `A_i(z) = (d' + e' z^-1)/(1 + a z^-1 + b z^-2)` uses `0011110` with `r = sqrt(b)` and `theta = acos(-a/(2r))` (complex poles).
  - It also sets `k0 = -e'/r^2` and `k1 = (d'/r - k0 cos theta)/sin theta` on `f0`, `f1`.
- **Transform coefficient k** (`0000110`). The module runs the recursion `v(n) = R(2 omega) v(n-1) + f x(n)`.
  - Settings: `f0 = beta cos((2L+1) omega + eta)` and `f1 = beta sin((2L+1) omega + eta)`.
  - After the L samples of a block, `out` and `out'` hold `X_C(k) = beta sum cos((2n+1)omega+eta) x(n)` and `X_S(k)` (the same sum with sin).
  - The constants per transform are:

| transform | omega | eta | beta |
|---|---|---|---|
| DCT-II, N = L points | `k pi/(2N)` | 0 | `sqrt(1/N)` (k=0), `sqrt(2/N)` |
| IDCT, N points | `pi/(2N) (k + 1/2)` | `-omega` | `sqrt(2/N)`; the host adds `(sqrt(1/N) - sqrt(2/N)) x(0)` |
| DST-IV / IDST-IV, N points | `pi/(2N) (k + 1/2)` | 0 | `sqrt(2/N)`; the result is `X_S(k)` |
| DFT, DHT | `-k pi/N` | `-omega` | `1/sqrt(N)` |
| MLT, L = 2N | `pi k/(2N)` | `pi/2 (k + 1/2)` | `1/sqrt(2N)` |

- **QRD-LSL.** The angle computer (`0100101`, CORDIC angle accumulation, `f0 = 0`, `f1 = 1`) keeps a running energy `E(n) = sqrt(E(n-1)^2 + x^2)`. It passes `x` on through the direct path and sends its rotation on `mu_out`. The rotator (`0100100`, CORDIC vector rotation) applies that rotation to its own state and input.

## The interconnection network

The network is purely combinational. `N` is the programmed order or block size.

| type | function | routing |
|---|---|---|
| I | FIR / QMF | cascade `in_{m+1} = out_m`, `in'_{m+1} = out'_m`; `y = out_{N-1}` (QMF: second input on `in'_0`, second band on `y[1]`) |
| II | multirate FIR | three sub-cascades interleaved: `in_i = x_i` (i < 3), `in_{m+3} = out_m`; `y_i = out_{3N/2-3+i}` |
| III | IIR | `in_0 = in_1 = x`, `in_{m+2} = out_{2[m/2]} + out_{2[m/2]+1}` |
| IV | multirate IIR | as III for three subfilters; stage i of subfilter j on modules `6i+2j`, `6i+2j+1` |
| V | DCT/IDCT | `X(k) = C_k` |
| VI | MLT | `X(k) = -s_k (C_{k+1} + S_k)`, sign pattern `+ - - +` |
| VII | DFT | `Re X(k) = C_k`, `Im X(k) = S_k` |
| VIII | DHT | `X(k) = C_k + S_k` |
| IX | QRD-LSL | lower cascade `in'_{m+2} = out'_m`, 4 modules per stage, `mu` exchanged inside each group of four; `f = out'_{4N-2}`, `b = out'_{4N-1}` |

For types V-VIII, `C_k = out_k` and `S_k = out'_k`. Type V brings out only `C_k`. A DST-IV, whose result is `S_k`, is read from the imaginary outputs `xb` of Type VII. With `multirate` set, `C_k = out_{2k} + out_{2k+1}` instead: module 2k sees the even samples and module 2k+1 the odd samples, each with a rotation of `4 omega`.

## Multirate operation

The multirate FIR/IIR modes use the fast-FIR structure. A filter is split into its polyphase parts, `H(z) = H0(z^2) + z^-1 H1(z^2)`, and three half-rate subfilters run in parallel: `H0`, `H0 + H1` and `H1`. Each subfilter is an ordinary lattice or IIR cascade, which the host designs.

With `a = x(2k)` and `b = x(2k-1)`:
- The downsampling circuit feeds the subfilters `a - b`, `b` and `a(k-1) - b`.
- The upsampling circuit forms `y(2k-1) = y2 + y1` and `y(2k) = y0 + y1` and sends them out serially on `ys`.

This pair reproduces `y = H x` exactly. The multirate IIR uses the same circuit, with the three subfilters computed by the host from the polyphase split of `H`.

All three subfilters must carry the same delay. A uniform extra delay only adds latency. A second-order IIR section `c + z^-1 A(z)` may realize a first-order factor either as `c = 1` plus the remainder in `A`, or as `c = 0` with the whole factor in `A`. The second form adds one step of delay, so it must be used in the same sections of all three subfilters or in none.

## Operating the engine

1. **Initialization.** Pulse `cfg_we` with `cfg_addr = i` and a `module_cfg_t` for each module. Write the network type, order and multirate flag with `net_we`. Write the input mode and block length with `eng_we`. Pulse `sync` to start pairing and block counting from the next sample.
2. **Execution.** Drive `in_valid`/`x_in` with one sample per clock at most.
   - In `IN_DIRECT` mode every sample is one array step.
   - In `IN_FFA` (multirate FIR/IIR), `IN_POLY` (QMF analysis polyphase pair `x(2k)`, `-x(2k-1)`) and `IN_BLOCK` (plain pair: multirate transform, QMF synthesis) modes, the array steps on the second sample of each pair.
3. **Results.**
   - `y_valid`/`y[]` follow each step by one clock.
   - `ys_valid`/`ys` give the full-rate multirate filter output.
   - When `blk_len` (counted in array steps) is non-zero, the first step of every block clears all feedback registers. `x_valid` marks the clock after the last step of a block; `xa`/`xb` then hold all coefficients in parallel. Blocks can follow each other with no gap.

Latency is one step per module on the signal path:
- An order-N FIR cascade shows `y(n)` on the `N-1`-th step after the one that took `x(n)`.
- A 5-section IIR cascade shows it after 4 steps.
- In the multirate FIR/IIR modes `ys` lags the input by `2(S-1)+1` samples, for `S` sections per subfilter.

## Number formats and accuracy

- Samples are 24-bit signed integers (`DW`).
- Coefficients are 24-bit with 16 fraction bits (`CW`, `CFRAC`), so their range is +/-128.
- Products are rounded to nearest once per multiplier stage. Sums wrap.
- The CORDIC has 16 unrolled iterations (`CORDIC_W`), with its gain removed by a constant multiplication.

The host must scale inputs so that intermediate values fit. Lattice sections with |k| > 1 amplify signals.

Because samples are integers, where a subfilter's leading-coefficient gain goes matters. Take the `H0 + H1` subfilter of the 9th-order example, which starts with 0.1157 and has a later section of gain 84. Putting 0.1157 on the first section makes the rounding error of the shrunken signal grow 84-fold, to about 1.5 % of the output. The testbench therefore applies each subfilter's gain in its last section. The result is the same filter at full precision.

## Sizes

`P = 12` holds:
- FIR, QMF, IIR, DCT, DFT and DHT up to order or size 12, and MLT up to 11.
- Multirate FIR of order 8 and multirate IIR of order 4.
- A multirate transform of 6 points.
- QRD-LSL with 3 stages.

The original design examples use a ten-module engine for the single-rate cases and twelve modules for the multirate cases. A multirate DCT takes two modules per coefficient. The published multirate DCT example's settings, a 4-point transform on 8 modules, fit the default. A multirate 8-point DCT needs 16 modules; set `P = 16`, as `tb_dsp_engine_p16` does.

## Where this design makes its own choices

- Word lengths, rounding, reset behaviour and the host register interface are this design's choices; the architecture fixes none of them.
- The block counter that clears feedback state between transform blocks replaces a host-driven reset.
- Each module contains both kernels (rotation circuit and CORDIC), chosen by one configuration bit. The architecture allows either.
- A fixed CORDIC rotation takes its direction word from the module's configuration (`mu_host`, `mu`). The architecture says only that a CORDIC is driven by a sequence of directions, not where a fixed sequence comes from.
- The direct path and `mu` are registered along with the pipeline stage, so all module outputs stay aligned.
- The multirate IIR module mapping follows the network's routing rule: stage `i` of subfilter `j` on modules `6i+2j` and `6i+2j+1`.
- For |k| > 1 lattice sections the host must load `1010000`, not the published `100100` (see *Roles and settings*). The module hardware itself is unchanged.
- The published settings of the order-4 multirate IIR example work as printed except for the pair realizing the second section of `H1'`. There `c = 0` delays `H1'` alone (see *Multirate operation*). With that pair as `c = 1`, `A = (0.0941 - 0.1785 z^-1)/(1 - 0.0001 z^-1 + 0.1785 z^-2)`, the engine reproduces the full-rate filter.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`. Each one has a watchdog.

`tb_dsp_engine` runs the full-size engine (`P = 12`, no overrides). It acts as the host, computes all module settings itself and checks against real-arithmetic references:
- the 9th-order FIR lattice example, including two |k| > 1 sections, and its impulse response against the example's direct-form coefficients;
- the five-section IIR example;
- 8-point DCT, IDCT, DST-IV, DFT and DHT, and a 4-point MLT, over back-to-back blocks, including the timing of `x_valid`;
- a 6-point multirate DCT, and a 4-point multirate DCT and DHT (the DCT's scaling factors checked against the published settings);
- two multirate order-8 FIR filters against direct convolution: a random one, and the 9th-order example split into its polyphase parts. The latter's `H0 + H1` subfilter has sections with k = 1.08 and k = -84.1;
- the multirate order-4 IIR example against its polyphase form, and again from its published module settings (one pair corrected) against the full-rate filter;
- the 20-tap QMF bank: energy preservation of the analysis bank, the same subbands on the CORDIC kernel (fixed direction words) as on the multipliers, and perfect reconstruction through analysis followed by synthesis;
- a two-stage QRD-LSL against a step-by-step model;
- for the FIR, QMF, IIR and DCT examples, the register values the host computes against the published settings tables, cell by cell. The only difference is the |k| > 1 switch string described above.

`tb_dsp_engine_p16` sets `P = 16` and runs the multirate 8-point DCT over four back-to-back blocks. It checks the coefficients against the DCT definition, the `x_valid` timing, and one array step per two samples.

`tb_dsp_engine` also counts how often each mechanism occurred: every network type, multirate steps, |k| > 1 swaps, block clears, CORDIC angle accumulation, CORDIC fixed-angle rotation and the direct path. A mechanism that never occurs counts as a failure.

To simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_dsp_engine rtl/dsp_pkg.sv tb/tb_dsp_engine.sv
./obj_dir/Vtb_dsp_engine
```

## Not included

The host processor is not part of this RTL. Its work is parameter computation, feeding data and collecting results; the testbenches do it in behavioural code. The engine's configuration and data ports are its interface.

The extended lapped transform (ELT, block length 4N) fits the same module settings: `omega = pi/(2N) (k + 1/2)`, `eta = pi/2 (k + 1/2)`, `beta = 1/(2 sqrt(2N))`. Its combination `-X_S(k+1) + sqrt(2) X_C(k) + X_S(k-1)` is not one of the nine network types, however. Running it means reading `C_k` and `S_k` through Type VII and combining them in the host. That path is not tested.
