# Stochastic inner-product and mean circuits on one random source

Stochastic computing encodes a number in [0, 1] as the fraction of ones in
a bitstream, so a multiply is an AND gate and a weighted sum is a
multiplexer. The usual multiplexer needs select streams that are
uncorrelated with its data streams, and each of those needs its own random
number source (RNS). Those sources make up most of the hardware.

This RTL computes weighted sums and averages of N inputs with a single
RNS. It does so by using correlation rather than avoiding it. It contains:

- `sipc_unipolar`, `sipc_bipolar`: stochastic inner-product circuits (SIPC),
  F = sum_i w_i * Y_i with w_i = X_i / sum|X|, in unipolar (values in [0, 1])
  and bipolar (values in [-1, 1]) coding;
- `smc_unipolar`, `smc_bipolar`: stochastic mean circuits (SMC), the SIPCs
  with all weights equal to 1/N;
- `sc_filter_top`: a 3x3 image-window processor. It runs a Gaussian filter,
  Sobel edge detection and a mean filter on these circuits, side by side.

The circuits follow the article "Stochastic Mean Circuits Based on
Inner-Product Units Using Correlated Bitstreams". The window processor
and its control are this implementation's own, built around those
circuits.

## How one random number makes N mutually exclusive selectors

This is the central trick, and the rest of the design depends on it.

A stochastic number generator (SNG, `sng`) compares a binary B with a
random R each cycle and outputs 1 when B > R. With R uniform over
0..2^K-1, the stream has probability B/2^K. Several SNGs that share the
same R (`sng_corr_bank`) produce maximally positively correlated streams.
Whenever the stream with the smaller B is 1, every stream with a larger B
is 1 too.

Give the N SNGs the running sums of the weights, scaled to 2^K:

    cum_thr[i] = round(2^K * (|X_1| + ... + |X_{i+1}|) / S),   S = sum |X|,  cum_thr[N-1] = 2^K

Stream c_i is then 1 exactly when R < cum_thr[i]. The XOR of neighbours,
x_i = c_i XOR c_{i-1}, is 1 exactly when cum_thr[i-1] <= R < cum_thr[i].
The N intervals tile 0..2^K-1, so in every cycle **exactly one** x_i is 1,
with probability |X_i| / S. The x_i are the select signals of an N-input
multiplexer, built from N comparators and N-1 XOR gates. An assertion in
both SIPCs checks that the selectors are one-hot-or-zero.

The data inputs Y_i pass through N more SNGs. These are fed with the same
R, but with its bits in reversed order. The reversed value is close to
uncorrelated with R, so it is also close to uncorrelated with the
selectors. AND gates multiply x_i by y_i. The products are mutually
exclusive, so one OR gate adds them exactly:

    f = OR_i ( x_i AND y_i ),      P(f) = sum_i (|X_i|/S) * P(y_i)

Example, the 3x3 Gaussian kernel [1 2 1; 2 4 2; 1 2 1]/16 with K = 8. The
running sums 1,3,4,6,10,12,13,15,16 give thresholds 16, 48, 64, 96, 160,
192, 208, 240, 256. The centre pixel is selected whenever 96 <= R < 160,
a quarter of the time.

Bipolar coding (`sipc_bipolar`) represents A in [-1, 1] by probability
(A+1)/2. The selectors are built from the weight magnitudes. Each input
stream then passes an XNOR with a sign pin, which is 1 for a positive
weight and 0 for a negative one. In bipolar coding that XNOR multiplies
by +1 or -1. The port `neg` carries the inverted sign pins, so one circuit
serves any kernel. The OR of the selected streams then represents
sum_i sign(X_i) (|X_i|/S) Y_i.

The mean circuits are the SIPCs with constant thresholds
round(i * 2^K / N), for i = 1..N. For N = 9 and K = 8 each input owns an
interval of 28 or 29 of the 256 random values. The bipolar mean keeps its
sign pins as a port (`neg`), so it can also form signed averages. With
neg = 0 it is the same gate network as the unipolar mean, read in bipolar
coding.

What the caller supplies: the SIPCs take the **scaled running sums**, not
the raw weights. For a fixed kernel they are elaboration-time constants;
`sc_pkg::scaled_thr` and `sc_pkg::kernel_prefix_abs` compute them. The
division by S is not built in hardware.

## Random sources

`rns` selects one of two sources by parameter `KIND`:

- `lfsr_rns` (RNS_LFSR, default): a Fibonacci LFSR with a maximal-length
  polynomial. For K = 8 the polynomial is x^8+x^6+x^5+x^4+1, and the
  package holds a table for K = 3..16. An LFSR never outputs 0, so a
  2^K-cycle stream sees 2^K-1 distinct values plus one repeat. For K = 8 an
  input of 255 therefore gives 255 ones, not 256.
- `sobol_rns` (RNS_SOBOL): the first dimension of the Sobol sequence,
  generated in Gray-code order. It is built from a counter, a detector for
  the least-significant zero, direction vectors 2^(K-1-j) and an XOR
  register. In 2^K cycles it visits every value once, so a single circuit
  is exact to within rounding.

Both restart on `clear` and advance on `en`. Every SIPC and SMC contains
its own source. In `sc_filter_top` all sources start from the same seed.

## The window processor (`sc_filter_top`)

```
 start, pix[9], mean_b_neg ─► window regs ─┬─► sipc_unipolar (Gaussian /16) ──► sc_counter ─► gauss_cnt
                                           ├─► sobel_edge: sipc_bipolar Gx ─┬─► sc_counter ─► gx_cnt
                                           │              sc_abs_fsm ◄──────┘─► sc_counter ─► abs_gx_cnt
                                           │              sipc_bipolar Gy ─┬─► sc_counter ─► gy_cnt
                                           │              sc_abs_fsm ◄─────┘─► sc_counter ─► abs_gy_cnt
                                           ├─► smc_unipolar (mean /9)     ──► sc_counter ─► mean_u_cnt
                                           └─► smc_bipolar (signed mean)  ──► sc_counter ─► mean_b_cnt
 sc_eval_ctrl: clear (1 cycle) ─► en (2^K cycles) ─► done (1 cycle)
```

Protocol:

- Pulse `start` for one cycle with the nine pixels (row-major, index 4 is
  the centre) and the nine sign bits of the bipolar mean. Both are captured
  at that edge.
- `busy` rises. A `start` while busy is ignored.
- The run takes one clear cycle and then 2^K stream cycles.
- `done` pulses 2^K + 2 cycles after the start edge, which is 258 cycles
  for K = 8. The counts hold until the next start.

Reading the counts, where c is in 0..2^K:

| output | coding | value |
|---|---|---|
| `gauss_cnt` | unipolar | c/2^K = sum(kernel*pixel)/(16*2^K) |
| `mean_u_cnt` | unipolar | c/2^K = mean(pixel)/2^K |
| `gx_cnt`, `gy_cnt` | bipolar | 2c/2^K - 1 = 2*G/(8*2^K), with G the integer Sobel response |
| `abs_gx_cnt`, `abs_gy_cnt` | bipolar | 2c/2^K - 1 ≈ abs of the above |
| `mean_b_cnt` | bipolar | 2c/2^K - 1 = mean(s_i*(2p_i/2^K - 1)) |

Sobel uses the kernels [-1 0 1; -2 0 2; -1 0 1] and its transpose, scaled
by 1/8. The weights sum to zero, so the pixel offset of the bipolar coding
cancels out. `sc_abs_fsm` is a 16-state saturating up/down counter. It
moves up on 1 and down on 0. Its Moore output is 1 in the even states of
the lower half and in the odd states of the upper half. The output is
therefore mostly 1 at either end, which represents |A| near 1, and half
ones in the middle, which represents 0. The FSM starts in state 8 after
`clear`. Its output is registered, so it lags its input by one cycle.

`|Gx'|` and `|Gy'|` are brought out separately. How they combine into one
edge strength (a sum, a maximum, or a scaled sum by multiplexer) is left to
the user.

## Accuracy, as simulated

These figures come from the testbenches, with 2^K = 256-bit streams:

| circuit (LFSR, K = 8) | MSE over 20 random products |
|---|---|
| unipolar SIPC, 4 / 9 / 16 / 64 / 256 / 1024 inputs | 1.9e-5 / 2.9e-5 / 3.8e-5 / 1.9e-4 / 3.9e-4 / 4.0e-4 |
| unipolar SMC, 9 / 64 / 1024 inputs | 2.4e-5 / 4.8e-5 / 6.1e-4 |
| bipolar SIPC, 4 / 9 / 16 / 64 inputs | 7.2e-5 / 2.4e-4 / 1.9e-4 / 8.1e-4 |
| bipolar SMC (random signs), 64 inputs | 3.8e-4 |

Effect of source width K (stream length 2^K), 9 inputs, MSE over 40
random products:

| circuit | source | K = 4 | K = 6 | K = 8 | K = 10 |
|---|---|---|---|---|---|
| unipolar SIPC | LFSR | 4.2e-3 | 4.4e-4 | 4.4e-5 | 1.9e-6 |
| unipolar SIPC | Sobol | 4.0e-3 | 2.4e-4 | 2.0e-5 | 2.0e-6 |
| bipolar SIPC | LFSR | 2.3e-2 | 2.9e-3 | 2.8e-4 | 2.5e-5 |
| bipolar SIPC | Sobol | 3.0e-2 | 3.3e-3 | 3.0e-4 | 2.2e-5 |
| unipolar SMC | LFSR | 3.9e-3 | 5.0e-4 | 4.0e-5 | 3.1e-6 |
| unipolar SMC | Sobol | 5.6e-3 | 4.6e-4 | 2.6e-5 | 1.8e-6 |

The underlying gate arithmetic was also checked on its own:

- Two SNGs on one source feed an XOR, which gives |X - Y|.
- An SNG on r and one on ~r feed an OR, which gives min(X + Y, 1).

With the Sobol source both are exact for every K from 4 to 8. With the
LFSR, the missing r = 0 and one repeated value cost at most 1/2^K per
result: the MSE is 4e-4 at K = 4 and 0 in the 30 trials at K = 8. Every
pair has correlation |SCC| = 1. The article reports averages slightly
below 1 for 8-bit sources (0.9844 LFSR, 0.9923 Sobol), so its measurement
set-up evidently differs from this one.

The test image is 32x32 pixels with salt-and-pepper noise of density 0.01.
PSNR is measured against the exact filter, with peak value 1.0:

| source | Gaussian | mean | abs Gx' | abs Gy' |
|---|---|---|---|---|
| LFSR | 50.7 dB | 48.8 dB | 22.2 dB | 22.2 dB |
| Sobol | 56.1 dB | 50.8 dB | 14.5 dB | 9.8 dB |

The FSM-based absolute value needs its input's ones spread randomly in
time. The ordered Sobol sequence does not provide that, so use the LFSR
source for edge detection. The edge PSNRs compare each magnitude with its
exact value. The FSM's transient from its middle state over a 256-bit
stream limits them.

With K = 8 and N = 1024, the running sums resolve only 256 steps, and at
most 256 of 1024 equal weights receive a non-empty interval. The error
above is still small, because the rounding errors spread evenly.

## Choices not fixed by the article

- Inputs are K-bit binaries with probability b/2^K. Thresholds are K+1
  bits wide so that 1.0 (2^K) is exact, and they are rounded to the
  nearest 1/2^K.
- "An RNS with an inversed order" for the data SNGs is implemented as the
  bit reversal of the single shared source.
- The LFSR polynomial, the seed (1), the Sobol dimension (first) and the
  wrap after 2^K values.
- The abs FSM's output assignment and start state. The article gives only
  "16 states".
- The Gaussian and Sobel kernel values are the standard ones matching the
  scale factors 1/16 and 1/8.
- Control: every sequential block has `clear` and `en` and an asynchronous
  active-low reset. `sc_eval_ctrl` and the start/busy/done handshake are
  this implementation's own. Counters derandomize the outputs; the article
  only mentions them.
- Line buffering and image I/O are outside this RTL. A window is supplied
  per run.

## Files

`rtl/`: one module or package per file.

| file | content |
|---|---|
| `sc_pkg.sv` | `rns_kind_e`, defaults K = 8 and N = 9, kernels, LFSR tap table, threshold helpers |
| `lfsr_rns.sv`, `sobol_rns.sv`, `rns.sv` | random sources and the selector between them |
| `sng.sv`, `sng_corr_bank.sv` | comparator SNG and N SNGs sharing R |
| `sipc_unipolar.sv`, `sipc_bipolar.sv` | inner-product circuits |
| `smc_unipolar.sv`, `smc_bipolar.sv` | mean circuits |
| `sc_abs_fsm.sv`, `sc_counter.sv` | stochastic absolute value, derandomizer |
| `sobel_edge.sv`, `sc_eval_ctrl.sv`, `sc_filter_top.sv` | application unit, sequencer, top |

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each one
checks every output bit against an independent model in
`tb_sc_model_pkg.sv`, which replays the random source, and then checks
accuracy bounds against exact arithmetic. The other files:

- `tb_sc_filter_top.sv` runs the top at its default parameters over 24
  windows. It checks all seven counts exactly, the latency of 258 cycles,
  and that every mechanism occurs: ignored start, negative signs, negative
  and positive gradients, and the absolute-value fold.
- `tb_workload_images.sv`, `tb_workload_input_sweep.sv` (with helper
  `tb_sweep_unit.sv`) and `tb_workload_correlation.sv` produce the
  accuracy figures above.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/sc_pkg.sv tb/tb_sc_model_pkg.sv tb/tb_sc_filter_top.sv \
  --top-module tb_sc_filter_top
./obj_dir/Vtb_sc_filter_top
```

Replace `tb_sc_filter_top` with any other testbench name. Each testbench
runs in well under a second.

Parameters:

- `K`, the source width and stream length 2^K, is set on every module.
- `N` is the number of inputs of a SIPC or SMC.
- `KIND` selects the source.
- `SEED` sets the LFSR start value.
- `NS` sets the number of abs FSM states, which must be even.

The window processor is fixed at 3x3. To change a kernel, edit
`sc_pkg::GAUSS_KERNEL` or `SOBEL_X`/`SOBEL_Y`; the thresholds are derived
from the kernels at elaboration.
