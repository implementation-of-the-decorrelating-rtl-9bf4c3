# DECOR FIR filter core

A sequential 73-tap FIR filter that spends less power in its multiplier by feeding it
*differences* of the filter coefficients instead of the coefficients themselves.

The filter computes `Y_j = sum_{k=0}^{72} c_k X_{j-k}` with one multiplier-accumulator (MAC),
one product per clock. Neighbouring coefficients of a smooth low-pass response are close to
each other, so their differences are small numbers. The decorrelating (DECOR) transformation
uses this fact. It multiplies and divides the transfer function by `(1 - z^-1)^M`:

* The numerator is folded into the coefficients. They become the M-th order differences
  `d_k = sum_{i=0}^{M} (-1)^i binom(M,i) c_{k-i}`, for `k = 0 .. 72+M`. There are M more of
  them, and they need fewer bits.
* The denominator becomes a recursion on past outputs:
  `Y_j = sum_k d_k X_{j-k} + sum_{i=1}^{M} (-1)^(i+1) binom(M,i) Y_{j-i}`.
  For M = 2 this adds `2Y_{j-1} - Y_{j-2}`; for M = 3 it adds `3Y_{j-1} - 3Y_{j-2} + Y_{j-3}`.

The frequency response does not change. Integer arithmetic is exact, so every output equals the
direct-form output bit for bit (see "Exactness" below). What changes is the multiplier. With
16-bit data and Q15 coefficients, the coefficient operand needs these widths:

| order M | products per output | coefficient width | block after the MAC |
|---|---|---|---|
| 0 (conventional) | 73 | 16 bits | none |
| 1 | 74 | 10 bits | none (the accumulator is never cleared) |
| 2 | 75 | 8 bits | DECOR_BACK, 2 registers |
| 3 (default) | 76 | 7 bits | DECOR_BACK, 3 registers |
| 4 | 77 | 8 bits | DECOR_BACK, 4 registers |

The widths come from this design's coefficient set. Beyond third order, the rounding noise in
the Q15 coefficients stops the differences from shrinking. So fourth order gives wider
operands than third order, not narrower ones. The RTL computes each width at elaboration
(`fir_pkg::coef_width`).

The price of DECOR is M extra products per output. For M >= 2 there is also a small block,
DECOR_BACK, that keeps the last M outputs and adds their weighted sum.

## Datapath

```
 x_in ─► X_RAM ─► GAMMA_MEM ─16─┐
                                 ├─► MAC (16 x COEF_W mult, 32-bit add/acc, clear mux)
 B_COEFF_ROM ─► BETA_MEM ─COEF_W┘        │ 32
                                  [DECOR_BACK, M >= 2] │ bits 30..14 (17)
                                          ROUND ─16─► OUT_STORE ─► y_out
 CONTROL: tap counter, load/clear/strobe signals, input handshake
```

| module | block | what it does |
|---|---|---|
| `fir_pkg` | – | word lengths, the 73 base coefficients, and constant functions `binom`, `diff_coef`, `coef_width`, `back_weight` |
| `fir_control` | CONTROL | tap counter `0..L-1` (`L = 73+M`), operand load enable, MAC enable and clear, result strobes, input valid/ready |
| `fir_x_ram` | X_RAM | circular buffer of `L` samples in a latch bank (flip-flops optional). Write demultiplexer plus read multiplexer. Read by age: `tap = k` gives `X_{j-k}` |
| `fir_coeff_rom` | B_COEFF_ROM | constant table of `d_k`, built at elaboration from `fir_pkg` |
| `fir_beta_mem` | BETA_MEM | register for the coefficient operand (`COEF_W` bits) |
| `fir_gamma_mem` | GAMMA_MEM | register for the data operand (16 bits) |
| `fir_mac` | MAC | `y <= x*h + (valid ? 0 : y)`. `CLEAR_EN=0` removes the clear multiplexer |
| `fir_decor_back` | DECOR_BACK | holds `Y_{j-1}..Y_{j-M}` and forms `Y_j = S_j + sum w_i Y_{j-i}` |
| `fir_round` | ROUND | 17 -> 16 bits, round half up, saturates the single overflow case |
| `fir_out_store` | OUT_STORE | output register plus a one-cycle valid flag |
| `fir_decor_top` | – | the core. Parameters `M` (0..4, default 3), `ALPHA` (default -1), `BETA` (default 1) |

Number formats: samples and base coefficients are Q15, so a product is Q30. The 32-bit
accumulator gets bits 30..14 handed to ROUND: the Q15 result plus one rounding bit.
Bit 31 is dropped, so an output outside [-1, 1) wraps. The filter's worst-case gain
(sum of |c_k|) is about 1.38. Random full-scale input almost never reaches that.

## How the order changes the structure

* **M = 0** is the conventional direct-form core. It has 16-bit coefficients and the MAC clears
  at the first product of every output.
* **M = 1** needs only `Y_{j-1}`, and the accumulator already holds it. So the MAC is built
  without its clear multiplexer (`CLEAR_EN = 0`). It keeps summing across outputs, and the
  running sum after the 74th product of sample j is `Y_j`. There is no DECOR_BACK.
* **M >= 2** clears the accumulator at the first product of each output. The sum `S_j` then
  goes to DECOR_BACK. DECOR_BACK adds the binomially weighted past outputs with
  constant-weight adders and stores `Y_j`.

## Other filter types: ALPHA and BETA

The general transform is `T(z) = (1 + ALPHA z^-BETA)^M`. ALPHA is +1 or -1 and BETA >= 1.
They are chosen to suit the filter's spectrum. A low-pass filter has neighbouring coefficients
close together, so it uses ALPHA = -1, BETA = 1, which are the defaults. In general:

* The coefficients become `d_k = sum_i binom(M,i) ALPHA^i c_{k - BETA*i}`.
* The recursion becomes `Y_j = S_j - sum_i binom(M,i) ALPHA^i Y_{j - BETA*i}`.
* There are `73 + BETA*M` products per output.
* DECOR_BACK keeps `BETA*M` past outputs.

The accumulator-only shortcut applies to one case only: first order with ALPHA = -1 and
BETA = 1. In every other case of order M >= 1 the core uses DECOR_BACK. The built-in
coefficient table is low-pass, so other ALPHA/BETA settings still give exact outputs but no
narrower coefficients. They pay off only after `BASE_COEF` is replaced with a filter of the
matching kind.

## Exactness

DECOR_BACK and the M = 1 accumulator keep past outputs at the full 32-bit precision, not the
rounded 16-bit outputs. All sums are taken modulo 2^32. The recursion is an exact integer
identity, so `Y_j` equals `sum c_k X_{j-k}` modulo 2^32, provided the history starts at zero.
Reset therefore clears X_RAM, the accumulator and the DECOR_BACK registers. Do not preload
any of them independently of the others. In particular, a history filled while the recursion
was not running would make every later output wrong, and the error would never decay. The
recursion has poles on the unit circle, so nothing damps such an error.

## Timing

Every output takes `L = 73 + M` clock cycles (`73 + BETA*M` in general): one per product,
with a single MAC.

* A sample is taken in a cycle where `in_valid` and `in_ready` are both high. `in_ready` is
  high while the core is idle, and in the cycle that reads the last tap.
* If samples are always offered, one is taken every `L` cycles. At 100 MHz and M = 3 that is
  1.32 Msamples/s.
* Stages after acceptance:
  * Cycles 1..L: operand reads, with the tap counter running.
  * Cycles 2..L+1: the MAC accumulates. It clears on the first product.
  * Cycle L+2: the accumulator holds the sum.
  * Cycle L+3: DECOR_BACK holds `Y_j` (not for M = 0 or the first order low-pass core).
  * OUT_STORE loads at the end of the next cycle.
* `y_valid` pulses for one cycle, L+4 cycles after the sample was taken (L+3 without
  DECOR_BACK).
  `y_out` holds the value until the next output.
* The result stages of one output overlap the first products of the next, so the stream has
  no gaps.

## Departures and choices

These points are not fixed by the DECOR method itself. They are choices of this implementation.

* **Coefficients.** The filter is a 73-tap low-pass with cutoff pi/10: a Hamming-windowed sinc,
  `h[n] = 0.1 sinc(0.1 (n-36)) (0.54 - 0.46 cos(2 pi n / 72))`, scaled by 2^15 and rounded
  (`fir_pkg::BASE_COEF`). To use another filter, replace that table. The ROM contents and the
  coefficient widths follow automatically.
* **X_RAM latch bank.** X_RAM's bank is made of latches, for power (`LATCH_BANK = 1`, the
  default). The write data and a one-hot word select are registered at the write edge. The
  selected word's latch is then open while the clock is low. A new sample is therefore
  readable from the falling edge of the following cycle, in time for GAMMA_MEM. In a netlist,
  `sel_q & ~clk` belongs in a clock-gating cell. `LATCH_BANK = 0` gives a plain flip-flop bank
  with the same cycle behaviour.
* **Handshake and output valid.** The core has a valid/ready input and a valid-pulse output.
  A bare core would have only a sample input, an output and a clock.
* **Reset.** An active-low asynchronous reset `rst_n` clears every register.
* **Rounding.** Round to nearest with ties toward +infinity. The one overflow case
  (`0xFFFF + 1`) saturates to +32767.
* **Fourth order.** It uses the same binomial pattern as orders 1-3: weights 4, -6, 4, -1.
* **Multiplier architecture.** The MAC writes a plain signed `*`. Carry-save, Booth/Wallace and
  similar architectures are a synthesis choice.
* **Overflow.** There is no saturation on the accumulator. The 17-bit window ignores bit 31.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fir_decor_top` | the default core (M = 3) end to end, with 1000 uniformly distributed random samples |
| `tb_fir_workloads` | M = 0, 1, 2, 3, 4 side by side, 1000 samples each |
| `tb_fir_general_transform` | `(1 + z^-1)^1` and `(1 - z^-2)^2`, end to end |
| `tb_fir_control` | every control output in every cycle against the acceptance schedule, for gapped and continuous input |
| `tb_fir_x_ram` | every age read back after each write, for both the latch bank and the flip-flop bank, including wrap-around and read-before-write |
| `tb_fir_coeff_rom` | ROM words and widths for M = 0..4, against differences formed by repeated first differencing |
| `tb_fir_mac` | clearing and non-clearing MAC against a 64-bit model |
| `tb_fir_decor_back` | M = 2, 3, 4 against M cascaded running sums (the inverse of `(1 - z^-1)^M`), so no binomial weights are involved. Also `(1 + z^-2)^2` against two cascaded sections |
| `tb_fir_round` | exhaustive, all 2^17 inputs |
| `tb_fir_beta_mem`, `tb_fir_gamma_mem`, `tb_fir_out_store` | random load/hold sequences |

The two end-to-end testbenches share `tb_fir_driver`. It compares every output with the
direct-form filter in `tb_fir_ref_pkg`. The reference never uses the differences or the
recursion. The driver also checks:

* latency and sample spacing;
* that each mechanism occurs: accumulator clears, DECOR_BACK updates, idle waits, back-to-back
  samples and rounded-up outputs.

The driver also reports how many bits of the coefficient operand toggle. In one run
(1000 samples) the counts were:

| M | coefficient operand bit toggles |
|---|---|
| 0 | 368k |
| 1 | 286k |
| 2 | 224k |
| 3 | 182k |
| 4 | 238k |

This activity is lowest at third order and rises again at fourth. That follows the operand
widths in the first table.

Simulating with Verilator (packages first):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fir_pkg.sv tb/tb_fir_ref_pkg.sv rtl/*.sv tb/tb_fir_driver.sv tb/tb_fir_decor_top.sv \
  --top-module tb_fir_decor_top -Mdir obj && ./obj/Vtb_fir_decor_top
```

Swap the last testbench file and `--top-module` to run another testbench. The unit testbenches
do not need `tb_fir_driver.sv`. The full run of `tb_fir_workloads` takes well under a second.

## Limits

* Power, area and timing depend on the cell library, the multiplier architecture and the
  layout. This RTL cannot show them. The toggle counts above are only a proxy for
  multiplier activity.
* The 100 MHz / 10 ns timing target is not checked here. The critical path is the 16 x COEF_W
  multiply plus the 32-bit add in one cycle.
