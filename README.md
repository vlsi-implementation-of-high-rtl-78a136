# Multiplier-less LMS adaptive filter with an APC-OMS lookup-table multiplier

An adaptive FIR filter changes its weights until its output follows a desired
signal. For noise cancellation or system identification you feed it the input
`x(n)` and the reference `d(n)`. Each sample it forms `y(n) = sum_k w_k x(n-k)`
and the error `e(n) = d(n) - y(n)`, and applies the least-mean-squares (LMS)
update

    w_k(n+1) = w_k(n) + 2*mu * e(n) * x(n-k)

A direct implementation of a 16-tap filter needs 2N+1 = 33 multipliers. This
design uses none:

* **Filtering** splits every sample into radix-4 digits. A small
  partial-product generator per tap picks `0, w, 2w, 3w`. Adder trees sum the
  partial products of equal digit weight over all taps, and a shift-add tree
  combines the digit sums.
* **Weight update** multiplies by one and the same number, `e(n)`, for all
  taps. So a single lookup table is filled with multiples of `|e|` and every
  tap reads its product from it. The table is compressed with two tricks:
  **anti-symmetric product coding (APC)** and **odd-multiple storage (OMS)**.
  A 5-bit by W-bit multiplication then needs only nine stored words.

The design follows the architecture of G. Parthiban and P. Sathiya, "VLSI
Implementation of High Performance Distributed Arithmetic (DA) Based Adaptive
Filter with Fast Convergence Factor". That description gives the block
structure but few numbers. Widths, number format, step size, handshake and
sequencing are choices made here; they are listed under
[Departures and choices](#departures-and-choices).

## The APC-OMS LUT multiplier

This is the least obvious part (`apc_oms_mult` and the modules it uses). It
multiplies an unsigned 5-bit `X` by an unsigned W-bit coefficient `A`.

**Anti-symmetric coding.** The 31 non-zero products `A .. 31A` pair up
around `16A`:

    X = 16 + x'   (x4 = 1):  X*A = 16A + x'*A
    X = 16 - x'   (x4 = 0):  X*A = 16A - x'*A

Here `x'` is a 4-bit "APC address":

* `x' = X[3:0]` when `x4 = 1`;
* `x' = (16 - X[3:0]) mod 16` when `x4 = 0`.

Only the 16 magnitudes `0 .. 15A` are needed, plus a sign.

| X      | x4 | x'   | product        |
|--------|----|------|----------------|
| 00001  | 0  | 1111 | 16A - 15A = A  |
| 11111  | 1  | 1111 | 16A + 15A = 31A|
| 00111  | 0  | 1001 | 16A - 9A = 7A  |
| 10000  | 1  | 0000 | 16A + 0        |
| 00000  | 0  | 0000 | 16A - 16A = 0  |

**Odd-multiple storage.** Every non-zero `x'` is an odd number `2i+1`
shifted left by `s` places, where `s` is the number of trailing zeros of
`x'`. So only the eight odd multiples need storing:
`P_i = (2i+1)A` for i = 0..7, at addresses `0000..0111`. A barrel shifter
restores the even multiples:

| x'   | s | stored word | address |
|------|---|-------------|---------|
| 0001 | 0 | A           | 0000    |
| 0110 | 1 | 3A          | 0001    |
| 1100 | 2 | 3A          | 0001    |
| 1000 | 3 | A           | 0000    |
| 1111 | 0 | 15A         | 0111    |

**The two zero cases.** When `X[3:0] = 0000`, the address is `1000`, the
ninth word, which holds `2A`:

* For `X = 00000` the shift count is 3, giving `16A`. The sign stage forms
  `16A - 16A = 0`.
* For `X = 10000` the control circuit raises RESET (`x4 AND d3`). The table
  output is forced to zero, so the product is `16A + 0`.

**Data path.** These blocks run in order:

1. `apc_oms_ctrl`: `s = {s1,s0}`, the trailing zeros of `X[2:0]`, capped at
   3. Negating the low bits does not change their trailing zeros, so `s`
   comes straight from the raw input. It also forms RESET.
2. `apc_oms_addr_gen`: forms `x'`, shifts it right by `s`, and yields the
   4-bit address.
3. `apc_oms_decoder`: 4-to-9 one-hot word select.
4. `apc_oms_lut`: nine words of W+4 bits. One `load` pulse writes all nine
   from `A` with shifts and adds. It has R read ports.
5. `apc_oms_barrel_shifter`: left shift by 0..3.
6. `apc_oms_sign_mod`: `16A + word` or `16A - word`, chosen by `x4`. The
   result has W+5 bits.

`apc_oms_slice` groups steps 1–3 and 5–6 for one input. `apc_oms_mult` is
one LUT plus R slices. It keeps a copy of `A` for the `16A` term.

**Timing.** Pulse `load` with `A` on `a`. From the next cycle on, every
`product[r] = x[r]*A` is combinational, until the next load.

## Filter datapath (`error_comp`)

`tap_delay_line` keeps `taps[k] = x(n-k)`. For each tap, `ppg2` cuts the
signed L-bit sample into L/2 radix-4 digits. The lower digits take the values
0..3. The top digit carries the two's-complement sign: 0, 1, -2, -1. `ppg2`
outputs `w_k * digit_j`. Then:

* There is one `adder_tree` per digit position, `log2 N` levels deep. Each
  adds the N partial products of that digit: `q_j = sum_k p_kj`.
* `shift_add_tree` forms `y = sum_j q_j * 4^j` in `log2(L) - 1` levels. It
  pairs neighbours with shifts of 2, then 4 places.

The weights have F fractional bits. The full-precision sum is therefore
shifted right by F, with rounding toward minus infinity, and saturated to DW
bits. The error `d - y` is also saturated to DW bits. `y_now` and `e_now` are
combinational. `y_q` and `e_q` are the registered copies.

## Weight update (`weight_update`)

The update works in sign-magnitude:

1. `|x(n-k)|` is cut into 5-bit chunks, two chunks for 8-bit samples.
2. Each chunk is one input of a single `apc_oms_mult` with N*2 inputs. Its
   LUT was loaded with `|e|`.
3. The chunk products are shifted and added into `|e|*|x(n-k)|`.
4. The sum is shifted right by `MU_SHIFT`, then negated if `sign(e) XOR
   sign(x)`.
5. The result is added to the weight, which saturates at its W-bit range.

The step size is `2*mu = 2^-(MU_SHIFT+F)`, which is 2^-18 at the defaults.
Because the magnitude is truncated before the sign is applied, small steps
round toward zero.

## Pipeline, timing and interface (`adaptive_filter`)

A sample passes through two pipeline stages after the clock edge that
accepts it. At that edge `x` enters the delay line and `d` is latched.

| stage  | what happens in the cycle |
|--------|---------------------------|
| error  | y and e are formed from the taps and the current weights. At the end of the cycle e is registered, the LUT is loaded with \|e\|, and the taps are copied into an update latch. |
| update | Every weight is computed from the LUT and the latched taps, and written at the end of the cycle. `y_out`/`e_out` are valid with `out_valid`. |

**`CONCURRENT = 1` (default).** `in_ready` is always high, and a sample can
be accepted every clock.

* Filtering of sample n runs in the same cycle as the update for sample n-1.
  The error of sample n is therefore computed with weights that do not yet
  include the step from sample n-1.
* The result is the *delayed* LMS recursion: the adaptation delay is one
  sample when samples arrive back to back. When they are two or more cycles
  apart it is zero, and the filter behaves as plain LMS.
* The update latch exists for this case. The delay line has already moved
  on by the time the update stage needs the earlier tap vector.

**`CONCURRENT = 0`.** `in_ready` is low while a sample is in flight. That
gives one sample per three cycles, always with zero adaptation delay.

In both modes `out_valid` comes two cycles after the accepting edge. Reset is
synchronous and active-low. It clears the taps, the weights, the LUT and the
outputs.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | sample handshake |
| `x_in` | in | L | input sample, signed |
| `d_in` | in | DW | desired response, signed |
| `out_valid` | out | 1 | `y_out`, `e_out` valid |
| `y_out`, `e_out` | out | DW | filter output and error, signed, saturated |
| `w_out` | out | N x W | weights, signed, F fractional bits |

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | taps (power of two) |
| `L` | 8 | sample width; L/2 must be a power of two; the update uses ceil(L/5) chunks |
| `W` | 16 | weight width |
| `F` | 12 | fractional bits of the weights |
| `DW` | 16 | width of d, y, e; also the LUT coefficient width |
| `MU_SHIFT` | 6 | step size, `2*mu = 2^-(MU_SHIFT+F)` |
| `CONCURRENT` | 1 | overlap filtering and update (one sample per clock) |

With the default widths, `|y|` cannot exceed 2^14. So the output saturation
never triggers; the error saturation does.

## Departures and choices

* **Number of taps.** No filter order is stated for the proposed filter.
  16 is inferred from the 33 multipliers quoted for the multiplier-based
  version (2N+1).
* **Pipeline depth.** The source block diagram carries delayed sample
  indices on its output and error, without giving their values. It calls
  for filtering and update to run concurrently with a small adaptation
  delay. Here there are two stages, with an adaptation delay of at most one
  sample. `CONCURRENT = 0` is an extra option that removes the delay at a
  third of the throughput.
* **Where the LUT is used.** The source describes distributed arithmetic
  (DA) as a table of precomputed coefficient combinations. Its error block,
  however, is drawn with 2-bit partial-product generators and adder trees.
  The error block here follows that drawing. Each 2-bit generator acts as a
  one-tap table (0, w, 2w, 3w) addressed by a 2-bit slice of the sample.
  The trees do the shifting and adding for all slices in parallel, so no
  bit-serial, multi-cycle DA engine is built. The LUT multiplier is used
  where one coefficient is shared: by `e` in the update.
* **Sign modification.** In the source, bit 0 of the APC word passes
  unchanged and the other bits are modified under control of `x4`. Here a
  full subtraction `16A - word` is used, which is exact for every word,
  shifted ones included. The final addition of `16A` is not drawn in the
  source; it is added here.
* **Barrel-shifter range.** One sentence allows up to L-1 = 4 shifts. The
  shift table and the two control bits `s1 s0` need only 0..3, which is what
  is built.
* **The ninth word.** A general sentence says the extra word is zero. The
  5-bit design stores `2A` at `1000` and uses RESET. The latter is built.
* **Word widths and step size.** The source gives none of the sample,
  weight or error widths, and no value for mu. The defaults (8, 16 and 16
  bits, F = 12, 2*mu = 2^-18) are chosen so that a 16-tap filter converges
  on full-scale 8-bit input.
* **Own choices.** These have no counterpart in the source:
  * how the LUT is filled (`load`, shift-and-add);
  * the shared read ports;
  * sign handling in the partial-product generators;
  * all saturation;
  * the handshake and the reset.
* **Not included.** The source mentions analog input acquisition and an
  RLS variant that it evaluates only in a numerical model. Neither is
  described as hardware, and neither is built. The filter takes digital
  samples.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
plain integer arithmetic. Each prints `TB_RESULT checks=N failures=M`.

* `tb_apc_oms_ctrl`, `tb_apc_oms_addr_gen`, `tb_apc_oms_decoder`: exhaustive
  over all inputs. The address test also checks literal rows of the shift
  table.
* `tb_apc_oms_lut`, `tb_apc_oms_barrel_shifter`, `tb_apc_oms_sign_mod`,
  `tb_apc_oms_mult`: these cover the following.
  * All 32 inputs.
  * Extreme and random coefficients.
  * The two zero cases.
  * That the stored coefficient is used, not the live input.
* `tb_ppg2`, `tb_adder_tree`, `tb_shift_add_tree`, `tb_tap_delay_line`,
  `tb_error_comp`, `tb_weight_update`: random and extreme operands,
  saturation, and both update signs.
* `tb_adaptive_filter` runs the whole filter at its default parameters.
  `tb_adaptive_filter_seq` runs it with `CONCURRENT = 0`. Both share the
  body `adaptive_filter_tb_body.svh`.
  * A cycle-accurate software model, using plain multiplication, predicts
    `in_ready`, `out_valid`, `y_out`, `e_out` and all 16 weights in every
    cycle.
  * Phase 1 identifies a random 16-tap system over 3000 samples. The mean
    |e| drops from about 46 to below 0.1.
  * Phase 2 resets the filter mid-run and drives a full-scale reference, so
    that errors and weights saturate.
  * Each of these must occur: overlapped filter/update cycles (or, in the
    sequential mode, stalls on `in_ready`), idle cycles, both update signs,
    saturation, and the APC zero cases.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl \
        rtl/da_lms_pkg.sv tb/tb_adaptive_filter.sv \
        --top-module tb_adaptive_filter -o sim
    ./obj_dir/sim

Replace the testbench name to run another. All of them finish in well under
a second.

## Files

* `rtl/da_lms_pkg.sv`: shared constants (APC input width, LUT size) and the
  pipeline-occupancy type.
* `rtl/adaptive_filter.sv`: top level.
* `rtl/tap_delay_line.sv`, `ppg2.sv`, `adder_tree.sv`, `shift_add_tree.sv`,
  `error_comp.sv`: filtering and error.
* `rtl/weight_update.sv`: the LMS update.
* `rtl/apc_oms_*.sv`: the LUT multiplier and its parts.
* `tb/tb_<module>.sv`: one testbench per module, plus
  `tb_adaptive_filter_seq.sv` and the shared `adaptive_filter_tb_body.svh`.
