# MEE adaptive filter array

An adaptive FIR filter trained by **minimum error entropy (MEE)** instead of mean-squared
error. MEE adapts the weights to maximise the *information potential* of the error,

    V = 1/N^2 * sum_i sum_j G(e_i - e_j)

estimated over a window of N errors with a Gaussian kernel G. Its gradient with respect to the
weights is a double sum over all pairs of the window,

    grad V  ~  sum_{j<k} G(e_k - e_j) * (e_k - e_j) * (x_k - x_j)

where x_k is the k-th input vector (the L samples in the FIR delay line when e_k was produced).
In software one weight update costs O(N^2) kernel evaluations. This RTL computes it in O(N)
clock cycles: errors leave the FIR one per clock, and in the cycle error e_k appears the
hardware forms *all* pairs (e_k, e_j), j < k, at once, with one subtractor, one kernel and one
accumulator per row j. A window of N samples therefore yields its weight update N + 14 cycles
after its first sample entered (114 cycles for N = 100).

The top, `mee_af_array`, holds 20 such filters side by side (window 100, order 10). They share
nothing but clock, reset and two settings, so each can adapt a separate channel.

The structure follows the architecture of Craciun, George, Lam and Principe, "A Parallel
Hardware Architecture for Information-Theoretic Adaptive Filtering". The number formats, the
exponential, the control and the interfaces are this implementation's own; the differences
are listed under "Departures from the original architecture" below.

## One iteration, step by step

An iteration (one weight update) uses one window of N samples `(x, d)`:

1. **FIR** (`fir_filter`). Each accepted sample shifts into an L-tap delay line. The current
   input vector is multiplied tap by tap with the weights and summed, giving `y`. The error
   `e = d - y` leaves 3 cycles later, together with the input vector that produced it. The
   weights stay frozen for the whole window.
2. **Pairwise distances** (`pairwise_distance`, two instances). The k-th error of the window
   is written into row k of a register array. In the same cycle, each row j subtracts its stored
   error from the new one. The result is column k of the upper-triangular matrix of
   `e_k - e_j`. A second instance does the same for the input vectors, giving `x_k - x_j`
   (L elements per row).
3. **Gaussian kernels** (`gaussian_kernel`, with one `exp_unit` per row). Each row computes
   `exp(-(e_k - e_j)^2 * kscale)`. The distances are delayed by the kernel latency so that all
   three factors of a pair arrive together.
4. **Row accumulators** (`mee_accumulator`). Row j multiplies kernel × error distance ×
   input-distance vector and adds the product into its L sums. After the last column, row j
   holds `gradV_j`, its share of the gradient.
5. **Weight update** (`weight_update`). This block sums the N row gradients per weight and
   computes `w + mu * gradV`. The result goes back into the FIR's weight registers.

Steps 2 to 5 form `mee_cost`. `mee_af` adds the FIR and the window control around it.

### Rows, columns and masks

This is the one place in the design that needs care. Column k exists only for rows j < k. The
first error of a window has no partner, and the last row is never used. A row's data is
meaningful only when its mask bit `mask[j] = (j < k)` is set. The mask travels down the
pipeline with its column. The accumulators add only masked rows. The first column of a window
(`first` flag) clears every sum, and the last column (`last` flag) raises `done`. Rows outside
the mask still hold values from the previous window, so never use them without their mask.

Each unordered pair is counted once. The full double sum over ordered pairs is exactly twice
that sum, because the summand is symmetric in (j, k). That factor of 2 is absorbed into the step
size.

### Timing

| stage                      | latency (cycles) | package constant |
|----------------------------|------------------|------------------|
| FIR                        | 3                | `FIR_LAT`        |
| pairwise distances         | 1                | `PD_LAT`         |
| Gaussian kernel (incl. exp)| 5                | `KERN_LAT`       |
| row accumulators           | 3                | `ACC_LAT`        |
| weight update              | 2                | `WU_LAT`         |

Every stage accepts one item per clock. With `in_valid` held high, a filter takes a sample on
each of N consecutive cycles. `in_ready` then stays low for 14 cycles while the window drains.
On the edge that loads the new weights, `in_ready` rises again, so an iteration lasts N + 14
cycles. `upd_valid` pulses once per update and `iter` counts updates.

## Interfaces

`mee_af` (one filter) and `mee_af_array` (per-filter arrays of the same signals):

| signal               | dir | format        | meaning |
|----------------------|-----|---------------|---------|
| `in_valid/in_ready`  | in/out | 1 bit      | sample handshake; a sample is taken when both are high |
| `x_in`, `d_in`       | in  | signed Q15.16 | input sample and desired sample |
| `kscale`             | in  | unsigned Q16.16 | 1/(2σ²), the kernel width |
| `mu`                 | in  | unsigned 32-bit | step size, see below |
| `w[L]`               | out | signed Q7.24  | current weights (`w[0]` multiplies the newest sample) |
| `upd_valid`, `iter`  | out | 1 / 32 bit    | update pulse and update count |
| `e_valid`, `e_out`   | out | Q15.16        | the error stream of the FIR |

`in_valid` may drop at any time inside a window. The window then simply takes longer. A source
may also hold `in_valid` high while `in_ready` is low; the sample is taken once the update is
done. The FIR delay line keeps its last L-1 samples from one window into the next. A
continuous input stream therefore gives every input vector its full history. To train
repeatedly on one fixed batch, send the batch again for every iteration.

`kscale` and `mu` are settings: change them only while no window is in flight. Reset
(`rst_n`, asynchronous, active low) sets the weights to zero and clears the delay line and all
control state.

## Number formats and the step size

Everything is fixed point:

- samples, desired values, errors: signed Q15.16 (32 bits); the error saturates;
- weights: signed Q7.24 (32 bits), so that small increments are not lost;
- pairwise differences: 33 bits (never overflow);
- kernel values: unsigned Q1.16 in (0, 1];
- row gradients: signed Q47.16 in 64 bits; every product is rounded down to Q.16.

The exponential computes `exp(-u) = 2^(-u·log2 e)`. The integer part of the exponent becomes a
right shift. The fractional part picks one of 16 segments of `2^(-f)` from a table,
`EXP2_TABLE[i] = round(65536 · 2^(-i/16))`, and the unit interpolates linearly within the
segment. The relative error stays below about 3·10⁻⁴.

The weight increment is `dw = (gradV · mu) >>> MU_SHIFT`, with gradV in Q.16 and dw in Q.24.
The real step size is therefore

    mu_real = mu / 2^(MU_SHIFT + 8)        (= mu / 2^40 at the default MU_SHIFT = 32)

`mu` also absorbs every constant factor of the true gradient: 1/N², 1/σ², the kernel's
1/(√(2π)σ), and the factor 2 from counting each pair once. A usable starting point is
`mu_real · N(N-1) · var(x) ≈ 0.1 … 0.2`. Most testbenches use σ = 2 (`kscale = 8192`); the full-size workload uses σ = 4.

## Departures from the original architecture

- **Fixed point instead of floating point.** The original multiplies the FIR taps in floating
  point, keeps floating-point weights, and uses a pipelined floating-point exponential from a
  vendor library. Here the whole datapath is fixed point and the exponential is the
  table-interpolation unit described above. On random system-identification runs the weights
  converge to the plant within 0.01. Bit-exact agreement with a floating-point implementation
  is not claimed.
- **Storage of the window.** The original keeps errors in a shifting delay line and stores the
  distance and kernel matrices in 2-D register arrays. Here every error of a window stays in a
  fixed row, so that row j always belongs to accumulator j. Each column is consumed as it is
  produced. Only pipeline registers hold columns, never the whole matrix.
- **Vector accumulators.** The gradient has one component per weight. Each row accumulator
  therefore keeps L sums, and the input-distance block has L subtractors per row.
- **Control and host interface.** Each filter has a plain valid/ready sample port. The window
  state machine and the counters are this design's own. In the original system a host
  processor reaches the filters through a memory map that is not specified; that host side is
  not part of this RTL.
- **One FPGA's worth.** The original also runs four and eight copies of the 20-filter array on
  separate FPGAs, with no communication between them. That is replication outside this RTL.

## Cost

Per filter, for window N and order L: N·L input subtractors, N error subtractors, N kernels
(each with a squarer, a scaler and an exponential), N·L multiply-accumulators of 64 bits,
and L adder trees of N inputs. Area grows with N·L, while the time per update grows only
with N. The original work reports that logic grows faster than linearly with N on its FPGA,
and that about 20 filters of window 100 fit one large device. Windows above 100 cut the filter
count sharply.

## Files

- `rtl/mee_pkg.sv`: formats, latencies, exponential table, saturation helpers
- `rtl/fir_filter.sv`, `rtl/pairwise_distance.sv`, `rtl/exp_unit.sv`, `rtl/gaussian_kernel.sv`,
  `rtl/mee_accumulator.sv`, `rtl/weight_update.sv`: the datapath blocks
- `rtl/mee_cost.sv`: the cost-function pipeline
- `rtl/mee_af.sv`: one adaptive filter with window control
- `rtl/mee_af_array.sv`: top, `NUM_AF` filters (defaults 20 × N=100 × L=10)
- `rtl/pipe_delay.sv`: fixed-delay register chain used for alignment
- `tb/tb_<module>.sv`: self-checking testbench of each module
- `tb/tb_mee_af_array_full.sv`: the top at its default size
- `tb/tb_sysid_workload.sv`: the system-identification experiment at full filter size

## Verification

Every testbench checks the block against values computed independently in floating point,
never against a copy of the fixed-point arithmetic. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a cycle-count watchdog.

- `tb_exp_unit`: 400 arguments against `exp()`, with the latency checked.
- `tb_fir_filter`: errors and input vectors against a real-valued FIR, including a weight
  reload and idle gaps.
- `tb_pairwise_distance`: the differences, masks and first/last flags, including a window
  restarted early.
- `tb_gaussian_kernel`: the kernels against `exp()` at two kernel widths, with the mask carried
  along.
- `tb_mee_accumulator`: the row sums against a real double sum over three windows.
- `tb_weight_update`: the increment and saturation.
- `tb_mee_cost`: a whole update against the floating-point double sum, with and without
  bubbles, and the 11-cycle latency.
- `tb_mee_af`: system identification of a 4-tap plant (N=16) over 120 iterations. It checks
  convergence and the exact N + 14 period, and it makes stalls and bubbles happen.
- `tb_mee_af_array`: three filters with three different input behaviours: always valid,
  random bubbles, and a source that backs off while the filter is not ready. Each filter must
  converge to its own plant, and the filters must progress independently.
- `tb_mee_af_array_full`: the top at its defaults (20 × 100 × 10). It runs one complete
  iteration per filter and checks all 200 new weights against the floating-point model and
  the 114-cycle update time.
- `tb_sysid_workload`: the full-size system-identification experiment with one filter
  (order 10, window 100). A fixed sequence of 2000 noise samples passes through a 10-tap
  plant whose largest weight is 5, and training runs for 2000 iterations on consecutive
  windows. All ten weights converge within 0.02; the weight of 5 is within 0.01 after about
  130 iterations. The run takes about 20 seconds.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_mee_af \
        rtl/mee_pkg.sv rtl/*.sv tb/tb_mee_af.sv
    ./obj_dir/Vtb_mee_af

The full-size testbench takes about half a minute to build and under a second to run. The
testbenches assume two-state simulation. They pulse the reset at time 1 so that every register
starts from a known value.
