# Computation block of a distributed coherent mesh MMSE beamformer

A mesh of relay nodes ("tiles") receives a weak uplink signal and forwards it through a
bent-pipe path. Each tile adds its own copy, so the copies must arrive coherently. Each tile
therefore applies a short FIR filter to its bent-pipe stream. Jointly, the filters of all
tiles form one space-time MMSE beamformer, which suppresses interference and steers towards
the source. The filters are recomputed every 25 ms. For that, every tile estimates its own
channel from a known training sequence. It shares a decimated observation and the channel
estimate with the other tiles. It then solves, for its own filter, the regularised
Wiener-Hopf system

    (C + d I) w = r_hat,     C = Y~ Y~^H  (averaged over time, tapered)

C has size NT*TW = 160 (10 tiles x 16 taps). Its rows are the tiles' convolved observations,
delayed by 0..15 samples. This repository holds synthesizable SystemVerilog for the block
that does this computation at one tile. A top level ties the block together.

## Signal chain of one update

| Step | Unit (module) | What happens |
|---|---|---|
| SM1 | `fir_decim` | z_HIGH (captured at 1.5 B_U) is anti-alias filtered and decimated by 8 to z'_n (125 samples). |
| SM1 | `conv_xcorr_unit` (32 bit) | z_HIGH is cross-correlated with the 30000-sample training sequence, giving r'_HIGH at 136 lags. |
| SM1 | `peak_window` + `fir_decim` | Lags further than WIN from the correlation peak are zeroed. The rest is decimated to r'_n (16 taps). |
| SM1 | exchange port | z'_n and r'_n leave for the other tiles. The same values enter the local tile memories. |
| SM2 | `conv_xcorr_unit` (24 bit) | For each tile k, z'_k * h_B,k gives y'_k (135 samples). r'_k * h_B,k, samples 2..17, gives r_hat_k, stored time-reversed. |
| SM3 | `cov_matmul` | C = Y~ Y~^H. Y~ is never stored; a shift register generates its Toeplitz rows. |
| SM3 | `avg_taper` | C_t = (1-b) C_{t-1} + b C. The result is multiplied element by element with a loaded taper matrix. |
| SM3 | `diag_load` | d = max(alpha * tr(C)/TW, d2) is added to the diagonal. The matrix is kept for the solver. |
| SM3 | `qrd_bs` | Givens QR decomposition of [C \| r_hat], then back-substitution. It gives w (160 values). |
| out | top | The tile's own 16 taps of w are conjugated, shifted and saturated to 12 bits. They go to the upsampler, which is not in this design. |

`bf_scheduler` sequences SM1, SM2 and SM3 with one-cycle start pulses and `done`
handshakes. SM2 waits until every tile's z'_k and r'_k has arrived.

## The hard parts

### Covariance without the data matrix
Y~ row (n, i) is y'_n delayed by i samples. For one 4x4 output block, two 16-stage shift
registers are fed with y'_n and y'_k, one sample per cycle. Their taps i0..i0+3 and j0..j0+3
are exactly the Y~ and Y~^H sub-blocks for that time step. A 4x4 array of complex MAC cells
accumulates 150 time steps (135 + 16 - 1). The conjugate is only a sign change on the
imaginary path. The 16 sums then leave four per cycle.

A full 160x160 matrix takes (40^2) x (135 + 16 + 7) + 1 = 252,801 cycles.

Before the product, all y'_k are normalised with one common left shift (`norm_shift`). A
single shift for the block keeps the tiles' relative scaling and needs no division.

### Averaging and taper in one pass
`avg_taper` keeps the averaged (untapered) matrix as history in four lane memories of
160*40 words. The taper matrix sits in a second set of lane memories. It consumes the matmul
stream at the same four-elements-per-cycle rate, with a latency of 3 cycles. The forgetting
factor b has 16 fraction bits. `first_epoch` starts the average from C.

### Solver: folded Givens QRD with back-substitution
The triangular systolic array is folded onto one boundary cell and four internal cells, and
R (160 x 161, the last column holding Q^H r_hat) lives in memory.

- Rows enter one at a time.
- For every diagonal position i:
  - The boundary cell turns (R_ii, u_i) into a rotation.
  - Its two-table inverse square root (`rsqrt_lut2`: base plus slope per segment, 96
    segments, relative error below 1e-4) replaces CORDIC.
  - The internal cells then rotate four columns per cycle.
- After the last row, the same cells run in back-substitution mode:
  - The internal cells form four R_ij x_j terms per cycle.
  - The boundary cell divides by R_ii.

Solver words are 20 bit with 14 fraction bits. Rotation coefficients have 18 fraction bits.

One solve at N = 160 takes about 880,000 cycles.

### Scaling
The solution is defined only up to a scale factor, so each stage uses binary-shift
normalisation:

- the common shift of the y'_k;
- the output shift of the matmul;
- the shift applied by the loading unit;
- the own shift of r_hat.

The output shift `w_shift` then sets the 12-bit filter level.

## Timing at the default sizes (140 MHz)

| Step | Cycles | Time |
|---|---|---|
| Correlation, 30000 x 136 lags, four taps per cycle | 1,087,501 | 7.8 ms |
| Decimation z / r | 533 / 97 | |
| Convolutions, 10 tiles | 4,330 + 760 | |
| Covariance | 252,801 | 1.8 ms |
| Diagonal loading | 322 | |
| QRD + back-substitution | about 880,000 | 6.3 ms |
| **Total** | about 2.23 M | **15.9 ms** |

The total is inside the 25 ms update period. Against the reference implementation:

- The correlation and the QRD are slower than the reference timings (3.4 ms and 1.5 ms).
- The covariance (reference 2.1 ms) is slightly faster.
- The phases here run in series. Overlapping SM1 of the next update with SM3, or keeping
  several QRD rows in flight, would close the gap.

## Deviations and choices worth knowing
- **Peak window.** The window that gates r'_HIGH around its peak is this design's way of
  keeping only the direct-path taps. WIN = 4 lags by default.
- **Anti-alias filter.** It has 16 real, loadable taps. Its coefficient width is 18 bits.
- **Shared convolution unit.** One convolution unit serves both z and r. SM2 also handles
  the local tile.
- **Loading received tiles.** Received tiles come in through the generic load port. A tile
  counts as received when its last z' and r' sample is written. Loads must not coincide
  with the local decimator output.
- **Full covariance.** `cov_matmul` produces the full matrix, not one triangle.
- **QRD schedule.** The QRD handles one diagonal position at a time and waits for its
  pipeline.
- **Word widths.** Widths follow the reference per block:
  - 32 bit for correlation and decimation;
  - 24 bit for convolution, covariance, averaging and loading;
  - 20 bit inside the solver;
  - 12 bit at the output.
  Internal accumulators are wider and saturate on output.
- **Not in this design:** the RF front end and capture logic, the inter-tile network, the
  upsampler and bent-pipe filter, and the CPU/FPGA hybrid alternative.

## Files
- `rtl/dcmb_pkg.sv`: sizes, word widths, load-port targets and the saturation function.
- `rtl/dcmb_beamformer_top.sv`: the block. Its ports:
  - load port (`ld_valid`, `ld_sel`, `ld_addr`, `ld_re`/`ld_im`);
  - configuration (`node_id`, shifts, `avg_b`, `first_epoch`, `alpha_q`, `d2`);
  - `go`/`epoch_done`;
  - exchange stream `ex_*`;
  - filter stream `w_*`;
  - `ev[23:0]`: one pulse per occurrence of each mechanism.
- Units:
  - `bf_scheduler`, `conv_xcorr_unit`, `fir_decim`, `peak_window`, `cov_matmul`,
    `norm_shift`, `avg_taper`, `diag_load`, `qrd_bs`;
  - their building blocks: `mac4_systolic`, `bank4_ram`, `qrd_boundary_cell`,
    `qrd_internal_cell`, `rsqrt_lut2`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

    verilator --binary --timing -Wno-fatal --top-module tb_qrd_bs rtl/dcmb_pkg.sv rtl/*.sv tb/tb_qrd_bs.sv
    ./obj_dir/Vtb_qrd_bs

The end-to-end testbench `tb_dcmb_beamformer_top` runs two updates of a reduced block:

- 3 tiles x 4 taps, ZL = 12, HB = 3, DEC = 2, AA = 4, 64 training samples;
- the first update uses the d2 floor, the second the alpha * trace level.

It checks:

- the exchanged z' against a reference decimation;
- the correlation peak position;
- the exact cycle counts of the SM1 phases;
- that every filter tap is delivered;
- that all 24 mechanisms on `ev` occur.

`tb_dcmb_beamformer_top_full` runs the same test with every parameter at its default:
10 tiles x 16 taps and 30000 training samples. It needs no parameter overrides. Two updates
take about 5 M cycles, which is under 20 s in Verilator. The measured correlation phase is
1,087,502 cycles and the z decimation 534, as the formulas give.

The solver testbench compares the solution of random diagonally dominant 8 x 8 complex
systems with a floating-point reference. The error is within 0.01; observed errors are about
0.002.
