# CA-CFAR edge data reduction for a low-cost SDR receive path

A low-cost SDR sampling at tens of megasamples per second produces more raw
I/Q data than its USB 2.0 link to the host can carry. But in a surveillance
receiver most of those samples are noise. This core sits in the FPGA
receive path of each SDR node. It decides, sample by sample, whether a sample
stands out from the noise around it, and it passes on only the samples that
do. The volume sent to the host then scales with the duty cycle of the
signals present, not with the sample rate.

The decision is a time-domain **cell-averaging constant false alarm rate
(CA-CFAR)** test. The power of the cell under test (CUT) is compared with a
threshold. The threshold is a fixed multiple K of the mean power of
neighbouring reference cells. Because the threshold follows the local noise
level, the rate of false detections stays roughly constant when the noise
floor changes.

The hardware is built to cost the same per sample whatever the window size:

* the reference sum is updated in place, never recomputed;
* the division by the number of reference cells is a right shift;
* the window is a register shift chain, so no block RAM is used.

The core accepts one sample per clock. A decision leaves it a fixed 10 clock
cycles after the sample that completed the CUT's window.

## The window

The window covers 2^M + 2G + 1 consecutive samples. With the default M = 6
and G = 12 that is 89 samples. Cell 0 is the newest sample.

```
 newest                                                          oldest
 [0 ........ 31][32 ...... 43][44][45 ...... 56][57 ........ 88]
  leading ref     guard       CUT    guard       lagging ref
  2^(M-1) cells   G cells            G cells     2^(M-1) cells
```

The guard cells keep the edges of a pulse in the CUT out of the noise
estimate. The decision is

```
Pn = (sum of the 64 reference powers) >> M
T  = (Pn * K_num) >> 8          K_num = K in unsigned Q8
detect = (y_CUT > T)            y = I^2 + Q^2
```

The default K_num is 2536, which is 9.9063 in Q8. That value comes from the
CA-CFAR false-alarm formula Pfa = (1 + K/N)^-N with N = 64 and Pfa = 10^-4.
The value 2598 (10.15) is the calibrated alternative. Its published purpose
is to bring this fixed-point pipeline to exactly 10^-4. K_num can be changed
at run time through the register interface.

## The recursive reference sum

This is the part to understand before changing `cfar_window`. A plain
implementation adds up all 64 reference cells for every sample. This one
keeps the total in a single register. At each shift it adds the cells that
enter the two reference runs and subtracts the cells that leave them. The
four cells are read before the shift:

```
s <= s + x_new          // enters the leading run (cell 0)
       - win[31]        // leaves the leading run, becomes a guard cell
       + win[56]        // leaves the guard, enters the lagging run
       - win[88]        // falls off the end of the window
```

The guard gap splits the reference cells into two runs. So each step is one
add/subtract pair per run, whatever the window size. After reset, the chain
and the sum are zero, which is consistent with an empty window. Unsigned
modular arithmetic at 38 bits (32-bit power + M bits) is exact, because the
true sum always fits.

The shift chain holds I, Q and power for every cell. The CUT's own I/Q
sample therefore travels with its decision and can be forwarded unchanged.
Synthesis drops the I/Q bits of the cells beyond the CUT, since nothing reads
them.

## Pipeline and timing

| cycle | module             | work                                         |
|------:|--------------------|----------------------------------------------|
| 1     | `ca_cfar`          | input register                               |
| 2–4   | `iq_power`         | operand registers, squares, I^2 + Q^2        |
| 5     | `cfar_window`      | shift, recursive sum update, CUT capture     |
| 6     | `cfar_threshold`   | Pn = sum >> M, K sampled                     |
| 7     | `cfar_threshold`   | Pn * K                                       |
| 8     | `cfar_threshold`   | T = product >> 8                             |
| 9     | `cfar_threshold`   | detection flag                               |
| 10    | `cfar_output_gate` | forward or drop                              |

Every stage is qualified by the sample's valid bit. There is no
back-pressure, and idle cycles between samples are allowed. Idle cycles are
the normal case: at 61.44 MS/s on a 100 MHz clock, about 39 % of cycles carry
no sample. The window advances only when a sample arrives. So if sample n
enters on cycle t, the decision about sample n − 44 (that is,
n − (2^(M−1) + G)) leaves on cycle t + 10. The CUT itself is therefore
delayed by 44 samples plus 10 cycles.

Two flags handle the start after reset. `full` is set once 89 samples have
entered; until then no sample is classified as a detection. `live` is set
once the CUT position holds a real sample, after 45 samples.

The two multipliers (two 16×16 squarers and one 32×16 product) account for
the four DSP slices reported for the original IP. The window is 89 × 64
register bits, and no memory block is used.

## Data reduction and the bypass

With detection enabled, a sample whose flag is clear is dropped in the last
stage and never appears on the output. With detection disabled (CTRL bit 0
= 0), every live sample is forwarded. This gives the raw stream for
comparison, with the same latency.

## Interface of `kmu_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | single clock; synchronous active-high reset |
| `re_in`, `im_in` | in | 12 signed | I/Q from the transceiver interface, sign-extended to 16 bits inside |
| `valid_re`, `valid_im` | in | 1 | a sample is taken when both are high |
| `s_axi_*` | – | 4-bit address, 32-bit data | AXI4-Lite slave (below) |
| `re_out`, `im_out` | out | 16 signed | forwarded samples |
| `valid_out` | out | 1 | `re_out`/`im_out` hold a forwarded sample this cycle |

Register map (`cfar_regs`):

| address | name | bits | reset | meaning |
|---|---|---|---|---|
| 0x0 | CTRL | 0 | 1 | detect_en: 1 drop noise, 0 forward all |
| 0x4 | KNUM | 15:0 | 2536 | threshold factor K, unsigned Q8 |

Other addresses read zero and ignore writes. Responses are always OKAY, and
WSTRB is honoured. A write is accepted when AWVALID and WVALID are both high
and no response is pending. Reads are accepted when no read data is pending.
Assertions in `cfar_regs` check that BVALID and RVALID stay up, with RDATA
stable, until the master takes them. K_num and detect_en are sampled
together with each sample, so changing them between samples is safe.

## How the design behaves

The testbenches compare every forwarded sample, and its exact arrival cycle,
with a reference model. The model recomputes each reference sum from
scratch. They also measure the detector's statistics at the default
parameters.

* **False alarms on Gaussian noise** (2 × 10^6 decisions each): Pfa ≈
  0.92 × 10^-4 with K_num = 2536 and 0.83 × 10^-4 with 2598. Both are close
  to the 10^-4 design target. The source reports 1.24 × 10^-4 for 2536 in its
  own fixed-point simulation; this model does not reproduce that excess.
* **Detection of a constant-envelope signal** in the CUT, with noise-only
  reference cells, at K_num = 2536: Pd = 0.135, 0.366, 0.743 and 0.974 at a
  per-sample SNR of 7, 9, 11 and 13 dB. The published figures are 0.75 at
  11 dB and 0.972 at 13 dB.
* **Data reduction on a 10 % duty-cycle pulse train** (10-sample pulses
  every 100 samples, 13 dB): 90.3 % fewer samples leave the core, and 97 % of
  the pulse samples are among them.
* **Long pulses are not passed.** A pulse much longer than the guard span
  (2G + 1 = 25 samples) fills the reference cells with its own power, so its
  samples do not exceed K times their neighbours. A 10 µs pulse at
  61.44 MS/s is 614 samples long. In simulation only 4 of 1846 such pulse
  samples were forwarded. This is a property of time-domain CA-CFAR with
  these window sizes, not a fault in the RTL. The source design reports
  88 % reduction for 10 µs pulses but does not say at what sample rate the
  detector saw them. If you need long pulses, enlarge G and M, or decimate
  ahead of the core.

## Where this RTL fills in or departs from the source design

The following come from the published design:

* the algorithm and its parameters: 64 = 2^6 reference cells, 12 guard
  cells, Pfa 10^-4, Q8 K = 2536;
* the recursive sum, the shift division and the register-only delay line;
* 16-bit signed samples and the I^2 + Q^2 power;
* the 10-cycle latency at 100 MHz;
* the core's name, its port names and its 12-bit-in / 16-bit-out widths.

These are this design's own choices:

* **Input widths.** The block diagram gives 12-bit inputs, while the
  fixed-point description speaks of 16-bit samples. The 12-bit inputs are
  sign-extended to 16 bits.
* **One clock.** The original core shows several clock pins: sampling,
  2× and 3× clocks, and a separate AXI-Lite clock. Here one clock runs
  everything, and samples arrive as valid-qualified words.
* **Handshake and strobes.** `valid_out`, the AND of the two input valids,
  and the synchronous reset are this design's. So are the warm-up rule (no
  detections until the window is full) and the bypass forwarding only live
  samples.
* **Register map.** It is invented; the original only shows an AXI-Lite
  port. The bypass bit reflects that the source measured data volume with
  detection enabled and disabled. The writable K allows the calibrated
  value to be used.
* **Guard gap.** It is handled as two add/subtract pairs into one sum. The
  published architecture drawing shows a single pair.
* **Pipeline split and comparison.** The split of the 10 cycles into stages
  and the strict `>` comparison are this design's.

These are not here:

* the transceiver and its interface core;
* the Zynq processing system, memory and USB link;
* the AXI interconnect, clock and reset generators, and the bit-slice
  wiring of the ADC words;
* the host software and GPU spectrum pipeline.

The original core also shows two AXI master ports ("recorder" and
"spectrometer") and an interrupt output. Their function is not described, so
they are left out.

## Files

| file | contents |
|---|---|
| `rtl/cfar_pkg.sv` | widths, `cell_t`, K constants |
| `rtl/iq_power.sv` | I^2 + Q^2, 3 stages |
| `rtl/cfar_window.sv` | shift chain and recursive sum, 1 stage |
| `rtl/cfar_threshold.sv` | shift divide, Q8 multiply, compare, 4 stages |
| `rtl/cfar_output_gate.sv` | drop / forward / bypass, 1 stage |
| `rtl/ca_cfar.sv` | detector datapath, 10 stages |
| `rtl/cfar_regs.sv` | AXI4-Lite registers |
| `rtl/kmu_core.sv` | top: input adaptation, registers, detector |
| `tb/cfar_ref_pkg.sv` | reference model and noise generators for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_kmu_detection.sv` | Pfa and Pd measurement at the default parameters |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a cycle-count watchdog. Modules are found through `-I`,
so only the packages need to be named:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cfar_pkg.sv tb/cfar_ref_pkg.sv tb/tb_kmu_core.sv --top-module tb_kmu_core
./obj_dir/Vtb_kmu_core
```

Replace `tb_kmu_core` with any other testbench. `tb_kmu_core` runs the top at
its defaults through all of the following:

* warm-up;
* detection and dropping;
* bypass;
* K writes;
* idle and half-valid input cycles;
* the long-pulse case.

It takes well under a second. `tb_kmu_detection` runs 4.4 million samples and
takes a few seconds.

## Changing it

* `M` and `G` are parameters of `kmu_core`, `ca_cfar` and `cfar_window`.
  The window and the sum width follow from them, and the latency stays at
  10 cycles. The reference model in `tb/cfar_ref_pkg.sv` takes the same
  two numbers.
* `K_RESET` sets the threshold factor after reset.
* The sample and K widths are constants in `cfar_pkg`. `P_W` must stay
  2 × `IQ_W`.
