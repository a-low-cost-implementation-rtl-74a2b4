# Low-cost square M-QAM detection with heuristic decision regions

A maximum-likelihood QAM detector compares the received point with every one of
the M constellation points. For 4096-QAM that is 4096 distance calculations per
symbol. For a *square* constellation the same decision separates into two
one-dimensional decisions. Each received component only has to be placed
between two of the sqrt(M)-1 boundaries that lie halfway between adjacent
amplitude levels. The boundaries are fixed. So if the received component is
first scaled, offset and clipped into an unsigned integer range, the whole
detector reduces to a bank of constant comparators and a small look-up table
that yields the Gray-coded message bits. No adders, no multipliers and no
distance metric are needed.

This RTL implements that scheme for M = 4, 16, 64, 256, 1024 and 4096, with
16-QAM as the default build:

* `gray_mapper`: the transmit-side mapper (message bits to I/Q amplitudes).
* `qam_quantizer`: the clip / offset / quantize function, one instance per
  component.
* `hdr_detector`: the comparator-and-LUT detector. It has a latency of one
  clock and takes one symbol per clock.
* `hdr_fsm_detector`: the same detection written as a small state machine. It
  uses one comparator per axis and needs 3 clocks per 16-QAM symbol.
* `qam_top`: all of the above, wired as a transmitter and a receiver.

The technique (decision regions, quantizer law, Gray map, the state-machine
variant and the latencies) follows a published low-cost FPGA QAM
detection/demodulation scheme. The number formats, handshakes, reset and the
realisation of the quantizer are this design's own choices. They are listed
under "Design choices and departures" below.

## Signal chain

```
            transmit                         (channel: noise, outside)                 receive
 tx_bits --> gray_mapper --> tx_x_i/q  ~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~~>  rx_y_i/q --> qam_quantizer (I) --+--> hdr_detector ------> hdr_bits
                                                                                      qam_quantizer (Q) --+--> hdr_fsm_detector --> fsm_bits
                                                                                                          |
                                                                                          rx_yq_i/q, clip flags
```

| path | latency (clocks) | throughput |
|---|---|---|
| `tx_valid` to `tx_x_valid` | 1 | 1 symbol / clock |
| `rx_valid` to `rx_yq_valid` (quantizer) | 1 | 1 symbol / clock |
| `rx_yq_valid` to `hdr_valid` | 1 | 1 symbol / clock |
| `fsm_take` to `fsm_valid` | log2(sqrt(M)) + 1 (3 for 16-QAM) | 1 symbol per that many clocks |

The two sides share only the clock and the active-low asynchronous reset
`rst_n`. Adding noise to `tx_x_*` and driving the result into `rx_y_*` is the
job of a testbench or of the surrounding system.

The state-machine detector sits beside the HDR detector on the same quantized
samples. It takes a sample only when it is idle. `fsm_take` marks the samples
it took, and the others are simply not examined by it. The HDR detector sees
every sample.

## Number formats

All amplitudes are signed fixed point: `IN_W` = 32 bits, of which `IN_FRAC` =
16 are fraction bits. The minimum distance between levels is `D` = 2 input
units, so the levels sit on the odd integers:

| M | levels per axis (L) | amplitudes |
|---|---|---|
| 16 | 4 | -3, -1, 1, 3 |
| 64 | 8 | -7 ... 7 |
| 4096 | 64 | -63 ... 63 |

Level index k runs from 0 (most negative) to L-1. Level k sits at
(2k - (L-1)) * D/2.

## The quantizer (clip, offset, quantize)

This is the part that makes the rest cheap, so it is worth reading closely.
For a component z the quantizer outputs an N-bit unsigned integer
(N = 32 by default):

```
step = (L-1) * D / (2^N - 1)          K = (2^N - 1) / 2
yq   = 0                          if z/step < -K
yq   = floor(z/step + K + 1/2)    if |z/step| <= K
yq   = 2^N - 1                    if z/step >  K
```

Because K + 1/2 = 2^(N-1), this equals

```
yq = clamp( floor(z/step) + 2^(N-1), 0, 2^N - 1 )
```

which is what the hardware computes. Three properties follow:

* The outermost levels land exactly on 0 and 2^N-1. Level k lands on
  k(2^N-1)/(L-1). Anything beyond the outer levels is clipped onto them, and
  clipping never changes the decision. `clip_lo` and `clip_hi` report when it
  happens.
* The offset makes every value unsigned, so the comparators need no sign
  handling.
* The boundary between levels k and k+1 maps to (2k+1)(2^N-1)/(2(L-1)). The
  numerator is odd and the denominator even, so this is never an integer. The
  detectors compare `yq` against its ceiling, THR(k). A sample can therefore
  never sit exactly on a quantized boundary.

**Division by the step.** The division is a multiplication by a reciprocal
constant. The constant has SF = IN_W + 1 + IN_FRAC + ceil(log2((L-1)D+1))
fraction bits, which is enough for the floor to be exact:

* Positive inputs use the constant rounded up and take the floor.
* Negative inputs multiply their magnitude by the constant rounded down and
  take the ceiling, because floor(-a) = -ceil(a).

With that choice the result equals the exact rational formula for every
32-bit input, and the testbench checks this exactly. The price is one
IN_W x ~(N+IN_W) multiplier per component. All the constants are computed at
elaboration by functions in `qam_pkg`.

**Boundary shift.** Rounding to the quantizer grid moves each decision
boundary by at most half a quantizer step, (L-1)D/(2(2^N-1)). With N = 32 that
is far below one input LSB. It matters only for a received value that lies
*exactly* on a boundary, such as an even integer in these units. For 16-QAM
such a value still goes to the upper region, as the region definition asks.
For some other orders (64-QAM, for example) it may go to the lower region.

## Decision regions and the Gray map

Per axis, region i is the half-open strip [i*d, (i+1)*d) around its level. The
two outer strips extend to infinity. A value on a boundary belongs to the upper
strip. The 2-D region of a square constellation is just the pair of 1-D
regions. So `hdr_slicer` uses L-1 comparators per axis: their outputs form a
thermometer code, and the region index is the number of comparators that fire.
A per-axis look-up table then gives the label.

Labels are the bitwise complement of the binary-reflected Gray code of the
level index. The in-phase label forms the upper half of the message word:

| level | -3 | -1 | 1 | 3 |
|---|---|---|---|---|
| 16-QAM I label (b3 b2) | 11 | 10 | 00 | 01 |
| 16-QAM Q label (b1 b0) | 11 | 10 | 00 | 01 |

For 64-QAM the same rule gives 111, 110, 100, 101, 001, 000, 010, 011 from -7
to 7, the IEEE 802.16 axis order. Neighbouring levels always differ in one bit,
so most symbol errors cost a single bit error.

Detection and demapping happen in one step: region index to LUT to bits. The
output register gives the one-clock latency.

## The state-machine detector

`hdr_fsm_detector` scans the regions sequentially. For 16-QAM (d = 2, signed
picture) it works like this:

1. **idle.** The machine waits while no valid data arrives. When a sample
   comes, it registers the sample and compares it with 0. The next state is
   "X > 0" or "X < 0".
2. **"X > 0" or "X < 0".** The machine compares with +2 or -2. The next state
   is one of the leaves "X > 2", "X < 2", "X > -2" or "X < -2".
3. **Leaf.** The machine registers the message bits for that region and returns
   to idle.

I and Q step through this sequence together. The result appears 3 clocks after
the sample is taken, and `in_ready` is high only in idle. For other orders the
same idea becomes a binary search, one index bit per clock, taking
log2(sqrt(M)) + 1 clocks. The comparisons use the same quantized thresholds as
`hdr_detector`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 16 | constellation order: 4, 16, 64, ... up to 65536 (even power of two) |
| `N` | 32 | quantizer output width |
| `D` | 2 | minimum distance d, in input units |
| `IN_W` | 32 | width of transmitted/received amplitudes |
| `IN_FRAC` | 16 | fraction bits of the amplitudes |

`gray_mapper` and `qam_quantizer` take all five parameters. The detectors take
only `M` and `N`. An unsupported `M` stops elaboration with an error.

The lower `IN_FRAC` bits of `tx_x_*` are always zero, because the constellation
amplitudes are integers. Synthesis reports them as constant outputs.

## Verification

Each testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_gray_mapper` | 16-QAM against the printed map; 64-QAM against the 802.16 order; all 4096 messages of 4096-QAM against an independent search; 1-clock latency |
| `tb_qam_quantizer` | 16-QAM/N=32, 4096-QAM/N=32 and 64-QAM/N=8 against the exact rational formula in 128-bit integers, and the N=8 case against the formula in real arithmetic; extremes, boundaries, random words; clip flags; latency |
| `tb_hdr_detector` | all six orders against a nearest-level search in the quantized domain; every boundary and its neighbours; random samples; 1-clock latency |
| `tb_hdr_fsm_detector` | 16-, 4- and 4096-QAM; results and exact latency (3 clocks for 16-QAM); `in_ready` low while busy; offers that had to wait; all four leaves reached |
| `tb_qam_top` | whole design at its defaults: noise-free round trip; then Gaussian noise at Eb/N0 = 10 dB with 20 dB impulsive bursts, each HDR and state-machine decision compared with a minimum-distance decision on the received sample; counts clipping at both ends on both axes, all 16 regions, skipped and taken state-machine samples, noise errors and idle cycles, and fails if any of them never occurred |
| `tb_qam_ber` | mapper, AWGN, quantizer and HDR for M = 4 ... 4096; decisions equal minimum distance; measured BER within 15 % of the Gray-coded square-QAM approximation at BER near 1e-2 |

A typical `tb_qam_ber` result:

| M | Eb/N0 | measured BER | approximation |
|---|---|---|---|
| 4 | 4.0 dB | 1.29e-2 | 1.25e-2 |
| 16 | 8.0 dB | 8.87e-3 | 9.25e-3 |
| 64 | 12.5 dB | 7.02e-3 | 7.06e-3 |
| 256 | 16.5 dB | 9.64e-3 | 9.45e-3 |
| 1024 | 20.5 dB | 1.36e-2 | 1.35e-2 |
| 4096 | 24.5 dB | 1.92e-2 | 1.89e-2 |

The detector matches the minimum-distance decision on every sample, so the
quantized HDR receiver shows no measurable loss at these error rates. The
curves down to 1e-6 would need on the order of 1e8 bits per point, and were
not simulated.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/qam_pkg.sv tb/tb_qam_top.sv \
          --top-module tb_qam_top
./obj_dir/Vtb_qam_top
```

Replace `tb_qam_top` with any testbench name. `-y rtl` lets Verilator find the
modules, and the package must be listed first. All testbenches finish within
seconds.

## Design choices and departures

* **Input format.** The receiver takes 32-bit fixed-point samples rather than
  floating point, with `D` in the same units. The quantizer output is 32 bits
  wide.
* **Quantizer realisation.** The reciprocal-multiply scheme, the output
  register and the clip flags are this design's own. The quantizer law itself
  is the published one.
* **Gray map.** The rule for orders above 16 (complemented reflected Gray code
  per axis) is a generalisation of the 16-QAM map. It reproduces the 802.16
  64-QAM axis order.
* **Tables.** `hdr_detector` uses two one-dimensional tables of sqrt(M) labels
  instead of one M-entry table. The function is the same.
* **State machine.** It was defined for 16-QAM. The binary-search extension to
  other orders, the `in_ready` handshake and placing it beside the HDR detector
  on shared samples are this design's own.
* **Reset and handshakes.** Reset is asynchronous and active low. Every stage
  has a valid flag. The pipelined blocks have no back-pressure.
* **Not included.** The full maximum-likelihood detector and the hybrid
  "HDR followed by ML inside 4-, 16-, ... point sub-constellations" detectors
  were only comparison points for the scheme, and are not implemented. The
  channel, and the FPGA-specific resource and Fmax figures (500 MHz on a
  Stratix III), are outside the RTL.
