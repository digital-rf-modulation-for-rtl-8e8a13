# Delta-sigma digital-RF transmitter (5.25 GHz, 200 MHz bandwidth)

A digital-RF transmitter drops most of the analog baseband path. It has no
high-resolution baseband DACs and no active low-pass filters. Baseband I and Q
are noise-shaped in the digital domain down to a few bits per sample. Those bits
switch current-steering unit cells that mix directly with the LO. The analog parts
that remain are an LO splitter, the switched current cells and a passive LC
band-pass filter at RF. That filter removes the shaped quantization noise and the
clock images. The RTL here covers the digital block of such a transmitter. It
also gives behavioural models of the LO phase splitter and the quadrature
digital-RF converter, so the chain can be simulated end to end from baseband
words to converter output current.

The main numbers come from the original design:

| quantity | value |
|---|---|
| LO | 5.25 GHz (target band 5.15–5.35 GHz) |
| converter clock | LO / 2 = 2.625 GHz |
| baseband input | 11-bit I and Q at clock/4 = 656.25 MS/s |
| modulator | 2nd order, 3-bit |
| digital IF | clock/4 = 656.25 MHz, multiplier-free |
| RF bandwidth targeted | 200 MHz (1.28 Gb/s with 160 × 1 MHz 256-QAM carriers) |

## Signal chain

```
             +---------+   +-----------+   +--------+   +-------+   if_i (3b)   +---------+
 i_in 11b -->| up x4 + |-->| 2nd-order |-->|        |-->|       |-------------->|         |
             | low-pass|13b| 3-bit DS  |3b |        |   |       |               | QDRFC   |--> iout
 q_in 11b -->| (x2)    |-->| (x2)      |-->| DIGIF  |-->|       |-------------->| 7+7     |    (to LC BPF,
             +---------+   +-----------+   +--------+   +-------+   if_q (3b)   | cells   |     not modelled)
                                                                               +---------+
 lo ---+--> lo_div2 --> dig_clk (all digital blocks, data latch of the cells)      ^   ^
       +--> lo_polyphase ------------------------ lo_0 ---------------------------+   |
                        ------------------------- lo_90 ------------------------------+
```

`dsm_drfc_tx` is the top. Its only clock input is the LO, given as a logic
square wave. The converter clock `dig_clk` is the LO divided by two. The chip
requests a baseband sample every fourth clock with `in_stb`. It samples `i_in`
and `q_in` on the rising `dig_clk` edge where `in_stb` is high.

## The 3-bit code and why negation is free

The unit is the unit cell. Each path (I and Q) has seven identical cells. A cell
steers its tail current to the positive or to the negative output, so it
contributes +1 or -1. A 3-bit code `c` sets `c` cells to +1 and `7-c` cells to -1,
which gives the analog level

    level(c) = 2c - 7        (c = 0..7 gives -7, -5, ..., +5, +7)

Every level is odd and the set is symmetric about zero. The negative of the level
of `c` is the level of `7-c`, and `7-c` is `~c` in three bits. So a sign change of
a code costs three inverters and cannot overflow. Plain two's complement would
overflow here, because -4 has no positive partner. The digital IF mixer depends on
this property. The quantizer of the modulator is built to produce exactly these
eight levels. `dsm_drfc_pkg` holds the code type and the two helper functions
`code_level` and `code_neg`.

## Second-order 3-bit modulator (`dsm2`)

The modulator uses the error-feedback form:

    u[n] = x[n] + 2 e[n-1] - e[n-2]
    c[n] = clamp(floor(u[n] / step) + 4, 0, 7)
    e[n] = u[n] - level(c[n]) * step / 2

The noise transfer function is (1 - z^-1)^2 and the signal transfer function is 1.
The coefficients are a shift and a wire, so the loop has no multipliers. The input
is 13 bits wide with full scale FS = 4096. The quantizer step is FS/4 = 1024, so
the eight levels sit at ±512, ±1536, ±2560 and ±3584.

How far this can be trusted:

* **Stable range.** With the error bounded by half a step, |2e1 - e2| never
  exceeds 1.5 steps. The quantizer therefore never clips while |x| ≤ 5/8 FS
  (2560). After the ×4 gain of the interpolator, that limit is |baseband| ≤ 640 of
  1024, about -4 dBFS.
* **Overload.** Larger inputs clip the quantizer and raise `ovl_i` or `ovl_q`. The
  stored error is then limited to ±1 step, which keeps the loop from winding up.
  The modulator settles again as soon as the input returns to the stable range.
  The testbenches check this recovery. An OFDM signal with a peak-to-average ratio
  near 15 dB can be scaled so that its peaks clip only rarely.
* **Accuracy.** Over N clocks, the mean output level differs from a DC input by
  less than 4·step/N.

The loop finishes one sample per clock, in a single cycle. The original chip ran
it at 2.6 GHz with custom pipelined circuits. This RTL does not reproduce those.

## Digital IF at clock/4 (`digif`)

The two code streams are rotated by exp(jπn/2):

    IF_I = I cos(πn/2) - Q sin(πn/2)
    IF_Q = I sin(πn/2) + Q cos(πn/2)

Over n = 0, 1, 2, 3 this gives (I, Q), (-Q, I), (-I, -Q), (Q, -I). The block is
therefore a 2-bit phase counter, two multiplexers and some code inversions. This
step moves the wanted signal 656 MHz away from the LO, so LO feedthrough and the
quadrature image fall outside the channel. `if_phase` reports the n used for the
current outputs.

## Up-sample-by-4 low-pass (`interp_up4`)

Each path up-samples by 4 with a second-order CIC interpolator. Two combs run at
the input rate, then come zero-stuffing and two integrators at the full clock. The
impulse response is the triangle [1 2 3 4 3 2 1]. The filter therefore performs
linear interpolation with a DC gain of 4 (11 bits in, 13 bits out). All arithmetic
is modulo 2^13, which is exact for a CIC whose output fits.

The two comb subtractors are instances of the pipelined adder described next. Its
two-clock latency fits inside the four-clock input period. The response to a
sample taken at edge t begins at the output after edge t+10.

## Pass-gate carry chain with SAFF pipeline registers (`pg_saff_adder`)

This adder mirrors the adder style chosen for the high-speed datapath. Each bit
forms p = a xor b, and a pass gate picks the carry: the incoming carry when p = 1,
otherwise a. The sum bit is p xor carry. A chain is 6 bits long. At its end, the
sum bits and the carry out are captured by sense-amplifier flip-flops (SAFF). A
12-bit add therefore takes two clocks (pipelining factor 2) and accepts one add
per clock. Skew registers carry the upper operand bits forward, and de-skew
registers hold the finished lower sum bits, so operands and results stay
word-aligned.

In RTL the SAFF is an ordinary rising-edge flip-flop. The dual-rail carry of the
circuit has no logic meaning and is not modelled. The pipeline registers have an
asynchronous reset. The converter clock is stopped during reset, so without that
reset the first comb result after reset would be stale. The CIC integrators would
then keep that error as a permanent offset. `WIDTH` and `SEG` are
parameters: the interpolator uses 13 bits in two 7-bit segments.

## Clocks, timing and latencies

* `lo_div2` toggles on each rising LO edge, so `dig_clk` has a period of two LO
  periods.
* `rst_n` is an asynchronous active-low reset. It must be *pulsed*, with a falling
  edge, because `dig_clk` stops while the divider is held in reset.
* Baseband samples: `in_stb` is high for one clock in four. Update `i_in` and `q_in`
  between the rising edges.
* Latency from the sampling edge to the first change of `if_i`/`if_q`: 12 clocks
  (interpolator 10, modulator 1, mixer 1).
* The converter model latches the codes on the **falling** `dig_clk` edge, half a
  clock after the mixer updates them. The cells then mix continuously with
  `lo_0` (I) and `lo_90` (Q).

## Models of the analog parts

`lo_polyphase` and `qdrfc` are behavioural models, not synthesizable logic.

* `lo_polyphase` passes the LO through as `lo_0` and delays it by a quarter period
  (47.619 ps at 5.25 GHz) to make `lo_90`.
* `qdrfc` models the quadrature converter. It thermometer-decodes each code into 7
  cells and latches them. Each cell contributes (bit ? +1 : -1) × (LO ? +1 : -1).
  The outputs are `iout_i`, `iout_q` and their sum `iout`, all in unit-cell
  currents. Supplies, bias, cascodes, device mismatch and edge shapes are not
  modelled.
* Sideband: `lo_90` lags `lo_0`, so the converter forms
  I·LO0 + Q·LO90 = Re{(I − jQ)·e^(jωt)}. A component at +f on the complex IF
  input therefore lands at f_LO − f. The chosen 90° convention fixes which
  sideband the digital IF occupies. Swap `lo_0` and `lo_90` to select the other
  sideband.

Three analog parts have no model at all:

* **The 4th-order band-pass filter.** It is a pair of coupled LC resonators: 2.2 nH,
  0.4 pF, 5 kΩ, coupling capacitors of 26.3 fF, inductor Q of 25, and PN-varactor
  tuning.
* **The self-tuning loop.** The filter has a 90° phase shift at its centre
  frequency when the source and load impedances are equal. The loop detects that
  phase with a 5 GHz phase detector. A Miller-compensated opamp integrates the
  error onto the varactor voltage. A switch controlled by *Tune Enable* selects
  between the loop and an external tuning voltage.
* **The RF output buffer.**

`iout` on the top is where the filter would attach.

## Capacity against the target signals

The input runs at 656.25 MS/s complex, so the input alone supports up to about
±328 MHz of baseband. All the target signals fit well inside that:

* a 12 MHz single tone;
* 160 carriers at 1 MHz spacing with 256-QAM, which gives 1.28 Gb/s in 160 MHz;
* the planned 200 carriers (1.6 Gb/s in the 5.15–5.35 GHz band);
* an 802.11a channel (20 MHz, 52 carriers).

The oversampling ratio at the modulator is 2625/200 ≈ 13.

`tx_workloads_tb` runs two of these signals through the complete top. Before it
measures, it applies a receive filter to the de-rotated modulator output (three
8-tap moving averages), much as the on-chip LC filter would. Results:

* **12 MHz single tone** at 600/1024: in-band SNDR over ±100 MHz is 59.9 dB.
  The test requires at least 45 dB.
* **OFDM, 160 carriers × 256-QAM**, four symbols at about 130 rms per component:
  * modulator-only EVM is about −53 dB, measured against the unquantized filter
    output;
  * end-to-end EVM against the transmitted constellation points is −31 to
    −34 dB. The ~0.4 dB passband droop of the linear interpolator limits it,
    because the test does not equalize that droop.
  * The test requires 45 dB and 30 dB respectively.

The RTL does not limit the modulation or carrier arrangement, because those are
produced upstream of `i_in`/`q_in`. The usable input level is set by the
modulator's stable range (see above).

## Where this RTL makes its own choices

The original design fixes these points:

* the block order;
* 11-bit inputs and 3-bit codes;
* second order;
* the IF at clock/4, built without multipliers;
* the LO/2 clock;
* the adder's carry rule, 6-bit segments and two pipeline stages;
* the unit-cell principle of the converter.

This RTL makes its own choices for these points:

* the loop form of the modulator (error feedback), its level spacing and its
  overload handling;
* the interpolation filter (CIC-2, linear interpolation) and the 13-bit internal
  width;
* the offset-binary odd-level code with 7 thermometer cells per path;
* the `in_stb` input handshake, the reset, and all register placement and
  latencies;
* the falling-edge data latch of the converter model;
* a single LO clock input with an internal divide-by-2. A version with a separate
  clock pin at LO/2 is equivalent: replace `lo_div2`.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dsm_drfc_pkg.sv \
    rtl/pg_saff_adder.sv rtl/interp_up4.sv rtl/dsm2.sv rtl/digif.sv \
    rtl/lo_div2.sv rtl/lo_polyphase.sv rtl/qdrfc.sv rtl/dsm_drfc_tx.sv \
    tb/dsm_drfc_tx_tb.sv --top-module dsm_drfc_tx_tb
./obj_dir/Vdsm_drfc_tx_tb
```

| testbench | what it checks |
|---|---|
| `dsm_drfc_tx_tb` | Full chain at default size, driven by the LO alone. Phases: 12 MHz complex tone, DC, overload, DC again. Compares every `if_i`/`if_q`/`if_phase` with an independent reference of the digital chain. Checks the DC mean after de-rotation, the converter currents in all four LO states and the LO/2 clock period. Counts strobes, SAFF-stage carries, clipping and mixer phases. |
| `pg_saff_adder_tb` | Random and carry-rippling operands; exact result two clocks later. |
| `interp_up4_tb` | Every output against the triangle convolution, at a fixed latency of 10. |
| `dsm2_tb` | Every code against a real-valued reference loop. DC accuracy across the stable range. Overload flag and recovery. |
| `digif_tb` | Every output level against the cos/sin formula. Phase sequence. |
| `tx_workloads_tb` | 12 MHz tone SNDR and 160-carrier 256-QAM OFDM EVM through the full top (see above). |
| `lo_div2_tb`, `lo_polyphase_tb`, `qdrfc_tb` | Divide ratio and reset; 90° lag; cell currents and latch timing. |

The simulations are two-state and contain no x or z. Everything that is read is
reset or initialised.
