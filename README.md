# 16-QAM OFDM transceiver with a one-cycle radix-4 16-point FFT

This is a baseband OFDM (orthogonal frequency-division multiplexing) transmitter and
receiver. It is meant for an FPGA and written in synthesizable SystemVerilog.

OFDM spreads a fast bit stream over many slow subcarriers. Each subcarrier symbol then
lasts much longer than the echo spread of a multipath channel. A short copy of each
symbol's tail, the cyclic prefix, is sent in front of the symbol. It absorbs the echo
of the previous symbol, so symbols do not interfere.

This design uses 16 subcarriers. Each carries one 16-QAM point, which is 4 bits, so one
OFDM symbol carries 64 bits. The transform between subcarriers and time samples is a
16-point radix-4 FFT. It is fully parallel and produces all 16 outputs one clock after
its inputs.

```
 serial bits ─► S/P (64 b) ─► 16× 16-QAM map ─► IFFT-16 ─► digit-reverse ─► P/S (16 smp) ─► CP insert ─► tx samples
                                                                                                 │
                                                              (channel: off-chip) ◄──────────────┘
                                                                       │
 serial bits ◄─ P/S (64 b) ◄─ 16× 16-QAM decide ◄─ digit-reverse ◄─ FFT-16 ◄─ S/P (16 smp) ◄─ CP remove ◄─ rx samples
```

The transmitter and the receiver share one clock and one reset. Otherwise they are
independent: `tx_data` is not connected to `rx_data` inside the top module. Connect
them through a channel model, or directly for a loopback.

## The radix-4 16-point transform (`fft16_radix4`, `radix4_butterfly`)

This block is the core of the design and the hardest part to follow.

A 16-point DFT can be split into two stages of four 4-point DFTs ("radix-4"). Write the
time index as n = p + 4m and the frequency index as k = q + 4r, with p, m, q and r in
0..3. Then

```
X[q + 4r] = Σ_p  W4^(p·r) · W16^(p·q) · ( Σ_m x[p + 4m] · W4^(m·q) )
            └─── stage 2 ──┘ └twiddle┘   └──────── stage 1 ────────┘
```

- **Stage 1.** Four butterflies. Butterfly p takes x[p], x[p+4], x[p+8] and x[p+12], with
  no twiddles. Its output q is placed on row 4q+p.
- **Twiddles.** Row 4q+p is multiplied by W16^(q·p). Over the four groups of rows the
  exponents are 0,0,0,0 / 0,1,2,3 / 0,2,4,6 / 0,3,6,9.
- **Stage 2.** Four butterflies. Butterfly q takes rows 4q..4q+3. Its output r is placed
  on row 4q+r. That row holds bin q+4r.
- **Output order.** The output is in *digit-reversed* order: rows 0,1,2,3 hold bins
  0,4,8,12, rows 4..7 hold bins 1,5,9,13, and so on. `ofdm_tx` and `ofdm_rx` restore
  natural order with fixed wiring: natural index n comes from row 4·(n mod 4) + n div 4.

Each butterfly puts its twiddle on the inputs, T_i = W^K_i · P_i, and then computes

```
X0 = T0 +  T1 + T2 +  T3        X2 = T0 -  T1 + T2 -  T3
X1 = T0 - jT1 - T2 + jT3        X3 = T0 + jT1 - T2 - jT3
```

The twiddle exponents K1..K3 are module parameters, so every multiplier has a constant
operand. Multiplying by −j or +j is only a swap of the real and imaginary parts and a
sign change.

**Inverse transform.** One input, `inverse`, switches the same hardware between FFT and
IFFT. When it is high, each twiddle is conjugated and j becomes −j. In the butterfly
this swaps outputs X1 and X3. The transmitter ties `inverse` high and the receiver ties
it low.

**Fixed point.** These choices belong to this implementation:

| item | format |
|---|---|
| samples | signed 16-bit real and imaginary parts (`ofdm_pkg::cplx_t`) |
| twiddles | signed, 14 fractional bits: 1.0 = 16384, cos 22.5° = 15137, cos 45° = 11585, cos 67.5° = 6270 |
| twiddle products | rounded to nearest |
| butterfly output | 3 bits wider than its input, so it cannot overflow |
| IFFT scaling | divide by 4 after each stage, rounded; 1/16 overall |
| FFT scaling | none |
| final result | saturated back to 16 bits |

With these choices, IFFT followed by FFT returns the original constellation points to
within a few LSBs.

**Timing.** From `x` to the output register the transform is combinational. `y` and
`out_valid` appear one clock after `in_valid`. This gives one transform per clock at
the cost of a long combinational path: two butterfly levels and one constant
multiplier level. No clock rate has been measured for this RTL.

## 16-QAM mapping (`qam16_mapper`, `qam16_demapper`)

The I and Q levels are {−3, −1, +1, +3}. Bits b[3:2] choose I and bits b[1:0] choose Q,
and each pair maps as follows:

| bits | level |
|---|---|
| 00 | +3 |
| 01 | +1 |
| 10 | −1 |
| 11 | −3 |

For example, 0000 → (+3, +3), 0110 → (+1, −1) and 1111 → (−3, −3).

This labelling is **not** a Gray code along each axis: the neighbouring levels +1 and −1
differ in two bits. A symbol error across the centre line therefore costs two bit errors.
The published design describes its mapping as Gray-coded, but its constellation diagram
shows this labelling, and the RTL follows the diagram. To use a per-axis Gray code
instead (00, 01, 11, 10), change the two `case` tables.

Level 1 is sent as the sample value `QAM_UNIT` = 1024, which leaves headroom for the
transform. The decoder makes a hard decision with thresholds 0 and ±2·`QAM_UNIT` on each
axis. A value exactly on a threshold goes to the level above it. There is no
equalisation: the receiver expects a channel whose gain on each subcarrier is close to 1.

## Bit and symbol framing

- **Bit order.** Bits 4k..4k+3 of a symbol go to subcarrier k, in arrival order, and the
  first of the four is the most significant. The receiver sends bits out in the same order.
- **Serial/parallel converters.** `sp_converter` and `ps_converter` are generic W-bit ×
  N-word converters. Each is used twice:

  | use | W | N |
  |---|---|---|
  | transmitter S/P | 1 bit | 64 words |
  | receiver P/S | 1 bit | 64 words |
  | transmitter P/S | one complex sample | 16 words |
  | receiver S/P | one complex sample | 16 words |

  `ps_converter` accepts a new load in the same clock in which its last word is on the
  output, so output vectors can follow each other with no gap.
- **Cyclic prefix.** `CP_LEN` = 4 samples, which is N/4. This is a choice of this
  design.
  - `cp_insert` stores the 16 samples of a symbol. It then sends samples 12..15 followed by
    samples 0..15, on 20 consecutive clocks.
  - `cp_remove` counts frames of 20 samples and drops the first 4 of each frame.
- **Frame alignment.** The receiver takes its frame alignment from reset: the first
  sample after reset must be the first prefix sample of a symbol. Symbol timing recovery
  is not part of this design.

## Interfaces and timing

There is no back-pressure. Every stream is a data word with a `valid` strobe.

**Transmitter.**
- It takes at most one bit per clock on `tx_bit` / `tx_bit_valid`.
- `tx_valid` first rises 18 clocks after the clock edge that takes a symbol's 64th bit.
- It then stays high for 20 consecutive clocks.

**Receiver.**
- It takes at most one sample per clock on `rx_data` / `rx_valid`.
- It sends 64 bits on consecutive clocks on `rx_bit` / `rx_bit_valid`.
- The first bit appears 3 clocks after the edge that takes the symbol's last sample.

**Loopback.** Through a one-register channel, the first bit comes back out 41 clocks after
the last bit of the same symbol went in.

**Rate limits.** The design has no buffering between symbols, so input must be paced:
- Symbols may start no more often than once every 64 clocks. A continuous bit stream
  gives exactly this rate.
- The transmitter's next symbol must not complete while `cp_insert` is still sending the
  previous one.
- Received symbols must not arrive faster than their 64 bits can leave.

Assertions in `ps_converter`, `cp_insert`, `ofdm_tx` and `ofdm_rx` report any violation
of these rules in simulation.

Reset is synchronous and active high. It clears all counters and valid flags. Data
registers are not reset, because nothing reads them before the matching valid flag is
set.

## Files

| file | contents |
|---|---|
| `rtl/ofdm_pkg.sv` | constants (`N_FFT`, `BITS_PER_SYM`, `DW`, `CP_LEN`, `QAM_UNIT`), `cplx_t`, twiddle table |
| `rtl/ofdm_transceiver.sv` | top: transmitter and receiver |
| `rtl/ofdm_tx.sv`, `rtl/ofdm_rx.sv` | the two chains |
| `rtl/fft16_radix4.sv`, `rtl/radix4_butterfly.sv` | one-cycle 16-point FFT/IFFT |
| `rtl/qam16_mapper.sv`, `rtl/qam16_demapper.sv` | 16-QAM encoder and hard-decision decoder |
| `rtl/sp_converter.sv`, `rtl/ps_converter.sv` | serial/parallel converters |
| `rtl/cp_insert.sv`, `rtl/cp_remove.sv` | guard-interval (cyclic-prefix) insertion and removal |
| `tb/tb_ofdm_ref_pkg.sv` | testbench reference models: direct floating-point DFT, constellation table |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ofdm_ber_sweep.sv` | bit-error rate versus noise level through the whole transceiver |

## Simulating

Every testbench checks its results itself. At the end it prints
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ofdm_pkg.sv tb/tb_ofdm_ref_pkg.sv tb/tb_ofdm_transceiver.sv \
    --top-module tb_ofdm_transceiver -Mdir obj_tb
./obj_tb/Vtb_ofdm_transceiver
```

For another testbench, replace the last file and the top-module name. `-Irtl -Itb` lets
Verilator find the other modules.

Each testbench checks the following:

- **Transforms.** `tb_fft16_radix4` and `tb_radix4_butterfly` compare against a
  floating-point DFT and the butterfly equations, in both directions. They also check
  the one-clock latency and saturation.
- **Transmitter.** `tb_ofdm_tx` checks every transmitted sample, including the cyclic
  prefix, against an inverse DFT computed in the testbench, and checks the 18-clock
  latency.
- **Receiver.** `tb_ofdm_rx` decodes symbols built by the testbench, with and without
  small noise.
- **Full design.** `tb_ofdm_transceiver` runs the whole design at its default sizes
  through a channel with three effects: peak clipping at ±1800, an echo of 1/16 amplitude
  two samples late, and ±16 uniform noise. It requires error-free bits and the 41-clock
  latency. It also counts each mechanism (IFFT and FFT runs, prefix insertion and removal,
  clipping, back-to-back output symbols, idle input clocks) and fails if any of them never
  happened.
- **Noise sweep.** `tb_ofdm_ber_sweep` adds near-Gaussian noise at five levels. One run
  gave these BERs:

  | SNR | BER |
  |---|---|
  | infinite | 0 |
  | 15.2 dB | 0.005 |
  | 9.1 dB | 0.11 |
  | 5.6 dB | 0.20 |
  | 2.1 dB | 0.28 |

  The testbench checks that there are no errors without noise and that the BER never
  falls as the noise grows.

## How far this follows the published design

**Taken from the published design:**
- the chain of blocks in both directions
- 16 subcarriers with 16-QAM and the {±1, ±3} levels
- the constellation labels
- the radix-4 16-point flow graph: twiddle exponents, digit-reversed output order and
  butterfly equations
- the one-cycle transform
- cyclic-prefix insertion and removal

**Chosen for this implementation:**
- all word widths and the fixed-point format
- the IFFT/FFT scaling
- the constellation amplitude
- the prefix length of 4
- bit ordering
- handshakes, reset and frame alignment
- all buffering

**Differences from the published design:**
- **Resource use.** The published FPGA build reports about 48 flip-flops and about
  184 MHz. This RTL registers whole symbols in its converters and has about 1,700
  flip-flop bits. Its clock rate has not been measured.
- **Other modulations.** Only 16-QAM is built. BPSK, 4-QAM, 32-QAM and 64-QAM appear in
  the published work only as comparisons.
- **Channel model.** The channel (clipping, noise, multipath) is not hardware. It exists
  only inside the testbenches.
- **Missing receiver functions.** There is no synchronisation and no channel
  equalisation. The published design does not describe either.
