# Semi-coherent phase perturbation for arbitrary-phase spread spectrum

Some spread-spectrum waveforms built for security draw each chip's phase from
a large PSK circle, using a keyed pseudorandom generator. An eavesdropper who
can measure those phases at high SNR sees the generator output directly. With
enough of them it can rebuild the generator state, and so the key. This design
makes that harder by adding a small random phase error ψ to every transmitted
chip. ψ comes from a second generator that the receiver does not share. The
receiver still removes the keyed phase θ exactly, so each chip arrives at e^{jψ}
instead of on the real axis. Summed over a symbol of many chips this costs only
a fraction of a dB of symbol energy. An observer, by contrast, only sees θ + ψ
and cannot tell which of m neighbouring phases was the true one.

This RTL holds the whole baseband path of that scheme. The transmitter spreads
data with the perturbed phases. The receiver finds each frame by its preamble,
despreads it and detects where the packet ends. The receiver can run in a
*semi-coherent* mode that leaves ψ in, or in a *trusted* mode: a partner given
the perturbation seed removes ψ too and despreads with no loss.

## The numbers that define it

| quantity | value | meaning |
|---|---|---|
| M | 256 (`PHASE_W` = 8) | phase states on the circle, step 2π/256 |
| m | 67 (`M_RANGE`) | perturbation states: ψ ∈ [−33, +33] steps, ±0.81 rad |
| perturbation word | 12 bits (`PERT_W`) | raw generator output, reduced mod m |
| N | 175 (`N_CHIPS`) | chips per data symbol |
| chip samples | 12-bit signed I/Q (`IQ_W`), amplitude 2047 | implementation choice |

For ψ uniform on [−ψmax, ψmax], the projected chip energy averages
sin(ψmax)/ψmax. With m = 67 on 256 phases that is 0.89, a loss of about 0.5 dB.
The chance that a chip carries its true phase is 1/m. Other trade-offs come
from changing `M_RANGE`:

| m | 31 | 47 | 67 | 93 | 129 | 155 |
|---|---|---|---|---|---|---|
| target loss (dB) | 0.1 | 0.25 | 0.5 | 1 | 2 | 3 |
| measured in simulation (dB) | 0.105 | 0.243 | 0.503 | 0.991 | 1.971 | 2.997 |

The measured row comes from `tb/tb_loss_sweep.sv`: 28,000 perturbed chips per
value of m, noiseless loop-back, 12-bit fixed point. It agrees with a
floating-point model to within 0.06 dB.

## Phase arithmetic on the transmit side

All phase handling is integer arithmetic modulo 256.

1. **Bulk phase θ** (8 bits) comes from the keyed generator. The constellation
   point for phase word k is at angle (k + ½)·2π/256, so no point lies on an
   axis.
2. **Perturbation ψ**: the 12-bit word from the unsynchronized generator is
   reduced mod 67, and 33 (= ⌊67/2⌋) is subtracted. This gives a signed 7-bit
   value in [−33, 33]. A 12-bit word does not split evenly into 67 residues
   (4096 = 61·67 + 9), so values −33…−25 occur 62 times in 4096 and the rest
   61 times. This slight non-uniformity is accepted.
3. **Phase state** = θ + 128·data + ψ (mod 256). ψ is sign-extended to 8 bits
   before the add, so the sum wraps around the circle correctly. Data is BPSK:
   a 1 turns the chip by half a circle.
4. The phase state indexes a cos/sin table and gives the chip sample.

A symbol may be flagged *clean*. Its chips then go out with ψ = 0, as a
preamble would be sent, so that acquisition and tracking are not disturbed.
The perturbation generator still steps on every chip. This way a trusted
receiver's copy stays aligned with it.

## The generators (`rns_prng`)

Both generators have the same structure, a residue number system (RNS) counter:

* Four residue counters run modulo co-prime primes. The keyed generator uses
  {251, 241, 239, 233} and the perturbation generator {229, 227, 223, 211}.
  Because the primes are co-prime, the residue vector repeats only after
  their product, about 3.4·10⁹ chips.
* Each residue addresses a 256-word ROM. The ROM outputs are XORed into the
  8- or 12-bit result.
* The ROM contents are a fixed integer avalanche hash of (salt, residue index,
  residue value), evaluated at elaboration.
* A seed is four residues. `load` sets them; `advance` steps all four by one.

The two generators use disjoint prime sets and different salts, so their
sequences are independent. The scheme only requires that the generators be
RNS based, with those widths, and independent through co-prime moduli. The
counters, the hash ROMs and the XOR combiner are the simplest construction
that meets this. They are not a vetted cryptographic generator. Before using
this for real security, replace `rns_prng` with one that is (same ports).

## Transmitter (`semicoherent_tx`)

```
 s_valid/s_data/s_clean ─► symbol control ─► chip counter 0..N-1
 key_seed ─► rns_prng (8 b) ──── θ ────────────┐
 pert_seed ─► rns_prng (12 b) ─► mod 67 − 33 ─ ψ ─► phase_state_adder ─► reg ─► phase_iq_lut ─► chip_i/q
```

* `frame_start` loads both generators. The keyed one gets the session key, so
  every frame repeats the same spreading code. The perturbation one gets a
  fresh seed, so the same data gives a different chip stream in every frame.
  Pulse `frame_start` only while the transmitter is idle; an assertion checks
  this.
* Symbols are taken with a valid/ready handshake. `s_ready` is high while idle
  and during a symbol's last chip, so back-to-back symbols leave with no gap.
  That is one chip per clock and one symbol every 175 clocks.
* The first chip appears on `chip_valid` 3 clocks after the symbol is
  accepted.
* `chip_phase`, `chip_psi` and `chip_clean` travel with each sample, for
  observation and for a trusted receiver's side information.

## Receiver (`semicoherent_rx`)

```
 in_i/q ─► derotate e^{-jθ} ─► derotate e^{-jψ} (trusted mode, else bypass) ─► real part ─► Σ over N chips ─► sym_soft, sym_bit, sym_mag
            ▲ θ from keyed rns_prng        ▲ ψ from perturbation rns_prng + mod-m map
```

* **Synchronization.** The receiver holds its own copies of both generators.
  They step on every valid input chip. `frame_start` loads both generators
  and clears the accumulator, which defines symbol boundaries from then on.
  The parameter `LOAD_SKIP` loads them that many chips into the frame. In the
  top level, `frame_start` comes from the preamble detector (next section).
  The input `phase_offset` is added to θ before the table look-up and
  removes a static carrier phase offset.
* **θ derotation** multiplies each chip by the conjugate of the same table
  used by the transmitter. For a chip with the right key only e^{j(ψ + data·π)}
  is left.
* **ψ derotation** applies in trusted mode (`sync_perturb` = 1) and on chips
  not marked `in_clean`. It is a second multiplier, fed from a table without
  the half-step offset, since ψ is an offset rather than a constellation
  point. In semi-coherent mode it is bypassed.
* **Projection and accumulation.** The real part of each chip is summed over
  175 chips. `sym_bit` is the sign of the sum (negative means 1) and `sym_mag`
  is its magnitude, the despread symbol energy estimate.
* **Timing.** Each derotator takes 2 clocks and the accumulator 1, so a
  symbol appears 5 clocks after its last chip enters.
* **Fixed point.** Table amplitude is 2047 against a divide by 2048, so each
  derotator has a gain of 0.9995. The accumulator is 23 bits wide at defaults.
  `ACC_W` can be overridden.

A receiver with the wrong key derotates by the wrong phases, and its symbol
decisions are no better than chance. The end-to-end testbench checks this.

## Finding the frame and its end

The top level, `semicoherent_link`, adds acquisition in front of the
despreader. The transmitter sends one chip per `tx_clk`. The receiver runs on
`rx_clk` at twice that rate and takes one sample per clock, so it sees every
chip twice. For a 10 MHz-wide signal that is a 10 MHz chip clock and a 20 MHz
sample clock. A frame starts with eight *clean* preamble symbols: unperturbed
chips on the keyed code. The user chooses their data bits, except that the
first must be 0 (see step 4).

```
 rx_in ─► preamble_detector ──detect──► keep every 2nd sample ─► semicoherent_rx ─► symbols
          (175-tap correlator)  │                                       │ sym_mag
                                ├─ det_re/im ─► phase_offset_estimator ─► + θ
                                └─ det_mag ─► packet_end_detector ◄─────┘ ─► rx_packet_end
```

1. **Arm.** `rx_arm` loads the session key into the detector's own copy of
   the keyed generator. Over the next 176 clocks the detector fills a
   175-entry reference with e^{jθ} of the first preamble symbol. Then
   `rx_ready` rises.
2. **Correlate.** For every new sample the detector correlates the last 349
   samples, taking every second one, against the reference. Its magnitude is
   |Re| + |Im| of that sum, so carrier phase and data sign do not matter.
3. **Threshold.** It detects when that magnitude exceeds half the sum of
   |I| + |Q| over the same 175 samples. This threshold follows the input
   level, so it needs no gain setting. A clean preamble symbol reaches 1.0 to
   1.4 times the level sum, noise or a wrong key only about 1/√175 of it. A
   second condition, a level of at least a quarter of full scale, blocks
   false detections in the first few samples after silence. There a handful
   of chips can match anything. This floor assumes the input is
   gain-controlled near full scale.
4. **Phase offset.** The correlation at detection is A·175·e^{jφ}, where φ is
   the carrier phase offset between the two ends. The first preamble symbol
   must carry bit 0; otherwise every decision in the frame is inverted. `phase_offset_estimator`
   finds its angle with a 12-step CORDIC and rounds it to the 256-point
   circle. The receiver adds that index to θ before derotating, which removes
   the offset. Rounding leaves at most 0.7°. The CORDIC takes 13 clocks, so
   the samples and the detection pulse pass a 16-clock delay line before they
   reach the despreader.
5. **Join the code.** Detection comes at the end of preamble symbol 1. The
   receiver loads its generators 175 chips into the frame (a jump in a
   residue counter is one modular add). It keeps every second sample,
   starting with the one right after the detection, and despreads from
   preamble symbol 2 on. It marks the next 7 × 175 chips clean, which a
   trusted receiver needs.
6. **End of packet.** `packet_end_detector` keeps the last eight symbol
   magnitudes. Once it has eight, it ends the packet when their sum drops
   below 8 × (detection magnitude) / 4. Perturbed data symbols stay far above
   this; silence or noise falls below it within a few symbols.
   `rx_packet_end` pulses and the receiver returns to searching.

Acquisition timing at the defaults: detection comes about 350 receiver
clocks (plus any channel delay) after the first chip. Symbols then arrive every 350
receiver clocks. A few symbols despread from the silence after a packet come
out before the end is seen; the user's known packet length tells them apart.

The analog path (DAC, RF, channel, ADC) is outside the design. Transmitted
chips leave on `tx_chip_*`, and received samples enter on `rx_in_*`, one per
`rx_clk`. The two halves share only `rst_n`; no signal crosses between the
clocks. `tx_chip_phase`, `tx_chip_psi` and `tx_chip_clean` are for
observation.

## What is not here

* **Frequency offset and tracking.** Only a static phase offset is
  estimated. No frequency offset is estimated, and there are no tracking
  loops. A carrier frequency offset would turn the phase during a packet and
  is not corrected.
* **Correlator pipelining.** The correlation is one combinational sum of 175
  complex products per clock. A fast clock would need it pipelined.
* **FEC.** There is no polar-code decoder.
* **α scaling.** The α stage that may shape the keyed phase over time is not
  built, since its function is not defined.
* **Other error shapes.** Only uniformly distributed errors are built. A
  normally distributed ψ, which the scheme also allows, would need a
  different mapping stage.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/sc_pkg.sv tb/tb_semicoherent_link.sv --top-module tb_semicoherent_link
./obj_dir/Vtb_semicoherent_link
```

Replace the testbench name to run the others:

| testbench | what it checks |
|---|---|
| `tb_semicoherent_link` | Full-size end-to-end run at the default parameters, two clocks, eight frames the receiver finds on its own: semi-coherent (0.5 dB loss), reseeded with an odd channel delay, trusted (no loss), noisy, wrong key (never detected), re-armed, and packets of 8 and of 128 data symbols. Six frames carry a carrier phase offset. It checks detection and end of every frame, detection latency and symbol rate, and counts every mechanism. |
| `tb_preamble_detector` | Reference build time, detection timing and magnitude against a floating-point model, random carrier phase, noise, wrong key, search off. |
| `tb_phase_offset_estimator` | 2000 random angles and magnitudes against atan2, latency. |
| `tb_packet_end_detector` | 300 random packets against a model of the end rule, including the done timing. |
| `tb_loss_sweep` | Loss against m for m = 31 … 155, transmitter wired straight to receiver. |
| `tb_semicoherent_tx`, `tb_semicoherent_rx` | Each end against a closed-form model of the generators (`tb/sc_ref_model.svh`). |
| `tb_rns_prng`, `tb_phase_error_map`, `tb_phase_state_adder`, `tb_phase_iq_lut`, `tb_phase_derotator`, `tb_despread_accumulator` | Unit tests. |

The reference model computes generator outputs from the chip index in closed
form: residue = (seed mod p + t) mod p.

## Changing it

* **Trade-off.** Set `M_RANGE` on `semicoherent_link` (or on the tx/rx
  blocks). The error width follows as ⌈log₂ m⌉, and m may go up to 255.
* **Symbol length.** Set `N_CHIPS`. The preamble correlator follows it (one
  symbol long).
* **Preamble length.** Set `PRE_SYMS`; the transmitter side is up to the user,
  who sends that many clean symbols first.
* **Circle size.** Set `PHASE_W`. The sine tables are computed at elaboration
  and grow as 2^PHASE_W.
* **Generators.** `sc_pkg.sv` holds the prime sets. Keep every modulus below
  256 and all of them mutually co-prime. The salts are set where the
  transmitter and receiver instantiate `rns_prng`, and must match between the
  two ends.

## Files

`rtl/sc_pkg.sv` (constants, seed type), `rns_prng`, `phase_error_map`,
`phase_state_adder`, `phase_iq_lut`, `phase_derotator`,
`despread_accumulator`, `semicoherent_tx`, `semicoherent_rx`,
`preamble_detector`, `phase_offset_estimator`, `packet_end_detector`,
`semicoherent_link`. Testbenches and the helper `loss_probe` are in `tb/`.
