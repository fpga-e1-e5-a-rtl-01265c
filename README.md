# Galileo E5 receiver baseband

This is the FPGA part of a Galileo E5 receiver of the kind used in a GNSS
ground sensor station. An RF/IF unit delivers complex 8-bit samples at
112 MHz. The FPGA has three jobs:

- **Capture snapshots for acquisition.** One E5 sideband (E5a or E5b) is
  shifted to zero frequency, decimated by six and written to an external
  64k x 32-bit memory. A host computer runs an FFT code search on the
  snapshot.
- **Track satellites.** Eight channels track satellites once the host has
  found them. Each channel has its own carrier and code NCOs, an
  early/prompt/late correlator, and a hardware DLL/PLL.
- **Keep receiver time.** A time base (the TIC, 1250 per second) sets when
  snapshots start, and every channel latches its code phase, carrier phase,
  Doppler and power on each TIC.

The heavy search (an FFT over 10230-chip codes) runs on the host, and the
continuous work (correlation at 112 MS/s and loop closure every millisecond)
runs in hardware. Only the E5 path is implemented. E1, the GPS bands, the RF
front end, the FFT search and the Ethernet link are outside this RTL.

```
 s_in (8b I/Q @112 MHz) ─┬─> ssb_acq_unit: NCO ─> complex mixer ─> Σ6 /6 ─> controller ─> mem_data/addr/we
                         │                                          (Start, TIC) ──┘        (64k x 32)
                         ├─> e5_channel[0..7]:
                         │     carrier_nco ─> complex_mixer ─> epl_correlator ─> track_loop ─┐
                         │     code_nco ─> e5_prn_gen ─> E/P/L line ──┘       chan_fsm <────┤
                         │       ^ code word + correction                                    │
                         │       └──────────── carrier/code corrections <────────────────────┘
 tic_gen ── tic ─────────┴─> snapshot start alignment, per-channel measurement latch
```

## The numbers that tie it together

| quantity | value | where it matters |
|---|---|---|
| sample clock | 112 MHz, complex, 8 bit (sI, sQ signed with 7 fraction bits) | the only clock |
| E5 primary code | 10230 chips at 10.23 Mchip/s = 1 ms | 112 000 samples per code period |
| snapshot rate | 112 MHz / 6 = 18.667 MHz | 18 667 snapshot samples per code period |
| snapshot size | 2^16 words of 32 bits | 3.5 ms of one sideband |
| TIC | 1250 Hz, 800 us | 89 600 clocks |
| coherent integration | 1 ms (one code period) | one loop update per ms |
| loop bandwidths | DLL 5 Hz, PLL 10 Hz, both second order | `track_loop` parameters |

All NCOs are 32-bit phase accumulators clocked at 112 MHz, so one unit of a
frequency word is 112e6 / 2^32 = 0.026 Hz. `gal_pkg::hz_to_fcw()` converts.

## Snapshot acquisition unit (`ssb_acq_unit`)

The chain is `carrier_nco` -> `complex_mixer` -> `resample6` -> `snapshot_ctrl`.

- **Frequency shift.** The mixer multiplies by cos - j·sin of the NCO phase,
  which moves the spectrum down by the NCO frequency. Set `nco_fcw` to the
  sideband offset plus the expected Doppler. The sidebands sit at about
  -15.345 MHz (E5a) and +15.345 MHz (E5b) from the E5 centre, plus any IF
  offset of the front end.
- **Decimation.** Each group of six consecutive samples is summed into one
  output sample. This boxcar filter is also the anti-alias filter. The words
  grow to 13 bits.
- **Capture.** A `start` pulse arms the controller, and the capture begins at
  the next `tic`. At that TIC the decimator restarts its group of six, so
  word 0 always begins a fresh group. Each output sample becomes one word:
  I sign-extended in bits 31:16 and Q in bits 15:0. The words go to
  addresses 0..65535, one `mem_we` strobe each. `done` pulses after the last
  word.
- **Timing.** The capture takes 6 x 65536 samples (3.5 ms) after the TIC.
  Any `start` that arrives while `busy` is high is ignored.

On the host, the usual search is a circular correlation of 1 ms (18 667
samples) against the code, resampled to 18.667 MHz. The code is split into
19 blocks of 1024, each zero-padded to 2048 before the FFT. The end-to-end
testbench runs a direct (non-FFT) version of this search on the captured
memory.

## Tracking channel (`e5_channel`)

This is the hardest part to follow, so the timing is spelled out here.

### Carrier wipe-off

`carrier_nco` runs at `carr_fcw = REG_CARR_FCW + carr_corr`. It feeds
`complex_mixer`, which produces 10-bit baseband samples. The input sample is
registered once so that it meets the NCO output computed for it. From input
sample to correlator there are 3 clock cycles of latency.

The NCO counts whole carrier cycles, up for positive words and down for
negative ones. `cycles + phase/2^32` is therefore the accumulated carrier
phase since the start.

### Code replica and early/prompt/late

`code_nco` ticks once per **half chip**. At its nominal word,
2 x 10.23e6 / 112e6 x 2^32 = 784 598 489, a tick comes about every 5.47
samples.

- **The delay line.** Each tick pushes the generator's current chip into a
  three-slot line: early, then prompt, then late. The generator
  (`e5_prn_gen`) steps on every second tick. As a result, early leads prompt
  by half a chip and prompt leads late by half a chip. The early-late
  spacing is one chip.
- **Slot contents.** Each slot carries the chip value, its index and which
  half of the chip it is.
- **Epochs.** When the first half of chip 0 reaches the prompt slot, the
  correlator's next sample starts a new integration period (`dump`). The
  code-period counter `epochs` also increments. So the integration periods
  are the prompt replica's code periods.
- **Skipped first period.** The first dump after a start closes a partial
  period and is not passed on.

### Starting a channel (the acquisition hand-off)

The host writes these registers on the `cfg_*` port of the top:

| addr | register | meaning |
|---|---|---|
| 0 | `REG_CARR_FCW` | carrier word: sideband offset + IF + Doppler from the search |
| 1 | `REG_CODE_FCW` | code word (2 x chip rate); default nominal |
| 2 | `REG_PRN_INIT` | bits 13:0 start value of code register 2 (selects the satellite); bit 14 selects E5b taps |
| 3 | `REG_DELAY` | samples to hold the code after start (sets the code phase) |
| 4 | `REG_CTRL` | bit0 start, bit1 close the loops, bit2 stop, bit3 acquisition request |
| 5 | `REG_SAT_ID` | identifier copied into the measurements |

A start clears both NCOs and reloads the code generator. It then holds the
code for `REG_DELAY` samples.

After the hold, the code NCO is preset so that its first enabled sample
ticks. Prompt chip 0 therefore meets the correlator about
`REG_DELAY + 9` clocks after the `REG_CTRL` write. The 9 clocks are:

- 1 for the start register
- about 5.5 for the half chip from early to prompt
- 3 for the sample path

To line up with a received code that begins chip 0 at input sample `D`, the
host sets `REG_DELAY ≈ D - (sample index at the write) - 9`. It may do this
modulo 112 000. The DLL pulls in any remaining error within about ±0.5 chip.

### Loops (`track_loop`)

Once per period the six sums go through one shared sequential CORDIC (three
runs) and a 15-bit divider. That takes about 75 clocks, out of the 112 000
clocks in a period.

| quantity | formula | unit |
|---|---|---|
| carrier error | atan(Q_P / I_P), folded into ±1/4 cycle (Costas) | 2^-16 cycle |
| envelopes | E = \|I_E + jQ_E\|, L = \|I_L + jQ_L\|, P = \|I_P + jQ_P\| | x1.6468 (CORDIC gain) |
| code error | (E - L) / (E + L) | 2^-15 chip |

Both loops use the same second-order filter, applied once per period:

```
wn   = 8·zeta·BW / (4·zeta² + 1)
tau1 = k / wn²
tau2 = 2·zeta / wn
st  += K1·(e - e_prev) + K2·e
K1   = tau2/tau1 · 2^32/112e6
K2   = T/tau1 · 2^32/112e6
```

For the code loop, K1 and K2 carry an extra factor of 4: 2 because the code
word runs at twice the chip rate, and 2 because of the 2^-15 unit of the
code error.

With the defaults (zeta 0.7, PLL gain 0.25 and 10 Hz, DLL gain 1 and 5 Hz,
T = 1 ms), the coefficients are K1 = 4063 and K2 = 55 for the PLL, and
K1 = 2031 and K2 = 14 for the DLL.

The filter state keeps 16 fraction bits. `carr_corr = st >>> 16` is added to
the carrier word, and `code_corr` to the code word.

The signs are set so that a positive phase error raises the carrier
frequency. Likewise, E > L (the signal arrives ahead of the prompt) speeds
up the code. The coefficients are computed at elaboration from the `real`
parameters `PLL_BW`, `DLL_BW`, `ZETA`, `PLL_K`, `DLL_K` and `T_INT`. The
Costas discriminator ignores 180° flips, so neither secondary-code chips nor
data bits disturb the loop.

### Channel states (`chan_fsm`)

The status numbers are the ones the receiver reports:

| status | name | meaning |
|---|---|---|
| 0 | INIT | after reset or stop |
| 2 | ACQ | waiting for the host's search (after a request or a loss of lock) |
| 4 | SSB | tracking one sideband; bit synchronisation running, data demodulation off |
| 5 | PLL | final state: loops locked, data demodulation on |

Status values 1 and 3 (SNR calibration, acquisition verification) exist in
the numbering but are never entered.

An epoch is *good* when two conditions hold: the prompt envelope is at least
`POW_THR`, and the Costas error is within ±`PHASE_THR`. The default
`PHASE_THR` of 6000 is about 33°. The state changes as follows:

- `SYNC_N` good epochs in a row (20, one 20 ms data bit) move SSB to PLL.
- In SSB, only a weak envelope counts against lock, because the loops are
  still pulling in.
- In PLL, any epoch that is not good counts against lock.
- `LOSS_N` (10) such epochs in a row return the channel to ACQ and pulse
  `lost`.

In PLL the channel emits one symbol per millisecond: the sign of I_P, with 1
meaning negative. Removing the secondary code and finding the data-bit
boundaries is left to the host.

### Measurements at TIC

On each `tic`, every channel copies a `meas_t` record. `meas_valid` rises
one clock later. The host forms its observables from the record as follows:

- **Code phase, in ms since start:**
  `epochs + (chip + 0.5·half + 0.5·code_frac/2^32) / 10230`. Differences
  between channels give relative pseudoranges.
- **Carrier phase, in cycles:** `carr_cyc + carr_frac/2^32`.
- **Doppler:** `carr_fcw · 112e6/2^32`, minus the sideband offset and IF.
- **Power:** `power`, which is the prompt envelope (x1.6468).
- **Status** and **satellite id**.

## E5 code generator (`e5_prn_gen`)

The generator has two 14-stage Fibonacci registers. Their last stages are
XORed to form the chip.

- **Start state.** Register 1 starts at all ones. Register 2 starts from
  `init2`, which the host supplies for each satellite.
- **Length.** After chip 10229 both registers reload, which gives the
  10230-chip, 1 ms code.
- **Taps.** The default tap masks encode the base polynomials of the E5a-I
  code (octal 40503 and 50661) and the E5b-I code (octal 64021 and 51445).

**Check before use with real signals:** the stage-numbering and tap-order
convention, and the per-satellite start values, are not verified against
the Galileo signal specification. Both are parameters or inputs, so they can
be corrected without touching the structure. The pilot (Q) codes and the
secondary codes are not generated.

## How far to trust it, and where it departs from the reference receiver

- **Loops in hardware.** The reference receiver closes its DLL/PLL in
  software on a tracking computer or PC. Here they are in hardware, one per
  channel, with the same discriminator types, orders, bandwidths and
  integration time. Damping, loop gains, the filter form and all
  fixed-point formats are choices made in this design.
- **Single-sideband tracking.** Each channel tracks one component (E5a or
  E5b). Full-band AltBOC correlation of the combined E5 signal is not built.
  There is no carrier aiding of the code loop.
- **Simplified bit synchronisation.** "Bit synchronisation" means a
  sustained-lock test here, not a search for data-bit edges.
- **Host interface.** The host link is a plain register-write port plus
  result ports. The external snapshot memory is a bare write port. Readback
  and the network interface are not included.
- **Not built.** E1 processing, the GPS bands and the measurement "flags"
  field.
- **Pull-in.** The 10 Hz PLL pulls in slowly from a frequency error of a few
  Hz. From 5 Hz and 0.27 chip off, a channel reaches the locked state in
  about 28 ms of signal. Larger errors need a narrower search first, or
  wider loops (change `PLL_BW`).

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_tic_gen` | strobe every 89 600 clocks exactly; count steps by one |
| `tb_carrier_nco` | phase and signed cycle count against a 64-bit model, cos/sin within 1 LSB, for ± words |
| `tb_complex_mixer` | exact products against a model, including full-scale corners |
| `tb_resample6` | sums of six with gaps in `valid_i`; `clear` regroups |
| `tb_snapshot_ctrl` | waits for TIC, word format, consecutive addresses, 2^AW words, `done`, second capture |
| `tb_ssb_acq_unit` | tone 500 kHz from the NCO: constant amplitude, 9.64° phase step per word, 256 words after TIC |
| `tb_code_nco` | every tick on the right sample, first tick on the first enabled sample after load, nominal word value |
| `tb_e5_prn_gen` | chip-by-chip against an independently written model, E5a and E5b taps, wrap at 10230, balance |
| `tb_epl_correlator` | six sums against a model over random periods |
| `tb_track_loop` | atan (±4 units), envelope (0.1 %), (E-L)/(E+L) (±16), filter outputs exactly, latency ≤ 100 clocks |
| `tb_chan_fsm` | every transition: request, start, sync count, loss in SSB and PLL, stop |
| `tb_e5_channel` | closed loop on a synthetic E5a signal with noise: locks within 100 ms, 1 ms dumps, frequency within 1.5 Hz, chip index within 1 chip at TIC, 1.6 carrier cycles per TIC at 2 kHz, constant symbols |
| `tb_gal_e5_receiver` | whole receiver at full size with two satellites: snapshot search peak at the true delay, both channels locked with exact chip index and Doppler error < 0.2 Hz, a channel on an absent satellite loses lock, stop, request; every mechanism counted |

`tb/e5_ref_pkg.sv` holds the reference code model that the testbenches share.

## Simulating

Everything is plain SystemVerilog-2017 for Verilator 5. For example, to run
the full receiver test (about 20 s, 12 million clocks):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/gal_pkg.sv tb/e5_ref_pkg.sv \
  tb/tb_gal_e5_receiver.sv --top-module tb_gal_e5_receiver -o sim
./obj_dir/sim
```

Replace the testbench name to run any other block. To lint the RTL alone:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/gal_pkg.sv rtl/gal_e5_receiver.sv
```

The testbenches work with randomly initialised state
(`+verilator+rand+reset+2`): everything that is read is reset.

## Files

- `rtl/gal_pkg.sv`: clock and code constants, sample, correlator and
  measurement types, status and register enums, and the table and frequency
  helpers.
- `rtl/gal_e5_receiver.sv`: the top.
- `rtl/ssb_acq_unit.sv`, `carrier_nco.sv`, `complex_mixer.sv`,
  `resample6.sv`, `snapshot_ctrl.sv`: the snapshot path.
- `rtl/e5_channel.sv`, `code_nco.sv`, `e5_prn_gen.sv`, `epl_correlator.sv`,
  `track_loop.sv` (with helpers `cordic_vec.sv` and `seq_div.sv`),
  `chan_fsm.sv`: the tracking channel.
- `rtl/tic_gen.sv`: the time base.
