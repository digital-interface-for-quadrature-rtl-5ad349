# Quadrature-sampling demodulator front end for a scanning interferometer

A scanning far-infrared interferometer produces an intermediate-frequency
fringe signal whose carrier frequency jumps in steps during every scan of the
rotating grating (typically somewhere between 10 and 200 kHz, twelve steps per
scan). A fixed electronic phase detector copes badly with such a
frequency-agile carrier. This design avoids the problem by not sampling at a
fixed rate. An external phase-locked synthesiser follows the reference IF and
supplies a sample clock at 4f/(2M+1), M = 0, 1, 2, ... (f is the instantaneous
carrier). Each sample then advances the carrier phase by an odd number of
quarter turns. The digitised stream therefore always reads
cos φ, ±sin φ, −cos φ, ∓sin φ, ..., whatever f happens to be, and the carrier
always sits at a quarter of the sample rate.

Because the carrier is always at fs/4, one fixed digital band-pass filter
centred on fs/4 cleans the whole scan. The hardware here is that chain for one
viewing direction of the interferometer:

```
 START_SAMPLE ─┐             ┌──────────────┐  sample_req  ┌──────────────┐ encode/hold ┌───────────┐
 REV_START ────┼────────────►│ ctrl_unit_a  ├─────────────►│ ctrl_unit_b  ├────────────►│ S/H + ADC │ (external)
 link A bytes ─┘  settings   └──────────────┘              │              │◄────────────┤ 12 bit    │
                                                           │              │  adc_data   └───────────┘
                                       ┌───────────────────┤              │
                                       ▼ il_wr             │              │ lb_data/valid/ack
                                 ┌───────────┐             │              ├──────────────► link B (external)
                                 │ input     │ full = IRQ  │              │
                                 │ latch     ├──────┐      └──────▲───────┘
                                 └───────────┘      ▼             │ ol_full / ol_rd
                                             ┌────────────┐  ┌────┴──────┐
                                             │ fir_filter ├─►│ output    │
                                             │ 31 taps    │  │ latch     │
                                             └────────────┘  └───────────┘
```

Everything runs on one 20 MHz clock (`clk`); the two external timing inputs
are resynchronised on entry.

## The filter engine (`fir_filter`)

This is the part that needs the most care. It is a transversal FIR filter
with one multiply-accumulate per clock, the job that a 16-bit fixed-point
signal processor does in the original system:

* **Storage.** A circular delay line of `NTAPS` 16-bit words, and a
  coefficient memory of `NTAPS` Q1.15 words with h[0] at address 0. After
  reset the delay line is cleared. This takes `NTAPS` clocks, and no input is
  taken during them.
* **One result.** The engine takes a sample from the input latch (`in_rd`)
  and writes it to the delay line. It then walks backwards through the delay
  line and forwards through the coefficients, reading one pair per clock into
  registers. On the next clock the product goes into a 40-bit accumulator. The
  result is y[n] = Σ h[k]·x[n−k], rounded from Q.15 to the nearest integer
  (ties go up) and saturated to ±32767/−32768.
* **Cycle budget.** The result is offered to the output latch (`out_wr`)
  exactly `NTAPS + OVERHEAD` clocks after the sample was taken. This is
  38 clocks (1.9 µs) for the default 31 taps and 7 clocks of overhead. The
  work itself needs `NTAPS + 3` clocks: one to store the sample, `NTAPS` for
  the multiply-accumulates, one for the pipeline and one for rounding. The
  rest of `OVERHEAD` is idle, so the timing matches a DSP program that needs
  N + 7 cycles per output. `OVERHEAD` must be at least 4.
* **Back-pressure.** If the output latch is still full, the engine waits with
  its result (`stall`) and loses nothing. A sample that is already waiting in
  the input latch is taken in the same clock that the previous result is
  handed over. A steady stream therefore gets one result every
  `NTAPS + OVERHEAD` clocks.
* **Coefficients.** The coefficients are written through `coef_we/addr/data`
  at any time. In the original system the DSP's boot loader puts them in
  place. The design does not fix their values. The testbenches use the
  rectangular-windowed band-pass that the system was designed around: centred
  on fs/4, with a pass band one tenth of the carrier wide (fs/40 at M = 0),
  truncated to 31 taps and quantised to Q1.15:

  h[n] = round(32768 · 2B · sinc(B·k) · cos(πk/2)), k = n − 15, B = 1/40,
  sinc(x) = sin(πx)/(πx)

  With these coefficients the carrier gain is about 0.695. Every tone at least
  fs/10 away from the carrier is at least 21 dB down. Every second
  coefficient is zero, because cos(πk/2) vanishes for odd k.

## Scan control (`ctrl_unit_a`)

`REV_START` marks the start of a grating revolution. It loads two
down-counters from software registers. The following `START_SAMPLE` pulses
first count down `START_DELAY`. After that, each pulse sends one `sample_req`
to the conversion control until `NUM_SAMPLES` requests have gone out. At that
point `scan_done` pulses, and further pulses are ignored until the next
`REV_START`. A `REV_START` in the middle of a scan starts counting again and
pulses `scan_restart`. Nothing is sampled while the enable bit is clear.
Reset clears it.

The registers are written through the byte-wide parallel side of a
transputer link adaptor ("link A"). The adaptor holds `la_valid` high with
the byte on `la_data`. The unit takes the byte and answers with a one-clock
`la_ack`, and it takes the next byte only after `la_valid` has dropped. A
write is three bytes:

| byte | content |
|------|---------|
| 1 | register: `0x00` NUM_SAMPLES, `0x01` START_DELAY, `0x02` CONTROL (bit 0 = enable) |
| 2 | value, low byte |
| 3 | value, high byte |

Unknown register numbers are ignored. The new values take effect at the next
`REV_START`. Their current values are visible on `cfg_*`.

## Conversion and output transfer (`ctrl_unit_b`, `data_latch`)

For each `sample_req`, control unit B raises `adc_hold` and pulses
`adc_encode` for one clock. It then waits `CONV_CYCLES` = 15 clocks, the
converter's worst-case 750 ns, and writes `adc_data` into the 12-bit input
latch. A sample therefore reaches the latch 17 clocks (850 ns) after its
request. A request that comes while a conversion is running is dropped and
reported on `sample_miss`.

The input latch's full flag is the filter's interrupt. When a new word
arrives while the previous one is still unread, it is lost, the held word is
kept, and `in_overrun` pulses. The same latch type, 16 bits wide, holds a
filtered word for the output side. Control unit B empties it and sends the
word to link adaptor B ("link B") as two bytes, low byte first. Each byte
uses a four-phase handshake: `lb_valid` goes high with the byte, drops when
`lb_ack` is seen, and the next byte waits until `lb_ack` is low again. If
link B is slow, the output latch stays full and the filter stalls, as
described above. The 12-bit samples are sign-extended into the filter's
16-bit words.

## Throughput and limits

| quantity | value at the defaults |
|---|---|
| filter time per sample | 38 clocks = 1.9 µs |
| conversion time per sample | 17 clocks = 0.85 µs |
| highest sustained sample rate | about 526 kHz, set by the filter |
| samples per scan | 1 to 65535 (16-bit register) |

The design target was sample rates of 10 to about 300 kHz (3.3 µs per
sample), and that fits with margin. A 200 kHz carrier sampled at full rate
(M = 0, 800 kHz) does not fit: use M ≥ 1 there (160 kHz at M = 1). The
filter works only on one sample stream, so the scan length and the sample
rate are the only limits on the workload.

## What is outside this RTL

* **External parts.** These have no logic here; their digital sides are
  ports of `qdi_top`:
  * the analogue amplifiers and sample-and-hold
  * the 12-bit converter (two's complement output assumed)
  * the PLL synthesiser that makes `START_SAMPLE`
  * the two transputer link adaptors (serial link protocol not included)
  * the boot EPROM
  * the host transputer array
* **Host-side processing.** Phase extraction (arctangent) and subtraction of
  the reference channel's phase are done on the host.
* **Reference channel.** A second channel that digitises the interferometer
  reference, used to cancel synthesiser phase errors, would be a second copy
  of this chain. It is not included.
* **Other views.** A full instrument repeats `qdi_top` once per viewing
  direction.
* **Not modelled.** Diagnostic I/O and software input queues of the original
  DSP program.

## Departures and own choices

The following follow the original system:

* quadrature sampling
* filter length of 31 taps
* cycle budget of N + 7 per output
* the conversion time
* the role of each unit and the latch-and-interrupt coupling

The following are this design's own choices:

* **Clock.** A single 20 MHz clock; the original DSP had its own 60 ns cycle.
* **Arithmetic.** The word formats (Q1.15 coefficients, 40-bit accumulator),
  rounding and saturation.
* **Programming and transfer.** The register set and its byte framing, and
  the handshakes and byte order on both links.
* **Scan counting.** The start delay and the restart rule.
* **Lost data.** Requests that come during a conversion are dropped, and a
  sample arriving at a full input latch is discarded.

The original system quoted two overheads: N + 7 cycles as the expected
filter time, and 12–15 cycles of overhead measured with diagnostic I/O
included. The RTL uses N + 7.

## Files

| file | content |
|---|---|
| `rtl/qdi_pkg.sv` | widths, types, register numbers |
| `rtl/qdi_top.sv` | one view, all blocks wired |
| `rtl/fir_filter.sv` | FIR engine |
| `rtl/ctrl_unit_a.sv` | scan control and settings |
| `rtl/ctrl_unit_b.sv` | conversion control and link B transfer |
| `rtl/data_latch.sv` | one-word latch with full flag and overrun |
| `rtl/sync_edge.sv` | input synchroniser and edge detector |
| `tb/qdi_tb_pkg.sv` | coefficient formula, bit-exact reference arithmetic, ideal converter code |
| `tb/ad671_model.sv` | behavioural 12-bit converter (real-valued input, 700 ns conversion) |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus `tb_sideband` and `tb_phase` |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fir_filter` | bit-exact results against a reference, the 38-clock latency, the 38-clock back-to-back period, stalls on a full output latch, saturation |
| `tb_ctrl_unit_a` | requests per scan, first and last request on the right sample clock edge, zero-length scan, disable, unknown register, restart |
| `tb_ctrl_unit_b` | conversion codes and the 17-clock timing, hold coverage, every miss reported, link B words intact and in order |
| `tb_data_latch` | flags and held word against a model under random traffic |
| `tb_qdi_top` | defaults; end to end (details below) |
| `tb_sideband` | defaults; carrier gain and sideband attenuation (details below) |
| `tb_phase` | defaults; phase recovered from the filtered stream (details below) |

`tb_qdi_top` runs a full scan of twelve bursts at 80–300 kHz sampling with a
phase-modulated carrier and a sideband. It compares every filtered word on
link B bit-exactly and holds link B off to force a stall. A second scan
samples too fast, to force conversion misses and input overruns, and
restarts the scan in the middle. A third scan is clean again.

`tb_sideband` runs tones through the whole interface. It checks the carrier
gain against |H| computed from the coefficients, and checks at least 21 dB of
attenuation for tones fs/10 or more from the carrier (22 to 34.5 dB
measured).

`tb_phase` does the host's phase extraction, atan2 over consecutive
quadrature pairs, on four bursts that have phase steps between them. The
sideband gives 0.19 rad rms phase error on the raw samples and 0.015 rad
after the filter. Around each step the filtered phase is wrong for at most
24 samples, less than the 31-sample filter span.

To run one testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/qdi_pkg.sv tb/qdi_tb_pkg.sv tb/tb_qdi_top.sv --top-module tb_qdi_top
./obj_dir/Vtb_qdi_top
```

Each run takes well under a second. `NTAPS`, `OVERHEAD` and `CONV_CYCLES` are
parameters of `qdi_top`. A longer filter only needs a coefficient set of the
new length (`band_pass_coef(n, ntaps)` in the test package). If the logic
clock changes, set `CONV_CYCLES` so that it covers the converter's
conversion time.
