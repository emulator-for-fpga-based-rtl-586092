# FPGA radar signal emulator

A radar's signal-processing chain has to be tested with realistic signals long
before it meets a real antenna. This design produces those signals inside an
FPGA in real time: the radar's own transmit pulse, a linear-FM (chirp) burst at
an intermediate frequency (IF), and a built-in-test echo (BITE) of that pulse
as it would come back from a target at a chosen range, with a chosen doppler,
attenuation and noise. The timing follows the patterns of current radars:
pulse repetition intervals (PRIs) can be staggered through a table and
jittered at random, and pulses are grouped into coherent processing intervals
(CPIs). Several such radars run side by side (two by default), each set up
on its own. Their IF streams are summed into one mixed pulse stream, the
kind of input on which a pulse deinterleaver is tested.

The architecture follows a published FPGA radar emulator. In it, a direct
digital synthesizer (DDS) makes the IF carrier. That carrier is multiplied by
baseband chirp coefficients stored in two ROM banks, cosine and sine. The two
products are subtracted, and the result is band-pass filtered. Everything
that the published description leaves open (clock rate, widths, pulse
lengths, bandwidth, filter, control formats) is this design's own choice; see
"Where this design makes its own choices" below.

## Signal chain

```
 switches ──► clock_control ──► IF tuning word, attenuation, noise level
 serial ───► uart_rx ─► param_regs ──► PRI table, stagger, jitter, pulse width,
                                        sweep direction, CPI length, BITE range/doppler
 timing_gen ──► PRT cover pulse, PRT start, CPI strobe
 bite_gen ────► BITE cover pulse, doppler phase
                   │
 src = PRT / BITE / none (transmit pulse has priority)
                   ▼
 upconversion_unit:
   rom_select ─► rom_addr_gen ─► lfm_rom (cos bank, sin bank) ─► I, Q
   dds (cos, sin of IF, + doppler phase during BITE)            ─► C, S
   signed_mult x2: C·I, S·Q ─► add_sub: C·I − S·Q ─► bpf_fir ─► if_out (to DAC)
                   ▼
 output_split ─► radar_signal (transmit samples)
              └► bite_out (echo >> att, + noise)

 everything from param_regs to the upconversion_unit is repeated for each of
 NUM_RADARS radars; Σ if_out of all radars ─► if_mix
```

Radar 0 drives `if_out`, `radar_signal`, `bite_out` and the timing outputs.
`prt_all` and `bite_all` hold the cover pulses of every radar. `if_mix` is
the sum of all radars' `if_out`, one clock later. It is
16 + ⌈log2 NUM_RADARS⌉ bits wide, so it cannot overflow. The switches (IF,
attenuation, noise) are shared by all radars.

All logic runs on one clock at one sample per clock. A 160 MHz clock is
assumed, which puts the 40 MHz IF at a quarter of the sample rate.

## How a chirp is made at the IF

The coefficient ROM holds a baseband chirp. For a pulse of N samples,

    phi(n) = pi · BW_FRAC · (n − N/2)² / N,   I(n) = cos phi(n),   Q(n) = sin phi(n)

Its instantaneous frequency, BW_FRAC·(n − N/2)/N cycles per sample, sweeps
linearly from −B/2 to +B/2, with B = BW_FRAC · f_clk. The default BW_FRAC of
1/8 gives B = 20 MHz. The DDS supplies cos(wt) and sin(wt) at the IF, and
the add/sub stage forms

    cos(wt)·I − sin(wt)·Q = cos(wt + phi)      (up-chirp, IF − B/2 → IF + B/2)
    cos(wt)·I + sin(wt)·Q = cos(wt − phi)      (down-chirp)

so one ROM serves both sweep directions, chosen by the add/sub control.
Single-sideband mixing leaves no image in principle. The 31-tap band-pass FIR
(Hamming-windowed, 0.15–0.35 of the sample rate, unit gain at 0.25) removes
what quantisation and switching transients put outside the band.

There are four pulse widths: 64, 128, 256 and 512 samples (0.4–3.2 µs at
160 MHz). They are stored back to back. Width k starts at address
64·(2^k − 1), and the banks are 960 words deep. ROM and sine-table contents are
computed at elaboration from the formulas above with `$sin`/`$cos`, so no data
files are needed. Changing `BASE_LEN` or `BW_FRAC` regenerates them.

## Timing: PRT, CPI and BITE

* **PRT** is the transmit cover pulse. It is high for the first `pulse_len`
  clocks of each PRI, where `pulse_len` is the length of the selected pulse width.
* **PRI** lengths come in turn from a 4-entry table (`stagger_last` sets how
  many entries are used). A jitter of `lfsr & jitter_mask` clocks is added
  (16-bit LFSR, stepped once per PRI). PRI values are sampled when a PRI
  begins.
* **CPI** is a one-clock strobe on the first PRT of every `cpi_pulses` PRIs.
  The pulse width and sweep direction change only at a CPI strobe, so every
  pulse of a CPI is the same waveform. At the strobe itself the new choice is
  already in force.
* **BITE** is high for `pulse_len` clocks starting `range` clocks after the
  PRT start. A range that falls inside the transmit pulse is moved to the end
  of the pulse. An echo still running when the next PRT starts is cut off, so
  the shared chain always serves the transmit pulse first.
* **Doppler** works pulse to pulse. At each PRT start the BITE phase offset
  advances by `doppler_step` (2^32 is one turn), and the DDS adds this offset
  to its phase during the BITE pulse. A step of at most half a turn per PRI
  covers every doppler up to ±PRF/2, the most a pulsed radar can see without
  ambiguity. Larger steps alias, as a real target's doppler would. The DDS
  accumulator runs all the time, so the carrier stays coherent from pulse to
  pulse.

### Latency

For a cover pulse present in clock t:

| stage                                  | output in clock |
|----------------------------------------|-----------------|
| ROM address (rom_addr_gen)             | t+1             |
| DDS carrier, ROM coefficients          | t+2             |
| products                               | t+3             |
| `if_raw` (add/sub)                     | t+4             |
| `if_out` (FIR, first contribution)     | t+5             |
| centre of the filter response          | t+20            |
| `radar_signal`, `bite_out`             | t+21            |

The source tag (`src_e`) is delayed to the centre of the filter response, so
`radar_signal` and `bite_out` carry the filtered pulse with its first and
last 15 samples of filter transient trimmed.

## Control

### Board switches (`sw`, debounced for `DEBOUNCE` clocks)

| bits     | meaning                                                        |
|----------|----------------------------------------------------------------|
| sw[1:0]  | IF: 40, 38, 42, 44 MHz (`IF_KHZ0..3`)                          |
| sw[4:2]  | BITE attenuation, right shift of 0–7 bits (6 dB steps)         |
| sw[6:5]  | noise on `bite_out`: off, ¼, ½, full (σ ≈ 148 LSB at full)     |

### Serial port (8N1, `CLKS_PER_BIT` clocks per bit; 1389 = 115200 baud)

A command is `0xA5`, then a register address, then 4 data bytes, most
significant first. Bytes outside a command are ignored until the next `0xA5`.
Radar k has its bank at addresses 8k to 8k+7; the table gives the offsets
within a bank. A command for an address with no bank writes nothing.

| offset | contents                                                                    |
|--------|--------------------------------------------------------------------------|
| 0–3 | PRI table entries, clocks (20 bits)                                         |
| 4   | [1:0] pulse width, [3:2] last stagger entry, [4] down-chirp, [5] BITE enable, [15:8] PRIs per CPI (0 = 256) |
| 5   | jitter mask (20 bits)                                                       |
| 6   | BITE range, clocks (20 bits)                                                |
| 7   | BITE doppler phase step per PRI (32 bits, 2^32 = one turn)                  |

After reset, radar 0 has every PRI at 16000 clocks (100 µs), 16 PRIs per CPI, the 64-sample
pulse, up-chirp, BITE on at 4000 clocks (25 µs) with no doppler, and no
jitter. Radar k starts the same, except that its PRI is 16000·(8+k)/8 clocks
(18000 for radar 1), so that the pulse trains of the radars interleave
rather than coincide. Keep every PRI longer than the BITE range plus the pulse length if the
whole echo is wanted.

## Files

| file                         | contents                                              |
|------------------------------|-------------------------------------------------------|
| `rtl/radar_pkg.sv`           | widths, `src_e` tag, `radar_cfg_t` settings struct    |
| `rtl/radar_emulator_top.sv`  | top level: shared control, one chain per radar, sum   |
| `rtl/upconversion_unit.sv`   | DDS, ROMs, multipliers, add/sub, FIR, tag delay       |
| `rtl/dds.sv`                 | phase accumulator and sin/cos table                   |
| `rtl/lfm_rom.sv`, `rtl/rom_select.sv`, `rtl/rom_addr_gen.sv` | coefficient banks, selection, addressing |
| `rtl/signed_mult.sv`, `rtl/add_sub.sv`, `rtl/bpf_fir.sv` | arithmetic                              |
| `rtl/timing_gen.sv`, `rtl/bite_gen.sv` | PRT/CPI timing, BITE and doppler            |
| `rtl/output_split.sv`, `rtl/noise_gen.sv` | output streams, Gaussian-like noise      |
| `rtl/clock_control.sv`, `rtl/uart_rx.sv`, `rtl/param_regs.sv` | reset, switches, serial control |
| `tb/tb_<module>.sv`          | one self-checking testbench per module                |
| `tb/tb_radar_emulator_top.sv`| end-to-end test at reduced sizes                      |
| `tb/tb_radar_full.sv`        | end-to-end test with every parameter at its default   |
| `tb/tb_capture_window.sv`    | 4096-sample capture of transmit pulse and echo        |

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. It also has a watchdog that stops it if
the run hangs. Verilator 5 runs any of them, for example:

```
verilator --binary --timing -Wno-fatal --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/radar_pkg.sv tb/tb_radar_emulator_top.sv --top-module tb_radar_emulator_top \
    --Mdir obj -o sim && obj/sim
```

* `tb_radar_emulator_top` uses a 16-sample base pulse, 8 clocks per serial
  bit and short PRIs. It programs the emulator over the serial line and
  counts each mechanism: register writes, a framing error, CPIs, a
  pulse-width change at a CPI, stagger, jitter, BITE pulses, a BITE range
  moved to the end of the transmit pulse, a BITE cut by the next PRT, doppler
  steps, up- and down-chirps, IF retuning by switch, attenuation and noise.
  It also reprograms the second radar through its own bank while the first
  one is changed, checks that radar's PRIs and pulses, and checks `if_mix`
  against the sum of the two radars' IF. A mechanism that never happens
  counts as a failure. The sweep direction is
  checked from the zero-crossing rate of the IF in the first and second half
  of each pulse.
* `tb_radar_full` runs the defaults: two CPIs of 16 PRIs of 16000 clocks
  (about 0.5 M clocks, a few seconds). It checks PRI, PRT and BITE timing and
  the output levels, and selects the 512-sample pulse over the serial link
  along the way. It also checks the second radar's 18000-clock PRIs and the
  summed output.
* `tb_capture_window` also runs the defaults. It sets the 512-sample pulse
  and a 1500-clock range over the serial link, and sets attenuation to 2
  bits and noise to ¼ by switch. Then it records 4096 samples from a CPI
  strobe, the way the on-chip analyser would. It checks that the transmit
  pulse and the echo are both whole in the window and lie where expected.
  It also checks their power ratio (about 12 dB) and the noise floor.
* The module testbenches compare against models written independently of the
  RTL: a phase-accumulator model with its own sine, the chirp formula, taps
  redesigned from the filter specification, an xorshift model, and so on.

## Where this design makes its own choices

The published design gives the structure and the mechanisms: the DDS, the
cosine and sine coefficient banks selected by pulse width, the address
generation, the two multipliers and the subtraction, the band-pass filter,
PRT as the cover pulse, CPI for synchronisation, and a BITE echo with
programmable range and doppler limited to PRF/2. It also names switch-set
frequency and attenuation, noise on the echo, serial-port control from a PC,
and staggered and jittered PRI. It gives the 40 MHz IF. The following are
this design's choices:

* the 160 MHz clock; 16-bit samples and coefficients; the 32-bit phase
  accumulator and 1024-entry sine table;
* the four pulse widths, the 20 MHz chirp bandwidth, and coefficients read at
  the full clock rate (no separate coefficient sample rate);
* the filter (31 taps, windowed design, band 24–56 MHz);
* its own DDS. The original uses a vendor DDS core. This one gates its
  outputs with the cover pulse instead of stopping the accumulator;
* doppler as a per-PRI carrier phase step;
* the number of radars run at once (the original says several without a
  number), their register banks, their default PRIs, and the summed output;
* the add setting of the add/sub stage used for down-chirps;
* one address generator and one selection block shared by both banks;
* programmable counters for the radar timing. The original derives timing
  from an external encoder, which is not modelled;
* the switch coding, the three IF frequencies besides 40 MHz, attenuation in
  6 dB steps, the noise generator (sum of four bytes of an xorshift32), the
  serial frame format, the command format and the register map.

Not included: the on-chip logic analyser used to observe the outputs (its
signals are top-level ports instead), the external DAC, analogue filter and
RF upconverters, and the host PC. Within each radar, one source chain is
shared in time by the transmit pulse and its echo.

Only linear FM is generated. Constant-frequency or non-linear FM pulses, and
frequency hopping within a pulse, would need other coefficient tables or a
DDS retuned during the pulse. The IF is chosen by switch and holds for all
pulses.

## Points to watch when changing it

* `radar_pkg::NUM_PW` and `BASE_LEN` set the ROM depth,
  BASE_LEN·(2^NUM_PW − 1). The address width is derived from it.
* `NUM_RADARS` may be 1 to 32: the bank number is the upper 5 bits of the
  register address. Each radar costs a full chain (ROMs, sine table, two
  multipliers, filter).
* The filter's group delay, (NTAPS−1)/2, sets the delay of the source tag in
  `upconversion_unit`. Keep `NTAPS` odd.
* `add_sub` scales by 2^−15. With full-scale carrier and coefficients the
  result stays just inside 16 bits. Saturation only catches rounding at the
  extremes.
* The reset synchronizer in `clock_control` drives the asynchronous resets of
  all other flops. Lint tools report its first flops as used both
  synchronously and asynchronously. That is the intended structure.
