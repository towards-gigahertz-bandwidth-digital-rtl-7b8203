# 1 GS/s averaged power-spectrum firmware for a dual-ADC FPGA card

This is the FPGA logic of a measurement instrument for microwave experiments.
It takes a signal sampled at 1 GS/s and returns the power spectrum averaged
over millions of triggered shots. Each trigger starts a trace of
N = 8192 samples. Each trace is:

1. down-converted by a quarter of the sample rate,
2. Fourier transformed,
3. squared to a power spectrum,
4. added into an on-chip running sum, optionally with alternating sign
   ("diff mode", for background subtraction: signal on, signal off, on, ...).

The host then moves the summed spectrum through external DDR3 memory.
The host's inverse FFT of that spectrum gives the first-order
autocorrelation function, which is why the application is called a
correlator.

The hardware it targets is a Virtex-6 board with a mezzanine card carrying
two 12-bit 1 GS/s ADCs. The FPGA fabric runs at 125 MHz, so every clock
brings 8 new samples. The whole design is organised around that factor
of 8:
- the ADC bit lines are deserialized 1:8;
- the FFT is built from 8 parallel lane transforms;
- the averaging RAM stores 8 frequency bins per word.

The RTL is SystemVerilog-2017 and synthesizable, except where noted. It is
checked with Verilator 5 and with the slang front end of Yosys.

## Signal flow

```
 ADC0 13 lines ─► ads5400_phy_sp ─┐               ┌──────────── correlator_app ─────────────┐
 ADC1 13 lines ─► ads5400_phy_sp ─┼─► capture ─► ddc_fs4 ─► 8 x fft_lane ─► fft_combine ─►   │
                                  │   (N after     (fs/4)    (N/8 points     (3 levels of     │
 ext_trig ─► trigger_ctrl ────────┘    trigger)               each, SDF)      radix-2)         │
                                                          power_calc ─► averager (RAM) ─► readout
                                                                                               │
 host regs / read stream ◄─ mem_if_read_data_sync ◄─ mem_if_memc ◄─ mem_if_fast_write_fifo ◄─┘
                                     (sip_mem_if)        │ ▲
                                                         ▼ │ DDR3 controller user interface
```

`wrapper_virtex6` is the top level and wires these blocks together.
Parts that are not logic, or that are vendor IP, are reached through its
ports:
- the programmable input delays of the bit lines;
- the clock generators;
- the DDR3 controller;
- the Ethernet engine that carries the host's register accesses and data.

## Clock domains

| domain     | rate     | what runs in it |
|------------|----------|-----------------|
| `clk_fast` | 1 GHz    | only the bit-line shift registers of the deserializers |
| `clk_app`  | 125 MHz  | receivers, trigger, correlator, FIFO write side. Edge-aligned with `clk_fast` (fast/8), locked to the ADC clock |
| `clk_mem`  | 200 MHz  | DDR3 controller user side, burst sequencer, FIFO read side |
| `clk_host` | 125 MHz  | host registers of the memory interface, read-out stream. Independent of `clk_app` |

Each domain has its own synchronous active-high reset. Signals cross
domains in four places only:
- the write FIFO (Gray pointers);
- the command toggle of the memory interface;
- the Gray-coded overflow counter;
- the read-data request/acknowledge handshake.

## Receiving the ADCs: eye search and bit slip (`ads5400_phy_sp`)

Each ADC sends 13 lines (12 data bits and an over-range flag), one bit per
sample at 1 GHz. Each line is deserialized into an 8-bit word per 125 MHz
clock (`adc_serdes`); bit 0 is the earliest sample. Two problems have to
be solved before the words can be trusted.

**Sampling phase.** The FPGA does not know where the data eye of each line
lies relative to its clock. Each line has an input delay of 32 taps of
about 78 ps. A whole 500 MHz bit-clock period (2 ns) is 26 taps, so the
tap arithmetic wraps at 26. A decrease from tap 0 goes to tap 25.

During calibration the ADC sends a PRBS-7 test pattern on every line. The
pattern is a 7-bit LFSR shifted left with the two leftmost bits XORed back
in, so s[n] = s[n-7] ^ s[n-6]. `prbs_checker` predicts every bit from the
bits before it and counts mismatches over `CHECK_CYCLES` = 2^27 clocks,
about one second. A tap counts as "inside the eye" only if that count is
zero.

`bit_align_machine` searches the eye, starting at tap 0:

- **Tap 0 is inside the eye.** Step the tap down until a check fails. That
  tap is the first edge.
- **Tap 0 is outside the eye.** Step up until a check passes. The tap
  before it is the first edge.
- **Either way, measure the window.** Keep stepping up until a check fails
  again, counting the steps. That count is the window.
- **Centre.** Step back by half the window.

A machine that finds no eye within 26 steps reports a failure.

**Word alignment.** Once every line samples cleanly, the lines can still
be whole samples apart. Line 0 is the master. Every other line (a slave)
passes through a `bitslip` delay of 0 to `MAX_SLIP` samples, and its
8-bit word is compared with the master's over `CMP_WORDS` consecutive
words. The PRBS word repeats only every 127 clocks, so a match means real
alignment. The outcome decides the next step:
- **Every word matches.** The slave is aligned.
- **No word matches.** The slave slips one more sample.
- **Some words match.** The eye search is unreliable, and calibration
  restarts from the eye search.
- **A slave reaches `MAX_SLIP`.** The master itself slips one sample, and
  all slaves start again from zero.

After alignment the receiver outputs `dval` and 8 signed 12-bit samples
per clock, with their over-range flags.

Registers of the receiver:

| reg | read | write |
|----|----|----|
| 0 | {fail (bit 6), aligned (bit 5), force (bit 4), state[2:0]} | bit 2 = 1 starts calibration; bit 0 forces `dval` without calibration |
| 1 | total PRBS errors of the last checks | |
| 2 | {restarts[23:8], master slip[4:0]} | |
| 3 | tap of the line chosen by the last write's bits 3:0 | selects the line |

Note that register 1 is rarely 0 after a successful calibration. The last
check of every search is the failing one at the far edge of the eye.

## The parallel FFT (`fft_lane`, `fft_combine`)

This is the least obvious part of the design. A streaming FFT core takes
one sample per clock, but here 8 arrive per clock. Taking only one of the
8 would decimate the signal and keep 62.5 MHz of the 500 MHz bandwidth.

Instead, the radix-2 split of the DFT is applied three times:

```
X[k]       = E[k] + W_N^k O[k]
X[k + N/2] = E[k] - W_N^k O[k]        k < N/2,   W_N = exp(-2 pi i / N)
```

E and O are the DFTs of the even- and odd-indexed samples. Splitting three
times gives 8 index sets {8n + m}, m = 0..7. Set m is exactly the sample
that arrives at parallel position m on every clock. So:

1. **Lanes.** Each position m feeds its own M = N/8 = 1024-point streaming
   FFT (`fft_lane`). It is a chain of log2(M) radix-2
   decimation-in-frequency stages with single-path delay feedback
   (`fft_sdf_stage`).
   - All 8 lanes run in lock step.
   - They deliver their outputs in bit-reversed order, with the
     coefficient index k on `out_k`.
   - Lane latency: M - 1 + log2(M) clocks.
2. **Combine.** `fft_combine` takes F_0[k]..F_7[k] in the clock they
   appear and rebuilds the full transform by climbing the split tree:
   - level 1 combines lanes m and m+4 (length N/4 transforms, 4 values
     each);
   - level 2 combines m and m+2;
   - level 3 combines 0 and 1.
   The 8 outputs of one clock are X[k + qM], q = 0..7. Every coefficient
   appears exactly once per frame, 8 per clock, in 3 clocks.

Word widths: samples are 12 bits, the down converter adds 1 bit, and an
8192-point transform grows 13 bits. `FFT_W` = 28 therefore holds the
transform without any scaling or overflow logic. Twiddles are 18-bit
(2^17 - 1 standing for 1.0) and rounded to nearest. They are computed
during elaboration from `$cos`/`$sin`, so no table files are needed.

**Frame timing rule.** An SDF stage of length L keeps the second half of a
block in its feedback memory and sends it out during the next L/2 clocks.
Frames may follow each other back to back, with no gap. A frame that
starts 1 to M/2 - 1 clocks after the previous one would overwrite data
still in the first stage. The capture logic therefore ignores triggers for
M/2 clocks after each capture. A capture plus its guard is 1536 clocks,
or 12.3 µs, so triggers are accepted every 12.3 µs or slower. The intended
experiment triggers every 16 µs.

## Down conversion, power, averaging

- **`ddc_fs4`.** Multiplying by exp(-i·2π·n/4) is 1, -i, -1, i. For
  sample positions 0..7 of a clock the outputs are: I = x, Q = -x,
  I = -x, Q = x, and again for positions 4..7. The other output of each
  sample is 0. The result is registered once. This shifts the spectrum by
  N/4 bins; it is kept as the place where a filter could later go.
- **`power_calc`.** Computes re^2 + im^2, shifts right by `PWR_SHIFT` = 16
  and saturates to `W_INC` = 32 bits. One register stage.
- **`averager`.** One RAM word per lane index k holds the 8 sums of bins
  k + qM (Eq.: W_RAM = 8 · (W_INC + log2 DAVG_MAX), plus 8 sign bits
  here). The RAM has 1024 words of 464 bits.
  - It runs as a read-modify-write pipeline with a one-clock read. The
    power values wait one clock to meet the stored sums.
  - The first shot of a run writes instead of adding, so no clearing pass
    is needed.
  - In diff mode the odd shots are subtracted.
  - An assertion guards against the same address twice in a row. The
    bit-reversed k order never does this.

### Correlator registers (`correlator_app`)

| reg | meaning |
|----|----|
| 0 control | bit 0 enable: a 0→1 write arms a run. Bit 1 selects ADC1. Writing bit 2 = 1 starts the read-out |
| 1 average | bits 30:0 number of shots, bit 31 diff mode |
| 2 status  | bit 0 busy, bit 1 done, bit 2 read-out active |
| 3 shots   | shots accumulated so far |
| 4 skipped | triggers ignored during a capture or its guard time |

Once the set number of captures has started, later triggers are ignored
and not counted. The read-out streams bins 0..N-1 in natural order, each
sign-extended to 64 bits. It pauses while the memory FIFO says `stop`.

## Trigger (`trigger_ctrl`)

Register 1 selects the source (bits 2:0) and a pattern word (bits 15:8).
The sources are:

| code | source |
|----|----|
| 0 | software: a write of 1 to register 2 |
| 1 | rising edge of `ext_trig` |
| 2 | falling edge of `ext_trig` |
| 3 | both edges of `ext_trig` |
| 4 | the pattern word appears on ADC0's master line (useful while the ADC sends its PRBS) |

External edges pass a two-flop synchronizer and give a one-clock pulse
3 clocks later. Register 3 counts the triggers issued.

## Memory interface (`sip_mem_if`)

The memory interface is controlled through host registers:

| reg | meaning |
|----|----|
| 0 | command: 0 NOP, 1 read sequence, 2 write sequence. Runs only if the value changes while the sequencer waits |
| 1 | start address (64-bit word address) |
| 2 | length in words |
| 3 | words delivered to the host since the last read command |
| 4 | state of the read-data synchronizer (0 idle, 1 offering, 2 acknowledging) |
| 5 | write source: 0 application data, 1 zeros, 2 each word = its address |
| 6 | writes refused by the full FIFO |
| 7 | bit 0: sequencer waiting (ready for a new command) |

To issue the same command twice, write NOP in between.

DDR3 is efficient only in bursts of 8 consecutive 64-bit words. The half-rate controller moves 4 words (256 bits) per 200 MHz clock, so every access here is a whole burst of two 256-bit beats. Runs are rounded out to whole bursts: the low 3 address bits are ignored and the length is rounded up to a multiple of 8. Partial bursts would need the controller's write mask, which is not used.

The application writes into `mem_if_fast_write_fifo` (512 words by
default). Its almost-full flag, raised with 8 words of slack, is the
`stop` that pauses the correlator read-out. A typical store-and-fetch:
1. Start the correlator read-out.
2. Issue a write sequence of N words.
3. Issue a read sequence of N words.
4. Take the words from `host_rd_valid/ready/data`.

## Sizes against the intended measurement

| quantity | needed | built (default) |
|---|---|---|
| samples per trigger | 8192 at 1 GS/s | N = 8192: 1024 clocks of 8 samples |
| trigger period | 16 µs = 2000 clocks | capture + guard = 1536 clocks |
| shots averaged | 32 million, diff mode | DAVG_MAX = 2^25 = 33.5 M; 58-bit signed sums |
| averaging RAM | — | 1024 × 464 bits = 475 kbit |
| spectrum in DDR3 | 8192 words | 1024 bursts; 28-bit word address |

## Departures and choices

The structure follows the original design as described:
- receiver, eye search, master/slave bit slip;
- the 8-lane FFT derivation;
- fs/4 mixing;
- averaging RAM layout and diff mode;
- memory-interface registers 0–6, bursts of 8, write patterns;
- trigger sources.

These are choices made here:
- **Lane FFT.** The original uses a vendor pipelined FFT core. Here it is
  a plain radix-2 SDF pipeline with bit-reversed output.
- **Widths and scaling.** All word widths and the power scaling
  (`FFT_W`, `TW_W`, `PWR_SHIFT`, `W_INC`) and the extra sign bit per sum.
- **Registers.** All register bit positions and codes, except the
  receiver's start bit (bit 2 of register 0) and the memory-interface
  register numbers.
- **Receiver settings.** The master line (line 0), `CMP_WORDS` = 32,
  `MAX_SLIP` = 16, the 8-clock settling time after a tap change, and the
  wrap at 26 taps (2 ns / 78 ps, rounded).
- **Trigger guard.** The M/2-clock trigger guard, and ignoring triggers
  once all captures of a run have started.
- **Host link.** The split of the register space (`app_reg_sel`: 0 ADC0
  receiver, 1 ADC1 receiver, 2 trigger, 3 correlator; the memory
  interface on its own host-clock bus).
- **Read-out.** The 64-bit natural-order read-out stream and its `stop`
  flow control.
- **Crossings.** The clock-domain-crossing circuits. The original uses a
  vendor FIFO and a handshake whose details are not known.

These parts are not present:
- the DAC path;
- the SPI and clock-chip initialization of the card;
- the I2C board monitor;
- the on-chip system monitor;
- the configuration watchdog and fallback-image logic;
- the Ethernet engine.

Either no logic for them is known, or they are vendor blocks. The
over-range flags are received and delivered but not used by the
correlator.

`adc_serdes` models the deserializer primitive with a shift register on
the 1 GHz clock. It simulates correctly, but a real implementation would
use the FPGA's ISERDES and IODELAY primitives in its place.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`.

```
verilator --binary --timing --assert -y rtl -y tb rtl/fmc110_pkg.sv \
          tb/<testbench>.sv --top-module <testbench>
./obj_dir/V<testbench>
```

| testbench | what it proves |
|---|---|
| `tb_ddc_fs4` | mixing per sample position, one-clock latency |
| `tb_fft_lane` | 32-point lane against a direct DFT, back-to-back frames, latency |
| `tb_fft_combine` | 64-point recombination of exact lane spectra |
| `tb_averager` | plain and diff runs, shuffled addresses, gaps |
| `tb_correlator_app` | N = 64 end to end: diff run of 3 shots, skipped trigger, read-out under `stop` |
| `tb_prbs_checker`, `tb_bit_align_machine` | error counting; eye search down/up and centring |
| `tb_ads5400_phy_sp` | calibration against skewed lines with different eyes (master slip occurs), then ramp data |
| `tb_trigger_ctrl` | every source, edge latency, counter |
| `tb_sip_mem_if` | three clock domains against a DDR3 controller model: patterns, application data, read-back under back-pressure, repeated-command rule, overflow count |
| `tb_wrapper_virtex6` | whole design at N = 64 (see below) |
| `tb_wrapper_virtex6_full` | whole design at default sizes |

`tb_wrapper_virtex6` runs at reduced sizes: N = 64, 64-clock PRBS checks,
a 32-word FIFO. It does the following:
1. It calibrates both receivers.
2. Run A: ADC0, diff mode, one software and one external trigger, plus a
   trigger that must be skipped.
3. It streams run A's spectrum into DDR3 and back to the host.
4. It writes the address and zero patterns.
5. Run B: ADC1, started by the pattern trigger.

It counts each mechanism and fails if one never happened: eye search,
slave slip, master slip, each trigger source, skipped trigger, diff mode,
ADC select, `stop`, host back-pressure, each write source, and the read
sequence. FIFO overflow cannot happen in the assembled design, because
the read-out obeys `stop`. It is exercised in `tb_sip_mem_if`, and the top
test checks that the overflow count stays 0.

`tb_wrapper_virtex6_full` uses every default: N = 8192, 2^27-clock checks,
2^25 maximum shots. A real calibration would need 2^27 clocks per check,
so it sets the receivers' force-valid bit and feeds pre-aligned lines. It
runs a diff-mode measurement of 2 shots with triggers 2000 clocks (16 µs)
apart. It checks:
- the 1024-clock capture and that no trigger is skipped;
- all 8192 bins read back through DDR3 against a direct DFT;
- the overflow and word counters.

It takes under a minute.

The testbench-only models live in `tb/`:
- `adc_lines_model` (PRBS or ramp data, per-line skew, data eye as a
  function of the tap);
- `memc_ui_model` (the DDR3 controller user interface, with random
  stalls and read latency).
