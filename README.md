# AFC timing receiver gateware

A synchrotron timing system sends the same stream of *event frames* over optical fibre to every
receiver. Each frame says "event code X happened now" and carries 8 bits of a distributed data
bus (DBUS) whose bits are slow clocks. All of it is synchronised to the storage-ring RF
(499.658 MHz). This RTL is the FPGA part of a receiver built on a MicroTCA.4 AMC carrier board. It
does two separate jobs:

1. **Triggers.** 18 output channels (10 plastic-fibre outputs on two FMC mezzanines, 8 AMC
   backplane lines) turn event codes into delayed pulses or pulse trains, or copy a DBUS bit out
   as a clock. A backplane line can also be an input that sends an event code back towards the
   event generator.
2. **A clean reference clock.** The clock recovered from the fibre is too jittery to clock the
   ADCs of beam-position monitors. A low-noise VCXO (Si571) is therefore locked to it: a
   frequency loop retunes the VCXO digitally over I2C, and a phase loop moves its control voltage
   through a DAC (AD5662) over SPI. The phase is measured with a digital dual-mixer time
   difference (DMTD) detector that resolves about 100 ps with ordinary flip-flops.

The transceiver that recovers the frames, the FPGA clock manager (MMCM), the oscillators, the DAC
and the clock-crossbar chip are outside this RTL. Their signals are ports of `afc_timing_top`.

## Clock plan

| clock  | frequency                  | value      | used for                                    |
|--------|----------------------------|------------|---------------------------------------------|
| f_evt  | RF / 4                     | 124.915 MHz | event frames, all trigger channels          |
| f_ref  | 5/36 RF                    | 69.397 MHz | reference the VCXO is locked to             |
| f_out  | VCXO output, nominally f_ref | 69.397 MHz | ADC clock, fed back into the FPGA           |
| f_dmtd | f_ref · N/(N+1), N = 144   | 68.918 MHz | DMTD sampling clock and all controller logic |
| f_beat | f_ref − f_dmtd = f_dmtd/N  | 478.6 kHz  | rate of phase measurements and DAC updates  |

f_ref and f_dmtd both come from the clock manager, driven by f_evt. The event side
(`event_receiver`) runs on `evt_clk`. The loop side (`freq_phase_controller`) runs on `dmtd_clk`.
It samples `ref_clk` and `out_clk` only as data, through the DMTD flip-flops and Gray-code edge
counters. The two sides share no signal.

## Event frames and trigger channels

`rx_frame` holds one `evt_frame_t` per event clock: `code` (8 bits) and `dbus` (8 bits).
`event_receiver` registers the frame once. A frame with `rx_valid` low becomes a null frame, and
code 0 means "no event". The registered frame goes to 18 `trigger_channel` instances. Each one is
set up by a `chan_cfg_t` word (see `afc_timing_pkg.sv`):

| field      | meaning                                                                 |
|------------|-------------------------------------------------------------------------|
| `enable`   | channel on                                                              |
| `mode`     | `MODE_EVENT`: pulses on a code; `MODE_DBUS`: output DBUS bit `dbus_sel` |
| `evt_code` | code that fires the channel                                             |
| `delay`    | event clocks from the frame to the first pulse (32 bits)                |
| `width`    | event clocks each pulse is active, and the gap after it (32 bits)       |
| `n_pulses` | pulses per trigger, 1..65535 (0 is read as 1)                           |
| `polarity` | 0: idle low, active high; 1: inverted                                   |
| `dir_in`   | AMC lines only: the line is an input                                    |
| `in_code`  | code sent upstream when this input sees an active edge                  |

Timing, counting the clock edge that samples the frame from `rx_frame` as edge 0:

* the line goes active just after edge `1 + delay`. Pulse *k* (from 0) is active for edges
  `1 + delay + 2k·width` to `1 + delay + 2k·width + width − 1`;
* in DBUS mode the line follows the DBUS bit one edge later (edge 1), so a DBUS clock comes out
  with two event clocks of fixed latency;
* a matching code that arrives while a train is running is ignored;
* an AMC input passes a two-flop synchroniser and an edge detector. Its `in_code` goes into a
  per-line pending flag, and `tx_code` carries one pending code per event clock, lowest line
  first. It leaves on the fifth edge after the input changes, if no other line is waiting.
  `tx_code` is 0 when idle.

Channels 0–9 drive `pof_out` and are always outputs. Channels 10–17 drive `amc_out` and
`amc_oe`, and read `amc_in`.

## Locking the VCXO

```
           +----------------+   count difference   +----+   RFREQ offset   +---------+
 ref_clk ->| freq_detector  |--------------------->| PI |----------------->| i2c_out |--> Si571 (slow)
 out_clk ->| (18 Hz window) |                      +----+                  +---------+
           +----------------+
           +----------------+   n in [0,N)   wrap    +--------+   +---+   +---------+
 ref_clk ->| dmtd_phase_    |--------------> -sp -->| mov.avg|-->| P |-->| spi_out |--> AD5662 --> Si571 (fast)
 out_clk ->| detector       |                        +--------+   +---+   +---------+
           +----------------+                (all clocked by dmtd_clk)
```

### The DMTD phase detector (`dmtd_phase_detector`)

This is the least obvious part. Two flip-flops, both clocked by f_dmtd, sample f_ref and f_out.
f_dmtd is slightly slower than f_ref: each f_dmtd period is longer by 1/(N·f_ref), about 100 ps.
So each sample lands 100 ps later in the f_ref cycle than the one before. The flip-flop output
therefore traces out f_ref's waveform, stretched in time by a factor of about N: it is a square
wave at f_beat = 478.6 kHz, one period every N = 144 f_dmtd cycles. The f_out flip-flop does the
same. A time offset τ between f_ref and f_out becomes an offset of τ·N·f_ref f_dmtd cycles between
the two beat waves. A plain counter can measure that.

The time counter restarts at every rising edge of the reference beat. At the next rising edge of
the output beat it latches the count:

    n = τ · N · f_ref  (mod N),     φ_ref − φ_out = 2π n / N,     one count ≈ 100 ps

One `n` comes out per beat period (`n_valid`). A third flip-flop on each beat signal guards
against metastability. The beat edges are **not** deglitched. Real clocks jitter, and near a beat
edge the sampled signal can then chatter for a few samples, which would shorten or lengthen `n`.
The testbenches use clean clocks. Add a glitch filter before putting this on hardware.

### Frequency loop (`freq_detector`, `pi_controller`, `i2c_out`)

`freq_detector` keeps free-running edge counters on `ref_clk` and `out_clk`. It reads them into
the `dmtd_clk` domain through Gray-code synchronisers and samples both every `WINDOW` cycles. The
result is (edges of f_ref) − (edges of f_out) in one window. With `WINDOW` = f_dmtd / 18 Hz =
3 828 797, one count is 18 Hz (0.26 ppm) and a result arrives every 55.6 ms. The first window
after reset gives no result.

`pi_controller` turns each result into an offset of the VCXO's 38-bit frequency word (RFREQ):
`acc += KI·e`, `u = KP·e + acc`. Both are bounded at ±`LIMIT` = 40 000 000 LSB, which is ±3500 ppm
for a typical RFREQ of about 42.4·2^28. Errors of ±1 count fall in a dead band: the controller
holds and writes nothing. Whenever `u` changes, `i2c_out` writes `rfreq_center + u` to the
oscillator (address 0x55) with the Si57x small-change sequence:

1. register 135 ← 0x20 (freeze the M divider);
2. registers 8–12 ← `{n1_lo, rfreq[37:32]}`, `rfreq[31:24]`, … `rfreq[7:0]`;
3. register 135 ← 0x00 (new frequency takes effect).

The whole sequence takes 492 quarter-bit times: 0.31 ms at 400 kHz (`DIV` = 43). `rfreq_center`
and `n1_lo` must be set from the values the oscillator reports at start-up. The bus outputs are
open-drain enables: `scl_oe` or `sda_oe` high means pull the line low.

### Phase loop (`moving_average`, `p_controller`, `spi_out`)

Each `n` becomes the error `n − phase_setpoint`, wrapped into [−72, 72) so the loop always takes
the short way round. `moving_average` averages the last 2^`MA_L` = 256 errors. `p_controller`
maps the average to a DAC code, `32768 + KP_P·err`, clipped to 0..65535. `spi_out` sends the code
as a 24-bit AD5662 frame: six zeros, power-down bits 00, then 16 data bits. SCLK is f_dmtd/4 and
idles high, and the DAC takes data on the falling edge. A frame and its gap occupy 99 `dmtd_clk`
cycles, less than the 144-cycle beat period, so the DAC follows every measurement.

Gain choice. The DAC spans ±192 ppm, so one LSB is 5.86·10⁻⁹ of the frequency. A fractional
frequency error *y* moves `n` by *y*·N·(N+1) ≈ 20 880·*y* counts per beat period. The loop gain
per sample is therefore `KP_P`·1.22·10⁻⁴, and the crossover is about `KP_P` × 9.3 Hz.
`KP_P` = 21 puts it near 196 Hz, close to the 200 Hz where the reference clock's phase noise
crosses the free-running VCXO's. Larger `KP_P` gives a wider loop. A longer average adds delay.

The controller is proportional only, so the phase settles at a constant offset from the setpoint:
offset = (DAC code needed to cancel the VCXO's residual frequency error) / `KP_P`. This is the
intended behaviour: the loop holds φ_ref − φ_out **constant**, not at a chosen value. Moving
`phase_setpoint` shifts that constant by the same amount.

### How the two loops share the VCXO

Both loops run all the time. Far from lock, the phase samples sweep through every value, and
their average and the DAC correction mean little. The frequency loop does the pulling, one
window at a time. Once the frequencies are within reach of the phase loop (about ±9 ppm with the
default gain), the phase loop captures, the frequency detector reads 0 or ±1, and the dead band
silences the frequency loop. In the full-size simulation a VCXO that starts 12 ppm high needs one
I2C write. After that no more writes happen, and the phase holds within ±1 count.

## Module map

```
afc_timing_top
├── event_receiver
│   └── trigger_channel  ×18
└── freq_phase_controller
    ├── freq_detector
    │   └── gray_count_sync ×2
    ├── pi_controller
    ├── i2c_out
    ├── dmtd_phase_detector
    ├── moving_average
    ├── p_controller
    └── spi_out
afc_timing_pkg   shared types: evt_frame_t, chan_cfg_t, widths, channel counts
```

## What is taken as given, and what is this design's own

The described receiver fixes the following, and the RTL follows it: the frame format (8-bit code
plus 8-bit DBUS), the 18 channels and their roles, delay and width in event clocks, polarity, the
1..65535 pulse count and inputs that send events. On the loop side it fixes the clock relations
(RF/4, 5/36 RF, N = 144), the two-loop structure (FD → PI → I2C and DMTD → moving average → P →
SPI), the 18 Hz detector resolution and the ±3500 ppm and ±192 ppm tuning ranges.

Everything below is this design's own choice, since nothing fixes it:

* the pulse-train shape (gap = width), ignoring retriggers, and 32-bit delay and width fields;
* code 0 as the null event, the `rx_valid` handling and the upstream queue;
* no delay on DBUS clock outputs;
* the window timed by f_dmtd, Gray-code clock crossing and the 24-bit edge counters;
* all loop gains, the dead band, the filter length and the output bounds;
* the phase setpoint input and the wrapped error;
* the I2C register sequence and the SPI frame format, taken from the usual programming interface
  of these parts;
* no deglitching in the DMTD detector (see above);
* synchronous active-high resets, one per clock domain; no register bank: every setting is a port.

Not built:

* the transceiver, clock manager, oscillators, DAC, clock crossbar and optical boards;
* the control software;
* the automatic trigger phase compensation that was listed only as future work.

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. Build and run one
with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_afc_timing_top \
    -y rtl -y tb +libext+.sv rtl/afc_timing_pkg.sv tb/tb_afc_timing_top.sv
./obj_dir/Vtb_afc_timing_top
```

| testbench                  | what it checks                                                              | run time |
|----------------------------|-----------------------------------------------------------------------------|----------|
| `tb_trigger_channel`       | cycle-exact pulses against a reference model, a 65 535-pulse train, DBUS and input modes | < 1 s |
| `tb_event_receiver`        | all 18 channels, invalid frames, upstream queue order and latency           | < 1 s    |
| `tb_freq_detector`         | count difference for offsets of 0 to ±3500 ppm, window period               | < 1 s    |
| `tb_pi_controller`         | output and update strobe against a 64-bit model, saturation, dead band      | < 1 s    |
| `tb_dmtd_phase_detector`   | n = τ·N·f_ref within one count for 40 delays, one result per beat           | < 1 s    |
| `tb_moving_average`        | average against a direct sum of the history                                 | < 1 s    |
| `tb_p_controller`          | every error value, clipping, disable                                        | < 1 s    |
| `tb_i2c_out`               | bus decoded by a slave model: three transactions, bytes, duration, NACK     | < 1 s    |
| `tb_spi_out`               | frames decoded by a DAC model, frame length vs. the beat period, newest-wins | < 1 s   |
| `tb_freq_phase_controller` | closed loop with the VCXO model starting 300 ppm off (short 1/100 window)   | ~1 s     |
| `tb_loop_capture`          | two closed loops with VCXOs starting +3000 and −3000 ppm off: capture, constant phase, frequency word cancels the offset | ~2 s |
| `tb_afc_timing_top`        | whole design at default sizes: trigger channels, then lock of a VCXO 12 ppm off with the full 55.6 ms window; counts each mechanism | ~80 s |

`tb/vcxo_model.sv` is a behavioural model (not synthesizable) of the Si571 and its DAC. It
decodes the I2C writes and SPI frames and generates f_out with real-valued half periods:
f = f_nom·(1 + offset)·(RFREQ/RFREQ_c)·(1 + 192 ppm·(code − 32768)/32768).

## Changing it

* `afc_timing_top` parameters: `N` (DMTD divider ratio), `WINDOW` (frequency window in
  `dmtd_clk` cycles), `MA_L`, `KP_F`, `KI_F`, `KP_P`. If N changes, f_dmtd must change to
  f_ref·N/(N+1) in the clock manager as well.
* A shorter `WINDOW` makes the frequency loop faster but coarser (resolution = f_dmtd/`WINDOW`).
  Scale `KP_F` and `KI_F` by the same factor: one count is then worth proportionally more RFREQ.
* For a different oscillator or DAC, only `i2c_out` and `spi_out` encode part-specific formats.
