# Digital LVDT signal conditioner

A linear variable differential transformer (LVDT) measures displacement: a sine
excites its primary winding, and the differential secondary voltage is that
carrier multiplied by the position of a movable core. Its output is a
double-sideband suppressed-carrier AM signal, and the sign of the envelope is
the direction of displacement. Recovering it needs a phase-sensitive
demodulator, which is usually an analog circuit or a DSP processor.

This RTL does the whole conditioning digitally, in one small chip:

* it **synthesises the excitation sine itself** (direct digital synthesis into
  an external DAC);
* because it knows exactly when the carrier peaks, it **samples the LVDT output
  only at the positive and negative peaks** with an external ADC. Demodulation
  then reduces to negating every negative-peak sample;
* it **filters** the envelope with a programmable second-order IIR section,
  **closes a position loop** through a second DAC that drives a torque
  generator, and **decimates** the result to a slow, high-resolution word;
* it **acquires 16 health channels** (supplies, temperature, references,
  carrier level) through an external multiplexer and ADC;
* it **sends everything to a host over a UART**. The host can retune
  everything over the same link: excitation frequency, filter coefficients,
  loop gains, output rate and baud rate.

The architecture follows a published ASIC design (an SCL 180 nm chip, also run
on an Artix-7 FPGA). Many details below are this implementation's own. The
section "What is original and what is chosen here" lists them.

## Signal chain

```
                 freq_sel                           +--> db_po_dac / wr_po_dac --> excitation DAC --> LVDT primary
  config_regs ----------> dds_wavegen --------------+
       ^                     | pos_peak / neg_peak  +--> motor_3ph --> motor_abc (core drive motor)
       |                     v
    uart_rx <-- sin     timing_ctrl --sens_start--> adc_serial_if <== sensor ADC <== LVDT secondary
                             |                          | 10-bit sample + peak tag
                             |                          v
                             |                     sync_demod --> iir_biquad --+--> loop_ctrl --> ctl_dac / wr_ctl_dac
                             |                                                 |
                             +--dec_pulse--------------------> decimator <-----+
                             |                                     |
                             +--mx_addr/daq_start--> anlg_daq      v
                                    (adc_serial_if + dmux16) --> packetizer --> uart_tx --> sout
```

Everything runs from one master clock, 16 MHz by default (`CLK_HZ`), with an
asynchronous active-low reset `rst_n`. All module-to-module strobes are
one-cycle pulses in that clock domain. The serial ADC inputs and the UART input
pass through two-flop synchronisers.

## Peak-sampled demodulation

This is the central idea, and the one part that depends on precise timing.

The sine table has 64 entries per carrier period. Entry 16 is the positive peak
(code 4095) and entry 48 the negative peak (code 0). `dds_wavegen` pulses
`pos_peak` or `neg_peak` in the same cycle it writes those codes to the
excitation DAC. One cycle later `timing_ctrl` pulses `sens_start` and tags the
conversion with the peak it belongs to (`peak_e`: `PEAK_POS` / `PEAK_NEG`).
`adc_serial_if` then raises chip select and start-of-conversion. The sampling
instant is therefore a fixed few cycles after the peak code reaches the DAC. The
excitation holds that code for a whole sample period (N master-clock cycles,
see below), so the ADC sees the crest of the carrier.

The LVDT output at the positive peak is +A·x and at the negative peak −A·x.
`sync_demod` passes the first and negates the second, so both give +A·x: the
envelope, with two samples per carrier period (20 kS/s at 10 kHz). The tag is
latched when the conversion starts (in the top level, `conv_peak`), so a slow
ADC read cannot mix up the signs.

The method assumes there is no phase shift between excitation and secondary. A
sensor-induced phase lag moves the true crest away from the sampling instant and
scales the result by cos(lag). Nothing here compensates for that.

**ADC timing budget.** Half a carrier period is 25 µs at 20 kHz. The ADC must
convert and shift out its 10 bits within that time, before the next peak starts
another conversion. A `start` that arrives while a transfer is still running is
ignored. The ADC's serial clock must be slower than a quarter of the system
clock, because of the synchronisers. The testbenches use 2 MHz at a 16 MHz
system clock.

### ADC serial link (`adc_serial_if`, used for both ADCs)

```
start  -> cs=1, soc=1 for SOC_CYC (4) cycles -> rd=1
ADC    -> strb high, one data bit per rising sclk edge, MSB first, W bits
strb falls -> data_valid pulse with the last W bits, cs=0, rd=0
no word within TIMEOUT (2000) cycles -> timeout pulse, back to idle
```

`sclk`, `sdata` and `strb` come from the ADC. `cs`, `soc` and `rd` are active
high. Invert them at the pads if the converter needs active-low signals.
Samples are two's complement.

## Excitation synthesis (`dds_wavegen`)

The chain is a frequency-select register, a divide-factor table, a divide-by-N
counter, a 6-bit up counter and a 64-entry sine table. The up counter advances
once every N master-clock cycles, so f = CLK_HZ / (64·N). The divide table is
computed at elaboration from `CLK_HZ`, `F_MIN` and `F_MAX`:

    N(sel) = round( CLK_HZ / (64 · (F_MIN + sel·(F_MAX − F_MIN)/15)) )

At 16 MHz this gives N = 25, 23, 22, 21, 20, 19, 18, 17, 16, 16, 15, 14, 14,
13, 13, 13 for selects 0…15. That is 10.0 kHz up to 19.23 kHz. Only 13 integer
divisors lie between 12.5 and 25, so some selects share a frequency. A faster
master clock gives finer steps.

The sine table holds 12-bit offset-binary codes: 2048 + q(k) on the rising half
and 2047 − q(k) on the falling half, with q(k) = floor(2047.5·|sin(2πk/64)|).
Only the 17 quarter-wave values are stored. A new `freq_sel` takes effect at the
next sample boundary.

`motor_3ph` turns the same sample strobe into three 50 %-duty square waves, 120°
apart, for the motor that positions the core. A 3-bit Johnson counter steps once
every `motor_div` samples (default 64, one step per carrier period).

## Filter (`iir_biquad`)

The filter is one direct-form-II section with a single shared delay line:

    w[n] = x[n] + a1·w[n−1] + a2·w[n−2]
    y[n] = b0·w[n] + b1·w[n−1] + b2·w[n−2]

**Sign convention:** a1 and a2 are *added*. For a textbook
H(z) = (b0 + b1 z⁻¹ + b2 z⁻²)/(1 + A1 z⁻¹ + A2 z⁻²), load a1 = −A1 and a2 = −A2.
Coefficients are signed Q2.14 (value × 16384, range −2…+2). The state carries 8
fraction bits below the input LSB in 24 bits. State and output saturate instead
of wrapping. The input is the 11-bit envelope and the output a 10-bit word. All
five products are formed in one cycle, and the output appears one cycle after
the input.

At reset the coefficients are a Butterworth low-pass with f_c = 1 kHz at
f_s = 20 kHz: b = 329, 658, 329 and a1 = 25576, a2 = −10508. The filter runs at
the demodulated sample rate, which is twice the carrier frequency. When you
change the excitation frequency, reload the coefficients to keep the same corner
frequency.

## Closed loop (`loop_ctrl`)

The filtered position drives a PI controller. Its output goes to a DAC and a
torque generator that hold the core inside the linear range of the transformer:

    e = setpoint − y,   I += e (saturating, 24 bits),
    u = (kp·e + ki·I) >>> 8,   ctl_dac = clamp(u + 2048, 0, 4095)

`ctl_dac` is offset binary, and mid-scale means zero torque. While `ctrl_en` is 0
the integrator is held at zero and the DAC sits at 2048. The loop sign assumes
that a larger DAC code moves the core towards a larger reading. If your actuator
moves the core the other way, use negative gains.

## Decimation (`decimator`)

The filter produces short words at a high rate. The host wants long words at a
low rate, for example 24 bits at 50 Hz. Between two `dec_pulse`s from
`timing_ctrl`, every filter output is added into a saturating 24-bit
accumulator. At the pulse, the sum and the sample count are issued and the
accumulator restarts. Divide the sum by the count to get the block average. The
sum keeps the extra resolution that averaging gains. The interval is
`dec_interval` master-clock cycles (default 320000 = 20 ms).

The original describes this stage as a weighted block average, and elsewhere
as a moving average, but gives no weights. Here every sample in a block counts
equally, and the blocks do not overlap.

## Health monitoring (`anlg_daq`, `dmux16`, `timing_ctrl`)

Every `daq_interval` cycles (default 1000) `timing_ctrl` moves the external
multiplexer to the next channel (`mx_addr`, 0…15 round-robin). It keeps
`mux_en` high and starts the health ADC 16 cycles later (`SETTLE`). `anlg_daq`
latches the channel at the start of each conversion. `dmux16` then files the
word into that channel's register, where it stays until the channel comes round
again. At the default rate each channel is refreshed every 1 ms.

## Supervisory link

### Commands (host → chip, `uart_rx` + `config_regs`)

The UART uses 8N1 framing and `baud_div` master-clock cycles per bit (default
833, which is 19.2 kbit/s). Each command is five bytes:

    0x5A, address, data[23:16], data[15:8], data[7:0]

A byte other than 0x5A is skipped where a frame should start. A frame that
stalls for 100000 cycles is dropped. An unknown address sets a status flag.

| addr | register      | field                  | reset                      |
|------|---------------|------------------------|----------------------------|
| 0x00 | freq_sel      | [3:0]                  | 0 (10 kHz)                 |
| 0x01…0x05 | b0, b1, b2, a1, a2 | signed Q2.14 [15:0] | 329, 658, 329, 25576, −10508 |
| 0x06 | kp            | signed [15:0]          | 0                          |
| 0x07 | ki            | signed [15:0]          | 0                          |
| 0x08 | setpoint      | signed [15:0]          | 0                          |
| 0x09 | ctrl_en       | [0]                    | 0                          |
| 0x0A | dec_interval  | [23:0] cycles          | 320000 (50 Hz)             |
| 0x0B | baud_div      | [15:0] cycles per bit  | 833 (19.2 kbit/s)          |
| 0x0C | motor_div     | [15:0] samples per step| 64                         |
| 0x0D | daq_interval  | [23:0] cycles          | 1000                       |

A new `baud_div` applies to both directions as soon as it is written. The host
must switch its own rate at the same time.

### Telemetry (chip → host, `packetizer` + `uart_tx`)

The chip sends one 17-byte packet per decimated word. Multi-byte fields are sent
most significant byte first:

| byte  | content |
|-------|---------|
| 0     | 0xA5 |
| 1–3   | decimated block sum, signed |
| 4–5   | number of samples in the block |
| 6–7   | latest filter output, sign-extended |
| 8     | health channel number (rotates 0…15) |
| 9–10  | that channel's ADC word |
| 11    | register address (rotates 0…13) |
| 12–14 | that register's value |
| 15    | status: bit0 loop enabled, bit1 ADC timeout, bit2 unknown command address, bit3 UART framing error, bit4 packet dropped (overrun) |
| 16    | XOR of bytes 0–15 |

A packet takes 170 bit times, 8.9 ms at 19.2 kbit/s, which fits the 20 ms
period. Status bits 1–4 report events since the previous packet. If the
decimation interval is shorter than a packet, the decimated words in between
are dropped and bit 4 is set.

## Pins of the top level (`lvdt_sigconditnr`)

| group | signals |
|-------|---------|
| sensor ADC | `cs_adc`, `soc_adc`, `rd_adc` out; `sclk_adc`, `sdata_adc`, `strb_adc` in |
| excitation DAC | `db_po_dac[11:0]`, `wr_po_dac` |
| control DAC | `ctl_dac[11:0]`, `wr_ctl_dac` |
| motor | `motor_abc[2:0]` (A, B, C) |
| health mux / ADC | `mx_addr[3:0]`, `mux_en`, `cs_daq`, `soc_daq`, `rd_daq` out; `sclk_daq`, `sdata_daq`, `strb_daq` in |
| host | `sin` in, `sout` out |

Parameters: `CLK_HZ` (16 MHz), `ADC_W` (10), `DAQ_W` (10). The filter output is
fixed at 10 bits and the DACs at 12 bits.

## Files

`rtl/` has one module or package per file. `lvdt_pkg` holds the register map,
the configuration struct `cfg_t` and `peak_e`. `tb/` has a self-checking
testbench `tb_<module>` for every module, two signal-chain testbenches (see
below), and `serial_adc_model`, a behavioural
(non-synthesizable) serial ADC.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also has a
watchdog. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb rtl/lvdt_pkg.sv \
          tb/tb_lvdt_sigconditnr.sv --top-module tb_lvdt_sigconditnr
./obj_dir/Vtb_lvdt_sigconditnr
```

Replace the testbench name to run another one. `tb_lvdt_sigconditnr` runs the
top level at its default parameters, about 140 ms of simulated time in a few
seconds. It contains:

* a behavioural LVDT, whose secondary is position × the chip's own excitation;
* the two ADCs;
* a core that the control DAC can push;
* a host that sends commands and checks every packet: checksum, sample count,
  block average against the true position, health values and register echo.

It drives the chip through these steps:

1. the defaults;
2. a switch to 1 Mbit/s;
3. a negative displacement;
4. a change of excitation frequency;
5. a filter reload;
6. the closed loop settling onto a set point;
7. an overrun;
8. an ADC that stays silent;
9. a bad command.

It counts each of these, and a step that never happens is a failure.

Each unit testbench compares its block against values computed independently:
a floating-point biquad, a floating-point sine, a shadow register file, an
independent UART receiver and transmitter, and so on.

Two more testbenches look at the signal processing as a whole rather than at one
block:

* `tb_iir_freq_response` sweeps sines from 100 Hz to 8 kHz through the filter
  with its reset coefficients. The measured gain stays within 5 LSB of the
  computed |H|: −3.0 dB at 1 kHz, −16.8 dB at 2.5 kHz.
* `tb_demod_tracking` connects the excitation synthesiser, demodulator and
  filter to an ideal sensor whose core swings at 50 Hz across ±80 % of full
  scale. The filtered output follows the true position, delayed by the filter,
  to within 2 LSB. It changes sign with the core.

## What is original and what is chosen here

These parts follow the original design:

* the partition into DDS waveform generation, sensor processing (synchronous
  demodulation, filter and closed-loop control, decimation, timing and hardware
  interface), 16-channel analog data acquisition and a UART controller;
* 16 MHz master clock, 4-bit frequency select, 10–20 kHz excitation and a
  64-sample sine table;
* the 12-bit excitation DAC codes (the table reproduces its published values);
* sampling at the carrier peaks, with negative-peak samples inverted;
* the direct-form-II biquad with programmable coefficients;
* 10-bit filter output and 24-bit decimated output, 50 Hz / 20 ms output period;
* 19.2 kbit/s with a selectable baud rate;
* the ADC start-of-conversion / chip-select / read pulses and the
  clock / data / strobe link;
* three-phase square-wave motor drive made by the DDS.

These are this implementation's own choices, because the original leaves them
open:

* the divide-factor table contents;
* ADC word format, bit order and handshake sequence;
* number formats, saturation and default coefficients of the filter;
* the PI control law, the loop-enable behaviour and the 12-bit control DAC;
* equal weights in the decimator, and issuing the sum with the count instead of
  a normalised average;
* health-channel sequencing and settle delay;
* the whole command format, register map, packet layout and status byte;
* the Johnson-counter motor drive and its rate;
* reset values.

The original's physical results (area, power, timing at 100 MHz) say nothing
about this RTL. It was checked in simulation only.

Known limits:

* no compensation for sensor phase lag;
* the highest excitation frequency at 16 MHz is 19.23 kHz, not 20 kHz;
* the original quotes the filter output as a 10 kHz stream. Sampling both peaks
  gives twice the carrier frequency here, 20 kS/s at a 10 kHz carrier;
* the filter keeps its coefficients when the excitation frequency changes;
* the control loop has no anti-windup beyond integrator saturation;
* the packet carries one health channel and one register per packet, so a full
  sweep of 16 channels takes 16 packets (0.32 s at 50 Hz).
