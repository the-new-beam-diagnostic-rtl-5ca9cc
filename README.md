# Beam diagnostic readout firmware: picoammeter, wire-grid scanner and host endpoint

Along an ion accelerator, each diagnostic point has two instruments that
intercept the beam. A **Faraday cup** collects all of the beam, so its current
gives the beam intensity. A **beam profile monitor (BPM)** is a grid of 40
horizontal and 40 vertical thin wires. The current on each wire gives the beam
profile and centroid in that plane. Radioactive beams can be very weak, so both
currents must be measured down to a few picoamperes. At that level the readout
is a problem of noise. The signals are nearly DC, so the useful tool is heavy
averaging, done in an FPGA.

This SystemVerilog is the FPGA firmware of one readout controller. One
controller serves up to four diagnostic points:

* **Faraday cups.** A 4-channel picoammeter mezzanine card samples each cup
  current with a 20-bit ADC at about 864 ksps. The firmware averages the
  samples with a **multi-pass moving-average (MAV) filter** whose depth is set
  at run time. The host reads the filtered DC current, or the raw samples as a
  stream.
* **Wire grids.** Each grid plane connects to a preamplifier board. The board
  turns every wire current into a voltage and multiplexes its 40 wires onto a
  single output. Up to eight boards are daisy-chained on one **BPM clock**.
  Each clock period selects the next wire on every board at once. Eight
  on-board ADCs digitise the eight board outputs together. For every wire, the
  firmware waits until the clock edge has crossed the whole chain, averages 64
  samples, and stores the result in one of eight 40-word memory banks.
* **Host link.** A USB bridge carries the host's reads and writes to the FPGA
  as frames of 32-bit words. The firmware decodes each frame and routes it to a
  register file (memory port 1), to the wire memory (memory port 2), or to the
  raw-sample FIFO (stream port). An interrupt line reports when the FIFO is
  almost full.

```
 host (USB bridge) ──rx/tx 32-bit words──► usb_if_core ──port 1──► config_space ──cfg──► all blocks
                                                │      ──port 2──► bpm_mem (8 × 40 words)
                                                └─ stream port ◄── stream_fifo ◄── raw words
 picoammeter ADCs ─CNV/SCK/SDO─► fmc_pico_ctrl ─┬─ serial_adc_reader
                                                ├─ 4 × mav_filter ──► DC currents ──► config_space
                                                └─ raw serializer ──► stream_fifo ──► irq (almost full)
 preamp chain ◄── bpm_clk, bpm_sync ── bpm_ctrl ─┬─ serial_adc_reader (8 ADCs)
 on-board ADCs ─CNV/SCK/SDO────────────►         └─ 8 × mav_filter (64 samples) ──► bpm_mem
```

All files are in `rtl/`, one module or package per file. `diag_fpga_top` is
the top level. Shared types, sizes and the register map are in `diag_pkg`.

## The multi-pass MAV filter (`mav_filter`)

The filter is where most of the sensitivity comes from. It is a chain of up to
four identical passes. Each pass adds up N = 2^log2n consecutive inputs. It
then emits their mean, as a shift right by log2n with the sign kept. Then it
clears and starts over. Pass k therefore emits one value for every N^k input
samples. The host sets the number of passes (`n_stages`) and the samples per
pass (`log2n`), and the output is taken from the last active pass. Three
consequences:

* **Latency, in samples, is N^stages.** For example, 64 samples and 4 passes is
  64^4 = 16.8 M samples. At 864 ksps that is about 19 s between outputs, so
  the bandwidth drops from about 10 Hz to well below 1 Hz. Host software must
  poll correspondingly slower. `dc_count` (register 0x14) tells it when a new
  value has arrived.
* **Each pass decimates.** A pass is not a sliding window, so each output is a
  fresh average that shares no samples with the one before. This is what gives
  the N^stages latency. A cascade of sliding windows would have a latency of
  only stages × N.
* **Arithmetic.** The accumulator of each pass is input width + 10 bits wide,
  so 1024 samples of full-scale input cannot overflow. Each pass adds one
  register stage: `out_valid` follows the completing sample by `n_stages`
  cycles. The division truncates toward minus infinity.

Each picoammeter channel has one filter. The filters are emptied whenever the
MAV settings change or acquisition stops, so an average never mixes two
settings. The BPM path uses the same module, fixed at one pass of 64 samples.

## Wire-grid scanning (`bpm_ctrl`, `bpm_mem`)

A start command starts the scan. The scan is a series of **bunches**. Each
bunch is 40 consecutive BPM clock periods, one per wire, and a pause follows
each bunch. By default a period is 200 µs (20 000 cycles at 100 MHz). The
clock is high for the first half of each period. `bpm_sync` is high during the
first period of a bunch, and tells every board to restart at its first wire.

Within each period:

```
 tcnt: 0 ........ delay ................................... pulse-1
 bpm_clk ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__________________________
         |<- bpm delay ->|<- 64 ADC samples averaged ->| write  |
```

The eight ADCs convert continuously and simultaneously while a scan runs. The
**bpm delay** exists because the clock edge reaches the last board of the
daisy chain late, and that board's output must settle before it is worth
sampling. Samples taken before the delay are ignored. After the delay, the next
64 conversions of each ADC are averaged. The eight averages are written, one
per bank, at the wire's index in a single cycle. The last board of the chain
determines the delay, because all eight ADCs convert together. If a period ends
before its 64 samples are complete, the sticky `missed` status bit is set. This
happens when the delay plus 64 × the ADC period exceeds the clock period. The
defaults are a 20 µs delay and a 2.5 µs ADC period, which take 180 µs of the
200 µs period.

`scans` counts complete bunches. It increments when the 40th wire has been
written, so the host can read the banks during the pause that follows. A stop
command ends scanning at the end of the current bunch. The default pause
repeats the scan every 100 ms (10 Hz).

`bpm_mem` is eight dual-port RAM banks of 40 32-bit words (`dp_ram`). The
scanner writes all banks at once, and the host reads through the other port.
Host word address = bank × 40 + wire, so the banks follow each other with no
gaps (addresses 0..319). Addresses above that read as zero. Values are the
averaged ADC codes, sign-extended.

## Picoammeter acquisition (`fmc_pico_ctrl`, `stream_fifo`)

When `pico_run` is set, all four channels convert continuously, one conversion
every `pico_period` cycles. The default is 116 cycles, or 862 ksps at
100 MHz. Every sample goes to the channel's MAV filter. Each filter output
updates the channel's DC current register.

When `raw_en` is also set, every conversion pushes four words into the stream
FIFO, one per channel and one per cycle:

| bits  | 31:30   | 29:20                          | 19:0             |
|-------|---------|--------------------------------|------------------|
| field | channel | conversion number (mod 1024)   | sample (20-bit two's complement) |

The FIFO holds 1024 words, and `almost_full` rises at 768 words. If
`irq_en` is set, `irq` follows `almost_full`, one cycle later. The host is
expected to drain the FIFO with stream reads. A word that meets a full FIFO is
dropped, and the sticky overflow bit is set. The bit clears when `raw_en` is
cleared. The gaps in the conversion number show where words were lost. At
864 ksps × 4 channels the stream is about 3.5 M words/s, so without draining
the FIFO fills in about 0.3 ms.

Both ADC groups share `serial_adc_reader`. The reader raises CNV for 50 cycles
(the conversion time). It then clocks in all channels in parallel at SCK =
clk/2, MSB first, sampling SDO in the cycle that raises SCK. The ADC is
expected to change SDO on the falling SCK edge. A requested period shorter than
one conversion plus readout is stretched to that minimum: 92 cycles for 20
bits, 84 for 16 bits.

## Host frames (`usb_if_core`)

Every transfer is a request frame answered by a reply frame. Both are made of
32-bit words on valid/ready handshakes (`rx_*` in, `tx_*` out).

Header word (`frame_hdr_t`):

| bits | 31:28  | 27:24    | 23      | 22:21                | 20:16 | 15:0 |
|------|--------|----------|---------|----------------------|-------|------|
|      | source ID | destination port | 1 = read | type: 0 memory, 1 stream | error | size |

Request: header, address word, then `size` data words for a write. Reply: the
request header with `error` filled in and `size` replaced by the number of data
words that follow.

| request                          | reply                                   |
|----------------------------------|-----------------------------------------|
| memory write, port 1 or 2, size 1 | header, size 0                         |
| memory read, port 1 or 2, size 1  | header, size 1, the register           |
| stream read, port 1, size n       | header, size n, n FIFO words (waits for data) |
| anything else                     | header with error 1 (port), 2 (type) or 3 (size), size 0; write data is discarded |

Memory port 2 accepts writes but ignores them.

## Register map (memory port 1, word addresses)

| addr | name      | access | contents (reset value at 100 MHz) |
|------|-----------|--------|-----------------------------------|
| 0x00 | ID        | RO | 0xD1A60001 |
| 0x01 | CTRL      | RW | [0] pico_run, [1] raw_en, [5:2] range per channel (1 = ±1 µA, 0 = ±1 mA), [7:6] preamp gain (0..3 = 10^6..10^9 V/A), [8] irq_en (0) |
| 0x02 | MAV       | RW | [2:0] passes 1..4, [11:8] log2 samples per pass 0..10 (1 pass, 64 samples) |
| 0x03 | PICO_PER  | RW | picoammeter conversion period, cycles (116) |
| 0x04 | BPM_CMD   | WO | [0] start, [1] stop |
| 0x05 | BPM_DELAY | RW | bpm delay, cycles (2000 = 20 µs) |
| 0x06 | BPM_PAUSE | RW | pause after each bunch, cycles (9 200 000: 10 Hz scans) |
| 0x07 | BPM_PULSE | RW | BPM clock period, cycles (20 000 = 200 µs) |
| 0x08 | BPM_ADCPER| RW | BPM ADC conversion period, cycles (250) |
| 0x09 | STATUS    | RO | [0] BPM busy, [1] missed, [2] FIFO almost full, [3] raw overflow, [31:16] FIFO level |
| 0x0A | BPM_SCANS | RO | complete bunches |
| 0x10–0x13 | DC0–DC3 | RO | filtered DC current per channel, ADC codes, sign-extended |
| 0x14 | DC_CNT    | RO | number of filter outputs so far |

The `range` and `gain` fields are wired straight to the `pico_range` and
`preamp_gain` pins, for the analogue parts that switch ranges and feedback
networks.

## What is specified and what is chosen here

The following comes from the described system: the block structure; the two
memory ports and the stream port; the 8 banks of 40 words; the four 20-bit
picoammeter channels at about 864 ksps; the multi-pass MAV filter with
run-time stages and samples per stage, and its N^stages latency; raw streaming
next to filtered values; the almost-full FIFO interrupt; the 200 µs BPM clock
in bunches of 40 with pauses; the bpm delay; the eight simultaneous ADCs; and
the 64-sample single-pass average per wire.

This design's own choices, which a user of the real hardware should check:

* the 100 MHz clock;
* the frame header layout, the reply frames and the error codes;
* the word handshake with the USB bridge;
* the register map and reset values;
* the serial ADC protocol and its 500 ns conversion time;
* the 16-bit width of the on-board ADCs;
* the BPM clock's 50 % duty cycle and the `bpm_sync` signal. The real boards
  may use different control signals to reset their multiplexer.
* the stop command and the `missed` flag;
* the FIFO depth and threshold, and the drop-on-full policy;
* restricting the samples per pass to powers of two, at most 1024.

Streams in the host-to-FPGA direction are not supported, because this
firmware has nothing to send them to. Stream writes get an error reply.

In the real system, the BPM control signals also run back from the last board
of the daisy chain to the controller. Nothing is known about how that return
path is used, so this firmware has no input for it. The bpm delay register
covers the chain's propagation time instead.

Outside this RTL, and not modelled except in testbenches: the USB bridge chip,
the processor module and its software, the preamplifier boards, the
picoammeter card and the ADC chips. The pins of these parts are brought out at
the top.

## Resource notes

Sizes at the default parameters:

* 8 × 40 × 32 bits of BPM memory;
* 1024 × 32 bits of FIFO;
* 12 MAV filters: four 4-pass filters of 30-bit accumulators and eight
  single-pass ones;
* two ADC readers;
* the frame endpoint.

Read-only status registers for the four DC currents sit next to the control
registers.

## Simulation

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The behavioural models used by the
testbenches are also in `tb/`:

* `adc_serial_model`: a serial ADC;
* `preamp_chain_model`: a daisy chain of preamplifier boards with per-board
  clock delay and settling time.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/diag_pkg.sv tb/tb_diag_fpga_top.sv \
          --top-module tb_diag_fpga_top -Mdir obj_top
obj_top/Vtb_diag_fpga_top
```

Replace `tb_diag_fpga_top` with any other testbench name: `tb_mav_filter`,
`tb_serial_adc_reader`, `tb_stream_fifo`, `tb_bpm_mem`, `tb_config_space`,
`tb_usb_if_core`, `tb_fmc_pico_ctrl` or `tb_bpm_ctrl`.

`tb_diag_fpga_top` runs the whole firmware at its default parameters and
default BPM timing, about 2.5 M clock cycles and a few seconds of simulation.
Only the BPM pause is shortened, through its register. The host uses only
frames, and it checks:

* the filtered DC currents before and after a change of MAV settings;
* the raw stream format;
* the FIFO filling to the interrupt and to overflow, and then draining;
* two BPM bunches, with all 320 wire values checked against the models and
  the beam changed between bunches;
* the stop command;
* an error reply.

It also counts host back-pressure and stream reads that had to wait for data.
Every one of these mechanisms must occur at least once, or the test fails.

Two more testbenches run measurements like those made with the real
hardware, on the whole firmware at its default parameters.

**`tb_workload_faraday_cup`.** Each channel carries a current of a few ADC
codes buried in ±3000 codes of random noise. The channels are converted at
the default 864 ksps. The testbench sets the MAV to four passes of 16 samples
and checks two things:

* The first value appears after exactly 16^4 = 65 536 conversions (76 ms).
* The value equals an independent computation of the cascade.

The test runs for about 4 s. The four passes of 64 samples, which take 19 s
of beam time, are only a change of the register value.

**`tb_workload_bpm_scan`.** Every BPM register stays at its reset value. The
testbench injects current into one wire of an otherwise noise-floor grid: a
vertical wire in the first scan, then the matching horizontal wire in the
next. It reads all 320 values after each scan and checks the 100 ms scan
period and the 40 pulses per scan. The test takes about 10 s to simulate,
for 11 M cycles.

The block testbenches cover the rest:

* **`tb_mav_filter`:** compares the filter against a reference cascade for
  five stage/sample settings, including the latency.
* **`tb_bpm_ctrl`:** uses the chain model's junk output during settling, and
  alternating noise that only an exact 64-sample average cancels. A wrong
  delay or a wrong average count shows up as wrong wire values. It also
  checks the clock period, the bunch length, the pause length and the `sync`
  timing.
