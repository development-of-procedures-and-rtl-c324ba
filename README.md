# Switched-biasing FET measurement FPGA

This is the FPGA logic of a board that measures two field-effect transistor
sensors at once. Some transistor sensors drift under a constant gate bias;
switching the bias between two levels reduces the drift. To study this,
the FPGA does four things for each of two measurement ports:

- it generates the bias-switching square wave, with a programmable period and duty cycle;
- it samples the transistor current with a 16-bit ADC, only inside programmable windows of each bias period;
- it averages the samples taken at bias level A, at level B and of the transistor temperature in three separate decimating filters;
- it hands the results to a microcontroller (MCU), which forwards them over USB.

The RTL is SystemVerilog and is written from the published description of
an FPGA design originally done in VHDL. The block structure, the register
map, the ADC timing and the filter dimensions follow that description.
Where it was silent or inconsistent, this design makes a choice. Those
choices are listed at the end, and each file's header repeats the ones
that concern it.

## Structure

```
                 +-------------------------------- fet_root --------------------------------+
 areset ---------> reset_sync --> rst (to everything)                                     |
                 |      ^ sw_reset                                                         |
 MCU bus <------->  mcu_io  (64 x 16 register file, handshake, stream DVO/warning)          |
                 |     | cfg1/cfg2, samp_delay, range        ^ meas1 / meas2               |
                 |     v                                     |                             |
                 |  adc_ch (port 1) --swb--> sw_a            calc_ch (port 1) <- cic 1A,1B,1T
                 |  adc_ch (port 2) --swb--> sw_b            calc_ch (port 2) <- cic 2A,2B,2T
                 |     | adc_en x2                            ^ A/B/T samples + dec        |
                 |  or_gate2 --> adc_read <--> AD7656 pins    |                            |
                 |                 | v[0..5], dvo -----------> adc_ch (routing) ---------+ |
                 +------------------------------------------------------------------------+
```

| Module | Instances | Job |
|---|---|---|
| `fet_root` | top | wiring, pins |
| `mcu_io` | 1 | MCU bus, register file, stream interrupt, lost-data warning |
| `adc_read` | 1 | ADC conversion and read-out sequence, sampling delay |
| `or_gate2` | 1 | either port may request ADC conversions |
| `adc_ch` | 2 | bias square wave, sampling windows, decimation tick, sample routing |
| `cic` | 6 | one-stage CIC decimator (A, B, T per port) |
| `calc_ch` | 2 | auto-trigger: when is a port's result set complete |
| `reset_sync` | 1 | reset synchroniser |
| `fet_pkg` | package | register map, widths, `port_cfg_t`, `filt_res_t`, `port_meas_t` |

Everything runs on one 20 MHz clock (50 ns). Every time value below is a
count of these clocks. Resets are asynchronous in every block. They are
released synchronously by `reset_sync`, two clocks after the button or the
software reset bit lets go.

## Bias period, width and sampling windows

Each port has a down-counter that runs from `sw_period` to 1 and then
reloads. Let `e = sw_period - sw_cnt` be the clocks elapsed in the current
period. Then:

- `sw_a` (port 1) or `sw_b` (port 2) is high, meaning bias level A, while `e < sw_width`. It is low (level B) for the rest of the period.
- `adc_en` requests conversions while `phase_a <= e < phase_b` (window A) or `phase_c <= e < phase_d` (window B).

```
e:      0      phase_a    phase_b   sw_width   phase_c    phase_d   sw_period
swb:    ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|_____________________________________
adc_en: _______|‾‾‾‾‾‾‾‾‾|_____________________|‾‾‾‾‾‾‾‾‾|_____________
```

Some settings have special meanings:

- `sw_width = sw_period` gives a constant bias at level A.
- `sw_period = 0` keeps the port idle: no bias switching and no conversions. After reset every register is 0, so nothing runs until the MCU configures a port.
- A window with both phases equal, for example `phase_c = phase_d = 0`, is off.

A second counter, `data_period`, runs the same way. When it reaches 1, a
one-clock `dec` pulse tells the port's three filters to close their current
block. This sets the rate at which results come out, independently of the
bias period.

The A and B windows are named after their intended use. Which filter a
sample ends up in depends only on the bias level at the moment the ADC held
it (see below), not on which window requested it.

## ADC sampling cycle (AD7656)

`adc_read` is a fixed-length counter sequence of 81 clocks (4.05 µs, just
under the ADC's 250 kSPS limit). A request on `en` is locked in, so a cycle
always completes.

| count | 0 … 61 | 62 … 78 | 79 | 80 |
|---|---|---|---|---|
| CONVST (all 3 groups) | 1 | 1 | 1 | 0 |
| CS (active low) | 1 | 0 | 1 | 1 |
| RD (active low) | 1 | low at 62,63, 65,66, … 77,78 | 1 | 1 |
| capture | – | channel k at count 63+3k | `dvo` | – |

All six channels are converted at the same time. If `en` is still high at
count 80 and `samp_delay` is 0, the next cycle starts straight away. If not,
`samp_delay` idle clocks follow the cycle, which lowers the sampling rate
without touching the windows. As a result:

- one sample takes at least 81 clocks;
- a bias period must be at least 81 clocks to get any sample;
- a bias period must be at least 162 clocks to sample both levels.

The ADC mode pins are fixed: ±2·VREF range, word mode, parallel interface,
hardware mode. After reset, ADC RESET is held for 4 clocks.

Port 1 uses ADC channel 1 (current) and channel 2 (temperature). Port 2
uses channels 3 and 4. Channels 5 and 6 are converted but not used.

## Routing a sample to the right filter

A conversion takes about 3 µs, and the results are read only at the end of
the 81-clock cycle. By then the bias may already have switched. So `adc_ch`
latches `swb` on the rising edge of the ADC's BUSY output, which is the
moment the sample-and-hold has taken the sample. When `adc_read` reports
the results:

- the current sample goes to the A filter if the latched level was A, and to the B filter otherwise;
- the temperature sample always goes to the T filter.

The routing does not model the settling time of the analog current stage
after a bias edge. A window should therefore start a few clocks (≈150 ns)
after the edge it follows.

There is only one ADC. A conversion requested by either port is routed by
*both* ports, each according to its own bias level. When both ports are in
use, give them compatible windows. If a conversion is already running, a
request from the other port does not start a new one.

## Decimating filters (`cic`)

Each filter is a one-stage CIC (N = 1, differential delay M = 1) with a
16-bit signed input and a 32-bit word. This is exactly an integrate-and-dump
over a block of variable length:

- The integrator adds each routed sample. It wraps modulo 2^32.
- A `dec` pulse marks the end of the data period. The block is closed at the next sample routed to this filter.
- When the block closes, the comb stage subtracts the integrator value kept from the previous block end. That gives the sum of the finished block.
- The filter outputs `y_out` (the sum), `count_out` (the number of samples) and a one-clock `dvo`.
- The sample that closed the block becomes the first sample of the next block.

The number of samples per block depends on how the windows fall. The filter
does not divide. The MCU computes the mean as `sum / count` (sign-extended
32-bit sum). The word is sized for the worst case: 65536 full-scale 16-bit
samples fit in 32 bits. With an 81-clock sample period this allows data
periods up to about 265 ms. The count word is 16 bits, so a block of
exactly 65536 samples reads as 0.

A filter that never receives a sample never reports. For example, the B
filter stays silent under constant bias.

## Auto-trigger (`calc_ch`)

Depending on the windows, a port's result set may be A+T, A+B+T, B+T, and
so on. Within each data period, A and T report at the first A-level sample
after `dec`, and B at the first B-level sample. `calc_ch` tracks two sets of
filters:

- `cur`: the filters that reported since the last trigger;
- `prev`: the set the last trigger had.

It triggers as soon as `cur` equals `prev`. If the set does not match, for
example after reset or after the windows were changed, it triggers at the
next `dec` with whatever has arrived, and that set becomes the new
expectation. So after a change, one data period passes before the port
triggers on time again. Just after a port is configured, this usually
gives two results close together. The data period is written as two
16-bit halves, low half first, so the first block is short. Its result
goes out at the following `dec`, and the first full block's result
follows within one bias period. The trigger carries the latest sum and count of
each filter and a mask of the filters that reported.

## MCU interface (`mcu_io`)

The bus has an 8-bit address, a 16-bit data bus and four handshake lines.
On the board the data bus is bidirectional. Here it is split into
`mcu_data_in`, `mcu_data_out` and `mcu_data_oe`, which drive a tri-state
pad. The MCU runs on its own clock, so `mcu_req_miso`, `mcu_req_mosi`,
`mcu_oe` and `mcu_stream_busy` pass through two-flip-flop synchronisers.
Address and data are sampled only after a synchronised request, so they
must be stable before the request rises.

- **Read (MISO):** the MCU sets the address, drives `mcu_oe` low and raises `req_miso`. The FPGA drives the word and raises `req_miso_ack`. The MCU reads the data and drops `req_miso`, and the FPGA then drops the ack.
- **Write (MOSI):** the MCU drives `mcu_oe` high, sets address and data, and raises `req_mosi`. The FPGA stores the word and raises `req_mosi_ack`. The MCU drops `req_mosi`, and the FPGA then drops the ack.

Assertions in `mcu_io` check that an acknowledge only rises in answer to a
request, and that the FPGA drives the bus whenever it acknowledges a read.

### Register map (16-bit words; 32-bit values are low word first)

| Word | Content |
|---|---|
| 0–1, 2–3 | port 1 `sw_period`, `sw_width` |
| 4–5, 6–7 | port 2 `sw_period`, `sw_width` |
| 8–15 | port 1 `phase_a`, `phase_b`, `phase_c`, `phase_d` (2 words each) |
| 16–23 | port 2 phases a–d |
| 24–25 | `samp_delay` |
| 27 | bits 0–3: port 1 flags a, b, c, t of the last trigger; bits 4–7: port 2 flags; bit 14: stream port 1; bit 15: stream port 2 |
| 28 | bit 7: update results even while the MCU is busy |
| 29 | bit 0: software reset; bit 1: port 1 range relay; bit 2: port 2 range relay |
| 32–39 | port 1 sums a, b, c, t (2 words each) |
| 40–47 | port 2 sums a, b, c, t |
| 48–51 | port 1 counts a, b, c, t |
| 52–55 | port 2 counts a, b, c, t |
| 56–57, 58–59 | port 1 and port 2 `data_period` |
| 60 | lost-measurement counter |

The "c" entries are reserved in the map and no filter feeds them. They read
0. Words 26, 30, 31 and 61–63 are free. Addresses 64–255 read 0 and ignore
writes. Writing bit 0 of word 29 resets the whole FPGA, including the
register file, so the bit clears itself.

### Streaming

1. A trigger from a port selected in word 27 stores that port's results and flags and raises `mcu_stream_dvo` for three clocks. This is the MCU's interrupt.
2. The MCU raises `mcu_stream_busy`, reads word 27 and the flagged results, then drops `mcu_stream_busy`.
3. While `mcu_stream_busy` is high, stored results are frozen so that a multi-word read stays consistent, unless word 28 bit 7 is set.
4. A selected trigger that arrives while the MCU is busy is a lost measurement. It sets `mcu_stream_warn` and increments word 60. The warning clears when the MCU starts its next retrieval.

## Limits

- Bias period: at least 81 clocks for one filter, 162 for two, at most 2^32−1 clocks (≈ 214 s). 1 kHz is 20000 clocks; 100 kHz is 200 clocks.
- Samples per block: at most 65536 for an exact 32-bit sum of full-scale input. With an 81-clock sample period, a 10 Hz output rate needs about 25000.
- The count word is 16 bits, so the MCU reads a count of 65536 as 0, and larger counts wrap. The T filter takes every conversion, including those started by the other port's windows, so it reaches the limit first. At the constant ADC rate of 246.9 kSPS, a data period longer than 0.265 s (5.3 M clocks) can exceed it. In the 3.33 results/s switched-bias run, only the gaps between windows keep T at 48000.
- Result rate: limited by how fast the MCU reads. Triggers that come faster than that are counted as lost.

## Departures and choices

Choices made where the original description is silent:

- Which 32-bit half sits at the lower address.
- Reset values of all registers (0).
- The ADC channel assignment.
- The ADC reset pulse length (4 clocks).
- `>=` / `<` at the window edges.
- A new period takes effect only when the running period ends.
- The exact auto-trigger rule: set equality or the next `dec`.
- When the stream warning clears.
- The treatment of addresses above 63.

Where this design differs from the original:

- **Lost-measurement counter:** the original text places it at word 51, which its own map assigns to the port 1 temperature count. The map is kept, and the counter lives in free word 60.
- **Reset output:** the original drives the reset net from the second synchroniser flip-flop alone. Here the raw request is also ORed into the output, so reset takes hold at once, even before the first clock after power-up. Release is still two clocks after the request ends.
- **Periods under 81 clocks:** the original notes that such a period starts a conversion but never yields a result. Here a started cycle always completes, and its result is routed by the bias level latched at BUSY. A period this short is still outside the usable range.
- **Comb stage:** in the original, the comb output lags one decimation behind, because the comb registers its input before subtracting. Here each result is the sum of the block that just finished, which is the value the MCU's `sum / count` expects.
- **Register 28 ADC setup bits:** the register map reserves bits 0–6 for ADC pins, but the original fixes those pins in logic, and so does this design. Only bit 7 is used.
- **Not included:** the debugging-LED component (its behaviour is not specified) and the heater PWM bits of word 29 (planned, not designed).

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Two behavioural models serve them:

- `tb/ad7656_model.sv`: an ADC with BUSY, parallel read and set conversion times;
- `tb/mcu_bus_model.sv`: the MCU side of the handshake, with `read`, `write`, `read32` and `write32` tasks.

`tb_fet_root` runs the whole FPGA at its only size. The analog model gives
each port a fixed code per bias level, so every reported sum must equal
code × count. The test then goes through:

1. switched biasing on port 1, checking block sizes (20/20/40 samples) and the 5000-clock trigger interval;
2. a sampling delay;
3. constant bias, where the trigger set changes;
4. both ports streaming;
5. an MCU that is too slow, producing lost measurements and frozen results;
6. the range relays and the software reset.

It counts each of these mechanisms and fails if one never happens.

`tb_fet_workloads` also runs at full size. It holds the two
characterisation set-ups at 10 kHz bias, one on each port, for a little
over a simulated second (about 20 s of wall time):

- Port 1 uses constant bias, a 0.5–25 µs window and 10 results/s.
- Port 2 uses 50 % switched bias and 3.33 results/s, with windows in both halves of the period.

A monitor on the ADC BUSY and bias pins counts the conversions of each
kind between triggers. Every block must report exactly that count, and a
sum of code × count. Result intervals must match the data period to the
clock.

To build and run a testbench with Verilator, from the directory holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
  -Irtl -Itb --top-module tb_fet_root rtl/fet_pkg.sv tb/tb_fet_root.sv -o sim
./obj_dir/sim
```

The package is named first. Verilator finds every other module through
`-y`. Replace `tb_fet_root` with `tb_fet_workloads` or `tb_<block>` to run
another test. `tb_cic` also runs two blocks of 65536 full-scale samples,
to show that the 32-bit word holds them.
