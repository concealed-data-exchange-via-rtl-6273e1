# Thermal covert channel for FPGAs

Two circuits on the same FPGA can talk without a single wire between them. The
sender switches a heater on and off in the rhythm of its data bits. The heat
spreads through the silicon. The receiver measures the die temperature with a
ring oscillator, whose frequency falls as the die warms. A circuit fenced off
from the rest of the chip, for example one that holds a cipher key, can leak
its secret this way to any other circuit on the die. With a stronger heater it
can also leak it through the package to a sensor outside the chip.

This repository holds synthesizable SystemVerilog for the digital parts of such
a channel: the data encoder, the shift-register heater, the counter and control
logic of the ring-oscillator temperature sensor, the bit detector and the data
decoder. It also holds behavioural models for the two ring oscillators, which
are hand-placed combinational loops on a real device, and a top level that joins
them all. The block structure and the sizes follow a published description of
the channel. Where that description says nothing (clock frequency, handshakes,
bit order, the exact comparison rule), the choices are this design's own and are
listed below.

## The channel end to end

```
           transmitter                                      receiver
 tx_data --> data_encoder --heater_on--+--> ro_heater  ~~heat~~>  sensor_ro --osc--> ro_counter
                 (mode)                |    (internal)            (die_temp_mc)          |
                                       +--> sr_heater  ~~heat through package~~>     sensor_ctrl
                                            (external)                                   | sample
                                                                                    bit_detect
                                                                                         | rx_level
                                                                                   data_decoder --> rx_bit, rx_word
```

`thermal_covert_top` instantiates every block. The heat path (`~~`) is physics,
not logic. The top brings out the heater outputs and takes the die temperature
at the sensor as an input, `die_temp_mc` (milli-degrees Celsius above a
reference temperature). The testbench closes the loop with a first-order thermal
model.

There are two modes, chosen by `tx_mode` and captured when `tx_enable` rises:

| mode | heater | encoding | receiver |
|---|---|---|---|
| `MODE_INTERNAL` | `ro_heater`: 20 ring oscillators of 3 inverters, 160 MHz | one slot per bit, heater on for a '1' | on chip, this RTL |
| `MODE_EXTERNAL` | `sr_heater`: 10 circular registers of 250 flip-flops, 200 MHz | eight slots per bit: '1' = 1000_0000, '0' = 0000_0000 | off chip (thermistor, ADC); not part of this RTL |

The die has little thermal inertia, so inside the chip a data bit can drive the
heater directly. The package heats slowly and cools even more slowly. So the
external code heats for one slot and then gives the package seven slots to cool.

## Transmitter

**`data_encoder`** is a rotating shift register with a slot counter. When
`enable` rises it captures `data_in` and the mode. It then sends the word MSB
first, one slot of `SLOT_CYCLES` clocks at a time, and starts again at the MSB
after the last bit. The word keeps being broadcast until `enable` falls.
`heater_on` is registered. `bit_strobe` marks the start of each data bit and
`word_wrap` marks the start of each new pass over the word. `cur_mode` tells the
top which heater to steer `heater_on` to.

**`ro_heater`** (behavioural model) gives every ring the half period of a
160 MHz oscillator while `en` is high, and holds the outputs while it is low.
All rings toggle in step.

**`sr_heater`** is loaded with 0101... at reset. While enabled, each register
rotates by one place on every heater clock, so every flip-flop toggles on every
clock. Registers of even length are required (an assertion checks this),
otherwise two neighbours in the ring would be equal. The enable arrives from the
system-clock domain, so it passes a two-flip-flop synchroniser. Heating
therefore starts and stops two to three heater clocks after `heater_on` changes.
The `tap` outputs, one flip-flop per register, keep synthesis from removing the
registers.

## Receiver: measuring temperature with a counter

**`sensor_ro`** (behavioural model) stands for a 51-inverter ring of about
13 MHz. A long ring oscillates slowly and so adds little heat, and therefore
little noise, of its own. Its half period is
`HALF_PERIOD_PS * (1 + TEMPCO_PPM * die_temp_mc / 1e9)`. The default
coefficient, 1000 ppm per degree, is an assumption, because no figure for it is
available.

**`ro_counter`** synchronises the oscillator output into the system clock
with two flip-flops and counts its rising edges. The system clock (100 MHz is
assumed) must therefore run at more than twice the oscillator frequency. The
16-bit count saturates rather than wrapping. An edge in the cycle that clears
the counter is counted as the first edge of the next window, so no edge is lost.

**`sensor_ctrl`** cuts time into windows of `WINDOW_CYCLES` clocks. In the
last cycle of each window it copies the count to `sample`, pulses
`sample_valid` and clears the counter. The default of 100 000 cycles gives 1000
samples per second and about 13 000 counts per sample, well inside 16 bits. A
lower count means a slower oscillator and so a warmer die.

## Receiver: deciding a bit

This is the least obvious part of the design. The absolute count says little,
because it depends on the ambient temperature, on the device and on where the
ring is placed. Only changes in the count carry information. **`bit_detect`**
therefore looks at trends:

1. The samples are grouped into non-overlapping blocks of `AVG_LEN` = 50. Each
   block's sum is compared with the sum of the block before it. All blocks are
   the same size, so comparing sums is the same as comparing averages, and no
   divider is needed. `avg` still shows the last block's average.
2. A smaller sum is trend **HEAT** (the oscillator slowed down, so the die got
   warmer). A larger sum is trend **COOL**. Equal sums, and the very first
   block, give **NONE**, which breaks any run.
3. When `RUN_LEN` = 3 comparisons in a row show the same trend, the bit becomes
   '1' (HEAT) or '0' (COOL). `decided_heat` or `decided_cool` pulses once, when
   the run first reaches three. Otherwise the bit stays as it was.
4. After reset the bit is '0'.

Consequences a user should know:

* **Latency.** A new bit needs at least four blocks after the heater switches:
  one block to compare against, then three moves. At the defaults (1 ms
  samples) that is 200 ms plus the thermal delay. This is well inside the 1 s
  bit period.
* **Steady temperature holds the bit.** During a long run of ones the die
  approaches a steady temperature. The sums then stop falling and only jitter by
  a count, which cannot form three strictly rising or falling steps. So the bit
  stays '1'. Thermal noise larger than one count per block can create false runs.
  Nothing in the design filters it.
* **An idle channel reads as zeros.** With no transmitter the bit simply stays
  at '0'. The receiver cannot tell "nothing sent" from "zeros sent". That is
  acceptable for a transmitter that repeats its secret forever, and it is a real
  limit for anything else.

**`data_decoder`** knows the bit period (`BIT_CYCLES`). Counting from
`enable`, it takes `rx_level` at the last clock of every bit period as the
received bit. Sampling late gives the detector the most time to settle. It
shifts the bits in MSB first and presents a `DATA_W`-bit word on `rx_word`
after every `DATA_W` bits. There is no frame marker: the word boundaries are the
receiver's own count, so transmitter and receiver must start together. This
holds in the testbench. A real attacker would add a preamble. The transmitter
sends plain bits with no error-correcting code, so the decoder has no code to
check. A design that adds one (Hamming, for instance) would decode it here.

## Default sizes

| parameter | default | meaning | source |
|---|---|---|---|
| `DATA_W` | 128 | word looped by the transmitter | described design |
| `SLOT_CYCLES`, `BIT_CYCLES` | 100 000 000 | 1 s per internal bit at 100 MHz | rate from the described design, clock assumed |
| `N_RO`, `RO_INV` | 20, 3 | ring-oscillator heater | described design |
| `N_SR`, `SR_LEN` | 10, 250 | shift-register heater | described design |
| `SENSOR_INV` | 51 | sensor ring, about 13 MHz | described design |
| `WINDOW_CYCLES` | 100 000 | 1000 samples/s (500 to 1000 were used) | described design, clock assumed |
| `AVG_LEN`, `RUN_LEN` | 50, 3 | bit-detection rule | described design |
| `TEMPCO_PPM` | 1000 | sensor frequency drop per degree | assumed |
| `EXT_SLOTS` | 8 | slots per bit, external mode (`thermal_pkg`) | described design |

At these defaults one internal bit takes one second and one pass over the word
takes 128 s. The counter needs at most 26 000 counts (2 ms windows at 13 MHz)
against a range of 65 535.

## Where this RTL departs from, or adds to, the described design

* Clocking: a 100 MHz system clock for the encoder and receiver, and a separate
  200 MHz heater clock with a synchroniser. The description gives only the
  heater rates.
* Conflict on the ring-oscillator heater: one passage speaks of rings built
  from 203 inverters in total, another of twenty rings of three inverters. This
  RTL follows the twenty rings of three.
* The shift-register heater was described as mapped into LUT shift registers
  (about 85 LUTs). Here it is written as plain flip-flops, and the mapping is
  left to synthesis.
* Bit detection uses non-overlapping blocks and maps a falling count to '1'.
  The description compares "the last 50 samples with samples 51 to 100" and
  leaves both readings open.
* External mode uses the same slot length as internal mode. The external rate
  was not given.
* The on-chip receiver listens only to internal mode. The external receiver
  (thermistor, microcontroller ADC, UART, decoding software on a PC) is not
  hardware that this RTL can provide. Nor is the victim circuit, the other
  systems on the die, or the isolation region between them.
* The two ring oscillators are behavioural models. To place real ones, replace
  them with hand-instantiated LUT/inverter loops that have the same ports, kept
  out of logic blocks shared with other circuits, because neighbouring logic
  disturbs the ring's delay.

## Simulating

All files use `timeunit 1ns`, except the oscillator models, which use 1 ps.
Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
The package is named first. `-y` lets verilator find every other module by
its file name. For example, for the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/thermal_pkg.sv tb/tb_thermal_covert_top.sv \
  --top-module tb_thermal_covert_top -o sim
./obj_dir/sim
```

The other testbenches are built the same way with their own names. The unit
testbenches are `tb_data_encoder`, `tb_ro_heater`, `tb_sr_heater`,
`tb_sensor_ro`, `tb_ro_counter`, `tb_sensor_ctrl`, `tb_bit_detect` and
`tb_data_decoder`. The whole-channel testbenches are `tb_thermal_covert_top`,
`tb_internal_128` and `tb_full_size_bit`.

`tb_thermal_covert_top` runs the whole channel at reduced sizes. It uses a
16-bit word and 300 000-cycle bits (3 ms of simulated time). Each sample is a
500-cycle window of about 65 counts. `AVG_LEN` = 50 and `RUN_LEN` = 3 are kept.
`thermal_die_model` gives a time constant of 0.5 ms and a rise of about 20
degrees while heating. The test first sends the word twice in internal mode. It
checks every received bit against the bit sent in the same period, and both
received words against the sent word. It then switches to external mode and
sends "1","0". There it checks the 1000_0000 slot pattern, that the
shift-register heater runs only in the heated slot, and that the ring heater
stays idle. It counts each mechanism and fails if one never happens: heated
slots, heat and cool decisions, blocks without a decision, word loops, received
words, the mode switch, the external heated slot and shift-register heating. It
takes under a minute of wall time.

`tb_internal_128` sends a whole 128-bit word (a stand-in for a cipher key,
with runs of up to seven equal bits) with the same scaled timing. It checks all
128 received bits and the received word. It simulates 384 ms in about a minute.

`tb_full_size_bit` instantiates the top with every parameter at its default.
The sizes are a 128-bit word, 1 s bits, 1 ms windows of about 13 000 counts,
50-sample averages and runs of 3. Its die model has a 100 ms time constant. It
runs for one simulated second, which is one bit, and takes about three minutes.
It checks that 1000 samples arrive in the expected count range, that the
detector decides '1' from a heating trend, and that the first received bit is
that '1'. At the defaults, a whole pass over the 128-bit word is 128 s, or
1.28 x 10^10 system clocks. That is beyond what an event-driven simulation can
run, so the word-level checks are made at the scaled timing above.

## Files

* `rtl/thermal_pkg.sv`: mode and trend enums, external slot patterns, counter
  width.
* `rtl/data_encoder.sv`, `rtl/ro_heater.sv`, `rtl/sr_heater.sv`: transmitter.
* `rtl/sensor_ro.sv`, `rtl/ro_counter.sv`, `rtl/sensor_ctrl.sv`,
  `rtl/bit_detect.sv`, `rtl/data_decoder.sv`: receiver.
* `rtl/thermal_covert_top.sv`: both joined.
* `tb/tb_*.sv`: one self-checking testbench per block and one for the top.
* `tb/thermal_die_model.sv`: thermal model joining heater and sensor
  (testbench only).
