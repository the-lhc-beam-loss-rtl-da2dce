# Beam loss monitor tunnel card: acquisition FPGA

Each tunnel card of a beam loss monitor measures the currents of eight
ionisation chambers, over a range from about 10 pA to 1 mA. No single ADC
covers nine decades, so every input goes to a current-to-frequency converter
(CFC). The CFC integrates the current and fires one pulse each time a fixed
charge has built up, then discharges. The pulse rate runs from one pulse per
20 s at 10 pA up to 5 MHz at 1 mA.

This FPGA does the following:

* It counts those pulses in 40 us windows.
* It reads the integrator voltage with a 12-bit ADC, so the receiver can
  add the fraction of a pulse that has built up since the last one.
* Every 40 us it sends the eight (count, ADC) pairs to the surface over two
  redundant optical links. Each frame also carries status bits, the card and
  frame identity numbers and a CRC.

Around this measurement path sit the protections a radiation-exposed
safety system needs:

* triplicated counters with voting;
* a constant 10 pA offset current that proves every channel is alive;
* an automatic correction of that offset as radiation raises the amplifier
  leakage;
* a test mode and remote resets, commanded through the level of the
  detector high voltage, because the optical link only runs upwards.

The RTL is SystemVerilog-2017. Its structure follows the published
description of the card's FPGA, which was an Actel A54SX72A antifuse part
clocked at 40 MHz. Where that description stops, this implementation makes
its own choices. They are listed in the last sections.

## Block structure

```
            cfc_pin[8][3] ──► cfc_counter_channel x8 ──count Q1──► goh_interface #1 ──► GOH 1
                               (3 x cfc_lane, 2 voters) ──count Q2──► goh_interface #2 ──► GOH 2
                                        │pulse                          ▲  (crc32_16 inside)
            adc_bus[4] ──────► adc_readout_pair x4 ──ADC value──────────┤
                                                                        │
 HV comparators ─► fsm_dac ──offset/block/reset──► dac_compensation ──► DAC bus
                      │goh_reset                     │ settings, errors ─┤
                      ▼                              ▼                   │
 temperature ───► goh_control ──► I2C, GOH resets   status_cid ─────────┘
                                                    (status snapshot, CID)
 rst_pin[3] ─► reset_tmr        timing_gen: 200 ns / 40 us / 1 s enables, ADC clock, FID
```

`blm_cfc_fpga` is the top. It registers every input pin once at 40 MHz
before use. The original design needed that register because pins
connected straight to counters and FSMs misbehaved. All shared widths and
types are in `blm_pkg`.

## Counting: chopper counters, overflow and voting

Each channel's one-shot output reaches the FPGA on three pins, and the
whole counting path exists three times (`cfc_lane`). A lane holds two
8-bit counters that take turns:

* During a window, one counter counts rising edges.
* The other holds the previous window's total.
* At the window boundary the roles swap, and the counter that starts
  counting is cleared.

This gives the readout a whole 40 us to take the value, instead of one
clock cycle.

The counters wrap like a plain generated counter. A one-bit "overflow FSM"
per counter remembers a wrap. The lane's output multiplexer then selects a
third input, the constant 255, so a saturated window reads 255 and never a
small wrapped number. At 1 mA a window holds 200 counts, so 255 means
"above range".

Two separate two-out-of-three voters combine the three lanes. Voter 1
feeds link 1 and voter 2 feeds link 2, so a single upset in a lane or a
voter cannot corrupt both links. The reset is triplicated and voted the
same way (`reset_tmr`). The rest of the logic is single, as on the
original card.

Timing: an edge registered on the boundary cycle still belongs to the
ending window. The voted counts change two cycles after `en_40us` and then
hold for the whole next window.

## ADC readout and the pulse-near-readout correction

This is the subtle part of the design. The ADC runs at 5 MHz and puts two
channels on each 12-bit bus:

* the word after the rising clock edge is the even channel;
* the word after the falling edge is the odd channel.

`timing_gen` makes `adc_clk`, high for cycles 0–3 of each 8-cycle period.
It also makes two strobes half a period apart: `smp_rise` in cycle 3 and
`smp_fall` in cycle 7. These load a "5 MHz" register per channel
(`adc_readout_pair`).

The count and the ADC value have to agree. If the CFC fires just before
the window boundary, the pulse is counted in that window. The integrator
output, however, lags the pulse, so an ADC sample taken at the boundary
still shows the voltage from before the discharge. The receiver would then
count that charge twice. The readout therefore keeps three samples per
channel:

* t, the register as it stands at the boundary;
* t+t1, the next sample, 200 ns later;
* t+t2, the sample after that, 400 ns later.

Two small FSMs pick one of them:

1. The **pulse FSM** watches the last 100 ns of the window (`near_readout`,
   4 cycles). If the channel's voted CFC pulse falls in it, the window is
   marked `late` and t+t1 is used instead of t.
2. The **threshold FSM** covers an integrator that is still moving. In a
   late window it compares t+t1 with `ADC_THRESHOLD`. If t+t1 is below the
   threshold, t+t2 is used.

The selected value is ready about 400 ns after the boundary, well before
the frame starts.

For the odd channel, the sampling strobe falls on the boundary cycle
itself. Its t is therefore the sample taken half an ADC period before the
even channel's. Its t+t1 and t+t2 are the next two odd samples.

## Frame and links

`goh_interface` (two instances) takes a snapshot of everything on
`frame_start`, 33 cycles after the window boundary. It then sends twenty
16-bit words on consecutive 25 ns cycles with `tx_en` high:

| word | contents |
|---|---|
| 0 | CID, card identity number |
| 1 | status word 1 |
| 2 | status word 2 |
| 3–7 | channels 1–4: {count[7:0], adc[11:0]} x 4 = 80 bits, first word = most significant |
| 8–12 | channels 5–8, same packing |
| 13 | FID, frame identity number (increments every frame) |
| 14–17 | DAC settings, {odd channel, even channel} = {DAC1, DAC2}, {DAC3, DAC4}, … |
| 18, 19 | CRC-32, upper half first |

A word counter drives a 20-input multiplexer. The multiplexer output goes
both to the output register and to `crc32_16`. The CRC covers words 0–17.
Its last two inputs are the CRC halves. The CRC is polynomial 0x04C11DB7,
MSB first, initial value all ones, no final XOR, which is the CRC-32/MPEG-2
parameter set. The DAC words carry the compensation settings without the
test offset.

Status word 1, from bit 15 down to bit 0:

| bits | contents |
|---|---|
| 15–12 | +5 V ok, −5 V ok, +2.5 V ok, HV present |
| 11 | HV test-threshold pin |
| 10 | `TEST_ON` |
| 9 | HV DAC-reset pin |
| 8 | `DAC_RST_R` |
| 7 | HV GOH-reset pin |
| 6 | `GOH_RST_R` |
| 5, 4 | temperature 1 (> 35 °C), temperature 2 (> 60 °C) |
| 3, 2 | GOH 1 ready, GOH 2 ready |
| 1 | any DAC setting > 155 |
| 0 | any DAC setting = 255 |

Status word 2:

| bits | contents |
|---|---|
| 15–8 | no-count error of channels 1–8 |
| 7–0 | `LEVEL` inputs of channels 1–8 (1 = integrator below its limit) |

Pin values are sent exactly as read. `status_cid` registers both words
once per window, so each frame carries one consistent snapshot.

After reset, `status_cid` also reads the 16-bit CID serially from the
device signature source:

1. It pulses `cid_load` for one 200 ns tick.
2. It produces 16 clocks on `cid_sclk`, each high for one tick and low for
   one tick.
3. It samples `cid_sdi` MSB first, on each rising edge of `cid_sclk`.

`goh_control` sets the laser current of both GOHs over I2C. The current is
nominal (11.4 mA, code 57) while both temperature flags are low, and raised
(16.2 mA, code 81) when either flag is high. Each write is START, address,
register, value, STOP, and every byte's ACK is checked. The write goes to
both GOHs after reset, after every change of the wanted current, and after
every GOH reset. A GOH reset holds both `goh_rst_n` low for 10 us.

## Offset-current compensation and the no-count alarm

Every input gets a small offset current from an 8-bit DAC through a
10 GΩ resistor. It should give one count about every 20 s. Radiation drives
the amplifier leakage negative, which eats that offset, so
`dac_compensation` raises the DAC setting until counts return. Per channel
it has:

* a count detector: a non-zero count on either voter in a window;
* a 20 s timer, cleared by each count;
* an 8-bit setting, raised by one (saturating at 255) each time the timer
  expires;
* a 3-bit counter on the same enable, also cleared by a count. When it
  reaches 6, after 120 s without a count, the channel's error bit is set.

The DAC bus is written after every window:

* each channel in turn takes four cycles: address and data with CS low,
  WR low, WR high, CS high;
* after the eighth channel, one LDAC pulse updates all eight outputs
  together;
* in test states, 100 is added to every value, saturating at 255.

## Commands through the high voltage

The detector high voltage is the only path from the surface to the card.
Four comparators with rising thresholds watch it:

| comparator | HV level |
|---|---|
| HV present | nominal HV (1500 V) present |
| test | ≥ 1655 V |
| DAC reset | ≥ 1825 V |
| GOH reset | ≥ 2000 V |

`fsm_dac` accepts a command only after its pin has been high without a
break for `HOLD_S` = 120 s. The sequences are:

* **Test:** `wait_for_cfc_test` → `cfc_test_count_to_120s` → `cfc_test`.
  It adds about 100 pA to every input and stays there until the test pin
  drops and all eight `LEVEL` inputs are 1.
* **DAC reset:** `dac_rst_count_to_120s` → `dac_rst_received` (offset
  added) → once all pins are low, `wait_for_level_2` → once all levels are
  ok, `st_dac_reset`. That state clears every compensation setting for one
  cycle, then the FSM returns to the default state.
* **GOH reset:** the same through `goh_rst_received`, `wait_for_level_3`
  and `st_goh_reset`. That state restarts both GOHs, and the laser current
  is then written again.

A higher pin rising while a lower command is being timed moves the FSM on
to the higher command. A pin dropping early returns it to the default
state. In every state except the default one, automatic compensation is
frozen.

## Parameters

All defaults are the card's real values. Testbenches shorten the time
constants.

| parameter | default | meaning |
|---|---|---|
| `CYC_200NS` | 8 | 40 MHz cycles per 200 ns tick (one ADC period) |
| `TICKS_40US` | 200 | ticks per counting window |
| `WIN_1S` | 25000 | windows per second |
| `FRAME_DELAY` | 32 | frame start = boundary + `FRAME_DELAY` + 1 cycles |
| `HOLD_S` | 120 | HV command hold time, s |
| `TIMER_S` | 20 | compensation step period without counts, s |
| `ERR_LIMIT` | 6 | steps without counts before the error bit |
| `TEST_OFFSET` | 100 | DAC codes added in test/reset states |
| `ADC_THRESHOLD` | 64 | late t+t1 readouts below this use t+t2 |
| `QTR_TICKS` | 13 | I2C quarter bit in 200 ns ticks (≈ 96 kHz) |
| `RST_TICKS` | 50 | GOH reset length in ticks (10 us) |

## Departures from the card description and choices made here

Stated in the card description and followed:

* the 40 MHz input registering;
* the triplicated counters with two voters;
* the overflow-to-255 rule;
* the ADC demultiplexing and the t / t+t1 / t+t2 selection by two FSMs;
* the 20-word frame and its word order;
* the 32-bit CRC;
* the 20 s / 6-step compensation logic with its +100 test adder;
* the HV command FSM with its state names;
* the two laser currents switched by temperature.

Chosen here, because the description does not give them:

* the bit packing inside the channel words and the status bit positions;
* the CRC polynomial, initial value and bit order;
* the ADC threshold value, and the direction of its test (a late value
  *below* the threshold is rejected);
* the position of the 100 ns window (the last 100 ns of the counting
  window) and the frame delay;
* the CID read protocol;
* the I2C addresses, register, codes and speed;
* the DAC write sequence;
* the GOH reset length;
* freezing the error counter together with the compensation;
* which pin ends the reset "received" states (all pins low).

Known differences:

* `tx_er` of both links is held low. The description names a data-error
  signal but not when it is raised.
* The GOH clock outputs are not generated in logic. The 40 MHz clock is
  assumed to be routed to the GOHs directly. The split of the clock between
  the Actel global (HCLK) and quadrant (QCLK) networks is not modelled.
* The description gives the test hold both as 120 s (FSM) and as 240 s (in
  the list of tests). 120 s is implemented; change `HOLD_S` for the other
  value.
* The description gives the `LEVEL` limit as < 1.8 V for "ok" in one place
  and > 2.4 V for the warning in another, which is consistent with Schmitt
  trigger hysteresis. The pin is transmitted raw.
* Whether the design fits the 6036 modules of an A54SX72A was not checked.
  Generic synthesis gives about 840 flip-flops and 2650 word-level cells.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5, run from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/blm_pkg.sv tb/tb_blm_cfc_fpga.sv --top-module tb_blm_cfc_fpga -o sim
./obj_dir/sim
```

The testbenches:

* `tb_<module>` for every module.
* `tb_blm_cfc_fpga` runs the whole card for about 40 shortened seconds
  (16 us windows, 5 windows per second). It receives both links, checks
  every frame, and drives the test, DAC-reset and GOH-reset commands and a
  temperature change. It counts each mechanism and fails if one never
  occurred. The mechanisms are:
  * counter overflow;
  * a voter masking a stuck pin;
  * a late ADC readout and a threshold retry;
  * compensation steps and the no-count error;
  * the test offset on the DAC bus;
  * the DAC and GOH resets;
  * both laser-current writes.
* `tb_blm_full` runs the top with every parameter at its default for five
  frames, including a 5 MHz input (200 counts per window) and a saturating
  one.

`frame_rx` is a receiver model used by both top-level testbenches; it
recomputes the CRC.

Verilator runs with two-state logic, so every register that is read is
reset. The reset is synchronous and active high after the vote.
