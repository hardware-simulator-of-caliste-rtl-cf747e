# Caliste-SO detector simulator

The STIX X-ray telescope's data processing unit (IDPU) reads 32 Caliste-SO
detector units. Each unit has two IDeF-X HD front-end ASICs and an ADC per
pair, and the units are grouped in four quarters. To test the IDPU without
real detectors, this design replaces the detectors with digital models.

The models:
- speak the real ASIC's serial link and the ADC's serial interface;
- are fed from a prerecorded **event sequence**, a list of 32-bit events,
  each stamped with an arrival time in 20 ns steps.

A controller streams the sequence from two SD cards, holds each event until
its arrival time comes up, and drops it into the right ASIC model. Each
injected event:
- raises TRIG, exactly as an X-ray photon would;
- waits in the model's amplitude registers until the IDPU reads it out
  through the ordinary link and ADC.

The IDPU cannot tell the difference, apart from the analogue behaviour, which
is not modelled. Housekeeping is simulated the same way:
- The sequence sets the ASIC temperature registers.
- Eight thermistor simulators each drive three I2C digital potentiometers
  wired in parallel.
- The sequence can raise SEU flags and set the amplitude returned by a test
  charge injection.

```
 workstation ──USB chip── usb_sm ⇄ async FIFOs ⇄ main_sm ⇄ sd_dual ⇄ 2 × SD card
                                                    │
                                             event_distributor ── temp_lut ── 8 × temp_sensor_sim ── I2C pots
                                                    │ (per quarter)
                                 4 × detector_quarter: async FIFO → 4 × asic_group (2 × asic_model + adc_model)
                                                    │
                                                  IDPU (STROBE/DIN/DOUT/TRIG, ADC CS/SCLK/SDO, TEST, SEU)
```

## The event word

Every event is one 32-bit word, whatever its kind:

| bits    | field |
|---------|-------|
| [31:29] | kind: 0 dummy, 1 detector hit, 2 ASIC temperature, 3 test-pulse amplitude, 4 auxiliary temperature, 5 SEU |
| [28:21] | arrival time modulo 256, in 20 ns steps from the start of the replay |
| [20:16] | detector 0–31: quarter = [20:19], group = [18:17], ASIC in the group = [16]. For kind 4, the sensor number is [18:16] |
| [15:12] | pixel 0–12, for detector hits |
| [11:0]  | amplitude, or the temperature code |

Only eight time bits travel with each event, so the distributor compares them
with the low 8 bits of its free-running step counter. A gap of 256 steps
(5.12 µs) or more between two events therefore needs a **dummy event** in
between. The sequence generator has to insert them.

Two more rules on the sequence:
- Arrival times must strictly increase, so at most one event is released per
  step.
- Several photons hitting one detector close together are written as
  separate events a few steps apart. The ASIC model merges them into one
  readout because it stays in its detection phase until the IDPU starts
  reading.

## How an event reaches the IDPU

1. **Storage to queue.** `main_sm` reads the sequence from `sd_dual` one byte
   at a time and assembles big-endian words. It pushes them into the
   distributor's 1024-word queue (`sync_fifo`). The replay clock does not
   start until 512 words are queued, or until the whole sequence has been
   read if it is shorter. This prefill absorbs the SD cards' access latency.
2. **Back-pressure.** When the queue is full, `main_sm` stops taking bytes.
   The SD controllers' 1 KiB receive buffers then fill up, and each
   controller stops its card clock in the middle of a block. SD cards allow
   this.
3. **Release.** `event_distributor` compares the head's time field with its
   counter every 50 MHz cycle, which is one step. On a match it pops the
   event, and one cycle later it presents it:
   - to the quarter named by the detector number (detector hit, ASIC
     temperature, SEU);
   - to all quarters (test pulse);
   - to `temp_lut` (auxiliary temperature);
   - to nobody (dummy).

   An event addressed to a quarter whose power input is low is dropped and
   counted. A test-pulse event still reaches the powered quarters, but its
   copy for the unpowered quarter is counted as dropped.
4. **Into the quarter.** Each `detector_quarter` runs on its own clock
   (100 MHz in the testbenches). It receives events through an asynchronous
   FIFO and decodes them to the eight ASIC models' injection ports:
   - HIT, channel and amplitude;
   - internal temperature;
   - test amplitude.

   SEU events set a flag that stays on until the quarter is powered down.
   When the quarter's power input is low, all its models are held in reset.
5. **Injection.** `asic_model` writes the amplitude into the channel's
   register only if all of these hold:
   - the chip is in its detection phase;
   - the channel is powered (its ALIMON bit);
   - the channel's discriminator is enabled (TH ≠ 63);
   - amp > TH·64;
   - amp is larger than the amplitude already stored (peak-detector
     behaviour).

   On acceptance, the channel's event register bit and TRIG go high in the
   next cycle.

## The ASIC serial link

The link behaves as follows:
- All link actions happen on STROBE rising edges, at 20 MHz nominal.
- The models run on a clock at least four times faster than STROBE and
  synchronise STROBE and DIN with two flip-flops.
- The model drives DOUT just after a rising edge, and the host samples it on
  the next one.

A frame is:
- a start bit (1);
- the 3-bit ASIC address (compared with NUMASIC);
- a 2-bit command: 0 = write register, 1 = read register, 2 = readout,
  3 = no-op.

Register commands send a 4-bit register number. A write then sends the
register's bits, MSB first; a read returns them on DOUT.

| addr | register | width | notes |
|------|----------|-------|-------|
| 0 | ALIMON  | 32  | channel power, default all ones |
| 1 | TH      | 192 | 6 bits per channel, channel 31 first, default 0; 63 = off |
| 2–5 | GAIN, SHAPING, PZ, BLH | 8 | stored and read back only |
| 6 | TESTEN  | 32  | channels that take the test pulse |
| 7–9 | MODE, DAC, LEAK | 8 | stored and read back only |
| 10 | TEMP   | 12  | read only, set by ASIC temperature events |
| 11 | EVENT  | 32  | read only, one bit per triggered channel |
| 12 | ID     | 8   | read only, `CHIP_ID` parameter |

A **readout** works like this:
1. The model shifts out the 32-bit event register and enters its readout
   phase, which drops TRIG.
2. It loads the first hit channel's amplitude into the group's `adc_model`.
3. Each further STROBE edge with DIN = 0 steps to the next hit channel.
4. DIN = 1 ends the readout, clears the amplitudes and the event register,
   and returns the model to detection.

The ADC behaves as follows:
- It samples on the CS_n falling edge.
- It then shifts out 4 zeros and the 12 amplitude bits, MSB first.
- SDO changes after each SCLK falling edge.

The two ASICs of a group share STROBE and DIN. Their DOUT and TRIG outputs
are ORed. A concurrent assertion in `asic_group` checks that the two are
never in their readout phases at the same time.

## Test pulse, temperatures, SEU

- **Test pulse.** A test-pulse event stores an amplitude in every ASIC of
  every powered quarter. A later rising edge on the quarter's `test_pulse`
  input injects that amplitude into the channels enabled in TESTEN. The
  injection is accepted under the same five conditions as a hit.
- **ASIC temperature.** An ASIC temperature event writes the TEMP register.
- **Auxiliary temperature.** An auxiliary temperature event looks up its
  8-bit temperature in `temp_lut`. That is a 256-entry RAM of
  `{shdn[2:0], code_1M, code_100k, code_10k}`. The workstation loads the
  table, and every potentiometer starts shut down. The result goes to
  `temp_sensor_sim`, which writes the three potentiometers over its own I2C
  bus:
  - addresses 0x2C, 0x2D and 0x2E;
  - an instruction byte whose bit 5 is the shutdown flag;
  - then the 8-bit wiper code.

  An event that arrives during an update is kept, and the newest one wins.

## Storage

`sd_dual` drives two `sd_host` controllers side by side. A logical block is
1024 bytes: even bytes go to block *n* of card A and odd bytes to block *n*
of card B.

Each `sd_host` does the following:
- It initialises its card at a slow clock (`clk / (2·(SLOW_DIV+1))`, about
  400 kHz). The command sequence is CMD0, CMD8, ACMD41 (repeated until
  ready), CMD2, CMD3, CMD7, ACMD6 (4-bit bus), then CMD6 switching to high
  speed with its 64-byte status.
- It then runs the bus at the 50 MHz system clock.
- Transfers are CMD18 and CMD25 multi-block operations ended by CMD12.
- It checks CRC7 on responses and CRC16 on every data line, and waits for
  the busy signal on DAT0 after each written block.
- There is no file system: blocks are addressed directly.
- UHS-I voltage switching is not done, so the cards run in 3.3 V
  high-speed mode.

## Workstation protocol

The workstation reaches `usb_sm` through the USB chip's synchronous FIFO
bus (FT245 style, 60 MHz). `usb_sm` feeds two `async_fifo`s into the 50 MHz
domain. Multi-byte fields are big-endian.

| op | arguments | action | answer |
|----|-----------|--------|--------|
| 0x01 WRITE_MEM | addr[4], count[2], count×1024 data bytes | store blocks | 0x81 at the end |
| 0x02 READ_MEM  | addr[4], count[2] | read blocks | count×1024 bytes |
| 0x03 START     | addr[4], count[4] | replay count blocks from addr | 0x83 |
| 0x04 STOP      | — | stop the replay and clear the queue | 0x84 |
| 0x05 STATUS    | — | — | flags, released[31:0] (5 bytes) |
| 0x06 LUT_WRITE | temp[1], entry[4] (27 bits used) | write one temperature table entry | 0x86 |

STATUS flags are `{3'b0, storage_error, queue_empty, running, sim_active,
storage_busy}`. An unknown opcode is answered with 0xFF.

## Clocks and reset

| clock | rate | used by |
|-------|------|---------|
| `clk` | 50 MHz | controller, SD cards, one replay step per cycle |
| `usb_clk` | 60 MHz | comes from the USB chip |
| `q_clk` | 100 MHz in the testbenches | detector quarters; needs at least 4 × STROBE |

`rst_n` is asynchronous and is synchronised into each domain. In the real
instrument, the controller and the quarters are separate FPGAs. Here they
share one top module, `sim_top`, and the link between them is modelled by
the asynchronous FIFO at each quarter's input. The LVDS transceivers, SD
cards, USB chip and potentiometers are outside the top. Their signals are
ports. Bidirectional lines are split into `_o`, `_oe` and `_i`.

## Departures and own choices

The published description of the simulator fixes only some of these numbers:
- **From the published design:** the 20 ns step, 32-bit events, 12-bit amplitudes,
  32 channels and 13 registers per ASIC, the five injection conditions, two
  ASICs per ADC, four groups per quarter, eight temperature simulators with
  three 8-bit potentiometers each, two SD cards on a 4-bit bus at 50 MHz,
  and the 60/50 MHz clock split.
- **Chosen here:**
  - the event bit layout;
  - the link frame and the register map (the widths and addresses of the
    real chip are not reproduced);
  - the ADC framing;
  - the queue depth and prefill;
  - the command set;
  - the potentiometer I2C format;
  - the even/odd byte split across the cards;
  - the quarter clock.
- **Temperature table:** it is loaded at run time because its values are
  not available.
- **Analogue chain:** the analogue settings registers are stored but do
  nothing.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Example, run from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl rtl/caliste_pkg.sv tb/tb_sim_top.sv \
  --top-module tb_sim_top -Mdir obj_sim_top
obj_sim_top/Vtb_sim_top
```

`tb_sim_top` runs the whole design at its default parameters in about
6 simulated ms, which takes a few seconds of wall time. The run goes as
follows:
1. A USB chip model loads two temperature-table entries.
2. It uploads an 8 KiB, 2048-event sequence to two SD card models, then
   starts the replay.
3. Sixteen IDPU link models answer every TRIG by reading both ASICs and the
   ADC.
4. The logged hits are compared with the hits expected from the sequence:
   the largest amplitude per pixel of each burst, and nothing from
   unpowered quarter 3.

It also checks:
- the potentiometer settings;
- the ASIC temperature read back over the link;
- the SEU output;
- a host-driven test-pulse injection;
- the STATUS event count;
- a second replay stopped half-way with STOP.

Each mechanism must occur at least once:
- multi-hit readouts;
- lower-amplitude rejection;
- drops for the unpowered quarter;
- dummy events;
- prefill;
- SD clock stop;
- I2C updates.

`tb_sim_top_rate` also runs at the default parameters and takes about 10
seconds. It replays a 4864-event sequence:
- 4096 detector hits at 648,000 events/s. That is above the 32 × 20,000
  events/s a full detector plane must sustain.
- Then a burst of 768 events on consecutive 20 ns steps.

It checks that:
- every event leaves on its exact step;
- the queue never runs dry;
- every hit is read back.

The block testbenches (`tb_<module>`) cover each module on its own. The
helper models are `idpu_link_bfm`, `usb_chip_model`, `sd_card_model`,
`storage_model` and `i2c_pot_model`.
