# L-bus: a quiet slow-controls backplane

Slow controls for sensitive analog electronics used to run a separate wire from a VME I/O card
to the analog crate for every bit and every control voltage. Those long cable bundles pick up
noise and make ground loops. The L-bus replaces them with a small bus inside each eurocrate. One
bus controller per crate talks to the host computer over a single link. It reaches the boards in
two ways:

* a **digital bus** on P2: a slow, deliberately soft-edged, memory-mapped 16-bit bus with
  multiplexed address and data;
* an **analog bus** on P1: 16 readback lines, which the controller samples with its own ADC,
  and 8 control-voltage lines, which it drives from its own DACs.

Each readback line is shared by the channels of one board. A 4-bit analog address (AA0-AA3) on
the backplane tells every board which of its 16 channels to put on its line. The controller scans
16 lines x 16 addresses = 256 channels, each at 16 Hz, locked to GPS time.

This repository holds synthesizable SystemVerilog for the digital part of one crate: the
controller, the backplane wiring, the example user board interface and the adapter that puts
older eurocards on the bus, with a self-checking
testbench for every module. The crate's supply monitor is included as a behavioural model.

## The crate at a glance

```
   host link (outside)                          analog backplane (P1)
          |                                AA0-3   readback lines  control lines
   +------+---------------------- lbus_controller ----------------------------+
   | processor register bus (8 bit)                                           |
   |   lbus_ctrl_decode -> lbus_addr_latch, lbus_data_latch, lbus_bus_logic   |
   |                      lbus_dac_regs (8 x 16-bit codes)                    |
   |   lbus_clock (2^24 Hz timebase) -> lbus_aa_counter, lbus_adc_seq         |
   +---------------------------------+----------------------------------------+
                                     | AD0-15, ADDR, WR, CLK, RESET / ACK, ERR
                              lbus_backplane (digital bus, P2)
                                     |
   lbus_user_board x (NUM_BOARDS - NUM_ADAPTERS), lbus_migration_adapter x NUM_ADAPTERS
          (NUM_BOARDS = 20 for a full-width crate of 21 slots; NUM_ADAPTERS = 1)
```

`lbus_top` is this crate. Some parts stay outside the RTL, and the top brings their
signals out as ports:

* the processor that runs the host link (USB or ethernet), on `up_*`;
* the readback MUX and ADC, on `mux_sel`, `adc_convert`, `adc_drdy` and `adc_data`;
* the control DACs, on `dac_code` and `dac_load`;
* each board's own converters, on `hires_code` and `lores_code`;
* each board's binary I/O, on `bin_in` and `bin_out`;
* the outputs of each migration adapter, on `mig_bo` and `mig_dac` (its inputs are `bin_in` of
  its slot);
* the supply rails, as real voltages on `v_*`, watched by `lbus_power_monitor`.

## The digital bus cycle

This is the core of the design. All strobes are low-active and idle high. `lbus_bus_logic`
runs one cycle per `start`, on the controller clock of 2^24 Hz (59.6 ns). Each minimum time is
a parameter in ns and is rounded up to whole clock cycles:

| interval | meaning | minimum | cycles (ns) |
|---|---|---|---|
| t_ADDR | ADDR low, address on AD | 200 ns | 4 (238) |
| t_AH | address held after ADDR rises | 50 ns | 1 (60) |
| t_DS | write data and WR low before CLK falls | 50 ns | 1 (60) |
| t_WR / t_RD | CLK low | 200 ns | 4 (238) |
| t_DH | data and WR held after CLK rises | 50 ns | 1 (60) |
| t_CD | CLK falls after ADDR rises (read) | 50 ns | 1 turn-around cycle with AD released |
| t_CA | next ADDR after CLK rises | 50 ns | 1 (60) |

A **write** goes ADDR, address hold, data setup, CLK low, data hold, gap. It is busy for 12
cycles. A **read** goes ADDR, address hold, bus release, CLK low, gap. It is busy for 11 cycles.
During CLK low the selected board drives AD. The controller samples AD and ACK in the last
cycle of CLK low. One bus access takes about 0.7 us, so the bus moves about 2.8 MB/s. The
requirement was more than 10 kB/s; the bus is slow on purpose, for low noise.

**ACK never adds wait states.** Every board must finish within the fixed times. ACK only tells
the controller that some board recognised the address. The status bit `ack_ok` reports it, and
this is how the host learns whether an access succeeded. An empty address reads as all ones,
because the bus has pull-ups.

**ERR** is an open-collector line. A board pulls it low after power-up, so that the host reloads
that board. The controller synchronises ERR and latches it. The host clears the latch with a
register write, after it has reloaded the boards. A clear has no effect while a board still
holds ERR low.

**RESET** is driven low while the crate's reset button is pressed, or while the host sets the
reset bit. **Stand-by** refuses new cycles, so the bus stays completely still. A refused cycle
ends at once with `ack_ok` low. Stand-by stops only the digital bus. The analog scan keeps
running.

## The user board interface

`lbus_user_board` follows the example board built from TTL/HCT parts. It has **no clock**.
Every register in it is clocked by an edge of a bus strobe, as the chips are:

1. **Address latch.** The rising edge of ADDR latches AD0-15 (a '574 octal flip-flop).
2. **Board select.** A15..A8 of the latched address are compared with an 8-bit switch (a '520
   comparator). A board that needs more than 256 bytes compares fewer bits (`SEL_BITS`).
3. **Strobes.** `sel` and CLK low give ACK. With WR high they form the read strobe, which also
   turns the AD transceivers toward the bus. With WR low they form the write strobe.
4. **Region decode.** A5..A3 choose one of eight 8-byte regions (two '138 decoders, one gated
   by the read strobe and one by the write strobe):

| offset | region | access |
|---|---|---|
| 0x00 | binary output latch, 16 bits (`bin_out`) | write, read back |
| 0x08 | binary inputs, 16 bits (`bin_in`) | read |
| 0x10 | 16-bit DAC latch (`hires_code`) | write, read back |
| 0x18, 0x1A, 0x1C, 0x1E | quad 12-bit DAC, channel = A2..A1 (`lores_code`) | write, read back (AD11..AD0) |
| 0x20-0x3F | unused | acknowledged, reads ones |

A write register loads on the rising edge of its write strobe. That edge comes when CLK rises,
and AD and WR are still held then (t_DH). While `pwr_up` is high, the board pulls ERR low and
clears its latches. `pwr_up` stands for the board's power-up RC circuit. Each board's readback
multiplexer is analog, so it is not in the RTL. It decodes `aa` directly.

## Migration adapter

Older eurocards expect their binary and analog I/O on individual connector pins. The migration
adapter sits between such a card and the L-bus and gives it, through the digital bus, up to 32
binary outputs, 16 binary inputs and up to 8 DACs. Its 16-channel readback multiplexer is analog
and follows AA directly, so it is not in the RTL. `lbus_migration_adapter` has the same
strobe-clocked bus interface as the user board: address latch, switch compare on A15..A8, ACK,
and ERR on power-up. Its register layout is:

| offset | register | access |
|---|---|---|
| 0x00 | binary outputs BO15..BO0 | write, read back |
| 0x02 | binary outputs BO31..BO16 (if `NUM_BO` > 16) | write, read back |
| 0x08 | binary inputs BI15..BI0 | read |
| 0x10 + 2n | DAC n, 16-bit code, n = 0..`NUM_DACS`-1 | write, read back |
| anything else | unused | acknowledged, writes ignored, reads ones |

`NUM_BO` (16 to 32) and `NUM_DACS` (0 to 8) size the card. In `lbus_top` the last
`NUM_ADAPTERS` slots hold adapters. Their `bin_out`, `hires_code` and `lores_code` are zero.

## Supply monitor

The crate post-regulates its own supplies, and every rail is checked against a window.
`lbus_power_monitor` is a behavioural model of those window comparators. It takes the rail
voltages as `real` inputs, in volts, and is not meant for synthesis. Negative rails are compared
by magnitude:

| rails | window |
|---|---|
| +5 V digital, +5 V and -5 V analog | 4.75 to 5.25 V |
| +15 V, -15 V | 14.25 to 15.75 V |
| +10 V, -10 V (central supply input) | 9 to 12 V |
| +24 V, -24 V (raw) | 22 to 28 V |

`fail_mask` shows which rails are out, and any failure pulls the ERR line. The controller
latches it exactly like a board's request, so a supply fault reaches the host as a latched
`err` status bit. The model has no hysteresis or delay.

## Analog readback scan and timebase

The controller clock is a 2^24 Hz oscillator locked to the timing fiber, so a 24-bit counter in
`lbus_clock` wraps exactly once a second. A decoded 1 pps pulse restarts the counter. Its fields
give:

* `sample_tick` every 4096 cycles, so 4096 samples/s;
* `aa_tick` every 16 samples (256 Hz);
* `frame_tick` every 256 samples (16 Hz);
* the processor heartbeat `irq`, once per sample.

At every sample tick, `lbus_adc_seq` starts a conversion of the line the MUX has been sitting on
for the past sample period. It records that line and the current AA as the sample's tag, then
steps the MUX. The MUX line therefore changes fastest. AA (`lbus_aa_counter`) changes once per
16 samples and runs through all 16 values in 1/16 s. This gives each board's multiplexer 16
sample periods to settle. A finished conversion (`adc_drdy`) is latched with its tag. Reading
the sample's high byte clears its `valid` flag.

## Processor register map

The host-side processor reaches the controller through 8-bit registers (`lbus_pkg::up_reg_e`).
`up_wr` writes at the clock edge, and `up_rdata` follows `up_adr` combinationally.

| addr | register |
|---|---|
| 0x00/0x01 | bus address, low/high byte (bit 0 is always 0: the bus word is 16 bits) |
| 0x02/0x03 | bus data, low/high byte (write data, or the datum captured by a read) |
| 0x04 | write: bit0 start, bit1 1=write, 0=read. Read: status {adc_valid[5], reset[4], standby[3], err[2], ack_ok[1], busy[0]} |
| 0x05 | bit0 stand-by, bit1 master reset; writing bit2 = 1 clears the ERR latch |
| 0x06/0x07 | last ADC sample, low/high byte (reading 0x07 clears adc_valid) |
| 0x08 | tag of the last sample: {AA[3:0], line[3:0]} |
| 0x09 | {frame in second[3:0], current AA[3:0]} |
| 0x10-0x1F | control DAC n: low byte at 0x10+2n (staged), high byte at 0x11+2n (loads the channel, pulses `dac_load[n]`) |

A bus access: write the address, and for a write also the data. Then write 0x04 with 1 (read)
or 3 (write). Poll 0x04 until `busy` clears, check `ack_ok`, and after a read fetch the data
from 0x02/0x03.

## How far it follows the L-bus proposal

These parts follow the proposal:

* the bus signals and bus timing;
* the ACK rule, the latched ERR line, RESET and stand-by;
* the 16-bit address with the board number in the top byte;
* the user board's chain of address latch, comparator, decoders and strobes, and its DAC
  on region 3;
* the migration adapter's channel counts (16-32 outputs, 16 inputs, up to 8 DACs);
* 16 readback lines, 4-bit AA, 256 channels at 16 Hz, 4096 Hz ADC;
* 8 control lines with 16-bit DACs;
* the 2^24 Hz clock with 1 pps;
* the supply windows and their report on ERR;
* 21 slots.

This design's own choices are:

* the processor register map and the byte order of the DAC writes;
* the cycle-based sequencer, with ACK and data sampled in the last CLK-low cycle;
* a turn-around cycle before CLK falls on a read;
* the ADC handshake and its 16-bit width;
* the scan order (MUX line fastest, AA slow), chosen so that a full AA cycle takes 1/16 s;
* an IRQ per sample;
* pull-ups on AD, so an undriven bus reads all ones;
* board latches that capture on the strobe's trailing edge instead of being transparent;
* `pwr_up` as the board's power-up input;
* which rails the supply monitor watches, and its lack of hysteresis;
* the adapter's register layout, its 16-bit DACs, and one adapter in the last slot.

The proposal lists board base addresses from 0x0400 but also reserves 0x0000-0x3FFF for the
crate controller. The boards here decode whatever their switch holds. The tests use 0x40 and up.

Not modelled: the host link and its protocol, the 1 pps decoding, the regulators and all other
analog circuitry.

## Simulating

All modules are in `rtl/`, one per file. `lbus_pkg.sv` must be compiled first. Every testbench
in `tb/` checks itself and ends with a line `TB_RESULT checks=N failures=M`. For example, the
full crate at default parameters:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lbus_top \
    rtl/lbus_pkg.sv $(ls rtl/*.sv | grep -v lbus_pkg) tb/tb_lbus_top.sv -o sim
./obj_dir/sim
```

`tb_lbus_top` runs 19 boards and one adapter at 2^24 Hz for about 1.1 million cycles, a few
seconds. It loads and reads back every board and the adapter, follows a complete 256-channel
frame, and checks its 16 Hz period. It also power-cycles one board and reloads it after ERR. It
lets +15 V sag, tries an empty slot, stand-by, the reset button and the 1 pps restart, and it
counts that each of these mechanisms happened.
`tb_lbus_workloads` fills a crate with migration adapters and loads the existing boards of four
auxiliary crates from a survey of installed slow-control hardware (PSL, IOO, LSC, ASC), driving
every binary and analog output each board has. The first three fit. In ASC, each of the seven
wavefront-sensor demodulators has 13 analog outputs against an adapter's 8 DACs, so 35 outputs
have no DAC; the crate's 8 control lines cannot cover them either. A fifth survey crate (SUS) has
44 eurocards and needs at least three crates, so it is not simulated.
`tb_lbus_bus_logic` measures every bus interval in ns against the minimum times above.
`tb_lbus_user_board` drives the board from a behavioural bus master with nanosecond delays.
`tb_lbus_clock` and `tb_lbus_controller` shorten the sample period through `CLK_HZ`.

The simulator used is two-state, so every register that is read is reset. The boards are reset
through `pwr_up`, which must rise once.
