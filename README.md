# OBDT-theta: streaming TDC and readout for 228 drift-tube channels

The CMS muon drift-tube chambers are read out, in the high-luminosity LHC era,
without any trigger selection on the detector: every rising edge on every wire
is time-stamped and streamed out over optical links, and the trigger and event
building happen in the counting room. The OBDT-theta board does this for the
228 wires of the θ superlayer of a chamber. Its FPGA measures each edge with
0.78 ns bins, packs the measurements into 25-bit hit words and funnels them
into the payload of up to four 10.24 Gb/s uplinks, dropping only hits that
would arrive too late to be useful.

This repository holds synthesizable SystemVerilog for that digital part: the
time-to-digital converter (TDC), the orbit-synchronous bunch-crossing counter,
the readout funnel and link-frame builder, the calibration testpulse
scheduler, the I2C masters and a register file. It also holds the board's
always-on protection logic, which sits beside the FPGA design. It does not
hold the link encoder and serializers, which come from the lpGBT protocol
firmware, or any of the ASICs and analog parts.

## How a time is measured

Every input passes through its own deserializer clocked at 640 MHz. It
samples on both clock edges, so it takes one sample every 0.78 ns and 32
samples per 25 ns LHC bunch crossing (`deser_ddr`). A shared phase counter in
the 640 MHz domain marks one cycle in 16. At that cycle every channel hands
the last 32 samples over as one word, bit 0 the earliest. The word stays
stable for 25 ns, and the 40 MHz domain takes it at its next rising edge.
`clk40` and `clk640` must come from the same PLL.

### Locking the sample window to the 40 MHz clock

Which 32 samples form a word must not depend on when a reset was released.
Otherwise a power cycle or a clock loss would move every time stamp by a few
bins. `tdc_core` therefore does not let the phase counter free-run from
reset. A flag in the 40 MHz domain toggles on every clock edge. The 640 MHz
domain sees it through two registers, and on each change it forces the
phase counter to `SYNC_PHASE` (10). The word then changes about 8 fast
cycles before and 8 after each 40 MHz edge, as far as possible from both.
It is in the same place after every reset. `tb_tdc_validation` resets both
domains at twelve different phases and checks that the same signal gets the
same time stamp every time. With the counter free-running from reset, that
check fails.

In the 40 MHz domain (`tdc_channel`), a rising edge is a 0→1 step between
neighbouring samples. The step into sample 0 is judged against the last
sample of the previous word, so an edge on a word boundary is seen exactly
once. The index of the first rising edge in the word is the **fine time**
(5 bits). The value of the bunch-crossing counter is the **coarse time**
(12 bits). Together with the channel number (8 bits) they form the 25-bit hit
word:

| bits  | field  | meaning                                    |
|-------|--------|--------------------------------------------|
| 24:17 | ch     | channel 0..227 (255 marks an empty slot)   |
| 16:5  | coarse | bunch crossing 0..3563 within the orbit    |
| 4:0   | fine   | 0.78 ns bin within the crossing            |

A channel gives at most one hit per 25 ns. A second rising edge in the same
word is not encoded. It is counted instead (`extra_edge`, register 0x13).
Drift-tube front-end pulses are up to 150 ns wide, so this only matters for
noise.

The full time stamp, `coarse*32 + fine`, differs from the true edge time by a
constant number of bins. That constant comes from the pipeline (deserializer
hand-over, 40 MHz register, encoder register). Like cable and wire delays, it
is removed by the chamber's timing calibration. The end-to-end testbench
checks this property directly: for thousands of random pulses on all
channels, the time stamp minus the sample index of the edge is the same
number, modulo one orbit.

### Coarse time and BC0

`bx_counter` counts bunch crossings from 0 to 3563 and then wraps, which
keeps it in step with the 3564-crossing LHC orbit rather than its natural
4096. BC0, the marker of the orbit start, comes either from the timing system
(`bc0_ext`) or from an internal generator (register 0x01 bit 0). The crossing
that carries BC0 is numbered `bc0_offset` (register 0x03, default 0). An
external BC0 that does not fall where the counter expects it realigns the
counter and raises `bc0_err`, which is counted in register 0x11. The first
BC0 after leaving the internal mode counts as such an error. The internal
generator fires in the first cycle after reset and then every 3564 cycles,
matching the counter's own wrap, so switching to internal BC0 does not move
the time stamps.

## Readout: funnel, buffers and the latency cut

Physics hits are random, and nothing forbids all 228 channels from firing in
the same crossing. The readout (`readout`) therefore stores hits close to the
channels and funnels them into the output frames:

```
228 channels ──► 32 groups (channel c → group c mod 32, 7 or 8 channels each)
  group:  per-channel FIFO (4) ─► round-robin arbiter, 1 hit/cycle ─► slot buffer (16)
32 slot buffers ──► 4 links x 8 slots ──► frame_packer per link, one frame per 25 ns
```

The mapping is interleaved: neighbouring wires, which one muon tends to hit
together, end up in different slots and are sent in the same frame.

Each link frame is 202 bits, the user payload of an lpGBT-protocol uplink
frame with the stronger FEC12 coding (about 8.1 Gb/s at 40.078 MHz). Every 25
ns, `frame_packer` takes at most one hit from each of its 8 slot buffers:

| bits            | content                                              |
|-----------------|------------------------------------------------------|
| 25k+24 : 25k    | slot k, k = 0..7: a hit word, or channel 255 if empty |
| 200             | a late hit was discarded in this frame               |
| 201             | this frame was built in the BC0 crossing             |

**Latency cut.** A hit is useful downstream only if it arrives within a bounded
time. Before sending a hit, the packer computes its age: the current crossing
minus the hit's coarse time, modulo 3564. If the age exceeds `max_latency`
(register 0x02, default 128 crossings = 3.2 µs), the hit is removed and not
sent, and the link's late counter (0x18+l) is incremented. A hit that meets a
full channel FIFO is lost; such losses are counted in register 0x12.

**Capacity.** Four links × 8 slots carry 32 hits per crossing (1.28 G hits/s).
The worst sustained input named for the board is 1 MHz per channel on all
channels: 228 M hits/s, or 5.7 hits per crossing. Per slot that is 7–8
channels × 1 MHz = 8 M hits/s against 40 M hits/s. Expected HL-LHC rates are
about 50 kHz per channel. A burst of all 228 channels empties in 8 frames;
in simulation the last hit leaves 10 cycles after the edge.

A disabled link (register 0x01 bits 7:4) stops reading its slot buffers. Hits
then pile up, age past the threshold and are discarded when the link
returns. The end-to-end test uses this to exercise both the latency cut and
the overflow.

## Calibration testpulse

For timing calibration, an external testpulse board injects pulses into the
front-end boards, 32 channels per pulse output. Each front-end then answers
as if a wire had been hit. Repeated many times, the spread of the time
stamps shows the jitter of the chain and their mean gives its delay.
`testpulse_gen` issues the request always at the same crossing of the orbit
(register 0x04), so that the responses can be compared from pulse to pulse.
The request comes either periodically, every N orbits (0x05, periodic mode
bit 8 of 0x01), or once after a write to 0x07 or a fast-command pulse on
`fc_testpulse`. It lasts `width` crossings (0x06, default 4 = 100 ns). The
end-to-end test loops the request back into 32 channels and checks that all
32 report the same time stamp.

## Slow control

`config_regs` is the register file. It uses a plain synchronous bus (`wr`,
`rd`, `addr`, `wdata`; read data one cycle after `rd`), to be driven by the
slow-control link decoder. The full map is in the header of
`rtl/config_regs.sv`. In short: 0x00 identifier, 0x01 control, 0x02 latency
threshold, 0x03 BC0 number, 0x04–0x07 testpulse, 0x10–0x1D counters, and
0x20–0x29 I2C command and status for buses 0–4.

`i2c_master` has five instances. Buses 0 to 3 are the external buses
(front-end boards, pressure ADCs, alignment, RPC slow control). Bus 4 is the
on-board bus, which controls the lpGBT, the GBT-SCA and the VTRX+ optical
module that carries the data. Each master executes one command at a
time: START (or repeated start), STOP, WRITE byte (the acknowledge is
returned), or READ byte (ack or nack is sent). It runs at 100 kHz from 40 MHz
(`CLK_DIV` = 100 clock cycles per quarter bit) and honours clock stretching.
It has no multi-master arbitration.

## Protection logic

`safety_logic` models the board's always-on protection, which is not part of
the FPGA and keeps working when everything else is off. Comparator flags for
over-temperature (two sensors), 5 V over-voltage and 5 V over-current set a
fault latch. The latch removes the regulator enable until `safety_clear_n`.
An input over-voltage on the 3 V rail opens the input MOSFET directly, only
while it lasts. An optocoupler input turns the regulators off on request.
`alarm` reports any active or latched fault. The logic has no clock, so the
fault memory is a level-sensitive latch, and synthesis reports it as a latch
on purpose.

## What is outside this RTL

- **lpGBT-protocol uplink encoder and 10.24 Gb/s transceivers.** The frames
  leave on `frames[l]`/`frame_valid[l]`. Header, scrambler and Reed–Solomon
  FEC5/FEC12 coding follow the lpGBT protocol firmware and are not written
  here.
- **Slow-control links** (primary through the lpGBT ASIC, and a secondary
  link with a custom 2.56 Gb/s receiver in the FPGA) and the **fast-command
  decoder**. They would drive the register bus, `bc0_ext` and
  `fc_testpulse`.
- **ASICs and analog parts**: lpGBT, GBT-SCA (ADCs, DAC, JTAG/SPI), VTRX+
  optical modules, regulators, temperature sensors and comparators, water
  leak sensor, and the testpulse board's pulse drivers.
- **Front-end signal masks.** The board may later drive masks into the
  front-end boards to make artificial hit patterns. No format is defined for
  them yet, so they are not built.

## Where this design makes its own choices

The board description fixes: 228 channels, 640 MHz DDR sampling with 0.78 ns
bins and 5 fine bits, a 12-bit coarse counter wrapping at 3564, BC0 from
outside or generated inside, the 25-bit hit word, rising-edge measurement,
funnelling of all channels into lpGBT-protocol links, a latency limit on hit
delivery, up to four external I2C buses, FPGA testpulse generation and the
behaviour of the protection logic.

These are this design's own choices:

- The field order of the hit word.
- Five I2C buses: the four external ones and one shared by the on-board
  devices.
- Locking the sample window to the 40 MHz clock.
- One hit per channel per 25 ns.
- The shared load strobe.
- The BC0 offset and error flag.
- The grouping, FIFO depths and round-robin funnel.
- The frame layout, idle code and flags. The frame size is that of the
  FEC12 coding. The lpGBT protocol also has a lighter FEC5 coding with a
  larger payload, which is not supported here.
- Four data links. The published figures are ~8.1 Gb/s per link and
  ~32.3 Gb/s in total. Up to five data links are also mentioned, and a
  payload of at least 48 Gb/s. `readout` takes the link count as a
  parameter. `tb_readout` also runs a five-link instance (40 groups of 5 or
  6 channels), which clears a 228-channel burst in 6 frames.
- The latency threshold default of 128 crossings.
- The register map and bus.
- The I2C command interface and bus speed.
- The orbit-synchronous testpulse scheduling.
- Latching of the regulator faults.

The deserializer is written as generic logic. On the FPGA the I/O
deserializer block does the same job.

## Verification

Every block has a self-checking testbench in `tb/` that compares against an
independent reference, for example a bit-by-bit edge scan, a reference
counter, a behavioural I2C slave, or queues of expected hits. Each testbench
ends with a line `TB_RESULT checks=N failures=M`. `tb_obdt_theta_top` runs
the whole design at its default size. It sends random pulses on all 228
channels over more than one orbit, then a 228-channel burst, double edges, a
looped-back testpulse (fast command and periodic), an I2C command, a safety
trip, late hits, a FIFO overflow and a switch to external BC0. It checks that
every pulse is measured exactly once with a constant time offset, and that
each of those mechanisms actually occurred. It takes well under a minute.

`tb_tdc_validation` repeats the laboratory checks of the TDC on 16
channels:

- **Code density.** Pulses uncorrelated with the clocks must fill the 32
  fine bins evenly. The worst DNL is about 0.1 LSB, and that comes from
  statistics only.
- **Delay scan.** A signal's delay is stepped in 50 ps steps. Its time stamp
  must repeat exactly and advance by one bin per sampling edge crossed.
- **Repeatability after resets.** As described above.
- **Clock duty cycle.** The code density test is repeated with the 640 MHz
  clock high for 55 % of its period. Half of the samples are taken on the
  falling edge, which now comes 78 ps late. So even and odd bins alternate
  between 859 and 703 ps wide, and their populations differ by 0.2 of the
  mean (0.207 in simulation; at 50 % duty the difference is 0.01). A
  clock duty cycle that is not exactly 50 % shows up on the hardware in the
  same way: as an odd/even pattern in the DNL.

A two-state simulation cannot show metastability. That remains a property
of the hardware.

The simulation clock period for 640 MHz is 1.562 ns (whole picoseconds), and
the 40 MHz clock is derived as exactly 16 of those periods.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/obdt_pkg.sv \
    tb/tb_obdt_theta_top.sv --top-module tb_obdt_theta_top
./obj_dir/Vtb_obdt_theta_top
```

Replace the testbench name to run a single block's test, for example
`tb_readout`, `tb_tdc_core` or `tb_i2c_master`. `rtl/obdt_pkg.sv` holds the
shared constants (channel count, widths, orbit length, frame size) and the
`hit_t` type. Changing `N_CH`, `N_LINKS` or `SLOTS` there resizes the
design. The readout assigns channels to groups from these numbers.

## Files

- `rtl/obdt_theta_top.sv`: top level.
- `rtl/tdc_core.sv`, `rtl/deser_ddr.sv`, `rtl/tdc_channel.sv`: the TDC.
- `rtl/bx_counter.sv`: coarse time and BC0.
- `rtl/readout.sv`, `rtl/hit_group.sv`, `rtl/frame_packer.sv`: the readout.
- `rtl/sync_fifo.sv`, `rtl/rr_arbiter.sv`: helpers.
- `rtl/testpulse_gen.sv`, `rtl/i2c_master.sv`, `rtl/config_regs.sv`:
  control.
- `rtl/safety_logic.sv`: board protection.
- `tb/tb_<module>.sv`: one testbench per module.
- `tb/tb_tdc_validation.sv`: code density, delay scan, reset
  repeatability and clock duty cycle.
