# Hardware for precise time and frequency distribution

Distributing time over an ordinary network is only as good as the knowledge of
*when* a packet or pulse actually crossed the wire. Software sees a packet
microseconds after it left, with jitter it cannot account for. The two designs here
take that measurement in hardware:

1. **An IEEE 1588 (PTP) timestamper.** It sits on the MII between an Ethernet PHY
   and a MAC and only listens. A free-running counter is sampled at the
   start-of-frame delimiter of every frame. When the frame turns out to be a PTP
   message that meets the configured criteria, a record with the sampled time is
   handed to the PTP protocol logic above. The record holds the direction,
   messageType, sequenceId and timestamp. The true transmit time of a Sync message
   is what a PTP master later sends in its Follow_Up message.
2. **An interpolating time counter.** This FPGA device time-stamps pulses (PPS,
   one pulse per second) to a fraction of its clock period. A coarse counter gives
   whole reference periods. A tapped delay line, built from the FPGA carry chain,
   measures where inside the period the pulse arrived. A pair of such devices, one
   at each end of a DWDM fibre link, exchanges PPS signals to compare two
   reference clocks that are far apart. The device also has an I2C controller for
   the optical transceivers and the frequency synthesizer on its daughter card.

The two designs do not depend on each other. `time_hw_top` holds both side by
side, each with its own clock and ports.

## Part 1: the PTP timestamper

```
 MII rx ─► mii_framer ─► ptp_analyzer ─► ptp_msg_composer ─┐
                │ sfd ─────────────────────► (capture) ◄───┤── free_counter (ns)
 MII tx ─► mii_framer ─► ptp_analyzer ─► ptp_msg_composer ─┤
                                                           ▼
                                     merge (rx first) ─► output_logic ─► 32-bit stream
```

### When the timestamp is taken

`mii_framer` waits for preamble nibbles `0x5`, followed by the `0xD` nibble that
completes the delimiter byte `0xD5`. The clock in which that nibble is sampled is
the event. `sfd` is high in the following clock, and `ptp_msg_composer` copies the
counter in that clock. The stored time is therefore the counter value one
reference period after the delimiter nibble appeared on the MII. This offset is
the same for every frame. The transmit and receive paths have the same latency,
so the offset cancels in a PTP delay calculation. Subtract one `INC_NS` if
absolute time at the wire is needed.

The counter advances by `INC_NS` per clock, 40 ns for a 25 MHz MII clock (100
Mb/s). To build it for another reference frequency, change `INC_NS`. The MII
signals are taken to be synchronous to the counter clock, so the MII clock is the
reference.

### Which frames are timestamped

Each frame's bytes are parsed by `ptp_analyzer`. The criteria (`cfg`, of type
`ts_pkg::match_cfg_t`) are sampled at the delimiter and held for the whole frame.

| `cfg.layer` | frame must be | PTP header at byte |
|-------------|---------------|--------------------|
| `LAYER_L2`  | EtherType 0x88F7 | 14 |
| `LAYER_L3`  | EtherType 0x0800, IHL 5, protocol UDP, IPv4 destination = `cfg.ip_dst` | 42 |
| `LAYER_L4`  | as L3, and UDP destination port = `cfg.udp_port` | 42 |

Byte numbers count from the first byte after the delimiter. In every mode the PTP
header must also meet four conditions:

- versionPTP is 2.
- The messageType bit is set in `cfg.msg_mask`. The default `0x000F` selects the
  event messages Sync, Delay_Req, Pdelay_Req and Pdelay_Resp.
- domainNumber equals `cfg.domain`, unless `cfg.any_domain` is set.
- The frame is long enough to contain the sequenceId, and the MII reported no error.

The verdict arrives one clock after the end of the frame. VLAN tags and IPv4
options are not parsed: such frames do not match.

### Records and output

A record is a `ts_record_t` of 96 bits:

```
[95] dir (0 rx, 1 tx) | [94:88] 0 | [87:84] messageType | [83:80] 0 | [79:64] sequenceId | [63:0] timestamp (ns)
```

The two channels' records are merged through one slot per channel. When both
channels have a record in the same clock, the receive record goes first and the
transmit record follows one clock later. `output_logic` stores up to
`FIFO_DEPTH` (16) records. It sends each record as three 32-bit words, most
significant word first, on a valid/ready stream, with `out_last` on the third
word. If the consumer stalls long enough, the FIFO fills. Further records are then
dropped and counted in `n_overflow`. The block cannot stall the MII, because it
only listens.

## Part 2: the interpolating time counter

### Coarse and fine time

With a counter alone, an event that is asynchronous to the reference clock is
known only to ±1 period (5 ns at the 200 MHz reference used here). The
interpolator measures the missing fraction. Each hit input drives a chain of
`NTAPS` equal delay elements of delay τ. In an FPGA these are the carry
multiplexers of a slice column. They lie in one row, so their delays are nearly
uniform. On every reference clock edge, the catch register samples all element
outputs at once. If the hit arrived Δ before the edge, the first ⌊Δ/τ⌋ elements
have switched. The captured word is then a thermometer code of that many ones.

```
hit  ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
clk  ‾‾‾|___|‾‾‾|___|‾‾‾|___
           ▲ capturing edge: taps = 0…0111111 (fine = 6)  →  hit ≈ edge − 6τ
```

Each hit is time-stamped as the pair (coarse, fine):

- **coarse** is the coarse counter sampled at the same edge. It counts the
  reference edges before the capturing edge.
- **fine** is produced by `prio_encoder_pipe`: the index of the highest captured
  one, plus one. Taking the highest one, not counting ones, ignores "bubbles".
  These are isolated zeros below the edge that uneven element delays produce.

The event time is `t = edge(coarse) − fine·τ`. The error lies in [0, τ). For two
events, START and STOP:

```
T = (n_STOP − n_START) · T_ref − (f_STOP − f_START) · τ
```

`interval_calc` computes this in picoseconds as a signed 64-bit value. It uses the
nominal τ (`TAU_PS`). The line is not calibrated, so a real carry chain, whose τ
differs from element to element, needs a calibration step that is not part of
this RTL. The result is within ±τ of the true interval, and START and STOP may
fall in the same clock period or even the same clock.

### Constraints on the hit signal

- The line must be longer than one reference period: `NTAPS·τ > T_ref`.
  256 × 25 ps = 6.4 ns > 5 ns. Otherwise some arrival phases cannot be measured.
- A hit is recognised when tap 0 of the settled sample has risen since the
  previous clock. The hit must stay high for at least one reference period plus
  the line length. It must then be low for as long before the next hit. PPS
  pulses are far longer than that.

### Pipeline and latency

| clock | stage |
|-------|-------|
| 0 | edge samples taps and coarse counter (rank 1) |
| 1 | rank 2 (settles a metastable rank-1 bit) |
| 2 | hit detected, code and coarse value held (`catch_register`) |
| 3 | group encoding, 16 groups of 16 taps |
| 4 | group selection, `fine` valid; coarse value delayed to match |
| 5 | interval out / record enters the merge slot |
| 6 | record enters `output_logic` |

Records are `{channel[7:0], fine[15:0], coarse[47:0]}` (72 bits). They are sent
as three 32-bit words with the top 24 bits zero. Channel 0 is START (the local
PPS) and channel 1 is STOP (the PPS received over the link).

### I2C controller

`i2c_master` performs single-register accesses on a command port:

- write: START, device+W, register, data, STOP.
- read: START, device+W, register, repeated START, device+R, data with NACK,
  STOP.

A bit takes four phases of `QDIV` clocks. The default of 500 gives 100 kHz at
200 MHz. A write therefore takes 116·QDIV clocks and a read 156·QDIV. A missing
acknowledge ends the access with STOP and sets `ack_err`. `scl_o` and `sda_o` are
open-drain enables (0 pulls the line low). Clock stretching is not supported. The
register maps of the transceivers and the synthesizer are not part of this
design. The command port is brought out so that a controller can run those
sequences.

## Files

| file | contents |
|------|----------|
| `rtl/ts_pkg.sv` | types and constants of the timestamper |
| `rtl/free_counter.sv` | free-running counter (time base and coarse counter) |
| `rtl/mii_framer.sv`, `rtl/ptp_analyzer.sv`, `rtl/ptp_msg_composer.sv` | timestamper channel |
| `rtl/output_logic.sv` | record FIFO and 32-bit word stream (both designs) |
| `rtl/ptp_timestamper.sv` | timestamper: counter, two channels, merge, output |
| `rtl/tdl_carry_chain.sv` | **behavioural model** of the carry-chain delay line |
| `rtl/catch_register.sv`, `rtl/prio_encoder_pipe.sv`, `rtl/interval_calc.sv` | interpolator |
| `rtl/i2c_master.sv` | I2C controller |
| `rtl/time_meas_device.sv` | interpolating time counter |
| `rtl/time_hw_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_frame_pkg.sv`, `tb/i2c_slave_model.sv` | frame builder, I2C register device model |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself (each
has a watchdog). The simulator has two states, so all state is reset. Example,
with the whole design at its default sizes:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/ts_pkg.sv tb/tb_frame_pkg.sv tb/tb_time_hw_top.sv --top-module tb_time_hw_top
./obj_dir/Vtb_time_hw_top
```

For another block, replace the testbench name. The timestamper testbenches need
`rtl/ts_pkg.sv` and `tb/tb_frame_pkg.sv` listed first. Every testbench finishes
in a few seconds.

`tb_time_hw_top` runs frames on both MII directions under all three layer
modes. It also runs 30 START/STOP pairs (some in the same clock period), I2C
write, read-back and absent-device accesses, and a stalled timestamp stream.
It counts each of these events and fails if one never happened. Every
timestamp record is compared with the expected value. Every interval is checked
to lie within ±τ of the true one.

## How far to trust it, and where it departs

- **The delay line is a model.** `tdl_carry_chain` uses transport delays and is
  not synthesizable. On an FPGA it must be replaced by carry primitives placed in
  one column, with the catch flip-flops in the same slices. Its ports (`hit`,
  `taps`) stay the same. τ = 25 ps and 256 taps are assumed values.
- **No calibration of τ.** Intervals use the nominal element delay. Real carry
  chains need a code-density calibration to reach τ-level accuracy.
- **Clocking is simplified.** The timestamper's MII is taken as synchronous to
  its counter clock. In the top, the two designs have separate clocks but one
  reset. That reset's release must be synchronised to each clock outside the top.
- **Choices made here, not fixed by the underlying design:**
  - counter widths (64-bit ns, 48-bit periods);
  - record formats and the output FIFO/stream interface;
  - the exact fields compared for each layer;
  - the merge order of the channels;
  - the two-rank catch register;
  - the encoder's group size and pipelining;
  - the I2C access format and speed.
- **Not parsed:** VLAN tags, IPv4 options, IPv6. The frame check sequence is not
  checked; a frame with an MII error is not timestamped.
