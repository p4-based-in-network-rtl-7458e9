# One-way packet delay with in-band telemetry on FPGA NICs

This is RTL for a small in-band network telemetry (INT) scheme. It measures the
one-way delay of packets between two FPGA network cards. The first FPGA, the
ingress node, writes its current time into every packet it forwards. The
second FPGA, the egress node, reads that time when the packet arrives and
subtracts it from its own clock. That difference is the one-way delay. The
egress node then removes what the ingress node added, so the packet continues
exactly as it was sent. Ordinary switches and NICs between or after the two
nodes see only a frame with an unusual EtherType.

The scheme does not use the full INT specification. It uses one fixed
10-byte header placed right after the Ethernet header. The measurement is
only as accurate as the agreement between the two nodes' clocks. This
design gives each clock a load port, which is where a clock-synchronisation
agent such as a PTP client would connect. That agent is not part of this
design.

## The INT header

Stamped frame, byte offsets from the start of the frame:

| bytes  | content                                                        |
|--------|----------------------------------------------------------------|
| 0-5    | destination MAC (unchanged)                                    |
| 6-11   | source MAC (unchanged)                                         |
| 12-13  | EtherType `0x88B6` (an EtherType reserved for experiments)     |
| 14-21  | 64-bit ingress timestamp, most significant byte first          |
| 22-23  | the frame's original EtherType, e.g. `0x0800` for IPv4         |
| 24-    | original network-layer header and payload                      |

The frame grows by exactly 10 bytes. The packet-length metadata that travels
with the frame is increased by 10 at the ingress node and reduced by 10 at the
egress node.

Example: an 89-byte UDP/IPv4 frame stamped at time `0x0000007fd1547f28`
leaves the ingress node as 99 bytes. After the MAC addresses it reads
`88b6 0000 007f d154 7f28 0800 4503 004b ...`.

## Stream format

Both stages use a valid/ready stream with AXI4-Stream rules. The types are in
`rtl/int_pkg.sv`:

- `axis_beat_t.data` holds 64 bytes per beat (512 bits). Byte 0 of the frame
  is in `data[0]`, which is bits 7:0.
- `keep` is a per-byte mask. It is contiguous from byte 0, and every beat
  except the last of a packet is full.
- `last` marks the final beat of a packet.
- `size` is the whole packet length in bytes (16 bits). It is valid on every
  beat.

The 64-byte width, the 16-bit length field and the keep/last convention are
this design's choices. They are the usual shape of a 100G NIC datapath. The
width is a package constant (`BEAT_BYTES`). The egress stage needs the whole
Ethernet and INT header (24 bytes) in the first beat, so the width must be at
least 24 bytes. Only 64 has been simulated.

## Header insertion (`int_header_insert`)

Inserting 10 bytes at offset 14 moves every later byte 10 places further
along. The stage keeps a 10-byte carry register:

- **First beat of a packet.** The output is bytes 0-11 of the input, then the
  INT EtherType, the timestamp and the original EtherType, then input bytes
  14-53. Input bytes 54-63 go into the carry. The timestamp is the clock value
  in the cycle this beat is accepted.
- **Later beats.** The output is the 10 carried bytes followed by input bytes
  0-53. Input bytes 54-63 become the new carry.
- **Tail.** If the last input beat holds more than 54 bytes, its tail no longer
  fits in one output beat. The stage then sends one extra beat with the
  leftover bytes. It accepts no input during that cycle.

The output is a single register stage. A beat accepted in cycle t is on
`m_*` in cycle t+1. The stage passes one beat per cycle, except for the extra
beat. A pulse on `inserted` marks each stamped packet, and a pulse on
`extra_beat` marks each extra beat.

## Header removal and delay (`int_header_remove`)

A packet counts as stamped when bytes 12-13 are `0x88B6` and its first beat
holds at least 24 bytes. Every other packet passes through unchanged, and the
stage pulses `passed`.

For a stamped packet the stage does three things in the cycle its first beat
is accepted:

- It samples the local clock (`ts_egress`).
- It takes the carried timestamp from bytes 14-21 (`ts_ingress`).
- It computes `delay = ts_egress - ts_ingress` modulo 2^64. The result is
  correct even if a clock wrapped between stamping and arrival.

The report appears one cycle later with a one-cycle `delay_valid` pulse. The
values stay on the ports until the next report.

Removing 10 bytes pulls every later byte 10 places forward. The datapath is
the mirror image of the insertion stage:

- **First beat.** The stage builds a beat without the header, with the
  original EtherType written back to bytes 12-13, and holds it. It produces no
  output yet, unless this is also the last beat.
- **Later beats.** Each output beat is the 54 held bytes followed by the first
  10 bytes of the new input beat. Input bytes 10-63 are held for the next beat.
- **Tail.** If the last input beat holds more than 10 bytes, the held
  remainder leaves in one more beat, and the stage pulses `flush_beat`. In
  that cycle the stage still accepts the first beat of a following stamped
  packet with more than one beat. That beat is only held, so it does not need
  the output register. Any other input waits one cycle.

## Throughput and what it means for the measurement

Neither stage can always run at one input beat per cycle:

- The insertion stage adds one cycle to every packet whose last beat holds
  55-64 bytes.
- The removal stage can add one cycle after a stamped packet with more than
  one beat whose last beat holds 11-64 bytes. It does so only when the next
  packet is not itself a stamped packet with more than one beat. A stream of
  stamped frames is therefore taken at one beat per cycle. For example,
  back-to-back stamped 128-byte frames take 2 cycles each.

An example of the cost: a minimum-size 60-byte frame becomes 70 bytes, which
is two beats. The insertion stage then runs at half the packet rate of an
unstamped stream.

At an assumed 250 MHz clock, that means 125 million stamped minimum-size frames
per second. 100G line rate is 148.8 million such frames per second. This
limit comes from the 64-byte stream, not from the design of these stages: any
stream that puts one packet per beat pays for the extra bytes.

When packets queue up behind these extra cycles, or behind back-pressure
anywhere on the path, the queuing time becomes part of the measured delay.
That is correct for a one-way delay measurement. But it means that, under
load, the reported delay includes the waiting time inside the egress node.

## Clocks (`int_timestamp_counter`)

Each node counts cycles of its own clock in a 64-bit register.
`INCREMENT` (default 1) sets how much the count advances each cycle. When
`load` is high, the next value is `load_value`. Load takes priority over
counting, and reset clears the count to zero.

The reported delay is in units of clock cycles. It includes any offset
between the two counters. With free-running counters on two boards, the
offset is arbitrary and drifts with the oscillators. The delay is meaningful
only after both counters have been set to a common time, for example by a
PTP client connected to a GPS-disciplined server. Only the load port is
provided. There is no rate trimming and no client.

## Top level (`int_telemetry_top`)

The top level holds both nodes side by side:

- **Ingress node.** Its clock drives the insertion stage. The `ing_*` ports
  give its stream input, its stream output (towards the network) and its
  clock load.
- **Egress node.** Its clock drives the removal stage. The `eg_*` ports give
  its stream input (from the network) and its stream output. The delay report
  ports carry the measurement.

Each node has its own clock and reset input, because in practice they are two
FPGAs. The network that joins `ing_m_*` to `eg_s_*` is outside the design.

These parts are not included:

- the Ethernet MACs and PHYs;
- the NIC shell with its PCIe/DMA host interface;
- the host computers;
- the PTP client, and the packet filter that would steer PTP traffic to it;
- intermediate INT nodes on the path.

Two situations are left as they are:

- Both stages take their time from the first beat of a packet, so a frame is
  stamped when it enters the stage. Time spent in a MAC before or after the
  stage is not measured.
- The header goes at offset 14. A frame with an 802.1Q VLAN tag therefore gets
  its INT header between the tag and the tagged EtherType field. The egress
  node handles this symmetrically, but only untagged frames have been checked.

## Where this design makes its own choices

The header layout, the EtherType value, the byte order, the ±10 length update,
the stamp-everything ingress behaviour and the delay formula all come from the
scheme this design follows. The following are choices of this design:

- **Stream and metadata.** The 64-byte stream and the 16-bit length metadata
  carried on every beat.
- **Pipeline.** The carry and hold-back datapaths, the extra and trailing
  beats, and the single output register stage.
- **Non-INT frames.** Frames without the INT EtherType, and frames too short
  to hold the header, pass through the egress stage unchanged.
- **Delay report.** Delay and both timestamps come out as ports with a valid
  pulse. No host register interface is provided.
- **Clocks.** The load port on each node clock. Synchronous active-low reset.
- **Stamping point.** A packet is stamped in the cycle its first beat is
  accepted.

## Files

| file | contents |
|------|----------|
| `rtl/int_pkg.sv` | constants, the `axis_beat_t` beat type, keep-mask helpers |
| `rtl/int_timestamp_counter.sv` | node clock |
| `rtl/int_header_insert.sv` | ingress stage |
| `rtl/int_header_remove.sv` | egress stage with delay report |
| `rtl/int_telemetry_top.sv` | both nodes |
| `tb/int_tb_pkg.sv` | frame generators and byte-level reference of insert/remove |
| `tb/int_timestamp_counter_tb.sv` | counting, load, wrap-around, reset |
| `tb/int_header_insert_tb.sv` | literal stamped bytes, all lengths 14-200, long frames, gaps, back-pressure, latency, throughput |
| `tb/int_header_remove_tb.sv` | restored frames, delay reports, pass-through, short frames, clock wrap, throughput |
| `tb/int_telemetry_top_tb.sv` | both nodes joined by a delayed link: synchronised and offset clocks, congestion, plain frames in the link; counts each stall, extra beat, trailing beat and overlap |
| `tb/int_workloads_tb.sv` | stamping with a held zero clock, a stamped sample frame at a given time, 188-byte frames seen by a plain NIC, 1514-byte frames end to end |

Every testbench checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M`.

## Simulating

The commands below use Verilator 5. The testbenches run with `--timing` and
use two-state values, so everything that is read is reset or initialised.
This runs the end-to-end test, with the top level at its default sizes:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/int_pkg.sv tb/int_tb_pkg.sv \
  tb/int_telemetry_top_tb.sv --top-module int_telemetry_top_tb
./obj_dir/Vint_telemetry_top_tb
```

For another test, swap in its testbench file and top module. Each test
finishes in a fraction of a second. To lint the RTL on its own:

```
verilator --lint-only -Wall -y rtl rtl/int_pkg.sv rtl/int_telemetry_top.sv
```

Both stages assert the stream rule that a beat offered on `m_*` stays
unchanged until it is taken. `--assert` turns these checks on.

## How far it has been checked

Each stage has been checked against a byte-level reference of the header
transformation, written separately in `tb/int_tb_pkg.sv`. The checks cover:

- every frame length from 14 to 200 bytes, and random lengths up to 1518
  bytes;
- random input gaps and random output back-pressure;
- literal expected bytes for the 89-byte sample frame, at timestamp zero and
  at `0x0000007fd1547f28`;
- delay reports against reference clocks kept by the testbench, including
  clock wrap-around and a deliberate clock offset;
- latency and throughput figures from the sections above.

Each testbench has also been run against a deliberately broken copy of its
module, and it reports failures.

None of this has been run on hardware. Timing closure at a 100G clock rate is
untested. The wide byte multiplexers in the two stages are the likely
critical path.
