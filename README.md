# CDMA star network-on-chip for an MPEG-4 multiprocessor

An MPEG-4 system on a chip has about a dozen very different units: CPUs, a
DSP, a 3D graphics engine, video and audio output, scaling, upsampling and
quantization hardware, and three memories. They exchange hundreds of
megabytes per second, mostly with the memories. This RTL connects the units
with a small network-on-chip. The network uses **code-division multiple
access (CDMA)** in place of a crossbar. Each destination port of a switch owns
a Walsh codeword. A sender spreads every bit of its packet onto the codeword
of the destination. The switch adds the spread packets of all senders into
one shared sum, and each receiver recovers its own packet from that sum by
correlating with its codeword. Packets for different destinations therefore
cross the switch in the same cycle, over one shared adder, with no crossbar
of multiplexers.

Two seven-port switches form a star. Twelve resources hang off the two
switches, and one port of each switch joins it to the other. A packet needs
one hop inside a group and two hops between groups.

## The twelve resources and where they sit

| # | resource | switch (group) | port |
|---|---|---|---|
| 5 | SDRAM | 0 | 0 |
| 4 | 3D graphics processor | 0 | 1 |
| 3 | video output processor | 0 | 2 |
| 2 | media CPU | 0 | 3 |
| 0 | audio output processor | 0 | 4 |
| 1 | audio DSP | 0 | 5 |
| 11 | upsampling unit | 1 | 0 |
| 8 | SRAM2 | 1 | 1 |
| 7 | quantization unit | 1 | 2 |
| 9 | RISC CPU | 1 | 3 |
| 10 | scaling unit | 1 | 4 |
| 6 | SRAM1 | 1 | 5 |
| – | link to the other switch | 0 and 1 | 6 |

The number in the first column is the resource index `noc_pkg::res_id_t`,
which indexes every array port of the top. The placement keeps the video
and audio side, the 3D engine and SDRAM on switch 0, and the pixel
post-processing units with SRAM2 on switch 1. A switch has only six
resource ports, so SRAM1 goes on switch 1, although its only partner, the
media CPU, is on switch 0. Within a switch the resources with the most
traffic take the lowest port numbers, and the scheduler serves low ports
first. All of this is in `noc_pkg` (`res_gid`, `res_port`) and can be
changed there.

## Packet format

A packet is `{gid, src, dst, payload}`, 8 header bits plus `PAYLOAD_W` bits
(64 by default):

- `gid` (1 bit): the switch, or group, of the destination.
- `src` (4 bits): the index of the source resource.
- `dst` (3 bits): the destination port on that switch.
- `payload`: user data. The traffic generator puts a time stamp here.

A switch routes by comparing `gid` with its own group number. If they match,
the packet goes to port `dst`. If not, it goes to the link port, and the
other switch then uses `dst`.

## How a packet crosses a switch

Each switch (`cdma_switch`) has a transmitter `cdma_tx` and a receiver
`cdma_rx` per port, one `cdma_scheduler` and one `code_adder`.

1. **Buffer.** A packet enters the transmitter's 8-entry FIFO (`pkt_fifo`).
   The FIFO is never overrun. When it is full, `full` tells the sender to
   hold its packet.
2. **Request and schedule.** The packet at the head of each FIFO asks for
   its output port. For every output port, the scheduler grants at most one
   requester in the same cycle. The lowest-numbered port wins. A destination
   that is marked full (only the link can be) is granted to nobody. A losing
   packet stays at the head and asks again next cycle.
3. **Spread.** A granted transmitter spreads each of the 72 packet bits onto
   the 8-chip Walsh codeword of its output port. A 0 bit is sent as the
   codeword and a 1 bit as its complement. All 72 bits are spread in
   parallel into 576 chips, so one whole packet moves per clock.
4. **Add.** For each of the 576 chip positions, the code adder adds +1 for
   every active transmitter sending a 0 chip and −1 for every one sending a
   1 chip. It registers the 576 signed sums, each in the range −7…+7.
5. **Despread.** For every bit, each receiver correlates the 8 sums of that
   bit with its own codeword: it adds the sums where its codeword chip is 0
   and subtracts the sums where it is 1. Walsh codewords are orthogonal, so
   the packets for other ports cancel exactly. The result is +8 for a 0 bit,
   −8 for a 1 bit and 0 when nothing was sent to this port. The receiver
   registers the recovered packet.

The codewords are the rows of the 8×8 Sylvester–Hadamard matrix. Chip `k`
of row `r` is the parity of `r & k`, where parity 0 means +1. Port `p` uses
row `p+1`. Row 0 is all +1, so it would look like a constant offset, and it
is not used. An 8-chip code therefore serves the seven ports of a switch.
This is why a switch has `CODE_LEN − 1` ports, and `cdma_switch` stops
elaboration if `N_PORTS` exceeds that.

Example with ports 0 and 2 active in the same cycle. Port 0 (row 1,
`+ − + − + − + −`) sends a 1, so it transmits `− + − + − + − +`. Port 2
(row 3, `+ − − + + − − +`) sends a 0, so it transmits its row unchanged.
The chip sums are `0 0 −2 +2 0 0 −2 +2`. Receiver 0 correlates with row 1
and gets −8, which decodes as 1. Receiver 2 correlates with row 3 and gets
+8, which decodes as 0. Every other receiver gets 0, which means no packet.

`cdma_rx` also raises `out_err` when a correlation is neither 0 nor ±8, or
when the bits of one packet disagree about being present. Two senders on
one codeword cause exactly this. With a correct scheduler it cannot happen,
so `err` at the top is a cheap self-check.

## Timing and flow control

- **Latency.** A packet presented in cycle *t* with no contention appears at
  a resource of the same group in cycle *t+3*. The three stages are the
  FIFO, the adder register and the receiver register. A packet for the
  other group appears in cycle *t+6*.
- **Throughput.** Each switch delivers up to seven packets per cycle, at
  most one per destination port. Each direction of the link carries one
  packet per cycle.
- **Resource back-pressure.** `res_full[r]` is the full flag of resource
  `r`'s FIFO. A resource may push in any cycle in which it is low. The flag
  is combinational from the occupancy register, so it needs no slack.
- **Link back-pressure.** The other switch's link FIFO receives packets two
  cycles after they are granted. This FIFO raises `full` when six entries
  are occupied (`LINK_SLACK = 2`). The sending switch feeds that flag into
  its scheduler as `dst_full` for the link port. Packets already in the
  pipeline then still find room. The FIFO's overflow assertion guards the
  margin.
- **No receive-side stall.** Resources must accept a delivered packet in the
  cycle it appears.

## Traffic model

`traffic_gen` stands in for a resource when the network is simulated. The
average bandwidths between the resources, in MByte/s, are below. The row is
the sender and the column is the receiver. `noc_pkg::bw_x100` holds the
same values ×100.

| from \ to | SDRAM | 3D | video | media CPU | audio out | audio DSP | SRAM1 | quant | SRAM2 | RISC | scaling | upsampling |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| SDRAM | | 300 | 95 | 30 | 0.25 | 0.25 | | | | | 16 | 455 |
| 3D | 300 | | | | | | | 20 | | | | |
| video | 95 | | | | | | | | | | | |
| media CPU | 25 | | | | | | 20 | | | | | |
| audio out | 0.25 | | | | | | | | | | | |
| audio DSP | 0.25 | | | | | | | | | | | |
| SRAM1 | | | | 20 | | | | | | | | |
| quant | | 20 | | | | | | | 250 | | | |
| SRAM2 | | | | | | | | 250 | | 125 | 87 | 335 |
| RISC | | | | | | | | | 125 | | | |
| scaling | 16 | | | | | | | | 87 | | | |
| upsampling | 455 | | | | | | | | 335 | | | |

Every rate is normalised to the largest one (455 MByte/s, SDRAM ↔
upsampling). That path then produces a packet every cycle, and the others
produce packets with probability `bw / 455`. For each destination, the
generator compares a 16-bit LFSR with the threshold
`round(bw · 65536 / 455)`. A hit marks a packet pending for that
destination, and pending packets are offered round robin. While a packet is
pending, further hits for the same destination merge into it. The payload
is the cycle count at which the packet enters the network, so
`receive cycle − payload` is its latency.

Several resources ask for more than one packet per cycle in total: SDRAM
about 2×, SRAM2 about 1.75× and the upsampling unit about 1.74×. With the
generators on, the network therefore runs saturated. The FIFOs fill up and
`res_full` throttles the sources.

## Measured behaviour

The end-to-end test runs 20,000 cycles of generated traffic at the default
sizes and then drains the network. On this traffic it measures:

- 72,949 packets delivered, none lost, and each pair's packets in order.
- 82 % of packets take one hop and 18 % take two (average hop count 1.18).
- An average latency of 16.2 cycles from entering the FIFO to leaving the
  receiver, with a maximum of about 1,700 cycles.
- On the heaviest path, SDRAM → upsampling, 0.43 packets per cycle. At
  64-bit payloads and a 76 MHz clock that is 259 MByte/s. The best case of
  one packet per cycle would be 608 MByte/s.

The published evaluation of this kind of network reports an average hop
count of 1.45 and an average latency of 28 cycles on the same traffic, with
a 76 MHz clock after synthesis. The numbers here are not expected to match
exactly. The placement of resources differs, and so do the scheduler, the
pipeline depth and the way the generators are throttled. Clock frequency
and cell area depend on a cell library and are not measured here.

The long tail of the latency and the shortfall on the heaviest path share a
cause. The link port has the highest port number, so the link has the
lowest fixed priority at every destination, and the two links each carry
one packet per cycle for all cross-group traffic. For example, traffic from
the upsampling unit to SDRAM must reach SDRAM's port through the link, and
there the 3D engine (port 1) always wins. To share fairly, change the
scheduler to round robin or move the link to port 0. Either change stays
local to `cdma_scheduler` or `noc_pkg`.

## Design choices

The following follow the original description: the switch structure (TX with
FIFO, RX, scheduler and code adder), the spreading rule, the seven ports,
the buffer size of 8, the payload widths of 8 to 64 bits, the two-switch
star, the twelve resources and their bandwidths, and the "buffer full"
behaviour that holds packets without dropping them.

The following are this design's own choices:

- The 8-chip code length, taken from the seven ports (an L-chip code serves
  L − 1 destinations).
- Spreading all packet bits in parallel, one packet per clock.
- The signed digital adder and the correlation receiver.
- The three-stage pipeline.
- Fixed-priority scheduling.
- The meaning and widths of the header fields.
- Which resource sits on which switch and port, including SRAM1 on switch 1.
- The link between the two switches and its early-full handshake.
- The LFSR traffic generator with its pending flags and time-stamp payload.
- Active-low asynchronous reset.
- No back-pressure from resources on the receive side.

The following are not included:

- The mesh network of crossbar switches that such a design is usually
  compared with.
- The MPEG-4 units themselves. Their ports are brought out of the top.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | sizes, header type, resource enum, Walsh function, placement, bandwidth table |
| `rtl/pkt_fifo.sv` | TX packet FIFO with early-full option |
| `rtl/cdma_tx.sv` | transmitter: FIFO, routing, request, spreading |
| `rtl/cdma_scheduler.sv` | per-destination fixed-priority grant |
| `rtl/code_adder.sv` | chip-wise signed sum, registered |
| `rtl/cdma_rx.sv` | correlation receiver with error flag |
| `rtl/cdma_switch.sv` | one seven-port switch |
| `rtl/traffic_gen.sv` | resource traffic model |
| `rtl/mpeg4_cdma_noc.sv` | top: two switches, link, twelve resource ports, generators |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_mpeg4_payload_sizes.sv`, `tb/noc_size_run.sv` | the whole network at 8-, 16- and 32-bit payloads |

Top-level parameters:

- `PAYLOAD_W` (64): payload bits.
- `DEPTH` (8): FIFO entries.
- `CODE_LEN` (8): chips per bit. Keep `CODE_LEN ≥ 8` for seven ports.

Set `tgen_en` to 1 to drive the network from the built-in generators, or to
0 to drive it from `ext_*`. Switch only in a cycle in which no packet is
being pushed. The `inj_*` outputs show each packet as it enters, and
`res_out_*` show each packet as it is delivered. Together they are a
complete transmit and receive trace.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A watchdog ends a run that hangs. With Verilator 5:

```sh
verilator --binary --timing -Irtl rtl/noc_pkg.sv rtl/*.sv tb/tb_mpeg4_cdma_noc.sv \
          --top-module tb_mpeg4_cdma_noc -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The end-to-end test runs the
top at its default sizes. It takes a couple of minutes to compile and
seconds to run, and it prints the latency, hop-count and throughput figures
quoted above. `tb_mpeg4_payload_sizes` runs the generated traffic at 8-, 16- and 32-bit
payloads side by side. All three must deliver every packet, and they must
deliver the same number, because neither the traffic nor the scheduling
depends on the payload width. The unit testbenches use smaller payloads (8 or 16 bits) to
keep the runs short. The simulations use two-state logic, and everything
that is read is reset or written first. The FIFO storage is not reset.
