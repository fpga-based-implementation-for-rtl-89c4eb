# Four-flow gigabit packet generator and receiver (NetFPGA-1G user data path)

This is the user data path of a hardware network tester. It generates up to
four independent UDP, RTP-over-UDP or ARP flows at up to 1 Gb/s per port,
with no software in the packet path. On the receive side it measures every stream
in hardware: bits per second, packets per second and jitter, once per second.
The rate of each flow comes from a clock-cycle counter, and the frames are
assembled by logic. So the spacing between packets is exact to one 8 ns clock.
Four 60-byte flows at the full 1 Gb/s line rate have zero jitter.

The design targets the NetFPGA-1G card: a Virtex-II Pro at 125 MHz with four
gigabit Ethernet ports. It plugs into the card's reference pipeline in place
of the user data path. The MAC queues, the PCI register system and the host
software are not part of this RTL. Their signals are the ports of
`pktgen_top`.

```
            transmit                                    receive
 registers ──► rater ──► packet_generator ──► send ──► my_output_queues ──► MAC tx 0..3
                            ▲                                                       
                            │ arp_request                                           
                            │                                                       
 MAC rx 0..3 ──┬──► statistics ×4 (per port)                                        
               └──► input_arbiter ──► statistics (aggregate)                        
                                  └──► packet_parser ──┘                            
```

## The word stream

Every block-to-block connection carries one 64-bit word per clock, with an
8-bit `ctrl` byte, a `wr` strobe from the sender and a `rdy` from the
receiver. The sender raises `wr` only while `rdy` is high. A word moves on
every clock where `wr` is high.

| ctrl | meaning |
|------|---------|
| `8'hFF` | module header (first word of every packet) |
| `8'h00` | frame word, all 8 bytes valid |
| `1 << (n-1)` | last word, `n` valid bytes (`8'h80` = 8 … `8'h01` = 1) |

Frame byte 0 travels in `data[63:56]`. The module header carries:
- `[63:48]` the destination mask (MAC port *i* is bit 2*i*, CPU port *i* is bit 2*i*+1);
- `[47:32]` the length in words;
- `[31:16]` the source mask;
- `[15:0]` the length in bytes.

The statistics count bytes from this header. The output queues route on it.
The constants and the flow register struct `flow_cfg_t` are in
`rtl/pktgen_pkg.sv`.

## Rater

`rtl/rater.sv` has one 32-bit counter per flow. When a counter reaches the
flow's `clk_limit`, it restarts and sends a one-clock request. The period is
therefore `clk_limit + 1` clocks. At one byte per 8 ns clock on a gigabit
line, a flow at line rate needs `clk_limit = wire bytes − 1`. The wire bytes
are the frame plus 24 bytes of preamble, FCS and inter-frame gap. So a
60-byte frame needs `clk_limit = 83`, for 1,488,095 packets/s.

Requests never wait for the rest of the pipeline. That is why the rate is
exact. A `clk_limit` of 0, or `send_enable` low, keeps a flow silent.

## Packet generator: time slots and header assembly

`rtl/packet_generator.sv` is the core of the transmit side.

**Pending requests.** Each request adds one to the flow's 10-bit counter
`signal_in[f]`. Each packet sent takes one away. Bursts of up to 1023
requests therefore wait instead of being lost while another flow's packet is
being built. The counters are visible as `pending_requests`.

**Round robin.** The register `current_flow` names the flow that owns the
current time slot.
- If that flow has a pending request, its packet is built and sent.
- If it has none, `current_flow` steps to the next flow on the next clock.
- After every packet, `current_flow` always moves on.

A slot lasts as long as its packet. A flow with a backlog cannot starve the
others.

**FSM.** It runs WAIT → GENERATE_PACKET → ALL_TO_ONE → SEND.

1. GENERATE_PACKET fills the header registers from the flow's configuration.
   In the same clock it adds the ten 16-bit words of the IPv4 header into a
   19-bit sum.
2. ALL_TO_ONE folds the carries back in. It folds twice, so the carry out of
   the first fold is not lost. It writes the checksum `0xFFFF − sum` and packs
   the headers, left aligned, into the 464-bit `all_together`. It also
   computes the header size in bits.
3. SEND pulses `new_send` and waits for the send stage to finish.

The headers that can appear:

| option | header bytes | contents |
|--------|-------------|----------|
| plain UDP | 14 + 20 + 8 = 42 | MAC, IPv4 (TTL 255, protocol 17, ToS from the flow), UDP (checksum 0) |
| `cos_value ≠ 0` | +4 | 802.1Q tag: TPID 0x8100, PCP = `cos_value`, VID 0 |
| `rtp_enable` | +12 | RTP v2: PT from the flow, sequence number per flow, timestamp, SSRC 0xAD0F01AD |
| `arp_enable` | 14 (+4) + 28 | ARP with the flow's opcode and addresses, padded to 60 bytes |

- **RTP timestamp.** It is a free-running 16-bit clock counter, zero-extended
  to 32 bits, so its unit is 8 ns.
- **IPv4 and UDP lengths.** Both include the RTP header when one is present.
- **Payload.** The flow's 32-bit packet sequence number, repeated.
- **ARP requests.** When the receive parser reports an ARP request, the
  generator answers it before any flow. It sends a gratuitous ARP reply
  (opcode 2, broadcast destination) whose sender and target are both flow 0's
  source MAC and IP. The reply goes out on flow 0's ports.

A 60-byte packet takes 15 clocks here:
- 3 clocks to choose the flow and build the headers;
- 11 clocks in the send stage;
- 1 clock back in WAIT.

That is well inside the 21 clocks that four flows at 60-byte line rate
allow (125 MHz / 4 / 1,488,095).

## Send: cutting headers and payload into words

`rtl/send.sv` turns `all_together`, the header size, the payload size and the
32-bit payload pattern into the word stream. Its FSM follows the kind of
word it is writing:
- FPGA_HEADER writes the module header word.
- HEADER writes words made only of header bytes.
- HEADER_PAYLOAD writes the word where the header ends and the payload
  begins.
- PAYLOAD writes payload-only words.
- END closes the packet.

Every word goes into a 16-word FIFO.

The difficult part is the byte alignment. Header sizes of 42, 46, 54 and 58
bytes leave the payload starting at different byte lanes. The stage rotates
the doubled pattern `{p, p}` right by `8 × (header bytes mod 4)` once per
packet. Payload byte 0 then falls on the first free lane. Every following
word uses the same rotated pattern, and no per-word shifting is needed. Each
word is built with two byte masks:
- one for header bytes against payload bytes;
- one for valid bytes, which zeroes the tail of the last word.

A packet of *W* words after the module header takes *W* + 3 clocks.

## Output queues

`rtl/my_output_queues.sv` replaces the reference pipeline's SRAM-backed
output queues. Those need about 15 clocks per packet, and the budget is 21
clocks less 9 clocks of propagation delay.

Packets enter a 32-word input FIFO. The FSM runs WAIT → DST_PORT_CALC → SEND:
1. DST_PORT_CALC takes one clock. It reads the destination mask from the
   module header at the FIFO head.
2. SEND copies the packet word by word into every selected 512-word output
   FIFO. A packet with several destination bits is duplicated. Copying pauses
   while any selected FIFO is full.

Each output FIFO feeds one MAC transmit queue. A 60-byte packet passes in
11 clocks.

## Receive side

**Input arbiter** (`rtl/input_arbiter.sv`). It merges the four MAC receive
streams into one stream.
- Each input has a 16-word FIFO.
- The arbiter moves a whole packet at a time, starting with the input after
  the one it served last.
- Words that reach the head of an idle FIFO without a module header are
  discarded.

The merged stream carries 8 bytes per clock. Four gigabit ports deliver at
most 4 bytes per clock, so it keeps up.

**Statistics** (`rtl/statistics.sv`). There are five instances: one on each
MAC receive stream and one on the merged stream (output index 4). A 32-bit
counter divides time into windows of `CLK_PER_SEC` = 125,000,000 clocks, one
second. The state machine (WAIT, CTRL_FF, CTRL_00, CTRL_XX) follows each
packet:
- At the module header (CTRL_FF) it adds `bytes × 8` to `total_bits` and
  records the arrival time.
- At the last word (CTRL_XX) it counts the packet.

When the window closes, `total_bits` and the packet count become `bps` and
`pps`, and `window_done` pulses.

Jitter is the mean absolute change of the inter-arrival gap over the window.
For every packet from the third in a window, the block adds
`|gap_n − gap_(n−1)| × 8 ns` to `sum_jitter`. Gaps are taken modulo the
window counter, so a wrap between arrivals is harmless. When the window
closes, a serial restoring divider (`rtl/division.sv`) divides the sum by the
number of samples. It is 41 bits wide and produces one quotient bit per
clock, so `jitter` is valid 42 clocks after `window_done`. A window with
fewer than three packets reports 0. The gap history restarts in each window.

**Packet parser** (`rtl/packet_parser.sv`). It reads the merged stream
through a 16-word FIFO, one word per clock. Its states are:
- WAIT
- ETHERNET_HEADER (2 words)
- IP_ARP_HEADER (3 words for IPv4, 4 for ARP)
- UDP_HEADER
- PAYLOAD

It drops a frame whose EtherType is not IPv4 or ARP, or whose IPv4 protocol
is not UDP. An ARP packet with opcode 1 produces the one-clock `arp_request`
to the generator. For UDP it outputs the source address and port, the
destination, and the first 8 payload bytes. It counts UDP, ARP and dropped
packets.

## Register interface (`pktgen_top` ports)

| group | ports |
|-------|-------|
| control | `send_enable`, `clk_limit[4]`, `flow_cfg[4]` (payload size in bytes, IPs, UDP ports, MACs, `arp_enable`, `arp_opcode`, `rtp_enable`, `pt`, `cos_value`, `tos`, `fpga_dst_port` mask) |
| generator status | `packets_generated[4]`, `num_packets_generated`, `pending_requests[4]`, `current_flow`, `packets_routed` |
| MAC streams | `rx_*[4]` in, `tx_*[4]` out (wr/ctrl/data/rdy) |
| statistics | `bps[5]`, `pps[5]`, `jitter[5]`, `window_done[5]` (index 4 = aggregate) |
| parser | `arp_request`, `rx_udp_packets`, `rx_arp_packets`, `rx_dropped_packets`, `rx_udp_valid`, `rx_udp_src_ip`, `rx_udp_src_port`, `rx_first_payload` |

The reset is synchronous and active high. Parameters:
- `CLK_PER_SEC` (default 125,000,000) sets the statistics window.
- `OQ_DEPTH` (default 512 words) sets the output FIFOs.

In synthesis the whole top comes to about 1,400 coarse cells, 5,800
flip-flop bits and 157 kbit of FIFO memory. Almost all of that memory is the
four 512 × 72 output queues.

## Where this design departs from the thesis, or fills a gap

- **ARP EtherType.** One passage gives 0x8100 as the ARP EtherType, but the
  header table gives 0x0806. The parser and generator use 0x0806; 0x8100 is
  the 802.1Q tag.
- **802.1Q frames on receive.** The parser only handles untagged IPv4 and
  ARP after the MAC header. Tagged frames are counted as dropped. They are
  still fully counted by the statistics blocks.
- **RTP.** The RTP header is 12 bytes with CSRC count 0, as in the RTP field
  table. The general RTP figure and the register map also list a CSRC word;
  it is not sent.
- **IPv4 and UDP lengths include the RTP header.** The length equations are
  written for plain UDP.
- **Statistics window.** The window is exactly `CLK_PER_SEC` clocks. The text
  says the counter resets "when it is 125000000", which read literally is
  one clock longer.
- **Jitter.** It is read as the mean absolute gap change, with the
  three-packet minimum applied per window.
- **ARP reply.** The reply uses flow 0's addresses and destination ports.
  Which flow should supply them is not stated.
- **ARP frames** are padded to 60 bytes.
- **Choices where the thesis is silent:**
  - `clk_limit = 0` means off;
  - pending-request counters are 10 bits and saturate;
  - FIFO depths are 16, 32 and 512 words;
  - the input arbiter is packet-wise round robin;
  - the IPv4 checksum folds twice.
- **Cycle budget.** The thesis's budget of 21 clocks per packet assumes the
  reference output queues. Here the transmit path needs 15 clocks per
  60-byte packet.

Not included:
- the NetFPGA MAC/PHY queues;
- the PCI register system, which maps the ports above onto host registers;
- the SRAM/DRAM interfaces, which this design does not use;
- the host GUI.

## Simulation

The testbenches in `tb/` are self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. `tb/tb_pkt_pkg.sv` builds reference frames
byte by byte, including the IPv4 checksum, independently of the RTL. To run
one with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_pktgen_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/pktgen_pkg.sv tb/tb_pkt_pkg.sv tb/tb_pktgen_top.sv
./obj_dir/Vtb_pktgen_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_sync_fifo` | random push/pop against a queue model, flags |
| `tb_division` | random and corner-case divisions; the result arrives 41 clocks after start; abort on restart |
| `tb_rater` | every request arrives exactly `clk_limit+1` clocks after the previous one; idle and disable |
| `tb_statistics` | bps/pps/jitter against planned arrival times: constant and alternating gaps, a window with < 3 packets, the divider latency |
| `tb_packet_parser` | UDP, RTP, ARP request/reply, TCP and non-IP frames; `arp_request` only for requests |
| `tb_packet_generator` | every header variant byte for byte, checksum, round-robin fairness, request backlog, ARP reply within two packets |
| `tb_send` | every header size with many payload sizes up to 1472 bytes and beyond, random back-pressure, W+3 clocks per packet |
| `tb_my_output_queues` | single, multi-port and CPU-only destinations under random back-pressure, 11 clocks per 60-byte packet |
| `tb_input_arbiter` | four sources with random gaps and random back-pressure, packets kept whole and in order, turns taken in order |
| `tb_pktgen_top` | the whole path through a model of the MAC and the cable (ports 0↔1, 2↔3, gigabit wire time per frame); see below |
| `tb_pktgen_full` | the top with default parameters for one full one-second window: four 60-byte flows at line rate |

`tb_pktgen_top` uses a 4,000-clock window so it runs in a second. It runs in
three phases:
1. four flows at line rate;
2. mixed flows (802.1Q, RTP to two ports, an ARP-request flow) plus an
   injected ARP request and an IPv6 frame;
3. an overload of 1514-byte frames with transmit back-pressure.

It checks every transmitted frame, the per-window statistics against a model
of the received streams, and the parser totals. It counts each mechanism:
- request backlog;
- round-robin switch;
- transmit and receive stalls;
- ARP request and reply;
- 802.1Q, RTP and ARP flows;
- multi-port copies;
- parser drops;
- zero and non-zero jitter.

It fails if any mechanism never happens.

`tb_pktgen_full` simulates 125 million clocks, about one and a half minutes
with Verilator. It measures 1,488,094–1,488,095 packets/s on each port. The
theoretical maximum is 1,488,095; the difference is the clocks before the
first request. It also measures bps = pps × 480, zero jitter, and the
matching aggregate.
