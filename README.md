# CDMA network-on-chip

This design connects six IP blocks through one shared channel. It does not use a ring or mesh of point-to-point links. Each sending node spreads its data with its own orthogonal code, and the coded data of all senders are added into a single multi-level signal. A receiver recovers one sender's data by correlating that signal with that sender's code.

Many transfers can share the channel at once. A packet always needs the same number of channel slots, so its transfer time does not depend on:

- where it comes from;
- where it goes;
- what else is on the network.

In a multi-hop point-to-point network the latency changes with the route and the traffic. Here it is fixed. Because each host keeps its own clock and only the network runs on a common clock, the system is globally asynchronous and locally synchronous (GALS).

A second, much smaller design sits beside the network in the same top level. It is a three-user CDMA transmitter that spreads a 3-bit message with three pseudo-noise (PN) sequences. It has its own clock and its own ports.

Everything is plain synthesizable SystemVerilog (IEEE 1800-2017). It has no vendor primitives.

## How the channel works

### Codes

Every node owns one code of `CODE_LEN` = 8 chips. The codes are rows of an 8×8 Hadamard (Walsh) matrix in 0/1 form. The chip of row *k* at position *j* is `^(k & j)`, computed by `spreading_code_gen`. Node *n* uses row *n*+1. Row 0 (all zeros) has more zeros than ones, so it is never used. This leaves 7 usable codes, enough for the six nodes (`NODES < CODE_LEN` is asserted).

Every used row has four ones and four zeros, and any two rows agree in exactly four chips. The decoder depends on these two properties. Two example rows are 00110011 (row 2) and 01011010 (row 5).

### Encoding

Each chip period, every active sender XORs each of its data bits with its current code chip, giving a "data chip". Then, lane by lane, the data chips of all senders are added (`cdma_encoder`).

The data path is `DP_W` lanes wide, so a sender puts `DP_W` bits on the channel per symbol. One channel lane therefore carries a number from 0 to `NODES`, on `SUM_W` = ⌈log2(NODES+1)⌉ = 3 bits. Senders that are idle add nothing.

### Decoding

For each lane the receiver keeps two accumulators (`cdma_decoder`):

- the sum of chips where the selected code chip is 0 goes into the **positive** accumulator;
- the sum of chips where it is 1 goes into the **negative** accumulator.

After 8 chips it compares them. If positive is greater, the bit is 1; if negative is greater, the bit is 0.

Every other sender adds equally to both accumulators, because its code agrees with the selected one in half of the chips. Only the selected sender tips the balance.

If the selected sender sent nothing in that symbol, the two accumulators are exactly equal. The decoder reports this as `present = 0` and the receiver skips the slot. This tie test is a choice of this design.

### Slots

`cdma_transmitter` is the shared channel. A free-running chip counter cuts time into slots of 8 network cycles.

- `sync` is high on chip 0.
- `slot_load` is high on chip 7. At that moment it takes every symbol offered by the packet senders.

All senders therefore start on the same slot boundary (bit-synchronous CDMA). A sender that becomes ready in the middle of a slot waits for the next one, while the senders already sending carry on. The channel sums (`ch_sum`) are registered. They leave one cycle after their chip, with their chip number (`ch_chip`).

## Setting up a transfer: the network arbiter

A sender does not put a destination address on the channel. `network_arbiter` connects sender and receiver before any data moves, so the receiver knows which code to use. For each destination *d* there is an independent four-phase exchange:

1. Sender *s* raises `tx_req[s]` with `tx_dest[s] = d`.
2. The arbiter picks one of the senders requesting *d* and raises `rx_open[d]` with `rx_src[d] = s`. Senders are served first come, first served. Requests that arrive in the same cycle are ordered by round robin, starting after *d*'s last winner.
3. Receiver *d* selects code *s*+1. When its receive buffer has room for a whole packet, it raises `rx_ack[d]`.
4. The arbiter raises `tx_gnt[s]`. The sender sends its packet, waits one more slot, then drops `tx_req`. The arbiter drops `tx_gnt` and `rx_open`. The receiver drops `rx_ack` once it has stored the packet, and destination *d* is free again.

Transfers to different destinations run in parallel, and their symbols overlap on the channel. Senders that aim at the same destination wait their turn. A receiver with a full buffer simply delays its acknowledge, which pushes back through the arbiter to the sender.

Arrival order is kept in an age matrix. Bit `older[i][j]` means sender *i* asked before sender *j*. A new request is younger than every request already waiting, and it takes part in the choice from the cycle after `tx_req` rises. For destination *d*, a waiting sender is eligible if no other sender waiting for *d* is older. Round robin then picks among the eligible senders, which are the ones that arrived in the same cycle.

The extra slot that the sender waits after its last symbol is a choice of this design. It ensures the sender's last symbol has left the channel before the sender's code can be given to another receiver.

## The network node

`network_node` has five parts.

| Part | Module | Clock |
|---|---|---|
| Node IF | `node_if` | host |
| Transmit packet buffer | `async_fifo` | host → network |
| Receive packet buffer | `async_fifo` | network → host |
| Packet sender | `packet_sender` | network |
| Packet receiver | `packet_receiver` | network |

### Node IF and the packet format

The host sends a message as a valid/ready stream of 32-bit words. The destination is on every word and `last` is on the final word. The Node IF cuts the message into packets of `PKT_LEN` = 4 payload words and puts a header word in front of each packet. If the last packet is short, it is padded with zeros.

| Header bits | Field |
|---|---|
| 5:0 | destination node |
| 9:6 | source node |
| 13:10 | valid payload words (1..4) |
| 14 | last packet of the message |
| 22:15 | packet number within the message |
| 31:23 | zero |

The header travels in the packet, header first. On the receiving side, the Node IF:

- reads the header;
- gives the host only the valid words;
- tags each word with the source, the packet number and an end-of-message mark;
- drops the padding.

Each packet always has the same size. The word width, the packet length and the header layout are choices of this design.

### Packet buffers and clock crossing

Both buffers are `async_fifo`. This is a dual-clock FIFO with Gray-coded pointers and two-flop synchronizers, `DEPTH` = 16 words, and a first-word-fall-through read port.

The writer also sees `wr_free`, the number of free entries, which may be counted low but is never too high. The packet receiver uses it for its room check.

Hosts may run at any clock relative to the network. The testbenches use host clocks from 7 ns to 17 ns against a 10 ns network clock.

### Packet sender and receiver

The packet sender:

1. waits until its buffer holds a packet;
2. reads the packet into a register;
3. requests the destination given in the header;
4. after the grant, offers one `DP_W`-bit symbol per slot, low bits first.

The packet receiver decodes every slot with the selected code and skips slots where the sender is silent. It gathers the bits into 32-bit words and writes them into the receive buffer. It is done after (PKT_LEN+1)·32/DP_W symbols.

### Transfer time

With a grant in hand, a packet takes exactly (PKT_LEN+1)·FLIT_W/DP_W slots:

| `DP_W` | Slots per packet | Network cycles per packet |
|---|---|---|
| 32 | 5 | 40 |
| 16 | 10 | 80 |
| 8 | 20 | 160 |
| 1 | 160 | 1280 |

The total cost of a transfer is this fixed time plus a few cycles of handshake and up to one slot of alignment. Waiting for a busy receiver, or for buffer room, comes before the grant.

## The three-user transmission model

`cdma_tx3_model` sends a 3-bit message as three single-bit users.

- **Codes.** The three PN sequences are the three stages of one 3-bit LFSR (`pn_sequence_gen`). The feedback polynomial is x³+x²+1 and the seed is 001, so the states are 001, 010, 101, 011, 111, 110, 100, and the sequence repeats every 7 chips.
- **Spreading.** User *u* XORs its bit with stage *u* of the LFSR. The three data chips are added, so the output `txout` is 0..3 on two bits.
- **Timing.** A message lasts 7 chips. `cycle` counts 0..6 within a message and `sync` is 1 when `cycle` is 0. At the end of each message the LFSR restarts from its seed and the next value of `msg` is taken.
- **Outputs.** All outputs are registered.

A receiver decodes user *u* in the same way as the network decoder: positive and negative accumulators selected by stage *u*. The end-to-end testbench does this for every message.

The choice of polynomial, the use of the three LFSR stages as the three codes, and the counter starting at 0 are choices of this design.

## Parameters

The defaults are in `cdma_noc_pkg`. Every module takes them as parameters, so you can override them on the top.

| Parameter | Default | Meaning | Origin |
|---|---|---|---|
| `NODES` | 6 | network nodes (must be < `CODE_LEN`) | six-node network of the source design |
| `CODE_LEN` | 8 | chips per code (power of 2) | 8-chip codes of the source design |
| `DP_W` | 32 | data path width, bits per symbol (1, 8, 16, 32; must divide `FLIT_W`) | source design's family of widths; 32 is its best performer |
| `FLIT_W` | 32 | host word width | this design |
| `PKT_LEN` | 4 | payload words per packet (≤ 15) | this design |
| `FIFO_DEPTH` | 16 | words per packet buffer (power of 2, ≥ PKT_LEN+1) | this design |

## Top-level ports (`cdma_noc_top`)

- **Clocks and resets.** `net_clk` and `net_rst` drive the network. `host_clk[n]` and `host_rst[n]` drive each host. All resets are synchronous and active high.
- **Host transmit.** `h_tx_valid`, `h_tx_ready`, `h_tx_dest`, `h_tx_data`, `h_tx_last`: one set per node, as packed arrays.
- **Host receive.** `h_rx_valid`, `h_rx_ready`, `h_rx_src`, `h_rx_seq`, `h_rx_data`, `h_rx_last`: one set per node.
- **Observation.**
  - `slot_sync`: first chip of a slot.
  - `ch_active`: which nodes send in this slot.
  - `node_sending`, `node_receiving`: per-node status.
  - `node_waiting`: a request is not yet granted.
- **Three-user model.** `m_clk`, `m_rst`, `m_msg` (inputs); `m_txout`, `m_cycle`, `m_sync` (outputs).

## Files

`rtl/` holds one module or package per file.

```
cdma_noc_top
├── network_node ×6
│   ├── node_if
│   ├── async_fifo (transmit, receive)
│   ├── packet_sender
│   └── packet_receiver ── cdma_decoder, spreading_code_gen
├── network_arbiter
├── cdma_transmitter ── spreading_code_gen ×6, cdma_encoder
└── cdma_tx3_model ── pn_sequence_gen
```

`tb/` holds one self-checking testbench per module (`tb_<module>`), plus two testbenches for the whole network:

- `tb_cdma_noc_top` runs the top at its defaults. Six hosts on unrelated clocks send random messages, including to themselves. It checks every delivered word, the end-of-message marks and the 5-slot packet time. It counts and requires each mechanism: concurrent senders, waits for a busy receiver, the arbiter choosing among several waiting senders, a receiver holding off for lack of room, multi-packet messages, padded packets, loopback, and decoded model messages.
- `tb_cdma_noc_widths` (with its helper `tb_noc_width_run`) runs three copies of the network at `DP_W` = 1, 8 and 16.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` at the end and has a watchdog.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb rtl/cdma_noc_pkg.sv tb/tb_cdma_noc_top.sv \
    --top-module tb_cdma_noc_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv`. The package must come first on the command line. The simulator has two states, so every register is reset. The testbenches pass with random initial values (`+verilator+rand+reset+2`). The end-to-end test takes a few seconds.

## Hosts must keep reading

A receiver acknowledges only when its receive buffer has room for a whole packet. If a host stops reading its receive stream, every sender that targets that host waits, including the host's own loopback packets. Those senders' transmit buffers then fill, and their hosts stall on `h_tx_ready`. A host whose ability to read depends on being able to send will therefore deadlock. Hosts should drain their receive side on its own, independently of their transmit side. The end-to-end testbench holds one host's reads off for a fixed time, not until that host's own sending finishes, for exactly this reason.

## Where this design departs from its source, and what it leaves out

- **Clockless control replaced by a clock.** The source builds the CDMA transmitter, arbiter, sender, receiver and buffers from clockless handshake logic (C-element pipelines and micropipelines). Here they are synchronous to one network clock, with request/grant and valid/ready handshakes. The asynchronous boundary is kept: it sits in the dual-clock packet buffers between each host and the network.
- **Walsh codes, not PN codes, in the network.** The source asks for balanced orthogonal codes, and its examples are Walsh rows. It also speaks of a PN generator. An m-sequence is not balanced, so the network uses Walsh rows and the LFSR is used only in the three-user model.
- **No multicast.** The source notes that several receivers could listen to one sender's code. The arbiter here connects one sender to one receiver at a time. Multicast would need a set of destinations per request.
- **Header sent in-band.** The arbiter gives the receiver the source node before the data arrives, as in the source. The packet number and word count still travel in the header word.
- **Area and power.** The source reports area, dynamic power and energy per bit for 1/8/16/32-bit networks against a point-to-point ring network. None of this is reproduced here. The ring network itself is not part of this design.
- **Board-level parts.** The functional hosts, the clock generator, the push button and the LEDs used to show the three-user model on an FPGA board are not included. Their signals are top-level ports.
