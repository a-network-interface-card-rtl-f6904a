# Network interface card for a bidirectional WDM fiber-ring LAN

This is the packet-routing core of a network interface card (NIC) for a small
optical local area network. Every node has two laser transmitters and two
receivers on a wavelength-multiplexed fiber ring. Together the nodes form a
logical eight-node ShuffleNet: each node reaches two neighbours directly and
every other node in a few hops.

No central switch exists. Each NIC decides alone, packet by packet, where the
packet goes next:

- Transmitter 0 (Tx0) holds an 8-bit mask of the destination nodes it leads towards.
- Transmitter 1 (Tx1) holds its own mask.
- A packet whose destination matches neither mask is for this node and goes to the host.

Packets are stored in a small dual-port RAM. The transmitter starts sending a
packet while its tail is still arriving (cut-through). Without pauses, the
first word leaves six clocks after it arrived.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It runs on one clock,
156.25 MHz in the intended FPGA, and moves one 16-bit word per clock on each
port. The serial transceivers, the optics and the host bus are outside it (see
"What is not here").

## Packet format and routing

| Item | Value |
|---|---|
| Packet length | 64 bytes = 32 words of 16 bits |
| Word 0, bits 15:8 | destination, one-hot node address (bit n = node n) |
| Word 0, bits 7:0 | source address (carried, not used) |
| Word 1, bits 15:8 | priority field (carried, not used) |

`route_mask` makes the routing decision:

1. If `dest & TX0_MASK` is not zero, the packet goes to Tx0.
2. Otherwise, if `dest & TX1_MASK` is not zero, it goes to Tx1.
3. Otherwise it goes to the host.

Tx0 wins when both masks match. The defaults, `TX0_MASK = 8'b0000_1110` and
`TX1_MASK = 8'b1111_0000`, are node 0's masks. Every node of the network gets
its own pair, derived from the ShuffleNet connection graph.

## Blocks

```
 rx0 ─┐                                                       ┌─ tx0
 rx1 ─┼─ receive_sm ──┐                       ┌── transmit_sm ┼─ tx1
      │  (2 writers)  │                       │  (2 readers)  │
 host─┴─ interface_sm ┤  wr_bus_switch ──► bram_chip x3 ──► rd_bus_switch ┤
  From   (From writer)│                       │               │
                      └──► cs_queue x3 ───────┘ interface_sm ─┴─ host To
                           (chip ids per destination)  (To reader)
```

| Module | Role |
|---|---|
| `nic_pkg` | widths, region bases, default masks, destination enum |
| `route_mask` | destination byte and two masks in; Tx0 / Tx1 / host and the region base out (combinational) |
| `write_ctrl` | one writer: routes a packet, claims a free chip and writes the packet into its region |
| `receive_sm` | two `write_ctrl` instances, one per receiver; receiver 0 wins a same-clock claim |
| `read_ctrl` | one reader: takes a chip id from its queue, claims that chip's read port and streams 32 words |
| `transmit_sm` | two `read_ctrl` instances, Tx0 (region 0) and Tx1 (region 32); Tx0 wins a same-clock claim |
| `interface_sm` | host side: a From writer (fixed 32-word packets) and a To reader (region 64) |
| `cs_queue` | FIFO of one-hot chip ids for one destination; up to three pushes per clock |
| `bram_chip` | 96 x 16 dual-port RAM: port A read/write for writers, port B read-only for readers |
| `wr_bus_switch` | two pipeline registers on each writer's data, then steering by chip select to the RAM write ports |
| `rd_bus_switch` | steers reader address and enable to the RAM read ports, and RAM data back to the readers |
| `nic_top` | connects all of the above |

## Memory organisation

Each of the three RAM chips holds 96 words in three fixed 32-word regions:

| Words | Region |
|---|---|
| 0–31 | packet for Tx0 |
| 32–63 | packet for Tx1 |
| 64–95 | packet for the host |

The routing decision therefore only picks a base address: 0, 32 or 64. The
chip is whichever one is free.

There are three writers: receiver 0, receiver 1 and the host From side.

- A writer holds exactly one chip while it writes a packet.
- There are three chips, so a writer always finds a free one.
- Two packets for the same destination go to different chips, or reuse the same chip one after the other.

A packet is named by its **chip id**, a 3-bit one-hot value. Each destination
has a queue of chip ids, and an empty queue reads as zero. A reader needs
nothing more than the chip id, because the region base is fixed per reader.

## Write path

`write_ctrl` states: IDLE → ANALYZE → ON ⇄ STALL → IDLE.

- **IDLE.** The machine waits for `sof_n` low with `src_rdy_n` low. It latches the destination byte.
- **ANALYZE** (one clock). It applies the masks and picks the lowest-numbered chip that no other writer holds or is claiming this clock. Its `claim` output tells the lower-priority writers, in the same clock, which chip it is taking. Writer priority is receiver 0, then receiver 1, then the host.
- **ON.** One word is written per valid clock, starting at the region base. In the first ON clock the chip id is pushed into the destination queue.
- **STALL.** A clock with `src_rdy_n` high leaves the address unchanged. This covers clock-correction gaps on the serial link.
- **End.** The machine returns to IDLE after the word marked with `eof_n`. The host From side has no end marker: it ends after 32 words. Words past the 32nd are never written.

The data passes two registers in `wr_bus_switch` before reaching the RAM. The
writer delays its own valid and end-of-frame flags by the same two clocks, so
each flag stays aligned with its word and the last word is always written.

## Read path

`read_ctrl` states: IDLE → SETUP → START → ON → END → IDLE.

- **IDLE.** A non-zero queue head is popped.
- **SETUP.** The machine waits until no higher-priority reader holds or is claiming that chip's read port. Reader priority is Tx0, then Tx1, then the host.
- **START.** The reader presents the region base address.
- **ON.** A word is sent on each clock where `dst_rdy_n` is low. The address advances only on those clocks, so a transmitter pause (clock correction) holds it. `sof_n` is low with word 0 and `eof_n` is low with word 31.
- **END** (one clock). The read port is released.

Reads have one clock of latency. The output flags are registered to line up with the RAM word.

## Timing

A packet arrives at receiver 0 with no pauses, and its first word is in clock 0:

```
clock        0    1    2    3    4    5    6    7   ...  37
rx0 word     w0   w1   w2   w3   w4   w5   w6   w7  ...
writer       IDLE ANLZ ON   ON   ON   ON   ON   ON
RAM write              w0   w1   w2   w3   w4   w5  ...  (2 register stages)
queue push             ^ id pushed, visible next clock
reader                      IDLE SETUP START ON  ON  ...
RAM read                              a0   a1   a2  ...
tx0 word                                   w0   w1  ...  w31 (eof_n)
```

The transmitter's `sof_n` falls six clocks after the receiver's (38.4 ns at 156.25 MHz).

From then on, the reader reads each word three clocks after the writer wrote
it. That margin sets the rules:

- **Receiver pauses.** A receiver may pause (`src_rdy_n` high) for at most two clocks in total within a packet that this node forwards. A pause of three clocks lets the transmitter overtake the writer and send stale words. Nothing checks for this.
- **Transmitter pauses.** These only add delay. The reader falls further behind, which is always safe.
- **Gap between frames.** One input needs at least two idle clocks between frames, so that its writer can finish the previous packet's delayed words. A transmitter leaves four idle clocks between its packets, so forwarded traffic always meets this.
- **Back-to-back packets.** A transmitter with a queued packet starts it five clocks after the previous packet's last word, so a busy link carries 32 words every 36 clocks (about 89 %). The extra clocks are END, IDLE, SETUP and START.
- **Read-port contention.** Two readers can want the same chip: Tx0 reads one packet while Tx1 waits for another packet held in the same chip. The second reader then waits in SETUP until the first one's END.

## Queues

`cs_queue` holds three entries, one per chip.

- The writers push in a fixed order (receiver 0, receiver 1, host). Two or three pushes in one clock keep that order.
- A pop in the same clock is done first.
- A push into a full queue is dropped and reported on `q_dropped`.

The head is the one-hot chip id, or zero when the queue is empty.

## Known limitations

- **Region reuse.** (Seen in the eight-node network under random traffic.) A chip is reused for the next packet to the same destination without checking that the earlier packet in that region has been sent. Under sustained traffic to one transmitter, a stored packet can be overwritten before it leaves. The source design has this property too. A fix would hold a per-region "full" bit and make the writer skip that chip.
- **Receiver pauses.** Pauses of three clocks or more inside a forwarded packet are not protected against (see Timing).
- **Priority field.** It is carried but ignored.
- **No alternative transmitter.** A packet always leaves on the transmitter its masks choose. It is never sent on the other one when that one happens to be free.

## Where this RTL differs from the source design

- **Latency.** It is six clocks from receive to transmit, not the seven reported for the original.
- **End of frame.**
  - The original receiver machine left too early and lost the last word. Here all frame flags are delayed together with the data.
  - `eof_n` on the transmitter is asserted with the last word, not one clock later, as the LocalLink interface expects.
- **Bus switches.** The original used tri-state buffers selected by inverted chip selects. Here they are AND-OR multiplexers with the same selection. Assertions check that no chip ever has two writers or two readers.
- **Host From side.** It claims the first free chip like the receivers do, rather than a fixed chip. It starts on its own start-of-frame signal.
- **Leaving SETUP.** In the original, a waiting transmitter could also leave SETUP when a newer packet arrived for it. Here it waits for the chip it has already taken from the queue, so that packet is never skipped.
- **Host packets to the own node.** The original host From machine ended only in the Tx0 and Tx1 regions. Here a host packet addressed to its own node goes to the host region and comes back on the To side.
- **Queue behaviour.** The depth (three), the drop-on-full behaviour and the same-clock claim priorities are choices of this design.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `TX0_MASK` | `nic_top` | `8'b0000_1110` | destinations reached through Tx0 |
| `TX1_MASK` | `nic_top` | `8'b1111_0000` | destinations reached through Tx1 |
| `WORDS` | `bram_chip` | 96 | words per RAM chip |
| `DEPTH` | `cs_queue` | 3 | chip ids held per destination |
| `FIXED_LEN` | `write_ctrl` | 0 | 1: packet ends after 32 words instead of on `eof_n` |
| `DATA_DELAY` | `write_ctrl` | 2 | delay of the writer's frame flags; must equal the two data registers in `wr_bus_switch` |
| `BASE` | `read_ctrl` | 0 | first word of the reader's region |

## Simulation

Each module has a self-checking testbench in `tb/` named `<module>_tb`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops, and a watchdog ends
it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/nic_pkg.sv tb/nic_top_tb.sv \
    -y rtl --top-module nic_top_tb -Mdir obj_nic_top -o sim
obj_nic_top/sim +verilator+seed+1 +verilator+rand+reset+2
```

`nic_top_tb` runs the top at its default parameters. A reference model
predicts each packet's output port and contents. The test drives:

- single packets, with the six-clock latency checked
- all three sources at once
- queueing of two receivers onto one transmitter
- back-to-back packets that wait for a read port
- receiver and transmitter pauses
- host From → To traffic
- a random traffic phase

It counts each mechanism (cut-through, queueing, read-port wait, pauses,
parallel transfers). It fails if any of them never happened.

`shufflenet_tb` wires eight NICs into the eight-node ShuffleNet. Node n's
transmitters lead to these nodes:

| Node | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| Tx0 → | 1 | 0 | 3 | 0 | 3 | 6 | 1 | 6 |
| Tx1 → | 7 | 2 | 5 | 2 | 5 | 4 | 7 | 4 |
| `TX0_MASK` | 0000_1110 | 1000_0001 | 0000_1011 | 1000_0011 | 0000_1111 | 1100_0111 | 0000_1111 | 0100_0111 |
| `TX1_MASK` | 1111_0000 | 0111_1100 | 1111_0000 | 0111_0100 | 1110_0000 | 0001_1000 | 1011_0000 | 0011_1000 |

Each mask sends a destination out of the transmitter that lies on a shortest
path to it; where both are equally short, destinations 0–3 use Tx0 and 4–7 use
Tx1. Every node is reached in at most three links. For example, node 0 reaches
node 5 through nodes 7 and 4.

The test sends each of the 64 source/destination pairs alone. It then sends
rounds in which every node sends at once, on routes that share no link. It
checks the content of each delivered packet and that the packet arrives
exactly once. It also checks that the number of links the packet crossed
equals the shortest path. The rounds avoid shared links on purpose: under
heavier contention the region-reuse limitation below can overwrite a waiting
packet.

## What is not here

- The Xilinx Aurora core and RocketIO serial transceivers. The NIC's `rx*` and `tx*` ports are their LocalLink user interface.
- The SFP lasers, optical add/drop multiplexers and fiber.
- The PCI bridge and host software.
