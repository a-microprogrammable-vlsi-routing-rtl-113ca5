# HARTS routing controller in SystemVerilog

HARTS (Hexagonal Architecture for Real-Time Systems) joins its nodes in a
C-wrapped hexagonal mesh. Each node has six neighbours, in directions d0 to d5.
The routing controller sits at the front of every node. It takes packets from
the six incoming serial links and passes each one on. When a packet only passes
through the node and a suitable outgoing link is free, the controller sends it
straight on, byte by byte, without storing it (virtual cut-through). When no
suitable link is free, or when the packet has reached its destination, the
controller hands the packet to the node's buffer management unit (BMU).

The routing decision is not fixed in hardware. Each receiver runs a small
microprogram from a writable control store. Loading a different program
changes the routing algorithm, or the order in which the outgoing links are
tried.

This repository holds synthesizable RTL for the controller: six receivers, six
transmitters and the time-slice bus that joins them. It also holds
self-checking testbenches and a shortest-path routing microprogram for HARTS.
The architecture follows the published description of the HARTS routing
controller. That description gives the block structure, the bus line groups
and the mechanisms, but few formats. Every encoding and timing detail below
that is marked as a choice was made for this RTL.

## Packets and routing offsets

A packet is framed by SOP and EOP bytes. It looks like this:

    SOP, type, m0, m1, m2, payload ..., EOP

m0, m1 and m2 count the hops still to go along d0, d1 and d2. They are signed
bytes, and a negative value means the opposite direction (d3, d4 or d5). This
sign convention is a choice. A node that forwards a packet along d_i moves m_i
one step towards zero. A packet whose three offsets are all zero has arrived.
A shortest path has at most two non-zero offsets, so a receiver can have two
candidate links. Example: to go from node 1 to node 10 of the 19-node mesh,
the offsets are (1,1,0). The packet can leave on d0 as (0,1,0) or on d1 as
(1,0,0).

## Time-slice bus (`ts_bus`)

All internal transfers share one parallel bus. Each clock on this bus is a
*minor cycle*. In this RTL one clock is one minor cycle and also one line bit.
The published design uses two non-overlapping clock phases; this RTL uses a
single clock edge instead (a choice). A slot counter hands the bus to the
masters in a fixed round-robin order, with twelve slots per *major cycle*:

| slot | master |
|------|--------|
| 0..5 | receivers 0..5 |
| 6..9 | BMU outbound channels 0..3 |
| 10, 11 | interface manager (IM) (a choice: the published design gives twelve slots but names only ten masters) |

Each minor cycle carries the following (struct `ts_bus_t` in `hrc_pkg`):

- the bus-master lines: the slot number;
- a 4-bit command;
- a 4-bit address: bit 3 is the *tee* bit, bits 2:0 select the slave;
- 9 data bits: bit 8 flags a special byte (NULL 0x100, SOP 0x101, EOP 0x102).

Slaves 0..5 are the transmitters and slave 6 is the BMU inbound side. A byte
sent with the tee bit set goes to the addressed transmitter and to the BMU in
the same cycle, which is how a broadcast is copied. The slave answers on a
single acknowledge line in the same minor cycle.

Commands (codes are a choice): `RES_REQ` and `RES_REL` reserve and release a
slave, and `DATA` sends one packet byte. The IM's `HOLD` asks for a transmitter
as soon as its current packet ends, and `CHECK` asks whether the hold has been
granted. `DL_ADDR`, `DL_LO` and `DL_HI` load the control stores. In download
mode (`im_download`) the IM owns every minor cycle and the receivers are
halted.

Bandwidth: each master gets one byte per major cycle. A serial line word also
lasts exactly one major cycle (see below). So one bus slot per receiver keeps
up with one incoming link.

## Transmitters: reservation, sync and packet mode (`transmitter`)

A transmitter is a resource that can be reserved, and it keeps its own
reservation state. It grants `RES_REQ` only when it is free, no IM hold is
pending, and it is not in backoff. It then accepts `DATA` and `RES_REL` only
from the master that reserved it.

On the line a transmitter is always in one of two modes:

- **Sync mode.** The line carries continuous zeros.
- **Packet mode.** This starts with the first data byte. Every 12 clocks a new
  line word starts. The word carries the held byte if the owner delivered one
  in time, otherwise a NULL byte that the receiver drops. The sender therefore
  never has to keep up with the line exactly.

After `RES_REL` the last held byte is sent. Then the line returns to zeros for
`BACKOFF_BITS` clocks (24, a choice), during which the transmitter cannot be
reserved. A pending IM hold is granted at the end of the backoff.

The line word is a choice:

    1, flag, b7 ... b0, 0, 0      (12 bits, MSB first)

The start bit sets the word alignment. The two zero pad bits make one word
last exactly one major cycle.

The state register is one-hot, and any illegal code falls back to free sync
mode. This is how the RTL realises the "fault-tolerant state machine".

## Receivers

Each receiver (`receiver`) chains four parts:

    serial in -> DDU -> buffer register -> microprogram -> 8-word FIFO -> bus interface

### Data detection unit (`ddu`)

The DDU has four parts:

- **Bit FIFO.** Takes the bits that the external data recovery unit strobes in.
- **Shift register.** Frames 12-bit words at the start bit.
- **Depadding unit.** Checks the pad bits, drops NULL bytes and reports SOP and
  EOP.
- **State machine.** Has three modes:
  - SYNC: wait for SOP.
  - PACKET: deliver every byte, SOP and EOP included, so that the
    microprogram can forward them.
  - RECOVERY: entered on a malformed word or on an SOP inside a packet. It
    discards input until an inter-message gap (`GAP_BITS` = 16 zeros, longer
    than any zero run inside a packet) returns it to SYNC.

A gap in PACKET mode means the EOP was lost, and the DDU goes straight back to
SYNC. Both kinds of abort pulse `err`.

While the buffer register still holds an unread byte, the DDU stops at the
next start bit in the bit FIFO. Zeros between words carry nothing and are
still taken, two per clock when two are there. The line delivers a bit on
every clock, so this is what lets a backlog drain in the idle time between
packets. This back-pressure is this design's addition. Without
it, the byte after the routing header is overwritten while the microprogram
waits up to a major cycle per reservation attempt. With it, the 128-bit bit
FIFO (depth is a choice) holds the backlog, which drains during the
inter-packet gap.

### Microsequencer and data unit (`rcv_microsequencer`, `rcv_data_unit`)

The control store holds 64 words of 16 bits and is loaded over the bus. The
instruction register is fetched one clock ahead. Jump targets are read in the
same clock, so the sequencer runs one instruction per clock and a jump costs
no extra clock. The data unit holds:

- an 8-bit accumulator;
- four 9-bit registers R0..R3;
- the buffer register filled by the DDU;
- an ALU (ADD, SUB, AND, OR, XOR, PASS, INC, DEC) with Z, N and C flags.

The instruction kinds are those of the published design. The encoding is a
choice, and the assembler functions are in `hrc_pkg`:

| op | fields | effect |
|----|--------|--------|
| WAIT | event, exception enable, handler | stall until the event. With the exception enabled, a DDU abort jumps to the handler (a pseudo-interrupt). |
| JCC | condition, invert, target | conditional jump. Conditions: flags, ACK of the last bus command, buffer holds SOP or EOP, FIFO empty, user flags F0..F3 and others. |
| JMP | link, target | link saves the return address (one level) |
| RET | | return to the link address |
| ALU | op, source, write-back | ACC <= ACC op source. Write-back also stores the result in the source register. |
| LDC | destination, 9-bit constant | load immediate |
| XFER | source, destination | move data. Sources: ACC, R0..R3, BUF (reading consumes it), STAT, zero. Destinations: ACC, R0..R3, FIFO, bus command register, none. |
| SETF | clear mask, set mask | user flags F0..F3 |

An instruction also stalls in four cases: it reads an empty buffer register,
it pushes into a full FIFO, it writes the bus command register while a
command is still pending, or it jumps on the ACK flag while a command is
still pending. The last rule lets a program test a reservation in the word
right after it issues it.

### Bus interface (`rcv_ts_if`) and FIFO (`rcv_fifo`)

The microprogram writes a command byte `{cmd, addr}` into the bus command
register. The command goes out in the receiver's next slot, and the
acknowledge is latched into the ACK flag. A granted `RES_REQ` makes its
address the *destination*. From then on, every slot with no command pending
carries the FIFO head to the destination as a `DATA` transfer. The word is
popped once the slave acknowledges it. `RES_REL` always goes to the
destination.

So the microprogram only decides and pushes bytes, and the interface streams
them at one byte per major cycle.

## The routing microprogram (`tb/hrc_ucode_pkg.sv`)

`harts_word(a)` returns word `a` of a 64-word program, which fills the
control store. The source picks the
delivery mode for each message in the type byte:

- bit 7 set: circuit switching. The program keeps asking for the first link
  on a shortest path until it gets it, and never buffers the packet.
- bit 6 set: packet switching. The packet always goes to the BMU.
- neither: virtual cut-through, as below.

The three modes can be mixed freely, message by message. The program works
as follows:

1. It forwards SOP and type into the FIFO at once, then reads m0..m2.
2. For the first non-zero m_i it requests transmitter i, or transmitter i+3
   if m_i is negative. On a grant it moves m_i one step towards zero. On a
   refusal it moves on to the next non-zero offset, which is the alternate
   shortest path.
3. If every offset is zero, or every candidate link is busy, it reserves the
   BMU and passes the header on unchanged.
4. It streams the payload until EOP, frees the buffer register at once so
   the next packet can come in, waits for the FIFO to drain and releases
   the reservation.
5. If the DDU aborts the packet, the exception handler closes the forwarded
   packet with an EOP.

The order in which links are tried is set only by this program.

`tee_word(a)` is a second, 16-word program that shows another algorithm
loaded by download. It forwards every packet unchanged on d0 with the tee
bit set, so the BMU gets a copy of each byte in the same bus cycles. This is
the broadcast use of the tee bit.

`src_word(a)` is a 32-word source-directed routing program. Here the three
routing bytes carry the route itself: port numbers 0..5, ended by a marker
byte with bit 7 set. A node sends the packet on the port named by the first
byte and shifts the route one place left, filling in a marker. A packet
whose route has ended, or whose port is busy, goes to the BMU. The program
builds the reservation command at run time (0x10 plus the port number) and
moves it into the bus command register with a Transfer. This route format
is this design's own.

`cube_word(a)` is a 55-word dimension-order program for k-ary n-cubes with
n up to 3. Offset m_i counts the hops still to go in dimension i. Port i is
the + direction of dimension i, and port i+3 the - direction. The packet
always moves in the lowest dimension with a non-zero offset. If that link
is busy the packet goes to the BMU, even when another dimension's link is
free.

## Top level (`routing_controller`)

| port | meaning |
|------|---------|
| `rx_bit[6]`, `rx_valid[6]` | recovered serial bit and strobe from each neighbour's data recovery unit |
| `tx_bit[6]` | serial line to each neighbour's encoder |
| `bmu_req[4]` (`ts_req_t`) | what BMU outbound channel k offers in slot 6+k |
| `bmu_ack` | the BMU inbound channel accepts cycles addressed to slave 6 |
| `im_download`, `im_req` | IM download mode and its offer (slots 10/11, or every cycle in download mode) |
| `bus`, `bus_ack`, `major_start` | the bus as every device sees it. The BMU takes its inbound bytes (address 6 or tee bit set) from here, and the bus-master lines tell which receiver's stream a byte belongs to. |
| `tx_*`, `rcv_*` | status: reserved, packet mode, backoff, NULL sent, DDU abort, refused reservation, exception |

Parameters (defaults): `WCS_DEPTH` 64, `FIFO_DEPTH` 8, `BACKOFF_BITS` 24. The
per-block defaults `GAP_BITS` 16 and `BITFIFO_DEPTH` 128 are set inside `ddu`.

## What is not here

The data encoding and recovery units between the nodes are outside the chip;
their line code and digital PLL are not specified. The BMU, the IM, the buffer
memory and the VMEbus interface belong to the network processor, and the
testbenches model their bus side only. The published design mentions an
integrated test approach but describes no test circuitry; here, testing is
left to microprograms.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at default parameters:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_routing_controller \
        -y rtl -y tb +libext+.sv rtl/hrc_pkg.sv tb/hrc_ucode_pkg.sv tb/tb_routing_controller.sv
    obj_dir/Vtb_routing_controller

`tb_routing_controller` first downloads the program into all six receivers.
It then runs:

- cut-through;
- the alternate link when the first choice is held by the BMU;
- buffering in the BMU when both links are busy;
- arrival of a packet at its destination;
- IM hold and check;
- a teed byte;
- a packet cut short (lost EOP);
- a packet with a corrupted word;
- packet switching requested by the source, with the link free;
- circuit switching, which waits for a held link instead of buffering;
- the broadcast program downloaded into one receiver only;
- the source-directed program in another receiver, following a route and
  delivering a packet whose route has ended;
- the dimension-order program in a third receiver, buffering rather than
  leaving its dimension order.

It counts every mechanism and fails if one never occurs.

`tb_harts_mesh` is a network test. It wires 19 controllers at their default
parameters into the C-wrapped hexagonal mesh of dimension 3. Node s has its
neighbours at s+1, s+8, s+7, s-1, s-8 and s-7 (mod 19) in directions d0..d5.
Transmitter k of a node drives receiver (k+3) mod 6 of the neighbour in
direction k. Each node has a simple BMU model. It re-sends any packet that
was buffered on the way, and records packets that have arrived.

The test first sends the example from node 1 to node 10, with offsets
(1,1,0). It must pass the middle node by cut-through. Then every node sends
to every other node at once, 342 packets in all, and each must arrive once
and intact at its destination. The shortest offsets are found by a search
over |m_i| <= 2, which also confirms the diameter of 2. Under this load,
some hops at intermediate nodes are cut through and the rest are buffered
in that node's BMU and sent on from there. The test requires both to
happen. A third round
mixes cut-through and packet switching, message by message, at the same
load. In a fourth round every node sends one circuit-switched packet while
each node's BMU holds the link those packets need next. The packets wait
at the middle node, are never buffered, and all arrive once the links are
released. The test prints the largest bit FIFO fill seen; with the default
24-bit backoff it stays at 83 of 128 bits under cut-through load. The block testbenches
are `tb_ts_bus`, `tb_transmitter`, `tb_ddu`, `tb_rcv_fifo`,
`tb_rcv_data_unit`, `tb_rcv_microsequencer`, `tb_rcv_ts_if` and
`tb_receiver`. `tb/line_mon.sv` is a separate line-word decoder used to check
the transmitters.

## How far to trust it

All modules pass Verilator lint and elaborate in Yosys/slang, and all
testbenches pass. The structure, the counts (six ports, twelve slots, four
outbound channels, a 64 x 16 control store, an eight-word FIFO, nine data
lines, the tee bit) and the behaviour follow the published design:

- reservation, release, hold and check;
- NULL bytes and backoff;
- sync, packet and recovery modes;
- Wait with an exception handler, and jump with link;
- download over the bus.

The following are this design's own, and would differ from the fabricated
chip:

- the line word and special-byte codes;
- command codes and the download protocol;
- the instruction encoding, events and conditions;
- slot assignment for the IM;
- backoff and gap lengths;
- the bit FIFO depth and its back-pressure role;
- single-clock timing.
- the type-byte encoding of the delivery mode, and the route formats of the
  source-directed and dimension-order programs.

Known limits of this version:

- A receiver streams to one destination at a time. The tee bit can add a
  copy to the BMU, but one receiver cannot relay a packet to two
  transmitters at once. Multi-way broadcast has to go through the BMU.
- Circuit switching here means waiting for the next link without
  buffering. While the program waits, the incoming bytes back up in the
  128-bit bit FIFO, about ten line words. If the upstream node sends more
  than that during the wait, the bit FIFO overflows. The overflow is
  reported on the sticky `bitfifo_ovf` flag, which the program can read in
  STAT. In the mesh test only idle zeros are lost this way, but nothing
  throttles the upstream node.
- The VMEbus side, the buffer memory and the network processor are
  modelled only as bus masters and a bus slave in the testbenches.
