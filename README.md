# Store-and-forward 1×3 packet router (with a carry-save adder alongside)

This RTL implements a small packet router for an on-chip network. It has one
8-bit input port and three 8-bit output ports. Each packet carries its
destination address in its first byte and a check byte at its end. The router
keeps every packet until the whole packet has arrived, then checks the check
byte and the length. A packet that passes is copied into the output queue of
the port whose address it names. A packet that fails is thrown away and
reported. The three ports share one path from the input store to the output
queues, and a rotating-priority arbiter decides which waiting packet uses it
next.

The design follows a published description of an FPGA router. That
description gives the port structure, the 8-bit widths, the 1–63 byte payload,
a frame check over header and data, a finite-state-machine controller,
store-and-forward flow control, rotating priority, and input plus output
buffering. It does not give signal timing, encodings, buffer sizes or the
check code. Those are this design's own choices, and each is marked below and
in the file headers.

The same top level also holds a separate 4-bit, three-operand carry-save adder.
The description draws it as its system figure but never relates it to the
router. It stands beside the router with its own ports.

## Packet format

| byte          | meaning                                                                 |
|---------------|-------------------------------------------------------------------------|
| 0             | destination address (DA), 8 bits                                        |
| 1 … n         | payload, n = 1 … 63                                                     |
| n + 1         | frame check sequence (FCS) = XOR of bytes 0 … n                         |

So a packet is 3 to 65 bytes long. The XOR code is this design's choice: the
source only says that the check covers header and data. Each output port owns
one 8-bit address (parameter `PORT_ADDR`; defaults `8'h00`, `8'h01`, `8'h02`
for ports 0, 1, 2).

## The input port handshake

```
clock         _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
packet_valid  __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
data          --< DA  >< D1 >< .. ><FCS>-------
suspend_data  ___/‾‾‾\______________________      (only if DA's slot is busy)
```

* A byte is taken at a rising edge where `packet_valid` = 1 and
  `suspend_data` = 0.
* A packet is the run of bytes taken while `packet_valid` stays high. It ends
  at the first cycle with `packet_valid` low. Packets therefore need at least
  one idle cycle between them.
* `suspend_data` can only be high while a header byte is on `data`. It means
  "the slot for that address still holds an unforwarded packet". The source
  must hold the header until `suspend_data` falls. Once the header is taken,
  the rest of the packet is never suspended. `suspend_data` depends
  combinationally on `data` and `packet_valid`.
* `err` pulses for one cycle, one cycle after a packet ends, when the packet
  failed its FCS or had fewer than 3 or more than 65 bytes. That packet is
  discarded.
* A packet with a correct FCS whose DA matches no port is discarded silently.

The framing and the meaning of `suspend_data` and `err` are this design's.
The source names these pins but describes none of them.

## Inside the router

```
            +--------------+     +-------------------+     +--------------+
 data ----->| input_buffer |---->|  switch_fabric    |---->| sync_fifo 0  |--> port 0
            | slot 0,1,2   |     | (1 -> 3 demux)    |---->| sync_fifo 1  |--> port 1
            +--------------+     +-------------------+---->| sync_fifo 2  |--> port 2
                   ^  full/len            ^ req/sel              |
                   |                      |                      | full
            +------+----------------------+----------------------+
            | router_controller: receive FSM, forward FSM,       |
            | route_table, fcs_checker, rr_arbiter               |
            +----------------------------------------------------+
```

**Input store (`input_buffer`).** The store has one slot per output port;
each slot is in effect a virtual channel for that port. A slot holds one whole
packet, up to 65 bytes, at a stride of 128 bytes in a single array. A header
goes to the slot of the port it addresses, so a packet for a busy port never
blocks packets for the other ports. The array has one write port for the packet
being received. It also has one asynchronous read port, in distributed-RAM
style, for the packet being forwarded. Per slot, a `full` flag and a length are
kept.

**Receive FSM (`router_controller`, states RX_IDLE/RX_BODY).**
* In RX_IDLE, `route_table` decodes the header. Unless that slot is busy, the
  header is written to byte 0 of the slot and loaded into `fcs_checker`.
* In RX_BODY, each byte is written to the next position and XORed into the
  check. Bytes past 65 are not stored and mark the packet too long.
* When `packet_valid` drops, the packet is judged.
  * A good packet is committed: the slot's `full` flag and length are set.
  * A bad packet leaves the slot free and raises `err`.

**Forward FSM (TX_IDLE/TX_MOVE).**
* In TX_IDLE, `rr_arbiter` grants one full slot. The granted slot then gets the
  lowest priority, so each port is served within three grants.
* In TX_MOVE, the slot is read one byte per cycle. `switch_fabric` writes each
  byte into the port's `sync_fifo` with a *last* flag on the FCS byte.
* While that FIFO is full the transfer pauses on the same byte (a stall).
* After the last byte the slot is released and can take the next packet for
  that port.

Only one packet moves from the store to the FIFOs at a time. This is where the
rotating priority matters. The source also mentions "four simultaneous
parallel connections", which does not fit its own one-in/three-out structure.
This design follows the structure.

**Output ports (`sync_fifo`).** Each port has a 64-entry, 9-bit FIFO
(first-word fall-through). `valid_out_N` = FIFO not empty, `data_out_N` is the
oldest byte, and `read_enb_N` takes it at the clock edge. `last_out_N` marks
the FCS byte of each packet. It is an addition to the described pin list: the
header holds only an address, so a reader needs it to find packet ends. The
output carries the whole packet, header and FCS included.

## Timing

Take t as the edge that takes the FCS byte. `packet_valid` is then low in the
cycle after t.

| edge  | event                                                        |
|-------|--------------------------------------------------------------|
| t + 1 | packet judged; committed to its slot (or `err` set)          |
| t + 2 | arbiter grant, forward FSM enters TX_MOVE                    |
| t + 3 | header written to the output FIFO, `valid_out` high after it |
| …     | one byte per cycle while the FIFO has room                   |

A packet of L bytes occupies the forward path for L + 1 cycles, plus any
stalls. With the reader always ready, it leaves its port on L consecutive
cycles. The source gives no latency or throughput numbers to compare with.

## The carry-save adder (`csa_adder`, `full_adder`)

`{csa_cout, csa_s} = csa_x + csa_y + csa_z` for three 4-bit operands. It is
combinational and works in two rows:

1. The first row of full adders (FA0–FA3) reduces each bit position i to a sum
   bit SS(i) and a carry C(i), with no carry chain. SS(0) is result bit S(0).
2. The second row (FA4–FA7) is a ripple adder. Cell FA(4+i) adds SS(i+1),
   C(i) and the carry from the cell below. A constant 0 takes the place of the
   missing SS(4) at the top, and the carry-in at the bottom is 0. The top
   cell's carry is Cout.

The cell names, the operand names and the 0 entering the top cell come from
the original drawing. The rest of the wiring is the standard structure those
names imply. The width is the parameter `N` (default 4).

## Parameters

| module          | parameter    | default              | origin                   |
|-----------------|--------------|----------------------|--------------------------|
| router_pkg      | DATA_W       | 8                    | described                |
| router_pkg      | NUM_OUT      | 3                    | described                |
| router_pkg      | MAX_PAYLOAD  | 63 (MIN_PAYLOAD 1)   | described                |
| router_1x3      | PORT_ADDR    | 8'h00, 8'h01, 8'h02  | own choice (values)      |
| router_1x3      | FIFO_DEPTH   | 64                   | own choice               |
| input_buffer    | IDX_W        | 7 (128-byte slots)   | own choice               |
| csa_adder       | N            | 4                    | from the drawing         |

`router_system` passes `PORT_ADDR`, `FIFO_DEPTH` and `CSA_N` down. Changing
`NUM_OUT` needs edits to `router_system`'s flat port list. The rest of the
router is written for any port count.

## Files

| file                         | content                                           |
|------------------------------|---------------------------------------------------|
| `rtl/router_pkg.sv`          | constants, `flit_t`, FCS function                 |
| `rtl/router_system.sv`       | top: router + adder, flat ports                   |
| `rtl/router_1x3.sv`          | router                                            |
| `rtl/router_controller.sv`   | receive and forward FSMs                          |
| `rtl/input_buffer.sv`        | packet slots                                      |
| `rtl/route_table.sv`         | DA → port                                         |
| `rtl/fcs_checker.sv`         | XOR check accumulator                             |
| `rtl/rr_arbiter.sv`          | rotating-priority arbiter                         |
| `rtl/switch_fabric.sv`       | store → FIFO demultiplexer                        |
| `rtl/sync_fifo.sv`           | output FIFO                                       |
| `rtl/csa_adder.sv`, `rtl/full_adder.sv` | carry-save adder                       |
| `tb/tb_<module>.sv`          | self-checking testbench per module                |

Concurrent assertions check the internal handshakes:
* no FIFO write while the FIFO is full;
* no commit of, or write into, an occupied slot;
* `suspend_data` only on a header;
* transfers only from a full slot.

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_router_system \
          rtl/router_pkg.sv tb/tb_router_system.sv -Mdir obj -o sim
./obj/sim
```

Use the same pattern for the other `tb_*` modules.

* `tb_router_system` runs the top at its default parameters and finishes in
  well under a second. It covers:
  * a latency and rate check;
  * back-to-back maximum-size packets while the readers are stopped, so that
    the slots fill, the source is suspended and the arbiter must choose;
  * FCS, too-long and too-short errors;
  * an unknown address;
  * minimum-size packets;
  * several hundred random packets under varying read rates;
  * all 4096 adder inputs.

  A scoreboard predicts every output byte, every `err` pulse and every drop.
  The test also fails if one of those situations never occurred.
* `tb_router_throughput` saturates the router with back-to-back packets of
  one size to the three ports in turn, while the readers are always ready. It
  checks that the source is never suspended and that all data arrives. It
  also checks that N packets of L bytes take exactly N·(L+1) + L + 2 cycles
  (60 maximum-size packets: 4027 cycles). That is one packet per L + 1
  cycles, the input port's own limit.
* `tb_router_1x3` repeats this on the router alone, with 8-entry FIFOs and
  other port addresses.
* `tb_router_controller` drives the controller against port models that
  accept bytes at random.

## How far to trust it

* All modules pass Verilator lint and elaborate with slang, and every
  testbench passes. Each testbench was also shown to fail against a
  deliberately broken copy of its module.
* Nothing here has been run on an FPGA or timed.
* The source reports 74 four-input LUTs and 24 latches for its router. This
  design stores 4800 memory bits: three 128-byte slots and three 64×9 FIFOs.
  That alone is roughly 300 LUTs of distributed RAM, so the area figure is
  not reproduced. If area matters, reduce `FIFO_DEPTH` and `IDX_W`. `IDX_W`
  must still cover 65 bytes if maximum-size packets are to be kept.
* The source also mentions the following, none of which is built here because
  nothing about them is specified:
  * a bidirectional network channel that reconfigures itself;
  * a control processor, firmware ROM and network interface hardware;
  * dynamically updated routing tables.
