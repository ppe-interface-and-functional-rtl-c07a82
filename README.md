# PPE — a Protocol Processing Engine for a workstation-cluster network interface

The PPE sits between a workstation's I/O bus and a cluster interconnect
fabric and runs a *sender-based* message protocol in hardware. The sender
decides where a message lands in the receiver's memory: every packet names a
receive slot (an *rslot*) on the destination node and a byte offset inside
the buffer that slot describes. The receiving PPE checks the packet against
the slot and copies the payload straight into host memory. It keeps a count
of the bytes still expected, and when the count reaches zero it tells
software. Software is told by appending a *notification object* to a linked
list in host memory and, optionally, by pushing a token on a queue that
raises an interrupt. No host CPU cycles are spent per packet on either side.

This repository holds synthesizable SystemVerilog for the whole PPE, plus a
self-checking testbench for every block and an end-to-end testbench. The
host bus bridge, the fabric and the host itself are outside the design. They
appear as ports on the top level and as behavioural models in the
testbenches.

## Block structure

```
            host bus (hs_*)                         host memory (hm_*)
                 |                                         ^
            +----v-----+   go_set                 +--------+--------+
            | ppe_regs |-----------+              |  host arbiter   |
            | NQR AQR  |           |              | sender/copy/    |
            | NBQR irq |           |              | notify          |
            +-+------+-+           |              +--^-----^-----^--+
      port A  |      | port A      |                 |     |     |
        +-----v--+ +-v---------+   |                 |     |     |
        |XMT RAM | | RCV RAM   |   |                 |     |     |
        | 32 KB  | | 64 KB     |   |                 |     |     |
        +---+----+ +-----+-----+   |                 |     |     |
     port B |     port B | <- RCV arbiter (rcv_pkt / copy / notify)
        +---v-----------+|         |                 |     |     |
        | ppe_sender    |<---------+-----------------+     |     |
        +---+-----------+|                                 |     |
            v            |                                 |     |
   ppe_sync_fifo_crc     |    ppe_rcv_pkt -> ppe_copy -----+     |
     (inserts CRCs)      |   (checks CRCs)  (validate, copy)     |
            |            |         ^            | note requests  |
            v tx_*       |         | rx_*       v                |
          fabric         |       fabric    ppe_notify -----------+
```

| Module | Role |
|---|---|
| `ppe_top` | Wires everything together. Applies PCSR0.reset. Derives PCSR1.ready and idle. |
| `ppe_regs` | Host register window. Holds the three 256-entry token queues and the interrupt bits. Gives the host indirect and paged access to both RAMs. |
| `ppe_fifo` | First-word-fall-through queue. Used for NQR, AQR and NBQR, and as the storage of the transmit FIFO. |
| `ppe_dpram` | Dual-port word RAM with req/ack ports. Two instances: XMT_RAM (8192 words) and RCV_RAM (16384 words). |
| `ppe_mem_arb` | Round-robin arbiter for one req/ack target. |
| `ppe_sender` | Packetizer. Serves the send descriptors round robin, one packet per active descriptor per turn. |
| `ppe_sync_fifo_crc` | Transmit FIFO. Fills in the header and body CRC16 fields as the packet passes. |
| `ppe_rcv_pkt` | Writes an incoming packet into the RCV_RAM packet buffer and checks both CRC16s. |
| `ppe_copy` | Validates a packet against PCSR0 and its rslot. Copies the payload to host memory, keeps the rslot counters, and raises AQR entries and notification requests. |
| `ppe_notify` | Appends notification objects to host-memory lists and feeds the NQR. |
| `ppe_pkg` | Shared structs, offsets and the CRC16 function. |

### Internal bus

Every memory-like connection uses one bundle from `ppe_pkg`:
`mem_req_t {req, we, addr, wdata}` and `mem_rsp_t {ack, rdata}`.

- The requester holds `req` and the other fields steady until the target
  answers with a one-cycle `ack`.
- Read data is valid in the ack cycle.
- Addresses are byte addresses, and all accesses are whole 32-bit words.
- `ppe_dpram` acks one cycle after the request, so a port does one access
  every two cycles.
- The host memory port (`hm_*`) may take any number of cycles.

## Host view: registers and memory

The host sees a 1 KB register window. All fields are packed big-endian: the
first field listed is the most significant bit.

| Offset | Register | Behaviour |
|---|---|---|
| 0x000 | PCSR0 | `reset`(31), `enable`(30), `incarnation`(19:16), `local_node_num`(15:0). |
| 0x004 | PCSR1 | `ready`(31), `int_hi`(30), `int_lo`(29), `idle`(28), `nbqr_empty`(27), `nbqr_full`(26), `send_desc_cnt`(19:16). A write loads `int_hi` and `int_lo`, so writing 0 clears them. |
| 0x008 | NLHR | Byte address in RCV_RAM of the notification list heads table. |
| 0x014 | NQR | A read pops one notification token. An empty queue reads 0. |
| 0x018 | AQR | A read pops one acknowledgement (an rslot number). An empty queue reads 0. |
| 0x01C | NBQR | A write pushes the address of one free notification object. Writes to a full queue are ignored. |
| 0x040/44/48 | PXR_Ptr / PXR_MEM / PXR_MEM_INC | XMT_RAM access: set the pointer, access the word it points at, or access it and then add 4. |
| 0x080/84/88 | PRR_Ptr / PRR_MEM / PRR_MEM_INC | The same for RCV_RAM. |
| 0x100-0x1FC | send descriptors | XMT_RAM 0x0000-0x00FC. |
| 0x200-0x2FC | XMT page | XMT_RAM address {PXR_Ptr[15:8], offset[7:0]}. |
| 0x300-0x3FC | RCV page | RCV_RAM address {PRR_Ptr[15:8], offset[7:0]}. |

Interrupts:

- `int_hi` is set when the AQR goes from empty to non-empty.
- `int_lo` is set when the NQR does the same.
- `irq` is the level `int_hi | int_lo | nbqr_empty`.

Memory maps:

- **XMT_RAM.** Four 16-word send descriptors at 0x40·d, then DIO message
  buffers from 0x0100.
- **RCV_RAM.** rslot *i* sits at 32·*i* (1024 slots fill 0x0000-0x7FFF). The
  notification table goes wherever NLHR points, below 0xF000. The packet
  buffer is fixed:
  - header words at 0xFF00;
  - metadata at 0xFF10;
  - payload at 0xFF80-0xFFFC.

## Sending

A send descriptor is 16 words:

| Word | Field |
|---|---|
| 0 | `msg_address`. The host physical address for a DMA message; the XMT_RAM address for a DIO message. |
| 1 | `address0`. Fabric routing bits and the 12-bit destination node. |
| 2 | `address1`: `dst_slot`, `note_index` |
| 3 | `control0`: `use_msg_size`, `use_msg_offset`, `ack_pkt`, `incarnation`, `remote_offset` |
| 4 | `status1`: `bytes_to_go` |
| 5 | `control1`: `direct_io`, `control_pkt`, `notify`, `go`, `meta_data`, `meta_cnt`, `msg_size` |
| 6 | `status2`: `busy`, `stalled`, `done` |
| 8-11 | metadata |

Software starts a message by writing control1 with `go` set. That write
carries the message size. `ppe_regs` watches host writes to the control1
words, whatever path they take, and pulses `go_set` for that descriptor. The
sender then does three things:

- loads `bytes_to_go` from `msg_size`;
- clears busy, stalled and done;
- from then on, counts the descriptor as active whenever `go` is set and
  `done` is clear.

The sender visits the descriptors in turn. For each active one it builds and
sends one packet:

```
address0 | address1 (src_node filled in) | control0 | control1 | control2 |
[4 metadata words] | payload (<= 32 words) | trailer
```

- Metadata goes only into the first packet of a message, and only when
  `meta_data` is set.
- A payload word comes from host memory (DMA) or from XMT_RAM (DIO, when
  `direct_io` is set).
- A control packet carries no payload.

After the trailer the sender writes back the descriptor:

- `msg_address` and `remote_offset` are advanced by the bytes sent;
- `use_msg_size` and `use_msg_offset` are cleared, so later packets neither
  reset the receiver's counters nor move its message offset;
- `bytes_to_go` is reduced by the bytes sent;
- status2 is updated.

When the message is done and `notify` is set, the sender asks for a
transmission-completion notification. The note_index in that request is cut
to 9 bits.

The header checksum is the upper half of control2, and the body checksum is
the upper half of the trailer. The sender leaves both zero.
`ppe_sync_fifo_crc` fills them in while the packet streams through:

- **CRC-16-CCITT:** polynomial 0x1021, initial value 0xFFFF, each 32-bit word
  fed MSB first.
- **Header CRC:** covers header words 0-3.
- **Body CRC:** covers every word between control2 and the trailer, which is
  the metadata and the payload.

## Receiving

`ppe_rcv_pkt` accepts one packet at a time into the packet buffer. It works
out the packet length from the number of words received. It stores the
payload one word late, so the trailer never reaches the RAM. A payload over
32 words is flagged. Then it hands the packet to `ppe_copy`, which checks it
in this order and stops at the first failure:

1. header CRC;
2. body CRC;
3. `dst_node == local_node_num`;
4. `dst_slot < NUM_RSLOTS`;
5. the rslot is read (8 words), then: `valid`, then the packet's
   incarnation against PCSR0.

What happens next:

- **Ack packet.** Raises a notification on the rslot's `ack_note_index`. The
  notification has `ack_pkt` set and carries the packet's offset and size.
  The rslot is left alone.
- **Data packet.** Checked for `bad_offset` and `bad_size` against
  `buffer_size`. Its payload is copied to `buffer_base_phys +
  remote_offset`.
- **rslot bookkeeping.** `use_msg_size` stores the message size and adds it
  to `bytes_to_go`, which may go negative while packets arrive out of order.
  `use_msg_offset` stores the message offset. Each packet then subtracts its
  byte count.
- **Message complete** (`bytes_to_go` reaches 0). If `do_acks` is set, the
  rslot number goes on the AQR. If `notify` is set, a message-received
  notification is posted on the rslot's `note_index`.
- **Failed check.** Posts an error notification on list 0. The notification
  carries one error bit: invalid_rslot, rslot_range, bad_dst_node,
  bad_offset, bad_size, bad_hdr_chksum, bad_body_chksum or bad_incarnation.

## Notification lists

This is the subtlest part, because software reads the lists while the PPE
appends to them without any lock.

Each list is a singly linked chain of 32-byte objects in host memory:

| Words | Content |
|---|---|
| 0-2 | type-specific |
| 3 | `next` |
| 4-7 | optional metadata |

Each entry of the table at NLHR holds two words:

- the address of the list's last object, which is always empty;
- `{token[31:1], enqueue}`.

Software keeps the NBQR stocked with free objects.

To post notification *i*, `ppe_notify`:

1. reads entry *i* (head, token);
2. pops a fresh object from the NBQR, waiting while the queue is empty;
3. writes the three type words, and the metadata if any, into the empty
   object that *head* points at;
4. writes the fresh object's address into that object's `next`. This is
   always the last write, because a non-zero `next` is what tells software
   the object is complete;
5. stores the fresh object as the entry's new head;
6. if `enqueue` is set, pushes the token on the NQR. It waits while the NQR is
   full, because tokens are never dropped.

Software walks a list from its own pointer until it finds `next == 0`. It
never touches the object the PPE will write next.

## Reset and status

- `rst_n` is the hardware reset.
- PCSR0.reset is the soft reset. While it is set, it holds every engine, the
  transmit FIFO and the three queues in reset.
- When the soft reset is cleared, the sender writes `done` into every
  descriptor, and then PCSR1.ready rises.
- `idle` means no packet is being sent, received, copied or notified.
- Clearing PCSR0.enable stops new packets in both directions. A packet
  already under way is finished.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_SD` | 4 | send descriptors |
| `QUEUE_DEPTH` | 256 | entries in each of NQR, AQR and NBQR |
| `XMT_WORDS` | 8192 | XMT_RAM size (32 KB) |
| `RCV_WORDS` | 16384 | RCV_RAM size (64 KB) |
| `NUM_RSLOTS` | 1024 | rslots checked by the range test |
| `MAX_PKT_WORDS` | 32 | largest payload per packet |
| `TX_FIFO_DEPTH` | 64 | transmit FIFO depth (this design's choice) |

## Where this design makes its own choices

The specification defines the data structures, the register map and the
protocol steps. The following points are decisions of this design:

- **CRC.** The polynomial and the coverage of each checksum (see Sending).
- **Fabric interface.** Words with valid/ready/last, one clock domain
  throughout.
- **Starting a message.** A go write reloads `bytes_to_go` from `msg_size`.
  To resume an interrupted message, software writes the remaining byte count
  as `msg_size` together with go.
- **Stalled.** Means that the last packet had to wait for fabric
  back-pressure while the message was not yet done. A packet that is under
  way when go is cleared is always completed.
- **Metadata.** Always four words, sent with the first packet. In a
  message-received notification it appears only when it arrived in the
  packet that completes the message, because the rslot has no room to keep
  it.
- **Error checks.** They stop at the first failure, so an error notification
  has exactly one bit set. The rslot range test rejects
  `dst_slot >= NUM_RSLOTS`.
- **Ack flag placement.** A notification's `ack_pkt` flag is bit 29 of its
  word 1, the same position as in packet control0.
- **Token.** The NQR token is the 31-bit token, zero-extended.
- **Queue storage.** The three queues are separate arrays rather than part of
  RCV_RAM. Host behaviour is the same, and there are fewer RAM port
  conflicts.
- **Interrupt bits.** `int_hi` and `int_lo` are cleared by a host write to
  PCSR1. `irq` is a level output.
- **Notification writes.** A notification object is written to host memory
  one word at a time, not as a single burst, so that the `next` word can be
  ordered last on a simple word bus.
- **Not implemented.** Handling of non-data packets from the fabric, such as
  link or configuration packets. Their format is not defined here, so
  `ppe_rcv_pkt` treats every packet as a data packet.

## Verification

Every module except the arbiter has a self-checking testbench, `tb/<module>_tb.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_host_mem.sv` models host memory with a configurable latency, and
`tb_crc_pkg.sv` holds an independent byte-wise CRC16 reference.

`ppe_top_tb` runs the whole PPE at its default parameters. It loops the
transmit stream back to the receiver with random back-pressure. It then
checks the following:

- two-packet DMA transfers with metadata;
- a DIO transfer;
- an ack packet and a control packet;
- an error packet (wrong destination node);
- round-robin descriptor service and fabric stalls;
- AQR and NQR tokens, interrupt bits and descriptor status;
- the contents of host memory and of every notification object;
- a soft reset;
- a DMA transfer whose go bit is cleared while a packet is stalled by the
  fabric. The test checks the saved progress and that no further packet is
  sent, then resumes the transfer with the remaining size;
- notifications that wait for software to refill an empty NBQR;
- the ends of the default tables: rslot 1023 with list head 1023, rslot 1024
  rejected as out of range, and a send note_index above 9 bits.

It counts each mechanism and fails if any count stays at zero.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ppe_pkg.sv tb/tb_crc_pkg.sv rtl/ppe_fifo.sv rtl/ppe_dpram.sv \
  rtl/ppe_mem_arb.sv rtl/ppe_regs.sv rtl/ppe_sender.sv \
  rtl/ppe_sync_fifo_crc.sv rtl/ppe_rcv_pkt.sv rtl/ppe_copy.sv \
  rtl/ppe_notify.sv rtl/ppe_top.sv tb/tb_host_mem.sv tb/ppe_top_tb.sv \
  --top-module ppe_top_tb -o sim
./obj_dir/sim
```

For a single block, list `ppe_pkg.sv`, the block, what it instantiates and
its testbench in the same way. The testbenches initialise every variable
they read, so they behave the same under any random initial state.
