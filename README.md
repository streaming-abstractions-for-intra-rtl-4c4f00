# Streaming host interfaces: an Ensō-style NIC and a Nagare-style PCIe switch

Network cards and accelerators still talk to software in packets and descriptors.
That costs a descriptor read, a buffer pointer and some metadata for each small
message, and it makes the CPU the one that moves data between devices. This RTL
implements two streaming alternatives that stand side by side in one top module:

* **Ensō NIC host interface** (`enso_nic`). The NIC writes received messages back to
  back into a per-application ring in host memory, called an *Ensō Pipe*, as an
  unbroken byte stream. It tells software how far the stream has grown with a
  few *notifications*, not one descriptor per packet. Sending works the same way in
  reverse.
* **Nagare switch dataplane** (`nagare_switch`). This is a programmable PCIe switch. Devices
  write to a stream's address window, and a pipeline of match-action stages decides
  where each message goes and where it lands. For example, it sends a message from the
  NIC to a decryption card, then to an ML accelerator, then back to the NIC, with no
  CPU involvement per message.

`intra_host_top` instantiates both. They share only the clock and reset. Every port of
each is brought out with an `enso_` or `nagare_` prefix.

## Ensō Pipes (receive)

A pipe is a power-of-two ring of 64-byte *flits* in host memory.

* The NIC owns the tail pointer, `Tail_NIC`.
* Software owns the head pointer, `Head_SW`. It reports the head to the NIC with an
  MMIO write once it has consumed data.
* Pointers count flits.
* A pipe is empty when head == tail. One slot always stays free, so the largest
  message that fits is `2**RING_LOG2 - 1` flits.

`enso_pipe_manager` takes messages that arrive on `rx_*` already tagged with their pipe.
Choosing the pipe (RSS or flow rules) happens before this block. For each message it:

1. Checks on its first flit that `rx_len` flits fit in the free space. If not, it drops
   the whole message and counts the drop. It never writes part of a message.
2. Issues one DMA write per flit to `base + ((tail + offset) mod ring) * 64`. Messages
   land contiguously, wrapping at the end of the ring.
3. Advances `Tail_NIC` by the message length on the last flit only. A notification
   therefore never points into the middle of a message.

## Notifications: when the NIC speaks

Software learns about new data from *notification records*. The NIC writes them into a
separate ring in host memory, the RX notification ring. This ring's `signal` bit marks a record
as valid. Software clears the bit when it consumes the record and reports its
notification-ring head by MMIO. Each record holds `{signal, pipe, tail}`.

`enso_notif_engine` makes notifications **reactive**. The rule is per pipe:

* A pipe may have at most one notification that software has not yet reacted to.
* When the pipe's tail has moved past what was last reported and no notification is
  outstanding, the engine emits a notification with the *current* tail.
* A `Head_SW` write to that pipe counts as the reaction. It re-arms the pipe.

While software is busy, any number of messages collapse into one notification. A fast
consumer sees one notification for each message. Pipes that are eligible in the same cycle
are served round robin.

**Notification prefetching** is optional and off by default (`PREFETCH_EN = 0`). With
`PREFETCH_EN = 1`, software can write a pipe number to the prefetch register. The
NIC then sends a notification with that pipe's current tail, whether or not one is
outstanding. This lets software ask about the pipe it will visit next. The request
counter counts requests in both settings.

`enso_notif_buffer` turns a notification into a 64-byte DMA write to
`ring_base + tail * 64`. When the ring is full (`tail + 1 == head`), it holds the
notification back. Every full cycle is counted.

### Ordering

Data writes, notification writes and TX completion writes share one DMA write port
through `stream_rr_arb`. A notification is created only after the arbiter has accepted
every data flit it covers, and the port keeps order. The host link therefore always
carries the data ahead of the notification that announces it. This design assumes the
PCIe core keeps the write order it is given, as posted writes do.

The shared port also sets the receive rate. Minimum-size packets at 100 Gb/s
(148.8 Mpps) need 0.6 data writes per 250 MHz cycle. That leaves 0.4 writes per cycle
for notifications. Reactive notifications stay well below that when software needs
about a PCIe round trip to answer, because many packets then share one notification.
With an instantly answering consumer, each packet would get its own notification, and
the port would fall short.

## Transmit

Software sends in a symmetric way, using the TX notification ring:

1. Software writes a record `{signal=1, addr, len_flits}` into the TX notification ring,
   then writes the new TX ring tail by MMIO.
2. `enso_tx_engine` reads the record by DMA.
3. It reads `len_flits` flits from `addr` by DMA and streams them out on `tx_*`,
   marking the first and last flit.
4. It reports completion by overwriting the record with `signal = 0`.

A record of length 0 completes without sending anything. The engine handles one
record at a time, and each record costs two DMA read round trips. That is enough for
large batched records, but not for line rate with one small packet per record. See
*Departures* below.

## Register map (MMIO writes, 8-byte registers, 20-bit offset)

| Offset | Register |
|---|---|
| `0x0_0000 + 8*p` | `Head_SW` of RX pipe `p` (flits). This also re-arms the pipe's notifications. |
| `0x1_0000 + 8*p` | Base address of RX pipe `p`. |
| `0x2_0000` | RX notification ring head (records consumed by software). |
| `0x2_0008` | RX notification ring base address. |
| `0x2_0010` | TX notification ring tail (records queued by software). |
| `0x2_0018` | TX notification ring base address. |
| `0x2_0020` | Notification prefetch request; data = pipe number. |

The constants are in `rtl/enso_pkg.sv`. The map is this design's own.

## Nagare: streams, stages and the push primitive

The host CPU configures the switch. It does not sit on the data path.

* **Stream table** (`nagare_stream_table`).
  * Each of `NUM_STREAMS` entries opens an aligned address window of `2**size_log2` bytes at `base`.
  * A message whose address falls inside a window belongs to that stream.
  * If two windows overlap, the lowest index wins.
* **Stages** (`nagare_stage`).
  * `NUM_STAGES` stages, each holding one instruction and one 64-bit register per stream.
  * A message of a stream runs that stream's instruction as it enters a stage.
  * Messages outside every stream pass through unchanged.
* **Instructions** (`nagare_pkg::op_e`):

  | Instruction | Effect |
  |---|---|
  | `OP_SET_DST` | Picks the egress port. |
  | `OP_SET_ADDR` | Replaces the address. |
  | `OP_ADD_ADDR` | Offsets the address. |
  | `OP_SET_KIND` | Changes the message type. |
  | `OP_PUSH` | Streaming write; see below. |

* **Push.** `OP_PUSH` sends the message to a port and sets its address to `imm + reg`. It then
  advances `reg` by the payload length, modulo `2**wrap_log2`. Consecutive messages of a
  stream therefore fill the receiving device's input ring back to back. The sender never
  learns or manages the receiver's buffer pointers.
  * Writing a stream's instruction resets that stage's register for the stream.
  * A chain of devices is one stream per hop. Each stream pushes to the next device's
    ring. The NIC → decryption → inference → NIC example uses three streams.
* **Ingress and egress.** Ingress is a round-robin merge of the `NUM_PORTS` ports, and it
  stamps `src_port`. Egress goes by `dst_port`.
* **Timing.**
  * Each stage takes exactly `STAGE_CYCLES` cycles, so a message leaves exactly
    `NUM_STAGES * STAGE_CYCLES` cycles after it entered. With the defaults of 10 stages of
    10 cycles, that is 100 cycles, or 33 ns at a 3 GHz switch clock.
  * The switch accepts one message per cycle.
  * If the message at the end of the pipeline cannot leave because its egress port is not
    ready, the whole pipeline and the ingress stall until it can. `stall_cycles` counts
    these cycles.

Configuration ports:

* Table entries are written with `tbl_cfg_valid`, `tbl_cfg_index` and `tbl_cfg_entry`.
* Instructions are written with `ins_cfg_valid`, `ins_cfg_stage`, `ins_cfg_stream` and
  `ins_cfg_instr`.
* A write takes effect on the next message.

## Parameters

| Module | Parameter | Default | Origin |
|---|---|---|---|
| `enso_nic` | `NUM_PIPES` | 16 | chosen |
| | `PIPE_RING_LOG2` | 15 (2 MiB per pipe) | chosen |
| | `NOTIF_RING_LOG2`, `TX_RING_LOG2` | 10 | chosen |
| | `PREFETCH_EN` | 0 | prefetching is off by default in Ensō |
| `nagare_switch` | `NUM_STAGES` | 10 | Nagare sizing example |
| | `STAGE_CYCLES` | 10 | Nagare sizing example |
| | `NUM_PORTS` | 4 | chosen |
| | `NUM_STREAMS` | 16 | chosen |

The top repeats these parameters with `ENSO_` and `NAGARE_` prefixes.

Widths are set in the packages:

* Ensō: flits are 512 bits and addresses are 64 bits.
* Nagare: payloads are 256 bits and lengths are 13-bit byte counts.

A 512-bit flit at 250 MHz gives 128 Gb/s, which is above a 100 Gb/s line.

## Departures and limits

* **Chosen by this design.** The document does not specify these parts:
  * the register map
  * the notification and TX record layouts
  * the drop-whole-message policy
  * the arbitration
  * the Nagare message format, instruction set, stream-window shape and global stall
* **Not built:**
  * Packet steering to pipes. The pipe number is an input.
  * The PCIe core, the Ethernet MAC and the host memory. Their streams are ports.
* **Not built in Nagare:**
  * Messages generated by the switch itself.
  * Adaptation to accelerators that only accept command-queue descriptors.
  * Ordinary PCIe address routing. Non-stream messages keep the `dst_port` they came
    with.
* **TX throughput.** Only one record is in flight at a time. At 250 MHz with about
  190 cycles per PCIe round trip, a record of B flits takes about 380 + B cycles.
  Small records cannot reach 100 Gb/s. A pipelined engine would keep several record
  and data reads outstanding.
* **Timing closure.** Timing at 250 MHz (Ensō) and 3 GHz (Nagare) has not been
  checked. The Nagare stage latency is a fixed register delay, so the latency is correct
  by construction, but the logic per stage has not been balanced.

## Files

`rtl/`:

* `enso_pkg.sv`, `nagare_pkg.sv`: shared types and constants.
* `stream_rr_arb.sv`: round-robin valid/ready merge with grant hold.
* `enso_pipe_manager.sv`, `enso_notif_engine.sv`, `enso_notif_buffer.sv`,
  `enso_tx_engine.sv`, `enso_nic.sv`: the NIC host interface.
* `nagare_stream_table.sv`, `nagare_stage.sv`, `nagare_switch.sv`: the switch.
* `intra_host_top.sv`: the top.

`tb/`:

* There is one self-checking testbench per module, `tb/tb_<module>.sv`. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/enso_host_model.sv` is a behavioural host. It is used by the NIC and top tests and
  provides:
  * host memory answering DMA;
  * a software receive loop that polls notifications, checks every flit and writes
    `Head_SW`;
  * optional slow-consumer and prefetch modes;
  * a transmit queue.
* `tb_intra_host_top` runs the whole top end to end, at small NIC ring sizes so that
  drops and a full notification ring happen quickly. It counts each mechanism and fails if
  one never happened:
  * pipe-full drops
  * notification coalescing
  * prefetches
  * notification-ring full
  * TX completions
  * stream routing and push-pointer wrap
  * pass-through messages
  * egress stalls
* `tb_intra_host_full` runs the same kind of traffic through the top with every
  parameter at its default.
* `tb_enso_line_rate` offers 64-byte packets at 148.8 Mpps to the NIC at its default
  size. The packets are spread over 8 pipes, and software answers with a delay of up to
  one PCIe round trip. The test checks that the NIC accepts the packets at least at that
  rate, without drops and with coalesced notifications.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert --top-module tb_intra_host_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/enso_pkg.sv rtl/nagare_pkg.sv tb/tb_intra_host_top.sv -o sim
./obj_dir/sim +verilator+seed+1
```

To run another test, replace `tb_intra_host_top` with its name, for example
`tb_enso_notif_engine` or `tb_nagare_switch`. Each test has a watchdog and ends with
`$finish`. Tests draw their stimulus from `$urandom`, so different seeds give different
traffic.
