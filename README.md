# minFlash in SystemVerilog

This is a SystemVerilog model of minFlash, a clustered flash array. Each minFlash device is a
flash board with its own controller. Devices are chained in a linear array by
controller-to-controller links. Every host sees the whole array as raw flash with these
operations:

- **ReadPage**, **WritePage** and **EraseBlock**, each taking (tag, device, bus, chip, block, page).
- **Ack(tag, status)**, with status OK, bad block, or uncorrectable.

A host can reach any device. The network routes requests and responses, so the host does not
see whether a page is local or remote.

## Structure

```
minflash_cluster                 NDEV devices in a line, device d linked to d-1 and d+1
└── minflash_device (x NDEV)
    ├── flash_router             host <-> controller <-> network, tag renaming
    │   ├── tag_table            free controller-tag queue + ctag -> {host tag, source} table
    │   ├── sync_fifo            LocQ (local requests), RemQ (requests for other devices)
    │   ├── vc_merge_split (x4)  read data, ack, write request, write data paths
    │   └── rr_arbiter           rotating priority on every merge
    ├── flash_controller         requests split by bus, responses merged
    │   └── bus_controller (x NBUS)
    │       ├── scoreboard       per-chip state, priority round-robin operation choice
    │       ├── nand_io          command/address/data/status byte sequences on the bus
    │       ├── rs_encoder       RS(255,243) parity on the write path
    │       └── rs_decoder       RS(255,243) correction on the read path
    └── net_node                 linear-array router, 5 virtual channels, credits
```

Shared types are in `minflash_pkg.sv`:

- the request, data and ack structs;
- the network flit;
- the NAND bus bundle;
- the address widths.

Galois-field arithmetic is in `rs_pkg.sv`.

## Defaults

| Parameter | Default | Meaning |
|---|---|---|
| `NDEV` | 4 | devices in the array |
| `NBUS` | 8 | buses per device |
| `NCHIP` | 8 | chips per bus |
| `PAGE_BYTES` | 8192 | page size in bytes |
| `NTAG` | 128 | controller tags per device; host tags are 7 bits too |
| `LOCQ_DEPTH` | 128 | depth of the local request queue |
| `REMQ_DEPTH` | 128 | depth of the remote request queue |
| `VC_DEPTH` | 8 | flits buffered per virtual channel per link input |
| `POLL_INTERVAL` | 64 | cycles between status polls of a busy chip |

Addresses are sized for 512 GB per device:

- 4-bit device ID;
- 3-bit bus, 3-bit chip;
- 12-bit block (4096 blocks of 256 pages);
- 8-bit page.

The design assumes one NAND bus byte per clock. The prototype's 1.6 GB/s over 8 buses is
200 MB/s per bus, so the intended clock is 200 MHz.

## How a request flows

1. **Host port.** A host sends a request on `h_req` with its own tag.
2. **Split in the router.** A request for another device is queued in RemQ and sent on the
   request virtual channel. A request for this device, or one arriving from the network, is
   merged into LocQ.
3. **Tag renaming.** At the head of LocQ the request takes a free controller tag (ctag).
   - The original host tag and the source device are stored under the ctag.
   - Two hosts may therefore use the same tag on one device at the same time.
4. **Bus controller.** The flash controller passes the request to the bus controller named by its
   bus field. The scoreboard there keeps one operation per chip.
5. **Scheduling.** Each time the bus is free, the scoreboard picks the next bus action over all
   chips:
   - command and address bursts and status polls come before page data transfers;
   - older operations come before newer ones;
   - a rotating pointer breaks ties.

   While one chip is busy in its array operation (read, program or erase), the bus serves
   other chips. A busy chip is polled with the read-status command every `POLL_INTERVAL` cycles.
6. **Reads.** The page is read out through the RS decoder.
   - The 8192 bytes are stored as 33 codewords of 243 data bytes and one shortened codeword of
     173 bytes, each with 12 parity bytes: 8600 bytes per page.
   - The decoder corrects up to 6 bad bytes per codeword.
   - An error-free codeword passes with no added delay. One with errors takes about 270 more
     cycles: Berlekamp-Massey, then a Chien/Forney pass.
   - If any codeword cannot be corrected, the ack says uncorrectable.
7. **Writes.** The bus controller asks for the data with a write-data request carrying the ctag.
   - The router turns the ctag back into the host tag and source, and sends the request to that
     host.
   - The host streams the page from its buffer for that tag, possibly across the network.
   - The data is encoded on its way to the chip.
   - A program or erase failure reported by the chip gives a bad-block ack.
8. **Responses.** Read data, acks and write-data requests leave the controller under the ctag.
   The tag table restores the host tag and source, and each is routed back to its host. The ack
   frees the ctag.

All merges of two or more streams use rotating-priority arbiters.

## Network

`net_node` connects a device to its neighbours "up" (higher ID) and "down" (lower ID).

- **Virtual channels.** There are five, one per datapath: request, read data, ack, write-data
  request, and write data. A blocked datapath never stalls another.
- **Routing.** This is deterministic: a flit whose destination is above the node goes up, one
  below goes down, and one equal to the node is ejected.
- **Flow control.** This is credit-based, hop by hop, per channel. A flit is sent only when the
  next node has buffer room, so the network never drops a flit.
- **Links.** A link carries one flit per cycle. Each flit holds a whole request, or one data byte
  with its tag.
- **Timing.** Links are modelled as plain wires between nodes. In simulation each hop adds 2 to 3
  cycles to a page read.

## Interfaces

- **Streams.** All are valid/ready: a transfer happens in a cycle where both are high.
- **Host port.** The top has one host port per device, with these streams:
  - `h_req`: requests;
  - `h_rdata`: read bytes with their host tag;
  - `h_ack`: acks;
  - `h_wreq`: write-data requests naming a host tag;
  - `h_wdata`: write bytes with their target device.
- **NAND buses.** These are `nand_o[dev][bus]`:
  - outputs: chip enables, cle, ale, we_n, re_n, and data out with its enable;
  - input: `nand_dq_i[dev][bus]`.
- **NAND commands.** These follow the common ONFI set:

  | Command | Bytes |
  |---|---|
  | read | 00h/30h |
  | program | 80h/10h |
  | erase | 60h/D0h |
  | read status | 70h |

  Read and program use 5 address cycles; erase uses 3.
- **Reset.** This is asynchronous and active low. After reset the tag tables fill their free
  queues for `NTAG` cycles before the first request is accepted.

## What is not built

These parts are outside the logic here, and their signals are brought out as ports instead:

- the PCIe/DMA host interface;
- the multi-gigabit serial transceivers of the links;
- the NAND chips themselves.

`tb/nand_chip_model.sv` is a behavioural chip model for simulation only. It has:

- the command set above;
- configurable array times and a bad block;
- injected byte errors per codeword.

Known limits of this model compared with the prototype:

- **Host read-data port.** It carries one byte per cycle. One device can therefore deliver at
  most 200 MB/s to its host at 200 MHz, while its 8 buses together can supply 1.6 GB/s.
  Matching the prototype's 1.2 GB/s would need a wider host datapath.
- **Link latency.** The link adds no latency of its own; the real serial links add about
  0.5 µs per hop.
- **Requests to a busy chip.** A bus controller holds one operation per chip. A request for a
  chip that still has one waits at the head of the controller's input, and requests behind it
  wait too, even if they are for idle chips. Striped access patterns do not suffer from this;
  repeated access to the same chips does.
- **Flow control.** It is hop-by-hop credits. The original uses end-to-end token flow control
  per virtual channel.

## Testbenches (`tb/`)

Each testbench prints `TB_RESULT checks=N failures=M` at the end.

| Testbench | What it checks |
|---|---|
| `tb_rr_arbiter` | rotation and fairness of the arbiter |
| `tb_sync_fifo` | FIFO behaviour against a reference queue, including the full and empty cases |
| `tb_tag_table` | tag renaming, exhaustion and reuse |
| `tb_rs_encoder` | encoder against a long-division reference, including shortened codewords |
| `tb_rs_decoder` | 0 to 6 errors corrected, more reported as uncorrectable |
| `tb_nand_io` | bus sequences against a chip model |
| `tb_scoreboard` | short operations chosen before data transfers, older before newer |
| `tb_bus_controller` | one bus with 4 chips: data, ECC correction, uncorrectable reads, bad blocks, chip overlap |
| `tb_flash_controller` | 2 buses: request steering and response merging |
| `tb_flash_router` | two routers back to back with controller stand-ins: remote writes, tag collisions, more requests than tags |
| `tb_net_node` | three nodes under random traffic on all channels: delivery, order, no loss |
| `tb_minflash_device` | one device: local operations, and requests leaving on the right link |
| `tb_minflash_cluster` | four devices at reduced size, end to end (see below) |
| `tb_minflash_workloads` | scaled-down bandwidth runs: rate against transfer size, two hosts sharing one device, one host reading two devices |
| `tb_minflash_full` | the array at its default size: a short write/read test, local and 3 hops away |

`tb_minflash_cluster` counts each mechanism and fails if one never happened:

- local and remote access;
- remote write-data fetch;
- host-tag collision;
- ECC correction;
- an uncorrectable read;
- a bad block;
- busy status polls;
- commands to one chip while another on the bus is busy.

The host model is `host_bfm.sv`. `ctrl_model.sv` is a controller stand-in for the router test.

## Simulating

Each testbench is self-contained with plain Verilator. Give the packages first, then the RTL,
then the testbench support files and the testbench itself. For example, the end-to-end test:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_minflash_cluster \
  rtl/minflash_pkg.sv rtl/rs_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/rs_ref_pkg.sv tb/nand_chip_model.sv tb/host_bfm.sv tb/tb_minflash_cluster.sv
./obj_dir/Vtb_minflash_cluster
```

`tb_flash_router` also needs `tb/ctrl_model.sv`. The full-size test builds in about two minutes
and runs in under a minute. To try other sizes, change the parameter list on the top in a copy
of `tb_minflash_cluster`. The reduced sizes used by the tests are:

- 2 buses x 2 chips per device;
- 300-byte pages (one full and one shortened codeword);
- 16 tags.
