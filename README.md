# FPGA co-processor node: a fixed framework around small co-processors

This is synthesizable SystemVerilog for one FPGA node in an embedded multiprocessor
platform. The node has a DDR2 memory, a Serial RapidIO link to the rest of the
system, and up to three application co-processors. The idea is that almost all of
the FPGA design stays fixed and is reused. An application developer writes only the
co-processor engine. Everything that moves data and sequences work is framework:

- a multi-port DDR2 wrapper;
- an on-chip memory (OCM) controller that streams data between DDR2 and block RAMs;
- a RapidIO wrapper with independent initiator and target halves;
- a small **node controller** that runs instruction bundles sent by a host processor.

The host writes a bundle of instructions into the node over RapidIO and writes a start
address. From then on the node runs on its own. It moves data, runs co-processors,
takes timestamps and loops, without a network round trip per step.

```
                 +----------------------------- fpga_node ------------------------------+
 DDR2 ctrl core  |  ddr2_interface                       srio_interface                  |  RapidIO endpoint
 user interface <-> arbiter <- port0 (128b) <- OCM       initiator: CMD FIFO -> IREQ CTRL  <-> ireq / iresp
 (app_af_*,      |           <- port1 (64b)  <- IREQ/RESP            queue  -> RESP CTRL   |   user ports
  app_wdf_*,     |           <- port2 (64b)  <- TREQ/TRESP target: TREQ CTRL -> queue ->   <-> treq / tresp
  rd_data_*)     |                                                 TRESP CTRL, CTRL BRAM  |
                 |  ocm_controller --SRAM 0..2--> coproc_wrapper x3                        |
                 |                 --SRAM 3-----> node_controller (own SRAM, timestamps)    |
                 |  node_controller: fetches from CTRL BRAM, commands OCM / RapidIO / co-procs
                 +-------------------------------------------------------------------------+
```

The vendor parts are not included: the DDR2 controller/PHY and the RapidIO
PHY/logical layer. Their user-side ports are ports of `fpga_node`. The testbenches
contain a behavioural model of the DDR2 controller interface (`tb/ddr2_mig_model.sv`).

## Clocking: one clock

The original node runs the RapidIO side at 125 MHz with a 64-bit datapath. The
DDR2/OCM side runs at 200 MHz with a 128-bit datapath. **This RTL uses a single clock
for everything.** It keeps the two widths: DDR2 ports 1 and 2 pack 64-bit data into
128-bit words. All FIFOs are synchronous.

To run the two sides on separate clocks, replace the FIFOs at the DDR2 port
controllers of ports 1 and 2 with dual-clock FIFOs. Those are the command, write-data,
read-data and response FIFOs in `ddr2_port_ctrl`. The start/status signals between the
RapidIO wrapper and the node controller would need synchronisers too. The cycle counts
below are all in this single clock. The README converts them at 200 MHz.

## Block by block

### DDR2 interface (`ddr2_interface`, `ddr2_port_ctrl`, `ddr2_port_arbiter`)

Every transfer in the node goes through DDR2. Each internal client gets its own port
controller, and each port has four FIFOs:

- command;
- response;
- write data;
- read data.

The ports are:

| port | client              | width   |
|------|---------------------|---------|
| 0    | OCM controller      | 128-bit |
| 1    | RapidIO initiator   | 64-bit  |
| 2    | RapidIO target      | 64-bit  |

A command is `{wr, byte address, byte length}` (`mem_cmd_t`). The length is a
multiple of 32 bytes. The port controller splits it into 32-byte bursts: BL4 on the
64-bit DDR2 bus, which is two 128-bit user words.

A round-robin arbiter grants the controller core to one port for a whole command.
The grant then moves to the next requesting port. No port can starve, and commands
are still serialized at the core. Three rules keep one port from wasting the core's
time:

- **Request only when ready.** A port asks for the core only when its command can run
  without waiting for its client. For a write, all its data must already be in the
  write FIFO. For a read, the read FIFO must have room for all its data. Both are capped
  at one full FIFO.
- **Credit check on reads.** A read burst is only issued if the read FIFO has room for
  it and for everything already in flight. Because of this the core's read data
  (`rd_data_valid`) never has to be stalled, as real controller cores require.
- **Early release on reads.** A read gives the core back as soon as its last burst is
  requested, without waiting for the data. A small FIFO in `ddr2_interface` records
  which port issued each read burst and steers the returning data to that port. This
  relies on the core returning reads in order.

The core interface follows the Virtex-5-generation memory interface generator user
interface:

- an address/command FIFO `app_af_*` with 8-byte address units;
- a write-data FIFO `app_wdf_*` carrying two words per burst;
- `rd_data_valid` and `rd_data_fifo_out`;
- `phy_init_done`, which holds off all ports until calibration ends.

### OCM controller (`ocm_controller`)

A state machine sits between one pair of FIFOs (command in, response out) and four
SRAM interfaces. The SRAM interfaces share a write-data bus. A multiplexer selects the
read data.

A command `ocm_cmd_t` names:

- the direction;
- the SRAM (0–3);
- the SRAM word address;
- the DDR2 address;
- the length (up to 128 KB).

The controller streams data at one 128-bit word per cycle in both directions. It posts
a response only after the last word has been written: into the SRAM, or accepted by
DDR2 for a write to DDR2.

SRAM reads have a fixed latency `RD_LAT` (2 cycles). A small skid FIFO absorbs
back-pressure from DDR2 without gaps.

SRAM interface signals per slot are `data_i`, `addr_i`, `cs_i` (one per SRAM),
`we_i` and `data_o`.

### Co-processor wrapper (`coproc_wrapper`, `coproc_engine`)

This is the standard every co-processor plugs into:

- a BRAM module on the data side;
- an engine;
- a small state machine;
- config registers on the control side.

The BRAM module is split into an **input buffer** and an **output buffer** of
4096 × 128 bits each, 128 KB per co-processor:

- OCM writes land in the input buffer.
- OCM reads with address bit 12 set come from the output buffer.
- Read data passes through pipeline registers, so every SRAM slot has the same latency,
  2 cycles.

The control side has three parts:

- `cfg_we/cfg_addr/cfg_data` write config registers.
- `start` with `len` (in words) starts the engine.
- `busy`/`done` report progress.

The engine included here is only an example. It computes `y = x*scale + offset` on each
16-bit lane, using config register 0 (scale, reset value 1) and register 1 (offset). It
processes one word per cycle: 1500 words take 1503 cycles. To build an application,
replace `coproc_engine` and keep the wrapper ports.

### RapidIO wrapper (`srio_interface` and four controllers)

The wrapper turns the endpoint's four user ports into a simple command interface. The
four ports are initiator request/response and target request/response. Packets on those
ports are streams of 64-bit beats with a `last` flag. The first beat is the header
`pkt_hdr_t`:

| bits    | field                                                   |
|---------|---------------------------------------------------------|
| [63:60] | type: 1 NREAD, 2 NWRITE, 3 NWRITE_R, 4 SWRITE, 8 DONE response, 9 data response |
| [59:52] | transaction ID                                          |
| [51:44] | destination ID                                          |
| [43:36] | source ID                                               |
| [35:30] | payload (or requested) 64-bit words, 1–32               |
| [29]    | reserved                                                |
| [28:0]  | 64-bit word address                                     |

This header is an internal format. It is not the RapidIO wire format, which the vendor
logical layer produces. An adapter to a particular endpoint core maps these fields onto
its header ports.

**Initiator half.** The node controller writes a command `{type, dest, remote address,
local address, length}` into the command FIFO. Lengths run from 32 B to 16 MB.

- **IREQ CTRL** splits the command into packets of at most 256 bytes. For writes it
  fetches the payload from DDR2 port 1 with one read command per packet. It issues
  these reads up to two packets ahead of the packet on the link, so the DDR2 read
  latency stays hidden. A header goes out only once payload is at hand. It logs each
  packet (ID, local address, size) in an outstanding-packet queue.
- **RESP CTRL** takes responses in order:
  - it writes NREAD data to DDR2 through port 1;
  - for NWRITE_R it waits for the DONE response;
  - it puts one completion per command into the completion FIFO.
- NWRITE and SWRITE complete as soon as their last packet has been sent.
- A response with the wrong ID or type sets the completion's error flag.

**Target half.** This half is independent of the node controller, so remote nodes can
reach local memory without any local software involvement. **TREQ CTRL** decodes the
remote address:

| remote byte address           | write                                  | NREAD              |
|-------------------------------|----------------------------------------|--------------------|
| bit 31 = 0                    | DDR2 (port 2)                          | DDR2               |
| bit 31 = 1, bit 30 = 0        | control BRAM (1024 × 64-bit instructions) | —               |
| bit 31 = 1, bit 30 = 1        | start register: data = start address   | node status word   |

A write request is finished, and the next request accepted, as soon as its payload is
in port 2's FIFO. Port 2 keeps commands in order, so a later NREAD still sees the data.
NREAD requests, and NWRITE_R requests once DDR2 has confirmed all writes so far, are queued for
**TRESP CTRL**. TRESP CTRL builds the data and DONE responses, reading DDR2 port 2 for
data. Requests of other types are dropped.

The status word is `{error[63], 0…, running[17], halted[16], pc[15:0]}`.

### Node controller (`node_controller`)

The node controller is a small in-order sequencer. It fetches 64-bit instructions from
the control BRAM, with the opcode in bits [63:60]:

| op | name   | fields                                                                 |
|----|--------|------------------------------------------------------------------------|
| 0  | NOP    |                                                                        |
| 1  | HALT   | stops; pc stays on the HALT                                            |
| 2  | OCM    | [59] wait, [58] to DDR2, [57:56] SRAM, [55:43] SRAM word addr, [42:30] length/32 B, [29:8] DDR2 addr/32 B |
| 3  | SRIO   | word 0: [59] wait, [58:55] type, [54:47] dest, [46:27] length/32 B; word 1: [63:32] remote addr, [26:0] local addr |
| 4  | RUN    | [59] wait, [58:57] co-processor, [12:0] words                          |
| 5  | CFG    | [58:57] co-processor, [56:53] register, [31:0] value                   |
| 6  | TSTAMP | [12:0] word address in the node controller SRAM; stores {pc, 64-bit cycle count} |
| 7  | SETCNT | [57:56] counter, [31:0] value                                          |
| 8  | LOOP   | [57:56] counter, [15:0] target: decrement, branch while not zero       |
| 9  | JUMP   | [15:0] target                                                          |
| A  | SYNC   | wait until all OCM moves, RapidIO transfers and co-processor runs are done |

Without the wait bit, OCM, SRIO and RUN are issued and execution continues. The
controller counts outstanding OCM and RapidIO operations. This overlap is what gives
the node its throughput: one chunk can be processed while the next is loaded and the
previous one is sent. SYNC is the barrier.

The node controller's own SRAM (8192 × 128 bits) is OCM slot 3. Timestamps written
there can be moved to DDR2 with an OCM instruction and read by the host over RapidIO.
`tb/nc_asm_pkg.sv` has one function per instruction that builds its encoding.

A simple instruction takes **3 cycles**: fetch, BRAM read, execute. The original
design is reported at 7 cycles (56 ns at 125 MHz) per instruction. This RTL is faster,
and at 125 MHz it would take 24 ns.

## How it compares with the reported results

These results come from the testbenches, with the DDR2 controller model at 12 cycles of
read latency. They are converted at 200 MHz.

| quantity | this RTL | reported for the original |
|---|---|---|
| DDR2 → SRAM, 128 KB | 8214 cycles, 41 µs | ~44 µs worst case |
| DDR2 ↔ SRAM throughput | 1 word/cycle = 25.6 Gb/s | up to nearly 25 Gb/s |
| one 600×800 frame (480,000 B, 20 chunks, 3 co-processors) | 91,468 cycles, 457 µs | 480 µs |
| 100 frames (48,000,000 B), host-driven | 9,186,505 cycles, 45.9 ms | 1.431 s |
| instruction rate | 3 cycles | 7 cycles |
| SWRITE payload rate, 64 KB, link never stalling | 8448 beats in 8959 cycles: 7.3 Gb/s at 125 MHz | 7 Gb/s best case |
| node to node, 16 MB, link never stalling, at 125 MHz | SWRITE and NWRITE 7.31 Gb/s; NWRITE_R 4.65 Gb/s; NREAD 4.57 Gb/s | SWRITE 7 Gb/s best case |
| SRAM → DDR2, 32 B / 128 KB | 14 / 8234 cycles, 70 ns / 41 µs | ~500 ns / ~44 µs |

The smallest OCM move (32 B) takes 24 cycles, 120 ns; the original reports ~500 ns best case. Most of the 24 cycles are the model's DDR2 read latency, and a real controller core is slower than the model.

The RapidIO link rate (1x/4x at 2.5 Gbaud) belongs to the vendor endpoint and is not
modelled. `tb_xfer_sweep` times every transaction type from 32 B to 16 MB between two
nodes, and local moves from 32 B to 128 KB in both directions. It prints a table of
cycles and rates. Small transfers are dominated by the fixed cost of a command;
from about 2 KB up the rate is flat. NWRITE_R and NREAD are slower than the
response-less writes because the target handles those packets one at a time. It
waits for its DDR2 write to finish (NWRITE_R) or for its DDR2 read data (NREAD)
before it answers.

The end-to-end test links two nodes with random stalls. The 64 KB SWRITE rate is
measured with the node sending to itself, so one DDR2 serves both the initiator's reads
and the target's writes, on one clock.

The 100-frame run (48,000,000 B in, the same out) is simulated in full by
`tb_frame_stream`. The testbench host loads a 63-instruction bundle for each frame,
starts the node and polls its status. All 100 frames take 9,186,505 cycles, 45.9 ms at
200 MHz. The original reports 1.431 s for this run. That figure includes the host
software's per-frame overhead, which a testbench host does not have. Inside the node
every frame takes the same 91,468 cycles.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fpga_node` | `NCP` | 3 | co-processors (OCM slot 3 is the node controller) |
| | `BUF_WORDS` | 4096 | words per co-processor buffer (input and output each) |
| | `NC_WORDS` | 8192 | node controller SRAM words |
| | `CB_WORDS` | 1024 | control BRAM instructions |
| | `DATA_DEPTH` | 32 | DDR2 port data FIFO depth (128-bit words): two 256-byte packets |
| `ocm_controller` | `NS`, `RD_LAT` | 4, 2 | SRAM slots, SRAM read latency |

Widths are in `rtl/fcp_pkg.sv`:

- 128-bit memory path;
- 64-bit RapidIO path;
- 27-bit DDR2 byte address (128 MB);
- 25-bit transfer lengths (up to 16 MB);
- 256-byte packets.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fcp_pkg.sv tb/nc_asm_pkg.sv tb/tb_fpga_node.sv --top-module tb_fpga_node
./obj_dir/Vtb_fpga_node
```

Replace `tb_fpga_node` with any other testbench name.

`tb_fpga_node` is the end-to-end test. It runs the top at its default parameters in
about five seconds. It builds two nodes, A and B, linked back to back. It plays the
host over A's target port:

1. loads a bundle into A's control BRAM;
2. starts A and polls A's status;
3. checks DDR2 contents against a model.

It counts each mechanism and fails if one never occurs:

- arbiter contention;
- packet splitting;
- link and read-credit stalls;
- SYNC, LOOP, JUMP;
- every transaction and response type;
- concurrent OCM/RapidIO/co-processor activity.

`tb_frame_stream` runs the 100-frame workload on one node. It uses a full 128 MB DDR2
model, needs about 150 MB of memory and runs for about ten seconds.

`tb_xfer_sweep` runs the transfer-size sweeps on two nodes with 64 MB DDR2 models
each. It moves about 107 MB over the link and runs for about a minute.

## Limits and departures

- Single clock, as described above.
- The instruction encoding, packet header, remote address map, OCM command format and
  the co-processor example engine are this design's own. The original describes what
  these units do, not their formats.
- Responses must arrive in request order. The outstanding queue is a FIFO, which fits a
  point-to-point link or a switch that keeps order.
- Lengths are multiples of 32 bytes and addresses are 32-byte aligned. No byte masks are
  used towards DDR2.
- Not included: clock and reset generation, GPIO, the system monitor, and the vendor
  DDR2 and RapidIO cores.
