# Secure four-core packet processor

A router built from programmable packet processors can be attacked through the packets it handles. A crafted packet can overflow a buffer in the processing software and make the processor run injected code. That code can then rewrite the program, drop traffic or flood the network with copies. This design puts two hardware monitors next to the processors to catch that while it happens:

- **Instruction-level monitor.** One per processor core. It compares every executed instruction address with the program's control-flow graph, which is computed offline. On a mismatch it drops the packet being processed, resets the core and restores the instruction memory. This takes a handful of clock cycles, and the router carries on with the next packet.
- **I/O monitor.** One for the whole system. It counts packets going into and out of every processing unit. A unit that sends more packets than it received, beyond what multicast allows, has its packet memory flushed and its core reset. This catches attacks made entirely of valid instructions, which the instruction monitor cannot see.

The RTL covers everything around the processor cores:

- flow classification;
- four packet processing units (PPUs), each with its memories, packet buffers, instruction monitor and recovery logic;
- the output arbiter;
- the I/O monitor.

The cores are 32-bit MIPS-class processors (Plasma, in the original prototype). They are not included. Their buses are ports of the top module. The testbenches attach a behavioural core model instead.

The data path is 64 bits wide. The prototype ran at 62.5 MHz, and nothing in this RTL depends on that clock.

## Packet path

```
in_* ──► flow_classifier ──► ppu[0] ──┐
                         ├─► ppu[1] ──┤
                         ├─► ppu[2] ──┼─► output_arbiter ──► out_*
                         └─► ppu[3] ──┘
              │ dispatch events              │ packet-start events
              └──────────► io_monitor ◄──────┘
                              │ alarm[p] ──► ppu[p] (flush + core reset)
```

Every stream uses the same handshake:

- `valid`/`ready`, with `sop` and `eop` marking a packet's first and last 64-bit word;
- one word moves per cycle when both sides agree.

A packet on the internal stream is one **header word** followed by the Ethernet frame. Byte *b* of a packet sits in word *b*/8, bits `[63-8*(b%8) -: 8]`, so byte 8 is the first byte of the Ethernet frame.

The **flow classifier** (`flow_classifier`) does the following for each packet:

1. It holds the first six words, which are enough to see the IPv4 protocol and both addresses.
2. It hashes source, destination and protocol, and picks PPU `hash % NUM_PPU`. All packets of a flow go to the same PPU.
3. It rewrites the header word (`sp_pkg::make_hdr`) as follows:

   | Bits | Content |
   |---|---|
   | `[63:56]` | application id: 1 = CM header insertion for UDP, 0 = IPv4 forwarding otherwise |
   | `[55]` | multicast flag: destination in 224.0.0.0/4 |
   | `[51:48]` | PPU index |
   | `[47:32]` | arrival time-stamp: the I/O monitor's 16-bit cycle counter in the decision cycle |
   | `[31:0]` | flow hash |

4. It streams the rest of the packet straight through. This costs one idle cycle per packet.
5. It pulses `disp_valid` with the PPU index and the multicast flag. The I/O monitor counts these pulses.

The **output arbiter** (`output_arbiter`) switches whole packets, round robin, starting after the last winner. For every packet start it reports which PPU sent it.

## Inside a PPU

A PPU (`ppu`) gives its core everything needed to process a packet from local memory only. The core's data port sees this address map (byte addresses, big-endian lanes: `core_dbe[3]` is the lowest address):

| Address | Contents |
|---|---|
| `0x1000_0000` + | the current packet: header word at offset 0, Ethernet frame from offset 8, so the IPv4 TTL is at `0x1000_001E` |
| `0x2000_0000` write | command: 1 = forward, 2 = drop, 3 = send a copy and keep the packet |
| `0x2000_0000` read | `[31:16]` packet length in words, `[0]` packet available |
| `0x4000_0000` + | instruction memory (writes only; normal programs never do this) |
| anything else | data memory, `DMEM_WORDS` 32-bit words |

Only address bits `[31:28]` and the word index inside a region are decoded. Every region therefore repeats through its address range.

Instruction fetch and loads both return data one cycle after the address.

**Packet buffers.** `pkt_buffer` holds `NUM_BUF` = 4 buffers of `BUF_WORDS` = 256 words. A 256-word buffer fits a 1512-byte frame plus the header word. The buffers form a ring:

1. a buffer fills from the input stream;
2. it waits until the core is free;
3. it becomes the current packet, mapped at the fixed window;
4. a forward or drop command releases it to the output side, which sends it or frees it.

A program therefore always finds its packet at the same address and never handles packet pointers.

The copy command queues extra transmissions of the current packet. A program can use it for multicast, and an attacker can use it for flooding. A monitor drop cancels any copies that have not started.

**Instruction memory.** `imem_secure` holds three copies of the program:

- two working banks;
- a protected golden copy that only the trusted loader writes.

A core store into the instruction window lands in the active bank, which is how injected code corrupts a program.

On `recover`:

1. the active bank is marked dirty;
2. fetches switch to the other bank in the next cycle;
3. the golden copy is written back into the dirty bank, one word per cycle, in the background. This takes 512 cycles.

A second attack during or after the reload can therefore switch again at once. If both banks are dirty, fetches come straight from the golden copy.

## The instruction-level monitor

`instr_monitor` watches the address of every instruction the core executes (`iaddr`, `ivalid`). It checks each address against a table built offline from the program's control-flow graph.

**Basic-block table** (`bb_table`, one entry per instruction word, 512 entries):

| Field | Meaning |
|---|---|
| `valid` | the word belongs to the program; addresses outside it, like injected code, are not valid |
| `jump` | the word is a jump or branch |
| `bb` | number of the basic block that contains the word (blocks numbered in address order) |
| `nexthop` | word index of the jump's target, for jump words |

The table has a second read port, used to look up jump targets.

**Execution history** (`bb_fifo`): a two-entry FIFO holding the previous and the current basic-block number. Its head is always the block executed before the current one.

**Pipeline.** The monitor has four stages of one cycle each, for an address arriving in cycle *t*:

| Cycle | Stage |
|---|---|
| t | 1: the address indexes the table (port A) |
| t+1 | 2: block number, jump flag and next hop arrive; the block number is pushed into the FIFO |
| t+2 | 3: the block is compared with the FIFO head (the previous block); an address unknown to the table is an error here; the previous instruction's next hop indexes the table through port B |
| t+3 | 4: a transition that needs a jump is verified against the port-B result; the drop is registered |
| t+4 | `drop_o` high for one cycle |

A transition from block *p* to block *c* is legal when one of these holds, checked in this order:

1. *c* = *p*: the core is still inside the same block.
2. *c* = *p* + 1: the core fell through into the next block. This also covers a conditional branch that is not taken.
3. The previous instruction was a jump, the current address is that jump's `nexthop`, and the table entry at that target is valid.

Every other transition is an attack. An address whose table entry is not valid is always an attack. After a reset or flush, the first instruction must be the program entry `ENTRY_ADDR` (0x200).

**What it cannot see.** The monitor only checks control flow. Code that follows the legal graph but does harmful things, such as asking for the same packet to be sent 66 times, passes. That case belongs to the I/O monitor.

**Table size.** The table costs 512 × 19 = 9728 bits per core. Four fixed monitors need 38,912 bits.

## Recovery timing

The numbers below come from one attack scenario. The core executes the first attack instruction (0x1E4, reached by a hijacked jump from 0x214) in cycle 400.

| Cycle | Event |
|---|---|
| 400 | first attack instruction executes; it writes over the instruction at 0x218 |
| 404 | monitor raises `drop_o`; `attack_drop` goes out; the packet is marked dropped; the instruction memory switches bank |
| 405 | packet is gone; `core_rst` rises |
| 405–410 | core held in reset (`RECOVERY_CYCLES` = 6); monitor flushed |
| 411 | core restarts at 0x200 with the next packet; every fetch is clean |
| 411 + 512 | infected bank fully reloaded |

The packet behind the attacked one is delayed by the 6 recovery cycles. For a program that spends about 600 cycles per packet, it finishes in about 606 cycles instead of 600.

Attack instructions executed in cycles 400–403 still run. This matters for their side effects:

- **Stores into the instruction memory** are harmless, because the bank switch and reload repair them.
- **A copy command in that window would leave before the drop.** Copies that have not started when the drop comes are cancelled. An instruction issued from cycle 405 on never runs.

An I/O monitor alarm uses the same path without the memory switch:

- every queued packet of that PPU is dropped;
- the core is reset for 6 cycles.

## The I/O monitor

`io_monitor` keeps two counters per PPU within a window of `WINDOW` = 4096 cycles:

- packets handed to it;
- packets it started on the output.

It also keeps running totals of both. All of these are visible on the ports. The monitor also owns the time base used for packet time-stamps (see below).

The check itself is a per-PPU **credit**:

- each unicast input packet adds 1;
- each multicast input adds `FANOUT` = 4, because one multicast packet may legitimately leave as several;
- each output packet takes 1.

An output with no credit left raises `alarm[p]` for one cycle, one cycle after that packet starts. A unicast PPU therefore can never send more than it received.

Credit left by packets the software dropped is capped at each window end to `NUM_BUF × FANOUT`, the most a PPU can legitimately still owe. Without the cap, old credit could be saved up for a burst.

**Time-stamps.** Each packet carries its arrival time in the header word. When the packet starts on the output, the monitor computes its age. A packet older than `MAX_DELAY` = 4096 cycles pulses `delay_alarm` and increments `delay_count`; `max_age` keeps the largest age seen. This is a sign that processing has slowed down abnormally. The delay alarm only reports: unlike a count violation, it does not flush or reset anything. The 16-bit stamp limits meaningful ages to 65,535 cycles.

The count check is exact per packet, not only at window ends. A flooding PPU is stopped after at most its remaining credit. In the system test, a program asking for 66 copies gets a handful out before the PPU is flushed.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `NUM_PPU` | 4 | packet processing units (cores) |
| `IMEM_IDX_W` | 9 | 512-word instruction memory and basic-block table per PPU |
| `BB_W` | 8 | basic-block number width |
| `DMEM_WORDS` | 1024 | data memory per PPU (32-bit words) |
| `NUM_BUF` | 4 | packet buffers per PPU |
| `BUF_WORDS` | 256 | 64-bit words per buffer |
| `RECOVERY_CYCLES` | 6 | core reset length after a detection |
| `ENTRY_ADDR` | 0x200 | program entry point |
| `IO_WINDOW` | 4096 | I/O monitor window in cycles |
| `MCAST_FANOUT` | 4 | outputs allowed per multicast input |
| `MAX_DELAY` | 4096 | I/O monitor delay limit in cycles (report only) |

At the defaults:

- the 327-instruction IPv4 forwarding program and the 289-instruction CM header-insertion program each fit in a PPU;
- 64-byte to 1512-byte packets fit in one buffer;
- the packet path moves 64 bits per cycle, which is 4 Gb/s at 62.5 MHz.

`NUM_PPU` can grow, but the header word addresses at most 16 PPUs.

## Loading a program

The trusted loader port writes one instruction word and one basic-block table entry per cycle. It writes into every PPU whose bit is set in `ld_sel`.

- Use it while the system is held in reset or idle.
- An instruction write goes to the golden copy and to both banks.

`tb/tb_prog_pkg.sv` shows how a table is derived from a program's blocks.

## What is not here, and where this design makes its own choices

These parts are outside the RTL:

- **The processor cores.** Their buses are brought out as ports.
- **The Ethernet side.** MACs, input arbitration and output queues are left out. The top exposes the internal 64-bit stream instead.
- **The links between neighbouring PPUs.**
- **A statistical, software-run I/O monitor.** It compares packet-size or header distributions by their divergence. It runs on the control processor, not in logic.
- **A shared monitor built from programmable logic.** In that alternative organisation, the control-flow graph is compiled into a state machine shared by several cores. It is not built.

These are this design's own choices:

- the header-word format;
- the flow hash and the application rule;
- the core address map and command register;
- the bank-plus-golden-copy layout of the instruction memory;
- the I/O monitor's credit formulation, window length, fan-out and cap;
- the 16-bit time-stamp and the delay limit;
- all handshakes.

The four-stage monitor structure, its table contents, the two-entry FIFO, the order of the checks and the drop/reset/reload recovery follow the original design. So do the 6-cycle recovery and the counters of the I/O monitor.

The monitor drops the packet in the cycle after its fourth stage. That is five cycles after the attack instruction, while detection itself takes four.

## Files and simulation

`rtl/` holds one module or package per file:

- `sp_pkg`
- `bb_table`
- `bb_fifo`
- `instr_monitor`
- `imem_secure`
- `pkt_buffer`
- `ppu`
- `flow_classifier`
- `output_arbiter`
- `io_monitor`
- `secure_np_top`

`tb/` has one self-checking testbench per module, plus the following helpers:

| File | Purpose |
|---|---|
| `core_model.sv` | Behavioural core that runs the test program one instruction per cycle. It reads the TTL, writes it back decremented, counts packets in data memory, and forwards or drops the packet. It checks every fetched instruction word. Marked packets make it jump to attack code at 0x1E4, which overwrites the instruction at 0x218, or ask for copies in a loop. |
| `tb_prog_pkg.sv` | The test program's blocks, table entries and instruction words. |
| `tb_pkt_gen.sv` | Packet construction helpers. |

`tb_secure_np_top` runs the whole system at its default parameters through five phases:

1. normal traffic with TTL-0 drops, multicast and back-pressure;
2. control-flow attacks mixed with traffic;
3. a duplication attack;
4. normal traffic again, with the output first blocked long enough to trip the delay alarm;
5. packets of the smallest and largest sizes, 64 and 1512 bytes (9 and 190 words with the header word).

It counts every mechanism and fails if one never occurs: stalls, arbitration contention, TTL drops, multicast, attack drops, recoveries, reloads, I/O alarms, copies and delay alarms.

Every testbench prints `TB_RESULT checks=N failures=M`. Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sp_pkg.sv tb/tb_prog_pkg.sv tb/tb_pkt_gen.sv \
  rtl/bb_table.sv rtl/bb_fifo.sv rtl/instr_monitor.sv rtl/imem_secure.sv \
  rtl/pkt_buffer.sv rtl/ppu.sv rtl/flow_classifier.sv rtl/output_arbiter.sv \
  rtl/io_monitor.sv rtl/secure_np_top.sv tb/core_model.sv tb/tb_secure_np_top.sv \
  --top-module tb_secure_np_top -Mdir obj_top
./obj_top/Vtb_secure_np_top
```

Block testbenches need only their module and `sp_pkg` / `tb_pkt_gen` / `tb_prog_pkg` where they import them.

Lint reports a few unused bits. They are deliberate, and the module comments explain them: the data-address bits that the PPU does not decode, for example.
