# On-chip communication for a multiprocessor SoC: an FSM/FIFO packet router and a C(4,4,4) Clos circuit-switched network

When many processor cores share one chip, they need a way to pass data between
each other that scales better than a shared bus. This RTL gives two such
structures. Both follow the published description of an "efficient router for
MPSoC communication":

* **The packet router** (`router_top`). One byte-wide input takes packets and
  stores each one in one of four output FIFOs. A header byte picks the FIFO. An
  eight-state controller runs the loading, checks parity and pushes back on the
  source when a FIFO is full or busy. This is the part of the original work that
  was simulated and synthesized.
* **The Clos network** (`clos_network`). Three stages of 4x4 circuit switches
  connect 16 inputs to 16 outputs. Before data moves, each input sends a *probe*
  that reserves a path (a *circuit*) through the three stages, link by link. A
  probe that hits a blocked link backs off and tries the next of the four
  possible paths. Every switch is built the same way: input controls, output
  controls, an arbiter and a multiplexer crossbar.

The original description does not say how the packet router would sit inside a
circuit switch. The two have different shapes (one input and four outputs, as
against 4x4 with handshakes). So they are built as two separate designs.
`mpsoc_comm_top` places them side by side, and they share only the clock.

All code is synthesizable SystemVerilog-2017. Every module has a self-checking
testbench.

---

## 1. The packet router

### 1.1 Packet format and source handshake

```
 byte 0 (header)   [7:2] payload length (0..63)   [1:0] destination channel
 bytes 1..N        payload
 byte N+1          parity = XOR of header and every payload byte
```

`packet_valid` is high with the header and with every payload byte. It is low
with the parity byte. The source puts one byte on `data_in` per cycle. A byte
counts as taken at a rising clock edge only if `suspend_data` was low during
that cycle. If `suspend_data` was high, the source holds the same byte (and the
same `packet_valid`) for another cycle.

The router does not use the length field: `packet_valid` marks where the packet
ends. Every byte of the packet, header and parity included, goes into the
channel FIFO. So a receiver reads back the exact packet it was sent.

The original material gives no header layout. This layout matches its one
simulation, where the input byte 248 (`1111_1000`, so channel 0) comes out on
the first channel.

### 1.2 Blocks

```
            data_in, packet_valid
                 |
        +--------+---------+
        |                  |
   router_fsm <------> router_reg ---- dout ----+-----+-----+-----+
   (8 states)          (header, hold,           |     |     |     |
        |  write_enb_reg  parity, err)        fifo0 fifo1 fifo2 fifo3  (router_fifo)
        v                                       ^     ^     ^     ^
   router_sync ------- write_enb[3:0] ----------+-----+-----+-----+
   (address latch, full/empty mux, vld_out)  <---- full[3:0], empty[3:0]
```

* `router_fsm`: the controller. Its outputs are one signal per state
  (`detect_add`, `lfd_state`, `ld_state`, `lp_state`, `laf_state`,
  `full_state`, `rst_int_reg`), plus `suspend_data` and one write strobe,
  `write_enb_reg`.
* `router_sync`: the FIFO synchronizer. It registers the channel address while
  a header is being decoded. It sends the write strobe to that one FIFO, and
  sends that FIFO's `full` and `empty` back to the controller. Each
  `valid_chanel[i]` is simply "FIFO i is not empty".
* `router_reg`: the datapath. It keeps:
  * the header;
  * a byte taken while the FIFO was full;
  * the received parity byte;
  * a running XOR of the packet's bytes.

  It picks which byte goes to the FIFOs. At the check it loads `err`, which
  then holds until the next header is taken.
* `router_fifo`: a 16 x 8 synchronous FIFO, one per channel, with exact
  `full`/`empty` flags and a registered read port. Reset clears both pointers,
  gives `full = 0` and `empty = 1`, and sets `data_out` to 0.

### 1.3 Controller states

| state | what happens | `suspend_data` | next |
|---|---|---|---|
| `DECODE_ADDRESS` | take the header when `packet_valid` is high | 0 | `LOAD_FIRST_DATA` if the addressed FIFO is empty, else `WAIT_TILL_EMPTY` |
| `WAIT_TILL_EMPTY` | an older packet is still in the FIFO | 1 | `LOAD_FIRST_DATA` once it is empty |
| `LOAD_FIRST_DATA` | write the header | 1 | `LOAD_DATA` |
| `LOAD_DATA` | take one byte per cycle; write it if the FIFO has room, else hold it | 0 | `FIFO_FULL_STATE` if the FIFO is full; `LOAD_PARITY` when a byte comes with `packet_valid` low |
| `FIFO_FULL_STATE` | wait for room | 1 | `LOAD_AFTER_FULL` |
| `LOAD_AFTER_FULL` | write the held byte | 1 | `LOAD_DATA`, or `CHECK_PARITY_ERROR` if the held byte was the parity byte |
| `LOAD_PARITY` | write the parity byte | 1 | `CHECK_PARITY_ERROR`, or `FIFO_FULL_STATE` if the FIFO is full |
| `CHECK_PARITY_ERROR` | compare parities, load `err`, clear flags | 1 | `DECODE_ADDRESS` |

The original gives the number of states (eight) and the controller's pin names.
The transitions above are this design's own.

A packet waits until its destination FIFO is completely empty. This keeps
packets from two sources from mixing, and it means a FIFO holds at most one
packet at a time. Packets may be longer than the FIFO: the controller simply
stalls the source until the receiver has read some bytes.

### 1.4 Timing

* A packet with N payload bytes, sent into a FIFO that has room, keeps the
  input busy for **N + 5 cycles**: decode, header write, N payload bytes, the
  parity byte, parity write, check. The next header is taken N + 5 edges after
  the previous one.
* A receiver pulses `re[i]` while `valid_chanel[i]` is high. The byte appears
  on `ch_out[i]` after that clock edge.
* All resets are synchronous and active low (`resetn`).

---

## 2. The Clos network C(4,4,4)

### 2.1 Topology

```
 inputs 0-3   -> SW00 \         / SW10 \         / SW20 -> outputs 0-3
 inputs 4-7   -> SW01  \ every /  SW11  \ every /  SW21 -> outputs 4-7
 inputs 8-11  -> SW02  / to   \  SW12   / to   \  SW22 -> outputs 8-11
 inputs 12-15 -> SW03 / every  \ SW13  / every  \ SW23 -> outputs 12-15
```

The notation C(n,m,p) means n inputs per first-stage switch, m middle switches
and p first-stage switches. This network is C(4,4,4), with twelve 4x4 switches
in all.

The links run like this:

* Output `j` of first-stage switch `s` goes to input `s` of middle switch `j`.
* Output `k` of middle switch `j` goes to input `j` of last-stage switch `k`.

So a 4-bit output address `d` names the last-stage switch in `d[3:2]` and the
port on it in `d[1:0]`. Between any input and any output there are exactly four
paths, one through each middle switch.

### 2.2 The link handshake

Every link carries three things:

* an 8-bit data bus, forward;
* a 1-bit `Req`, forward;
* a 2-bit `Ans`, backward.

| `Ans` | name | meaning |
|---|---|---|
| `00` | None | no answer yet / idle link (this design's choice) |
| `01` | Ack | the path to the destination is set up; data may flow |
| `11` | nAck | the path is set up but the destination cannot take data now (end-to-end flow control) |
| `10` | Back | this link, or the path beyond it, is blocked; back off |

A circuit goes through three phases:

1. **Setup.** The source raises `Req` and puts the output address on the low
   four bits of its data bus. This is the probe: it travels on the data wires,
   so no extra wires are needed for it. The source waits for an answer.
2. **Transfer.** After Ack, whatever the source drives reaches the destination
   in the same cycle, because the crossbars are combinational. While the
   answer is nAck, the source holds off.
3. **Release.** The source drops `Req`. Each switch frees its output and drops
   `Req` to the next stage, one stage per cycle.

On Back, the source must drop `Req` for at least one cycle and may then try
again.

### 2.3 Path setup: exhaustive profitable backtracking

Each input control (`clos_ic`) of each switch runs the same five-state machine:
`IDLE`, `ROUTE`, `WAIT_ANS`, `CONNECTED`, `BACK`. The "profitable" outputs are
the ones that still lead to the destination, and they depend on the stage:

* **First stage:** all four outputs, since every middle switch reaches every
  destination. They are tried in the order 0, 1, 2, 3.
* **Middle stage:** only output `d[3:2]`.
* **Last stage:** only output `d[1:0]`.

In `ROUTE`, the controller asks the arbiter for the lowest-numbered profitable
output it has not tried yet. An output counts as tried if it is refused (held by
another circuit, or lost to a higher-priority input that asked in the same
cycle). It also counts as tried if it is granted but its downstream switch
later answers Back. In that case the controller drops `Req` on that link, so the
probe moves backward, and returns to `ROUTE` for the next candidate. When every
profitable output has been tried, it answers Back upstream.

The middle and last stages have only one candidate each. So a blocked link
there sends Back straight to the first stage, which then tries the next middle
switch. The search is exhaustive: a probe answered Back by the first-stage
switch found each of the four paths blocked when it tried that path.

A C(4,4,4) network is *rearrangeable*, not *strictly* non-blocking. With
circuits already held, a new probe can therefore find all four paths blocked
even when its output is idle. This design does not re-arrange existing
circuits: the source gets Back and retries. In the network testbench's random
traffic, about one setup attempt in six ends in Back. That count includes rounds
in which two inputs deliberately want the same output.

### 2.4 Inside a switch

```
 Req_in/Ans_in/IN[i] --> clos_ic[i] --req,port--> clos_arbiter --alloc--> clos_oc[o] --> Req_out[o]
                              ^                        |    ^                 |sel
                              +---- Ans (cross-conn.) -+    +-- free ---------+
 IN[0..3] -------------------------------------------> clos_crossbar (one mux per output) --> Out[o]
```

* `clos_arbiter` (combinational) has two jobs.
  * *Referee:* it gives each free output to at most one requesting input
    control. When several want the same output, the lowest input index wins.
    It also passes each release to the output control that input names.
  * *Cross-connect:* it routes each output's answer back to the input control
    that holds that output.
* `clos_oc` holds one output for its owner. It drives `Req_out` and the
  crossbar select. It reports the link as free only when it is not held *and*
  the downstream answer has gone back to None, so a new owner never sees an
  answer meant for the previous one.
* `clos_crossbar` has one multiplexer per output. An idle output carries zero.

### 2.5 Timing

When nothing else is in the way, each stage takes two cycles forward (probe
taken, output granted) and one cycle for the answer back. A source therefore
sees Ack **9 cycles** after raising `Req`, if the destination answers
immediately. Once a circuit is set up, data has zero cycles of latency, and
`Ans` changes at the destination (Ack <-> nAck) reach the source in the same
cycle.

All resets are synchronous and active low (`rst_n`).

---

## 3. Files

| file | contents |
|---|---|
| `rtl/router_pkg.sv` | router constants, controller state type |
| `rtl/router_fsm.sv`, `router_sync.sv`, `router_reg.sv`, `router_fifo.sv` | router blocks |
| `rtl/router_top.sv` | the router |
| `rtl/clos_pkg.sv` | network constants, `ans_e` answer codes |
| `rtl/clos_ic.sv`, `clos_oc.sv`, `clos_arbiter.sv`, `clos_crossbar.sv` | switch blocks |
| `rtl/clos_switch.sv` | one 4x4 switch (`STAGE` = 0, 1, 2) |
| `rtl/clos_network.sv` | the twelve-switch network |
| `rtl/mpsoc_comm_top.sv` | both designs side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters: `router_top.FIFO_DEPTH` (default 16) and
`mpsoc_comm_top.FIFO_DEPTH`. The router has four channels and an 8-bit data
path (`router_pkg`). The network is C(4,4,4) with an 8-bit link bus
(`clos_pkg`).

## 4. Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if a test hangs. To run one with Verilator 5 (for
example the whole design):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/router_pkg.sv rtl/clos_pkg.sv \
          tb/tb_mpsoc_comm_top.sv --top-module tb_mpsoc_comm_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. What each test covers:

* `tb_router_top` checks the router end to end against its own model of every
  channel's byte stream:
  * the 248 packet (62 payload bytes);
  * the N + 5 cycle throughput;
  * a parity byte that meets a full FIFO;
  * 400 random packets with slow readers and deliberate parity errors.

  It counts source stalls, FIFO-full events, waits for an empty FIFO and
  parity errors, and requires each to occur.
* `tb_clos_network` runs 16 source and 16 destination models:
  * full permutations, partial permutations, and rounds in which two inputs
    want the same output;
  * destinations that sometimes answer nAck.

  It checks every transferred word and the 9-cycle setup. It counts Backs,
  first-stage re-routings and nAcks, and requires each to occur.
* `tb_mpsoc_comm_top` runs both kinds of traffic at once, with all defaults.
* The block testbenches (`tb_router_fifo`, `tb_router_fsm`, `tb_router_sync`,
  `tb_router_reg`, `tb_clos_ic`, `tb_clos_oc`, `tb_clos_arbiter`,
  `tb_clos_crossbar`, `tb_clos_switch`) check each module against scripted
  cases or a reference model.

All testbenches use `$urandom` only, need no files and run in seconds.

## 5. Where this RTL follows the original and where it does not

Taken from the original description:

* the C(4,4,4) topology and its wiring;
* the 1-bit Req and 2-bit Ans with the codes Ack = 01, Back = 10, nAck = 11;
* the 4-bit probe address, carried on the data path;
* probes that move forward over free links and backward from blocked ones,
  trying all four paths;
* the switch made of input controls, output controls, an arbiter with a fixed
  priority, and a multiplexer crossbar;
* the router built from an eight-state FSM, four output FIFOs and a FIFO
  synchronizer, with the pin names of each;
* the FIFO reset values and its write and read conditions;
* the 8-bit data path.

This design's own choices, where the original is silent:

* FIFO depth 16;
* the packet format and parity rule (§1.1);
* the controller's transitions and the `suspend_data` rule;
* all of `router_reg`;
* synchronous resets;
* answer code 00 = None;
* the try order 0..3 and "refused counts as tried";
* the lowest-index-first priority;
* the free-link rule in `clos_oc`;
* an 8-bit network data bus;
* all cycle timing.

Points to be aware of:

* **Three or four channels.** One pin diagram of the original router shows
  three output channels. Its text, its synchronizer, its schematic and its
  waveform all show four. Its reported count of 53 used I/O pins also matches
  four channels (8 + 3 + 4 + 32 + 4 + 2 = 53), not three (43). This RTL has
  four.
* **The original's FPGA figures are not comparable.** They report 148
  flip-flops on a Spartan-3-class FPGA, and a combinational path from the
  reset pin to `suspend_data`. Here the FIFOs hold 4 x 16 x 8 bits of memory,
  and reset is synchronous, so no such path exists.
* **Not built:** the FIFO wrappers the original mentions at the network's
  input and output ends. The link carries no data-valid signal, and nothing
  says which cycles of a circuit the wrapper would capture. The network's
  terminal ports are brought out at the top instead, where such wrappers
  would attach.
* **Blocking.** The original claims that a path can always be found between an
  idle input and an idle output. Without re-arranging existing circuits, that
  does not hold for C(4,4,4) (§2.3). Sources must be ready to retry after Back.
