# Reliable mesh NoC and GALS trace NoC in SystemVerilog

This repository holds two on-chip networks. They sit side by side in one top
module (`noc_top`) but share nothing.

1. **A fault-tolerant 2D-mesh data network.** Its switches survive transient
   upsets in flits, in buffers and in control logic. At boot they test
   themselves and get routing configuration that steers traffic around broken
   links. The default is a 4x4 mesh.
2. **A trace and debug network for a GALS system** (GALS: globally
   asynchronous, locally synchronous). Monitors in several clock domains send
   timestamped observations over rings to an off-chip debugger. The debugger
   can rebuild one global, ordered trace from them. The default is two
   subsystems of five monitors each.

## 1. The fault-tolerant mesh

### Coded flits and NACK/GO flow control

Each flit is 34 bits: head, tail and 32 data bits. It travels and is stored
as a 41-bit extended Hamming code word (SEC-DED: single-error correcting,
double-error detecting). The code is defined in `ft_pkg`.

The layout of the code word is computed at elaboration:

- Information bits go to the positions 1..40 that are not powers of two.
- Check bit *i* sits at position 2^i. It makes even the parity of every
  position whose index has bit *i* set.
- Bit 0 is overall parity.

`flit_ecc` takes a code word and gives back:

- a syndrome check and three error flags,
- the corrected word,
- the decoded flit.

Every link and every buffer uses the NACK/GO protocol. Four wires run per
link:

- `valid` and `trash` go forward.
- `stall` and `nack` go back.

A receiver works like this (`ng_buffer`):

- **Taking a flit.** It takes a flit when `valid=1`, `trash=0` and it is not
  stalling. The flit is written straight into a slot as *tentative*.
- **Checking it.** In the next cycle a detector checks that slot. A clean
  flit is committed, and `nack` goes low for exactly that cycle. A corrupt
  flit is discarded and `nack` stays high. Any flit arriving in that same
  cycle is dropped too, because the sender is about to go back.
- **Sending.** A sent flit stays in its slot until its acknowledge arrives
  one cycle later. On a `nack` the read position steps back by one and the
  flit is sent again. This is go-back-N with N = 1.
- **Speculative forwarding.** A tentative flit may be forwarded in the same
  cycle it is being checked. If the check fails, it leaves with `trash=1`.
- **Stored upsets.** A committed flit whose stored copy has been hit by an
  upset also leaves with `trash=1`. The corrector writes the repaired word
  back into the slot, so the next attempt is clean. A plain retransmission
  would resend the corrupt copy forever.

A stream passes at one flit per cycle with three slots, the minimum for
NACK/GO. The read/write pointers, counters and flags are triplicated and
majority-voted (`tmr_voter`). Synthesis tools merge identical replicas
unless told to keep them (for example with a keep attribute in the
synthesis script).

### The switch (`nackgo_switch`)

The switch is a 5x5 wormhole switch. Ports are numbered 0 local, 1 north,
2 east, 3 south, 4 west. It has an `ng_buffer` on every input and on every
output. Between them sit the routing logic, the arbiters and a crossbar.

- **Routing: LBDR** (`lbdr`, logic-based distributed routing). Routing is
  computed from 26 configuration bits:

  | Bits | Count | Meaning |
  |---|---|---|
  | `Rxy` | 12 | turn permissions |
  | `Cx` | 4 | link connectivity |
  | `dr` | 2 | deroute port |
  | coordinates | 8 | the switch's own x and y |

  The destination's quadrant, compared with the switch's own coordinates,
  selects candidate ports through `Rxy` and `Cx`. If no port qualifies and
  the packet is not for the local tile, the deroute logic picks the port
  named by `dr` (0 N, 1 E, 2 W, 3 S). The head flit carries the destination
  in `data[7:4]` (x) and `data[3:0]` (y); y grows southwards.
- **Two LBDR copies per input.** Each input has two LBDR copies. Both feed
  the arbiters.
- **Arbiters** (`ft_arbiter`). Each output port has a round-robin arbiter
  with wormhole locking.
  - Its next-state logic is duplicated: one copy takes the requests from
    LBDR copy A, the other from copy B.
  - A two-rail checker (`two_rail_checker`) compares the two results. Only
    when they agree is the grant given and the triplicated state register
    loaded.
  - On a disagreement, nothing is granted, the state is held and the
    crossbar output is marked trash. The transfer is simply retried.
  - A tail flit that the output buffer nacks is granted again to the same
    input.
- **Back path.** The nack for an input comes from the output it used in the
  previous cycle.
- **Idle cycle after a tail.** An input waits one idle cycle after each tail,
  so that a nacked tail can be resent before a new head competes. This costs
  one cycle per packet. In the testbench, 20 packets of 4 flits pass in at
  most 106 cycles.
- **Events.** `ev_o` reports four fault events for intermittent-fault
  monitoring: nack, correction, uncorrectable word and arbiter mismatch.

### Boot: self-test, diagnosis, configuration

`ft_noc` builds the mesh. Each tile has a switch, a `bist_unit` and a
triplicated routing primitive.

**Self-test.** After `bist_start_i`, every switch runs two test phases of
`BIST_LEN` cycles each.

1. **Channel test.** An 8-bit LFSR pattern is driven onto all output links.
   Each switch compares what arrives on its inputs with the same sequence.
   A mismatch marks that input port faulty in diagnosis bits [4:0].
2. **Routing-logic test.** The LFSR drives the destinations of LBDR copy A
   on every input, under a fixed test configuration. A reference LBDR
   computes the expected port. A mismatch sets diagnosis bits [9:5].

**Diagnosis delivery.** The 10-bit diagnosis word goes to the local routing
primitive, and from there over the *dual network* to a global controller.
The dual network is a separate ring of small 15-bit routers.

- **Routing primitive** (`routing_primitive`). It has:
  - a 2-slot stall/go buffer,
  - a decoder for packets addressed to this tile,
  - a writer that sends the diagnosis packet,
  - a reader that takes configuration,
  - a fixed-priority allocator; ring traffic goes first.
- **Packets.** Every packet is three flits. The head carries a 2-bit type
  (DIAG 0, ECHO 1, CFG 2) and the 4-bit switch ID.
  - A diagnosis packet carries the word and then its complement, so the
    controller can check it.
- **Three-way handshake.** Configuration uses a three-way handshake:
  1. The controller sends the 26 bits in two 13-bit halves.
  2. The primitive echoes them back.
  3. The controller sends the same bits again.

  Only a matching second copy is applied to the switch.
- **Triplication** (`tmr_routing_primitive`). The dual network is
  triplicated. Voters sit on each primitive's inputs, on the back-pressure
  and on the configuration output.
- **Ring order.** The ring runs through the tiles in row order. It is closed
  through the three-rail `dn_*` ports, where the controller connects.

**Before configuration.** Until a switch has been configured, it holds all
its inputs stalled.

**The global controller** is software on a host processor. It is not part
of this RTL.

## 2. The trace network (`trace_noc`)

The trace network is built from hierarchical, unidirectional rings. Flits
are 16 bits, plus a tail bit. Links use valid/ready handshakes.

### Subrings and routers

Each subsystem has its own clock and runs a subring. On it are:

- **Monitor routers** (`ring_router`, role MON), each with a
  `trace_monitor` on its slave port.
- **One bridge router.**

Each router has two inputs and two outputs:

- port P0 is the ring;
- port P1 is the slave;
- each input has a 3-flit FIFO.

### Arbitration for fairness

Plain round robin on the ring port would starve monitors far from the
subring exit. So the ring port of monitor *K* gets weight N-K-1 (at least 1)
against weight 1 for its own monitor:

- *N* is the number of monitors that are on.
- *K* counts from 0 at the monitor nearest the exit.

With five monitors the weights are 4, 3, 2, 1, 1. The router serves that
many ring packets, then one local packet.

When a monitor is switched on or off, it sends a DELTA packet. Every monitor
router that sees it on its ring port adjusts its weight by +1 or -1.

### Time

Each subring and the main ring have a 10-bit timestamp counter
(`ts_counter`). Monitors stamp each observation with their subring's count.

- **End-of-period packets.** The bridge router of a subring and the debugger
  router emit an end-of-period (EOP) packet each time their counter's low 8
  bits wrap. The debugger counts these periods and can place every
  timestamp on a global time axis.
- **Power-down.** A subsystem that is powered down (`sub_on_i=0`) has its
  counter held at zero.
- **Wake-up packet.** When the subsystem wakes, its bridge sends a wake-up
  (WUP) packet stamped with the main-ring counter. The debugger can then
  re-align that subsystem's time.

### Bridges and the main ring

A `trace_bridge` crosses between a subring clock and the main clock. It uses
two Gray-pointer asynchronous FIFOs of 10 flits with 2-flop synchronizers.

The main ring links the bridge routers and a debugger router. The debugger
router's slave port is `dbg_*`.

### Packet header

| Bits | Field |
|---|---|
| [15:13] | type: TRACE, EOP, WUP, DELTA, CFG |
| [12:11] | subsystem |
| [10:8] | monitor |
| [7:0] | argument |

### Monitors

The monitor here is a simple packetizer. A packet is head, timestamp and
payload words. Monitors start operative; a CFG packet from the debugger
toggles them. The debugger software that rebuilds the trace is not part of
this RTL.

## Departures and open points

- **Flit code.** The SEC-DED Hamming code and the 32-bit data width are this
  design's choice.
- **LBDR bits.** The split of the 26 LBDR bits into fields, and including the
  coordinates among them, is an interpretation.
- **Diagnosis word.** Its second five bits carry the routing-logic test.
- **Dual-network details.** The packet encoding and the exact handshake
  sequence are this design's.
- **Idle cycle.** Each packet costs one idle cycle per switch input.
- **Trace-network arbitration** counts packets deterministically. It does not
  use probabilities.
- **Not built.** The asynchronous (clockless) switch and virtual-channel
  links of the low-power part are not implemented. The global controller and
  the debugger software are not implemented either.

## Files and simulation

- **Sources.** All sources are in `rtl/`, one module or package per file.
  `noc_top` is the top.
- **Testbenches.** They are in `tb/`. Each prints
  `TB_RESULT checks=N failures=M`.
  - `ng_master.sv` and `ng_sink.sv` are behavioural NACK/GO packet sources
    and checking sinks, used by the switch-level tests.

Example with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ft_pkg.sv rtl/trace_pkg.sv \
  tb/ng_master.sv tb/ng_sink.sv tb/tb_nackgo_switch.sv --top-module tb_nackgo_switch
./obj_dir/Vtb_nackgo_switch
```

Self-checking testbenches:

- **Blocks.** `tb_flit_ecc`, `tb_tmr_voter`, `tb_ng_buffer`, `tb_lbdr`,
  `tb_ft_arbiter`, `tb_nackgo_switch`, `tb_ts_counter`.
- **Trace network.** `tb_trace_noc` runs three clocks. It checks trace
  packets against issued minus lost observations, and it checks the EOP,
  WUP and DELTA packets and the weight change.
- **Whole design.** `tb_noc_top` runs `noc_top` at its default sizes:
  - self-test with a stuck pattern generator in tile 0;
  - configuration over the triplicated ring by a controller model
    (`ft_ctrl_model.sv`), with one link declared broken;
  - about 3,700 random packets with link bit flips, trash, sink refusals,
    stalls and stored-flit upsets;
  - the trace-network scenario.

  It counts every mechanism and fails if one never occurred. It takes about
  1.5 minutes to build and run with Verilator.

The routing primitive, the BIST unit, the bridge, the ring router and the
monitor have no testbench of their own. They are exercised through
`tb_noc_top` and `tb_trace_noc`. The arbiter's mismatch path is tested in
`tb_ft_arbiter`, and `tb_noc_top` checks that no mismatch occurs in
fault-free control logic.
