# Asynchronous GALS Network-on-Chip: RTL model

A chip made of many synchronous blocks, each with its own clock, needs an
interconnect that belongs to none of those clocks. This design is such an
interconnect: a 2D mesh of five-port wormhole routers with two virtual
channels. Links use a quasi-delay-insensitive (QDI) 4-phase, 4-rail
handshake. Every router has a GALS interface (globally asynchronous, locally
synchronous) that crosses into the clock domain of one IP block and also
generates that block's clock. The routers can slow down by themselves when
idle. Each router sits in a test wrapper reached through a 2-wire
configuration chain.

The RTL follows the architecture of the ANoC framework described in
"A Fully-Asynchronous Low-Power Framework for GALS NoC Integration": the
router micro-architecture, the link pipelining, the GALS interface, the
power-down mode and the test wrapper. The asynchronous circuits are modelled
as clocked logic (see [Timing model](#timing-model-read-this-first)). Every
choice the original description leaves open is this design's own, and the
file headers say which is which.

## Timing model (read this first)

The NoC has no clock in the real circuit. Here all of it (routers, links,
wrappers and the NoC side of each GALS interface) runs on one clock,
`noc_clk`. One `noc_clk` period stands for one handshake phase. Each Muller
C-element is a flip-flop that keeps its value while its inputs disagree,
which is the usual way to hand asynchronous logic to timing tools. As a
result:

* Protocol-level behaviour is real: the handshakes, credit counts,
  arbitration order, wormhole locking and stalls.
* Absolute speed is not. A link with one pipeline stage takes a new flit
  every 7 `noc_clk` cycles, and 5 with no stage. The end-to-end test uses a
  450 ps `noc_clk`, which gives about 317 Mflit/s per link. Treat that as a
  parameter of the model, not a silicon number.
* The IP side of each GALS interface is truly asynchronous to `noc_clk`.
  Its clock comes from a behavioural oscillator model with real delays. The
  clock-domain crossing is therefore exercised with unrelated clocks.

## Flits and source routing

A flit is 34 bits: `{bop, eop, data[31:0]}` (`noc_pkg::flit_t`). Packets
cross the network in wormhole fashion: the header flit (`bop=1`) opens a
path and the flit with `eop=1` closes it. A single-flit packet has both bits
set.

Routing is source routing. The low 20 payload bits of the header are a list
of 2-bit turn codes, one per router, with the first router's code in bits
1:0. A router entered through port `p` that reads code `c` sends the packet
to port `(p + 1 + c) mod 5`. Ports are numbered N=0, E=1, S=2, W=3, R=4,
where R is the local port. Codes are relative to the input, so a code can
never send a packet back where it came from. Each router shifts the field
right by two bits before storing the header. Ten hops fit, which is enough
for any path in the default 5x3 mesh. `noc_pkg` has `turn_to_port`,
`port_to_turn` and `shift_path`. `tb_anoc_top` shows how an IP builds an XY
path.

## The router

`anoc_router` has five input ports (`router_in_port`) and five output ports
(`router_out_port`). There is no central arbiter. Output port `o` listens to
the four other inputs, with its input `k` being router input
`(o + 1 + k) mod 5`. Both VCs are independent all the way through.

**Input port.** Flits are steered by VC into a queue of two entries per VC.
For a header, the port computes the output from the turn code, shifts the
path, and keeps the output for the body flits that follow. When a header
reaches the head of its queue, the port raises `pkt_req` to that output
only. After that, the output takes flits with `take`.

**Output port, per VC.** A round-robin direction arbiter grants one of the
requesting inputs. The grant is held until the EOP flit of that packet
passes, which is the wormhole lock. Flits of the granted input move into a
one-flit VC buffer.

**Output port, per flit.** A round-robin VC arbiter picks between the two VC
buffers whose downstream VC still has a credit, and sends the flit on the
link.

**Credits (send/accept).** Each output holds 2 accept tokens per VC. Two is
the room of the downstream queue, so a link is never blocked by a flit that
cannot be stored. Sending consumes a downstream token. At the same moment,
an upstream token is returned to the input the flit came from. The input
gathers tokens from all five outputs and passes them upstream. Two outputs
can return a token for the same VC in the same cycle: the tail of one
packet and the head of the next leave through different outputs. Those
tokens are counted and forwarded one per cycle, so none is lost. Getting
this wrong shows up only under contention, as a slow leak of credits that
finally deadlocks a VC.

**Automatic power-down** (`power_down_ctrl`, parameter `APD`). After
`IDLE_CYCLES` cycles with no flit arriving or held, the router enters its
low-power mode. In that mode the output ports send at most one flit every 4
cycles. This models the lowered supply, which gives a 7.2 ns flit cycle
instead of 1.8 ns. The router keeps working in that mode. New activity
starts a `WAKE_CYCLES` wake-up, after which full rate returns. `low_power`
shows the state.

## Links: QDI 4-phase, 4-rail

`qdi_link` carries one direction between two routers. The 35-bit word
(VC and flit), padded to 36 bits, is sent as 18 one-of-four digits:
digit value `d` raises rail `d`. The return-to-zero sequence has four
phases:

1. The rails carry the code word.
2. The receiver lowers `ack_n`.
3. The rails return to zero.
4. `ack_n` rises again.

`qdi_tx` runs the sender side and shows `ready` only when idle. `qdi_rx`
detects completion (every digit has exactly one rail high) and decodes the
word.

Between them sit `LINK_STAGES` WCHB stages (`qdi_wchb_stage`). A WCHB stage
(weak-condition half buffer) has one C-element per rail, gated by the next
stage's acknowledge, plus a completion detector driving its own
acknowledge. A stage splits the long handshake loop of a long wire. One
stage per tile of about a millimetre is the default.

The accept tokens flowing back are single wires per VC, delayed by the same
number of stages. They are not QDI-encoded.

## GALS interface

`gals_if` joins a router's R port to one IP. It has two dual-clock FIFOs
(`johnson_fifo`), one per direction. Each is 5 words deep, with
Johnson-coded pointers. Only one pointer bit changes per step, so two plain
synchronizer flip-flops are safe. Both VCs share each FIFO: an entry stores
the VC with the flit, and flits keep arrival order (no VC arbitration).

Credits cross the boundary as follows:

* **Towards the IP.** The interface returns a token to the router each time
  the IP has consumed a flit of that VC. The count of consumed flits per VC
  crosses into the NoC domain as a 3-bit Johnson counter, and the NoC side
  turns every step into one token. With at most 2 flits per VC in flight and
  5 FIFO slots, the FIFO cannot overflow. An assertion checks this.
* **From the IP.** The interface keeps 2 tokens per VC for the router input.
  It forwards the FIFO head only if its VC has a token.

The IP side uses send/accept: a flit moves at an `ip_clk` edge where both
are high, one per cycle in each direction. A flit written on one side is
visible two edges later on the other side.

The IP clock is generated inside the interface:

* `delay_line_prog` holds a 4-bit delay code and a 2-bit scale that the IP
  writes (`ip_cfg_we`). A staging register makes the new value take effect
  by the third edge. `ip_cfg_busy` is high while the update is in progress.
* `clock_gen` is a behavioural oscillator. Its period is
  `(1000 + 100*code) ps * 2^scale`: 1.0 to 2.5 ns (1 GHz to 400 MHz), then
  divided by 1, 2, 4 or 8. The setting is sampled once per period, so a
  change never makes a short pulse. It also runs during reset (at 2.5 ns),
  so the IP side can be reset. It is the only non-synthesizable file in
  `rtl/`; a real one is a ring of standard-cell delay elements.

## Test wrapper and configuration chain

`test_wrapper` puts five input test cells and five output test cells around
a router, plus a control module. In `anoc_top` (parameter `DFT=1`) the
wrappers form one chain: `cfg_in` → node 0 → node 1 → … → `cfg_out`. These
two wires are the only test pins.

The chain carries one dual-rail symbol per `noc_clk`:

| `cfg` | meaning |
|---|---|
| `01` | bit 0 |
| `10` | bit 1 |
| `00` | no symbol |
| `11` | UPDATE |

Data symbols shift a 41-bit register in each wrapper: the new bit enters at
the top and bit 0 leaves on `cfg_out` one clock later. UPDATE is passed down
the chain, and every wrapper applies its register when UPDATE reaches it.
The register layout is:

| bits | field |
|---|---|
| 0 | go: inject the test flit once |
| 2:1 | mode: 0 functional, 1 router test, 2 link test |
| 5:3 | port (N, E, S, W, R = 0..4) |
| 6 | VC of the test flit |
| 40:7 | test flit (`bop`, `eop`, payload) |

The modes do the following:

* **Functional.** The wrapper is transparent.
* **Router test.** The input cell of `port` injects the flit into the
  router. Every output cell captures what comes out and returns the credit
  at once. Nothing reaches the links.
* **Link test.** The output cell of `port` drives its link directly,
  bypassing the router. The input cells of the neighbouring wrapper (also
  in link test) capture it.

The first flit captured after an UPDATE is written back into the register
as `{flit, vc, port, mode, 1}`. The next shift brings it out while the next
test goes in. To load the whole chain, send the word for the last node
first (`NN*41` symbols), then one UPDATE. The results come out in the same
order, last node first. The task `chain_shift` in `tb/tb_anoc_top.sv` is a
working driver. Only one flit is captured per update, and the test modes
assume no functional traffic.

## Top level

`anoc_top` builds an `NX` x `NY` mesh (5x3 by default). Node `(x, y)` has
index `y*NX + x`, with x growing east and y growing south.

* E/W and S/N neighbours are joined by one `qdi_link` per direction.
* Border ports are tied off. An assertion checks that nothing is ever
  routed off the mesh.
* Each node's IP interface is brought out as arrays indexed by node: send
  and accept in both directions, clock programming, the generated `ip_clk`
  with its synchronised reset, and `low_power`.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `NX`, `NY` | 5, 3 | mesh size |
| `LINK_STAGES` | 1 | WCHB stages per link |
| `APD` | 1 | automatic power-down on |
| `IDLE_CYCLES` | 16 | idle time before power-down |
| `DFT` | 1 | routers wrapped, chain present |

## Where this model departs from the original design

* The asynchronous logic is modelled as clocked logic (see above). There
  are no C-element, mutex or synchronizer library cells; their behaviour is
  written inline.
* The chip described connects 22 synchronous islands to 15 routers, plus an
  external interface. Here every router has exactly one IP port (15 in all)
  and there is no external interface.
* Link accept tokens are plain wires, not QDI channels. The link word is
  padded to whole 4-rail digits. A link direction here has 72 rails, one
  acknowledge and two accept wires (75 signals). The original link has 92
  signals, and its split is not published.
* Pausable clocking is not modelled. The interface relies on its FIFOs and
  synchronizers only.
* The test wrapper is built from its described parts, but its symbol code,
  register layout and modes are this design's own. The original test
  protocol and its vector set are not reproduced. Stuck-at coverage of the
  gate netlist is out of scope for an RTL model.
* The IEEE 1500 wrappers of the IP blocks are not included. The wrappers'
  use of links as high-bandwidth test-access paths is covered only as far
  as the link-test mode: one flit per update.
* All links have the same number of pipeline stages (`LINK_STAGES`). On the
  chip, the depth varied with link length.
* The path-field width, turn code, port numbering, arbiter policies,
  power-down thresholds and clock-generator step size are this design's own
  choices.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl rtl/noc_pkg.sv tb/tb_anoc_top.sv \
    --top-module tb_anoc_top -o sim
./obj_dir/sim +verilator+rand+reset+2 +verilator+seed+1
```

Replace `tb_anoc_top` with any other testbench. Many random traffic choices
come from the seed, so run a few seeds.

`tb_anoc_top` runs the full default 5x3 NoC, with unrelated clocks per IP.
Every IP first programs its clock to a random frequency. The IPs then send
packets of 1 to 4 flits on both VCs, over XY paths between random nodes:
about 450 flits in total. Receivers stall at random, and routers that have
powered down between bursts wake up. After the traffic, the test runs a
router test and a link test through the configuration chain. Finally it
checks that the idle NoC powers down. It checks every flit's payload, VC and
destination, the order of flits per source, destination and VC, and that
the path field is shifted once per router. It fails if any mechanism never
happened: packets on each VC, backpressure, IP stalls, contention for an
output, wake-up from power-down, clock reprogramming, or either chain test.

`tb_anoc_load` puts a telecom-sized load on the same default NoC. The load
is 150000 flits, which a baseband receiver task moves in about 250 µs and
which needs 200 Mflit/s on a path. All IP clocks run at 1 GHz.

* One 6-router path streams at 315 Mflit/s, one flit per 7 `noc_clk` per
  link.
* With uniform random traffic between all 15 IPs, the 150000 flits arrive
  in about 56 µs of simulated time. Every flit is checked.

The test takes about 15 s of wall time. Remember that these rates follow
from the 450 ps `noc_clk` chosen for the model.

The block testbenches are:

| testbench | what it checks |
|---|---|
| `tb_router_in_port`, `tb_router_out_port` | the router's two halves against reference queues, including the credit and wormhole rules |
| `tb_anoc_router` | random multi-port traffic through one router |
| `tb_qdi_wchb_stage`, `tb_qdi_link` | the 4-phase protocol, latency and rate |
| `tb_johnson_fifo` | random clock ratios |
| `tb_gals_if` | both directions of the interface with random IP stalls |
| `tb_power_down_ctrl`, `tb_delay_line_prog`, `tb_clock_gen` | state sequences and measured clock periods |
| `tb_test_wrapper` | the chain protocol and the three modes of one wrapper, including the links it drives and captures |

The RTL carries assertions, for example: no queue overflow, no credit beyond
its maximum, no send on a busy link, and no flit sent off the mesh. Keep
`--assert` on.
