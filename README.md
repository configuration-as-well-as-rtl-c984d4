# Circuit-switched Clos permutation network for a 16-core MPSoC

Streaming multiprocessor applications need guaranteed throughput between
cores, and the pattern of who talks to whom changes at run time. This
design gives every one of 16 cores a dedicated, buffer-free circuit to any
other core. The circuits are set up, used and torn down at run time. Any
permutation of sources to destinations can be realised.

The network is a three-stage Clos network C(4, 4, 4): four 4x4 input
switches, four 4x4 middle switches and four 4x4 output switches. Paths are
set up by a probe that walks through the network. When the probe hits a
blocked link it backs up and tries another middle switch, until every
possible path has been tried. Once the path holds, the switches act as a
pipelined wire: one register per switch, no queues. A middle switch that
has died is noticed during setup, marked and avoided from then on.

A five-port arbiter-plus-crossbar switch (`xbar_switch`) is included as a
separate unit. It does not connect to the Clos network.

## Files

| file | contents |
|---|---|
| `rtl/clos_pkg.sv` | network size, `ans_t` answer codes, `flit_t` data bus, stage enum |
| `rtl/clos_switch.sv` | one 4x4 circuit switch (any stage): path search, backtracking, fault timeout |
| `rtl/clos_network.sv` | the 12 switches wired as C(4,4,4) |
| `rtl/src_ni.sv` | source interface: setup / transfer / release, retry after Back |
| `rtl/dst_ni.sv` | destination interface: Ack / nAck, word delivery |
| `rtl/rr_arbiter.sv` | round-robin arbiter with credit gate and next-priority register |
| `rtl/crossbar.sv` | AND-OR crossbar, 5x5, 54-bit words |
| `rtl/xbar_switch.sv` | five-port switch: arbiter per output + crossbar |
| `rtl/clos_noc_top.sv` | top: 16 `src_ni` + `clos_network` + 16 `dst_ni`, and `xbar_switch` beside them |
| `tb/tb_*.sv` | one self-checking bench per module; `tb_clos_noc_top` runs the whole design |

## Topology and numbering

Switches are numbered SW1 to SW12. SW1-SW4 form the input stage, SW5-SW8
the middle stage and SW9-SW12 the output stage. In `clos_network`, index `s`
is SW(s+1). Terminal `t` (0..15, drawn as 4-bit labels 0000..1111) enters
input switch `t/4` on port `t%4`. It leaves output switch `t/4` on port `t%4`.

The switches are linked like this:

- Output `m` of input switch `a` goes to input `a` of middle switch `m`.
- Output `b` of middle switch `m` goes to input `m` of output switch `b`.

So every source has exactly four paths to every destination, one through
each middle switch. With four middle switches and four inputs per
first-stage switch, the network is rearrangeable. The benches confirm that
every random full permutation completes. In a full permutation all 16
setups start in the same cycle.

## The link

Every link, between two switches or between an interface and a switch,
carries three fields:

| field | direction | width | meaning |
|---|---|---|---|
| Req | forward | 1 | 1: request / hold the link (setup and transfer); 0: release / idle |
| Data (`flit_t`) | forward | 1 + 32 | `dv` flag plus payload |
| Ans (`ans_t`) | backward | 2 | 00 Idle, 01 Ack, 10 Back, 11 nAck |

Ack means the destination has been reached and is ready, so data may flow.
nAck means the destination was reached but cannot take data now. Back means
the link ahead is blocked.

While `dv = 0` and Req is high, the payload is the probe. Its low 4 bits are
the destination terminal. The source holds the probe on the bus until it
gets an answer. Words are sent with `dv = 1`.

## Path setup: the probe and backtracking

This is the heart of the design. It lives in the per-input-port state
machine of `clos_switch` (IDLE, SEEK, PROBE, CONN, BLOCK):

1. **IDLE to SEEK.** Req rises. The port stores the destination from the
   probe and clears its "tried" mask.
2. **SEEK.** The profitable outputs depend on the stage:
   - input stage: all four outputs;
   - middle stage: output `dest/4`;
   - output stage: output `dest%4`.

   The port asks for the lowest-numbered profitable output that is free, not
   yet tried and not marked faulty. An output is free when it is not held,
   its Req register is low and its downstream answer is Idle. Several inputs
   may want the same output in one cycle. A round-robin `rr_arbiter` per
   output then picks one, and the losers ask again next cycle. If no
   candidate is left, the port answers **Back** upstream (BLOCK) until Req
   falls. A busy output counts as blocked.
3. **PROBE.** Req and the probe are forwarded. What happens next depends on
   the answer from downstream:
   - **Ack:** go to CONN and pass Ack upstream.
   - **nAck:** pass it upstream and keep the path.
   - **Back:** release this output, mark it tried and go back to SEEK. This
     is the backtracking step.
   - **Idle for `TIMEOUT` cycles:** the neighbour is taken as dead. The port
     marks the output faulty for good (`link_fault`) and goes back to SEEK.
4. **CONN.** Req and data go forward and Ans goes back, each through one
   register.

Req = 0 releases the path at any point. A released output becomes free
again only once its downstream answer has returned to Idle. This makes sure
the neighbour has seen at least one cycle of Req = 0.

In a middle or output switch there is only one profitable output. A Back
arriving there therefore goes straight upstream. Only the input-stage
switch really has alternatives: it tries its four middle switches in turn.
If all four fail, the source gets Back.

## Fault avoidance

A dead switch answers nothing. The first input switch that probes it waits
`TIMEOUT` cycles (default 32), marks that link faulty and moves on to the
next middle switch. Other input switches learn it the same way. The dead
switch is never used again until reset.

The `sw_fault` input of the top makes a switch dead, for testing. Its state
is cleared and its outputs are held at 0. The end-to-end bench kills SW6
halfway through and checks that later permutations are carried through SW5,
SW7 and SW8.

With one middle switch gone, C(4,3,4) is no longer rearrangeable. A full
permutation then may not hold all at once. Sources that get Back retry, and
everything still completes.

`TIMEOUT` must be longer than the slowest honest round trip. The probe
needs about three cycles per switch forward and one back. A destination
that answers nAck resets the timer.

## Source and destination interfaces

`src_ni` turns a command (`cmd_dest`, `cmd_len` words) into the three
phases:

- **Setup.** Raise Req with the probe.
  - On Ack, start the transfer.
  - On nAck, keep waiting; the path stays held.
  - On Back, drop Req, wait for Idle, back off `BACKOFF + ID mod 4` cycles
    and probe again.
- **Transfer.** Take one word per cycle from the `tx_valid/tx_ready` stream
  while the answer is Ack. Take no new word while it is nAck.
- **Release.** Drop Req after the last word. Wait for Idle and pulse `done`.

`dst_ni` answers Ack while `rx_ready` is high and nAck while it is low. It
hands every arriving word to the core on `rx_valid/rx_data`. It has no
buffer. Words already in flight when nAck is raised still arrive, up to one
network round trip of them, so the core must drop `rx_ready` with that much
room left.

## Timing

- Every switch output is a register. An established path has a forward
  latency of 3 cycles from network input to network output, plus one cycle
  in each interface.
- Ans takes 3 cycles back through the switches.
- Setup with no contention takes about 12 cycles from command to the first
  word.
- A single clock, with active-low synchronous reset.

## The five-port arbiter and crossbar

`rr_arbiter` has requests `R`, grants `G`, a `credit` input and a
next-priority register `next_p`. It grants at most one request per cycle,
and only while credit is high. The search starts at `next_p`, and after a
grant `next_p` moves to the winner + 1.

`crossbar` builds each output as an OR of AND terms. Each term is an input
word ANDed with "this output selects that input". A disabled output drives
zero. The defaults are 5 inputs and 5 outputs of 54 bits.

`xbar_switch` puts one arbiter per output over the inputs that want it. The
grants drive the crossbar selects, so each granted input moves one word per
cycle, combinationally.

## Parameters

| parameter | default | where | origin |
|---|---|---|---|
| C(n,m,p) | 4,4,4 | `clos_pkg` | published configuration |
| `DATA_W` | 32 | `clos_pkg` | chosen |
| `TIMEOUT` | 32 | switch, network, top | chosen |
| `BACKOFF` | 4 | `src_ni` | chosen |
| `LEN_W` | 8 | `src_ni`, top | chosen (up to 255 words per transfer) |
| `N` (arbiter) / `XN` | 5 | arbiter, xbar, top | published (R(4:0), G(4:0)) |
| `W` / `XW` | 54 | crossbar, xbar, top | chosen: the published crossbar has a bit 53 |

The network size lives in the package as constants, not as module
parameters. To build another C(n,m,p), edit `clos_pkg`. The wiring in
`clos_network` assumes that a middle switch has as many ports as there are
first-stage switches.

## What follows the published design and what does not

**Follows the published design:**

- the C(4,4,4) topology and switch numbering;
- the Req/Ans bit format and the four Ans codes with their meaning;
- the setup / transfer / release phases;
- backtracking over the four paths;
- rerouting around a failed switch;
- an arbiter with requests, grants, credit and a next-priority register;
- a compare-and-AND-OR crossbar with five inputs.

**Chosen here,** because the description does not say:

- the data width and `dv` flag;
- the probe format;
- the search order (lowest index first);
- round-robin arbitration;
- treating a busy output as blocked;
- the timeout as the fault detector;
- all pipeline registers;
- the source back-off and interface handshakes;
- a crossbar output driving zero when idle (the published schematic seems
  to hold the old value);
- joining arbiter and crossbar into `xbar_switch`.

**Not built:**

- an error correction block that is named but not described;
- a priority/energy-aware choice of forwarding path (no rule is given);
- the physical test chip.

The five-port switch and the Clos network are not connected to each other.
The description gives no way the two fit together: the Clos switches are
4x4 circuit switches without credits.

## Verification

Each bench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| bench | what it checks |
|---|---|
| `tb_clos_switch` | search order 0,1,2; Back then retry; timeout marks output 1 faulty and it is skipped later; Ack/nAck pass-through; one-cycle forwarding; release; Back when all paths fail; two simultaneous probes get different outputs; middle- and output-stage routing |
| `tb_clos_network` | 12 random permutations (every third partial) with all setups started in the same cycle: every word arrives in order at the right destination, exactly 3 cycles after entering; every arrangement completes; backtracking occurred |
| `tb_src_ni` | probe format, release after Back, back-off gap, nAck wait, no word without Ack, word count and order, release, status pulses |
| `tb_dst_ni` | answer codes and delivered words against random stimulus |
| `tb_rr_arbiter`, `tb_crossbar`, `tb_xbar_switch` | cycle-by-cycle comparison with reference models |
| `tb_fault_reroute` | whole design: a path from SW2 holds SW5, then SW6 dies; a second path from SW2 must time out on SW6 and run through SW7, with only that link flagged |
| `tb_clos_noc_top` | whole design at default parameters: 16 random full permutations with random nAck from destinations; SW6 killed after 8. Counts backtracks, source retries, nAcks, fault timeouts, releases, crossbar contention and credit stalls, and fails if any never occurs |

To run one bench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_clos_noc_top \
  -y rtl -y tb +libext+.sv rtl/clos_pkg.sv tb/tb_clos_noc_top.sv
./obj_dir/Vtb_clos_noc_top
```

Each bench finishes in well under a second.
