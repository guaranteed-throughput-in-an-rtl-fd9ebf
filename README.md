# Circuit-switched 16x16 permutation network on a Clos topology

Many multiprocessor workloads (FFT shuffles, matrix transposes, interleavers
of turbo and LDPC decoders) communicate in *permutations*: every source
talks to exactly one destination and every destination hears from exactly
one source, and the pattern changes at run time. This RTL implements an
on-chip network for that traffic. It does not route packets through
buffers. Instead it sets up a dedicated *circuit* from each source to its
destination and then streams data through the circuit at one word per clock.
The circuit is found at run time by a probe. The probe walks through a
three-stage Clos network, backs up when it meets a blocked link, and tries
another middle switch. Once a path stands, nothing else can use its links,
so its throughput is guaranteed.

The design is written in synthesizable SystemVerilog (IEEE 1800-2017). It
has no memories and no vendor primitives, so it targets FPGAs and ASICs
alike.

## Topology: C(4,4,4)

A three-stage Clos network C(n,m,p) has `p` first-stage switches with `n`
inputs each, `m` middle-stage switches and `p` last-stage switches with `n`
outputs each. The default is C(4,4,4): 16 inputs, 16 outputs, and twelve
4x4 switches.

```
 inputs 0-3  -> S1[0] --+   +-- M[0] --+   +-- S3[0] -> outputs 0-3
 inputs 4-7  -> S1[1] --+---+-- M[1] --+---+-- S3[1] -> outputs 4-7
 inputs 8-11 -> S1[2] --+   +-- M[2] --+   +-- S3[2] -> outputs 8-11
 inputs 12-15-> S1[3] --+   +-- M[3] --+   +-- S3[3] -> outputs 12-15
```

* First-stage switch `i`, output `k` feeds middle switch `k`, input `i`.
* Middle switch `k`, output `l` feeds last-stage switch `l`, input `k`.
* Network input `s` is port `s % 4` of `S1[s/4]`.
* Network output `d` is port `d % 4` of `S3[d/4]`.

A 4-bit destination address `d` is therefore `{last-stage switch, port}`.
The middle stage routes on bits `[3:2]` and the last stage on bits `[1:0]`.
The first stage does not route on the address. It *searches*: any of the
four middle switches leads to every destination.

Because `m = n`, the network is rearrangeable: every permutation has a
conflict-free set of 16 paths. The sizes are parameters of
`pn_clos_network` (`N_PER_SW` = n, `N_MID` = m, `N_SW` = p). They must be
powers of two.

## The link handshake

Every link, whether between switches or at the network edge, has the same
signals, defined in `pn_pkg`:

| direction  | field            | meaning                                                   |
|------------|------------------|-----------------------------------------------------------|
| downstream | `req` (1 bit)    | 1: request / hold the link; 0: release it                 |
| downstream | `vld` (1 bit)    | the data word is valid (transfer phase)                   |
| downstream | `data` (32 bits) | probe address (setup phase, low 4 bits) or payload        |
| upstream   | `ans` (2 bits)   | `00` none, `01` Ack, `10` Back, `11` nAck                 |

* **Ack (01):** the path is complete and the receiver is ready.
* **nAck (11):** the path is complete but the receiver cannot take data
  now. This is end-to-end flow control.
* **Back (10):** a link on the way is blocked and no alternative was found.
* **00:** "no answer yet". Every idle or still-searching controller
  returns it.

A connection goes through three phases:

1. **Setup.** The source raises `req` and puts the destination address on
   `data[3:0]`. It holds both until an answer arrives.
2. **Transfer.** After Ack or nAck, the source keeps `req` high. In every
   cycle in which it sees Ack it may send a word with `vld = 1`.
3. **Release.** The source drops `req`. Each switch frees its link as the
   low `req` passes, and answers `00` again.

After Back, the source must drop `req` for at least one cycle. It may
then retry.

## Path setup: exhaustive profitable backtracking

This is the core of the design. The search is spread over the three
stages; only the first stage backtracks.

**Middle and last stages.** Each has a single *profitable* output: the
last-stage switch that holds the destination, or the destination port. If
that output is free, the probe moves on. If the output is busy, or another
probe wins it in the same cycle, the switch answers Back at once. It keeps
answering Back until its upstream drops `req`.

**First stage.** It tries middle switches 0, 1, 2, 3 in that order, each at
most once per probe:

* A middle link that is owned by another input, or not yet idle, is
  skipped at once. The probe is never sent into it.
* If the probe is sent and Back comes back, the first stage releases that
  link (Req low) and tries the next middle switch in the following cycle.
* Only when all four middle switches have failed does the source receive
  Back.

Example. Path 4→8 holds the link M[0]→S3[2]. A probe from input 1 to
output 9 then goes:

1. S1[0] sends it to M[0].
2. M[0] finds its link to S3[2] busy and answers Back.
3. S1[0] drops the link to M[0] and tries M[1].
4. M[1] forwards to S3[2], which grants port 1.
5. Ack travels back through M[1] and S1[0] to the source.

The testbench reproduces this case exactly.

**What the search does not do.** It never moves paths that are already
set up. When 16 probes compete at once, a late probe can therefore find
that no middle switch has both of its links free, even though the
permutation as a whole could be routed. That probe gets Back, and its
source retries after paths are released. A source that receives Back
**must** retry. The end-to-end test shows this: in runs with full
permutations, between 14 and 16 of the 16 paths were held at the same
time, and every word was still delivered.

The effect is plainest when a permutation is arranged one path at a time
and every path is held. The end-to-end test starts the 16 sources 40
cycles apart and has each hold its path for 1200 words. In many random
permutations all 16 paths stand together. In others, the last one or two
probes keep getting Back until an earlier path is released, and at most 14
paths are held at once. Rearrangeability guarantees that some routing of
every permutation exists. It does not guarantee that this greedy,
path-by-path search finds that routing. A user who needs all 16 paths at
the same moment must be ready to release paths and set them up again in a
different order.

A probe aimed at an output that is already in use gets Back the same way.
This happens when the traffic is not a permutation, or while the pattern is
changing.

## Inside a switch

`pn_switch` is the same for all three stages. The `STAGE` parameter selects
the routing of its input controllers, and `ROUTE_LSB`/`ROUTE_W` give the
address bits to route on. Each switch has four kinds of part:

* **Input controller (`pn_input_ctrl`), one per input.** An FSM with the
  states IDLE, REQ, WAIT, XFER and BACK.
  * REQ asks the arbiter for an output.
  * WAIT forwards the probe on the granted output and waits for the
    answer.
  * XFER passes Req, valid and data straight through and returns the
    downstream Ack/nAck.
  * A falling `req` sends the FSM from any state back to IDLE and
    releases the output.
  * The answer to upstream is registered.
* **Arbiter (`pn_arbiter`).** Acts as referee for the requests.
  * It grants an output only when nobody owns it and its link is idle.
  * Several inputs that want the same free output in the same cycle are
    served round-robin per output.
  * The grant is combinational: an input controller learns in the cycle
    of its request whether it won. Ownership takes effect in the next
    cycle.
  * The arbiter also steers each output's answer back to the controller
    that owns it (the grant bus).
* **Crossbar (`pn_crossbar`).** Each output carries the Req/valid/data of
  its owner, or zeros when it has no owner.
* **Output controller (`pn_output_ctrl`), one per output.** Holds the
  register that drives the outgoing link. It reports the link idle only
  when the registered Req is low *and* the downstream answer is back to
  `00`. This rule is what stops an answer of a just-released path from
  reaching the next owner of the link.

## Timing

| event                                        | cycles                                          |
|----------------------------------------------|-------------------------------------------------|
| per switch, forward (Req / data)             | 1 (output controller register)                  |
| per switch, backward (answer)                | 1 (input controller register)                   |
| probe through one switch, no contention      | 3 (IDLE→REQ, grant, link register)              |
| setup, Req raised → Ack seen by source       | 14, with a receiver that answers from a register |
| data, source → receiver register             | 3 switch registers (4 edges until sampled)      |
| throughput on a set-up path                  | 1 word per cycle, no gaps                       |
| each first-stage backtrack (Back from a middle switch) | 5 extra cycles                        |

The 14-cycle setup breaks down as 3 switches × (3 forward + 1 backward),
plus one cycle in the receiver, plus one cycle for the source to sample
the answer.

**Receiver slack.** nAck takes a round trip to stop the source. About 10
cycles of words may still arrive after the receiver first answers nAck. A
receiver must raise nAck while it still has at least that much room. The
testbench uses 12 words of slack.

## What follows the original design and what is chosen here

Taken from the network this RTL implements:

* The C(4,4,4) Clos topology.
* Pipelined circuit switching with setup, transfer and release phases.
* The 1-bit Req and 2-bit Ans handshake and its Ack/nAck/Back codes.
* A 4-bit output address in the probe.
* Backtracking search over the middle switches in the order 0-1-2-3.
* The switch built from input controllers, output controllers, an arbiter
  and a crossbar, with routing that differs per stage.

Choices made here, where the original leaves the point open:

* A 32-bit data word.
* The `vld` bit, which lets a source pause under nAck.
* The `00` "no answer" code.
* Where the pipeline registers sit.
* Round-robin arbitration and the link-idle rule.
* Backtracking in the first stage only; middle and last stages answer
  Back at once.
* Back to the source when the search fails, with retrying left to the
  source.
* Treating nAck during setup as "path set up, not ready".
* Synchronous active-low reset.

Not included: the processing elements (sources and receivers) and their
buffers. The testbench models them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_pn_crossbar`, `tb_pn_output_ctrl`: random stimulus against
  expected values.
* `tb_pn_arbiter`: a reference model of ownership and round-robin, plus
  directed fairness and idle-rule cases.
* `tb_pn_input_ctrl`: directed sequences for each stage. They cover the
  search order, skipping a refused link, backtracking, Back after four
  failures, pass-through of Ack/nAck/data, and release.
* `tb_pn_switch`: a first-stage and a last-stage switch with modelled
  neighbours. They cover backtracking, contention for the last free link,
  reuse after release, and two probes for one output port.
* `tb_pn_clos_network`: the full 16x16 network at its default size, with
  16 source and 16 receiver models. The scenarios, in order:
  1. One path, checking the latencies above.
  2. The backtracking example, followed by a probe to a busy output that
     must exhaust all four middle switches.
  3. Full permutations: perfect shuffle, 4x4 transpose, then random ones.
  4. Six successive random permutations per source, with receivers that
     throttle using nAck.
  5. Three permutations arranged path by path while earlier paths are
     held. This scenario runs before scenario 4. It reports how many paths
     stood at once and how many probes were answered Back.

  Receivers check the address of every probe, word order, one source per
  connection, and buffer overflow. At the end, the word counts of every
  source/destination pair must match. The test also counts setups,
  first-stage backtracks, Backs to sources, last-stage blocks, nAck cycles
  and releases, and fails if any of them never happened. It runs in about a second.

The input controller and the arbiter also carry assertions on the
handshake:

* Ack/nAck are sent only on a set-up path.
* Back is sent only from the blocked state.
* A falling Req always returns the controller to idle with answer `00`.
* An output is never granted while it is owned or not idle.

To run a testbench with Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/pn_pkg.sv \
    tb/tb_pn_clos_network.sv --top-module tb_pn_clos_network -o sim
./obj_dir/sim
```

Replace the testbench name to run the others.

## Files

| file                     | content                                                   |
|--------------------------|-----------------------------------------------------------|
| `rtl/pn_pkg.sv`          | answer codes, link word type, stage enum, data width      |
| `rtl/pn_clos_network.sv` | top: the three-stage network                              |
| `rtl/pn_switch.sv`       | switch: input/output controllers, arbiter, crossbar       |
| `rtl/pn_input_ctrl.sv`   | per-input FSM and probe routing                           |
| `rtl/pn_arbiter.sv`      | output ownership, round-robin grants, answer steering     |
| `rtl/pn_crossbar.sv`     | forward multiplexers                                      |
| `rtl/pn_output_ctrl.sv`  | link register and idle detection                          |
| `tb/tb_*.sv`             | one testbench per module                                  |

To change the data width, edit `pn_pkg::DATA_W`. The probe address always
sits in the low bits of the data word.
