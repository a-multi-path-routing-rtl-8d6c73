# Multi-path network on chip with in-order delivery and no re-order buffers

Spreading the traffic between two cores over several paths lowers the load on
the busiest links of a network on chip, and with it the clock frequency and
power the network needs. The catch is ordering: packets that take different
paths can overtake one another, and the usual remedy, a re-order buffer at the
receiver, is large, power-hungry and cannot be sized safely (when it fills,
packets must be dropped and resent).

This design puts the packets back in order inside the network instead. Every
packet of a traffic flow (a *commodity*: one source, one destination) carries
a sequence number. The switch where the flow's paths meet again keeps, per
commodity, the number of the packet it expects next, and its arbiter simply
refuses to forward any other packet of that commodity. A refused packet waits
in its input buffer; because the paths are *non-intersecting* (they share no
link before the meeting point), the expected packet is on another input and
cannot be blocked behind it. Nothing is dropped and the receiver sees every
flow in order.

On top of this the network tolerates link faults:

- **transient errors**: every flit carries an extended Hamming code; the
  receiving interface corrects single-bit errors and detects double-bit ones.
  *Critical* packets are sent several times (n_t copies), over different paths,
  and the receiver keeps the first copy that arrives without an uncorrectable
  error.
- **permanent failures**: a commodity has up to four paths; marking a path
  failed moves its share of the traffic to the remaining paths.

The RTL is a 4 x 3 mesh (`mpnoc_mesh`) of five-port wormhole switches, each
with a source and a receiving network interface (NI).

## In-order delivery, step by step

1. The source NI (`ni_tx`) numbers every packet it transmits per flow,
   starting at 1 after reset (8-bit numbers, wrapping after 255).
2. It picks a path for the packet at random with the programmed
   probabilities (`path_selector`) and writes that path's source route into
   the head flit.
3. Every switch forwards the packet along its route. In switches where the
   re-order check is **off** for the commodity (all switches along the way),
   it behaves as a plain wormhole switch.
4. In the switch where the check is **on** (normally the destination switch,
   where non-intersecting paths meet), the head flit's commodity and number
   are looked up in `reorder_lut`. The arbiter (`inorder_arbiter`) only grants
   an output to a head flit whose number equals the table entry; the grant
   increments the entry. An out-of-order head stays in its `input_buffer`,
   and the whole packet behind it stays in the network, held back by
   credit-based flow control, until its turn comes.

Why this cannot deadlock on its own: packets on one path stay in order
(wormhole switching keeps them in sequence), so the packet the table waits for
is always the front packet of some other path, and that path does not pass
through the blocked input. This argument needs the paths of a commodity to be
truly non-intersecting up to the switch with the check. If two paths share a
link before that point, the network can deadlock. Choosing the paths is a
design-time job and is not checked by the hardware.

The argument covers one commodity at a time. Two commodities can still block
each other if their checks sit in the same switch and both have paths
entering it through the same two inputs. In that case each input's front
packet can be an out-of-order packet of one commodity, with the packet the
other commodity waits for queued behind it. Neither front packet can then
leave. Avoid such path pairs when choosing paths, or put the two commodities'
checks in different switches. The hardware does not detect this case, and no
testbench exercises it.

The check is enabled per commodity and per switch through the configuration
port. A table entry is reset to 1 whenever its enable is written, so
configure the check before traffic for that commodity starts.

## Critical packets and link errors

A source NI sends a critical packet n_t times (n_t is programmed per flow,
1..7). Every copy gets its own sequence number, so the in-order check passes
the copies one after another. The first copy takes the randomly chosen path
and each further copy takes the next enabled path, so two copies use
different links whenever two paths exist. The head flit of the last copy has
`last_copy` set. Non-critical packets are sent once, with `last_copy` set.

The receiving NI (`ni_rx`) decodes every flit (`secded_dec`):

| syndrome | overall parity | result |
|---|---|---|
| 0 | ok | no error |
| any | wrong | single error: corrected (`corrected_event`) |
| non-zero | ok | double error: the packet copy is bad (`error_event`) |

It collects the whole packet, then decides:

- it accepts a copy that is good if no copy of the same group was accepted
  before;
- it drops a good copy if one was already accepted (`dup_event`);
- if the group's last copy is bad and nothing was accepted, the packet is lost
  (`lost_event`).

One accepted bit per commodity is enough because the network delivers a
group's copies consecutively and in order. Errors beyond two bits in one flit
can be mis-corrected, as with any SEC-DED code.

The check field covers the whole flit except the route field of the head
flit, which every switch rewrites. An error in the route bits, or in the
head/tail marker bits, is therefore not caught. Such an error misroutes the
packet or breaks its framing.

## Packet and flit format

A flit has 74 bits: `{head, tail, ecc[7:0], data[63:0]}`. A packet is one head
flit and 1 to `MAX_PAYLOAD` (4) payload flits. The last payload flit has
`tail` set. The head flit's data holds `head_t` (from `noc_pkg`):

| bits | field | meaning |
|---|---|---|
| 61 | last_copy | last copy of this packet |
| 60 | critical | packet was replicated |
| 59:54 | comm | commodity number, indexes the re-order tables (64) |
| 53:46 | pid | sequence number within the commodity |
| 45:38 | src | source node address |
| 37:30 | dst | destination node address |
| 29:0 | route | source route: 3-bit output port per hop, hop 0 in bits 2:0 |

Port numbers are: 0 local, 1 north (y-1), 2 east (x+1), 3 south (y+1) and
4 west (x-1). A switch takes its output port from `route[2:0]` and shifts the
route right by three bits as the head flit crosses its crossbar. The last
entry of a route must be 0 (local), to deliver the packet to the node's NI.
Routes can be up to 10 hops long.

## Blocks

| module | role |
|---|---|
| `mpnoc_mesh` | top: COLS x ROWS nodes, mesh links, configuration decode, error-injection hook |
| `mp_switch` | five-port wormhole switch with the in-order check |
| `input_buffer` | input FIFO, returns one credit per freed slot; also used in `ni_rx` |
| `reorder_lut` | next expected number and check enable per commodity |
| `inorder_arbiter` | round-robin per output, refuses out-of-order heads, wormhole lock |
| `crossbar` | output multiplexers, advances the route of head flits |
| `output_buffer` | output FIFO, sends while it holds credits |
| `path_selector` | LFSR-based random path choice from cumulative thresholds, skips failed paths |
| `ni_tx` | source NI: flow table, numbering, path choice, replication, ECC encoding |
| `ni_rx` | receiving NI: ECC decoding, copy acceptance, delivery to the core |
| `secded_enc`, `secded_dec` | extended Hamming (72,64) encoder and decoder |
| `noc_pkg` | widths, `flit_t`, `head_t`, `cfg_t`, helper functions |

## Timing

- **Switch**: a flit that arrives in cycle t can leave in cycle t+2 (input
  buffer, then output buffer), and links add no register. Each input and
  output moves one flit per cycle. Two credits cover the two-cycle credit
  round trip, so with the default two-slot input buffers a link carries a
  flit every cycle as long as the receiver keeps draining it.
- **Source NI**: stores the whole packet, then sends it, one flit per cycle
  while it holds credits. Each copy of a critical packet follows the previous
  one directly.
- **Receiving NI**: judges the packet one cycle after its tail flit, then
  delivers one payload word per cycle while `out_ready` is high. It takes no
  new flits while it judges or delivers. Its input buffer and credit flow
  control hold back the network meanwhile.

## Configuring the network

Configuration is a write port on the top, `cfg` (`cfg_t`), one write per
cycle, addressed to node `cfg.node`:

| `cfg.kind` | `cfg.index` | `cfg.path` | `cfg.data` |
|---|---|---|---|
| `CFG_SW_REORDER` | commodity | - | bit 0: check on |
| `CFG_NI_FLOW` | local flow 0..7 | - | `[5:0]` commodity, `[13:6]` destination, `[16:14]` n_t |
| `CFG_NI_PATH` | local flow | path 0..3 | `[29:0]` route, `[38:30]` threshold, `[39]` enable |

The path thresholds are cumulative, in units of 1/256. Path j is taken when
the random byte r satisfies thr[j-1] <= r < thr[j]. The last path in use
needs a threshold of 256. For example, a 25/75 split over paths 0 and 1 is
thr = 64, 256. Clearing a path's enable bit gives its share to the next
enabled path. This models a permanently failed link on that path.

The path probabilities, n_t and the set of paths come from a design-time
flow: a linear program that spreads each commodity over its paths to minimise
the load on the busiest link, and the reliability formula for the number of
copies. That flow is software and is not part of this RTL.

A core injects a packet by presenting its payload words on `core_data` with
`core_valid`, the flow number and the `core_critical` flag, and `core_last` on
the final word (`core_ready` handshake). The NI adds the head flit.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. They need `rtl/noc_pkg.sv` and
`tb/ecc_ref_pkg.sv` first; `-y rtl` finds the modules:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        rtl/noc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_mpnoc_mesh.sv \
        --top tb_mpnoc_mesh -Mdir obj -o sim && obj/sim

`tb_mpnoc_mesh` runs the full 4 x 3 mesh at its default parameters with three
two-path commodities. It checks the following:

- every packet arrives once, whole and in sequence;
- out-of-order arrivals are held back (a 2-hop and a 4-hop path carry the
  same flow);
- critical packets are sent twice, and copies hit by injected double-bit
  errors are replaced by their twin;
- spare copies are dropped, and injected single-bit errors are corrected;
- after a path is marked failed, no traffic uses it.

The test fails if any of these never happens. It runs in about 520 cycles.

`tb_critical_sweep` also runs on the full mesh. It raises the share of
critical packets from 0 % to 100 % in 20 % steps, with two copies per
critical packet. It counts every flit that leaves a switch and checks the
count against the exact expected value. The network traffic grows from 1.0
to 2.0 times the 0 % level.

`tb_latency_split` compares one path with two for a single flow on the
full mesh. The flow goes from node 0 to node 3 and offers one 4-word packet
every 10 cycles. Two background flows load its direct route along the top
row. With only that route enabled, the average latency is 108 cycles. Split
50/50 with a longer route through the second row, it drops to 70 cycles. The
test checks that the split is lower and that every packet arrives in
sequence.

## How far to trust it, and where it is this design's own

The following parts are the core of the scheme, and the RTL follows them:

- per-commodity sequence numbers that start at 1;
- the look-up table that is compared and incremented when a packet is
  granted;
- out-of-order packets stalled in the input buffer;
- path choice by probability;
- Hamming correction at the receiver;
- replication of critical packets, keeping one error-free copy;
- spreading over non-intersecting paths for permanent faults.

The 8-bit addresses, 8-bit sequence numbers and the 4 x 3 mesh are the
reference sizes.

Everything else is a choice of this design, because the underlying switch
and NI architecture it extends is not described:

- the flit width (64 + 8 bits);
- buffer depths (2 in, 4 out) and credit-based flow control;
- source routing and the route encoding;
- round-robin arbitration;
- the commodity field and the per-commodity check enable;
- the configuration port;
- store-and-forward NIs;
- the copy-to-path rotation;
- the `last_copy` grouping;
- the extra parity bit that turns the single-error-correcting code into
  SEC-DED.

Not built:

- Retransmission for non-critical packets with uncorrectable errors. They
  are reported through `lost_event` and dropped.
- Detection of failed links. A failed path is disabled by configuration, and
  packets already inside a failed path are not recovered. Such a packet would
  leave the re-order table waiting for it.
- The design-time traffic-splitting and reliability calculations.

The testbenches check every block against independently computed results.
Timing (the reference point is 500 MHz) and area were not evaluated.
