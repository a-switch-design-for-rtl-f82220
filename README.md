# A configurable-path switch for on-chip multiprocessor networks

Processors on one chip talk through a 2-D mesh of small switches. A packet
carries no destination address, and no switch computes a route. Before an
application runs, each communication path is *configured*. One buffer is
reserved in every switch along the path. Each reserved buffer is told the
name of the next buffer on the path. This chain of buffers is a dedicated
virtual channel.

At run time a switch does three things for every word:

- it stores the word in the buffer named on the address line;
- it looks up that buffer's successor in a small routing table;
- it competes for the output link with the other buffers of the same output
  port, under weighted round robin.

Because every path owns its buffers and gets a fixed share of every link it
crosses, each path has a guaranteed minimum bandwidth. The same hardware
can act as a circuit (one path per link), as a packet network (many paths
sharing links), or as a dedicated bus. Only the configuration changes.

The RTL is in `rtl/`. The testbenches are in `tb/`. The top is `noc_mesh`,
a 4 x 4 mesh by default.

## Parts

| file | what it is |
|---|---|
| `sw_pkg.sv` | constants, port enum, address and configuration structs |
| `noc_mesh.sv` | ROWS x COLS mesh; the local channels are brought out |
| `noc_switch.sv` | one switch: five input stages and five output stages |
| `sw_input_stage.sv` | decodes the address line, forwards the word, returns the ack, runs the ordering guard |
| `sw_output_stage.sv` | four RAMs and the buffer bookkeeping for one output link, plus arbiter and sending pipeline |
| `sw_ram.sv` | 32 x 32-bit RAM, one read port and one write port |
| `sw_buf_ctrl.sv` | splits one RAM into buffers; tracks pointers; gives the "full" and "has data" vectors |
| `sw_ack_ctrl.sv` | accepts or refuses an incoming word, depending on whether its buffer has room |
| `sw_route_table.sv` | per buffer: the next buffer-id, and the round-robin weight |
| `wrr_arbiter.sv` | weighted round robin over up to 64 buffers |

The network interface and the processor are not part of the RTL. The
local channel pair of every switch is a port of `noc_mesh`. Any block that
follows the link protocol below can drive it. `tb/tb_link_src.sv` and
`tb/tb_link_sink.sv` are such models.

## The switch

A switch has five ports: N, E, S, W and L (local). Their encodings are 0 to 4.

Each port has an input stage and an output stage. The storage is in the
output stages. Output port *p* holds four RAMs, one for each other
direction. A word that enters on port *q* and leaves on port *p* is stored
in RAM "*p*-*q*". It never goes back out the port it came in on.

Inside an output stage, RAM *m* stores the *m*-th direction other than *p*,
in port order. For example, east's RAMs hold N, S, W and L.
`sw_pkg::mem_src` and `mem_of` convert between the two numberings.

The input stage is thin. It registers the address that arrives on the
address line. In the next cycle it passes the data word and the buffer
number to the addressed output stage. It then ORs the acks coming back from
the output stages onto its own ack line.

## Buffers, partitions and buffer-ids

Each RAM is 32 words of 32 bits. It can be cut into 2^k equal buffers,
with k = 0..4. The choices are:

- 1 buffer of 32 words
- 2 of 16
- 4 of 8 (the reset state)
- 8 of 4
- 16 of 2

Each RAM is repartitioned on its own, at run time, by a configuration
write. More buffers mean more paths can cross a port. Bigger buffers mean
fewer refusals and higher throughput. Repartitioning empties the RAM and
invalidates every transaction in flight for it. Do it only while the paths
through that RAM are idle.

Buffer *b* of a RAM holds the slots `b*size .. b*size+size-1`. It is a
circular queue within them. Buffers outside the current partition read as
full and are never scheduled.

A buffer is named `switch.port-source{number}`. For example, `S3.E-S{3}` is
buffer 3 of the RAM that stores south-to-east traffic in switch 3.

On a link, only `{valid, port, number}` is sent (`sw_pkg::addr_t`, 8 bits).
The receiving switch knows the source direction from the link the word
arrived on.

A routing-table entry holds the `addr_t` that the buffer's words are sent
with. There are two cases:

- For a buffer on a neighbour link, the entry names a buffer of the
  neighbour.
- For a buffer of the local output port, the entry is delivered on
  `loc_out_addr` together with the word. In the original scheme this is a
  memory address at the receiving interface. Here it is just 8 bits that
  the interface may use as it likes, for example to tell paths apart.

A buffer with an invalid route never requests the link.

### Setting up a path

To set up a path from processor A to processor B:

1. Pick the switches along the route, and a free buffer in each.
2. Write each buffer's routing entry with the `addr_t` of the next buffer.
3. Give processor A the `addr_t` of the first buffer, in A's own switch.

Configuration is one write port at the top:

- `cfg_sw`: the switch index, `r*COLS + c`.
- `cfg`: a `cfg_t`, which has `we`, `kind`, `port`, `mem`, `bufn` and an
  8-bit `value`.

`kind` selects what is written:

- `CFG_ROUTE`: the routing entry.
- `CFG_WEIGHT`: the weight.
- `CFG_PART`: log2 of the number of buffers in RAM `mem` of `port`.

After reset:

- every RAM has 4 buffers;
- every route is invalid;
- every weight is 1.

`tb_noc_mesh` shows a complete set-up. It builds all 240 source/destination
pairs of the 4 x 4 mesh with X-then-Y routes.

## The link protocol (the hard part)

A link is three groups of wires running between neighbours:

- an 8-bit address line, sender to receiver;
- a 32-bit data line, sender to receiver;
- a 1-bit ack line, receiver to sender.

Every transfer takes four cycles. The transfers are pipelined, so a new one
can start every cycle:

| cycle | sender | receiver |
|---|---|---|
| 1 arbitrate | the arbiter picks a buffer that has data and a valid route; its RAM read starts | – |
| 2 address | the route of the picked buffer is on the address line | registers the address |
| 3 data | the word is on the data line | in the same cycle: ack = 1 and write if the addressed buffer has room, ack = 0 otherwise; the word is then dropped |
| 4 acknowledge | ack = 1: the word is erased from the sender's buffer; ack = 0: it is kept | – |

The ack is combinational in the receiver. It covers the path from the ack
controller, through the input stage OR, to the sender's ack register.

An idle switch adds 3 cycles, from the data cycle in which a word enters to
the data cycle in which it leaves. A corner-to-corner path of the 4 x 4
mesh crosses 7 switches, so it takes 21 cycles. `tb_noc_mesh` checks this.

### Why pipelining makes refusals hard

Each word is acked separately, and a buffer can have three words in flight
before the first ack comes back. So a refusal does not arrive alone. Say
words 5, 6 and 7 of one buffer are sent in consecutive cycles, and word 5
is refused because the far buffer was full. Words 6 and 7 are already on
the wires. If the far buffer gains a slot one cycle later, word 6 would be
accepted ahead of word 5. The stream would then arrive out of order, and
later with word 6 twice.

The original four-step description leaves this case open. This design
closes it on both sides of the link.

**Sender: rollback with an epoch bit.** For each buffer, `sw_buf_ctrl`
keeps three pointers:

- `wr`: where the next incoming word is written;
- `snd`: the next word to launch;
- `cmt`: the oldest word not yet acked.

A grant advances `snd`. An ack advances `cmt`, and only a true ack erases
the word. A false ack moves `snd` back to `cmt`, so sending resumes from
the refused word, and flips the buffer's 1-bit epoch. Every word in flight
carries the epoch it was launched with. Acks for words launched before the
rollback carry the old epoch and are ignored. Those words are resent
anyway.

**Receiver: the ordering guard.** Rollback alone is not enough. The words
launched after the refused one may still be accepted, if room appears in
time. Those accepted words are then sent again after the rollback, and
arrive twice.

So `sw_input_stage` remembers every address it refused. For the next
`NACK_HOLD` = 3 cycles it refuses every word for that same address, even if
there is room. These are exactly the cycles in which the sender's
already-launched words arrive.

The guard is per address. Other paths on the same link are not held up.
A refusal made only because of the guard does not restart the hold window.
If it did, a sender resending quickly could be locked out for ever.

**The rule a sender must obey.** A refused word may be resent in a data
cycle no earlier than `NACK_HOLD + 1` cycles after the data cycle in which
it was refused. If it comes back sooner, it lands inside the guard window
and is refused again. That refusal starts a second rollback. The words
launched between the two refusals then arrive after the first window has
closed, so one of them can be accepted out of order and later delivered a
second time.

The RTL output stage meets the rule by construction. Its refused word
reappears exactly 4 cycles later: 1 cycle to see the ack, then arbitrate,
address and data. A network interface written for this switch must also
meet it. The testbench sender `tb_link_src` waits the minimum.

**Throughput.** A link moves one word per cycle while the receiver has
room. Each refusal costs one round trip: 4 cycles for that buffer, during
which other buffers keep the link busy. With small buffers (2 words),
refusals are frequent, and per-path throughput depends on how fast the
next switch drains. This is the buffer-size versus path-count trade-off
that the partitioning exposes.

## Weighted round robin and guaranteed bandwidth

Each output port has one arbiter over its 64 buffer slots (4 RAMs x 16).
Only buffers that have a word waiting and a valid route take part, so an
idle path costs nothing.

The last winner keeps the link for up to *weight* consecutive grants, as
long as it still requests. After that, the next requesting buffer in
circular index order takes over. A weight of 0 acts as 1. For example, with
buffers A, B and C active and weights 2, 1, 1, the grant pattern is
A A B C A A B C.

This gives each path a floor on its share of every link it crosses:

    share on one link  = weight of the path / sum of weights of the active paths on that link
    path guarantee     = minimum of that share over the links of the path

For example, a path that meets shares of 1/3, 1/2, 1/4 and 1/3 along its
route is guaranteed 1/4 of a link's bandwidth. When fewer paths are
active, the survivors share the whole link.

The guarantee holds only if the receiving buffer keeps draining. That is
true when the destination interface keeps accepting. A path whose
destination stops accepting fills its own buffers and stalls only itself.
It still consumes its arbitration turns, but each refused attempt costs
one link cycle and no more.

## Using the RTL

Verilator 5 or any tool that reads IEEE 1800-2017 will work. Compile the
package first:

    verilator --binary -j 0 --top-module tb_noc_mesh \
        rtl/sw_pkg.sv $(ls rtl/*.sv | grep -v sw_pkg) \
        tb/tb_link_src.sv tb/tb_link_sink.sv tb/tb_noc_mesh.sv
    ./obj_dir/Vtb_noc_mesh

The package has to come first; the other files can be in any order. For a
block testbench, use the same file list with its own `--top-module`.

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has
a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_sw_ram` | random writes and reads against a reference array |
| `tb_sw_buf_ctrl` | partitions, wrap-around, rollback and stale-epoch acks, repartitioning |
| `tb_sw_ack_ctrl` | exhaustive random against the full vectors |
| `tb_sw_route_table` | route and weight writes and reset values |
| `tb_wrr_arbiter` | plain RR, weight 2, skipping idle buffers, long-run shares |
| `tb_sw_input_stage` | dispatch, ack OR, and the guard window against a reference |
| `tb_sw_output_stage` | address at +2 and data at +3 cycles, one word per cycle, RR and weights, 40 % refusals, 2-word buffers |
| `tb_noc_switch` | 40 random streams through one switch; 3-cycle latency; order and no loss with random refusals |
| `tb_noc_bandwidth` | three saturated paths through one east port: shares 1/3 each with equal weights, 1/2-1/4-1/4 with weights 2-1-1, unused share passed on |
| `tb_noc_path_bw` | 2 x 3 mesh, six saturated paths; a path whose links give it shares 1/3, 1/2, 1/4, 1/3 gets exactly its 1/4 minimum, and every path at least its own |
| `tb_noc_mesh` | the full 4 x 4 mesh at default parameters (see below) |

`tb_noc_mesh` runs three phases:

- 2-word buffers with all 240 paths;
- 4-word buffers with random paths;
- 8-word buffers.

Destinations accept at random, so refusals and rollbacks happen
everywhere. The testbench checks the 21-cycle corner-to-corner latency,
order, loss and duplication of every stream, and that the weighted path
gets its repeats.

It also counts that each mechanism actually happened:

- link refusals;
- guard refusals;
- weighted repeats;
- multi-switch delivery;
- repartitioning.

Any mechanism that never happened is counted as a failure. A run takes a
few seconds after a verilator build of about three minutes.

## Sizes and timing

All defaults are the sizes of the switch that was synthesized:

- 32-word RAMs with 4-byte words;
- 4 RAMs per port and 5 ports, so 20 RAMs (20,480 bits) per switch;
- a 4 x 4 mesh.

MAX_BUFS = 16 matches the smallest buffer the experiments used (2 words).
The weight width (4 bits) and `NACK_HOLD` are this design's own.

The ack path is the longest combinational path:

    receiver's registered address
      -> ack controller (buffer-full lookup)
      -> input stage OR
      -> link
      -> sender's ack register

A 185 MHz implementation in a 0.25 µm process was reported for the
original design. This RTL has not been through timing analysis.

## Changing it

- **Mesh size.** `ROWS` and `COLS` on `noc_mesh`; the switch does not
  depend on them. The configuration index `cfg_sw` widens with them.
- **RAM depth.** `DEPTH` on `noc_mesh`, `noc_switch` and `sw_output_stage`.
  `MAX_BUFS` in `sw_pkg` must stay a power of two. Partitions that would
  give buffers of less than one word are clipped.
- **`NACK_HOLD`** is tied to the sending pipeline: it is the number of
  words a buffer can have launched behind a refused one (grant, address
  and data stages, so 3). If you add a register stage to the link, raise
  it by one, and make the resend delay of any sender at least
  `NACK_HOLD + 1` data cycles after a refusal.
- **Weights** are 4 bits (`WEIGHT_W`). Widen them if a path needs more
  than 15 grants in a row.

## Verification status

Every testbench listed above passes. This includes `tb_noc_mesh`, which
runs the mesh at full default size. Each
block testbench has also been run against a copy of its module with one
deliberate bug, and every bug was caught. Examples of the bugs:

- acks ignoring the full vector;
- the epoch bit not flipping;
- the guard disabled;
- weights ignored;
- a mesh link ack tied high.

Not verified:

- timing, area or gate-level behaviour;
- long random runs beyond the testbenches' few thousand words per phase.

## Where this design departs from, or adds to, the original description

- **Rollback, epoch bits and the ordering guard** are additions. The
  original names four steps and says a refused word is kept, but not how
  pipelined words behind it are treated.
- **The network interface and the processor** are not provided. The
  original only names the interface. Its experiments replaced the processor
  with a random traffic generator, and the testbenches do the same.
- **Latency histograms** (normalized latency against injection rate and
  buffer size) are not reproduced. The testbenches check correctness,
  latency of an idle path, and mechanism coverage, not statistics.
- **Encodings are this design's own:** port numbers, `addr_t`, `cfg_t`, the
  configuration port, buffer numbering from 0, OR-ing of acks in the input
  stage, and the reset state (4 buffers per RAM, routes invalid, weights 1).
- **Mesh boundary links are tied idle.**
- **The weighted schedule:** a weight of *w* gives *w* back-to-back grants
  per turn, which reproduces A A B C for A with twice the bandwidth of B
  and C. The original's longer illustrative sequence is not followed
  beyond that.
