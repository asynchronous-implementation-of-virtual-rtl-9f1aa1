# Virtual channels on an asynchronous network-on-chip link

A network-on-chip link joins two routers, and a router usually wants more than
one independent channel to its neighbour: several message classes, or
several virtual channels so that one blocked packet does not stall the
others. Giving every channel its own wires is simple, but it costs area,
and long wires are what is expensive on a chip. This design carries N
independent 4-phase handshake channels over one shared, self-timed
(clockless) physical channel. A channel that stalls on its receiver never
blocks the others.

There are three ways to build the link. All three have the same per-channel
interface and sit side by side in the top module `noc_vc_links`:

| | module | idea | wires across the link (N channels, W data bits) |
|---|---|---|---|
| imp. 1 | `link1` | one delay-insensitive channel per link channel | N·(2W + 1) |
| imp. 2 | `link2` | one shared channel, an arbiter picks one channel per flit, one flit crosses at a time | 2W + 2N + 1 |
| imp. 3 | `link3` | one shared **pipelined** channel; a funnel merges the flits, a horn splits them, sync wires make sure a flit is only sent to a receiver that has asked for one | 2W + 2·log2(N) + 2N + pipeline acknowledges |

Defaults are N = 16 channels, W = 16-bit flits and STAGES = 2 repeater or
pipeline stages on the long wires.

## The channel interface

Each link channel `i` has:

* a **push input** from the sender (`in_req[i]`, `in_ack[i]`, `in_data[i]`).
  The sender raises `in_req` with data. The link raises `in_ack` once it
  has taken the flit. `in_data` must stay valid from `in_req` rising until
  `in_ack` falls ("broad" data validity).
* a **pull output** to the receiver (`out_req[i]`, `out_ack[i]`,
  `out_data[i]`). The receiver raises `out_req` when it has room for a flit,
  and the link raises `out_ack` with the data. `out_data` is valid from
  `out_ack` rising until `out_req` falls ("early" validity).

So the link is passive at both ends. Both ends start the handshake, and the
link only connects them. All handshakes are 4-phase, return-to-zero, active
high. `rst` is active high. Hold every input low during reset.

## Timing model: a clock standing in for gate delays

These are self-timed circuits. Their real behaviour depends on gate and wire
delays. To make them synthesizable and simulatable without delay
annotation, every element with state is a flip-flop on a free-running
`clk`:

* C-elements;
* mutexes;
* latch-controller state;
* repeaters;
* 1-of-4 pipeline latches.

Everything else (AND, OR, multiplexers, encoders) is combinational and takes
no time. One clock therefore stands for one state-holding gate delay.
Cycle counts in the testbenches compare the organisations with each other.
They are not nanoseconds and do not reproduce the reference design's
absolute numbers. The circuits never rely on the clock for correctness
beyond this: every transfer is a complete handshake.

## Building blocks

`vc_link_pkg` holds the shared helper functions, such as the log2 of a
channel count.

* **`c_element`**: a Muller C-element. The output takes the inputs' common
  value and holds while they disagree.
* **`mutex2`**: a two-input mutual-exclusion element. If both requests
  arrive in the same cycle, it grants them in alternate order. This stands
  in for the metastability resolver of a real mutex, which cannot be
  written as logic.
* **`mutex_n`**: an N-input mutex built as a tree.
  * Each pair of clients ORs its requests into an N/2-input mutex.
  * The pair's grant then enables a `mutex2` between the two.
  * It is not fair: a busy client pair can keep winning.
* **`passivator`**: one C-element that joins a push request and a pull
  request and acknowledges both. This makes the link passive at its input.
* **`repeater_chain`**: STAGES clocked stages on every wire. This is how
  longer wires are modelled.

### The delay-insensitive physical channel

Data crosses the long wires in a **1-of-4 code**:

* Every 2 data bits drive 4 wires, and exactly one of them is high.
* An all-zero "spacer" separates two codewords.
* The receiver knows a codeword is complete when every group has one wire
  high. So no timing assumption is needed on the long wires.

The parts:

* **`enc_1of4`**: turns bundled data into the code. Its enable is the
  sender's acknowledge, so enable low produces the spacer. The optional
  select pairs are sent dual-rail.
* **`dec_1of4`**: ORs each group and then runs a completion C-element over
  the AND and the OR of all groups. Its output rises when every group has
  arrived and falls when every group is empty.
* **`latch_1of4`**: one pipeline stage. It has a C-element per wire, gated
  by the next stage's inverted acknowledge, and a completion detector that
  acknowledges the previous stage.
* **`phys_channel`**: the channel used by imp. 1 and imp. 2. It is made of
  an encoder, repeaters, a decoder and one wire that carries the receiver's
  request back to the sender.
* **`pipe_channel`**: the channel used by imp. 3. It has STAGES
  `latch_1of4` stages between encoder and decoder. The last stage only
  passes a codeword on while the horn asks for one.

## imp. 1 — `link1`

Each channel has a passivator and its own `phys_channel`. The channels share
nothing. It is the reference point for area and throughput.

## imp. 2 — `link2`: one flit at a time

Each channel's readiness is decided by a C-element at the sending end. It
joins:

* the sender's request;
* the receiver's request, carried forward on a *ready* wire.

Only a channel whose sender and receiver are both ready competes for the
shared channel. This is what stops a blocked receiver from holding the link.
`hs_arbiter` then picks one channel:

* It is an N-input mutex plus logic that keeps the winner selected until
  its handshake has returned to zero.
* Its 1-of-N select drives the data multiplexer.
* The same select crosses the link on N *select* wires.

At the receiving end, a per-channel C-element of the select wire and the
decoder's completion drives that channel's `out_ack`.

Only one flit is on the wires at a time, so the throughput of the whole
link falls as the wires get longer. The arbiter is the mutex tree, which
is unfair. With all channels eager, almost all bandwidth goes to two
channels. The reference design reports the same behaviour.

## imp. 3 — `link3`: a pipelined shared channel

This is the most involved organisation. The order along a flit's path:

1. **Passivator and fork.** The sender's push handshake meets a pull
   `fork_pull`. The fork splits the channel into:
   * a **sync channel**: two plain wires, request forward and acknowledge
     back, each through STAGES repeaters;
   * a **data channel**.
2. **Decoupling latch** (`decouple_latch`). Each data channel has one. It
   can complete its output handshake while its input is still busy. So a
   channel's flit can leave the latch and let the funnel move on.
3. **Funnel** (`funnel`). This is a balanced binary tree of `arbiter_pull`
   merge elements, each followed by a `latch_simple`.
   * Each level appends a dual-rail pair `{sel2, sel1}` that records which
     subtree the flit came from. `sel1` means the lower-numbered half.
   * After log2(N) levels the flit carries its channel number.
   * An `arbiter_pull` sends the output request to both inputs and lets a
     mutex pick the first input to answer. The loser keeps its answer
     pending and wins next time, so two eager inputs alternate.
4. **Pipelined channel** (`pipe_channel`). It carries W data bits in 1-of-4
   and log2(N) select pairs in dual-rail, through STAGES latches.
5. **Horn** (`horn`). This is the mirror tree, made of `branch_pull`
   elements and latches. Each level reads and strips the top select pair.
6. **Join** (`join_pull`). It acknowledges the receiver only when it has
   both:
   * the flit from the horn;
   * the sync channel's request, which says the sender's fork has started.

### Why the sync channel is needed

A horn output can only take a flit if that output's receiver is asking for
one. If a flit for a receiver that is not asking entered the pipeline, it
would stop there and block every other channel behind it.

The fork only requests from the sender when both the sync channel and the
data channel request, and the sync request comes from the receiver's end.
So a flit enters the funnel only after its receiver has asked for it. Each
channel has at most one flit in flight. The pipeline is filled with flits
of *different* channels.

The horn depends on this rule. It does not check it itself: `horn` used on
its own must only be offered flits for outputs that are requesting.

### Select encoding

* A flit in the funnel at level `l` is `W + 2l` bits wide.
* Bits `[W+2l-1 : W+2l-2]` are the pair added last, and the root's pair is
  on top.
* Inside the funnel and horn latches the pairs are bundled data, checked by
  no completion detector.
* On the pipelined wires they are dual-rail and are part of the completion
  detection.

### Unbalanced tree for differentiated bandwidth (`CHAIN = 1`)

In a balanced tree every eager channel gets the same share. Making the tree
lopsided gives the channels near the root a larger guaranteed share.
`funnel_chain` and `horn_chain` take this to the extreme, a chain:

* Node 0, at the root, arbitrates between channel 0 and node 1.
* Node 1 arbitrates between channel 1 and node 2, and so on.
* The last node takes channels N-2 and N-1.

Because each arbiter alternates between two eager inputs, the funnel alone
gives channel k a share of 1/2^(k+1), and the last two channels equal
shares. For 4 channels that is 1/2, 1/4, 1/8 and 1/8, which
`tb_funnel_chain` measures exactly. A channel that is idle leaves its
share to the others.

Encoding of the flit:

* It carries N-1 select pairs, one per node, with node 0's pair on top.
* A flit of channel k has sel2 in the pairs of nodes 0 to k-1 and sel1 at
  node k.
* The pairs of nodes it never passed are filled with sel1, so every pair on
  the wires is a complete dual-rail code.
* `horn_chain` delivers at the first sel1 pair.

The cost is N-1 select pairs instead of log2(N), and a deeper path for the
last channels.

`link3 #(.CHAIN(1))` uses this tree. In the whole link each channel still
has only one flit in flight. At small sizes the channels' own round trips
limit throughput, not the funnel. So the split is less sharp than in the
funnel alone: in `tb_link3_chain` with 4 eager channels, channel 0 delivers
about 1.5 times as many flits as each of the others.

## Measured behaviour

All testbenches are self-checking. The cycle counts below come from these
testbenches at N = 16 and W = 16.

* **Unloaded latency.** Per flit with one channel active, STAGES = 2:
  * imp. 1: 15 cycles;
  * imp. 2: 23 cycles;
  * imp. 3: 36 cycles.

  The tree levels of the funnel and horn are pure latency in this
  unit-delay model. The reference design, with real gate delays, found
  imp. 3 slightly faster than imp. 2 here.
* **All 16 channels eager**, STAGES = 2, link total:
  * imp. 1: 0.93 cycles/flit;
  * imp. 2: 18 cycles/flit;
  * imp. 3: 7 cycles/flit, limited by the funnel, with every channel
    getting 14 or 15 flits of the same window.
* **Long wires**, STAGES = 32, from `tb_link_length`:

  | load | imp. 2 | imp. 3 |
  |---|---|---|
  | one channel alone | 143 cycles/flit | 156 cycles/flit |
  | 4 of 16 channels eager, link total | | 39 cycles/flit |
  | 8 of 16 channels eager, link total | | 19.5 cycles/flit |
  | all 16 channels eager, link total | 138 cycles/flit | 9.75 cycles/flit |

  Imp. 3 is data-limited on this link: each eager channel adds one flit
  per 156-cycle round trip. With 16 channels it still does not reach the
  funnel's limit of about 7 cycles/flit.

  With all channels eager, imp. 3 moves about 14 times more data than
  imp. 2. The reference design reports "over 5 times" for this case.
* **Bandwidth sharing** (`tb_bandwidth_sharing`, all sources eager,
  receivers 1 and 4 blocked, run at 16 and at 8 channels):
  * imp. 2 gives all the flits to two adjacent channels at both sizes.
  * imp. 3 with 16 channels gives both halves of the tree equal shares, and
    every unblocked channel gets a share.
  * imp. 3 with 8 channels gives every unblocked channel the same rate, 381
    flits in 16000 cycles. The link is not saturated at this size.
* **Pipeline occupancy.** With the output stalled, a 4-phase pipeline holds
  one codeword in every other stage, because each codeword needs a spacer
  behind it. That is about (STAGES + 1) / 2 flits. At STAGES = 2 the
  funnel, at about 7 cycles per flit, is slower than the pipeline, so the
  pipeline never holds two flits in the default configuration.

## Where this design departs from the reference

* **Unit-delay clocked emulation** instead of gate-level timing, as
  described above. Relative speeds differ: imp. 3 is slower than imp. 2
  when the link is unloaded.
* **Bandwidth sharing around blocked channels.** In the reference, with 8
  channels and two blocked receivers, the two channels that share a tree
  node with a blocked channel get about twice the bandwidth of the others.
  Here that doubling does not appear. Each channel has only one flit in
  flight and must wait for its own sync handshake. So the channels'
  round trips, not the funnel, set the rate:
  * with 8 channels, every unblocked channel gets the same rate;
  * with 16, the shares even out within each half of the tree.
* **Behavioural mutex** with alternating tie-break. The real one resolves
  metastability in analog.
* **Active-high 1-of-4 code.** The reference encoder cell has inverted
  outputs, with the spacer all ones. Here the spacer is all zeros.
* **Circuit readings.** Some circuits were rebuilt from their described
  behaviour, not copied gate for gate:
  * the N-input mutex and the handshake arbiter;
  * the decoupling latch, written as an explicit state machine with one
    internal state bit;
  * the fork and the join.
* **Not built:**
  * unbalanced trees other than the chain; the reference only sketches the
    idea for four channels;
  * the proposed credit-based extension that would let one channel use the
    whole pipeline;
  * any power or area model.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | link channels; imp. 2 and imp. 3 need a power of two, at least 2 |
| `W` | 16 | flit width in bits, even |
| `CHAIN` (top and `link3`) | 0 | 0: balanced funnel and horn; 1: the unbalanced chain, N >= 2, any N |
| `STAGES` | 2 | repeaters per wire (imp. 1, imp. 2 and the sync wires of imp. 3) or 1-of-4 pipeline latches (imp. 3), at least 1 |

## Simulating

Each file holds one module. Every testbench prints
`TB_RESULT checks=N failures=M` and ends itself. It also has a watchdog.
For example:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  --top-module tb_noc_vc_links -y rtl -y tb +libext+.sv -Irtl \
  rtl/vc_link_pkg.sv tb/tb_noc_vc_links.sv
./obj_dir/Vtb_noc_vc_links
```

The testbenches:

* Every module has its own testbench, `tb/tb_<module>.sv`. The package has
  none.
* `tb_noc_vc_links` runs all three links at the default size through four
  phases:
  * all channels eager;
  * two receivers blocked;
  * random gaps;
  * drain.

  It counts each mechanism: the arbiter switching, channels starving in
  imp. 2, funnel alternation, the decoupling latch, sync stalls, two flits
  between imp. 3's funnel root and the horn outputs at once. It fails if any of them never happened.
* `tb_link_length` runs imp. 2 and imp. 3 at 32 stages.
* `tb_bandwidth_sharing` runs the blocked-receiver sharing experiment.
* `tb_funnel_chain`, `tb_horn_chain` and `tb_link3_chain` cover the
  unbalanced tree.
* `link_traffic` is the per-channel source and sink model used by the link
  testbenches.

Flit k of channel c always carries a hash of (c, k), which the sink computes
itself. So any loss, duplication, reordering or misrouting is caught.
