# Rotating Crossbar router: a four-port IP switch on a token ring of crossbar tiles

This is a four-port IPv4 router whose switch fabric is a **Rotating Crossbar**:
four small crossbar tiles sit on a ring, one per port, joined by one full-duplex
link between neighbours. Every tile holds a copy of the same routing rule. All
tiles see the same packet headers and the same token position, so each computes
the same conflict-free schedule for the next time slot (a *quantum*) with no
central arbiter and no messages. The token moves one tile downstream each
quantum. The tile holding it is served first, so no input can starve, and no
schedule can deadlock the ring.

The architecture follows the Rotating Crossbar router proposed for the Raw tiled
general-purpose processor. There, each port used four processor tiles running
software: ingress, lookup, crossbar and egress. Here each of those roles is a
block of dedicated logic with the same job and the same data path. The
[last section but two](#where-this-rtl-departs-from-the-software-router) lists
where the two differ.

```
 line card in ──► ingress_proc ──hdr/words──► ┌───────────── rotating_crossbar ─────────────┐
                   │     ▲                    │  tile0 ⇄ tile1 ⇄ tile2 ⇄ tile3 ⇄ (tile0)     │
          dst addr ▼     │ port               │  (one cw link and one ccw link per hop)     │
                  lookup_proc                 └───────────────┬─────────────────────────────┘
                                                              ▼ words + source tag
 line card out ◄──────────────────────────────────────── egress_proc
```

## The path of a packet

1. **Ingress** (`ingress_proc`). Words arrive from the input line card, one
   32-bit word per cycle at most. They are written into an 8192-word packet
   buffer. On the way in, header word 2 is rewritten: TTL minus one, and an
   incrementally updated header checksum. Header word 4, the destination
   address, goes to the lookup stage while the payload keeps streaming in.
2. **Lookup** (`lookup_proc`). This is a longest-prefix match over a 16-entry
   table. It answers one cycle later with the output port. On a miss it answers
   port 0.
3. **Fragmentation.** Once the whole packet is buffered and its port is known,
   the ingress offers it to the crossbar as fragments of at most `QUANTUM`
   (64) words. Each fragment has a small local header: valid, output port,
   length, and last-fragment.
4. **Crossbar** (`rotating_crossbar`, `xbar_tile`, `xbar_rule`). In each quantum
   up to four fragments cross at once, clockwise, counterclockwise or straight
   down to the tile's own egress.
5. **Egress** (`egress_proc`). Fragments are collected per input port until a
   packet is whole. Whole packets then leave first-in-first-out to the output
   line card, each without a break.

The router does not drop packets. When an output is congested, the router first
stops sending to it. The ingress buffers then fill, and finally the input line
card is held off (`lc_in_ready` low). Deep buffering and dropping belong to the
line cards.

## The Rotating Crossbar

### Servers and clients

Each tile has three outgoing connections, called **servers**:

* `out`: to the tile's own egress;
* `cwnext`: to the clockwise neighbour (tile i to tile i+1);
* `ccwnext`: to the counterclockwise neighbour (tile i to tile i−1).

Each server is driven by one of four **clients**: nothing (`CL_NONE`), the local
ingress (`CL_IN`), the word arriving from the clockwise upstream neighbour
(`CL_CWPREV`), or the word from the counterclockwise one (`CL_CCWPREV`). A
tile's configuration for a quantum (`tile_cfg_t` in `rr_pkg`) is just these
three choices. It also holds the source port of the egress connection and two
flags: *granted* and *blocked*. In hardware this is three registered 4:1
multiplexers per tile. A word moves one hop per cycle.

### The routing rule (`xbar_rule`)

The rule takes the token position and the four fragment headers. It walks the
tiles in downstream order, starting at the token holder (the *master*). For each
tile with a waiting fragment:

* If the fragment's output is already taken this quantum, the tile is
  **blocked**.
* If the fragment goes to the tile's own port, only the `out` server of that
  tile is reserved.
* Otherwise it tries a path around the ring. The shorter direction is tried
  first, clockwise on a tie, and the other direction after that. A path needs
  every ring link it crosses to be free. If both directions are occupied, the
  tile is blocked.

When a path is reserved, the first link's server gets client `CL_IN`. Each later
link gets `CL_CWPREV` or `CL_CCWPREV`, and the destination's `out` server takes
the word from the same side. The quantum lasts as long as the longest granted
fragment.

Example: inputs 0, 1, 2, 3 want outputs 2, 3, 0, 1, and the token is at 0.
Input 0 takes the clockwise links 0→1 and 1→2. Input 1 would like 1→2 clockwise,
but that link is taken, so it goes counterclockwise 1→0→3. Input 2 goes
clockwise 2→3→0. Input 3 goes counterclockwise 3→2→1. All four fragments cross
in the same quantum, two each way.

Properties that the testbenches check over the whole space of 4 tokens × 5⁴
header combinations:

* The schedule is always conflict-free: one client per server, and one source
  per egress.
* When the four inputs want four different outputs (any of the 24
  permutations, any token), all four are granted. One full-duplex ring is
  enough whenever there is no output contention.
* The master is always granted if it has a fragment. As the token visits every
  tile in turn, an input whose output has room waits at most four quanta.

### Timing of a quantum (`xbar_tile`)

There is no token on a wire. Every tile keeps its own token counter and phase
counter, and all tiles leave reset together, so they stay in lockstep. A quantum
has two phases:

| phase | cycles | what happens |
|---|---|---|
| STREAM | L (longest granted fragment) | the servers carry the configured words; a granted tile reads its own fragment from the ingress, one word per cycle |
| DRAIN | N_PORTS−1 = 3 | the servers keep their setting while the last words cross up to three hops. Cycle 0: each tile latches its ingress header and shows it to the others (the header exchange). Cycle 1: each tile's copy of the rule computes the next configuration. Last cycle: the new configuration is loaded and the token moves downstream |

So a quantum costs L + 3 cycles.
A quantum with no fragment anywhere skips STREAM, but the token still moves. The status outputs
`quantum_start`, `has_token`, `granted` and `blocked` show each tile's view.

A tile offers its fragment only if the destination egress has room for it
(`dest_ready`, from the egress `room` outputs). A fragment never waits half-way
across the ring, so the ring needs no flow control.

## Fragments and reassembly

A packet longer than one quantum crosses in several quanta. Those quanta are not
necessarily consecutive, and between them other inputs may send to the same
output. The egress therefore keeps one reassembly queue per input port
(2048 words each). A queue is a FIFO in which each word carries its
end-of-packet bit. When the last word of a packet lands, the input's number is
pushed into a completion queue. The output side pops that queue and streams the
named packet in full. `room[s]` stays high while queue `s` has two quanta free:
one for a fragment that may still be in flight, and one for the next.

## Header processing

The ingress assumes a standard IPv4 header at words 0–4. Word 2 holds
TTL/protocol/checksum and word 4 the destination address; IP options simply
pass through. The checksum is updated as `HC' = ~(~HC + ~m + m')` in 16-bit
one's-complement arithmetic, where `m` and `m'` are the old and new
TTL/protocol half-words. The testbenches check the result against a checksum
recomputed from scratch. A TTL of 0 stays 0. Packets are not checked or
dropped. A runt packet shorter than five words has no address and goes to
port 0.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_PORTS` | 4 | `rr_pkg` | ports, ring tiles (fixed by the architecture) |
| `WORD_W` | 32 | `rr_pkg` | word width |
| `QUANTUM` | 64 | `raw_router`, `ingress_proc`, `egress_proc` | largest fragment, in words (this design's choice) |
| `IN_BUF_WORDS` | 8192 | `raw_router` → `ingress_proc.BUF_WORDS` | ingress packet buffer (the size of one Raw tile's data memory) |
| `SRC_BUF_WORDS` | 2048 | `raw_router`, `egress_proc` | reassembly queue per input (a quarter of such a memory) |
| `LK_ENTRIES` | 16 | `raw_router` → `lookup_proc.ENTRIES` | routing table entries |

A packet must fit in the ingress buffer. At the defaults that means 32 KiB,
which covers every Ethernet-sized packet.

## Performance

`tb_router_workloads` runs the defaults with every input line card always busy.
Numbers are for a 250 MHz clock:

| workload | Gbit/s | Mpackets/s |
|---|---|---|
| 64-byte packets, inputs 0..3 → outputs 2,3,0,1 | 26.95 | 52.6 |
| 64-byte packets, random outputs | 17.7 | 34.6 |
| 1024-byte packets, inputs 0..3 → outputs 2,3,0,1 | 30.58 | 3.70 |
| 1024-byte packets, random outputs | 18.1 | 2.21 |

Without contention the rate is L/(L+3) of the 32 Gbit/s that four 32-bit ports
can carry. Here L is the fragment length: 16 words for 64-byte packets, 64 for
longer ones. The software router on Raw reached 26.9 Gbit/s (3.3 Mpackets/s)
for 1024-byte packets. With random outputs it reached about 69 % of its peak
because of output contention. This design gets 59–66 %: head-of-line blocking
in the single FIFO per input limits it, as it does any input-queued switch
without virtual output queues.

## Where this RTL departs from the software router

* **Dedicated logic instead of tile software.** On Raw, each role was code on a
  MIPS-like tile, and the crossbar was the tiles' programmable static switches.
  Here each role is a hardware block. The Raw processor itself, the line cards,
  the off-chip routing-table memory, and the unused second static network are
  not modelled.
* **Configurations are computed, not looked up.** On Raw, the schedule for
  every case was generated ahead of time. The configuration space was reduced
  to a table of 32 switch programs per tile, with an "expansion number" to
  software-pipeline each one. `xbar_rule` computes the same kind of
  server/client configuration directly from the token and headers. The drain
  phase replaces the expansion numbers. The contents of the original 32-entry
  table are not reproduced.
* **Direction order.** The original example only shows clockwise as the first
  choice for a two-hop path. Here the shorter direction is tried first, and
  clockwise wins a tie.
* **Overlap.** On Raw, the next headers were processed while the previous body
  streamed. Here they are processed during the 3-cycle drain that follows
  each body. The ring has to empty before the multiplexers can change, so
  the drain is needed anyway. Using it for the header work costs no extra
  cycles.
* **Quantum length.** The size of a quantum is not fixed by the original. Here
  a quantum streams for the longest granted fragment, at most `QUANTUM` = 64
  words.
* **Egress room.** The original assumes the egress can always take a fragment.
  Here each input only sends when the target reassembly queue has room.
* **Store-and-forward ingress.** A packet is offered to the crossbar only once
  it is completely buffered.
* **Lookup.** Route lookup was left open in the original. The 16-entry
  longest-prefix match here is the simplest complete choice.
* Not built, because they were only proposed as extensions: weighted token
  time for quality of service, multicast, and computation on the data in
  flight.

## Files

`rtl/` holds one module or package per file:

| file | role |
|---|---|
| `rr_pkg.sv` | widths, `frag_hdr_t`, `link_t`, `client_e`, `tile_cfg_t` |
| `sync_fifo.sv` | first-word-fall-through FIFO used for all buffers |
| `ingress_proc.sv` | line-card input, TTL/checksum, lookup hand-off, packet buffer, fragmentation |
| `lookup_proc.sv` | longest-prefix-match routing table |
| `xbar_rule.sv` | the routing rule (combinational) |
| `xbar_tile.sv` | one crossbar tile: token/phase counters, header latch, servers |
| `rotating_crossbar.sv` | four tiles and the ring wiring |
| `egress_proc.sv` | per-input reassembly queues, completion queue, line-card output |
| `raw_router.sv` | top level: four ports and the crossbar |

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`), the
throughput testbench `tb_router_workloads.sv`, and `rr_tb_util.svh` with helpers
that build IPv4 packets. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rr_pkg.sv tb/tb_raw_router.sv --top-module tb_raw_router -o sim
./obj_dir/sim
```

Replace `tb_raw_router` with any other testbench name. `tb_raw_router` runs the
full design at its default sizes. It covers random traffic, then a congested
output that fills the reassembly queues and holds off every input line card. It
fails if any mechanism never occurred: multi-quantum fragmentation, clockwise,
counterclockwise and local paths, blocked inputs, the token at every tile,
interleaved reassembly, an egress without room, ingress back-pressure, a lookup
miss, or an ingress waiting for its lookup. It takes a few seconds. The
assertions (FIFO overflow and underflow, reads from an empty ingress, egress
overrun) need `--assert`.

## How far to trust it

* All blocks pass their testbenches at the sizes given in them. The end-to-end
  and throughput testbenches run at the default sizes.
* The routing rule is checked exhaustively against an independent model.
* Every testbench has been shown to fail on a deliberately broken copy of its
  block.
* The RTL lints cleanly with Verilator (`-Wall`; only unused-signal and
  reset-style warnings remain) and elaborates with Yosys/slang.
* No timing closure, area or power work has been done. The routing rule is a
  chain of four dependent steps of combinational logic and is registered at
  its output.
