# A 2×2 packet router for byte-serial networks

This design is a two-input, two-output packet switch. It is meant as the one repeated element
of larger switching networks, such as those that carry operation and result packets between
the cell blocks and processors of a data-flow computer. A packet arrives one byte at a time
on either input. Bit 0 of its first byte says which output it wants, and a flag on its final
byte marks the end. The router connects the input to that output for the whole packet. Two
packets that want different outputs pass at the same time. If both want the same output, one
of them waits in its input buffer until the other's last byte has gone.

The router is deliberately simple. It looks at exactly one bit of one byte and never touches
the rest of the packet. A network of routers gets its addressing by rearranging data lines
between columns of routers. The RTL is the original self-timed design recast as synchronous
logic: one clock, the same four modules and the same state machine. Each port still uses the
original four-phase handshake, so a port can face any sender or receiver that follows it.

## The link: reset signalling

Every port of every block is a *link*: 8 data lines, a last-byte flag `L`, a `ready` line from
the sender and an `acknowledge` line from the receiver. A byte moves in four phases:

1. The sender puts the byte (and `L`) on the data lines and raises `ready`.
2. The receiver raises `acknowledge` once it no longer needs the data.
3. The sender drops `ready` (it may now change the data).
4. The receiver drops `acknowledge` when it can take another byte.

The phases always come in this order, and each may take any number of clocks. `L` is 1 only
on the last byte of a packet. In the RTL a link word is the packed struct
`router_pkg::rbyte_t` = `{last, data[7:0]}`.

## Inside the router

```
            +-------------+  rdy/L/D  +----------------+ rdy  +-----------------+
in A  ----> | router_fifo | --------> | router_master  | ---> |                 | ---> out I
(link)      |  16 x 9     | <-------- |   (FSM)        | <--- |   router_mux    |      (link)
            +-------------+   ackin   +----------------+ ack  | (combinational  |
                                         |req_i |req_ii  det  |   crossbar)     |
                                         v      v        ^    |                 |
                                    router_arbiter (I)  grants|                 |
                                    router_arbiter (II) ----->|                 |
                                         ^      ^             |                 |
            +-------------+           +----------------+      |                 |
in B  ----> | router_fifo | <-------> | router_master  | <--> |                 | ---> out II
            +-------------+           +----------------+      +-----------------+
```

Index 0 is input A or output I, and index 1 is input B or output II, throughout the RTL.

### Input buffer (`router_fifo`)

This is a 16-word, 9-bit first-in first-out buffer with a link on each side. A write is
acknowledged one clock after `ready` is seen. The acknowledge falls once `ready` has fallen,
except when the buffer is full. After the 16th word the acknowledge stays high until a word
has been read out, so the sender cannot offer byte 17 early. On the read side, `out_rdy` rises
whenever a word is stored and no transfer is in progress. The word is removed when the reader's
acknowledge *falls*, not when it rises. This means the data stays valid for the whole
handshake. The buffer lets a router hold a waiting packet (up to 16 bytes) instead of stalling
the link behind it.

### Input controller (`router_master`): the part to understand

The Master decides where a packet goes, holds that decision for the packet's length, and lets
go after the last byte. It is an eight-state machine. The state is three bits `{Y1,Y2,Y3}`:

| state | Y1 Y2 Y3 | meaning | request |
|---|---|---|---|
| I  | 000 | idle | none |
| F  | 100 | first byte seen, direction being taken | none |
| A  | 110 | mid-packet, routed to output I | I |
| B  | 101 | mid-packet, routed to output II | II |
| A' | 010 | last byte, output I | I |
| B' | 001 | last byte, output II | II |
| G, E | 111, 011 | error states (both direction bits set) | none |

`Y1` means "inside a packet, before its last byte". `Y2 Y3` hold the direction. The request
lines are just `req_i = Y2 & !Y3` and `req_ii = !Y2 & Y3`.

Transitions (inputs: `rin` ready from the buffer, `det` = not linked to any output, `ack`
from the output, `L`, and `D` = data bit 0):

- **I → F** when `rin & det & !L`, or **I → A'/B'** directly (by `D`) when `rin & det & L`.
  This is a single-byte packet.
- **F → A/B** by `D`, or **F → A'/B'** if `rin & L`. F lasts exactly one clock.
- **A → A'** and **B → B'** when `rin & L`, that is, when the last byte is offered.
- **A', B' → I** when `rin` and `ack` are both low, that is, when the last byte's handshake
  is complete.
- **G → E** on `rin & L`, and **E → I** like A'/B'. These states cannot be reached through the
  ports. In the self-timed original a glitch on `D` could set both direction bits.

Two output rules do the subtle work:

- `rdy = rin & (Y2|Y3) & !(Y1 & L)`: a byte is passed towards the output only once a direction
  is chosen. **A last byte is held back while the machine is still in A/B.** It goes out only
  after the machine has entered A'/B'. This way the machine is already in the state that
  releases the port when that byte's handshake ends.
- `ackin = ack | (!Y1 & (Y2|Y3) & !rin)`: the output's acknowledge is relayed back to the
  buffer. **In A'/B' the acknowledge is held high after the output's acknowledge falls, until
  the machine is back in I.** The buffer therefore cannot present the next packet's first byte
  while the old request is still held.

`det` keeps a Master in I until the Multiplexor reports that the previous packet's grant is
gone. A new packet then never sees a stale grant.

### Arbiters (`router_arbiter`)

There is one arbiter per output. It grants the output to input A or input B, never to both,
and holds the grant while the request stays high. When both inputs ask for a free output on
the same clock, a priority bit chooses, and it flips after every such tie. No input is
favoured. When the holder lets go and the other input is waiting, the output passes to it on
the same clock. A grant appears one clock after its request.

### Multiplexor (`router_mux`)

This is purely combinational. `ready` goes from input to output, and `acknowledge` from output
to input, only along a granted path. `det` for an input is high when neither arbiter grants it.
The data steering is always connected: output I shows input A's data when A holds I, and
input B's otherwise. Output II shows B's data when B holds II, and A's otherwise. This is
harmless because an output's `ready` is passed only under a grant.

### Timing at a glance

Timing is counted from the clock edge that first sees `in_rdy` high on an idle router:

| event | clocks |
|---|---|
| `in_ack` | 1 |
| word offered by the buffer | 2 |
| first byte on the output, single-byte packet | 4 |
| first byte on the output, longer packet (one clock in F) | 5 |
| later bytes | one clock after the buffer offers them, plus the handshake turnaround |

## The network (`router_network`)

An N×N network (N a power of two, default 4) is built recursively. A column of N/2 routers
feeds two N/2×N/2 networks. Each router's output I goes to the upper half and its output II
to the lower half. This gives log2 N columns of N/2 routers, (N/2)·log2 N routers in all.
Each column settles one bit of the destination, most significant first. Every router steers
on data bit 0, so column *s* swaps data bit 0 with bit log2(N)−1−*s* on the way in and swaps
it back on the way out.

The net effect is simple: **put the destination port number in the low log2 N bits of a
packet's first byte, and the packet arrives there with its data unchanged.** Port numbering
follows the unrolled recursion: router *j* of block *b* in column *s* (block size M = N>>s)
takes block inputs 2j and 2j+1 and drives block outputs j and M/2+j.

## Bench test module (`tester_input_section`, `tester_output_section`, `tester_debounce`)

A router can be exercised by hand with a small test module. An *input section* has a
pushbutton and J-K flip-flop that steps `ready` through the handshake:

- J = !(ready | ack)
- K = ready & ack

A press can therefore only move `ready` when the protocol allows it. Switches set D, L and the
other data lines, and an LED shows the acknowledge. An *output section* does the same for
`acknowledge`:

- J = ready & !ack
- K = !ready & ack

Its LEDs show ready and the data. Each pushbutton is a changeover switch debounced by a
set-reset latch (`tester_debounce`). Contact bounce on one throw never reaches the other throw,
so the latch just holds. The flip-flops are clocked on the rising edge of the debounced level.

## The top (`router_top`)

`router_top` holds three things side by side:

- the 4×4 network (`net_*` ports);
- a test module for one 2×2 router: two input sections (`ti_*`) and two output sections
  (`to_*`);
- the behavioural model of the asynchronous arbiter (`arb_req_n`, `arb_grant`), described
  below.

To drive a router or the network by hand, wire the test module's link ports to the router's
link ports. The end-to-end testbench does exactly that with network ports 0 and 1. Because of
the arbiter model, the top as a whole is for simulation. For synthesis, take `router_network`
(or `router`) as the top.

## The asynchronous arbiter, as a behavioural model (`arbiter_analog`)

In a self-timed router, requests come at arbitrary times. The mutual-exclusion element is then
the one part that cannot be plain logic. A cross-coupled pair of gates (the *front end*)
decides which request came first. If both requests fall almost together, the pair can balance
at an in-between voltage for an unbounded time. A two-transistor comparator watches the
difference between the two gate outputs. It issues a grant only once that difference exceeds
about 1.2 V, so no grant changes while the pair is undecided. Schmitt-trigger buffers clean up
the grants.

`arbiter_analog` models this at the level of that voltage difference *d*. It uses real numbers
and delays, so it is not synthesizable and simulates only with `--timing`:

- A lone request moves *d* linearly to a rail.
- With no request, *d* returns to 0.
- With both requests low, *d* regenerates exponentially (`dd/dt = d/TAU`) from whatever
  imbalance the first request built up, plus a little noise. The time to resolve grows like
  `TAU·ln(V_TH/|d0|)`, and at zero skew the noise picks the winner.
- Grant 1 is issued for `d > V_TH` and grant 2 for `d < −V_TH`, with some hysteresis.

The model has active-low requests (`req1_n`, `req2_n`) and active-high grants. The threshold
`V_TH = 1.2` V is the original circuit's measured value (about 1.9 V with emitter diodes). The
voltage swing, gate delay, regeneration time constant and noise are assumed values. Its times
are in ps, the default time unit of Verilator. The clocked routers do not use this model:
their requests are synchronous, so `router_arbiter` suffices.

## How far this follows the original design, and where it departs

Taken from the original design:

- The block structure.
- The 16-word, 8+1-bit buffers.
- The Master's state assignment, transitions and output equations.
- The arbiter's contract.
- The Multiplexor's equations and default data connections.
- The recursive network and its router count.
- The test module's J-K gating for the input section.

Choices made in this design:

- **Clocked, not self-timed.** The original uses SR latches and delay lines, with no clock.
  Here every block runs on one clock `clk` with an active-low asynchronous reset `rst_n`. The
  feedback delay lines of the Master, and the Multiplexor's two set-up delays, have no
  counterpart. Registered outputs make data settle before `ready` is sampled.
- **Arbiter.** The original's cross-coupled latch and transistor comparator hold off a grant
  while the latch is metastable. Inside the routers they are replaced by a registered grant.
  The requests there are synchronous, so there is nothing to resolve. The fair tie-break (alternating priority)
  is this design's own.
- **Polarity.** The routers' requests are active high. The original's are active low, as are
  the arbiter model's.
- **Full buffer.** The acknowledge of the word that fills the buffer stays high until space
  frees up. This is one reading that satisfies both the "no acknowledge when full" and the
  "acknowledge stays high when full" descriptions of the original.
- **Error states.** G and E follow the original state table as far as it is consistent. They
  are unreachable from the ports.
- **Network bit rearrangement.** The original only says that the lines must be rearranged
  per column. The swap-with-bit-0 scheme and the port numbering are this design's own.
- **Output section gating** of the test module is taken as the mirror image of the input
  section.
- **Analog arbiter.** It is modelled behaviourally beside the network (see above), with
  assumed values except the 1.2 V threshold. It is not used inside the routers.
- **Not modelled:** the delay lines, and the chip-level internals of the original
  asynchronous FIFO chips.

The RTL has no metastability protection on its ports. A link driven from another clock domain
needs synchronisers on `ready` and `acknowledge` outside this design.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_router_fifo` | fill to 16, acknowledge held while full, byte 17 refused, order and contents, 200 words with concurrent random-speed writer and reader, 1- and 2-clock latencies |
| `tb_router_master` | every row type of the state machine's test charts: idle with and without `det`, first/middle/last byte to I, single-byte packet to II, multi-byte to II, the held `ackin`, the error states |
| `tb_router_arbiter` | grant, hold, hand-over, alternating ties, 3000 random clocks of mutual exclusion and hold |
| `tb_router_mux` | every legal grant pattern × every control input, random data, against independent equations |
| `tb_router` | latency, all uncontested routes, both concurrent and all four blocked configurations, random traffic that fills both buffers; counts each mechanism and fails if one never happened |
| `tb_router_network` | all 16 source/destination pairs, then all inputs at once, then slow receivers; packets compared byte for byte; counts concurrency (including all four outputs busy at once), blocking and full buffers |
| `tb_router_top` | the default-size top: the test module, worked by "operators" with bouncing buttons, sends and receives on network ports 0 and 1, while fast random traffic runs on ports 2 and 3; also checks button presses that the handshake refuses, and sends near-simultaneous request pairs to the arbiter model |
| `tb_arbiter_analog` | the two-delay metastability experiment on the arbiter model: one pulse reaches both requests with a skew swept from 3 ns down to 0 in ps steps; never two grants, no grant without its request, exactly one grant edge per pulse, earlier request wins at large skew, slower resolution near zero skew, both sides win at zero skew; hold and hand-over |
| `tb_tester_*` | debouncer under bounce; each section's J-K gating, directed and then 300 random steps against a reference |

Packet checks use a scoreboard: every packet received on an output must equal the oldest
outstanding packet some input sent there. The router, network and top testbenches watch only
the ports. The first byte of each test packet carries its source number next to its
destination, so an output can tell whose packet it is delivering. From the ports they count:

- concurrency: two outputs carrying packets from different inputs at once;
- blocking: an input whose first byte was taken waits while its output carries another
  input's packet;
- a full buffer: an input's acknowledge stays high for more than one clock after its
  `ready` fell.

## Simulating

Simulation needs Verilator 5 with `--timing`. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/router_pkg.sv tb/tb_router_top.sv \
          -y rtl -y tb +libext+.sv --top-module tb_router_top
./obj_dir/Vtb_router_top
```

Substitute any other testbench name. The top-level parameters are `N` (network size, a power
of two up to 256) and `DEPTH` (buffer words). The assertions in `router_fifo`,
`router_master` and `router_arbiter` check the handshake and the mutual-exclusion rules
during simulation.
