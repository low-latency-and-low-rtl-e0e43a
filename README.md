# A low-latency wormhole network-on-chip for FPGAs (2x2 array of 4-port switches)

This is a small packet-switched network-on-chip built to be cheap on an FPGA
and to move short messages with little delay. Four 4-port switches form a
2x2 array. Each switch has two local ports and two links to neighbours, so
the array has eight network ports, 0 to 7. Each network port has a Wishbone
slave bridge, so ordinary bus masters can send and receive packets.

Three ideas keep the switch small and fast:

* **Shift-register FIFOs.** Each input buffers 16 words in a shift register,
  which maps onto SRL16 primitives: one LUT stores 16 bits. A register after
  the FIFO hides the slow read path.
* **Wormhole switching.** A packet holds an output only while its words pass
  through, so no input has to buffer a whole packet.
* **No arbitration delay for a lone requester.** The "check empty" logic
  clears an empty input's request, so an output arbiter can see in the same
  cycle that only one input wants it. That input sends at once. The arbiter
  spends a clock cycle only when inputs really collide.

Routing is X-Y (dimension order). Each switch also looks up the route the
*next* switch must use while it forwards a word, so no switch decodes a
destination address on its own critical path.

## Links and words

A link carries one word per cycle in one direction. Ready flows the other way.

| signal   | width | direction | meaning |
|----------|-------|-----------|---------|
| strobe   | 1     | forward   | a valid word is on the link this cycle |
| data     | 36    | forward   | payload (`DATA_W`, 8 in the board version) |
| ctrl     | 12    | forward   | `{last[11], dest[10:6], reserved[5:4], route[3:0]}` |
| ready    | 1     | backward  | the receiver can take words |

* `route` is one-hot. It names the output the *receiving* switch must use.
* `dest` is the address of the destination network port. The format is
  `{2'b00, node[1:0], local}`, so network port p = 2*node + local.
* `last` marks the final word of a packet. A packet is any number of words.
  Every word carries the same `dest` and route, and a switch reads the route
  of each word, so packets need no separate header word.

Strobe and ready are not a valid/ready handshake. A sender may strobe a word
only while it sees ready high. Ready drops while the receiver still has room
for the words already in flight (see *Flow control*).

## The 2x2 array (`noc_2x2`)

Node n sits at x = n[0], y = n[1].

| switch port | connects to |
|-------------|-------------|
| 0, 1        | network ports 2n and 2n+1, each through a `wb_bridge` |
| 2           | port 2 of the horizontal neighbour, node n^1 |
| 3           | port 3 of the vertical neighbour, node n^2 |

X-Y routing works like this. A switch sends a packet out of port 2 while its
x differs from the destination's x. Then it uses port 3 while y differs.
Otherwise it delivers to local port 0 or 1. A packet therefore crosses at most
three switches, and it never leaves a switch through the port it came in on.

The route function is `noc_pkg::xy_route(node, dest)`. Three places use it:

* the bridge, for the first switch;
* `route_lookup`, for the neighbour behind ports 2 and 3;
* the testbenches, which hold their own version written from grid
  coordinates.

## Inside a switch

`noc_switch` contains four `input_port`s and four `output_port`s. The
crossbar is simply the AND-OR multiplexer inside each output port.

### Input port (`input_port`, `srl_fifo`, `route_lookup`)

Incoming words are written into `srl_fifo`. On every write, each stored word
shifts one stage along. A 4-bit pointer `addrptr` marks the oldest word:

* `1111` means the FIFO is empty. Any other value means (words stored − 1).
* A write without a read counts the pointer up. A read without a write counts
  it down. A write and a read together leave it unchanged.
* Because `1111` is the empty code, at most 15 of the 16 stages hold data.
* `avail` = not empty. The oldest word comes out through a 16:1 mux on the
  shift register.

The oldest word goes through `route_lookup`, then into the head register.
`req`, the request to the output ports, is the head's route bits, or zero
when the head is empty ("check empty"). When an output port takes the head
word (`pop`), the FIFO refills the head in the same cycle. A single input can
therefore send one word per cycle.

### Output port and arbiter (`output_port`, `rr_arbiter`)

This is the subtle part of the design. Each output port has one `rr_arbiter`
over inputs A..D, which are switch ports 0..3. The port's own input is masked
out, so each output in fact chooses among three inputs.

For each input the arbiter keeps two state bits:

* a registered grant flag, `override_q[i]`;
* a `done` flag.

`override_any` is the OR of the grant flags. An input sends a word in the
current cycle (`grant[i]`) when it requests, `oktosend` (downstream ready) is
high, and either:

* it holds the grant flag, or
* no grant flag is held and it is the **only** requester.

The next state is chosen by three cases:

1. **A grant flag is held.** The holder keeps the output for the rest of its
   packet, through empty cycles in its FIFO too (wormhole). When its `last`
   word passes, the flag clears and the input's `done` flag is set.
2. **No flag is held, and one input requests.** It has sent in this cycle. If
   that word was not the last, the input takes the grant flag for the rest of
   the packet. Otherwise its `done` flag is set.
3. **No flag is held, and several inputs request.** Nobody sends in this
   cycle. The first of A, B, C, D whose `done` flag is clear takes the grant
   flag, and it sends from the next cycle on. If every requester already has
   `done` set, all `done` flags clear and the choice starts again from A.

Case 3 makes fixed priority A > B > C > D fair. An input served in this round
waits until every other requester has had its turn.

The granted input's head word is multiplexed onto the output register. The
register holds `{last, dest, next route}` and the payload. `out_strobe` is
high for exactly one cycle per word.

### Timing

A word strobed into an idle switch in cycle t moves like this:

| cycle | where the word is |
|-------|-------------------|
| t     | on the input link, written into the FIFO at the end of the cycle |
| t+1   | oldest word of the FIFO; the route look-up runs; loaded into the head register |
| t+2   | head register; `req` raised; lone requester, so granted and popped |
| t+3   | output register, on the output link |

* Switch latency is **3 cycles** with no contention.
* It is **4 cycles** for the word that wins an arbitration. Others wait
  longer, by the length of the packets ahead of them.
* Each hop adds 3 cycles. A bridge's word reaches the destination bridge's
  FIFO after 3, 6 or 9 cycles for one, two or three switches.
* Throughput is one word per cycle on every output at once.

### Flow control

An input's ready flag is `srl_fifo.sendok`. It is a register set when, at the
previous clock edge, the pointer showed empty or fewer than 10 words
(`addrptr < 1001`). A sender sees ready in cycle t and its word is written at
the end of t+1, so the flag lags by about two words. It drops with 5 of the
15 entries still free, which leaves room for the words in flight. An assertion
in `srl_fifo` reports an overflow.

## Wishbone bridge (`wb_bridge`)

The bridge is a classic single-cycle Wishbone slave, word-addressed, with the
data width equal to the network word. The acknowledge comes one cycle after
the request.

| adr | name    | access | function |
|-----|---------|--------|----------|
| 0   | DEST    | R/W    | destination network port for the words sent next |
| 1   | TX_DATA | W      | send one word, packet continues |
| 2   | TX_LAST | W      | send one word and end the packet |
| 3   | RX_DATA | R      | oldest received word, removed by the read; 0 if none |
| 4   | STATUS  | R      | bit 0 word waiting, bit 1 it ends its packet, bit 2 network ready |

* The bridge adds the first-hop route and `dest` to every word it sends.
* Received words go into a 16-entry `srl_fifo`. That FIFO's `sendok` is the
  ready flag towards the switch.
* A transmit write is accepted if the switch's ready flag is high now or was
  high in either of the two cycles before. Otherwise the acknowledge is held
  back. Because of the FIFO slack, the extra word this lets in always fits.
* A master should read STATUS and write one word only when bit 2 is set. It
  then never waits on a write and can always empty its receive FIFO.
* Two masters that block in writes while sending to each other could stall
  each other for good. This access rule is what prevents that.

## Board version (`board_demo`)

`board_demo` is the test set-up for an FPGA board: the network at 8-bit words
with a 33 MHz clock.

* DIP switch 1 is an active-high reset. The LED is lit while reset is held.
* While DIP switch 8 is on, a small master at network port 4 sends a one-word
  packet holding `0xA5` every 64 cycles.
* A master at network port 0 reads every word that arrives. A matching word
  lights the LED for 256 cycles.
* With the switch off, nothing is sent and the LED goes dark.

Each word crosses two switches, which takes 6 cycles. This module wraps the
network; it is not part of it.

## Where this design departs from, or adds to, its source description

* **Latency.** The switch takes 3 cycles (4 after an arbitration), which
  follows the description of the pipeline. The headline figure of "2 cycles"
  matches only the input part (FIFO plus register). No design giving 2 cycles
  through the whole switch is described, so none is built.
* **Control word layout.** The 12-bit width, a 5-bit destination, a one-hot
  route and a last flag are given. Their bit positions and the two reserved
  bits were chosen here.
* **Done-flag reset.** The rule for when the arbiter's done flags clear was
  taken as: "clear when every current requester already has its flag set".
* **Lone requester path.** The lone requester is served through a
  combinational grant. A grant flag is registered only for the rest of a
  multi-word packet.
* **FIFO capacity.** With a 4-bit pointer and `1111` as the empty code, 15
  words fit, not 16.
* **Extra FIFO outputs not built.** Signals described as "to A / to B / to C"
  had no meaning distinct from the select outputs and are not built.
* **Route look-up.** It is logic computing X-Y routes, not a loadable table.
  Other topologies need a different `xy_route`.
* **Fixed to 4-port switches.** A 5-port switch (four neighbours plus one
  local port, for larger meshes) is also described. It is not built, because
  the package fixes `NPORTS = 4` and the 2x2 port map.
* **Wishbone bridge is this design's own.** Its register map, bus width and
  write-acceptance rule were all chosen here.
* **Board demo choices.** The word pattern, the send rate and the LED hold
  time were chosen here.
* **Not checked here.** Clock rate (about 300 MHz on a Virtex-5 class part is
  the target) and slice counts depend on the FPGA tools. Nothing here
  measures them.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_srl_fifo` | random fill/drain against a queue model: contents, avail, select gating, `sendok` threshold and lag, one-cycle write-to-read |
| `tb_rr_arbiter` | hand-worked grant sequences: lone packet, collision with one-cycle delay, round robin, wormhole hold, `oktosend` low, four-way priority |
| `tb_route_lookup` | every destination, port and switch against a coordinate-based model |
| `tb_input_port` | 2-cycle latency, ready dropping after 12 words with in-flight words absorbed, random traffic with next-route checks |
| `tb_output_port` | lone-word timing, no grant while not ready, random packets: no interleaving, every word exactly once |
| `tb_noc_switch` | 3-cycle and 4/5-cycle latencies, random wormhole traffic on all inputs with random back-pressure |
| `tb_wb_bridge` | register access, first-hop route, back-pressure holding a write, in-order delivery |
| `tb_noc_2x2` | full size (36-bit), 1/2/3-switch latencies (3, 6, 9 cycles), then all eight ports exchange 320 random packets while masters periodically stop reading; checks whole packets, per-source order and the last flag; counts immediate grants, arbitrations, new rounds, wormhole holds, not-ready inputs and mesh hops, and fails if any never happened |
| `tb_board_demo` | reset lights the LED, switch 8 off sends nothing, switch 8 on gives words at port 0 after 6 cycles and lights the LED, LED dark again after the hold time |

Assertions in the RTL check:

* no FIFO overflow;
* no pop of an empty input;
* every head word has a route;
* at most one grant per output;
* no packet routed back to its own input;
* the bridge sends nothing to itself and receives only its own words.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/noc_pkg.sv tb/tb_noc_2x2.sv --top-module tb_noc_2x2
./obj_dir/Vtb_noc_2x2
```

Swap in another testbench name to run the others.

## Files and parameters

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | widths, `ctrl_t`, port numbers, `xy_route` |
| `rtl/srl_fifo.sv` | shift-register FIFO: `DATA_W`, `AW` (depth 2^AW), `READY_LIMIT` |
| `rtl/route_lookup.sv` | next-hop route for switch `NODE` |
| `rtl/input_port.sv` | FIFO, look-up, head register |
| `rtl/rr_arbiter.sv` | output arbiter, `NIN` inputs |
| `rtl/output_port.sv` | arbiter, mux, output register; `SELF` is its own port number |
| `rtl/noc_switch.sv` | 4-port switch; `NODE` selects its position |
| `rtl/wb_bridge.sv` | Wishbone network interface at (`NODE`, `LOCAL`) |
| `rtl/noc_2x2.sv` | the network; `DATA_W` (36, or 8 for the board) |
| `rtl/board_demo.sv` | board test wrapper |

Some changes need care:

* **Deeper FIFO.** Raise `AW` and `READY_LIMIT` together. The gap between
  them must stay at least 3 words for the in-flight words.
* **Larger arrays.** These need a 5-port switch and a new route function and
  address format. `DEST_W` = 5 already addresses 32 ports.
