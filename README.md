# Programmable channel emulator for 32 nodes

This is a programmable physical layer. Network nodes plug into 32 ports. In
place of cable, transceivers and a medium, a logic fabric carries their
serial bit streams. The fabric copies, delays, merges and corrupts the
streams the way a real bus, ring, star, radio network or tree would. A
command word sent over a control bus changes the topology, any internode
delay or a fault condition, even while traffic is running.

The design is a SystemVerilog version of a channel emulator built at UC
Berkeley in the mid-1980s for a protocol research laboratory. It keeps the
original architecture, sizes and configuration codes. Where the original
leaves a detail open, or depends on asynchronous TTL clocking, this version
makes its own choice. Each choice is listed under
[Departures and own choices](#departures-and-own-choices).

## Signals: four leads per direction

Each port carries four 1-bit signals in each direction, bundled as `sig_t`
in `ce_pkg`:

| field  | meaning |
|--------|---------|
| `data` | serial data |
| `viol` | a second, independent bit stream, used for code violations |
| `carr` | carrier: the other three leads are valid |
| `tim`  | bit timing: one rising edge per bit period |

The main rule: **data and violation are low whenever the carrier is low.**
Under that rule a collision of several transmitters is just the OR of their
signals. Every merge point in the fabric is therefore a plain OR gate. An
idle-forcing gate at every transmit input enforces the rule. Timing cannot
be ORed. Wherever timings meet, one of them is chosen, and the carriers
decide which (see [Clock arbitration](#clock-arbitration)).

## The fabric

```
node_xmt[t] --> TAP t --Path1 XMT--> tap_out[t]    --+
                      --Path2 XMT--> tap_out[N+t]  --+--> A: crossbar (2N x 2N)
node_rcv[t] <--       <--Path1 RCV-- B: mask/OR  <--+        |
                      <--Path2 RCV-- B: mask/OR  <--+        v
                                          ^       D: 2N delay cells
                                          +------- dly_out[0..2N-1]
```

With N = 32 and M = 2N = 64 the fabric is `outputs = B · D · A · inputs`:

- **A, delay-input routing.** `ce_delay_in_router`, one per index i. It is a
  crossbar. Each delay cell takes exactly one of the 64 tap outputs.
  - Cell i (delay group 1) has its own 6-bit select.
  - Cell N+i (delay group 2) has its own 6-bit select.
  - Select code s < N means tap s's Path 1 output.
  - Select code N+s means tap s's Path 2 output.
  - The same tap output may feed several cells. This is how radio and star
    topologies broadcast.
- **D, delay cells.** `ce_delay_cell`, two per `ce_delay_block`. Each cell
  delays one 4-lead stream by a programmable number of bit periods.
- **B, delay-output routing.** `ce_delay_out_router`, one per tap.
  - Each of the tap's two path inputs has a 64-bit mask over the 64 delay
    outputs.
  - Bit k < N is cell k (group 1). Bit N+k is cell N+k (group 2).
  - Data, violation and carrier pass a masked-OR (`ce_masked_or`).
  - Timing passes a masked clock arbitrator (`ce_masked_clk_arb`).

Enough cells are needed for each topology:

| topology | cells needed | fits in 64? |
|----------|--------------|-------------|
| K-node bidirectional bus | 2(K−1), one per hop and direction | K = 32: 62, yes |
| K-node ring | K | yes |
| K-node counter-rotating ring | 2K | yes |
| K-node full-connectivity radio | K(K−1) | up to 8 nodes (56 cells) |

## Tap block

The tap block (`ce_tap_block`) decides how a port joins the two paths. One
16-bit word configures it:

```
 15  14 13  12 11  10  9   8  7  6   5  4  3   2  1  0
[P2 A2 A1][P1 A2 A1][ RCV tim ][ P1 XMT ][ P2 XMT ][ RCV  ]
 timing cell (7 bits)           data/violation/carrier cell (9 bits)
```

The helper `ce_pkg::tap_word(rcv, p1, p2, trcv, tp1, tp2)` builds the word.
It takes its arguments in the order of the printed configuration tables.
The reset word is `16'hF1F9`. It disconnects the port: everything is forced
to 0.

### Data, violation and carrier cell (`ce_topo_cell`)

Three identical copies share the same 9 bits. Each output is an 8:1
selector:

| code | Node RCV | Path 1 XMT | Path 2 XMT |
|------|----------|------------|------------|
| 0 | 1 (fault) | 1 (fault) | 1 (fault) |
| 1 | 0 (fault) | noise #2 | noise #1 |
| 2 | noise #1 | P1 RCV | P1 RCV |
| 3 | noise #2 | P1 RCV + N XMT | P1 RCV + N XMT |
| 4 | P1 RCV | P2 RCV | P2 RCV |
| 5 | P1 RCV + P2 RCV + N XMT | P2 RCV + N XMT | P2 RCV + N XMT |
| 6 | P1 RCV + N XMT | N XMT | N XMT |
| 7 | P2 RCV | 0 | 0 |

Here "+" is an OR, which is a collision point.

Typical settings, as (RCV, P1, P2):

| topology | setting |
|----------|---------|
| bidirectional bus | (5, 3, 5) |
| unidirectional or counter-rotating ring | (4, 6, 7) |
| radio or point-to-point | (4, 6, 7), with several receive mask bits |
| folded bus, or node of a unidirectional bus pair | (7, 3, 4) |
| head end | (4, 7, 6) |
| passive tree | (4, 6, 4) |

The Path 2 RCV carrier is brought out as `dir_sense`. On a bus, it tells a
node which direction a carrier comes from.

### Clock arbitration

The timing cell (`ce_timing_cell`) contains two clock arbitrators
(`ce_clk_arb`), one per path output. Each has a 2-bit mode, written as A1A2:

| mode | timing output |
|------|---------------|
| 00 | node timing while the node's carrier is high, otherwise the path's received timing |
| 01 | node timing only |
| 10 | path timing only |
| 11 | 0 |

The node receive timing has its own 3-bit select:

| code | receive timing |
|------|----------------|
| 1 | P1 RCV |
| 2 | P2 RCV |
| 3 | bus arbiter IC3: node timing while the node sends, else P2 RCV if only the Path 2 carrier is up, else P1 RCV |
| 4 | IC4: node timing while the node sends, else P1 RCV |
| 5 | noise |
| 6 | 1 |
| 0, 7 | 0 |

Examples of the timing field (trcv, P1 mode, P2 mode):

| topology | setting |
|----------|---------|
| bidirectional bus | 011 00 00 |
| ring | 001 01 11 |
| folded bus | 010 00 10 |
| head end | 001 11 01 |
| passive tree | 001 01 10 |

Arbitration decides from the **local** carrier only. When two carriers
collide, the node's own timing wins by default. If the true first arrival
was the other carrier, the timing phase jumps once, and a receiver can lose
or gain at most one bit. The masked clock arbitrator has the same
approximation with up to 64 candidates:
- the most significant active masked carrier wins;
- with no carrier active, the most significant mask bit wins.

### Collision detection (`ce_coll_detect`)

- `coll_data` is (transmit data XOR receive data) OR (transmit violation
  XOR receive violation). It is meaningful while the node transmits.
- `coll_carr` is transmit carrier AND receive carrier.

With the bus setting, a node's receive lead includes its own signal. A lone
sender therefore sees `coll_carr` high and `coll_data` low. A real collision
shows up as a data discrepancy.

## Delay cell

Each delay cell (`ce_delay_cell` around `ce_ram_delay`) delays data,
violation and carrier together, clocked by the timing that travels with
them:

```
din --[interpolator: DFF on clk, bypassable; tim XOR interp]--> RAM delay --> dout
```

- **RAM delay.** A 1024 × 3 array with a write pointer and a read pointer.
  - On every rising edge of the stream's own timing, both pointers advance
    and one sample is written and one read.
  - The read pointer trails the write pointer by `len+1`. A bit therefore
    leaves `len+1` timing periods after it entered: 1 to 1024 periods of
    100 ns, about 20 m to 20.5 km of cable each.
- **Interpolator.** It adds one 20 MHz clock (50 ns, "10 m") to
  data/violation/carrier and inverts the timing. The half-period shift then
  keeps the timing centred on the shifted bits.
- **Mobile nodes.** A step command changes the delay by one period without
  corrupting a frame.
  - Increment: the read pointer holds once, on the next idle (carrier-low)
    sample being read.
  - Decrement: the write pointer holds once, on the next idle incoming
    sample.
  - Each direction stores one pending request.
- **Retiming.** Data and timing leave the cell together, one clk after the
  timing edge. So every fabric loop (ring, bus) contains registers.

Programming word, delay group 1 (type 3) or group 2 (type 4):

| bits | meaning |
|------|---------|
| [0] | interpolator on |
| [10:1] | `len` (delay = len+1 periods) |
| [14] | increment, one step (length field ignored) |
| [15] | decrement, one step (length field ignored) |

A length write re-places the read pointer at once. Samples still in flight
may then be lost or repeated. Use the step commands while traffic runs.

After reset every cell clears its RAM, one word per clk (1024 clks). During
that time `ready` is low and the outputs are idle.

## Timing and latency

`clk` is the 20 MHz global clock. Every register runs on it.

- Node timing is 10 MHz: it toggles every clk. It is sampled as data, and
  its rising edge is the event the delay cells act on.
- The node drives transmit leads from `clk`. It samples receive data on a
  rising receive timing while the carrier is high.
- Tap and routing logic is combinational. The only registers on the signal
  path are in the delay cells.
- One hop, tap output to the next tap's input, takes `2·len + 3` clks. The
  interpolator adds 1 more clk.
- The global time reference (`ce_global_time`) is an 8-bit counter on
  `clk`. Its MSB is `gt_sync`, the subharmonic that keeps node time
  counters aligned.

**Every line needs a timing source at its upstream end.** A delay cell moves
only on timing edges. After a carrier drops, arbitration hands the path
timing back to the upstream path. If nothing upstream drives timing, the
tail of a frame stays inside the RAMs.

For a bidirectional bus, set the first tap of each direction to node-only
timing:
- tap 0: P1 mode 01;
- tap K−1: P2 mode 01.

Receivers see the cleanest timing when all idle timings reaching a receive
point are in phase. Otherwise a carrier arriving from another source may
shift the timing edge by one clk, the one-bit arbitration error. Ways to
keep idle timings in phase:
- turn the interpolator on in every hop: such a hop shifts the timing by a
  whole number of periods;
- or give all cells that meet at one receive point the same interpolator
  setting.

## Control bus

`ctrl_bus_t` is 26 bits: `{btype[3:0], bindex[4:0], value[15:0], load}`.
`load` is sampled on `clk`. When `btype/bindex` matches a block, the block
latches `value`.

| btype | block | value |
|-------|-------|-------|
| 0 | tap i | 9-bit D/V/C + 7-bit timing |
| 1 / 2 | delay-input routing i, cell i / cell N+i | 6-bit source select |
| 3 / 4 | delay cell i / N+i | interpolator, length, step commands |
| 5–8 | delay-output routing i, Path 1 mask quarter 0–3 | mask bits 16q..16q+15 |
| 9–12 | delay-output routing i, Path 2 mask quarter 0–3 | mask bits 16q..16q+15 |

`ce_pkg::cbus_word(type, index, value)` builds a word.

Example: a unidirectional ring 0 → 1 → … → 31 → 0.

```
for t: tap t      = tap_word(4, 6, 7, 3'b001, 2'b01, 2'b11)
       DIN_P1 t   = t                 // cell t takes tap t Path 1
       DLY_G1 t   = {len, interp}
       DOUT_P1 (t+1)%32 mask = 1 << t // tap t+1 receives cell t on Path 1
```

## Departures and own choices

- **One synchronous clock.** The original uses each stream's timing as a
  real clock. Here timing is sampled on the 20 MHz clock, so node timing
  must be synchronous to `clk` and at most `clk`/2.
- **Retiming.** Each delay cell adds two clk stages. The minimum hop (len 0)
  is 3 clks instead of one gate delay.
- **RAM.** Each cell has one 1024 × 3 array with separate read and write
  ports. The original uses one 1024 × 1 RAM per signal, with read and write
  time-multiplexed through an address mux.
- **Mobile steps.** Increment lengthens the delay and decrement shortens
  it. The original text pairs "increment" with stopping the write counter,
  which would shorten the pointer separation. This design follows the
  meaning of the words.
- **Step commands.** The encoding (bits 14/15) and the single pending step
  per direction are this design's choices.
- **Encodings.**
  - The bit layout of the tap word is assumed.
  - Timing select codes other than 1, 2 and 3 are assumed.
  - The noise source wiring is assumed.
  - The 16'hF1F9 reset word is assumed.
  - The fallback of the masked clock arbitrator when no carrier is active
    is assumed.
- **Noise.** Each noise source is a 15-bit maximal LFSR (x^15 + x^14 + 1).
  Seeds differ per tap.
- **Global time width.** The counter width is not given; 8 bits is assumed.
- **Not built.**
  - The host I/O card that drives the control bus.
  - The connector and line drivers.
  - The optional display panel. Its stand-alone node simulator is only
    named in the original.

## Files

| file | contents |
|------|----------|
| `rtl/ce_pkg.sv` | types, block-type codes, word helpers |
| `rtl/ce_ctrl_cell.sv` | control bus interface: address compare, 16-bit latch |
| `rtl/ce_idle_gate.sv`, `rtl/ce_prbn.sv` | idle-forcing gate, noise source |
| `rtl/ce_topo_cell.sv`, `rtl/ce_timing_cell.sv`, `rtl/ce_clk_arb.sv`, `rtl/ce_coll_detect.sv` | tap cells |
| `rtl/ce_tap_block.sv` | tap block |
| `rtl/ce_delay_in_router.sv` | delay-input routing |
| `rtl/ce_ram_delay.sv`, `rtl/ce_delay_cell.sv`, `rtl/ce_delay_block.sv` | delay cells |
| `rtl/ce_masked_or.sv`, `rtl/ce_masked_clk_arb.sv`, `rtl/ce_delay_out_router.sv` | delay-output routing |
| `rtl/ce_global_time.sv` | global time reference |
| `rtl/channel_emulator.sv` | top level, parameters `N=32`, `DELAY_BITS=10`, `GT_BITS=8` |
| `tb/tb_<module>.sv` | one self-checking bench per module |

## Simulation

Each bench prints `TB_RESULT checks=<n> failures=<n>` and stops. With plain
Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl -Itb \
    rtl/ce_pkg.sv tb/tb_channel_emulator.sv --top-module tb_channel_emulator
./obj_dir/Vtb_channel_emulator
```

Replace the bench name to run another one.

`tb_channel_emulator` runs the full-size design with default parameters (32
ports, 64 cells of 1024 steps). It takes about 20 s. Nodes are modelled in
the bench. It drives, through the control bus only:

- a 32-node ring with random hop delays and interpolators (frame returns
  complete and on time);
- a 32-node bidirectional bus (every node receives from both directions, on
  the right cycle);
- a two-sender bus collision (carrier and data collision leads, clock
  arbitration switching);
- a 4-node radio network:
  - broadcast routing;
  - masked-OR collision;
  - a mobile-node increment that delays one pair's arrival by one bit
    period;
  - a decrement that advances another pair's arrival by one bit period;
- a point-to-point link at the longest delay, 1024 periods plus the
  interpolator;
- a folded bus on four taps: out on Path 1, folded onto Path 2, every node
  receiving the inbound line;
- forced-1 and noise faults on a receive port;
- the global time subharmonic period.

The bench counts each of these mechanisms and fails if any count is zero.

The block benches compare against independent reference models, exhaustive
where the input space allows. They cover:
- every code of the configuration tables;
- LFSR sequence and period;
- delay values, step commands, interpolator;
- mask quarters.

Some benches shrink the RAM depth or port count to keep runs short.
