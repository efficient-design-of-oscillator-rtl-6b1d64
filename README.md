# Oscillator-based PUFs: ring-oscillator and TERO variants

A physical unclonable function (PUF) turns the random, uncontrollable
mismatch between nominally identical transistors into a device-specific
bit string, the *response*. Two copies of the same bitstream on two chips
give different responses; the same chip gives (nearly) the same response
every time. This repository holds SystemVerilog for two oscillator-based
PUFs that share one architecture, following the design published as
"Efficient design of Oscillator based Physical Unclonable Functions on
Flash FPGAs" (Microsemi SmartFusion2 target):

* **RO PUF** – pairs of ring oscillators race; the faster one of each pair
  decides one bit.
* **TERO PUF** – pairs of transient effect ring oscillators (TEROs)
  oscillate for a short, mismatch-dependent time; the one that oscillates
  more times decides the bit.

Both produce a 128-bit response from 256 oscillating cells. The digital
part (selection, counting, bit extraction, sequencing) is synthesizable
RTL. The oscillating cells themselves are combinational loops whose
behaviour is analog; they are provided as behavioural simulation models
and must be instantiated from vendor library cells on a real device (see
[Putting it on an FPGA](#putting-it-on-an-fpga)).

## Architecture

```
                 ctrl ──┬──────────────────────────────────────────┐
                        │                                          │
   sel (challenge) ──┬──┼───────────────┬────────────┐             │
                     │  v               │            │             │
                     │ demux A ──> cell A.0..A.127 ──> mux A ──> counter A ──┐
                     │                                                     ├─> bit extractor ──> response bit
                     └> demux B ──> cell B.0..B.127 ──> mux B ──> counter B ──┘
```

* The 256 cells form two blocks, A and B, of 128 cells. Challenge `i`
  always compares cell A.i with cell B.i: a cell is never compared with a
  cell of its own block and is used for exactly one bit, which avoids
  correlation between bits.
* One select value drives both demultiplexers and both multiplexers. The
  demultiplexers deliver the control signal only to the two selected cells;
  the multiplexers route the two selected outputs to two counters.
* The counters are clocked **by the oscillator outputs themselves**. The
  bit extractor compares what the two counters saw.
* A sequencer steps the challenge from 0 to 127 after a `start` pulse and
  assembles the 128 bits (pair `i` gives response bit `i`). With `single`
  high at `start` it measures only the pair on the `challenge` input (the
  "Select cell" input of Fig. 3) and returns that bit.

| Module | Role |
|---|---|
| `osc_puf_top` | both PUFs side by side, sharing clock and reset |
| `ro_puf`, `tero_puf` | one PUF each: the architecture above |
| `ro_puf_ctrl`, `tero_puf_ctrl` | sequencers |
| `cell_demux` | control demultiplexer, optionally one flip-flop per cell |
| `cell_mux` | output multiplexer |
| `osc_counter` | saturating counter clocked by an oscillator |
| `ro_arbiter` | RO bit extractor: which counter filled first |
| `tero_subtractor` | TERO bit extractor: difference of the two counts |
| `toggle_ff` | T flip-flop behind each RO cell |
| `ro_cell_block`, `tero_cell_block` | 128 cells of one block |
| `ro_cell`, `tero_cell` | behavioural models of the oscillating cells |
| `puf_pkg` | default sizes, sequencer state type |
| `osc_model_pkg` | process-variation model used only by the cell models |

## The RO PUF: a frequency race

A ring-oscillator cell is a 2-input AND gate followed by three inverters,
the last output fed back to the AND gate. With `ctrl` low the output rests
at 1; with `ctrl` high the loop has an odd number of inversions and
oscillates at a frequency set by the gate and wire delays, so by the
transistor mismatch.

For each challenge (`ro_puf_ctrl`):

1. **CLEAR** (4 cycles) – the select moves to pair `i`; counters and T
   flip-flops are held in asynchronous clear while the multiplexers settle.
2. **RUN** – `ctrl` rises. It reaches the two cells through
   `cell_demux` with `REGISTERED = 1`: one flip-flop per cell input, all on
   the low-skew system clock, so cells A.i and B.i start on the same clock
   edge. Each cell drives a T flip-flop (`toggle_ff`) that squares the
   waveform, gives it a 50 % duty cycle and halves its frequency, which
   makes the counters easier to clock. The multiplexed T flip-flop outputs
   clock two 11-bit counters. The first counter to reach 2047 raises
   `full`; the arbiter answers **1 if block A filled first, 0 if block B
   did**.
3. **STOP** (8 cycles) – `ctrl` falls, stopping both rings; the bit is
   stored.

Time per bit is dominated by the fill time: 2047 periods of the divided
signal, i.e. 4 × 2047 ring half-periods (about 8 µs at a 500 MHz ring),
plus about 17 clock cycles of overhead. A full response takes about 1 ms.

### The arbiter and its clock-domain crossing

The two `full` flags come from two unrelated oscillator clock domains.
`ro_arbiter` passes each through a two-flop synchronizer and decides on the
first system-clock edge at which either synchronized flag is high (3 cycles
after the flag). Its time resolution is therefore one clock period: if the
two counters fill within the same period, the race cannot be resolved
digitally. The arbiter then raises `tie` and gives block A the win; the
sequencer counts such pairs on the `ties` output. Such bits are inherently
unstable; with 11-bit counters and a 100 MHz clock two rings must differ
by more than about 1.2 ps per half period (0.12 % at 1 ns) for the race to
be resolved.

The counters stop at their maximum instead of wrapping, so the slower
counter can also reach 2047 during the ~4 cycles between the decision and
the rings stopping without disturbing the result.

## The TERO PUF: counting a transient

A TERO cell is two branches, each an AND gate and three inverters, whose
outputs cross over to the other branch's AND gate: an RS latch with extra
delay. When `ctrl` rises, both branches switch together and the latch
oscillates; the small mismatch between the branches gradually pulls it out
of this metastable oscillation, and it settles into one of its two stable
states. How many oscillations that takes varies from cell to cell.

For each challenge (`tero_puf_ctrl`):

1. **CLEAR** (4 cycles) – select pair `i`, counters cleared.
2. **RUN** – `ctrl` is high for exactly `ACT_CYCLES` = 100 cycles, the
   1 µs activation time at 100 MHz. Both cells oscillate and settle; the
   counters count the rising edges of the cell outputs.
3. At the last cycle of RUN, `tero_subtractor` compares the two counts and
   its bits are stored; **STOP** (4 cycles) lowers `ctrl`.

A response takes 128 × 108 + 1 = 13 825 clock cycles (138 µs).

* No T flip-flop is placed behind a TERO cell: the extra load would
  unbalance the two branches and shorten the oscillation drastically. The
  cells' outputs go straight to the multiplexer.
* The demultiplexers are combinational (`REGISTERED = 0`); `ctrl` itself
  comes from a flip-flop, so it is glitch-free.
* The counts cross into the system clock domain without a synchronizer.
  They are read at the end of the 1 µs pulse, long after the cells have
  settled, so the bus is static when sampled. The counter width and the
  pulse length must be sized together with the cells' mean number of
  oscillations; a counter that saturates makes both counts equal.
* `K` (1 to 3) bits are taken per challenge. Bit 0 is the sign: 1 when
  cell A oscillated more often than cell B (equal counts give 0). Bits 1
  and 2 are the low bits of |A − B|. Which extra bits to take is this
  design's choice. The default `K = 1` gives the 128-bit response.

## Simulation models of the cells

`ro_cell` and `tero_cell` are **not synthesizable**. They reproduce the
cells' behaviour at their ports with delays:

* `ro_cell` toggles every `HALF_PS` picoseconds while `ctrl` is high and
  rests at 1 otherwise; the first falling edge comes one half-period after
  `ctrl` rises.
* `tero_cell` gives `N_OSC` full oscillations of half-period `HALF_PS`
  after `ctrl` rises, then settles at `FINAL`, and returns to 1 when `ctrl`
  falls. The decay of the oscillation is an analog effect; the model only
  reproduces its count.

`ro_cell_block` and `tero_cell_block` give each cell its own values from
`osc_model_pkg`, a hash of `DEVICE_SEED`, the block and the cell index:
RO half periods of 900–1100 ps, TERO counts of 100–399, and a random final
state. Changing `DEVICE_SEED` simulates another die. `RO_JITTER_PS` (a
uniform ± jitter on every half period) and `TERO_JITTER_OSC` (± on every
oscillation count) add measurement noise, so that response stability can
be studied. These numbers are choices of the model, not measurements.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `N_CELLS` | 256 | cells per PUF, split into two blocks; response = `N_CELLS/2` bits |
| `CNT_W` | 11 | counter width of both PUFs |
| `TERO_K` | 1 | bits per TERO challenge (1–3) |
| `TERO_ACT_CYCLES` | 100 | TERO activation time in clock cycles (1 µs at 100 MHz) |
| `DEVICE_SEED` | 1 | simulated die (cell models only) |
| `RO_JITTER_PS` | 0 | RO noise (cell models only) |
| `TERO_JITTER_OSC` | 0 | TERO noise (cell models only) |

The 256 cells, the 11-bit counters, the 1 µs pulse, 1–3 bits per TERO
challenge and the 128-bit response follow the published design. The
100 MHz clock is an assumption; change `TERO_ACT_CYCLES` with the clock.
For the RO PUF, counter widths from 7 to 18 bits were compared in the
original work: the response became markedly more stable under supply
variation up to 11 bits and did not improve beyond that, hence the default.
The same trend shows in simulation: a wider counter adds up the delay
difference of a pair over more periods, the systematic part growing with
the count and the noise only with its square root. With the noisy cell
model, `tb_ro_counter_size` measures about 2–4 % steadiness at 7 bits and
below 1 % at 11 bits on one modelled die; these numbers describe the model,
not silicon.

## Interface and timing

Each PUF has `start` (one-cycle pulse), `busy` (high during a sweep) and
`valid` (rises with the response and holds it until the next `start`).
If `*_single` is high during the `start` cycle only the pair on
`*_challenge` is measured: its result appears on `ro_bit` / `tero_bits`
and at its place in the response, and the other response bits are kept.
One RO challenge takes the counter fill time (about 8 µs with 11-bit
counters) plus about 17 clock cycles; one TERO challenge takes 108 clock
cycles.
`rst_n` is an asynchronous active-low reset for all system-clock registers.
`ro_osc_a`/`ro_osc_b` expose the RO multiplexer outputs, the signals that
clock the counters; `tero_diff` shows the count difference of the current
TERO pair. The response bit order, the handshake and the reset are this
design's choices.

## Putting it on an FPGA

The RTL describes *what* is connected. Whether the PUF works depends as
much on *how* it is placed, because any systematic delay difference
between the A and B sides biases every chip the same way. The published
design practices, none of which can be expressed in RTL:

* Build each cell from the vendor's AND2 and INV library primitives (not
  from inferred logic), and disable retiming, so that synthesis neither
  removes inverters nor inserts loop breakers. Replace `ro_cell` and
  `tero_cell` by such structural netlists.
* Place the gates of each cell in adjacent logic elements, all cells
  implemented identically.
* Put each cell block in its own exclusive region with routing constrained
  to it, and keep the two regions close together so that chip-level
  gradients cancel between A and B.
* RO PUF: put the two counters side by side and drive each from its
  multiplexer through a global clock buffer (a CLKBUF on SmartFusion2), so
  that both counter clocks have the same, low-skew delay. The RTL connects
  the multiplexer output directly to the counter clock.
* The multiplexers could also be built from the vendor's MUX4 primitive to
  better match their delays; `cell_mux` is plain RTL.

The published measurements (uniqueness 42 % for the RO PUF and 48 % for
the TERO PUF, steadiness about 1.5–1.7 %, on 24 chips) were obtained with
these constraints; this repository does not reproduce silicon results.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_toggle_ff`, `tb_cell_mux`, `tb_cell_demux`, `tb_osc_counter` | basic blocks, incl. one-cycle latency of the registered demultiplexer, saturation at 2047 |
| `tb_ro_arbiter` | A-first / B-first / tie decisions, 3-cycle decision latency |
| `tb_tero_subtractor` | difference, sign bit and magnitude bits for K = 1 and 3 |
| `tb_ro_puf_ctrl`, `tb_tero_puf_ctrl` | challenge order, 100-cycle pulse width, cycles per response, single-challenge mode |
| `tb_ro_cell`, `tb_tero_cell` | cell models: period, oscillation count, rest and settle levels |
| `tb_ro_puf`, `tb_tero_puf` | 16-pair PUFs on two simulated dies, bits against the cell model |
| `tb_osc_puf_top` | both PUFs end to end, reduced to 16 pairs and 8-bit counters, two sweeps |
| `tb_osc_puf_full` | both PUFs end to end at the default sizes (about 1 min of simulation) |
| `tb_puf_metrics` | 4 simulated dies with noise, 5 responses each: uniqueness and steadiness |
| `tb_ro_counter_size` | RO PUFs with 7, 9 and 11-bit counters on one noisy die: steadiness improves with width (about 2.5 min) |

Expected responses are derived from the cell model, not from the RTL: in
the RO PUF the cell with the shorter half period must win (pairs whose
counters fill within one clock period of each other are not checked), in
the TERO PUF the cell with more oscillations must win, limited by counter
saturation. The end-to-end tests also count that each mechanism occurred
(A wins, B wins, the arbiter stopping the slower counter, both TERO
outcomes, both settle states, repeat responses identical, single
challenges matching the sweep).

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_osc_puf_top rtl/puf_pkg.sv rtl/osc_model_pkg.sv \
    tb/tb_osc_puf_top.sv -o sim
./obj_dir/sim
```

Variables that nothing initialises start at random values; the testbenches
apply a reset edge before use.

## Known departures and open points

* The oscillating cells are behavioural models; their delays, oscillation
  counts and noise are invented, not characterised.
* The RO arbiter resolves races only to one system-clock period and gives
  ties to block A; the original arbiter's tie handling is not specified.
* The TERO bits beyond the sign bit, the 100 MHz clock, the response bit
  order, the clear/stop phases, the start/valid handshake and the
  single-challenge mode (how a challenge reaches the select lines is not
  specified) are this design's choices.
* The clock buffers, the library-cell netlists and all placement
  constraints are left to the FPGA implementation flow.
