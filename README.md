# ICED: incremental clustering for radar pulse deinterleaving

A radar warning receiver sees one interleaved stream of pulses from every emitter
around it. Each pulse is measured into a *pulse descriptor word* (PDW): its
carrier frequency (RF), its pulse width (PW) and its time of arrival (TOA).
Deinterleaving means sorting that stream back into emitters. That is easier said
than done: emitters appear and disappear, hop between frequencies, and have
jittered parameters.

This RTL sorts the stream with **ICED** (Incremental Clustering of Evolving
Data). It is an online clustering algorithm that keeps a fixed pool of
clusters. Each pulse is either pulled into the nearest cluster or starts a new
one, and clusters that stop receiving pulses fade away on a time scale the host
sets. For every PDW the engine returns:
- the cluster (presumed emitter) the pulse was assigned to;
- that cluster's running-average RF and PW, in the input's own units;
- the cluster's weight;
- its pulse-repetition interval (PRI) estimate.

With the default 16 clusters, a PDW goes from the input to its result in
**74 clock cycles**. That is 370 ns at the 200 MHz target clock, faster
than a dense environment delivers pulses: 12 emitters at 200 kHz
pulse-repetition frequency produce one pulse every 417 ns on average.

## The algorithm, one PDW at a time

Cluster state per slot `j`: centre `(c_rf, c_pw)` in normalized units, weight
`w` (0 = empty), the TOA of its last pulse and a PRI estimate. Configuration:
distance threshold `D`, fade length `L` (in TOA ticks), maximum weight `Wmax`,
and the expected range `[min, max]` of RF and PW.

1. **Normalize.** RF and PW are each mapped onto 16 bits,
   `x = (in - min) * 65536 / (max - min)`, clamped to `0..0xFFFF`, so that one
   distance threshold serves both dimensions.
2. **Fade.** The number of elapsed fade cycles is
   `f = (toa - toa_prev + r) / L`. The remainder `r` of that division is kept for
   the next PDW, so that fading does not depend on how the time is sliced. Every
   weight is reduced by `f`, saturating at 0. A cluster whose weight reaches 0
   is no longer *active*. Every decision below uses the faded weights, and
   every slot stores its faded weight when the PDW commits.
3. **Nearest and lightest.** The Manhattan distance
   `|x_rf - c_rf| + |x_pw - c_pw|` is measured to every active cluster. The
   engine finds the nearest active cluster and the lightest cluster (faded
   weight, empty slots count as 0). Ties go to the lower slot number.
4. **Update or overwrite.**
   - If the nearest distance is strictly below `D`, that cluster is updated:
     `c = (c*w + x) / (w + 1)` per dimension, rounded to nearest;
     `w = w + 1`; `PRI = toa - last_toa`; `last_toa = toa`.
     When `w + 1` reaches `Wmax`, the weight is set to `Wmax / 2` instead, so a
     long-lived emitter keeps following slow drift.
   - Otherwise the lightest cluster is overwritten with the PDW: centre `x`,
     weight 1, PRI 0 (no estimate yet). This is how new emitters enter. When
     every slot is in use, the emitter that was heard from least is displaced.
5. **Undo the normalization.** The assigned centre is returned in native units,
   `min + ((max - min) * c) >> 16`.

The feedback in step 4 is why PDWs are processed strictly one after another:
the next PDW must see the clusters that the previous one changed.

## Structure

```
 PDW in ──► pdw_fifo ──► sequencer ──┬─► norm_2d (norm_1d ×2) ─┐
                                     └─► fade ─────────────────┴─► clusters ─► norm_undo ×2 ─► result
                      iced_regs ◄──── host (configuration, cluster readback)
```

`clusters` is the core. It holds `N_CLUSTERS` copies of `cluster_center`, one
per slot. All of them work in parallel on the same PDW:

```
            ┌──────────────── cluster_center[j] ───────────────┐
 x, f ────► │ dist_meas ──► distance, active                   │──► min_tree (distance) ─┐
            │ calc_new_center ──► current / pend_update /      │──► min_tree (weight) ───┴─► cluster_assignment
            │                     pend_overwrite               │                            (type, id) broadcast
            │ update_logic ◄── (type, id) ──► 3-way mux ──► state register                 │
            └──────────────────────────────────────────────────┘◄──────────────────────────┘
                                        assigned_tree: state of the assigned slot ──► result
```

Each slot computes all three of its possible next states while the distance is
being measured and compared:
- the updated centre `pend_update`;
- the overwritten centre `pend_overwrite`;
- the faded state `current`, for when it is not chosen.

Once `cluster_assignment` broadcasts the decision, each slot's `update_logic`
picks one of the three through its multiplexer, and all slots commit in the
same cycle. So the only per-PDW serial step is the division inside
`calc_new_center`. The comparison across slots is a pair of binary trees of
2-input `min2` cells, with depth log2(N), so adding clusters costs area, not
cycles.

### Dividers

The three divisions — normalization, fade cycles and the running average — use
`serial_div`, a restoring divider that produces one quotient bit per clock:
- normalization: 32-bit dividend, 33 cycles in `norm_1d`;
- fade: 33-bit dividend, 35 cycles in `fade`;
- running average: 33 cycles in `calc_new_center`.

This keeps each divider small enough to replicate in every cluster slot. It is
also where almost all of the latency goes.

### Latency

The latency counts clock edges, from the edge that writes a PDW into an empty
FIFO while the engine is idle to the edge that raises `out_valid`:

| step | edges |
|---|---|
| FIFO pop + read register | 2 |
| fade (norm runs under it, 33) | 35 |
| start clusters | 1 |
| clusters (distance, trees, decision, divide, commit) | 34 |
| norm_undo | 1 |
| output register | 1 |
| **total** | **74** |

Throughput is one PDW per 74 cycles. Bursts wait in the FIFO; 512 entries by
default. `pdw_ready` is low while the FIFO is full.

## Modules

| file | what it is |
|---|---|
| `iced_pkg.sv` | widths, `pdw_t`, `center_t`, `cfg_t`, assignment enums, reset configuration |
| `serial_div.sv` | restoring bit-serial divider, `NUM_W` cycles |
| `norm_1d.sv`, `norm_2d.sv` | normalization of one / both dimensions, with clamping |
| `fade.sv` | fade-cycle count with carried remainder |
| `dist_meas.sv` | registered Manhattan distance |
| `calc_new_center.sv` | faded weight, `pend_update`, `pend_overwrite` |
| `update_logic.sv` | decodes the broadcast (type, id) into the slot's mux select |
| `cluster_center.sv` | one slot: the three blocks above plus the state register |
| `min2.sv`, `min_tree.sv` | comparator cell and tree, ties to the lower index |
| `cluster_assignment.sv` | update if nearest distance < `D`, otherwise overwrite lightest |
| `mux2.sv`, `assigned_tree.sv` | selects the assigned slot's new state |
| `clusters.sv` | the clustering engine described above |
| `norm_undo.sv` | back to native units, one cycle |
| `pdw_fifo.sv` | input FIFO with registered read |
| `iced_regs.sv` | host registers |
| `iced_top.sv` | FIFO, sequencer, engine, registers, result port |

## Host interface (`iced_regs`)

The bus is a simple word-addressed bus: `host_wr`/`host_rd`, `host_addr`
(8 bits), and 32-bit `host_wdata`/`host_rdata`. Read data appears one cycle
after `host_rd`. Writes take effect on the next edge. The engine reads the
configuration live, so change it only while no PDW is in flight, i.e.
between results with the FIFO empty.

| address | register | reset |
|---|---|---|
| 0x00 | distance threshold `D` (normalized units) | 100 |
| 0x01 | fade length `L` (TOA ticks) | 3000 |
| 0x02 | maximum weight `Wmax` | 4096 |
| 0x03 / 0x04 | RF min / max | 0 / 0xFFFF |
| 0x05 / 0x06 | PW min / max | 0 / 0xFFFF |
| 0x07 | PDWs processed (read only) | 0 |
| 0x80 + 4·j + {0,1,2,3} | slot `j`: RF centre, PW centre (normalized), weight, PRI | – |

The slot weight read back is the weight as of the last processed PDW. It does
not include fading since then.

## Where this RTL departs from the original ICED hardware

The algorithm, the per-slot structure (distance, new-centre calculation,
update logic, 3-way mux), the comparator trees, the parallel Norm/Fade stage,
the 16-bit normalized coordinates and the 16-cluster default follow the
original design. The following are choices made here:

- **Rounding.** The running average rounds to nearest. Truncation pulls every
  centre down by up to one unit per update, and in testing this split single
  emitters over several clusters.
- **Latency: 74 cycles** against the 84 reported for the original, with the
  same bit-serial approach. The stage boundaries differ in detail.
- **De-normalization adds `min` back.** It computes `min + (max-min)*c >> 16`,
  so results are in the input's units for any range, not only ranges that
  start at 0.
- **Clamping.** Inputs outside `[min, max]` normalize to 0 or 0xFFFF.
- **Saturating fade.** A weight never goes below 0.
- **Tie-breaking.** Ties in both trees go to the lower slot number.
- **The host side is this design's own:** FIFO depth, register map, reset
  values and the result port. The original talks to a PC over PCIe through a
  vendor interface. That interface, its clocking and the board support are not
  part of this RTL; `iced_top` is the core one would put behind such an
  interface.
- **Widths.** Weight 16 bits, TOA 32 bits, distance 17 bits. All are set in
  `iced_pkg`.
- **Reset configuration.** Threshold 100 and fade length 3000 are the settings
  of the original's two-emitter evaluation. The maximum weight of 4096 is this
  design's own; the original halves at a maximum without giving its value.

## Not included

- The PCIe host link, clock generation and FPGA board support of the original
  system.
- The receiver front end that measures pulses into PDWs. PDWs arrive here
  already measured.
- FPGA resource and timing-closure figures. The RTL is synthesizable, but no
  device results are given here.

## Verification

Every module except the small helpers (`serial_div`, `min2`, `mux2`, which are
covered through their users) has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. The engine-level benches compare against a
cycle-independent reference model, `iced_ref_pkg.sv`, which contains
`iced_model`, a plain SystemVerilog implementation of the algorithm above. They
also check the latency of every multi-cycle block: norm 33, fade 35,
calc_new_center 33, clusters 34, top 74.

- `tb_iced_top` runs the top at its default size (16 clusters, 512-deep FIFO).
  It covers:
  - isolated PDWs, with the 74-cycle latency check;
  - a 20-emitter burst that fills the FIFO, exercises back-pressure and evicts
    active clusters;
  - a reconfiguration that makes clusters fade out;
  - readback of every slot.

  It counts each mechanism it exercises: new cluster, update, eviction,
  fade-out, weight halving, back-pressure and clamping.
- `tb_iced_workloads` runs the evaluation scenarios, with PDW units of 4 kHz
  per RF step and 16 ns per PW/TOA tick. It resets the engine between
  scenarios, and checks every result against the model and the outcome of each
  scenario:

  | scenario | result |
  |---|---|
  | single Gaussian emitter (500 pulses, RF and PW normally distributed around 8000, variance 10), threshold/fade 7/10000, 7/5000, 10/5000 | 41 %, 59 %, 89 % of points in the main cluster; at most 5.3, 4.0, 2.7 clusters (original: 46 %, 62 %, 90 %) |
  | two emitters, 1 µs/20 µs and 0.8 µs/6 µs, with overlapping pulses merged into one PDW | the two emitters are the two heaviest clusters; overlaps form a short-lived third cluster |
  | one emitter hopping over 4 frequencies every 1 ms, PRI 40 µs | one cluster per hop frequency, PRI 2500 ticks ±6 |
  | the hopper plus both fixed emitters | both fixed emitters found; at most 7 clusters |
- `tb_iced_sizes` runs four engines side by side, with 2, 4, 8 and 16
  clusters, on the same stream: six emitters plus noise pulses. Each engine is
  checked against a model of its own size. The latency is 74 cycles at every
  size. Active clusters are evicted 573, 363, 75 and 0 times respectively,
  which shows what a smaller engine gives up.
- `tb_iced_stream` is the sustained-rate test. It feeds 80,000 PDWs from
  twelve emitters, all at 200 kHz pulse-repetition frequency, each at its
  arrival time. Pulses arrive on average every 83.4 cycles, against the 74
  cycles the engine needs. The FIFO never holds more than 3 waiting PDWs, no
  PDW waits more than 293 cycles for its result, and every emitter ends as its
  own cluster with a PRI of 5 µs.

### Simulating

From the directory that holds `rtl/` and `tb/`, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/iced_pkg.sv tb/iced_ref_pkg.sv tb/tb_iced_top.sv --top-module tb_iced_top -o sim
./obj_dir/sim
```

To run another bench, replace `tb_iced_top` with its name. Benches that do not
use the model do not need `tb/iced_ref_pkg.sv`, but it does no harm. Every
bench has a watchdog and ends with `$finish`.
Once built, `tb_iced_stream` runs in about 6 s and the others in under a second.

The parameters to change are:
- `N_CLUSTERS` (any value ≥ 2; trees pad to a power of two);
- `FIFO_DEPTH`;
- the widths in `iced_pkg`. The dividers take their lengths from these
  widths, so the latencies above change with them. Only the default widths
  are exercised by the testbenches.
