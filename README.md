# Radiation-tolerant multi-bit flip-flop with timing pre-error sensing

Ordinary flip-flops from any standard-cell library can be made tolerant of
single event upsets (SEU) and single event transients (SET) by grouping them.
The same extra logic also warns when data arrives too close to the clock
edge. The idea is to share one parity bit across a group of N flip-flops
instead of triplicating each one:

* each data bit is stored twice: in a **primary** flip-flop on clock CP1, and
  in a **secondary storage element (SSE)** on CP2, a copy of the clock delayed
  by one buffer;
* the parity of the group's inputs is stored in one extra **parity flip-flop**
  (PiR), through a slightly slower path;
* after the edge, the parity of the primary outputs (Po) is compared with PiR.
  If they differ (`ERR = 1`), the group outputs the SSE copy instead of the
  primary one.

A single upset or captured glitch therefore never reaches `Q`. Because the
parity path is slower than the data path, `ERR` also fires when a data input
changes just before the clock edge, even though the primary flip-flops still
capture it correctly. This is a *pre-error*: the path is close to failing but
has not failed yet. The `ERR` lines of all groups are ORed and counted.
Frequent errors mean the supply or clock can be relaxed no further. Rare
errors are sporadic radiation hits.

This RTL models the group, the clock and reset arrangement around it, the
clock glitch filter, and the error collection of a whole design.

## The group: `mbff_group`

```
 D[i] ──┬──────────────► primary DFF (CP1, CD1) ──┬── qp[i] ─► MUX 0 ┐
        ├──────────────► SSE DFF     (CP2, CD2) ──┼── qs[i] ─► MUX 1 ├─► Q[i]
        │                                         │                  │
        └─ PGEN ─ PD(SEL) ─► parity DFF (CP1, CD1) ─ PiR ─┐          │
                                                  │        ECU ─► ERR ┘
                           qp[] ─ PGEN ─ Po ──────────────┘
```

| situation | primary | SSE | PiR | ERR | Q from |
|---|---|---|---|---|---|
| normal | ok | ok | ok | 0 | primary |
| upset in a primary FF | wrong | ok | ok | 1 | SSE |
| upset in an SSE | ok | wrong | ok | 0 | primary |
| upset in the parity FF | ok | ok | wrong | 1 | SSE (same data) |
| glitch on D caught at CP1 | wrong | ok | ok | 1 | SSE |
| glitch on D caught by the delayed parity | ok | ok | wrong | 1 | SSE |
| glitch on D caught at CP2 | ok | wrong | ok | 0 | primary |
| glitch in the output parity or ECU | ok | ok | ok | pulse | either (same data) |
| D changes just before CP1 | new, ok | new, ok | old | 1 | SSE (new data) |
| two bits change just before CP1 | ok | ok | same parity | 0 | primary (not detected) |

Points to keep in mind:

* **Masking, not repair.** The stored state is not corrected. An upset stays
  until the next clock edge rewrites the flip-flops. If a clock-gated group
  takes a second hit before that, the error cannot be masked. Use `ERR` to
  trigger a refresh.
* **SSE clock skew.** A D glitch narrower than the CP1-to-CP2 skew can corrupt
  only one of the two copies, so the skew sets the widest glitch that is
  filtered. The skew must stay below the flip-flop clock-to-output delay plus
  the ERR path delay, so that `Q` never shows an SSE value older than the
  primary one. Larger skew also costs hold margin.
* **Detection window.** The window is the delay of the input parity path:
  the XOR tree plus the programmable delay (`prog_delay`, set by `SEL`). A
  change on D is flagged when it comes less than
  ⌈log2 N⌉ × `XOR_PS` + `SEL` × `PD_CELL_PS` before the CP1 edge. With the
  defaults that is 40 ps for a 2-bit group at `SEL = 0`, and 80 ps or
  120 ps for 4- and 8-bit groups. Wider groups have a deeper tree, so their
  window is wider. A wider window catches slow paths earlier but leaves
  less margin to recover by voltage scaling.
* **Parity.** `PARITY_EVEN` uses an XOR tree and `PARITY_ODD` an XNOR tree.
  Both work the same way.
* **Reset.** Resets are asynchronous and active low. CD1 resets the primary
  flip-flops and the parity flip-flop; CD2 resets the SSEs.
  * `SEPARATE_RESET = 0` (common reset): the parity flip-flop resets to the
    parity of an all-zero word, so there is no error after reset.
  * `SEPARATE_RESET = 1`: the parity flip-flop resets to the opposite value.
    A glitch on CD1 alone then clears the primaries and always raises `ERR`,
    so the SSEs keep `Q` correct. A glitch on CD2 touches only the SSEs and
    has no effect. The price is that `ERR` is also high during a real reset.

## Around the groups: `mbff_digital_system`

Registers of a design are replaced by `G` groups of `N` bits. The user's
combinational logic connects through the `D` and `Q` ports.

* **Clocks.** `CP` drives CP1 of every group. With `CLK_FILTER = 1` it first
  passes through `guard_gate_filter`. The filter is a C-element fed by the
  clock and a copy delayed by `FILTER_PS`, so clock glitches shorter than
  that never reach the primary flip-flops. Each group makes its own CP2 with
  one `delay_cell` of `SKEW_PS`, taken after the filter so the skew stays one
  buffer.
* **Resets.** `CD` feeds two reset nets, one for CD1 and one for CD2. In
  layout they are separate buffer trees.
* **Error collection.** `error_or` merges the `ERR` lines. `sample_count`
  samples the result on every `CP` edge and counts error cycles over
  `WINDOW` cycles. At the end of each window it gives a verdict, which holds
  for the whole next window:
  * more than `THRESH` (2) error cycles: `ERR_TIMING`, and `timing_err` is
    raised (systematic errors, the path is near its limit);
  * 1 to 2 error cycles: `ERR_RADIATION`;
  * no error cycles: `ERR_NONE`.

  An external controller (supply regulator or clock generator) reads
  `timing_err` and closes the loop.

Default parameters describe the arrangement that was built in silicon: two
2-bit even-parity groups, a common reset, a single-buffer skew and no clock
filter.

| parameter | default | meaning |
|---|---|---|
| `G`, `N` | 2, 2 | groups, bits per group |
| `PARITY` | `PARITY_EVEN` | XOR or XNOR parity |
| `SEPARATE_RESET` | 0 | parity FF reset polarity for separate CD1/CD2 trees |
| `CLK_FILTER` | 0 | guard-gate filter on the primary clock |
| `SEL_W` | 2 | programmable delay select width |
| `SKEW_PS` | 55 | CP1→CP2 skew |
| `PD_CELL_PS` | 50 | delay step of the programmable delay |
| `XOR_PS` | 40 | modelled delay of one level of the input parity tree |
| `FILTER_PS` | 60 | guard-gate delay |
| `WINDOW`, `THRESH` | 256, 2 | sample-and-count window and threshold |

## Delays in this RTL

Timing is the point of this design, so delays are modelled explicitly. All
files use `` `timescale 1ps/1ps ``.

* `delay_cell` is an inertial delay (`assign #`). Synthesis turns it into a
  wire. In a netlist, replace it with the library buffer or delay cell of the
  wanted delay.
* `prog_delay` builds each tap from 10 ps stages. A glitch wider than one
  stage therefore travels down the parity path, as it would in a real buffer
  chain.
* The input parity tree gets `XOR_PS` per level, again built from 10 ps
  stages. The output parity tree and the ECU have no delay.
* Flip-flops have zero clock-to-output delay. The window and skew are
  therefore exactly the modelled delays. When `ERR` rises on a clock edge,
  `Q` switches to the SSE word, which only turns new at CP2. The new value
  therefore reaches `Q` up to one skew late. This is a delay, not a wrong
  value.
* In a netlist, the published timing constraints apply:
  * clock period > clock-to-Q + logic + setup + mux + input parity delay +
    ERR delay − clock skew;
  * hold: logic + clock skew + CP1→CP2 skew > hold time;
  * the CP1→CP2 skew must stay below clock-to-Q + ERR delay.

  The extra mux, parity and ERR delays must fit in the margin that the
  pre-error sensing lets you remove.
* `guard_gate_filter` synthesizes to a latch enabled when its two inputs
  agree. A real guard gate is a transistor-level keeper, so treat that block
  as a model.

Only `SKEW_PS` rests on a published figure. 55 ps is the difference between
the narrowest D pulse a plain flip-flop captures (87.5 ps) and the narrowest
one a 2-bit group captures (142.5 ps). The other delays are placeholders, to
be set from the target library's characterisation.

## Where this RTL departs from the published design, or goes beyond it

* The per-level XOR delay, the width of `SEL` and the tap spacing are this
  design's choices. The published 2-bit circuit relies on the XOR gate
  delay alone, which is what `SEL = 0` gives.
* The sample-and-count circuit is given only by its rule ("more than two
  errors in a reasonable window is a timing error"). Three things here are
  this design's own: the fixed window, the one-register sampler, and
  counting exactly two errors as radiation.
* Only flip-flop SSEs are modelled, not latch SSEs.
* Left out:
  * the microcontroller used as the evaluation vehicle (processor, bus,
    memories with ECC, GPIO);
  * the off-chip regulator loop;
  * the grouping and placement flow. Members of one group must be placed
    apart, at least 10 µm in the published layout, so that one particle
    cannot upset two of them.

## Simulating

Every module has a self-checking testbench in `tb/` that ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_mbff_group \
    rtl/mbff_pkg.sv rtl/*.sv tb/tb_mbff_group.sv
./obj_dir/Vtb_mbff_group
```

* `tb_mbff_group` plays every row of the table above. It uses an
  2-bit even-parity group with common reset, 2-bit even- and odd-parity
  groups with separate reset, and a 3-bit odd-parity group with common
  reset. Upsets are injected with `force`/`release` on the
  flip-flop outputs. It also shows the limit of masking: with the clock
  stopped, a second upset in the same group reaches `Q`, and one refresh
  edge clears both.
* `tb_mbff_digital_system` runs the default system next to a variant with
  separate resets, clock filters and a 16-cycle window. It counts upsets,
  D glitches, pre-errors, a `SEL` change, radiation and timing verdicts, a
  filtered clock glitch and a CD1 glitch, and fails if any of them never
  occurred.
* `tb_mbff_digital_system_full` runs a closed loop at default parameters
  with an 18 ns clock. Its inverter path between the two groups slows down
  window by window, as if the supply were lowered. The loop backs off on
  each timing verdict. The path settles inside the 40 ps window before the
  edge, and no output is ever wrong.
* `tb_mbff_variants` characterises 2-, 4- and 8-bit groups. It sweeps the
  data-to-clock time and prints each detection window (40/80/120 ps at
  `SEL = 0`, 50 ps more at `SEL = 1`). It also sweeps the width of a D
  transient straddling the edge, in 10 ps steps, and prints the widest one
  filtered: 52 ps, just under the 55 ps skew.

To try 4- or 8-bit groups, set `N` on `mbff_group` or `mbff_digital_system`.
