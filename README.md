# Fairisle 4x4 ATM switch fabric, "cleaned" timing

This is synthesizable SystemVerilog for the switch fabric of the Cambridge
Fairisle ATM switch: four input links, four output links, one byte per link
per clock. The fabric takes fixed-size cells from four input port controllers.
It arbitrates between cells that want the same output and strips each cell's
routing byte. It then switches the winning cells' bytes to their outputs and
carries the output controllers' acknowledgments back to the senders.

The version built here is the *cleaned* fabric. It is a redesign of the
original fabric that makes the timing rules for the surrounding port
controllers few and fixed, so the fabric is easier to verify formally:

- the headers come at a known, minimum distance after the frame start, never
  together with it;
- extra delay registers on the control and data paths into the dataswitch
  make sure the last byte of a cell is not lost;
- the dataswitch reads both bits of a grant in the same cycle.

The performance and function of the switch are unchanged.

## Frames and the timing contract

Everything in the fabric is timed from two events in each frame:

- **t_s**, the frame start: `fs` is high for one cycle.
- **t_h**, the header cycle: every input port controller that has a cell puts
  its one-byte routing tag on `din` in this cycle. All tags arrive in the same
  cycle. The cell's data bytes follow on the next cycles, one per clock.

The port controllers must keep to these rules:

| rule | meaning |
|---|---|
| t_h >= t_s + 5 | headers never come in the frame-start cycle or the four cycles after it |
| next t_s >= t_h + 6 | the cell has finished before the next frame starts |
| next t_s >= t_s + 11 | shortest frame |
| the last 5 cycles of a frame carry no data | those bytes would only reach the outputs after the next frame start |

In the standard frame, a frame start comes every 64 cycles. The tags arrive
at t_s+5 and are followed by 52 cell bytes. The rest of the frame is idle.
The fabric itself does not count frame lengths or cell lengths, so any
schedule that keeps to the rules works.

The fabric then guarantees the following for every input i and output j:

| cycles | `dout[j]` | `aout[i]` |
|---|---|---|
| t_s+1 .. t_h+2 | 0 | 0 |
| t_h+3 .. t_h+5 | 0 (the header is stripped) | `ain[j]` if input i won output j, else 0 |
| t_h+6 .. next t_s | `din[i]` from 5 cycles earlier, if input i won output j, else 0 | as above |

The data latency is exactly 5 cycles. The first byte after the header (t_h+1)
appears at t_h+6. The byte sent in the last cycle before the next frame start
appears in the frame-start cycle itself. The acknowledgment is
combinational, with no register between `ain` and `aout`. The output
controller's answer therefore reaches the sender in the same cycle. An input
whose cell lost arbitration, or that sent no cell, gets 0 (a negative
acknowledgment) and must try again in a later frame.

## Routing tag

The first byte of every cell:

| bit | field | use |
|---|---|---|
| 0 | active | a cell is present on this link |
| 1 | prio | high-priority cell |
| 3:2 | route | requested output port |
| 7:4 | spare | ignored by the fabric |

The tag carries an active bit, a priority bit and the route. The bit
positions are this design's choice. To use a different layout, change
`fairisle_pkg::tag_t`. The reference model in `tb/fairisle_spec.sv` decodes
the tag separately and must then be changed to match.

## Structure

```
fairisle_fabric
├── fairisle_arbitration         arbitration unit
│   ├── fairisle_timing          finds the header cycle
│   ├── fairisle_decoder         tags -> request matrices
│   ├── fairisle_priority_filter high priority first
│   └── fairisle_arbiter x4      round-robin, one per output
├── fairisle_ack                 acknowledgment path
└── fairisle_dataswitch          data delay and output multiplexers
```

`fairisle_pkg` holds the sizes, the byte and port-number types and the tag
struct.

### Timing unit: finding the header cycle

The frame start goes through a 5-stage shift register. When the delayed pulse
comes out at t_s+5, a header window opens. The first cycle in the window in
which any input shows its active bit is taken as t_h. The window then closes
until the next frame start, so data bytes that happen to have bit 0 set do not
trigger anything. A frame start also closes the window, and no header can be
taken in a frame-start cycle. The result, `route_enable`, is registered and
is high for one cycle at t_h+1.

### Arbitration

Arbitration works in two stages.

1. **Decoder.** In every cycle it registers each input's tag as two 4x4
   request matrices, high and low priority, indexed [output][input].
2. **Priority filter.** For each output, it passes on only the high-priority
   requests if there are any, and otherwise the low-priority ones.

Each output's **arbiter** samples its filtered request vector when
`route_enable` is high. It searches round-robin, starting at the input after
the one it granted last. It registers the winner's number as a 2-bit `grant`
and clears its `odis` (output disable). With no request, the output stays
disabled. A frame start sets `odis` again from the next cycle. Grants are
therefore valid at t_h+2, two cycles after the headers. The round-robin
pointer moves only when a grant is made. After reset, input 0 has the first
turn.

### Acknowledgment path

`fairisle_ack` keeps a registered copy of the arbiters' grants and disables.
It is one cycle behind them, which puts the start of acknowledgments at t_h+3.
A frame start clears the copy directly, so acknowledgments stop at t_s+1.
`aout[grant[j]] = ain[j]` for every enabled output j. All other inputs get 0.

### Dataswitch: lining up control with data

This is the part that needs the most care, and the reason the cleaned design
added registers on both paths into the dataswitch.

- **Data path.** Each input byte goes through 4 registers. A registered 4:1
  multiplexer per output then picks the granted input. That is 5 cycles in
  all.
- **Control path.** The grants and disables, valid at t_h+2, go through 3
  registers. They therefore steer the multiplexer from t_h+5 onwards, which
  puts the first selected byte on `dout` at t_h+6. That byte is `din` from
  t_h+1, the first byte after the header. The header, which would have come
  out at t_h+5, meets a disabled output and is stripped.
- **Frame start.** The frame start has a shorter path. It masks the
  multiplexer in the frame-start cycle and sets the whole control delay line
  to "disabled". The byte switched in the frame-start cycle still goes out,
  and every output is 0 from t_s+1. After that, the arbiters' own disable
  reaches the multiplexer through the delay line.

Both bits of a grant are registered together and sampled in the same cycle.
If you change `DATA_DELAY`, the control delay (`DATA_DELAY-2`) and data delay
(`DATA_DELAY-1`) follow it.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `PORTS` | 4 | ports; the tag's 2-bit route limits the fabric to 4 |
| `WIDTH` | 8 | link width in bits; the tag is read from bits 7:0 |
| `DATA_DELAY` | 5 | `din` to `dout` latency; at least 3 (the control delay follows it, so header stripping holds for any value) |
| `FS_DELAY` | 5 | frame start to the earliest header; at least 1 |

All four parameters have the values of the published cleaned fabric.
`tb_fairisle_fabric`, `tb_fairisle_properties` and `tb_fairisle_equiv` run the
fabric at these defaults. Reset (`rst`) is synchronous and active high.
During reset all outputs are 0.

## Where this RTL makes its own choices

The block structure, the cycle timing in the tables above, the two-stage
priority/round-robin arbitration and the combinational acknowledgment follow
the published cleaned fabric. The following are this design's choices:

- The bit positions in the routing tag.
- The register placement inside each block: the registered decoder, the
  registered `route_enable`, the acknowledgment unit's copy register and the
  split of the 5-cycle delay into 4 data registers and 3 control registers.
- Blanking between t_s+1 and t_s+4. The switching properties only require
  zero outputs from t_s+5. The 12-state behavioural specification of the
  fabric, however, produces 0 from t_s+1. The RTL follows the specification,
  using the frame-start flush in the dataswitch.
- How a too-early header is handled. Active bits before t_s+5 are ignored.
  The published description only states that headers must not come then.
- The cleaned arbiters disable outputs one cycle later than the original
  ones. Here that timing comes from the dataswitch's control delay, not from
  the arbiters.

The following are not part of this design:

- The input and output port controllers. Only their interface and timing are
  defined here.
- A 16x16 fabric built from eight 4x4 fabrics, which this fabric is meant to
  serve as a building block for.

## Testbenches

Every testbench checks its block against values computed independently and
ends with `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_fairisle_timing` | header-cycle detection over random frames; early active bits are ignored |
| `tb_fairisle_decoder` | request matrices and active bits against the tag layout |
| `tb_fairisle_priority_filter` | high-over-low selection |
| `tb_fairisle_arbiter` | round-robin order, disable/grant timing, holding between frames |
| `tb_fairisle_ack` | acknowledgment routing, negative acks, the frame-start clear |
| `tb_fairisle_dataswitch` | 5-cycle latency, selection, disable and frame-start flush |
| `tb_fairisle_arbitration` | grants of the whole arbitration unit, frame by frame |
| `tb_fairisle_fabric` | end to end, cycle by cycle (see below) |
| `tb_fairisle_properties` | the four switching properties under the 64-state frame model |
| `tb_fairisle_equiv` | cycle-by-cycle comparison with a 12-state behavioural specification |

`tb_fairisle_fabric` runs 40 standard 64-cycle frames (header at t_s+5, 52
cell bytes), then 360 frames with header delays of 5 to 12 cycles and lengths
down to 11 cycles. It checks every output in every cycle against a reference
arbiter. It counts the fabric's mechanisms and fails if any of them never
happened:

- contention for an output;
- a priority override;
- a round-robin rotation;
- a negative acknowledgment;
- an output with no cell;
- a late header;
- a shortest frame;
- an acknowledgment passed back.

Three behavioural models in `tb/` support these tests. They are not
synthesizable.

- **`fairisle_env`** is the port controllers' frame timing as a 64-state
  machine. State 1 gives the first frame start. States 2 to 5 are the
  blocked cycles, and state 6 is the header window, where it may wait.
  States 7 to 58 carry the cell bytes, states 59 to 63 are idle, and state 64
  is the next frame start, after which the machine goes back to state 2.
  Without waiting, its frames are 63 cycles long.
- **`fairisle_spec`** is the fabric's behaviour as a 12-state machine:
  - S1 waits for a frame start;
  - S2 to S5 wait out the blocked cycles;
  - S6 waits for the headers and arbitrates;
  - S7 and S8 are the switching delay;
  - S9 to S11 pass acknowledgments;
  - S12 passes acknowledgments and data until the next frame start.

  It has no sub-blocks, so agreement with it is a check on the RTL's
  structure.
- **`tb_fairisle_properties`** uses a five-stage input delay line, as in a
  property-checking setup. It checks, for every input/output pair:
  - P1: in states 6 to 11, `dout` is 0;
  - P2: in states 2 to 8, `aout` is 0;
  - P3: in states 12 to 63, if input i alone has priority and routes to j,
    `dout[j]` is `din[i]` from 5 cycles earlier;
  - P4: in states 9 to 63, under the same condition, `aout[i]` is `ain[j]`.

These are simulations with random stimulus, not proofs.

## Simulating

Run from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/fairisle_pkg.sv \
    tb/tb_fairisle_fabric.sv --top-module tb_fairisle_fabric -o sim
./obj_dir/sim
```

To run another test, replace `tb_fairisle_fabric` with its name. Each test
runs in well under a second. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/fairisle_pkg.sv rtl/fairisle_fabric.sv`.
Lint reports only that some package constants are unused in some files.

The RTL has a few assertions, which `--assert` enables:

- the timing unit never takes a header in a frame-start cycle;
- an arbiter's grant changes only when it arbitrates;
- two enabled outputs never grant the same input.
