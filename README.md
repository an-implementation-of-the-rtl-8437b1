# LHCb Level-0 muon trigger on a two-stack 3D-Flow style array

This is synthesizable SystemVerilog for a Level-0 muon trigger in the layout
proposed for the LHCb muon system. The trigger takes every logical pad of the
five muon stations (mu1 to mu5) on every 25 ns beam crossing. It finds
muon candidates that start from a mu3 "seed" pad and reports, for each one:

- the mu2 and mu1 hits,
- the x and y slopes,
- the y intercept at the interaction point,
- the transverse momentum pt,
- an accept bit from a pt threshold and a y-intercept cut.

The 3D-Flow processor is a programmable chip. Its instruction set is not
part of this design. Instead, every processor position has fixed-function
logic that does the job the trigger program gives that processor.

## Structure

```
 detector words (2 x 16 bit per cell per crossing)
        |
 stack1_array  (ROWS x COLS stack1_cell, 8-neighbour mesh)
        |   east border <-> region_boundary_link <-> outer_* ports
        |
 candidate_concentrator  (round robin per row -> row FIFO -> round robin over rows)
        |
 N2 x stack2_processor  -> result[], result_valid[]
```

| File | Function |
|------|----------|
| `rtl/l0mu_pkg.sv` | Pad-grid constants and the `own_pads_t`, `cand_t` and `result_t` records |
| `rtl/pad_input_port.sv` | Joins the two 16-bit words of one crossing into 31 pad bits |
| `rtl/plane_delay.sv` | Programmable delay for each station, in whole crossings (0..MAX_DELAY) |
| `rtl/triple_coincidence.sv` | Tests one seed against its mu4 and mu5 windows |
| `rtl/link_fifo.sv` | Link receive FIFO: written on the strobe, returns FIFO FULL |
| `rtl/stack1_cell.sv` | One first-stack processor |
| `rtl/stack1_array.sv` | The first-stack mesh |
| `rtl/region_boundary_link.sv` | Joins one outer-region processor to two inner-region processors |
| `rtl/rr_arbiter.sv` | Round-robin arbiter used by the concentrator |
| `rtl/candidate_concentrator.sv` | Routes first-stack records to free second-stack processors |
| `rtl/stack2_processor.sv` | Second-stack processor: combinations, slopes, y0, pt, cuts |
| `rtl/l0mu_trigger_top.sv` | Top level |

## Pad grid and search windows

All stations use one projective index grid. A column is an x pad (the bend
plane) and a row is a y pad. A straight track from the interaction point
crosses the same (column, row) in every station. In x, the pads of mu3 to mu5
are twice as wide as those of mu1 and mu2. This design assumes the front end
sends each coarse pad to both fine columns it covers, so that every station
can be indexed on the fine grid.

Each first-stack cell owns a tile of 5 columns by 1 row. That gives it:

- 5 pads in each of mu2, mu3, mu4 and mu5;
- an 11-pad strip of mu1, columns `5c-3` to `5c+7`.

That is 31 pad bits in all. They arrive as two 16-bit words, one per 80 MHz
clock:

- word 0 is `{mu2, mu1}`;
- word 1 is `{0, mu5, mu4, mu3}`.

Search windows around a mu3 seed at column x and row y:

| Station | x | y | Pads |
|---------|---|---|------|
| mu1 | +-8 | 0 | 17 |
| mu2 | +-2 | 0 | 5 |
| mu3 | seed | seed | 1 |
| mu4 | +-1 | +-1 | 9 |
| mu5 | +-2 | +-1 | 15 |

That is 47 pads per seed.

## First stack

Every crossing, each cell does the following:

1. `pad_input_port` joins the two words.
2. `plane_delay` lines the five stations up in time. Each station has its
   own delay of 0 to 3 crossings, set by the `dly` input; `dly_ref` delays
   the crossing number.
3. The cell sends its 31 synchronised bits to all eight neighbours in one
   clock, with a strobe. At the same moment it receives theirs.
4. From its own bits and its neighbours' bits, the cell builds a window:
   21 columns of mu1, 9 of mu2, and 7 (mu4) or 9 (mu5) columns on each of
   three rows.
5. It forms five `triple_coincidence` results, one per seed column.
6. The crossing is kept if it has at least one seed (`triple_mode` = 0), or
   at least one triple coincidence (`triple_mode` = 1).

The layers of the layered stack are modelled as a queue of `LAYERS`
crossings in each cell. The cell sends one candidate record (`cand_t`) per
seed, lowest column first, and moves to the next record on `cand_ack`. If a
crossing arrives while the queue is full, it is lost and `drop` is raised.

The pad exchange is lockstep, so a cell never raises FIFO FULL towards a
neighbour. The cells of the last column send and receive their east, NE and
SE neighbour data over the region links. On the other three borders,
neighbour pads read as zero.

## Region boundary

`region_boundary_link` is wired as the document describes:

- Outer to inner: the outer processor's data, strobe and FULL go to both
  inner processors.
- Inner to outer: the two inner data words are ORed, and the two inner FULL
  flags are ORed.
- The outer FIFO is written on the strobe of inner processor 0.

The top level puts one link on each pair of east-edge rows. The outer region
itself is not built; its side of each link is on the `outer_*` ports.

## Concentrator

1. In each row, a round-robin arbiter picks one waiting cell and writes that
   cell's record into the row's `link_fifo`. A cell is acknowledged only when
   the FIFO is not full; this is the FIFO FULL handshake.
2. A second round-robin picks a non-empty row FIFO.
3. A third round-robin picks an idle second-stack processor.

At most one record moves per clock. The `backpressure` output shows when a
row FIFO is full and a cell is still waiting.

## Second stack

`stack2_processor` is a small sequential machine that handles one seed at a
time:

| State | Clocks | Work |
|-------|--------|------|
| SCAN | 5 | For each mu2 hit in the window, extrapolate the mu3-mu2 line to mu1 (fixed-point constants from the station z values, 16 fraction bits). Keep the mu1 hit closest to the extrapolation. Over all mu2 hits, keep the pair with the smallest residual. |
| CALC | 2 | Slopes from the mu1 and mu2 pad centres: `tx = (x2-x1)/(z2-z1)` and `ty` the same way, in microradians. Then `y0 = y1 - ty*z1` and the bend `dtheta = tx - x1/z1`. |
| SQRT | 24 | `r1 = sqrt(x1^2 + y1^2)`, one bit per clock. |
| DIV | 48 | `pt = KICK * r1 / (z1 * abs(dtheta))`, by restoring division, one bit per clock. |

Geometry used:

- Station z: 12150, 15500 and 16600 mm for mu1, mu2 and mu3.
- mu1 pad size: 1.0 cm x 2.0 cm (region I).
- The grid is centred on the beam.

`accept = found & y0_ok & pt_ok`. The cut values come in on `pt_min_mev`
and `y0_cut_um`. If the bend is zero, or the quotient overflows, pt
saturates at `0xFFFFFFFF`.

## Timing

- Clock: 80 MHz. One crossing is two clocks.
- Cell: the record is valid one clock after word 1. The delay stage adds one
  clock plus the programmed crossings, and the window stage one more. The
  first candidate is offered about 4 clocks after word 1.
- Concentrator: at least 2 clocks.
- Second stack: 81 clocks from acceptance to `result_valid` when a
  combination is found, and 7 when none is found.
- Unloaded total: about 90 clocks (1.1 us). The document's budget is 3.2 us.
- Throughput: 16 processors at about 82 clocks per seed give 15.6 M seeds/s.
  That covers triple mode at the quoted rates: 3.1 MHz times 2-3 triples is
  up to 9.3 M/s, or 12 M/s at 4 MHz. It does not cover seed mode: about 16 seeds at 12.4 MHz is
  about 200 M/s. Seed mode is there for testing and low rates.

## Parameters (top level)

| Parameter | Default | Origin |
|-----------|---------|--------|
| `ROWS` x `COLS` | 42 x 44 | This design's choice. 1848 cells x 25 own pads = 46,200, which covers the 45,164 logical pads. With the second stack that makes 1864 processors, against the document's estimate of about 2000 chips. |
| `N2` | 16 | From the document |
| `LAYERS` | 4 | This design's choice |
| `ROW_DEPTH` | 4 | This design's choice |
| `MAX_DELAY` | 3 | This design's choice |
| `PT_KICK_MEV` | 1200 | Assumed. The document gives no magnet kick. |

## Departures from the document and assumptions

- **Word width.** The detector input is two 16-bit words per crossing. The
  document also speaks of fetching 32-bit words; the 16-bit reading matches
  its 31-pad count.
- **Projective grid.** One projective grid for all stations, with coarse pads
  fanned out to the fine grid. The four pad-size regions are modelled only at
  the east boundary (the link module). The array is one uniform region with
  no beam hole.
- **mu1 strip.** The 11-pad mu1 strip of each cell is placed as described
  above. With a pitch of 5, some mu1 pads feed three cells, not two.
- **Layers.** The layers are a per-cell queue. Overflow drops the crossing
  and is flagged.
- **Record transport.** How records reach the second stack is not described
  in the document; the concentrator is this design's own.
- **Choice of pair.** When several mu1-mu2 pairs exist, the one with the
  smallest mu1 residual is kept.
- **pt formula.** The document says pt comes from the x slope, with the track
  assumed to start at the target. The formula, the kick value and the fixed
  point format are this design's.
- **Reset.** Asynchronous, active low. The document does not mention reset.

## Known limits

- Because the grid is projective and the mu1/mu2 y window is +-0, the y
  intercept from pad centres is zero apart from rounding. The cut only
  matters with non-ideal geometry.
- `PT_KICK_MEV` is a placeholder. Tune it for the real magnet.
- The outer detector regions, the chambers and the front end are not
  included.
- Under sustained overload, records wait in the queues. Latency then exceeds
  the 3.2 us budget, and cells drop crossings once their layer queue is full.

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The shared reference model is
`tb/l0mu_tb_pkg.sv`. To build and run one testbench with Verilator:

```
verilator --binary --timing --assert --top-module tb_l0mu_trigger_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/l0mu_pkg.sv tb/l0mu_tb_pkg.sv tb/tb_l0mu_trigger_top.sv
./obj_dir/Vtb_l0mu_trigger_top
```

Testbenches:

- `tb_l0mu_trigger_top` runs a 4 x 3 array with 4 second-stack processors
  end to end, through these phases:
  1. seed mode;
  2. triple mode;
  3. tight cuts;
  4. an overload burst;
  5. traffic on the outer links.

  It compares every result with the reference model and prints how often
  each mechanism occurred.
- `tb_l0mu_trigger_full` runs the same checks on the top level at its
  default size (42 x 44 cells, 16 processors) for a few crossings. Its
  Verilator C++ build takes well over ten minutes, and it has not been run
  to completion. The largest size simulated and checked end to end is the
  4 x 3 array with 4 second-stack processors.
- The other testbenches each test one block.
