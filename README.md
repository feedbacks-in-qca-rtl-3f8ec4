# Smith-Waterman systolic array for an intrinsically pipelined technology

In Quantum-dot Cellular Automata (QCA) and NanoMagnet Logic (NML), every wire
is a shift register. Signals move through clock zones, and each group of three
zones costs one clock cycle. The pipeline depth is set by the layout, not
chosen by the designer. A feed-forward circuit is not hurt by this. A circuit
with feedback is. If a value needs N cycles to go round a loop, the next
operand that depends on it can enter only N cycles later, so throughput falls
N-fold.

This RTL models such a circuit: a protein-database search engine built as a
linear systolic array that computes Smith-Waterman local alignment. Each
processing element (PE) stores one amino acid of the query. Subject sequences
from the database flow through the chain. Inside each PE the loops are 141
cycles long, the figure for a PE whose layout is folded into a U to shorten
its main loop. A straight layout gives 208 cycles. The RTL is written the way
such circuits are usually simulated: one register per cycle of wire delay,
with ideal logic in between. It uses three techniques to work with the long
loops:

* **Interleaving.** Up to 141 independent subjects ("lanes") share the array.
  Each gets one time slot out of every 141, so the array still accepts one
  amino acid per cycle.
* **Equal-length nested loops.** The local score and the control signal that
  travels with it go round the same loop, so they always meet again in step.
* **Synchronization loops.** Where a conventional design would add one
  register to delay a signal by one operand, this design adds a wire loop one
  full frame (141 cycles) long.

A second, small design sits beside the array in the top level. It is the
textbook form of the problem: an accumulator whose feedback takes 4 cycles,
run either stalled or with 4 interleaved sums.

## The recurrence each PE computes

PE `i` holds query amino acid `q_i`. For subject amino acid `d_j` it computes

```
H(i,j) = max( 0,
              H(i-1,j-1) + S(q_i, d_j),          diagonal
              H(i-1,j)   - gap(src(i-1,j), UP),  vertical, from the left PE
              H(i,j-1)   - gap(src(i,j-1), LEFT) horizontal, from itself )
M(i,j) = max( H(i,j), M(i-1,j), M(i,j-1) )
```

* `S` is the substitution score. Each PE's memory holds the row of scores for
  its own query amino acid: 32 entries, one per 5-bit subject code, 8-bit
  signed.
* `src` records which candidate won. It can be zero, diagonal, vertical or
  horizontal.
* `gap(src, dir)` is `GAP_EXT` when the value being extended was itself
  reached through a gap in the same direction, and `GAP_OPEN` otherwise.
  Defaults are 8 and 2. This is a simplified affine-gap rule that needs only
  the score and a 2-bit tag, not separate gap matrices.
* Ties go to diagonal, then vertical, then horizontal.
* H and M are 8 bits. They clamp at 0 and saturate at 255.
* `M` is the running maximum. At the last PE, on a subject's last amino acid,
  it is that subject's alignment score.

MAX4 takes the three candidates and zero. MAX3 takes the local score, the left
neighbour's maximum and the PE's own previous maximum. Each block compares its
inputs pairwise with three subtracters in parallel and picks the winner from
the borrow bits.

## Frames, slots and lanes: why every loop is exactly 141 cycles

Time is divided into **frames** of `LOOP_LEN` cycles (141 by default). Each
cycle of a frame is a **slot**. A slot belongs to at most one lane, and that
lane keeps the same slot in every frame. Each PE has a fixed latency, so a
lane's amino acids stay exactly `LOOP_LEN` cycles apart wherever they are in
the chain.

Each PE needs three values from the lane's previous amino acid, `d_(j-1)`:

| value        | loop                 | contents                                  |
|--------------|----------------------|-------------------------------------------|
| H(i,j-1), src | loop-1 (`u_loop1`)  | MAX4 score and its control tag, together  |
| M(i,j-1)     | loop-2 (`u_loop2`)   | MAX3 running maximum                      |
| H(i-1,j-1)   | sync loop (`u_sync`) | this PE's MAX_IN from one frame earlier   |

Each is a `wire_loop` of exactly `LOOP_LEN` registers. So a value written in
a lane's slot comes out at that lane's next slot. The loop itself stores the
state of all 141 lanes, one per register position, and no per-lane memory is
needed.

This is also why the lengths must match exactly.

* **Nested loops.** Loop-1 holds two loops nested together: the score (the
  adder's data input) and the control tag (the select of the
  gap-penalty multiplexer in front of the adder). If the tag's loop were one
  cycle shorter, each lane would pick its penalty from a neighbouring lane's
  history. Packing both into one `cell_t` makes their lengths equal by
  construction.
* **Synchronization loop.** In a one-operand-per-cycle design, H(i-1,j-1) is
  MAX_IN delayed by a single register. Here the previous operand of the same
  lane is a whole frame back, so the delay must be a frame-long wire loop. A
  single register would return the value of another lane.

When a lane's slot carries no amino acid (`valid` low: a bubble or a stall),
every loop feeds its own output back in. The lane's state therefore survives
any number of idle frames, and other lanes are unaffected. A slot with `first`
high starts a new subject: the three loop values are read as zero.

## Interleaving level and the input scheduler

`interleave_scheduler` is the array's input stage. It has one valid/ready
port per lane (`MAX_LANES` = 141). A quasi-static `level` input, from 1 to
`MAX_LANES`, sets how many lanes are active. Lane `k` of `L` owns slot
`ceil(k*LOOP_LEN/L)`. An error accumulator finds that slot with adders only,
as in line drawing. Some examples:

| LOOP_LEN | level | lane slots               | behaviour                        |
|----------|-------|--------------------------|----------------------------------|
| 141      | 1     | 0                        | no interleaving: 1 amino acid per 141 cycles |
| 141      | 3     | 0, 47, 94                | 3 subjects in parallel           |
| 208      | 3     | 0, 70, 139 (gaps 70/69/69) | the straight-layout case       |
| 141      | 141   | every slot               | one amino acid per cycle         |

In its own slot a lane is served if `lane_valid[k]` is high. `lane_ready[k]`
pulses in that same cycle, and the amino acid is registered into PE 0. If the
lane is not valid, the slot becomes a bubble. `level` is sampled at the start
of each frame. Change it only while no subject is in flight, because lanes
move to other slots.

## Configuration

Configuration words `cfg_t` = {valid, 8-bit PE index, 5-bit code, 8-bit
score} enter at `cfg_in` and move down the chain one register per PE. The
`pe_config` stage of a PE decodes words carrying its own index and writes
`score_mem[code] = score`. A word for PE `p` takes effect `p+1` cycles after it
is presented. Loading a PE takes 32 words, one per subject code. Load the
memories before streaming subjects. Memories are not reset.

## Interfaces and timing (`sw_array`, and the same ports on `qca_sw_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst` | in | clock (one cycle = three clock zones); synchronous active-high reset |
| `cfg_in` | in | configuration word (`sw_pkg::cfg_t`) |
| `level` | in | number of active lanes, 1..MAX_LANES |
| `lane_valid/first/last/aa[k]` | in | lane k offers an amino acid, with subject start and end flags |
| `lane_ready[k]` | out | lane k's amino acid is taken at the coming clock edge |
| `res_valid`, `res_lane` | out | a result slot and the lane it belongs to |
| `res_first`, `res_last` | out | flags of the amino acid this result belongs to |
| `res_score` | out | running maximum score; final on `res_last` |

A result leaves the array `N_PE*PE_LAT + 1` cycles after the cycle in which
`lane_ready` was high. There is one result per accepted amino acid, in order
within each lane.

The accumulator ports (`acc_*` on the top) work as follows. On a cycle with
`in_valid` high, `sum = in_data + (in_first ? 0 : value from 4 cycles
earlier)`, and the sum appears on `out_sum` one cycle later. Used correctly,
either one sum gets an input every 4 cycles, or 4 sums take turns every
cycle.

## Parameters

| parameter | default | where | notes |
|-----------|---------|-------|-------|
| `N_PE` | 6 | array, top | query length held in the array (up to 256) |
| `LOOP_LEN` | 141 | array, top, PE | loop length = frame length; 208 for the straight PE |
| `MAX_LANES` | 141 | array, top, scheduler | ≤ `LOOP_LEN` |
| `PE_LAT` | 1 | array, PE | forward latency of a PE; it does not affect results |
| `GAP_OPEN`, `GAP_EXT` | 8, 2 | array, PE | gap penalties |
| `LOOP`, `W` | 4, 8 | accumulator | loop length, width |

Widths are in `sw_pkg`: 8-bit scores (the datapath width of the original
design), 5-bit amino-acid codes and 12-bit signed MAX4 candidates.

## Modules

```
qca_sw_top
├── sw_array
│   ├── interleave_scheduler
│   └── sw_pe  ×N_PE
│       ├── pe_config      configuration stage, decoder
│       ├── score_mem      substitution-score row (decoder + OR read)
│       ├── max4           local score and its source tag
│       ├── max3           running maximum
│       └── wire_loop ×3   loop-1, loop-2, sync loop
└── loop_accumulator
    └── wire_loop
```

## What comes from the original design and what is this implementation's own

These come from the original design: the linear chain of identical PEs with
one query amino acid each; the split into configuration, memory and calculation
parts; MAX4 and MAX3, each built on three parallel subtracters; the 8-bit
datapath; the loop lengths of 141 (folded) and 208 (straight) cycles;
interleaving with evenly spread lanes; the two nested loops of equal length
round MAX4, with a control signal driving a multiplexer in front of an adder;
the loop-2 feedback of MAX3; the frame-long synchronization loop on MAX_IN;
and the 4-cycle accumulator.

The original description does not give the following, so this implementation
chose them:

* **Gap rule.** The reading of the multiplexer as a gap-open/gap-extend
  choice, its use in the vertical direction too, the penalty values 8 and 2,
  and the tie order. The original description also routes the MAX4 score
  into that multiplexer. Here the score goes only to the adder, and the
  multiplexer chooses between two penalty constants.
* **Memory contents.** The memory holds a row of substitution scores rather
  than a bare amino-acid code. The substitution table itself is whatever the
  host loads.
* **Encodings and sizes.** The 5-bit amino-acid code, saturation at 255, and
  6 PEs.
* **Stalling.** A valid bit with recirculating loops, rather than holding the
  input constant.
* **Interfaces.** The configuration word format and addressing, the lane
  valid/ready handshake, and the lane-number pipeline beside the chain.
* **Reset.** A synchronous reset of everything except the score memories.
* **Forward latency.** One cycle per PE. The real folded layout has a longer
  forward path, which only adds latency.

Not modelled: the three-phase clock-field wiring and the cross-wire layout
structure. Neither has a logic function; one NML clock cycle is one cycle of
`clk`. Nor is the gate-level layout (AND/OR gates, one register per clock
zone inside the logic): the logic is ideal, and registers are placed only
where they set loop lengths and latencies.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_max3`, `tb_max4`: corner cases and random vectors against integer
  arithmetic.
* `tb_score_mem`, `tb_pe_config`, `tb_wire_loop`: write/read, decode and
  forwarding, delay and hold.
* `tb_interleave_scheduler`: slot ownership at levels 1, 3, 8, 0 and 9
  (clamped), with 208-cycle frames. It checks the 0/70/139 placement, the
  208-cycle spacing per lane and bubbles on stalled lanes. The scheduler
  also carries two concurrent assertions, active with `--assert`: at most one
  lane is served per cycle, and only a lane that offers data.
* `tb_sw_pe`: one PE with 5-cycle loops and random interleaved traffic,
  against a per-lane model of the three loops.
* `tb_loop_accumulator`: stalled, interleaved, and a misuse (inputs every
  cycle for one sum) that must give a wrong total.
* `tb_sw_array` (4 PEs, 7-cycle loops) and `tb_qca_sw_top` (all defaults: 6
  PEs, 141-cycle loops, 141 lanes). Both use `sw_stream_checker`, which compares
  every result with a software Smith-Waterman (`sw_ref_pkg`), including its
  arrival cycle. The phases are: full interleaving with random stalls;
  level 1, checking a spacing of exactly `LOOP_LEN`; level 3; then
  reconfiguration with a query that saturates. The testbench fails unless
  each mechanism occurs at least once: interleaved frames, stalls, subject
  restarts, level switches, reconfiguration, gap extension, zero clamp,
  saturation, kept maxima, and each MAX4 source. The full-size run takes well
  under a second.

* `tb_workload_scan` is the throughput comparison. It uses the query T-E-L-K-D-D
  and a +5/−3 identity table, and scans fourteen subjects of 103 amino acids
  on three arrays at once:

  | array | loop | interleaving level | cycles | at 100 MHz |
  |-------|------|--------------------|--------|------------|
  | A | 208 (straight PE) | 1 | 299,936 | 3.00 ms |
  | B | 141 (U-shaped PE) | 1 | 203,322 | 2.03 ms |
  | C | 208 | 3 | 107,190 | 1.07 ms |

  The testbench checks each count exactly (subjects per lane × length × loop,
  plus the slot offset of the lane that finishes last), every final score,
  and the per-lane spacing. The subjects are one eighth of the 824 amino acids at which the
  straight design needs 24 ms and the folded one 16 ms, so the times are one
  eighth as well. It takes about half a minute.

No real protein data is used. Subjects and substitution tables are generated,
either at random (symmetric, positive on the diagonal) or from a fixed hash.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sw_pkg.sv tb/sw_ref_pkg.sv tb/tb_qca_sw_top.sv --top-module tb_qca_sw_top
./obj_dir/Vtb_qca_sw_top
```

Replace the testbench name for the others. `sw_ref_pkg.sv` is needed only by
`tb_sw_array` and `tb_qca_sw_top`.
