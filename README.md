# Emerging-technology circuits in SystemVerilog: NanoMagnet Logic and NASIC

This repository models, at clock-cycle level, the circuits of a study on
two post-CMOS technologies:

* **NanoMagnet Logic (NML).** Bits are held by the magnetisation of
  nanomagnets. An external three-phase clock moves the information from one
  clock zone to the next. Every group of three zones is therefore a register
  stage, and the whole circuit is deeply pipelined *by construction*. The main
  design is a **Smith-Waterman protein-alignment accelerator**. Its long
  internal feedback loop (208 NML cycles) is hidden by **data interleaving**:
  up to 208 independent subject sequences share the loop, one per time slot.
* **NASIC (Nanoscale Application-Specific ICs).** Nanowire crossbars are
  grouped in *nanotiles*. Each tile is a two-level NAND-NAND plane on
  dual-rail signals, driven by a four-phase dynamic control
  (Hpre, Heva, Vpre, Veva). A tile is a pipeline stage with one clock cycle
  of latency. Around this tile the repository builds the arithmetic the study
  evaluates: ripple-carry adder, array multiplier, radix-4 Booth multiplier,
  FIR filter and an area-optimised accumulator.

The two technologies do not form one system. The top level
`emerging_tech_top` places them side by side: they share clock and reset, and
each keeps its own ports.

## Timing model: what one `clk` tick means

The hardest part of reading this RTL is its time scale. It differs by family:

| family | one `clk` tick | "one cycle" of the technology |
|---|---|---|
| NML gates and adders (`nml_*`) | one clock **phase** (one zone switches) | 3 ticks; phases on `nml_ph` (one-hot, 3 bits) |
| Smith-Waterman (`sw_*`) | one **NML clock cycle** | 1 tick |
| NASIC (`nasic_*`) | one control **phase** | 4 ticks; phases on `nasic_ph` (one-hot Hpre, Heva, Vpre, Veva) |

The gate-level NML circuits model every clock zone as a register. The
register is enabled by its phase. A signal thus advances one zone per tick
and one NML cycle every three ticks. The Smith-Waterman accelerator is far
larger. It is modelled one level up: one tick per NML cycle, with each
pipeline path kept at its NML length in cycles. Its results and latencies
therefore count NML clock cycles.

NASIC tiles take their inputs at Hpre and evaluate the horizontal NANDs at
Heva. They precharge at Vpre and present the vertical NAND outputs at Veva.
A value entering a tile appears at its output one NASIC cycle later. Here the
four phases are strictly sequential. Real NASIC control may overlap Vpre with
Heva, which changes power, not the logic.

Testbenches drive the phased designs at a *boundary*. This is the falling
edge just before the first phase (`ph == 001` for NML, `ph == 0001` for
NASIC). Operands change once per technology cycle there.

## The Smith-Waterman accelerator (`sw_accelerator`)

### Algorithm
Smith-Waterman local alignment fills a matrix `H` between a *query* (here 8
amino acids, one per processing element) and a *subject* of any length:

```
H(i,j) = max(0, H(i-1,j-1) + S(q_i, s_j), H(i-1,j) - g, H(i,j-1) - g)
```

`S` is a substitution score and `g` a linear gap penalty. The answer is the
largest `H` anywhere. The accelerator is a linear systolic array. PE `i` holds
query letter `q_i`. The subject streams through the PEs, one letter per PE
step. Each PE passes on its `H` and a running maximum `M`.

### Inside a PE (`sw_pe`, `sw_pe_config`, `sw_pe_calc`)
* `sw_pe_config` decodes the configuration bus. A write with this PE's index
  and address 0..22 stores one of the PE's 23 substitution scores. Address 31
  writes the gap penalty. It also turns the control bits of the passing slot
  into `init` and `hold`. `init` marks the first letter of a subject, at the
  matrix border, where own and diagonal scores read as 0. `hold` marks an
  empty slot, whose state is kept.
* `sw_pe_calc` holds the 23-entry score memory and the gap register. Its
  datapath computes the MAX4 above and the new maximum
  `M = max(M_left, M_own, H)`. Scores are 9-bit unsigned; they clamp at 0 and
  saturate at 511. Substitution scores are 5-bit signed.
* In NML the path through a PE is **208 NML cycles** long. The path that
  feeds the PE's own result back to its input (*Loop1*) is the same length.
  `sw_pe` models this with a `LOOP_LEN`-deep line (`sw_loop_line`). Its far
  end is both the PE's output to the right neighbour and the feedback
  (`H_own`, `M_own`). The diagonal score `H(i-1,j-1)` is the left neighbour's
  score one step older. It runs through a second line of the same length, the
  *additional delay loop*. Because both loops have equal length, the three
  inputs of a cell always belong to the same subject.

The lines are circular buffers, i.e. memories with a pointer. They read 0
until they have wrapped once, which is the state after reset.

### Slots, interleaving and bubbles (`sw_interleaver`)
The loop makes each PE a rotating store of `LOOP_LEN` independent *slots*.
A subject owns one slot. Its letters must enter exactly `LOOP_LEN` cycles
apart, and in between the other slots can serve other subjects. With no
interleaving a new letter enters only every 208 cycles. With `LANES`
subjects interleaved, throughput rises by `LANES`.

The interleaver serves `LANES` input lanes. Lane `k` owns slot
`k * ceil(LOOP_LEN / LANES)`. For the default of 3 lanes in a 208-cycle loop
that is slots 0, 70 and 140, i.e. gaps of 70, 70 and 68 cycles. `lane_ready[k]`
pulses in the lane's slot. A valid token presented then is taken, and one
cycle later it enters PE 0. If the lane has nothing to send, the slot leaves
empty (a *bubble*), and every PE keeps that slot's state unchanged. A
subject may therefore pause and resume in its own slot.

A token carries `{valid, first, last, aa, id}`. When the token with `last`
leaves PE 7, `res_valid` rises with `res_id` and the maximum score
`res_max`. Latency from taking the last letter is `1 + N_PE * LOOP_LEN`
cycles (1665 at the defaults).

### Configuration
Before sending subjects, write 23 scores and a gap per PE through `cfg`
(`{we, pe, addr, data}`), i.e. 8 x 24 writes. Reset clears the score
memories to 0 and sets the gap to 4.

### Parameters
`N_PE = 8`, `LOOP_LEN = 208` and `LANES = 3` are the main configuration.
`LOOP_LEN = 141` gives the U-shaped (folded) PE, whose shorter loop raises
throughput. `LOOP_LEN = 1` behaves like a conventional CMOS PE. `LANES` may
go up to `LOOP_LEN`, filling every slot.

## NML gate-level circuits

* `nml_phase_gen` produces the one-hot three-phase enables.
* `nml_zone_reg` is one clock zone, a register enabled by its phase.
* `nml_gates` holds the NML primitives: majority voter, and AND/OR as a
  majority voter with the third input fixed at 0/1, plus the inverter.
* `nml_example_circuit` is a three-zone example. Zone 1 has an AND and a
  majority voter, zone 2 carries them, zone 3 ORs them. Output comes one NML
  cycle after the input.
* `nml_mux` (2-to-1, `WIDTH` bits) and `nml_decoder` (3-to-8) are two of
  the processing element's components at gate level. Each spreads an
  inverter/AND level and an OR or second AND level over three zones, with a
  latency of one NML cycle. The top level instantiates the multiplexer 9 bits
  wide. The layouts of these parts are not published in detail, so the
  arrangement of gates over zones is this design's own.
* `nml_full_adder` is a majority-voter full adder over six zones (two NML
  cycles): `Co = MAJ(A,B,Cin)` and `S = MAJ(~Co, MAJ(A,B,~Cin), Cin)`.
* `nml_rca` is a `NUM_RCA`-bit (default 9) pipelined ripple-carry adder. Bit
  `i` is delayed `2i` NML cycles by an input skew line. Its sum is delayed
  `2(N-1-i)` cycles by a deskew line. The adder accepts a new operand pair
  every NML cycle and answers `2*NUM_RCA` cycles later (18).

## NASIC tiles

`nasic_tile` is the generic nanotile, with parameters `N_IN`, `N_OUT` and a
truth table `TT`:

1. inputs arrive dual-rail (`p`, `n`) and are latched at Hpre;
2. there is one horizontal NAND wire per minterm of the inputs (`2^N_IN`
   wires), evaluated at Heva;
3. per output there are two vertical NAND wires: one over the minterms where
   the output is 1 (the `p` rail), one over the rest (the `n` rail),
   evaluated at Veva. That is where the output register updates.

An assertion checks that the input rails are complementary. Reset drives all
rails to logic 0 (`p = 0`, `n = 1`).
`nasic_fa_tile` is the full-adder tile and `nasic_buffer_tile` the identity
tile. Chains of buffer tiles (`nasic_delay`) form the **skew and deskew
networks**. Those networks align bits that pass through different numbers of
tiles, and they dominate the area of the circuits below.

## NASIC arithmetic

| block | default | latency (NASIC cycles) | notes |
|---|---|---|---|
| `nasic_rca` | 8 bits, skew networks on | `NBITS` | without skew networks the operands must be held `NBITS` cycles |
| `nasic_array_mult` | 5 x 5 bits, unsigned | `3N-2` | cell (row j, column i) = AND + full adder tile, works at cycle `i+2j` |
| `nasic_booth_mult` | 8 x 8 bits, signed | `2*ceil(N/2)` | radix-4: encoder/multiplexer level, then adder/subtractor level per digit |
| `nasic_fir` | 8 taps, 4-bit samples and coefficients | `3N-2 + 7*11` = 87 | array multipliers and a chain of 11-bit RCAs, with sync delays |
| `nasic_accumulator` | 6 bits, feedback latency 2 | see below | two RCAs without skew networks |

All of them take a new operand set every NASIC cycle, except the accumulator.

**Booth recoding.** Bits `(B[i+1], B[i], B[i-1])` select `vp`:
000 and 111 give 0; 001 and 010 give +A; 011 gives +2A; 100 gives -2A;
101 and 110 give -A. This is the standard radix-4 table. The datapath of each
level is written at word level, not tile by tile.

**FIR.** `y(n) = sum_k c_k * x(n-k)` with 8 coefficients. The samples pass
through buffer tiles. Each product goes through an array multiplier. The sums
ripple through a chain of RCAs, and sync delays of one RCA latency per stage
keep the products aligned with the running sum.

**Accumulator protocol.** There are no skew networks, so the ripple carries
need time. Present `a`, `b` and `ci` and keep them for `NBITS + 2` NASIC
cycles. Raise `w` in the last of them. The register row then loads
`acc + a + b + ci` and `co` flags an overflow. `init` clears the register.
Writing earlier stores an unsettled sum, and the testbench checks that it
does.

## Where this design departs from, or fills in, the study

* Gap penalty, score widths of the substitution table and configuration
  encoding are this design's own. The study gives the 9-bit score width and
  the 208/141-cycle loops.
* The interface of the accelerator is this design's own. This covers lanes
  with ready pulses, first/last flags, sequence ids and the handling of empty
  slots.
* The printed `vp` table swaps the rows for 100 and 110 relative to standard
  radix-4 Booth recoding. The standard recoding is used.
* The FIR is described both as order 7 and as order 8; 8 taps are built.
* The accumulator's feedback latency is given as 2 cycles in its diagram and
  as 6 cycles in one area comparison; 2 cycles are built.
* The array-multiplier cell is described with two AND gates; one
  (`x_i AND y_j`) is enough in the array arrangement used here.
* NASIC phases do not overlap, and NML phases are one-hot. The overlap of the
  real clocks is not modelled.
* Not built: the NML crosswire (pure routing with no logic) and the area and
  power estimators of both technologies, which are models and not circuits.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against an
independent model and ends with a `TB_RESULT checks=N failures=M` line.

* `tb_sw_accelerator` runs the accelerator at full size (8 PEs, 208 cycles, 3
  lanes). It uses random queries, six subjects and random pauses, against a
  software Smith-Waterman. It checks the 1665-cycle latency, 208-cycle letter
  spacing and the 0/70/140 slot offsets.
* `tb_sw_folded_interleave` runs the folded PE (141-cycle loop) with full
  interleaving. It uses 141 lanes, one per slot, so 141 subjects are in flight
  and a letter enters the array every cycle.
* `tb_sw_pe`, `tb_sw_pe_calc`, `tb_sw_pe_config`, `tb_sw_interleaver` and
  `tb_sw_systolic_array` test the parts, with a short loop where it helps.
* The NML and NASIC testbenches run random and corner operands through each
  circuit and check values *and* latencies.
* `tb_emerging_tech_top` runs the whole top level at its default parameters,
  all designs at once, for about 9,600 cycles. It counts each mechanism:
  interleaved subjects in flight, bubbles, subject starts, results, NML
  additions with carry, multiplexer and decoder outputs, FIR outputs, negative Booth products, and
  accumulator clears, writes and overflows. If any count stays at zero, the
  test fails.

Each testbench has a watchdog.

## Simulating

With Verilator 5 (packages first, then the testbench; the rest is found by
module name):

```
verilator --binary --timing --assert -Irtl -Itb rtl/sw_pkg.sv rtl/nasic_pkg.sv \
    tb/tb_emerging_tech_top.sv --top-module tb_emerging_tech_top -o sim
./obj_dir/sim
```

The simulator has two states, so every register is reset. The top-level
testbench compiles in about two minutes, most of it spent on the FIR's
thousands of buffer tiles, and runs in under a second.
