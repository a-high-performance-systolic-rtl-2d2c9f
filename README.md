# Systolic edit-distance co-processor for spelling correction

A spelling corrector has to find dictionary words that are "close" to a
mistyped word. Most typing errors are one wrong letter, one missing letter,
one extra letter or two swapped neighbours, so closeness is measured by the
edit distance: the cheapest sequence of substitutions, deletions, insertions
and transpositions that turns a dictionary word into the typed word. Computing
it is a dynamic-programming recurrence over an n x m grid, and doing so
against a dictionary of a few hundred thousand words is slow on a processor.

This RTL is a co-processor that holds one erroneous word still and streams
the dictionary past it. A two-dimensional systolic array evaluates one cell
of the recurrence per processor, all processors at once, and starts a new
dictionary word every systolic step, so once the pipe is full it delivers one
edit distance per step. Because the words worth proposing as corrections are
within two characters of the typed word's length, only the five centre
diagonals of a 15 x 15 array are built: 69 processors.

## The recurrence

Let the reference (dictionary word) be x_1..x_m and the erroneous word
y_1..y_n. With configurable costs:

    D(i,j) = min( D(i-1,j-1) + sub(x_i, y_j),
                  D(i-1,j)   + del(x_i),
                  D(i,j-1)   + ins(y_j),
                  D(i-2,j-2) + trans      if x_i = y_(j-1) and x_(i-1) = y_j )

with D(0,0) = 0, D(0,j) = ins(y_1)+..+ins(y_j), D(i,0) = i * del. All
arithmetic is 8 bits and saturates at 255, which also serves as "infinity".
Equal characters are recognised by a substitution cost of 0, so the cost
table must hold 0 exactly on matching characters.

Row i of the array belongs to reference character x_i, column j to
character y_j of the erroneous word. Processor P(i,j) exists only for
|i-j| <= 2 (15 + 2x14 + 2x13 = 69 processors); neighbours outside the band
read as infinity. The distance computed is therefore the band-limited one,
which equals the true distance whenever an optimal edit path stays within two
characters of the diagonal (always the case for one or two ordinary typing
errors).

## How a comparison moves through the array

This is the part that needs care when reading or changing the RTL.

**Wavefront.** A reference whose computation starts at P(1,1) in step t is
at P(i,j) in step t+i+j-2. All processors on one anti-diagonal work on the
same reference; neighbouring anti-diagonals work on the previous and next
references. So in every step each processor works on a different reference
from its up and left neighbours' previous step:

| value needed by P(i,j) for reference k | produced by | when | held in |
|---|---|---|---|
| D(i-1,j), D(i,j-1) | P(i-1,j), P(i,j-1) | previous step | their result register |
| D(i-1,j-1) | P(i-1,j-1) | two steps ago | its *previous* result register |
| D(i-2,j-2) (transposition) | P(i-2,j-2) | four steps ago | P(i-1,j-1)'s DIAG register, delayed two more steps inside P(i,j) |
| x_i = y_(j-1), x_(i-1) = y_j | zero-cost flags of P(i,j-1), P(i-1,j) | previous step | their current cost register |

Each processor therefore publishes its result, its previous result, its DIAG
register and a zero-cost flag, and latches all four kinds of neighbour
values with one `latch` command at the start of each step.

**Costs one step ahead.** Processors never see characters. The
*reference data array* (`ref_data_array`) holds them: row i is a shift
register that advances once per step and is loaded with character i of the
next reference, so position p of row i holds the character of the reference
loaded p steps ago, and the register for column j is position i+j-2. All
processors of column j compare against the same y_j, so column j has a single
cost table (`cost_memory`), indexed by the reference character and holding
{del(x), sub(x, y_j)}. A step lasts several clocks, so the up-to-five
processors of a column read the table one after the other over the column
broadcast bus, each into a "next cost" register. The costs read during step t
are used in step t+1, so the reference data array runs one step ahead of the
computation array.

**Where the answer comes out, and padding.** The distance of a reference of
length m is D(m,n), which would appear at a processor and a time that depend
on m. To give every reference the same output point, references are padded
with character code 0 up to 15 characters, and the pad character is given
deletion cost 0 and a substitution cost at least as large as every insertion
cost. Then D(r,n) = D(m,n) for every row r >= m, and the answer is always
read at P(r,n) with r = min(n+2, 15). That processor is marked by a flag in
its constant registers and is the only one that drives its column bus when
the `drive_out` command comes.

**Latency and rate.** With the standard programs, the distance of the
reference loaded at step s appears on `dout_o` during step s + n + r
(r = min(n+2,15)): r+n-1 steps of wavefront, one step for the early cost
fetch and one step to output. One distance comes out per step, i.e. every
6 clocks (no transpositions) or 7 clocks (with transpositions).

## The processor

`pe` is the elementary processor. It has:

- an I/O register file: UP, LEFT, DIAG, a two-stage DIAG2, the zero-cost
  flags of the up and left neighbours, the cost word in use and the next one;
- a constant register file loaded from the column bus: insertion cost,
  transposition cost, three boundary values used only by row-1 and column-1
  processors (D(0,j), D(i,0) and the diagonal boundary), and the output flag;
- a pipelined saturating adder (`sat_adder`, result registered), a minimizer
  (`minimizer`) and an accumulator that loads from either, and whose value can
  be driven onto the column bus.

It has no sequencer of its own: every action is a micro-command.

## Instructions and the systolic step

The host drives `instr_i` with one 16-bit instruction per clock;
`ucode_decoder` turns it into one-hot micro-commands, registered, so each
instruction acts one clock after it is presented. A step instruction is a
horizontal word whose fields combine freely:

| bits | field | action |
|---|---|---|
| 15 | latch | processors load neighbour values; cost <= next cost |
| 14 | ref_shift | reference data array advances and samples `ref_i` |
| 13 | drive_out | flagged processor drives its accumulator; appears on `dout_o` |
| 12 | write_res | result <= accumulator, previous result <= result |
| 11:9 | add_sel | 1: DIAG+sub, 2: UP+del, 3: LEFT+ins, 4: DIAG2+trans |
| 8:7 | acc_op | 1: load adder, 2: min with adder, 3: min only if transposition |
| 6 | lookup | every column memory is read for the processor in `slot` |
| 5:3 | slot | row slot s = i-j+2 (0..4) |
| 2:0 | cfg_op | must be 0 in a step instruction |

`spell_pkg::step_instr(trans, c)` gives the standard programs:

| clock | instruction |
|---|---|
| 0 | latch, ref_shift, drive_out |
| 1 | add DIAG+sub; lookup slot 0 |
| 2 | add UP+del, acc load; lookup slot 1 |
| 3 | add LEFT+ins, acc min; lookup slot 2 |
| 4 | (trans: add DIAG2+trans) acc min; lookup slot 3 |
| 5 | no trans: write_res; trans: acc min-if-transposition; lookup slot 4 |
| 6 | trans only: write_res |

The step length is set by the five memory reads of a column over its single
bus plus the output slot. The instruction stream can be changed to build
other variants of the string comparison (different order, no transposition)
without changing the hardware.

## Configuration and test readout

`config_shift_reg` is a 126-bit serial register: a 6-bit address field on
top (bits 125:120, shifted in first) and one 8-bit word per column (column j
at bits 8(j-1)+7 .. 8(j-1)). The host shifts a frame in with `CFG_SHIFT`
(cfg_op 1, one bit per instruction, `cfg_si_i` sampled when it acts) and then:

- `CFG_MEM_WR` (2): every column memory writes its word at the frame's address.
  64 frames fill the tables.
- `CFG_CTE_WR` (3, slot in 5:3, register in 11:9): the processor of that slot
  in every column loads its word into the given constant register
  (0 ins, 1 trans, 2 D(0,j), 3 D(i,0), 4 diagonal boundary, 5 flags).
  30 frames set all processors.
- `CFG_CAPTURE` (4, slot in 5:3): the accumulators of that slot are copied
  into the frame, which is then shifted out on `cfg_so_o`, most significant
  bit first, for test.

All transfers go over the column broadcast buses (`column_bus`), which carry
one of memory data, a configuration word or one processor's accumulator in
any clock; assertions check that only one source is active.

Loading for a new erroneous word y of length n: memory entry x of column j =
{del(x), sub(x, y_j)} (entry 0 = padding: del 0, sub 15; columns beyond n
can hold anything), ins(y_j) in every processor of column j, D(0,j) and the
diagonal boundary in the row-1 processors, D(i,0) and the diagonal boundary
in the column-1 processors, and the flag in P(min(n+2,15), n).
`tb/tb_spell_chip.sv` contains a complete loader.

## Top-level interface (`spell_chip`)

| port | dir | width | meaning |
|---|---|---|---|
| clk_i, rst_ni | in | 1 | clock, asynchronous active-low reset |
| instr_i | in | 16 | instruction, one per clock |
| ref_i | in | 15 x 6 | next reference, character k on ref_i[k-1], padded with 0 |
| cfg_si_i / cfg_so_o | in / out | 1 | configuration serial in / out |
| dout_o, dout_valid_o | out | 8, 1 | edit distance and its strobe |

Timing: an instruction presented before clock edge e is decoded at e and acts
at e+1. `ref_i` and `cfg_si_i` are sampled at the edge where their
`ref_shift` or `CFG_SHIFT` acts, so hold `ref_i` from the clock-0 instruction
of a step until the next one. `dout_valid_o` is high for one clock per step,
right after the `drive_out` edge.

Parameters: `N` = 15 (longest word; size of the median diagonal), `CHAR_W` = 6.
The band half-width (2), the 8-bit distance width, the 4-bit costs and the
bus width are constants in `spell_pkg`. The design has 8434 flip-flop bits
and 15 memories of 64 x 8 bits.

## Files

- `rtl/spell_pkg.sv`: widths, types, instruction encoding, standard programs
- `rtl/spell_chip.sv`: top
- `rtl/systolic_array.sv`, `rtl/pe.sv`, `rtl/sat_adder.sv`, `rtl/minimizer.sv`: computation array
- `rtl/ref_data_array.sv`, `rtl/cost_memory.sv`, `rtl/column_bus.sv`: reference side and buses
- `rtl/config_shift_reg.sv`, `rtl/ucode_decoder.sv`: configuration and control
- `tb/spell_model_pkg.sv`: independent software model (band-limited and full
  distance, random costs and words)
- `tb/tb_<module>.sv`: one self-checking testbench per module
- `tb/tb_dictionary.sv`: the dictionary workload (200,000 references)

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test:

    verilator --binary --timing --assert -y rtl -y tb \
      rtl/spell_pkg.sv tb/spell_model_pkg.sv tb/tb_spell_chip.sv \
      --top-module tb_spell_chip -o sim
    ./obj_dir/sim

Any other testbench builds the same way with its own `tb_<module>.sv`.

`tb_spell_chip` runs the chip at its default size. It configures it in turn
for five erroneous words (lengths 8, 8, 15, 2 and 13; unit and random costs), streams 40
references per word, each made from the word by one random substitution,
deletion, insertion or transposition (or none), runs both step programs, and
compares every output with the model. It also checks the latency, one output
per step, the agreement of the band-limited model with the unrestricted
distance, and reads all accumulators back through the capture path. It counts
how often a transposition shortened a distance and how often padding was
used, and fails if either never happened. `tb_systolic_array` checks every
processor's accumulator after every step with the testbench standing in for
the memories. `tb_dictionary` streams a 200,000-word dictionary (random words
of length 6..10 and one-edit copies of an 8-letter word) through the chip,
checks every distance and prints the run time: 1,399,993 clocks between the
first and the last distance, 56 ms at 25 MHz. It takes a few seconds.

## How far to trust it, and where it departs from the original chip

Taken from the chip's description: the 15-character, five-diagonal, 69-processor
truncated array; one comparison started per step; the processor made of an
I/O register file, constant registers, pipelined adder and minimizer and an
accumulator that can drive the bus; the split into a computation array and a
reference data array running one step ahead; one cost table per column shared
over a broadcast bus, read once per processor per step; a configuration shift
register for initialisation and test; a common decoder fed with instructions
from outside; micro-programmed processors; 8-bit arithmetic.

This design's own choices, where the description stops:

- the instruction encoding, the register set inside the processor and the
  step programs. The original step with transpositions takes 12 clocks
  (480 ns at 25 MHz); the program here takes 7 clocks, 6 without
  transpositions. At 25 MHz that is 3.6 million distances per second, and a
  200,000-word dictionary takes 56 ms (the original: 96 ms);
- the transposition term (the usual restricted Damerau form) and the
  zero-cost-flag test for equal characters; no transposition is taken on the
  two outer diagonals;
- the memory word also carries the reference character's deletion cost, so
  deletion costs may depend on the character; the boundary D(i,0) assumes one
  deletion cost for all characters;
- insertion and deletion are paired with the grid directions the usual way
  (moving down a row consumes x_i); with equal costs either pairing gives the
  same distances;
- fixed output point with padding, and the result-flag register;
- characters are 6 bits, costs 4 bits; the reference is loaded as a parallel
  15-character word; memory reads are asynchronous;
- the rectangular layout of the original (diagonals laid horizontally, with
  dummy processors in the corners used only during initialisation) is not
  reproduced: the RTL indexes processors by (i, j) and has no dummy
  processors. Full-custom cells, pads and the layout generator are outside
  the RTL.

The smaller 3 x 12 processor version mentioned for fabrication tests would
need a band half-width of 1; the band is a package constant here and only the
five-diagonal configuration has been simulated.
