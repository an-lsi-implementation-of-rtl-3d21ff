# GAA: a genetic algorithm accelerator with on-the-fly crossover selection

This is synthesizable SystemVerilog for the Genetic Algorithm Accelerator (GAA).
The GAA is a chip that runs a complete generation-based genetic algorithm (GA) in
hardware. The only thing it leaves outside is the fitness function.

A GA has to be given a crossover operator. Two-point crossover keeps good
building blocks of the parents together. Uniform crossover explores more widely.
Neither is best for every problem, or even for every pair of parents. The GAA does
not fix the operator in advance. It chooses one **for each pair of parents**, from
how "elite" the parents and their ancestors were:

* Parents from a line of good individuals get two-point crossover, which preserves
  their schemata.
* Other parents get uniform crossover, which explores.

Besides this choice, the algorithm is a standard GA: roulette-wheel selection, the
elitist strategy, bit mutation, 64-bit chromosomes and 16-bit fitness values
(larger is better). All GA parameters are programmable (see the register map).

| parameter | range |
|---|---|
| population | 64 or 128 |
| generations | 512, 1024, 2048, 4096 |
| crossover | two-point, uniform, adaptive |
| crossover rate | 0/256 .. 255/256 |
| mutation rate (per bit) | 0/4096 .. 255/4096 |
| elite threshold T_cross | 0.0 .. 4.0 |
| elite decision factor alpha | 0.25 or 0.5 |
| elite influence factor beta | any: it is built into a look-up table the host writes |

## The system around the chip

```
        host PC ── bus, GO, DONE ──┐
                                   │
   System Memory ─ 15-bit addr ─ GAA chip ── 16-bit handshakes ── Fitness Evaluation
   32K x 16 SRAM   16-bit data                                      Module (FEM)
```

* **System Memory (SM)** is an external 32K x 16 SRAM. It holds two population areas
  (current and next generation) and the 16K-word elite-degree table. The host fills
  it through the chip before starting: the initial chromosomes and the table.
* **Fitness Evaluation Module (FEM)** is problem-specific logic, for example an
  FPGA or the host CPU. It receives chromosome pairs and returns their fitness values.
  The FEM works while the chip prepares the next pair, so a FEM that answers within
  about 130 cycles costs no time at all.
* **The host** programs the parameters, raises GO, waits for DONE and reads back the
  best individual.

Neither the SRAM nor a FEM is part of the RTL. The testbenches provide
behavioural models of both: `tb/sram_32kx16.sv` and `tb/fem_model.sv`.

## The generation loop

The Control Unit (`gaa_cu`) runs these phases. Only one unit at a time uses the
single-port System Memory.

1. **Initial evaluation.** The CMU sends the host-loaded population to the FEM
   pair by pair, without crossover or mutation. It stores the fitness values and
   a zero family word for each individual.
2. **Statistics.** The AFCU (`gaa_afcu`) reads all fitness values once. It computes:
   * the sum, the maximum and the slot of the best individual;
   * `ave = sum / pop`, a shift;
   * the elite threshold `thr = ave + alpha*(max - ave)`, with shifts for alpha =
     1/4 or 1/2. An individual is an *elite* of its generation if its fitness is
     at least `thr`.
3. **Selection.** The SU (`gaa_su`) fills the other population area. Slot 0 gets the
   best individual; this is the elitist strategy. Slot 0 is never mated or mutated,
   so the best individual ever found always survives. Slots 1..pop-1 get roulette-wheel
   picks.
4. **Crossover, mutation and evaluation.** The CMU (`gaa_cmu`) mates
   `(pop x p_cross/256)/2` pairs: slots (1,2), (3,4), and so on. Every slot is an
   independent random pick, so neighbouring slots form random pairs. The CMU
   mutates each child, passes the children to the FEM and writes them back.
   Unmated slots keep their code and their fitness.
5. The two areas swap roles and the loop returns to step 2. After the programmed
   number of generations, one last statistics pass leaves the best fitness and the
   best individual's address in registers, and DONE rises.

## Elite degree and the family tree (the adaptive part)

For an individual x, let Anc(x, j) be its ancestors j generations back and
Elite(x, j) those ancestors that were elites in their own generation. With an
influence factor beta (0 < beta <= 1) and a depth of four generations:

```
E_deg(x)     = sum_{j=1..4} |Elite(x,j)| beta^j  /  sum_{j=1..4} |Anc(x,j)| beta^j
E_deg2(a, b) = E_deg(a) + E_deg(b) + E1(a) + E1(b)       (E1 = 1 if elite now)
operator     = two-point if E_deg2 >= T_cross, else uniform
```

The chip never computes the fraction. Each individual carries **elite counts**
`c_j = |Elite(x, j)|` in 14 bits:

| field | counts | width | bits |
|---|---|---|---|
| c1 | parents | 2 | [1:0] |
| c2 | grandparents | 3 | [4:2] |
| c3 | 8 great-grandparents | 4 | [8:5] |
| c4 | 16 ancestors | 5 | [13:9] |

These 14 bits are the address of a 16K-entry table in the System Memory. The
host precomputes the table for its chosen beta. Each entry is E_deg x 4096, so
1.0 = 4096. T_cross is on the same scale, 0..16384 for 0.0..4.0.
The testbenches build the table from the formula above with beta = 0.5
(`tb/gaa_host.svh`).

The family information is 15 bits, as in the document's Table 1. It is kept
in the slot's sixth memory word, whose bit 15 is always zero, and it comes in
two forms:

| bits | own form | copy form |
|---|---|---|
| [13:0] | this slot's own counts | counts of the parent it was copied from |
| [14] | zero | that parent's elite flag |

No bit marks the form; the slot number does. In a population that has been
through crossover, slots 1 .. 2 x npairs hold mated children (own form) and
every other slot holds an unmated copy (copy form). npairs is fixed for a run
by the crossover rate. The initial population's family words are all zero,
which reads the same in either form.

The copy form exists because of an ordering problem. An individual's elite flag is
known only after its whole generation has been evaluated. Its counts are needed
when its children are made, one generation later. The units handle it like this:

* **Selection** writes every slot in copy form: the parent's own counts plus the
  parent's elite flag (`fitness >= thr`). That is exactly what the table look-up
  and the E1 terms need when the slot is mated.
* **A mated child's** own counts come from its two parents' copy-form words:
  `c1 = E1a + E1b`, `c_j = c_{j-1}(a) + c_{j-1}(b)`. The children are written in
  own form.
* **An unmated copy** has one parent instead of two. It counts that parent
  twice, so the denominator of E_deg stays `sum 2^j beta^j` and one table serves
  every individual. Its own counts are therefore `{2*E1, 2*c1, 2*c2, 2*c3}` of the
  parent. `gaa_pkg::own_counts` derives them when the slot is next selected;
  the Selection Unit gets npairs from the Control Unit to know the form.

Individuals of the first generations have fewer than four generations of
ancestors. Their missing ancestors count as non-elite.

## Roulette selection without a divider

Each pick draws `r` uniformly from `[0, sum)`, then walks the population:

* if `r < f_i`, slot i is picked;
* otherwise `r = r - f_i` and the walk moves on.

Slot i is thus picked with probability `f_i / sum`: the expected number of copies
is `f_i / ave`. Only subtraction and comparison are needed. The draw masks the
24-bit random number to the bit length of `sum` and tries again while `r >= sum`,
which takes fewer than two tries on average. If all fitness values are zero, a
uniformly random slot is taken.

A pick costs one cycle per draw, 2 cycles per slot walked, and 12 cycles to copy
the six words (read/write alternately). For a population of 128 this is about
17,500 cycles per generation, the largest share of the run time (see below).

## The CMU schedule: one pair every 149 cycles

The CMU handles a pair in a fixed schedule, so that with a fast FEM a new pair
reaches the FEM every 149 clock cycles:

| cycles | memory port | datapath |
|---|---|---|
| 0-11 | read 2 family words, 2 table entries, 8 code words | random mask shifts in |
| 12 | (last word arrives) | choose operator, crossover |
| 13-140 | free: write the children's family words and the previous pair's fitness | mutation, 1 bit per cycle |
| 141 | write code word 0 | hand the pair to the FEM interface |
| 142-148 | write code words 1-7 | |

Details of the datapath:

* **Two-point crossover** exchanges bits `[lo, hi)` between two random 6-bit cut
  points.
* **Uniform crossover** exchanges the bits where a 64-bit random mask is one.
* **Mutation** rotates the 128 bits of both children past a one-bit window. Each
  bit flips when a 12-bit random number is below `p_mut`.

The fitness of pair k is written during the mutation window of pair k+1. Before
handing over pair k+1 the CMU waits, if it must, until pair k's fitness has been
stored. The waiting cycles are counted by the `ev_stall` pulse. With the
testbenches. FEM model, a FEM delay of up to about 130 cycles after the eighth
word causes no wait.

The random number generator (`gaa_rng`) is a 24-cell hybrid rule-90/rule-150
cellular automaton with null boundaries. Its rule vector is `24'h884DC5`, which
gives the full period 2^24 - 1. It is seeded at GO; a zero seed is replaced
by 1. It runs every cycle, and each unit takes the bits it needs.

## Interfaces

**Host bus** (`gaa_pci`):

* one access per cycle;
* `pc_re` returns data on `pc_rdata` one cycle later;
* `pc_addr[15] = 1` selects a register, `0` selects System Memory word
  `pc_addr[14:0]`;
* while the GA runs, memory accesses and register writes are ignored;
* a rising edge on `go` starts a run; `done` stays high until the next start.

| reg | name | contents |
|---|---|---|
| 0 | MODE | [0] pop 128, [2:1] crossover (0 two-point, 1 uniform, 2 adaptive), [4:3] generations 512<<n, [5] alpha = 0.5 |
| 1 | P_CROSS | crossover rate /256 |
| 2 | P_MUT | mutation rate per bit /4096 |
| 3 | T_CROSS | elite threshold, 1.0 = 4096 (values above 16384 are clamped) |
| 4, 5 | SEED | 24-bit seed, low 16 bits then high 8 |
| 8 | STATUS | [0] busy, [1] done |
| 9 | BEST_FIT | best fitness of the final population |
| 10 | BEST_ADDR | memory address of the best individual |
| 11 | GEN | generations completed |
| 12 | AVE | average fitness of the last statistics pass |

**Memory map** (16-bit words):

| address | contents |
|---|---|
| 0x0000-0x03FF | population area A (128 slots x 8 words) |
| 0x0400-0x07FF | population area B |
| 0x4000-0x7FFF | elite-degree table |

A slot holds the code in words +0..+3 (least significant first), the fitness in
+4 and the family word in +5. The host writes the initial codes into area A.

**System Memory pins.** `sm_addr`, `sm_oe`, `sm_we` and `sm_wdata` are driven in
the cycle of the access. Read data on `sm_rdata` is sampled at the next clock edge.
This suits an asynchronous SRAM whose access time is shorter than the clock
period: an 85 ns part at 10 MHz.

**FEM handshakes** (`gaa_femi`) are two valid/ready streams. A word moves on a clock
edge where valid and ready are both high.

* `fem_out_*` carries eight 16-bit words per pair: code A bits 15:0 first, code B
  bits 63:48 last, marked by `fem_out_last`.
* `fem_in_*` carries two 16-bit words back: the fitness of A, then of B.

## Verification

Each unit has a self-checking testbench `tb/tb_<module>.sv` that compares against
values computed independently in the testbench. Among the checks:

* the generator against a cell-by-cell model, and its full period;
* the CMU's operator choice against equation E_deg2 worked out from the table, and
  the crossover shape (contiguous for two-point);
* the mutation count against 128 x p_mut/4096 per pair;
* the family words and the 149-cycle hand-off period;
* the roulette against a planted 3:1 fitness split.

System-level testbenches drive the chip with the SRAM and FEM models:

| testbench | what it runs |
|---|---|
| `tb_gaa_chip` | three short GAs (6 and 12 generations): both population sizes, all three operators, both alphas, fast and slow FEM. Checks elitism, that every final individual carries the fitness of its own code, the result registers and progress. Every mechanism must occur. |
| `tb_gaa_full` | one run with the default parameters: 512 generations, population 128, adaptive crossover, on De Jong's f3. About 12.2 M cycles, a few seconds in Verilator. The optimum is found around generation 85. |
| `tb_gaa_dejong` | f3 with each operator, ten runs each, population 128, p_cross 154/256, p_mut 10/4096, T_cross 2.0. A run stops at the optimum or after 512 generations. The optimum is found in every run. About 70 s. |
| `tb_gaa_exec_time` | cycles per generation against crossover rate, and against FEM time x clock frequency |

Generation at which `tb_gaa_dejong` first reaches the f3 optimum, averaged over
its ten runs per operator, next to the figures published for the original chip
(also ten runs, with settings that were not published):

| operator | this RTL | original chip |
|---|---|---|
| two-point | 130 | 161 |
| uniform | 123 | 86 |
| adaptive | 86 | 82 |

The adaptive operator needs the fewest generations in both. The spread between
runs is large (37 to 377 generations), so ten runs rank the operators only
roughly.

Measured cycles per generation (population 128, fast FEM):

| crossover rate | pairs | cycles per generation |
|---|---|---|
| 0/256 | 0 | 17,503 |
| 64/256 | 16 | 20,291 |
| 128/256 | 32 | 23,015 |
| 192/256 | 48 | 25,242 |
| 255/256 | 63 | 26,842 |

The FEM starts to cost time once its delay passes roughly 130 cycles. For a FEM
needing 10 us per pair that happens above about 13-15 MHz; the pair period alone
gives 149 cycles at 14.9 MHz.

To simulate with plain Verilator, for example the full run:

```
verilator --binary --timing --assert --top-module tb_gaa_full \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/gaa_pkg.sv tb/tb_gaa_full.sv
./obj_dir/Vtb_gaa_full
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The testbenches
assume two-state simulation, as in Verilator.

## Design choices and departures

These follow the published GAA description:

* the algorithm and the adaptive rule;
* the parameter ranges of the table at the top;
* a 24-bit cellular-automaton random number generator with a user seed;
* 16-bit data and 15-bit addresses to a 32K x 16 System Memory;
* 15 bits of family information and a 14-bit table address for a depth of 4;
* roulette selection by subtraction and comparison;
* GO and DONE;
* the 149-cycle hand-off to a handshaking FEM interface;
* a single clock.

The following are this design's own choices:

* **Inside the units.** The description names the units and their functions but
  not their insides. The cycle schedule, the memory map, the family-word format
  and the pair selection are this design's. So are the valid/ready protocol with
  16-bit words, the register map and its reset values (pop 128, adaptive, 512
  generations, alpha 0.25, p_cross 154, p_mut 4, T_cross 2.0, seed 1), and the
  rule vector of the automaton.
* **Mutation** is applied only to mated children. Unmated individuals are not
  re-evaluated.
* **Unmated copies** count their single parent twice in the family tree.
* **Table reads.** The CMU reads the two elite-degree table entries in every
  crossover mode, not only in adaptive mode. The reads sit in the fixed 149-cycle
  schedule, so skipping them would save no time.
* **The elite** is kept in slot 0 and protected from crossover and mutation. The
  description says only that the best individual ever produced is kept.
* **Pins.** The original chip has 76 signal pins. This RTL brings the host bus, the
  memory bus and both FEM streams out separately, which is about 140 signals. It
  does not reproduce the original pin sharing, which is not described.
* **`GEN_BASE`.** The top-level parameter `GEN_BASE` (default 512) sets the
  generation count for `gen_sel = 0`. It exists only so that tests can run short
  GAs.
* **Selection time.** The roulette walk takes two cycles per slot. Pipelining it
  to one cycle per slot would roughly halve the selection time. This was not done,
  because the original timing of this phase is not known.
* **Timing closure.** The original chip closed timing at 50 MHz in a 0.5 um
  process. That cannot be checked from RTL.

The assertions in `gaa_smi` (memory access only by the owner) and `gaa_femi`
(handshake stability, load only when idle) use `disable iff (!rst_n)`. Because of
this, Verilator reports `rst_n` as used both synchronously and asynchronously. The
warning is harmless.

## Files

| path | contents |
|---|---|
| `rtl/gaa_pkg.sv` | widths, memory map, configuration and request types, family-word helpers |
| `rtl/gaa_chip.sv` | top level |
| `rtl/gaa_cu.sv` | Control Unit |
| `rtl/gaa_cmu.sv` | Crossover and Mutation Unit |
| `rtl/gaa_su.sv` | Selection Unit |
| `rtl/gaa_afcu.sv` | Average Fitness Calculation Unit |
| `rtl/gaa_rng.sv` | Random Number Generator |
| `rtl/gaa_smi.sv` | System Memory Interface |
| `rtl/gaa_femi.sv` | FEM Interface |
| `rtl/gaa_pci.sv` | PC Interface |
| `tb/` | testbenches, `gaa_host.svh` (host bus tasks, table and population loading) and the SRAM and FEM models |
