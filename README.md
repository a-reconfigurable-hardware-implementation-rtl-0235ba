# GA partitioning processor

This is a hardware genetic algorithm that splits a circuit's cells into two
halves of equal size so that as few nets as possible cross between the halves
(two-way min-cut partitioning, a classic step in VLSI placement). A host loads
a netlist and a handful of GA settings. The processor then evolves a
population of candidate partitions entirely in hardware and returns the final
population with the cut count of every member.

The RTL is a SystemVerilog (IEEE 1800-2017) rendering of the GA processor
described in the thesis *A Reconfigurable Hardware Implementation of Genetic
Algorithms for VLSI CAD Design*. It also includes the board-level wrapper that
thesis used on an FPGA prototyping board. The block structure, interfaces,
register map, memory organisation and defaults follow that description. Where
the description is silent, this design makes its own choices; they are listed
in [Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## The encoding

Each candidate partition is a **chromosome** with one bit per cell: bit *i* = 1
puts cell *i* in partition 1, and 0 puts it in partition 0. Each **net** is
stored the same way, with bit *i* = 1 when the net touches cell *i*.

Both are stored as words of `CMDataWidth` bits (8 by default). A chromosome or
a net of `CMLength+1` words covers `(CMLength+1)*CMDataWidth` cells. For
example, with 8-bit words the chromosome `11110000` and the net `01011100`
produce:

    net AND chromosome      = 01010000  -> the net has a cell in partition 1
    net AND NOT chromosome  = 00001100  -> the net has a cell in partition 0
    both non-zero           -> the net is cut

The **fitness** of a chromosome is the number of cut nets, so lower is better.
The fitness block works through a net word by word. It keeps two sticky flags
("seen in partition 1" and "seen in partition 0") and stops reading that net as
soon as both are set. On circuits where most nets are cut early, this early
exit saves most of the memory traffic.

The fitness is `FMDataWidth` bits wide (8 by default) and **saturates** at 255
rather than wrapping.

## How a run proceeds

```
   host ──registers──▶ control_regs ─────────────┐
   host ──netlist────▶ main_controller ──────────┤  enables / done pulses
                        │  │  │                  │
              selection ┘  │  └ fitness          │
                  crossover/mutation              │
                        all memory ports ─▶ mem_mux ─▶ netlist / chromosome / fitness RAMs
```

The `main_controller` sequences everything else. Each block is started by
holding its enable high and answers with a one-clock done pulse. Only one
block is enabled at a time, and the enables also tell `mem_mux` which block
owns the memories.

1. **Load.** After `StartGA`, the netlist arrives on `NetlistIn` one word per
   clock whenever `NetlistVld` is high. Word *w* of net *n* is stored at netlist
   address `{n, w}`.
2. **Initial population.** `PopSiz+1` random chromosomes are written into the
   low half of the chromosome memory. Each one is then **balanced**: random
   bits of the larger side are flipped until the counts of ones and zeros
   differ by at most one.
3. **Fitness.** The fitness block evaluates every chromosome of the parent
   half. It writes the cut counts to the fitness memory and reports the slot of
   the best one (`BestAddr`).
4. **Generation.** The following steps repeat `GenNum+1` times:
   - For child pairs *k* = 0, 1, …, until `PopSiz+1` children exist:
     - The **selection** block runs a tournament and returns two parent slots.
     - The **crossover** block writes children to slots 2*k* and 2*k*+1 of the
       other half.
   - The best parent is copied over the last child slot (**elitism**).
   - `HighBank` toggles, so the children become the parents.
   - The fitness block evaluates the new parents.
5. **Output.** Every chromosome of the final population streams out on
   `PopOut`, one word per clock with `PopOutVld`. The chromosome's cut count is
   on `FitnessOut`. A one-clock `GADone` follows the last word.

## Memory organisation

| memory | words (defaults) | ports | address |
|---|---|---|---|
| netlist | 2^(MaxNetNumBits+CMField) = 65 536 × 8 | single | `{net, word}` |
| chromosome | 2^(FMAddrWidth+CMField) = 131 072 × 8 | 1 read + 1 write | `{bank, slot, word}` |
| fitness | 2^FMAddrWidth = 512 × 8 | single | `{bank, slot}` |

- **Banks.** The chromosome and fitness memories are split into two banks by
  their top address bit. The parents live in bank `HighBank` and the children
  are written to bank `~HighBank`, so a generation never overwrites a parent it
  may still select.
- **Slots.** A slot number is `FMAddrWidth-1` bits wide, so each bank holds up
  to 256 individuals.
- **Read latency.** All memories have one clock of read latency: data is
  registered on the edge after the read enable.
- **FPGA build.** `ga_processor` puts the three memories next to the core as
  inferred RAM arrays. `ga_core` brings the same ports out for use with
  external RAMs.

## The genetic operators

### Tournament selection (`selection`)

The block reads four fitness values from random slots of the parent bank and
compares them in two pairs. The lower cut count of each pair wins, and the
first of the pair wins a tie. The two winners' slots are held on `Parent1Addr`
and `Parent2Addr`.

A random slot is `(r × (PopSiz+1)) >> 8` for an 8-bit random number *r*, so any
population size works, not only powers of two. `SelectionDone` comes 9 clocks
after the enable is seen.

### Crossover, mutation and balance repair (`crossover`)

**Crossover.** For every pair, one 8-bit random number is compared with
`CrossoverRate`.
- If it is below the rate, the pair is crossed **uniformly**. Each word gets a
  fresh random mask: child 1 takes parent 1's bits where the mask is 1 and
  parent 2's bits where it is 0, and child 2 takes the complement.
- Otherwise the parents are copied unchanged.

**Mutation.** For every word, a second 8-bit random number is compared with
`MutationRate`. If it is below the rate, one random bit of each child word is
flipped.

**Balance repair.** Crossover and mutation can unbalance a child. While the
block writes a child, it counts that child's ones. Afterwards, while
|ones − zeros| > 1, it:
1. picks a random word and bit of the child,
2. reads the word, and
3. if the bit is on the larger side, flips it and writes the word back.

Attempts that hit the smaller side cost three clocks and change nothing. The
count therefore converges quickly while the imbalance is large and more slowly
near the end. A pair takes `4*(CMLength+1) + 3*A + 3` clocks, where *A* is the
number of repair attempts.

Balance is counted over all `(CMLength+1)*CMDataWidth` bits. The registers give
the chromosome length only in words, so the hardware cannot tell padding bits
from cells. A circuit whose cell count is not a multiple of the word width is
balanced with the padding bits included (see [Limitations](#limitations)).

### Fitness (`fitness`)

The fitness block reads one chromosome word and one net word per clock,
pipelined. In the same clock as it makes the cut decision, it picks the next
address: the next word of this net, the first word of the next net (after a
cut or after the last word), or the next chromosome.

One fitness pass takes (number of word pairs actually read) + 2 clocks. The
lowest cut count and its slot are kept as `BestAddr`/`BestFitness`, and the
first one wins a tie.

### Random numbers (`lfsr_rng`)

The selection, crossover and main controller blocks each own a 32-bit Galois
LFSR with polynomial x^32 + x^22 + x^2 + x + 1. The three generators start from
different seeds and step only when their owner consumes a number. A run is
therefore fully repeatable from reset.

## Host interface

Registers are written one byte per clock with `CPUWr`. They are write-only and
reset to zero. **Every count is stored minus one.**

| addr | register | meaning |
|---|---|---|
| 0, 1 | CMLength (low, high byte) | words per chromosome − 1 (low `CMField` bits used) |
| 2, 3 | NetNum (low, high byte) | nets − 1 (low `MaxNetNumBits` bits used) |
| 4 | PopSiz | individuals − 1 |
| 5 | GenNum | generations − 1 |
| 6 | CrossoverRate | crossover when an 8-bit random number < value (252 ≈ 0.99) |
| 7 | MutationRate | per-word mutation when an 8-bit random number < value (3 ≈ 0.01) |

A run goes as follows:
1. Write the registers.
2. Pulse `StartGA` for one clock.
3. Send `(NetNum+1)*(CMLength+1)` netlist words. Gaps in `NetlistVld` are
   allowed.
4. Wait for the result stream and `GADone`.

The registers must not change during a run.

## Board-level system (`ga_system`, the top)

On the prototyping board the processor is not driven by a host directly. An
ARM processor on the system bus writes the GA settings and the netlist into a
1 MB SSRAM and sets a control bit `EnbGACtl`. It then polls that bit and reads
the results back from the SSRAM. `ga_system` contains the FPGA side of this
arrangement:

- **`ga_controller`** starts when `EnbGACtl` goes high. It:
  1. reads the eight settings from SSRAM words 0–7 (low byte of each word) and
     writes them into the processor's registers;
  2. pulses `StartGA`;
  3. streams the netlist from word `0x100` upwards, one netlist word per SSRAM
     word, at one word per clock (back-to-back reads with a two-clock read
     latency);
  4. writes each output word to the SSRAM from word `0x20000` upwards as
     `{fitness, chromosome word}`;
  5. pulses `GACtlReset`, which clears `EnbGACtl`.
- **`ga_ctl_reg`** holds `EnbGACtl`. A host write (`CtlWr`, `CtlWrData`)
  sets or clears it, and `GACtlReset` clears it on the next edge. If a write
  and `GACtlReset` arrive in the same clock, the clear wins, so a finished
  run never restarts from a stale write. The bit is an output, so the host
  can poll it.
- **`zbt_mux`** hands the SSRAM port to the GA controller while `EnbGACtl` is
  high, and to the bus side otherwise.

The rest of the bus side is not part of this RTL: the AMBA slave with its
decoder, SSRAM controller, the register peripheral's bus interface and the
interrupt controller. Neither is the SSRAM chip. Their signals are
`ga_system`'s ports: `Bus*` (SSRAM access from the bus), `CtlWr`/`CtlWrData`
(a write to the enable bit), `EnbGACtl`, `GACtlReset` and `Zbt*`.

## Parameters and capacity

| parameter | default | meaning |
|---|---|---|
| `FMAddrWidth` | 9 | one bank bit + 8-bit slot: up to 256 individuals |
| `FMDataWidth` | 8 | fitness width; cut counts saturate at 255 |
| `CMDataWidth` | 8 | memory word width (power of two, ≤ 16) |
| `CMField` | 8 | up to 256 words per chromosome (2048 cells) |
| `MaxNetNumBits` | 8 | up to 256 nets |
| `ZbtAddrWidth`, `ZbtDataWidth`, `ZbtRdLatency` | 18, 32, 2 | SSRAM: 256 K × 32 bit, pipelined reads |

The default sizes hold the small benchmark circuits (9–32 nets) and a
239-net / 274-cell circuit. A 294-net circuit needs `MaxNetNumBits = 9`.
Circuits with hundreds of cut nets need a wider `FMDataWidth`.

Measured in simulation at the defaults with population 20 and 20 generations
(random netlists of the benchmark sizes, 50 MHz clock):

| nets / cells | clocks | time |
|---|---|---|
| 9 / 10 | ≈ 12 500 | 0.25 ms |
| 32 / 24 | ≈ 41 500 | 0.83 ms |
| 239 / 274 | ≈ 2.5 M | ≈ 50 ms |

For comparison, the original hardware reports 0.53 ms, 1.86 ms and 38.41 ms for
circuits of these sizes. The run time depends strongly on how early nets are
found to be cut, and therefore on the netlist.

## Where this design makes its own choices

These points are not fixed by the original description, or the description
contradicts itself. They are the places to look first when comparing against
another implementation.

- **Handshake.** The enables are held as levels until the done pulse. The
  original text speaks of an "enable pulse" in one place and an enable
  "signal" in another.
- **Count encoding.** Register counts are stored minus one. The original test
  bench loads the generation count that way; here all four counts follow it.
- **`GenNum` width.** `GenNum` is 8 bits wide. The original pin list shows 6
  bits, but its results use 100 generations.
- **`CMField` default.** `CMField` defaults to 8, the value in the generics
  table. The printed top-level listing uses 3.
- **Memory sizes.** They follow the address-bus widths. A size table in the
  original lists one extra address bit that no port could drive.
- **Elitism.** The elite is copied into the last child slot.
- **Odd populations.** The second child of the last pair goes to a spare slot
  (`PopSiz+1`) that is never read.
- **Initial population.** It is balanced like the children. Without this, an
  unbalanced random chromosome with few cuts can win every tournament and
  survive as the elite.
- **Mutation.** It flips one bit per selected word in each child.
- **Random numbers.** The random generator's length, polynomial and seeds are
  not specified by the source.
- **Best chromosome.** The best chromosome is carried through the population
  by elitism, so it is in the final output. It is not kept as a separate
  record in the fitness memory.
- **Board level.** The SSRAM layout, word formats and port details of the
  board-level blocks are this design's own. So is the rule that `GACtlReset`
  beats a host write to `EnbGACtl` that arrives in the same clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_lfsr_rng` | sequence against a bit-serial reference, hold when not advanced |
| `tb_control_regs` | random register writes against a model, reset values |
| `tb_sp_ram`, `tb_dp_ram` | random reads and writes against a model, read latency |
| `tb_selection` | winners against the logged fitness reads, latency of 9 clocks |
| `tb_crossover` | copy vs uniform crossover (children together hold exactly the parents' bits, agreeing bits pass through), mutation, repair direction, child balance, exact clock count |
| `tb_fitness` | hand-worked examples, random problems against a reference, early exit, saturation, exact clock count |
| `tb_mem_mux` | routing in every ownership case |
| `tb_main_controller` | phase order, generation count, bank swaps, elite copy, balanced initial population, output stream (with stand-in blocks) |
| `tb_ga_core` | core at 4-bit and at 16-bit chromosome words, side by side, on planted-partition problems: memory access rules, fitness recomputation, balance |
| `tb_ga_processor` | complete runs at default parameters on benchmark-sized random netlists; counts every mechanism |
| `tb_ga_controller` | SSRAM-to-processor loading, result storage, `GACtlReset` handshake |
| `tb_zbt_mux` | SSRAM ownership |
| `tb_ga_ctl_reg` | enable bit against a model: host set and clear, clear by `GACtlReset`, priority when both arrive together, asynchronous reset |
| `tb_ga_system` | complete runs of the top at default parameters through the SSRAM, with the host's role played by the testbench |

The two full-system testbenches recompute the cut count of every output
chromosome from the netlist and check that every chromosome is balanced. They
also count the mechanisms seen and fail if any never happened:
- early exits and full scans,
- crossed and copied pairs,
- mutations and balance flips,
- elite copies,
- bank swaps both ways,
- fitness saturation,
- SSRAM hand-over.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/ga_pkg.sv tb/tb_ga_system.sv \
          --top-module tb_ga_system -Mdir obj_ga_system -o sim
./obj_ga_system/sim
```

Replace `ga_system` with any other testbench name. All of them finish in a few
seconds. The `-y rtl -y tb` options let Verilator find the modules, and the testbench
helper `ga_core_bench`, by file name.

## Limitations

- **Padding bits.** Balance includes padding bits, because the cell count is not
  a register. If the cell count is not a multiple of `CMDataWidth`, the real
  cells may end up unbalanced by up to the number of padding bits. Choosing a
  word width that divides the cell count avoids this.
- **Saturation.** The fitness saturates at 2^FMDataWidth − 1. Chromosomes
  beyond that cut count compare as equal.
- **Testbench netlists.** The testbenches use random netlists with the
  benchmark sizes, not the benchmark circuits themselves.
- **Word width.** `CMDataWidth = 16`, the wider configuration of the original
  results, is simulated only in the core testbench (reduced population and net
  counts), not in the full board system.
- **Warnings.** Verilator's lint reports a few unused bits, such as parts of the
  random words and the upper bytes of the 16-bit registers. These are by
  design.
