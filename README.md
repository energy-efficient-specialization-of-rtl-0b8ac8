# A CGRA cluster with specialised functional units

A coarse-grained reconfigurable array (CGRA) is a grid of identical tiles, so
every piece of hardware put in a tile is paid for many times over. Multipliers
are the costliest functional units, yet in typical signal- and media-processing
kernels multiply and multiply-add make up only about a tenth of the executed
operations, while *select* (steering one of two values by a predicate) makes up
about forty percent. This cluster therefore does not give every processing
element (PE) everything. Of its four 32-bit PEs:

* **two are Universal PEs**: ALU with select, funnel shifter and a two-cycle
  fused multiply-add (MADD), behind four operand ports;
* **two are S-ALU PEs**: ALU with select and funnel shifter, behind two
  operand ports.

Every operation is still available in every cluster, and each PE still
executes one operation per cycle, so the cluster keeps four concurrent
operations. The shifter stays in the cheaper PEs because it costs little
next to the ports and peripheral logic a PE needs anyway, and because a PE
that can do more lets a chain of operations stay inside it instead of
crossing the crossbar. This mix, two Universal plus two S-ALU, is the one an
architecture study of the Mosaic CGRA found best in area x delay x energy
(about 0.86 times a cluster of four Universal PEs); this RTL implements that
cluster. The study gives the unit types, their port counts and the cluster
organisation, but not the circuits: everything finer (operation encodings,
register-file sizes, latencies of the simple units, crossbar maps) is this
design's own and is listed under *Choices made here*.

The cluster is **statically scheduled**: there is no instruction fetch, no
hazard logic and no handshake. A loop body is compiled into a short sequence
of *context words*, one per clock cycle; the cluster replays them, one
iteration every `ctx_last+1` cycles, and each context word sets every
multiplexer, operation and write enable for its cycle.

## Block structure

```
cgra_cluster
 |- context_ctrl        context memory (16 words) + modulo context counter
 |- crossbar  (x2)      32-bit: 15 sources -> 27 sinks;  1-bit: 8 -> 12
 |- pe [0..3]           KIND = Universal, Universal, S-ALU, S-ALU
 |    |- universal_fu   alu + funnel_shifter + madd      (Universal PEs)
 |    |- s_alu          alu + funnel_shifter             (S-ALU PEs)
 |    '- rotating_rf    private 8 x 32 rotating register file
 |- rotating_rf         cluster-wide 16 x 32, 1 write / 2 read ports
 |- data_mem  (x2)      two banks, 1024 x 32 each, one port each
 |- dist_reg (x2)       distributed registers on the crossbar
 '- lut3_pe  (x2)       1-bit path: 3-input lookup tables
```

`cgra_pkg` holds the shared types: the operation enum `fu_op_e`, the PE kind
enum `fu_kind_e`, the per-PE configuration `pe_cfg_t`, the context word
`ctx_cfg_t`, and the crossbar index maps.

## Functional units

| PE kind   | word ports in/out | operations                                   | latency      |
|-----------|-------------------|----------------------------------------------|--------------|
| Universal | 4 / 1             | all ALU ops, SEL, shifts, FSHR, MUL/MADD/MSUB | 1, MADD 2   |
| S-ALU     | 2 / 1             | all ALU ops, SEL, shifts (no FSHR)           | 1            |
| ALU       | 2 / 1             | ALU ops, SEL                                 | 1            |
| Shifter   | 2 / 1             | shifts                                       | 1            |
| MADD      | 3 / 1             | MUL/MADD/MSUB                                | 2            |

Only the first two are used by default; `cgra_cluster`'s `PE_KINDS`
parameter can build other mixes (for example `{FU_SALU, FU_SALU, FU_SALU,
FU_MADD}` or four Universal PEs) for comparison.

Operations (`fu_op_e`, operands a = port 0, b = port 1, c = port 2, d = port 3):

* arithmetic: `ADD` a+b, `SUB` a-b, `NEG` -a
* logic: `AND`, `OR`, `XOR`, `NOT` ~a, `PASS` a
* comparisons: `EQ`, `NE`, `LT`, `LE` (signed), `LTU`, `LEU` (unsigned): the
  word result is 0/1 and the PE's predicate register is loaded with it
* `SEL`: pred ? a : b, with pred taken from the 1-bit crossbar
* shifts by b[4:0]: `SLL`, `SRL`, `SRA`, `ROTL`, `ROTR`; Universal only:
  `FSHR` = low word of {a, d} >> b[4:0]
* `MUL` a*b, `MADD` a*b+c, `MSUB` a*b-c (low 32 bits)

**The funnel shifter** forms every shift as one right shift of a 64-bit word
{hi, lo} by 0..32 in six binary-weighted mux stages: `SRL` uses {0, a},
`SRA` {sign, a}, `SLL` {a, 0} shifted by 32-s, rotates {a, a}, and `FSHR`
{a, d}.

**The MADD** registers the product and addend at the issue edge and adds in
the second cycle, so its result reaches the PE output two cycles after issue;
one may issue every cycle.

**Sharing the output port.** A compound unit has one result port. In a
Universal PE a MADD issued in cycle t and a one-cycle operation issued in
cycle t+1 would both finish at the end of t+1. The schedule must not do that;
an assertion in `universal_fu` reports it, and the MADD result wins.

## Processing element

Each PE (`pe.sv`) wraps its unit with peripheral logic, all controlled by its
`pe_cfg_t` in the current context:

* **operand sources** (`src[i]`): the crossbar sink for port i (`SRC_XBAR`),
  the port's retiming register (`SRC_RETIME`), the private register file's
  read port (`SRC_LRF`), or the PE's own output register (`SRC_SELF`);
* **input retiming registers**: `retime_en[i]` captures the crossbar value at
  the end of the cycle, so an operand can arrive early and be used later;
* **private rotating register file**, 8 entries, one read port
  (`lrf_raddr`); `lrf_we`/`lrf_waddr` store the current *output register*
  value (the result of an earlier operation);
* **output register** (`out`, a crossbar source) and **predicate register**
  (`flag_out`, a 1-bit crossbar source). Both hold until an operation that
  writes them completes, so a NOP keeps the result available.

`SRC_SELF` and `SRC_LRF` are what make a rich PE pay off: a dependent chain
can run in one PE without using any crossbar port.

## Rotating register files

Both register-file levels rotate. A logical index r addresses physical entry
(r + base) mod depth, and `base` decreases by one at the end of every loop
iteration (the cycle in which the context counter wraps). A value written to
logical r in iteration i is therefore read as logical r+1 in iteration i+1,
r+2 in iteration i+2, and so on, while iteration i+1 writes its own value to
logical r without overwriting it. This is how a modulo-scheduled loop keeps
several iterations' copies of a long-lived value apart without unrolling.
Contents are not reset; only the base is.

## Context words and timing rules

`context_ctrl` holds up to 16 context words, written one per cycle through
`cfg_we`/`cfg_waddr`/`cfg_wdata` (a whole `ctx_cfg_t`). While `run` is high
the counter `ctx` steps 0, 1, ..., `ctx_last`, 0, ...; `iter_done` is high in
the last context and the rotating register files advance at its end. While
`run` is low, `ctx` returns to 0 and the cluster sees an all-zero word:
nothing executes and nothing is written, so state is held. Stop only between
iterations (when `ctx` is 0) unless a partial iteration is intended.

A `ctx_cfg_t` contains, for one cycle: the four `pe_cfg_t`; a source select
for every sink of both crossbars (`wsel`, `bsel`); the cluster register
file's write enable, write index and two read indices; each memory bank's
enable and write enable; the load enables of the two distributed registers; the
enables and 8-bit truth tables of the two LUTs; and a 32-bit immediate that
is itself a crossbar source.

A schedule must respect these latencies (cycle k = the context in which an
operation is configured):

| producer                                  | visible to consumers from |
|-------------------------------------------|---------------------------|
| PE ALU / select / shift / compare         | cycle k+1                 |
| PE MADD                                    | cycle k+2                 |
| data memory read                           | cycle k+1 (`rdata` holds) |
| register-file write, dist. register, LUT  | cycle k+1                 |
| retiming-register capture                  | cycle k+1                 |
| crossbar, register-file read, grid ports  | same cycle                |

Word crossbar indices (`cgra_pkg`):

| sources | index | sinks                  | index                     |
|---------|-------|------------------------|---------------------------|
| PE p output         | 0+p   | PE p operand port i | 4p+i (0..15)          |
| register file read 0/1 | 4, 5 | register file write data | 16               |
| memory bank 0/1 read data | 6, 7 | bank 0/1 address | 17, 18             |
| distributed reg 0/1 | 8, 9  | bank 0/1 write data | 19, 20                 |
| grid in 0..3        | 10..13 | distributed reg 0/1 | 21, 22               |
| immediate           | 14    | grid out 0..3       | 23..26                 |

1-bit crossbar: sources PE flags 0..3, LUT outputs 4..5, grid predicates
6..7; sinks PE select predicates 0..3, LUT l input k at 4+3l+k, grid
predicate outputs 10..11. A select index past the last source gives 0.

A LUT's output is bit {in2, in1, in0} of its truth table; for example
`8'h66` is in0 XOR in1 regardless of in2.

Each memory bank uses the low 10 bits of its address word and allows one
access per cycle; the two banks work independently in the same cycle.

## Example schedule

`tb/tb_cgra_cluster.sv` runs this loop with a five-cycle initiation interval
(x, t and p arrive on `grid_in[0]`, `grid_in[1]`, `grid_bin[0]`):

| ctx | PE0 (Universal) | PE1 (Universal)         | PE2 (S-ALU)  | PE3 (S-ALU)          | other                                   |
|-----|-----------------|-------------------------|--------------|----------------------|-----------------------------------------|
| 0   | MADD x*3+dreg0  | retime port 3 <- t      | LT x,t       | SRA x,3              | imm=3                                    |
| 1   |                 | FSHR {x,t}>>3 (t retimed)|             | ADD self + LRF[1]; LRF[0] <- s | LUT0 = lt XOR p             |
| 2   |                 | SEL LUT0 ? PE3 : self   | ADD dreg1,1  |                      | dreg0 <- PE0; load both banks at dreg1; imm=1 |
| 3   |                 |                         |              |                      | dreg1 <- PE2; both banks [PE2] <- PE1; CRF[0] <- PE1; grid outs |
| 4   |                 |                         |              |                      | bank 1 read data to grid out 2; register files rotate |

It accumulates 3x in a distributed register, keeps a counter in the other,
stores each result in both memory banks and reads the previous one back from
each, and reads the
result of two iterations ago from the cluster register file after two
rotations.

## Benchmark kernels

Ten more testbenches program the default cluster with small versions of the
kernels this kind of fabric is evaluated on, one for each of the ten
benchmarks of the architecture study. Each loads its own context
words, checks every result against a reference model, and checks the cycle
count. Problem sizes are chosen here; the schedules are hand-written. The
study names the benchmarks but not their code, so the exact algorithm is
also this design's reading where the name leaves room: a Barker-code
pulse compressor for the matched filter, a threshold-crossing detector for
PET events, and two memory banks holding samples and coefficients for the
banked FIR.

| testbench                  | kernel                                  | II | contexts | main resources                                        |
|----------------------------|-----------------------------------------|----|----------|--------------------------------------------------------|
| `tb_kernel_fir`            | 4-tap FIR, 300 samples                  | 4  | 4        | both MADDs, cluster register file as delay line        |
| `tb_kernel_fir_banked`     | 6-tap FIR, samples in bank 0, coefficients in bank 1 | 8 | 8 (+1) | both banks read each cycle, alternating MADDs |
| `tb_kernel_matmul`         | 6x6 matrix multiply from data memory    | 4  | 4 (+1)   | memory loads, MADD, address stepping, store program   |
| `tb_kernel_conv`           | 3x3 convolution, 8x8 image, zero padding | 4 | 4 (+1)   | LTU bounds checks, LUT3, padding by SEL, two MADDs     |
| `tb_kernel_smith_waterman` | 12x24 local-alignment score matrix      | 10 | 10       | EQ/LT + SEL chains, distributed register carry         |
| `tb_kernel_motion_est`     | SAD of 9 candidates of a 4x4 block, arg-min | 8 | 8     | abs via SEL, LUT3 combining 3 predicates, private file |
| `tb_kernel_kmeans`         | K-means assignment, 40 points, 5 centroids | 8 | 8      | MUL on both Universals, LTU, LUT3, arg-min selects     |
| `tb_kernel_matched_filter` | Barker-7 pulse compression + detection, 240 samples | 4 | 4 | taps as ADD/SUB, both register-file read ports, SRA, LT, LUT3, 1-bit grid output |
| `tb_kernel_pet_event`      | pulse detection: start, energy, peak per event, 400 samples | 4 | 4 | LT, 4 SELs, LUT3 edge logic, 1-bit state in a LUT |
| `tb_kernel_cordic`         | 16-step CORDIC cos/sin, 10 angles       | 5  | 5 (+1)   | shifts, 3 selects, retiming, private file, reprogramming |

II is the initiation interval in cycles. "(+1)" marks a one-context set-up
program loaded before the loop, so these runs also reprogram the cluster
between two programs. A crossbar select past the last source (15 in the word
crossbar) reads as zero; the kernels use that as a free constant 0.

## Choices made here

The source architecture fixes the unit types and their port counts, the four
32-bit PEs, the 1-bit path built from 3-input LUTs, the two-cycle MADD, the
funnel shifter, the private plus cluster-wide rotating register files, the two
distributed registers and cycle-by-cycle reconfiguration. The following are
this design's own:

* operation set and encodings, predicate polarity of `SEL`, signedness;
* use of the Universal PE's fourth port as the low word of `FSHR` (four ports
  are specified; their use is not);
* one-cycle latency of ALU, shift, LUT, memory read and registers;
* operand-source scheme (crossbar / retiming / private file / own output);
* sizes: 16 contexts, 8-entry private and 16-entry cluster register files
  (one and two read ports), 1024 words per single-port memory bank, two LUTs, four grid
  word ports and two grid predicate ports in each direction, a per-context
  immediate;
* rotation direction (base decrements once per iteration);
* two data memory banks (the architecture allows one or two) and one
  cluster-wide register file (an earlier variant had two large ones);
* the context memory as a register array read asynchronously, not an SRAM
  macro;
* no reset of memory or register-file contents; an all-zero context word is
  idle.

Not built: the grid interconnect between clusters (only its ports are
brought out), and the physical configuration SRAM and the 65 nm
implementation behind the published area and energy numbers.

## Verification

Every module has a self-checking testbench in `tb/` that compares against a
reference written independently in the testbench, ending with a line
`TB_RESULT checks=N failures=M`:

* `tb_alu`, `tb_funnel_shifter`, `tb_s_alu`: every operation, corner values
  and every shift amount;
* `tb_madd`, `tb_universal_fu`: random issue streams, checking the one- and
  two-cycle result timing;
* `tb_pe`: operand sources, retiming, private register file and its rotation,
  predicate register, in Universal, S-ALU and MADD PEs;
* `tb_rotating_rf`, `tb_crossbar`, `tb_data_mem`, `tb_dist_reg`,
  `tb_lut3_pe`, `tb_context_ctrl`: against behavioural models;
* `tb_cgra_cluster`: the example schedule above for 200 iterations at the
  default parameters, with a pause, checking every output and that one
  iteration takes exactly five cycles. It counts and requires each mechanism:
  MADD, both sides of select, both compare outcomes, LUT, memory store/load
  in both banks, both register-file rotations, retiming, FSHR and the pause;
* the ten `tb_kernel_*` testbenches of the previous section, which check
  complete programs result by result.

What is not verified: timing closure or area (nothing here is tied to a
process), the non-default `PE_KINDS` mixes beyond elaboration, and schedules
other than those in the testbenches.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cgra_pkg.sv tb/tb_cgra_cluster.sv --top-module tb_cgra_cluster -o sim
./obj_dir/sim
```

Replace `tb_cgra_cluster` by any other testbench name. The package must be
read first; everything else is found through `-y`. All RTL is synthesizable
SystemVerilog-2017; the only simulation-only constructs in `rtl/` are the
port-conflict assertion in `universal_fu` and an elaboration check that
register-file depths are powers of two.

To write a new program, build `ctx_cfg_t` values (all-zero means idle; set
only the fields you use), load them with `cfg_we`, set `ctx_last` to the
number of contexts minus one and raise `run`. The function `prog()` in
`tb_cgra_cluster.sv` shows how; the kernel testbenches share the cluster
instance, a `load_program` task and the operand-port index helper `wpe()`
through `tb/tb_cluster_util.svh`.
