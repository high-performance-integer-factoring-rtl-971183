# ECM co-factoring engine: 24 elliptic-curve-method cores with word-serial DSP-style arithmetic

This is RTL for a co-factoring accelerator. It runs the elliptic curve method
(ECM) on many curves at once to find small prime factors of mid-sized integers,
from 66 to 236 bits. Sieving-based factoring, such as the number field sieve,
produces huge numbers of such integers.

One FPGA holds 24 independent ECM cores. Each core:

- takes a modulus N, a curve in Montgomery form and a start point;
- runs phase 1 (Q = k·P for a large smooth scalar k);
- runs phase 2 (the accumulated product d over all primes between B1 and B2);
- leaves Q and d in its memory, where a host reads them and takes gcd(d, N).

The default configuration is 151-bit moduli, B1 = 960 (k has 1374 bits) and
B2 = 57000.

Inside a core, all arithmetic is done on 17-bit words. There are three
arithmetic units: one modular adder/subtracter and two Montgomery multipliers.
Each is written so that it maps onto a few 18×18 multiply-accumulate slices.
A small controller feeds the units from a shared operand memory, and a program
in an exchangeable ROM drives the controller.

## Number representation

A residue is held as **b words of 17 bits**, least significant word first.
B_WORDS = b defaults to 10.

The multiplier uses Montgomery multiplication with R = 2^(17b). To avoid
computing a quotient digit in every step, the host does not give the core N.
It gives the scaled modulus instead:

    Mt = N · n',   n' = (−N⁻¹ mod 2^17)

Because Mt ≡ −1 (mod 2^17), the quotient digit of each outer step is simply
the low word of S₀ + bᵢ·A₀. No multiplication by n' is needed inside the loop.
This is Orup's simplification, quotient pipelining with delay 0.

Nothing is fully reduced. Every value a unit reads or writes lies in [0, 2·Mt):

- the multiplier output stays below 2·Mt as long as 4·Mt < 2^(17b);
- the adder/subtracter reduces by 2·Mt;
- so the largest modulus is **17b − 19 bits**: 66 bits at b = 5, 151 at b = 10,
  236 at b = 15.

A result is congruent to the true value mod N, because it is congruent mod Mt
and N divides Mt. The host reduces mod N when it reads a result.

Values in the workspace are in Montgomery form: x is stored as x·R mod Mt, or
any value below 2·Mt that is congruent to it. The host converts on the way in
and on the way out. In particular, d must start as R mod Mt, which is 1 in
Montgomery form.

## Arithmetic units

**ecm_maddsub** adds or subtracts modulo Mt. It has two stages, each standing
for one DSP slice:

- Stage 1 computes r = a ± b one word at a time, with the carry fed back.
- Stage 2 computes s = r ∓ 2·Mt, one word behind stage 1, with its own carry.

Both r and s are kept. The final carry decides which one is the result:

- Addition: s if r ≥ 2·Mt (no borrow in stage 2), otherwise r.
- Subtraction: s = r + 2·Mt if stage 1 borrowed, otherwise r.

Operand words arrive interleaved (a₀, b₀, a₁, b₁, …). The result is complete
**2b + 3 cycles** after the first word: 23 cycles at b = 10.

**ecm_mmul** is a word-serial Montgomery multiplier. For each word bᵢ of B it
makes one pass over j = 0 … b+1:

    t = S[j] + bᵢ·A[j] + qᵢ·Mt[j] + carry
    S[j−1] = t mod 2^17
    carry = t >> 17

Here qᵢ is the low word of S₀ + bᵢ·A₀. Each pass shifts the accumulator down
by one word. After b passes, S = A·B·2^(−17b) mod Mt, with S in [0, 2·Mt).

- Word steps: b·(b+2), done one word step per cycle.
- Extra cycles: the start cycle plus five fill cycles. These stand for the
  pipeline registers of the three DSP slices the unit maps onto.
- Total: **b·(b+2) + 6 cycles**, which is 126 at b = 10.

The accumulator holds b + 2 words and sits in registers. The operands and Mt
are read from the unit's own buffers.

Both latencies are checked cycle-exactly by the unit testbenches.

## One core (ecm_core)

    host port ──► workspace (64 cells × 16 words × 17 bit) ◄──┐
                    │ 3 read / 3 write ports                  │
      ┌─────────────┼───────────────┐                         │
    port 0        port 1          port 2    (ecm_unit_port)   │
      │             │               │                         │
    MADDSUB       MMUL1           MMUL2  ◄── modulus register │
      └──────── results written back ─────────────────────────┘
    controller ◄── instruction ROM (program, scalar bits, phase 2 masks)

### Workspace and cell map

A cell is 16 words of 272 bits in total, so it holds one coordinate. Two cells
hold a point, as X and Z. The program fixes the cell map:

| cells | content |
|---|---|
| 0 … 47 | phase 2 table: entry s holds j_s·Q in cells 2s (X) and 2s+1 (Z), for the 24 values j_s = 1, 11, 13, … 103 below 105 and coprime to 210 |
| 0–1, 2–3 | during phase 1: ladder points R0, R1 |
| 4 … 15 | during phase 1: scratch |
| 48–49, 50–51 | phase 2 giant-step points R = m·210·Q and R′ = (m+1)·210·Q |
| 52–53 | phase 1: start point P; phase 2: 210·Q |
| 54 | accumulated product d |
| 55 | curve constant a24 = (A+2)/4 |
| 56–59 | two temporary points |
| 60 … 63 | scratch T0 … T3 |

Before start, the host writes:

- Mt into the modulus register;
- R0 = (1 : 0), the point at infinity, into cells 0/1;
- R1 = P into cells 2/3 and into cells 52/53;
- d = 1 into cell 54;
- a24 into cell 55.

All of these are in Montgomery form. When the core finishes, Q = k·P is in
cells 0/1 (table entry 1·Q) and d is in cell 54.

### Unit ports

Each arithmetic unit has its own port (**ecm_unit_port**) on the workspace.
The port performs a command in three stages:

1. It reads the two source cells word by word into the unit. This takes 2b
   cycles plus one cycle of read latency.
2. It starts a multiplier. The adder starts by itself once its words arrive.
3. It waits for done, then writes the b result words into the destination
   cell.

While a port is busy, its unit cannot take another command.

### Controller and instruction set

Instructions are 25 bits: `{op[3:0], dst[6:0], src_a[6:0], src_b[6:0]}`.

An operand code below 64 is a cell number. Codes 64 and 65 mean the X and Z
cell of the table entry currently chosen by JNEXT.

| op | meaning |
|---|---|
| ADD, SUB | dst = a ± b on the adder/subtracter |
| MUL1, MUL2 | dst = a·b·R⁻¹ on multiplier 1 or 2 |
| SYNC | wait until all three units are idle |
| LOOP t | next bit of k; jump to t while bits remain |
| JNEXT t | next table entry flagged in this giant step's mask; jump to t if one is left |
| MNEXT t | next giant step; jump to t while giant steps remain |
| TOGGLE | swap the roles of cells 48–49 and 50–51 |
| JMP t | jump |
| END | done for one cycle, back to idle |

The controller issues in order, at most one instruction per cycle:

- An arithmetic instruction waits only until its own unit's port is free, then
  goes to it. The three units therefore overlap.
- The program places a SYNC wherever a later instruction needs an earlier
  result. There is no hazard detection in hardware.

Two conditional swaps are applied to every address as it is issued, so the
program needs no copying:

- **Phase 1.** While the current bit of k is 1, cells 0–1 and 2–3 trade
  places. One ladder step is always coded as "R1 = R0 + R1, R0 = 2·R0" and
  becomes the other branch when the bit is 1.
- **Phase 2.** TOGGLE flips a bit that trades cells 48–49 with 50–51. The
  giant-step update therefore only writes the new point over the older one.

### The program (ecm_instr_rom)

The ROM module builds everything from B1 and B2 while the design is
elaborated. It contains no data files.

- **Scalar k** = ∏ p^e over primes p ≤ B1, where p^e is the largest power of
  p not above B1. It is read MSB first, one bit per ladder step. For
  B1 = 960 it has 1374 bits.
- **Phase 1** is the Montgomery ladder, one xADD and one xDBL per bit:
  - 11 multiplications and 8 additions/subtractions per step;
  - the two multipliers are paired where the data flow allows.
- **Phase 2 precomputation:**
  1. 2Q.
  2. All odd multiples 3Q … 105Q by xADD.
  3. The 23 multiples coprime to 210 go into their table entries. The others
     go to the temporary points.
  4. Then 210Q = 2·105Q, R = 210Q and R′ = 420Q.
- **Phase 2 main loop.** For m = 1 … ⌊(B2+103)/210⌋, a 24-bit mask tells which
  j give a prime m·210 ± j in (B1, B2]. For each flagged j:

      d = d · (X_R · Z_jQ − X_jQ · Z_R)

  That is three multiplications (the two cross products run on both multipliers at once) and one subtraction. Then R′ + 210Q
  (difference R) replaces R, and TOGGLE swaps the two.

  For B2 = 57000 this gives:
  - 271 giant steps;
  - 4360 products, about one per prime, because one product covers both
    m·210 + j and m·210 − j;
  - a program of about 1000 instructions.

## System (ecm_system, ecm_scheduler)

The top holds N_CORES = 24 cores behind a data request scheduler. The host
side is one request interface:

- `h_valid`, `h_core`: a request and the core it targets;
- `h_we`: a write;
- `h_start`: start the core;
- `h_addr`: `{sel, cell[5:0], word[3:0]}`, where sel = 1 selects the modulus
  register;
- `h_wdata`: write data.

How requests move:

- A request passes PIPE = 2 register stages.
- Address and data are then broadcast to all cores. Only the addressed core
  gets its write or start strobe.
- Read data comes back through PIPE more stages. It arrives on `h_rdata` with
  `h_rvalid`, 2·PIPE + 1 cycles after the request.

`req_pending[c]` rises when core c finishes and clears when it is started
again. The host polls this bit and then collects Q and d.

The register stages mean the bus can span the whole chip without becoming the
critical path.

## Performance

The arithmetic latencies are those of the source design, checked
cycle-exactly. The core as a whole is slower, because its controller is
simpler. These are measured runs at the defaults (b = 10, B1 = 960,
B2 = 57000):

| | this RTL | source design |
|---|---|---|
| phase 1 | 1,736,774 cycles | 945,746 cycles |
| phase 1 + 2 | 3,508,270 cycles | 1,969,775 cycles |
| runs/s at 200 MHz, 24 cores | ≈ 1,368 | 2,424 |

Most of the gap is waiting:

- the in-order controller stalls at SYNC points while the other units are
  idle;
- every operand goes through the workspace: 2b cycles to read, b cycles to
  write.

A statically scheduled program that overlaps these would close most of the
gap. Doing that only means changing the ROM program and the controller. The
units stay as they are.

## Departures from the source design

- **Controller and program.** The source design gives no controller or
  program. Here they are a simple in-order issue unit with a looping program.
  - The program, the scalar bits and the masks are three separate tables.
  - The source reports about two million instructions for phase 1 + 2. That
    points to a fully unrolled, scheduled program, which this RTL does not
    use.
- **No multiplier bypass.** The source block diagram feeds each multiplier's
  output straight back to its input stage. This RTL always goes through the
  workspace.
- **Word-serial model of the DSP datapaths.** The DSP-slice pipelines are
  written as one word step per cycle plus fill cycles. The latency matches the
  DSP-slice pipelines, but the RTL does not instantiate DSP primitives.
- **Reading of the scheduler's bus width.** Its bus carries a width label of
  24. That is read here as one request line per core. The data path width is
  this design's choice.
- **Register stages.** Every core gets PIPE stages. The source draws fewer
  stages on the branches nearest the scheduler.
- **Work left to the host:**
  - prescaling N to Mt;
  - conversion to and from Montgomery form;
  - choosing curves;
  - the final gcds;
  - the board-level interface of the multi-FPGA machine.
- **Cell 55** holds the curve constant. The source leaves it unused in phase 2.

## Simulating

Every module and testbench needs the package first. For example:

    verilator --binary --timing --assert -Wno-fatal -Wno-WIDTH \
      --top-module tb_ecm_system -y rtl rtl/ecm_pkg.sv tb/ecm_tb_pkg.sv tb/tb_ecm_system.sv
    ./obj_dir/Vtb_ecm_system

Every testbench ends with a line `TB_RESULT checks=N failures=M`. Each one
computes its expected values with its own big-integer models in
`tb/ecm_tb_pkg.sv`, not with the RTL.

| testbench | what it checks |
|---|---|
| tb_ecm_maddsub | random add/sub against reference results, range [0, 2Mt), latency 2b+3 |
| tb_ecm_mmul | random Montgomery products, range, latency b(b+2)+6 |
| tb_ecm_workspace | all ports and the host port against a model |
| tb_ecm_unit_port | read order, start and write-back against a model unit |
| tb_ecm_modulus_reg | word writes, reset |
| tb_ecm_instr_rom | scalar bits against an independently computed k, masks against primes found by trial division, program structure |
| tb_ecm_scheduler | routing, start/request lines, read latency |
| tb_ecm_core | a full phase 1 + 2 run at B1 = 20, B2 = 500 (44 products), against a reference ECM |
| tb_ecm_system | all 24 cores at full size, checked against the reference ECM |

In more detail, `tb_ecm_system` runs all 24 cores at the full default size,
with 151-bit moduli, B1 = 960 and B2 = 57000:

- each core gets its own random modulus and curve;
- each core's Q and d are checked against the reference ECM;
- it counts unit stalls, SYNC waits, swapped ladder steps, giant steps, table
  products, request lines and pipelined reads, and fails if any of these never
  happens.

It takes under a minute.

To change the operand size, set B_WORDS (5 … 15). To change the bounds, set B1
and B2. The ROM regenerates itself. The package limits are 1536 scalar bits,
320 giant steps and 1024 instructions. The instruction ROM stops elaboration with an
error when the bounds exceed them. The core testbench passes at b = 5,
10 and 15.
