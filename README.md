# Microcoded GF(p) elliptic curve processor with parallel field ALUs

This processor computes the elliptic curve scalar product Q = [k]P over a prime
field GF(p) (192-bit field and key by default). It was built to compare point
formulas in hardware, so the circuit is fixed and the algorithm lives in a
microcode ROM. The ROM holds four programs:

| `alg` | program | curve, coordinates | per key bit |
|---|---|---|---|
| 0 `ALG_DA`  | Double-and-Add | short Weierstrass, Jacobian | double; add P if the bit is 1 |
| 1 `ALG_DAA` | Double-and-Add-Always | short Weierstrass, Jacobian | double; always add; keep one by key bit |
| 2 `ALG_TE`  | twisted Edwards | a x² + y² = 1 + d x² y², projective | doubling formula; addition formula if the bit is 1 |
| 3 `ALG_TEU` | twisted Edwards, strongly unified | same | one unified formula for the doubling and the addition |

The datapath is a bank of `NALU` identical field ALUs (modular add, subtract,
Montgomery multiply) that work in lock-step on independent operations. They
share one dual-port RAM that holds every field element. A controller walks the
ROM. Raising `NALU` from 1 to 4 shortens each point operation, but only as far
as the data dependencies in the formula allow. Measuring how far is the point
of the design.

The processor uses projective coordinates throughout and never inverts. The
result is left projective; converting it to affine coordinates (one field
inversion) is up to the user.

## Block structure

```
            +------------------------------ ecp_top ------------------------------+
 start,alg, |  ecp_controller  --addr-->  ecp_rom (programs, scheduled for NALU)  |
 key ------>|     |   ^  <--ctrl/slots--                                          |
 busy,done <|     |   |                                                           |
            |  RAM port A/B   operands / results                                  |
 host port ==> ecp_ram (64 x PB) <====>  gfp_alu[0] .. gfp_alu[NALU-1]  <- modulus |
            +-------------------------------------------------------------------+
```

* `gfp_alu`: one field ALU.
* `ecp_ram`: the operand store. It is a true dual-port RAM with synchronous
  reads.
* `ecp_rom`: the microcode. Its contents are built when the design elaborates,
  for the configured `NALU`.
* `ecp_controller`: the sequencer. It also keeps the key register.
* `ecp_pkg`: the shared types: ALU modes, slot and instruction formats, and the
  memory map.

## The field ALU (`gfp_alu`)

`op` (the mode bits) selects the operation. Operands must be below p, and the
result is always below p.

* **Add.** A first adder forms a + b. A second adder adds the inverted modulus
  with carry-in 1, which gives a + b − p. If the second adder carries out,
  then a + b ≥ p and its result is taken; otherwise the first sum is taken.
  This takes 2 cycles: both sums are registered, then one is selected.
* **Subtract.** a + ~b + 1. If there is no carry out (a < b), p is added
  back. This also takes 2 cycles.
* **Montgomery multiply.** Bit-serial, one bit of B per cycle:
  `s = R + b_i·A; if s is odd, s += p; R = s/2`. This runs for PB+2 cycles,
  the two extra bits of B being zero. The result is
  R = A·B·2^−(PB+2) mod p, in the range [0, 2p). A compare-and-subtract in the
  last cycle brings it below p.

Timing is counted from the clock edge that samples `start`. `done` pulses 2
cycles later for add and subtract, and PB+2 cycles later (194 at the default)
for multiply. `y` holds the result until the next start.

Montgomery form. The programs convert P, a and d into Montgomery form by
multiplying with R2 = 2^(2(PB+2)) mod p. At the end they convert Q back by
multiplying with the integer 1. Every multiplication in between stays in
Montgomery form. Additions and subtractions do not care which form a value is
in.

## Microcode and how it is scheduled (`ecp_rom`)

This is the least obvious part of the design.

**Instruction format** (`ecp_pkg`). A ROM word is a control field
`{iop, target}` plus `NALU` slots. Each slot is
`{op, ksel, src_a, src_b, dst}`, with RAM word addresses.

* `I_STAGE` runs every non-NOP slot at once: slot *i* goes to ALU *i*. All
  operands are read before any result is written. A slot may therefore
  overwrite a word that another slot of the same stage reads.
* `I_SHIFT` moves to the next key bit.
* `I_BRZ target` branches when no key bits are left.
* `I_BRK0 target` branches when the current key bit is 0.
* `I_JMP target` always branches. `I_HALT` ends the program.
* `ksel` in a slot makes the first operand come from `src_a + 32` when the
  current key bit is 1. Double-and-Add-Always uses it to select
  Q[0] = Q[k_i] without a branch that depends on the key. It is done as three
  additions of a zero word from either Q[0] or Q[1] (Q[1] is kept at
  Q[0] + 32).

**Writing the programs.** Each point formula is written in `ecp_rom.sv` as a
plain sequence of field operations, in one-ALU order. Small constants are
made with repeated additions (2A, 3X², 8Y⁴).

| formula | multiplications | additions/subtractions |
|---|---|---|
| Jacobian doubling | 10 | 13 |
| Jacobian addition | 16 | 7 |
| twisted Edwards doubling | 8 | 7 |
| twisted Edwards addition | 13 | 7 |
| unified twisted Edwards | 14 | 4 |

**Packing for NALU ALUs.** The ROM's initialisation code list-schedules each
straight-line block. An operation may go into a stage when three things hold:

* every earlier operation that writes one of its operands, or its
  destination, sits in an earlier stage;
* every earlier operation that reads its destination sits in the same stage or
  an earlier one (allowed, because reads come first);
* the stage has a free slot.

Each block is scheduled three ways, and the schedule with the fewest estimated
cycles is kept (a multiplication stage costs about 200 cycles, an add-only
stage about 12):

1. Operations in program order, each placed as early as possible.
2. Stage by stage, taking first the ready operation with the most
   multiplications still ahead of it on its dependency chain.
3. As 2, but each stage holds only multiplications or only
   additions/subtractions.

The packed program computes exactly what the sequential one does. Branch
targets move when `NALU` changes, so the generator runs twice: the first pass
finds the labels and the second pass emits the program with them.

Packing results, counted as multiplication-bearing stages plus
add/subtract-only stages per point operation:

| NALU | DA double | DA add | DAA iteration | TE double | TE add | TEU (either) | ROM words |
|---|---|---|---|---|---|---|---|
| 1 | 10 + 13 | 16 + 7 | 26 + 23 | 8 + 7 | 13 + 7 | 14 + 4 | 241 |
| 2 | 5 + 7 | 8 + 6 | 14 + 15 | 5 + 3 | 7 + 4 | 8 + 2 | 149 |
| 3 | 5 + 7 | 7 + 5 | 10 + 14 | 3 + 2 | 6 + 1 | 5 + 1 | 115 |
| 4 | 5 + 5 | 6 + 6 | 9 + 14 | 3 + 3 | 5 + 1 | 5 + 1 | 112 |

The schedulers are heuristics, not an optimum search. The unified formula
cannot use a fourth ALU: its dependency chain is five multiplications deep.
Twisted Edwards doubling stops gaining at 3 ALUs.

**Program shape** (all four):

1. Write ZERO.
2. Convert P, a and d to Montgomery form, and set Q = P.
3. SHIFT past the leading 1 bit of k, and BRZ to the end if it was the only
   bit.
4. Loop body: double, then add or select according to the program. Then
   SHIFT, BRZ to the end, and JMP back to the loop.
5. Convert Q out of Montgomery form, and HALT.

## Controller and timing (`ecp_controller`)

On `start` the key is loaded. The controller then shifts it left until its top
bit is 1, one cycle per leading zero, and counts the bits left. A control word
costs 2 cycles (fetch, decode). A stage word costs:

```
2 (fetch, decode) + ceil(2N/ports) (operand reads) + 2 (last read data, ALU start)
  + (slowest ALU latency + 1) + ceil(N/ports) (result writes)
```

Here N = `NALU`, and ports is 2 (`DUAL_PORT=1`) or 1 (port A only). With 4
ALUs and a dual-port RAM, a multiplication stage is 204 cycles and an
add-only stage is 12.

Measured cycles for one point multiplication, with a 192-bit key of Hamming
weight 96 (the top bit set):

| configuration | DA | DAA | TE | TEU |
|---|---|---|---|---|
| 1 ALU, single-port RAM | 728 107 | 1 050 447 | 581 913 | 824 015 |
| 2 ALUs | 368 257 | 571 173 | 339 527 | 470 653 |
| 3 ALUs | 354 575 | 423 697 | 241 247 | 297 503 |
| 4 ALUs | 334 613 | 388 938 | 225 687 | 299 031 |

At 10 MHz the 4-ALU twisted Edwards run takes 22.6 ms.

* The twisted Edwards program is the fastest in every configuration.
* Going from 3 to 4 ALUs gains little for any program, and nothing for the
  unified one.
* The side-channel-resistant unified program runs close to plain
  Double-and-Add from 3 ALUs up, and well ahead of Double-and-Add-Always.

ALU efficiency, measured over the same runs as multiplications divided by
(multiplication stages × ALUs), shows how well each program keeps the
multipliers busy:

| ALUs | DA | DAA | TE | TEU |
|---|---|---|---|---|
| 1 | 1.000 | 1.000 | 1.000 | 1.000 |
| 2 | 1.000 | 0.929 | 0.853 | 0.875 |
| 3 | 0.706 | 0.867 | 0.806 | 0.933 |
| 4 | 0.563 | 0.723 | 0.660 | 0.700 |

Efficiency generally falls as ALUs are added, most of all from 3 to 4. The
unified program at 3 ALUs is the exception: its formula happens to split
into groups of three. Double-and-Add-Always stays high because its doubling
and addition form one block, giving the scheduler more independent work.
Plain Double-and-Add drops the most: its doubling and its addition are
scheduled separately, and each has little work that can run in parallel.

Double-and-Add-Always runs for a time that does not depend on the key bits.
The unified program uses the same operation sequence for both steps, but its
loop still branches on the key bit, so the number of additions shows in its
run time.

## Using the processor

While `busy` is low, the host owns RAM port A (`host_en`, `host_we`,
`host_addr`, `host_wdata`). Read data appears on `host_rdata` one cycle after
`host_en`. `modulus` must hold the odd prime p (with 4p < 2^(PB+2)) for as long
as the processor is in use.

1. Write plain integers below p:

   | word | content |
   |---|---|
   | 0, 1, 2 | P = (X, Y, Z) (Z = 1 for an affine point) |
   | 6 | a (twisted Edwards a, or Weierstrass a4) |
   | 7 | d (any value for the Weierstrass programs) |
   | 8 | 2^(2(PB+2)) mod p |
   | 9 | 1 |

2. Pulse `start` for one cycle with `alg` and a **non-zero** `key`.
3. Wait for the `done` pulse, then read Q from words 3, 4 and 5 as plain
   integers. For twisted Edwards the affine point is (X/Z, Y/Z); for Jacobian
   it is (X/Z², Y/Z³).

Words 0–2, 6 and 7 are left in Montgomery form, so reload them before the next
run. Words 10–31 are temporaries, and Q[1] sits at words 35–37.

Limits that follow from the formulas:

* Double-and-Add uses the incomplete Jacobian addition. It fails if an
  intermediate Q equals ±P, which cannot happen for k below the order of P.
* The twisted Edwards formulas must not see the singular points (1:0:0) and
  (0:1:0).

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The reference model (`tb/ecc_ref_pkg.sv`) uses affine big-integer arithmetic
with `%` and Fermat inversion. It shares no formula with the RTL. Test curves
are made to pass through a random point: for twisted Edwards, d is solved
from the point; for Weierstrass, B is never needed.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/ecp_pkg.sv tb/ecc_ref_pkg.sv tb/tb_ecp_top.sv --top-module tb_ecp_top
./obj_dir/Vtb_ecp_top
```

Replace `tb_ecp_top` with any other bench:

| bench | what it covers | sim time |
|---|---|---|
| `tb_gfp_alu` | 610 add/sub/mul against big integers; latencies 2 and 194 | s |
| `tb_ecp_ram` | random dual-port traffic against a reference array | s |
| `tb_ecp_rom` | runs the 3-ALU programs on an abstract machine and checks the points; checks stage structure and 1-ALU operation counts | s |
| `tb_ecp_controller` | hand-written program on behavioural ALUs, single-port mode: parallel slots, read-before-write, ksel, every branch, exact cycle counts | s |
| `tb_ecp_top` | the default configuration, unchanged: all four programs with keys 1, 2, 3, 11 and random 192-bit keys; point results and exact cycle counts (predicted by walking the ROM); counts that every mechanism occurred | ~10 s |
| `tb_ecp_workloads` | the 192-bit, weight-96 key on 1 (single-port), 2, 3 and 4 ALUs; checks results, cycle counts and multiplication counts; prints the cycle and efficiency tables above | ~10 s |

## Where this design departs from, or adds to, its source

* **Schedules are generated, not hand-made.** The original used an offline
  program generator. Here the ROM packs the formulas itself, and stages may
  mix multiplications with additions. Stage counts differ from the original's
  tables in some cases (see above): most are equal or lower, and twisted
  Edwards doubling with 2 ALUs takes one multiplication stage more. Per-operation clock counts are also higher
  by about 10 cycles per stage, because RAM transfers are not overlapped with
  computation.
* **Formula details.** Jacobian addition uses C = Y1·Z2³, and doubling uses
  Z3 = 2·Y1·Z1 (the standard forms). Twisted Edwards addition as written needs
  13 multiplications and 7 additions. The unified formula needs 14
  multiplications and 4 additions/subtractions. The strongly unified program
  is Double-and-Add with the unified formula in both places.
* **Own choices.** These are all this design's:
  * the instruction set and the `ksel` select;
  * the 64-word RAM and the memory map beyond words 0–7;
  * the start/done handshake and the host port;
  * the asynchronous active-low reset;
  * skipping leading zero key bits;
  * the final subtraction of the Montgomery product.
* **Not built:** the extension-field GF(2^m) option of the original
  architecture, conversion of the result to affine coordinates, and any
  FPGA-specific primitives. The RAM and ROM are written as arrays.
* The ROM contents come from an `initial` block that calls tasks working on
  module-level arrays. Simulators handle this directly. A synthesis front end
  that only accepts memory initialisation it can evaluate as a constant
  function (no tasks, no module state) will not build the ROM. For such a
  flow, simulate once, dump `rom_ctrl`/`rom_slots` with `$writememh` and load
  them with `$readmemh` instead.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ecp_top`, `ecp_controller` | `PB` | 192 | field size in bits |
| | `KEYBITS` | 192 | scalar length |
| | `NALU` | 4 | parallel ALUs (the ROM reschedules itself) |
| | `DUAL_PORT` | 1 | 0: single-port RAM use (port A only) |
| `ecp_pkg` | `ADDR_W` | 6 | RAM address width (the memory map assumes ≥ 6) |
| | `PC_W` | 9 | ROM address width |
