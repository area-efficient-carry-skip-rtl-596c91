# Hybrid carry skip adder with a Ladner-Fischer nucleus and CBL ripple stages

A carry skip adder (CSKA) cuts an n-bit addition into stages. Each stage adds
its own bits locally, and the carry runs from stage to stage through one small
gate per stage instead of rippling through every bit. This design builds a
32-bit CSKA of that kind, with four refinements:

* **Variable stage sizes.** The stages are 1, 1, 1, 2, 2, 3, 3, 4, **5**, 4, 3, 2, 1
  bits wide, from the least significant stage upwards. Short stages at both
  ends keep the ripple at the start of the carry path and the
  incrementation at its end short. The long stages in the middle sit where
  the carry is busy skipping anyway.
* **Concatenation/incrementation stages with compound-gate skip logic.** Every
  stage after the first adds its bits with carry-in 0. It then adds the
  incoming carry afterwards with a half-adder chain. The carry skip itself is
  a single AOI or OAI gate, not a multiplexer.
* **A parallel prefix nucleus.** The widest stage (the *nucleus*, stage 9) is
  a Ladner-Fischer parallel prefix adder, not a ripple stage.
* **CBL full adders.** The ripple-carry blocks use common-Boolean-logic full
  adders. These form the result for both values of the carry-in and pick one.

Around the adder sit two users of it. The first is a **variable latency unit**
that finishes most additions in one clock cycle and takes two when a
predictor flags the long carry path. The second is a **single precision
floating point adder** whose significand adder is the same hybrid CSKA.

## How a stage forms its sum and carry

Stage 1 is a plain ripple-carry adder (RCA) that takes the adder's carry-in.
Every later ripple stage `j` with `M` bits works in three parts:

```
          a[j], b[j]
              |
      +-------v--------+   z (M bits)   +---------------------+
      | M-bit CBL RCA  |--------------->| half-adder chain    |---> sum[j]
      | carry-in = 0   |                | z + C(j-1)          |
      +---+--------+---+                +----------^----------+
          | g      | p = AND(a^b)                  |
          v        v                               |
      +-----------------+                          |
      | AOI / OAI gate  |<------ C(j-1) -----------+
      +--------+--------+
               v
             C(j) = g | p & C(j-1)
```

The RCA does not depend on the incoming carry, so all RCAs work at the same
time. Only the skip gate waits for the incoming carry. The incrementation
block adds it to the stage's bits afterwards.

**Carry polarity alternates.** A compound gate inverts. An AOI fed with a true
carry computes `~(g | p & c)`, which is the complemented carry. An OAI fed
with the complemented carry and with `~g` and `~p` computes
`~(~g & (~p | ~c))`, which is the true carry. Stage 1 hands on a true carry,
so the adder uses:

| stage number | gate | carry in     | carry out    |
|--------------|------|--------------|--------------|
| even         | AOI  | true         | complemented |
| odd, >= 3    | OAI  | complemented | true         |

A stage that receives a complemented carry inverts it once before its
incrementation block. With 13 stages the last gate is an OAI, so the carry-out
is already true. With an even number of stages it is inverted once more at the
output. This alternation is the part most likely to break if you change the
code. The `ci_cska_stage` and `modified_hybrid_cska` testbenches cover both
polarities.

The **CBL full adder** (`cbl_full_adder`) forms `(a^b, a&b)` for carry-in 0
and `(~(a^b), a|b)` for carry-in 1. The incoming carry selects one pair. It
also exports `a^b`, which the RCA ANDs into the group propagate `p`.

## The nucleus: a modified Ladner-Fischer prefix adder

`ladner_fischer_ppa` replaces the ripple stage at the widest position. Its
layers are:

1. **Pre-processing:** `p_i = a_i ^ b_i`, `g_i = a_i & b_i`.
2. **Prefix network (Ladner-Fischer):** this layer has `ceil(log2 M)` levels.
   At level `l`, every bit `i` whose bit `l` is set combines with bit
   `j = floor(i / 2^l) * 2^l - 1`, the top bit of the block below it. The
   combine is `G = G_i | P_i & G_j` and `P = P_i & P_j`. All other bits pass
   through. At the end, every bit `i` holds `G(i:0)` and `P(i:0)` of the stage.
   The depth is minimal, and the fan-out at the last level is `M/2`.
3. **Skip gate:** the stage carry-out is `G(M-1:0) | P(M-1:0) & C(p-1)`. It
   uses the same AOI/OAI gate and polarity rule as a ripple stage, so the
   nucleus stays in the carry chain.
4. **Added level:** a row of grey cells merges the incoming carry into every
   prefix, `c_(i+1) = G(i:0) | P(i:0) & C(p-1)`. The prefix network does not
   wait for the incoming carry. Only this one extra level does.
5. **Post-processing:** `s_i = p_i ^ c_i`, with `c_0 = C(p-1)`.

The whole-group propagate `P(M-1:0)` is also brought out as `grp_p`. It drives
the latency prediction.

The module's default width is 16 bits. Inside the 32-bit adder the nucleus is
5 bits wide, because that is the size of stage 9.

## Variable latency: one or two cycles

A carry can travel from below the nucleus, through it, and up to the top
only if every bit of the nucleus propagates. If any nucleus bit does not
propagate, the carry chain is cut there, and every active path is one of the
shorter ones. The adder therefore exports `two_cycle = P(nucleus)`. This
signal is known from the operands alone, without waiting for carries.

`variable_latency_adder` uses `two_cycle` to run the adder at a clock period
that covers only the short paths:

```
edge k    : {a, b, cin} accepted (in_valid & in_ready), operands registered
edge k+1  : two_cycle = 0 -> result registered, out_valid = 1 after this edge
            two_cycle = 1 -> in_ready was 0 in this cycle (stall), wait
edge k+2  : two_cycle = 1 -> result registered, out_valid = 1 after this edge
```

Short operations run back to back at one per cycle. Each long operation holds
the input for one extra cycle. `out_two_cycle` reports which route a result
took. Reset is synchronous and active low. It clears the valid state and the
registers.

With random operands, a 5-bit nucleus propagates fully for 1 operand pair in
32. The default 32-bit adder therefore needs the second cycle rarely.

## Floating point adder

`fp_adder` is a combinational IEEE 754 binary32 adder:

* **Unpack and order.** The operand with the larger magnitude becomes L, the
  other becomes S.
* **Align.** S's significand is shifted right by the exponent difference.
  Guard, round and sticky bits keep what is shifted out.
* **Add or subtract.** The 28-bit significand operation runs on the 32-bit
  hybrid CSKA (`modified_hybrid_cska`). A subtraction feeds the inverted
  operand and a carry-in of 1.
* **Normalise.** The result shifts right once after a significand carry, or
  left by the leading-zero count after cancellation.
* **Round** to nearest, ties to even.

Special cases:

* NaN inputs, and inf - inf, give `0x7FC00000`.
* An infinite operand passes through.
* A result that overflows becomes infinity.
* Subnormal inputs count as zero.
* Results below `2^-126` flush to a zero with the sign of the exact sum.
* Exact cancellation gives `+0`, and `-0 + -0` gives `-0`.

## Module map

```
cska_top
 +- variable_latency_adder        (registers, handshake, one/two-cycle control)
 |   +- modified_hybrid_cska       (13 stages, 32 bits)
 |       +- optimized_rca          stage 1
 |       |   +- cbl_full_adder
 |       +- ci_cska_stage          stages 2-8 and 10-13
 |       |   +- optimized_rca, skip_logic, incrementation_block
 |       +- ladner_fischer_ppa     stage 9, the nucleus
 |           +- skip_logic
 +- fp_adder
     +- modified_hybrid_cska       (significand adder)
cska_pkg  stage-size list, size helpers, fp32_t
```

The whole adder is described at gate level. The structure (which signal
waits for which) is visible in the RTL. Synthesis is free to restructure
it, however, so a netlist keeps these delay properties only if the
hierarchy is kept and the cells are mapped with care.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `modified_hybrid_cska`, `variable_latency_adder` | `NSTAGES` | 13 | number of stages |
| same | `STAGE_SIZE` | `{8'd1,8'd2,8'd3,8'd4,8'd5,8'd4,8'd3,8'd3,8'd2,8'd2,8'd1,8'd1,8'd1}` | packed list of stage widths, **stage 13 first** (MSB) down to stage 1; the adder width is their sum and the nucleus is the first widest stage |
| `ladner_fischer_ppa` | `M`, `INV_IN` | 16, 0 | width; carry input complemented (OAI form) |
| `ci_cska_stage` | `M`, `INV_IN` | 4, 0 | same for a ripple stage |
| `optimized_rca`, `incrementation_block` | `M` | 4 | width |

To build another width, pass a new list. The example below gives a 64-bit
adder with a 16-bit nucleus at stage 10:

```systemverilog
modified_hybrid_cska #(
  .NSTAGES(14),
  .STAGE_SIZE({8'd2, 8'd3, 8'd5, 8'd7, 8'd16, 8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd2, 8'd1, 8'd1})
) u_add64 (...);
```

Rules for the list:

* Stage 1 must not be the widest stage, because it has no skip gate.
* The list may have at most 64 entries.
* Each entry must be at least 1.

The floating point adder needs the adder to be at least 28 bits wide. It
uses the default list.

## Where the design departs from its source material, and why

These points are taken from the published design:

* the stage structure;
* the AOI/OAI skip gates with alternating carry polarity;
* the stage size list;
* the CBL full adder;
* the Ladner-Fischer nucleus with its added carry level and the cell
  equations;
* the use of the nucleus propagate for a one-cycle/two-cycle prediction;
* the use of the adder in a floating point unit.

These are choices made here:

* **Nucleus width.** The published text speaks of a 16-bit Ladner-Fischer
  adder. Its 32-bit stage table, however, gives the nucleus as 5 bits. The
  32-bit adder follows the table. `ladner_fischer_ppa` defaults to 16 bits,
  and a 64-bit configuration with a 16-bit nucleus is tested separately. The
  stage list for that 64-bit configuration is not published. The one above
  is made up: it rises to the nucleus and falls after it.
* **Adder width.** The published comparison quotes a 64-bit adder, but stage
  sizes are given only for 32 bits. The default is 32 bits.
* **Variable latency control.** Only the idea and the predictor are
  published. The handshake, the registers, the latencies counted in edges and
  the reset are this design's own.
* **Floating point adder.** No format or rounding mode is given. It is built
  as a binary32 round-to-nearest-even adder with flush-to-zero for
  subnormals.
* **Skip gate inputs.** In the OAI form, `g` and `p` are inverted explicitly
  inside `skip_logic`. A cell-level design would take the complemented
  signals from its NAND/NOR-based RCA.
* **Not modelled.** Gate counts and physical delay are not modelled. The
  published comparison is in FPGA slices and nanoseconds, and no figure of
  that kind is reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `cbl_full_adder_tb`, `skip_logic_tb` | exhaustive truth tables |
| `optimized_rca_tb`, `incrementation_block_tb`, `ci_cska_stage_tb` | exhaustive at 4-5 bits, both carry polarities |
| `ladner_fischer_ppa_tb` | 16-bit: corners and 20k random pairs; 5-bit (OAI) and 3-bit: exhaustive |
| `modified_hybrid_cska_tb` | 32-bit: carry chains from every bit and 50k random pairs; 8-bit even-stage and 7-bit odd-stage lists: exhaustive; prediction against the nucleus bits |
| `variable_latency_adder_tb` | 4000 operations with random gaps; value, latency (2 or 3 edges after acceptance) and stall behaviour |
| `fp_adder_tb` | directed cases (ties, rounding carry, overflow, NaN, inf - inf, flush) and 200k random pairs |
| `cska_top_tb` | the whole design at default sizes: 20000 integer operations and one floating point pair per cycle; fails if any of these never occurs: short op, long op, stall, carry-out, alignment, effective subtraction, left or right normalisation, overflow, NaN, flush |
| `cska64_workload_tb` | the 64-bit, 16-bit-nucleus configuration, 50k random pairs and carry chains |

The floating point reference (`tb/fp_ref_pkg.sv`) does not reuse the adder's
algorithm. It turns both operands into exact integers in units of `2^-149`,
adds them exactly, and rounds once.

Run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cska_pkg.sv tb/fp_ref_pkg.sv tb/cska_top_tb.sv --top-module cska_top_tb -o sim
./obj_dir/sim
```

Replace `cska_top_tb` with any testbench name. Every run takes a few seconds.
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/cska_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused signals in `fp_adder`: the top four
bits of the 32-bit significand adder, its carry-out and its prediction
output. These are unused by construction.
