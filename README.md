# Inexact Speculative Adder (ISA)

A binary adder is as slow as its longest carry chain. In uniformly random
operands, though, carry chains are almost always short. The inexact
speculative adder uses this. It cuts the 32-bit carry chain into a few equal
*paths* that add at the same time. Each path guesses its incoming carry from a
few operand bits just below it. A small compensation circuit then limits the
damage when the guess was wrong. The critical path shrinks to about one path
instead of 32 bits. The price is occasional, bounded, deterministic errors,
called *structural* errors here.

This adder is meant to be run with a shortened clock period, i.e.
overclocked. A conventional adder that misses its clock loses its most
significant bits first. The speculative adder spreads its late bits over the
ends of its short paths. The two error sources, structural and timing, can
therefore be traded against each other. The RTL here is the adder and its
clocked wrapper. Timing errors come from the gate-level delays of a given
technology, which RTL does not model. The testbenches therefore measure
structural errors, and they check every output against an independent
arithmetic model.

## Configurations: the quadruple (BLOCK, SPEC, CORR, RED)

An ISA is named by four bit-widths:

| name  | meaning                                                                                   |
|-------|-------------------------------------------------------------------------------------------|
| BLOCK | width of each path (sub-adder); WIDTH/BLOCK paths                                          |
| SPEC  | operand bits below a path that its carry speculator looks at (0: carry is always guessed) |
| CORR  | local-sum LSBs that compensation may increment/decrement                                   |
| RED   | MSBs of the preceding path's sum that compensation may force ("error reduction")          |

Eleven 32-bit configurations are listed in `rtl/isa_pkg.sv` (`ISA_CONFIGS`).
They range from (8,0,0,0), four 8-bit paths with blind carries, to (16,7,0,8).
The defaults of `isa_adder` and `isa_top` are **(8,0,0,4)**: four 8-bit
paths, every path carry guessed as 0, no correction and 4-bit error
reduction. This configuration gives the most even balance between structural
and timing errors under overclocking.

## Structure

```
   a,b slice of path i            top SPEC bits of a,b slice i-1
          |                                   |
          |                             +-----v------+
          |                  c_spec_i   |  isa_spec  |
          |            +----------------+------------+
          v            v                      |
     +------------------+                     | c_spec_i
     |    isa_add i     |--cout_i--> isa_comp i+1
     +------------------+                     v
          | raw sum_i                  +------------+
          v                            | isa_comp i |<---- cout_(i-1) of isa_add i-1
   sum_i: CORR LSBs  <-----------------|            |
          RED MSBs   <-- isa_comp i+1  +------------+----> RED MSBs of sum_(i-1)
```

* **Path 0** adds `a[BLOCK-1:0] + b[BLOCK-1:0] + cin` and is exact.
* **Path i > 0** has three parts:
  * `isa_spec` computes the group generate G and group propagate P of the
    SPEC operand bits just below the path. It outputs `G | (P & GUESS)`. A
    generate or a kill in the window decides the carry exactly. A window that
    only propagates gives the guess.
  * `isa_add` adds the path's slices with that speculated carry. Its
    carry-out goes to the next path's compensation block and is never
    chained further.
  * `isa_comp` compares the speculated carry with the actual carry-out of
    sub-adder i-1 and compensates when they differ (next section).
* `cout` is the carry-out of the top sub-adder.

No signal crosses more than one path boundary. The longest combinational
path is therefore one speculator or sub-adder plus one compensation field.

## Compensation: what happens on a wrong guess

This is the part of the design that takes the most care. A wrong carry has a
known sign. If `c_prev = 1` and `c_spec = 0`, the local sum is one
path-LSB unit too low. If `c_prev = 0` and `c_spec = 1`, it is one unit too
high. With the default guess of 0 only the first case occurs: the speculated
carry can only miss a carry, never invent one.

1. **Correction.** If CORR > 0, the CORR lowest bits of the local sum are
   incremented (too low) or decremented (too high). This repairs the sum
   exactly, unless the field is all ones (or all zeros): the change would
   then overflow out of the field, and that is not allowed, so nothing
   changes.
2. **Balancing (error reduction).** If the fault was not corrected and
   RED > 0, the RED highest bits of the *preceding* path's sum are forced to
   all ones (too low) or all zeros (too high). The lost unit at the local LSB
   is then partly made up by the highest bits below it. The residual error
   shrinks, and its relative size stays small because the wrong bit sits
   above the forced ones.

Both happen in parallel with the local addition, so they barely lengthen the
critical path. With CORR = 0 every fault is balanced. The structural errors
of (8,0,0,4) therefore show up only in bits 4-7, 12-15 and 20-23 of the
sum, i.e. the top nibble of each path below a speculated one.

Worked example: 16 bits, (4,2,1,1), guess 0, `0x1DFF + 0x8522` (exact
`0xA321`):

| path | window bits | c_spec | sub-adder sum | carry from below | action                               | result |
|------|-------------|--------|---------------|------------------|--------------------------------------|--------|
| 3    | P G         | 1      | 1010          | 1 (ok)           | none                                 | 1010   |
| 2    | P P         | 0      | 0010          | 1 (fault)        | LSB 0 -> corrected to 0011           | 0011   |
| 1    | P P         | 0      | 0001          | 1 (fault)        | LSB is 1, cannot correct: balance    | 0001   |
| 0    | -           | cin=0  | 0001          | -                | top bit forced to 1 by path 1's COMP | 1001   |

The result is `0x0A319`, an error of -8 against `0xA321`. `tb_isa_adder`
checks this value and its fault/correction/balancing flags.

## The clocked adder, `isa_top`

`isa_top` puts registers on both sides of `isa_adder`. Operands (`a`, `b`,
`cin`, `in_valid`) are sampled at a rising edge. The result (`sum`, `cout`,
`out_valid` and the per-path `fault`/`corrected`/`balanced` flags) is
registered at the next rising edge. That is one cycle of latency, and one
addition can be issued per cycle. The register-to-register path is exactly
the combinational ISA, so this is the path a shortened clock period
violates. When such a circuit runs overclocked, each output bit at cycle t
depends on the operands of cycles t and t-1. Reset is asynchronous and
active low, and clears every register.

## Parameters and ports

| module      | parameters (defaults)                                               | ports                                                                     |
|-------------|---------------------------------------------------------------------|---------------------------------------------------------------------------|
| `isa_top`   | WIDTH 32, BLOCK 8, SPEC 0, CORR 0, RED 4, GUESS 0                   | clk, rst_n, in_valid, a, b, cin -> out_valid, sum, cout, fault, corrected, balanced |
| `isa_adder` | same                                                                | a, b, cin -> sum, cout, fault, corrected, balanced (one bit per path)     |
| `isa_spec`  | SPEC_BITS 2, GUESS 0                                                | a, b (window) -> c_spec                                                   |
| `isa_add`   | BLOCK 8                                                             | a, b, cin -> sum, cout                                                    |
| `isa_comp`  | CORR 1, RED 1                                                       | c_spec, c_prev, local_lsb, prev_msb -> local_lsb_o, prev_msb_o, fault, corrected, balanced |

Constraints: WIDTH must be a multiple of BLOCK, SPEC <= BLOCK, and
CORR + RED <= BLOCK, so that a path's correction field and its balancing
field do not overlap. Elaboration stops with an error otherwise. Zero-sized
fields (SPEC, CORR or RED = 0) keep a one-bit port that is ignored. The leaf
modules default to the sizes of the worked example; the adder passes its own
values down. `isa_pkg` holds the configuration struct `isa_cfg_t`, the
configuration list and the default configuration.

## Structural error of the eleven configurations

`tb_isa_workloads` applies 10 million uniformly random unsigned operand
pairs (carry-in 0) to all eleven configurations and to an exact adder
(`isa_adder` with BLOCK = WIDTH). It reports the RMS of the signed relative
error RE = (sum - exact)/exact. One run gave:

| config     | RE RMS (%) | error rate |
|------------|-----------:|-----------:|
| (8,0,0,0)  | 0.66       | 0.874 |
| (8,0,0,2)  | 0.33       | 0.874 |
| (8,0,0,4)  | 0.27       | 0.874 |
| (8,0,1,4)  | 0.19       | 0.577 |
| (8,0,1,6)  | 0.18       | 0.577 |
| (16,0,0,0) | 3.4e-3     | 0.500 |
| (16,1,0,0) | 2.5e-3     | 0.250 |
| (16,1,0,2) | 7.9e-4     | 0.250 |
| (16,2,0,4) | 2.5e-4     | 0.125 |
| (16,2,1,6) | 1.1e-4     | 0.063 |
| (16,7,0,8) | 1.1e-6     | 0.004 |
| exact      | 0          | 0     |

The RMS is dominated by rare operand pairs with a small exact sum, so it
moves by some ten percent from one random sample to the next. The error
rate is stable. For (8,0,0,4) the testbench also prints how often
balancing changed each bit: about 0.26, 0.28, 0.31 and 0.37 for bits 4 to
7 of each of the three lower paths, and zero everywhere else.

These agree in magnitude with the published characterisation of these
adders. The testbench checks the ordering of the two extremes, not these
values. In configurations without correction the error is never positive.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_isa_spec`      | carry = carry-out of (window + guess), exhaustive for 2 bits, random for 7 bits with guess 1 |
| `tb_isa_add`       | 8- and 16-bit sums against integer addition |
| `tb_isa_comp`      | all inputs for (1,1) and (0,4), random for (2,3), against a value-based expectation; the worked example's two cases |
| `tb_isa_adder`     | worked example; (8,0,0,4), (16,2,1,6), (8,2,2,4) with guess 1 and an exact 32-bit path against the reference model (20,000 vectors, biased towards long propagate chains); every compensation case must occur |
| `tb_isa_top`       | streaming with idle cycles through three configurations; one-cycle latency, reset, every mechanism counted (fault, up/down correction, up/down balancing, exact and inexact results, idle, back-to-back) |
| `tb_isa_top_full`  | `isa_top` with all defaults, 20,000 back-to-back additions |
| `tb_isa_workloads` | the eleven configurations plus exact adder, 10 million samples, error statistics above, and the (8,0,0,4) balancing-field rule |

`tb/tb_isa_ref_pkg.sv` holds the reference model. It works on integer path
values, not on the RTL's bit slices. To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/isa_pkg.sv tb/tb_isa_ref_pkg.sv rtl/isa_spec.sv rtl/isa_add.sv \
  rtl/isa_comp.sv rtl/isa_adder.sv rtl/isa_top.sv tb/tb_isa_top.sv \
  --top-module tb_isa_top
./obj_dir/Vtb_isa_top
```

Every testbench finishes in seconds; `tb_isa_workloads` with 10 million
samples takes the longest, well under a minute.

## What follows the original description and what is this design's own

Taken from the original design:
* the path structure and the roles of speculator, sub-adder and compensator;
* carry look-ahead speculation over a limited window, with a guessed carry
  when the window only propagates (guess 0);
* fault detection against the preceding sub-adder's carry-out;
* correction of the local LSBs unless that would overflow, with balancing of
  the preceding MSBs otherwise;
* an exact LSB path using the carry-in;
* the eleven 32-bit configurations and the (8,0,0,4) reference.

This implementation's own choices:
* **Balancing forces bits, it does not invert them.** The original text
  speaks of flipping the preceding MSBs. Its example flips a 0 to a 1, which
  forcing also does. Forcing always reduces the error; inverting a bit that
  is already 1 would increase it.
* **Overflow test.** "Correction impossible" is taken to mean that the
  correction field is all ones (all zeros for a decrement).
* **GUESS is a parameter.** With GUESS = 1 the decrement and
  force-to-zero branches become reachable. With the default 0 they are
  unused logic.
* **Status flags.** `fault`, `corrected` and `balanced` are outputs added
  for observation. Removing them changes nothing else.
* **Wrapper details.** The register wrapper, the valid signal and the reset
  are interpretations of a circuit that takes one operand pair per clock
  cycle.
* **Adder structure.** `isa_add` uses `+` and leaves its structure to
  synthesis.

Not included:
* different widths for different paths. The architecture allows each path
  and each of its blocks to be sized on its own. All the characterised
  adders are uniform, and so is this RTL. A non-uniform version would need
  per-path parameter arrays in `isa_adder`;
* the gate-level timing errors of an overclocked 65 nm implementation;
* the per-bit random-forest model that predicts those timing errors. That
  model is software trained on such simulations, not hardware.

To study overclocking, synthesise `isa_top` for a target clock, annotate the
netlist delays, and run `tb_isa_top_full` or `tb_isa_workloads` at shorter
clock periods. Compare the outputs ("silver") with the RTL results
("golden", structural error only) and with exact addition.
