# First-order masked ALU for a RISC-V masking extension (hardened)

This is a 32-bit ALU that computes on secrets without ever holding them in
plain form. It is built to sit in the execute stage of a RISC-V core whose
instruction set has been extended with masked instructions. Every secret word
`x` travels as two random-looking shares `(s0, s1)` with `x = s0 ^ s1`. The ALU
computes the shared result from the shared operands, using fresh random masks
that a Keccak-f[800] generator supplies every cycle.

The point of this version is *where the registers are*. A handcrafted masked
ALU can be correct for every input and still leak under the glitch- and
transition-extended probing model. In that model, an attacker who probes one
wire also sees every register output that feeds it through combinational
logic, and both the old and new value of a register. The design starts from an
existing single-cycle-per-operation masked ALU and adds registers, and clears
them, at every point where such an extended probe could combine the two
shares of a secret. It also changes mask assignments where one mask was shared
by two units. The cost is latency and area:

| operation                          | cycles |
|------------------------------------|--------|
| MASK, REMASK                       | 1      |
| NOT, AND, OR, XOR                  | 2      |
| SLL, SRL, ROR (by `shamt`)         | 2      |
| ADD, SUB                           | 13     |
| B2A (Boolean to arithmetic sharing) | 14    |

The design makes no security claim beyond that of its construction rules. The
testbenches check function, latency and the clearing behaviour. One of them
also runs a simple register-level fixed-versus-random test (see
*Files and verification*). No glitch-aware probing-model tool was run, and no
measurements were taken on hardware.

## Sharing conventions and the mask budget

* A Boolean sharing of a word is a `share_t` struct `{s1, s0}` (defined in
  `masked_alu_pkg`). For B2A the result is an arithmetic sharing instead:
  `x = u0 - u1 mod 2^32`.
* At the ALU ports, share 1 of every operand and of the result is
  **bit-reversed** (`BREV = 1`). The core keeps one share of each value in
  reversed order, so the two shares of one value never sit on the same bit
  lines in the pipeline. The ALU undoes the reversal on entry and reapplies it
  to `rd_s1`.
* The ALU takes six fresh 32-bit masks per cycle, `z = {z5, ..., z0}` (192
  bits). Each mask has a fixed job:

| mask        | used by                                                       |
|-------------|---------------------------------------------------------------|
| z0, z1      | blinding sharing of operand b in the DOM-dep AND              |
| z4          | refresh of the cross terms in the DOM-dep AND                 |
| z2          | refresh of the propagate chain (DOM-indep) in the adder       |
| z3          | refresh of the generate chain (DOM-indep\*) in the adder      |
| z2, z3 (sampled) | the arithmetic mask `z2s ^ z3s` of B2A                   |
| z5          | XOR remasking, and MASK/REMASK                                |

  Two mask choices matter for security. MASK/REMASK use z5, not z0: z0 also
  blinds the AND, and while any bitwise operation ran, a probe on the output
  could see both. The XOR remask also uses its own mask, z5. When any of the
  other masks, or no mask at all, took that role, a leak appeared in the
  adder.

## Units

### DOM-dep AND (`dom_dep_and`)

A first-order AND of two sharings that may depend on each other. The sharing
of b is blinded with a fresh sharing `(z0, z1)`. Each blinded share
`b_i ^ z_i` is registered in its own domain, so the combined value `b ^ z`
after the registers is uniformly random and can be public. Each domain then
multiplies its share of a by it. The correction term `a & z` is a DOM-indep
product of a with `(z0, z1)`, with its two cross terms refreshed by z4. All
four terms are registered:

```
q0 = a0 & (bz0 ^ bz1) ^ [a0 & z0] ^ [a0 & z1 ^ z4]
q1 = a1 & (bz0 ^ bz1) ^ [a1 & z1] ^ [a1 & z0 ^ z4]      [ ] = register
```

A cheaper two-mask variant exists, and so does a realisation of it without
the registers on the blinded operand. That realisation lets a probe on `q0`
reach `z0`, `b0` and `z0 ^ b1` together, which reveals `b`. This design uses
the three-mask version, so every mixed term is behind a register. Latency is
one cycle. All registers clear when `en` is low.

### BoolBitwise (`bool_bitwise`)

This unit computes XOR, NOT, AND and OR of two sharings in parallel:

* XOR is computed per domain, remasked with z5, then **registered**. Without
  that register the remasking is useless: a glitch-extended probe sees z5
  itself.
* NOT inverts share 0. It is registered here too, so every bitwise result has
  the same latency.
* AND uses the DOM-dep gadget. OR reuses the same gadget through De Morgan: it
  inverts share 0 of both inputs and of the output. These are linear steps
  that stay inside domain 0.

The adder's preprocessing comes from the same outputs: propagate `p = a ^ b`
is the XOR output, and generate `g = a & b` is the AND output.

### Iterative Kogge-Stone adder (`bool_adder`, `dom_indep`, `bool_arith`)

This unit is the hardest part of the design to follow.

Addition runs in two steps. BoolBitwise first computes `p` and `g`. The
adder then runs six iterations of a carry network over the shared words:

```
P <- P & (P << y)            DOM-indep  (refresh z2)
G <- G ^ (P & (G << y))      DOM-indep* (refresh z3; the "^ G" is folded in)
sum = p ^ (G << 1 | cin)
```

In each group, G and P are never both 1, so the textbook `G | (P & G')` can
be an XOR. The whole update is then linear except for the AND. The shifts
`y` are 1, 2, 4, 8, 8, 8, so the carry span grows as 2, 4, 8, 16, 24, 32 bits.
The overlapping groups of the last two iterations are harmless. A 6-bit
one-hot ring counter (`000001` to `100000`) drives the shifters and the two
input multiplexers. In iteration 1, the multiplexers feed in the
BoolBitwise outputs. In later iterations, they feed back the adder's own
registered outputs.

In the original design each DOM-indep stage had one register: the one that
holds its four component functions (`tp`). The shifter sits between that
register and the next iteration's multipliers. A probe on one `tp` bit in
iteration 2 therefore reached, through the shifter's unselected inputs, the
component functions of two neighbouring bits of iteration 1. For example,
`a0*b0` and `a1*c1` together depend on the secret. The fix adds a second
register after the per-domain compression (`pc`, in `dom_indep`). A probe
downstream now only sees compressed, refreshed values of one domain. The two
stages are also **cleared alternately**. When `tp` loads, `pc` is cleared,
and when `pc` loads, `tp` is cleared. A register therefore never changes
directly from one secret-dependent value to another, so a transition shows
only one value at a time.

Cycle by cycle, counting from the cycle the request is accepted (cycle 0):

| edge | what loads                                            |
|------|-------------------------------------------------------|
| 1    | BoolBitwise registers (`p`, the AND terms for `g`)    |
| 2, 3 | iteration 1: `tp`, then `pc`                          |
| 4..11| iterations 2..5, two edges each                       |
| 12   | iteration 6: `tp` only                                |
| 13   | ALU output register ← `p ^ (G << 1 \| cin)` (result valid in cycle 13) |

The last iteration skips its `pc` stage. Instead, the ALU's output register
captures the per-domain sum, and that output register takes the role of the
skipped stage. This gives 13 cycles for ADD/SUB. BoolBitwise stays enabled
throughout, so `p` is re-shared with fresh masks in every cycle. The
post-processing uses the current sharing.

Subtraction computes `a + ~b + 1`. Share 0 of b is inverted before the
preprocessing. The carry-in is folded into bit 0: `G0` becomes `g0 ^ p0`,
and `P0` becomes a public 0. This keeps G and P mutually exclusive. The same
constant also appears in the final sum.

`bool_arith` wires BoolBitwise to the adder, and is the only instance of
BoolBitwise inside the ALU.

### Boolean-to-arithmetic conversion (`bool2arith`)

B2A turns `(a0, a1)` into `(u0, u1) = ((a0 ^ a1) + s, s)` with
`s = z2s ^ z3s`. The adder computes `a + s`, with `s` given as the Boolean
sharing `(z2s, z3s)`. Its output shares `(s0, s1)` then go into two
registers that stay cleared until the adder reports completion. Only after
those registers is `u0 = s0 ^ s1` formed. Without them, glitches on the
adder's intermediate outputs would recombine both shares. The registers cost
one cycle, which gives 14 in total.

`z2s` and `z3s` are copies of z2 and z3. They are loaded in every cycle in
which no request is in flight, or in which a result is being delivered, and
they stay frozen during a conversion.

### BoolShift and BoolMask

* `bool_shift` shifts left or right, or rotates right, by a public `shamt`.
  Each share moves on its own, and the result is registered and cleared when
  idle.
* `bool_mask` is combinational. MASK gives `(x ^ z5, z5)` for the plain word
  on `rs1_s0`. REMASK gives `(a0 ^ z5, a1 ^ z5)`.

### Output stage and isolation between units (`masked_alu`)

Each unit has its own output register. That register loads only when the
current opcode belongs to the unit and the unit reports a valid result;
otherwise it is **cleared**. The output multiplexer, selected by a registered
unit code, therefore never sees more than one non-zero input. A glitch on
`rd` cannot mix the results of two units. Every operation takes at least one
register stage, so between two results there is always a cycle in which all
multiplexer inputs are zero, and transitions on `rd` cannot mix two results
either.

This stage costs one cycle per instruction. In exchange, the security of the
whole ALU can be argued from the security of each unit, without having to
analyse how the units interact.

## Interface and handshake

`masked_alu_system` is the top: the ALU plus its mask generator.

| port                 | dir | width | meaning                                           |
|----------------------|-----|-------|---------------------------------------------------|
| clk, rst_n           | in  | 1     | clock (rising edge), asynchronous active-low reset |
| seed_load, seed      | in  | 1, 128| load the generator state from `seed`              |
| req_valid            | in  | 1     | request                                           |
| op                   | in  | 4     | `alu_op_e` from `masked_alu_pkg`                  |
| rs1_s0, rs1_s1       | in  | 32    | operand 1 shares (s1 bit-reversed; for MASK, rs1_s0 is the plain word) |
| rs2_s0, rs2_s1       | in  | 32    | operand 2 shares (s1 bit-reversed)                |
| shamt                | in  | 5     | shift / rotate amount                             |
| rsp_valid            | out | 1     | one-cycle pulse: result valid                     |
| rd_s0, rd_s1         | out | 32    | result shares (s1 bit-reversed)                   |

Raise `req_valid` with `op`, the operands and `shamt`. Hold all of them
unchanged up to and including the cycle in which `rsp_valid` is high; this is
how a stalled pipeline behaves. Assertions in `masked_alu` check this. The
next request may follow in the very next cycle. Seed the generator once
after reset.

## Mask generator (`keccak_prng`)

The generator is the Keccak-f[800] permutation: 25 lanes of 32 bits and 22
rounds of theta, rho, pi, chi and iota. All 22 rounds are unrolled, so one
full permutation runs per cycle. The first 576 bits (lanes 0 to 17) are the
cycle's output; the ALU uses 192 of them. The round constants come from the
Keccak LFSR `x^8 + x^6 + x^5 + x^4 + 1`, truncated to 32 bits. The rho
offsets come from the lane walk `(x, y) -> (y, 2x + 3y mod 5)` with offset
`(t + 1)(t + 2)/2 mod 32`. No table is stored.

This generator replaces a 32-bit LFSR that drew both its current and next
state as masks in the same cycle. That LFSR produced correlated masks, and
with them the ALU leaked even though each unit was correct. The LFSR is not
included. The unrolled permutation is by far the largest block: about 3.4k
word-level cells, against about 0.25k for the whole ALU.

## Files and verification

Package: `masked_alu_pkg`. Hierarchy:

```
masked_alu_system
├── keccak_prng
└── masked_alu
    ├── bool_arith
    │   ├── bool_bitwise ── dom_dep_and
    │   └── bool_adder ──── dom_indep (x2: propagate, generate*)
    ├── bool2arith
    ├── bool_shift
    └── bool_mask
```

Every module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. The results are compared with models
written independently in the testbench. The Keccak testbench, for example,
uses the published round-constant and rotation tables, while the RTL derives
them. `tb_masked_alu_system` runs the complete design at its default
parameters. It issues more than 600 requests of all twelve opcodes, back to
back and after idle gaps, with a reseed halfway through. It checks every
result and every latency, that `rd` is zero between results, that the
results are really shared, and that the masks change every cycle.

`tb_fixed_vs_random` runs a simulated fixed-versus-random test on the whole
design. The power model is the Hamming weight of every data register of the
ALU, plus its Hamming distance to the previous cycle. For each of the twelve
opcodes it issues 1,200 requests with a fixed secret and 1,200 with random
secrets, each freshly shared; MASK takes its operand unshared, as it must. It then computes a Welch t-statistic for every cycle of
the operation, with the cycles aligned across requests. Every `|t|` must
stay below 4.5. As a control, the same statistic on the recombined result
must exceed 4.5, which it does by far (above 80 for every opcode). Register
maxima stay below about 3 across seeds. ADD and SUB come closest only
because their 13 cycles give 13 samples, one of which is the largest by chance. This model has no glitches and no routing, so
passing it is a necessary condition for first-order security, not a proof.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/masked_alu_pkg.sv tb/tb_masked_alu_system.sv \
    --top-module tb_masked_alu_system -Mdir obj
./obj/Vtb_masked_alu_system
```

Replace the testbench name to run a single unit. Every flop is reset, so the
simulation does not depend on initial values.

## Where this design makes its own choices

The following are not fixed by the design rules above, and a user may want
to change them:

* Opcode encoding, and the names of the handshake signals.
* MASK/REMASK take 1 cycle and shifts take 2. The units that set the
  2/13/14-cycle figures are built to match them exactly.
* The last adder iteration merges its post-compression register into the ALU
  output register. This is what makes ADD take 13 cycles rather than 14.
* How the carry-in for SUB is handled, and where the extra XOR enters the
  DOM-indep\* (into the same-domain terms, before the register).
* NOT and shifts are registered. All unit registers clear when the unit is
  idle.
* Share 1 is the bit-reversed share.
* How z2s/z3s are sampled for B2A.
* The generator runs one full permutation per cycle, outputs lanes 0 to 17,
  and takes a 128-bit seed into lanes 0 to 3. The wiring of its bits to
  z0..z5 is also this design's.

## Not included

* The host core: pipeline, register file with four read ports, and the other
  execute units. This RTL starts at the ALU's request and response signals.
  One observation for integration: even with this ALU, a core that routes the
  masked operands to its other functional units as well (multiplier, branch
  unit, plain ALU) can leak through those units. Keep masked operands away
  from them.
* Field-arithmetic (F-class) and arithmetic-masking (A-class) instructions.
  The hardening covers only the Boolean instructions and B2A.
* The original LFSR and ring-oscillator mask source.
