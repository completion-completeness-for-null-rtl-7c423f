# Completion-complete NULL Convention Logic stages with bit-wise completion

NULL Convention Logic (NCL) is a self-timed, delay-insensitive logic style.
There is no clock. Every bit travels on two wires, and every stage tells the
one before it when it may send the next value. A stage usually sends that
request only when *all* of its output bits have changed. This is full-word
completion. **Bit-wise completion** is faster: each input bit is released as
soon as the output bits *that use it* have changed. It shortens the
handshake path, but it adds a condition that full-word completion gives for
free.

That condition is called **completion-completeness**. No component may ever
see bits of two neighbouring DATA wavefronts at the same time. Suppose a gate
can produce its output before all of its inputs have arrived (an
*input-incomplete* component). Then bit-wise completion can let a fast input
race ahead into the next wavefront while a slow input still holds the old
one, and the gate computes a result from both. This RTL builds three example
stages where that happens, together with the fixes that prevent it:

| stage | what it computes | default (completion-complete) arrangement |
|---|---|---|
| `and6_stage` | all six 2-input ANDs of a 4-bit input | completion sets widened from TH33 to TH44 |
| `mult_final_stage` | product bits 7 and 6 of a 4x4 unsigned multiplier | carry register moved into the shared completion set |
| `pp_gen4x4` | the sixteen partial products of a 4x4 multiplier | every AND made input-complete |

Every stage can also be built in its completion-incomplete form, set by a
parameter. This lets you see the failure in simulation as well as the fix.
`ncl_examples_top` places the three default stages side by side.

## NCL in brief, as used here

**Dual-rail data.** The type `ncl_pkg::dr_t` is `{r1, r0}`:

| r1 r0 | meaning |
|---|---|
| 0 0 | NULL (spacer, "no data yet") |
| 0 1 | DATA0 |
| 1 0 | DATA1 |
| 1 1 | illegal |

Values flow as wavefronts: DATA, NULL, DATA, NULL, and so on.

**Handshake lines.** Each handshake is one wire. Logic 1 is *rfd* (request
for DATA) and logic 0 is *rfn* (request for NULL). A register's `ki` comes
from the stage after it, and its `ko` goes to the stage before it.

**Threshold gates with hysteresis** (`ncl_th`). THmn has n inputs and
threshold m. Its output rises when at least m inputs are high, falls only
when *all* inputs are low, and holds in between. Weighted gates such as
TH44w2 or TH34w32 count some inputs two or three times. The weights are
given as `W0..W3`, in input order. The special gates are `ncl_thand0` (sets
on AB+BC+AD) and `ncl_th24comp` (sets on (A+B)(C+D)). All of them are written
as `always_latch` set/clear latches.

**NCL register** (`ncl_reg`). Each rail goes through a TH22 (a C-element)
with `ki`. DATA passes while `ki` is rfd, and NULL passes while `ki` is rfn.
`ko` is the NOR of the output rails. `rst` sets the register to NULL, so
`ko` starts at rfd.

**Completion component** (`ncl_completion`). This is an N-input C-element
over the `ko` lines of a completion set. Up to four inputs it is one THnn
gate. Wider sets become a two-level tree of gates with at most four inputs;
six inputs, for example, give a TH44 followed by a TH33.

**Input-completeness.** A component is input-complete if its outputs cannot
become DATA before all of its inputs are DATA, and cannot return to NULL
before all of its inputs are NULL. A stage needs this only as a whole, so
some components may be *incomplete*. They are smaller, but they answer early.

## How two wavefronts mix, and the two ways to stop it

### The six-AND stage (`and6_stage`)

The outputs are A(5)=X3·X2, A(4)=X3·X1, A(3)=X2·X1, A(2)=X3·X0, A(1)=X2·X0
and A(0)=X1·X0. Only A(5) and A(0) need the complete AND (`ncl_and_complete`)
for the stage to be input-complete. The other four use the incomplete AND
(`ncl_and_incomplete`). In the incomplete AND, DATA0 comes from a TH12 and so
appears as soon as *either* operand is DATA0.

With plain bit-wise completion, input X(b) is released by a TH33 over the
three outputs that use X(b):

| input | completion set (TH33) | widened set (TH44, default) |
|---|---|---|
| X(3) | A5 A4 A2 | A5 A4 A2 **A0** |
| X(2) | A5 A3 A1 | A5 A3 A1 **A0** |
| X(1) | A4 A3 A0 | **A5** A4 A3 A0 |
| X(0) | A2 A1 A0 | **A5** A2 A1 A0 |

Here is the failure with the TH33 sets. Let X3 = X2 = DATA0, X1 = DATA1, and
let X0 be late (still NULL):

1. The incomplete ANDs make A(5:1) DATA0 while A(0) is still NULL.
2. The TH33s of X3 and X2 now see all of their outputs as DATA, so they
   release X3 and X2 to NULL. A(5:1) go back to NULL, and the TH33s
   request DATA again.
3. The next X3 and X2 arrive while X1 still holds the old DATA1. A(3)
   then computes X2(new)·X1(old), which can be DATA1 where DATA0 is
   correct.

There are two fixes:

- `ALL_COMPLETE_ANDS = 1` uses complete ANDs everywhere. It costs more AND
  logic but adds no gate level.
- `COMPLETION = CSET_EXTENDED` (the default) adds A(0) to the sets of X3 and
  X2, and A(5) to those of X1 and X0. Each completion gate becomes a TH44,
  which is still one gate level. No input is released before the complete
  outputs A(5) and A(0) are both DATA, and those cannot be DATA before every
  input is.

For comparison, `COMPLETION = CSET_FULLWORD` builds the full-word version.
One completion tree over all six outputs releases every input at once. Such a
stage is completion-complete with no further care, but its completion path
has two gate levels where the bit-wise sets have one. Shortening that path is
the whole reason to use bit-wise completion.

### The multiplier's last stage (`mult_final_stage`)

The inputs are C (the carry from column 6 of the array) and X, Y, Z (the
bits summed in column 6). The full adder (`ncl_full_adder`) gives
S(6) = X⊕Y⊕Z. **GEN_S7** (`gen_s7`) gives S(7) = C + maj(X,Y,Z). The X, Y
and Z registers are used by both outputs, so they are released by a TH22
over Ko(7) and Ko(6). C is used only by GEN_S7.

All three GEN_S7 versions share two TH44w2 gates with C0 as the weight-2
input: G0 = C0·maj(X0,Y0,Z0) and G1 = C0·maj(X1,Y1,Z1).

| `GEN` | S0 | S1 | waits for |
|---|---|---|---|
| `GEN_S7_ORIG` | G0 | TH12(C1, G1) | C only |
| `GEN_S7_X` | G0 | TH34w32(G1×3, C1×2, X0, X1) | C, and X when C = 1 |
| `GEN_S7_XY` | TH22(G0, T) | TH33w2(T×2, C1, G1) | C, X and Y; T = TH24comp(X1, X0, Y0, Y1) |

Here is the failure with the original gate when register C takes its own
request from Ko(7) (`C_IN_SHARED_SET = 0`):

1. C = DATA1 makes S(7) DATA1 at once through the TH12, and Ko(7) releases C.
2. C returns to NULL, so S(7) returns to NULL, and C is asked for its next
   DATA.
3. Meanwhile the slow side (full adder, X, Y, Z) still holds the old
   wavefront, and the new C is combined with the old X, Y, Z.

The `GEN_S7_X` version only delays this: X can go NULL while the old Y and Z
stay, and those two are enough to fire G0. Two fixes work:

- `GEN = GEN_S7_XY`: every gate needs two of X, Y, Z.
- `C_IN_SHARED_SET = 1` (the default, and free): register C is released by
  the same TH22 as X, Y and Z. C therefore cannot move on before the full
  adder's output has passed through its register as well.

### Partial-product generation (`pp_gen4x4`)

The stage forms p[4i+j] = X(j)·Y(i). Each operand bit feeds four products,
so each of the eight operand registers is released by one TH44. Only the
four diagonal ANDs need to be complete for input-completeness. With the
other twelve incomplete (`ALL_COMPLETE_ANDS = 0`), the stage mixes
wavefronts exactly as the six-AND stage does. Widening these completion sets
would need gates with more than four inputs, and so an extra gate level. The
default is therefore all-complete ANDs.

## A caveat: the widened TH44 sets can stall

The six-AND testbench hands each output to its own receiver with independent
random delays. With the TH44 sets (the default, and also with complete
ANDs), the stage then sometimes stops making progress. It **never delivers a
wrong value**, and it runs to completion when the receivers acknowledge the
six outputs together (a full-word next stage).

The cause is that the widened sets overlap without being equal. One input
bit's TH44 can release its bit into the next wavefront while another bit's
TH44 has not yet seen all of its outputs at NULL. A product of the new
wavefront then pulls one of that TH44's inputs back to rfn, so the moment
when all of its inputs are rfd never comes. In a gate-delay model this is a
C-element input that changes before the gate has responded, which depends on
relative delays.

Two arrangements finished under every timing tried. One is TH33 sets with
all-complete ANDs, which have no overlap beyond what the bit pairs need. The
other is full-word completion (`CSET_FULLWORD`), where a single completion
tree drives every input. If the next
stage acknowledges bits independently, consider `ALL_COMPLETE_ANDS = 1` with
`COMPLETION = CSET_PARTITION`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `and6_stage` | `COMPLETION` | `CSET_EXTENDED` | `CSET_PARTITION`: TH33 bit-wise sets; `CSET_EXTENDED`: TH44 sets widened by A(0)/A(5); `CSET_FULLWORD`: one TH44+TH33 tree over all six outputs drives every Ki |
| | `ALL_COMPLETE_ANDS` | 0 | 1: all six ANDs input-complete |
| `mult_final_stage` | `C_IN_SHARED_SET` | 1 | 1: register C released by the shared TH22; 0: by Ko(7) alone |
| | `GEN` | `GEN_S7_ORIG` | GEN_S7 version, see the table above |
| `pp_gen4x4` | `ALL_COMPLETE_ANDS` | 1 | 0: only the diagonal ANDs complete |
| `gen_s7` | `VARIANT` | `GEN_S7_ORIG` | gate-level version |
| `ncl_completion` | `N` | 4 | inputs in the completion set, 1 to 16 |
| `ncl_th` | `N`, `M`, `W0..W3` | 2, 2, 1... | inputs, threshold and weights |

## Interface and timing

There is no clock. Each stage has, per data bit, a `dr_t` input with a `ko`
output, and per result bit a `dr_t` output with a `ki` input. The top
prefixes them with `and6_`, `mfs_` and `pp_`. The protocol is four-phase:

- A sender may put DATA on an input only while that input's `ko` is rfd,
  and may return it to NULL only after `ko` has become rfn.
- A receiver drives `ki` to rfn after taking DATA, and back to rfd after
  seeing NULL.

Hold `rst` high with all inputs NULL and all `ki` rfd, then release it.
Throughput depends only on gate delays and the environment, so there is no
latency in cycles to specify.

## Where this RTL makes its own choices

- **GEN_S7 gates.** The schematics show C0 wired twice into each four-input
  "4" gate together with three rails of X, Y and Z. This is read as a TH44w2
  with C0 as the weight-2 input. In the same way, an input drawn three times
  into the TH34w32 has weight 3. The resulting function, C + maj(X,Y,Z),
  matches every worked example.
- **Bit pairs of A(4), A(2), A(1)** in the six-AND stage are a reading of a
  schematic with many crossings. A(5), A(3) and A(0) are fixed by the
  analysis.
- **Full adder and register internals** are the standard NCL structures. The
  full adder is TH23 carries with TH34w2 sums; the register is two
  reset-to-NULL TH22 gates and a NOR. The source describes only their
  behaviour.
- **`GEN_S7_X`** is complete in X only on its DATA1 path. S0 = G0 can still
  fire from C0, Y0 and Z0.
- **Full-word baseline.** `COMPLETION = CSET_FULLWORD` joins all six output
  Ko lines in a two-level tree (TH44 then TH33). That tree drives all four
  input Ki lines. The stage still brings out its four input Ko lines
  separately instead of joining them into one Ko.
- **Not built.** The intermediate stages of the 4x4 multiplier are not
  built, so the partial-product stage and the last stage are not chained.

## Simulating

Everything is plain SystemVerilog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ncl_examples_top \
    -y rtl -y tb +libext+.sv rtl/ncl_pkg.sv tb/tb_ncl_examples_top.sv
./obj_dir/Vtb_ncl_examples_top
```

Replace the top module and file to run any other testbench. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ncl_env` is the environment the stage testbenches share. It has one
  independent four-phase sender per input bit and one receiver per output
  bit, with random delays up to a configurable maximum per channel and phase.
  A lockstep mode makes the receivers act as one full-word stage. Each
  receiver stores the n-th DATA value it sees, and the testbench compares
  them with expected values it computes itself.
- `tb_and6_stage`, `tb_mult_final_stage` and `tb_pp_gen4x4` run every
  arrangement under random timing, under the race timing of the examples
  above (one channel slow), and with lockstep receivers. The
  completion-complete arrangements must deliver only correct values, and
  must deliver all of them (see the caveat above for the TH44 sets). The
  completion-incomplete ones must deliver at least one wrong value under the
  race.
- `tb_ncl_examples_top` runs all three default stages for 64 wavefronts
  each. It counts each mechanism: early incomplete-AND outputs, TH44 holds,
  early GEN_S7 answers, carry-register holds, and bit-wise releases. It fails
  if any mechanism never occurs.
- The gate, register, completion, AND, adder and GEN_S7 testbenches check
  against truth models written in the testbench.

The simulation uses zero gate delays, so all ordering comes from the
environment's delays. This is enough to reproduce the wavefront mixing,
because in a delay-insensitive circuit a slow environment channel has the
same effect as a slow gate. It does not explore every internal delay
assignment.

## Synthesis notes

Every NCL gate is a latch with set and clear conditions, and every handshake
forms a loop through the completion gates. Lint tools therefore report
latches and combinational loops. These are intended. The RTL elaborates and
synthesises to latches, but a synchronous flow will not time it. For a real
implementation, map `ncl_th`, `ncl_thand0` and `ncl_th24comp` onto an NCL
threshold-gate cell library.

## Files

- `rtl/ncl_pkg.sv`: `dr_t`, rfd/rfn constants, variant enums, helper functions.
- `rtl/ncl_th.sv`, `rtl/ncl_thand0.sv`, `rtl/ncl_th24comp.sv`: threshold gates.
- `rtl/ncl_reg.sv`, `rtl/ncl_completion.sv`: register and completion component.
- `rtl/ncl_and_complete.sv`, `rtl/ncl_and_incomplete.sv`, `rtl/ncl_full_adder.sv`, `rtl/gen_s7.sv`: dual-rail components.
- `rtl/and6_stage.sv`, `rtl/mult_final_stage.sv`, `rtl/pp_gen4x4.sv`: the three stages.
- `rtl/ncl_examples_top.sv`: top level.
- `tb/`: one testbench per module, named `tb_<module>.sv`, plus the shared environment `tb_ncl_env.sv`.
