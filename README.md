# Constructive timing violation: an ALU clocked past its critical path

A circuit's clock is normally limited by its slowest path. Most operations
never use that path, though: an adder only waits for the full carry chain
when a carry really travels the whole word. This design clocks an ALU
*faster* than its critical path allows and does not try to avoid the
resulting timing violations. It detects them instead, so the processor around
it can treat a wrong result like a mispredicted one and re-execute what
depends on it.

Detection uses space redundancy. The same ALU is built three times:

* the **main ALU** runs at the boosted frequency f_H. It gives every result
  with the low latency of one f_H cycle, but that result is speculative: its
  result register may have latched a value that had not settled;
* two **checker ALUs** run at f_L, the frequency the critical path allows, so
  they never violate timing. One is clocked by f_L and the other by its
  complement (f_L-bar), so between them they start an operation on every
  half period of f_L. Each needs a whole f_L period per operation, but
  together they keep up with the main ALU as long as f_H ≤ 2·f_L;
* each checker holds the main ALU's result for the operation it re-executes
  and compares it with its own. A mismatch raises `detect`, and the checker's
  result is the correct value.

The checkers only restore throughput. Latency comes from the main ALU alone:
dependent instructions can use its result one f_H cycle after issue and only
need to be replayed in the rare case that `detect` fires.

## Clocks

All logic runs on one base clock `clk`. The three clocks of the scheme are
one-tick enable strobes generated by `ctv_clock_gen`:

| strobe  | meaning             | period (base ticks) | default |
|---------|---------------------|---------------------|---------|
| `en_h`  | rising edge of f_H  | `H_DIV`             | 4       |
| `en_l`  | rising edge of f_L  | `L_DIV`             | 6       |
| `en_lb` | rising edge of f_L-bar (falling edge of f_L) | `L_DIV`, offset `L_DIV/2` | 6, offset 3 |

The defaults give f_H = 1.5·f_L, a 50 % boost. Legal settings satisfy
`H_DIV ≤ L_DIV ≤ 2·H_DIV` (f_L ≤ f_H ≤ 2·f_L) with `L_DIV` even. An
elaboration-time assertion checks this. At exactly 2:1 (`H_DIV=3, L_DIV=6`)
every f_H edge falls on an f_L or f_L-bar edge. The scheme's textbook timing
diagram draws this case, and `tb/ctv_alu_unit_2to1_tb.sv` tests it.

Using enables in one clock domain is an implementation choice. The scheme
itself is described with three physical clock nets. With enables, the
"multicycle" checker paths become ordinary multicycle paths of `L_DIV` base
ticks. A physical implementation would constrain them as such and would
over-constrain nothing on the main path. The point of the scheme is that the
main path (`H_DIV` ticks) is deliberately shorter than the ALU's worst-case
delay.

## How an operation is paired with a checker

This is the least obvious part of the design. With f_H = 1.5·f_L, issue
edges and checker edges do not line up, so an operation cannot simply be
sampled from the operand bus by a checker at the moment it is issued. Instead:

1. At an f_H edge the main ALU captures the operation in its operand
   registers and sets `op_pending`.
2. At the next f_L or f_L-bar edge, whichever comes first, that checker sees
   `op_pending`, copies the operands into its own registers and asserts
   `claim`, which clears `op_pending`. Because checker edges come every
   `L_DIV/2` ticks and `L_DIV/2 ≤ H_DIV`, this always happens before the next
   f_H edge overwrites the operand registers. An assertion in
   `ctv_main_alu` checks it.
3. One f_H cycle after issue the main result register loads, and a
   one-tick `res_strobe` follows. The first strobe after a checker's claim
   belongs to its operation. The checker copies it into its main-result hold
   register. An assertion compares the tags.
4. On the checker's next edge, one f_L period after it started, the checker
   ALU's result and the held main result are registered side by side. The
   `=?` comparator on those registers gives `detect`.

With the defaults, the pattern repeats every 12 base ticks:

| tick | f_H edge     | checker edge | event |
|------|--------------|--------------|-------|
| 0    | issue op A   | f_L          | (A not yet in the operand registers) |
| 3    |              | f_L-bar      | f_L-bar checker claims A |
| 4    | issue op B, A's main result loads | | |
| 6    |              | f_L          | f_L checker claims B |
| 8    | issue op C, B's main result loads | | |
| 9    |              | f_L-bar      | A verified; f_L-bar checker claims C |
| 12   | issue op D, C's result | f_L | B verified; f_L checker claims D |

So the f_L-bar checker handles two operations in three, and the f_L checker
one in three. At the 2:1 ratio the two checkers strictly alternate. At 1:1
(no boost) the first checker edge after each issue always belongs to the
same checker, and the other one idles. The main result arrives 4 ticks after issue. The verification
arrives 7 to 9 ticks after issue (one f_L period after the claim, plus the
wait for a checker edge).

## Top level: `ctv_alu_unit`

Parameters: `WIDTH` (32), `TAG_W` (8), `H_DIV` (4), `L_DIV` (6).

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | base clock, synchronous active-low reset |
| `issue_ready` | out | high on f_H-edge ticks; an operation offered then is taken |
| `issue_valid`, `issue_op`, `issue_a`, `issue_b`, `issue_tag` | in | the operation (`ctv_pkg::alu_op_e`), its operands and an identifier chosen by the issuer |
| `fault_mask` | in | bits flipped in this operation's main result (see below); tie to 0 |
| `main_valid`, `main_tag`, `main_result` | out | speculative result; one-tick strobe on the tick after the next f_H edge |
| `verify_valid`, `verify_tag` | out | one-tick strobe when a checker finishes an operation |
| `detect` | out | with `verify_valid`: the main result was wrong |
| `correct_result` | out | with `verify_valid`: the checker's (correct) result |
| `verify_checker` | out | 0 = f_L checker, 1 = f_L-bar checker |

The two checkers never finish on the same tick, because f_L and f_L-bar edges
are disjoint. Their outputs are therefore simply merged.

**Recovery is outside the unit.** On `detect`, the intended use is the
replay machinery of an out-of-order core that already exists for data
speculation: mark the instruction tagged `verify_tag` as mispredicted,
write back `correct_result`, and selectively re-issue the instructions that
consumed `main_result`. Retrying never fails, because the correct value is
already at hand.

**Emulating violations.** In RTL the main ALU always settles, so it cannot
violate timing by itself. `fault_mask` lets a testbench make violations
happen at a chosen rate, the way the scheme's performance was assessed. The
mask is XORed into the main result of the operation it is issued with.

## ALU and adder

`ctv_alu` is the integer ALU instantiated three times: ADD, SUB, AND, OR, XOR,
signed SLT, SLL and SRL on 32-bit words, with the 3-bit encoding in `ctv_pkg`.
The operation set is this design's own. The scheme is stated for "an ALU" in
general and for any combinational logic.

Its adder is `csla`, a carry select adder, the circuit used to study how often
an over-clocked adder actually fails. Each 4-bit block above the lowest one
computes its sum for carry-in 0 and for carry-in 1 with two ripple adders
(`csla_ripple`). The real carry from below then selects one of them. The
longest path is the ripple through the lowest block followed by one
multiplexer per block above it. An addition takes that long only when a
carry travels all the way.

### How often does an over-clocked adder fail?

`tb/csla_timing_tb.sv` runs the adder experiment. A gate-delay model of the
same carry select adder (`tb/csla_delay_model.sv`, one unit delay per
full-adder carry, sum bit and multiplexer, so a longest path of 11 units) is
sampled one clock period after its operands change. Its output is compared
with the zero-delay RTL adder. 2000 additions per period from two operand
mixes give:

| clock period (× longest path) | boost | uniform random operands | small signed integers and addresses |
|---|---|---|---|
| 1.01 | 1.0× | 0 % | 0 % |
| 0.83 | 1.2× | 0 % | 4.2 % |
| 0.66 | 1.5× | 0.1 % | 17.3 % |
| 0.50 | 2.0× | 26.1 % | 38.1 % |
| 0.33 | 3.0× | 98.3 % | 87.2 % |

Small signed values are the worse case. Adding a small negative number to a
positive one propagates a carry through the sign-extension bits, so it
exercises the longest path. Measurements with real program operands on a
synthesized carry select adder have put the 1.5× fault probability between
about 4 % and 31 %, depending on the program. End to end, `ctv_alu_unit_tb`
shows that the unit catches every violation up to 30 % of operations while
issuing an operation on nearly every f_H edge.

## Files

| file | contents |
|------|----------|
| `rtl/ctv_pkg.sv` | ALU operation enum |
| `rtl/ctv_alu_unit.sv` | top level: clock generator, main ALU, two checkers |
| `rtl/ctv_clock_gen.sv` | f_H, f_L, f_L-bar enable strobes |
| `rtl/ctv_main_alu.sv` | main ALU with f_H operand/result registers and `op_pending` |
| `rtl/ctv_checker.sv` | checker ALU, main-result hold register, comparator |
| `rtl/ctv_alu.sv` | combinational ALU |
| `rtl/csla.sv`, `rtl/csla_ripple.sv` | carry select adder and its ripple blocks |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `ctv_alu_unit_2to1_tb` and `csla_timing_tb` |
| `tb/ctv_alu_ref_pkg.sv` | reference ALU model for the testbenches |
| `tb/csla_delay_model.sv` | gate-delay adder model (simulation only) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog turns a hang into a failure. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/ctv_pkg.sv tb/ctv_alu_ref_pkg.sv tb/ctv_alu_unit_tb.sv \
  --top-module ctv_alu_unit_tb -Mdir obj_tb && obj_tb/Vctv_alu_unit_tb
```

Replace the testbench file and top-module name for the others. `csla_tb` and
`csla_timing_tb` need no package files besides `ctv_pkg`. All testbenches run
in well under a second.

`ctv_alu_unit_tb` runs the unit at its default parameters. It issues 12,000
operations, with emulated violations on 0, 10, 20 and 30 % of them. It checks
every main result, every verification, their latencies (4 ticks, and 7 to 9
ticks), and that `detect` fires exactly for the corrupted results. It also
counts each mechanism: f_L checker, f_L-bar checker, detection, clean check,
an operation waiting for a checker edge, and back-to-back issue. A mechanism
that never occurs is a failure.

## Limits and departures

* **Not included:** the processor's replay/re-issue logic that acts on
  `detect`, the processor itself, and a CTV version of in-order dependence
  checking. That last one is a suggested application whose logic is not
  specified.
* **Checker operands** come from the main ALU's operand registers, not
  straight from the operand bus. This lets an operation wait for the next
  checker edge when f_H is not a multiple of f_L.
* **Clock ratio** may equal 2:1 (the timing diagram's case). Strictly, the
  scheme asks for f_H < 2·f_L, which the default 1.5 meets.
* **Own choices:** the adder width (32) and block size (4), the ALU operation
  set, the tag width, the issue and result strobes, and synchronous reset.
* **Timing errors** exist only in the delay model of the adder experiment.
  The synthesizable RTL is always functionally correct, and `fault_mask`
  stands in for violations. The experiment's unit gate delays are a model,
  not a cell library, and its operand mixes are synthetic rather than
  program traces.
