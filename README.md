# A 74181 ALU that tests itself: sensitized partitioning with exhaustive patterns

Built-in self test usually drives a circuit with pseudo-random patterns and
compacts its answers into a signature. The weak point is knowing what that
finds: fault coverage has to be estimated against a fault model, and long
random sequences are needed to make it high. Exhaustive testing avoids both
problems. If every input combination is applied, the whole truth table is
verified and no fault model is needed. But 2^n patterns is too many for a
circuit with many inputs.

This design splits the circuit into partitions, each of which depends on so
few signals that it can be tested exhaustively. It does so **without adding
multiplexers to the signal path**. The split is made by holding some inputs
at values that make the other partitions transparent ("sensitized
partitioning"). The example is the 4-bit 74181 ALU/function generator, 14
inputs and 8 outputs. Tested as a whole it would need 2^14 = 16 384
patterns. Tested by partition it needs 16 + 16 + 324 = **356** patterns, all
generated on chip. Normal-mode speed is unaffected: the ALU itself is
unchanged, and only its input and output registers are reconfigured.

Beside the ALU sits a second, independent piece: a CMOS NOR gate with a
charge/discharge (C/D) transistor. The C/D transistor keeps exhaustive testing
valid for CMOS stuck-open faults, which would otherwise make a combinational
gate behave sequentially.

## The partitions of the 74181

The 74181 splits naturally into four identical bit slices **N1** and one
carry/sum block **N2** (`alu181_n1`, `alu181_n2`, assembled in `alu181`).
Data are active high in this RTL.

For bit i, each N1 slice produces two lines. Here B' is the complement of B.

| line | equation | depends on |
|------|----------|------------|
| HI | NOT(Ai·Bi'·S2 + Ai·Bi·S3) | Ai, Bi, S2, S3 |
| LI | NOT(Ai + Bi·S0 + Bi'·S1) | Ai, Bi, S0, S1 |

NOT HI is the bit's generate term g and NOT LI its propagate term p. Because
g implies p, the pair (HI, LI) only ever takes the values 11, 10 and 00.

N2 forms the outputs from the eight H/L lines plus M and Cn:

* c0 = NOT Cn, and c(i+1) = gi + pi·ci, written as flat lookahead.
* Fi = HI xor LI xor NOT(M'·ci'), so logic mode (M = 1) gives Fi = HI xnor LI.
* A=B is the AND of the four F outputs.
* P' is the group propagate and G' the group generate. Cn+4 = NOT c4.

In arithmetic form this gives F = X plus Y plus carry. The operand X is set
by S1S0 (A, A+B, A+B', 1111) and the operand Y by S3S2 (0, A·B', A·B, A).
The ALU is checked exhaustively against the datasheet function table.

## The three test phases

The phase is a two-flip-flop counter. The encoding is chosen so that only one
bit changes per step.

| phase | code | held constant | cycled exhaustively | patterns | what is observed |
|-------|------|---------------|---------------------|----------|------------------|
| P0 | 00 | normal operation | - | - | - |
| P1 | 01 | M = 1, S0 = S1 = 1, Cn = 1 | [A, B, S2, S3] | 16 | every LI is 0, so each F shows its HI |
| P2 | 11 | M = 1, S2 = S3 = 0, Cn = 1 | [A, B, S0, S1] | 16 | every HI is 1, so each F shows its LI |
| P3 | 10 | S = 1000 | each (Ai, Bi) in {00, 10, 11}; M, Cn | 3^4·4 = 324 | all of N2 |

In P1 and P2 all four A bits carry the same value, and so do all four B bits.
The four N1 slices are therefore tested in parallel: 16 patterns cover all
of them.

P3 relies on the fact that N2 can only ever see three of the four values of
each (HI, LI) pair. With S = 1000, HI = NOT(Ai·Bi) and LI = NOT Ai. Stepping
(Ai, Bi) through 00, 10, 11 then drives (HI, LI) through 11, 10, 00. With
four independent bits and the four values of M and Cn, that gives 324
patterns. This covers every input N2 can receive in service, so it is an
exhaustive test of N2.

## Input register / pattern generator (`input_tpg`)

The fourteen input flip-flops are the pattern generator. In P0 they load
the pins. In each test phase they feed back on themselves:

* **P1 and P2**: a 4-stage *modified* LFSR. The stages are A (all bits),
  B (all bits) and the two select lines under test. It uses x^4 + x^3 + 1,
  and its feedback is also XORed with the NOR of the first three stages.
  That NOR term splices the all-zero state into the maximal-length sequence,
  so the register counts through all 16 states from 0000 and ends at 0001.
* **P3**: each (Ai, Bi) pair is a base-3 digit (00 → 10 → 11 → 00). The
  digits sit above a 2-bit counter for (M, Cn). The run goes from all-zero
  to all digits at 11 with M = Cn = 1.

Z1, Z2 and Z3 decode the last pattern of each generator. The testing control
combines each with its phase. The advance strobe that ends a phase also loads
the first pattern of the next phase, or reconnects the pins after P3.

## Output register / signature analyzer (`output_sa`)

The eight output flip-flops are a plain register in P0. In P1 to P3 they form
a parallel signature analyzer: each ALU output is XORed into its own stage
while the register shifts. Feedback is x^8 + x^6 + x^5 + x^4 + 1 into stage 1.

| stage | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| input | F0 | F1 | A=B | F2 | F3 | P' | Cn+4 | G' |
| pin | Y8 | Y7 | Y6 | Y5 | Y4 | Y3 | Y2 | Y1 |

The register is a `reconfig_lfsr` with its S line tied to signature mode.
It is cleared in the cycle in which TEST starts the test.

## Testing control, timing and OK (`test_control`)

A self test runs like this, cycle by cycle:

1. In P0, TEST high at a clock edge moves the counter to P1. The same edge
   loads the first P1 pattern and clears the signature.
2. Each cycle, one pattern is in the input register, and the output register
   compacts the ALU's answer to it at the next edge.
3. When Zk is high in Pk, the edge that compacts the phase's last pattern
   also advances the phase and loads the next phase's first pattern.
4. After **356 cycles** the counter is back in P0. For exactly one cycle the
   output register still holds the final signature. In that cycle
   `test_done` is high and `ok` = (signature = `GOLDEN_SIG`).

After that cycle the output register loads ordinary ALU results again. So
`ok` means nothing outside the `test_done` cycle, and it can even be high by
chance in normal operation. Sample it only with `test_done`.

TEST is sampled only in P0. A TEST pulse during a test is ignored. A TEST
level held high restarts the test after every completion.

In normal operation the pins are registered at one edge and the result at the
next. Pins set up before edge k give outputs that are valid after edge k+1.

The fault-free signature is **8'h89**. It depends on three things: the
pattern order, the Cn value held in P1/P2, and the feedback polynomial. If
any of these changes, recompute it. To do that, replay the 356 patterns of
the table above through the ALU function and the stage mapping above, or read
`y` at `test_done` from a known-good simulation. Then update `GOLDEN_SIG` in
`bist181_pkg`. The end-to-end testbench recomputes the signature independently
from the patterns it sees reaching the ALU, so it flags a stale constant.

## The reconfigurable LFSR module (`reconfig_lfsr`)

This is a generic building block with two control lines:

| N | S | mode |
|---|---|------|
| 1 | x | register: stage k loads x[k-1] |
| 0 | 0 | input generator: all 2^WIDTH states, zero included, via the NOR splice |
| 0 | 1 | parallel signature analyzer, linear feedback only |

The default is 3 stages with taps at stages 2 and 3 (x^3 + x^2 + 1). The
`TAPS` parameter must describe a primitive polynomial for the generator mode
to be complete.

## CMOS stuck-open faults and the C/D cell (`cmos_nor_cd`)

If a transistor in a CMOS gate is stuck open, some inputs leave the output
node floating. It then keeps whatever charge the previous pattern left.
Whether that fault is seen depends on the order of the patterns, which breaks
the assumption behind exhaustive testing.

The C/D cell adds one transistor, gated by TEST, between the gate output and
a C/D line. After each pattern, TEST is pulsed with C/D at the complement of
the expected value, then released. A healthy gate pulls the node back to the
right value. A gate with an open path leaves it at the forced value.

`cmos_nor_cd` is a **behavioural switch-level model, not synthesizable
logic**. Its parts:

* Transistors (1) and (2) are series pull-ups. Transistors (3) and (4) are
  parallel pull-downs. Transistor (5) is the C/D device.
* The `FAULT` parameter, 0 to 4, opens one of transistors (1) to (4).
* The node charge is a latch.

Its testbench shows the problem and the fix. Transistor (4) open with
patterns in the order 00, 10, 01, 11 goes unseen. With C/D pulses, all four
faults are found.

The same cell would be placed on every line of a larger CMOS network. No
network-level model is given here, because no concrete network is specified.

## How far to trust it

What was verified, in simulation with Verilator:

| testbench | what it shows |
|-----------|---------------|
| `tb_alu181` | all 16 384 input combinations against the 32-function datasheet table, including Cn+4, G', P', A=B |
| `tb_alu181_n1`, `tb_alu181_n2` | each partition exhaustively, N2 over its 324 reachable inputs |
| `tb_reconfig_lfsr` | three modes at 3 and 4 stages; the generator visits every state once |
| `tb_input_tpg` | phase lengths 16/16/324, distinct patterns, constant lines, Z timing, return to pins |
| `tb_output_sa` | cycle-by-cycle signature against a reference; a single-bit error changes the signature |
| `tb_test_control` | phase order, TEST and Z qualification, CLEAR, OK only in P0, one-cycle `test_done` |
| `tb_autonomous_alu181` | end to end at full size (details below) |
| `tb_selftest_coverage` | stuck-at-0 and stuck-at-1 on 34 lines, one at a time: all 68 faults change the response stream, 67 drive OK low |
| `tb_cmos_nor_cd` | the C/D procedure catches every stuck-open transistor; plain ordering misses one |

The end-to-end test at full size covers:

* normal operation, checked against a reference ALU;
* a 356-cycle self test with OK high;
* the signature 8'h89, checked against an independent model;
* a forced stuck-at fault that keeps OK low;
* normal operation resuming after each test.

The design has no size parameters. Every testbench runs the real design.

Where this RTL makes its own choices and where it stops:

* **Not reproduced at gate level.** The original design builds the
  multiplexer into the first stage of each flip-flop, adding no delay. This
  RTL writes a multiplexer in front of a flip-flop and leaves timing to
  synthesis. The feedback gate networks of the input register are replaced
  by the generators described above. They produce the same pattern sets, but
  probably not in the same order.
* **Own choices:**
  * the signature polynomial, and hence the golden value;
  * the generator polynomials and the P3 digit counter;
  * Cn = 1 in P1/P2;
  * the phase encoding;
  * a synchronous phase advance in place of a clock derived from the
    end-of-phase gates;
  * the asynchronous reset;
  * the `test_done` flag.
* **Signature aliasing.** The exhaustive patterns expose every fault that
  changes a partition's behaviour. The 8-stage signature then lets through
  roughly one erroneous response stream in 256. Of the 68 injected stuck-at
  faults, every one changed the responses, but one (F3 stuck-at-1) compacts
  to the fault-free signature, so OK stays high for it. A longer analyzer,
  or a different polynomial or pattern order, moves or removes such cases.
* **The checker itself.** The test circuitry checks the ALU. Faults that only
  affect the registers' normal-mode wiring need another test, such as a
  continuity check of the pins.
* **Left out.** The alternative scheme, which routes partition boundaries to
  the pins through added multiplexers (1 056 patterns, extra gate delays), is
  not implemented.
* **Cost.** The gate-level version of this self test was estimated at about
  37 % extra gates over the bare 74181. That is a high figure, because the
  74181 has only 63 gates. The synthesized cell counts of this RTL are not
  comparable to it.

## Files

* `rtl/bist181_pkg.sv`: phase enum, ALU input/output structs, pattern
  counts, signature taps, golden signature.
* `rtl/alu181_n1.sv`, `rtl/alu181_n2.sv`, `rtl/alu181.sv`: the ALU and its
  partitions.
* `rtl/reconfig_lfsr.sv`, `rtl/input_tpg.sv`, `rtl/output_sa.sv`,
  `rtl/test_control.sv`: the self-test machinery.
* `rtl/autonomous_alu181.sv`: the top. The ALU pins, Y1..Y8, OK,
  `test_done`, the phase, and the CMOS cell's pins `cmos_*`.
* `rtl/cmos_nor_cd.sv`: the behavioural CMOS NOR with C/D transistor.
* `tb/tb_*.sv`: one self-checking testbench per module, plus the
  fault-coverage campaign. Each prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bist181_pkg.sv tb/tb_autonomous_alu181.sv \
    --top-module tb_autonomous_alu181 -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run any other. The package must come first on
the command line; `-Irtl` lets Verilator find the modules by file name.
Every run takes well under a second. For linting a module on its own:

```sh
verilator --lint-only -Wall rtl/bist181_pkg.sv rtl/autonomous_alu181.sv -Irtl
```
