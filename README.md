# 512-bit carry-select adder with one ripple adder per group

A carry-select adder (CSLA) breaks a long carry chain into groups. Each group
works out its sum twice, once assuming a carry in of 0 and once of 1. When
the real carry arrives from the group below, a multiplexer picks one of the
two answers. The critical path is then one small ripple adder plus one
multiplexer per group, not a ripple through every bit. The cost is that each
group needs two ripple carry adders (RCAs).

This design keeps one RCA per group and does the two additions one after the
other, on the two phases of a clock:

* The clock `en` is wired to the group RCA's carry in. While `en` is high,
  the RCA computes `a + b + 1`. A row of D latches, transparent while `en` is
  high, takes that result: the sum bits and the carry.
* While `en` is low, the latches hold the `a + b + 1` result and the same RCA
  now computes `a + b + 0`. A row of 2:1 multiplexers, all steered by the
  carry out of the group below, passes on either the latched result or the
  live one.

So the second RCA is replaced by W+1 latches, and one addition takes one
clock period. The groups follow the square-root pattern: 2, 2, 3, 4 and 5
bits in each 16-bit slice. The 512-bit adder chains 32 such slices.

## Timing of one addition

```
          |<------------- one addition ------------->|
en    ____/‾‾‾‾‾‾‾‾‾‾‾‾\___________________________/‾‾‾
a,b,cin  X  stable for the whole period              X next
RCAs       compute a+b+1   |  compute a+b+0
latches    transparent     |  hold a+b+1
sum,cout   not valid       |  valid once the carry has settled
```

* `a`, `b` and `cin` must be applied before `en` rises and held until the
  end of the low phase that follows.
* `sum` and `cout` are valid in the low phase of that same period, once the
  carry has passed through the slices. During the high phase they are not
  meaningful; a group whose select carry is 0 then shows `a + b + 1`.
* The high phase only needs to be long enough for a group RCA (at most 5
  bits) to settle and for the latches to capture it. It can be much shorter
  than the low phase, which has to cover the whole carry-select chain.
* The design relies on a race going the right way. When `en` falls, the RCA
  outputs start changing from the carry-in-1 to the carry-in-0 result. The
  latches must close before that change reaches them. The RCA delay normally
  ensures this. In a zero-delay simulation the latch always wins. In silicon
  or an FPGA this hold condition has to be checked with timing analysis.
* There are no flip-flops and no reset. The only state is in the latches,
  and every high phase rewrites all of it.

## Structure

### Full adder and ripple adder

`full_adder` computes `sum = a ^ b ^ cin` and `cout = ab + b·cin + a·cin`,
written through propagate `P = a ^ b` and generate `G = a & b` terms.
`rca #(W)` chains W of them. Its default width of 4 is a reference size; the
CSLA uses it at 2, 3, 4 and 5 bits.

### D latch

`d_latch` is transparent while `en = 1`. After `en` falls it holds the value
`d` had just before the fall. It also has a complement output `qn`. The
classic form is four NAND gates; here it is written as an `always_latch`, so
synthesis maps it to a latch cell and no tool sees a combinational loop.

### Latch group (`latch_csla_group #(W)`)

A group has one W-bit RCA with `cin = en`, W+1 latches (W sum bits plus the
carry) and W+1 multiplexers. Its select input `sel` is the carry out of the
group below:

| `sel` | `{cout, sum}` in the low phase      |
|-------|-------------------------------------|
| 1     | latched result, `a + b + 1`         |
| 0     | live RCA result, `a + b + 0`        |

### 16-bit slice (`csla16`)

| group | bits  | built from                        | latches |
|-------|-------|-----------------------------------|---------|
| 0     | 1:0   | plain 2-bit `rca`, carry in `cin` | 0       |
| 1     | 3:2   | `latch_csla_group #(2)`           | 3       |
| 2     | 6:4   | `latch_csla_group #(3)`           | 4       |
| 3     | 10:7  | `latch_csla_group #(4)`           | 5       |
| 4     | 15:11 | `latch_csla_group #(5)`           | 6       |

Group 0 does not need the clock: its carry in is real from the start. The
group widths and offsets are in `csla_pkg` (`GROUP_W`, `GROUP_LSB`).

### 512-bit adder (`csla512`, the top)

`csla512 #(N_SLICES = 32)` chains the slices. The carry out of slice k
becomes the carry in of slice k+1's plain 2-bit RCA. So slice 31's top group
covers bits 511:507. The whole adder has 32 × 18 = 576 latch bits. The
critical path is slice 0's 2-bit RCA, then two RCA bits and four
multiplexers in each slice after it, then the remaining multiplexers of the
top slice.

| port   | dir | width | meaning                                        |
|--------|-----|-------|------------------------------------------------|
| `en`   | in  | 1     | clock: high = carry-in-1 phase, low = result   |
| `a`    | in  | 512   | operand                                        |
| `b`    | in  | 512   | operand                                        |
| `cin`  | in  | 1     | carry in                                       |
| `sum`  | out | 512   | sum, valid in the low phase                    |
| `cout` | out | 1     | carry out, valid in the low phase              |

`N_SLICES` sets the width in 16-bit steps (`WIDTH = 16 * N_SLICES`).

## Where this follows its source and where it chooses

Taken from the source design:

* The full adder equations.
* The two-phase use of one RCA per group with `en` as its carry in.
* Latches for the sum and carry of the carry-in-1 case.
* The multiplexers steered by the carry from the group below.
* The plain 2-bit low group and the 2/2/3/4/5-bit group split of a 16-bit
  slice.
* The 512-bit width, and the top group at bits 511:507.

Choices made here:

* **The 512-bit adder is 32 repeated 16-bit slices.** The source shows only
  the first four groups and the top group (bits 511:507) of the wide adder.
  A top group of 5 bits is what repeating the 16-bit slice gives. A single
  chain of ever-wider groups would end in a much wider one.
* **W+1 latches per group.** One of them stores the group's carry. The
  source is not consistent on whether the carry gets a latch, but its group
  diagrams have one, and the carry-in-1 carry has to be kept for the next
  group's select.
* **Multiplexer polarity.** A select of 1 picks the carry-in-1 result, as in
  any carry-select adder.
* **Carry in.** A `cin` input on the lowest group is provided.
* **No registers and no reset.** Neither is described. Wrap the adder in
  registers if it is to sit in a synchronous pipeline, and meet the timing
  rules above.
* The latch is behavioural (`always_latch`), not four NAND gates.

Not modelled: the source's delay and power figures for the 512-bit adder
(21.7 ns and 24 mW on a Spartan-3E FPGA). These depend on the technology and
cannot be checked in RTL simulation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_full_adder`       | all 8 input combinations |
| `tb_rca`              | all operand pairs and carry values at 4 bits; random values at 5 bits |
| `tb_d_latch`          | q follows d while enabled; q holds through toggling d while disabled; qn = ~q |
| `tb_latch_csla_group` | widths 2 to 5. Latches hold `a+b+1` after the high phase and keep it through the low phase. The output equals `a+b+sel` in the same period. Both select values occur |
| `tb_csla16`           | 20,000 additions with random and long-propagate operands. Each group picks both the latched and the live result. Carries go through all 16 bits |
| `tb_csla512`          | 4,000 additions at the full 512-bit size, no parameter overrides |

`tb_csla512` compares each sum with a 513-bit reference at the end of the
same clock period. It also counts three mechanisms, and each must occur:

* Each of the 128 latch groups selects both its latched and its live result.
* A carry crosses every one of the 31 slice boundaries.
* A carry of 1 ripples through all 512 bits (`a = ~b`, `cin = 1`).

In the testbenches one clock period is 10 time units: operands change 1 unit
before `en` rises, `en` stays high for 4 units, then the result is checked 4
units after it falls.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/csla_pkg.sv tb/tb_csla512.sv \
          --top-module tb_csla512 -Mdir obj_csla512
./obj_csla512/Vtb_csla512
```

Replace `tb_csla512` with any other testbench name. The full-size build
takes about ten seconds and the simulation well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/csla_pkg.sv rtl/csla512.sv`. Verilator
reports that `d_latch`'s `always_latch` infers no latch once the latch is
inlined into a larger module. Synthesis still maps every one of them to a
latch cell (576 in `csla512`), and simulation shows that they hold.
