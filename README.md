# Flagged BCD digit adder

Adding two BCD digits takes two steps. First add them in binary. Then, if the
binary sum is above 9, add 6 (`0110`) to skip the six unused codes and raise a
decimal carry. The textbook circuit builds this with two 4-bit adders. The
second adder only ever adds the constant 6, so it is mostly wasted logic.

This design replaces the second adder with *flagged* constant addition. For a
fixed constant K, the bits of `S + K` differ from `S` only where a flag bit is
set, so `S + K = S xor F`. The flags `F` come from a short AND/OR carry chain
that depends only on `S` and on the fixed bits of K. For K = 6 this is a
handful of gates plus four XORs. A multiplexer then picks the corrected digit
or the plain sum.

The RTL is a purely combinational one-digit adder. Its first stage can be a
ripple carry, carry skip or carry select adder.

## Datapath

```
 a[3:0] b[3:0]
    |      |
 +--v------v--+
 | fast binary |  S = a + b (carry in 0), carry C0
 |   adder     |
 +--+-------+--+
    |S      |C0
    |   +---v-------------+
    +-->| excess-9 detector|--- cout (sum > 9) ----------------+
    |   +------------------+              |                    |
    |   +------------------+              |                    |
    +-->| flag bit         |<-- cout (enable)                    |
    |   | computation      |--- F3..F0                           |
    |   +------------------+      |                            |
    |   +------------------+      |                            |
    +-->| flag inversion   |<-----+                            |
    |   | M = F xor S      |--- M3..M0                         |
    |   +------------------+      |                            |
    |                        +----v----------+                 |
    +----------------------->| 4 x 2:1 mux   |<-- sel = cout --+
                   S (in 0)  | M (in 1)      |
                             +------+--------+
                                    v
                    r = {cout, cout ? M : S}
```

`r[4]` is the decimal carry and `r[3:0]` is the BCD sum digit. With valid
digits (0..9) the binary sum is 0..18.

## How the flags add 6

Write the first-stage sum as `S3 S2 S1 S0` and the constant as `0 1 1 0`.
Adding the constant bit by bit, with `d_i` the carry into bit `i`:

| bit | constant | carry into the bit | result bit | flag `F_i` (result = `S_i xor F_i`) |
|-----|----------|--------------------|------------|-------------------------------------|
| 0   | 0        | `d0 = 0`           | `S0`       | `F0 = 0`                            |
| 1   | 1        | `d1 = d0 & S0 = 0` | `~S1`      | `F1 = ~d1` (= 1)                    |
| 2   | 1        | `d2 = d1 \| S1`    | `S2 ^ ~S1` | `F2 = ~d2`                          |
| 3   | 0        | `d3 = d2 \| S2`    | `S3 ^ d3`  | `F3 = d3`                           |
| (4) | –        | `d4 = d3 & S3`     | –          | `F4 = d4` (not used)                |

The rule behind the table has two cases:

- **Constant bit 1.** Adding 1 flips the bit unless a carry arrives, which
  flips it back. So the flag is the inverted carry, and the carry out is
  `d | S_i`.
- **Constant bit 0.** The bit flips exactly when a carry arrives. So the flag
  is the carry, and the carry out is `d & S_i`.

The flags are ordinary logic, and `S xor F = (S + 6) mod 16` for every `S`.
The decimal carry is not taken from this chain: it is `cout`.

The flag block first ANDs each sum bit with `cout`. When no correction is
needed (`cout = 0`), the chain therefore stays still and the flags sit at
`0110`. The multiplexer ignores them in that case, and the logic after the
gating does not toggle, which is the reason for the gating (low power).

`F4 = d4` is part of the flag block's carry chain, but no later stage uses
it. It is an output of `flag_bit_computation` and goes nowhere in the top.

## Excess-9 detection

The 5-bit sum `{C0, S3..S0}` is above 9 exactly when

    cout = C0 | S3 & S2 | S3 & S1

In words: a binary carry out (16..18), or 12..15, or 10..11. `S0` does not
matter. `cout` does three things:

- it selects the multiplexer input;
- it enables the flag chain;
- it is the decimal carry `r[4]`.

## First-stage adder variants

`fast_binary_adder` has the typed parameter `ARCH` (`bcd_pkg::adder_arch_e`):

| `ARCH`        | structure                                                                 |
|---------------|---------------------------------------------------------------------------|
| `ADDER_RCA`   | four chained full adders                                                  |
| `ADDER_CSKIP` | two 2-bit ripple groups; a group whose bits all propagate (`a_i ^ b_i`) passes its carry in straight to the next group |
| `ADDER_CSEL`  | 2-bit ripple low part; the high 2 bits are added for carry 0 and carry 1, and the low carry picks one |

All three give identical results. The carry skip form is the default because
it is the reported best variant for area and power. The top `flagged_bcd_adder`
passes `ARCH` through.

## Interface and timing

```systemverilog
flagged_bcd_adder #(.ARCH(bcd_pkg::ADDER_CSKIP)) u_bcd (
  .a(a),   // bcd_digit_t (logic [3:0]), 0..9
  .b(b),   // bcd_digit_t, 0..9
  .r(r)    // logic [4:0]: r[4] decimal carry, r[3:0] sum digit
);
```

- There is no clock and no reset. The output follows the inputs after the
  combinational delay.
- The longest path runs through the first-stage adder carry, the excess-9
  detector, the flag gating and chain, one XOR and the multiplexer.
- The first-stage carry in is tied to 0, so the adder handles one digit pair
  with no incoming decimal carry.
- Inputs 10..15 are not BCD digits, and the result for them is not defined.

## Departures from the original description and choices made here

- **Excess-9 detector.** The original gives inconsistent gate equations for
  this detector. One of them, `(C0 | S3) | (S2 & S1)`, wrongly flags sums of
  6..9. This RTL follows the stated rule "1 exactly when the sum exceeds 9"
  and uses the standard detector shown above, which has the same inputs.
- **Flag equations.** One set of published flag equations omits the
  inversions of `d1` and `d2` and uses OR for `d4`. The RTL uses the other
  published set, the one in the table above. Only that set makes
  `S xor F = S + 6`.
- **Carry skip and carry select sizes.** The group sizes are not given. Two
  2-bit groups are this design's choice.
- **`skip` output.** `carry_skip_adder` has a `skip` output, one bit per
  group, so that tests can observe the bypass. It is not part of the original
  block.
- **No carry in.** The top has no decimal carry input, as in the original
  single-digit design. A multi-digit adder is mentioned as an easy extension
  but is not described, and it is not built. Chaining digits would need the
  first stage's `cin` brought out. The detector and the flags already handle
  sums up to 19.
- **Area, delay and power.** Reported FPGA figures (logic elements, ns, mW)
  are not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench compares
against integer arithmetic worked out in the testbench, not against the RTL's
own equations.

| testbench                  | what it covers                                                                    |
|----------------------------|-----------------------------------------------------------------------------------|
| `full_adder_tb`            | all 8 input cases                                                                 |
| `ripple_carry_adder_tb`    | all 512 operand/carry cases                                                       |
| `carry_skip_adder_tb`      | all 512 cases, the per-group `skip` flags, and at least one carry taking the skip path |
| `carry_select_adder_tb`    | all 512 cases, both high-sum selections                                           |
| `fast_binary_adder_tb`     | all three `ARCH` values, all 512 cases each                                       |
| `excess9_detector_tb`      | all 32 five-bit sums against `sum > 9`                                            |
| `flag_bit_computation_tb`  | `S xor F == (S + 6) mod 16` and `F4` for all `S`; idle flags when `cout = 0`      |
| `flag_inversion_logic_tb`  | all flag/sum pairs                                                                |
| `bcd_output_mux_tb`        | all select and input values                                                       |
| `flagged_bcd_adder_tb`     | end to end: all 100 digit pairs on the default adder and on the RCA and CSEL variants |

`flagged_bcd_adder_tb` also counts four events and fails if any of them never
happens:

- an uncorrected sum;
- a correction without a binary carry;
- a correction after a binary carry;
- a carry bypassing the upper carry-skip group.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module flagged_bcd_adder_tb rtl/bcd_pkg.sv tb/flagged_bcd_adder_tb.sv
./obj_dir/Vflagged_bcd_adder_tb
```

## Files

- `rtl/bcd_pkg.sv`: `bcd_digit_t` and the `adder_arch_e` enum.
- `rtl/full_adder.sv`, `rtl/ripple_carry_adder.sv`,
  `rtl/carry_skip_adder.sv`, `rtl/carry_select_adder.sv`: first-stage adder
  building blocks.
- `rtl/fast_binary_adder.sv`: first stage, with the architecture chosen by
  `ARCH`.
- `rtl/excess9_detector.sv`, `rtl/flag_bit_computation.sv`,
  `rtl/flag_inversion_logic.sv`, `rtl/bcd_output_mux.sv`: the correction path.
- `rtl/flagged_bcd_adder.sv`: the top.
- `tb/*_tb.sv`: one testbench per module. `tb/flagged_bcd_adder_full_tb.sv`
  runs the top alone with all its parameters at their defaults.
