# Reduced delay BCD adder

A combinational adder for packed binary coded decimal (BCD) numbers,
`result = n1 + n2 + cin`, 16 decimal digits (64 bits) wide by default.

A BCD digit adder is slow if it is built naively. Each digit adds in binary.
Then it must check whether the digit sum exceeds 9, which needs the carry
from the digit below. That carry ripples through every digit. This design
removes the ripple. Every digit works out *in advance* whether it will
produce a decimal carry, whether it will only pass one on, or whether it will
stop one. A parallel prefix network then resolves all decimal carries at
once. A second row of independent 4-bit adders applies the correction. Only
the carry network grows with the operand length, and only logarithmically.

## How a digit is classified

Two BCD digits add to a binary value `s` in 0..18. With respect to the
decimal carry, there are three cases:

| digit sum `s` | decimal carry out                  | role               |
|---------------|------------------------------------|--------------------|
| below 9       | never, even with a carry in        | kill               |
| 10..18        | always, whatever comes in          | generate (`dg`)    |
| exactly 9     | only if a carry comes in           | propagate (`dp`)   |

So the decimal carry out of digit *i* has the same form as a binary carry:

    carry[i] = dg[i] | dp[i] & carry[i-1],     carry[-1] = cin

`adder_analyzer` derives the two flags with a handful of gates from the
first-level 4-bit sum `{co, s3, s2, s1, s0}`:

* `dg = co | s3&s1 | s3&s2`. This is true for 10..15 via the bits, and for
  16..18 via the adder's own carry out.
* `dp = s0 & s3`. This is also true for 11, 13 and 15. Those sums already
  have `dg = 1`, so the carry equation does not change. The shortcut saves
  decoding all four bits.

No first-level adder takes a carry in. All digits compute their sums and
flags in parallel, in constant time.

## The carry network

`carry_network` evaluates the equation above for all digits as a radix-2
Kogge-Stone prefix network. The adder's carry in is first folded into digit 0:
`g0 = dg[0] | dp[0] & cin`. Level *k* (k = 0..log2(DIGITS)-1) then combines
each position *i* with position *i - 2^k* using the operator

    (g, p)_hi o (g, p)_lo = (g_hi | p_hi & g_lo,  p_hi & p_lo)

After the last level, the generate of position *i* covers digits *i..0*.
That generate is `carry[i]`. At 16 digits there are four prefix levels.
Any other prefix or look-ahead scheme would give the same function. To try
one, replace this module and keep its ports.

## Correction

Each digit's binary sum is corrected by one more 4-bit adder. It adds

    {0, carry[i], carry[i], carry[i-1]}  =  6*carry[i] + carry[i-1]

| carry in from digit i-1 | carry out of digit i | value added |
|-------------------------|----------------------|-------------|
| 0                       | 0                    | 0           |
| 0                       | 1                    | 6           |
| 1                       | 0                    | 1           |
| 1                       | 1                    | 7           |

The +1 brings in the carry from below. The +6 skips the six unused codes
10..15 when the digit overflows. The low 4 bits of that sum are the BCD
digit, and the correction adder's own carry out is unused. The carries are
used only here, so nothing is counted twice. The decimal carry out of the
whole adder is `carry[DIGITS-1]`.

The critical path runs through: first-level 4-bit adder → one AND and one
OR level of the analyzer → carry network → correction 4-bit adder.

## Hierarchy and files

```
rd_bcd_adder                (rtl/rd_bcd_adder.sv)     full adder, the top
├── bcd_carry_front         (rtl/bcd_carry_front.sv)  first level plus carries
│   ├── adder_analyzer ×16  (rtl/adder_analyzer.sv)   digit sum, dg, dp
│   │   └── cla4            (rtl/cla4.sv)             4-bit carry look-ahead adder
│   └── carry_network       (rtl/carry_network.sv)    Kogge-Stone decimal carries
└── digit_correct ×16       (rtl/digit_correct.sv)    +0/+1/+6/+7 correction
    └── cla4
bcd_pkg                     (rtl/bcd_pkg.sv)          digit type, default size, prefix operator
```

## Interface of `rd_bcd_adder`

| port     | dir | width      | meaning                                         |
|----------|-----|------------|-------------------------------------------------|
| `n1`     | in  | 4·DIGITS   | BCD operand; digit *i* in bits 4i+3..4i         |
| `n2`     | in  | 4·DIGITS   | BCD operand                                     |
| `cin`    | in  | 1          | carry in                                        |
| `result` | out | 4·DIGITS   | BCD sum                                         |
| `cout`   | out | 1          | decimal carry out of the top digit              |

Parameter `DIGITS` (default 16, from `bcd_pkg::BCD_DIGITS`) sets the number of
decimal digits. Any value of 1 or more works, including sizes that are not
powers of two. The block has no clock and no reset. Register its inputs or
outputs as needed. Operand digits must be 0..9. For codes 10..15 the result
is not specified.

Subtraction in ten's complement needs no change inside the adder. Feed the
nine's complement of the subtrahend (each digit 9-d) into `n2` and set
`cin = 1`. The nine's complementer itself is not included.

## Design choices beyond the published description

* The 4-bit adders are textbook one-level carry look-ahead adders. Only
  their role is specified. `cla4` has a carry-in port, which is tied to 0
  everywhere.
* How the carry in enters the carry network is this design's own choice: it
  is folded into digit 0 before the prefix levels.
* The Kogge-Stone wiring is the standard radix-2 form.
* The design is purely combinational, with no pipeline registers.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
with arithmetic computed in the testbench, then prints
`TB_RESULT checks=N failures=M`.

| testbench            | what it covers                                                         |
|----------------------|------------------------------------------------------------------------|
| `tb_cla4`            | all 512 input combinations                                             |
| `tb_adder_analyzer`  | all 100 digit pairs: sum, `dg`, `dp`, carry equation for both carries in |
| `tb_carry_network`   | 16- and 5-digit instances; random and directed all-propagate chains vs a serial model |
| `tb_digit_correct`   | every legal digit situation, and all 64 raw input combinations         |
| `tb_bcd_carry_front` | random and directed 16-digit operands: digit sums and all carries      |
| `tb_rd_bcd_adder`    | full 16-digit adder at default parameters; about 22,000 vectors vs a digit-serial decimal model |

`tb_rd_bcd_adder` also counts how often each mechanism occurred, and fails
if one never did. The mechanisms are: the three digit cases (including a sum
of 9 with and without a carry in), each correction value 0/1/6/7, a carry out,
and a carry that propagates through all 16 digits (for example
9999…9 + 0 + 1). To get long propagate chains, it adds operand pairs whose
digits sum to 9 everywhere except at one random digit.

All testbenches pass with Verilator 5. Timing and area are not modelled. The
adder's appeal is a short critical path, and judging that needs synthesis
with a cell library.

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rd_bcd_adder rtl/bcd_pkg.sv tb/tb_rd_bcd_adder.sv
./obj_dir/Vtb_rd_bcd_adder
```

Lint a module with `verilator --lint-only -Wall -Irtl -y rtl rtl/bcd_pkg.sv rtl/<module>.sv`.
Linting a leaf module alone reports the package's `BCD_DIGITS` as unused.
That warning is harmless.
