# Fuzzy operations on redundant positive-digit numbers

Fuzzy logic works on membership grades: real numbers between 0 and 1. Analog
fuzzy hardware computes with them quickly but imprecisely. This design computes
them digitally instead, and keeps the speed by avoiding long carry chains.

Each grade is coded as a **redundant positive-digit (PD) number**. It is a
radix-2 fraction whose digits may take the values 0, 1, 2 and 3, and each digit
is carried on two wires as a plain 2-bit binary number. The extra digit values
let an addition or a complement addition absorb its carries locally. A carry
moves at most two digit positions, so the adders have the same depth for any
word length.

On top of these adders the design computes five fuzzy operations, all at once,
on two grades A and B:

| output  | operation            | definition          |
|---------|----------------------|---------------------|
| `lsum`  | logical sum          | max(A, B)           |
| `lprod` | logical product      | min(A, B)           |
| `bsum`  | bounded sum          | min(1, A + B)       |
| `bdiff` | bounded difference   | max(0, A − B)       |
| `bprod` | bounded product      | max(0, A + B − 1)   |

The whole unit (`pd_fuzzy_unit`) is combinational: no clock, no registers. The
default word is four digits (`N = 4`).

The arithmetic follows the paper "CMOS-Based Fuzzy Operation Circuit Using
Binary-Coded Redundantly-Represented Positive-Digit Numbers". The paper realises
the circuits as voltage-mode CMOS gates. This RTL describes the same logic
functions. Where the paper leaves a point open, this design fills it in, and the
last sections list every such choice.

## Number format

An N-digit grade is

    X = 0.d(-1) d(-2) ... d(-N) = sum over k of d(-k) * 2^-k,   each d in {0,1,2,3}

In the RTL a number is `pd_pkg::pd_digit_t [N-1:0]`. Element `j` has weight
2^(j−N), so element `N-1` is the most significant digit d(−1) and element 0 is
the least significant one. Within a digit, bit 1 has weight 2 and bit 0 has
weight 1.

The representation is redundant. For example, 1 can be written 0.2000 and
0.1200, and 0.5 can be written 0.1000 and 0.0200. An N-digit PD fraction can
reach almost 3. Valid grades stay between 0 and 1, and the bounded operations
assume their inputs are valid grades. Max and min are exact for any inputs.

## Carry-free digit cells

Both adders split each digit sum into an *intermediate sum* w and a *carry* c,
so that sum = 2c + w. The carry is sent on two wires:

* `c0` (weight 1 at the next digit) goes one position up;
* `c1` (weight 2 at the next digit, so weight 1 two places up) goes two
  positions up.

The final digit is therefore

    u(i) = w(i) + c0(i-1) + c1(i-2)

This is a sum of three one-bit terms, at most 3, so it is always a valid digit
and nothing ripples further. `pd_pkg::pd_final_sum` computes it: the majority of
the three bits is u1 and their parity is u0.

**Addition (`pd_add_digit`, `pd_add`).** Here a + b is in 0..6. The
intermediate sum is w = (a + b) mod 2, and the carry is c = (a + b) div 2 in
0..3, with c = 2·c1 + c0. No carry enters the lowest digit. The carries that
leave the top digit make up an integer part F = 2·c1(−1) + c0(−1) + c1(−2),
in 0..4. Then, exactly,

    A + B = F + U          (U = the N digits u)

**Complement addition (`pd_csub_digit`, `pd_csub`).** This is the harder of the
two. Each digit forms a + 1 − b, which is in −2..4. To keep the final digits
non-negative, the intermediate sum is forced into {2, 3} and the carry is
allowed to be negative:

| a + 1 − b | carry c | intermediate w |
|-----------|---------|----------------|
| 4         | +1      | 2              |
| 2, 3      | 0       | a + 1 − b      |
| 0, 1      | −1      | a + 3 − b      |
| −2, −1    | −2      | a + 5 − b      |

The intermediate sum travels as the single bit w0, with w = w0 + 2. The carry
is coded with an offset, c = 2·c1 + c0 − 2, which gives:

* `c1 = (a > b)`;
* `c0 = (a − b ∈ {−1, 0, 3})`;
* `w0 = not(a0 xor b0)`.

The cell spells these out as two-level sums of products.

The two offsets cancel. The +2 of w(i) meets the −2 of the carry arriving from
below, so the final digit is again u(i) = w0(i) + c0(i−1) + c1(i−2), in 0..3.
Two offsets are left over, one at each end of the word:

* Below the least significant digit, `pd_csub` injects a constant carry of +1
  (c1 = c0 = 1). It supplies the "+1" that turns the digit-wise 1 − b into a
  true complement.
* At the top, the carries leaving the most significant digit form the
  *end-around carry* E = 2·c1(−1) + c0(−1) + c1(−2), in 0..4.

With these,

    A − B = (E − 3) + U          exactly,

and `pd_csub` outputs the integer part E − 3 as the 4-bit signed `ipart`.

*Example (N = 4).* Take A = 0.1200 (= 1) and B = 0.0310 (= 0.875). The digit
sums are 2, 0, 0, 1. The carries (c1, c0) are (1,0), (0,1), (0,1), (0,1), and
w0 = 0, 0, 0, 1. The final digits are U = 0.1122 (= 1.125) and E = 2, so
A − B = −1 + 1.125 = 0.125.

## Deciding the sign: inequality discrimination (`pd_ineq`)

In a redundant number the top digit alone does not give the sign: 0.1000
(= 0.5) has the larger top digit, yet 0.0300 (= 0.75) is the larger number. `pd_ineq` decides the sign of
X = ipart + U. It reads the digits from the most significant one down and keeps
a small residue r:

    r := ipart;   for each digit from the top:  r := 2r + u

After k digits, X·2^k = r + T, where T, the value of the digits not yet read, is
in [0, 3). So:

* r ≥ 1 already proves X > 0;
* r ≤ −4 already proves X < 0;
* neither verdict can change later.

The residue is therefore clamped to −4..1 at each step, and after the last digit
its sign is the sign of X. The outputs are one-hot `gt` / `eq` / `lt`. Each step
looks at one digit and at a residue that only needs three bits, and the whole
scan has depth N. In the example above the residue goes −1, −1, −1, 0, then 2,
which clamps to 1, so the verdict is A > B.

## The five operations

* **Max and min (`pd_maxmin`).** The complement adder feeds `pd_ineq`, which
  drives a 2:1 multiplexer on every digit. The larger input goes to `max` and
  the smaller to `min`. Their digits pass through unchanged, so a redundant
  input keeps its coding. On a tie, A goes to `max` and B to `min`.
* **Bounded sum (`pd_bounded_sum`).** The adder gives F + U, and `pd_ineq`
  tests (F − 1) + U. If A + B ≥ 1, the output is the grade 1, written 0.2000.
  Otherwise F is 0 and the adder digits U are already the answer.
* **Bounded difference (`pd_bounded_diff`).** The complement adder gives
  (E − 3) + U, and `pd_ineq` tests its sign. If it is not positive, the output
  is 0. If it is positive, the integer part E − 3 may be non-zero, so the result
  passes through `pd_normalize`.
* **Bounded product (`pd_bounded_prod`).** The adder gives F + U, and `pd_ineq`
  tests (F − 1) + U. A positive result passes through `pd_normalize` with the
  integer part F − 1.

`pd_normalize` is the only carry-propagating step in the design. It adds the
integer part and the digits as an (N+6)-bit binary number and writes the result
back as a PD fraction with digits 0 and 1, or 0.2000 for exactly 1. It is needed
because, for a positive difference, the end-around carry can still leave an
integer part of −1 or −2 that has to be taken from the digits. Max, min and the
bounded sum never pass through it.

## Module map

    pd_fuzzy_unit                  top, five results in parallel
    ├─ pd_maxmin                   max / min
    │   ├─ pd_csub ── pd_csub_digit × N
    │   └─ pd_ineq
    ├─ pd_bounded_sum
    │   ├─ pd_add ── pd_add_digit × N
    │   └─ pd_ineq
    ├─ pd_bounded_diff
    │   ├─ pd_csub, pd_ineq, pd_normalize
    └─ pd_bounded_prod
        ├─ pd_add, pd_ineq, pd_normalize
    pd_pkg                         digit type, final-sum and scan-step functions

Top-level ports of `pd_fuzzy_unit #(N = 4)`:

* inputs `a`, `b`: `pd_digit_t [N-1:0]`;
* outputs `lsum`, `lprod`, `bsum`, `bdiff`, `bprod`: `pd_digit_t [N-1:0]`;
* flags `a_gt_b`, `a_eq_b`, `bsum_sat` (the limit 1 applied), `bdiff_clip` and
  `bprod_clip` (the limit 0 applied).

Each operation has its own adder, as in the paper, which draws one circuit per
operation. Sharing one `pd_add` and one `pd_csub` would roughly halve the area
without changing any result.

`N` can be any value of 2 or more. The testbenches run the adders at 8 digits
and the discrimination at 6. The integer parts are 4 bits wide whatever N is.

## Where this design fills in or departs from the paper

* **Carry coding.** The paper gives the case table for the complement digit and
  the number of product terms in each carry equation. The coding
  c = 2·c1 + c0 − 2 is a reconstruction. It reproduces the structure of those
  equations: c1 = (a > b) has three product terms, and c0 has six. It makes the
  digit identity exact.
* **Final-sum constant.** The paper writes the complement final sum with a "+1"
  inside each digit. Here the +1 is a single carry injected below the least
  significant digit, which is what keeps every u within 0..3.
* **Final-sum bit names.** The paper's Boolean equations name the majority bit
  u0 and the parity bit u1. Here u1 is the weight-2 bit, as the paper's
  description of the discrimination circuit also states.
* **Sign rule.** The paper states the sign rule for the top digit (0 / 1 / 2 or
  more, plus the end-around carry) and says in words that lower digits decide
  the remaining cases. `pd_ineq` is an exact scan over all digits. With the offsets used here, the paper's literal top-digit thresholds
  would not apply.
* **Digit form of bounded results.** The paper does not say how the bounded
  difference and product bring their results back to digit form. The binary
  normalisation in `pd_normalize` is this design's own.
* **Coding of the grade 1.** The paper does not fix one. 0.2000 is this design's
  choice.
* **Ties and flags.** The tie rule for max/min and the five status flags are
  additions.
* **Not modelled.** The analog side is not modelled: threshold detectors, the
  voltage levels (3 V for logic 1) and the switching time (about 1.2 ns turn-on
  for the discrimination circuit in the paper's 0.5 µm transistor simulation).
  The RTL is pure logic.

## Verification

Every module has a self-checking testbench in `tb/`, named after it with a
`tb_` prefix. Each computes its expected
values with plain integers (`tb_pd_util`) and ends with a line
`TB_RESULT checks=… failures=…`.

| testbench            | what it covers |
|----------------------|----------------|
| `tb_pd_csub_digit`   | all 16 digit pairs × 4 carry inputs against the case table |
| `tb_pd_add_digit`    | all digit pairs × carry inputs |
| `tb_pd_csub`         | all 65 536 pairs at N = 4, and random pairs at N = 8, of A − B = (E − 3) + U; every E value seen |
| `tb_pd_add`          | the same for A + B = F + U |
| `tb_pd_ineq`         | integer parts −6..5 × all 4-digit vectors, and random 6-digit vectors |
| `tb_pd_maxmin`       | all 65 536 pairs of 4-digit numbers, valid grades or not |
| `tb_pd_bounded_*`    | every pair of 4-digit grades of value ≤ 1, redundant codings included (6 400 pairs) |
| `tb_pd_normalize`    | integer parts −4..3 × all 4-digit vectors; value clamped to 0..1, digits 0/1 or 0.2000 |
| `tb_pd_fuzzy_unit`   | end to end at the default size, all 6 400 valid pairs, all five results and flags |

`tb_pd_fuzzy_unit` also counts how often each mechanism occurs, and fails if
any never does. The mechanisms are:

* each comparison outcome;
* each limit taken and not taken;
* inputs with redundant digits;
* the grade 1 as an output;
* positive differences and products whose integer part had to be folded back.

To run one with Verilator 5:

    verilator --binary --timing --assert rtl/pd_pkg.sv tb/tb_pd_util.sv -y rtl \
        tb/tb_pd_fuzzy_unit.sv --top-module tb_pd_fuzzy_unit -o sim
    ./obj_dir/sim

The two packages come first on the command line, and `-y rtl` lets Verilator
find the modules. Replace the testbench file and `--top-module` to run another
testbench. Every run takes well under a second.
