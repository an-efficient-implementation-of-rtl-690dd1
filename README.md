# S-MB fused add-multiply operator

Many DSP kernels compute a product whose multiplier is itself a sum: `Z = X * (A + B)`. The
direct implementation adds `A + B` with a carry-propagate adder and feeds the sum to a Modified
Booth (radix-4) multiplier, which first recodes the sum into Booth digits. This RTL fuses the
adder into the Booth recoder. A small network of ordinary and *signed* adder cells turns `A` and
`B` straight into the radix-4 digits of `A + B`, in the range −2..+2. No binary sum is formed.
Carries never travel further than one digit. The multiplier behind the recoder is conventional:
Booth encoders, Booth partial-product decoders, a Wallace tree of exact 4:2 compressors and
full adders, and a ripple-carry adder.

There are three recoding variants, S-MB1, S-MB2 and S-MB3. They differ only in the cells that
form each digit. Each has an even-width and an odd-width form. All of the RTL is combinational
SystemVerilog (IEEE 1800-2017) with no clock.

## Arithmetic of the sum-to-Booth recoding

A radix-4 Modified Booth digit is `d = -2*y(2j+1) + y(2j) + y(2j-1)`. The recoder emits each
digit `j` as three bits `{n2, p1, q1}` with value `-2*n2 + p1 + q1`, so the standard Booth table
applies to them unchanged.

Operand `B` is first rewritten in its own Booth form. In two's complement, for even width,

    B = sum_j 4^j * ( -2*b(2j+1) + b(2j) + b(2j-1) ),   b(-1) = 0

So digit slice `j` (weight `4^j`) holds these terms:

| weight | terms |
|---|---|
| 1 | `a(2j)`, `b(2j)`, `b(2j-1)` (all positive), plus the carry `t(j)` from slice `j-1` |
| 2 | `a(2j+1)` (positive), `b(2j+1)` (negative) |

The slice reduces this to a carry `t(j+1)` into the next slice and the digit
`d(j) = -2*x + s0 + t(j)`:

1. A full adder adds the three weight-1 bits: `a(2j) + b(2j) + b(2j-1) = 2*c1 + s0`.
2. The weight-2 value `a(2j+1) - b(2j+1) + c1` lies in −1..2. It is written as `2*t(j+1) - x`,
   with `x` negatively weighted.
3. The carry in `t(j)` is not added to anything. It becomes the third digit bit `q1`.

The digit is therefore `-2*x + s0 + t(j)`, always in −2..+2. `t(j+1)` depends only on the bits
of slice `j`, so no carry chain runs through the recoder. Its delay is the same for every width.

### Signed adder cells

Step 2 needs adder cells in which some inputs or outputs count negatively. Every cell has the
same value range on both sides, so each one is exact.

| cell | module | equation | gates |
|---|---|---|---|
| FA | `fa` | `2co + s = p + q + ci` | ordinary full adder |
| FA* | `fa_star` | `2co − s = p − q + ci` | full adder on `(p, ~q, ci)`, sum inverted |
| FA** | `fa_dstar` | `−2co + s = −p − q + ci` | full adder on `(p, q, ~ci)`, sum inverted |
| HA | `ha` | `2c + s = p + q` | ordinary half adder |
| HA** | `ha_dstar` | `2c − s = q − p` | `s = p ^ q`, `c = q & ~p` |

### The three variants

The variants differ only in how step 2 is built:

- **S-MB1** (`smb1_recoder`) uses one FA* on `a(2j+1)`, `b(2j+1)` and `c1`.
- **S-MB2** (`smb2_recoder`) uses two signed half adders:
  - the first HA** forms `a(2j+1) − b(2j+1) = 2*t1 − u`;
  - the second HA** forms `c1 − u = 2*t2 − x`;
  - `t1` and `t2` are never both 1, so `t(j+1) = t1 | t2`.
- **S-MB3** (`smb3_recoder`) uses a conventional HA and an HA**:
  - the HA forms `a(2j+1) + c1 = 2*g + p`;
  - the HA** forms `p − b(2j+1) = 2*t2 − x`;
  - `g` and `t2` are exclusive, so `t(j+1) = g | t2`.

For a given input, all three produce the same digits. In hardware they differ in gate count
and depth. After synthesis the 8-bit recoders come to 59, 51 and 47 generic cells.

### Width, sign and the top digit

The sum of two N-bit numbers needs N+1 bits. The recoder therefore always emits `N/2 + 1`
digits, 5 for both N = 8 and N = 9. The result is exact, and overflow cannot occur.

- **Odd N.** The two sign bits meet alone in the top slice. There
  `−a(N−1) − b(N−1) + b(N−2)` goes through an FA**, and the top digit is `{co, s, t(K)}`.
- **Even N.** The regular slices have treated `a(N−1)` as positive. One extra digit,
  `t(K) − a(N−1)`, corrects this. It is wired as `{a(N−1), a(N−1), t(K)}`, which needs no gate.

## Multiplier back end

- **`mb_encoder`** turns `{n2, p1, q1}` into `S = n2`, `ONE = p1 ^ q1` and
  `TWO = n2·~p1·~q1 | ~n2·p1·q1`. The code `111` gives S = 1 with magnitude 0.
- **`booth_decoder`** forms the input carry `cin = S & (ONE | TWO)`, which is 1 only for the
  digits −1 and −2. It then builds the row `pp(i) = ((ONE & x(i)) | (TWO & x(i−1))) ^ cin`, N+1
  bits wide. For a negative digit the row is the one's complement of `|d|*X`, and
  `pp + cin = d*X`. The negative-zero code gives an all-zero row with `cin = 0`.
- **`fam_unit`** sign-extends each row to 2N+1 bits and shifts it left by `2j`. It adds one more
  row that holds `cin(j)` at bit `2j`, which supplies the +1 corrections. That makes N/2+2 rows:
  6 for N = 8 or 9.
- **`wallace_tree`** reduces the rows level by level:
  - every four rows go through a row of `compressor_4_2` cells;
  - three leftover rows go through a row of full adders;
  - one or two leftover rows pass through unchanged.

  For 6 rows this takes two levels (6 → 4 → 2). Each compressor is two full adders in series.
  Its lateral `cout` depends only on `x1..x3`, never on `cin`, so a compressor row does not
  ripple. Rows are fully sign-extended and all arithmetic is modulo 2^(2N+1).
- **`ripple_carry_adder`** adds the last two rows into `Z`, which has 2N+1 bits in two's
  complement. Every product fits exactly: the largest is (−2^(N−1))·(−2^N) = 2^(2N−1).

## Modules and interfaces

    fam_top                    six operators side by side
    └─ fam_unit  (N, SCHEME)   Z = X*(A+B)
       ├─ smb1/2/3_recoder     A, B → N/2+1 digit triplets   (fa, fa_star, fa_dstar, ha, ha_dstar)
       ├─ mb_encoder  ×(N/2+1)
       ├─ booth_decoder ×(N/2+1)
       ├─ wallace_tree         (compressor_4_2, fa)
       └─ ripple_carry_adder   (fa)
    fam_pkg                    digit types, Wallace-tree sizing functions

**`fam_unit #(N = 8, SCHEME = 1)`** has inputs `a`, `b`, `x` (N bits, two's complement) and
output `z` (2N+1 bits). `SCHEME` selects S-MB1, S-MB2 or S-MB3.

**`fam_top #(N_EVEN = 8, N_ODD = 9)`** holds the six configurations: three schemes, each at an
even and an odd width. Its port arrays are indexed by scheme (index `s` is S-MB`s+1`):

- `a_even`, `b_even`, `x_even`: `[3]`, each N_EVEN bits;
- `z_even`: `[3]`, each 2·N_EVEN+1 bits;
- `a_odd`, `b_odd`, `x_odd`, `z_odd`: the same at N_ODD.

The six operators share nothing. They sit together so that all of them can be built and
compared in one run.

There are no registers, so `z` is valid one combinational delay after the inputs change. If a
pipeline is wanted, the natural cut is between the recoder/decoder stage and the Wallace tree.

## How far the RTL can be trusted

Every block above the adder cells has a self-checking testbench in `tb/`:

- **Recoders:** checked exhaustively over all operand pairs at widths 3, 4, 8 and 9. The
  digit value is rebuilt and compared with `A + B`.
- **Encoder, decoder and compressor:** checked exhaustively.
- **Wallace tree:** checked with random rows at several row counts (3, 6, 7, 9, 12).
- **`fam_unit`:** all 65 536 `(A, B)` pairs for eight `X` values at 8 bits; exhaustive at 4 and
  5 bits; random at 9 bits.
- **`tb_fam_top`:** runs all six configurations at full size. It also counts, and requires,
  every Booth digit value, the negative-zero code, sums that overflow N bits, and the extreme
  product.
- **`tb_fam_workload`:** exhaustive over all 2^24 `(A, B, X)` triples for the three 8-bit
  operators, plus 2 million random triples for the three 9-bit ones.

The adder cells `fa`, `fa_star`, `fa_dstar`, `ha` and `ha_dstar` have no testbench of their
own. The exhaustive recoder and compressor tests cover every use of them.

## Choices made in this RTL

The overall structure is the published one:

- the fused sum-to-Booth recoder;
- FA/FA* slices for S-MB1, and FA** at the top of odd widths;
- Booth encoder and decoder;
- a Wallace tree of exact 4:2 compressors and full adders;
- a final ripple-carry adder;
- 8-bit and 9-bit evaluation widths.

The following are this RTL's own choices. Change them knowingly.

- **FA\* sign convention.** FA* is implemented as `2co − s = p − q + ci`. This is the sign
  arrangement of these terms whose two sides cover the same range, −1..2, so the cell is exact.
- **Slice wiring of all three variants.** `B` is taken in Booth form, and `b(2j−1)` is the
  third FA input. The incoming carry is used directly as a digit bit.
- **S-MB2 and S-MB3 cells.** The published cell lists are:
  - S-MB2: a full adder and two HA*-type half adders;
  - S-MB3: a full adder plus conventional HA, HA* and HA**.

  In the slices used here, both S-MB2 half adders see one positive and one negative input, so
  both are the HA** form. In S-MB3, the role of HA* shrinks to its OR carry output.
- **Even-width top digit** `{a(N−1), a(N−1), t}`. It keeps the full N+1-bit sum.
- **Numbers and negative rows.** Operands are two's complement. `Z` is 2N+1 bits. Negative
  rows are one's complement plus a correction row, and rows are fully sign-extended; no
  sign-extension prevention is used.
- **No half adders in the Wallace tree.** A row of half adders does not reduce the row count.
- **Purely combinational datapath.**

The published comparison gives FPGA slice counts and delays for conventional, earlier and
proposed operators. This RTL does not reproduce those figures. It contains neither the
conventional adder-plus-multiplier operator nor the earlier design used as a reference.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/fam_pkg.sv \
              tb/tb_fam_top.sv --top-module tb_fam_top
    ./obj_dir/Vtb_fam_top

Replace `tb_fam_top` with any other testbench name in `tb/`. The package `rtl/fam_pkg.sv`
must come first on the command line. To try another width, set `N` on `fam_unit` (any N ≥ 3)
or `N_EVEN`/`N_ODD` on `fam_top`. Everything, the Wallace tree depth included, sizes itself from
`N`.
