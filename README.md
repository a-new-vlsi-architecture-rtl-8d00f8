# Multiplier-accumulator with the accumulator folded into the carry-save tree

A conventional multiplier-accumulator (MAC) computes `P <= P + X*Y` in four steps:
Booth encoding, compression of the partial products into a sum and a carry word, a
final carry-propagating addition that produces `X*Y`, and then a second 2N-bit
carry-propagating addition that adds the product to the accumulator. The last
addition sits in the feedback loop and sets the clock period.

This design removes that loop adder. The accumulator is never stored as a plain binary
number. Its state is kept in the form the compression tree produces anyway:

```
    A = z + 2^N * (s + c)        (mod 2^(2N))
        z : lower N bits, already binary
        s : sum vector of the upper N bits
        c : carry vector of the upper N bits
```

Every clock, the Booth partial products of the new `x*y` are compressed *together with*
`z`, `s` and `c`, and the tree returns a new `(z, s, c)`. The loop therefore contains one
carry-save tree and no wide carry chain. Only when a result is reported does an N-bit
(not 2N-bit) adder turn `s + c` into the upper half of `P`. The lower half `z` needs no
adder at all, because the tree finishes it two bits per row as it goes.

Default size: N = 16, so 16 x 16-bit signed operands and a 32-bit accumulator. One
multiply-accumulate is accepted per clock, and the result appears two clocks later.

## Arithmetic

**Booth digits.** The multiplier `x` (2's complement) is recoded into N/2 digits

```
    d_j = -2*x[2j+1] + x[2j] + x[2j-1],    x[-1] = 0,    d_j in {-2,-1,0,+1,+2}
    x*y = sum_j d_j * 4^j * y
```

**1's-complement partial products.** For each digit the encoder selects `0`, `y` or `2y`
as an (N+1)-bit word and inverts it when the digit is negative. The word `pp[j]` is thus
`d_j*y - neg_j` in (N+1)-bit 2's complement. The missing `+1` is the correction bit
`neg_j`, which is added inside the tree at weight `4^j`. This avoids an incrementer
per partial product.

**Sign extension by constants.** Partial product `j` is placed at column `2j` and has
sign bit `s_j = pp[j][N]`. Instead of sign-extending every row to 2N bits, each row
carries a few constant bits that add up to the same total modulo 2^(2N):

```
    row 0      : columns N+2, N+1, N    <-  ~s_0, s_0, s_0
    row j >= 1 : columns N+2j+1, N+2j   <-  1, ~s_j
```

This works because `-s*2^k = ~s*2^k - 2^k`, and the `-2^k` terms of all rows sum to a
constant. That constant is spread as the `1` bits above.

## The hybrid carry-save tree (`hybrid_csa`)

This is the core of the design. It has N/2 + 1 levels, which is 9 at N = 16 and 5 at
N = 8. Each level is one row of single-bit adders, with no carries inside the row. The
drawing below is for N = 8, with columns 15 (left) to 0 (right):

```
 level     upper half (cols 15..8)            lower half (cols 7..0)       finished
 row 0     HA: {C'} + P0 sign-ext bits        HA: Z' + P0                  -> cla2 -> z[1:0]
 row 1     FA: s,c + P1                       FA: s,c + P1 (cols >= 2)     -> cla2 -> z[3:2]
 row 2     FA: s,c + P2                       FA: s,c + P2 (cols >= 4)     -> cla2 -> z[5:4]
 row 3     FA: s,c + P3                       FA: s,c + P3 (cols >= 6)     -> cla2 -> z[7:6]
 acc row   FA: s,c + S'                                                    carry -> c[0]
```

Rules that make it work:

* **Row 0 needs only half adders.** Its operands are `P0` and one word `{C', Z'}`.
  `Z'` fills columns 0..N-1 and `C'` fills columns N..2N-1, so no column holds more
  than two bits.
* **Rows 1 to N/2-1 use full adders.** Each adds partial product `P_j` to the previous
  row's sum and carry vectors. Above `P_j`'s highest column, only two bits are left,
  so half adders are used there.
* **The lowest carry slot is free.** Within a row, the carry out of column i moves to
  column i+1. The carry vector of row j therefore has nothing in its lowest column
  `2j`, and the correction bit `neg_j` goes in that slot. No extra adder is needed.
* **Two columns are finished per row.** No later partial product reaches columns `2j`
  and `2j+1`. A 2-bit carry look-ahead adder (`cla2`) adds the sum and carry bits
  there. Its five inputs are two sum bits, two carry bits and the carry in from the
  previous row's `cla2`. It produces the final bits `z[2j+1:2j]`. The `cla2` carries
  ripple down the rows, and the first carry in is 0. The chain of N/2 short adders is
  staggered behind the rows: `cla2` number j can start as soon as row j has settled, so
  the chain and the rows overlap in time.
* **The accumulation row adds `S'`.** This extra level adds the fed-back sum vector
  to the upper half. Its own carry vector again has a free lowest slot, column N. The
  carry out of the last `cla2`, i.e. the carry from the lower half into the upper
  half, goes there as `c[0]`.
* **Wrap-around.** Carries out of column 2N-1 are dropped, so the accumulator wraps
  modulo 2^(2N) like an ordinary 2N-bit register.

Per tree at N = 16, the adder counts are: 142 full adders (N^2/2 + N - 2), 61 half
adders, and 8 `cla2` blocks (N/2).

## Pipeline and interface (`mac`)

```
           +--------------+   pp, neg   +------------+  z,s,c   +----------+
  x,y ---->| booth_encoder|------------>| hybrid_csa |--------->| state    |--+--> z_q ----------+
           +--------------+             +------------+          | registers|  |                  |
                                  z',s',c' (0 when acc_clr) ^   +----------+  |   +-----------+  v
                                              +-------------+-----------------+-->|final_adder|->{hi, z_q} -> p
                                                                                  +-----------+
          |<------------------ stage 1 (loop) ----------------------------->|<-- stage 2 ----------->|
```

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `rst_n`     | in  | 1     | asynchronous, active low; clears the accumulator and `out_valid` |
| `in_valid`  | in  | 1     | accumulate `x*y` at this clock edge; with it low the state holds |
| `acc_clr`   | in  | 1     | with `in_valid`: start a new sum, so the state becomes `x*y` |
| `x`         | in  | N     | multiplier (recoded into Booth digits), 2's complement |
| `y`         | in  | N     | multiplicand, 2's complement |
| `out_valid` | out | 1     | `p` holds a new result |
| `p`         | out | 2N    | accumulated value, 2's complement, modulo 2^(2N) |

Timing works as follows:

* An operand accepted at clock edge k is in the state after edge k. It shows on `p`,
  with `out_valid` high, after edge k+2.
* Back-to-back operands are accepted every clock, and results follow at the same rate.
* `p` is reloaded only after a clock in which stage 1 accumulated. Otherwise it holds,
  so the final adder's result is used only when there is something new to report.

## Modules

| file | content |
|------|---------|
| `rtl/mac_pkg.sv`       | Booth select-line type and recoding function |
| `rtl/booth_encoder.sv` | digit recoding, 1's-complement partial products, correction bits |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit cells of the tree |
| `rtl/cla2.sv`          | 2-bit carry look-ahead adder with carry in |
| `rtl/cla4.sv`          | 4-bit carry look-ahead adder with carry in |
| `rtl/hybrid_csa.sv`    | the tree described above |
| `rtl/final_adder.sv`   | N-bit adder made of N/4 rippled `cla4` blocks |
| `rtl/mac.sv`           | top level: two pipeline stages |

Parameter `N` sets the operand width. It must be a multiple of 4, because the final
adder is built from 4-bit blocks. `booth_encoder` and `hybrid_csa` alone accept any even
N >= 4.

## Simulation

Every testbench checks itself. It ends by printing `TB_RESULT checks=<n> failures=<m>`,
and a watchdog stops it if it hangs. With Verilator 5, run from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mac_pkg.sv tb/tb_mac.sv \
          --top-module tb_mac -Mdir obj_tb_mac -o sim && obj_tb_mac/sim
```

Substitute any other testbench name:

| testbench | what it checks |
|-----------|----------------|
| `tb_cla2`, `tb_cla4` | all input combinations |
| `tb_final_adder` | N = 16 and 8, carry chains across block boundaries, random |
| `tb_booth_encoder` | each digit against an independent recoding, and the sum of all partial products against `x*y`; N = 16 random, N = 8 exhaustive |
| `tb_hybrid_csa` | forms its own partial products, then checks `z + 2^N(s+c)` against `z' + 2^N(s'+c') + x*y` for random states; N = 16 and 8 |
| `tb_mac` | whole MAC at the default N = 16 against a 32-bit reference accumulator, about 20,000 clocks |
| `tb_mac_n8` | the same at N = 8 |

`tb_mac` and `tb_mac_n8` check the following:

* `out_valid` must rise exactly two clocks after every accepted operand.
* `p` must then match the reference.
* `p` must not change in between.

They also count, and require at least one of each:

* new sums (`acc_clr`)
* held clocks
* back-to-back accumulation
* signed overflow that wraps the accumulator
* negative digits
* digits of magnitude 2
* carries from the lower into the upper half

## What is this design's own choice

The following follow the reference architecture:

* the three-step organisation: recode, compress-and-accumulate, final add
* the accumulator state held as binary lower half plus sum and carry upper half
* 1's-complement partial products with separate correction bits
* N/2 + 1 tree levels
* two-bit CLAs finishing the lower half row by row
* an N-bit final adder built from 4-bit CLAs
* two pipeline stages at one accumulation per clock

The following were not specified and were chosen here:

* **Which operand is recoded.** The two operand names are used inconsistently in the
  source material. Here `x` is recoded into digits and `y` is the multiplicand.
* **Bit-level placement.** The exact columns and rows where the fed-back carry vector
  and the sign-extension constants enter the tree were chosen here. The reference
  places some of the carry bits in the middle rows rather than in row 0. The value
  computed is the same, but the adder counts differ. This tree uses more half adders
  than the reference's count of 3N/2, and slightly more full adders.
* **Control.** The control signals (`in_valid`, `acc_clr`), the reset and the output
  register were chosen here. The reference describes no control interface.
* **Overflow.** Overflow wraps modulo 2^(2N). The reference does not discuss overflow.
* **Digit 111.** The digit triplet `111` is encoded as +0, not as -0.
* **Gate equations.** The carry look-ahead equations and the Booth select logic are
  textbook forms.

The design was checked against these testbenches only. It has not been mapped to a
standard-cell library, and no timing figures are claimed for it.
