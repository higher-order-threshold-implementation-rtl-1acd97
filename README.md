# Second-order threshold implementation of the AES S-box

This is a masked AES S-box that resists first- and second-order power analysis,
bivariate attacks included, even when the logic glitches. The secret input byte
never appears in the circuit. It enters as six Boolean shares: any five of them are
random, and the XOR of all six is the byte. The S-box works on the shares and returns
six shares of `S(x)`. No stage of the pipeline ever combines enough shares to
recover a secret value. Second-order security needs more than that: any *two*
intermediate wires taken together must also reveal nothing.

The construction is a threshold implementation (TI). It rests on three rules:

* **Non-completeness.** Take any two of the functions that compute the output
  shares of a stage. Together they must miss at least one input share. Glitches
  can only combine what reaches a function's inputs, so they cannot leak the
  secret. A register after every nonlinear step ends the glitch propagation.
* **Refreshing.** Each nonlinear stage's output is remasked with fresh random
  bits before it is registered. Uniform sharings alone compose safely only at
  first order.
* **Enough shares.** A degree-2 function (a product) needs at least
  `t*d + 1 = 5` input shares for second order. This design uses 6 input shares
  and 7 output shares per product.

Cost of one evaluation:

| | |
|---|---|
| latency | 6 clock cycles |
| throughput | 1 evaluation per clock (fully pipelined) |
| fresh randomness | 126 bits per evaluation |
| state | 396 flip-flops |

## Arithmetic: the tower field

The AES S-box is inversion in GF(2^8) followed by an affine map. Inversion is
cheap to share when GF(2^8) is built as a tower, GF(((2^2)^2)^2), with a normal
basis at each level. An element of each level is a pair `(h, l)` of elements of
the level below:

* **GF(2^2).** 2 bits in the normal basis `{W^2, W}`. The unit element is `2'b11`.
  The product is
  `x*y = {e ^ x1&y1, e ^ x0&y0}` with `e = (x1^x0)&(y1^y0)`.
  The inverse is the square, which is a bit swap.
* **GF(2^4).** 4 bits, high pair then low pair, over `Z^2 + Z + N` with
  `N = 2'b10`. The product is
  `(ah*bh ^ f, al*bl ^ f)` with `f = N*(ah^al)*(bh^bl)`.
  In `gf16_mul` this is written out as four bit equations.
* **GF(2^8).** 8 bits, high nibble `a` then low nibble `b`, over `Y^2 + Y + nu`
  with `nu = 4'h1`.

With these conventions, inversion in GF(2^8) takes three steps:

```
d      = a*b ^ nu*(a^b)^2                       (GF(2^4))
d^-1   : e = dH*dL ^ N*(dH^dL)^2,  e^-1 = e^2,
         d^-1 = (e^-1*dL, e^-1*dH)              (GF(2^2))
x^-1   = (d^-1*b, d^-1*a)                       (GF(2^4))
```

The input linear map sends the AES polynomial basis (`x^8+x^4+x^3+x+1`) into the
tower. It maps `x^k` to `r^k`, where `r = 8'h9A` is a root of the AES polynomial in
the tower field. The output linear map undoes this and applies the AES affine
matrix. The affine constant `8'h63` is added to share 0 only.

**Where this departs from the original design.** The GF(2^4) and GF(2^2)
product formulas are the published ones, and they fix `N`. The published design
does not give its linear-map, inverse-map or square-scale matrices. The values of
`nu` and `r` used here were chosen as a valid pair with a low XOR count. They may
differ from the original. The S-box function is the same either way, but
individual gate counts will not match.

## The pipeline

```
x_sh[6]x8 ─► LM ─►R1─► a*b ^ sqsc(a^b) ─►refresh─►R2(7x4)─►compress─► d
                  │                                                   │
                  └──────── a,b carried (6x8) ──────────────────────┐ │
 d ─► dH*dL ^ l1(dH^dL) ─►refresh─►R3(7x2)─►compress─► e            │ │
 d carried (6x4) ─────────────────────────────┐                      │ │
 e ─► l3 (swap) ─► e^-1*dL , e^-1*dH ─►refresh─►R4(7x4)─►compress─► d^-1
 d^-1 ─► d^-1*b , d^-1*a ─►refresh─►R5(7x8)─►compress─► ILM+affine ─►R6─► y_sh[6]x8
```

| stage | logic | register | random bits |
|---|---|---|---|
| 1 | input linear map, per share | R1: 6 x 8 | 0 |
| 2 | shared GF(2^4) product, square-scale merged in | R2: 7 x 4 | 28 |
| 3 | shared GF(2^2) product, `l1` merged in | R3: 7 x 2 | 14 |
| 4 | `l3` (bit swap), two shared GF(2^2) products | R4: 7 x 4 | 28 |
| 5 | two shared GF(2^4) products | R5: 7 x 8 | 56 |
| 6 | inverse linear map and affine, per share | R6: 6 x 8 (output) | 0 |

Later stages need the operands `a`, `b` and `d` again. These are carried forward in
6-share pipeline registers.

In a full AES, the register after the linear map (R1) and the one before the inverse
map could be merged with the state and key registers, which would give 4 cycles.
This design keeps all six registers.

## Sharing the products: the (6,7) sharing

Each nonlinear stage uses the same sharing of a product `x*y`. It takes 6 shares of
each operand and returns 7 shares. Every output share collects some of the 36 cross
products `x_k*y_l`. In 1-based share numbers:

| output | cross products | input shares it sees |
|---|---|---|
| a1 | 2.2 1.2 2.1 1.3 3.1 3.2 2.3 | 1 2 3 |
| a2 | 3.3 3.4 4.3 3.5 5.3 | 3 4 5 |
| a3 | 4.4 2.4 4.2 2.6 6.2 | 2 4 6 |
| a4 | 5.5 1.4 4.1 1.5 5.1 | 1 4 5 |
| a5 | 2.5 5.2 4.5 5.4 | 2 4 5 |
| a6 | 6.6 3.6 6.3 4.6 6.4 | 3 4 6 |
| a7 | 1.1 1.6 6.1 5.6 6.5 | 1 5 6 |

No two rows together see all six shares. That is second-order non-completeness.
The field product is bilinear, so the table applies to whole field elements:
`ti_gf16_mul` and `ti_gf4_mul` XOR `gf*_mul(x_k, y_l)` into output `SHARE_OUT[k][l]`.

Stages 2 and 3 also need a linear term, the square-scale of `a^b` or of `dH^dL`.
This term is shared share by share and added to the product's output shares before
the register, so no extra register is needed. Share `i` of the term must go to an
output that already sees input share `i`, or non-completeness breaks. The placement
is `AFF_SLOT` in `ti_sbox_pkg`:

| linear-term share | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| output share | a7 | a1 | a2 | a3 | a4 | a6 |

## Refresh and compression

Seven shares come out of each multiplier, and the next stage takes six.
`ring_refresh` does this in three steps:

1. **Remask.** Before the register, output share `i` receives `r_i ^ r_(i+1 mod 7)`,
   using seven fresh masks. Every mask enters exactly two shares, so the masks cancel
   and their sum never has to be stored.
2. **Register.**
3. **Compress.** After the register, share 7 is XORed into share 6.

Combining the shares after the register keeps each combination away from the
unrefreshed values. The refreshes use 7 masks each, of 4, 2, 4 and 8 bits:
`7 * 18 = 126` bits per evaluation.

## Interface and timing (`ti_aes_sbox`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset clears every register |
| `in_valid` | in | 1 | `x_sh` carries an evaluation this cycle |
| `x_sh` | in | `[7:0] [6]` | input shares |
| `rnd` | in | `rnd_t`, 126 | refresh masks, fields `s2` (7x4), `s3` (7x2), `s4` (7x4), `s5` (7x8) |
| `out_valid` | out | 1 | `y_sh` holds the result of the input given 6 clocks earlier |
| `y_sh` | out | `[7:0] [6]` | output shares |
| `busy`, `stage_valid` | out | 1, 6 | which pipeline stages hold an evaluation |

Each stage reads its field of `rnd` in the cycle it processes data, so `rnd` must
be fresh and uniformly random in every clock. Holding `rnd` at zero switches
the refresh off, but the logic still computes correct results.
The input shares must be a uniform sharing. This is the caller's job, and so is the
source of randomness: the S-box contains no random number generator.

`sbox_ctrl` asserts that every accepted input leaves exactly six clocks later.
The reset, the `in_valid`/`out_valid`/`busy` tracking (`sbox_ctrl`), the compression
pair and the port layout are choices made for this RTL. The published design spends
a sizeable area on S-box control but does not describe that logic.

## Files

| file | content |
|---|---|
| `rtl/ti_sbox_pkg.sv` | share counts, (6,7) sharing table, linear-term placement, `rnd_t`, GF(2^2)/GF(2^4) products |
| `rtl/ti_aes_sbox.sv` | top: the six-stage pipeline |
| `rtl/ti_lin_map.sv`, `rtl/ti_inv_lin_map.sv` | input and output basis changes, per share |
| `rtl/ti_gf16_sqscl.sv`, `rtl/ti_gf4_sqscl.sv`, `rtl/ti_gf4_inv.sv` | square-scale in GF(2^4), `l1` and `l3` in GF(2^2), per share |
| `rtl/ti_gf16_mul.sv`, `rtl/ti_gf4_mul.sv` | (6,7)-shared multipliers with a merged linear term |
| `rtl/ring_refresh.sv` | ring refresh, stage register, 7-to-6 compression |
| `rtl/sbox_ctrl.sv` | valid pipeline |
| `tb/tb_ref_pkg.sv` | independent reference arithmetic: log-table GF(2^2), tower products, AES field, S-box |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_leakage.sv` | fixed-versus-random t-test on simulated share values |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. The references come from
`tb_ref_pkg`, which builds its fields another way: GF(2^2) from discrete
logarithms, and the AES field from its polynomial. It computes the S-box as `x^254`
followed by the affine map.

* **`tb_ti_aes_sbox`** runs the top at its default size:
  * all 256 inputs back to back with masks on;
  * all 256 inputs with the randomness off;
  * random inputs with idle cycles in between;
  * the same input twice, to check that the output shares change with the masks.

  It checks every result, and that each output appears exactly 6 cycles after its
  input. It takes well under a second.
* **Multiplier testbenches** check the product, and then probe which input shares
  each output share depends on. They check second-order non-completeness from
  those measured dependencies.
* **Linear-block testbenches** check the function on every input value, and that
  each output share depends only on its own input share.
* **`tb_leakage`** runs simulated fixed-versus-random lookups: Welch t-tests on the
  Hamming weights of single shares (first order) and on centred products of
  share pairs (second order), with masks on and off. This is a value-level model
  only. Simulation shows no glitches or power, so passing it says nothing about
  glitch resistance. That rests on the non-completeness checks above.

To simulate one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ti_sbox_pkg.sv tb/tb_ref_pkg.sv tb/tb_ti_aes_sbox.sv \
    --top-module tb_ti_aes_sbox -o sim && ./obj_dir/sim
```

## Limits

* **No physical check.** Security against real power analysis cannot be
  established in RTL simulation. Synthesis must keep each component function
  apart: do not flatten and optimise across the multiplier's output shares, or
  the tool may merge terms and destroy non-completeness.
* **Basis matrices.** The linear and inverse linear maps, and `nu`, are this
  design's own. Area per block will therefore differ from published figures.
* **Register count.** The published register area corresponds to about 342
  flip-flops. This RTL has 390 datapath flip-flops, exactly one 6 x 8 register
  more. The original may place one of its six cycle boundaries differently, for
  example with no separate output register. Here the output is registered after
  the inverse linear map, and latency is 6 cycles.
* **S-box only.** The full masked AES that would surround this S-box is not
  included: state and key arrays, conversion from 3 to 6 shares, and control.
