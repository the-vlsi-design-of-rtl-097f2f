# Bit-serial (255,223) Reed-Solomon encoder

This is a complete Reed-Solomon encoder for the (255,223) code over GF(2^8), the
outer code of the NASA/ESA concatenated coding standard. It fits in about 270
flip-flops and a few hundred XOR gates. An encoder divides the message
polynomial by the generator polynomial g(x) and appends the remainder. Done the
usual way, that division needs 32 constant multipliers in GF(2^8).
This design needs none. Symbols travel one bit per clock in the *dual basis*, and
Berlekamp's bit-serial multiplication turns every product `z * g_i` into one parity
(XOR) of the bits of a single 8-bit register. All 32 multipliers together become
a fixed 17-row XOR matrix plus one feedback parity.

The architecture is a single-chip NMOS encoder design of the early 1980s, split into a
Product Unit, a Remainder Unit, a Quotient Unit, an I/O Unit and a Control Unit.
The RTL keeps that structure, unit for unit. It runs on one rising-edge clock.

## The code

| quantity | value |
|---|---|
| symbol size m | 8 bits |
| field | GF(2^8) from x^8 + x^7 + x^2 + x + 1, root alpha |
| length n | 255 symbols |
| check symbols 2t | 32 (corrects 16 symbol errors) |
| information symbols k | 223 (any smaller k gives a shortened code) |
| generator | g(x) = prod_{j=112}^{143} (x - alpha^(11 j)) |

With the first root index b = 112 the generator is palindromic: g_i = g_(32-i), and
g_0 = g_32 = 1. So only g_0..g_16 matter. As powers of alpha they are:

```
i   : 0   1   2  3  4  5  6   7   8  9 10  11 12 13  14 15 16
g_i : 1 249  59 66  4 43 126 251 97 30  3 213 50 66 170  5 24   (exponent of alpha)
```

The root alpha^11 was chosen, rather than alpha, because its mapping matrix has
fewer ones, so the XOR matrix is smaller.

## How a product becomes a parity

The polynomial basis is {1, alpha, ..., alpha^7}. Its dual basis
{lambda_0..lambda_7} is defined by Tr(alpha^j lambda_k) = 1 if j = k and 0
otherwise, where Tr is the field trace, a linear map onto {0,1}. Write z in the
dual basis. Its k-th bit is then

    z_k = Tr(z alpha^k).

Two facts follow.

1. **The product bits are parities.** Bit k of the product z*g in the dual basis is
   Tr(z g alpha^k). For k = 0 that is Tr(z g). Tr(z g) is linear in the bits of z: it is the XOR of
   the z_j for which bit j of g, in the polynomial basis, is 1. So row i of the
   *mapping matrix* is just g_i written in the polynomial basis (`rs_pkg::PLA_ROWS`).
2. **Multiplying by alpha is a shift.** The dual form of alpha*z is
   (z_1, z_2, ..., z_7, Tf). The new top bit is Tf = Tr(alpha^8 z). Since
   alpha^8 = alpha^7 + alpha^2 + alpha + 1, Tf = z_0 ^ z_1 ^ z_2 ^ z_7 (`rs_pkg::TF_MASK`).

Load z into register R and shift it with feedback Tf. In bit cycle k, R holds
alpha^k z, and the same fixed parities give Tr(alpha^k z g_i), which is bit k of z*g_i.
In 8 clocks, all 32 products come out bit-serially, low bit first. Since
g_i = g_(32-i), only rows 0..16 are computed. T_17..T_31 are wires from T_15..T_1.
T_0 is just z_0, because g_0 = 1.

## The pipelined division

A textbook encoder runs, once per information symbol a,

    f = a + r_31;   r_i <- r_(i-1) + f g_i   (r_(-1) = 0)

The bit-serial version cannot multiply by f while f's bits are still arriving.
The Quotient Unit therefore works as a one-symbol pipeline:

* **Q** (7 bits) collects bits f_0..f_6 of the quotient coefficient being formed.
  In the last bit cycle (LD, from the divide-by-8 counter), **R** is loaded in
  parallel with those bits and the arriving f_7.
* During the next symbol, R drives the Product Unit with that coefficient. At the
  same time, Q collects the next one.

The multiplications lag the quotient by one symbol. So the Remainder Unit holds the
remainder one step behind:

* 31 symbol shift registers S_0..S_30 (8 bits each) run in a chain.
  S_0 takes T_0, and S_i takes S_(i-1) XOR T_i.
  One symbol time performs r_i <- r_(i-1) + z g_i for the previous quotient z.
* The top coefficient r_31 is never stored. It is formed when needed as
  `rem_bit = S_30 XOR T_31`. This is why 32 check symbols need only 31 registers.
* The next quotient bit is `a XOR rem_bit`.

**After the information symbols.** LM drops, and a clock later SL drops. The
following happens:

1. The quotient input is forced to 0, so Q fills with zeros.
2. During the first check symbol, R still holds the last quotient. `rem_bit` is
   therefore r_31 of the final remainder. At the same time the registers take
   their final values r_0..r_30.
3. At the next LD, R is loaded with zero. All products are then 0, and the
   registers just shift r_30..r_0 out through `rem_bit`.
4. After the 32 check symbols the registers hold zeros again.

## Pins and timing

| pin | dir | meaning |
|---|---|---|
| `clk` | in | clock; one bit per clock |
| `din` | in | information bits, dual basis, bit z_0 of each symbol first |
| `lm` | in | load mode: 1 while information symbols are on `din` |
| `dout` | out | codeword: information symbols, then check symbols r_31..r_0 |

| clock | `lm` | `din` | `dout` |
|---|---|---|---|
| 0 | 1 | bit 0 of information symbol 0 | (previous word) |
| 2 | 1 | bit 2 of symbol 0 | bit 0 of symbol 0 |
| 1783 | 1 | bit 7 of symbol 222 | bit 5 of symbol 222 |
| 1784 .. 2039 | 0 | ignored | last information bits, then check symbols |
| 1786 .. 2041 | | | check symbols r_31 .. r_0, 256 bits |
| 2040 | 1 | bit 0 of the next word | bit 6 of r_0 |

* `dout` repeats `din` two clocks later: one input flip-flop (F0) and one output
  flip-flop (F1). The check symbols follow with no gap.
* A word of k information symbols takes (k + 32) x 8 clocks. For k = 223 that is 2040.
  Words may follow back to back: raise `lm` again exactly 256 clocks after it fell.
* `lm` must be high for a whole number of symbols, 1 <= k <= 223. It must stay low for
  at least 256 clocks between words. An assertion in `control_unit` reports `lm` falling
  in the middle of a symbol.
* There is no reset pin. The rising edge of `lm` produces START (`lm & ~sl`). START
  clears the remainder registers, Q, R and the bit counter on the same edge that
  captures the first information bit. Before the first word, `dout` is
  undefined.
* At a 1 MHz clock this gives 223/255 x 1 Mbit/s, about 874 kbit/s, of information.

## Module map

```
rs_encoder                 top: pins clk, din, lm, dout
 |- control_unit           START, SL, LD, bit count
 |   |- start_sl_gen       SL = lm delayed 1 clock, START = lm & ~SL
 |   `- div_counter        divide-by-8 counter, LD in bit cycle 7
 |- io_unit                F0, SL output multiplexer, F1
 |- quotient_unit          Q (7 bits) and R (8 bits, parallel load, Tf feedback)
 |- product_unit           mapping matrix: T_0..T_31 and Tf from R
 `- remainder_unit         S_0..S_30 chain, rem_bit = S_30 ^ T_31
     `- sym_shift_reg      one 8-bit serial register S_i
rs_pkg                     code constants, mapping matrix rows, Tf mask
```

## Changing the code

All units take the parameters `M` (symbol bits), `NCHK` (2t), `PLA_ROWS` and `TF_MASK`.
Their defaults come from `rs_pkg`.

* **Other generator or field.** Set `PLA_ROWS[i]` to g_i in the polynomial basis
  (bit j = coefficient of alpha^j), for i = 0..NCHK/2. Set `TF_MASK` to alpha^M in the
  polynomial basis. The generator must be palindromic: choose b with 2b + 2t - 1 = 2^m - 1.
  The input and output symbols are then in the dual basis of the new field.
* **Other symbol size.** `M` sets the width of every register. Q becomes M-1 bits,
  and the counter divides by M.
* **Other t.** `NCHK` sets the number of remainder registers (NCHK-1).
* **Shorter messages** need no change. Hold `lm` high for fewer symbols.

`tb/tb_rs_encoder_gf16.sv` shows the smallest case, the (15,11) code over GF(2^4) from
x^4 + x + 1 with gamma = alpha and b = 6. It uses `M=4, NCHK=4, PLA_ROWS={4'b0010, 4'b1000, 4'b0001}, TF_MASK=4'b0011`.

## Departures from the original circuit

* **Clocking.** The original derives two non-overlapping phases from CLK and uses
  dynamic (charge-storage) shift registers. Here every register is a static
  flip-flop on the rising edge of `clk`. The two-phase clock generator, pads and
  power pins are not modelled.
* **Control logic.** The original specifies only what START, SL and LD do. The gates
  here are this design's own: START is `lm & ~sl`, SL is `lm` delayed one clock, and
  LD decodes count 7 of a binary counter.
* **Bit order and latency.** The serial order (z_0 first) and the exact 2-clock latency
  are this design's reading of the I/O description.
* **No clear on F0/F1.** START does not clear the I/O flip-flops. Otherwise the last
  check bit of one word would be lost when the next word follows immediately.
* **Parity network.** The mapping matrix is written as XOR reductions. The original
  implements the same function as a PLA.

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches use the
reference arithmetic in `tb/rs_ref_pkg.sv`: field multiplication, trace, basis
conversion, the generator product and a long-division encoder. That code shares
nothing with the RTL.

| testbench | checks |
|---|---|
| `tb_rs_encoder` | Default size. Six words: two full random words back to back, all-zero, all-ones, and shortened words of k = 100 and k = 1. Each `dout` bit is checked against the reference. All 32 syndromes of every received word are checked to be zero. Each word must take (k+32)x8 clocks. The run counts START, LD, SL switches, R cleared in the check phase, back-to-back words and shortened words, and requires each to occur. |
| `tb_rs_encoder_gf16` | The same checks on the (15,11) GF(2^4) configuration, over 36 words. |
| `tb_product_unit` | Exhaustive check of every T_i and Tf for all 256 inputs, and for all 16 in GF(2^4). Also checks that the computed generator has the coefficients listed above. |
| `tb_remainder_unit` | Random product bits against the closed form rem_bit(c) = XOR_j T_j(c - 8(31-j)). |
| `tb_quotient_unit` | In bit k of each symbol, R holds alpha^k times the previous quotient, or zero after SL drops. |
| `tb_io_unit`, `tb_start_sl_gen`, `tb_div_counter`, `tb_control_unit`, `tb_sym_shift_reg` | Cycle-exact checks of each control and storage element. |

Each testbench prints `TB_RESULT checks=N failures=F` and has a watchdog.
Build and run a testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rs_pkg.sv tb/rs_ref_pkg.sv tb/tb_rs_encoder.sv --top tb_rs_encoder
./obj_dir/Vtb_rs_encoder
```

The full-size test runs in well under a second. What is not verified: timing or
area in any technology, and behaviour when `lm` breaks the rules above (the
assertion flags a mid-symbol fall; a too-early rise restarts the encoder and the
word in progress is lost).
