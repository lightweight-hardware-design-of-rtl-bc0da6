# ECDH key generator on a 163-bit binary elliptic curve

A small hardware engine for Elliptic Curve Diffie-Hellman key agreement, aimed at
resource-constrained (IoT) devices. Both steps of ECDH are one scalar point
multiplication by the private key `d`:

* public key: `Q_own = d * G`, with `G` the fixed base point of the curve;
* shared key: `x(d * Q_peer)`, the x coordinate of `d` times the peer's public key.

The engine does this multiplication with a **Montgomery ladder** in
**Lopez-Dahab projective coordinates** over GF(2^163), using one bit-serial
multiplier, one Euclidean divider, a squarer and an adder, sequenced one
operation at a time. It trades speed for area: about 136 thousand clock cycles
per key.

## Curve and field

| item | value |
|---|---|
| field | GF(2^163), polynomial basis |
| reduction polynomial | f(z) = z^163 + z^7 + z^6 + z^3 + 1 |
| curve | y^2 + xy = x^3 + x^2 + 1 (a = 1, b = 1; the Koblitz curve K-163 / sect163k1) |
| base point G | x = `2FE13C0537BBC11ACAA07D793DE4E6D5E5C94EEE8`, y = `289070FB05D38FF58321F2E800536D538CCDAA3D9` |

All of these live in `rtl/ecc_pkg.sv`. The field units take the degree `M` and
the polynomial `POLY` as parameters. The ladder relies on b = 1 (see below),
so the point multiplier is only correct on curves with b = 1. The 163-bit size
and the ladder's b = 1 form belong to the underlying design. The specific
polynomial and curve are this implementation's choice: they are the standard
163-bit binary ones that fit.

## The Montgomery ladder

Two points are kept in projective form, with `x = X/Z`:
`A = (XA:ZA)` starts at the point at infinity `(1:0)` and `B = (XB:ZB)` at
`P = (xp:1)`. Their difference is always `P`. This invariant lets both the sum
and the double be formed from x and Z alone, without y. The scalar is scanned
from bit 162 down to bit 0:

* bit 0: `B <- A + B`, `A <- 2A`
* bit 1: `A <- A + B`, `B <- 2B`

For bit 0 the formulas are (squaring is cheap, `+` is XOR):

```
T1 = XA*ZB          T2 = XB*ZA
ZB = (T1 + T2)^2    XB = xp*ZB + T1*T2          -- A + B
T1 = XA*ZA
XA = (XA + ZA)^4    ZA = T1^2                   -- 2A (X^4 + b*Z^4 with b = 1)
```

That is five multiplications and four one-cycle operations per bit. Bit 1 is
the same sequence with the roles of A and B swapped. After 163 bits `A = kP`
and `B = (k+1)P`. Every bit does the same work in the same time, whatever its
value.

**Back to affine.** Three cases end the computation:

* `ZA = 0`: `kP` is the point at infinity. The engine reports `inf = 1`
  (`key_inf` at the top). This check is this implementation's addition. Without
  it the conversion below would divide by zero, for example when `k = 0` or
  `k` is a multiple of the group order.
* `ZB = 0`: `(k+1)P` is infinity, so `kP = -P = (xp, xp + yp)`.
* otherwise: `x1 = XA/ZA` and `x2 = XB/ZB`, and y is recovered from the three
  x coordinates:
  `y1 = (x1 + xp) * ((x1 + xp)(x2 + xp) + xp^2 + yp) / xp + yp`.

This takes three divisions, two multiplications and six one-cycle operations.

## Field arithmetic units

* **Adder** (`gf2m_add`): bitwise XOR. Combinational.
* **Squarer** (`gf2m_sqr`): squaring a binary polynomial only spreads its
  bits, so `a_i` moves to position `2i`. The 325-bit result is then reduced
  from the top down: each set bit `i >= 163` is cleared by adding
  `f(z) * z^(i-163)`. Combinational. After synthesis it is an XOR network, since
  the polynomial is a constant. The point multiplier chains two squarers, so
  `(a+b)^2` and `(a+b)^4` each take one cycle.
* **Multiplier** (`gf2m_mul`): bit-serial, most significant bit first. Each
  cycle it computes `acc = acc*z mod f + b_i*a`. The product is ready after 163
  cycles. The hardware is three 163-bit registers, an XOR row and a counter.
* **Divider** (`gf2m_div`): computes `q = y/x` directly, without a separate
  inversion, using a binary extended Euclidean algorithm with a fixed count of
  2M = 326 iterations. The registers `A, B, U, V` start as `x, f, y, 0`. Two
  invariants hold throughout: `A*y = U*x` and `B*y = V*x` (mod f). Each cycle
  does the following:
  * If `A` is odd, `B` is added to `A` and `V` to `U`.
  * The pairs are also swapped when a signed counter `delta` (the length
    difference of the two polynomials) is negative.
  * `A` is halved, and so is `U`, modulo f: when `U` is odd, f is added first,
    which is possible because f has a constant term.

  After 2M iterations `B = 1`, so `V = y/x`. The divisor must be nonzero.

The multiplier and the divider share one handshake. When the unit is idle, a
`start` pulse latches the operands. `busy` is high for the M (or 2M)
computation cycles. `done` pulses in the next cycle, and the result output then
holds until the next `start`. A `start` while busy is ignored, and an assertion
flags it.

## Controller: a micro-program over a register file

`ecc_pmul` holds an 8-entry register file of 163-bit words:
`XA, ZA, XB, ZB, T1, T2, xp, yp`. The two field units read from it. Each step is
a micro-op `{op, dst, src_a, src_b}`, where `op` is one of ADD, SQR,
(a+b)^2, (a+b)^4, MUL or DIV. `ecc_pkg` holds two programs:

* the 9-op ladder step, written for a scalar bit of 0;
* the 11-op affine conversion.

For a scalar bit of 1 the controller XORs bit 1 of every A/B register address
(XA<->XB, ZA<->ZB), which turns the bit-0 program into the bit-1 step. The
state machine runs `IDLE -> LADDER (163 x 9 ops) -> CHECK -> CONV (11 ops) -> FIN`.
`CHECK` picks between the infinity, `-P` and conversion endings. A one-cycle
op computes and writes back in the same cycle. MUL and DIV issue in one cycle,
wait for `done`, and write back in the cycle `done` is high. The micro-ops run
strictly one after another.

## Timing

With `M = 163`:

| operation | cycles |
|---|---|
| add, square, (a+b)^2, (a+b)^4 | 1 |
| multiplication (issue, 163 steps, write-back) | M + 2 = 165 |
| division | 2M + 2 = 328 |
| one ladder bit | 5(M+2) + 4 = 829 |
| affine conversion | 3(2M+2) + 2(M+2) + 6 = 1320 |
| start to `done`, usual case | M*829 + 1320 + 3 = **136,450** |
| start to `done`, result infinity or -P | M*829 + 3 = 135,130 |

"Start to `done`" counts from the cycle in which `start` is sampled to the
cycle in which `done` is high. At 100 MHz, one key takes about 1.4 ms.

## Top level: `ecdh_keygen`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset |
| `start` | in | 1 | one-cycle pulse while `busy` is low |
| `mode` | in | 1 | 0: public key `d*G`; 1: shared key `d*Q_peer` |
| `priv_key` | in | 163 | private scalar `d` |
| `peer_x`, `peer_y` | in | 163 | peer public key (used in mode 1) |
| `busy` | out | 1 | computation running |
| `done` | out | 1 | one-cycle pulse: result valid |
| `key_x`, `key_y` | out | 163 | `d*P`; in mode 1 `key_x` is the shared key |
| `key_inf` | out | 1 | result is the point at infinity: no valid key |

`mode`, `priv_key` and the peer point are sampled only with `start`. The
outputs hold from `done` until the next `done`. The mode input, the built-in
base point and the infinity flag are this implementation's interface.

## What comes from the underlying design and what is chosen here

The following come from the underlying design:

* the 163-bit key and field size;
* the Montgomery ladder with its register start values, operation order and
  b = 1 doubling;
* the `ZB = 0` ending and the y-recovery formula;
* squaring by spreading the operand bits;
* addition by XOR;
* the unit latencies: one cycle for add and square, M cycles to multiply,
  2M cycles to divide, with division done by an extended Euclidean algorithm.

The following are chosen here:

* the reduction polynomial and the curve;
* the internal algorithms of the multiplier and the divider;
* the micro-programmed controller and its register file;
* strict one-at-a-time scheduling;
* the `ZA = 0` (infinity) check;
* all handshakes and reset behaviour;
* the ECDH `mode` wrapper.

## Limits and points to know

* The peer point is not validated: nothing checks that it lies on the curve
  or has a nonzero x. The y recovery divides by `xp`, so `x = 0` is not
  allowed.
* The private key is used as given. Keys should be below the group order
  `n = 4000000000000000000020108A2E0CC0D99F8A5EF`. Key 0 and multiples of `n`
  give `key_inf = 1`.
* The ladder's timing does not depend on the key bits. No other side-channel
  countermeasure is present, such as randomised projective coordinates.
* Only curves with b = 1 are supported. A general b would need one more
  multiplication by `sqrt(b)` in the doubling step.
* The only arithmetic units are one multiplier and one divider. No two
  multiplications overlap, even where the data would allow it.
* Reset clears every register. The assertions use `disable iff (!rst_n)`.

## Files

| file | content |
|---|---|
| `rtl/ecc_pkg.sv` | field and curve constants, micro-op types, ladder and conversion programs |
| `rtl/gf2m_add.sv`, `rtl/gf2m_sqr.sv` | combinational adder and squarer |
| `rtl/gf2m_mul.sv`, `rtl/gf2m_div.sv` | bit-serial multiplier, Euclidean divider |
| `rtl/ecc_pmul.sv` | point multiplier: register file, controller, units |
| `rtl/ecdh_keygen.sv` | top level |
| `tb/ecc_ref_pkg.sv` | independent reference: full-product multiply, Fermat inversion, affine add/double, double-and-add |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the design against `ecc_ref_pkg`, which shares no
code with the RTL, and prints `TB_RESULT checks=N failures=F`.

* `tb_gf2m_add`, `tb_gf2m_sqr`: edge cases, every `z^i`, and random operands.
* `tb_gf2m_mul`, `tb_gf2m_div`: random and edge operands, plus the exact
  latency. The divider's quotient is also checked by multiplying it back.
* `tb_ecc_pmul`: `k = 1, 2, 3`, random `k` on `G` and on `7G`, `k = n-1`
  (gives `-P`) and `k = 0, n` (give infinity). It also checks that the base
  point and every result lie on the curve, and checks the cycle counts above.
* `tb_ecdh_keygen`: the full 163-bit flow.
  * Two parties derive their public keys, then their shared keys.
  * Both shared keys must be equal and must match the reference.
  * Further runs cover the `-P` and infinity endings and a `start` during a
    run, which must be ignored.
  * The testbench counts each mechanism and fails if any never happened.

Each testbench finishes in seconds with Verilator. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv rtl/gf2m_add.sv rtl/gf2m_sqr.sv \
    rtl/gf2m_mul.sv rtl/gf2m_div.sv rtl/ecc_pmul.sv rtl/ecdh_keygen.sv \
    tb/tb_ecdh_keygen.sv --top-module tb_ecdh_keygen -o tb_ecdh
./obj_dir/tb_ecdh
```

For the other testbenches, swap in the testbench file and `--top-module`. To
lint one file: `verilator --lint-only -Wall -Irtl rtl/ecc_pkg.sv rtl/<file>.sv`.

## Changing the design

* **Another field size:** override `M` and `POLY` on `ecc_pmul` and supply
  matching curve constants. The ladder and y-recovery formulas do not involve
  the coefficient a, but they need b = 1. The `GX`/`GY` constants and the width of the top-level ports come from
  `ecc_pkg`.
* **A faster multiplier:** a digit-serial multiplier drops in behind the same
  start/busy/done handshake. The controller waits for `done`, so it needs no
  change.
