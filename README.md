# Compact point multiplier for the Koblitz curve K-163

This is a very small elliptic-curve point multiplier for RFID tags, sensor nodes and other
severely constrained devices. It computes Q = kP on the NIST Koblitz curve

    y^2 + xy = x^3 + x^2 + 1   over GF(2^163)

in affine coordinates. Three choices keep it small:

* **Gaussian normal basis (GNB).** Field elements are 163-bit vectors in a type-4 normal basis.
  Squaring is then a cyclic shift, which costs only wiring.
* **Frobenius instead of doubling.** On a Koblitz curve the map (x, y) -> (x^2, y^2) can
  stand in for point doubling. The scalar is given as a tau-adic non-adjacent form (tau-NAF),
  so each digit costs one Frobenius map (5 cycles), and each nonzero digit also costs one
  affine point addition or subtraction (about 2,000 cycles).
* **Two temporaries.** The inversion inside each addition uses the Dimitrov-Jarvinen chain
  for 2^163 - 2. This chain needs only two temporaries, T1 and T2. They also act as the
  operand registers of the bit-serial multiplier, and every multiplication is T1 x T2.
  With Z, the datapath holds seven 163-bit registers, plus a 164-bit scalar register.

A full point multiplication takes about 107,000 clock cycles. The exact count depends on
how many digits of the scalar are nonzero.

## Block structure

```
                 +-------------------- koblitz_pm ---------------------+
 k_in, klen ---> | scalar_reg (k, 164 b) --2 MSBs--> controller         |
 start      ---> |                                   |  selects, enables |
 px, py     ---> | regfile: T1 T2 x1 y1 x y ---R---> fau (Z) ---Z----+   |
                 |          ^  T1,T2 --------------> |              |   |
                 |          +------------------------Z--------------+   |
                 +--------------------- qx = x1, qy = y1 ---------------+
```

| module       | role |
|--------------|------|
| `kpm_pkg`    | sizes (M = 163, T = 4, KW = 164), multiplexer encodings, micro-operation format, routine lengths |
| `gnb_rho`    | the rho' XOR array of the multiplier |
| `fau`        | field arithmetic unit: Z <- mux1 XOR mux2, which does multiplication, addition, squaring and +1 |
| `regfile`    | T1, T2 (with in-place squarers), x1, y1, x, y and a 6-to-1 read multiplexer |
| `scalar_reg` | the k register: parallel load, shift left by one, two MSBs out |
| `controller` | runs the initialisation, Frobenius-map and point-addition routines |
| `koblitz_pm` | top level |

## Field arithmetic unit and the multiplier schedule

This is the least obvious part of the design.

The FAU has one m-bit register, Z, and computes

    Z <- op1 XOR op2
    op1 (s1): 0 = J (AND array), 1 = R (register-file read port), 2 = 0
    op2 (s2): 0 = 0, 1 = unity (all ones in normal basis), 2 = Z, 3 = Z^2

These settings give all the field operations:

* Load: `Z <- R`.
* Addition: `Z <- R + Z`.
* Squaring: `Z <- Z^2`.
* Adding the curve constant a = 1: `Z <- R + 1`.
* The fused step used for x3: `Z <- R + Z^2`.

**Multiplication.** For m = 163 cycles, s1 = J. In the first cycle s2 = 0; after that,
s2 = Z^2. Meanwhile the register file rotates T1 and T2 by one place each cycle, using their
own squarers. After the m-th cycle:

* Z holds T1 x T2.
* T1 and T2 have gone through m rotations, so they hold their original values again.

Inside one cycle, the squared operands U = T1^2 and V = T2^2 are formed by wiring. U goes
through the XOR array rho', and the J block computes

    g[p] = rho_p(U) AND V[(-p) mod m]        (m AND gates)

**Why the product comes out right.** Write W_d = beta * beta^(2^d). Coordinate 0 of
beta^(2^i) * beta^(2^j) is W_{j-i}[-i]. Take rho mask bit (p, q) = W_{-p-q}[p-q] and read V in
reversed order. Then each product coordinate picks up each of its m partial sums exactly
once over the m cycles. This works because m is odd, so 2t mod m runs through every residue.

The masks are not stored. A constant function in `gnb_rho` computes them during elaboration,
directly from the type-T GNB construction:

* P = mT + 1 is prime (653 for m = 163).
* u is an element of order T modulo P.
* Basis element i is the sum of gamma^e over the coset {2^i u^j mod P}, where gamma is a
  primitive P-th root of unity.
* A term gamma^0 stands for the unity element.

The same module works for other GNB fields. The testbench also runs it at m = 11 (type 2)
and m = 7 (type 4).

The array has m outputs, one per AND gate. The multiplier this architecture is based on
uses a rho' with (m+1)/2 outputs and about half the XOR gates of a plain rho array. This
design does not reproduce that halving. Its XOR count is the number of nonzero entries of
the multiplication matrix minus m: 645 - 163 = 482 for K-163. That is the same as a plain
rho array. With rho' acting on T1 alone and single T2 bits entering the AND gates, two
AND gates could share a rho' output only if two columns of the multiplication matrix were
cyclic shifts of each other.

## Register file

Fixed multiplexer encodings:

* T1 and T2 each have a 2-to-1 input multiplexer: 0 = own square (rotation), 1 = Z.
* The read port sR selects: 0 = T1, 1 = T2, 2 = x1, 3 = y1, 4 = x, 5 = y.

x and y hold the base point and are loaded from `px`, `py` at start. x1 and y1 hold the running
point Q and are the result outputs. Every register has its own write enable.

## Scalar encoding

The scalar k = sum k_i tau^i, with k_i in {-1, 0, 1} and no two adjacent digits nonzero, is
stored in the Joye-Tymen left-to-right code:

* A nonzero digit together with the zero that must follow it is written `1s`, where s is 1
  for a negative digit.
* A zero digit is written `0`.

The code is left-aligned in the 164-bit k register, so the leading digit sits in the top bit.
That digit must be nonzero: otherwise the result is the point at infinity, which affine
coordinates cannot hold, and the multiplier answers with `err`. `klen` gives the number of
tau-NAF digits (8 bits).

The controller reads the two MSBs of k:

* Top bit 0: a zero digit. Do one Frobenius map; k shifts once.
* Top bit 1: a nonzero digit. Do a Frobenius map, then add or subtract P; k shifts twice.
  Then do one more Frobenius map for the implied zero, unless the expansion ends at that
  digit.

The 164 bits hold any expansion of up to 163 digits. A 164-digit expansion also fits if its
last digit is zero.

## Controller and routines

Each routine is a list of micro-operations held in a ROM (function `ucode`). A
micro-operation lasts:

* one cycle: load, add, store; or
* cnt cycles: repeated squaring of Z or of T2; or
* m cycles: multiplication.

Micro-operations that apply only to subtraction or only to a positive leading digit are
skipped without costing a cycle.

| routine | cycles (m = 163) | what it does |
|---|---|---|
| initialisation | 4 | Q <- (x, y), or (x, x + y) for a negative leading digit |
| Frobenius map, y1 first | 5 | entered with y1 in Z, leaves x1 in Z |
| Frobenius map, x1 first | 5 | entered with x1 in Z, leaves y1 in Z |
| reload | 1 | Z <- x1, when an addition follows a map that left y1 in Z |
| point addition | 1986 | 11 multiplications (9 for the inversion) + 162 squaring cycles + 31 single cycles |
| point subtraction | 1988 | the same, with -P = (x, x + y): two more cycles |

The point addition computes, with lambda = (y1 + y) / (x1 + x):

    x3 = lambda^2 + lambda + x1 + x + 1
    y3 = lambda (x3 + x) + x3 + y

The inverse (x1 + x)^-1 is v^(1+2+...+2^161), where v = (x1 + x)^2. The exponent is built
as (1+2+2^2)(1+2^3+2^6)(1+2^9+2^18)(1+2^27+2^54)(1+2^81). Each factor takes the steps
T2 <- T1^(2^n), T1 <- T1 x T2, T2 <- T2^(2^n), T1 <- T1 x T2. Whenever possible, a
result is kept in Z and used directly as the next operand, which saves a store and a load.
For example, the five steps that form x3 take six cycles instead of fourteen.

**Total latency.** After the start cycle, a multiplication takes

    4 + 5 (l - 1) + 1986 A + 1988 S + (number of reloads)

cycles, where l is the number of digits, A the number of additions and S the number of
subtractions. For a 163-digit scalar with 55 nonzero digits after the leading one, this is
110,133 cycles. With the average density of m/3 nonzero digits it is about 106,800.

## Interface and timing (`koblitz_pm`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (all registers clear) |
| `start` | in | 1 | one-cycle pulse while `busy` is low; samples `px`, `py`, `k_in`, `klen` |
| `px`, `py` | in | 163 | base point, GNB coordinates (bit i = coefficient of beta^(2^i)) |
| `k_in` | in | 164 | Joye-Tymen code, left-aligned |
| `klen` | in | 8 | number of tau-NAF digits |
| `busy` | out | 1 | multiplication running |
| `done` | out | 1 | one-cycle pulse: `qx`, `qy` hold kP (or `err` is set) |
| `err` | out | 1 | scalar rejected (leading digit zero or `klen` = 0) |
| `qx`, `qy` | out | 163 | result |
| `routine`, `routine_first` | out | 3, 1 | routine running and its first cycle (for observation) |

In normal basis the unity element is all ones. Squaring moves bit i to bit i+1, and bit 162
wraps around to bit 0.

## Departures and open points

* **Routine lengths.** The addition and subtraction routines take one cycle more (1986 /
  1988) than the 1985 / 1987 usually quoted for this architecture. They are implemented
  line for line, one cycle per line.
* **Frobenius maps on consecutive zero digits.** These need the mirrored routine (x1 first)
  and an occasional 1-cycle reload of Z. Both are this design's additions; the cost is
  about one cycle per nonzero digit.
* **Width of rho'.** The XOR array has m outputs, not (m+1)/2 (see above).
* **Special cases.** The exceptional cases of affine addition (x1 = x, which includes Q = +-P
  and a result at infinity) are not detected. Random scalars practically never reach them.
* **Base point in registers.** The base point is held in registers. A variant with the
  point hardwired would drop the x and y registers; it is not provided.
* **Scalar conversion.** Converting an integer scalar to tau-NAF is outside this block. The
  scalar must arrive already encoded.
* **Side channels.** There are no countermeasures. Timing depends on the digits, and
  additions and subtractions differ by two cycles.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=F`. The reference arithmetic, `tb/gnb_ref_pkg.sv`, is
independent of the hardware's multiplication matrix:

* It multiplies by cyclic convolution in GF(2)[g]/(g^653 - 1).
* It inverts by an Itoh-Tsujii-style chain.
* It generates base points by solving the curve equation.

| testbench | what it checks |
|---|---|
| `tb_gnb_rho` | multiplier schedule around rho' at m = 163, 11, 7 against the reference product |
| `tb_fau` | multiplication in exactly 163 cycles, with T1 and T2 restored; load, add, square, +1, fused square-add, hold |
| `tb_regfile` | 2000 random cycles of writes, squarings and reads against a model |
| `tb_scalar_reg` | load priority, shifting, MSB output |
| `tb_controller` | routine sequence, routine lengths, 11 x 163 multiplier cycles per addition, k shifts, rejection |
| `tb_koblitz_pm` | end to end at full size |
| `tb_pm_latency` | four 163-digit random scalars at full size: results, exact cycle counts, average latency |

`tb_koblitz_pm` runs scalars from 1 to 163 digits. It compares Q with Algorithm 1
("Frobenius-and-add-or-subtract") evaluated in the reference model and checks that Q lies on
the curve. It also checks every routine's length and requires that each mechanism occurs at
least once: both initialisations, both Frobenius variants, reload, addition, subtraction and
rejection.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_koblitz_pm \
  rtl/kpm_pkg.sv rtl/gnb_rho.sv rtl/fau.sv rtl/regfile.sv rtl/scalar_reg.sv \
  rtl/controller.sv rtl/koblitz_pm.sv tb/gnb_ref_pkg.sv tb/tb_koblitz_pm.sv
./obj_dir/Vtb_koblitz_pm
```

`tb_pm_latency` checks each run's cycle count against the latency formula. It also
derives the mean cost of a nonzero digit (1,987.6 cycles in one run, including reloads)
and extrapolates to exactly m/3 nonzero digits: 106,823 cycles. It requires that value to
lie within 1 % of the 106,700 cycles expected for this architecture.

The full-size end-to-end run takes about ten seconds. Other testbenches are built the same
way with their own top module.
