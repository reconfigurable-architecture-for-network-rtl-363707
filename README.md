# Elliptic-curve crypto processors over GF(2^193) and GF(2^163)

The design holds two independent elliptic-curve processors side by side in
the top module `ecc_system`. They share only clock and reset:

- `ecc_top` works over GF(2^193) in polynomial basis. It does key generation,
  encryption and decryption. It is described first.
- `ecc163_top` works over GF(2^163) in a Gaussian normal basis. It does the
  scalar multiplication kP. See "The GF(2^163) processor" below.

The `ecc_system` ports for the GF(2^193) side keep the names of `ecc_top`. The
GF(2^163) ports have an `n_` prefix. Each side has its own start/busy/done
handshake, and both may run at the same time.

## The GF(2^193) processor

The GF(2^193) processor does elliptic-curve public-key operations over the binary field
GF(2^193). It computes a scalar multiple Q = kP of a curve point, which is the
core of key generation. It also uses that to encrypt and decrypt a message
encoded as a curve point. The curve is

    y^2 + xy = x^3 + a x^2 + b

over GF(2)[x] / (x^193 + x^15 + 1). The curve coefficients a and b are inputs.

The architecture follows a published design with these parts:

- a single-cycle 193-bit Karatsuba-Ofman multiplier
- a separate XOR-array modulo unit
- a field adder
- single-cycle squarers
- one finite-state controller that sequences everything.

Scalar multiplication is the Montgomery ladder in Lopez-Dahab projective
coordinates. Only x and z are carried, so the loop needs no inversion. A single
Itoh-Tsujii inversion at the end converts the result back to affine (x, y).

Control and data path are kept apart. The controller issues one control word
per cycle, and the data path executes it. The field units can therefore be
swapped without touching the sequencing.

## Operations

| `op`     | inputs used                          | `q0`            | `q1`                   |
|----------|--------------------------------------|-----------------|------------------------|
| `OP_KP`  | k, P = `p_in`                        | kP              | kP                     |
| `OP_ENC` | k, G = `p_in`, PB = `u_in`, Pm = `m_in` | C1 = kG      | C2 = Pm + k·PB         |
| `OP_DEC` | k, C1 = `p_in`, C2 = `m_in`          | k·C1            | Pm = C2 − k·C1         |

Encryption is the EC-ElGamal form. The sender's secret k gives both C1 = kG and
the mask k·PB that is added to the message point. The receiver multiplies C1 by
its own secret and subtracts the product from C2. In characteristic 2, −(x, y)
is (x, x + y).

## Field arithmetic

Elements are 193-bit vectors in polynomial basis, with bit i the coefficient of
x^i. Addition is bitwise XOR (`gf_add`).

**Multiplier (`gf_mul`, `gf_kmul`).** This is a combinational Karatsuba-Ofman
multiplier that gives the 385-bit unreduced product in one cycle. Each level
splits the operands into halves of ⌈W/2⌉ and ⌊W/2⌋ bits. It forms three
half-size products (high·high, low·low, (high+low)·(high+low)), and the middle
term is their XOR. The recursion (193 → 97/96 → 49/48 → 25/24 → 13/12) ends in
plain AND/XOR arrays at 16 bits or fewer. That base-case width is the parameter
`TH`.

**Reduction (`gf_reduce`).** x^193 = x^15 + 1, so each term x^i with i ≥ 193
folds onto x^(i−178) and x^(i−193). The fold runs from the top term down, so a
term that lands at 193 or above again is folded a second time. The unrolled
loop is a fixed XOR array.

**Squarers (`gf_sqr_n`).** Squaring is linear: bit i moves to bit 2i, then the
result is reduced. `gf_sqr_n #(.N(n))` chains n such stages and gives a^(2^n)
in one cycle. The data path has squarers for n = 1, 6 and 15.

## Data path and control word

`ecc_datapath` holds a buffer of 23 field registers (`reg_t` in `ecc_pkg`). The
addresses `R_ZERO` and `R_ONE` read as the constants 0 and 1. Each cycle the
control word `ctl_t` may request both of the following, and both results are
written at the next clock edge:

    mul path:  R[mul_dst] <= (R[mul_a] · R[mul_b] mod P) + R[mul_x]
    sq  path:  R[sq_dst]  <= (R[sq_a] + R[sq_b]) ^ (2^n),   n ∈ {0, 1, 6, 15}

With n = 0 the sq path is a plain adder, or a copy when one operand is
`R_ZERO`. The multiplier can also copy by multiplying by `R_ONE`. `sq_zero` is
a registered flag that is set when the last sq-path result was zero. The
controller makes every comparison through it (z = 0, x1 = x2, y1 = y2). The
data path has assertions that the two paths never write the same register and
never write a constant.

## Montgomery ladder schedule

The controller first scans k from bit 192 down, one cycle per bit, for its top
set bit. The ladder needs k_{n−1} = 1. For k = 0 the result is the point at
infinity. Set-up takes two cycles:

    cycle 1:  X1 = x          Z2 = x^2
    cycle 2:  X2 = Z2·Z2 + b  Z1 = 1

Then, for each lower key bit, one point receives Madd and the other receives
Mdouble:

    Madd:    X = x1z2·x2z1 + x·(x1z2 + x2z1)^2,   Z = (x1z2 + x2z1)^2
    Mdouble: X = x1^4 + b·z1^4,                   Z = x1^2·z1^2

When the bit is 1, point 1 gets the sum and point 2 is doubled. When the bit is
0 the roles swap. The controller swaps register addresses, not data. Below,
(XO, ZO) is the point that gets the sum and (XD, ZD) is the point that is
doubled. The bit takes six cycles, and the multiplier is busy in every one of
them:

| cycle | multiplier path        | squarer path       |
|-------|------------------------|--------------------|
| 1     | T1 = XO·ZD             | S1 = XD^2          |
| 2     | T2 = XD·ZO             | S2 = ZD^2          |
| 3     | T3 = T1·T2             | ZO = (T1 + T2)^2   |
| 4     | XO = x·ZO + T3         | T1 = S1^2          |
| 5     | ZD = S1·S2             | S2 = S2^2          |
| 6     | XD = b·S2 + T1         | —                  |

The new ZO written in cycle 3 feeds the multiplier in cycle 4. Each register
is read before it is overwritten, because writes land at the end of the cycle.

## Back to affine coordinates and the inversion

After the loop (X1, Z1) represents kP and (X2, Z2) represents (k+1)P. The
affine result is

    xk = X1 / Z1
    yk = (x + xk)·[(X1 + x·Z1)(X2 + x·Z2) + (x^2 + y)·Z1·Z2] / (x·Z1·Z2) + y

The controller computes the bracket and x·Z1·Z2 in 8 cycles and inverts
x·Z1·Z2 once. It then recovers 1/Z1 = (1/(x·Z1·Z2))·x·Z2 and finishes in 5
cycles. It also has two special exits:

- Z1 = 0 means kP is the point at infinity.
- Z2 = 0 means kP = −P, so the result is (x, x + y).

**Itoh-Tsujii inversion.** It uses a^(−1) = (a^(2^192 − 1))^2. With
β_j = a^(2^j − 1), β_(i+j) = β_i^(2^j)·β_j. The addition chain
1, 2, 3, 6, 12, 24, 48, 96, 192 needs 8 multiplications and squaring runs of 1,
1, 3, 6, 12, 24, 48 and 96. Each run is split greedily into steps of 2^15, 2^6
and 2^1, which gives 26 single-cycle squaring steps. One final squaring follows
them. An inversion takes 36 cycles.

## Point addition

The final addition of encryption and decryption is affine. It costs one
inversion and uses one set of formulas for both cases:

    λ  = (y1 + y2)/(x1 + x2)      for P ≠ Q
    λ  = x1 + y1/x1               for P = Q
    x3 = λ^2 + λ + x1 + x2 + a
    y3 = λ(x1 + x3) + x3 + y1

These hold for doubling as well, because x1 + x2 = 0 there and λ·x1 = x1^2 + y1.
Three cases give the point at infinity:

- P + (−P)
- 2P with x = 0
- an operand that is already at infinity, such as the product of a zero key;
  then the other operand is returned.

## Interface and timing

Pulse `start` for one cycle with `op`, `k`, `a`, `b`, `p_in`, `u_in` and `m_in`
valid. They are sampled in that cycle. `busy` stays high until `done` pulses
for one cycle. After that `q0`, `q1`, `q0_inf` and `q1_inf` are valid and hold
until the next start. Reset is synchronous and active low, and it clears every
register.

Cycles from the edge that samples `start` to the edge after which `done` is
high, with t the position of the top set bit of k:

| operation | cycles                                   | 193-bit key (t = 192) |
|-----------|------------------------------------------|-----------------------|
| `OP_KP`   | 247 + 5t                                 | 1207                  |
| `OP_ENC`  | 541 + 10t (+1 if C2 comes from a doubling) | 2461                |
| `OP_DEC`  | 296 + 5t                                 | 1256                  |

One scalar multiplication breaks down as:

- (193 − t) scan cycles
- 2 set-up cycles
- 6 cycles per remaining bit
- 13 cycles of coordinate conversion
- 36 inversion cycles
- a few hand-over cycles

The critical path is the Karatsuba multiplier followed by the reduction array
and an adder. There is no pipelining, because every field operation is meant to
finish in one cycle.

## Departures from the original description

- The original gives 7 FSM stages each for ladder addition and doubling. This
  schedule overlaps them into 6 cycles per key bit. Its reported total of about
  3100 cycles for a 193-bit multiplication (1.625 µs at 1930 MHz) is not
  reproduced: this design needs about 1200.
- The original's inversion uses 21 squaring operations. The chain used here
  needs 26 squaring steps with the 2^1/2^6/2^15 squarers.
- The register map, the control word, the start/busy/done handshake, the
  handling of k = 0 and of points at infinity, and the curve coefficient `a` as
  an input are this design's own choices.
- The tests run the key of the published example result
  (`1376F29DD55FCA07557F281D55FCA07557F281D55FCA67551`) on a random curve.

## The GF(2^163) processor

`ecc163_top` computes kP on y^2 + xy = x^3 + a x^2 + b over GF(2^163). It uses
the same Montgomery ladder and conversion formulas as above. All field
elements (k aside) are in a type-4 Gaussian normal basis. In that basis
squaring is a cyclic rotation, and the element 1 is the all-ones vector. The
processor is built from eight components:

| component | module | role here |
|---|---|---|
| host interface | `hi_163` | latches k, x, y and b on `start`; writes x and y into data memory; starts control-1; returns (xk, yk) with an `end_o` pulse |
| register file | `regfile_163` | 7 × 163 bits: X1, Z1, X2, Z2, T1, T2, T3 |
| control-1 | `control1_163` | scans k; issues 4 set-up and 8 ladder operations per key bit to AU-1; copies X1, Z1, X2 and Z2 to data memory |
| AU-1 | `au1_163` | y = a'·b' + c' or a' + c', where ' is a rotation by 0, 1 or 2 |
| data memory | `data_memory_163` | 16 words: x, y, X1..Z2, temporaries, xk, yk and a zero word |
| instruction memory | `instruction_memory_163` | the 23-instruction AU-2 program |
| control-2 | `control2_163` | runs the program on AU-2 and signals the end to the host interface |
| AU-2 | `au2_163` | y = rot(a)·b + c or rot(a) + c, with a rotation of 0..162 |

Both arithmetic units multiply with `gnb_mul_163`. That is a word-level
normal-basis multiplier with a 55-bit digit, so a product takes 3 cycles. Its
product rule comes from the multiplication table of the basis, which is
computed at elaboration time. Each cycle it forms 55 product bits, and then it
rotates both operand registers by 55 bits.

Each ladder step has the same form as in the GF(2^193) schedule. In normal
basis the squarings become rotations of the operands:

    T1 = XO·ZD      T2 = XD·ZO      T3 = T1·T2      ZO = T1^2 + T2^2
    XO = x·ZO + T3  T1 = b·ZD^4 + XD^4  ZD = XD^2·ZD^2  XD = T1

The AU-2 program converts to affine coordinates. Its inversion is
Itoh-Tsujii with the addition chain 1, 2, 4, 5, 10, 20, 40, 80, 81, 162. Each
step is a single AU-2 instruction, because a^(2^r) is a rotation by r.

**Timing.** A kP takes about 30 cycles per key bit below the top set bit
(6 products and 2 additions), plus the scan of k and about 130 cycles for the
conversion. Measured: 6587 cycles for a random 163-bit key, 347 for k = 2.
The results are not defined for these cases:

- k = 0
- kP or (k+1)P is the point at infinity

**Own choices.** The source names the eight components and their roles. It
also gives the register-file size, the basis and the digit size. The following
are this design's own:

- the connections between the components
- the instruction format and the AU-2 program
- the basis type
- the operation set of the two arithmetic units

Its parallelized AU-1 schedule is not described. Here the ladder operations
run one after another. That is why kP takes about 6600 cycles, against the
source's 10 µs at 143 MHz (about 1430 cycles).

## Files

| file                       | contents                                            |
|----------------------------|-----------------------------------------------------|
| `rtl/ecc_pkg.sv`           | field size, point/op types, register map, control word |
| `rtl/ecc_top.sv`           | top level: controller + data path                    |
| `rtl/ecc_ctrl.sv`          | FSM controller (ladder, conversion, inversion, addition, op sequencing) |
| `rtl/ecc_datapath.sv`      | register buffer, multiply-reduce-add path, add-square path |
| `rtl/gf_mul.sv`, `rtl/gf_kmul.sv` | Karatsuba-Ofman multiplier                   |
| `rtl/gf_reduce.sv`         | reduction modulo x^193 + x^15 + 1                    |
| `rtl/gf_sqr_n.sv`          | a^(2^N) multi-squarer                                |
| `rtl/gf_add.sv`            | field adder                                          |
| `rtl/ecc_system.sv`        | complete design: both processors                     |
| `rtl/ecc163_pkg.sv`        | GF(2^163) types, AU-1 operation, data-memory map, instruction format |
| `rtl/ecc163_top.sv`        | GF(2^163) processor: the eight components            |
| `rtl/*_163.sv`             | the GF(2^163) components and the normal-basis multiplier `gnb_mul_163` |
| `tb/gnb_ref_pkg.sv`        | normal-basis reference: multiplication from the basis definition, inversion, affine double-and-add |
| `tb/gf_ref_pkg.sv`         | reference arithmetic: bit-serial multiply, Fermat inversion, affine double-and-add |
| `tb/tb_*.sv`               | one self-checking testbench per module               |

## Simulating

The end-to-end test of the complete design is `tb_ecc_system`. It runs at
full size and takes about 1.5 minutes to build:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        tb/gf_ref_pkg.sv tb/gnb_ref_pkg.sv rtl/ecc_pkg.sv rtl/ecc163_pkg.sv \
        tb/tb_ecc_system.sv --top-module tb_ecc_system -o sim
    ./obj_dir/sim

It runs the GF(2^193) sequence described below. In parallel with one
encryption it runs a GF(2^163) kP, and then a few more. It counts every
mechanism of both processors.

The GF(2^163) testbenches (`tb_*_163`, `tb_ecc163_top`) check against
`gnb_ref_pkg`. Build them with the same command, using that testbench's name.

Each GF(2^193) testbench checks its module against `gf_ref_pkg`. That package is written
independently of the RTL: it uses shift-and-add multiplication, Fermat
inversion and affine point arithmetic. Each testbench prints
`TB_RESULT checks=N failures=M`. The end-to-end test `tb_ecc_top` runs at full
size. It generates a key pair, encrypts, decrypts and checks the round trip. It
then runs the edge cases: a doubling in C2, C2 at infinity, a zero key, and an
order-2 point. It also checks every latency above. It takes about half a minute:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        tb/gf_ref_pkg.sv rtl/ecc_pkg.sv tb/tb_ecc_top.sv --top-module tb_ecc_top -o sim
    ./obj_dir/sim

Replace `tb_ecc_top` with `tb_ecc_ctrl`, `tb_ecc_datapath`, `tb_gf_mul`,
`tb_gf_reduce`, `tb_gf_sqr_n` or `tb_gf_add` to test a single unit. Verilator
finds the other modules through `-Irtl`.

To change the field, edit `M` and `POLY_K` in `ecc_pkg`. The field units are
parameterised in `M` and `K`. Two parts are written for GF(2^193) and must be
changed as well:

- the Itoh-Tsujii chain in `ecc_ctrl` (`chain_sq`)
- the reference package
