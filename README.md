# A small bit-serial point multiplier for binary Edwards curves

This design computes Q = kP on a binary Edwards curve over GF(2^m). The curve uses
equal parameters, d1 = d2 = d. The main size is m = 283. The hardware is built for very
little area: one m-bit accumulator, one XOR row, a bit-serial Gaussian normal basis (GNB)
multiplier and nine m-bit registers. A tiny program of 10-bit instructions does all the
curve arithmetic. The scalar k is never stored: the co-processor asks for one key bit per
Montgomery ladder step. Every step does the same operations whatever the bit is, so
timing does not depend on the key.

One multiplication takes m cycles. Additions, squarings and register swaps take 3 cycles
each. A full 283-bit point multiplication takes 513,172 clock cycles.

## The algorithm: ladder in w-coordinates

Every point (x, y) is carried as one coordinate, w = x + y, written as a fraction W/Z.
The ladder keeps two points, w(jP) and w((j+1)P). The two points share one denominator
Z (the "co-Z" trick), which saves a register. Each step adds the two points
(differential addition; the difference is always P, with w0 = x0 + y0) and doubles one
of them. Key-dependent swaps before and after the step decide which point is doubled.

With W1, W2 the numerators and Z the common denominator, one step computes:

    C = (W1 + W2)^2        D = Z^2              S = (W1 (W1 + Z))^2
    E = C * (1/w0)         U = E + C            V = E + D
    T = S + d D^2
    W3 = U T   (sum)       W4 = V S   (double)  Z' = V T

That is 6 multiplications and 4 squarings. 1/w0 is a stored constant, so no division
by w0 happens at run time.

When the ladder ends:

1. The two affine values are found: w2 = W1/Z and w3 = W2/Z, with one inversion.
2. x is found by solving x^2 + x = A with the half-trace. With P = w0 w2:

       A = [ w3 (d + P + P (w0 + w2 + P)) + d (w0 + w2) + (y0^2 + y0)(w2^2 + w2) ] / (w0^2 + w0)

3. y is found the same way, from y^2 + y = d (x + x^2) / (d + x + x^2). This comes
   from the curve equation.

The half-trace gives one of the two roots. So each output coordinate may come out
complemented (x + 1 instead of x). For the usual protocol uses (for example a shared
secret derived from the point) both choices work the same way. Testbenches accept
either one.

## GNB field arithmetic

Elements of GF(2^m) are written in a type-T Gaussian normal basis
{β, β^2, β^4, ...}. In this basis squaring is a plain rotation. Here bit p of a register
holds the coefficient of β^(2^(-p mod m)). With that order:

- squaring is a right circular shift by one;
- rotating both operands of a product by one rotates the product by one.

The type T is the one for which p = Tm + 1 is prime and a GNB exists. The NIST fields
use T = 4 for m = 163, T = 2 for m = 233 and T = 6 for m = 283.

### The serial multiplier (`gnb_p_array`, `bec_fau`)

This is the hardest part to follow. Write c = a·b. Define the product's bit-0 function
as f(a, b) = coefficient of β in a·b. Every other output bit is the same function
applied to rotated operands. Computing all m bits of c one at a time, in parallel, would
need m copies of f. This multiplier turns it around:

- Each cycle, the *P' array* forms y = β ⊗ (T1 >> 1). This is the product of one basis
  element with the whole rotated T1, as an m-bit vector.
- The *J array* ANDs y with one bit of T0 >> 1.
- The accumulator does Z ← J ⊕ (Z >> 1).

So in each cycle one bit of T0 adds its partial product, a_i·(β^(2^-i) · b), to every
output bit at once. Rotating Z each cycle puts earlier partial products in the right
frame. Because T0, T1 and Z all rotate by one in every one of the m cycles, T0 and T1
are back to their original values at the end, and Z holds T0·T1.

The P' array is a fixed XOR network. Row j XORs at most T input bits:

    y[j] = XOR of b[q] over every n = 2^j u^s mod p   (s = 0..T-1, n != 1),
           with q = (j - F(p + 1 - n)) mod m

Here u is an element of order T modulo p, and F(2^i u^s mod p) = i. This is the usual
GNB multiplication matrix. `gnb_p_array` computes it with a constant function when the
design is elaborated, so no table is stored. The cost is about (T-1)·m XOR gates. That
is why the 233-bit field (type 2) needs far fewer gates than the other two.

### Field arithmetic unit (`bec_fau`)

One register Z and two 3-input multiplexers:

    Z <= mux1(s1) ^ mux2(s2)
    s1: 0 = J (partial product)   1 = register read    2 = 0
    s2: 0 = 0                     1 = Z                2 = Z >> 1 (rotate, = squaring)

| operation | cycle 1 | cycle 2 | cycle 3 | cycles |
|---|---|---|---|---|
| ADD s,d  (d += s) | Z = s (1,0) | Z = Z ^ d (1,1) | write d | 3 |
| SQ s,d   (d = s²) | Z = s (1,0) | Z = Z >> 1 (2,2) | write d | 3 |
| SWAP a,b | Z = a (1,0) | b ← Z, Z = b (1,0) | write a | 3 |
| MULT d  (d = T0·T1) | Z = J (0,0), rotate | Z = J ^ Z>>1 (0,2), rotate, for m-1 cycles | (overlapped) | m |

Z is also the register file's only write port, so every result goes through it.

## Register file (`bec_regfile`)

There are nine m-bit values behind one 9-way read multiplexer:

| number | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| register | T0 | T1 | R0 | R1 | R2 | 1/w0 | d | x0 | y0 |

- Only T0 and T1 can rotate (s_t0, s_t1). They are the multiplier operands. x_out and
  y_out are read from them.
- The last four values are constants fixed by parameters. A write to a constant is
  dropped. The program uses this to load a constant: `SWAP const, Tn`.
- No register is reset. The program writes every register before it reads it.

## Program and instruction set (`bec_pkg`, `bec_rom`, `bec_controller`)

Instruction word: `[9:8]` opcode (0 ADD, 1 SQ, 2 MULT, 3 SWAP), `[7:4]` source
register, `[3:0]` destination register. MULT ignores the source field.

Flow control has no opcode of its own. It is coded as SWAP words whose source field is
13, 14 or 15, numbers no register uses:

| source | destination | meaning |
|---|---|---|
| 15 | 0 | HALT (done) |
| 15 | 1 | KSWAP1: request a key bit; swap T0/T1 if it is 1 (3 cycles) |
| 15 | 2 | KSWAP0: swap T0/T1 if that bit was 0 (3 cycles) |
| 15 | 3 | ENDLOOP |
| 15 | 4 / 5 | CALL inversion / CALL half-trace |
| 15 | 6 | RET |
| 14 | n | LOOP: repeat the body up to ENDLOOP count(n) times |
| 13 | n | REPEAT: run the next instruction count(n) times |

The counts are computed from m: m-2 ladder steps, (m-3)/2 half-trace iterations, and
the squaring runs of the inversion. Control words take one cycle. KSWAP0/KSWAP1 always
do a full 3-cycle swap; when no swap is wanted they swap T0 with itself. That keeps the
step length constant.

The program is produced by `build_program(m)` and has three parts:

- **Main program:** init, ladder, then x and y recovery.
- **Half-trace:** two squarings and one add, repeated (m-1)/2 times.
- **Itoh–Tsujii inversion:** its addition chain comes from the binary expansion of m-1.
  For m = 283 the chain is 1, 2, 4, 8, 16, 17, 34, 35, 70, 140, 141, 282 (11
  multiplications).

For m = 283 the program has 146 words. It fits any odd m up to the 256-word ROM size.

### Controller timing

- `start` (one cycle, while idle) runs the program from address 0.
- `done` rises at HALT and stays high until the next start.
- Reset (`rst_n`) is synchronous and active low.
- **Key bits:** in the first cycle of each KSWAP1, `key_req` is high for one clock, and
  `k_i` is sampled on that clock edge. The master must answer in the same cycle:
  `k_i` is combinational from `key_req` or held ready beforehand. Bits come most
  significant first. The leading 1 of the scalar is implicit, so m-2 bits are requested
  and k = 1 k(m-3)…k0.
- **MULT write-back:** MULT uses exactly m cycles, and its result is written in the
  first cycle of the next instruction. If that instruction reads the register being
  written, the controller feeds it from Z instead (s1 = 2, s2 = 1). Z already holds the
  product. Two MULTs back to back are never issued; an assertion checks this.

### Cycle counts

| | this design | reference figures |
|---|---|---|
| ladder step, m = 283 | 64 + 6m = 1762 | 1761 |
| point multiplication, m = 163 | 177,253 | 177,707 |
| point multiplication, m = 233 | 351,920 | 351,856 |
| point multiplication, m = 283 | 513,172 | 512,555 |

The differences come from the one-cycle control words, the 3-cycle key swaps, and small
differences in the recovery code.

## Where this design departs from the published architecture

- **Multiply accumulation:** the description gives s2 = "01" (Z unrotated) for the
  multiply cycles. With rotating operands the accumulator must rotate too, so s2 = "10"
  (Z >> 1) is used. The unrotated form gives wrong products.
- **J array:** the J array uses one bit of T0 >> 1 per cycle. The P' array output is m
  bits wide; the block diagram labels it m/2.
- **Field type:** GF(2^283) is described as a type-4 GNB, but none exists (4·283 + 1 is
  not prime). The standard type 6 is used.
- **x-recovery formula:** the printed closed form does not hold. The form above, which
  matches the published algorithm listing, is used and was verified.
- **Program size:** there are 146 program words, against about 132 quoted. Loops and
  calls are explicit here, and their encoding is this design's own.
- **Initialisation:** init uses 3 swaps instead of 4.
- **Control-word cycles:** one cycle per control word is added. The published cycle
  counts do not include such cycles.
- **MULT write-back:** the write is overlapped with the next instruction and uses
  forwarding. The published text says the result is written in cycle m.
- **ROM placement:** the program ROM is inside `bec_top`. The published design keeps it
  outside, and its quoted area leaves it out.
- **Curve constants:** d, x0, y0 and 1/w0 are this design's own, since no values are
  published. The curve has d1 = d2 = d and Tr(d) = 1, so the addition law is complete,
  and the base point lies on it. For another curve, set the parameters `D`, `X0`, `Y0`
  and `INV_W0`. They are in register bit order (bit p = coefficient of β^(2^-p)).
- **Key handshake:** the key handshake, reset and start/done timing are assumed.

## Files

| file | content |
|---|---|
| `rtl/bec_pkg.sv` | instruction format, register numbers, program generator |
| `rtl/gnb_p_array.sv` | P' XOR network (GNB matrix, built at elaboration) |
| `rtl/bec_fau.sv` | field arithmetic unit: Z, J array, multiplexers |
| `rtl/bec_regfile.sv` | five working registers, four constants |
| `rtl/bec_rom.sv` | program ROM (built at elaboration) |
| `rtl/bec_controller.sv` | sequencer, key handshake, loops and calls |
| `rtl/bec_top.sv` | the co-processor |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_bec_top_full.sv` | one 283-bit point multiplication, default parameters |
| `tb/tb_bec_workloads.sv` | 163-bit and 233-bit point multiplications (`tb/tb_bec_run.sv` is its helper) |

Parameters of `bec_top`: `M` (field degree), `T` (GNB type, must be even), and the
curve constants. For another field, give all of them together.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself. For example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/bec_pkg.sv \
        tb/tb_bec_top.sv --top-module tb_bec_top
    ./obj_dir/Vtb_bec_top

| testbench | what it checks |
|---|---|
| `tb_bec_top` | m = 11 (type 2). Runs 26 keys against a reference model inside the testbench. Counts every mechanism (both key swaps, forwarding, loops, repeats, calls, returns). Checks step length and total cycles. |
| `tb_bec_top_full` | one complete 283-bit run at the defaults. Takes a few seconds. |
| `tb_bec_workloads` | the 163- and 233-bit sizes, each against a precomputed reference point. |
| `tb_bec_fau`, `tb_gnb_p_array` | field identities at m = 283: a·1 = a, a·a = a², commutativity, distributivity, associativity, a^(2^m) = a. |
| `tb_bec_regfile`, `tb_bec_rom`, `tb_bec_controller` | block-level behaviour and timing. |

## How far to trust it

- The full 283-bit run and the 163- and 233-bit runs produce the point computed by an
  independent affine double-and-add model. So do 26 random keys at m = 11.
- Each testbench was shown to fail against a deliberately broken copy of its module.
- Not done: gate-level synthesis results, area and timing closure, and
  side-channel evaluation.
- Exceptional inputs are not handled specially (for example k·P hitting the point where
  w0² + w0 = 0 would divide by zero). They were not tested.
