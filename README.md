# Unified, scalable Montgomery inverter for GF(p) and GF(2^n)

Elliptic-curve arithmetic in affine coordinates needs a field inversion for
every point addition. This means that inversion speed decides whether affine
coordinates are worth using. This design computes the first phase of the
Montgomery inverse in either a prime field GF(p) or a binary extension field
GF(2^n). It uses the same datapath and the same control unit for both:

    GF(p):    r = a^-1 * 2^k      mod p
    GF(2^n):  r = a(x)^-1 * x^k   mod p(x)

The exponent k is the number of main-loop iterations, between n and 2n. The
correction by 2^-k (the second phase) is not part of the design. It is usually
folded into a following Montgomery multiplication.

Two ideas make the design work:

* **Unified control.** The binary-field algorithm chooses its branch by
  comparing the degrees of u(x) and v(x). The prime-field algorithm used here
  compares the *bit sizes* of u and v instead of their values. For a
  polynomial, the bit size is the degree plus one. So the branch decision is
  the same signal in both fields, and only the adder changes its behaviour.
  Comparing bit sizes gives up the guarantee that u - v >= 0. A negative
  difference is allowed, and the design handles its sign without spending
  extra cycles (see *Signs without negation* below).
* **Scalability.** Operands are strings of W-bit words, and every arithmetic
  step works through them one word per clock cycle. The precision can be
  chosen per operation (e words, 1 <= e <= EMAX). The adder width does not
  limit it. One main-loop iteration takes exactly **e + 1 cycles**, so an
  inversion's main loop takes k(e + 1) cycles.

## The algorithm that runs

Start with u = p, v = a, r = 0, s = 1, k = 0. While v != 0:

| condition                        | u, v                | r, s                      |
|----------------------------------|---------------------|---------------------------|
| u even                           | u := u/2            | s := 2s                   |
| else v even                      | v := v/2            | r := 2r                   |
| else bitsize(u) > bitsize(v)     | u := (u - v)/2      | r := r + s, s := 2s       |
| else                             | v := (v - u)/2      | s := s + r, r := 2r       |
| GF(p) only: if the new v < 0     | v := -v             | s := -s                   |

Then k := k + 1. In GF(2^n), + and - are both xor, and the sign step does not
exist.

After the loop, the final correction runs:

* **GF(p):** if r >= 0, subtract p once if r >= p, then return p - r. If
  r < 0, add p once if r <= -p, then return -r.
* **GF(2^n):** if deg r = deg p, then r := r + p.

In GF(p), r lies in [-2p, 2p]. Its two's complement form therefore needs n+2
bits, so choose **e with e·W >= n + 2** for an n-bit prime. For GF(2^n),
e·W >= n + 1 is enough. For 160, 192, 224 and 256-bit primes with W = 32, this
gives e = 6, 7, 8 and 9.

## Word-serial datapaths

There are two word adders, one in each datapath. Each is a *dual-field
adder/subtractor* (`wdfas`): a row of full-adder cells whose carries are gated
off in GF(2^n) mode, so that the same cells do carry-free addition (xor).
Subtraction is a + ~b + 1. The +1 enters as the carry-in of the least
significant word. Between words, the carry sits in a flip-flop.

**(u - v)/2 unit (`uv_datapath`).** This unit reads word j of u and v in
cycle j. An operand switch chooses u - v, v - u, or halving alone, where the
second operand is forced to zero. The division by two is a right shift across
word boundaries. The low bit of raw word j is split off. The other W-1 bits
wait one cycle in a latch. In cycle j+1 they are joined with the low bit of
raw word j+1 to form result word j. After the e words, one flush cycle emits
the last word. In GF(p), the top bit of that word is the sign of the raw
result, so the shift is arithmetic. This one-word delay is why an iteration
takes e + 1 cycles rather than e. The unit writes result word j-1 in cycle j,
while it is still reading word j of the same register, so the update is done
in place.

**r + s / 2r unit (`rs_datapath`).** Every branch doubles one of r and s. Two
branches also replace the other with r + s. This unit does both in one pass,
e cycles long, inside the e + 1 cycles of the u/v pass. The doubling is a left
shift across words: the top bit of word j enters word j+1. A result-steering
stage sends the sum and the doubled word to the right registers.

**Bit sizes (`bitsize_unit`).** The bit-size comparison must be ready in the
first cycle of the next iteration. Three detectors therefore watch words as
they are written (one for u, one for v, one for the final passes) and keep the
position of the highest one bit. They also keep the sign, whether the value is
zero, and bit 0. The branch decision is then made from registered flags in
cycle 0 and costs no extra cycle.

## Signs without negation (GF(p))

Negating a multi-word number would cost a full pass. The algorithm asks for
two negations, v := -v and s := -s, whenever v - u < 0. Neither is performed:

* **v is left negative.** The register holds a two's complement number X, and
  the algorithm's v is |X|. The sign is simply the top bit of the stored
  value.
  * Halving X is an arithmetic shift.
  * A subtraction that needs |X| uses the stored sign. If X >= 0, the unit
    computes u - X or X - u. If X < 0, it computes u + X or X + u. In both
    cases the stored result has the right magnitude, so the sign change is
    folded into the next subtraction.
  * The v detector reports the bit size of |X|. While the words go by, it also
    forms -X = ~X + 1 with a small incrementer, and the sign known at the last
    word picks one of the two results.
* **s gets a correct-sign bit.** One flag, `cs_s`, says whether the stored
  s is the algorithm's s or its negative, so s := -s is a flag toggle.
  * A sum is formed as dest + other when the signs agree, and as
    dest - other when they differ. The result keeps the destination's flag.
  * The flag flips at the end of a (v - u)/2 iteration exactly when the
    algorithm's v - u is negative. That is the case when the raw result's sign
    differs from the stored sign of v.
  * r never needs a flag: sums keep their destination's flag, and only s is
    ever negated, so r's flag would always be 0.

This encoding gives the same add-or-subtract choice as a pair of "actual sign /
correct sign" bits per variable. It uses one bit in total where that scheme
uses two.

## Control and timing (`inv_controller`)

| phase | cycles       | what happens                                                                      |
|-------|--------------|-----------------------------------------------------------------------------------|
| INIT  | e            | u := p, r := 0, s := 1 (v was loaded with a); detectors see p and a               |
| LOOP  | k(e+1) + 1   | k iterations; the extra cycle is the v = 0 test that ends the loop                |
| FCMP  | e            | GF(p): s := r - p (r >= 0) or r + p (r < 0). GF(2^n): s := r + p                  |
| FOUT  | e            | GF(p): r := p - r' or -r', where r' is r or s by FCMP's sign and zero. GF(2^n): r := s if deg s < deg p, else r |

Busy time is therefore **e + k(e+1) + 1 + 2e cycles**. The final passes reuse
the r/s adder and a register that holds p.

## Interface (`unified_inverter`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset of control state and flags |
| `ld_we`, `ld_sel`, `ld_addr`, `ld_data` | in | while idle: write word `ld_addr` of a (`ld_sel` = 0) or p (`ld_sel` = 1), least significant word at address 0; write words 0..e-1 and keep unused high bits zero |
| `start`, `field`, `nwords` | in | one-cycle start while idle; `field` is `FIELD_GFP` or `FIELD_GF2N`; `nwords` = e |
| `busy`, `done` | out | busy until the result is ready; done stays high until the next start |
| `k` | out | the exponent |
| `res_addr`, `res_data` | in/out | asynchronous read of result word `res_addr` while idle |
| `iter_op`, `iter_start` | out | the branch each iteration takes (for observation) |

Parameters: `W` (word length, default 32, the evaluation's word length) and
`EMAX` (register depth in words, default 9: this design's choice, enough for
256-bit primes). The modulus must be odd (constant term 1 for polynomials),
and a must be nonzero, reduced, and coprime to p. Invalid input is not
detected.

Registers are `word_mem` arrays (EMAX × W, one write port, two asynchronous
read ports), one each for u, v, r, s and p. Shared types are in `inv_pkg`.

## Cycle counts at the 32-bit word length

The table shows mean main-loop cycles measured in simulation by
`tb_table1_workloads`, with 40 random operands per field. The primes are the
NIST/SEC primes secp160r1, P-192, P-224 and P-256. The binary fields use the
GF(2^163) pentanomial and the GF(2^233) trinomial.

| field | e | mean k | k(e+1) |
|-------|---|--------|--------|
| GF(p), 160-bit | 6 | 226.3 | 1584 |
| GF(p), 192-bit | 7 | 273.5 | 2188 |
| GF(p), 224-bit | 8 | 318.9 | 2870 |
| GF(p), 256-bit | 9 | 365.9 | 3659 |
| GF(2^163)      | 6 | 269.9 | 1890 |
| GF(2^233)      | 8 | 389.1 | 3502 |

In GF(p), the measured k agrees with published estimates of this method
(k = 228, 273, 318 and 364) to within 1 %. The published cycle estimates
(1368, 1911, 2544 and 3276) are k(e+1) with e = n/W. That is one word fewer
than e = ceil((n+1)/W), the word count in the same formula's definition, and
it leaves no room for the sign bits. This design needs e·W >= n+2, so its
counts are about 10 % higher at these sizes.

## How far to trust it

Every block has a self-checking testbench in `tb/`. The end-to-end test
(`tb_unified_inverter`) runs at the default parameters. It performs about 150
inversions over all precisions e = 1..9 in both fields. These include the four
primes above, the GF(2^163) pentanomial and the GF(2^233) trinomial, and random
odd moduli and polynomials. Each result is checked three ways:

* against a behavioural model of the algorithm (exact r and k);
* against the defining relation r·a ≡ 2^k (mod p), or r·a ≡ x^k (mod p(x)),
  computed with wide integers;
* against the cycle formula above.

The test also requires that every mechanism occurs: all four branches, a
negative v used in a later subtraction, correct-sign flips, every outcome of
the final comparisons, and the smallest and largest precision.

`tb_table1_workloads` runs 240 more inversions at the sizes in the cycle table
above. For each one it checks the defining relation, the exact loop time
k(e+1), and the range of k: n <= k <= 2n in GF(p), and
deg a <= k <= deg p + deg a + 1 in GF(2^n).

Not covered: phase II of the Montgomery inverse, detection of invalid inputs,
and anything about clock frequency or area.

## Simulating

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/inv_pkg.sv \
    tb/tb_unified_inverter.sv --top-module tb_unified_inverter
./obj_dir/Vtb_unified_inverter
```

The package goes first on the command line; `-y rtl` finds the modules.
Replace the testbench and top-module names to run `tb_table1_workloads` or one
of the unit testbenches (`tb_wdfas`, `tb_bitsize_unit`, `tb_word_mem`,
`tb_uv_datapath`, `tb_rs_datapath`, `tb_inv_controller`). Each prints
`TB_RESULT checks=N failures=M`.

## Where this design makes its own choices

These points are not fixed by the method the design implements. They are this
design's own decisions:

* the carry-gated full-adder adder;
* the register organisation, including a register that keeps p;
* the streaming bit-size detectors, and how they find the size of a negative v;
* the single correct-sign bit on s in place of two sign bits per variable;
* the start/busy/done handshake and the load port;
* the one-cycle v = 0 test;
* the two-pass final correction on the r/s unit;
* the rule e·W >= n+2 for GF(p).

The loop, its branch order, the bit-size comparison, keeping v negative, the
correct-sign idea, the two word adders and the e + 1 cycle iteration follow
the method as published.
