# Error-detecting Pomaranch S-box, with an AES-128 core alongside

A fault in a cipher's hardware, whether natural or deliberately injected, can leak the key or
corrupt data without anyone noticing. The main design here is a substitution box (S-box) for the
Pomaranch stream cipher that checks itself while it runs. Every intermediate value carries a parity
bit that is predicted from the operands of the step that produced it. A mismatch raises an alarm in
the same cycle. The S-box is "uneven": it takes 9 bits in and gives 7 bits out. A detector that
watched all nine bits of the inner result would therefore cry wolf on errors that never reach the
output. This design guards only the bits that leave the S-box, so such errors raise no alarm.

Next to it sits an iterative AES-128 encryption core. The two parts are independent. They share
the top level only, and no signal passes between them.

## The S-box function

Pomaranch uses eight of these S-boxes, one in each of its jump register sections 1 to 8. Section 9
has none. For a 9-bit input `x`, each S-box:

1. forms the multiplicative inverse `x^-1` in GF(2^9) modulo `x^9 + x + 1`, with 0 mapped to 0;
2. drops the most and least significant bits of the 9-bit result;
3. outputs bits 7..1 of the result as a 7-bit value.

The jump registers around the S-boxes are not part of this RTL. The top level takes the S-box
inputs on ports and returns the outputs on ports.

## Computing the inverse in a composite field

Inverting directly in GF(2^9) is expensive, and a 512-entry table is no better. Instead the value
is moved into the isomorphic field GF((2^3)^3). There, inversion needs only 3-bit multipliers,
squarers and one 3-bit inversion. The chosen fields are:

| field | defining polynomial |
|---|---|
| GF(2^3) | `w^3 + w + 1` |
| GF((2^3)^3) over GF(2^3) | `y^3 + y + γ`, with `γ = w` (3'b010) |

Any `γ` for which the cubic has no root in GF(2^3) would work. `w` is the first such value.

The forward matrix `M` sends `x` to `β = 0x02A`, a root of `x^9 + x + 1` in the composite field.
Its nine rows, and the rows of the backward matrix `M^-1`, are constants in `pom_sbox_pkg`. The
package header explains the packing: `{a2, a1, a0}`, with `a0` in bits [2:0]. The datapath is the
adjugate of multiplication by `A`, scaled by the inverse of the norm `D`:

```
A   = M·X = {a2,a1,a0}
B00 = γ·a2 + a1         B2  = a0 + a2            B0 = B2²
G   = γ·a2²             B1  = a0·a1 + G
C00 = B0 + a1·B00       C02 = a2·B2 + a1²        B3 = a0·C00
T   = B00·G             E   = γ·a1³
D   = T + B3 + E        (the norm; lies in GF(2^3), zero only for A = 0)
b2  = C02·D⁻¹           b1  = B1·D⁻¹             b0 = C00·D⁻¹
Y   = M⁻¹·{b2,b1,b0}    output = Y[7:1]
```

The names B00, B0, B1, B2, B3 and D and this split into three stages follow the published
architecture: forward matrix, GF(2^3) datapath, inverse matrix. The following are this design's
own derivation for the polynomial above:

- the polynomials, `γ` and the matrices;
- the exact definition of B3;
- splitting D into the three terms T, B3 and E.

Check of the datapath: the testbench compares all 512 outputs with an inverse
found by brute-force search in GF(2^9).

## Parity signatures: how errors are caught

This is the part that takes the most care.

**One check per value.** Every named value above (A, B00, B2, B0, G, B1, C00, C02, B3, T, E, D,
D⁻¹, b2, b1, b0 and the kept output bits) has one parity check. The check compares the XOR of the
value's bits with a parity *predicted from the operands of the operation that produced it*. The
prediction never looks at the result. So any odd number of bit errors in that value flips exactly
one side of the comparison, and the check fires.

Errors in a value also corrupt the values computed from it. Those later checks stay quiet, because
their predictions start from the same corrupted operands. The alarm is therefore raised where the
error enters, not where it ends up.

**Prediction rules.** These follow from `w^3 + w + 1`:

| operation | predicted parity |
|---|---|
| `γ·z` | `z0 ^ z1` |
| `z²` | `z0 ^ z1` |
| `γ·z²` | `z0 ^ z2` |
| `a·b` | XOR of `a_i·b_j` over `i + j ≤ 2` (w⁰, w¹ and w² have odd weight; w³ = w+1 and w⁴ = w²+w have even weight) |
| `γ·z³`, `z⁻¹` | 8-entry truth tables (`GCUBE_PAR_TT`, `INV_PAR_TT`) |
| `M·X` | parity of `X & 9'h1E3`, the column parities of M |
| kept bits of `M⁻¹·B` | parity of `B & 9'h118`, the column parities of rows 1..7 |

**Seven signatures.** The checks are grouped into the seven signatures named in `sig_e`:

| signature | values covered |
|---|---|
| `SIG_A` | A |
| `SIG_B00` | B00, B2, B0, G |
| `SIG_B1` | B1 |
| `SIG_B3` | C00, B3 |
| `SIG_D` | T, E, D, D⁻¹ |
| `SIG_B` | C02, b2, b1, b0 |
| `SIG_Y` | Y[7:1] |

`err[k]` reports signature `k`. `alarm` is the OR of the seven.

**Tailoring.** The parameter `SIG_EN` (7 bits, default all ones) selects which signatures are
included in `err` and `alarm`. A system short on area can keep only some of them and accept lower
coverage. A signature that is switched off reads 0, and synthesis removes its predictor.

**No false alarms from dropped bits.** The output signature covers Y[7:1] only. A fault that
touches only Y[8] or Y[0] leaves the output unchanged, and it raises nothing.

**Measured coverage.** `tb_pom_coverage` injects faults for every input and every bit of every
intermediate value, under three selections of `SIG_EN`:

| fault model | all seven signatures | output signature only | `SIG_A` + `SIG_D` |
|---|---|---|---|
| one bit flipped | 100 % | 11 % | 35 % |
| one bit stuck at 0 or 1 | 100 % | 11 % | 35 % |
| random multi-bit mask on one value | about 58 % | about 4 % | about 18 % |

Each figure is the share of faults that corrupt the 7-bit output and raise the alarm.

**What is not caught.**
- An even number of bit errors inside one value cancels out in its parity. This is why
  multi-bit masks are only partly detected.
- Guarding only the kept output bits removes the false alarms that the dropped bits would cause.
  It does not remove all false alarms. With all signatures, 842 of the 32,256 single-bit faults
  injected (about 2.6 %) raise the alarm while the output stays correct. Such a fault hits an intermediate value whose error is lost later, for
  example any value multiplied by `D⁻¹` when the input is 0.

**Fault injection.** The `fi` port (type `pom_fi_t`) has one XOR mask per intermediate value. It is
meant for reliability experiments. Tie it to `'0` in a real system.

## AES-128 encryption core

`aes128_encrypt` encrypts one 128-bit block with a 128-bit key. It works as follows:

- The initial AddRoundKey happens when `start` is taken.
- Ten rounds follow, one per clock cycle. The tenth round has no MixColumns.
- Round keys are expanded on the fly, one step per round, so no key schedule is stored.
- `aes_round` uses 16 S-boxes and `aes_key_step` uses 4 more.
- `aes_sbox` computes each S-box from its definition: the inverse as `a^254`, then the affine map
  with 0x63.

Byte order is that of FIPS-197: byte 0 is in bits [127:120], and the state is column-major.

The handshake is as follows:

- `start` is sampled on a rising edge while the core is idle. It is ignored while `busy` is high.
- `done` pulses for one cycle 11 rising edges after the edge that took `start`.
- `ciphertext` is valid from that pulse until the next start.
- A new block may start in the cycle `done` is high.
- `rst_n` is an asynchronous, active-low reset.

Only encryption is built.

## Top level: `crypto_ed_top`

The top holds `NUM_SBOX = 8` instances of `pom_sbox_ed`, with per-box inputs, outputs, signatures
and fault masks as unpacked arrays of ports. It also has a global `alarm` and the AES core's ports,
which are prefixed `aes_`. The S-box side is combinational. Only the AES side uses `clk` and
`rst_n`.

## Files

| file | contents |
|---|---|
| `rtl/pom_sbox_pkg.sv` | field constants, matrices, parity predictors, `sig_e`, `pom_fi_t` |
| `rtl/pom_sbox_ed.sv` | error-detecting Pomaranch S-box |
| `rtl/aes_pkg.sv` | AES types, GF(2^8) arithmetic, ShiftRows, MixColumns |
| `rtl/aes_sbox.sv`, `rtl/aes_key_step.sv`, `rtl/aes_round.sv`, `rtl/aes128_encrypt.sv` | AES core |
| `rtl/crypto_ed_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pom_coverage.sv` | fault-coverage experiment for the S-box |

## Simulating

Every testbench checks itself and ends with a line `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/pom_sbox_pkg.sv rtl/aes_pkg.sv tb/tb_crypto_ed_top.sv \
    --top-module tb_crypto_ed_top -Mdir obj_top
./obj_top/Vtb_crypto_ed_top
```

Replace the testbench name to run another. The reference values in the testbenches come from two
places:

- a brute-force search for field inverses, which involves no composite field;
- the FIPS-197 worked examples: Appendix B, C.1, and the A.1 key expansion.

`tb_crypto_ed_top` runs the top at its default parameters. It drives all 512 inputs into all eight
S-boxes, injects faults that must be detected and faults that must stay silent, and encrypts two
FIPS-197 blocks. It also checks the AES latency, that a start while busy is ignored, and
back-to-back operation.

## Limits and departures

The following are this design's own choices, because the published architecture does not print
them:

- the field polynomials, `γ` and the two matrices;
- the parity-prediction formulas for multiplication and inversion;
- the assignment of each value to a signature;
- the fault-injection port.

The source states the error-coverage and ASIC-overhead results without numbers, so no figure is
matched here.

The jump register sections of Pomaranch and the XOR that forms its key stream are not included.
Their internal structure is not specified well enough to build.

The S-box has no pipeline registers. The AES core's one-round-per-cycle timing and its handshake
are also this design's choice.
