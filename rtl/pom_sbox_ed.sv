// Pomaranch uneven substitution box (9-bit in, 7-bit out) with parity-based
// error detection.
//
// Function: y = middle seven bits (bits 7..1) of x^-1 in GF(2^9) modulo
// x^9 + x + 1, with 0 mapped to 0. The most and least significant bits of the
// inverse are dropped, as in the cipher.
//
// Structure: the input is mapped by the transformation matrix M into the
// composite field GF((2^3)^3) as A = {a2, a1, a0}; the inverse is formed as
// adjugate times inverse norm, using only GF(2^3) operations:
//   B00 = gamma*a2 + a1      B2  = a0 + a2          B0 = B2^2
//   G   = gamma*a2^2         B1  = a0*a1 + G
//   C00 = B0 + a1*B00        C02 = a2*B2 + a1^2     B3 = a0*C00
//   T   = B00*G              E   = gamma*a1^3       D  = T + B3 + E (the norm)
//   b2 = C02*D^-1   b1 = B1*D^-1   b0 = C00*D^-1    Y = M^-1 * {b2,b1,b0}
// The names B00, B0, B1, B2, B3, D and the split into a forward matrix, a
// GF(2^3) inversion datapath and an inverse matrix follow the published
// architecture; the field polynomials, GAMMA and the matrices are this
// design's choices (see pom_sbox_pkg).
//
// Error detection: every intermediate value carries one parity check, whose
// predicted bit is computed from the operands of the operation that makes it
// (never from the result), so any odd number of bit errors in that value
// raises its check. Checks are grouped into seven signatures (sig_e). The
// output signature covers only the seven bits that leave the S-box: an error
// confined to the two dropped bits does not change the output and must not
// raise an alarm (false-alarm immunity). SIG_EN selects which signatures are
// built, trading area for coverage; a disabled signature reads 0.
//
// Interface: purely combinational. fi holds XOR masks applied to each
// intermediate value for fault-injection experiments; tie it to '0 in use.
// err[k] is signature k's mismatch, alarm is their OR. The two dropped bits
// of the 9-bit inverse (y_w[8] and y_w[0]) are computed but drive nothing.
module pom_sbox_ed
  import pom_sbox_pkg::*;
#(
  parameter logic [NS-1:0] SIG_EN = '1
) (
  input  gf512_t        x,
  input  pom_fi_t       fi,
  output logic [NO-1:0] y,
  output logic [NS-1:0] err,
  output logic          alarm
);

  gf512_t a_w, b_w, y_w;
  gf8_t   a0, a1, a2;
  gf8_t   b00, b2v, b0v, g, b1v, c00, c02, b3v, t, e, d, di;
  gf8_t   q0, q1, q2;
  logic [NS-1:0] chk;

  // ---- datapath ----
  always_comb begin
    a_w = lin_map(x, M_ROW) ^ fi.a;
    {a2, a1, a0} = a_w;

    b00 = (gf8_mul(GAMMA, a2) ^ a1)        ^ fi.b00;
    b2v = (a0 ^ a2)                        ^ fi.b2;
    b0v = gf8_sq(b2v)                      ^ fi.b0;
    g   = gf8_mul(GAMMA, gf8_sq(a2))       ^ fi.g;
    b1v = (gf8_mul(a0, a1) ^ g)            ^ fi.b1;
    c00 = (b0v ^ gf8_mul(a1, b00))         ^ fi.c00;
    c02 = (gf8_mul(a2, b2v) ^ gf8_sq(a1))  ^ fi.c02;
    b3v = gf8_mul(a0, c00)                 ^ fi.b3;
    t   = gf8_mul(b00, g)                  ^ fi.t;
    e   = gf8_mul(GAMMA, gf8_mul(a1, gf8_sq(a1))) ^ fi.e;
    d   = (t ^ b3v ^ e)                    ^ fi.d;
    di  = gf8_inv(d)                       ^ fi.di;

    q2 = gf8_mul(c02, di);
    q1 = gf8_mul(b1v, di);
    q0 = gf8_mul(c00, di);
    b_w = {q2, q1, q0} ^ fi.b;

    y_w = lin_map(b_w, MINV_ROW) ^ fi.y;
    y   = y_w[NO:1];
  end

  // ---- parity checks: actual parity XOR predicted parity ----
  always_comb begin
    chk = '0;
    chk[SIG_A]   = ^a_w ^ ^(x & M_COLPAR);
    chk[SIG_B00] = (^b00 ^ par_gmul(a2) ^ ^a1)
                 | (^b2v ^ ^a0 ^ ^a2)
                 | (^b0v ^ par_sq(b2v))
                 | (^g   ^ par_gsq(a2));
    chk[SIG_B1]  = ^b1v ^ par_mul(a0, a1) ^ ^g;
    chk[SIG_B3]  = (^c00 ^ ^b0v ^ par_mul(a1, b00))
                 | (^b3v ^ par_mul(a0, c00));
    chk[SIG_D]   = (^t  ^ par_mul(b00, g))
                 | (^e  ^ par_gcube(a1))
                 | (^d  ^ ^t ^ ^b3v ^ ^e)
                 | (^di ^ par_inv(d));
    chk[SIG_B]   = (^c02 ^ par_mul(a2, b2v) ^ par_sq(a1))
                 | (^b_w[8:6] ^ par_mul(c02, di))
                 | (^b_w[5:3] ^ par_mul(b1v, di))
                 | (^b_w[2:0] ^ par_mul(c00, di));
    chk[SIG_Y]   = ^y_w[NO:1] ^ ^(b_w & MINV_KEPT_COLPAR);
  end

  assign err   = chk & SIG_EN;
  assign alarm = |err;

endmodule
