// Shared definitions for the fault-detecting Pomaranch substitution box.
//
// The Pomaranch S-box maps a 9-bit value to its multiplicative inverse in
// GF(2^9) = GF(2)[x]/(x^9 + x + 1) (zero maps to zero) and keeps the middle
// seven bits of the 9-bit result. This design computes the inverse in the
// composite field GF((2^3)^3) and checks every intermediate value with a
// predicted parity bit.
//
// Field choices made by this design (the polynomial x^9+x+1 is the only one
// fixed by the cipher):
//   GF(2^3)      = GF(2)[w]/(w^3 + w + 1)
//   GF((2^3)^3)  = GF(2^3)[y]/(y^3 + y + GAMMA), GAMMA = w (3'b010); this
//                  cubic has no root in GF(2^3), so it is irreducible.
//   Forward map  : A = M * X with x -> beta, beta = 9'h02A the first root of
//                  x^9 + x + 1 in the composite field (rows in M_ROW).
//   Backward map : Y = M^-1 * B (rows in MINV_ROW).
// A composite element is packed as {a2, a1, a0}: a0 = bits [2:0].
//
// Parity prediction rules (all follow from the two field polynomials):
//   par(gamma*z)     = z0 ^ z1                      (linear)
//   par(z^2)         = z0 ^ z1                      (linear)
//   par(gamma*z^2)   = z0 ^ z2                      (linear)
//   par(a*b)         = XOR of a_i*b_j over i+j <= 2, because w^0, w^1 and w^2
//                      have odd weight and w^3 = w+1, w^4 = w^2+w even weight
//   par(gamma*z^3), par(z^-1): three-input functions given as 8-entry truth
//                      tables GCUBE_PAR_TT and INV_PAR_TT (bit z = parity).
package pom_sbox_pkg;

  localparam int unsigned NO = 7;   // S-box output width
  localparam int unsigned NS = 7;   // number of signatures

  typedef logic [2:0] gf8_t;
  typedef logic [8:0] gf512_t;

  localparam gf8_t GAMMA = 3'b010;

  // Row i selects the input bits whose XOR gives output bit i.
  localparam gf512_t M_ROW [9] = '{9'h001, 9'h1d2, 9'h0fc, 9'h1c2, 9'h090,
                                   9'h0da, 9'h1fc, 9'h114, 9'h1ac};
  localparam gf512_t MINV_ROW [9] = '{9'h001, 9'h11c, 9'h0ce, 9'h066, 9'h00a,
                                      9'h1f6, 9'h14a, 9'h01a, 9'h044};
  // Column parities: parity of A equals parity of (X & M_COLPAR); parity of the
  // kept output bits Y[7:1] equals parity of (B & MINV_KEPT_COLPAR).
  localparam gf512_t M_COLPAR         = 9'h1e3;
  localparam gf512_t MINV_KEPT_COLPAR = 9'h118;

  localparam logic [7:0] GCUBE_PAR_TT = 8'b1011_0010;
  localparam logic [7:0] INV_PAR_TT   = 8'b1011_0010;

  // Signature index, named after the check points of the architecture.
  typedef enum int unsigned {
    SIG_A   = 0,  // forward transformation matrix output A
    SIG_B00 = 1,  // first-level values B00, B2, B0 and gamma*a2^2
    SIG_B1  = 2,  // B1 = a0*a1 + gamma*a2^2
    SIG_B3  = 3,  // C00 = B0 + a1*B00 and B3 = a0*C00
    SIG_D   = 4,  // norm D, its parts and its inverse D^-1
    SIG_B   = 5,  // C02 and the inverse coefficients b2, b1, b0
    SIG_Y   = 6   // the seven kept output bits Y[7:1]
  } sig_e;

  // XOR masks applied to the intermediate values, for fault-injection
  // experiments. All zero in normal operation.
  typedef struct packed {
    gf512_t a;
    gf8_t   b00, b2, b0, g, b1, c00, c02, b3, t, e, d, di;
    gf512_t b;
    gf512_t y;
  } pom_fi_t;

  function automatic gf8_t gf8_mul(gf8_t a, gf8_t b);
    logic [4:0] p;
    p = '0;
    for (int i = 0; i < 3; i++)
      if (b[i]) p ^= 5'(a) << i;
    if (p[4]) p ^= 5'b10110;
    if (p[3]) p ^= 5'b01011;
    return p[2:0];
  endfunction

  function automatic gf8_t gf8_sq(gf8_t a);
    return gf8_mul(a, a);
  endfunction

  // Inverse in GF(2^3) as a^6 (0 maps to 0).
  function automatic gf8_t gf8_inv(gf8_t a);
    gf8_t a2, a4;
    a2 = gf8_sq(a);
    a4 = gf8_sq(a2);
    return gf8_mul(a2, a4);
  endfunction

  function automatic gf512_t lin_map(gf512_t x, gf512_t row [9]);
    gf512_t r;
    for (int i = 0; i < 9; i++) r[i] = ^(x & row[i]);
    return r;
  endfunction

  // ---- parity predictors ----
  function automatic logic par_gmul(gf8_t z);   return ^(z & 3'b011); endfunction
  function automatic logic par_sq(gf8_t z);     return ^(z & 3'b011); endfunction
  function automatic logic par_gsq(gf8_t z);    return ^(z & 3'b101); endfunction
  function automatic logic par_gcube(gf8_t z);  return GCUBE_PAR_TT[z]; endfunction
  function automatic logic par_inv(gf8_t z);    return INV_PAR_TT[z]; endfunction

  function automatic logic par_mul(gf8_t a, gf8_t b);
    return (a[0] & b[0]) ^ (a[0] & b[1]) ^ (a[0] & b[2]) ^
           (a[1] & b[0]) ^ (a[1] & b[1]) ^ (a[2] & b[0]);
  endfunction

endpackage
