// gf2m_pkg: constants shared by the GF(2^m) arithmetic units and the
// elliptic-curve point multiplier.
//
// Field elements are polynomials over GF(2) in polynomial basis, stored as
// bit vectors with bit i holding the coefficient of x^i. The field is
// GF(2^163) reduced by the NIST trinomial-free pentanomial
//   F(x) = x^163 + x^7 + x^6 + x^3 + 1,
// so the "reduction tail" r(x) = F(x) - x^163 is 8'b1100_1001 and its degree
// d is 7. The curve constants are those of the NIST random curve B-163,
// y^2 + xy = x^3 + a x^2 + b with a = 1. All of these numbers follow the
// published B-163 parameters; the default digit size G = 32 is the
// configuration with the lowest point-multiplication latency.
package gf2m_pkg;

  // Field degree m and reduction tail r(x) (F(x) = x^m + r(x)).
  localparam int unsigned GF_M = 163;
  localparam int unsigned GF_D = 7;             // degree of r(x)
  localparam logic [GF_M-1:0] GF_RPOLY = GF_M'('hC9);

  // Digit size of the digit-serial multiplier.
  localparam int unsigned GF_G = 32;

  // B-163 curve coefficient b and base point G = (gx, gy); a = 1 is not used
  // by the x-only Montgomery ladder.
  localparam logic [GF_M-1:0] B163_B  = 163'h2_0A601907_B8C953CA_1481EB10_512F7874_4A3205FD;
  localparam logic [GF_M-1:0] B163_GX = 163'h3_F0EBA162_86A2D57E_A0991168_D4994637_E8343E36;
  localparam logic [GF_M-1:0] B163_GY = 163'h0_D51FBC6C_71A0094F_A2CDD545_B11C5C0C_797324F1;
  // Prime order n of the base point.
  localparam logic [GF_M-1:0] B163_N  = 163'h4_00000000_00000000_000292FE_77E70C12_A4234C33;

  // Number of digits of a G-bit digit-serial multiplication.
  function automatic int unsigned num_digits(int unsigned m, int unsigned g);
    return (m + g - 1) / g;
  endfunction

endpackage
