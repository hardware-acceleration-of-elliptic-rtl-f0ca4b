// gf_digit_mul: R(x) * W(x) mod F(x) for a G-bit digit R and a full-width W.
//
// This is the single-cycle core shared by the digit-serial multiplier and the
// squarer. It works in two parts:
//   * a chain of G-1 "shift and reduce" stages produces x^i W(x) mod F(x) for
//     i = 0..G-1; each stage shifts its input left by one bit and, when the
//     bit shifted out of position M-1 was set, adds the reduction tail r(x)
//     (this uses x^M = r(x) mod F(x));
//   * a G-operand XOR adder sums the terms whose digit bit r_i is one; a
//     term whose digit bit is zero contributes zeros.
// Both parts follow the structure of the digit multiplication scheme; the
// order in which the G operands are XORed is left to synthesis.
//
// Interface: r (G bits, the digit), w (M bits, reduced) -> p (M bits,
// reduced). Purely combinational.
module gf_digit_mul #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned G = gf2m_pkg::GF_G,
  parameter logic [M-1:0] RPOLY = gf2m_pkg::GF_RPOLY
) (
  input  logic [G-1:0] r,
  input  logic [M-1:0] w,
  output logic [M-1:0] p
);
  // xw[i] = x^i * w mod F
  logic [M-1:0] xw [G];

  assign xw[0] = w;
  for (genvar i = 1; i < G; i++) begin : g_chain
    assign xw[i] = {xw[i-1][M-2:0], 1'b0} ^ (xw[i-1][M-1] ? RPOLY : '0);
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < G; i++) begin
      if (r[i]) p ^= xw[i];
    end
  end
endmodule
