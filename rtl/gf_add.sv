// gf_add: addition (and subtraction) in GF(2^m).
//
// In a field of characteristic two the sum of two polynomials is the
// coefficient-wise sum modulo 2, so the adder is one row of M XOR gates with
// no carry chain. It is purely combinational; the result is ready in the same
// cycle as its operands. Adding and subtracting are the same operation.
//
// Interface: a, b (M bits each) -> c = a + b.
module gf_add #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  assign c = a ^ b;
endmodule
