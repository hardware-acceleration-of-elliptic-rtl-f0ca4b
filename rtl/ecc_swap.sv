// ecc_swap: conditional exchange of the two ladder points.
//
// The Montgomery ladder keeps two projective points (X1:Z1) and (X2:Z2).
// Rather than steering operands differently for a 0 and a 1 key bit, the
// datapath always computes (X2:Z2) <- Madd, (X1:Z1) <- Mdouble(X1:Z1) and
// swaps the two points whenever the key bit changes between iterations
// (and after the last iteration when the last bit is one). When sw is high
// the outputs are the inputs with points 1 and 2 exchanged; otherwise they
// pass unchanged. Purely combinational: a 2:1 multiplexer per bit.
//
// Interface: x1, z1, x2, z2, sw -> x1_o, z1_o, x2_o, z2_o.
module ecc_swap #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic         sw,
  input  logic [M-1:0] x1,
  input  logic [M-1:0] z1,
  input  logic [M-1:0] x2,
  input  logic [M-1:0] z2,
  output logic [M-1:0] x1_o,
  output logic [M-1:0] z1_o,
  output logic [M-1:0] x2_o,
  output logic [M-1:0] z2_o
);
  assign x1_o = sw ? x2 : x1;
  assign z1_o = sw ? z2 : z1;
  assign x2_o = sw ? x1 : x2;
  assign z2_o = sw ? z1 : z2;
endmodule
