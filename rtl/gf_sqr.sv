// gf_sqr: single-cycle squarer in GF(2^m), m odd.
//
// Squaring a binary polynomial only spreads its bits apart: coefficient a_i
// moves to position 2i (a zero is inserted between neighbouring bits). The
// expanded polynomial E(x), of degree up to 2m-2, is split into
//   A_l(x) = E(x) mod x^(m+1)      (already reduced: for odd m bit m is 0)
//   A_h(x) = E(x) div x^(m+1)
// and A(x)^2 = A_l(x) + A_h(x) x^(m+1). Since x^(m+1) = x r(x) mod F(x), the
// high part is reduced by multiplying it with the constant digit x r(x),
// which has d+2 bits. That product reuses the digit multiplier core
// (gf_digit_mul) with G = d+2, so squaring finishes in one combinational
// pass. The split point m+1 and the constant digit x r(x) follow the
// squaring scheme; the method needs m odd and d+2 < m, which every NIST
// binary field satisfies, and both conditions are checked at elaboration.
//
// Interface: a (M bits) -> z = a^2 mod F (M bits). Purely combinational.
module gf_sqr #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned D = gf2m_pkg::GF_D,
  parameter logic [M-1:0] RPOLY = gf2m_pkg::GF_RPOLY
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] z
);
  localparam int unsigned GS = D + 2;

  if ((M % 2) == 0 || GS >= M) begin : g_bad_params
    $error("gf_sqr needs an odd field degree M and D+2 < M");
  end

  logic [2*M-2:0] e;        // a(x)^2 before reduction
  logic [M-1:0]   a_l;
  logic [M-1:0]   a_h;
  logic [GS-1:0]  xr;       // x * r(x)
  logic [M-1:0]   hi_red;

  always_comb begin
    e = '0;
    for (int i = 0; i < M; i++) e[2*i] = a[i];
  end

  assign a_l = e[M-1:0];
  assign a_h = M'(e[2*M-2:M+1]);
  assign xr  = {RPOLY[GS-2:0], 1'b0};

  gf_digit_mul #(.M(M), .G(GS), .RPOLY(RPOLY)) u_hi (
    .r(xr),
    .w(a_h),
    .p(hi_red)
  );

  assign z = a_l ^ hi_red;
endmodule
