// gf_mul: digit-serial multiplier in GF(2^m), G bits of the multiplier per
// clock.
//
// The multiplier b is cut into s = ceil(M/G) digits B_{s-1} .. B_0 (the top
// digit holds the M mod G leftover bits). The accumulator C is processed
// most significant digit first, and each clock computes
//   C <- V1 + V2 + V3
//   V1 = (low M-G bits of C) * x^G            plain shift, no reduction
//   V2 = (high G bits of C) * x^M mod F       = high bits times r(x); since
//                                               d + G < M no reduction needed
//   V3 = B_t(x) * A(x) mod F                  gf_digit_mul, one clock
// With C cleared before the first digit, the first clock yields
// B_{s-1} A mod F and after s clocks C = A B mod F. This is the modified
// digit-level algorithm; the register layout and the handshake are this
// design's own.
//
// Interface and timing: pulse start for one cycle while the unit is idle
// (busy low); a and b are captured on that clock edge and may change
// afterwards. busy is high for the s compute cycles; done is high for exactly
// one cycle, s+1 cycles after the start cycle, and c holds the product from
// then until the next start. A new start may be given in the done cycle,
// which lets a caller feed c straight back as an operand. Reset is
// synchronous and active low.
module gf_mul #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned G = gf2m_pkg::GF_G,
  parameter int unsigned D = gf2m_pkg::GF_D,
  parameter logic [M-1:0] RPOLY = gf2m_pkg::GF_RPOLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  localparam int unsigned S  = gf2m_pkg::num_digits(M, G);
  localparam int unsigned CW = (S > 1) ? $clog2(S) : 1;

  if (D + G >= M) begin : g_bad_params
    $error("gf_mul needs D + G < M so that V2 needs no reduction");
  end

  logic [M-1:0]   a_q;
  logic [S*G-1:0] b_q;        // multiplier, zero-padded to whole digits
  logic [M-1:0]   c_q;
  logic [CW-1:0]  digit_q;    // index t of the digit used next
  logic [G-1:0]   bt;
  logic [M-1:0]   v1, v2, v3;
  logic [G-1:0]   c_hi;

  assign bt   = b_q[digit_q*G +: G];
  assign c_hi = c_q[M-1 -: G];
  assign v1   = {c_q[M-G-1:0], G'(0)};

  always_comb begin
    v2 = '0;
    for (int j = 0; j <= int'(D); j++) begin
      if (RPOLY[j]) v2 ^= M'(c_hi) << j;
    end
  end

  gf_digit_mul #(.M(M), .G(G), .RPOLY(RPOLY)) u_v3 (
    .r(bt),
    .w(a_q),
    .p(v3)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      a_q     <= '0;
      b_q     <= '0;
      c_q     <= '0;
      digit_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q     <= a;
        b_q     <= (S*G)'(b);
        c_q     <= '0;
        digit_q <= CW'(S - 1);
        busy    <= 1'b1;
      end else if (busy) begin
        c_q <= v1 ^ v2 ^ v3;
        if (digit_q == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          digit_q <= digit_q - 1'b1;
        end
      end
    end
  end

  assign c = c_q;

  // A start while busy would be ignored; callers must not issue one.
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
