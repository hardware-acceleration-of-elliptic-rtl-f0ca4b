// gf_inv: field inverter for GF(2^m) after Itoh and Tsujii.
//
// By Fermat, a^-1 = a^(2^m - 2) = (a^(2^(m-1) - 1))^2. Writing
// beta(e) = a^(2^e - 1), the exponent chain uses
//   beta(2e)  = beta(e)^(2^e) * beta(e)     ("double": e squarings, 1 mult)
//   beta(e+1) = beta(e)^2 * a               ("plus one": 1 squaring, 1 mult)
// and walks the bits of m-1 from the most significant one down: every bit
// doubles e, a set bit then adds one. For m = 163 (m-1 = 1010_0010b) the
// chain is 1,2,4,5,10,20,40,80,81,162: 9 multiplications and 162 squarings
// including the final one. The unit holds T0 = a, T1 = beta(e) and the
// squaring register T2 and owns one gf_mul and one gf_sqr. Squarings take
// one clock each with the squarer output fed back through T2; a finished
// product goes straight into the next squaring in the same cycle, so no
// cycle is spent moving it into a register first. The control sequence is
// derived at elaboration from M, so the unit works for any odd M.
//
// Latency for m = 163 and s = ceil(m/G) digits: 1 + 9*(s+2) + 152 cycles from
// the start cycle to the done cycle (225 for G = 32), of which 152 are
// squaring-only cycles. The inverse of 0 is returned as 0.
//
// Interface: pulse start while idle (busy low); a is captured on that edge.
// done is high for one cycle with c valid; c holds until the next start,
// which may be given in the done cycle.
// Reset is synchronous and active low.
module gf_inv #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned G = gf2m_pkg::GF_G,
  parameter int unsigned D = gf2m_pkg::GF_D,
  parameter logic [M-1:0] RPOLY = gf2m_pkg::GF_RPOLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  localparam int unsigned       TOP = $clog2(M) - 1;    // msb index of M-1
  localparam int unsigned       EW  = $clog2(M) + 1;    // width of e
  localparam int unsigned       BW  = $clog2(TOP + 1);
  localparam logic [TOP:0]      EXP = (TOP+1)'(M - 1);

  typedef enum logic [2:0] {
    S_IDLE, S_SQR, S_MUL, S_MWAIT, S_DONE
  } state_t;

  state_t        state_q;
  logic [M-1:0]  t0_q, t1_q, t2_q;
  logic [EW-1:0] e_q;          // t1 = a^(2^e - 1)
  logic [EW-1:0] sq_left_q;    // squarings still to do in S_SQR
  logic [BW-1:0] bit_q;        // bit of M-1 being processed
  logic          plus_q;       // current product is a "plus one" step

  logic [M-1:0]  sq_in, sq_out;
  logic          mul_start, mul_busy, mul_done;
  logic [M-1:0]  mul_c;
  logic [EW-1:0] e_next;

  gf_sqr #(.M(M), .D(D), .RPOLY(RPOLY)) u_sqr (.a(sq_in), .z(sq_out));

  gf_mul #(.M(M), .G(G), .D(D), .RPOLY(RPOLY)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mul_start),
    .a    (t2_q),
    .b    (plus_q ? t0_q : t1_q),
    .busy (mul_busy),
    .done (mul_done),
    .c    (mul_c)
  );

  // Squarer input: the operand at start, the fresh product when a
  // multiplication ends, else the previous square.
  always_comb begin
    unique case (state_q)
      S_IDLE, S_DONE: sq_in = a;
      S_MWAIT: sq_in = mul_c;
      default: sq_in = t2_q;
    endcase
  end

  assign mul_start = (state_q == S_MUL);
  assign e_next    = plus_q ? e_q + 1'b1 : {e_q[EW-2:0], 1'b0};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      t0_q      <= '0;
      t1_q      <= '0;
      t2_q      <= '0;
      e_q       <= '0;
      sq_left_q <= '0;
      bit_q     <= '0;
      plus_q    <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE, S_DONE: if (start) begin
          // beta(1) = a; first "double" step squares it once.
          t0_q   <= a;
          t1_q   <= a;
          t2_q   <= sq_out;
          e_q    <= EW'(1);
          bit_q  <= BW'(TOP - 1);
          plus_q <= 1'b0;
          state_q <= S_MUL;
        end else begin
          state_q <= S_IDLE;
        end
        S_SQR: begin
          t2_q      <= sq_out;
          sq_left_q <= sq_left_q - 1'b1;
          if (sq_left_q == EW'(1)) state_q <= S_MUL;
        end
        S_MUL: state_q <= S_MWAIT;
        S_MWAIT: if (mul_done) begin
          t1_q <= mul_c;
          e_q  <= e_next;
          if (!plus_q && EXP[bit_q]) begin
            // plus-one step on the same bit: one squaring, multiply by a
            plus_q  <= 1'b1;
            t2_q    <= sq_out;
            state_q <= S_MUL;
          end else if (bit_q == '0) begin
            // beta(m-1) reached: the final squaring gives a^(2^m - 2)
            t1_q    <= sq_out;
            state_q <= S_DONE;
          end else begin
            // doubling step for the next bit: e_next squarings, the first now
            bit_q     <= bit_q - 1'b1;
            plus_q    <= 1'b0;
            t2_q      <= sq_out;
            sq_left_q <= e_next - 1'b1;
            state_q   <= (e_next == EW'(1)) ? S_MUL : S_SQR;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done = (state_q == S_DONE);
  assign c    = t1_q;

  a_mul_free : assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> !mul_busy);
  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
