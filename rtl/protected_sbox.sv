// protected_sbox - AES SubBytes on one byte in the redundant ring R.
//
// The field inversion is computed as x^254 with the minimum of four ring
// multiplications.  Two addition chains are available.  The default
// (FAST_CHAIN = 0) is the area-optimised one, with three powers:
//   t2   = x^2            + r0*P
//   t3   = x * t2         + r1*P
//   t12  = t3^4           + r2*P
//   t14  = t2 * t12       + r3*P     (in parallel with t15)
//   t15  = t3 * t12       + r4*P
//   t240 = t15^16         + r5*P
//   t254 = t14 * t240     + r6*P
// FAST_CHAIN = 1 selects the frequency-optimised chain, which needs one more
// power and one more random value but has a shorter path (the two middle
// multiplications run in parallel and feed the last one directly):
//   t2 = x^2 + r0*P,  t3 = x*t2 + r1*P,
//   t12 = t3^4 + r2*P,  t48 = t3^16 + r3*P,  t192 = t3^64 + r4*P,
//   t14 = t2*t12 + r5*P,  t240 = t48*t192 + r6*P,  t254 = t14*t240 + r7*P.
// Both end with y = RAff(t254).  Every intermediate is re-randomized by a
// fresh multiple of P, so that the operand pairs of each multiplier take
// 2^(2D) values instead of 2^D.  The chains and the re-randomization follow
// the RAMBAM scheme; the way RAff keeps the random part is this design's
// choice (see ring_raff).
//
// Interface: x, y are (8+D)-bit ring elements; r holds NR = 7 (or 8 with
// FAST_CHAIN) D-bit values, r0 in bits D-1:0.  y mod P = Sbox(x mod P) in
// the P basis.
// RERAND = 0 drops all addends, so that the Sbox only keeps the
// representation it was given; r is then ignored.  This is the reference
// configuration "without re-randomization" of the scheme's leakage study,
// not a protected setting.
// Timing: combinational; three multipliers deep with either chain.
module protected_sbox
  import rambam_pkg::*;
#(
  parameter int unsigned D          = D_DEFAULT,
  parameter logic [8:0]  P          = P_DEFAULT,
  parameter elem_t       Q          = Q_DEFAULT,
  parameter bit          FAST_CHAIN = 1'b0,
  parameter bit          RERAND     = 1'b1,   // 0: no addends (leakage reference)
  localparam int unsigned NR        = nrerand(FAST_CHAIN)
) (
  input  logic [8+D-1:0]  x,
  input  logic [NR*D-1:0] r,
  output logic [8+D-1:0]  y
);
  localparam int unsigned W = 8 + D;

  // Re-randomization addends r_k * P (carry-less, degree < 8+D).
  logic [W-1:0] rp [NR];
  always_comb
    for (int unsigned k = 0; k < NR; k++) begin
      rp[k] = '0;
      for (int unsigned j = 0; j < D; j++)
        if (RERAND && r[k*D + j]) rp[k] ^= (W'(P) << j);
    end

  logic [W-1:0] p2, m3, t2, t3, t254;

  ring_pow #(.D(D), .P(P), .Q(Q), .K(1)) u_pow2 (.x(x), .y(p2));
  assign t2 = p2 ^ rp[0];
  ring_mul #(.D(D), .P(P), .Q(Q))        u_mul3 (.a(x), .b(t2), .c(m3));
  assign t3 = m3 ^ rp[1];

  if (!FAST_CHAIN) begin : g_area
    logic [W-1:0] p12, m14, m15, p240, m254;
    logic [W-1:0] t12, t14, t15, t240;
    ring_pow #(.D(D), .P(P), .Q(Q), .K(2)) u_pow12 (.x(t3),  .y(p12));
    assign t12 = p12 ^ rp[2];
    ring_mul #(.D(D), .P(P), .Q(Q))        u_mul14 (.a(t2),  .b(t12), .c(m14));
    assign t14 = m14 ^ rp[3];
    ring_mul #(.D(D), .P(P), .Q(Q))        u_mul15 (.a(t3),  .b(t12), .c(m15));
    assign t15 = m15 ^ rp[4];
    ring_pow #(.D(D), .P(P), .Q(Q), .K(4)) u_pow240(.x(t15), .y(p240));
    assign t240 = p240 ^ rp[5];
    ring_mul #(.D(D), .P(P), .Q(Q))        u_mul254(.a(t14), .b(t240), .c(m254));
    assign t254 = m254 ^ rp[6];
  end else begin : g_fast
    logic [W-1:0] p12, p48, p192, m14, m240, m254;
    logic [W-1:0] t12, t48, t192, t14, t240;
    ring_pow #(.D(D), .P(P), .Q(Q), .K(2)) u_pow12 (.x(t3), .y(p12));
    ring_pow #(.D(D), .P(P), .Q(Q), .K(4)) u_pow48 (.x(t3), .y(p48));
    ring_pow #(.D(D), .P(P), .Q(Q), .K(6)) u_pow192(.x(t3), .y(p192));
    assign t12  = p12  ^ rp[2];
    assign t48  = p48  ^ rp[3];
    assign t192 = p192 ^ rp[4];
    ring_mul #(.D(D), .P(P), .Q(Q))        u_mul14 (.a(t2),  .b(t12),  .c(m14));
    ring_mul #(.D(D), .P(P), .Q(Q))        u_mul240(.a(t48), .b(t192), .c(m240));
    assign t14  = m14  ^ rp[5];
    assign t240 = m240 ^ rp[6];
    ring_mul #(.D(D), .P(P), .Q(Q))        u_mul254(.a(t14), .b(t240), .c(m254));
    assign t254 = m254 ^ rp[7];
  end

  ring_raff #(.D(D), .P(P), .Q(Q)) u_raff (.x(t254), .y(y));
endmodule
