// ring_pow - raising an element of R = GF(2)[x]/(P*Q) to the power 2^K.
//
// In a ring of characteristic 2 the Frobenius map x -> x^2 is linear, so
// x^(2^K) is a fixed bit matrix (column j = (x^j)^(2^K) mod Z), computed at
// elaboration and applied as an XOR network.  Used with K = 1, 2 and 4 for
// the Pow2, Pow4 and Pow16 steps of the protected Sbox.
//
// Interface: x, y are (8+D)-bit ring elements, y = x^(2^K) mod Z.
// Timing: combinational.
module ring_pow
  import rambam_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT,
  parameter logic [8:0]  P = P_DEFAULT,
  parameter elem_t       Q = Q_DEFAULT,
  parameter int unsigned K = 1
) (
  input  logic [8+D-1:0] x,
  output logic [8+D-1:0] y
);
  localparam int unsigned W = 8 + D;
  localparam elem_t   Z = clmul(elem_t'(P), Q);
  localparam matrix_t M = pow_matrix(K, Z, W);

  always_comb begin
    y = '0;
    for (int unsigned j = 0; j < W; j++)
      if (x[j]) y ^= M[j][W-1:0];
  end
endmodule
