// protected_mixcolumn - AES MixColumns of one column in the redundant ring.
//
// The AES constants 2 and 3 become L(2) and L(3) in the P basis; as ring
// elements of degree < 8 they act on the redundant bytes by multiplication
// modulo Z = P*Q, which for a constant is a fixed bit matrix.  Because the
// map is linear in R, the random multiples of P stay multiples of P and the
// output is a valid redundant representation of the AES MixColumns result.
//   b_i = L(2)*a_i + L(3)*a_(i+1) + a_(i+2) + a_(i+3)
//
// Interface: a[0..3] (row 0..3 of the column) -> b[0..3], each 8+D bits.
// Timing: combinational.
module protected_mixcolumn
  import rambam_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT,
  parameter logic [8:0]  P = P_DEFAULT,
  parameter elem_t       Q = Q_DEFAULT
) (
  input  logic [3:0][8+D-1:0] a,
  output logic [3:0][8+D-1:0] b
);
  localparam logic [7:0]  TROOT = root_in_aes(P);      // t, root of P in the AES field
  localparam matrix_t     LINV  = linv_matrix(TROOT);  // L^-1
  localparam matrix_t     LM    = inv8(LINV);          // L
  localparam int unsigned W  = 8 + D;
  localparam elem_t       Z  = clmul(elem_t'(P), Q);
  localparam matrix_t     M2 = cmul_matrix(elem_t'(apply8(LM, 8'h02)), Z, W);
  localparam matrix_t     M3 = cmul_matrix(elem_t'(apply8(LM, 8'h03)), Z, W);

  logic [3:0][W-1:0] a2, a3;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a2[i] = '0;
      a3[i] = '0;
      for (int unsigned j = 0; j < W; j++)
        if (a[i][j]) begin
          a2[i] ^= M2[j][W-1:0];
          a3[i] ^= M3[j][W-1:0];
        end
    end
    for (int i = 0; i < 4; i++)
      b[i] = a2[i] ^ a3[(i+1)%4] ^ a[(i+2)%4] ^ a[(i+3)%4];
  end
endmodule
