// redundant_decode - exit from the redundant representation.
//
// The random multiple of P is removed by reducing modulo P (H(x) = x mod P,
// a fixed linear map from 8+D bits to 8 bits), and the result is moved back
// from the P basis to the AES basis by L^-1.  Both maps are constant bit
// matrices built at elaboration; they are merged into one 8 x (8+D) matrix.
//
// Interface: x (8+D bits) -> b (8 bits).  Timing: combinational.
module redundant_decode
  import rambam_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT,
  parameter logic [8:0]  P = P_DEFAULT,
  parameter elem_t       Q = Q_DEFAULT
) (
  input  logic [8+D-1:0] x,
  output logic [7:0]     b
);
  localparam logic [7:0]  TROOT = root_in_aes(P);      // t, root of P in the AES field
  localparam matrix_t     LINV  = linv_matrix(TROOT);  // L^-1
  localparam matrix_t     LM    = inv8(LINV);          // L
  localparam int unsigned W = 8 + D;

  function automatic matrix_t dec_matrix();
    matrix_t m = '0;
    for (int unsigned j = 0; j < W; j++)
      m[j] = elem_t'(apply8(LINV, pmod(elem_t'(1) << j, P)));
    return m;
  endfunction
  localparam matrix_t M = dec_matrix();

  always_comb begin
    b = '0;
    for (int unsigned j = 0; j < W; j++)
      if (x[j]) b ^= M[j][7:0];
  end
endmodule
