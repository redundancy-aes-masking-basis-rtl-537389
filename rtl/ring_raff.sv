// ring_raff - the AES affine transformation lifted to the redundant ring.
//
// Any map RAff with (RAff(x) mod P) = Aff(x mod P) keeps the redundant
// representation valid.  This design writes x = h + c*P (h = x mod P,
// c = x div P) and returns A_P(h) + c*P + L(0x63): the random part c is
// carried through unchanged, the value part gets the AES affine map moved
// into the P basis (A_P = L o A o L^-1).  The choice of this particular map
// is this design's own; the whole map is one constant bit matrix plus a
// constant.
//
// Interface: x, y are (8+D)-bit ring elements.  Timing: combinational.
module ring_raff
  import rambam_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT,
  parameter logic [8:0]  P = P_DEFAULT,
  parameter elem_t       Q = Q_DEFAULT
) (
  input  logic [8+D-1:0] x,
  output logic [8+D-1:0] y
);
  localparam logic [7:0]  TROOT = root_in_aes(P);      // t, root of P in the AES field
  localparam matrix_t     LINV  = linv_matrix(TROOT);  // L^-1
  localparam matrix_t     LM    = inv8(LINV);          // L
  localparam int unsigned  W    = 8 + D;
  localparam matrix_t      M    = raff_matrix(P, W, LM, LINV);
  localparam logic [7:0]   AFFC = apply8(LM, 8'h63);

  always_comb begin
    y = {{D{1'b0}}, AFFC};
    for (int unsigned j = 0; j < W; j++)
      if (x[j]) y ^= M[j][W-1:0];
  end
endmodule
