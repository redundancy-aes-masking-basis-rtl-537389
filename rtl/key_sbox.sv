// key_sbox - unprotected AES Sbox for the round-key path, P basis.
//
// The fast core keeps its round key as plain bytes in the P basis and uses
// four of these per round (RotWord/SubWord).  Inversion is x^254 in
// GF(2)[x]/(P) with the same chain of squarings and four multiplications as
// the protected Sbox, without redundancy or re-randomization; then the AES
// affine map moved into the P basis.  This stands in for a compact
// tower-field Sbox: same function, simplest structure.
//
// Interface: x, y are bytes in the P basis, y = L(Sbox(L^-1(x))).
// Timing: combinational.
module key_sbox
  import rambam_pkg::*;
#(
  parameter logic [8:0] P = P_DEFAULT
) (
  input  logic [7:0] x,
  output logic [7:0] y
);
  localparam logic [7:0]  TROOT = root_in_aes(P);      // t, root of P in the AES field
  localparam matrix_t     LINV  = linv_matrix(TROOT);  // L^-1
  localparam matrix_t     LM    = inv8(LINV);          // L
  localparam matrix_t    AFF  = raff_matrix(P, 8, LM, LINV);
  localparam logic [7:0] AFFC = apply8(LM, 8'h63);

  function automatic logic [7:0] sq(logic [7:0] v);
    return gf8_mul(v, v, P);
  endfunction

  logic [7:0] t2, t3, t12, t14, t15, t240, t254;
  always_comb begin
    t2   = sq(x);
    t3   = gf8_mul(x, t2, P);
    t12  = sq(sq(t3));
    t14  = gf8_mul(t2, t12, P);
    t15  = gf8_mul(t3, t12, P);
    t240 = sq(sq(sq(sq(t15))));
    t254 = gf8_mul(t14, t240, P);
    y    = AFFC;
    for (int j = 0; j < 8; j++)
      if (t254[j]) y ^= AFF[j][7:0];
  end
endmodule
