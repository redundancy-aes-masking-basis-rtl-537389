// redundant_encode - entry into the redundant representation.
//
// A standard AES byte b is moved to the P basis by the fixed linear map L
// and randomized by adding r*P, a random multiple of P (deg r < D):
// x = L(b) + r*P.  x mod P = L(b) for every r, so each byte has 2^D
// representations.  L is an 8x8 bit matrix computed at elaboration; r*P is
// a carry-less product of degree < 8+D, so no reduction is needed.
//
// Interface: b (8 bits), r (D bits) -> x (8+D bits).  Timing: combinational.
module redundant_encode
  import rambam_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT,
  parameter logic [8:0]  P = P_DEFAULT,
  parameter elem_t       Q = Q_DEFAULT
) (
  input  logic [7:0]     b,
  input  logic [D-1:0]   r,
  output logic [8+D-1:0] x
);
  localparam logic [7:0]  TROOT = root_in_aes(P);      // t, root of P in the AES field
  localparam matrix_t     LINV  = linv_matrix(TROOT);  // L^-1
  localparam matrix_t     LM    = inv8(LINV);          // L
  localparam int unsigned W = 8 + D;

  logic [W-1:0] lb, rp;
  always_comb begin
    lb = '0;
    for (int j = 0; j < 8; j++)
      if (b[j]) lb ^= LM[j][W-1:0];
    rp = '0;
    for (int unsigned j = 0; j < D; j++)
      if (r[j]) rp ^= (W'(P) << j);
    x = lb ^ rp;
  end
endmodule
