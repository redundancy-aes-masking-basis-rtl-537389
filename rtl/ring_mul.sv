// ring_mul - multiplication in the redundant ring R = GF(2)[x]/(P*Q).
//
// Schoolbook multiply with modular doubling: the multiplicand is doubled
// (shifted left, Z = P*Q added when bit 8+D falls out) once per multiplier
// bit, and accumulated where the multiplier bit is 1.  This is the
// document's multiplication algorithm, fully unrolled into combinational
// logic (8+D partial products, one per cycle of use).  With the default
// Z = x^16 + x + 1 each doubling costs two XORs.
//
// Interface: a, b, c are (8+D)-bit ring elements; c = a*b mod Z.
// Timing: purely combinational.
module ring_mul
  import rambam_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT,
  parameter logic [8:0]  P = P_DEFAULT,
  parameter elem_t       Q = Q_DEFAULT
) (
  input  logic [8+D-1:0] a,
  input  logic [8+D-1:0] b,
  output logic [8+D-1:0] c
);
  localparam int unsigned W = 8 + D;
  localparam elem_t       Z = clmul(elem_t'(P), Q);
  localparam logic [W-1:0] ZLOW = Z[W-1:0];   // Z without its leading x^W

  logic [W-1:0] deg  [W];
  logic [W-1:0] part [W+1];

  always_comb begin
    deg[0]  = b;
    part[0] = '0;
    for (int unsigned i = 0; i < W; i++) begin
      part[i+1] = a[i] ? (part[i] ^ deg[i]) : part[i];
      if (i + 1 < W)
        deg[i+1] = {deg[i][W-2:0], 1'b0} ^ (deg[i][W-1] ? ZLOW : '0);
    end
    c = part[W];
  end
endmodule
