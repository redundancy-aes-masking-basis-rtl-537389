// rambam_pkg - shared constants and elaboration-time functions of the RAMBAM
// (redundant-representation masked) AES-128 design.
//
// Every state byte is held as a (8+D)-bit element of the ring
// R = GF(2)[x]/(Z), Z = P*Q, where P is an irreducible degree-8 polynomial
// (the field GF(2^8) in a non-standard basis) and Q a degree-D polynomial.
// A byte value X has 2^D representations X + C*P, deg C < D; H(y) = y mod P
// gives the value back.  The main configuration, D=8, P=0x169, Q=0x17b, is
// the one the scheme was evaluated with; the change of basis L is fixed by
// choosing the smallest root t of P in the AES field (a design choice).
//
// All functions here run at elaboration only: they build the bit matrices of
// the fixed linear maps (squarings, constant multiplications, basis changes,
// affine map) that the modules apply as XOR networks.  Elements are passed as
// 32-bit vectors, so 8+D must not exceed 31.
package rambam_pkg;

  localparam int unsigned WMAX = 32;
  typedef logic [WMAX-1:0] elem_t;
  // A linear map on up to 32 bits: column j is the image of bit j.
  typedef logic [WMAX-1:0][WMAX-1:0] matrix_t;

  localparam logic [8:0]  P0_AES    = 9'h11b;  // AES field polynomial
  localparam logic [8:0]  P_DEFAULT = 9'h169;
  localparam elem_t       Q_DEFAULT = 32'h17b;
  localparam int unsigned D_DEFAULT = 8;
  localparam int unsigned NIN       = 16;      // random D-bit values masking the input

  // Random D-bit values used inside one Sbox: 7 for the area-optimised
  // addition chain, 8 for the frequency-optimised one.
  function automatic int unsigned nrerand(bit fast_chain);
    return fast_chain ? 8 : 7;
  endfunction

  // Carry-less product, truncated to 32 bits.
  function automatic elem_t clmul(elem_t a, elem_t b);
    elem_t r = '0;
    for (int i = 0; i < WMAX; i++)
      if (b[i]) r ^= (a << i);
    return r;
  endfunction

  // Multiplication in GF(2)[x]/(m) for an 8-bit field, m of degree 8.
  function automatic logic [7:0] gf8_mul(logic [7:0] a, logic [7:0] b, logic [8:0] m);
    logic [8:0] acc = '0;
    logic [8:0] aa  = {1'b0, a};
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= aa;
      aa = aa << 1;
      if (aa[8]) aa ^= m;
    end
    return acc[7:0];
  endfunction

  // Ring multiplication modulo z (degree w), schoolbook with modular doubling.
  function automatic elem_t ring_mul_f(elem_t a, elem_t b, elem_t z, int unsigned w);
    elem_t c   = '0;
    elem_t deg = b;
    for (int unsigned i = 0; i < w; i++) begin
      if (a[i]) c ^= deg;
      deg = deg << 1;
      if (deg[w]) deg ^= z;
    end
    return c;
  endfunction

  // Smallest root t of p in GF(2)[x]/(P0_AES).
  function automatic logic [7:0] root_in_aes(logic [8:0] p);
    for (int y = 1; y < 256; y++) begin
      logic [7:0] acc = '0;
      for (int i = 8; i >= 0; i--) acc = gf8_mul(acc, 8'(y), P0_AES) ^ {7'b0, p[i]};
      if (acc == 8'h00) return 8'(y);
    end
    return 8'h00;
  endfunction

  // L^-1 as an 8x8 matrix: column i is t^i in the AES field (P basis bit i
  // -> AES byte), t = root_in_aes(p).
  function automatic matrix_t linv_matrix(logic [7:0] t);
    matrix_t    m  = '0;
    logic [7:0] pw = 8'h01;
    for (int i = 0; i < 8; i++) begin
      m[i] = elem_t'(pw);
      pw   = gf8_mul(pw, t, P0_AES);
    end
    return m;
  endfunction

  // Inverse of an invertible 8x8 GF(2) matrix (Gauss-Jordan).  Rows of the
  // matrix and of the identity it is augmented with are kept as bytes of
  // 64-bit words.
  function automatic matrix_t inv8(matrix_t a);
    logic [63:0] row = '0;
    logic [63:0] aug = '0;
    logic [7:0]  tr, ta, v;
    matrix_t     m = '0;
    for (int r = 0; r < 8; r++) begin
      v = '0;
      for (int c = 0; c < 8; c++) v[c] = a[c][r];
      row[r*8 +: 8] = v;
      aug[r*8 +: 8] = 8'(1 << r);
    end
    for (int c = 0; c < 8; c++) begin
      int piv = c;
      for (int r = 7; r >= c; r--) if (row[r*8 + c]) piv = r;
      tr = row[c*8 +: 8]; row[c*8 +: 8] = row[piv*8 +: 8]; row[piv*8 +: 8] = tr;
      ta = aug[c*8 +: 8]; aug[c*8 +: 8] = aug[piv*8 +: 8]; aug[piv*8 +: 8] = ta;
      for (int r = 0; r < 8; r++)
        if (r != c && row[r*8 + c]) begin
          row[r*8 +: 8] = row[r*8 +: 8] ^ row[c*8 +: 8];
          aug[r*8 +: 8] = aug[r*8 +: 8] ^ aug[c*8 +: 8];
        end
    end
    for (int c = 0; c < 8; c++) begin
      v = '0;
      for (int r = 0; r < 8; r++) v[r] = aug[r*8 + c];
      m[c] = elem_t'(v);
    end
    return m;
  endfunction

  // Apply an 8x8 matrix to a byte.
  function automatic logic [7:0] apply8(matrix_t m, logic [7:0] x);
    logic [7:0] y = '0;
    for (int j = 0; j < 8; j++) if (x[j]) y ^= m[j][7:0];
    return y;
  endfunction

  // Linear part of the AES affine map (FIPS-197), AES basis.
  function automatic logic [7:0] aes_aff_lin(logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r;
  endfunction

  // Quotient and remainder of a (degree < 32) divided by the degree-8 p.
  function automatic elem_t pdiv(elem_t a, logic [8:0] p);
    elem_t q = '0;
    for (int i = WMAX-1; i >= 8; i--)
      if (a[i]) begin
        a ^= (elem_t'(p) << (i-8));
        q[i-8] = 1'b1;
      end
    return q;
  endfunction
  function automatic logic [7:0] pmod(elem_t a, logic [8:0] p);
    for (int i = WMAX-1; i >= 8; i--)
      if (a[i]) a ^= (elem_t'(p) << (i-8));
    return a[7:0];
  endfunction

  // ---- matrices of the fixed linear maps --------------------------------
  // y = x^(2^k) mod z
  function automatic matrix_t pow_matrix(int unsigned k, elem_t z, int unsigned w);
    matrix_t m = '0;
    for (int unsigned j = 0; j < w; j++) begin
      elem_t v = elem_t'(1) << j;
      for (int unsigned i = 0; i < k; i++) v = ring_mul_f(v, v, z, w);
      m[j] = v;
    end
    return m;
  endfunction

  // y = c * x mod z for a constant c
  function automatic matrix_t cmul_matrix(elem_t c, elem_t z, int unsigned w);
    matrix_t m = '0;
    for (int unsigned j = 0; j < w; j++) m[j] = ring_mul_f(elem_t'(1) << j, c, z, w);
    return m;
  endfunction

  // Linear part of RAff: x = h + c*P  ->  A_P(h) + c*P, A_P = L o A o L^-1
  function automatic matrix_t raff_matrix(logic [8:0] p, int unsigned w, matrix_t lm, matrix_t linv);
    matrix_t m = '0;
    for (int unsigned j = 0; j < w; j++) begin
      elem_t      v = elem_t'(1) << j;
      logic [7:0] h = pmod(v, p);
      elem_t      c = pdiv(v, p);
      m[j] = elem_t'(apply8(lm, aes_aff_lin(apply8(linv, h)))) ^ clmul(c, elem_t'(p));
    end
    return m;
  endfunction

  // y = x mod p (w input bits -> 8 bits)
  function automatic matrix_t modp_matrix(logic [8:0] p, int unsigned w);
    matrix_t m = '0;
    for (int unsigned j = 0; j < w; j++) m[j] = elem_t'(pmod(elem_t'(1) << j, p));
    return m;
  endfunction

  // Apply a linear map (hardware: an XOR network, the matrix is constant).
  function automatic elem_t apply_matrix(matrix_t m, elem_t x, int unsigned w);
    elem_t y = '0;
    for (int unsigned j = 0; j < w; j++)
      if (x[j]) y ^= m[j];
    return y;
  endfunction

  // Round constant rcon_r of the AES key schedule, r = 0..9, AES basis.
  function automatic logic [7:0] rcon_aes(int unsigned r);
    logic [7:0] v = 8'h01;
    for (int unsigned i = 0; i < r; i++) v = gf8_mul(v, 8'h02, P0_AES);
    return v;
  endfunction

endpackage
