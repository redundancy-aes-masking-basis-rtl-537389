// aes_ref_pkg - reference models for the testbenches.
//
// Written independently of the RTL: polynomial arithmetic by carry-less
// product and long division, the AES Sbox by searching for the inverse, and
// a straightforward FIPS-197 AES-128 encryption on 128-bit vectors (byte 0
// in bits 127:120).
package aes_ref_pkg;

  function automatic logic [63:0] clmul64(logic [31:0] a, logic [31:0] b);
    logic [63:0] r = '0;
    for (int i = 0; i < 32; i++) if (b[i]) r ^= ({32'b0, a} << i);
    return r;
  endfunction

  function automatic int deg64(logic [63:0] a);
    for (int i = 63; i >= 0; i--) if (a[i]) return i;
    return -1;
  endfunction

  // remainder of a divided by m (m != 0)
  function automatic logic [63:0] polymod(logic [63:0] a, logic [63:0] m);
    int dm = deg64(m);
    while (deg64(a) >= dm) a ^= m << (deg64(a) - dm);
    return a;
  endfunction

  function automatic logic [31:0] ring_mul_ref(logic [31:0] a, logic [31:0] b, logic [31:0] z);
    return 32'(polymod(clmul64(a, b), {32'b0, z}));
  endfunction

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b, logic [8:0] m);
    return 8'(polymod(clmul64({24'b0, a}, {24'b0, b}), {55'b0, m}));
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] v, int n);
    return 8'((v << n) | (v >> (8 - n)));
  endfunction

  function automatic logic [7:0] aes_sbox(logic [7:0] b);
    logic [7:0] inv = '0;
    for (int y = 1; y < 256; y++) if (gmul(b, 8'(y), 9'h11b) == 8'h01) inv = 8'(y);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  // Basis change of the design: t is the smallest root of p in the AES
  // field, L^-1(y) = sum y_i t^i.  Recomputed here from that definition.
  function automatic logic [7:0] root_ref(logic [8:0] p);
    for (int y = 1; y < 256; y++) begin
      logic [7:0] acc = '0, pw = 8'h01;
      for (int i = 0; i < 9; i++) begin
        if (p[i]) acc ^= pw;
        pw = gmul(pw, 8'(y), 9'h11b);
      end
      if (acc == 0) return 8'(y);
    end
    return 0;
  endfunction

  function automatic logic [7:0] linv_ref(logic [7:0] y, logic [8:0] p);
    logic [7:0] t = root_ref(p), r = '0, pw = 8'h01;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) r ^= pw;
      pw = gmul(pw, t, 9'h11b);
    end
    return r;
  endfunction

  // value (AES basis) of a redundant element
  function automatic logic [7:0] value_ref(logic [31:0] x, logic [8:0] p);
    return linv_ref(8'(polymod({32'b0, x}, {55'b0, p})), p);
  endfunction

  function automatic logic [7:0] l_ref(logic [7:0] b, logic [8:0] p);
    for (int y = 0; y < 256; y++) if (linv_ref(8'(y), p) == b) return 8'(y);
    return 0;
  endfunction

  function automatic logic [7:0] aes_affine(logic [7:0] v);
    return v ^ rotl8(v, 1) ^ rotl8(v, 2) ^ rotl8(v, 3) ^ rotl8(v, 4) ^ 8'h63;
  endfunction

  typedef logic [7:0] state_t [16];

  function automatic logic [127:0] aes128_encrypt(logic [127:0] key, logic [127:0] pt);
    logic [7:0] sbt [256];
    state_t s, k, t;
    logic [7:0] rcon = 8'h01;
    logic [127:0] out;
    for (int i = 0; i < 256; i++) sbt[i] = aes_sbox(8'(i));
    for (int i = 0; i < 16; i++) begin
      s[i] = pt[127-8*i -: 8] ^ key[127-8*i -: 8];
      k[i] = key[127-8*i -: 8];
    end
    for (int rnd = 1; rnd <= 10; rnd++) begin
      // key expansion
      k[0] ^= sbt[k[13]] ^ rcon; k[1] ^= sbt[k[14]]; k[2] ^= sbt[k[15]]; k[3] ^= sbt[k[12]];
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rcon = gmul(rcon, 8'h02, 9'h11b);
      // SubBytes + ShiftRows
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) t[r + 4*c] = sbt[s[r + 4*((c + r) % 4)]];
      // MixColumns
      if (rnd != 10)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[r + 4*c] = gmul(t[r + 4*c], 8'h02, 9'h11b) ^ gmul(t[(r+1)%4 + 4*c], 8'h03, 9'h11b)
                       ^ t[(r+2)%4 + 4*c] ^ t[(r+3)%4 + 4*c];
      else s = t;
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    for (int i = 0; i < 16; i++) out[127-8*i -: 8] = s[i];
    return out;
  endfunction

endpackage
