// rambam_aes_fast - RAMBAM AES-128 encryption, one full round per clock.
//
// Sixteen protected_sbox instances work on the whole redundant state at
// once; each clock performs AddRoundKey, ShiftRows, SubBytes and (rounds
// 0..8) MixColumns in the ring R.  The round key is kept as plain bytes in
// the P basis (no redundancy) and expanded by four unprotected key_sbox
// instances, one round key per clock.
//   cycle 0       in_valid accepted: pt bytes -> L(pt_i)+r_i*P, key -> L(key_i)
//   cycles 1..10  rounds 0..9
//   cycle 11      last AddRoundKey, reduction mod P, L^-1 -> ct, out_valid
// so out_valid rises 11 clock edges after the accepting edge and the core
// takes a new block on the next cycle.  One round per cycle and the split of
// 16 protected / 4 key Sboxes follow the document; the load and output
// cycles are this design's choice.
//
// Randomness: rnd = r[0..22] (r[0..23] with FAST_CHAIN), D bits each, r0 in
// the low bits, sampled with in_valid.  r[0..15] mask the input bytes.  Sbox
// i takes the Sbox values r[16..] rotated by i positions (the order a serial core would use them in), and the set
// rotates by one more position every round.
//
// Byte order: byte 0 of pt, key and ct is bits 127:120 (FIPS-197 order),
// state index = row + 4*column.  Reset synchronous, active low.
// RERAND = 0 removes the Sbox re-randomization (the rnd bits of the Sbox
// addends are then ignored); it exists as a leakage reference only.
module rambam_aes_fast
  import rambam_pkg::*;
#(
  parameter int unsigned D = D_DEFAULT,
  parameter logic [8:0]  P = P_DEFAULT,
  parameter elem_t       Q = Q_DEFAULT,
  parameter bit          FAST_CHAIN = 1'b0,   // 1: frequency-optimised Sbox chain
  parameter bit          RERAND     = 1'b1,   // 0: Sbox without re-randomization
  localparam int unsigned NRERAND = nrerand(FAST_CHAIN),
  localparam int unsigned NRND    = NIN + NRERAND
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [127:0]      pt,
  input  logic [127:0]      key,
  input  logic [NRND*D-1:0] rnd,
  output logic              out_valid,
  output logic [127:0]      ct
);
  localparam logic [7:0]  TROOT = root_in_aes(P);      // t, root of P in the AES field
  localparam matrix_t     LINV  = linv_matrix(TROOT);  // L^-1
  localparam matrix_t     LM    = inv8(LINV);          // L
  localparam int unsigned W = 8 + D;
  typedef logic [W-1:0] relem_t;
  typedef enum logic [1:0] {PH_IDLE, PH_ROUND, PH_FINAL} phase_t;

  phase_t       phase;
  logic [3:0]   rnd_idx;
  relem_t       st [16];
  logic [7:0]   ky [16];
  logic [D-1:0] rrot [NRERAND];

  // ---- input encoding ------------------------------------------------------
  relem_t     st_in [16];
  logic [7:0] ky_in [16];
  for (genvar i = 0; i < 16; i++) begin : g_enc
    redundant_encode #(.D(D), .P(P), .Q(Q)) u_enc
      (.b(pt[127-8*i -: 8]), .r(rnd[i*D +: D]), .x(st_in[i]));
    always_comb begin
      ky_in[i] = '0;
      for (int j = 0; j < 8; j++)
        if (key[127-8*i-7+j]) ky_in[i] ^= LM[j][7:0];
    end
  end

  // ---- one round: AddRoundKey, ShiftRows, SubBytes, MixColumns --------------
  relem_t ark [16];
  relem_t sb  [16];
  relem_t mc  [16];
  always_comb
    for (int i = 0; i < 16; i++) ark[i] = st[i] ^ relem_t'(ky[i]);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    localparam int R = i % 4;
    localparam int C = i / 4;
    logic [NRERAND*D-1:0] rr;
    always_comb
      for (int k = 0; k < NRERAND; k++) rr[k*D +: D] = rrot[(k + i) % NRERAND];
    protected_sbox #(.D(D), .P(P), .Q(Q), .FAST_CHAIN(FAST_CHAIN), .RERAND(RERAND)) u_sbox
      (.x(ark[R + 4*((C + R) % 4)]), .r(rr), .y(sb[i]));
  end

  for (genvar c = 0; c < 4; c++) begin : g_mc
    logic [3:0][W-1:0] ci, co;
    always_comb
      for (int r = 0; r < 4; r++) begin
        ci[r]       = sb[4*c + r];
        mc[4*c + r] = co[r];
      end
    protected_mixcolumn #(.D(D), .P(P), .Q(Q)) u_mc (.a(ci), .b(co));
  end

  // ---- key schedule (plain bytes, P basis) ----------------------------------
  logic [7:0] ksb [4];
  for (genvar k = 0; k < 4; k++) begin : g_ksbox
    key_sbox #(.P(P)) u_ksbox (.x(ky[12 + (k + 1) % 4]), .y(ksb[k]));
  end

  function automatic logic [7:0] lrcon(logic [3:0] r);
    logic [7:0] v = '0;
    logic [7:0] c = rcon_aes(int'(r));
    for (int j = 0; j < 8; j++) if (c[j]) v ^= LM[j][7:0];
    return v;
  endfunction

  logic [7:0] nk [16];
  always_comb begin
    for (int i = 0; i < 4; i++) nk[i] = ky[i] ^ ksb[i] ^ ((i == 0) ? lrcon(rnd_idx) : 8'h00);
    for (int i = 4; i < 16; i++) nk[i] = ky[i] ^ nk[i-4];
  end

  // ---- output decoding ---------------------------------------------------------
  logic [7:0] dec [16];
  for (genvar i = 0; i < 16; i++) begin : g_dec
    redundant_decode #(.D(D), .P(P), .Q(Q)) u_dec (.x(ark[i]), .b(dec[i]));
  end

  assign in_ready = (phase == PH_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      rnd_idx   <= '0;
      out_valid <= 1'b0;
      ct        <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (phase)
        PH_IDLE: if (in_valid) begin
          for (int i = 0; i < 16; i++) begin
            st[i] <= st_in[i];
            ky[i] <= ky_in[i];
          end
          for (int k = 0; k < NRERAND; k++) rrot[k] <= rnd[(16+k)*D +: D];
          rnd_idx <= '0;
          phase   <= PH_ROUND;
        end
        PH_ROUND: begin
          for (int i = 0; i < 16; i++) begin
            st[i] <= (rnd_idx == 4'd9) ? sb[i] : mc[i];
            ky[i] <= nk[i];
          end
          for (int k = 0; k < NRERAND; k++) rrot[k] <= rrot[(k+1) % NRERAND];
          if (rnd_idx == 4'd9) phase <= PH_FINAL;
          else                 rnd_idx <= rnd_idx + 4'd1;
        end
        PH_FINAL: begin
          for (int i = 0; i < 16; i++) ct[127-8*i -: 8] <= dec[i];
          out_valid <= 1'b1;
          phase     <= PH_IDLE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end
endmodule
