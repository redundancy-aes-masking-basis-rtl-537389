// rambam_aes_compact - byte-serial RAMBAM AES-128 encryption, one protected Sbox.
//
// The 16 state bytes and 16 key bytes live in the redundant ring R (8+D bits
// each).  A single combinational protected_sbox is shared by the state and
// the key schedule.  Per block:
//   load    16 cycles  byte i enters as L(din)+r_i*P, key byte as L(kin)
//   round   20 cycles  x 10: cycles 0..15 AddRoundKey+SubBytes on one byte
//                      per cycle (state and key rotate as shift rings);
//                      cycle 16 ShiftRows and (rounds 0..8) MixColumns on the
//                      whole state at once; cycles 16..19 the four key
//                      Sboxes of the next round key, which is formed in
//                      cycle 19
//   final    1 cycle   last AddRoundKey, reduction mod P, L^-1 into the
//                      output buffer
//   output  16 cycles  one ciphertext byte per cycle
// The output buffer is separate, so the next block can be loaded while the
// previous one is read out: 217 cycles per block in steady state, 233 from
// first input byte to last output byte.  These cycle counts are the
// document's; how the 20 round cycles are used is this design's reading.
//
// Randomness: rnd carries r[0..22] (D bits each, r0 in the low bits; r[0..23]
// with FAST_CHAIN) and is sampled with input byte 0.  r[0..15] mask the input
// bytes; the rest feed the Sbox re-randomization and rotate by one position every round cycle,
// so the same addend is never used by the same gates on consecutive cycles.
// The same values are reused for the whole block.
//
// Interface: valid/ready byte input (din, kin, byte 0 = first AES byte),
// out_valid/dout without back-pressure.  Reset synchronous, active low.
// RERAND = 0 removes the Sbox re-randomization (the rnd bits of the Sbox
// addends are then ignored); it exists as a leakage reference only.
module rambam_aes_compact
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
  input  logic [7:0]        din,
  input  logic [7:0]        kin,
  input  logic [NRND*D-1:0] rnd,
  output logic              out_valid,
  output logic [7:0]        dout,
  output logic              busy
);
  localparam logic [7:0]  TROOT = root_in_aes(P);      // t, root of P in the AES field
  localparam matrix_t     LINV  = linv_matrix(TROOT);  // L^-1
  localparam matrix_t     LM    = inv8(LINV);          // L
  localparam int unsigned W = 8 + D;
  localparam int unsigned ROUND_CYCLES = 20;

  typedef logic [W-1:0] relem_t;
  typedef enum logic [1:0] {PH_LOAD, PH_ROUND, PH_FINAL} phase_t;

  phase_t       phase;
  logic [3:0]   cnt;        // load byte index
  logic [3:0]   rnd_idx;    // round 0..9
  logic [4:0]   cyc;        // cycle within round
  relem_t       st  [16];
  relem_t       ky  [16];
  relem_t       ktmp[3];
  logic [D-1:0] rin [16];   // r[1..15] kept for the rest of the load
  logic [D-1:0] rrot[NRERAND];
  logic [7:0]   obuf[16];
  logic [3:0]   ocnt;
  logic         oact;

  wire accept = in_valid && in_ready;

  // ---- input encoding --------------------------------------------------
  logic [D-1:0] rmask;
  relem_t       din_r, kin_r;
  assign rmask = (cnt == 4'd0) ? rnd[D-1:0] : rin[cnt];
  redundant_encode #(.D(D), .P(P), .Q(Q)) u_enc_d (.b(din), .r(rmask),   .x(din_r));
  redundant_encode #(.D(D), .P(P), .Q(Q)) u_enc_k (.b(kin), .r('0),      .x(kin_r));

  // ---- the shared protected Sbox ------------------------------------------
  relem_t                 sb_in, sb_out;
  logic [NRERAND*D-1:0]   sb_r;
  always_comb begin
    for (int k = 0; k < NRERAND; k++) sb_r[k*D +: D] = rrot[k];
    unique case (cyc)
      5'd16:   sb_in = ky[13];
      5'd17:   sb_in = ky[14];
      5'd18:   sb_in = ky[15];
      5'd19:   sb_in = ky[12];
      default: sb_in = st[0] ^ ky[0];
    endcase
  end
  protected_sbox #(.D(D), .P(P), .Q(Q), .FAST_CHAIN(FAST_CHAIN), .RERAND(RERAND)) u_sbox (.x(sb_in), .r(sb_r), .y(sb_out));

  // ---- ShiftRows + MixColumns on the whole state ------------------------
  relem_t sr [16];
  relem_t mc [16];
  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        sr[r + 4*c] = st[r + 4*((c + r) % 4)];
  for (genvar c = 0; c < 4; c++) begin : g_mc
    logic [3:0][W-1:0] ci, co;
    always_comb
      for (int r = 0; r < 4; r++) begin
        ci[r]       = sr[4*c + r];
        mc[4*c + r] = co[r];
      end
    protected_mixcolumn #(.D(D), .P(P), .Q(Q)) u_mc (.a(ci), .b(co));
  end

  // ---- next round key -----------------------------------------------------
  function automatic relem_t lrcon(logic [3:0] r);
    logic [7:0] v = '0;
    logic [7:0] c = rcon_aes(int'(r));
    for (int j = 0; j < 8; j++) if (c[j]) v ^= LM[j][7:0];
    return relem_t'(v);
  endfunction

  relem_t nk [16];
  always_comb begin
    relem_t sw [4];
    sw[0] = ktmp[0] ^ lrcon(rnd_idx);
    sw[1] = ktmp[1];
    sw[2] = ktmp[2];
    sw[3] = sb_out;
    for (int i = 0; i < 4; i++) nk[i] = ky[i] ^ sw[i];
    for (int i = 4; i < 16; i++) nk[i] = ky[i] ^ nk[i-4];
  end

  // ---- output decoding --------------------------------------------------------
  logic [7:0] dec [16];
  for (genvar i = 0; i < 16; i++) begin : g_dec
    redundant_decode #(.D(D), .P(P), .Q(Q)) u_dec (.x(st[i] ^ ky[i]), .b(dec[i]));
  end

  // ---- control and registers -------------------------------------------------
  assign in_ready  = (phase == PH_LOAD);
  assign busy      = (phase != PH_LOAD) || (cnt != 4'd0);
  assign out_valid = oact;
  assign dout      = obuf[ocnt];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= PH_LOAD;
      cnt     <= '0;
      rnd_idx <= '0;
      cyc     <= '0;
      ocnt    <= '0;
      oact    <= 1'b0;
    end else begin
      // output stream, independent of the next block's load
      if (oact) begin
        ocnt <= ocnt + 4'd1;
        if (ocnt == 4'd15) oact <= 1'b0;
      end

      unique case (phase)
        PH_LOAD: if (accept) begin
          if (cnt == 4'd0) begin
            for (int i = 0; i < 16; i++) rin[i] <= rnd[i*D +: D];
            for (int k = 0; k < NRERAND; k++) rrot[k] <= rnd[(16+k)*D +: D];
          end
          for (int i = 0; i < 15; i++) begin
            st[i] <= st[i+1];
            ky[i] <= ky[i+1];
          end
          st[15] <= din_r;
          ky[15] <= kin_r;
          cnt    <= cnt + 4'd1;
          if (cnt == 4'd15) begin
            phase   <= PH_ROUND;
            rnd_idx <= '0;
            cyc     <= '0;
          end
        end

        PH_ROUND: begin
          for (int k = 0; k < NRERAND; k++) rrot[k] <= rrot[(k+1) % NRERAND];
          if (cyc < 5'd16) begin
            for (int i = 0; i < 15; i++) begin
              st[i] <= st[i+1];
              ky[i] <= ky[i+1];
            end
            st[15] <= sb_out;
            ky[15] <= ky[0];
          end else begin
            if (cyc == 5'd16)
              for (int i = 0; i < 16; i++) st[i] <= (rnd_idx == 4'd9) ? sr[i] : mc[i];
            if (cyc < 5'd19) ktmp[2'(cyc - 5'd16)] <= sb_out;
          end
          if (cyc == 5'(ROUND_CYCLES - 1)) begin
            for (int i = 0; i < 16; i++) ky[i] <= nk[i];
            cyc <= '0;
            if (rnd_idx == 4'd9) phase <= PH_FINAL;
            else                 rnd_idx <= rnd_idx + 4'd1;
          end else begin
            cyc <= cyc + 5'd1;
          end
        end

        PH_FINAL: begin
          for (int i = 0; i < 16; i++) obuf[i] <= dec[i];
          oact    <= 1'b1;
          ocnt    <= '0;
          phase   <= PH_LOAD;
          cnt     <= '0;
          rnd_idx <= '0;
        end

        default: phase <= PH_LOAD;
      endcase
    end
  end

  // A new block must not finish before the previous one has been read out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (phase == PH_FINAL) |-> !oact || ocnt == 4'd15)
    else $error("output buffer overwritten while streaming");
endmodule
