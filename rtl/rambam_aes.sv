// rambam_aes - the two RAMBAM AES-128 encryption engines side by side.
//
// RAMBAM masks AES by computing it in a larger ring: every byte is one of
// 2^D random representations X + C*P of its value in
// R = GF(2)[x]/(P*Q), and every Sbox step is re-randomized.  Two
// architectures share the arithmetic blocks:
//   c_*  rambam_aes_compact  one protected Sbox, byte-serial, 233 cycles per
//                            block (217 in steady state)
//   f_*  rambam_aes_fast     16 protected Sboxes + 4 key Sboxes, one round
//                            per cycle
// They share only clock and reset and can be used independently; see each
// core for its handshake and timing.  FAST_CHAIN selects the Sbox addition
// chain of both (0: area-optimised, 23 random values per block; 1:
// frequency-optimised, 24).  RERAND = 0 builds both without Sbox
// re-randomization, as a leakage reference only.
module rambam_aes
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
  // compact core
  input  logic              c_in_valid,
  output logic              c_in_ready,
  input  logic [7:0]        c_din,
  input  logic [7:0]        c_kin,
  input  logic [NRND*D-1:0] c_rnd,
  output logic              c_out_valid,
  output logic [7:0]        c_dout,
  output logic              c_busy,
  // fast core
  input  logic              f_in_valid,
  output logic              f_in_ready,
  input  logic [127:0]      f_pt,
  input  logic [127:0]      f_key,
  input  logic [NRND*D-1:0] f_rnd,
  output logic              f_out_valid,
  output logic [127:0]      f_ct
);
  rambam_aes_compact #(.D(D), .P(P), .Q(Q), .FAST_CHAIN(FAST_CHAIN), .RERAND(RERAND)) u_compact (
    .clk, .rst_n,
    .in_valid(c_in_valid), .in_ready(c_in_ready), .din(c_din), .kin(c_kin), .rnd(c_rnd),
    .out_valid(c_out_valid), .dout(c_dout), .busy(c_busy));

  rambam_aes_fast #(.D(D), .P(P), .Q(Q), .FAST_CHAIN(FAST_CHAIN), .RERAND(RERAND)) u_fast (
    .clk, .rst_n,
    .in_valid(f_in_valid), .in_ready(f_in_ready), .pt(f_pt), .key(f_key), .rnd(f_rnd),
    .out_valid(f_out_valid), .ct(f_ct));
endmodule
