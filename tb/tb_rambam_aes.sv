// tb_rambam_aes - end-to-end test of the top with all parameters at default.
//
// Runs both engines at the same time.  The compact engine gets blocks back
// to back, so each new load overlaps the previous output; the fast engine
// gets a block every 12 cycles.  Every ciphertext is compared with the
// FIPS-197 reference.  Mechanisms that must occur, and are counted:
//   overlap     compact input accepted while output is streaming
//   masked      blocks encrypted with non-zero random values
//   repr_diff   the same plaintext/key loaded with two different masks gives
//               a different redundant state in the compact engine
//   last_round  rounds without MixColumns (one per block)
//   fast_lat    fast-engine blocks with the 11-edge latency
module tb_rambam_aes;
  import aes_ref_pkg::*;
  localparam int D = 8;
  localparam int NC = 5;
  localparam int NF = 20;

  logic clk = 0, rst_n = 0;
  logic c_in_valid = 0, c_in_ready, c_out_valid, c_busy;
  logic [7:0] c_din = 0, c_kin = 0, c_dout;
  logic [23*D-1:0] c_rnd = '0, f_rnd = '0;
  logic f_in_valid = 0, f_in_ready, f_out_valid;
  logic [127:0] f_pt = '0, f_key = '0, f_ct;
  int checks = 0, failures = 0;
  int n_overlap = 0, n_masked = 0, n_repr_diff = 0, n_last_round = 0, n_fast_lat = 0;
  int c_done = 0, f_done = 0;

  rambam_aes dut (.*);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && c_in_valid && c_in_ready && c_out_valid) n_overlap++;
  always @(posedge clk)
    if (rst_n && dut.u_compact.phase == 2'd1 && dut.u_compact.cyc == 5'd16
        && dut.u_compact.rnd_idx == 4'd9) n_last_round++;

  // ---------------- compact engine ----------------
  logic [127:0] c_key [NC], c_pt [NC], c_exp [NC];
  logic [15:0]  c_state0 [16];
  initial begin
    c_key[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;   // FIPS-197 Appendix B
    c_pt[0]  = 128'h3243f6a8885a308d313198a2e0370734;
    c_key[1] = c_key[0]; c_pt[1] = c_pt[0];
    for (int b = 2; b < NC; b++) begin
      c_key[b] = {$urandom, $urandom, $urandom, $urandom};
      c_pt[b]  = {$urandom, $urandom, $urandom, $urandom};
    end
    for (int b = 0; b < NC; b++) c_exp[b] = aes128_encrypt(c_key[b], c_pt[b]);
    checks++;
    if (c_exp[0] !== 128'h3925841d02dc09fbdc118597196a0b32) begin failures++; $display("reference wrong"); end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NC; b++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        while (!c_in_ready) @(negedge clk);
        c_in_valid = 1;
        c_din = c_pt[b][127-8*i -: 8];
        c_kin = c_key[b][127-8*i -: 8];
        if (i == 0) begin
          for (int k = 0; k < 23; k++) c_rnd[k*D +: D] = D'($urandom);
          c_rnd[7:0] = 8'h5a;   // byte 0 always masked
          n_masked++;
        end
        @(posedge clk);
        #1 c_in_valid = 0;
      end
      // the redundant state right after the load
      if (b == 0) for (int i = 0; i < 16; i++) c_state0[i] = dut.u_compact.st[i];
      if (b == 1) begin
        int nd = 0;
        for (int i = 0; i < 16; i++) if (dut.u_compact.st[i] !== c_state0[i]) nd++;
        if (nd > 0) n_repr_diff++;
      end
    end
  end

  initial begin
    @(posedge rst_n);
    for (int b = 0; b < NC; b++)
      for (int i = 0; i < 16; i++) begin
        @(posedge clk); #1;
        while (!c_out_valid) begin @(posedge clk); #1; end
        checks++;
        if (c_dout !== c_exp[b][127-8*i -: 8]) begin
          failures++; $display("compact block %0d byte %0d: got %h exp %h", b, i, c_dout, c_exp[b][127-8*i -: 8]);
        end
        if (i == 15) c_done++;
      end
  end

  // ---------------- fast engine ----------------
  initial begin
    logic [127:0] e;
    int lat;
    @(posedge rst_n);
    for (int b = 0; b < NF; b++) begin
      @(negedge clk);
      f_key = (b == 0) ? 128'h2b7e151628aed2a6abf7158809cf4f3c : {$urandom, $urandom, $urandom, $urandom};
      f_pt  = (b == 0) ? 128'h3243f6a8885a308d313198a2e0370734 : {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 23; k++) f_rnd[k*D +: D] = D'($urandom);
      n_masked++;
      e = aes128_encrypt(f_key, f_pt);
      f_in_valid = 1;
      @(posedge clk);
      #1 f_in_valid = 0;
      lat = 0;
      do begin @(posedge clk); #1 lat++; end while (!f_out_valid && lat < 50);
      if (lat == 11) n_fast_lat++;
      checks++;
      if (f_ct !== e) begin failures++; $display("fast block %0d: got %h exp %h", b, f_ct, e); end
      f_done++;
    end
  end

  initial begin
    wait (c_done == NC && f_done == NF);
    repeat (2) @(posedge clk);
    checks += 6;
    if (n_overlap == 0)          begin failures++; $display("no overlapped load/output"); end
    if (n_masked == 0)           begin failures++; $display("no masked block"); end
    if (n_repr_diff == 0)        begin failures++; $display("masks did not change the representation"); end
    if (n_last_round != NC)      begin failures++; $display("last rounds: %0d", n_last_round); end
    if (n_fast_lat != NF)        begin failures++; $display("fast latency off in %0d blocks", NF - n_fast_lat); end
    if (c_done != NC)            begin failures++; end
    $display("mechanisms: overlap=%0d masked=%0d repr_diff=%0d last_round=%0d fast_lat=%0d",
             n_overlap, n_masked, n_repr_diff, n_last_round, n_fast_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
