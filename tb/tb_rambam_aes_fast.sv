// tb_rambam_aes_fast - end-to-end test of the one-round-per-cycle core.
//
// Encrypts the FIPS-197 C.1 vector (with zero and with random masks) and
// random blocks back to back, compares with aes_ref_pkg and checks that the
// ciphertext appears 11 clock edges after the accepting edge: 10 rounds of
// one cycle each plus the final AddRoundKey/de-randomization cycle.
module tb_rambam_aes_fast;
  import aes_ref_pkg::*;
  localparam int D = 8;
  localparam int NB = 12;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  logic [127:0] pt = '0, key = '0, ct;
  logic [23*D-1:0] rnd = '0;
  int checks = 0, failures = 0;

  rambam_aes_fast dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp_ct;
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      if (b < 2) begin
        key = 128'h000102030405060708090a0b0c0d0e0f;
        pt  = 128'h00112233445566778899aabbccddeeff;
      end else begin
        key = {$urandom, $urandom, $urandom, $urandom};
        pt  = {$urandom, $urandom, $urandom, $urandom};
      end
      for (int k = 0; k < 23; k++) rnd[k*D +: D] = (b == 0) ? '0 : D'($urandom);
      exp_ct = aes128_encrypt(key, pt);
      checks++;
      if (!in_ready) begin failures++; $display("block %0d: core not ready", b); end
      in_valid = 1;
      @(posedge clk);
      #1 in_valid = 0;
      pt = '1; key = '1; rnd = '1;   // inputs must be ignored while busy
      lat = 0;
      do begin
        @(posedge clk);
        #1 lat++;
      end while (!out_valid && lat < 100);
      #1;
      checks++;
      if (lat != 11) begin failures++; $display("block %0d: latency %0d, expected 11", b, lat); end
      checks++;
      if (ct !== exp_ct) begin
        failures++; $display("block %0d: got %032x expected %032x", b, ct, exp_ct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
