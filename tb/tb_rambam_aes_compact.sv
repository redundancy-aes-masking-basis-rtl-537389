// tb_rambam_aes_compact - end-to-end test of the byte-serial core.
//
// Encrypts the FIPS-197 Appendix C.1 vector and a set of random blocks with
// random masks, streaming blocks back to back so that each new load overlaps
// the previous output.  Checks every ciphertext byte against aes_ref_pkg,
// the 217-cycle distance from first input byte to first output byte, the
// 233-cycle span to the last output byte, and that the random masks do not
// change the result.
module tb_rambam_aes_compact;
  import aes_ref_pkg::*;
  localparam int D = 8;
  localparam int NB = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, busy;
  logic [7:0] din = 0, kin = 0, dout;
  logic [23*D-1:0] rnd = '0;
  int checks = 0, failures = 0;

  rambam_aes_compact dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] keys [NB], pts [NB], exp_ct [NB];
  longint cyc = 0;
  longint t_in [NB];
  always @(posedge clk) cyc++;

  // driver: blocks back to back
  initial begin
    keys[0] = 128'h000102030405060708090a0b0c0d0e0f;
    pts[0]  = 128'h00112233445566778899aabbccddeeff;
    keys[1] = keys[0]; pts[1] = pts[0];   // same block, other masks
    for (int b = 2; b < NB; b++) begin
      keys[b] = {$urandom, $urandom, $urandom, $urandom};
      pts[b]  = {$urandom, $urandom, $urandom, $urandom};
    end
    for (int b = 0; b < NB; b++) exp_ct[b] = aes128_encrypt(keys[b], pts[b]);
    checks++;
    if (exp_ct[0] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("reference model wrong");
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1;
        din = pts[b][127-8*i -: 8];
        kin = keys[b][127-8*i -: 8];
        for (int k = 0; k < 23; k++) rnd[k*D +: D] = (b == 0) ? '0 : D'($urandom);
        if (i == 0) t_in[b] = cyc;
        @(posedge clk);
        #1 in_valid = 0;
        rnd = {23{8'hA5}};   // must be ignored after byte 0
      end
    end
  end

  // monitor
  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 16; i++) begin
        @(posedge clk);
        #1;
        while (!out_valid) begin @(posedge clk); #1; end
        if (i == 0) begin
          checks++;
          if (cyc - t_in[b] != 217) begin
            failures++; $display("block %0d: first output after %0d cycles, expected 217", b, cyc - t_in[b]);
          end
        end
        if (i == 15) begin
          checks++;
          if (cyc - t_in[b] + 1 != 233) begin
            failures++; $display("block %0d: block took %0d cycles, expected 233", b, cyc - t_in[b] + 1);
          end
        end
        checks++;
        if (dout !== exp_ct[b][127-8*i -: 8]) begin
          failures++;
          $display("block %0d byte %0d: got %02x expected %02x", b, i, dout, exp_ct[b][127-8*i -: 8]);
        end
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("extra output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
