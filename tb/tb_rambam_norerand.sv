// tb_rambam_norerand - the compact engine built without Sbox
// re-randomization (RERAND = 0), at every polynomial pair of the leakage
// study without re-randomization: for d = 3..7 the worst and the best pair,
// for d = 8 the best pair (0x169, 0x17b).
//   worst: (3,1dd,d) (4,163,1f) (5,1dd,33) (6,1f9,45) (7,1f5,ff)
//   best:  (3,169,9) (4,163,17) (5,1a9,3b) (6,11b,47) (7,187,fb) (8,169,17b)
// The input bytes are still masked with random values.  Each variant
// encrypts two random blocks; the ciphertexts are compared with the
// FIPS-197 reference and the 217-cycle distance from the first input byte
// to the first output byte is checked.
module tb_rambam_norerand;
  import aes_ref_pkg::*;
  localparam int NV = 11;
  localparam int          DV [NV] = '{3, 4, 5, 6, 7, 3, 4, 5, 6, 7, 8};
  localparam logic [8:0]  PV [NV] = '{9'h1dd, 9'h163, 9'h1dd, 9'h1f9, 9'h1f5,
                                      9'h169, 9'h163, 9'h1a9, 9'h11b, 9'h187, 9'h169};
  localparam logic [31:0] QV [NV] = '{32'hd, 32'h1f, 32'h33, 32'h45, 32'hff,
                                      32'h9, 32'h17, 32'h3b, 32'h47, 32'hfb, 32'h17b};
  localparam int NC = 2;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, done = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  for (genvar v = 0; v < NV; v++) begin : g_var
    localparam int D = DV[v];
    localparam int NR = 16 + 7;
    logic [NR*D-1:0] c_rnd = '0;
    logic c_in_valid = 0, c_in_ready, c_out_valid, c_busy;
    logic [7:0] c_din = 0, c_kin = 0, c_dout;

    rambam_aes_compact #(.D(D), .P(PV[v]), .Q(QV[v]), .RERAND(1'b0)) u_compact (
      .clk, .rst_n, .in_valid(c_in_valid), .in_ready(c_in_ready), .din(c_din), .kin(c_kin),
      .rnd(c_rnd), .out_valid(c_out_valid), .dout(c_dout), .busy(c_busy));

    initial begin
      logic [127:0] k, p, e;
      longint t0;
      @(posedge rst_n);
      for (int b = 0; b < NC; b++) begin
        k = {$urandom, $urandom, $urandom, $urandom};
        p = {$urandom, $urandom, $urandom, $urandom};
        e = aes128_encrypt(k, p);
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          while (!c_in_ready) @(negedge clk);
          c_in_valid = 1;
          c_din = p[127-8*i -: 8];
          c_kin = k[127-8*i -: 8];
          if (i == 0) begin
            for (int j = 0; j < NR; j++) c_rnd[j*D +: D] = D'($urandom);
            t0 = cyc;
          end
          @(posedge clk);
          #1 c_in_valid = 0;
        end
        for (int i = 0; i < 16; i++) begin
          @(posedge clk); #1;
          while (!c_out_valid) begin @(posedge clk); #1; end
          if (i == 0) begin
            checks++;
            if (cyc - t0 != 217) begin failures++; $display("d=%0d P=%h: first byte after %0d", D, PV[v], cyc - t0); end
          end
          checks++;
          if (c_dout !== e[127-8*i -: 8]) begin failures++; $display("d=%0d P=%h byte %0d wrong", D, PV[v], i); end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
