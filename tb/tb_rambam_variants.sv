// tb_rambam_variants - both engines at every redundancy evaluated with
// re-randomization: (d, P, Q) = (3,1dd,d) (4,163,1f) (5,1a9,3b) (6,13f,43)
// (7,11b,89) (8,169,17b), and the default (8,169,17b) once more with the
// frequency-optimised Sbox chain (FAST_CHAIN = 1, 24 random values).
//
// For each variant the fast engine encrypts several random blocks with
// random masks and the compact engine two blocks; all ciphertexts are
// compared with the FIPS-197 reference, and the fast engine's 11-edge
// latency and the compact engine's 217-cycle input-to-output distance are
// checked.
module tb_rambam_variants;
  import aes_ref_pkg::*;
  localparam int NV = 7;
  localparam int          DV [NV] = '{3, 4, 5, 6, 7, 8, 8};
  localparam logic [8:0]  PV [NV] = '{9'h1dd, 9'h163, 9'h1a9, 9'h13f, 9'h11b, 9'h169, 9'h169};
  localparam logic [31:0] QV [NV] = '{32'hd, 32'h1f, 32'h3b, 32'h43, 32'h89, 32'h17b, 32'h17b};
  localparam bit          FV [NV] = '{0, 0, 0, 0, 0, 0, 1};
  localparam int NF = 6;
  localparam int NC = 2;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, done = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
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
    localparam int NR = 16 + (FV[v] ? 8 : 7);
    logic f_in_valid = 0, f_in_ready, f_out_valid;
    logic [127:0] f_pt = '0, f_key = '0, f_ct;
    logic [NR*D-1:0] f_rnd = '0, c_rnd = '0;
    logic c_in_valid = 0, c_in_ready, c_out_valid, c_busy;
    logic [7:0] c_din = 0, c_kin = 0, c_dout;

    rambam_aes_fast #(.D(D), .P(PV[v]), .Q(QV[v]), .FAST_CHAIN(FV[v])) u_fast (
      .clk, .rst_n, .in_valid(f_in_valid), .in_ready(f_in_ready), .pt(f_pt), .key(f_key),
      .rnd(f_rnd), .out_valid(f_out_valid), .ct(f_ct));
    rambam_aes_compact #(.D(D), .P(PV[v]), .Q(QV[v]), .FAST_CHAIN(FV[v])) u_compact (
      .clk, .rst_n, .in_valid(c_in_valid), .in_ready(c_in_ready), .din(c_din), .kin(c_kin),
      .rnd(c_rnd), .out_valid(c_out_valid), .dout(c_dout), .busy(c_busy));

    initial begin
      logic [127:0] e;
      int lat;
      @(posedge rst_n);
      for (int b = 0; b < NF; b++) begin
        @(negedge clk);
        f_key = {$urandom, $urandom, $urandom, $urandom};
        f_pt  = {$urandom, $urandom, $urandom, $urandom};
        for (int k = 0; k < NR; k++) f_rnd[k*D +: D] = D'($urandom);
        e = aes128_encrypt(f_key, f_pt);
        f_in_valid = 1;
        @(posedge clk);
        #1 f_in_valid = 0;
        lat = 0;
        do begin @(posedge clk); #1 lat++; end while (!f_out_valid && lat < 50);
        checks += 2;
        if (lat != 11) begin failures++; $display("d=%0d fast latency %0d", D, lat); end
        if (f_ct !== e) begin failures++; $display("d=%0d fast: got %h exp %h", D, f_ct, e); end
      end
      done++;
    end

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
            if (cyc - t0 != 217) begin failures++; $display("d=%0d compact: first byte after %0d", D, cyc - t0); end
          end
          checks++;
          if (c_dout !== e[127-8*i -: 8]) begin failures++; $display("d=%0d compact byte %0d wrong", D, i); end
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == 2*NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
