// tb_protected_sbox - the protected Sbox computes the AES Sbox on values.
//
// Every one of the 256 byte values, each with several random input masks
// and random re-randomization values: value(y) must be Sbox(value(x)).
// Also checks that re-randomization reaches the output: the same input with
// different r must give different representations (counted, and must
// happen in nearly every trial).  The frequency-optimised chain
// (FAST_CHAIN = 1, eight random values) is checked the same way on the same
// inputs.  The reference build without re-randomization (RERAND = 0) must
// give the right value and ignore r entirely.
module tb_protected_sbox;
  import aes_ref_pkg::*;
  logic [15:0] x, y, y0, yf, yn, yn0;
  logic [55:0] r;
  logic [63:0] rf;
  int differ = 0;
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  protected_sbox dut (.x(x), .r(r), .y(y));
  protected_sbox #(.FAST_CHAIN(1'b1)) dut_fast (.x(x), .r(rf), .y(yf));
  protected_sbox #(.RERAND(1'b0)) dut_norr (.x(x), .r(r), .y(yn));
  initial begin
    logic [7:0] sb [256];
    for (int v = 0; v < 256; v++) sb[v] = aes_sbox(8'(v));
    for (int v = 0; v < 256; v++)
      for (int k = 0; k < 8; k++) begin
        x = 16'(l_ref(8'(v), 9'h169)) ^ 16'(clmul64(32'(k == 0 ? 0 : $urandom % 256), 32'h169));
        r = (k == 0) ? '0 : 56'({$urandom, $urandom});
        rf = (k == 0) ? '0 : {$urandom, $urandom};
        #1;
        checks++;
        if (value_ref(32'(yf), 9'h169) !== sb[v]) begin
          failures++;
          if (failures < 5) $display("fast chain v=%h x=%h: value %h exp %h", v, x, value_ref(32'(yf), 9'h169), sb[v]);
        end
        checks++;
        if (value_ref(32'(y), 9'h169) !== sb[v]) begin
          failures++;
          if (failures < 5) $display("v=%h x=%h r=%h: value %h exp %h", v, x, r, value_ref(32'(y), 9'h169), sb[v]);
        end
        checks++;
        if (value_ref(32'(yn), 9'h169) !== sb[v]) begin
          failures++;
          if (failures < 5) $display("no rerand v=%h x=%h: value %h exp %h", v, x, value_ref(32'(yn), 9'h169), sb[v]);
        end
        y0 = y;
        yn0 = yn;
        r = 56'({$urandom, $urandom});
        #1;
        if (y !== y0) differ++;
        checks++;
        if (yn !== yn0) begin
          failures++;
          if (failures < 5) $display("no rerand output depends on r: %h %h", yn, yn0);
        end
      end
    checks++;
    if (differ < 1900) begin failures++; $display("re-randomization visible only %0d times", differ); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
