// tb_key_sbox - the key-path Sbox is the AES Sbox in the P basis.
// All 256 inputs: L^-1(y) must be Sbox(L^-1(x)).
module tb_key_sbox;
  import aes_ref_pkg::*;
  logic [7:0] x, y;
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  key_sbox dut (.x(x), .y(y));
  initial begin
    for (int v = 0; v < 256; v++) begin
      x = 8'(v);
      #1;
      checks++;
      if (linv_ref(y, 9'h169) !== aes_sbox(linv_ref(x, 9'h169))) begin
        failures++; $display("x=%h y=%h", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
