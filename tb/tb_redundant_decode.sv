// tb_redundant_decode - reduction mod P and L^-1 against the reference.
//
// Random 16-bit inputs; the output must be L^-1(x mod P).  Also checks that
// every one of the 256 representations x + c*P of a value decodes alike.
module tb_redundant_decode;
  import aes_ref_pkg::*;
  logic [15:0] x;
  logic [7:0] b;
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  redundant_decode dut (.x(x), .b(b));
  initial begin
    for (int n = 0; n < 3000; n++) begin
      x = (n < 16) ? 16'(1 << n) : 16'($urandom);
      #1;
      checks++;
      if (b !== value_ref(32'(x), 9'h169)) begin failures++; $display("x=%h got %h exp %h", x, b, value_ref(32'(x), 9'h169)); end
    end
    for (int c = 0; c < 256; c++) begin
      x = 16'h0037 ^ 16'(clmul64(32'(c), 32'h169));
      #1;
      checks++;
      if (b !== linv_ref(8'h37, 9'h169)) begin failures++; $display("mask %h not removed", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
