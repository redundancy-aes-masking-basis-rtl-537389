// tb_ring_raff - RAff keeps values consistent with the AES affine map.
//
// For random redundant x: value(y) must be Aff(value(x)), and the random
// part (x div P) must be carried through unchanged.
module tb_ring_raff;
  import aes_ref_pkg::*;
  logic [15:0] x, y;
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  ring_raff dut (.x(x), .y(y));
  function automatic logic [31:0] divp(logic [31:0] v);
    // quotient of v by P via v - (v mod P) divided exactly
    logic [63:0] rem = polymod({32'b0, v}, 64'h169);
    logic [63:0] num = {32'b0, v} ^ rem;
    logic [31:0] q = '0;
    for (int i = 31; i >= 0; i--)
      if (i + 8 < 64 && num[i+8]) begin num ^= (64'h169 << i); q[i] = 1'b1; end
    return q;
  endfunction
  initial begin
    for (int n = 0; n < 3000; n++) begin
      x = (n < 16) ? 16'(1 << n) : 16'($urandom);
      #1;
      checks += 2;
      if (value_ref(32'(y), 9'h169) !== aes_affine(value_ref(32'(x), 9'h169))) begin
        failures++; $display("x=%h y=%h wrong value", x, y);
      end
      if (divp(32'(y)) !== divp(32'(x))) begin failures++; $display("x=%h y=%h mask changed", x, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
