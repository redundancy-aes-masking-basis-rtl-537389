// tb_ring_pow - x^(2^K) for K = 1, 2, 4 against repeated reference squaring.
module tb_ring_pow;
  import aes_ref_pkg::*;
  localparam int W = 16;
  localparam logic [31:0] Z = 32'(clmul64(32'h169, 32'h17b));
  logic [W-1:0] x, y1, y2, y4;
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  ring_pow #(.K(1)) dut1 (.x(x), .y(y1));
  ring_pow #(.K(2)) dut2 (.x(x), .y(y2));
  ring_pow #(.K(4)) dut4 (.x(x), .y(y4));
  function automatic logic [31:0] pw(logic [31:0] v, int k);
    for (int i = 0; i < k; i++) v = ring_mul_ref(v, v, Z);
    return v;
  endfunction
  initial begin
    for (int n = 0; n < 2000; n++) begin
      x = (n < 16) ? W'(1 << n) : W'($urandom);
      #1;
      checks += 3;
      if (32'(y1) !== pw(32'(x), 1)) begin failures++; $display("pow2  x=%h got %h", x, y1); end
      if (32'(y2) !== pw(32'(x), 2)) begin failures++; $display("pow4  x=%h got %h", x, y2); end
      if (32'(y4) !== pw(32'(x), 4)) begin failures++; $display("pow16 x=%h got %h", x, y4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
