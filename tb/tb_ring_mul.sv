// tb_ring_mul - ring multiplication against a long-division reference.
//
// Random and corner operands; c must equal (a*b) mod P*Q computed by
// carry-less product and polynomial long division.
module tb_ring_mul;
  import aes_ref_pkg::*;
  localparam int W = 16;
  localparam logic [31:0] Z = 32'(clmul64(32'h169, 32'h17b));
  logic [W-1:0] a, b, c;
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  ring_mul dut (.a(a), .b(b), .c(c));
  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = (n < 16) ? W'(1 << n) : W'($urandom);
      b = (n == 0) ? '1 : W'($urandom);
      #1;
      checks++;
      if (32'(c) !== ring_mul_ref(32'(a), 32'(b), Z)) begin
        failures++;
        if (failures < 5) $display("a=%h b=%h got %h exp %h", a, b, c, ring_mul_ref(32'(a), 32'(b), Z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
