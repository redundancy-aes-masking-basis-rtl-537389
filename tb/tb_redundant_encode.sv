// tb_redundant_encode - properties of the basis change L and the masking.
//
// Without knowing which root of P the design picked, L must be a field
// isomorphism: L(1) = 1, L(a)+L(b) = L(a+b), L(a*b mod P0) = L(a)*L(b)
// mod P, and L must be a bijection.  With a mask r the output minus L(b)
// must be exactly r*P.  Two instances are used to get L(a) and L(b) at once.
module tb_redundant_encode;
  import aes_ref_pkg::*;
  logic [7:0] a, bb;
  logic [7:0] r1, r2;
  logic [15:0] xa, xb, xab, xsum;
  logic [7:0] prod, sum;
  logic [7:0] la, lb;
  bit seen [256];
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  redundant_encode dut  (.b(a),    .r(r1),   .x(xa));
  redundant_encode dut2 (.b(bb),   .r(8'h0), .x(xb));
  redundant_encode dut3 (.b(prod), .r(8'h0), .x(xab));
  redundant_encode dut4 (.b(sum),  .r(8'h0), .x(xsum));
  assign prod = gmul(a, bb, 9'h11b);
  assign sum  = a ^ bb;
  initial begin
    // bijection and L(1) = 1, all with zero mask
    r1 = 0;
    for (int v = 0; v < 256; v++) begin
      a = 8'(v); bb = 8'h01; #1;
      checks++;
      if (xa[15:8] != 0) begin failures++; $display("L(%h) has redundant bits", a); end
      seen[xa[7:0]] = 1'b1;
      if (v == 1) begin checks++; if (xa !== 16'h0001) begin failures++; $display("L(1)=%h", xa); end end
    end
    for (int v = 0; v < 256; v++) begin checks++; if (!seen[v]) begin failures++; $display("L misses %h", v); end end
    for (int n = 0; n < 2000; n++) begin
      a = 8'($urandom); bb = 8'($urandom); r1 = 8'($urandom); #1;
      la = 8'(polymod({48'b0, xa}, 64'h169));
      lb = xb[7:0];
      checks += 3;
      if (xa !== (16'(la) ^ 16'(clmul64({24'b0, r1}, 32'h169))))
        begin failures++; $display("mask: b=%h r=%h x=%h", a, r1, xa); end
      if (xab[7:0] !== gmul(la, lb, 9'h169)) begin failures++; $display("L not multiplicative a=%h b=%h", a, bb); end
      if (xsum[7:0] !== (la ^ lb)) begin failures++; $display("L not additive a=%h b=%h", a, bb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
