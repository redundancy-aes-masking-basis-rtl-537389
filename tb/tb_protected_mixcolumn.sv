// tb_protected_mixcolumn - MixColumns on redundant bytes.
//
// Random masked columns; the decoded outputs must equal AES MixColumns of
// the decoded inputs, including the FIPS-197 column db 13 53 45 -> 8e 4d a1 bc.
module tb_protected_mixcolumn;
  import aes_ref_pkg::*;
  logic [3:0][15:0] a, b;
  logic [7:0] v [4];
  logic [7:0] e [4];
  int checks = 0, failures = 0;
  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  protected_mixcolumn dut (.a(a), .b(b));
  initial begin
    for (int n = 0; n < 2000; n++) begin
      if (n == 0) begin v[0] = 8'hdb; v[1] = 8'h13; v[2] = 8'h53; v[3] = 8'h45; end
      else for (int i = 0; i < 4; i++) v[i] = 8'($urandom);
      for (int i = 0; i < 4; i++)
        a[i] = 16'(l_ref(v[i], 9'h169)) ^ 16'(clmul64(32'($urandom % 256), 32'h169));
      for (int i = 0; i < 4; i++)
        e[i] = gmul(v[i], 8'h02, 9'h11b) ^ gmul(v[(i+1)%4], 8'h03, 9'h11b) ^ v[(i+2)%4] ^ v[(i+3)%4];
      if (n == 0) begin
        checks++;
        if ({e[0], e[1], e[2], e[3]} !== 32'h8e4da1bc) begin failures++; $display("reference wrong"); end
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (value_ref(32'(b[i]), 9'h169) !== e[i]) begin
          failures++; $display("n=%0d row %0d got %h exp %h", n, i, value_ref(32'(b[i]), 9'h169), e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
