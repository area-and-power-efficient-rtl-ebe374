// tb_product_combiner -- self-check of the sub-product adder at N = 8.
// Drives four 16-bit sub-products (corner values, then random ones, which
// need not come from real multiplications) and checks
// p = P1*2^16 + (P2 + P3)*2^8 + P4 modulo 2^32.
module tb_product_combiner;
  logic [15:0] p1, p2, p3, p4;
  logic [31:0] p;
  int checks = 0, failures = 0;

  product_combiner dut (.p1(p1), .p2(p2), .p3(p3), .p4(p4), .p(p));

  task automatic apply(input logic [15:0] v1, v2, v3, v4);
    logic [31:0] exp;
    p1 = v1; p2 = v2; p3 = v3; p4 = v4;
    #1;
    exp = (32'(v1) << 16) + (32'(v2) << 8) + (32'(v3) << 8) + 32'(v4);
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL p1=%h p2=%h p3=%h p4=%h -> %h, expected %h", v1, v2, v3, v4, p, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, '0, '0);
    apply(16'hfe01, 16'hfe01, 16'hfe01, 16'hfe01);   // 255*255 everywhere
    apply('1, '1, '1, '1);
    apply(16'h0000, 16'hffff, 16'hffff, 16'hffff);
    for (int n = 0; n < 20000; n++)
      apply(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
