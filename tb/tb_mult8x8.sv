// tb_mult8x8 -- exhaustive self-check of the 8x8 counter-based multiplier.
// All 65536 operand pairs; p must equal a * b.
module tb_mult8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  mult8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int va = 0; va < 256; va++) begin
      for (int vb = 0; vb < 256; vb++) begin
        a = 8'(va);
        b = 8'(vb);
        #1;
        checks++;
        if (p != 16'(va * vb)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", va, vb, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
