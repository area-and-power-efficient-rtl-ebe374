// tb_counter73 -- exhaustive self-check of the 7:3 stacking counter.
// For all 128 inputs, {c2,c1,s} must equal the number of ones in x.
module tb_counter73;
  logic [6:0] x;
  logic       s, c1, c2;
  int checks = 0, failures = 0;

  counter73 dut (.x(x), .s(s), .c1(c1), .c2(c2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      x = 7'(v);
      #1;
      checks++;
      if ({c2, c1, s} != 3'($countones(x))) begin
        failures++;
        $display("FAIL x=%b count=%0d got %b", x, $countones(x), {c2, c1, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
