// tb_counter63 -- exhaustive self-check of the 6:3 stacking counter.
// For all 64 inputs, {c2,c1,s} must equal the number of ones in x.
module tb_counter63;
  logic [5:0] x;
  logic       s, c1, c2;
  int checks = 0, failures = 0;

  counter63 dut (.x(x), .s(s), .c1(c1), .c2(c2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
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
