// tb_stacker3 -- exhaustive self-check of the 3-bit stacker.
// Applies all 8 inputs and checks that y is the thermometer code of the
// number of ones (y[m] set exactly when at least m+1 inputs are set).
module tb_stacker3;
  logic [2:0] x, y;
  int checks = 0, failures = 0;

  stacker3 dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int n;
      logic [2:0] exp;
      x = 3'(v);
      #1;
      n = $countones(x);
      for (int m = 0; m < 3; m++) exp[m] = (n >= m + 1);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL x=%b y=%b expected %b", x, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
