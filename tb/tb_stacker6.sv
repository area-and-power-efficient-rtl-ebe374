// tb_stacker6 -- exhaustive self-check of the 6-bit symmetric stacker.
// For all 64 inputs: y must be the thermometer code of the number of ones,
// h and i the thermometer codes of the two halves, and k must hold
// max(n-3,0) ones.
module tb_stacker6;
  logic [5:0] x, y;
  logic [2:0] h, i, k;
  int checks = 0, failures = 0;

  stacker6 dut (.x(x), .y(y), .h(h), .i(i), .k(k));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int n, nh, ni;
      logic [5:0] ey;
      logic [2:0] eh, ei;
      x = 6'(v);
      #1;
      n  = $countones(x);
      nh = $countones(x[2:0]);
      ni = $countones(x[5:3]);
      for (int m = 0; m < 6; m++) ey[m] = (n > m);
      for (int m = 0; m < 3; m++) begin
        eh[m] = (nh > m);
        ei[m] = (ni > m);
      end
      checks++;
      if (y !== ey) begin
        failures++;
        $display("FAIL x=%b y=%b expected %b", x, y, ey);
      end
      checks++;
      if (h !== eh || i !== ei || $countones(k) != ((n > 3) ? n - 3 : 0)) begin
        failures++;
        $display("FAIL x=%b h=%b i=%b k=%b", x, h, i, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
