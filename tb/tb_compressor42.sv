// tb_compressor42 -- exhaustive self-check of the 4:2 compressor.
// For all 32 inputs: sum + 2*(carry + cout) must equal the number of ones in
// {x, cin}, and cout must not change when only cin changes (no ripple of
// the horizontal carry).
module tb_compressor42;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor42 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout_cin0;
      x = 4'(v);
      for (int c = 0; c < 2; c++) begin
        int total;
        cin = 1'(c);
        #1;
        total = int'(sum) + 2 * (int'(carry) + int'(cout));
        checks++;
        if (total != $countones(x) + c) begin
          failures++;
          $display("FAIL x=%b cin=%b sum=%b carry=%b cout=%b", x, cin, sum, carry, cout);
        end
        if (c == 0) cout_cin0 = cout;
        else begin
          checks++;
          if (cout !== cout_cin0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
