// tb_stack_merge -- self-check of the symmetric stack merge.
// Drives every pair of proper 3-bit stacks (H with a ones, I with b ones)
// and checks the merge rule: J holds min(a+b,3) ones, K holds
// max(a+b-3,0) ones, and a K bit is only set where the J bit is set.
module tb_stack_merge;
  logic [2:0] h, i, j, k;
  int checks = 0, failures = 0;

  stack_merge dut (.h(h), .i(i), .j(j), .k(k));

  function automatic logic [2:0] thermo(int n);
    logic [2:0] t;
    for (int m = 0; m < 3; m++) t[m] = (n > m);
    return t;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a <= 3; a++) begin
      for (int b = 0; b <= 3; b++) begin
        int n, nj, nk;
        h = thermo(a);
        i = thermo(b);
        #1;
        n  = a + b;
        nj = (n < 3) ? n : 3;
        nk = (n > 3) ? n - 3 : 0;
        checks++;
        if ($countones(j) != nj || $countones(k) != nk || (k & ~j) != 3'b000) begin
          failures++;
          $display("FAIL h=%b i=%b j=%b k=%b (want %0d/%0d ones)", h, i, j, k, nj, nk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
