// tb_cpa -- self-check of the carry-propagate adder at its default width.
// Corner cases (all ones plus one, long carry chains) and random operands;
// y must equal (a + b) mod 2^WIDTH.
module tb_cpa;
  localparam int W = 16;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  cpa dut (.a(a), .b(b), .y(y));

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W-1:0] exp;
    a = va;
    b = vb;
    #1;
    exp = va + vb;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", va, vb, y, exp);
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
    apply('0, '0);
    apply('1, 1);
    apply('1, '1);
    apply(16'h7fff, 16'h0001);
    apply(16'h5555, 16'haaaa);
    for (int n = 0; n < 20000; n++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
