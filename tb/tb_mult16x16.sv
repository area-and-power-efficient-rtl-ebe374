// tb_mult16x16 -- end-to-end self-check of the 16x16 multiplier.
//
// Runs the full-size design (no parameter overrides): corner operands,
// walking ones, and random operand pairs; every product is compared with
// the 32-bit product computed in the testbench. The testbench also counts
// how often each mechanism of the datapath is exercised, observed inside
// the lowest sub-product multiplier (aL*bL) and the combiner, and counts a
// failure for any mechanism that never occurs:
//   - a 7:3 counter whose seventh input is set (count-plus-one path)
//   - a 6:3 counter reporting four or more ones (C2 from the K vector)
//   - a full column 7 (eight ones, the bypassed eighth bit set)
//   - a 4:2 compressor horizontal carry into the next column
//   - a Wallace-layer carry when the four sub-products are added
//   - a product that needs all 32 bits
module tb_mult16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_C73_X6, EV_C63_C2, EV_COL7_FULL, EV_CMP_COUT, EV_WALLACE_CARRY, EV_TOP_BIT, EV_COUNT
  } event_e;
  int unsigned seen [EV_COUNT];
  string ev_name [EV_COUNT] = '{"7:3 counter x6 set", "6:3 counter c2 set",
                                "column 7 full", "4:2 horizontal carry",
                                "Wallace-layer carry", "product bit 31 set"};

  mult16x16 dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [15:0] va, input logic [15:0] vb);
    logic [31:0] exp;
    a = va;
    b = vb;
    #1;
    exp = 32'(va) * 32'(vb);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", va, vb, p, exp);
    end
    if (dut.u_p4.g_col[7].g_c73.u_cnt.x[6])        seen[EV_C73_X6]++;
    if (dut.u_p4.g_col[5].g_c63.u_cnt.c2)          seen[EV_C63_C2]++;
    if (dut.u_p4.colbits[7] == 8'hff)              seen[EV_COL7_FULL]++;
    if (dut.u_p4.cmp_cout != '0)                   seen[EV_CMP_COUT]++;
    if (dut.u_combine.fa_carry != '0)              seen[EV_WALLACE_CARRY]++;
    if (p[31])                                     seen[EV_TOP_BIT]++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[e]) seen[e] = 0;
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'h0001);
    apply(16'h0001, '1);
    apply(16'h00ff, 16'h00ff);
    apply(16'hff00, 16'h00ff);
    apply(16'h8000, 16'h8000);
    for (int m = 0; m < 16; m++)
      for (int n = 0; n < 16; n++) apply(16'(1) << m, 16'(1) << n);
    for (int n = 0; n < 100000; n++) apply(16'($urandom), 16'($urandom));

    for (int e = 0; e < EV_COUNT; e++) begin
      $display("mechanism %-22s seen %0d times", ev_name[e], seen[e]);
      checks++;
      if (seen[e] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
