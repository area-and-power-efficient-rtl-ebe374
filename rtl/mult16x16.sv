// mult16x16 -- unsigned 16x16 multiplier built from four 8x8 multipliers.
//
// p = a * b, 32-bit result. Each operand is split into an upper and a lower
// byte (aH, aL, bH, bL). Four 8x8 multipliers, each with a reduction tree of
// 6:3 and 7:3 symmetric-stacking counters and 4:2 compressors, form the four
// sub-products in parallel:
//   P1 = aH*bH   P2 = aL*bH   P3 = aH*bL   P4 = aL*bL
// and the product combiner adds them with shifts of 16, 8, 8 and 0 bits.
// The split into four parallel 8x8 products follows the published
// architecture. The design is exact and purely combinational: no clock,
// reset or handshake.
//
// Interface: a[15:0], b[15:0] in; p[31:0] out.
module mult16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [7:0]  a_hi, a_lo, b_hi, b_lo;
  logic [15:0] p1, p2, p3, p4;

  assign a_hi = a[15:8];
  assign a_lo = a[7:0];
  assign b_hi = b[15:8];
  assign b_lo = b[7:0];

  mult8x8 u_p1 (.a(a_hi), .b(b_hi), .p(p1));
  mult8x8 u_p2 (.a(a_lo), .b(b_hi), .p(p2));
  mult8x8 u_p3 (.a(a_hi), .b(b_lo), .p(p3));
  mult8x8 u_p4 (.a(a_lo), .b(b_lo), .p(p4));

  product_combiner #(.N(8)) u_combine (.p1(p1), .p2(p2), .p3(p3), .p4(p4), .p(p));
endmodule
