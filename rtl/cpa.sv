// cpa -- carry-propagate (vector merge) adder.
//
// Adds the two rows a reduction tree leaves behind: y = (a + b) mod 2^WIDTH.
// Written as a ripple chain of full adders with carry-in 0; the carry out
// of the top bit is dropped, because in the multipliers the product always
// fits in WIDTH bits. The adder type is this design's choice.
//
// Interface: a, b [WIDTH-1:0] in; y [WIDTH-1:0] out. Combinational.
module cpa #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH:0] c;

  assign c[0] = 1'b0;

  for (genvar n = 0; n < WIDTH; n++) begin : g_bit
    full_adder u_fa (.a(a[n]), .b(b[n]), .cin(c[n]), .sum(y[n]), .cout(c[n+1]));
  end

  logic unused_carry;
  assign unused_carry = c[WIDTH];
endmodule
