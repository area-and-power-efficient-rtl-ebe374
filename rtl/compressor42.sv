// compressor42 -- 4:2 compressor from two cascaded full adders.
//
// x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout). The first full adder
// adds x[0..2] and produces cout; the second adds its sum, x[3] and cin and
// produces sum and carry. cout therefore does not depend on cin, so in a row
// of compressors the horizontal carry moves only one column and never
// ripples. This is the conventional two-full-adder form.
//
// Interface: x[3:0], cin in; sum (weight 1), carry and cout (weight 2) out.
// Combinational.
module compressor42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(s1),  .cout(cout));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .cin(cin),  .sum(sum), .cout(carry));
endmodule
