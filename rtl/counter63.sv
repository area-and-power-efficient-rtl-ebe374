// counter63 -- 6:3 counter based on symmetric bit stacking.
//
// Outputs {c2,c1,s}, the binary number of ones among x[5:0]. The inputs are
// stacked in two groups of three (H from x[2:0], I from x[5:3]) and merged
// into the K vector; the bottom layer of stackers is not needed:
//   s  : odd parity. A 3-bit stack has even parity when it holds zero or two
//        ones: He = ~H0 | (H1 & ~H2), likewise Ie; s = He ^ Ie. The only
//        XOR is off the critical path.
//   c2 : count >= 4, which is true exactly when some K bit is set.
//   c1 : count is 2, 3 or 6: (at least two: H1 | I1 | H0&I0) and not c2,
//        or both stacks full (H2 & I2).
// The parity, c2 and "at least two" terms follow the symmetric-stacking
// method; the count-6 term H2 & I2 is this design's choice.
//
// Interface: x[5:0] in; s, c1, c2 out (weights 1, 2, 4). Combinational.
module counter63 (
  input  logic [5:0] x,
  output logic       s,
  output logic       c1,
  output logic       c2
);
  logic [2:0] h, i, j, k;
  logic       he, ie, at_least_two;

  stacker3    u_stack_h (.x(x[2:0]), .y(h));
  stacker3    u_stack_i (.x(x[5:3]), .y(i));
  stack_merge u_merge   (.h(h), .i(i), .j(j), .k(k));

  always_comb begin
    he           = ~h[0] | (h[1] & ~h[2]);
    ie           = ~i[0] | (i[1] & ~i[2]);
    s            = he ^ ie;
    c2           = k[0] | k[1] | k[2];
    at_least_two = h[1] | i[1] | (h[0] & i[0]);
    c1           = (at_least_two & ~c2) | (h[2] & i[2]);
  end

  // j is part of the shared merge stage; the 6:3 outputs need only K.
  logic unused_j;
  assign unused_j = ^j;
endmodule
