// counter73 -- 7:3 counter based on symmetric bit stacking.
//
// Outputs {c2,c1,s}, the binary number of ones among x[6:0]. x[5:0] go
// through the 6-bit symmetric stacker; its parity is formed as in the 6:3
// counter from the first-layer stacks, and the stacked outputs y give the
// thresholds count>=m+1. The seventh input x[6] is folded in last:
//   s  = parity(x[5:0]) ^ x[6]
//   c2 = x[6] ? count>=3 : count>=4
//   c1 = x[6] ? count in {1,2,5,6} : count in {2,3,6}
// so x[6] only drives the select of two 2:1 multiplexers and one XOR. The
// counter uses two XOR gates in all, the 6:3 counter one, as published; the
// multiplexer arrangement is this design's reading of the published circuit.
//
// Interface: x[6:0] in; s, c1, c2 out (weights 1, 2, 4). Combinational.
module counter73 (
  input  logic [6:0] x,
  output logic       s,
  output logic       c1,
  output logic       c2
);
  logic [5:0] y;
  logic [2:0] h, i, k;
  logic       he, ie, s6;
  logic       c1_plus0, c1_plus1;

  stacker6 u_stack6 (.x(x[5:0]), .y(y), .h(h), .i(i), .k(k));

  always_comb begin
    he       = ~h[0] | (h[1] & ~h[2]);
    ie       = ~i[0] | (i[1] & ~i[2]);
    s6       = he ^ ie;
    s        = s6 ^ x[6];
    // count of x[5:0] in {2,3,6}
    c1_plus0 = (y[1] & ~y[3]) | y[5];
    // count of x[5:0] in {1,2,5,6}, i.e. count+1 in {2,3,6,7}
    c1_plus1 = (y[0] & ~y[2]) | y[4];
    c2       = x[6] ? y[2] : y[3];
    c1       = x[6] ? c1_plus1 : c1_plus0;
  end

  // K is also available through y[5:3]; the outputs use the stacked form.
  logic unused_k;
  assign unused_k = ^k;
endmodule
