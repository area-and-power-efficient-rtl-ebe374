// stacker6 -- 6-bit symmetric bit stacker.
//
// Stacks x[2:0] into H and x[5:3] into I with two 3-bit stackers, merges
// them symmetrically into J and K (stack_merge), and stacks J and K with two
// more 3-bit stackers. The J stack supplies y[2:0] and the K stack y[5:3],
// so y is a thermometer code of the number of ones in x: y[m] = 1 exactly
// when at least m+1 inputs are set. Placing the J stack in the low half is
// the only ordering that yields a proper stack and is this design's reading
// of "concatenated".
//
// The first-layer stacks h, i and the merge vector k are also outputs: the
// counters derive their binary outputs from them.
//
// Interface: x[5:0] in; y[5:0], h[2:0], i[2:0], k[2:0] out. Combinational.
module stacker6 (
  input  logic [5:0] x,
  output logic [5:0] y,
  output logic [2:0] h,
  output logic [2:0] i,
  output logic [2:0] k
);
  logic [2:0] j;

  stacker3    u_stack_h (.x(x[2:0]), .y(h));
  stacker3    u_stack_i (.x(x[5:3]), .y(i));
  stack_merge u_merge   (.h(h), .i(i), .j(j), .k(k));
  stacker3    u_stack_j (.x(j), .y(y[2:0]));
  stacker3    u_stack_k (.x(k), .y(y[5:3]));
endmodule
