// stack_merge -- symmetric merge of two 3-bit stacks.
//
// The first stack H is reversed and placed in front of the second stack I,
// giving the 6-bit sequence H2 H1 H0 I0 I1 I2 in which the ones form one
// unbroken train. Each pair of positions three apart is combined:
//   J0 = H2 | I0   J1 = H1 | I1   J2 = H0 | I2
//   K0 = H2 & I0   K1 = H1 & I1   K2 = H0 & I2
// J then holds min(n,3) ones and K holds max(n-3,0) ones, where n is the
// total number of ones in H and I; neither vector is itself stacked. This is
// the merge step of the symmetric-stacking method.
//
// Interface: h[2:0], i[2:0] in (stacks, bit 0 = lowest threshold);
// j[2:0], k[2:0] out. Combinational.
module stack_merge (
  input  logic [2:0] h,
  input  logic [2:0] i,
  output logic [2:0] j,
  output logic [2:0] k
);
  always_comb begin
    j[0] = h[2] | i[0];
    j[1] = h[1] | i[1];
    j[2] = h[0] | i[2];
    k[0] = h[2] & i[0];
    k[1] = h[1] & i[1];
    k[2] = h[0] & i[2];
  end
endmodule
