// stacker3 -- 3-bit bit stacker.
//
// Groups the ones of a 3-bit input at the low end of the output, so the
// output is a thermometer code of the number of ones: y[0] is set when at
// least one input is set (OR), y[1] when at least two are (majority), y[2]
// when all three are (AND). These are the stacker equations of the
// symmetric-stacking counter; the gate-level form follows them directly.
//
// Interface: x[2:0] in, y[2:0] out. Purely combinational, no clock.
module stacker3 (
  input  logic [2:0] x,
  output logic [2:0] y
);
  always_comb begin
    y[0] = x[0] | x[1] | x[2];
    y[1] = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
    y[2] = x[0] & x[1] & x[2];
  end
endmodule
