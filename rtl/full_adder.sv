// full_adder -- 3:2 counter.
//
// a + b + cin = sum + 2*cout, with sum the XOR of the three inputs and cout
// their majority. Used inside the 4:2 compressor, the carry-propagate adder
// and the Wallace layer that merges sub-products.
//
// Interface: a, b, cin in; sum, cout out. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
