// product_combiner -- adds the four sub-products of a 2N x 2N multiplier.
//
// A 2N-bit operand pair is split into halves aH, aL and bH, bL. Four N x N
// multipliers give P1 = aH*bH, P2 = aL*bH, P3 = aH*bL, P4 = aL*bL, and
//   p = P1 * 2^(2N) + (P2 + P3) * 2^N + P4,
// the shifts being plain wiring. Columns N..3N-1 hold three bits each and
// the others one, so a single Wallace layer of full adders over columns
// N..3N-1 leaves two rows, which a 4N-bit carry-propagate adder merges.
// The P1..P4 naming and the shift-and-add structure follow the published
// decomposition; the one-layer Wallace arrangement is this design's.
//
// Interface: p1..p4 [2N-1:0] in; p [4N-1:0] out. Combinational.
module product_combiner #(
  parameter int unsigned N = 8
) (
  input  logic [2*N-1:0] p1,
  input  logic [2*N-1:0] p2,
  input  logic [2*N-1:0] p3,
  input  logic [2*N-1:0] p4,
  output logic [4*N-1:0] p
);
  logic [4*N-1:0] row_sum, row_carry;
  logic [2*N-1:0] fa_sum, fa_carry;   // index c-N for column c in N..3N-1

  for (genvar c = N; c < 3 * N; c++) begin : g_wallace
    if (c < 2 * N) begin : g_low
      full_adder u_fa (.a(p2[c-N]), .b(p3[c-N]), .cin(p4[c]),
                       .sum(fa_sum[c-N]), .cout(fa_carry[c-N]));
    end else begin : g_high
      full_adder u_fa (.a(p2[c-N]), .b(p3[c-N]), .cin(p1[c-2*N]),
                       .sum(fa_sum[c-N]), .cout(fa_carry[c-N]));
    end
  end

  assign row_sum   = {p1[2*N-1:N], fa_sum, p4[N-1:0]};
  assign row_carry = {{(N-1){1'b0}}, fa_carry, {(N+1){1'b0}}};

  cpa #(.WIDTH(4*N)) u_cpa (.a(row_sum), .b(row_carry), .y(p));
endmodule
