// mult8x8 -- unsigned 8x8 multiplier with a stacking-counter reduction tree.
//
// p = a * b. The multiplier has three parts:
//   1. Partial products: pp(i,j) = a[i] & b[j] lands in column k = i + j.
//      Column heights are 1,2,...,8,...,2,1 for k = 0..14.
//   2. Reduction, two layers.
//      Counter layer: every column of height 3 or more is counted by one
//      stacking counter -- a 7:3 counter for heights 7 and 8, a 6:3 counter
//      (unused inputs tied low) for heights 3..6. The eighth bit of column 7
//      bypasses the counter. A counter in column k yields S (weight 2^k),
//      C1 (2^(k+1)) and C2 (2^(k+2)). Afterwards no column holds more than
//      four bits.
//      Compressor layer: one 4:2 compressor per column, horizontal carries
//      chained column to column (they never ripple, see compressor42),
//      leaves a sum row and a carry row.
//   3. Vector merge: a 16-bit carry-propagate adder adds the two rows.
// Using 6:3 and 7:3 counters together with 4:2 compressors follows the
// multiplier architecture; the exact schedule (which column gets which
// counter) is this design's own.
//
// Interface: a[7:0], b[7:0] in; p[15:0] out. Purely combinational.
module mult8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  localparam int N    = 8;
  localparam int NCOL = 2 * N - 1;   // partial-product columns 0..14

  // Number of partial-product bits in column k.
  function automatic int col_height(int k);
    return (k < N) ? k + 1 : 2 * N - 1 - k;
  endfunction

  // Lowest row index i of a partial product in column k.
  function automatic int col_lo(int k);
    return (k < N) ? 0 : k - (N - 1);
  endfunction

  // Whether column k is counted in the counter layer.
  function automatic bit has_counter(int k);
    return (k >= 0) && (k < NCOL) && (col_height(k) >= 3);
  endfunction

  logic [NCOL-1:0][7:0] colbits;      // partial products, grouped by column
  logic [NCOL-1:0]      cnt_s, cnt_c1, cnt_c2;
  logic [NCOL-1:0][3:0] red;          // column contents after the counters
  logic [NCOL-1:0]      cmp_sum, cmp_carry, cmp_cout;
  logic [15:0]          row_sum, row_carry;

  for (genvar k = 0; k < NCOL; k++) begin : g_col
    localparam int H  = col_height(k);
    localparam int LO = col_lo(k);

    // ---- partial products of column k --------------------------------
    for (genvar m = 0; m < 8; m++) begin : g_pp
      if (m < H) begin : g_bit
        assign colbits[k][m] = a[LO + m] & b[k - LO - m];
      end else begin : g_zero
        assign colbits[k][m] = 1'b0;
      end
    end

    // ---- counter layer ---------------------------------------------------
    if (H >= 7) begin : g_c73
      counter73 u_cnt (.x(colbits[k][6:0]), .s(cnt_s[k]), .c1(cnt_c1[k]), .c2(cnt_c2[k]));
    end else if (H >= 3) begin : g_c63
      counter63 u_cnt (.x(colbits[k][5:0]), .s(cnt_s[k]), .c1(cnt_c1[k]), .c2(cnt_c2[k]));
    end else begin : g_nocnt
      assign cnt_s[k]  = 1'b0;
      assign cnt_c1[k] = 1'b0;
      assign cnt_c2[k] = 1'b0;
      // Columns without a counter never read these placeholders.
      logic unused_cnt;
      assign unused_cnt = cnt_s[k] ^ cnt_c1[k] ^ cnt_c2[k];
    end

    // ---- column contents after the counter layer -------------------------
    // Slots in order: own bits (S and the bypassed eighth bit, or the raw
    // partial products), C1 from column k-1, C2 from column k-2.
    localparam bit HAS_CNT = has_counter(k);
    localparam bit HAS_C1  = has_counter(k - 1);
    localparam bit HAS_C2  = has_counter(k - 2);
    localparam int N_OWN   = HAS_CNT ? ((H > 7) ? 2 : 1) : H;
    localparam int N_ALL   = N_OWN + int'(HAS_C1) + int'(HAS_C2);

    if (N_ALL > 4) begin : g_overflow
      $error("mult8x8: column %0d holds %0d bits after the counter layer", k, N_ALL);
    end

    for (genvar s = 0; s < 4; s++) begin : g_slot
      if (s < N_OWN) begin : g_own
        if (!HAS_CNT)    begin : g_raw  assign red[k][s] = colbits[k][s]; end
        else if (s == 0) begin : g_s    assign red[k][s] = cnt_s[k];      end
        else             begin : g_byp  assign red[k][s] = colbits[k][7]; end
      end else if (HAS_C1 && s == N_OWN) begin : g_c1
        assign red[k][s] = cnt_c1[k-1];
      end else if (HAS_C2 && s == N_OWN + int'(HAS_C1)) begin : g_c2
        assign red[k][s] = cnt_c2[k-2];
      end else begin : g_empty
        assign red[k][s] = 1'b0;
      end
    end

    // ---- 4:2 compressor layer -------------------------------------------
    if (k == 0) begin : g_cmp_first
      compressor42 u_cmp (.x(red[k]), .cin(1'b0), .sum(cmp_sum[k]),
                          .carry(cmp_carry[k]), .cout(cmp_cout[k]));
    end else begin : g_cmp
      compressor42 u_cmp (.x(red[k]), .cin(cmp_cout[k-1]), .sum(cmp_sum[k]),
                          .carry(cmp_carry[k]), .cout(cmp_cout[k]));
    end
  end

  // ---- vector merge --------------------------------------------------------
  assign row_sum   = {cmp_cout[NCOL-1], cmp_sum};
  assign row_carry = {cmp_carry, 1'b0};

  cpa #(.WIDTH(16)) u_cpa (.a(row_sum), .b(row_carry), .y(p));
endmodule
