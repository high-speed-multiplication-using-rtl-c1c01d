// urdhva_mul -- N x N unsigned multiplier using the Urdhva-Tiryagbhyam
// ("vertically and crosswise") rule.
//
// For an N-bit a and b, the product has 2N-1 columns. Column k collects every
// "crosswise" bit product a[i] & b[k-i]. Column 0 holds only the vertical product
// a[0]&b[0], and the middle column holds the most crosswise pairs. All column sums
// are formed at the same time, independently of each other. Each column then gives
// two things. Its lowest bit is the digit that stays in place. The rest of its sum
// is a carry that moves one place to the left. The digit row and all the carries
// are added together in one final addition, so no carry ripples from column to
// column while the sums are formed. This is the decimal procedure
// 234 x 316 = 61724 + 12220 = 73944, written in base 2.
//
// Interface: a, b (N bits, unsigned) -> q (2N bits) = a * b.
// Timing: purely combinational, no clock and no latency. A new product is
// valid one propagation delay after a or b changes.
//
// From the method: the parallel column sums, the digit/carry split and the
// final addition of all carries. Own choice: the sizing of the column-sum and
// carry signals, and using the generic '+' for the final multi-operand add.
// The default N = 4 gives the 4x4 block at the bottom of the multiplier
// hierarchy (vedic_mul8 and above).
module urdhva_mul #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] q
);

  // A column holds at most N one-bit products, so its sum needs CW bits.
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned NC = 2 * N - 1;  // number of columns

  logic [CW-1:0]  col_sum [NC];  // vertical and crosswise sum of each column
  logic [2*N-1:0] digits;        // row of column digits (lowest bit of each sum)
  logic [2*N-1:0] carry_row;     // all carries, each placed one column to the left

  // Step 1: every column sum, in parallel.
  always_comb begin
    for (int k = 0; k < NC; k++) begin
      col_sum[k] = '0;
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N)
          col_sum[k] = col_sum[k] + CW'(a[i] & b[k-i]);
      end
    end
  end

  // Step 2: split each column into its digit and its carry, then add the
  // digit row and all the carries at the end.
  always_comb begin
    digits    = '0;
    carry_row = '0;
    for (int k = 0; k < NC; k++) begin
      digits[k] = col_sum[k][0];
      // The carry of column k, col_sum[k] >> 1, has weight 2^(k+1).
      carry_row = carry_row + ((2*N)'(col_sum[k] >> 1) << (k + 1));
    end
    q = digits + carry_row;
  end

endmodule
