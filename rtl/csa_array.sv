// csa_array: partial-product generation and carry-save reduction of an
// N x N unsigned array multiplier, everything of the multiplier except the
// final carry-propagate addition.
//
// Row 0 is a row of full adders fed with the partial products x_0 & y_j
// and two zero inputs. Each later row i (1..N-1) has N full adders; cell j
// adds the partial product x_i & y_j, the sum of cell j+1 of the row above
// (same weight i+j) and the carry of cell j of the row above (carries are
// passed diagonally, not rippled). The sum of cell 0 of row i is product
// bit i. What is left after the last row is a sum vector and a carry
// vector, both of weight N and up, whose sum is product bits 2N-1..N:
//   p[2N-1:N] = sum_vec + carry_vec   (never overflows N bits)
// sum_vec[N-1] is always 0, and so is carry_vec[N-1] (the leftmost cell
// of every row sees a zero sum input, so by induction it never carries);
// both are kept so the final adder takes two full N-bit vectors, as the
// N-cell final row of the array does.
// Purely combinational. The cell arrangement follows the classic
// carry-save array multiplier; the port split is this design's own.
module csa_array #(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0] x,          // multiplicand
  input  logic [N-1:0] y,          // multiplier
  output logic [N-1:0] p_low,      // product bits N-1..0
  output logic [N-1:0] sum_vec,    // remaining sums, weight N..2N-1
  output logic [N-1:0] carry_vec   // remaining carries, weight N..2N-1
);
  logic [N-1:0] s [N];   // s[i][j]: sum of cell j in row i, weight i+j
  logic [N-1:0] c [N];   // c[i][j]: carry of cell j in row i, weight i+j+1

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic pp, s_in, c_in;
      if (i == 0) begin : g_first
        assign s_in = 1'b0;
        assign c_in = 1'b0;
      end else if (j == N - 1) begin : g_left
        assign s_in = 1'b0;
        assign c_in = c[i-1][j];
      end else begin : g_inner
        assign s_in = s[i-1][j+1];
        assign c_in = c[i-1][j];
      end
      assign pp = x[i] & y[j];
      full_adder u_fa (.a(pp), .b(s_in), .c(c_in), .ps(s[i][j]), .sc(c[i][j]));
    end
    assign p_low[i] = s[i][0];
  end

  assign sum_vec   = {1'b0, s[N-1][N-1:1]};
  assign carry_vec = c[N-1];
endmodule
