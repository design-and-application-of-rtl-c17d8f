// Partial-product generator and binary-to-positive-digit converter.
//
// The N x N product is split into N/2 operands in the radix-2 positive-digit
// code (digits 0, 1, 2). Operand k adds the two binary partial-product rows of
// multiplier bits b[2k] and b[2k+1]; its digit at weight 2^q is
//   s = a[q-2k] b[2k] + a[q-2k-1] b[2k+1]        (0, 1 or 2)
// so each digit is the sum of two AND terms, as in the document's simple
// ternary gate that takes a_i, b_j, a_m, b_n directly. Pairing the rows
// 2k and 2k+1 is this design's choice. Every operand is given as a 2N-digit
// vector already shifted to its weight; digits outside the operand's span
// are 0. Purely combinational.
module pp_gen
  import tern_pkg::*;
#(
  parameter int unsigned N = 16  // operand width, even
) (
  input  logic [N-1:0]       a,                // multiplicand
  input  logic [N-1:0]       b,                // multiplier
  output trit_t [2*N-1:0]    ops [N/2]         // operand k, digit q at weight 2^q
);

  localparam int unsigned W = 2 * N;

  for (genvar k = 0; k < N / 2; k++) begin : g_op
    for (genvar q = 0; q < W; q++) begin : g_dig
      logic pij, pmn;
      // p_ij = a_i b_j with j = 2k, i = q - 2k
      if (q >= 2 * k && q - 2 * k < N) begin : g_ij
        assign pij = a[q-2*k] & b[2*k];
      end else begin : g_ij0
        assign pij = 1'b0;
      end
      // p_mn = a_m b_n with n = 2k + 1, m = q - 2k - 1
      if (q >= 2 * k + 1 && q - 2 * k - 1 < N) begin : g_mn
        assign pmn = a[q-2*k-1] & b[2*k+1];
      end else begin : g_mn0
        assign pmn = 1'b0;
      end
      assign ops[k][q] = trit_t'({pij & pmn, pij ^ pmn});
    end
  end

endmodule
