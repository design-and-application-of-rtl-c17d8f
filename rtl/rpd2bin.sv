// Positive-digit to binary converter with carry propagate / generate.
//
// Each digit s_i (0, 1, 2) is split into two bits with s_i = a_i + 2 b_i:
//   s_i = 0 -> a_i = 0, b_i = 0
//   s_i = 1 -> a_i = 1, b_i = 0
//   s_i = 2 -> a_i = 0, b_i = 1
// so the number equals A + 2B. Bit i of that binary sum gets a_i and
// b_{i-1}, from which the cell forms the propagate p_i = a_i xor b_{i-1} and
// the generate g_i = a_i and b_{i-1} for the carry-lookahead adder. The
// outputs are latched: p and g are valid one clock after s. A carry out
// of the top bit is dropped (b_{W-1} has weight 2^W).
module rpd2bin
  import tern_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic          clk,
  input  trit_t [W-1:0] s,
  output logic  [W-1:0] p,
  output logic  [W-1:0] g
);

  logic [W-1:0] a_bit, b_bit, b_shift;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      a_bit[i] = (tnorm(s[i]) == T1);
      b_bit[i] = (tnorm(s[i]) == T2);
    end
    b_shift = {b_bit[W-2:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    p <= a_bit ^ b_shift;
    g <= a_bit & b_shift;
  end

endmodule
