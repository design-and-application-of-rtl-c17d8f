// Four-bit carry-lookahead adder slice.
//
// From the bit propagates p and generates g and the carry in ci it forms
// all four carries with lookahead equations (no ripple), the sum bits
// sum_i = p_i xor c_i and the carry out. Purely combinational.
module cla4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       ci,
  output logic [3:0] sum,
  output logic       co
);

  logic [4:0] c;

  always_comb begin
    c[0] = ci;
    c[1] = g[0] | (p[0] & ci);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & ci);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & ci);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & ci);
    sum  = p ^ c[3:0];
    co   = c[4];
  end

endmodule
