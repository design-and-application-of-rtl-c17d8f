// Three-input STDL gate of the design-procedure example.
//
// The function of the ternary variables A, B, C (K-map of the example) is
//   Q = 0  if C = 0 and (A = 0 or (A = 1 and B = 0)),  or A = B = 0, C = 1
//   Q = 2  if C = 2 and (A = 2 or B = 2),             or A = B = 2, C = 1
//   Q = 1  otherwise.
// It is realised as one STDL gate whose differential tree of literals is
//   Q side (0-tree):      A^0 C^0 + A^1 B^0 C^0 + A^0 B^0 C^1
//   Q-bar side (2-tree):  A^2 C^2 + B^2 C^2   + A^2 B^2 C^1
// The branches A^0 B^0 C^1 / A^2 B^2 C^1 form the shared 02 tree built
// first by the procedure. The gate takes the decoded literals of A, B and C,
// as an STDL tree does (tern_block puts ternary decoders in front of it).
// ev high: evaluate; ev low: both outputs preset to 1. Purely combinational.
module stdl_kmap_example
  import tern_pkg::*;
(
  input  logic  ev,
  input  literals_t la,  // literals of A
  input  literals_t lb,  // literals of B
  input  literals_t lc,  // literals of C
  output trit_t q,
  output trit_t qn
);

  logic tree_q, tree_qn;

  always_comb begin
    tree_q  = (la.l0 && lc.l0) || (la.l1 && lb.l0 && lc.l0) || (la.l0 && lb.l0 && lc.l1);
    tree_qn = (la.l2 && lc.l2) || (lb.l2 && lc.l2) || (la.l2 && lb.l2 && lc.l1);
  end

  stdl_gate u_stdl (.ev(ev), .pd_q(tree_q), .pd_qn(tree_qn), .q(q), .qn(qn));

endmodule
