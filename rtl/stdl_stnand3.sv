// Three-input simple ternary NAND built as an STDL gate.
//
// q = STI(min(x, y, z)): 0 when all inputs are 2, 2 when any input is 0,
// 1 otherwise; qn = 2 - q. The differential tree pulls Q low through the
// series literals x^2 y^2 z^2 and Q-bar low through the parallel literals
// x^0, y^0, z^0. This is the gate that was built as a test circuit. ev high:
// evaluate; ev low: both outputs preset to 1. Purely combinational.
module stdl_stnand3
  import tern_pkg::*;
(
  input  logic  ev,
  input  trit_t x,
  input  trit_t y,
  input  trit_t z,
  output trit_t q,
  output trit_t qn
);

  literals_t lx, ly, lz;
  logic      tree_q, tree_qn;

  always_comb begin
    lx      = literals(x);
    ly      = literals(y);
    lz      = literals(z);
    tree_q  = lx.l2 && ly.l2 && lz.l2;
    tree_qn = lx.l0 || ly.l0 || lz.l0;
  end

  stdl_gate u_stdl (.ev(ev), .pd_q(tree_q), .pd_qn(tree_qn), .q(q), .qn(qn));

endmodule
