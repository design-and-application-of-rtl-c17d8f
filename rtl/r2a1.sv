// R2A1: first cell of the radix-2 positive-digit adder.
//
// Adds the digits x_i, y_i (each 0, 1 or 2) as x_i + y_i = w_i + 2 (c1_i + c2_i)
// with the two-state intermediate sum w_i and carries c1_i, c2_i that go to
// position i+1. The cell decodes each digit into literals and forms the
// document's intermediate signals:
//   A  = not(x^02 y^02)            (x or y is 1)
//   D  = not(x^1 y^1)
//   E  = not(x^2 + y^2)
//   c2 = x^2 y^2
//   c1 = not(D E)                  (x + y >= 2)
//   w  = A D                       (x + y odd)
// Purely combinational; in the multiplier it ends a pipeline stage.
module r2a1
  import tern_pkg::*;
(
  input  trit_t x,
  input  trit_t y,
  output logic  w,
  output logic  c1,
  output logic  c2
);

  literals_t lx, ly;
  logic      sig_a, sig_d, sig_e;

  always_comb begin
    lx    = literals(x);
    ly    = literals(y);
    sig_a = !((lx.l0 && ly.l0) || (lx.l0 && ly.l2) || (lx.l2 && ly.l0) || (lx.l2 && ly.l2));
    sig_d = !(lx.l1 && ly.l1);
    sig_e = !(lx.l2 || ly.l2);
    c2    = lx.l2 && ly.l2;
    c1    = !(sig_d && sig_e);
    w     = sig_a && sig_d;
  end

endmodule
