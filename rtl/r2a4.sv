// R2A4: final-sum cell of the one-stage radix-2 positive-digit adder.
//
// Produces the sum digit s_i (0, 1 or 2) of position i directly from the
// first-cell outputs of positions i, i-1 and i-2:
//   v_i     = w_i xor c1_{i-1}            (second intermediate sum)
//   d_{i-1} = w_{i-1} and c1_{i-2}        (second carry)
//   s_i     = v_i + d_{i-1} + c2_{i-1}
// d_{i-1} and c2_{i-1} are never both 1, so s_i <= 2. The cell is one STDL
// gate: its tree pulls Q to 0 when v, d and c2 are all 0 and pulls Q-bar
// low (Q to 2) when v is 1 and one of d, c2 is 1; otherwise both nodes stay
// at 1. ev is the STDL evaluate phase (tie high for a purely
// combinational view). Purely combinational.
module r2a4
  import tern_pkg::*;
(
  input  logic  ev,
  input  logic  w_i,
  input  logic  w_im1,
  input  logic  c1_im1,
  input  logic  c2_im1,
  input  logic  c1_im2,
  output trit_t s,
  output trit_t s_n   // complementary STDL output, 2 - s
);

  logic v_i, d_im1, path_zero, path_two;

  always_comb begin
    v_i       = w_i ^ c1_im1;
    d_im1     = w_im1 & c1_im2;
    path_zero = !c2_im1 && !d_im1 && !v_i;
    path_two  = (c2_im1 || d_im1) && v_i;
  end

  stdl_gate u_stdl (
    .ev   (ev),
    .pd_q (path_zero),
    .pd_qn(path_two),
    .q    (s),
    .qn   (s_n)
  );

endmodule
