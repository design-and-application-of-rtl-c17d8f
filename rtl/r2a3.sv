// R2A3: final-sum cell of the two-stage radix-2 positive-digit adder.
//
// Step 3 of the addition: s_i = v_i + d_{i-1} + c2_{i-1}, a digit 0, 1 or 2
// (d_{i-1} and c2_{i-1} are never both 1). As in the document the cell is a
// simple ternary gate (STG): its pull-down network conducts when v_i,
// d_{i-1} and c2_{i-1} are all 0 (s = 0), its pull-up network when v_i is 1
// and one of d_{i-1}, c2_{i-1} is 1 (s = 2); otherwise the output keeps the
// preset level 1. A static ternary inverter gives the complementary output.
// ev is the evaluate phase (tie high for a purely combinational view).
// Purely combinational.
module r2a3
  import tern_pkg::*;
(
  input  logic  ev,
  input  logic  v_i,
  input  logic  d_im1,
  input  logic  c2_im1,
  output trit_t s,
  output trit_t s_n   // 2 - s while evaluating
);

  logic pull_up, pull_down;

  assign pull_up   = v_i && (d_im1 || c2_im1);
  assign pull_down = !v_i && !d_im1 && !c2_im1;

  tern_stg u_stg (.ev(ev), .pu(pull_up), .pd(pull_down), .y(s));

  assign s_n = sti(s);

endmodule
