// Simple ternary gate (STG) output stage.
//
// An STG is a static CMOS pull-up / pull-down network with a presetting
// NMOS to 1/3 VDD and clocked evaluate devices. During the preset phase
// (ev low) the output is 1. During evaluate the output is pulled to 2 when
// the pull-up network conducts (pu), to 0 when the pull-down network conducts
// (pd), and stays at 1 when neither does. The two networks of a correctly
// built STG never conduct together; if both are asserted this model gives 1.
// Purely combinational.
module tern_stg
  import tern_pkg::*;
(
  input  logic  ev,
  input  logic  pu,
  input  logic  pd,
  output trit_t y
);

  always_comb begin
    if (!ev || (pu && pd)) y = T1;
    else if (pu)           y = T2;
    else if (pd)           y = T0;
    else                   y = T1;
  end

endmodule
