// Two-input dynamic ternary NAND / NOR of the negative, positive or simple type.
//
// A NAND takes the minimum of its inputs and a NOR the maximum; the result
// then passes through the inverter of the gate's kind:
//   STNAND = STI(min), PTNAND = PTI(min), NTNAND = NTI(min)
//   STNOR  = STI(max), PTNOR  = PTI(max), NTNOR  = NTI(max)
// which reproduces the document's truth table of the six gates. During the
// preset phase (ev low) the output holds the kind's preset level: 2 for a
// positive gate, 1 for a simple gate, 0 for a negative gate. Purely
// combinational; see tern_inv for the ev convention.
module tern_gate2
  import tern_pkg::*;
#(
  parameter gate_kind_t KIND   = GATE_S,
  parameter bit         IS_NOR = 1'b0   // 0: NAND, 1: NOR
) (
  input  logic  ev,
  input  trit_t x,
  input  trit_t y,
  output trit_t z
);

  trit_t combined;

  always_comb begin
    combined = IS_NOR ? tmax(x, y) : tmin(x, y);
    z        = ev ? tinv(KIND, combined) : preset_level(KIND);
  end

endmodule
