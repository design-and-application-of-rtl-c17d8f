// Dynamic ternary inverter: NTI, PTI or STI.
//
// Each inverter works in two phases. While ev is low (preset phase) the
// output is forced to the gate's preset level: 0 for the negative inverter
// (NTI), 2 for the positive inverter (PTI) and 1 for the simple inverter
// (STI). While ev is high (evaluate phase) the output is the inverter
// function of x:
//   x | NTI PTI STI
//   0 |  2   2   2
//   1 |  0   2   1
//   2 |  0   0   0
// The truth table and the preset levels follow the document. A section
// clocked by phi evaluates while phi is low, so its gates take ev = ~phi;
// a phi-bar section takes ev = phi. Purely combinational.
module tern_inv
  import tern_pkg::*;
#(
  parameter gate_kind_t KIND = GATE_S
) (
  input  logic  ev,  // 1: evaluate, 0: preset
  input  trit_t x,
  output trit_t y
);

  always_comb y = ev ? tinv(KIND, x) : preset_level(KIND);

endmodule
