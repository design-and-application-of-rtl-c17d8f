// Two cascaded ternary cycling gates in a phi / phi-bar / phi pipeline.
//
// A cycling gate maps 0 -> 2, 1 -> 0, 2 -> 1. Each gate is built as the
// document's ternary NORA sections do it:
//   phi section (evaluates while phi is low): an NTI gives 2 only for input 0;
//     a PTI followed by an NTI gives 2 only for input 2. Both results pass,
//     inverted, through C2MOS latch stages that hold them from the rising
//     edge of phi, as the literals X^12 and X^01.
//   phi-bar section (evaluates while phi is high): a simple ternary gate
//     pulls up to 2 when X^12 is 0 (input 0), pulls down to 0 when X^12 and
//     X^01 are both 1 (input 1) and otherwise keeps its preset level 1
//     (input 2). Its output feeds the second gate's NTI / PTI / NTI, whose
//     latches hold from the falling edge of phi.
//   second phi section: the second gate's simple ternary gate, giving y.
// So y = x + 1 (mod 3). Timing: x must be stable while phi is low; the
// result is on y during the next low phase of phi (one phi period later)
// and y shows the preset level 1 while phi is high. The gate arrangement
// follows the document's figure where its transistor labels are legible;
// the assignment of the two latch outputs to the pull-up and pull-down of
// the simple gate is read from its function.
module cycle_pipe
  import tern_pkg::*;
(
  input  logic  phi,
  input  trit_t x,
  output trit_t y,       // second cycling gate output (phi section)
  output trit_t y_mid    // first cycling gate output (phi-bar section)
);

  logic  ev_phi, ev_phib;
  trit_t n1_a, p1_a, n2_a, l12_a, l01_a;
  trit_t n1_b, p1_b, n2_b, l12_b, l01_b;

  assign ev_phi  = ~phi;
  assign ev_phib = phi;

  // First gate, phi section.
  tern_inv #(.KIND(GATE_N)) u_nti_a  (.ev(ev_phi), .x(x),    .y(n1_a));
  tern_inv #(.KIND(GATE_P)) u_pti_a  (.ev(ev_phi), .x(x),    .y(p1_a));
  tern_inv #(.KIND(GATE_N)) u_nti2_a (.ev(ev_phi), .x(p1_a), .y(n2_a));
  c2mos_latch u_lat12_a (.en(ev_phi), .d(n1_a), .q(l12_a));
  c2mos_latch u_lat01_a (.en(ev_phi), .d(n2_a), .q(l01_a));

  // First gate output / second gate input, phi-bar section.
  tern_stg u_stg_a (
    .ev(ev_phib),
    .pu(l12_a == T0),
    .pd((l12_a == T2) && (l01_a == T2)),
    .y (y_mid)
  );
  tern_inv #(.KIND(GATE_N)) u_nti_b  (.ev(ev_phib), .x(y_mid), .y(n1_b));
  tern_inv #(.KIND(GATE_P)) u_pti_b  (.ev(ev_phib), .x(y_mid), .y(p1_b));
  tern_inv #(.KIND(GATE_N)) u_nti2_b (.ev(ev_phib), .x(p1_b),  .y(n2_b));
  c2mos_latch u_lat12_b (.en(ev_phib), .d(n1_b), .q(l12_b));
  c2mos_latch u_lat01_b (.en(ev_phib), .d(n2_b), .q(l01_b));

  // Second gate output, phi section.
  tern_stg u_stg_b (
    .ev(ev_phi),
    .pu(l12_b == T0),
    .pd((l12_b == T2) && (l01_b == T2)),
    .y (y)
  );

endmodule
