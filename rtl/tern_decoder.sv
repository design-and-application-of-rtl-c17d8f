// Pipelined ternary decoder: one ternary input to its two-state literals.
//
// One phi section (evaluate while phi is low). The input x and its simple
// inverse x-bar (an STI) drive six unary operators whose two-state results
// pass through inverting C2MOS latch stages that hold from the rising edge
// of phi:
//   PTI(x)           -> latch -> X^2
//   PTI(x-bar)       -> latch -> X^0
//   NTI(x)           -> latch -> X^12
//   NTI(x-bar)       -> latch -> X^01
//   PTNOR(x, x-bar)  -> latch -> X^02
//   NTNAND(x-bar, x) -> latch -> X^1
// A static inverter after each latch gives the complementary literal
// (X^01, X^12, X^0, X^2, X^1, X^02), so every literal is available twice:
// lit holds the latch outputs and lit_inv the inverter outputs. The gate
// list and the literal of each branch follow the document's decoder.
// Timing: x must be stable at the end of the low phase of phi; lit and
// lit_inv then hold its literals throughout the high phase (the phi-bar
// section that reads them evaluates then). While phi is low the latches are
// transparent and the outputs follow x.
module tern_decoder
  import tern_pkg::*;
(
  input  logic      phi,
  input  trit_t     x,
  output literals_t lit,
  output literals_t lit_inv
);

  logic  ev;
  trit_t xb;
  trit_t g_pti_x, g_pti_xb, g_nti_x, g_nti_xb, g_ptnor, g_ntnand;
  trit_t l_x2, l_x0, l_x12, l_x01, l_x02, l_x1;

  assign ev = ~phi;

  tern_inv #(.KIND(GATE_S)) u_sti    (.ev(ev), .x(x),  .y(xb));
  tern_inv #(.KIND(GATE_P)) u_pti_x  (.ev(ev), .x(x),  .y(g_pti_x));
  tern_inv #(.KIND(GATE_P)) u_pti_xb (.ev(ev), .x(xb), .y(g_pti_xb));
  tern_inv #(.KIND(GATE_N)) u_nti_x  (.ev(ev), .x(x),  .y(g_nti_x));
  tern_inv #(.KIND(GATE_N)) u_nti_xb (.ev(ev), .x(xb), .y(g_nti_xb));
  tern_gate2 #(.KIND(GATE_P), .IS_NOR(1'b1)) u_ptnor  (.ev(ev), .x(x),  .y(xb), .z(g_ptnor));
  tern_gate2 #(.KIND(GATE_N), .IS_NOR(1'b0)) u_ntnand (.ev(ev), .x(xb), .y(x),  .z(g_ntnand));

  c2mos_latch u_lat_x2 (.en(ev), .d(g_pti_x),  .q(l_x2));
  c2mos_latch u_lat_x0 (.en(ev), .d(g_pti_xb), .q(l_x0));
  c2mos_latch u_lat_x12 (.en(ev), .d(g_nti_x),  .q(l_x12));
  c2mos_latch u_lat_x01 (.en(ev), .d(g_nti_xb), .q(l_x01));
  c2mos_latch u_lat_x02 (.en(ev), .d(g_ptnor),  .q(l_x02));
  c2mos_latch u_lat_x1 (.en(ev), .d(g_ntnand), .q(l_x1));

  always_comb begin
    lit.l0  = (l_x0  == T2);
    lit.l1  = (l_x1  == T2);
    lit.l2  = (l_x2  == T2);
    lit.l01 = (l_x01 == T2);
    lit.l12 = (l_x12 == T2);
    lit.l02 = (l_x02 == T2);
    // static CMOS inverters after the latches
    lit_inv.l01 = !lit.l2;
    lit_inv.l12 = !lit.l0;
    lit_inv.l0  = !lit.l12;
    lit_inv.l2  = !lit.l01;
    lit_inv.l1  = !lit.l02;
    lit_inv.l02 = !lit.l1;
  end

endmodule
