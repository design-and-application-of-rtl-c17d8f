// Ternary building block: input decoders followed by an STDL gate.
//
// Any ternary function is built as one decoder per ternary input, turning
// it into two-state literals, followed by simple ternary gates or STDL gates
// that combine the literals. This block is that structure for the
// three-input example function of stdl_kmap_example:
//   phi section     : three tern_decoder instances (evaluate while phi low,
//                     latched literals held while phi is high)
//   phi-bar section : the STDL gate (evaluates while phi is high, preset 1
//                     while phi is low)
// The section split follows the document's pipelined building block; the
// choice of example function for it is this design's.
// Timing: a, b, c must be stable at the end of a low phase of phi; q and qn
// carry the result during the following high phase and are 1 while phi is
// low.
module tern_block
  import tern_pkg::*;
(
  input  logic  phi,
  input  trit_t a,
  input  trit_t b,
  input  trit_t c,
  output trit_t q,
  output trit_t qn
);

  literals_t la, lb, lc;
  literals_t la_inv, lb_inv, lc_inv;  // complementary copies, not needed here

  tern_decoder u_dec_a (.phi(phi), .x(a), .lit(la), .lit_inv(la_inv));
  tern_decoder u_dec_b (.phi(phi), .x(b), .lit(lb), .lit_inv(lb_inv));
  tern_decoder u_dec_c (.phi(phi), .x(c), .lit(lc), .lit_inv(lc_inv));

  stdl_kmap_example u_stdl (
    .ev(phi), .la(la), .lb(lb), .lc(lc), .q(q), .qn(qn)
  );

endmodule
