// C2MOS latch stage that closes a pipeline section.
//
// A latch stage passes the two-state result of a positive or negative gate
// (levels 0 or 2), inverted, while its section evaluates (en high), and
// holds it through the section's preset phase (en low), which is when the
// next section evaluates. That is why the preset levels of the gates before
// it never reach the next section. The N-C2MOS form follows a positive gate
// and the P-C2MOS form a negative gate; both have the same logic function,
// so one module serves both. Function and placement follow the document.
// The stage is level-sensitive by nature, so this module infers a latch on
// purpose; en must be the evaluate signal of the section the latch closes
// (ev = ~phi for a phi section, ev = phi for a phi-bar section). No reset.
module c2mos_latch
  import tern_pkg::*;
(
  input  logic  en,   // the section's evaluate phase
  input  trit_t d,    // 0 or 2
  output trit_t q     // inverted d: 2 or 0
);

  always_latch begin
    if (en) q = b2t(tnorm(d) != T2);
  end

endmodule
