// Simple ternary differential logic (STDL) output stage.
//
// An STDL gate has two output nodes, Q and Q-bar, and a cross-coupled sense
// latch between 2/3 VDD and GND. In the preset phase (ev low) both nodes are
// held at 1/3 VDD (level 1). In the evaluate phase an NMOS differential tree
// of two-state literals may open a path to GND from one node: that node falls
// to 0 and the latch pulls the other to 2. If neither side of the tree
// conducts, both nodes stay at 1 (the latch's dead band keeps it off).
//   pd_q  : the tree conducts from Q   -> q = 0, qn = 2
//   pd_qn : the tree conducts from Q-bar -> q = 2, qn = 0
// A well-formed tree never conducts on both sides; this model then leaves
// both outputs at 1. qn is always the simple-ternary inverse of q.
// Purely combinational.
module stdl_gate
  import tern_pkg::*;
(
  input  logic  ev,
  input  logic  pd_q,
  input  logic  pd_qn,
  output trit_t q,
  output trit_t qn
);

  always_comb begin
    if (ev && pd_q && !pd_qn) begin
      q  = T0;
      qn = T2;
    end else if (ev && pd_qn && !pd_q) begin
      q  = T2;
      qn = T0;
    end else begin
      q  = T1;
      qn = T1;
    end
  end

endmodule
