// Pipelined carry-lookahead adder built from 4-bit slices.
//
// The W-bit sum of the operands given as propagate p and generate g bits is
// formed one 4-bit slice per pipeline stage, from the least significant
// slice up: stage k runs slice k with the carry registered by stage k-1,
// while the higher slices' p and g and the lower slices' finished sum bits
// move along with it. Each slice is followed by its latch (register), as in
// the document; the register arrangement that skews the operands is this
// design's choice. The carry out of the top slice is dropped.
// Timing: sum is valid W/4 clocks after p and g; one new addition per clock.
module cla_pipe #(
  parameter int unsigned W = 32  // multiple of 4
) (
  input  logic         clk,
  input  logic [W-1:0] p,
  input  logic [W-1:0] g,
  output logic [W-1:0] sum
);

  localparam int unsigned NS = W / 4;  // slices = stages

  logic [W-1:0] p_q   [NS];
  logic [W-1:0] g_q   [NS];
  logic [W-1:0] sum_q [NS];
  logic         c_q   [NS];

  for (genvar k = 0; k < NS; k++) begin : g_stage
    logic [W-1:0] p_in, g_in, sum_in;
    logic         c_in;
    logic [3:0]   slice_sum;
    logic         slice_co;

    if (k == 0) begin : g_first
      assign p_in   = p;
      assign g_in   = g;
      assign sum_in = '0;
      assign c_in   = 1'b0;
    end else begin : g_next
      assign p_in   = p_q[k-1];
      assign g_in   = g_q[k-1];
      assign sum_in = sum_q[k-1];
      assign c_in   = c_q[k-1];
    end

    cla4 u_cla4 (
      .p  (p_in[4*k+:4]),
      .g  (g_in[4*k+:4]),
      .ci (c_in),
      .sum(slice_sum),
      .co (slice_co)
    );

    always_ff @(posedge clk) begin
      p_q[k]          <= p_in;
      g_q[k]          <= g_in;
      sum_q[k]        <= sum_in;
      sum_q[k][4*k+:4] <= slice_sum;
      c_q[k]          <= slice_co;
    end
  end

  assign sum = sum_q[NS-1];

endmodule
