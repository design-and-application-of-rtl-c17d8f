// Two-stage parallel adder of two W-digit radix-2 positive-digit numbers.
//
// The document's first adder structure: three cell rows, R2A1 (w, c1, c2),
// R2A2 (v, d) and R2A3 (final digit), with a pipeline register after each
// of the first two rows. The sum digit s_i depends only on input digits i,
// i-1 and i-2, so there is no carry chain, but the adder takes two pipeline
// stages; rpd_adder merges R2A2 and R2A3 into one cell (R2A4) and needs
// one. In a multiplier the R2A3 row shares a stage with the R2A1 row of the
// next adder. The sum keeps W digits; ovf flags a carry out of the top digit.
// Timing: s and ovf are valid two clocks after x and y.
module rpd_adder2
  import tern_pkg::*;
#(
  parameter int unsigned W = 32  // digits per operand
) (
  input  logic          clk,
  input  trit_t [W-1:0] x,
  input  trit_t [W-1:0] y,
  output trit_t [W-1:0] s,
  output logic          ovf
);

  logic [W-1:0] w_d, c1_d, c2_d;   // R2A1 outputs
  logic [W-1:0] w_q, c1_q, c2_q;   // first stage register
  logic [W-1:0] v_d, d_d;          // R2A2 outputs
  logic [W-1:0] v_q, d_q, c2_qq;   // second stage register
  logic         c1_top_q;          // carry out of the top digit, delayed

  for (genvar i = 0; i < W; i++) begin : g_r2a1
    r2a1 u_r2a1 (.x(x[i]), .y(y[i]), .w(w_d[i]), .c1(c1_d[i]), .c2(c2_d[i]));
  end

  always_ff @(posedge clk) begin
    w_q  <= w_d;
    c1_q <= c1_d;
    c2_q <= c2_d;
  end

  for (genvar i = 0; i < W; i++) begin : g_r2a2
    logic c1_im1;
    assign c1_im1 = (i >= 1) ? c1_q[(i>=1) ? i-1 : 0] : 1'b0;
    r2a2 u_r2a2 (.w_i(w_q[i]), .c1_im1(c1_im1), .v_i(v_d[i]), .d_i(d_d[i]));
  end

  always_ff @(posedge clk) begin
    v_q      <= v_d;
    d_q      <= d_d;
    c2_qq    <= c2_q;
    c1_top_q <= c1_q[W-1];
  end

  for (genvar i = 0; i < W; i++) begin : g_r2a3
    logic  d_im1, c2_im1;
    trit_t unused_sn;
    assign d_im1  = (i >= 1) ? d_q[(i>=1) ? i-1 : 0]   : 1'b0;
    assign c2_im1 = (i >= 1) ? c2_qq[(i>=1) ? i-1 : 0] : 1'b0;
    r2a3 u_r2a3 (
      .ev    (1'b1),
      .v_i   (v_q[i]),
      .d_im1 (d_im1),
      .c2_im1(c2_im1),
      .s     (s[i]),
      .s_n   (unused_sn)
    );
  end

  // Weight 2^W is lost when a carry leaves the top digit.
  assign ovf = c1_top_q | d_q[W-1] | c2_qq[W-1];

endmodule
