// One-stage parallel adder of two W-digit radix-2 positive-digit numbers.
//
// Every digit position has an R2A1 cell (w, c1, c2 from x_i, y_i); their
// outputs are registered, which ends the pipeline stage, and a row of R2A4
// cells then forms the sum digits from positions i, i-1 and i-2. The sum
// digit s_i therefore depends only on input digits i, i-1 and i-2: there is
// no carry chain, and the adder needs one pipeline stage. In the multiplier
// the R2A4 row of one adder and the R2A1 row of the next adder share a
// stage. The sum keeps W digits; ovf flags a carry out of the top digit
// (never set in the multiplier, whose sums fit). Timing: s and ovf are
// valid one clock after x and y.
module rpd_adder
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

  logic [W-1:0] w_d, c1_d, c2_d;  // R2A1 outputs
  logic [W-1:0] w_q, c1_q, c2_q;  // stage register

  for (genvar i = 0; i < W; i++) begin : g_r2a1
    r2a1 u_r2a1 (.x(x[i]), .y(y[i]), .w(w_d[i]), .c1(c1_d[i]), .c2(c2_d[i]));
  end

  always_ff @(posedge clk) begin
    w_q  <= w_d;
    c1_q <= c1_d;
    c2_q <= c2_d;
  end

  for (genvar i = 0; i < W; i++) begin : g_r2a4
    logic w_im1, c1_im1, c2_im1, c1_im2;
    trit_t unused_sn;
    assign w_im1  = (i >= 1) ? w_q[(i>=1) ? i-1 : 0]  : 1'b0;
    assign c1_im1 = (i >= 1) ? c1_q[(i>=1) ? i-1 : 0] : 1'b0;
    assign c2_im1 = (i >= 1) ? c2_q[(i>=1) ? i-1 : 0] : 1'b0;
    assign c1_im2 = (i >= 2) ? c1_q[(i>=2) ? i-2 : 0] : 1'b0;
    r2a4 u_r2a4 (
      .ev    (1'b1),
      .w_i   (w_q[i]),
      .w_im1 (w_im1),
      .c1_im1(c1_im1),
      .c2_im1(c2_im1),
      .c1_im2(c1_im2),
      .s     (s[i]),
      .s_n   (unused_sn)
    );
  end

  // Weight 2^W is lost when a carry leaves the top digit.
  assign ovf = c1_q[W-1] | c2_q[W-1] | (w_q[W-1] & c1_q[W-2]);

endmodule
