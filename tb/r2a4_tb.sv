// Exhaustive check of the R2A4 STDL cell over all input combinations that
// R2A1 cells can produce (c(2) of position i-1 excludes w of position i-1).
// The expected digit is built from the tables of v, d and the final sum:
// v = table(w_i, c1_{i-1}), d = table(w_{i-1}, c1_{i-2}),
// s = table(v, c2_{i-1} d_{i-1}).
module r2a4_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  ev, w_i, w_im1, c1_im1, c2_im1, c1_im2;
  trit_t s, s_n;

  r2a4 dut (.ev, .w_i, .w_im1, .c1_im1, .c2_im1, .c1_im2, .s, .s_n);

  localparam bit VT [2][2] = '{'{0, 1}, '{1, 0}};     // [w][c1]
  localparam bit DT [2][2] = '{'{0, 0}, '{0, 1}};     // [w][c1]
  localparam int ST [2][3] = '{'{0, 1, 1}, '{1, 2, 2}}; // [v][c2 d = 00, 01, 10]

  initial begin
    for (int i = 0; i < 32; i++) begin
      int v, d, exp;
      {w_i, w_im1, c1_im1, c2_im1, c1_im2} = 5'(i);
      if (c2_im1 && w_im1) continue;   // cannot occur
      if (c2_im1 && !c1_im1) continue; // c2 implies c1 in the same cell
      v   = VT[w_i][c1_im1];
      d   = DT[w_im1][c1_im2];
      exp = ST[v][c2_im1 ? 2 : d];
      ev = 1'b0;
      #1;
      checks++;
      if (s != T1 || s_n != T1) begin failures++; $display("FAIL: preset"); end
      ev = 1'b1;
      #1;
      checks++;
      if (int'(s) != exp || int'(s_n) != 2 - exp) begin
        failures++;
        $display("FAIL: in=%b s=%0d s_n=%0d exp %0d", 5'(i), s, s_n, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
