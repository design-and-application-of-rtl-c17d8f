// Exhaustive check of R2A3 over the input combinations that can occur
// (d and c2 never both 1): while evaluating, s = v + d + c2 and s_n = 2 - s;
// while presetting, s = 1.
module r2a3_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  ev, v_i, d_im1, c2_im1;
  trit_t s, s_n;

  r2a3 dut (.ev, .v_i, .d_im1, .c2_im1, .s, .s_n);

  initial begin
    for (int n = 0; n < 8; n++) begin
      {v_i, d_im1, c2_im1} = 3'(n);
      if (d_im1 && c2_im1) continue;
      ev = 1'b0;
      #1;
      checks++;
      if (s != T1) begin failures++; $display("FAIL: preset s=%0d", s); end
      ev = 1'b1;
      #1;
      checks++;
      if (int'(s) != int'(v_i) + int'(d_im1) + int'(c2_im1) || int'(s_n) != 2 - int'(s)) begin
        failures++;
        $display("FAIL: v=%0d d=%0d c2=%0d -> s=%0d s_n=%0d", v_i, d_im1, c2_im1, s, s_n);
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
