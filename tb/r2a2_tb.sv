// Exhaustive check of R2A2 over its four input combinations: v and d must
// satisfy w + c1 = v + 2 d with v, d in {0, 1}.
module r2a2_tb;
  int checks = 0, failures = 0;
  logic w_i, c1_im1, v_i, d_i;

  r2a2 dut (.w_i, .c1_im1, .v_i, .d_i);

  initial begin
    for (int n = 0; n < 4; n++) begin
      {w_i, c1_im1} = 2'(n);
      #1;
      checks++;
      if (int'(w_i) + int'(c1_im1) != int'(v_i) + 2 * int'(d_i)) begin
        failures++;
        $display("FAIL: w=%0d c1=%0d -> v=%0d d=%0d", w_i, c1_im1, v_i, d_i);
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
