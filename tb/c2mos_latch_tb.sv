// Checks that the latch stage passes the inverse of its two-state input
// while enabled and holds it while disabled, whatever the input does then.
module c2mos_latch_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  en = 1'b0;
  trit_t d, q;

  c2mos_latch dut (.en, .d, .q);

  initial begin
    for (int i = 0; i < 40; i++) begin
      trit_t v, exp;
      v   = ($urandom_range(0, 1) != 0) ? T2 : T0;
      exp = (v == T2) ? T0 : T2;
      en = 1'b1;
      d = v;
      #1;
      checks++;
      if (q != exp) begin failures++; $display("FAIL: pass d=%0d q=%0d", v, q); end
      en = 1'b0;
      #1 d = (v == T2) ? T0 : T2;   // change while holding
      #1;
      checks++;
      if (q != exp) begin failures++; $display("FAIL: no hold, q=%0d", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
