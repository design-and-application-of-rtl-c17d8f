// Exhaustive check of the three-input STDL simple ternary NAND:
// q = 2 - min(x, y, z), qn = 2 - q, and the 1/1 preset.
module stdl_stnand3_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  ev;
  trit_t x, y, z, q, qn;

  stdl_stnand3 dut (.ev, .x, .y, .z, .q, .qn);

  initial begin
    for (int i = 0; i < 27; i++) begin
      int m;
      x = trit_t'(i % 3);
      y = trit_t'((i / 3) % 3);
      z = trit_t'(i / 9);
      m = i % 3;
      if ((i / 3) % 3 < m) m = (i / 3) % 3;
      if (i / 9 < m) m = i / 9;
      ev = 1'b0;
      #1;
      checks++;
      if (q != T1 || qn != T1) begin failures++; $display("FAIL: preset"); end
      ev = 1'b1;
      #1;
      checks++;
      if (int'(q) != 2 - m || int'(qn) != m) begin
        failures++;
        $display("FAIL: x=%0d y=%0d z=%0d q=%0d qn=%0d", x, y, z, q, qn);
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
