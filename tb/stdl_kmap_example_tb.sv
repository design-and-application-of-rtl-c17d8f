// Exhaustive check of the three-input STDL example against its K-map
// (27 cells), both outputs, plus the preset phase. The literals of each
// input are formed by the shared package function.
module stdl_kmap_example_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  ev;
  trit_t a, b, c, q, qn;

  stdl_kmap_example dut (.ev, .la(literals(a)), .lb(literals(b)), .lc(literals(c)), .q, .qn);

  // KMAP[c][b][a]
  localparam int KMAP [3][3][3] = '{
    '{'{0, 0, 1}, '{0, 1, 1}, '{0, 1, 1}},
    '{'{0, 1, 1}, '{1, 1, 1}, '{1, 1, 2}},
    '{'{1, 1, 2}, '{1, 1, 2}, '{2, 2, 2}}};

  initial begin
    for (int i = 0; i < 27; i++) begin
      a = trit_t'(i % 3);
      b = trit_t'((i / 3) % 3);
      c = trit_t'(i / 9);
      ev = 1'b0;
      #1;
      checks++;
      if (q != T1 || qn != T1) begin failures++; $display("FAIL: preset"); end
      ev = 1'b1;
      #1;
      checks++;
      if (int'(q) != KMAP[i/9][(i/3)%3][i%3] || int'(qn) != 2 - KMAP[i/9][(i/3)%3][i%3]) begin
        failures++;
        $display("FAIL: a=%0d b=%0d c=%0d q=%0d qn=%0d", a, b, c, q, qn);
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
