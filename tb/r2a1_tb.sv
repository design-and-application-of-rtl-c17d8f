// Exhaustive check of the R2A1 cell against the tables of w, c(1), c(2)
// and the identity x + y = w + 2 (c(1) + c(2)).
module r2a1_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  trit_t x, y;
  logic  w, c1, c2;

  r2a1 dut (.x, .y, .w, .c1, .c2);

  // [y][x]
  localparam bit C2 [3][3] = '{'{0, 0, 0}, '{0, 0, 0}, '{0, 0, 1}};
  localparam bit C1 [3][3] = '{'{0, 0, 1}, '{0, 1, 1}, '{1, 1, 1}};
  localparam bit WT [3][3] = '{'{0, 1, 0}, '{1, 0, 1}, '{0, 1, 0}};

  initial begin
    for (int i = 0; i < 9; i++) begin
      x = trit_t'(i % 3);
      y = trit_t'(i / 3);
      #1;
      checks++;
      if (w != WT[i/3][i%3] || c1 != C1[i/3][i%3] || c2 != C2[i/3][i%3]) begin
        failures++;
        $display("FAIL: x=%0d y=%0d w=%0d c1=%0d c2=%0d", x, y, w, c1, c2);
      end
      checks++;
      if (i % 3 + i / 3 != int'(w) + 2 * (int'(c1) + int'(c2))) begin
        failures++;
        $display("FAIL: sum identity x=%0d y=%0d", x, y);
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
