// Exhaustive check of the six two-input ternary NAND / NOR gates against
// their truth table, plus the preset level of each kind.
module tern_gate2_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  ev;
  trit_t x, y;
  trit_t z [6];

  // order: STNAND PTNAND NTNAND STNOR PTNOR NTNOR
  tern_gate2 #(.KIND(GATE_S), .IS_NOR(1'b0)) u0 (.ev, .x, .y, .z(z[0]));
  tern_gate2 #(.KIND(GATE_P), .IS_NOR(1'b0)) u1 (.ev, .x, .y, .z(z[1]));
  tern_gate2 #(.KIND(GATE_N), .IS_NOR(1'b0)) u2 (.ev, .x, .y, .z(z[2]));
  tern_gate2 #(.KIND(GATE_S), .IS_NOR(1'b1)) u3 (.ev, .x, .y, .z(z[3]));
  tern_gate2 #(.KIND(GATE_P), .IS_NOR(1'b1)) u4 (.ev, .x, .y, .z(z[4]));
  tern_gate2 #(.KIND(GATE_N), .IS_NOR(1'b1)) u5 (.ev, .x, .y, .z(z[5]));

  // rows (x, y) = 00, 01, 02, 10, 11, 12, 20, 21, 22
  localparam int TAB [9][6] = '{
    '{2, 2, 2, 2, 2, 2},
    '{2, 2, 2, 1, 2, 0},
    '{2, 2, 2, 0, 0, 0},
    '{2, 2, 2, 1, 2, 0},
    '{1, 2, 0, 1, 2, 0},
    '{1, 2, 0, 0, 0, 0},
    '{2, 2, 2, 0, 0, 0},
    '{1, 2, 0, 0, 0, 0},
    '{0, 0, 0, 0, 0, 0}};
  localparam int PRESET [6] = '{1, 2, 0, 1, 2, 0};

  initial begin
    for (int e = 0; e < 2; e++)
      for (int r = 0; r < 9; r++) begin
        ev = e[0];
        x  = trit_t'(r / 3);
        y  = trit_t'(r % 3);
        #1;
        for (int g = 0; g < 6; g++) begin
          automatic int exp = e ? TAB[r][g] : PRESET[g];
          checks++;
          if (int'(z[g]) != exp) begin
            failures++;
            $display("FAIL: gate %0d x=%0d y=%0d ev=%0d got %0d exp %0d", g, x, y, ev, z[g], exp);
          end
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
