// Exhaustive check of the three dynamic ternary inverters against the
// inverter truth table, in both the preset and the evaluate phase.
module tern_inv_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  ev;
  trit_t x, y_n, y_p, y_s;

  tern_inv #(.KIND(GATE_N)) u_n (.ev, .x, .y(y_n));
  tern_inv #(.KIND(GATE_P)) u_p (.ev, .x, .y(y_p));
  tern_inv #(.KIND(GATE_S)) u_s (.ev, .x, .y(y_s));

  // rows x = 0, 1, 2: {NTI, PTI, STI}
  localparam int TAB [3][3] = '{'{2, 2, 2}, '{0, 2, 1}, '{0, 0, 0}};

  task automatic chk(input trit_t got, input int exp, input string what);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL: %s x=%0d ev=%0d got %0d exp %0d", what, x, ev, got, exp);
    end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 3; v++) begin
        ev = e[0];
        x  = trit_t'(v);
        #1;
        chk(y_n, e ? TAB[v][0] : 0, "NTI");
        chk(y_p, e ? TAB[v][1] : 2, "PTI");
        chk(y_s, e ? TAB[v][2] : 1, "STI");
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
