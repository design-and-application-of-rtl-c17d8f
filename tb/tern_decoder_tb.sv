// Checks the pipelined literal decoder against the literal truth table.
// x is applied while phi is low (latches transparent, outputs must follow);
// after the rising edge of phi both literal sets must match the table and
// must hold while x changes during the high phase.
module tern_decoder_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic      phi = 1'b1;
  trit_t     x;
  literals_t lit, lit_inv;

  tern_decoder dut (.phi, .x, .lit, .lit_inv);

  // rows x = 0, 1, 2: {X^0, X^1, X^2, X^01, X^12, X^02}, level 2 written as 1
  localparam logic [5:0] TAB [3] = '{6'b100101, 6'b010110, 6'b001011};

  function automatic logic [5:0] pack(input literals_t l);
    return {l.l0, l.l1, l.l2, l.l01, l.l12, l.l02};
  endfunction

  task automatic chk(input int v, input string when);
    checks++;
    if (pack(lit) != TAB[v] || pack(lit_inv) != TAB[v]) begin
      failures++;
      $display("FAIL (%s): x=%0d lit=%b lit_inv=%b exp %b", when, v, pack(lit), pack(lit_inv), TAB[v]);
    end
  endtask

  initial begin
    x = T0;
    for (int i = 0; i < 60; i++) begin
      automatic int v = (i < 3) ? i : $urandom_range(0, 2);
      #1 phi = 1'b0;        // evaluate
      x = trit_t'(v);
      #3 chk(v, "transparent");
      #1 phi = 1'b1;        // latch
      #1 chk(v, "after edge");
      x = trit_t'($urandom_range(0, 2));
      #3 chk(v, "hold high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
