// Checks the decoder + STDL building block over all 27 input combinations
// in random order: inputs applied while phi is low, result checked against
// the example's K-map while phi is high (with the inputs already changed,
// so the latched literals must be the ones used), and the preset level 1
// checked while phi is low.
module tern_block_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  phi = 1'b1;
  trit_t a, b, c, q, qn;

  tern_block dut (.phi, .a, .b, .c, .q, .qn);

  localparam int KMAP [3][3][3] = '{
    '{'{0, 0, 1}, '{0, 1, 1}, '{0, 1, 1}},
    '{'{0, 1, 1}, '{1, 1, 1}, '{1, 1, 2}},
    '{'{1, 1, 2}, '{1, 1, 2}, '{2, 2, 2}}};

  initial begin
    for (int i = 0; i < 200; i++) begin
      automatic int n  = (i < 27) ? i : $urandom_range(0, 26);
      automatic int av = n % 3, bv = (n / 3) % 3, cv = n / 9;
      phi = 1'b0;
      a = trit_t'(av); b = trit_t'(bv); c = trit_t'(cv);
      #4;
      checks++;
      if (q != T1 || qn != T1) begin failures++; $display("FAIL: preset q=%0d", q); end
      #1 phi = 1'b1;
      a = trit_t'($urandom_range(0, 2));
      b = trit_t'($urandom_range(0, 2));
      c = trit_t'($urandom_range(0, 2));
      #4;
      checks++;
      if (int'(q) != KMAP[cv][bv][av] || int'(qn) != 2 - KMAP[cv][bv][av]) begin
        failures++;
        $display("FAIL: a=%0d b=%0d c=%0d q=%0d qn=%0d", av, bv, cv, q, qn);
      end
      #1;
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
