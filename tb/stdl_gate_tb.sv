// Checks the STDL output stage: preset to 1/1, one-sided tree paths giving
// 0/2 or 2/0, and no path leaving both nodes at 1.
module stdl_gate_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  ev, pd_q, pd_qn;
  trit_t q, qn;

  stdl_gate dut (.ev, .pd_q, .pd_qn, .q, .qn);

  task automatic chk(input int eq, input int eqn);
    checks++;
    if (int'(q) != eq || int'(qn) != eqn) begin
      failures++;
      $display("FAIL: ev=%0d pd_q=%0d pd_qn=%0d got %0d/%0d exp %0d/%0d",
               ev, pd_q, pd_qn, q, qn, eq, eqn);
    end
  endtask

  initial begin
    for (int c = 0; c < 3; c++) begin
      pd_q  = (c == 1);
      pd_qn = (c == 2);
      ev = 1'b0; #1 chk(1, 1);
      ev = 1'b1; #1;
      case (c)
        0: chk(1, 1);
        1: chk(0, 2);
        default: chk(2, 0);
      endcase
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
