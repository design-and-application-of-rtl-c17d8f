// Checks the partial-product generator: every operand k must hold, as a
// positive-digit number, a * (the two multiplier bits 2k, 2k+1) * 4^k, every
// digit must be at most 2, and all operands together must sum to a * b.
module pp_gen_tb;
  import tern_pkg::*;
  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  logic [N-1:0] a, b;
  trit_t [2*N-1:0] ops [N/2];

  pp_gen #(.N(N)) dut (.a, .b, .ops);

  function automatic longint value(input trit_t [2*N-1:0] d);
    longint v = 0;
    for (int i = 2 * N - 1; i >= 0; i--) v = 2 * v + longint'(d[i]);
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic longint total = 0;
      a = (t == 0) ? '1 : N'($urandom);
      b = (t == 0) ? '1 : N'($urandom);
      #1;
      for (int k = 0; k < N / 2; k++) begin
        automatic longint exp = longint'(a) * longint'((b >> (2 * k)) & 3) << (2 * k);
        checks++;
        if (value(ops[k]) != exp) begin
          failures++;
          $display("FAIL: op %0d = %0d exp %0d", k, value(ops[k]), exp);
        end
        for (int i = 0; i < 2 * N; i++)
          if (ops[k][i] > T2) begin failures++; $display("FAIL: digit code 3"); end
        total += value(ops[k]);
      end
      checks++;
      if (total != longint'(a) * longint'(b)) begin
        failures++;
        $display("FAIL: total %0d exp %0d", total, longint'(a) * longint'(b));
      end
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
