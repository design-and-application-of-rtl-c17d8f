// Streams random positive-digit operand pairs through the one-stage adder
// and checks, one clock later, the value of the sum digits, the digit range
// and the overflow flag. Operands are drawn so the sum fits in W digits,
// except for a few deliberately overflowing pairs that must raise ovf.
module rpd_adder_tb;
  import tern_pkg::*;
  localparam int unsigned W = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  trit_t [W-1:0] x, y, s;
  logic ovf;
  int n_ovf = 0;

  rpd_adder #(.W(W)) dut (.clk, .x, .y, .s, .ovf);

  always #5 clk = ~clk;

  function automatic longint value(input trit_t [W-1:0] d);
    longint v = 0;
    for (int i = W - 1; i >= 0; i--) v = 2 * v + longint'(d[i]);
    return v;
  endfunction

  function automatic trit_t [W-1:0] rnd(input int top);
    trit_t [W-1:0] d = '0;
    for (int i = 0; i < top; i++) d[i] = trit_t'($urandom_range(0, 2));
    return d;
  endfunction

  longint exp_v;
  logic   exp_ovf;
  logic   have = 1'b0;

  initial begin
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (t % 50 == 7) begin
        x = rnd(W); y = rnd(W);
        x[W-1] = T2; y[W-1] = T2;   // 2 * 2^(W-1) * 2 >= 2^W
      end else begin
        automatic int top = $urandom_range(1, W - 2);
        x = rnd(top); y = rnd(top);
      end
      @(posedge clk);
      #1;
      exp_v   = value(x) + value(y);
      exp_ovf = exp_v >= (longint'(1) << W);
      checks++;
      if (exp_ovf) begin
        n_ovf++;
        if (!ovf) begin failures++; $display("FAIL: overflow not flagged"); end
      end else if (ovf || value(s) != exp_v) begin
        failures++;
        $display("FAIL: sum %0d exp %0d ovf=%0d", value(s), exp_v, ovf);
      end
      for (int i = 0; i < W; i++)
        if (s[i] > T2) begin failures++; $display("FAIL: digit code 3"); end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL: no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
