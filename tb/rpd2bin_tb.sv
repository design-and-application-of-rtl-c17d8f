// Checks the positive-digit to binary converter: one clock after the digits
// are applied, p and g must equal a xor 2b and a and 2b for the bit vectors
// a = (digit == 1), b = (digit == 2), and the sum of the two binary numbers
// must equal the value of the digit vector.
module rpd2bin_tb;
  import tern_pkg::*;
  localparam int unsigned W = 32;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  trit_t [W-1:0] s;
  logic [W-1:0] p, g;

  rpd2bin #(.W(W)) dut (.clk, .s, .p, .g);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] av, bv;
      automatic longint val = 0;
      @(negedge clk);
      for (int i = 0; i < W; i++) begin
        s[i] = trit_t'((t < 3) ? t : $urandom_range(0, 2));
        if (i == W - 1) s[i] = (s[i] == T2) ? T1 : s[i];   // keep the value below 2^W
      end
      for (int i = W - 1; i >= 0; i--) val = 2 * val + longint'(s[i]);
      for (int i = 0; i < W; i++) begin
        av[i] = (s[i] == T1);
        bv[i] = (s[i] == T2);
      end
      @(posedge clk);
      #1;
      checks++;
      if (p != (av ^ (bv << 1)) || g != (av & (bv << 1))) begin
        failures++;
        $display("FAIL: p=%h g=%h", p, g);
      end
      checks++;
      // x + y = (x xor y) + 2 (x and y)
      if (longint'(p) + 2 * longint'(g) != val) begin
        failures++;
        $display("FAIL: value %0d exp %0d", longint'(p) + 2 * longint'(g), val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
