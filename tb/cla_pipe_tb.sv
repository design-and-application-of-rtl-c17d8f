// Streams one addition per clock through the pipelined carry-lookahead
// adder and checks each sum (x + y mod 2^W) and that it appears exactly
// W/4 clocks after its operands.
module cla_pipe_tb;
  localparam int unsigned W   = 32;
  localparam int unsigned LAT = W / 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [W-1:0] p, g, sum;
  logic [W-1:0] expq [$];

  cla_pipe #(.W(W)) dut (.clk, .p, .g, .sum);

  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [W-1:0] x, y;
      @(negedge clk);
      x = (t == 0) ? '1 : W'($urandom);
      y = (t == 0) ? W'(1) : W'($urandom);
      p = x ^ y;
      g = x & y;
      expq.push_back(x + y);
      @(posedge clk);
      #1;
      if (expq.size() == LAT) begin
        automatic logic [W-1:0] e = expq.pop_front();
        checks++;
        if (sum != e) begin failures++; $display("FAIL: sum %h exp %h", sum, e); end
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
