// Checks the two-stage cycling-gate pipeline: with the cycling table
// 0 -> 2, 1 -> 0, 2 -> 1, the first gate's output during the phi-high phase
// that follows an input, the second gate's output during the next phi-low
// phase, and the preset level 1 of the second gate during phi high.
// Inputs change every phi period, so successive data overlap in the pipe.
module cycle_pipe_tb;
  import tern_pkg::*;
  int checks = 0, failures = 0;
  logic  phi = 1'b1;
  trit_t x, y, y_mid;

  cycle_pipe dut (.phi, .x, .y, .y_mid);

  localparam int CYC [3] = '{2, 0, 1};

  int prev = -1;

  initial begin
    for (int i = 0; i < 80; i++) begin
      automatic int v = (i < 3) ? i : $urandom_range(0, 2);
      phi = 1'b0;               // phi section evaluates
      x = trit_t'(v);
      #4;
      if (prev >= 0) begin      // second gate result of the previous input
        checks++;
        if (int'(y) != CYC[CYC[prev]]) begin
          failures++;
          $display("FAIL: y=%0d for x=%0d exp %0d", y, prev, CYC[CYC[prev]]);
        end
      end
      #1 phi = 1'b1;            // phi-bar section evaluates
      x = trit_t'($urandom_range(0, 2));
      #4;
      checks++;
      if (int'(y_mid) != CYC[v]) begin
        failures++;
        $display("FAIL: y_mid=%0d for x=%0d exp %0d", y_mid, v, CYC[v]);
      end
      checks++;
      if (y != T1) begin failures++; $display("FAIL: y not preset, %0d", y); end
      #1;
      prev = v;
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
