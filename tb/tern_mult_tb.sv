// Self-checking testbench of the pipelined multiplier at its default size.
//
// Feeds corner operands and random operands with random idle cycles, keeps
// the expected products (a * b, computed by the testbench) with their issue
// cycle, and checks every product, that it arrives exactly LAT clocks after
// its operands (12 for 16 x 16 bits, the latency the document tables), that
// out_valid never appears without a pending operation, and that no
// operation is lost. A watchdog ends the run.
module tern_mult_tb;
  localparam int unsigned N   = 16;
  localparam int unsigned LAT = 12;
  localparam int          NUM = 2000;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   a, b;
  logic           out_valid;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  longint cycle = 0;

  tern_mult dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .p);

  always #5 clk = ~clk;

  typedef struct { logic [2*N-1:0] prod; longint issued; } exp_t;
  exp_t q[$];

  always @(posedge clk) cycle <= cycle + 1;

  // Checker: sample just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected out_valid at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (p !== e.prod) begin
          failures++;
          $display("FAIL: product %h expected %h", p, e.prod);
        end
        checks++;
        if (cycle - e.issued != LAT) begin
          failures++;
          $display("FAIL: latency %0d expected %0d", cycle - e.issued, LAT);
        end
      end
    end
  end

  task automatic issue(input logic [N-1:0] xa, input logic [N-1:0] xb);
    @(posedge clk);
    #2;
    in_valid = 1'b1;
    a = xa;
    b = xb;
    // the operands pass LAT registers, the first at the next rising edge
    q.push_back('{prod: (2*N)'(xa) * (2*N)'(xb), issued: cycle});
  endtask

  task automatic idle();
    @(posedge clk);
    #2;
    in_valid = 1'b0;
    a = N'($urandom);
    b = N'($urandom);
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    issue('0, '0);
    issue('1, '1);
    issue('1, 1);
    issue(1, '1);
    issue({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});
    issue(16'hAAAA, 16'h5555);
    issue(16'h5555, 16'h5555);
    issue(16'hAAAA, 16'hAAAA);
    for (int i = 0; i < NUM; i++) begin
      issue(N'($urandom), N'($urandom));
      if ($urandom_range(0, 7) == 0) idle();
    end
    idle();
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d products never appeared", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NUM * 3 + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
