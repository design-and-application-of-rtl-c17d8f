// Runs the multiplier at the two larger sizes of the comparison table,
// 32 x 32 and 64 x 64 bits, side by side. Each instance streams random
// operands (with corner cases and idle cycles); every product is checked
// against a * b and its latency against the stage counts 21 and 38.
module tern_mult_sizes_tb;
  localparam int NUM = 600;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n;
  longint cycle = 0;
  bit done32 = 1'b0, done64 = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- 32 x 32 ----------------
  logic        v32_i, v32_o;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  typedef struct { logic [63:0] prod; longint issued; } e32_t;
  e32_t q32[$];

  tern_mult #(.N(32)) u32 (.clk, .rst_n, .in_valid(v32_i), .a(a32), .b(b32),
                           .out_valid(v32_o), .p(p32));

  always @(posedge clk) begin
    #1;
    if (rst_n && v32_o) begin
      e32_t e;
      checks++;
      if (q32.size() == 0) begin failures++; $display("FAIL: 32: unexpected"); end
      else begin
        e = q32.pop_front();
        if (p32 !== e.prod || cycle - e.issued != 21) begin
          failures++;
          $display("FAIL: 32: %h exp %h latency %0d", p32, e.prod, cycle - e.issued);
        end
      end
    end
  end

  // ---------------- 64 x 64 ----------------
  logic         v64_i, v64_o;
  logic [63:0]  a64, b64;
  logic [127:0] p64;
  typedef struct { logic [127:0] prod; longint issued; } e64_t;
  e64_t q64[$];

  tern_mult #(.N(64)) u64 (.clk, .rst_n, .in_valid(v64_i), .a(a64), .b(b64),
                           .out_valid(v64_o), .p(p64));

  always @(posedge clk) begin
    #1;
    if (rst_n && v64_o) begin
      e64_t e;
      checks++;
      if (q64.size() == 0) begin failures++; $display("FAIL: 64: unexpected"); end
      else begin
        e = q64.pop_front();
        if (p64 !== e.prod || cycle - e.issued != 38) begin
          failures++;
          $display("FAIL: 64: %h exp %h latency %0d", p64, e.prod, cycle - e.issued);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    v32_i = 1'b0; v64_i = 1'b0;
    a32 = '0; b32 = '0; a64 = '0; b64 = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < NUM; i++) begin
      @(posedge clk);
      #2;
      v32_i = ($urandom_range(0, 4) != 0);
      v64_i = ($urandom_range(0, 4) != 0);
      a32 = (i == 0) ? '1 : $urandom;
      b32 = (i == 0) ? '1 : $urandom;
      a64 = (i == 0) ? '1 : {$urandom, $urandom};
      b64 = (i == 0) ? '1 : {$urandom, $urandom};
      if (i == 0) begin v32_i = 1'b1; v64_i = 1'b1; end
      if (v32_i) q32.push_back('{prod: 64'(a32) * 64'(b32), issued: cycle});
      if (v64_i) q64.push_back('{prod: 128'(a64) * 128'(b64), issued: cycle});
    end
    @(posedge clk);
    #2 begin v32_i = 1'b0; v64_i = 1'b0; end
    repeat (45) @(posedge clk);
    checks++;
    if (q32.size() != 0 || q64.size() != 0) begin
      failures++;
      $display("FAIL: products lost: %0d / %0d", q32.size(), q64.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NUM * 2 + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
