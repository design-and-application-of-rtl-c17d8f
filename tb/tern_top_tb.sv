// End-to-end testbench of the top level at its default parameters.
//
// Multiplier: streams corner and random 16 x 16-bit operand pairs with
// random idle cycles, checks each product against a * b and its latency of
// 12 clocks. Ternary circuits, on the two-phase clock phi: random inputs to
// the literal decoder, the two-stage cycling pipeline, the decoder + STDL
// building block of the K-map example and the STDL three-input NAND, each checked against its own truth table
// (literal table, cycling table, the example's K-map, 2 - min). Counted
// mechanisms, each of which must occur: back-to-back products, pipeline
// bubbles, every output level 0/1/2 of each ternary circuit, and the preset
// level of the dynamic outputs while phi is high.
module tern_top_tb;
  import tern_pkg::*;
  localparam int unsigned N   = 16;
  localparam int unsigned LAT = 12;
  localparam int          NUM = 1500;

  int checks = 0, failures = 0;

  logic           clk = 1'b0, rst_n, mul_valid_i, mul_valid_o;
  logic [N-1:0]   mul_a, mul_b;
  logic [2*N-1:0] mul_p;
  logic           phi = 1'b1;
  trit_t          dec_x, cyc_x, cyc_mid, cyc_y;
  trit_t          kmap_a, kmap_b, kmap_c, kmap_q, kmap_qn;
  trit_t          nand_x, nand_y, nand_z, nand_q, nand_qn;
  literals_t      dec_lit, dec_lit_inv;

  tern_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- multiplier ----------------
  typedef struct { logic [2*N-1:0] prod; longint issued; } exp_t;
  exp_t   q[$];
  longint cycle = 0;
  int     n_products = 0, n_back_to_back = 0, n_bubbles = 0;
  logic   last_out_valid = 1'b0;
  bit     mult_done = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    #1;
    if (rst_n && mul_valid_o) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected product");
      end else begin
        e = q.pop_front();
        if (mul_p !== e.prod || cycle - e.issued != LAT) begin
          failures++;
          $display("FAIL: product %h exp %h latency %0d", mul_p, e.prod, cycle - e.issued);
        end
        n_products++;
        if (last_out_valid) n_back_to_back++;
      end
    end
    if (rst_n && last_out_valid && !mul_valid_o && q.size() != 0) n_bubbles++;
    last_out_valid = rst_n && mul_valid_o;
  end

  task automatic issue(input logic [N-1:0] xa, input logic [N-1:0] xb);
    @(posedge clk);
    #2;
    mul_valid_i = 1'b1;
    mul_a = xa;
    mul_b = xb;
    q.push_back('{prod: (2*N)'(xa) * (2*N)'(xb), issued: cycle});
  endtask

  initial begin
    rst_n = 1'b0;
    mul_valid_i = 1'b0;
    mul_a = '0;
    mul_b = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    issue('1, '1);
    issue('0, '1);
    issue(16'h8000, 16'hFFFF);
    for (int i = 0; i < NUM; i++) begin
      issue(N'($urandom), N'($urandom));
      if ($urandom_range(0, 5) == 0) begin
        @(posedge clk);
        #2 mul_valid_i = 1'b0;
      end
    end
    @(posedge clk);
    #2 mul_valid_i = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d products lost", q.size()); end
    mult_done = 1'b1;
  end

  // ---------------- ternary circuits on phi ----------------
  localparam int CYC [3] = '{2, 0, 1};
  localparam int KMAP [3][3][3] = '{
    '{'{0, 0, 1}, '{0, 1, 1}, '{0, 1, 1}},
    '{'{0, 1, 1}, '{1, 1, 1}, '{1, 1, 2}},
    '{'{1, 1, 2}, '{1, 1, 2}, '{2, 2, 2}}};
  localparam logic [5:0] LIT [3] = '{6'b100101, 6'b010110, 6'b001011};

  int  n_dec [3], n_cyc [3], n_kmap [3], n_nand [3];
  int  n_preset = 0;
  bit  tern_done = 1'b0;

  function automatic logic [5:0] pack(input literals_t l);
    return {l.l0, l.l1, l.l2, l.l01, l.l12, l.l02};
  endfunction

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int dv, cv, av, bv, kv, xv, yv, zv, m, prev_c;
    prev_c = -1;
    foreach (n_dec[i]) begin n_dec[i] = 0; n_cyc[i] = 0; n_kmap[i] = 0; n_nand[i] = 0; end
    for (int i = 0; i < 400; i++) begin
      dv = $urandom_range(0, 2); cv = $urandom_range(0, 2);
      av = $urandom_range(0, 2); bv = $urandom_range(0, 2); kv = $urandom_range(0, 2);
      xv = $urandom_range(0, 2); yv = $urandom_range(0, 2); zv = $urandom_range(0, 2);
      if (i % 9 == 0) begin xv = 2; yv = 2; zv = 2; end   // exercise the all-2 input
      // low phase: phi sections evaluate
      phi    = 1'b0;
      dec_x  = trit_t'(dv);
      cyc_x  = trit_t'(cv);
      kmap_a = trit_t'(av); kmap_b = trit_t'(bv); kmap_c = trit_t'(kv);
      nand_x = trit_t'(xv); nand_y = trit_t'(yv); nand_z = trit_t'(zv);
      #8;
      expect_eq(int'(kmap_q), 1, "kmap preset");
      m = xv; if (yv < m) m = yv; if (zv < m) m = zv;
      expect_eq(int'(nand_q), 2 - m, "stnand3 q");
      expect_eq(int'(nand_qn), m, "stnand3 qn");
      n_nand[2 - m]++;
      if (prev_c >= 0) begin
        expect_eq(int'(cyc_y), CYC[CYC[prev_c]], "cycle y");
        n_cyc[CYC[CYC[prev_c]]]++;
      end
      #2;
      // high phase: phi-bar sections evaluate, phi sections preset
      phi = 1'b1;
      dec_x = trit_t'($urandom_range(0, 2));
      cyc_x = trit_t'($urandom_range(0, 2));
      kmap_a = trit_t'($urandom_range(0, 2));
      kmap_b = trit_t'($urandom_range(0, 2));
      kmap_c = trit_t'($urandom_range(0, 2));
      #8;
      expect_eq(int'(kmap_q), KMAP[kv][bv][av], "kmap q");
      expect_eq(int'(kmap_qn), 2 - KMAP[kv][bv][av], "kmap qn");
      n_kmap[KMAP[kv][bv][av]]++;
      checks++;
      if (pack(dec_lit) != LIT[dv] || pack(dec_lit_inv) != LIT[dv]) begin
        failures++;
        $display("FAIL: decoder x=%0d lit=%b", dv, pack(dec_lit));
      end
      n_dec[dv]++;
      expect_eq(int'(cyc_mid), CYC[cv], "cycle mid");
      expect_eq(int'(nand_q), 1, "stnand3 preset");
      expect_eq(int'(cyc_y), 1, "cycle preset");
      n_preset++;
      prev_c = cv;
      #2;
    end
    tern_done = 1'b1;
  end

  // ---------------- end ----------------
  initial begin
    wait (mult_done && tern_done);
    $display("mechanisms: products=%0d back_to_back=%0d bubbles=%0d presets=%0d",
             n_products, n_back_to_back, n_bubbles, n_preset);
    checks++;
    if (n_products == 0 || n_back_to_back == 0 || n_bubbles == 0 || n_preset == 0) begin
      failures++;
      $display("FAIL: a multiplier or preset mechanism never occurred");
    end
    for (int v = 0; v < 3; v++) begin
      $display("level %0d: decoder=%0d cycle=%0d kmap=%0d stnand3=%0d",
               v, n_dec[v], n_cyc[v], n_kmap[v], n_nand[v]);
      checks++;
      if (n_dec[v] == 0 || n_cyc[v] == 0 || n_kmap[v] == 0 || n_nand[v] == 0) begin
        failures++;
        $display("FAIL: level %0d never seen on some ternary output", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NUM * 3 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
