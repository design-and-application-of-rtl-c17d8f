// Pipelined N x N unsigned multiplier with a radix-2 positive-digit core.
//
// Binary operands in, binary product out; inside, numbers use the redundant
// digit set {0, 1, 2}, whose additions need no carry chain.
//   1. pp_gen pairs the N binary partial-product rows into N/2 positive-digit
//      operands (each digit a_i b_j + a_m b_n).
//   2. A balanced tree of log2(N/2) adders reduces them to one positive-digit
//      number. By default these are the one-stage adders (rpd_adder: R2A1
//      row, register, R2A4 row); TWO_STAGE_ADD = 1 selects the document's
//      other structure (rpd_adder2: R2A1, R2A2, R2A3 rows, two stages each).
//   3. rpd2bin splits it into two binary numbers and latches their carry
//      propagate and generate bits.
//   4. cla_pipe adds them, one 4-bit carry-lookahead slice per stage.
// Stages: log2(N/2) adder levels + 1 converter + N/2 slices, i.e. 12, 21 and
// 38 for N = 16, 32 and 64, the latencies the document gives (with
// TWO_STAGE_ADD each adder level costs two stages: 15, 25 and 43). One product
// per clock. The document counts pipeline stages; taking one stage as one
// clock, the tree pairing and the valid/reset handshake are this design's
// choices. Only the valid pipeline is reset (synchronously, rst_n low at a clk
// edge); data registers are not.
// Interface: a, b and in_valid are sampled at a rising clk edge, which loads
// the first of the LATENCY pipeline registers; product and out_valid are
// valid after the LATENCY-th rising edge counted from that one.
module tern_mult
  import tern_pkg::*;
#(
  parameter int unsigned N             = 16,   // power of two, >= 4
  parameter bit          TWO_STAGE_ADD = 1'b0  // adder structure, see above
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] p
);

  localparam int unsigned W       = 2 * N;
  localparam int unsigned OPS     = N / 2;
  localparam int unsigned LEVELS  = $clog2(OPS);
  localparam int unsigned ADD_ST  = TWO_STAGE_ADD ? 2 : 1;  // stages per adder
  localparam int unsigned LATENCY = ADD_ST * LEVELS + 1 + N / 2;

  // Operands of each tree level; level 0 comes from the generator.
  trit_t [W-1:0] lvl [LEVELS+1][OPS];
  logic  [OPS-1:0] ovf [LEVELS+1];

  pp_gen #(.N(N)) u_ppg (.a(a), .b(b), .ops(lvl[0]));
  assign ovf[0] = '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar k = 0; k < OPS; k++) begin : g_op
      if (k < (OPS >> (l + 1)) && TWO_STAGE_ADD) begin : g_add2
        rpd_adder2 #(.W(W)) u_add (
          .clk(clk),
          .x  (lvl[l][2*k]),
          .y  (lvl[l][2*k+1]),
          .s  (lvl[l+1][k]),
          .ovf(ovf[l+1][k])
        );
      end else if (k < (OPS >> (l + 1))) begin : g_add
        rpd_adder #(.W(W)) u_add (
          .clk(clk),
          .x  (lvl[l][2*k]),
          .y  (lvl[l][2*k+1]),
          .s  (lvl[l+1][k]),
          .ovf(ovf[l+1][k])
        );
      end else begin : g_unused
        assign lvl[l+1][k] = '0;
        assign ovf[l+1][k] = 1'b0;
      end
    end
  end

  logic [W-1:0] prop, gen;

  rpd2bin #(.W(W)) u_conv (.clk(clk), .s(lvl[LEVELS][0]), .p(prop), .g(gen));

  cla_pipe #(.W(W)) u_cla (.clk(clk), .p(prop), .g(gen), .sum(p));

  // Valid pipeline.
  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], in_valid};
  end

  assign out_valid = vpipe[LATENCY-1];

  // A tree sum never exceeds the product, so no adder may lose a carry.
  for (genvar l = 1; l <= LEVELS; l++) begin : g_chk
    a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
      vpipe[ADD_ST*l-1] |-> ovf[l] == '0);
  end

endmodule
