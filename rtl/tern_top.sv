// Top level: the pipelined multiplier and the dynamic ternary logic circuits.
//
// Two parts stand side by side, each with its own ports:
//   * tern_mult, the N x N binary multiplier whose interior works in the
//     radix-2 positive-digit code {0, 1, 2} (clocked by clk, one product per
//     clock, latency log2(N/2) + 1 + N/2 clocks). TWO_STAGE_ADD selects
//     the two-stage adder structure inside it (default: one-stage adders).
//   * the ternary circuit family clocked by the two-phase clock phi / phi-bar
//     (phi-bar is derived here as ~phi): a literal decoder, the two-stage
//     cycling-gate pipeline, the decoder + STDL building block for the
//     three-input example function (result while phi is high) and the
//     three-input STDL STNAND (evaluates while phi is low).
// The two-phase clock generator and the 1/3 VDD and 2/3 VDD level generators
// are analog and lie outside; phi comes in as a port.
module tern_top
  import tern_pkg::*;
#(
  parameter int unsigned N             = 16,
  parameter bit          TWO_STAGE_ADD = 1'b0
) (
  // multiplier
  input  logic           clk,
  input  logic           rst_n,
  input  logic           mul_valid_i,
  input  logic [N-1:0]   mul_a,
  input  logic [N-1:0]   mul_b,
  output logic           mul_valid_o,
  output logic [2*N-1:0] mul_p,
  // ternary logic, two-phase clocked
  input  logic           phi,
  input  trit_t          dec_x,
  output literals_t      dec_lit,
  output literals_t      dec_lit_inv,
  input  trit_t          cyc_x,
  output trit_t          cyc_mid,
  output trit_t          cyc_y,
  input  trit_t          kmap_a,
  input  trit_t          kmap_b,
  input  trit_t          kmap_c,
  output trit_t          kmap_q,
  output trit_t          kmap_qn,
  input  trit_t          nand_x,
  input  trit_t          nand_y,
  input  trit_t          nand_z,
  output trit_t          nand_q,
  output trit_t          nand_qn
);

  tern_mult #(.N(N), .TWO_STAGE_ADD(TWO_STAGE_ADD)) u_mult (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (mul_valid_i),
    .a        (mul_a),
    .b        (mul_b),
    .out_valid(mul_valid_o),
    .p        (mul_p)
  );

  tern_decoder u_dec (.phi(phi), .x(dec_x), .lit(dec_lit), .lit_inv(dec_lit_inv));

  cycle_pipe u_cyc (.phi(phi), .x(cyc_x), .y(cyc_y), .y_mid(cyc_mid));

  tern_block u_kmap (
    .phi(phi), .a(kmap_a), .b(kmap_b), .c(kmap_c), .q(kmap_q), .qn(kmap_qn)
  );

  stdl_stnand3 u_nand3 (
    .ev(~phi), .x(nand_x), .y(nand_y), .z(nand_z), .q(nand_q), .qn(nand_qn)
  );

endmodule
