// R2A2: middle cell of the two-stage radix-2 positive-digit adder.
//
// Step 2 of the addition: the intermediate sum w_i of position i and the
// carry c1_{i-1} from position i-1 are added as
//   w_i + c1_{i-1} = v_i + 2 d_i,   v_i = w_i xor c1_{i-1},  d_i = w_i and c1_{i-1}
// v_i stays at position i and d_i goes to position i+1. The cell follows
// the document's two-stage adder, where it forms its own pipeline stage
// after R2A1; the clocked dynamic gates of the circuit are reduced here to
// their logic function. Purely combinational.
module r2a2 (
  input  logic w_i,
  input  logic c1_im1,
  output logic v_i,
  output logic d_i
);

  assign v_i = w_i ^ c1_im1;
  assign d_i = w_i & c1_im1;

endmodule
