// csa_tree_eac -- three-layer carry-save tree modulo 2^(2n)-1
//
// Reduces the five operand vectors of the converter to one sum and one carry
// vector. Every layer is a csa_eac row of 2n full adders with end-around
// carry:
//   layer 1: op_a + op_b + op_c          (terms of the core sum)
//   layer 2: sum1 + carry1 + op_d        (last term of the core sum)
//   layer 3: sum2 + carry2 + op_e        (folded end-around bits and the
//                                          correction constant)
// The three layers and their roles (layers 1-2 the terms, layer 3 the
// end-around bits) follow the published architecture. How the operands are
// spread over the layers is this design's own choice. The tree uses 6n full
// adders and has a depth of three full adders.
//
// Interface: five 2n-bit operands in, 2n-bit sum and carry out, with
//   op_a+op_b+op_c+op_d+op_e = sum + carry (mod 2^(2n)-1).
// Timing: combinational, three full-adder delays.
module csa_tree_eac #(
  parameter int unsigned N = 3   // n; the vectors are 2n bits wide
) (
  input  logic [2*N-1:0] op_a,
  input  logic [2*N-1:0] op_b,
  input  logic [2*N-1:0] op_c,
  input  logic [2*N-1:0] op_d,
  input  logic [2*N-1:0] op_e,
  output logic [2*N-1:0] sum,
  output logic [2*N-1:0] carry
);

  localparam int unsigned W = 2 * N;

  logic [W-1:0] s1, c1, s2, c2;

  csa_eac #(.W(W)) u_layer1 (.a(op_a), .b(op_b), .c(op_c), .sum(s1),  .carry(c1));
  csa_eac #(.W(W)) u_layer2 (.a(s1),   .b(c1),   .c(op_d), .sum(s2),  .carry(c2));
  csa_eac #(.W(W)) u_layer3 (.a(s2),   .b(c2),   .c(op_e), .sum(sum), .carry(carry));

endmodule
