// r2b_converter -- residue-to-binary converter for {2^n-1, 2^n, 2^n+1}
//
// Converts the residues (x1, x2, x3) of X modulo (2^n-1, 2^n, 2^n+1) back to
// the binary X in 0..M-1, with M = 2^n(2^(2n)-1). It uses the core function
// with weights (0,1,0) and C(M) = 2^(2n)-1. With those weights the core is
// C(X) = floor(X / 2^n), and the conversion reduces to
//   X = 2^n * C(X) + x2,
// where C(X) is a weighted sum of the residues modulo 2^(2n)-1. So the whole
// converter is one modulo 2^(2n)-1 multi-operand adder with no multiplier, no
// lookup table and no division. The final step is only a concatenation.
//
// Structure (all combinational):
//   r2b_operand_gen  residues -> five 2n-bit operands (wiring and inverters)
//   csa_tree_eac     three CSA layers with end-around carry -> sum, carry
//   cpa_mod          modulo 2^(2n)-1 carry-propagate adder -> C(X)
//   {C(X), x2}       the binary result
// The core formula, the operand scheme, the three-layer CSA tree and the
// final adder follow the published architecture. The published figure is
// drawn for n = 3, which is the default here. The correction for the residue
// x3 = 2^n and the unique zero of the final adder are this design's own (see
// the submodules).
//
// Interface: x1, x2 (n bits), x3 (n+1 bits) in. core (2n bits) and x (3n bits) out.
// Any residue encoding is accepted: x1 = 2^n-1 acts as 0 modulo 2^n-1, and an
// x3 above 2^n acts as x3 - (2^n+1).
// The low n bits of x are x2 itself, wired through.
// Timing: combinational. Delay is one inverter, three full adders and the
// modulo adder.
module r2b_converter #(
  parameter int unsigned N = 3   // n, the exponent of the moduli; N >= 2
) (
  input  logic [N-1:0]   x1,     // residue modulo 2^n-1
  input  logic [N-1:0]   x2,     // residue modulo 2^n
  input  logic [N:0]     x3,     // residue modulo 2^n+1
  output logic [2*N-1:0] core,   // core function C(X) = floor(X / 2^n)
  output logic [3*N-1:0] x       // binary value X
);

  logic [2*N-1:0] op_a, op_b, op_c, op_d, op_e;
  logic [2*N-1:0] csa_sum, csa_carry;

  r2b_operand_gen #(.N(N)) u_opgen (
    .x1, .x2, .x3,
    .op_a, .op_b, .op_c, .op_d, .op_e
  );

  csa_tree_eac #(.N(N)) u_csa (
    .op_a, .op_b, .op_c, .op_d, .op_e,
    .sum(csa_sum), .carry(csa_carry)
  );

  cpa_mod #(.W(2 * N)) u_cpa (
    .a(csa_sum), .b(csa_carry), .s(core)
  );

  // X = 2^n * C(X) + |X|_(2^n): the shift and add is a concatenation
  assign x = {core, x2};

endmodule
