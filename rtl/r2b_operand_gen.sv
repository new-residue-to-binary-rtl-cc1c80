// r2b_operand_gen -- operand formation for the core-function reverse converter
//
// For the moduli set {2^n-1, 2^n, 2^n+1} with core weights (0,1,0) the core
// is C(X) = floor(X / 2^n) and can be computed from the residues as
//
//   C(X) = | x1*(2^(2n-1) + 2^(n-1)) - x2*2^n - x3*2^(2n-1) + x3*2^(n-1) |  mod 2^(2n)-1
//
// This module turns that sum into five 2n-bit vectors using only wiring and
// inverters, so the adder tree behind it never subtracts:
//
//   op_a  x1*2^(2n-1) + x1*2^(n-1). The two copies of x1 do not overlap. Bits
//         that would sit at 2^(2n) and above wrap to bit 0 upward, because
//         2^(2n) = 1 modulo 2^(2n)-1.
//   op_b  -x2*2^n, formed as the one's complement of x2*2^n: ~x2 over n ones.
//   op_c  -x3*2^(2n-1), formed as the (3n)-bit word {~x3, 2n-1 ones}. Its low
//         2n bits are op_c. Its n upper bits ~x3[n:1] lie past 2^(2n)-1 and are
//         folded back to bits n-1..0. These folded bits are the end-around bits
//         carried in op_e.
//   op_d  x3*2^(n-1), all n+1 bits of x3.
//   op_e  the folded bits ~x3[n:1] in bits n-1..0, and the correction constant
//         2^(2n)-2^n (ones in bits 2n-1..n) in the upper half. The constant
//         cancels the all-ones offsets that the complements add:
//         (2^(2n)-1) + (2^(3n)-1) + (2^(2n)-2^n) = 0 modulo 2^(2n)-1.
//
// The operand set, the use of one's complements instead of subtraction and
// the end-around bits follow the published scheme. One point is this design's
// own: operand C keeps the top bit x3[n]. For x3 = 2^n the residue 2^n+1 has
// bit n set. Dropping ~x3[n] (with correction constant 2^(2n)-2^(n-1))
// gives a core that is off by 2^(n-1) for that residue, so the bit is kept and
// the constant becomes 2^(2n)-2^n. Any (n+1)-bit x3 then contributes the
// correct value modulo 2^(2n)-1.
//
// Interface: x1 (n bits), x2 (n bits), x3 (n+1 bits) in. Five 2n-bit operands out.
// Timing: purely combinational, one inverter level deep.
// Most output bits are constants or straight copies of input bits. That is
// intended: the operand formation is wiring, and only inverters are gates.
module r2b_operand_gen #(
  parameter int unsigned N = 3   // n, the exponent of the moduli; N >= 2
) (
  input  logic [N-1:0]   x1,     // residue modulo 2^n-1
  input  logic [N-1:0]   x2,     // residue modulo 2^n
  input  logic [N:0]     x3,     // residue modulo 2^n+1
  output logic [2*N-1:0] op_a,
  output logic [2*N-1:0] op_b,
  output logic [2*N-1:0] op_c,
  output logic [2*N-1:0] op_d,
  output logic [2*N-1:0] op_e
);

  // x1*2^(2n-1) wraps to {x1[0] at bit 2n-1, x1[n-1:1] at bits n-2..0};
  // x1*2^(n-1) fills bits 2n-2..n-1.
  assign op_a = {x1[0], x1, x1[N-1:1]};

  // 2^(2n)-1 - x2*2^n
  assign op_b = {~x2, {N{1'b1}}};

  // low 2n bits of 2^(3n)-1 - x3*2^(2n-1)
  assign op_c = {~x3[0], {(2*N-1){1'b1}}};

  // x3*2^(n-1)
  assign op_d = {x3, {(N-1){1'b0}}};

  // correction constant 2^(2n)-2^n, and the upper bits of operand C folded back
  assign op_e = {{N{1'b1}}, ~x3[N:1]};

endmodule
