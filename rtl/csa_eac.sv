// csa_eac -- one carry-save adder layer modulo 2^W-1 with end-around carry
//
// A row of W full adders reduces three W-bit vectors to a sum vector and a
// carry vector. In an ordinary CSA the carry vector is the majority vector
// shifted left by one, and its top bit falls out at weight 2^W. Modulo 2^W-1
// that weight equals 1, so the bit is wired back into position 0. The layer
// therefore keeps
//   a + b + c = sum + carry   (mod 2^W-1)
// with no widening and no extra logic: the end-around carry costs only wiring.
//
// Interface: three W-bit inputs, W-bit sum and carry outputs.
// Timing: combinational, one full-adder delay.
module csa_eac #(
  parameter int unsigned W = 6   // word width, 2n for the converter
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    // rotate left by one: the carry out of bit W-1 re-enters at bit 0
    carry = {maj[W-2:0], maj[W-1]};
  end

endmodule
