// cpa_mod -- carry-propagate adder modulo 2^W-1 with end-around carry
//
// Adds the sum and carry vectors left by the CSA tree. The carry out of the
// most significant bit has weight 2^W = 1 (mod 2^W-1) and is added back at
// bit 0 (end-around carry). After that the result lies in 0..2^W-1. Modulo
// 2^W-1 both 0 and 2^W-1 (all ones) stand for zero. The converter needs the
// core in 0..2^W-2, so an all-ones result is mapped to 0. The end-around
// carry follows the published architecture. Its realisation as a second
// increment, and the zero mapping, are this design's own choices.
//
// Interface: W-bit a and b in. W-bit s = (a + b) mod (2^W-1) out, in 0..2^W-2.
// Timing: combinational, two carry-propagate additions deep.
module cpa_mod #(
  parameter int unsigned W = 6   // word width, 2n for the converter
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  logic [W:0]   raw;    // plain sum with carry out
  logic [W-1:0] wrap;   // sum with the carry out added back at bit 0

  always_comb begin
    raw  = {1'b0, a} + {1'b0, b};
    // if raw[W] is set, raw[W-1:0] <= 2^W-2, so this cannot overflow
    wrap = raw[W-1:0] + W'(raw[W]);
    s    = (&wrap) ? '0 : wrap;
  end

endmodule
