// gf_add -- field adder in GF(2^N): carry-free addition of two polynomials,
// one XOR gate per coefficient (54 gates for N = 54).
//
// Each point-arithmetic controller holds four of these, one in front of the
// first operand of each multiplier, so that a multiplier can be fed the sum
// of two stored values without an extra cycle. Purely combinational.
// Interface: inputs a, b, output y = a + b, all W bits.
// The XOR adder and the count of four per controller follow the design
// description; placing them on the multiplier operands is this design's choice.
module gf_add #(
  parameter int unsigned W = hecc_pkg::N
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a ^ b;
endmodule
