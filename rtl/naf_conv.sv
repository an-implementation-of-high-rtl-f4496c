// naf_conv -- scalar recoder: gives the non-adjacent form (NAF) digits of the
// scalar k, and its plain binary digits, at a digit index chosen by the
// caller.
//
// The NAF of k has digits s_i in {-1, 0, 1}, no two adjacent digits
// non-zero, and one more digit than k has bits. It is read off 3k:
// s_i = (3k)_(i+1) - k_(i+1), i = 0 .. KB. At `load` the unit stores k and
// computes 3k = k + 2k once with a KB+2-bit adder; afterwards every digit is
// a two-bit function of the stored words, so the main controller can walk
// the digits from the most significant one downward (left to right) as the
// double-and-add loop consumes them, with no carry chain per digit. The
// left-to-right digit order follows the design description; obtaining the
// digits from 3k, rather than by a digit-serial carry recurrence, is this
// design's choice and gives the same NAF.
//
// Interface: `load` samples `k`. Combinational outputs for digit `idx`:
// `naf_nz`/`naf_neg` (NAF digit non-zero / equal to -1), `bin_bit` (bit idx of
// k) and `bin_above_zero` (all bits of k above idx are zero).
// Timing: the digits are valid from the clock after `load`.
module naf_conv
  import hecc_pkg::*;
#(
  parameter int unsigned KB = hecc_pkg::KBITS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic [KB-1:0]             k,
  input  logic [$clog2(KB+2)-1:0]   idx,
  output logic                      naf_nz,
  output logic                      naf_neg,
  output logic                      bin_bit,
  output logic                      bin_above_zero
);

  logic [KB+1:0] kx;   // k, zero-extended
  logic [KB+1:0] h3;   // 3k

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kx <= '0;
      h3 <= '0;
    end else if (load) begin
      kx <= (KB+2)'(k);
      h3 <= (KB+2)'(k) + ((KB+2)'(k) << 1);
    end
  end

  logic hb, kb;
  always_comb begin
    hb = (32'(idx) + 1 < KB + 2) ? h3[idx + 1'b1] : 1'b0;
    kb = (32'(idx) + 1 < KB + 2) ? kx[idx + 1'b1] : 1'b0;
    naf_nz  = hb ^ kb;
    naf_neg = kb & ~hb;
    bin_bit = (32'(idx) < KB + 2) ? kx[idx] : 1'b0;
    bin_above_zero = ((kx >> idx) >> 1) == '0;
  end

endmodule
