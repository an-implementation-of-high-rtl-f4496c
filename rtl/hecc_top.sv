// hecc_top -- genus-3 hyperelliptic curve scalar multiplier over GF(2^54):
// computes the divisor k*P on y^2 + y = x^7 + x^5 + x^4 + x + 1.
//
// Three levels: the main controller (scalar multiplication level, with the
// NAF recoder) issues point doublings and additions; a point-doubling and a
// point-addition controller (point arithmetic level) each run their
// explicit formula as a fixed schedule with their own registers and field
// adders; both share one field arithmetic unit of four digit-serial
// multipliers (digit size 4) and one inverter (field arithmetic level). The
// sharing is the "shared multipliers and inverter" organisation of the
// design, possible because left-to-right double-and-add never needs both
// point operations at once.
//
// Interface: `start` (one cycle, while `busy` is low) samples `k`, `p` and
// `naf_mode` (1: left-to-right NAF, 0: right-to-left binary). `done` pulses
// when `r` = k*P is valid; `fail` marks k = 0 or an exceptional case of the
// explicit formulae (for which Cantor's general algorithm would be needed).
// `p` must be a reduced divisor of weight three (deg u = 3). The parameter
// POLY picks the field's reduction polynomial x^54 + POLY: the default is
// the trinomial x^54 + x^9 + 1, and the 19-term polynomial the design was
// also evaluated with works the same way.
// Reset: `rst_n` clears every register asynchronously; the handshake
// assertions in the field unit also use it in `disable iff`, which lint
// reports as a reset used both ways. That report is expected.
// Timing: about 270 clocks per doubling and 480 per addition; a 162-bit
// scalar in NAF mode needs about 161 doublings and 54 additions, roughly
// 70,000 clocks.
// The three levels, the sharing and the curve follow the design
// description; the 162-bit scalar width, the handshake and the `fail` output
// are this design's choices.
module hecc_top
  import hecc_pkg::*;
#(
  parameter felem_t POLY = POLY_LOW   // reduction polynomial below x^54
)
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             naf_mode,
  input  logic [KBITS-1:0] k,
  input  divisor_t         p,
  output logic             busy,
  output logic             done,
  output logic             fail,
  output divisor_t         r
);

  logic     dbl_start, dbl_done, dbl_fail;
  logic     add_start, add_done, add_fail;
  divisor_t dbl_in, dbl_out, add_in1, add_in2, add_out;
  logic     fau_sel;

  fau_if fau_dbl ();
  fau_if fau_add ();

  main_control #(.KB(KBITS)) u_mc (
    .clk, .rst_n, .start, .naf_mode, .k, .p, .busy, .done, .fail, .r,
    .dbl_start, .dbl_in, .dbl_done, .dbl_fail, .dbl_out,
    .add_start, .add_in1, .add_in2, .add_done, .add_fail, .add_out,
    .fau_sel
  );

  point_dbl u_dbl (
    .clk, .rst_n,
    .start (dbl_start),
    .d1    (dbl_in),
    .done  (dbl_done),
    .fail  (dbl_fail),
    .d3    (dbl_out),
    .fau   (fau_dbl)
  );

  point_add u_add (
    .clk, .rst_n,
    .start (add_start),
    .d1    (add_in1),
    .d2    (add_in2),
    .done  (add_done),
    .fail  (add_fail),
    .d3    (add_out),
    .fau   (fau_add)
  );

  fau_shared #(.POLY(POLY)) u_fau (
    .clk, .rst_n,
    .sel (fau_sel),
    .dbl (fau_dbl),
    .add (fau_add)
  );

endmodule
