// fau_shared -- the shared field arithmetic unit: four LSD multipliers and one
// inverter used by both the point-doubling and the point-addition
// controllers.
//
// The left-to-right scalar multiplication never needs a doubling and an
// addition at the same time, so the multipliers and the inverter are built
// once and multiplexed between the two controllers; the adders are not
// shared, since a 54-bit XOR is cheaper than the multiplexers that sharing it
// would need. `sel` picks the controller that owns the unit (0: doubling,
// 1: addition); its starts and operands are forwarded, the done pulses go to
// it alone, and the results go to both. `sel` must not change while a
// multiplication or an inversion is running. The four multipliers always
// run together, so the done of lane 0 stands for all four.
// POLY selects the reduction polynomial (default x^54 + x^9 + 1; the design
// was also evaluated with a 19-term polynomial).
// Timing: a multiplication takes 16 clocks, an inversion at most 213.
// Sharing only the multipliers and the inverter follows the design
// description; the multiplexer, the done routing and the lock-step lanes are
// this design's own.
module fau_shared
  import hecc_pkg::*;
#(
  parameter felem_t POLY = POLY_LOW   // reduction polynomial below x^N
)
(
  input  logic clk,
  input  logic rst_n,
  input  logic sel,
  fau_if.server dbl,
  fau_if.server add
);

  logic              m_start, i_start;
  felem_t [NMUL-1:0] m_a, m_b, m_p;
  logic   [NMUL-1:0] m_busy, m_done;
  felem_t            i_a, i_q;
  logic              i_busy, i_done;

  always_comb begin
    if (sel) begin
      m_start = add.mul_start;  m_a = add.mul_a;  m_b = add.mul_b;
      i_start = add.inv_start;  i_a = add.inv_a;
    end else begin
      m_start = dbl.mul_start;  m_a = dbl.mul_a;  m_b = dbl.mul_b;
      i_start = dbl.inv_start;  i_a = dbl.inv_a;
    end
  end

  for (genvar g = 0; g < NMUL; g++) begin : g_mul
    gf_mul_lsd #(.POLY(POLY)) u_mul (
      .clk, .rst_n,
      .start (m_start),
      .a     (m_a[g]),
      .b     (m_b[g]),
      .busy  (m_busy[g]),
      .done  (m_done[g]),
      .p     (m_p[g])
    );
  end

  gf_inv #(.POLY(POLY)) u_inv (
    .clk, .rst_n,
    .start (i_start),
    .a     (i_a),
    .busy  (i_busy),
    .done  (i_done),
    .q     (i_q)
  );

  assign dbl.mul_done = m_done[0] & ~sel;
  assign add.mul_done = m_done[0] &  sel;
  assign dbl.inv_done = i_done & ~sel;
  assign add.inv_done = i_done &  sel;
  assign dbl.mul_p    = m_p;
  assign add.mul_p    = m_p;
  assign dbl.inv_q    = i_q;
  assign add.inv_q    = i_q;

  // A start must never reach a unit that is still working.
  a_mul_idle: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> !m_busy[0]);
  a_lanes:    assert property (@(posedge clk) disable iff (!rst_n)
                               m_done == {NMUL{m_done[0]}} && m_busy == {NMUL{m_busy[0]}});
  a_inv_idle: assert property (@(posedge clk) disable iff (!rst_n) i_start |-> !i_busy);

endmodule
