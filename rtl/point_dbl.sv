// point_dbl -- point (divisor) doubling D3 = 2*D1 on the genus-3 curve
// y^2 + y = f(x), by the inversion-based explicit formula for binary fields
// with h(x) = 1: one inversion, 11 multiplications and 11 squarings.
//
// The controller is a fixed schedule. In each round it starts the four
// shared multipliers together (squarings are ordinary multiplications, and
// idle lanes multiply zeros), waits for the products and stores them in
// registers; every field addition is an XOR of stored values, done by the
// lane pre-adders (gf_add) in front of the multipliers or combinationally
// where a result is formed. The nine rounds are
//   R0  uc0 = a0^2, uc2 = a1^2, uc4 = a2^2, t0 = c0^2
//   R1  t1 = c1^2, t2 = c2^2, t5 = vc3^2          then T3 = 1/vc5
//   R2  uT1 = T3^2, t4 = vc4^2
//   R3  t6 = uT1*t4, t7 = uT1*t5
//   R4  t9, T10, T11 = uT2 * (uc4, vc5, vc4)
//   R5  t12 = vc4*uT0, t15 = (vc4+vc5)*(uT0+uT1)
//   R6  e2 = vT3^2, t17 = vT2^2
//   R7  t18 = e2*uT2, t20 = vT3*e1, t21 = vT3*e2
//   R8  t19 = vT3*e0
// The formula and its variable names follow the design description; the
// grouping into rounds is this design's own packing of the dependency graph
// onto four multipliers.
//
// Interface: `start` samples `d1`; `done` pulses with `d3` valid (held until
// the next start). If vc5 = f5 + a2^2 is zero the formula does not apply
// (the rare case in which Cantor's algorithm would be needed); the unit then
// stops after R0 and raises `fail` with `done`. Inputs are a reduced divisor
// of weight three.
// Timing: 9 rounds of 18 clocks (one to issue, 16 for the product, one to
// store it) plus the inversion: 250 to 300 clocks from start to done in
// simulation, against the 435 reported for the original state-machine
// design.
module point_dbl
  import hecc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  divisor_t d1,
  output logic     done,
  output logic     fail,
  output divisor_t d3,
  fau_if.client    fau
);

  typedef enum logic [2:0] {IDLE, ISSUE, WAIT, INV_ISSUE, INV_WAIT, FINISH} state_t;
  state_t     state;
  logic [3:0] rnd;

  // latched input
  felem_t a0, a1, a2, c0, c1, c2;
  // stored products
  felem_t uc0, uc2, uc4, t0, t1, t2, t5, T3, uT1, t4, t6, t7, t9, T10, T11;
  felem_t t12, t15, e2, t17, t18, t20, t21, t19;
  // sums (field additions)
  felem_t vc0, vc1, vc2, vc3, vc4, vc5, uT2, t8, uT0, t14, T16;
  felem_t vT1, vT2, vT3, e1, e0;

  always_comb begin
    vc0 = CURVE_F0 ^ t0;
    vc1 = CURVE_F1 ^ uc0;
    vc2 = CURVE_F2 ^ t1;
    vc3 = CURVE_F3 ^ uc2;
    vc4 = CURVE_F4 ^ t2;
    vc5 = CURVE_F5 ^ uc4;
    uT2 = t6 ^ uc4;
    t8  = uc2 ^ t7;
    uT0 = t8 ^ t9;
    t14 = uT0 ^ uT1;
    T16 = vc0 ^ t12;
    vT1 = vc1 ^ t15 ^ t12 ^ T3;
    vT2 = vc2 ^ T11 ^ T3;
    vT3 = vc3 ^ T10;
    e1  = uT2 ^ CURVE_F5;
    e0  = uT1 ^ t17 ^ t18 ^ CURVE_F4;
  end

  // operand selection per round: lane i computes (ax[i] + ay[i]) * bb[i]
  felem_t [NMUL-1:0] ax, ay, bb, sum_a;

  always_comb begin
    ax = '0;
    ay = '0;
    bb = '0;
    unique case (rnd)
      4'd0: begin
        ax[0] = a0;   bb[0] = a0;
        ax[1] = a1;   bb[1] = a1;
        ax[2] = a2;   bb[2] = a2;
        ax[3] = c0;   bb[3] = c0;
      end
      4'd1: begin
        ax[0] = c1;   bb[0] = c1;
        ax[1] = c2;   bb[1] = c2;
        ax[2] = vc3;  bb[2] = vc3;
      end
      4'd2: begin
        ax[0] = T3;   bb[0] = T3;
        ax[1] = vc4;  bb[1] = vc4;
      end
      4'd3: begin
        ax[0] = uT1;  bb[0] = t4;
        ax[1] = uT1;  bb[1] = t5;
      end
      4'd4: begin
        ax[0] = t6;   ay[0] = uc4;  bb[0] = uc4;   // uT2 = t6 + uc4
        ax[1] = t6;   ay[1] = uc4;  bb[1] = vc5;
        ax[2] = t6;   ay[2] = uc4;  bb[2] = vc4;
      end
      4'd5: begin
        ax[0] = t8;   ay[0] = t9;   bb[0] = vc4;   // uT0 = t8 + t9
        ax[1] = vc4;  ay[1] = vc5;  bb[1] = t14;   // t13 = vc4 + vc5
      end
      4'd6: begin
        ax[0] = vc3;  ay[0] = T10;  bb[0] = vT3;   // vT3 = vc3 + T10
        ax[1] = vT2;                bb[1] = vT2;
      end
      4'd7: begin
        ax[0] = e2;   bb[0] = uT2;
        ax[1] = vT3;  bb[1] = e1;
        ax[2] = vT3;  bb[2] = e2;
      end
      4'd8: begin
        ax[0] = vT3;  bb[0] = e0;
      end
      default: ;
    endcase
  end

  for (genvar g = 0; g < NMUL; g++) begin : g_add
    gf_add u_add (.a(ax[g]), .b(ay[g]), .y(sum_a[g]));
  end

  assign fau.mul_a     = sum_a;
  assign fau.mul_b     = bb;
  assign fau.mul_start = (state == ISSUE);
  assign fau.inv_start = (state == INV_ISSUE);
  assign fau.inv_a     = vc5;

  felem_t [NMUL-1:0] p;
  assign p = fau.mul_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      rnd   <= '0;
      done  <= 1'b0;
      fail  <= 1'b0;
      d3    <= '0;
      {a0, a1, a2, c0, c1, c2} <= '0;
      {uc0, uc2, uc4, t0, t1, t2, t5, T3, uT1, t4, t6, t7, t9, T10, T11} <= '0;
      {t12, t15, e2, t17, t18, t20, t21, t19} <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          {a2, a1, a0} <= {d1.u2, d1.u1, d1.u0};
          {c2, c1, c0} <= {d1.v2, d1.v1, d1.v0};
          rnd   <= '0;
          fail  <= 1'b0;
          state <= ISSUE;
        end
        ISSUE: state <= WAIT;
        WAIT: if (fau.mul_done) begin
          rnd   <= rnd + 1'b1;
          state <= ISSUE;
          unique case (rnd)
            4'd0: begin
              {uc0, uc2, uc4, t0} <= {p[0], p[1], p[2], p[3]};
              if ((CURVE_F5 ^ p[2]) == '0) begin   // vc5 = 0: exceptional case
                fail  <= 1'b1;
                state <= FINISH;
              end
            end
            4'd1: begin
              {t1, t2, t5} <= {p[0], p[1], p[2]};
              state <= INV_ISSUE;
            end
            4'd2: {uT1, t4} <= {p[0], p[1]};
            4'd3: {t6, t7} <= {p[0], p[1]};
            4'd4: {t9, T10, T11} <= {p[0], p[1], p[2]};
            4'd5: {t12, t15} <= {p[0], p[1]};
            4'd6: {e2, t17} <= {p[0], p[1]};
            4'd7: {t18, t20, t21} <= {p[0], p[1], p[2]};
            4'd8: begin
              t19   <= p[0];
              state <= FINISH;
            end
            default: state <= FINISH;
          endcase
        end
        INV_ISSUE: state <= INV_WAIT;
        INV_WAIT: if (fau.inv_done) begin
          T3    <= fau.inv_q;
          state <= ISSUE;
        end
        FINISH: begin
          d3.u2 <= e2;
          d3.u1 <= e1;
          d3.u0 <= e0;
          d3.v2 <= t21 ^ vT2;
          d3.v1 <= t20 ^ vT1;
          d3.v0 <= t19 ^ T16;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
