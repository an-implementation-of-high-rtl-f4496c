// point_add -- point (divisor) addition D3 = D1 + D2 of two distinct reduced
// divisors of weight three on the genus-3 curve y^2 + y = f(x), by the
// inversion-based explicit formula for binary fields with h(x) = 1: one
// inversion, 57 multiplications and 6 squarings (63 products).
//
// The formula runs in nine steps: an almost-inverse of u1 modulo u2 by
// Cramer's rule, the resultant r, s'(x) = r * s(x), one inversion giving
// 1/r, 1/s2 and the monic s(x), then u_T, z = s*u1, v_T, and finally the
// reduced u3 and v3. The controller packs these products into twenty rounds
// of at most four parallel multiplications on the shared multipliers, with
// the inversion after round 7. Products are stored in registers; additions
// are XORs of stored values, made by the four lane pre-adders (gf_add) in
// front of the multipliers or combinationally where a result is formed.
// Variable names (M_ij, t_k, T_k, inv_i, q_i, s'_i, l_i, z_i, u_T,i, v_T,i)
// are those of the formula; the round packing is this design's own.
//
// Interface: `start` samples `d1` and `d2`; `done` pulses with `d3` valid
// (held until the next start). If r = 0 (u1 and u2 not coprime) or
// r * s'_2 = 0 the formula does not apply (Cantor's algorithm would be
// needed); the unit then stops early and raises `fail` with `done`.
// Timing: 20 rounds of 18 clocks (issue, 16 for the product, store) plus
// the inversion: 460 to 495 clocks from start to done in simulation, against
// the 817 reported for the original state-machine design.
module point_add
  import hecc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  divisor_t d1,
  input  divisor_t d2,
  output logic     done,
  output logic     fail,
  output divisor_t d3,
  fau_if.client    fau
);

  typedef enum logic [2:0] {IDLE, ISSUE, WAIT, INV_ISSUE, INV_WAIT, FINISH} state_t;
  state_t     state;
  logic [4:0] rnd;

  // latched inputs: u1 = x^3 + a2 x^2 + a1 x + a0, v1 = c2 x^2 + c1 x + c0,
  //                 u2 = x^3 + b2 x^2 + b1 x + b0, v2 = d2 x^2 + d1 x + d0
  felem_t a0, a1, a2, c0, c1, c2, b0, b1, b2, dd0, dd1, dd2;
  // stored products
  felem_t M01, T0, T1, M02, t2, t3, t4, t5, t6, t7, t8, t9;
  felem_t t10, T11, t12, l1, t14, T15, t22, t23, t24, t25, t26, t27, t28, t31;
  felem_t t32, t34, t33, t35, s2, T36, sb0, sb1, t37, t38, t44, t51;
  felem_t t39, t40, t45, z0, t41, t42, t46, t47, t43, t48;
  felem_t t53, t54, t55, t56, t61, t62, t63, vT3, t65, t66, t67, t68, t72;
  felem_t t69, t71, t70;
  // sums (field additions)
  felem_t M00, M10, M20, M11, M21, M22, inv0, inv1, inv2, q0, q1, q2, r;
  felem_t t19, t20, t21, l0, s2p, s0p, s1p, t30;
  felem_t uT3, uT2, L1, L0, uT1, uT0, t50, z1, z2, z3, t52;
  felem_t t57, t58, t59, t60, T64, vT1, vT2, e2, e1, e0;

  always_comb begin
    // step 1: almost inverse of u1 modulo u2
    M00  = b0 ^ a0;
    M10  = b1 ^ a1;
    M20  = b2 ^ a2;
    M11  = T0 ^ M00;
    M21  = T1 ^ M10;
    M22  = t3 ^ M11;
    inv0 = t6 ^ t9;
    inv1 = t4 ^ t8;
    inv2 = t5 ^ t7;
    // step 2: resultant
    q0   = dd0 ^ c0;
    q1   = dd1 ^ c1;
    q2   = dd2 ^ c2;
    r    = t12 ^ t10 ^ t14;
    // step 3: s'(x)
    t19  = q1 ^ q2;
    t20  = q1 ^ q0;
    t21  = q0 ^ q2;
    l0   = t25 ^ T15 ^ l1 ^ t23;
    s2p  = t22 ^ T11 ^ l1 ^ T15 ^ t24 ^ t27;
    s0p  = t26 ^ T11;
    t30  = b0 ^ b1;
    s1p  = t31 ^ s0p ^ T15 ^ t24 ^ t28;
    // step 5: u_T
    uT3  = a2 ^ b2;
    uT2  = t38 ^ a1 ^ b1 ^ T1;
    L1   = t42 ^ a0 ^ b0 ^ T0 ^ t40;
    L0   = t43 ^ t37 ^ M01 ^ t39 ^ t41;
    uT1  = t44 ^ L1;
    uT0  = t45 ^ L0;
    // step 6: z = s_bar * u1
    t50  = a0 ^ a1;
    z3   = t47 ^ a1 ^ sb0;
    z2   = a0 ^ t46 ^ t48;
    z1   = t51 ^ z0 ^ t46;
    // step 7: v_T
    t52  = sb1 ^ uT3 ^ a2;
    t57  = t53 ^ z0;
    t58  = t54 ^ uT0 ^ z1;
    t59  = t55 ^ uT1 ^ z2;
    t60  = t56 ^ uT2 ^ z3;
    T64  = t61 ^ c0;
    vT1  = t62 ^ c1;
    vT2  = t63 ^ c2;
    // step 8: u3
    e2   = t65 ^ uT3;
    e1   = t68 ^ CURVE_F5 ^ uT2;
    e0   = t66 ^ CURVE_F4 ^ uT1 ^ t67 ^ t69;
  end

  // operand selection per round: lane i computes (ax[i] + ay[i]) * bb[i].
  // The sums M12, t16, t17, t18, t29 and t49 of the formula exist only as
  // outputs of these lane pre-adders.
  felem_t [NMUL-1:0] ax, ay, bb, sum_a;

  always_comb begin
    ax = '0;
    ay = '0;
    bb = '0;
    unique case (rnd)
      5'd0: begin   // (M01, T0, T1) = M20 * (b0, b1, b2)
        ax[0] = b2;  ay[0] = a2;  bb[0] = b0;
        ax[1] = b2;  ay[1] = a2;  bb[1] = b1;
        ax[2] = b2;  ay[2] = a2;  bb[2] = b2;
      end
      5'd1: begin   // (M02, t2, t3) = M21 * (b0, b1, b2)
        ax[0] = T1;  ay[0] = M10; bb[0] = b0;
        ax[1] = T1;  ay[1] = M10; bb[1] = b1;
        ax[2] = T1;  ay[2] = M10; bb[2] = b2;
      end
      5'd2: begin   // (t4, t5) = M10 * (M22, M21); (t6, t7) = M11 * (M22, M20)
        ax[0] = b1;  ay[0] = a1;  bb[0] = M22;
        ax[1] = b1;  ay[1] = a1;  bb[1] = M21;
        ax[2] = T0;  ay[2] = M00; bb[2] = M22;
        ax[3] = T0;  ay[3] = M00; bb[3] = M20;
      end
      5'd3: begin   // (t8, t9) = M12 * (M20, M21); (t12, l1) = inv2 * (M02, q2)
        ax[0] = t2;  ay[0] = M01; bb[0] = M20;
        ax[1] = t2;  ay[1] = M01; bb[1] = M21;
        ax[2] = t5;  ay[2] = t7;  bb[2] = M02;
        ax[3] = t5;  ay[3] = t7;  bb[3] = q2;
      end
      5'd4: begin   // (t10, T11) = inv0 * (M00, q0); (t14, T15) = inv1 * (M01, q1)
        ax[0] = t6;  ay[0] = t9;  bb[0] = M00;
        ax[1] = t6;  ay[1] = t9;  bb[1] = q0;
        ax[2] = t4;  ay[2] = t8;  bb[2] = M01;
        ax[3] = t4;  ay[3] = t8;  bb[3] = q1;
      end
      5'd5: begin   // t22 = t17*t21; t23 = t18*t19; (t24, t25) = l1 * (b1, b2)
        ax[0] = inv0; ay[0] = inv2; bb[0] = t21;
        ax[1] = inv1; ay[1] = inv2; bb[1] = t19;
        ax[2] = l1;                bb[2] = b1;
        ax[3] = l1;                bb[3] = b2;
      end
      5'd6: begin   // (t26, t27) = l0 * (b0, b2); t28 = t20*t16; t31 = t29*t30
        ax[0] = l0;                bb[0] = b0;
        ax[1] = l0;                bb[1] = b2;
        ax[2] = inv0; ay[2] = inv1; bb[2] = t20;
        ax[3] = l0;   ay[3] = l1;   bb[3] = t30;
      end
      5'd7: begin   // t32 = r * s'2; t34 = s'2^2
        ax[0] = r;                 bb[0] = s2p;
        ax[1] = s2p;               bb[1] = s2p;
      end
      5'd8: begin   // (t35, s2) = t33 * (r, t34)
        ax[0] = t33;               bb[0] = r;
        ax[1] = t33;               bb[1] = t34;
      end
      5'd9: begin   // (T36, sb0, sb1) = t35 * (r, s'0, s'1)
        ax[0] = t35;               bb[0] = r;
        ax[1] = t35;               bb[1] = s0p;
        ax[2] = t35;               bb[2] = s1p;
      end
      5'd10: begin  // t37 = sb0^2; t38 = sb1^2; t44 = T36^2; t51 = t49*t50
        ax[0] = sb0;               bb[0] = sb0;
        ax[1] = sb1;               bb[1] = sb1;
        ax[2] = T36;               bb[2] = T36;
        ax[3] = sb0;  ay[3] = sb1; bb[3] = t50;
      end
      5'd11: begin  // (t39, t40) = t38 * (a1, a2); t45 = t44*uT3; z0 = sb0*a0
        ax[0] = t38;               bb[0] = a1;
        ax[1] = t38;               bb[1] = a2;
        ax[2] = t44;               bb[2] = uT3;
        ax[3] = sb0;               bb[3] = a0;
      end
      5'd12: begin  // (t41, t42) = uT2 * (b1, b2); (t46, t47) = sb1 * (a1, a2)
        ax[0] = uT2;               bb[0] = b1;
        ax[1] = uT2;               bb[1] = b2;
        ax[2] = sb1;               bb[2] = a1;
        ax[3] = sb1;               bb[3] = a2;
      end
      5'd13: begin  // t43 = L1*b2; t48 = sb0*a2
        ax[0] = L1;                bb[0] = b2;
        ax[1] = sb0;               bb[1] = a2;
      end
      5'd14: begin  // (t53 .. t56) = t52 * (uT0, uT1, uT2, uT3)
        ax[0] = t52;               bb[0] = uT0;
        ax[1] = t52;               bb[1] = uT1;
        ax[2] = t52;               bb[2] = uT2;
        ax[3] = t52;               bb[3] = uT3;
      end
      5'd15: begin  // (t61, t62, t63, vT3) = s2 * (t57, t58, t59, t60)
        ax[0] = s2;                bb[0] = t57;
        ax[1] = s2;                bb[1] = t58;
        ax[2] = s2;                bb[2] = t59;
        ax[3] = s2;                bb[3] = t60;
      end
      5'd16: begin  // t65 = vT3^2; t66 = vT2^2
        ax[0] = vT3;               bb[0] = vT3;
        ax[1] = vT2;               bb[1] = vT2;
      end
      5'd17: begin  // (t67, t68) = e2 * (uT2, uT3); t72 = vT3*e2
        ax[0] = t65;  ay[0] = uT3; bb[0] = uT2;
        ax[1] = t65;  ay[1] = uT3; bb[1] = uT3;
        ax[2] = t65;  ay[2] = uT3; bb[2] = vT3;
      end
      5'd18: begin  // t69 = uT3*e1; t71 = vT3*e1
        ax[0] = uT3;               bb[0] = e1;
        ax[1] = vT3;               bb[1] = e1;
      end
      5'd19: begin  // t70 = vT3*e0
        ax[0] = vT3;               bb[0] = e0;
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
  assign fau.inv_a     = t32;

  felem_t [NMUL-1:0] p;
  assign p = fau.mul_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      rnd   <= '0;
      done  <= 1'b0;
      fail  <= 1'b0;
      d3    <= '0;
      {a0, a1, a2, c0, c1, c2, b0, b1, b2, dd0, dd1, dd2} <= '0;
      {M01, T0, T1, M02, t2, t3, t4, t5, t6, t7, t8, t9} <= '0;
      {t10, T11, t12, l1, t14, T15, t22, t23, t24, t25, t26, t27, t28, t31} <= '0;
      {t32, t34, t33, t35, s2, T36, sb0, sb1, t37, t38, t44, t51} <= '0;
      {t39, t40, t45, z0, t41, t42, t46, t47, t43, t48} <= '0;
      {t53, t54, t55, t56, t61, t62, t63, vT3, t65, t66, t67, t68, t72} <= '0;
      {t69, t71, t70} <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          {a2, a1, a0}    <= {d1.u2, d1.u1, d1.u0};
          {c2, c1, c0}    <= {d1.v2, d1.v1, d1.v0};
          {b2, b1, b0}    <= {d2.u2, d2.u1, d2.u0};
          {dd2, dd1, dd0} <= {d2.v2, d2.v1, d2.v0};
          rnd   <= '0;
          fail  <= 1'b0;
          state <= ISSUE;
        end
        ISSUE: state <= WAIT;
        WAIT: if (fau.mul_done) begin
          rnd   <= rnd + 1'b1;
          state <= ISSUE;
          unique case (rnd)
            5'd0:  {M01, T0, T1} <= {p[0], p[1], p[2]};
            5'd1:  {M02, t2, t3} <= {p[0], p[1], p[2]};
            5'd2:  {t4, t5, t6, t7} <= {p[0], p[1], p[2], p[3]};
            5'd3:  {t8, t9, t12, l1} <= {p[0], p[1], p[2], p[3]};
            5'd4: begin
              {t10, T11, t14, T15} <= {p[0], p[1], p[2], p[3]};
              if ((t12 ^ p[0] ^ p[2]) == '0) begin   // r = 0: exceptional case
                fail  <= 1'b1;
                state <= FINISH;
              end
            end
            5'd5:  {t22, t23, t24, t25} <= {p[0], p[1], p[2], p[3]};
            5'd6:  {t26, t27, t28, t31} <= {p[0], p[1], p[2], p[3]};
            5'd7: begin
              {t32, t34} <= {p[0], p[1]};
              if (p[0] == '0) begin                 // r * s'2 = 0: exceptional case
                fail  <= 1'b1;
                state <= FINISH;
              end else begin
                state <= INV_ISSUE;
              end
            end
            5'd8:  {t35, s2} <= {p[0], p[1]};
            5'd9:  {T36, sb0, sb1} <= {p[0], p[1], p[2]};
            5'd10: {t37, t38, t44, t51} <= {p[0], p[1], p[2], p[3]};
            5'd11: {t39, t40, t45, z0} <= {p[0], p[1], p[2], p[3]};
            5'd12: {t41, t42, t46, t47} <= {p[0], p[1], p[2], p[3]};
            5'd13: {t43, t48} <= {p[0], p[1]};
            5'd14: {t53, t54, t55, t56} <= {p[0], p[1], p[2], p[3]};
            5'd15: {t61, t62, t63, vT3} <= {p[0], p[1], p[2], p[3]};
            5'd16: {t65, t66} <= {p[0], p[1]};
            5'd17: {t67, t68, t72} <= {p[0], p[1], p[2]};
            5'd18: {t69, t71} <= {p[0], p[1]};
            5'd19: begin
              t70   <= p[0];
              state <= FINISH;
            end
            default: state <= FINISH;
          endcase
        end
        INV_ISSUE: state <= INV_WAIT;
        INV_WAIT: if (fau.inv_done) begin
          t33   <= fau.inv_q;
          state <= ISSUE;
        end
        FINISH: begin
          d3.u2 <= e2;
          d3.u1 <= e1;
          d3.u0 <= e0;
          d3.v2 <= vT2 ^ t72;
          d3.v1 <= vT1 ^ t71;
          d3.v0 <= T64 ^ t70;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
