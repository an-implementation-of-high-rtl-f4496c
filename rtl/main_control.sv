// main_control -- scalar multiplication level: computes R = k*P by issuing
// point doublings and point additions to the two point-arithmetic
// controllers, and owns the NAF scalar recoder.
//
// Two methods are selectable per operation with `naf_mode`:
//  * naf_mode = 1, left-to-right NAF double-and-add (the design's main
//    method): the digits of NAF(k) are walked from the top; the first
//    non-zero digit sets R = P, and every later digit doubles R and then, for
//    a digit of +1 or -1, adds P or -P = (u, v + 1). This costs one doubling
//    per digit after the leading one and one addition per further non-zero
//    digit.
//  * naf_mode = 0, right-to-left binary expansion: B = P; for each bit k_i
//    from the bottom, R = R + B if k_i = 1 (the first such bit just sets
//    R = B), then B = 2B while higher bits of k remain. On the shared field
//    units the addition and the doubling of one bit run one after the other.
// Starting from R = P instead of R = 0 avoids the neutral element, which the
// explicit formulae cannot take; this design's choice, consistent with the
// doubling and addition counts stated for the design.
//
// Interface: `start` samples `k`, `p` and `naf_mode`; `done` pulses with `r`
// valid. `fail` is raised with `done` when k = 0 (no weight-three result) or
// when a point unit met an exceptional case. `fau_sel` gives the shared field
// unit to the addition controller (1) or the doubling controller (0); it
// changes only while both controllers are idle.
// Timing: a few clocks of control per point operation, plus one clock per
// leading zero NAF digit while searching for the first non-zero digit.
module main_control
  import hecc_pkg::*;
#(
  parameter int unsigned KB = hecc_pkg::KBITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          naf_mode,
  input  logic [KB-1:0] k,
  input  divisor_t      p,
  output logic          busy,
  output logic          done,
  output logic          fail,
  output divisor_t      r,
  // point doubling controller
  output logic          dbl_start,
  output divisor_t      dbl_in,
  input  logic          dbl_done,
  input  logic          dbl_fail,
  input  divisor_t      dbl_out,
  // point addition controller
  output logic          add_start,
  output divisor_t      add_in1,
  output divisor_t      add_in2,
  input  logic          add_done,
  input  logic          add_fail,
  input  divisor_t      add_out,
  // owner of the shared field arithmetic unit
  output logic          fau_sel
);

  localparam int unsigned IW = $clog2(KB + 2);

  typedef enum logic [3:0] {
    IDLE, LOADWAIT,
    NAF_SCAN, NAF_DBL, NAF_DBL_W, NAF_ADD, NAF_ADD_W,
    BIN_STEP, BIN_ADD, BIN_ADD_W, BIN_NEXT, BIN_DBL, BIN_DBL_W,
    FINISH
  } state_t;

  state_t        state;
  logic          mode;          // latched naf_mode
  logic [IW-1:0] idx;
  divisor_t      preg, rreg, breg;
  logic          rvalid;        // right-to-left: R holds a value
  logic          naf_nz, naf_neg, bin_bit, bin_above_zero;

  naf_conv #(.KB(KB)) u_naf (
    .clk, .rst_n,
    .load (start && state == IDLE),
    .k,
    .idx,
    .naf_nz,
    .naf_neg,
    .bin_bit,
    .bin_above_zero
  );

  assign busy      = (state != IDLE);
  assign dbl_start = (state == NAF_DBL) || (state == BIN_DBL);
  assign add_start = (state == NAF_ADD) || (state == BIN_ADD);
  assign dbl_in    = mode ? rreg : breg;
  assign add_in1   = rreg;
  assign add_in2   = mode ? (naf_neg ? divisor_neg(preg) : preg) : breg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      mode    <= 1'b1;
      idx     <= '0;
      preg    <= '0;
      rreg    <= '0;
      breg    <= '0;
      rvalid  <= 1'b0;
      done    <= 1'b0;
      fail    <= 1'b0;
      r       <= '0;
      fau_sel <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          mode  <= naf_mode;
          preg  <= p;
          fail  <= 1'b0;
          state <= (k == '0) ? FINISH : LOADWAIT;
          if (k == '0) fail <= 1'b1;
        end
        LOADWAIT: begin
          rvalid <= 1'b0;
          breg   <= preg;
          if (mode) begin
            idx   <= IW'(KB);
            state <= NAF_SCAN;
          end else begin
            idx   <= '0;
            state <= BIN_STEP;
          end
        end
        // ---- left-to-right NAF ------------------------------------------
        NAF_SCAN: begin
          if (naf_nz) begin
            rreg  <= preg;                 // leading NAF digit is +1
            state <= (idx == '0) ? FINISH : NAF_DBL;
          end
          if (idx != '0) idx <= idx - 1'b1;
        end
        NAF_DBL: begin
          fau_sel <= 1'b0;
          state   <= NAF_DBL_W;
        end
        NAF_DBL_W: if (dbl_done) begin
          rreg <= dbl_out;
          if (dbl_fail) begin
            fail  <= 1'b1;
            state <= FINISH;
          end else if (naf_nz) begin
            state <= NAF_ADD;
          end else if (idx == '0) begin
            state <= FINISH;
          end else begin
            idx   <= idx - 1'b1;
            state <= NAF_DBL;
          end
        end
        NAF_ADD: begin
          fau_sel <= 1'b1;
          state   <= NAF_ADD_W;
        end
        NAF_ADD_W: if (add_done) begin
          rreg <= add_out;
          if (add_fail) begin
            fail  <= 1'b1;
            state <= FINISH;
          end else if (idx == '0) begin
            state <= FINISH;
          end else begin
            idx   <= idx - 1'b1;
            state <= NAF_DBL;
          end
        end
        // ---- right-to-left binary expansion -----------------------------
        BIN_STEP: begin
          if (bin_bit && rvalid) begin
            state <= BIN_ADD;
          end else begin
            if (bin_bit) begin
              rreg   <= breg;
              rvalid <= 1'b1;
            end
            state <= BIN_NEXT;
          end
        end
        BIN_ADD: begin
          fau_sel <= 1'b1;
          state   <= BIN_ADD_W;
        end
        BIN_ADD_W: if (add_done) begin
          rreg  <= add_out;
          state <= add_fail ? FINISH : BIN_NEXT;
          if (add_fail) fail <= 1'b1;
        end
        BIN_NEXT: state <= bin_above_zero ? FINISH : BIN_DBL;
        BIN_DBL: begin
          fau_sel <= 1'b0;
          state   <= BIN_DBL_W;
        end
        BIN_DBL_W: if (dbl_done) begin
          breg <= dbl_out;
          idx  <= idx + 1'b1;
          state <= dbl_fail ? FINISH : BIN_STEP;
          if (dbl_fail) fail <= 1'b1;
        end
        FINISH: begin
          r     <= rreg;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
