// gf_inv -- inversion in GF(2^N) by the binary extended Euclidean algorithm.
//
// Starting from u = a, v = F, b = 1, c = 0 the unit repeats: j = deg(u) -
// deg(v); if j < 0 swap u with v and b with c and negate j; then u += v << j
// and b += c << j. It stops when deg(u) = 0, i.e. u = 1, and b = a^-1. Only
// shifts and XORs are used, as in the design description. Each iteration
// takes two clocks: the first registers the degrees of u and v (two priority
// encoders), the second swaps, shifts and adds. That two-cycle split is this
// design's choice; it keeps the priority encoders and the barrel shifters in
// separate clock cycles.
//
// Interface: `start` (one cycle) samples `a`; `q` and a one-cycle `done`
// pulse follow. The inverse of 0 does not exist: the unit then returns 0
// after two cycles (this design's choice, so the caller never hangs).
// Timing: `done` rises 1 + 2*iterations clocks after the sampling edge. Each
// iteration lowers deg(u) + deg(v) by at least one, so there are at most
// 2N - 2 iterations and at most 4N - 3 = 213 clocks for N = 54, within the
// 218 clocks quoted for the design's inverter.
module gf_inv
  import hecc_pkg::*;
#(
  parameter int unsigned  W    = hecc_pkg::N,
  parameter logic [W-1:0] POLY = W'(hecc_pkg::POLY_LOW)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] q
);

  localparam int unsigned DW = $clog2(W + 1);

  typedef enum logic [1:0] {IDLE, DEG, STEP} state_t;
  state_t          state;
  logic [W:0]      u, v;
  logic [W-1:0]    b, c;
  logic [DW-1:0]   du, dv;

  function automatic logic [DW-1:0] degree(logic [W:0] x);
    logic [DW-1:0] d = '0;
    for (int i = 0; i <= int'(W); i++)
      if (x[i]) d = DW'(i);
    return d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      u     <= '0;
      v     <= '0;
      b     <= '0;
      c     <= '0;
      du    <= '0;
      dv    <= '0;
      q     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          u     <= {1'b0, a};
          v     <= {1'b1, POLY};
          b     <= W'(1);
          c     <= '0;
          state <= DEG;
        end
        DEG: begin
          du <= degree(u);
          dv <= degree(v);
          if (u[W:1] == '0) begin          // deg(u) = 0: u is 1 (or a was 0)
            q     <= u[0] ? b : '0;
            done  <= 1'b1;
            state <= IDLE;
          end else begin
            state <= STEP;
          end
        end
        STEP: begin
          if (du < dv) begin
            // swap, then add: the new u is the old v plus the old u shifted
            v <= u;
            c <= b;
            u <= v ^ (u << (dv - du));
            b <= c ^ (b << (dv - du));
          end else begin
            u <= u ^ (v << (du - dv));
            b <= b ^ (c << (du - dv));
          end
          state <= DEG;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
