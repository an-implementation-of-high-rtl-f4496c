// gf_mul_lsd -- least-significant-digit-first digit-serial multiplier in
// GF(2^N), polynomial basis, reduction polynomial x^N + POLY_LOW.
//
// The multiplier B is consumed D bits (one digit) per clock, lowest digit
// first. Each digit cycle adds A * B_i (a D x N carry-free product) into an
// accumulator of N+D-1 bits and replaces A by A * x^D mod F. After the last
// digit the accumulator is reduced modulo F once. This is the LSD structure
// of the design: an A register with its x^D-and-reduce feedback, a B shift
// register, a digit multiplier, an accumulator and a final reducer.
//
// Interface: `start` (one cycle) samples `a` and `b` and raises `busy`. The
// product appears on `p` together with a one-cycle `done` pulse; `p` holds
// until the next start. A start while busy is ignored.
// Timing: for N = 54 and D = 4 there are ceil(N/D) = 14 digit cycles, so
// `done` rises 1 + 14 + 1 = 16 clocks after the clock edge that sampled
// `start`, the 16-cycle latency quoted for the design's multiplier. The
// separate load and final-reduction cycles are this design's own split.
module gf_mul_lsd
  import hecc_pkg::*;
#(
  parameter int unsigned        W        = hecc_pkg::N,
  parameter int unsigned        D        = hecc_pkg::DIGIT,
  parameter logic [W-1:0]       POLY     = W'(hecc_pkg::POLY_LOW)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] p
);

  localparam int unsigned KD = (W + D - 1) / D;     // number of digits
  localparam int unsigned CW = W + D - 1;           // accumulator width

  typedef enum logic [1:0] {IDLE, LOAD, DIGITS, REDUCE} state_t;
  state_t                 state;
  logic [W-1:0]           areg;
  logic [KD*D-1:0]        breg;
  logic [CW-1:0]          acc;
  logic [$clog2(KD+1)-1:0] cnt;
  logic [W-1:0]           a_in, b_in;

  // Carry-free product of A with one D-bit digit.
  function automatic logic [CW-1:0] digit_mul(logic [W-1:0] x, logic [D-1:0] dg);
    logic [CW-1:0] res = '0;
    for (int j = 0; j < D; j++)
      if (dg[j]) res ^= CW'(x) << j;
    return res;
  endfunction

  // x * X^D mod F, one bit position at a time.
  function automatic logic [W-1:0] times_xd(logic [W-1:0] x);
    logic [W-1:0] res = x;
    for (int j = 0; j < D; j++)
      res = res[W-1] ? ((res << 1) ^ POLY) : (res << 1);
    return res;
  endfunction

  // Reduce an accumulator of degree < N+D-1 modulo F.
  function automatic logic [W-1:0] reduce(logic [CW-1:0] c);
    logic [CW-1:0] res = c;
    for (int i = CW - 1; i >= int'(W); i--)
      if (res[i]) begin
        res[i] = 1'b0;
        res ^= CW'(POLY) << (i - W);
      end
    return res[W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      areg  <= '0;
      breg  <= '0;
      acc   <= '0;
      cnt   <= '0;
      a_in  <= '0;
      b_in  <= '0;
      p     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_in  <= a;
          b_in  <= b;
          state <= LOAD;
        end
        LOAD: begin
          areg  <= a_in;
          breg  <= (KD*D)'(b_in);
          acc   <= '0;
          cnt   <= '0;
          state <= DIGITS;
        end
        DIGITS: begin
          acc  <= acc ^ digit_mul(areg, breg[D-1:0]);
          areg <= times_xd(areg);
          breg <= breg >> D;
          cnt  <= cnt + 1'b1;
          if (cnt == ($clog2(KD+1))'(KD - 1)) state <= REDUCE;
        end
        REDUCE: begin
          p     <= reduce(acc);
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
