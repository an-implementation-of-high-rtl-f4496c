// tb_hecc_poly19 -- the design run in the second field it was evaluated
// with: GF(2^54) reduced by the 19-term polynomial x^54 + x^34 + x^32 +
// x^31 + x^30 + x^29 + x^27 + x^25 + x^21 + x^18 + x^17 + x^16 + x^15 +
// x^13 + x^7 + x^4 + x^2 + x + 1 instead of the trinomial x^54 + x^9 + 1.
//
// It builds the field units, a point adder on its own field unit, and the
// whole scalar multiplier, all with POLY set to this polynomial, and checks
// each level in turn:
//   - 200 random products of gf_mul_lsd against a bit-serial reference
//     multiplication in this field, and the 16-clock latency;
//   - 40 random inverses of gf_inv (a * q = 1), within the reported 218 clocks;
//   - P + Q from point_add for two reference pairs;
//   - 2P (k = 2) and k*P for a random 162-bit k from hecc_top, in both the
//     NAF and the binary mode.
// The reference divisors and results come from Cantor's general algorithm
// computed in this field. The test shows that only the reduction network
// changes with the polynomial; the schedules and the controllers do not.
// Timing: 10 ns clock; a watchdog ends the run after 300,000 cycles. The
// polynomial and the 16- and 218-clock figures come from the design
// description; the vectors and checks are this testbench's own.
module tb_hecc_poly19;
  import hecc_pkg::*;
  import tb_vectors19_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Bit-serial reference multiplication in the 19-term field.
  function automatic felem_t ref_mul19(felem_t a, felem_t b);
    felem_t acc = '0;
    felem_t x   = a;
    for (int i = 0; i < N; i++) begin
      if (b[i]) acc ^= x;
      x = x[N-1] ? ((x << 1) ^ POLY19_LOW) : (x << 1);
    end
    return acc;
  endfunction

  function automatic felem_t rand_fe();
    return felem_t'({$urandom, $urandom});
  endfunction

  // ---- field units ----
  logic   m_start = 1'b0, m_busy, m_done;
  felem_t m_a, m_b, m_p;
  logic   i_start = 1'b0, i_busy, i_done;
  felem_t i_a, i_q;

  gf_mul_lsd #(.POLY(POLY19_LOW)) u_mul (
    .clk, .rst_n, .start(m_start), .a(m_a), .b(m_b), .busy(m_busy), .done(m_done), .p(m_p));
  gf_inv #(.POLY(POLY19_LOW)) u_inv (
    .clk, .rst_n, .start(i_start), .a(i_a), .busy(i_busy), .done(i_done), .q(i_q));

  // ---- point adder on its own field unit ----
  logic     pa_start = 1'b0, pa_done, pa_fail;
  divisor_t pa_d1, pa_d2, pa_d3;
  fau_if fau_d ();
  fau_if fau_a ();
  assign fau_d.mul_start = 1'b0;
  assign fau_d.mul_a     = '0;
  assign fau_d.mul_b     = '0;
  assign fau_d.inv_start = 1'b0;
  assign fau_d.inv_a     = '0;

  point_add u_add (.clk, .rst_n, .start(pa_start), .d1(pa_d1), .d2(pa_d2),
                   .done(pa_done), .fail(pa_fail), .d3(pa_d3), .fau(fau_a));
  fau_shared #(.POLY(POLY19_LOW)) u_fau (.clk, .rst_n, .sel(1'b1), .dbl(fau_d), .add(fau_a));

  // ---- whole scalar multiplier ----
  logic             start = 1'b0, naf_mode = 1'b1, busy, done, fail;
  logic [KBITS-1:0] k;
  divisor_t         p, r;

  hecc_top #(.POLY(POLY19_LOW)) u_top (.clk, .rst_n, .start, .naf_mode, .k, .p,
                                        .busy, .done, .fail, .r);

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_mul(felem_t a, felem_t b);
    int lat;
    @(negedge clk);
    m_a = a; m_b = b; m_start = 1'b1;
    @(negedge clk);
    m_start = 1'b0;
    lat = 0;
    while (!m_done) begin
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (m_p !== ref_mul19(a, b)) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", a, b, m_p, ref_mul19(a, b));
    end
    if (lat != 16) begin
      failures++;
      $display("FAIL multiplication took %0d clocks", lat);
    end
  endtask

  task automatic check_inv(felem_t a);
    int lat;
    @(negedge clk);
    i_a = a; i_start = 1'b1;
    @(negedge clk);
    i_start = 1'b0;
    lat = 0;
    while (!i_done) begin
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (ref_mul19(a, i_q) !== felem_t'(1)) begin
      failures++;
      $display("FAIL 1/%h = %h is not an inverse", a, i_q);
    end
    if (lat > 218) begin
      failures++;
      $display("FAIL inversion took %0d clocks", lat);
    end
  endtask

  task automatic check_add(int i);
    @(negedge clk);
    pa_d1 = V19_P[i]; pa_d2 = V19_Q[i]; pa_start = 1'b1;
    @(negedge clk);
    pa_start = 1'b0;
    while (!pa_done) @(negedge clk);
    checks++;
    if (pa_fail || pa_d3 !== V19_SUM[i]) begin
      failures++;
      $display("FAIL P[%0d]+Q[%0d] = %h (fail %0b), expected %h", i, i, pa_d3, pa_fail, V19_SUM[i]);
    end
  endtask

  task automatic check_smul(string what, logic [KBITS-1:0] kv, logic mode, divisor_t want);
    int clocks = 0;
    @(negedge clk);
    k = kv; p = V19_P[0]; naf_mode = mode; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      clocks++;
    end
    checks++;
    if (fail || r !== want) begin
      failures++;
      $display("FAIL %s: got %h (fail %0b), expected %h", what, r, fail, want);
    end
    $display("%s: %0d clocks", what, clocks);
  endtask

  initial begin
    m_a = '0; m_b = '0; i_a = '0; pa_d1 = '0; pa_d2 = '0; k = '0; p = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    check_mul(felem_t'(1) << (N-1), felem_t'(1) << (N-1));
    for (int i = 0; i < 199; i++) check_mul(rand_fe(), rand_fe());
    check_inv(felem_t'(1) << (N-1));
    for (int i = 0; i < 39; i++) begin
      felem_t a;
      a = rand_fe();
      if (a == '0) a = felem_t'(1);
      check_inv(a);
    end

    for (int i = 0; i < NVEC19; i++) check_add(i);

    check_smul("2P, NAF",              KBITS'(2), 1'b1, V19_DBL[0]);
    check_smul("2P, binary",           KBITS'(2), 1'b0, V19_DBL[0]);
    check_smul("162-bit k*P, NAF",     K19,       1'b1, K19_P);
    check_smul("162-bit k*P, binary",  K19,       1'b0, K19_P);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
