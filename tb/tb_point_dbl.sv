// tb_point_dbl -- self-checking test of the point-doubling controller on the
// shared field arithmetic unit: 2*D for reference divisors (computed with
// Cantor's algorithm; twelve divisors: the P, Q and P+Q vectors), the
// exceptional case vc5 = 0 (u2 = 1, so a2^2 = f5),
// and the cycle count against the 435 clocks reported for doubling.
// Timing: 10 ns clock; a watchdog ends the run after 100,000 cycles. The
// 435-clock limit is the doubling time reported for the design; the
// vectors and checks are this testbench's own.
module tb_point_dbl;
  import hecc_pkg::*;
  import tb_vectors_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  divisor_t d1, d3;
  logic     done, fail;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  fau_if fau_d ();
  fau_if fau_a ();
  assign fau_a.mul_start = 1'b0;
  assign fau_a.mul_a     = '0;
  assign fau_a.mul_b     = '0;
  assign fau_a.inv_start = 1'b0;
  assign fau_a.inv_a     = '0;

  point_dbl  dut   (.clk, .rst_n, .start, .d1, .done, .fail, .d3, .fau(fau_d));
  fau_shared u_fau (.clk, .rst_n, .sel(1'b0), .dbl(fau_d), .add(fau_a));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(divisor_t x, output int lat);
    @(negedge clk);
    d1 = x; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    int lat;
    divisor_t bad;
    d1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < 3*NVEC; j++) begin
      int i;
      divisor_t x, want;
      i = j % NVEC;
      case (j / NVEC)
        0:       begin x = VEC_P[i];   want = VEC_DBL[i];     end
        1:       begin x = VEC_Q[i];   want = VEC_DBL_Q[i];   end
        default: begin x = VEC_SUM[i]; want = VEC_DBL_SUM[i]; end
      endcase
      run(x, lat);
      checks += 3;
      if (fail) begin
        failures++;
        $display("FAIL vector %0d flagged exceptional", j);
      end
      if (d3 !== want) begin
        failures++;
        $display("FAIL doubling of vector %0d = %h, expected %h", j, d3, want);
      end
      if (lat > 435) begin
        failures++;
        $display("FAIL doubling took %0d clocks", lat);
      end
      $display("doubling %0d: %0d clocks", j, lat);
    end
    bad = VEC_P[0];
    bad.u2 = felem_t'(1);
    run(bad, lat);
    checks++;
    if (!fail) begin
      failures++;
      $display("FAIL exceptional case vc5 = 0 not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
