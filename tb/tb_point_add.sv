// tb_point_add -- self-checking test of the point-addition controller on the
// shared field arithmetic unit: P + Q for reference divisor pairs (computed
// with Cantor's algorithm), the exceptional case r = 0 (P + P, where u1 and
// u2 share all roots), and the cycle count against the 817 clocks reported
// for addition.
// Timing: 10 ns clock; a watchdog ends the run after 100,000 cycles. The
// 817-clock limit is the addition time reported for the design; the
// vectors and checks are this testbench's own.
module tb_point_add;
  import hecc_pkg::*;
  import tb_vectors_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  divisor_t d1, d2, d3;
  logic     done, fail;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  fau_if fau_d ();
  fau_if fau_a ();
  assign fau_d.mul_start = 1'b0;
  assign fau_d.mul_a     = '0;
  assign fau_d.mul_b     = '0;
  assign fau_d.inv_start = 1'b0;
  assign fau_d.inv_a     = '0;

  point_add  dut   (.clk, .rst_n, .start, .d1, .d2, .done, .fail, .d3, .fau(fau_a));
  fau_shared u_fau (.clk, .rst_n, .sel(1'b1), .dbl(fau_d), .add(fau_a));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(divisor_t x, divisor_t y, output int lat);
    @(negedge clk);
    d1 = x; d2 = y; start = 1'b1;
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
    d1 = '0; d2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NVEC; i++) begin
      for (int sw = 0; sw < 2; sw++) begin
        if (sw == 0) run(VEC_P[i], VEC_Q[i], lat);
        else         run(VEC_Q[i], VEC_P[i], lat);
        checks += 3;
        if (fail) begin
          failures++;
          $display("FAIL vector %0d flagged exceptional", i);
        end
        if (d3 !== VEC_SUM[i]) begin
          failures++;
          $display("FAIL P[%0d]+Q[%0d] = %h, expected %h", i, i, d3, VEC_SUM[i]);
        end
        if (lat > 817) begin
          failures++;
          $display("FAIL addition took %0d clocks", lat);
        end
        $display("addition %0d/%0d: %0d clocks", i, sw, lat);
      end
    end
    run(VEC_P[1], VEC_P[1], lat);
    checks++;
    if (!fail) begin
      failures++;
      $display("FAIL exceptional case r = 0 not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
