// tb_gf_inv -- self-checking test of the inverter: a * a^-1 = 1 for edge
// cases and random elements (checked with a bit-serial reference multiplier),
// the result 0 for input 0, and a latency of at most 218 clocks.
// Timing: 10 ns clock; a watchdog ends the run after 500,000 cycles. The
// 218-clock limit is the inversion time reported for the design; the
// stimulus and the other checks are this testbench's own.
module tb_gf_inv;
  import tb_gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fe_t  a, q;
  logic busy, done;
  int   checks = 0, failures = 0, maxlat = 0;

  always #5 clk = ~clk;

  gf_inv dut (.clk, .rst_n, .start, .a, .busy, .done, .q);

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x);
    int lat = 0;
    @(negedge clk);
    a = x; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    if (lat > maxlat) maxlat = lat;
    checks += 2;
    if (x == '0 ? (q !== '0) : (ref_mul(x, q) !== fe_t'(1))) begin
      failures++;
      $display("FAIL inv(%h) = %h", x, q);
    end
    if (lat > 218) begin
      failures++;
      $display("FAIL latency %0d > 218", lat);
    end
  endtask

  initial begin
    a = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(fe_t'(1));
    run(fe_t'(2));
    run('1);
    run(fe_t'(1) << 53);
    run('0);
    for (int i = 0; i < 300; i++) run(rand_fe());
    $display("longest inversion: %0d clocks", maxlat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
