// tb_gf_mul_lsd -- self-checking test of the digit-serial multiplier:
// edge cases and random operands against a bit-serial reference, and the
// 16-clock latency from start to done.
// Timing: 10 ns clock; a watchdog ends the run after 200,000 cycles. The
// 16-clock latency is the one reported for the design's multiplier; the
// stimulus and the reference are this testbench's own.
module tb_gf_mul_lsd;
  import tb_gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  fe_t  a, b, p;
  logic busy, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  gf_mul_lsd dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .p);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(fe_t x, fe_t y);
    int lat = 0;
    fe_t expv = ref_mul(x, y);
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (p !== expv) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, p, expv);
    end
    if (lat != 16) begin
      failures++;
      $display("FAIL latency %0d, expected 16", lat);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run('0, '1);
    run(fe_t'(1), fe_t'(1));
    run('1, '1);
    run(fe_t'(1) << 53, fe_t'(1) << 53);
    run(fe_t'(54'h20_0000_0000_0001), fe_t'(2));
    for (int i = 0; i < 300; i++) run(rand_fe(), rand_fe());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
