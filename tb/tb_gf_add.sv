// tb_gf_add -- self-checking test of the field adder: coefficient-wise sum
// modulo 2, computed one coefficient at a time as an integer sum.
// Timing: the combinational output is checked 1 ns after each new input; a
// watchdog ends the run after 1 ms of simulated time. The 200 input pairs
// (two corner cases, then random) and the checks are this testbench's own.
module tb_gf_add;
  import tb_gf_ref_pkg::*;

  fe_t a, b, y;
  int  checks = 0, failures = 0;

  gf_add dut (.a, .b, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = (i == 0) ? '0 : (i == 1) ? '1 : rand_fe();
      b = (i == 0) ? '1 : (i == 1) ? '1 : rand_fe();
      #1;
      for (int j = 0; j < RN; j++) begin
        automatic int s = int'(a[j]) + int'(b[j]);
        checks++;
        if (y[j] !== logic'(s % 2)) begin
          failures++;
          $display("FAIL bit %0d of %h + %h", j, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
