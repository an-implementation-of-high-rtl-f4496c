// tb_hecc_kset -- scalar-multiplication workload: k*P for a set of random
// 162-bit scalars, each in NAF and in binary mode, with the average clock
// count of each mode.
//
// Besides comparing every result with Cantor's algorithm (tb_kset_pkg), it
// checks the operation counts that the NAF method implies: a NAF scalar
// costs one point addition per non-zero digit after the leading one, and
// one doubling per digit after the leading one. The binary mode costs one
// addition per set bit after the lowest and one doubling per bit below the
// highest. The testbench derives both digit strings itself, with the usual
// right-to-left NAF recurrence (an independent route from the hardware's
// recoder), and counts the doublings and additions the design starts. It
// also checks that NAF mode is the faster of the two on average, which is
// the reason the design uses it.
// Timing: 10 ns clock; a watchdog ends the run after 2,000,000 cycles
// (the twelve runs take about 930,000). The operation-count rule is the one
// the design description states; the scalars and checks are this
// testbench's own.
module tb_hecc_kset;
  import hecc_pkg::*;
  import tb_vectors_pkg::*;
  import tb_kset_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0, naf_mode = 1'b1;
  logic [KBITS-1:0] k;
  divisor_t         p, r;
  logic             busy, done, fail;
  int               checks = 0, failures = 0;
  int               n_dbl = 0, n_add = 0;

  always #5 clk = ~clk;

  hecc_top dut (.*);

  always @(posedge clk) begin
    if (dut.dbl_start) n_dbl++;
    if (dut.add_start) n_add++;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operation counts of left-to-right NAF double-and-add.
  function automatic void naf_counts(logic [KBITS-1:0] kv, output int dbl, output int add);
    logic [KBITS+1:0] x = {2'b00, kv};
    int top = -1, nz = 0;
    for (int i = 0; i < KBITS + 2; i++) begin
      if (x[0]) begin
        nz++;
        top = i;
        // digit 2 - (x mod 4): +1 when x mod 4 = 1, -1 when x mod 4 = 3
        if (x[1]) x = x + 1;
        else      x = x - 1;
      end
      x = x >> 1;
    end
    dbl = top;
    add = nz - 1;
  endfunction

  // Operation counts of right-to-left binary expansion.
  function automatic void bin_counts(logic [KBITS-1:0] kv, output int dbl, output int add);
    int hi = -1, ones = 0;
    for (int i = 0; i < KBITS; i++)
      if (kv[i]) begin
        ones++;
        hi = i;
      end
    dbl = hi;
    add = ones - 1;
  endfunction

  task automatic run(logic [KBITS-1:0] kv, logic mode, output int clocks);
    @(negedge clk);
    k = kv; p = VEC_P[0]; naf_mode = mode; start = 1'b1;
    n_dbl = 0; n_add = 0;
    @(negedge clk);
    start = 1'b0;
    clocks = 0;
    while (!done) begin
      @(negedge clk);
      clocks++;
    end
  endtask

  initial begin
    automatic int     clocks = 0, want_dbl = 0, want_add = 0;
    automatic longint sum_naf = 0, sum_bin = 0;
    k = '0; p = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < NK; i++) begin
      for (int m = 1; m >= 0; m--) begin
        run(KSET[i], m[0], clocks);
        if (m == 1) begin
          naf_counts(KSET[i], want_dbl, want_add);
          sum_naf += longint'(clocks);
        end else begin
          bin_counts(KSET[i], want_dbl, want_add);
          sum_bin += longint'(clocks);
        end
        checks += 3;
        if (fail || r !== KSET_P[i]) begin
          failures++;
          $display("FAIL k[%0d] %s: got %h (fail %0b), expected %h",
                   i, (m == 1) ? "NAF" : "binary", r, fail, KSET_P[i]);
        end
        if (n_dbl != want_dbl) begin
          failures++;
          $display("FAIL k[%0d] %s: %0d doublings, expected %0d",
                   i, (m == 1) ? "NAF" : "binary", n_dbl, want_dbl);
        end
        if (n_add != want_add) begin
          failures++;
          $display("FAIL k[%0d] %s: %0d additions, expected %0d",
                   i, (m == 1) ? "NAF" : "binary", n_add, want_add);
        end
        $display("k[%0d] %-6s: %0d doublings, %0d additions, %0d clocks",
                 i, (m == 1) ? "NAF" : "binary", n_dbl, n_add, clocks);
      end
    end
    $display("average over %0d scalars: NAF %0d clocks, binary %0d clocks",
             NK, sum_naf / longint'(NK), sum_bin / longint'(NK));
    checks++;
    if (sum_naf >= sum_bin) begin
      failures++;
      $display("FAIL NAF mode is not faster than binary mode on average");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
