// tb_hecc_top -- end-to-end test of the scalar multiplier at its default
// size (54-bit field, 162-bit scalar, four multipliers of digit size 4).
//
// It computes k*P for a short scalar in both the NAF and the binary mode,
// and for a full 162-bit scalar in NAF mode, and compares the results with
// values obtained by Cantor's algorithm. It then drives the two cases that
// must end in `fail`: a base divisor with u2 = 1, whose first doubling hits
// the exceptional case vc5 = 0, and k = 0. Along the way it counts every
// mechanism of the design -- doublings, additions of +P, additions of -P
// (negative NAF digits), binary-mode runs, hand-overs of the shared field
// unit between the two point controllers, and exceptional cases -- and
// fails if any never happened. The duration of each doubling and addition
// is checked against the 435 and 817 clocks reported for the design.
// Timing: 10 ns clock; a watchdog ends the run after 400,000 cycles (the
// whole run takes about 90,000). The mechanisms counted are those of the
// design; the scalars, vectors and checks are this testbench's own.
module tb_hecc_top;
  import hecc_pkg::*;
  import tb_vectors_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0, naf_mode = 1'b1;
  logic [KBITS-1:0] k;
  divisor_t         p, r;
  logic             busy, done, fail;
  int               checks = 0, failures = 0;
  int               n_dbl = 0, n_add = 0, n_sub = 0, n_bin = 0, n_handover = 0, n_exc = 0;
  int               dbl_t0, add_t0, max_dbl = 0, max_add = 0, cyc = 0;
  logic             sel_q = 1'b0;

  always #5 clk = ~clk;

  hecc_top dut (.*);

  // mechanism counters
  always @(posedge clk) begin
    cyc++;
    if (dut.dbl_start) dbl_t0 = cyc;
    if (dut.add_start) begin
      add_t0 = cyc;
      if (dut.u_mc.mode && dut.u_mc.naf_neg) n_sub++;
    end
    if (dut.dbl_done) begin
      n_dbl++;
      if (cyc - dbl_t0 > max_dbl) max_dbl = cyc - dbl_t0;
      if (dut.dbl_fail) n_exc++;
    end
    if (dut.add_done) begin
      n_add++;
      if (cyc - add_t0 > max_add) max_add = cyc - add_t0;
      if (dut.add_fail) n_exc++;
    end
    if (dut.fau_sel != sel_q) n_handover++;
    sel_q = dut.fau_sel;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [KBITS-1:0] kv, divisor_t pv, logic mode, output int clocks);
    @(negedge clk);
    k = kv; p = pv; naf_mode = mode; start = 1'b1;
    if (!mode) n_bin++;
    @(negedge clk);
    start = 1'b0;
    clocks = 0;
    while (!done) begin
      @(negedge clk);
      clocks++;
    end
  endtask

  task automatic expect_result(string what, divisor_t want);
    checks += 2;
    if (fail) begin
      failures++;
      $display("FAIL %s: flagged exceptional", what);
    end
    if (r !== want) begin
      failures++;
      $display("FAIL %s: got %h, expected %h", what, r, want);
    end
  endtask

  initial begin
    int clocks;
    divisor_t bad;
    k = '0; p = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run(K_SMALL, VEC_P[0], 1'b1, clocks);
    expect_result("k_small*P, NAF", KP_SMALL);
    $display("k_small*P, NAF: %0d clocks", clocks);

    run(K_SMALL, VEC_P[0], 1'b0, clocks);
    expect_result("k_small*P, binary", KP_SMALL);
    $display("k_small*P, binary: %0d clocks", clocks);

    run(K_BIG, VEC_P[0], 1'b1, clocks);
    expect_result("k_big*P, NAF", KP_BIG);
    $display("162-bit k*P, NAF: %0d clocks", clocks);

    bad = VEC_P[0];
    bad.u2 = felem_t'(1);
    run(K_SMALL, bad, 1'b1, clocks);
    checks++;
    if (!fail) begin
      failures++;
      $display("FAIL exceptional doubling not flagged");
    end

    run('0, VEC_P[0], 1'b1, clocks);
    checks++;
    if (!fail) begin
      failures++;
      $display("FAIL k = 0 not flagged");
    end

    $display("doublings %0d (longest %0d clocks), additions %0d (longest %0d clocks)",
             n_dbl, max_dbl, n_add, max_add);
    $display("subtractions %0d, binary-mode runs %0d, field-unit hand-overs %0d, exceptional cases %0d",
             n_sub, n_bin, n_handover, n_exc);
    checks += 8;
    if (n_dbl == 0)      begin failures++; $display("FAIL no doubling");      end
    if (n_add == 0)      begin failures++; $display("FAIL no addition");      end
    if (n_sub == 0)      begin failures++; $display("FAIL no subtraction");   end
    if (n_bin == 0)      begin failures++; $display("FAIL no binary run");    end
    if (n_handover == 0) begin failures++; $display("FAIL no hand-over");     end
    if (n_exc == 0)      begin failures++; $display("FAIL no exceptional case"); end
    if (max_dbl > 435)   begin failures++; $display("FAIL doubling too slow"); end
    if (max_add > 817)   begin failures++; $display("FAIL addition too slow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
