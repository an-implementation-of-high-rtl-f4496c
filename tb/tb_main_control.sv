// tb_main_control -- self-checking test of the scalar-multiplication
// controller in isolation. The point units are replaced by behavioural
// stand-ins that work on integers: a "divisor" stands for the multiple m*P,
// stored as |m| in u0 with the sign in bit 0 of v0, so that the controller's
// negation (v0 + 1) is integer negation. Doubling returns 2m and addition
// m1 + m2 after a short random delay. For random scalars in both modes the
// test checks that the result is k, that the number of doublings and
// additions matches the counts expected from the NAF or binary digits of k
// (worked out here independently), that the shared field unit is given to
// the right controller, and that a failing point operation and k = 0 end in
// `fail`.
// Timing: 10 ns clock; a watchdog ends the run after 300,000 cycles. The
// stand-ins and the reduced scalar width (KB = 40) are this testbench's
// own; the operation counts follow the NAF and binary methods the design
// uses.
module tb_main_control;
  import hecc_pkg::*;

  localparam int KB = 40;

  logic          clk = 1'b0, rst_n = 1'b0, start = 1'b0, naf_mode = 1'b1;
  logic [KB-1:0] k;
  divisor_t      p, r, dbl_in, dbl_out, add_in1, add_in2, add_out;
  logic          busy, done, fail;
  logic          dbl_start, dbl_done, dbl_fail, add_start, add_done, add_fail, fau_sel;
  int            checks = 0, failures = 0;
  int            n_dbl, n_add, n_sub;
  logic          inject_fail = 1'b0;
  logic          dbl_busy = 1'b0, add_busy = 1'b0;

  always #5 clk = ~clk;

  main_control #(.KB(KB)) dut (.*);

  function automatic longint dval(divisor_t d);
    return d.v0[0] ? -longint'(d.u0) : longint'(d.u0);
  endfunction
  function automatic divisor_t denc(longint m);
    divisor_t d = '0;
    d.u0 = felem_t'(m < 0 ? -m : m);
    d.v0 = felem_t'(m < 0);
    return d;
  endfunction

  // behavioural point units
  initial begin : mock_dbl
    dbl_done = 1'b0; dbl_fail = 1'b0; dbl_out = '0;
    forever begin
      @(posedge clk);
      if (dbl_start) begin
        automatic longint m = dval(dbl_in);
        dbl_busy = 1'b1;
        n_dbl++;
        repeat (2 + $urandom_range(0, 4)) @(posedge clk);
        dbl_out  <= denc(2 * m);
        dbl_fail <= inject_fail;
        dbl_done <= 1'b1;
        @(posedge clk);
        dbl_done <= 1'b0;
        dbl_busy = 1'b0;
      end
    end
  end
  initial begin : mock_add
    add_done = 1'b0; add_fail = 1'b0; add_out = '0;
    forever begin
      @(posedge clk);
      if (add_start) begin
        automatic longint m1 = dval(add_in1), m2 = dval(add_in2);
        add_busy = 1'b1;
        n_add++;
        if (m2 < 0) n_sub++;
        repeat (2 + $urandom_range(0, 4)) @(posedge clk);
        add_out  <= denc(m1 + m2);
        add_fail <= 1'b0;
        add_done <= 1'b1;
        @(posedge clk);
        add_done <= 1'b0;
        add_busy = 1'b0;
      end
    end
  end

  // the field unit must belong to the running point unit
  always @(negedge clk) begin
    if (dbl_busy && fau_sel) begin
      failures++;
      $display("FAIL field unit given to addition during a doubling");
    end
    if (add_busy && !fau_sel) begin
      failures++;
      $display("FAIL field unit given to doubling during an addition");
    end
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected counts
  function automatic void naf_counts(longint kv, output int nd, output int na);
    longint x = kv;
    int digits[$];
    digits = {};
    while (x != 0) begin
      if (x[0]) begin
        int dg = (x % 4 == 1) ? 1 : -1;
        digits.push_back(dg);
        x = x - longint'(dg);
      end else digits.push_back(0);
      x = x / 2;
    end
    nd = digits.size() - 1;
    na = -1;
    foreach (digits[i]) if (digits[i] != 0) na++;
  endfunction

  task automatic run(logic [KB-1:0] kv, logic mode);
    @(negedge clk);
    k = kv; naf_mode = mode; start = 1'b1;
    n_dbl = 0; n_add = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    automatic int nd, na, subs = 0, binruns = 0;
    k = '0; p = denc(1);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      logic [KB-1:0] kv;
      automatic logic mode = logic'(i % 2);
      kv = (i < 4) ? KB'(i + 1) : KB'({$urandom, $urandom});
      if (kv == '0) kv = KB'(5);
      n_sub = 0;
      run(kv, mode);
      checks += 4;
      if (fail || dval(r) != longint'(kv)) begin
        failures++;
        $display("FAIL k=%0d mode=%0d gave %0d fail=%0d", kv, mode, dval(r), fail);
      end
      if (mode) begin
        naf_counts(longint'(kv), nd, na);
        subs += n_sub;
      end else begin
        nd = 0; na = -1;
        for (int b = 0; b < KB; b++) if (kv[b]) begin nd = b; na++; end
        binruns++;
      end
      if (n_dbl != nd) begin
        failures++;
        $display("FAIL k=%0d mode=%0d: %0d doublings, expected %0d", kv, mode, n_dbl, nd);
      end
      if (n_add != na) begin
        failures++;
        $display("FAIL k=%0d mode=%0d: %0d additions, expected %0d", kv, mode, n_add, na);
      end
      if (mode && n_sub > n_add) failures++;
    end
    checks++;
    if (subs == 0) begin
      failures++;
      $display("FAIL no subtraction of P seen");
    end
    // k = 0 and a failing point operation
    run('0, 1'b1);
    checks++;
    if (!fail) begin failures++; $display("FAIL k = 0 not flagged"); end
    inject_fail = 1'b1;
    run(KB'(12345), 1'b1);
    checks++;
    if (!fail) begin failures++; $display("FAIL point-unit failure not passed on"); end
    inject_fail = 1'b0;
    run(KB'(12345), 1'b0);
    checks++;
    if (fail || dval(r) != 12345) begin failures++; $display("FAIL recovery after failure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
