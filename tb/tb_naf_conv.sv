// tb_naf_conv -- self-checking test of the scalar recoder. For random and
// corner-case scalars it reads every digit and checks that the NAF digits
// are in {-1, 0, 1}, that no two adjacent digits are non-zero, that they
// sum back to k, and that the binary digits and the "higher bits are zero"
// flag agree with k.
// Timing: 10 ns clock; a watchdog ends the run after 100,000 cycles. It
// runs at the full 162-bit width. The NAF properties checked are the
// definition the design uses; the scalars and checks are this testbench's
// own.
module tb_naf_conv;
  localparam int KB = 162;
  localparam int IW = $clog2(KB + 2);

  logic          clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [KB-1:0] k;
  logic [IW-1:0] idx;
  logic          naf_nz, naf_neg, bin_bit, bin_above_zero;
  int            checks = 0, failures = 0, negs = 0;

  always #5 clk = ~clk;

  naf_conv #(.KB(KB)) dut (.clk, .rst_n, .load, .k, .idx, .naf_nz, .naf_neg,
                           .bin_bit, .bin_above_zero);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [KB-1:0] kv);
    logic signed [KB+3:0] sum = '0;
    logic prev_nz = 1'b0;
    logic [KB-1:0] rest;
    @(negedge clk);
    k = kv; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int i = KB; i >= 0; i--) begin
      idx = IW'(i);
      #1;
      if (naf_nz) begin
        if (naf_neg) begin
          sum = sum - ((KB+4)'(1) << i);
          negs++;
        end else sum = sum + ((KB+4)'(1) << i);
      end
      checks++;
      if (naf_nz && prev_nz) begin
        failures++;
        $display("FAIL adjacent non-zero digits at %0d", i);
      end
      if (!naf_nz && naf_neg) begin
        failures++;
        $display("FAIL digit %0d both zero and negative", i);
      end
      prev_nz = naf_nz;
      if (i < KB) begin
        rest = kv >> (i + 1);
        checks += 2;
        if (bin_bit !== kv[i]) begin
          failures++;
          $display("FAIL binary digit %0d", i);
        end
        if (bin_above_zero !== (rest == '0)) begin
          failures++;
          $display("FAIL upper-zero flag at %0d", i);
        end
      end
    end
    checks++;
    if (sum !== (KB+4)'(kv)) begin
      failures++;
      $display("FAIL NAF of %h sums to %h", kv, sum);
    end
  endtask

  initial begin
    k = '0; idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check('0);
    check(KB'(7));
    check(KB'(1));
    check('1);
    check(KB'(1) << (KB - 1));
    for (int n = 0; n < 40; n++) begin
      logic [KB-1:0] r;
      for (int w = 0; w < KB; w += 32) r[w +: 32] = $urandom;
      check(r);
    end
    if (negs == 0) begin
      failures++;
      $display("FAIL no negative digit seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
