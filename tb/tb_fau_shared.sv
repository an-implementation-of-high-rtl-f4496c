// tb_fau_shared -- self-checking test of the shared field arithmetic unit.
// With `sel` at 0 and then at 1 it starts four multiplications and an
// inversion from the owning controller while the other controller presents
// different operands and start pulses of its own. It checks the products
// and the inverse against a bit-serial reference, that only the owner's
// requests are executed, that only the owner sees the done pulses, and the
// 16-clock multiplication latency.
// Timing: 10 ns clock; a watchdog ends the run after 100,000 cycles. The
// stimulus and checks are this testbench's own; the 16-clock latency is the
// one reported for the design's multiplier.
module tb_fau_shared;
  import hecc_pkg::*;
  import tb_gf_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sel = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  fau_if fd ();
  fau_if fa ();

  fau_shared dut (.clk, .rst_n, .sel, .dbl(fd), .add(fa));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic wrong_done;
  always @(negedge clk) begin
    wrong_done = sel ? (fd.mul_done | fd.inv_done) : (fa.mul_done | fa.inv_done);
    if (rst_n && wrong_done) begin
      failures++;
      $display("FAIL done pulse reached the controller that does not own the unit");
    end
  end

  task automatic round(logic owner);
    felem_t [NMUL-1:0] oa, ob, xa, xb;
    felem_t ia, xi;
    int lat;
    for (int i = 0; i < NMUL; i++) begin
      oa[i] = rand_fe(); ob[i] = rand_fe(); xa[i] = rand_fe(); xb[i] = rand_fe();
    end
    ia = rand_fe() | felem_t'(1);
    xi = rand_fe();
    @(negedge clk);
    sel = owner;
    if (owner) begin
      fa.mul_a = oa; fa.mul_b = ob; fd.mul_a = xa; fd.mul_b = xb;
      fa.inv_a = ia; fd.inv_a = xi;
    end else begin
      fd.mul_a = oa; fd.mul_b = ob; fa.mul_a = xa; fa.mul_b = xb;
      fd.inv_a = ia; fa.inv_a = xi;
    end
    fd.mul_start = 1'b1; fa.mul_start = 1'b1;   // both ask, only the owner counts
    fd.inv_start = 1'b1; fa.inv_start = 1'b1;
    @(negedge clk);
    fd.mul_start = 1'b0; fa.mul_start = 1'b0;
    fd.inv_start = 1'b0; fa.inv_start = 1'b0;
    lat = 0;
    while (!(owner ? fa.mul_done : fd.mul_done)) begin
      @(negedge clk);
      lat++;
    end
    for (int i = 0; i < NMUL; i++) begin
      checks++;
      if ((owner ? fa.mul_p[i] : fd.mul_p[i]) !== ref_mul(oa[i], ob[i])) begin
        failures++;
        $display("FAIL lane %0d product, owner %0d", i, owner);
      end
    end
    checks++;
    if (lat != 16) begin
      failures++;
      $display("FAIL multiplication latency %0d", lat);
    end
    while (!(owner ? fa.inv_done : fd.inv_done)) @(negedge clk);
    checks++;
    if (ref_mul(ia, owner ? fa.inv_q : fd.inv_q) !== felem_t'(1)) begin
      failures++;
      $display("FAIL inverse, owner %0d", owner);
    end
  endtask

  initial begin
    fd.mul_start = 1'b0; fa.mul_start = 1'b0; fd.inv_start = 1'b0; fa.inv_start = 1'b0;
    fd.mul_a = '0; fd.mul_b = '0; fa.mul_a = '0; fa.mul_b = '0; fd.inv_a = '0; fa.inv_a = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 10; n++) round(logic'(n % 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
