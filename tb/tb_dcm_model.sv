// tb_dcm_model: self-checking test of the clock manager model.
// Two instances from a 48 MHz input: M/D = 25/6 (200 MHz) and 15/16 (45 MHz).
// Checked after lock: measured CLKFX periods (5 ns and 22.222 ns), the CLK2X
// period (10.417 ns), CLKFX180 being the inverse of CLKFX, CLK0 following
// CLKIN, and LOCKED low with no output clock during reset.
module tb_dcm_model;
  timeunit 1ns; timeprecision 1ps;

  logic clkin = 1'b0, rst;
  logic c0_a, c2x_a, fx_a, fx180_a, lk_a;
  logic c0_b, c2x_b, fx_b, fx180_b, lk_b;
  int   checks = 0, failures = 0;

  dcm_model #(.CLKFX_MULTIPLY(25), .CLKFX_DIVIDE(6)) dut_a (
    .CLKIN(clkin), .RST(rst), .CLK0(c0_a), .CLK2X(c2x_a), .CLKFX(fx_a), .CLKFX180(fx180_a), .LOCKED(lk_a));
  dcm_model #(.CLKFX_MULTIPLY(15), .CLKFX_DIVIDE(16)) dut_b (
    .CLKIN(clkin), .RST(rst), .CLK0(c0_b), .CLK2X(c2x_b), .CLKFX(fx_b), .CLKFX180(fx180_b), .LOCKED(lk_b));

  always #10.4165ns clkin = ~clkin;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // average period over n rising edges
  task automatic period_of(ref logic c, input int n, output realtime p);
    realtime t0;
    @(posedge c) t0 = $realtime;
    repeat (n) @(posedge c);
    p = ($realtime - t0) / n;
  endtask

  initial begin
    realtime p;
    int      bad;
    rst = 1'b1;
    #200ns;
    check(!lk_a && !lk_b && !fx_a && !fx_b, "clocks or lock during reset");
    rst = 1'b0;
    wait (lk_a && lk_b);
    #50ns;
    period_of(fx_a, 100, p);
    check(p > 4.99ns && p < 5.01ns, $sformatf("CLKFX 25/6 period %0.4f ns", p));
    period_of(fx_b, 100, p);
    check(p > 22.21ns && p < 22.23ns, $sformatf("CLKFX 15/16 period %0.4f ns", p));
    period_of(c2x_b, 100, p);
    check(p > 10.41ns && p < 10.42ns, $sformatf("CLK2X period %0.4f ns", p));
    bad = 0;
    repeat (500) begin
      #0.731ns;
      if (fx180_b == fx_b || fx180_a == fx_a || c0_a != clkin || c0_b != clkin) bad++;
    end
    check(bad == 0, $sformatf("%0d samples with CLKFX180 or CLK0 wrong", bad));
    rst = 1'b1;
    #100ns;
    check(!lk_a && !fx_a && !fx180_a, "reset does not stop the clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
