// tb_coinc_sync: self-checking test of coinc_sync.
// Each trial starts from both inputs low, raises one detector, raises the
// other d cycles later (either order, or both together), holds both, then
// drops them. A coincidence is expected exactly when d <= t_wait, as a single
// pulse three clock edges after the second input is applied (two
// synchroniser stages and the output register). Also checked: a second
// detector that rises only after the first has fallen gives nothing, and no
// pulse appears without a return to 00.
module tb_coinc_sync;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst, a, b, coinc;
  logic [7:0] t_wait;
  int         checks = 0, failures = 0;
  int         pulses;

  coinc_sync dut (.clk(clk), .rst(rst), .a(a), .b(b), .t_wait(t_wait), .coinc(coinc));

  always #2.5ns clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && coinc) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // d cycles between the two rising inputs; b_first swaps them.
  task automatic trial(input int d, input bit b_first, input int hold);
    int lat, p0;
    p0  = pulses;
    lat = -1;
    @(negedge clk);
    if (b_first) b = 1'b1; else a = 1'b1;
    for (int i = 0; i < d; i++) @(negedge clk);
    a = 1'b1; b = 1'b1;
    for (int i = 1; i <= 8; i++) begin
      @(posedge clk); #0.1ns;
      if (coinc && lat < 0) lat = i;
    end
    repeat (hold) @(negedge clk);
    @(negedge clk) begin a = 1'b0; b = 1'b0; end
    repeat (6) @(posedge clk);
    #0.1ns;
    check(pulses - p0 == ((d <= int'(t_wait)) ? 1 : 0),
          $sformatf("t_wait %0d d %0d b_first %0d: %0d pulses", t_wait, d, b_first, pulses - p0));
    if (d <= int'(t_wait))
      check(lat == 3, $sformatf("latency %0d, expected 3", lat));
  endtask

  initial begin
    rst = 1'b1; a = 1'b0; b = 1'b0; t_wait = 8'd2; pulses = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4) @(posedge clk);

    // the document's setting: t_wait = 2 clock periods
    for (int d = 0; d <= 6; d++) begin
      trial(d, 1'b0, 4);
      trial(d, 1'b1, 4);
    end
    // random waiting times and delays
    for (int n = 0; n < 60; n++) begin
      t_wait = 8'($urandom_range(0, 9));
      trial(int'($urandom_range(0, 12)), 1'($urandom_range(0, 1)), int'($urandom_range(0, 5)));
    end
    // A clicks and falls before B clicks: never a coincidence
    t_wait = 8'd5;
    begin
      int p0;
      p0 = pulses;
      @(negedge clk) a = 1'b1;
      @(negedge clk) a = 1'b0;
      @(negedge clk) b = 1'b1;
      repeat (3) @(negedge clk);
      b = 1'b0;
      repeat (8) @(posedge clk);
      check(pulses == p0, "pulse without both detectors high");
    end
    // both high, one drops and rises again without passing through 00
    begin
      int p0;
      trial(0, 1'b0, 2);
      p0 = pulses;
      @(negedge clk) begin a = 1'b1; b = 1'b1; end
      repeat (4) @(negedge clk);
      a = 1'b0;
      repeat (2) @(negedge clk);
      a = 1'b1;
      repeat (8) @(posedge clk);
      #0.1ns check(pulses == p0 + 1, "re-arm without returning to 00");
      @(negedge clk) begin a = 1'b0; b = 1'b0; end
      repeat (4) @(posedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
