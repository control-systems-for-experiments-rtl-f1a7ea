// tb_event_counter: self-checking test of event_counter.
// A short gate (GATE cycles) is used. The testbench generates pulse trains of
// random period inside each gate, away from its edges, and counts the rising
// edges it produced; the counter must report the same number, raise valid
// exactly GATE cycles after the restart, hold its result while waiting for
// the host and ignore pulses in that time.
module tb_event_counter;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned GATE = 200;

  logic        clk = 1'b0;
  logic        rst, sig, ack;
  logic [31:0] count;
  logic        valid;
  int          checks = 0, failures = 0;

  event_counter #(.GATE_CYCLES(GATE)) dut (
    .clk(clk), .rst(rst), .sig(sig), .ack_i(ack), .count_o(count), .valid_o(valid));

  always #10.4165ns clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Drives one gate of pulses starting right after the restart edge.
  // Returns the number of rising edges driven and the cycle valid rose at.
  task automatic run_gate(input int period, input int high, output int edges, output int rise_at);
    int cyc;
    edges   = 0;
    rise_at = -1;
    cyc     = 0;
    while (!valid && cyc < GATE + 20) begin
      @(negedge clk);
      if (cyc >= 8 && cyc < GATE - 8) begin
        if (((cyc - 8) % period) == 0) begin
          if (!sig) edges++;
          sig = 1'b1;
        end else if (((cyc - 8) % period) >= high) begin
          sig = 1'b0;
        end
      end else begin
        sig = 1'b0;
      end
      @(posedge clk);
      cyc++;
      #1ns;
      if (valid && rise_at < 0) rise_at = cyc;
    end
  endtask

  initial begin
    int edges, rise_at, p, h, held;
    rst = 1'b1; sig = 1'b0; ack = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;   // the first gate sample is the next edge
    run_gate(7, 3, edges, rise_at);
    check(valid && count == 32'(edges), $sformatf("gate 0: count %0d expected %0d", count, edges));
    check(rise_at + 1 == GATE, $sformatf("gate 0: valid after %0d cycles, expected %0d", rise_at + 1, GATE));

    for (int g = 1; g <= 12; g++) begin
      // pulses while holding must not change the result
      held = int'(count);
      for (int i = 0; i < 10; i++) begin
        @(negedge clk) sig = ~sig;
      end
      @(negedge clk) sig = 1'b0;
      repeat (3) @(posedge clk);
      check(valid && count == 32'(held), "result changed while waiting for the host");
      // restart
      @(negedge clk) ack = 1'b1;
      @(posedge clk);
      @(negedge clk) ack = 1'b0;
      #1ns check(!valid, "valid did not drop after ack");
      p = (g == 1) ? 2 : 2 + int'($urandom_range(0, 20));
      h = (p == 2) ? 1 : 1 + int'($urandom_range(0, p - 2));
      // run_gate starts on the negedge after the restart edge, so one
      // cycle of the gate has already passed
      run_gate(p, h, edges, rise_at);
      check(valid && count == 32'(edges),
            $sformatf("gate %0d (period %0d): count %0d expected %0d", g, p, count, edges));
      check(rise_at + 1 == GATE,
            $sformatf("gate %0d: valid after %0d cycles, expected %0d", g, rise_at + 1, GATE));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
