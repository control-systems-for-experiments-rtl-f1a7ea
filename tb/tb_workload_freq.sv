// tb_workload_freq: event frequency measurement at its real size.
//
// event_counter with its default one-second gate (48 000 000 cycles) counts a
// square wave on a 48 MHz clock, as the host would use it: wait for valid,
// read the result, acknowledge, and read the next gate. The test signal steps
// through the ends of the range the counter was characterised over, 700 kHz
// and 20 kHz, one gate each (a full second at 48 MHz takes minutes to
// simulate). Each frequency is started right after the gate opens, at a
// random phase, and held for the whole gate.
//
// The simulated clock period is 20.833 ns, so one gate lasts 0.999984 s
// instead of exactly 1 s. The expected count is the gate time divided by the
// signal period actually generated, and the result must be within one count
// of it. The error against the nominal frequency is printed and must stay
// below 0.0025 %.
module tb_workload_freq;
  timeunit 1ns; timeprecision 1ps;

  localparam realtime     TCLK = 20.833ns;
  localparam int unsigned GATE = 48_000_000;

  logic        clk = 1'b0, rst, sig = 1'b0, ack;
  logic [31:0] count;
  logic        valid;
  int          checks = 0, failures = 0;
  int          gen = 0;

  event_counter dut (.clk(clk), .rst(rst), .sig(sig), .ack_i(ack), .count_o(count), .valid_o(valid));

  // halves of 10.416 ns and 10.417 ns give a 20.833 ns period
  always begin
    #10.416ns clk = 1'b1;
    #10.417ns clk = 1'b0;
  end

  // square wave of half period h; it stops when gen moves on
  task automatic square(input realtime h);
    int my = gen;
    fork
      while (gen == my) begin
        #(h);
        if (gen == my) sig = ~sig;
      end
    join_none
  endtask

  initial begin
    #3s;
    failures++;
    $display("FAIL: watchdog");
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

  initial begin
    int unsigned freqs[];
    real         expect_n, err;
    realtime     half;
    logic [31:0] held;
    freqs = '{700_000, 20_000};
    rst = 1'b1; ack = 1'b0;
    repeat (5) @(posedge clk);
    foreach (freqs[i]) begin
      // the first gate starts at the end of reset, the next ones at the
      // acknowledge; the signal starts at a random phase right after
      if (i == 0) @(negedge clk) rst = 1'b0;
      else begin
        @(negedge clk) ack = 1'b1;
        @(negedge clk) ack = 1'b0;
      end
      sig = 1'b0;
      half = 1ps * $rtoi(1.0e12 / (2.0 * freqs[i]));   // half period, whole ps
      #(1ps * $urandom_range(1, 1000));
      square(half);
      wait (valid);
      gen++;
      held = count;
      expect_n = (GATE * TCLK) / (2.0 * half);
      err = 100.0 * (real'(count) - real'(freqs[i])) / real'(freqs[i]);
      $display("%0d Hz: %0d counts per gate, expected %0.1f, error %0.5f %%",
               freqs[i], count, expect_n, err);
      check(real'(count) > expect_n - 1.0 && real'(count) < expect_n + 1.0,
            $sformatf("%0d Hz: %0d counts, expected %0.1f", freqs[i], count, expect_n));
      check(err < 0.0025 && err > -0.0025, $sformatf("%0d Hz: error %0.5f %%", freqs[i], err));
      // the result must hold until it is acknowledged
      repeat (1000) @(posedge clk);
      check(valid && count == held, "result not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
