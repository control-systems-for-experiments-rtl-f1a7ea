// tb_workload_coinc: coincidence window sweep of both coincidence detectors.
//
// Reproduces the delay sweep used to characterise the detectors: two 500 kHz
// detector signals (100 ns pulses, one pair every 2 us), the second one
// delayed by d against the first, alternately A first and B first. For each
// delay 100 pairs are sent, each at a random phase against the 200 MHz clock
// of the synchronous detector (t_wait = 2), and the pulses of both detectors
// are counted (and the toggle output of the asynchronous model must change
// once per pulse). Delays run from 0 to 3 ns in 125 ps steps and from 3.25 ns to
// 20 ns in 250 ps steps.
//
// Expected, for the synchronous detector: every pair a coincidence for
// d <= 2 clock periods (10 ns), none for d >= 3 periods (15 ns), and a
// fraction in between that depends on the clock phase (checked to lie between
// 25 % and 75 % at 12.5 ns, where it is 50 % on average). For the asynchronous
// model: every pair for d <= 1.25 ns, none for d >= 1.5 ns. The random phases
// are kept off the clock edges (odd multiples of 5 ps) so that no edge meets
// a sampling instant exactly. The fraction per delay is printed as a curve.
module tb_workload_coinc;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N_PAIRS = 100;

  logic       clk = 1'b0, rst, a, b;
  logic       coinc_s, coinc_a, tog;
  int         checks = 0, failures = 0;
  int         n_s = 0, n_a = 0, n_t = 0;
  int         always_s = 0, never_s = 0, partial_s = 0, always_a = 0, never_a = 0;

  coinc_sync  u_sync  (.clk(clk), .rst(rst), .a(a), .b(b), .t_wait(8'd2), .coinc(coinc_s));
  coinc_async u_async (.rst(rst), .da(a), .db(b), .coinc(coinc_a), .coinc_toggle(tog));

  always #2.5ns clk = ~clk;   // 200 MHz

  always @(posedge clk) if (!rst && coinc_s) n_s++;
  always @(posedge coinc_a) if (!rst) n_a++;
  always @(tog) if (!rst) n_t++;

  initial begin
    #30ms;
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

  // one pair per 2 us period, starting on a clock edge
  task automatic pair(input realtime d, input bit b_first);
    realtime ph;
    ph = 1ps * (10 * $urandom_range(0, 499) + 5);   // 5 ps .. 4995 ps, never on an edge
    #(ph);
    if (b_first) begin
      b = 1'b1; #(d); a = 1'b1;
      #100ns;
      b = 1'b0; #(d); a = 1'b0;
    end else begin
      a = 1'b1; #(d); b = 1'b1;
      #100ns;
      a = 1'b0; #(d); b = 1'b0;
    end
    #(2us - 100ns - 2 * d - ph);
  endtask

  task automatic sweep(input realtime d);
    int s0, a0, hs, ha;
    s0 = n_s; a0 = n_a;
    for (int i = 0; i < int'(N_PAIRS); i++) pair(d, i[0]);
    hs = n_s - s0;
    ha = n_a - a0;
    $display("delay %6.3f ns  synchronous %3d %%  asynchronous %3d %%", d, hs * 100 / N_PAIRS, ha * 100 / N_PAIRS);
    if (hs == int'(N_PAIRS)) always_s++; else if (hs == 0) never_s++; else partial_s++;
    if (ha == int'(N_PAIRS)) always_a++; else if (ha == 0) never_a++;
    if (d <= 10ns)
      check(hs == int'(N_PAIRS), $sformatf("synchronous, %0.3f ns: %0d of %0d", d, hs, N_PAIRS));
    else if (d >= 15ns)
      check(hs == 0, $sformatf("synchronous, %0.3f ns: %0d of %0d", d, hs, N_PAIRS));
    else if (d == 12.5ns)
      check(hs >= int'(N_PAIRS) / 4 && hs <= 3 * int'(N_PAIRS) / 4,
            $sformatf("synchronous, %0.3f ns: %0d of %0d", d, hs, N_PAIRS));
    if (d <= 1.25ns)
      check(ha == int'(N_PAIRS), $sformatf("asynchronous, %0.3f ns: %0d of %0d", d, ha, N_PAIRS));
    else if (d >= 1.5ns)
      check(ha == 0, $sformatf("asynchronous, %0.3f ns: %0d of %0d", d, ha, N_PAIRS));
  endtask

  initial begin
    rst = 1'b1; a = 1'b0; b = 1'b0;
    repeat (10) @(posedge clk);
    rst = 1'b0;
    repeat (10) @(posedge clk);
    for (int k = 0; k <= 24; k++) sweep(k * 0.125ns);
    for (int k = 13; k <= 80; k++) sweep(k * 0.25ns);
    // each behaviour of the window must have been seen
    check(always_s > 0 && never_s > 0 && partial_s > 0,
          $sformatf("synchronous always/never/partial delays %0d/%0d/%0d", always_s, never_s, partial_s));
    check(always_a > 0 && never_a > 0,
          $sformatf("asynchronous always/never delays %0d/%0d", always_a, never_a));
    check(n_t == n_a, $sformatf("%0d toggles for %0d asynchronous coincidences", n_t, n_a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
