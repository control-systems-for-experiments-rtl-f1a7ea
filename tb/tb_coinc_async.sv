// tb_coinc_async: self-checking test of the asynchronous coincidence model.
// Detector A and B are given 4 ns pulses whose rising edges are a chosen
// delay apart (B later, or A later). A coincidence pulse is expected exactly
// when the delay is below the 1.35 ns window, and coinc_toggle must change
// once per coincidence. Trials are 60 ns apart so each starts idle.
module tb_coinc_async;
  timeunit 1ns; timeprecision 1ps;

  logic rst, da, db, coinc, tog;
  int   checks = 0, failures = 0;
  int   pulses = 0, toggles = 0;
  logic tog_q;

  coinc_async dut (.rst(rst), .da(da), .db(db), .coinc(coinc), .coinc_toggle(tog));

  always @(posedge coinc) pulses++;
  always @(tog) if (!rst) toggles++;

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

  // delay > 0: B after A; delay < 0: A after B
  task automatic trial(input realtime delay);
    int p0, t0;
    bit expect_hit;
    p0 = pulses;
    t0 = toggles;
    expect_hit = (delay < 1.35ns) && (delay > -1.35ns);
    fork
      begin
        if (delay < 0) #(-delay);
        da = 1'b1; #4ns; da = 1'b0;
      end
      begin
        if (delay > 0) #(delay);
        db = 1'b1; #4ns; db = 1'b0;
      end
    join
    #60ns;
    check((pulses - p0) == (expect_hit ? 1 : 0),
          $sformatf("delay %0.3f ns: %0d coincidences", delay, pulses - p0));
    check((toggles - t0) == (pulses - p0), "toggle output does not follow the coincidences");
  endtask

  initial begin
    rst = 1'b1; da = 1'b0; db = 1'b0;
    #10ns rst = 1'b0;
    #10ns;
    trial(0.0ns);
    trial(0.5ns);
    trial(1.0ns);
    trial(1.3ns);
    trial(1.4ns);
    trial(2.0ns);
    trial(5.0ns);
    trial(-0.7ns);
    trial(-1.2ns);
    trial(-1.6ns);
    for (int i = 0; i < 40; i++) begin
      realtime d;
      d = realtime'($urandom_range(0, 6000)) * 1ps - 3ns;
      // keep clear of the exact window edge, where the result is a race
      if ((d > 1.34ns && d < 1.36ns) || (d < -1.34ns && d > -1.36ns)) d = d * 1.1;
      trial(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
