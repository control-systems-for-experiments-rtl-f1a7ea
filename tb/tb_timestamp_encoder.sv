// tb_timestamp_encoder: self-checking test of timestamp_encoder.
// A 4-bit stamp keeps wraps frequent. The testbench changes the five tracked
// signals at random cycles and keeps its own list of (cycle, new state). It
// then rebuilds absolute time from the records the way a host does (add
// 2^TS_BITS for each all-ones stamp) and checks that every change appears
// once, with the right state and at its cycle plus the fixed latency, and
// that a wrap record appears every 2^TS_BITS cycles. Disabling must stop the
// records.
module tb_timestamp_encoder;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned N  = 5;
  localparam int unsigned TB = 4;

  logic            clk = 1'b0;
  logic            rst, en, wrap;
  logic [N-1:0]    sig;
  logic [N+TB-1:0] rec;
  logic            rec_valid;
  int              checks = 0, failures = 0;
  int              cycle = 0;

  timestamp_encoder #(.N_SIG(N), .TS_BITS(TB)) dut (
    .clk(clk), .rst(rst), .en(en), .sig(sig), .rec(rec), .rec_valid(rec_valid), .rec_wrap(wrap));

  always #2.5ns clk = ~clk;

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

  typedef struct { int t; logic [N-1:0] s; } ev_t;
  ev_t change_q[$];
  ev_t rec_q[$];          // rebuilt records: absolute stamp and state
  int  wraps_q[$];
  longint myclock = 0;

  // host-side reconstruction
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && rec_valid) begin
      ev_t e;
      e.t = int'(myclock) + int'(rec[TB-1:0]);
      e.s = rec[N+TB-1:TB];
      rec_q.push_back(e);
      check(wrap == (rec[TB-1:0] == '1), "rec_wrap does not match the stamp");
      if (rec[TB-1:0] == '1) begin
        wraps_q.push_back(e.t);
        myclock += 2 ** TB;
      end
    end
  end

  initial begin
    int en_cycle, k, nchg;
    logic [N-1:0] cur;
    rst = 1'b1; en = 1'b0; sig = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) begin rst = 1'b0; en = 1'b1; end
    en_cycle = cycle;   // stamp 0 is taken at the next edge
    cur = '0;
    nchg = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        ev_t e;
        cur  = cur ^ N'($urandom_range(1, 2 ** N - 1));
        sig  = cur;
        e.t  = cycle - en_cycle + 2;   // seen after the two-flop synchroniser
        e.s  = cur;
        change_q.push_back(e);
        @(negedge clk);                // keep each state for at least two cycles
        nchg++;
      end
    end
    repeat (6) @(negedge clk);
    en = 1'b0;
    repeat (3) @(posedge clk);
    k = rec_q.size();
    sig = ~sig;
    repeat (40) @(posedge clk);
    check(rec_q.size() == k, "records written while disabled");

    // every change must be in the records, in order, with its state
    begin
      int j = 0;
      foreach (change_q[i]) begin
        while (j < rec_q.size() && rec_q[j].t < change_q[i].t) j++;
        check(j < rec_q.size() && rec_q[j].t == change_q[i].t && rec_q[j].s == change_q[i].s,
              $sformatf("change %0d at %0d not recorded correctly", i, change_q[i].t));
      end
    end
    // wrap records every 2^TB ticks
    check(wraps_q.size() > 10, "too few wrap records");
    foreach (wraps_q[i])
      check(wraps_q[i] == (i + 1) * (2 ** TB) - 1, $sformatf("wrap %0d at %0d", i, wraps_q[i]));
    // no record other than changes and wraps
    check(rec_q.size() == change_q.size() + wraps_q.size() -
          count_coincident(), "unexpected number of records");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // changes that fell on a wrap tick share its record
  function automatic int count_coincident();
    int n = 0;
    foreach (change_q[i])
      if ((change_q[i].t % (2 ** TB)) == (2 ** TB) - 1) n++;
    return n;
  endfunction
endmodule
