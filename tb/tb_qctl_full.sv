// tb_qctl_full: one complete measurement with the design at its default size.
//
// qctl_top is used without parameter overrides: one-second gates (48 000 000
// cycles at 48 MHz and 200 000 000 at 200 MHz), 11-bit time stamps at
// 200 MHz and a 1024-word FIFO. After reset the counters start on their own;
// during the first second the testbench sends a pair of 30 ns pulses on
// detectors A and B every 10 us, with delays that cycle through values inside
// and outside the 10 ns synchronous coincidence window, plus a lone pulse on
// A after every seventh pair. The host side drains the time-stamp stream all
// the time. At the end of the gate the three 32-bit results are read over
// the register bus and compared with the counts worked out from the
// stimulus; the recorded rising edges of A and the number of time-stamp wrap
// records (one per 2048 ticks of 5 ns) are compared too, and reading the
// results must restart the counters.
module tb_qctl_full;
  timeunit 1ns; timeprecision 1ps;
  import qctl_pkg::*;

  logic             clk = 1'b0, rst;
  logic [7:0]       det;
  logic [15:0]      addr;
  logic [7:0]       wdata, rdata;
  logic             we, re, stream_rd, stream_valid;
  logic [15:0]      stream_data;
  logic [4:0]       io2;
  logic [1:0][5:0]  pm_gate;
  logic [1:0]       am_gate;
  logic             rng_bit, coinc_out, locked;
  int               checks = 0, failures = 0;

  qctl_top dut (
    .clk_48(clk), .rst(rst), .det_in(det),
    .reg_addr(addr), .reg_wdata(wdata), .reg_we(we), .reg_re(re), .reg_rdata(rdata),
    .stream_rd(stream_rd), .stream_data(stream_data), .stream_valid(stream_valid),
    .io2_out(io2), .pm_gate(pm_gate), .am_gate(am_gate), .rng_bit(rng_bit),
    .coinc_out(coinc_out), .dcm_locked(locked));

  always #10.4165ns clk = ~clk;

  initial begin
    #1.2s;
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

  task automatic rd(input logic [7:0] ofs, output logic [7:0] d);
    @(negedge clk) begin addr = REG_BASE + 16'(ofs); re = 1'b1; end
    @(negedge clk) begin re = 1'b0; d = rdata; end
  endtask

  task automatic rd32(input logic [7:0] ofs, output logic [31:0] v);
    logic [7:0] d;
    for (int k = 0; k < 4; k++) begin
      rd(ofs + 8'(k), d);
      v[8*k +: 8] = d;
    end
  endtask

  // host side of the time-stamp stream
  int  n_wrap = 0, n_rise = 0;
  bit  prev_a = 1'b0;
  always @(posedge clk) begin
    if (!rst && stream_valid) begin
      if (stream_data[11] && !prev_a) n_rise++;
      prev_a = stream_data[11];
      if (stream_data[10:0] == 11'h7FF) n_wrap++;
    end
  end

  int coinc_pulses = 0;
  always @(posedge coinc_out) coinc_pulses++;

  initial begin
    realtime     delays[];
    logic [31:0] va, vb, vc;
    logic [7:0]  d;
    int          np, nl, exp_c;
    realtime     t0, ad;

    delays = '{0ns, 3ns, 8ns, -6ns, 18ns, -25ns, 60ns};
    rst = 1'b1; det = '0; addr = '0; wdata = '0; we = 1'b0; re = 1'b0; stream_rd = 1'b1;
    repeat (30) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    t0 = $realtime;
    #5us;
    np = 0; nl = 0; exp_c = 0;
    while ($realtime - t0 < 990ms) begin
      ad = delays[np % 7];
      fork
        begin
          if (ad < 0) #(-ad);
          det[0] = 1'b1; #30ns; det[0] = 1'b0;
        end
        begin
          if (ad > 0) #(ad);
          det[1] = 1'b1; #30ns; det[1] = 1'b0;
        end
      join
      if (ad < 10ns && ad > -10ns) exp_c++;
      np++;
      #4us;
      if ((np % 7) == 0) begin
        det[0] = 1'b1; #30ns; det[0] = 1'b0;
        nl++;
      end
      #(10us - 4us - 90ns);
    end
    $display("stimulus done at %0t: %0d pairs, %0d lone pulses", $realtime, np, nl);

    // end of the gate: wait for all three results
    do rd(OFS_STATUS, d); while (d[2:0] != 3'b111);
    check(($realtime - t0) > 999.9ms && ($realtime - t0) < 1.001s,
          $sformatf("results valid after %0t", $realtime - t0));
    rd32(OFS_CNT_A, va);
    rd32(OFS_CNT_B, vb);
    rd32(OFS_CNT_C, vc);
    check(va == 32'(np + nl), $sformatf("channel A %0d, expected %0d", va, np + nl));
    check(vb == 32'(np),      $sformatf("channel B %0d, expected %0d", vb, np));
    check(vc == 32'(exp_c),   $sformatf("coincidences %0d, expected %0d", vc, exp_c));
    check(coinc_pulses == exp_c, $sformatf("%0d coinc_out pulses, expected %0d", coinc_pulses, exp_c));
    check(n_rise == np + nl, $sformatf("%0d rising edges of A time-stamped, expected %0d", n_rise, np + nl));
    // one wrap record per 2048 * 5 ns since the recorder started
    begin
      int exp_wrap;
      exp_wrap = int'(($realtime - t0) / (2048 * 5ns));
      check(n_wrap >= exp_wrap - 2 && n_wrap <= exp_wrap + 1,
            $sformatf("%0d wrap records, expected about %0d", n_wrap, exp_wrap));
    end
    rd(OFS_STATUS, d);
    check(!d[3], "time-stamp FIFO overflowed while drained");
    #1us;
    rd(OFS_STATUS, d);
    check(d[2:0] == 3'b000, "counters did not restart after being read");
    $display("A %0d B %0d C %0d wraps %0d", va, vb, vc, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
