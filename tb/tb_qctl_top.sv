// tb_qctl_top: end-to-end test of the control system at reduced gate times.
//
// Only the 48 MHz card clock is driven; the clock managers inside the design
// make the 200 MHz and 45/96 MHz clocks. The gates are shortened to 100 us
// (4800 cycles at 48 MHz, 20000 at 200 MHz) and the FIFO to 64 words. The
// testbench acts as the host on the register bus and the streaming port and
// as two photon detectors on det_in[0] (A) and det_in[1] (B).
//
// Three measurement rounds, each one gate long, send pairs of 30 ns pulses on
// A and B with chosen delays between them plus some lone pulses on A:
//   1. synchronous coincidences, waiting time 2 cycles (10 ns)
//   2. asynchronous coincidences (mode switch through the control register)
//   3. synchronous, waiting time 4 cycles, with the stream not read so the
//      time-stamp FIFO overflows; then it is drained and the flag cleared.
// Expected counts are worked out from the delays alone: a pair coincides for
// the synchronous detector when |delay| < t_wait periods and never when it
// exceeds t_wait + 1 periods (no delay is placed between), and for the
// asynchronous one when |delay| < 1.35 ns. Channel counts, coincidence counts
// and coinc_out pulses are compared. In rounds 1-2 the time-stamp stream is
// decoded like a host does and the intervals between recorded rising edges of
// A are compared with the generated ones (within one 5 ns tick). Also checked:
// the LFSR output bit obeys the recurrence of its polynomial, the periodic
// pins carry the selected signals, and the modulator gates follow level and
// waveform. Every mechanism is counted and one that never happened fails.
module tb_qctl_top;
  timeunit 1ns; timeprecision 1ps;
  import qctl_pkg::*;

  localparam int unsigned GS = 4800, GF = 20000, DEPTH = 64;

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

  qctl_top #(.GATE_SLOW(GS), .GATE_FAST(GF), .FIFO_DEPTH(DEPTH)) dut (
    .clk_48(clk), .rst(rst), .det_in(det),
    .reg_addr(addr), .reg_wdata(wdata), .reg_we(we), .reg_re(re), .reg_rdata(rdata),
    .stream_rd(stream_rd), .stream_data(stream_data), .stream_valid(stream_valid),
    .io2_out(io2), .pm_gate(pm_gate), .am_gate(am_gate), .rng_bit(rng_bit),
    .coinc_out(coinc_out), .dcm_locked(locked));

  always #10.4165ns clk = ~clk;

  // mechanisms
  int n_gates = 0, n_hold = 0, n_sync_hit = 0, n_sync_miss = 0, n_async_hit = 0, n_async_miss = 0;
  int n_mode_switch = 0, n_overflow = 0, n_ovf_clear = 0, n_wrap = 0, n_code_switch = 0;
  int n_mod_on = 0;

  initial begin
    #3ms;
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

  // ------------------------------------------------ host register access
  task automatic wr(input logic [7:0] ofs, input logic [7:0] d);
    @(negedge clk) begin addr = REG_BASE + 16'(ofs); wdata = d; we = 1'b1; end
    @(negedge clk) we = 1'b0;
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

  task automatic wait_valid(input int bitno);
    logic [7:0] d;
    do rd(OFS_STATUS, d); while (!d[bitno]);
  endtask

  // ------------------------------------------------ time-stamp stream (host side)
  longint myclock = 0;
  bit     collect = 1'b1;
  bit     prev_a = 1'b0;
  realtime rec_rise_q[$];
  realtime gen_rise_q[$];
  bit     gen_log = 1'b1;

  always @(posedge clk) begin
    if (!rst && stream_valid) begin
      logic [10:0] ts;
      logic [4:0]  st;
      ts = stream_data[10:0];
      st = stream_data[15:11];
      if (collect && st[0] && !prev_a) rec_rise_q.push_back(realtime'(myclock + ts) * 5ns);
      prev_a = st[0];
      if (ts == 11'h7FF) begin
        myclock += 2048;
        n_wrap++;
      end
    end
  end

  int coinc_pulses = 0;
  always @(posedge coinc_out) coinc_pulses++;

  // ------------------------------------------------ detectors
  task automatic pair(input realtime d);
    if (gen_log) gen_rise_q.push_back((d < 0) ? $realtime - d : $realtime);
    fork
      begin
        if (d < 0) #(-d);
        det[0] = 1'b1; #30ns; det[0] = 1'b0;
      end
      begin
        if (d > 0) #(d);
        det[1] = 1'b1; #30ns; det[1] = 1'b0;
      end
    join
  endtask

  task automatic lone_a();
    if (gen_log) gen_rise_q.push_back($realtime);
    det[0] = 1'b1; #30ns; det[0] = 1'b0;
  endtask

  // one gate: restart all three counters, send the pulses, read the results
  task automatic round(input realtime delays[], input int t_wait, input bit async_mode,
                       input string name);
    logic [31:0] va, vb, vc;
    int          exp_c, np, nl, c0;
    realtime     t_start;
    // restart: read out whatever the previous gate left
    wait_valid(0); rd32(OFS_CNT_A, va);
    wait_valid(1); rd32(OFS_CNT_B, vb);
    wait_valid(2); rd32(OFS_CNT_C, vc);
    t_start = $realtime;
    c0 = coinc_pulses;
    #2us;
    exp_c = 0; np = 0; nl = 0;
    while ($realtime - t_start < 92us) begin
      foreach (delays[i]) begin
        realtime ad;
        bit      hit;
        ad  = delays[i] < 0 ? -delays[i] : delays[i];
        hit = async_mode ? (ad < 1.35ns) : (ad < t_wait * 5.0ns);
        pair(delays[i]);
        np++;
        if (hit) exp_c++;
        if (async_mode) begin if (hit) n_async_hit++; else n_async_miss++; end
        else            begin if (hit) n_sync_hit++;  else n_sync_miss++;  end
        #370ns;
        if ((np % 7) == 0) begin lone_a(); nl++; #370ns; end
      end
    end
    // results
    wait_valid(0); rd32(OFS_CNT_A, va);
    wait_valid(1); rd32(OFS_CNT_B, vb);
    wait_valid(2); rd32(OFS_CNT_C, vc);
    n_gates += 3;
    check(va == 32'(np + nl), $sformatf("%s: channel A %0d, expected %0d", name, va, np + nl));
    check(vb == 32'(np),      $sformatf("%s: channel B %0d, expected %0d", name, vb, np));
    check(vc == 32'(exp_c),   $sformatf("%s: coincidences %0d, expected %0d", name, vc, exp_c));
    check(coinc_pulses - c0 == exp_c,
          $sformatf("%s: %0d pulses on coinc_out, expected %0d", name, coinc_pulses - c0, exp_c));
  endtask

  // ------------------------------------------------ main sequence
  initial begin
    logic [7:0] d;
    logic [31:0] v;
    realtime r1[] = '{0ns, 2ns, 6ns, 9ns, -3ns, -8ns, 18ns, 25ns, -20ns, 40ns};
    realtime r2[] = '{0ns, 0.6ns, 1.0ns, -0.8ns, -1.2ns, 2ns, -2.5ns, 6ns, 15ns};
    realtime r3[] = '{0ns, 12ns, 19ns, -17ns, 26ns, -28ns, 45ns};

    rst = 1'b1; det = '0; addr = '0; wdata = '0; we = 1'b0; re = 1'b0; stream_rd = 1'b1;
    repeat (30) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (locked);
    check(locked, "clock managers locked");

    // ---- random bits: the output obeys s[n+16] = s[n+13]^s[n+12]^s[n+7]^s[n]
    begin
      bit s[$];
      int bad = 0;
      repeat (200) @(posedge clk) s.push_back(rng_bit);
      for (int n = 0; n + 16 < s.size(); n++)
        if (s[n+16] != (s[n+13] ^ s[n+12] ^ s[n+7] ^ s[n])) bad++;
      check(bad == 0, $sformatf("LFSR bit stream breaks its recurrence %0d times", bad));
      rd(OFS_LFSR, d);
      v[7:0] = d;
      rd(OFS_LFSR + 8'd1, d);
      v[15:8] = d;
      check(v[15:0] != 16'h0, "LFSR word is zero");
    end

    // ---- periodic pins: codes 0..4 on pins 0..4, then rotated
    for (int rot = 0; rot < 2; rot++) begin
      for (int i = 0; i < 5; i++) wr(OFS_IO_CODE + 8'(i), 8'((i + rot) % 5));
      n_code_switch++;
      begin
        int tog[5], opp;
        logic [4:0] p;
        opp = 0;
        foreach (tog[i]) tog[i] = 0;
        p = io2;
        repeat (2000) begin
          #0.5ns;
          for (int i = 0; i < 5; i++) if (io2[i] != p[i]) tog[i]++;
          p = io2;
        end
        for (int i = 0; i < 5; i++) begin
          int c, lo, hi;
          c  = (i + rot) % 5;
          lo = (c == 2 || c == 4) ? 86 : (c == 3) ? 186 : 0;
          hi = (c == 2 || c == 4) ? 94 : (c == 3) ? 198 : 0;
          check(tog[i] >= lo && tog[i] <= hi, $sformatf("pin %0d code %0d: %0d toggles in 1 us", i, c, tog[i]));
          if (c == 1) check(io2[i] == 1'b1, "code 1 pin not high");
          if (c == 0) check(io2[i] == 1'b0, "code 0 pin not low");
        end
      end
    end

    // ---- modulator drive: phase 0 level 3 on 45 MHz, amplitude 0 on steady high
    wr(OFS_MOD_LVL + 8'd0, 8'd3);
    wr(OFS_MOD_CODE + 8'd0, CODE_F45);
    wr(OFS_MOD_LVL + 8'd2, 8'd1);
    wr(OFS_MOD_CODE + 8'd2, CODE_HIGH);
    begin
      int on = 0, bad = 0;
      repeat (500) begin
        #0.77ns;
        if (pm_gate[0] == 6'b000100) on++;
        else if (pm_gate[0] != 6'b0) bad++;
        if (pm_gate[1] != 6'b0 || am_gate != 2'b01) bad++;
      end
      n_mod_on += on;
      check(bad == 0 && on > 150 && on < 350, $sformatf("modulator gates: %0d on, %0d wrong", on, bad));
    end
    wr(OFS_MOD_LVL + 8'd2, 8'd0);
    #5ns check(am_gate == 2'b00, "amplitude output not off at level 0");

    // ---- round 1: synchronous, t_wait = 2
    wr(OFS_TWAIT, 8'd2);
    round(r1, 2, 1'b0, "sync t_wait=2");

    // a result waits for the host: leave it unread for a while
    wait_valid(0);
    rd32(OFS_CNT_A, v);   // restarts A
    wait_valid(0);
    #30us;
    rd(OFS_STATUS, d);
    check(d[0], "channel A result not held");
    n_hold++;

    // ---- round 2: asynchronous detector
    wr(OFS_CTRL, 8'h03);
    n_mode_switch++;
    #1us;
    round(r2, 0, 1'b1, "async");
    // time stamps of rounds 1 and 2
    #3us;
    collect = 1'b0;
    gen_log = 1'b0;
    check(rec_rise_q.size() == gen_rise_q.size(),
          $sformatf("%0d rising edges of A recorded, %0d generated", rec_rise_q.size(), gen_rise_q.size()));
    begin
      int bad = 0;
      for (int i = 1; i < rec_rise_q.size() && i < gen_rise_q.size(); i++) begin
        realtime dr, dg, e;
        dr = rec_rise_q[i] - rec_rise_q[i-1];
        dg = gen_rise_q[i] - gen_rise_q[i-1];
        e  = dr - dg;
        if (e > 5.2ns || e < -5.2ns) bad++;
      end
      check(bad == 0, $sformatf("%0d time-stamp intervals off by more than one tick", bad));
    end
    check(n_wrap >= 20, $sformatf("only %0d wrap records", n_wrap));

    // ---- round 3: synchronous, t_wait = 4, stream not read
    wr(OFS_CTRL, 8'h02);
    n_mode_switch++;
    wr(OFS_TWAIT, 8'd4);
    stream_rd = 1'b0;
    round(r3, 4, 1'b0, "sync t_wait=4");
    rd(OFS_STATUS, d);
    check(d[3], "FIFO overflow not flagged");
    if (d[3]) n_overflow++;
    stream_rd = 1'b1;
    #5us;
    wr(OFS_STATUS, 8'h08);
    #200ns;
    rd(OFS_STATUS, d);
    check(!d[3], "overflow flag not cleared");
    if (!d[3]) n_ovf_clear++;

    // ---- every mechanism happened
    check(n_gates > 0,       "no gate completed");
    check(n_hold > 0,        "no held result");
    check(n_sync_hit > 0,    "no synchronous coincidence");
    check(n_sync_miss > 0,   "no synchronous rejection");
    check(n_async_hit > 0,   "no asynchronous coincidence");
    check(n_async_miss > 0,  "no asynchronous rejection");
    check(n_mode_switch > 0, "no coincidence mode switch");
    check(n_overflow > 0,    "no FIFO overflow");
    check(n_ovf_clear > 0,   "no overflow clear");
    check(n_wrap > 0,        "no time-stamp wrap");
    check(n_code_switch > 0, "no output code switch");
    check(n_mod_on > 0,      "modulator transistor never on");
    $display("mechanisms: gates %0d hold %0d sync hit/miss %0d/%0d async hit/miss %0d/%0d mode %0d ovf %0d clr %0d wraps %0d codes %0d",
             n_gates, n_hold, n_sync_hit, n_sync_miss, n_async_hit, n_async_miss, n_mode_switch,
             n_overflow, n_ovf_clear, n_wrap, n_code_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
