// tb_output_levels: modulator drive levels through the output board.
//
// qctl_top, at its default size, drives a behavioural model of the modulator
// driver board. Acting as the host, the testbench sets each phase output to
// each of its six levels (and to off) with a steady-high drive waveform, and
// each amplitude output on and off, and reads the modulator voltages from the
// board model. Expected, for the board's resistor set: levels 1..6 give 7.5,
// 5.0, 3.5, 2.5, 1.0 and 0.5 V (phase steps of 270, 180, 126, 90, 36 and 18
// degrees for a 5 V half-wave voltage), level 0 gives 0 V, the amplitude
// output gives 5 V when on, the other outputs stay at 0 V, and no connector
// ever has two switches on. Finally a 45 MHz drive waveform must switch the
// selected level on and off.
module tb_output_levels;
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
  real              pm_v [2], am_v [2];
  logic             multi_on;
  int               checks = 0, failures = 0, n_multi = 0;

  qctl_top dut (
    .clk_48(clk), .rst(rst), .det_in(det),
    .reg_addr(addr), .reg_wdata(wdata), .reg_we(we), .reg_re(re), .reg_rdata(rdata),
    .stream_rd(stream_rd), .stream_data(stream_data), .stream_valid(stream_valid),
    .io2_out(io2), .pm_gate(pm_gate), .am_gate(am_gate), .rng_bit(rng_bit),
    .coinc_out(coinc_out), .dcm_locked(locked));

  output_board_model board (.pm_gate(pm_gate), .am_gate(am_gate), .pm_v(pm_v), .am_v(am_v),
                            .multi_on(multi_on));

  always #10.4165ns clk = ~clk;

  always @(posedge multi_on) n_multi++;

  initial begin
    #200us;
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

  task automatic wr(input logic [7:0] ofs, input logic [7:0] d);
    @(negedge clk) begin addr = REG_BASE + 16'(ofs); wdata = d; we = 1'b1; end
    @(negedge clk) we = 1'b0;
  endtask

  function automatic bit near(input real v, input real want);
    return v > want - 0.01 && v < want + 0.01;
  endfunction

  initial begin
    real volts [7];
    real other;
    int  ons, offs;
    volts = '{0.0, 7.5, 5.0, 3.5, 2.5, 1.0, 0.5};
    rst = 1'b1; det = '0; addr = '0; wdata = '0; we = 1'b0; re = 1'b0; stream_rd = 1'b0;
    repeat (30) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (4) @(posedge clk);
    check(near(pm_v[0], 0.0) && near(pm_v[1], 0.0) && near(am_v[0], 0.0) && near(am_v[1], 0.0),
          "outputs not off after reset");
    for (int j = 0; j < 2; j++) begin
      wr(OFS_MOD_CODE + 8'(j), CODE_HIGH);
      for (int lvl = 0; lvl <= 6; lvl++) begin
        wr(OFS_MOD_LVL + 8'(j), 8'(lvl));
        repeat (2) @(posedge clk);
        other = pm_v[1 - j];
        $display("phase output %0d level %0d: %0.3f V", j, lvl, pm_v[j]);
        check(near(pm_v[j], volts[lvl]),
              $sformatf("phase output %0d level %0d: %0.3f V, expected %0.2f V", j, lvl, pm_v[j], volts[lvl]));
        check(near(other, 0.0), $sformatf("phase output %0d not off: %0.3f V", 1 - j, other));
      end
      wr(OFS_MOD_LVL + 8'(j), 8'd0);
      wr(OFS_MOD_CODE + 8'(j), CODE_LOW);
    end
    for (int j = 0; j < 2; j++) begin
      wr(OFS_MOD_CODE + 8'(2 + j), CODE_HIGH);
      wr(OFS_MOD_LVL + 8'(2 + j), 8'd1);
      repeat (2) @(posedge clk);
      check(near(am_v[j], 5.0), $sformatf("amplitude output %0d on: %0.3f V", j, am_v[j]));
      check(near(am_v[1 - j], 0.0), $sformatf("amplitude output %0d not off", 1 - j));
      wr(OFS_MOD_LVL + 8'(2 + j), 8'd0);
      repeat (2) @(posedge clk);
      check(near(am_v[j], 0.0), $sformatf("amplitude output %0d off: %0.3f V", j, am_v[j]));
    end
    // a 45 MHz waveform switches level 2 (5.0 V) on and off
    wr(OFS_MOD_CODE + 8'd0, CODE_F45);
    wr(OFS_MOD_LVL + 8'd0, 8'd2);
    ons = 0; offs = 0;
    for (int i = 0; i < 1000; i++) begin
      #0.731ns;
      if (near(pm_v[0], 5.0)) ons++;
      else if (near(pm_v[0], 0.0)) offs++;
    end
    check(ons > 300 && offs > 300 && ons + offs == 1000,
          $sformatf("45 MHz drive: %0d samples on, %0d off", ons, offs));
    check(n_multi == 0, $sformatf("two switches on at once %0d times", n_multi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
