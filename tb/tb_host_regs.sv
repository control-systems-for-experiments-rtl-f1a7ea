// tb_host_regs: self-checking test of host_regs.
// Drives the 8-bit register bus like the host does. Checked: reset values,
// write and read-back of every setting register (output codes at
// 0x200A..0x200E, modulator levels and codes, waiting time, control), byte
// order of the three 32-bit counter results, that only a read of the fourth
// byte pulses the matching restart strobe, the status byte, the LFSR word,
// the write-to-clear overflow strobe and that other addresses read 0 and
// change nothing.
module tb_host_regs;
  timeunit 1ns; timeprecision 1ps;
  import qctl_pkg::*;

  logic                  clk = 1'b0, rst;
  logic [15:0]           addr;
  logic [7:0]            wdata, rdata, t_wait;
  logic                  we, re, ack_a, ack_b, ack_c, ovf_clear;
  logic [31:0]           cnt_a, cnt_b, cnt_c;
  status_t               status;
  logic [15:0]           lfsr_word;
  ctrl_t                 ctrl;
  logic [N_IO-1:0][7:0]  io_code;
  logic [N_MOD-1:0][2:0] mod_level;
  logic [N_MOD-1:0][7:0] mod_code;
  int                    checks = 0, failures = 0;
  int                    acks_a = 0, acks_b = 0, acks_c = 0, clears = 0;

  host_regs dut (.clk(clk), .rst(rst), .addr(addr), .wdata(wdata), .we(we), .re(re), .rdata(rdata),
                 .cnt_a(cnt_a), .cnt_b(cnt_b), .cnt_c(cnt_c), .status(status), .lfsr_word(lfsr_word),
                 .ack_a(ack_a), .ack_b(ack_b), .ack_c(ack_c), .ovf_clear(ovf_clear),
                 .t_wait(t_wait), .ctrl(ctrl), .io_code(io_code), .mod_level(mod_level),
                 .mod_code(mod_code));

  always #10.4165ns clk = ~clk;

  always @(posedge clk) if (!rst) begin
    acks_a += int'(ack_a); acks_b += int'(ack_b); acks_c += int'(ack_c); clears += int'(ovf_clear);
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic wr(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk) begin addr = a; wdata = d; we = 1'b1; end
    @(negedge clk) we = 1'b0;
    @(negedge clk);   // let strobes of this access be counted
  endtask

  task automatic rd(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk) begin addr = a; re = 1'b1; end
    @(negedge clk) begin re = 1'b0; d = rdata; end
    @(negedge clk);   // let strobes of this access be counted
  endtask

  initial begin
    logic [7:0]  d;
    logic [31:0] v;
    logic [7:0]  shadow [logic [15:0]];
    rst = 1'b1; we = 1'b0; re = 1'b0; addr = '0; wdata = '0;
    cnt_a = 32'h1234_5678; cnt_b = 32'h0AB0_C0D0; cnt_c = 32'h0000_0F0F;
    status = '0; lfsr_word = 16'hBEEF;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(t_wait == 8'd2 && ctrl.ts_enable && !ctrl.coinc_async && io_code == '0, "reset values");

    // output codes of the periodic pins, at 0x200A + i
    for (int i = 0; i < N_IO; i++) begin
      wr(16'h200A + 16'(i), 8'(i + 1));
      shadow[16'h200A + 16'(i)] = 8'(i + 1);
    end
    for (int i = 0; i < N_IO; i++)
      check(io_code[i] == 8'(i + 1), $sformatf("io_code[%0d] = %0d", i, io_code[i]));
    for (int k = 0; k < N_MOD; k++) begin
      wr(16'h2016 + 16'(k), 8'(k + 3));
      wr(16'h201A + 16'(k), 8'(4 - k));
      shadow[16'h2016 + 16'(k)] = 8'((k + 3) & 7);
      shadow[16'h201A + 16'(k)] = 8'(4 - k);
    end
    for (int k = 0; k < N_MOD; k++)
      check(mod_level[k] == 3'(k + 3) && mod_code[k] == 8'(4 - k), $sformatf("modulator %0d settings", k));
    wr(16'h2009, 8'd7);
    wr(16'h200F, 8'h01);
    shadow[16'h2009] = 8'd7;
    shadow[16'h200F] = 8'h01;
    check(t_wait == 8'd7 && ctrl.coinc_async && !ctrl.ts_enable, "t_wait and control");
    // writes outside the bank do nothing
    wr(16'h100A, 8'hFF);
    wr(16'h2030, 8'hFF);
    check(io_code[0] == 8'd1, "write outside the bank changed a register");
    foreach (shadow[a]) begin
      rd(a, d);
      check(d == shadow[a], $sformatf("read back %h = %h, expected %h", a, d, shadow[a]));
    end

    // counter results, LSB first; only the fourth byte restarts
    for (int c = 0; c < 3; c++) begin
      logic [15:0] base;
      int          a0, b0, c0;
      base = (c == 0) ? 16'h2000 : (c == 1) ? 16'h2004 : 16'h2010;
      a0 = acks_a; b0 = acks_b; c0 = acks_c;
      for (int k = 0; k < 4; k++) begin
        rd(base + 16'(k), d);
        v[8*k +: 8] = d;
        if (k < 3) check(acks_a == a0 && acks_b == b0 && acks_c == c0, "restart before the fourth byte");
      end
      check(v == ((c == 0) ? cnt_a : (c == 1) ? cnt_b : cnt_c), $sformatf("counter %0d read %h", c, v));
      check(acks_a - a0 == int'(c == 0) && acks_b - b0 == int'(c == 1) && acks_c - c0 == int'(c == 2),
            $sformatf("counter %0d: wrong restart strobes", c));
    end

    status = '{unused: 3'b0, fifo_empty: 1'b1, fifo_overflow: 1'b1, valid_c: 1'b0, valid_b: 1'b1, valid_a: 1'b0};
    rd(16'h2008, d);
    check(d == 8'b0001_1010, $sformatf("status %b", d));
    rd(16'h2014, d);
    check(d == 8'hEF, "LFSR low byte");
    rd(16'h2015, d);
    check(d == 8'hBE, "LFSR high byte");
    rd(16'h2040, d);
    check(d == 8'h00, "unmapped address reads non-zero");
    wr(16'h2008, 8'h00);
    check(clears == 0, "overflow cleared without bit 3");
    wr(16'h2008, 8'h08);
    check(clears == 1, "overflow clear strobe");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
