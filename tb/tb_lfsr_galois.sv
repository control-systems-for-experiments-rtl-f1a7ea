// tb_lfsr_galois: self-checking test of lfsr_galois with taps [16,13,12,7].
// The reference multiplies the state polynomial by x modulo
// G(x) = x^16 + x^13 + x^12 + x^7 + 1, written bit by bit from the taps list.
// Checked: every step against the reference, the first words after the seed,
// that the state is never zero, that the sequence returns to the seed after
// exactly 2^16 - 1 steps and not before, that the output bit is the MSB, and
// that a low enable holds the state.
module tb_lfsr_galois;
  timeunit 1ns; timeprecision 1ps;

  logic        clk = 1'b0;
  logic        rst, en, rb;
  logic [15:0] st;
  int          checks = 0, failures = 0;

  lfsr_galois dut (.clk(clk), .rst(rst), .en(en), .state(st), .rnd_bit(rb));

  always #5ns clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [15:0] ref_next(input logic [15:0] s);
    logic [15:0] n;
    logic        fb;
    int          taps[3] = '{13, 12, 7};
    fb = s[15];
    for (int i = 15; i >= 1; i--) n[i] = s[i-1];
    n[0] = fb;                                // g0 = 1
    foreach (taps[k]) n[taps[k]] = s[taps[k] - 1] ^ fb;
    return n;
  endfunction

  initial begin
    logic [15:0] model;
    int          period, bad;
    rst = 1'b1; en = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(st == 16'h0001, "seed");
    // hold
    repeat (3) @(posedge clk);
    #1ns check(st == 16'h0001, "state moved with enable low");
    @(negedge clk) en = 1'b1;
    model  = 16'h0001;
    period = 0;
    bad    = 0;
    do begin
      @(posedge clk); #1ns;
      model = ref_next(model);
      period++;
      if (st !== model || st == 16'h0 || rb != st[15]) bad++;
      if (period == 16) check(st == 16'h3081, $sformatf("step 16 gives %h, expected 3081", st));
      if (period == 17) check(st == 16'h6102, $sformatf("step 17 gives %h, expected 6102", st));
    end while (st != 16'h0001 && period < 70000);
    check(bad == 0, $sformatf("%0d steps differ from the reference", bad));
    check(period == 65535, $sformatf("period %0d, expected 65535", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
