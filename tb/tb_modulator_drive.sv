// tb_modulator_drive: self-checking test of modulator_drive.
// For a 6-level phase output and a 1-level amplitude output, every level code
// is combined with both waveform values. Expected: with the waveform high,
// level k (1..N) turns on transistor k-1 only; level 0, levels above N and a
// low waveform turn all transistors off. Then a toggling waveform checks that
// the gates follow it.
module tb_modulator_drive;
  timeunit 1ns; timeprecision 1ps;

  logic [2:0] lvl_p, lvl_a;
  logic       wave;
  logic [5:0] gate_p;
  logic [0:0] gate_a;
  int         checks = 0, failures = 0;

  modulator_drive #(.N_LEVELS(6)) dut_p (.level(lvl_p), .wave(wave), .gate(gate_p));
  modulator_drive #(.N_LEVELS(1)) dut_a (.level(lvl_a), .wave(wave), .gate(gate_a));

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

  initial begin
    for (int l = 0; l < 8; l++) begin
      for (int w = 0; w < 2; w++) begin
        logic [5:0] exp_p;
        logic       exp_a;
        lvl_p = 3'(l); lvl_a = 3'(l); wave = 1'(w);
        #1ns;
        exp_p = (w == 1 && l >= 1 && l <= 6) ? (6'b1 << (l - 1)) : 6'b0;
        exp_a = (w == 1 && l == 1);
        check(gate_p == exp_p, $sformatf("phase: level %0d wave %0d gives %b", l, w, gate_p));
        check(gate_a[0] == exp_a, $sformatf("amplitude: level %0d wave %0d gives %b", l, w, gate_a));
      end
    end
    lvl_p = 3'd4;
    for (int i = 0; i < 20; i++) begin
      wave = i[0];
      #1ns check(gate_p == (wave ? 6'b001000 : 6'b0), "gates do not follow the waveform");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
