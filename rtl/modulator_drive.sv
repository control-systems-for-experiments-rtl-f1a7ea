// modulator_drive: gate signals for one output of the modulator driver board.
//
// An output of the board has N_LEVELS switching transistors, each with its own
// drain resistor, so that the transistor that conducts sets the voltage across
// the 50 ohm modulator and with it the applied phase (or, for an amplitude
// modulator with a single transistor, the on level). At most one transistor
// of an output may conduct. This block decodes the level register into a
// one-hot gate vector and gates it with the drive waveform: while `wave` is
// high, transistor `level-1` conducts; while `wave` is low, or when level is 0
// or above N_LEVELS, all are off and the output sits at 0 V.
//
// Purely combinational, so the gates follow the waveform with only gate
// delay. The one-transistor rule and the level counts (6 for a phase output,
// 1 for an amplitude output) follow the document; the level encoding and the
// gating by a waveform from the periodic signal generator are this design's
// choice.
module modulator_drive #(
  parameter int unsigned N_LEVELS = 6,   // transistors on this output
  parameter int unsigned LW       = 3    // width of the level code
) (
  input  logic [LW-1:0]       level,     // 0: off, k: transistor k-1
  input  logic                wave,      // drive waveform
  output logic [N_LEVELS-1:0] gate       // transistor gate signals, one-hot or zero
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    gate = '0;
    for (int k = 0; k < N_LEVELS; k++)
      if (wave && (level == LW'(k + 1)))
        gate[k] = 1'b1;
  end

  always_comb assert ($onehot0(gate)) else $error("modulator_drive: two transistors on");

endmodule
