// output_board_model: behavioural model of the modulator driver board, for
// testbenches only (real-valued, not synthesizable).
//
// The board has two phase-modulator outputs and two amplitude-modulator
// outputs, each a 50 ohm SMA connector. Behind a connector, transistor
// switches connect the modulator through a 30 ohm resistor plus a per-switch
// resistor R_i between the supplies (12 V in total). A logic 1 on a gate turns
// its switch on. With one switch on, the voltage across the modulator is
//     V = 50 * 12 / (50 + 30 + R_i).
// With several switches on, their branches are in parallel; the model computes
// that too and raises multi_on, since the board is meant to have at most one
// switch on per connector.
//
// The phase resistors give the board's intended phase steps for a modulator
// with a 5 V half-wave voltage: 0, 40, 91.4, 160, 520 and 1118 ohm for 7.5,
// 5.0, 3.5, 2.5, 1.0 and 0.5 V (270, 180, 126, 90, 36 and 18 degrees). The
// amplitude outputs have a single switch; its resistor is not given for
// those outputs and is taken here as 40 ohm, which gives the 5 V needed to
// switch an amplitude modulator with the same half-wave voltage fully.
//
// Outputs follow the gates with no delay.
module output_board_model #(
  parameter real V_SUPPLY = 12.0,   // V_CC - V_EE
  parameter real R_MOD    = 50.0,   // modulator input impedance
  parameter real R_SERIES = 30.0,   // fixed resistor in every branch
  parameter real R_AMP    = 40.0    // switch resistor of the amplitude outputs
) (
  input  logic [1:0][5:0] pm_gate,   // phase outputs, switch k of output j
  input  logic [1:0]      am_gate,   // amplitude outputs
  output real             pm_v [2],  // volts across each phase modulator
  output real             am_v [2],  // volts across each amplitude modulator
  output logic            multi_on   // some connector has two switches on
);
  timeunit 1ns; timeprecision 1ps;

  localparam real R_PHASE [6] = '{0.0, 40.0, 91.4, 160.0, 520.0, 1118.0};

  // voltage across the modulator for a set of conducting branches
  function automatic real vout(input real g_sum);
    real r_par;
    if (g_sum == 0.0) return 0.0;
    r_par = 1.0 / g_sum;
    return R_MOD * V_SUPPLY / (R_MOD + r_par);
  endfunction

  always_comb begin
    multi_on = 1'b0;
    for (int j = 0; j < 2; j++) begin
      real g;
      int  n;
      g = 0.0;
      n = 0;
      for (int k = 0; k < 6; k++)
        if (pm_gate[j][k]) begin
          g += 1.0 / (R_SERIES + R_PHASE[k]);
          n++;
        end
      pm_v[j] = vout(g);
      if (n > 1) multi_on = 1'b1;
      am_v[j] = am_gate[j] ? vout(1.0 / (R_SERIES + R_AMP)) : 0.0;
    end
  end
endmodule
