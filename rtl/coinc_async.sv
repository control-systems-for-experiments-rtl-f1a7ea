// coinc_async: asynchronous coincidence detector (behavioural model).
//
// Behavioural model: the timing of this circuit comes from real gate delays,
// which synthesis does not preserve, so the feedback delay is modelled with a
// delay statement (parameter WINDOW_NS) and the file is meant for simulation.
//
// Each detector output clocks its own D flip-flop whose D input is tied to 1.
// The flip-flop output returns, through a short delay line (two inverters in
// the built circuit), to the flip-flop's asynchronous reset, so every click
// produces a pulse WINDOW_NS long. An AND gate of the two pulses gives a
// coincidence pulse when the two rising edges are less than WINDOW_NS apart,
// whichever comes first. No clock is involved, so the window is far shorter
// than a clock period; the built circuit switched from coincidence to
// no coincidence between 1.25 ns and 1.5 ns of delay, hence the default.
//
// `coinc_toggle` is an extra flip-flop clocked by the coincidence pulse that
// changes state once per coincidence, so that a clocked counter can count
// pulses too short to be sampled. The structure follows the document; the
// toggle output and the reset input are this design's.
module coinc_async #(
  parameter realtime WINDOW_NS = 1.35ns   // feedback delay = coincidence window
) (
  input  logic rst,           // asynchronous, active high
  input  logic da,            // detector A
  input  logic db,            // detector B
  output logic coinc,         // coincidence pulse
  output logic coinc_toggle   // toggles once per coincidence
);
  timeunit 1ns; timeprecision 1ps;

  logic qa, qb;          // click pulses
  logic clr_a, clr_b;    // delayed feedback to the flip-flop resets

  initial begin
    qa = 1'b0;
    qb = 1'b0;
    clr_a = 1'b0;
    clr_b = 1'b0;
    coinc_toggle = 1'b0;
  end

  logic res_a, res_b;    // asynchronous resets of the two flip-flops
  assign res_a = rst | clr_a;
  assign res_b = rst | clr_b;

  always @(posedge da or posedge res_a)
    if (res_a) qa <= 1'b0;
    else       qa <= 1'b1;

  always @(posedge db or posedge res_b)
    if (res_b) qb <= 1'b0;
    else       qb <= 1'b1;

  always @(qa) clr_a <= #(WINDOW_NS) qa;
  always @(qb) clr_b <= #(WINDOW_NS) qb;

  assign coinc = qa & qb;

  always @(posedge coinc or posedge rst)
    if (rst) coinc_toggle <= 1'b0;
    else     coinc_toggle <= ~coinc_toggle;

endmodule
