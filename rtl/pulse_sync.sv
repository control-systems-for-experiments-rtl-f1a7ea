// pulse_sync: carries one-cycle pulses from the src_clk domain to dst_clk.
// Each source pulse flips a toggle flip-flop; the destination synchronises
// the toggle with two flops and emits a one-cycle pulse on every change, three
// to four dst_clk edges later. Source pulses must be at least three
// destination periods apart, which holds for the rare control strobes it
// carries here.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  timeunit 1ns; timeprecision 1ps;

  logic tog, s1, s2, s3;

  always_ff @(posedge src_clk) begin
    if (src_rst)        tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
      s3 <= 1'b0;
      dst_pulse <= 1'b0;
    end else begin
      s1 <= tog;
      s2 <= s1;
      s3 <= s2;
      dst_pulse <= s2 ^ s3;
    end
  end

endmodule
