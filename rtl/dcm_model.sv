// dcm_model: digital clock manager of the FPGA (behavioural model).
//
// Behavioural model of a vendor clock macro; it is not synthesizable and
// stands in for the FPGA primitive in simulation. From CLKIN (period
// CLKIN_PERIOD) it makes
//   CLK0      a copy of CLKIN
//   CLK2X     twice the input frequency
//   CLKFX     CLKIN * CLKFX_MULTIPLY / CLKFX_DIVIDE
//   CLKFX180  CLKFX shifted by 180 degrees
// with 50 % duty cycle. LOCKED rises after LOCK_CYCLES input cycles without
// reset and the generated clocks run while it is high; RST stops them. The
// generated clocks are free-running and not phase-aligned to CLKIN.
// The synthesis formula and its limits (2 <= M <= 32, 1 <= D <= 32, output
// between 18 and 210 MHz) follow the document; the lock time and the fixed
// rather than measured input period are this model's simplification.
module dcm_model #(
  parameter realtime     CLKIN_PERIOD   = 20.833ns,  // 48 MHz
  parameter int unsigned CLKFX_MULTIPLY = 25,
  parameter int unsigned CLKFX_DIVIDE   = 6,
  parameter int unsigned LOCK_CYCLES    = 8
) (
  input  logic CLKIN,
  input  logic RST,
  output logic CLK0,
  output logic CLK2X,
  output logic CLKFX,
  output logic CLKFX180,
  output logic LOCKED
);
  timeunit 1ns; timeprecision 1ps;

  localparam realtime FX_HALF = CLKIN_PERIOD * CLKFX_DIVIDE / (2.0 * CLKFX_MULTIPLY);
  localparam realtime X2_HALF = CLKIN_PERIOD / 4.0;

  int unsigned lock_cnt;

  initial begin
    assert (CLKFX_MULTIPLY >= 2 && CLKFX_MULTIPLY <= 32) else $error("dcm_model: M out of range");
    assert (CLKFX_DIVIDE >= 1 && CLKFX_DIVIDE <= 32) else $error("dcm_model: D out of range");
    assert (2.0 * FX_HALF > 1000.0ns / 210.0 && 2.0 * FX_HALF < 1000.0ns / 18.0)
      else $error("dcm_model: CLKFX outside 18..210 MHz");
    lock_cnt = 0;
    LOCKED   = 1'b0;
    CLKFX    = 1'b0;
    CLK2X    = 1'b0;
  end

  assign CLK0     = CLKIN;
  assign CLKFX180 = LOCKED ? ~CLKFX : 1'b0;

  always @(posedge CLKIN or posedge RST) begin
    if (RST) begin
      lock_cnt <= 0;
      LOCKED   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
    end else begin
      LOCKED   <= 1'b1;
    end
  end

  always begin
    #(FX_HALF);
    CLKFX = LOCKED ? ~CLKFX : 1'b0;
  end

  always begin
    #(X2_HALF);
    CLK2X = LOCKED ? ~CLK2X : 1'b0;
  end

endmodule
