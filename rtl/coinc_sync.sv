// coinc_sync: synchronous coincidence detector for two photon detectors.
//
// Both detector levels are sampled every clock (5 ns at 200 MHz) and the pair
// {a,b} is compared with the pair of the previous sample:
//   00 -> 11              coincidence at once
//   00 -> 01 or 10        the waiting timer starts
//   01/10 -> 11           coincidence if the cycles since the first arrival
//                         are <= t_wait
//   anything -> 00        the detector re-arms
// Once both inputs have been high the detector stays disarmed until both are
// low again, so each pair of clicks gives at most one coincidence, whichever
// detector clicks first. Arrivals are thus resolved to one clock period: with
// t_wait = 2, delays under 2 periods always coincide and delays over 3 periods
// never do.
//
// Interface: `coinc` is a one-cycle pulse, two cycles after the deciding
// sample when SYNC_IN = 1 (synchroniser) and one cycle after otherwise.
// `t_wait` is the waiting time in clock cycles. The state table follows the
// document; the timer width, the synchroniser and the disarmed state out of
// reset are this design's choice.
module coinc_sync #(
  parameter int unsigned TW      = 8,     // width of the waiting time
  parameter bit          SYNC_IN = 1'b1   // synchronise a and b first
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          a,        // detector A level
  input  logic          b,        // detector B level
  input  logic [TW-1:0] t_wait,   // waiting time, clock cycles
  output logic          coinc     // one-cycle coincidence pulse
);
  timeunit 1ns; timeprecision 1ps;

  logic [1:0]    meta, sync, cur, prev;
  logic          armed;
  logic [TW-1:0] timer;     // cycles between the first arrival and the previous sample
  logic [TW:0]   elapsed;   // cycles between the first arrival and this sample
  logic          hit;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 2'b00;
      sync <= 2'b00;
    end else begin
      meta <= {a, b};
      sync <= meta;
    end
  end

  assign cur     = SYNC_IN ? sync : {a, b};
  assign elapsed = {1'b0, timer} + 1'b1;

  always_comb begin
    hit = 1'b0;
    if (armed && cur == 2'b11) begin
      unique case (prev)
        2'b00:        hit = 1'b1;
        2'b01, 2'b10: hit = (elapsed <= {1'b0, t_wait});
        default:      hit = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev  <= 2'b11;
      armed <= 1'b0;
      timer <= '0;
      coinc <= 1'b0;
    end else begin
      prev  <= cur;
      coinc <= hit;
      if (cur == 2'b00) begin
        armed <= 1'b1;
        timer <= '0;
      end else if (cur == 2'b11) begin
        armed <= 1'b0;
      end else if (prev == 2'b00) begin
        timer <= '0;                       // first arrival: start the timer
      end else if (timer != '1) begin
        timer <= timer + 1'b1;             // saturating
      end
    end
  end

endmodule
