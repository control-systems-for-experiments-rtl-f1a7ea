// sync_bit: two-flop synchroniser for a level crossing into the `clk` domain.
// The output follows the input two to three clock edges later. The input must
// be a level that is stable for longer than a clock period (a flag, or a bus
// qualifier whose bus is held while the flag is set).
module sync_bit #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  timeunit 1ns; timeprecision 1ps;

  logic meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
