// periodic_mux: periodic signal generator output selector.
//
// Each of N_OUT output pins carries one of five signals chosen by an 8-bit
// code the host writes into a register: 0x00 logic 0, 0x01 logic 1, 0x02 the
// 45 MHz clock, 0x03 the doubled clock, 0x04 the 45 MHz clock shifted by 180
// degrees. The clocks come from a clock manager, so the selection is purely
// combinational: a pin follows its clock with only the delay of the
// multiplexer. Undefined codes give logic 0.
//
// The codes and the signals follow the document. Mapping undefined codes to
// logic 0 is this design's choice. A code change may cut a clock pulse short;
// the driven modulators only sample the steady waveform.
module periodic_mux
  import qctl_pkg::*;
#(
  parameter int unsigned N_OUT = 5
) (
  input  logic [N_OUT-1:0][7:0] code,       // one code per pin
  input  logic                  clk_f45,    // 45 MHz, 0 degrees
  input  logic                  clk_f45_180,// 45 MHz, 180 degrees
  input  logic                  clk_f90,    // doubled clock
  output logic [N_OUT-1:0]      pin
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    for (int i = 0; i < N_OUT; i++) begin
      unique case (code[i])
        CODE_LOW:     pin[i] = 1'b0;
        CODE_HIGH:    pin[i] = 1'b1;
        CODE_F45:     pin[i] = clk_f45;
        CODE_F90:     pin[i] = clk_f90;
        CODE_F45_180: pin[i] = clk_f45_180;
        default:      pin[i] = 1'b0;
      endcase
    end
  end

endmodule
