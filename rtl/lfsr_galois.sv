// lfsr_galois: Galois linear feedback shift register pseudo-random generator.
//
// Each enabled clock the register is shifted one place towards the MSB; the
// bit shifted out of the MSB returns into bit 0 and is XORed into every bit
// whose coefficient g_i of the characteristic polynomial is 1. In polynomial
// terms the state is multiplied by x modulo G(x). The default polynomial is
// G(x) = x^16 + x^13 + x^12 + x^7 + 1, feedback taps [16,13,12,7] in Galois
// form, which gives a maximum-length sequence of 2^16 - 1 states.
//
// GPOLY holds g_{N-1} .. g_0 (g_N = 1 is implied); g_0 must be 1. `rnd_bit` is
// the MSB, the bit fed back. The state after reset is SEED, which must not be
// zero because the all-zero state maps to itself. Polynomial, form and width
// follow the document; the seed and the enable are this design's choice.
module lfsr_galois #(
  parameter int unsigned N     = 16,
  parameter logic [N-1:0] GPOLY = 16'b0011_0000_1000_0001,  // g13, g12, g7, g0
  parameter logic [N-1:0] SEED  = N'(1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,        // advance one step
  output logic [N-1:0] state,     // current word
  output logic         rnd_bit    // output bit (the MSB)
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (rst)
      state <= SEED;
    else if (en)
      state <= {state[N-2:0], 1'b0} ^ (state[N-1] ? GPOLY : '0);
  end

  assign rnd_bit = state[N-1];

  initial begin
    assert (GPOLY[0]) else $error("lfsr_galois: g0 must be 1");
    assert (SEED != '0) else $error("lfsr_galois: SEED must not be zero");
  end

endmodule
