// timestamp_encoder: event recorder for the time stamping application.
//
// A TS_BITS-bit time stamp counts clock ticks and wraps. Each tick the
// (synchronised) tracked signals are compared with their previous sample.
// A record {signals, time stamp} is written whenever any signal has changed
// (rising or falling edge) and also whenever the time stamp reaches its last
// value 2^TS_BITS - 1, with or without a change. The wrap records let the host
// rebuild absolute time: it adds 2^TS_BITS for every record whose stamp is
// all ones, and the time of any record is that sum plus its stamp. They also
// give the full state of all signals at least once per wrap, so the waveform
// can be rebuilt from the records alone.
//
// Interface: `rec_valid` is a one-cycle write strobe with `rec` for the dual
// clock FIFO, one cycle after the sample it describes; the signals reach the
// sample through a two-flop synchroniser. With `en` low the stamp is held at
// 0 and nothing is written. Record format (5 signals, 11-bit stamp, 16-bit
// word) follows the document; placing the signals in the upper bits is this
// design's choice.
module timestamp_encoder #(
  parameter int unsigned N_SIG   = 5,    // tracked signals
  parameter int unsigned TS_BITS = 11    // time stamp width
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic [N_SIG-1:0]           sig,        // tracked signals, asynchronous
  output logic [N_SIG+TS_BITS-1:0]   rec,        // {signals, time stamp}
  output logic                       rec_valid,  // write strobe
  output logic                       rec_wrap    // this record marks a wrap of the stamp
);
  timeunit 1ns; timeprecision 1ps;

  logic [N_SIG-1:0]   meta, cur, prev;
  logic [TS_BITS-1:0] ts;
  logic               changed, wrap;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      cur  <= '0;
      prev <= '0;
    end else begin
      meta <= sig;
      cur  <= meta;
      prev <= cur;
    end
  end

  assign changed = (cur != prev);
  assign wrap    = (ts == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      ts        <= '0;
      rec       <= '0;
      rec_valid <= 1'b0;
      rec_wrap  <= 1'b0;
    end else if (en) begin
      ts        <= ts + 1'b1;
      rec_valid <= changed || wrap;
      rec_wrap  <= wrap;
      rec       <= {cur, ts};
    end else begin
      ts        <= '0;
      rec_valid <= 1'b0;
      rec_wrap  <= 1'b0;
    end
  end

endmodule
