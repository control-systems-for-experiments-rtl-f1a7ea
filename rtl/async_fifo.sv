// async_fifo: dual clock FIFO with full, empty and valid flags.
//
// Carries time-stamp words from the fast acquisition clock (write side) to the
// host clock (read side). Storage is a DEPTH x W memory; the write and read
// pointers are one bit wider than the address and cross the clock boundary in
// Gray code through two-flop synchronisers, so each side sees a pessimistic
// but safe copy of the other pointer.
//
// Write side: a word is stored at a rising wr_clk with wr_en high and full
// low; a write attempted while full is dropped and `overflow` pulses one
// cycle later. Read side: rd_en with empty low takes the oldest word; it appears on
// rd_data with rd_valid high one rd_clk later. Flags: `full` rises in the
// cycle of the write that fills the FIFO; `empty` falls two or three read
// clocks after the first write, the synchroniser latency.
//
// The flags and the independent clocks follow the document; the depth (one
// 18 Kbit block RAM of 1024 x 16) and the Gray-code scheme are this design's.
module async_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 1024   // power of two
) (
  input  logic         wr_clk,
  input  logic         wr_rst,    // synchronous to wr_clk
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  output logic         overflow,  // a write was dropped this cycle

  input  logic         rd_clk,
  input  logic         rd_rst,    // synchronous to rd_clk
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_valid,
  output logic         empty
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the read side
  logic [AW:0] wbin_nxt, rbin_nxt;
  logic        do_wr, do_rd;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign do_wr    = wr_en && !full;
  assign wbin_nxt = wbin + (AW+1)'(do_wr);

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      full     <= 1'b0;
      overflow <= 1'b0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      full     <= bin2gray(wbin_nxt) == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]};
      overflow <= wr_en && full;
    end
  end

  // ---------------- read side ----------------
  assign do_rd    = rd_en && !empty;
  assign rbin_nxt = rbin + (AW+1)'(do_rd);

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      empty    <= 1'b1;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      empty    <= bin2gray(rbin_nxt) == wgray_r2;
      rd_valid <= do_rd;
      if (do_rd) rd_data <= mem[rbin[AW-1:0]];
    end
  end

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");

endmodule
