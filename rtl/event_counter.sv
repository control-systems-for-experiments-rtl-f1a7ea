// event_counter: event frequency (counts per gate) measurement.
//
// Two counters run together. The clock counter counts GATE_CYCLES clock
// cycles, one second at the nominal clock; while it runs, the event counter
// counts rising edges of `sig`. When the gate closes the event count is copied
// to `count_o`, `valid_o` rises and the unit waits. A one-cycle `ack_i` (given
// by the register bank once the host has read all four bytes of the result)
// clears both counters and starts the next gate on the following cycle.
// Counting starts by itself after reset.
//
// Timing: with `ack_i` seen at clock edge t, the gate covers the samples taken
// at edges t+1 .. t+GATE_CYCLES and valid_o is high after edge t+GATE_CYCLES;
// an edge of `sig` is counted if it is seen in one of those samples. With SYNC_IN = 1 `sig` is treated as
// asynchronous and passes a two-flop synchroniser first (two cycles of
// latency); with SYNC_IN = 0 it must be synchronous to `clk`.
//
// The two-counter scheme, the 32-bit result and the hold-until-read behaviour
// follow the document; the synchroniser and the exact cycle boundaries of the
// gate are this design's choice.
module event_counter #(
  parameter int unsigned GATE_CYCLES = 48_000_000,  // cycles in one gate (1 s at 48 MHz)
  parameter int unsigned W           = 32,          // width of the result
  parameter bit          SYNC_IN     = 1'b1         // synchronise `sig` first
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high
  input  logic         sig,       // signal whose rising edges are counted
  input  logic         ack_i,     // result read: restart
  output logic [W-1:0] count_o,   // events in the last gate
  output logic         valid_o    // count_o holds a finished measurement
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned CW = (GATE_CYCLES > 1) ? $clog2(GATE_CYCLES) : 1;

  typedef enum logic {S_COUNT, S_HOLD} state_e;

  logic          s_meta, s_sync, s_prev;
  logic          s_in;
  logic          edge_seen;
  logic [CW-1:0] clk_cnt;
  logic [W-1:0]  ev_cnt;
  state_e        state;

  // Input conditioning.
  always_ff @(posedge clk) begin
    if (rst) begin
      s_meta <= 1'b0;
      s_sync <= 1'b0;
      s_prev <= 1'b0;
    end else begin
      s_meta <= sig;
      s_sync <= s_meta;
      s_prev <= s_in;
    end
  end

  assign s_in      = SYNC_IN ? s_sync : sig;
  assign edge_seen = s_in & ~s_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_COUNT;
      clk_cnt <= '0;
      ev_cnt  <= '0;
      count_o <= '0;
      valid_o <= 1'b0;
    end else begin
      unique case (state)
        S_COUNT: begin
          if (clk_cnt == CW'(GATE_CYCLES - 1)) begin
            count_o <= ev_cnt + W'(edge_seen);
            valid_o <= 1'b1;
            state   <= S_HOLD;
          end else begin
            clk_cnt <= clk_cnt + 1'b1;
            ev_cnt  <= ev_cnt + W'(edge_seen);
          end
        end
        S_HOLD: begin
          if (ack_i) begin
            clk_cnt <= '0;
            ev_cnt  <= '0;
            valid_o <= 1'b0;
            state   <= S_COUNT;
          end
        end
        default: state <= S_COUNT;
      endcase
    end
  end

endmodule
