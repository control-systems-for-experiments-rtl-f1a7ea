// qctl_top: FPGA control system for quantum optics experiments on fibre.
//
// One FPGA, clocked at 48 MHz by the USB card, serves a host computer and the
// experiment. Detector pulses arrive on det_in from an eight-channel
// comparator board; the design measures and records them and generates the
// signals that drive electro-optic modulators:
//   * event frequency: two event_counters count rising edges of det_in[0]
//     (channel A) and det_in[1] (channel B) over a one-second gate at 48 MHz;
//   * coincidences: coinc_sync (200 MHz, waiting time in register 0x2009) and
//     the clockless coinc_async both watch channels A and B; control bit 0
//     selects which one drives coinc_out and the coincidence counter, a third
//     event_counter with a one-second gate at 200 MHz;
//   * time stamping: timestamp_encoder records det_in[N_TRACK-1:0] with an
//     11-bit stamp at 200 MHz into a dual clock FIFO read at 48 MHz over the
//     16-bit streaming port; a FIFO overflow sets a sticky status bit;
//   * random bits: a 16-bit Galois LFSR advances every 48 MHz cycle;
//   * periodic signals: five pins (io2_out) each carry 0, 1, 45 MHz, the
//     doubled clock or 45 MHz at 180 degrees, by the codes at 0x200A..0x200E;
//   * modulator drive: two phase outputs (6 transistors each) and two
//     amplitude outputs (1 transistor each) are switched by a level register
//     and gated by a selectable periodic waveform.
// Two clock managers (behavioural models in simulation) make the 200 MHz
// acquisition clock (48 * 25 / 6) and the 45 MHz pair (48 * 15 / 16) with the
// doubled input clock (96 MHz).
//
// Host interface: an 8-bit register bus (addr, wdata, we, re; rdata one clock
// after re) and a streaming read port (stream_rd takes a word, stream_valid
// marks it one clock later). Counter results are read LSB first; reading the
// fourth byte restarts that counter. rst is synchronous to clk_48 and must
// last at least 16 clk_48 cycles after power-up so that the 200 MHz domain,
// whose reset is synchronised from rst and from the clock manager lock, is
// reset too. Settings cross from the 48 MHz to the 200 MHz domain as quasi-
// static levels: change them only while the affected function is idle.
//
// What follows the document: the functions, the clock frequencies, the gate
// times, the record format and the output codes. The register map beyond
// 0x200A..0x200E, the clock-domain crossings, the FIFO depth, the pin
// assignment of the counters and the modulator gating are this design's.
module qctl_top
  import qctl_pkg::*;
#(
  parameter realtime     CLKIN_PERIOD = 20.833ns,      // 48 MHz card clock
  parameter int unsigned GATE_SLOW    = 48_000_000,    // 1 s at 48 MHz
  parameter int unsigned GATE_FAST    = 200_000_000,   // 1 s at 200 MHz
  parameter int unsigned FAST_M       = 25,            // 48 * 25 / 6 = 200 MHz
  parameter int unsigned FAST_D       = 6,
  parameter int unsigned PER_M        = 15,            // 48 * 15 / 16 = 45 MHz
  parameter int unsigned PER_D        = 16,
  parameter int unsigned N_TRACK      = 5,             // time-stamped inputs
  parameter int unsigned TS_BITS      = 11,            // time stamp width
  parameter int unsigned FIFO_DEPTH   = 1024,
  parameter realtime     ASYNC_WINDOW = 1.35ns         // asynchronous coincidence window
) (
  input  logic                        clk_48,
  input  logic                        rst,
  input  logic [N_DET-1:0]            det_in,
  // host register bus
  input  logic [15:0]                 reg_addr,
  input  logic [7:0]                  reg_wdata,
  input  logic                        reg_we,
  input  logic                        reg_re,
  output logic [7:0]                  reg_rdata,
  // host streaming port (time stamps)
  input  logic                        stream_rd,
  output logic [N_TRACK+TS_BITS-1:0]  stream_data,
  output logic                        stream_valid,
  // outputs to the experiment
  output logic [N_IO-1:0]             io2_out,     // periodic signal pins
  output logic [1:0][5:0]             pm_gate,     // phase modulator transistor gates
  output logic [1:0]                  am_gate,     // amplitude modulator transistor gates
  output logic                        rng_bit,     // pseudo-random bit
  output logic                        coinc_out,   // coincidence pulse (200 MHz domain)
  output logic                        dcm_locked
);
  timeunit 1ns; timeprecision 1ps;

  // ---------------------------------------------------------------- clocks
  logic clk_fast, clk_f45, clk_f45_180, clk_f96;
  logic lock_fast, lock_per;
  logic unused_clk0_a, unused_clk0_b, unused_clk2x_a, unused_fx180_a;

  dcm_model #(.CLKIN_PERIOD(CLKIN_PERIOD), .CLKFX_MULTIPLY(FAST_M), .CLKFX_DIVIDE(FAST_D))
    u_dcm_fast (.CLKIN(clk_48), .RST(1'b0), .CLK0(unused_clk0_a), .CLK2X(unused_clk2x_a),
                .CLKFX(clk_fast), .CLKFX180(unused_fx180_a), .LOCKED(lock_fast));

  dcm_model #(.CLKIN_PERIOD(CLKIN_PERIOD), .CLKFX_MULTIPLY(PER_M), .CLKFX_DIVIDE(PER_D))
    u_dcm_per (.CLKIN(clk_48), .RST(1'b0), .CLK0(unused_clk0_b), .CLK2X(clk_f96),
               .CLKFX(clk_f45), .CLKFX180(clk_f45_180), .LOCKED(lock_per));

  assign dcm_locked = lock_fast & lock_per;

  logic rst_fast;
  sync_bit #(.RESET_VAL(1'b1)) u_rst_fast (
    .clk(clk_fast), .rst(1'b0), .d(rst | ~lock_fast), .q(rst_fast));

  // ------------------------------------------------------- register bank
  logic [31:0]          cnt_a, cnt_b, cnt_c;
  logic                 valid_a, valid_b, valid_c_f, valid_c;
  logic                 ack_a, ack_b, ack_c, ack_c_f;
  logic                 ovf_clear, ovf_clear_f;
  logic                 fifo_empty, fifo_overflow_f, fifo_overflow;
  logic [7:0]           t_wait;
  ctrl_t                ctrl;
  logic [N_IO-1:0][7:0] io_code;
  logic [N_MOD-1:0][2:0] mod_level;
  logic [N_MOD-1:0][7:0] mod_code;
  logic [15:0]          lfsr_word;
  status_t              status;

  always_comb begin
    status               = '0;
    status.valid_a       = valid_a;
    status.valid_b       = valid_b;
    status.valid_c       = valid_c;
    status.fifo_overflow = fifo_overflow;
    status.fifo_empty    = fifo_empty;
  end

  host_regs u_regs (
    .clk(clk_48), .rst(rst),
    .addr(reg_addr), .wdata(reg_wdata), .we(reg_we), .re(reg_re), .rdata(reg_rdata),
    .cnt_a(cnt_a), .cnt_b(cnt_b), .cnt_c(cnt_c), .status(status), .lfsr_word(lfsr_word),
    .ack_a(ack_a), .ack_b(ack_b), .ack_c(ack_c), .ovf_clear(ovf_clear),
    .t_wait(t_wait), .ctrl(ctrl), .io_code(io_code), .mod_level(mod_level), .mod_code(mod_code));

  // ------------------------------------------------- event frequency, 48 MHz
  event_counter #(.GATE_CYCLES(GATE_SLOW)) u_cnt_a (
    .clk(clk_48), .rst(rst), .sig(det_in[0]), .ack_i(ack_a), .count_o(cnt_a), .valid_o(valid_a));

  event_counter #(.GATE_CYCLES(GATE_SLOW)) u_cnt_b (
    .clk(clk_48), .rst(rst), .sig(det_in[1]), .ack_i(ack_b), .count_o(cnt_b), .valid_o(valid_b));

  // ----------------------------------------------- coincidences, 200 MHz
  logic coinc_s, coinc_a_pulse, coinc_a_tog, coinc_a_tog_s, coinc_a_tog_d, coinc_sel;
  logic use_async_f, ts_enable_f;

  sync_bit u_sel_sync (.clk(clk_fast), .rst(rst_fast), .d(ctrl.coinc_async), .q(use_async_f));
  sync_bit u_ts_sync  (.clk(clk_fast), .rst(rst_fast), .d(ctrl.ts_enable),   .q(ts_enable_f));

  coinc_sync #(.TW(8)) u_coinc_sync (
    .clk(clk_fast), .rst(rst_fast), .a(det_in[0]), .b(det_in[1]), .t_wait(t_wait), .coinc(coinc_s));

  // The asynchronous detector has an asynchronous clear; give it its own copy of rst.
  logic unused_coinc_a_level, async_clr;
  always_ff @(posedge clk_48) async_clr <= rst;

  coinc_async #(.WINDOW_NS(ASYNC_WINDOW)) u_coinc_async (
    .rst(async_clr), .da(det_in[0]), .db(det_in[1]), .coinc(unused_coinc_a_level), .coinc_toggle(coinc_a_tog));

  sync_bit u_tog_sync (.clk(clk_fast), .rst(rst_fast), .d(coinc_a_tog), .q(coinc_a_tog_s));

  always_ff @(posedge clk_fast) begin
    if (rst_fast) begin
      coinc_a_tog_d <= 1'b0;
      coinc_out     <= 1'b0;
    end else begin
      coinc_a_tog_d <= coinc_a_tog_s;
      coinc_out     <= coinc_sel;
    end
  end

  assign coinc_a_pulse = coinc_a_tog_s ^ coinc_a_tog_d;
  assign coinc_sel     = use_async_f ? coinc_a_pulse : coinc_s;

  event_counter #(.GATE_CYCLES(GATE_FAST), .SYNC_IN(1'b0)) u_cnt_c (
    .clk(clk_fast), .rst(rst_fast), .sig(coinc_sel), .ack_i(ack_c_f), .count_o(cnt_c), .valid_o(valid_c_f));

  sync_bit   u_valid_c_sync (.clk(clk_48), .rst(rst), .d(valid_c_f), .q(valid_c));
  pulse_sync u_ack_c_sync (.src_clk(clk_48), .src_rst(rst), .src_pulse(ack_c),
                           .dst_clk(clk_fast), .dst_rst(rst_fast), .dst_pulse(ack_c_f));

  // ------------------------------------------------ time stamping
  logic [N_TRACK+TS_BITS-1:0] rec;
  logic                       rec_valid, unused_rec_wrap, fifo_full, fifo_ovf_pulse;

  timestamp_encoder #(.N_SIG(N_TRACK), .TS_BITS(TS_BITS)) u_ts (
    .clk(clk_fast), .rst(rst_fast), .en(ts_enable_f), .sig(det_in[N_TRACK-1:0]),
    .rec(rec), .rec_valid(rec_valid), .rec_wrap(unused_rec_wrap));

  async_fifo #(.W(N_TRACK+TS_BITS), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(clk_fast), .wr_rst(rst_fast), .wr_en(rec_valid), .wr_data(rec),
    .full(fifo_full), .overflow(fifo_ovf_pulse),
    .rd_clk(clk_48), .rd_rst(rst), .rd_en(stream_rd), .rd_data(stream_data),
    .rd_valid(stream_valid), .empty(fifo_empty));

  pulse_sync u_ovf_clr_sync (.src_clk(clk_48), .src_rst(rst), .src_pulse(ovf_clear),
                             .dst_clk(clk_fast), .dst_rst(rst_fast), .dst_pulse(ovf_clear_f));

  always_ff @(posedge clk_fast) begin
    if (rst_fast)            fifo_overflow_f <= 1'b0;
    else if (fifo_ovf_pulse) fifo_overflow_f <= 1'b1;
    else if (ovf_clear_f)    fifo_overflow_f <= 1'b0;
  end

  sync_bit u_ovf_sync (.clk(clk_48), .rst(rst), .d(fifo_overflow_f), .q(fifo_overflow));

  // ------------------------------------------------ random bits
  lfsr_galois u_lfsr (.clk(clk_48), .rst(rst), .en(1'b1), .state(lfsr_word), .rnd_bit(rng_bit));

  // ------------------------------------------------ periodic signals
  periodic_mux #(.N_OUT(N_IO)) u_io2 (
    .code(io_code), .clk_f45(clk_f45), .clk_f45_180(clk_f45_180), .clk_f90(clk_f96), .pin(io2_out));

  logic [N_MOD-1:0] mod_wave;
  periodic_mux #(.N_OUT(N_MOD)) u_modwave (
    .code(mod_code), .clk_f45(clk_f45), .clk_f45_180(clk_f45_180), .clk_f90(clk_f96), .pin(mod_wave));

  // ------------------------------------------------ modulator drive
  modulator_drive #(.N_LEVELS(6)) u_pm0 (.level(mod_level[0]), .wave(mod_wave[0]), .gate(pm_gate[0]));
  modulator_drive #(.N_LEVELS(6)) u_pm1 (.level(mod_level[1]), .wave(mod_wave[1]), .gate(pm_gate[1]));
  modulator_drive #(.N_LEVELS(1)) u_am0 (.level(mod_level[2]), .wave(mod_wave[2]), .gate(am_gate[0:0]));
  modulator_drive #(.N_LEVELS(1)) u_am1 (.level(mod_level[3]), .wave(mod_wave[3]), .gate(am_gate[1:1]));

  // lock_per only gates dcm_locked; the unused clock outputs are left open.
  logic unused;
  assign unused = ^{unused_clk0_a, unused_clk0_b, unused_clk2x_a, unused_fx180_a,
                    unused_coinc_a_level, unused_rec_wrap, fifo_full, ctrl.unused,
                    det_in[N_DET-1:N_TRACK]};

endmodule
