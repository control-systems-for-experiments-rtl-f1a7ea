// qctl_pkg: types and constants shared by the quantum-experiment control system.
//
// The register bus of the host link is 8 bits wide and every register sits at
// REG_BASE + offset. Only the output-code registers at 0x200A..0x200E follow a
// documented map; the other offsets are this design's own choice and are
// gathered here so that the register bank, the top and the testbenches agree.
//
// io_code_e is the output code of the periodic signal generator: the host
// writes one per output pin to choose ground, the supply level or one of the
// three clocks from the clock manager.
package qctl_pkg;
  timeunit 1ns; timeprecision 1ps;

  // Output selection codes of the periodic signal generator.
  typedef enum logic [7:0] {
    CODE_LOW     = 8'h00,  // logic 0
    CODE_HIGH    = 8'h01,  // logic 1
    CODE_F45     = 8'h02,  // 45 MHz clock
    CODE_F90     = 8'h03,  // doubled clock (nominally 90 MHz, 96 MHz from a 48 MHz input)
    CODE_F45_180 = 8'h04   // 45 MHz clock shifted by 180 degrees
  } io_code_e;

  localparam logic [15:0] REG_BASE = 16'h2000;

  // Register offsets (8-bit registers).
  localparam logic [7:0] OFS_CNT_A    = 8'h00;  // 0x00..0x03 channel A counts per gate, LSB first
  localparam logic [7:0] OFS_CNT_B    = 8'h04;  // 0x04..0x07 channel B counts per gate
  localparam logic [7:0] OFS_STATUS   = 8'h08;  // status, write bit 3 to clear the FIFO overflow flag
  localparam logic [7:0] OFS_TWAIT    = 8'h09;  // coincidence waiting time, fast-clock cycles
  localparam logic [7:0] OFS_IO_CODE  = 8'h0A;  // 0x0A..0x0E output code of pin i
  localparam logic [7:0] OFS_CTRL     = 8'h0F;  // bit0 coincidence source, bit1 time stamping enable
  localparam logic [7:0] OFS_CNT_C    = 8'h10;  // 0x10..0x13 coincidences per gate
  localparam logic [7:0] OFS_LFSR     = 8'h14;  // 0x14..0x15 LFSR word, LSB first
  localparam logic [7:0] OFS_MOD_LVL  = 8'h16;  // 0x16..0x19 drive level of modulator output k
  localparam logic [7:0] OFS_MOD_CODE = 8'h1A;  // 0x1A..0x1D drive waveform code of modulator output k

  localparam int unsigned N_IO   = 5;  // periodic outputs
  localparam int unsigned N_MOD  = 4;  // modulator outputs: 2 phase, 2 amplitude
  localparam int unsigned N_DET  = 8;  // detector inputs from the comparator board

  // Status register bits.
  typedef struct packed {
    logic [2:0] unused;
    logic       fifo_empty;
    logic       fifo_overflow;
    logic       valid_c;
    logic       valid_b;
    logic       valid_a;
  } status_t;

  // Control register bits.
  typedef struct packed {
    logic [5:0] unused;
    logic       ts_enable;     // time stamping runs
    logic       coinc_async;   // 1: count the asynchronous detector, 0: the synchronous one
  } ctrl_t;

endpackage
