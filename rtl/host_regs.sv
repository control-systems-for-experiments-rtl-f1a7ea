// host_regs: register bank on the host's 8-bit register bus.
//
// The host addresses byte-wide registers at REG_BASE + offset (see qctl_pkg).
// It writes the output code of each periodic-signal pin (0x200A + i), the
// modulator levels and waveforms, the coincidence waiting time and a control
// byte, and it reads the 32-bit results of the three event counters one byte
// at a time, least significant byte first. Reading the last byte of a result
// (offset +3) pulses that counter's `ack`, which clears and restarts it: the
// host must read the four bytes in order and only while the status register
// shows the result valid.
//
// Timing: a write takes effect at the clock edge where `we` is high; a read
// returns `rdata` on the following clock edge. Addresses outside the bank
// read as 0. The byte-wise read of 32-bit results and the code registers at
// 0x200A..0x200E follow the document; the remaining map, the reset values and
// the write-to-clear overflow bit are this design's choice.
module host_regs
  import qctl_pkg::*;
#(
  parameter logic [7:0] TWAIT_RESET = 8'd2,   // coincidence waiting time after reset
  parameter logic [7:0] CTRL_RESET  = 8'h02   // time stamping on, synchronous coincidence
) (
  input  logic                  clk,
  input  logic                  rst,
  // host register bus
  input  logic [15:0]           addr,
  input  logic [7:0]            wdata,
  input  logic                  we,
  input  logic                  re,
  output logic [7:0]            rdata,
  // measured values
  input  logic [31:0]           cnt_a,
  input  logic [31:0]           cnt_b,
  input  logic [31:0]           cnt_c,
  input  status_t               status,
  input  logic [15:0]           lfsr_word,
  // restart strobes of the counters
  output logic                  ack_a,
  output logic                  ack_b,
  output logic                  ack_c,
  output logic                  ovf_clear,
  // settings
  output logic [7:0]            t_wait,
  output ctrl_t                 ctrl,
  output logic [N_IO-1:0][7:0]  io_code,
  output logic [N_MOD-1:0][2:0] mod_level,
  output logic [N_MOD-1:0][7:0] mod_code
);
  timeunit 1ns; timeprecision 1ps;

  logic       hit;
  logic [7:0] ofs;

  assign hit = (addr[15:8] == REG_BASE[15:8]);
  assign ofs = addr[7:0];

  function automatic logic [7:0] byte_of(input logic [31:0] v, input logic [1:0] k);
    return v[8*k +: 8];
  endfunction

  // Writes.
  always_ff @(posedge clk) begin
    if (rst) begin
      t_wait    <= TWAIT_RESET;
      ctrl      <= ctrl_t'(CTRL_RESET);
      io_code   <= '0;
      mod_level <= '0;
      mod_code  <= '0;
      ovf_clear <= 1'b0;
    end else begin
      ovf_clear <= 1'b0;
      if (we && hit) begin
        if (ofs == OFS_TWAIT) t_wait <= wdata;
        if (ofs == OFS_CTRL)  ctrl   <= ctrl_t'(wdata);
        if (ofs == OFS_STATUS && wdata[3]) ovf_clear <= 1'b1;
        for (int i = 0; i < N_IO; i++)
          if (ofs == OFS_IO_CODE + 8'(i)) io_code[i] <= wdata;
        for (int k = 0; k < N_MOD; k++) begin
          if (ofs == OFS_MOD_LVL + 8'(k))  mod_level[k] <= wdata[2:0];
          if (ofs == OFS_MOD_CODE + 8'(k)) mod_code[k]  <= wdata;
        end
      end
    end
  end

  // Reads.
  always_ff @(posedge clk) begin
    if (rst) begin
      rdata <= '0;
      ack_a <= 1'b0;
      ack_b <= 1'b0;
      ack_c <= 1'b0;
    end else begin
      ack_a <= re && hit && ofs == OFS_CNT_A + 8'd3;
      ack_b <= re && hit && ofs == OFS_CNT_B + 8'd3;
      ack_c <= re && hit && ofs == OFS_CNT_C + 8'd3;
      if (re) begin
        rdata <= '0;
        if (hit) begin
          if (ofs[7:2] == OFS_CNT_A[7:2]) rdata <= byte_of(cnt_a, ofs[1:0]);
          if (ofs[7:2] == OFS_CNT_B[7:2]) rdata <= byte_of(cnt_b, ofs[1:0]);
          if (ofs[7:2] == OFS_CNT_C[7:2]) rdata <= byte_of(cnt_c, ofs[1:0]);
          if (ofs == OFS_STATUS)          rdata <= status;
          if (ofs == OFS_TWAIT)           rdata <= t_wait;
          if (ofs == OFS_CTRL)            rdata <= ctrl;
          if (ofs == OFS_LFSR)            rdata <= lfsr_word[7:0];
          if (ofs == OFS_LFSR + 8'd1)     rdata <= lfsr_word[15:8];
          for (int i = 0; i < N_IO; i++)
            if (ofs == OFS_IO_CODE + 8'(i)) rdata <= io_code[i];
          for (int k = 0; k < N_MOD; k++) begin
            if (ofs == OFS_MOD_LVL + 8'(k))  rdata <= {5'b0, mod_level[k]};
            if (ofs == OFS_MOD_CODE + 8'(k)) rdata <= mod_code[k];
          end
        end
      end
    end
  end

endmodule
