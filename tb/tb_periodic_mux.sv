// tb_periodic_mux: self-checking test of periodic_mux.
// Three free-running test clocks stand in for the clock manager outputs. For
// each code, including undefined ones, every pin is sampled at many instants
// and compared with the signal the code selects. Pins get different codes at
// the same time to show they are independent.
module tb_periodic_mux;
  timeunit 1ns; timeprecision 1ps;
  import qctl_pkg::*;

  localparam int unsigned N = 5;

  logic              f45 = 1'b0, f90 = 1'b0;
  logic              f45_180;
  logic [N-1:0][7:0] code;
  logic [N-1:0]      pin;
  int                checks = 0, failures = 0;

  periodic_mux #(.N_OUT(N)) dut (.code(code), .clk_f45(f45), .clk_f45_180(f45_180),
                                 .clk_f90(f90), .pin(pin));

  // Test clocks change on whole nanoseconds, samples are taken half-way
  // between, so a sample never races a clock edge.
  always #11ns f45 = ~f45;
  always #5ns  f90 = ~f90;
  assign f45_180 = ~f45;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expected(input logic [7:0] c);
    case (c)
      8'h00:   return 1'b0;
      8'h01:   return 1'b1;
      8'h02:   return f45;
      8'h03:   return f90;
      8'h04:   return f45_180;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    int bad, highs;
    #0.5ns;
    for (int round = 0; round < 40; round++) begin
      for (int i = 0; i < N; i++)
        code[i] = (round < 8) ? 8'((round + i) % 8) : 8'($urandom_range(0, 7));
      bad = 0;
      highs = 0;
      repeat (200) begin
        #($urandom_range(1, 30) * 1ns);
        for (int i = 0; i < N; i++) begin
          if (pin[i] !== expected(code[i])) bad++;
          if (pin[i]) highs++;
        end
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL: round %0d, %0d wrong samples", round, bad);
      end
    end
    // the 45 MHz outputs must toggle, and at 180 degrees to each other
    code = '0;
    code[0] = CODE_F45;
    code[1] = CODE_F45_180;
    code[2] = CODE_F90;
    begin
      int t0 = 0, t2 = 0, opposite = 0;
      logic p0, p2;
      p0 = pin[0]; p2 = pin[2];
      repeat (2000) begin
        #0.5ns;
        if (pin[0] != p0) t0++;
        if (pin[2] != p2) t2++;
        if (pin[0] != pin[1]) opposite++;
        p0 = pin[0]; p2 = pin[2];
      end
      checks++;
      if (!(t0 >= 86 && t0 <= 94 && t2 >= 196 && t2 <= 204 && opposite == 2000)) begin
        failures++;
        $display("FAIL: toggles %0d / %0d in 1 us, opposite %0d", t0, t2, opposite);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
