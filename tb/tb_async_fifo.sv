// tb_async_fifo: self-checking test of async_fifo.
// Write clock 200 MHz, read clock 48 MHz, depth 16. Phase 1 writes random
// words in bursts while the reader takes them out; every word read must match
// a reference queue in order and be flagged by rd_valid. Phase 2 stops
// reading: the FIFO must take exactly DEPTH words, raise full, drop and flag
// further writes as overflow, and then give back the DEPTH words in order and
// end empty.
module tb_async_fifo;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned W = 16, DEPTH = 16;

  logic         wclk = 1'b0, rclk = 1'b0;
  logic         wrst, rrst, wr_en, rd_en, full, ovf, rd_valid, empty;
  logic [W-1:0] wr_data, rd_data;
  int           checks = 0, failures = 0;
  int           ovf_seen = 0, reads = 0, rejected = 0;
  logic [W-1:0] ref_q[$];

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en(wr_en), .wr_data(wr_data), .full(full), .overflow(ovf),
    .rd_clk(rclk), .rd_rst(rrst), .rd_en(rd_en), .rd_data(rd_data), .rd_valid(rd_valid), .empty(empty));

  always #2.5ns     wclk = ~wclk;
  always #10.4165ns rclk = ~rclk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference model: a write is accepted when full is low at the edge
  always @(posedge wclk) begin
    if (!wrst && wr_en && !full) ref_q.push_back(wr_data);
    if (!wrst && wr_en && full) rejected++;
    if (!wrst && ovf) ovf_seen++;
  end

  always @(posedge rclk) begin
    if (!rrst && rd_valid) begin
      logic [W-1:0] exp;
      reads++;
      if (ref_q.size() == 0) begin
        check(1'b0, "read from an empty reference");
      end else begin
        exp = ref_q.pop_front();
        check(rd_data == exp, $sformatf("read %h expected %h", rd_data, exp));
      end
    end
  end

  initial begin
    int n, ovf0;
    wrst = 1'b1; rrst = 1'b1; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    repeat (4) @(posedge rclk);
    @(negedge wclk) wrst = 1'b0;
    @(negedge rclk) rrst = 1'b0;
    check(empty && !full, "flags after reset");

    // phase 1: bursts with concurrent reading
    fork
      begin
        for (int b = 0; b < 40; b++) begin
          repeat ($urandom_range(1, 8)) begin
            @(negedge wclk);
            wr_en = 1'b1; wr_data = W'($urandom);
          end
          @(negedge wclk) wr_en = 1'b0;
          repeat ($urandom_range(10, 40)) @(negedge wclk);
        end
        @(negedge wclk) wr_en = 1'b0;
      end
      begin
        repeat (900) begin
          @(negedge rclk) rd_en = ($urandom_range(0, 3) != 0);
        end
        @(negedge rclk) rd_en = 1'b1;
        repeat (40) @(negedge rclk);
        rd_en = 1'b0;
      end
    join
    repeat (4) @(posedge rclk);
    check(ref_q.size() == 0, $sformatf("%0d words left after phase 1", ref_q.size()));
    check(empty, "not empty after phase 1");
    check(ovf_seen == rejected, $sformatf("%0d overflow pulses for %0d dropped writes", ovf_seen, rejected));

    // phase 2: fill without reading
    n = reads;
    ovf0 = ovf_seen;
    for (int i = 0; i < DEPTH + 6; i++) begin
      @(negedge wclk) begin wr_en = 1'b1; wr_data = W'(16'hA000 + i); end
    end
    @(negedge wclk) wr_en = 1'b0;
    repeat (4) @(posedge wclk);
    check(full, "full not set");
    check(ref_q.size() == DEPTH, $sformatf("FIFO took %0d words", ref_q.size()));
    check(ovf_seen - ovf0 == 6 && ovf_seen == rejected, $sformatf("%0d overflow pulses, expected 6", ovf_seen - ovf0));
    @(negedge rclk) rd_en = 1'b1;
    repeat (DEPTH + 8) @(negedge rclk);
    rd_en = 1'b0;
    repeat (4) @(posedge rclk);
    check(reads - n == DEPTH, $sformatf("read back %0d words", reads - n));
    check(empty && !full, "flags after draining");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
