// tb_dxd_dest_fifo: self-checking test of the DPU destination FIFO.
// DX-side writes of random bursts and DSP-side frame reads run together for
// several frame sizes; data order, dreq (a complete frame is present),
// almost-full, and the word counter are checked against a model. Then each
// fault is provoked in turn: read of the empty FIFO (RD_OVR), write to the
// full FIFO (WR_OVR), and a frame read that starts before the frame is
// complete (FR_UND); each must set only its own sticky bit.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxd_dest_fifo;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [31:0] wdata = 0, rdata, words_written;
  logic [6:0] frame_size = 7'd16;
  logic dreq, empty, af;
  logic [3:0] fault;
  int checks = 0, failures = 0, written = 0;
  logic [31:0] q[$];
  dxd_dest_fifo dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic reset_dut();
    rst_n = 0; q = {}; written = 0; @(negedge clk); rst_n = 1; @(negedge clk);
  endtask
  initial begin
    int fs;
    reset_dut();
    for (int s = 0; s < 6; s++) begin
      fs = (s == 0) ? 1 : $urandom_range(40, 2);
      frame_size = 7'(fs);
      reset_dut();
      for (int cyc = 0; cyc < 6000; cyc++) begin
        `CHECK(dreq == (q.size() >= fs), "dreq when a frame is present");
        `CHECK(af == (q.size() >= 224), "almost full level");
        `CHECK(words_written == 32'(written), "word counter");
        wr = (q.size() < 250) && $urandom_range(1);
        wdata = $urandom;
        // the DSP reads whole frames only
        rd = dreq && ((cyc / 97) % 2 == 0);
        if (rd) `CHECK(rdata == q[0], "read data in order");
        @(negedge clk);
        if (rd) void'(q.pop_front());
        if (wr) begin q.push_back(wdata); written++; end
        // finish a frame once started
        if (rd) begin
          for (int k = 1; k < fs; k++) begin
            `CHECK(rdata == q[0], "frame data in order");
            rd = 1; wr = 0; @(negedge clk); void'(q.pop_front());
          end
          rd = 0;
        end
      end
      wr = 0; rd = 0;
      `CHECK(fault == 4'd0, "no fault in legal traffic");
    end
    // RD_OVR
    frame_size = 7'd4; reset_dut();
    rd = 1; @(negedge clk); rd = 0; @(negedge clk);
    `CHECK(fault == 4'b1000, "read of empty FIFO sets RD_OVR only");
    // WR_OVR
    reset_dut();
    for (int i = 0; i < 257; i++) begin wr = 1; wdata = i; @(negedge clk); end
    wr = 0; @(negedge clk);
    `CHECK(fault == 4'b0100, "write to full FIFO sets WR_OVR only");
    // FR_UND: 3 words written, 4-word frame read
    reset_dut();
    for (int i = 0; i < 3; i++) begin wr = 1; wdata = i; @(negedge clk); end
    wr = 0;
    for (int i = 0; i < 3; i++) begin rd = 1; @(negedge clk); end
    rd = 0; @(negedge clk);
    `CHECK(fault == 4'b0001, "frame read before complete sets FR_UND only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
