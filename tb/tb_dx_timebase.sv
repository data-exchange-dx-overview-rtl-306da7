// tb_dx_timebase: self-checking test of the 1 MHz tick and stall timeout.
// For random divisors M the interval between us_tick pulses must be M
// clocks; for random D and I the timeout pulse must come exactly D*I ticks
// after run rises, repeat every D*I ticks while run stays high, and never
// come while run is low.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dx_timebase;
  logic clk = 0, rst_n = 0, ctrl_wr = 0, run = 0;
  logic [7:0] mdiv = 8'd50;
  logic [15:0] tdiv = 1, tint = 1000;
  logic us_tick, timeout;
  int checks = 0, failures = 0, n_tmo = 0;
  dx_timebase dut (.*);
  always #5 clk = ~clk;
  initial begin #100_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int last, ticks;
    logic pre;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      mdiv = 8'($urandom_range(40, 2)); tdiv = 16'($urandom_range(6, 1)); tint = 16'($urandom_range(5, 1));
      ctrl_wr = 1; @(negedge clk); ctrl_wr = 0;
      // tick spacing
      last = -1;
      for (int c = 0; c < 6 * mdiv; c++) begin
        @(negedge clk);
        if (us_tick) begin
          if (last >= 0) `CHECK(c - last == int'(mdiv), "tick interval");
          last = c;
        end
        `CHECK(!timeout, "no timeout while idle");
      end
      // timeout after D*I ticks of run
      while (!us_tick) @(negedge clk);
      run = 1; ticks = 0;
      for (int c = 0; c < 3 * int'(tdiv) * int'(tint) * int'(mdiv) + 4; c++) begin
        pre = us_tick;
        @(posedge clk); #1;
        ticks += int'(pre);
        if (timeout) begin
          n_tmo++;
          `CHECK(ticks % (int'(tdiv) * int'(tint)) == 0 && ticks > 0, "timeout after D*I ticks");
        end
      end
      @(negedge clk); run = 0;
    end
    `CHECK(n_tmo >= 60, "timeouts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
