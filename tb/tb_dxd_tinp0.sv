// tb_dxd_tinp0: self-checking test of the TINP0 period generator.
// Checks the reset period (0x10001), then for random periods in DX_CLK
// cycles (U=0) and in microseconds (U=1) measures the spacing of the
// one-cycle tinp0 pulses; a zero period must give no pulses.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxd_tinp0;
  logic clk = 0, rst_n = 0, period_wr = 0, us_tick;
  logic [31:0] period_wdata = 0;
  logic [16:0] period;
  logic tinp0;
  int checks = 0, failures = 0, pulses = 0, cyc = 0;
  dxd_tinp0 dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign us_tick = (cyc % 7 == 0);
  initial begin #100_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int last, n, u, p, step;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); `CHECK(period == 17'h10001, "reset period");
    for (int t = 0; t < 60; t++) begin
      u = $urandom_range(1); p = (t % 10 == 9) ? 0 : $urandom_range(30, 1);
      @(negedge clk); period_wr = 1; period_wdata = 32'((u << 16) | p); @(negedge clk); period_wr = 0;
      `CHECK(period == 17'((u << 16) | p), "period readback");
      step = u ? 7 : 1; last = -1; n = 0;
      for (int c = 0; c < 5 * (p + 1) * step; c++) begin
        @(negedge clk);
        if (tinp0) begin
          n++; pulses++;
          if (last >= 0) `CHECK(c - last == p * step, "pulse spacing");
          last = c;
        end
      end
      if (p == 0) begin `CHECK(n == 0, "zero period gives no pulse"); end
      else begin `CHECK(n >= 4, "pulses present"); end
    end
    `CHECK(pulses > 100, "pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
