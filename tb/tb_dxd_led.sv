// tb_dxd_led: self-checking test of the DPU LED stretcher.
// Random enabled/disabled events are applied; the LED must be on while an
// enabled event is active, stay on for min_ms milliseconds (1000 us ticks
// each) after the last one, then go off; disabled events must not light it.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxd_led;
  logic clk = 0, rst_n = 0, us_tick = 0, led;
  logic [7:0] enables = 0, min_ms = 0, events = 0;
  int checks = 0, failures = 0;
  dxd_led dut (.*);
  always #5 clk = ~clk;
  initial begin #200_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int on_ticks;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      enables = 8'($urandom); min_ms = 8'($urandom_range(3));
      events = 8'($urandom) & ~enables;          // disabled events only
      repeat (5) @(negedge clk);
      `CHECK(!led, "disabled event does not light LED");
      events = enables | 8'd1; enables[0] = 1'b1;  // enabled event
      @(negedge clk); #1 `CHECK(led, "enabled event lights LED");
      events = 0;
      on_ticks = 0;
      us_tick = 1;    // 1 tick per clock here
      while (led && on_ticks < 5000) begin @(negedge clk); on_ticks++; end
      us_tick = 0;
      `CHECK(on_ticks >= 1000 * int'(min_ms) && on_ticks <= 1000 * int'(min_ms) + 1, "minimum on time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
