// tb_dxd_eioclk: self-checking test of the EIOCLK mux and EP engine.
// A DSP model runs random EMIF read/write strobes; EP requests with random
// N are issued. Checks: the engine waits until the strobes have been idle
// for idle_t clocks before clearing ARDY; while ARDY is low the EIOCLK line
// shows exactly N rising edges; outside EP, EIOCLK equals AWE_N AND ARE_N;
// the control signals follow the document's order (USE_EPCLK before
// FORCE_EPCLK_HI before FORCE_EPCLK_DX, released in reverse).
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxd_eioclk;
  logic dx_clk = 0, rst_n = 0, awe_n = 1, are_n = 1, ep_req = 0;
  logic [7:0] ep_n = 0, idle_t = 8'd50;
  logic ardy, use_epclk, force_hi, force_dx, ep_pending, ep_done, eioclk;
  int checks = 0, failures = 0, edges = 0, eps = 0;
  dxd_eioclk dut (.*);
  always #5 dx_clk = ~dx_clk;
  always @(posedge eioclk) if (!ardy) edges++;
  initial begin #50_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // order of the control signals
  always @(posedge dx_clk) if (rst_n) begin
    #1;
    if (force_dx) `CHECK(force_hi && use_epclk, "FORCE_DX only inside USE and HI");
    if (force_hi) `CHECK(!ardy, "FORCE_HI only while ARDY low");
    if (!use_epclk) `CHECK(eioclk == (awe_n & are_n), "EIOCLK follows strobes");
  end
  initial begin
    int idle, n, wait_c;
    repeat (2) @(posedge dx_clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      idle_t = 8'($urandom_range(60, 1));
      // some EMIF traffic
      repeat ($urandom_range(20, 1)) begin
        @(negedge dx_clk); if ($urandom_range(1)) awe_n = 0; else are_n = 0;
        @(negedge dx_clk); awe_n = 1; are_n = 1;
      end
      n = $urandom_range(12);
      // keep the bus busy (one long access) from the request on for a while
      idle = $urandom_range(10);
      @(negedge dx_clk); ep_req = 1; ep_n = 8'(n); awe_n = (idle == 0);
      @(negedge dx_clk); ep_req = 0;
      for (int k = 0; k < idle; k++) begin
        @(negedge dx_clk);
        `CHECK(ardy, "no EP while EMIF busy");
      end
      awe_n = 1;
      wait_c = 0; edges = 0;
      while (ardy && wait_c < 400) begin @(negedge dx_clk); wait_c++; end
      if (idle > 0) `CHECK(wait_c >= int'(idle_t) && wait_c <= int'(idle_t) + 2, "EP waits idle_t idle clocks");
      while (!ardy && wait_c < 800) begin @(negedge dx_clk); wait_c++; end
      `CHECK(edges == n, "exactly N extra EIOCLK edges");
      @(negedge dx_clk);
      `CHECK(!ep_pending && !use_epclk && !force_hi, "released after EP");
      eps++;
    end
    `CHECK(eps == 200, "all EPs completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
