// tb_dx_fifo: self-checking test of dx_fifo at its default size (256 x 32).
// A queue reference model follows random write/read traffic whose bias
// changes over time so the FIFO runs empty, full and through the
// almost-full level; every cycle the first-word-fall-through output, count,
// empty/full/af and the overflow/underflow pulses are compared.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dx_fifo;
  localparam int DEPTH = 256;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0;
  logic [31:0] wdata = 0, rdata;
  logic empty, full, af, ovf, unf;
  logic [8:0] count;
  int checks = 0, failures = 0;
  int saw_full = 0, saw_ovf = 0, saw_unf = 0, saw_af = 0;
  logic [31:0] q[$];
  logic exp_ovf, exp_unf;

  dx_fifo dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int bias;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      bias = ((cyc / 2000) % 2) ? 75 : 25;
      @(negedge clk);
      `CHECK(empty == (q.size() == 0), "empty flag");
      `CHECK(full == (q.size() == DEPTH), "full flag");
      `CHECK(af == (q.size() >= DEPTH - 16), "almost full flag");
      `CHECK(count == 9'(q.size()), "count");
      if (q.size() != 0) `CHECK(rdata == q[0], "head word");
      wr = ($urandom_range(99) < bias);
      rd = ($urandom_range(99) < 100 - bias);
      wdata = $urandom;
      exp_ovf = wr && full;
      exp_unf = rd && empty;
      @(posedge clk); #1;
      `CHECK(ovf == exp_ovf, "overflow pulse");
      `CHECK(unf == exp_unf, "underflow pulse");
      saw_full += full; saw_ovf += ovf; saw_unf += unf; saw_af += af;
      if (rd && !exp_unf) void'(q.pop_front());
      if (wr && !exp_ovf) q.push_back(wdata);
    end
    `CHECK(saw_full > 0 && saw_ovf > 0 && saw_unf > 0 && saw_af > 0, "all corner cases reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
