// tb_dx_serial_rx: self-checking test of the DXC serial status link.
// A dx_serial_tx sends random F/B/AF status words to a dx_serial_rx; after
// each change the receiver must report the new value within two frames.
// The transmitter is then held in its reset code (line high), which must
// not be an error, and finally a single bit error are injected into the line
// and the sticky err flag must rise.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dx_serial_rx;
  logic clk = 0, rst_n = 0, sreset = 1, f_fault = 0, b_fault = 0, flip = 0;
  logic [1:0] af = 0;
  logic sout, sin, valid, rf, rb, err;
  logic [1:0] raf;
  int checks = 0, failures = 0;
  dx_serial_tx u_tx (.clk, .rst_n, .sreset, .f_fault, .b_fault, .af, .sout);
  assign sin = sout ^ flip;
  dx_serial_rx dut (.clk, .rst_n, .sin, .valid, .f_fault(rf), .b_fault(rb), .af(raf), .err);
  always #5 clk = ~clk;
  initial begin #20_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    `CHECK(!valid && !err, "line held high in reset is idle, not an error");
    sreset = 0;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      {f_fault, b_fault, af} = 4'($urandom);
      repeat (14) @(negedge clk);
      `CHECK(valid, "valid after first frame");
      `CHECK({rf, rb, raf} == {f_fault, b_fault, af}, "status word received");
      `CHECK(!err, "no error on clean line");
    end
    // reset code in the middle of operation, then resume
    sreset = 1; repeat (20) @(negedge clk); `CHECK(!err, "reset code is not an error");
    for (int t = 0; t < 20; t++) begin
      @(negedge clk); flip = ($urandom_range(3) == 0) ? 1'b0 : flip;
    end
    // bit error on the line: the 1 after a start bit is corrupted
    sreset = 0;
    repeat (30) @(negedge clk);
    while (sout != 1'b0) @(negedge clk);
    @(negedge clk);
    flip = 1; @(negedge clk); flip = 0;
    repeat (3) @(negedge clk);
    `CHECK(err, "corrupt frame sets err");
    repeat (30) @(negedge clk);
    `CHECK(err, "err is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
