// tb_dx_iregs: self-checking test of the instruction-access register file.
// Checks the reset values, then performs random writes and reads over all
// 64 indices against a reference model: Sequence/JamData/JamCount files
// selected by index and by Q, Control/Timeout/LED registers, read-only
// Status and InstructionCount, external read words and write strobes,
// and the Test register's post-read increment.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dx_iregs;
  logic clk = 0, rst_n = 0, we = 0, rd = 0, control_wr;
  logic [5:0] widx = 0, ridx = 0;
  logic [31:0] wdata = 0, rdata, seq_word, jam_data, control, timeout, led_ctrl;
  logic [31:0] status_in, icount_in;
  logic [31:0] ext_rdata [16];
  logic [15:0] ext_wr;
  logic [7:0] jam_count;
  logic [3:0] q = 0;
  int checks = 0, failures = 0;
  logic [31:0] m [64];
  dx_iregs dut (.*);
  always #5 clk = ~clk;
  initial begin #20_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic [31:0] expect_rd(int i);
    if (i < 16) return m[i];
    if (i < 32) return m[i];
    if (i < 48) return {24'd0, m[i][7:0]};
    case (i - 48)
      0, 1, 11, 15: return m[i] | ((i - 48 == 11) ? ext_rdata[11] : 32'd0);
      3: return status_in;
      7: return icount_in;
      default: return ext_rdata[i - 48];
    endcase
  endfunction
  initial begin
    int i;
    for (int k = 0; k < 64; k++) m[k] = (k < 16) ? 32'hFFFF_FFFF : 32'd0;
    m[48] = 50; m[49] = {16'd1, 16'd1000};
    for (int k = 0; k < 16; k++) ext_rdata[k] = $urandom;
    ext_rdata[11] = 0;
    status_in = $urandom; icount_in = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    `CHECK(control == 32'd50 && timeout == {16'd1, 16'd1000}, "reset Control/Timeout");
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      i = $urandom_range(63);
      we = $urandom_range(1); widx = 6'(i); wdata = $urandom;
      rd = 0; q = 4'($urandom);
      #1;
      if (we && i >= 48) `CHECK(ext_wr == 16'(1 << (i - 48)), "external write strobe");
      if (we && i < 48) `CHECK(ext_wr == 16'd0, "no strobe for file write");
      `CHECK(control_wr == (we && i == 48), "control write strobe");
      @(negedge clk);
      if (we) m[i] = (i >= 32 && i < 48) ? {24'd0, wdata[7:0]} : wdata;
      we = 0;
      // read back a random index
      i = $urandom_range(63); ridx = 6'(i); rd = 1; #1;
      `CHECK(rdata == expect_rd(i), "register read");
      `CHECK(seq_word == m[q] && jam_data == m[16 + q] && jam_count == m[32 + q][7:0], "Q-selected files");
      `CHECK(control == m[48] && timeout == m[49] && led_ctrl == m[59], "control outputs");
      @(negedge clk); rd = 0;
      if (i == 63) m[63] = m[63] + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
