// tb_dx_unlock: self-checking test of the subordinate unlock sequence.
// Random command streams are driven after DX_RESET_N; a reference model
// (nop first, any further nops, then write_inst_first then write_inst)
// predicts unlocked/fault every cycle, and drv_en is checked to follow
// unlocked AND enable_drivers. Both the good sequence and random bad
// sequences are run, and DX_RESET_N low must restart the check.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dx_unlock;
  import dx_pkg::*;
  logic clk = 0, rst_n = 0, dx_reset_n = 0, enable_drivers = 0;
  dxc_cmd_e cmd = DXC_NOP;
  logic unlocked, fault, drv_en;
  int checks = 0, failures = 0, n_open = 0, n_fault = 0;
  dx_unlock dut (.*);
  always #5 clk = ~clk;
  initial begin #20_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int m; // model: 0 start 1 nop 2 first 3 open 4 fault
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 400; run++) begin
      @(negedge clk); dx_reset_n = 0; @(negedge clk); dx_reset_n = 1; m = 0;
      for (int k = 0; k < 12; k++) begin
        if (run % 2 == 0) begin   // mostly a legal sequence
          if (k < 1 + run % 5) cmd = DXC_NOP;
          else if (k == 1 + run % 5) cmd = DXC_WR_INST_FIRST;
          else if (k == 2 + run % 5) cmd = DXC_WR_INST;
          else cmd = dxc_cmd_e'($urandom_range(7));
        end else cmd = dxc_cmd_e'($urandom_range(7));
        enable_drivers = $urandom_range(1);
        case (m)
          0: m = (cmd == DXC_NOP) ? 1 : 4;
          1: m = (cmd == DXC_WR_INST_FIRST) ? 2 : (cmd == DXC_NOP) ? 1 : 4;
          2: m = (cmd == DXC_WR_INST) ? 3 : 4;
          default: ;
        endcase
        @(negedge clk);
        `CHECK(unlocked == (m == 3), "unlocked state");
        `CHECK(fault == (m == 4), "fault state");
        `CHECK(drv_en == (unlocked && enable_drivers), "driver enable");
      end
      n_open += (m == 3); n_fault += (m == 4);
    end
    `CHECK(n_open > 100 && n_fault > 100, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
