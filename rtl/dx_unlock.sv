// dx_unlock: subordinate unlock mechanism of the DX Front Bus.
//
// After reset (rst_n) or DX_RESET_N (dx_reset_n low, synchronous), a
// subordinate may not drive DXD or DXC. This module watches DXC[9:7] for the
// startup sequence an idle bus followed by a DX_WriteReg produces:
// nop (111) one or more times, then write_inst_first (001), then
// write_inst (010). That sequence exercises all three DXC bits, so a shorted
// or open line is caught. When it is seen, `unlocked` rises and stays high;
// any other value on the way sets `fault` (FAULT_UNLOCKED) until the next
// reset. Drivers are enabled (drv_en) only when unlocked and the
// ENABLE_DRIVERS bit of the Control register is set.
// Sequence and behaviour follow the document; treating a non-nop value
// before the first nop as a fault is this design's choice.
module dx_unlock
  import dx_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     dx_reset_n,
  input  dxc_cmd_e cmd,
  input  logic     enable_drivers,
  output logic     unlocked,
  output logic     fault,
  output logic     drv_en
);
  typedef enum logic [2:0] {U_START, U_NOP, U_FIRST, U_OPEN, U_FAULT} ustate_e;
  ustate_e st;

  assign unlocked = (st == U_OPEN);
  assign fault    = (st == U_FAULT);
  assign drv_en   = unlocked && enable_drivers;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= U_START;
    else if (!dx_reset_n) st <= U_START;
    else begin
      unique case (st)
        U_START: st <= (cmd == DXC_NOP) ? U_NOP : U_FAULT;
        U_NOP:   if (cmd == DXC_WR_INST_FIRST) st <= U_FIRST;
                 else if (cmd != DXC_NOP) st <= U_FAULT;
        U_FIRST: st <= (cmd == DXC_WR_INST) ? U_OPEN : U_FAULT;
        U_OPEN:  st <= U_OPEN;
        U_FAULT: st <= U_FAULT;
        default: st <= U_FAULT;
      endcase
    end
  end
endmodule
