// dxd_tinp0: TINP0 timer input pulse generator for the DPU's DSP.
//
// DXD_TINP0_Period holds a unit bit U (bit 16: 0 = DX_CLK cycles,
// 1 = microseconds) and a period p (bits 15:0). The reset value 0x10001
// gives one pulse per microsecond, as the document states. tinp0 is a
// one-DX_CLK pulse at the start of every period; p = 0 stops it. Writing
// the register (period_wr) restarts the count. Pulse shape is this design's
// choice; the document gives only the period.
module dxd_tinp0 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        period_wr,
  input  logic [31:0] period_wdata,
  input  logic        us_tick,
  output logic [16:0] period,
  output logic        tinp0
);
  logic [15:0] cnt;
  logic        step;
  assign step = period[16] ? us_tick : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period <= 17'h10001; cnt <= '0; tinp0 <= 1'b0;
    end else begin
      tinp0 <= 1'b0;
      if (period_wr) begin
        period <= period_wdata[16:0]; cnt <= '0;
      end else if (period[15:0] != 16'd0 && step) begin
        if (cnt == period[15:0] - 16'd1) begin cnt <= '0; tinp0 <= 1'b1; end
        else cnt <= cnt + 16'd1;
      end
    end
  end
endmodule
