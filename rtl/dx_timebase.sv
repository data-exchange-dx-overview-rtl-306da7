// dx_timebase: 1 MHz timebase and DX Front Bus stall timeout.
//
// The M field of DXFI_Control gives DX_CLK cycles per microsecond (50 for a
// 50 MHz DX_CLK); us_tick pulses once per microsecond. A write to the
// Control register (ctrl_wr) restarts the divider, as the document states.
// DXFI_Timeout holds a divisor D and an interval I: a timeout occurs when the
// bus has been stalled (run high) for D*I microseconds. The count restarts
// whenever run drops. timeout is a one-cycle pulse. M, D or I of zero stops
// the respective counter (no tick / no timeout): the document does not say
// what zero means for these fields, so this is this design's choice.
module dx_timebase (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  mdiv,
  input  logic        ctrl_wr,
  input  logic [15:0] tdiv,
  input  logic [15:0] tint,
  input  logic        run,
  output logic        us_tick,
  output logic        timeout
);
  logic [7:0]  mcnt;
  logic [15:0] dcnt, icnt;

  assign us_tick = (mdiv != 8'd0) && (mcnt == mdiv - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mcnt <= '0; dcnt <= '0; icnt <= '0; timeout <= 1'b0;
    end else begin
      timeout <= 1'b0;
      if (ctrl_wr || us_tick) mcnt <= '0;
      else if (mdiv != 8'd0)  mcnt <= mcnt + 8'd1;
      if (!run || tdiv == 16'd0 || tint == 16'd0) begin
        dcnt <= '0; icnt <= '0;
      end else if (us_tick) begin
        if (dcnt == tdiv - 16'd1) begin
          dcnt <= '0;
          if (icnt == tint - 16'd1) begin
            icnt <= '0; timeout <= 1'b1;
          end else icnt <= icnt + 16'd1;
        end else dcnt <= dcnt + 16'd1;
      end
    end
  end
endmodule
