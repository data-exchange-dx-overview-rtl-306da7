// dxd_led: DPU red LED control (DXFI_LED register).
//
// Eight enable bits select which events light the LED (bit 7 DSP level,
// 6 DSP pulse, 5 DSP source FIFO write, 4 DSP destination FIFO read,
// 3 DX fatal fault, 2 DX write to this DPU, 1 DX read from this DPU,
// 0 constant on). The LED is lit while any enabled event is active and for
// at least min_ms milliseconds after it, so single-cycle events are visible.
// Timing comes from the 1 MHz us_tick; a millisecond is 1000 ticks.
// Events and the minimum duration follow the document; the retriggering
// stretch counter is this design's implementation.
module dxd_led (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] enables,
  input  logic [7:0] min_ms,
  input  logic       us_tick,
  input  logic [7:0] events,
  output logic       led
);
  logic [9:0] us_cnt;
  logic [7:0] ms_left;
  logic       act, ms_tick;

  assign act     = |(enables & events);
  assign ms_tick = us_tick && (us_cnt == 10'd999);
  assign led     = act || (ms_left != 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      us_cnt <= '0; ms_left <= '0;
    end else begin
      if (act) us_cnt <= '0;
      else if (us_tick) us_cnt <= ms_tick ? 10'd0 : us_cnt + 10'd1;
      if (act) ms_left <= min_ms;
      else if (ms_tick && ms_left != 8'd0) ms_left <= ms_left - 8'd1;
    end
  end
endmodule
