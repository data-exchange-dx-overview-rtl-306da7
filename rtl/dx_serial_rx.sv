// dx_serial_rx: serial status receiver for one DXC[5:0] status line.
//
// Waits (HUNT) while the line is 1 (reset code or idle), then takes the
// first 0 as the start of a 0 1 F B d1 d0 frame. A 1 where a start bit is
// due means the sender has gone back to its reset code, and the receiver
// hunts again. A start bit not followed by a 1 is a protocol error:
// err is set and stays set (the DXF puts a DPU with corrupt serial status
// on the down list as soon as this is seen). f_fault, b_fault and af are
// updated at the end of every good frame; valid goes high after the first.
// A line that stays 1 for the whole hunt is not an error: a DPU may still be
// in reset. The receiver's exact checking rules are this design's own.
module dx_serial_rx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sin,
  output logic       valid,
  output logic       f_fault,
  output logic       b_fault,
  output logic [1:0] af,
  output logic       err
);
  logic       hunt;
  logic [2:0] pos;
  logic [3:0] sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hunt <= 1'b1; pos <= '0; sh <= '0; valid <= 1'b0; f_fault <= 1'b0;
      b_fault <= 1'b0; af <= '0; err <= 1'b0;
    end else if (hunt) begin
      if (!sin) begin hunt <= 1'b0; pos <= 3'd1; end
    end else if (pos == 3'd0 && sin) begin
      hunt <= 1'b1;                       // line high: reset code
    end else begin
      unique case (pos)
        3'd0: ;
        3'd1: if (!sin) err <= 1'b1;
        default: sh <= {sh[2:0], sin};
      endcase
      if (pos == 3'd5) begin
        pos <= 3'd0;
        if (!err) begin
          valid <= 1'b1; f_fault <= sh[2]; b_fault <= sh[1]; af <= {sh[0], sin};
        end
      end else pos <= pos + 3'd1;
    end
  end
endmodule
