// dx_serial_tx: serial status sender of a DX Front Bus device.
//
// Each DPU reports its status on its own DXC[5:0] line as repeated 6-bit
// frames 0 1 F B d1 d0 (document: serial form 01FBdd): F summarises
// self-detected faults, B is a DX bus fault, d1/d0 are the destination
// FIFO almost-full flags. While in synchronous reset (sreset) the line is
// held at 1 (the document's "11111" reset code); the first 0 after that
// starts the first frame. One bit per DX_CLK; the status is sampled at the
// start of each frame.
module dx_serial_tx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sreset,
  input  logic       f_fault,
  input  logic       b_fault,
  input  logic [1:0] af,
  output logic       sout
);
  logic [2:0] pos;
  logic [3:0] shadow;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; shadow <= '0; sout <= 1'b1;
    end else if (sreset) begin
      pos <= '0; sout <= 1'b1;
    end else begin
      unique case (pos)
        3'd0: begin sout <= 1'b0; shadow <= {f_fault, b_fault, af}; end
        3'd1: sout <= 1'b1;
        3'd2: sout <= shadow[3];
        3'd3: sout <= shadow[2];
        3'd4: sout <= shadow[1];
        default: sout <= shadow[0];
      endcase
      pos <= (pos == 3'd5) ? 3'd0 : pos + 3'd1;
    end
  end
endmodule
