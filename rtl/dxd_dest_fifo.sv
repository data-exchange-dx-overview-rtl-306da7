// dxd_dest_fifo: DPU destination FIFO, filled by the DX bus, read by the DSP
// in DMA frames.
//
// DX writes (wr, wdata) come from front bus destination writes and jam
// words. The DSP reads over the EMIF (rd, rdata = head word). Destination
// FIFOs have no structure other than a fixed frame size: frame_size is the
// F field of DXD_DSP_Control. The FIFO counts complete frames present; it
// requests DMA (dreq) while at least one complete frame is present, i.e.
// per frame as the document says. Fault bits (sticky, as in the DXD-specific
// status nibble {RD_OVR, WR_OVR, FR_OVR, FR_UND}):
//   RD_OVR DSP read from the empty FIFO, WR_OVR DX write to the full FIFO,
//   FR_OVR frame counter overflow (DX side), FR_UND DSP started reading a
//   frame while no complete frame was present (DSP side).
// af (almost full) is count >= DEPTH - AF_MARGIN; the margin is this
// design's choice. A frame_size of 0 disables dreq (assumption).
module dxd_dest_fifo #(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned AF_MARGIN = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [31:0] wdata,
  input  logic        rd,
  output logic [31:0] rdata,
  input  logic [6:0]  frame_size,
  output logic        dreq,
  output logic        empty,
  output logic        af,
  output logic [3:0]  fault,
  output logic [31:0] words_written
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic full, fovf, funf;
  logic [CW-1:0] count;
  logic [6:0] wcnt, rcnt;
  logic [CW-1:0] frames;
  logic wfr, rfr;

  dx_fifo #(.WIDTH(32), .DEPTH(DEPTH), .AF_LEVEL(DEPTH - AF_MARGIN)) u_fifo (
    .clk, .rst_n, .wr, .wdata, .rd, .rdata, .empty, .full, .af, .count,
    .ovf(fovf), .unf(funf));

  assign wfr  = wr && !full && (frame_size != 7'd0) && (wcnt == frame_size - 7'd1);
  assign rfr  = rd && !empty && (frame_size != 7'd0) && (rcnt == frame_size - 7'd1);
  assign dreq = (frames != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; rcnt <= '0; frames <= '0; fault <= '0; words_written <= '0;
    end else begin
      if (wr && !full) begin
        wcnt <= wfr ? 7'd0 : wcnt + 7'd1;
        words_written <= words_written + 32'd1;
      end
      if (rd && !empty) rcnt <= rfr ? 7'd0 : rcnt + 7'd1;
      if (wfr && !rfr) begin
        if (frames == CW'(DEPTH)) fault[1] <= 1'b1;
        else frames <= frames + 1'b1;
      end else if (rfr && !wfr && frames != '0) begin
        frames <= frames - 1'b1;
      end
      if (rd && !empty && frame_size != 7'd0 && rcnt == 7'd0 && frames == '0 && !wfr)
        fault[0] <= 1'b1;
      if (funf) fault[3] <= 1'b1;
      if (fovf) fault[2] <= 1'b1;
    end
  end
endmodule
