// dxb_trace_framer: packs the DX Trace Stream into 15-word frames.
//
// Each DX Return Stream DMA frame is one type word plus 15 data words; this
// block builds the 15 data words of DX Trace Stream (DXTS) frames in a
// frame buffer and copies a finished frame into the DX Trace FIFO.
// Padding (DX_Pad, 0xE0000000) is added
//   - when the last word of an instruction lands in a frame's 14th word
//     (the 15th word is then padded, as the document prescribes),
//   - on a frame timeout: the frame holds only complete instructions, the
//     DX Trace FIFO holds no complete frame, and frame_tmo microseconds have
//     passed (0 disables); writing DXBI_ReleaseTraceFrame (release) does
//     the same at once.
// FIFO timeout: when the Trace FIFO has stayed almost full (12 frames or
// more) for fifo_tmo microseconds (0 disables), the current frame is
// replaced by a timeout frame (DX_TraceTimeout followed by DX_Pad words)
// and input is dropped until DXBI_ResumeTraceFIFO is written (resume);
// input then restarts at the first word of the next traced instruction.
// One frame of the Trace FIFO is kept in reserve for the timeout frame: an
// ordinary frame only starts into the FIFO while at least two frames of
// room are left, so a timeout frame can always be written even when the
// HPU has stopped reading.
// While a frame is being copied out (15 cycles) the input is held off
// (ready low). Instructions longer than a frame simply continue in the next
// frame; the continuation header words (N, M, nnnn fields) are not added.
module dxb_trace_framer
  import dx_pkg::*;
#(
  parameter int unsigned TDEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic        wfirst,
  input  logic        iend,
  input  logic [31:0] wdata,
  output logic        ready,
  input  logic        us_tick,
  input  logic [15:0] frame_tmo,
  input  logic [15:0] fifo_tmo,
  input  logic        release_req,
  input  logic        resume,
  input  logic [$clog2(TDEPTH+1)-1:0] tfifo_count,
  input  logic        tfifo_full,
  output logic        push,
  output logic [31:0] push_data,
  output logic        inhibited,
  output logic [31:0] frames_out,
  output logic [31:0] pad_frames
);
  localparam int unsigned CW = $clog2(TDEPTH+1);
  logic [31:0] fbuf [15];
  logic [3:0]  pos, fidx;
  logic        mid, flushing, wait_first;
  logic [15:0] ftimer, qtimer;
  logic        tfifo_af, tfifo_has_frame, ftmo_hit, qtmo_hit, room, tmo_frame;

  assign tfifo_af        = tfifo_count >= CW'(12*15);
  assign tfifo_has_frame = tfifo_count >= CW'(15);
  assign ready     = !flushing;
  assign room      = tfifo_count <= CW'(TDEPTH - 30);
  assign push      = flushing && !tfifo_full && (fidx != 4'd0 || room || tmo_frame);
  assign push_data = fbuf[fidx];
  assign ftmo_hit  = (pos != 4'd0) && !mid && !tfifo_has_frame &&
                     ((frame_tmo != 16'd0 && ftimer >= frame_tmo) || release_req);
  assign qtmo_hit  = !inhibited && fifo_tmo != 16'd0 && qtimer >= fifo_tmo &&
                     (!flushing || (fidx == 4'd0 && !room && !tmo_frame));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 15; i++) fbuf[i] <= DX_PAD;
      pos <= '0; fidx <= '0; mid <= 1'b0; flushing <= 1'b0; inhibited <= 1'b0;
      wait_first <= 1'b0; ftimer <= '0; qtimer <= '0; frames_out <= '0; pad_frames <= '0;
      tmo_frame <= 1'b0;
    end else begin
      // timers
      if (!tfifo_af) qtimer <= '0;
      else if (us_tick && qtimer != 16'hFFFF) qtimer <= qtimer + 16'd1;
      if (pos == 4'd0 || mid || flushing) ftimer <= '0;
      else if (us_tick && ftimer != 16'hFFFF) ftimer <= ftimer + 16'd1;
      if (resume && inhibited) begin inhibited <= 1'b0; wait_first <= 1'b1; end

      if (flushing && !qtmo_hit) begin
        if (push) begin
          if (fidx == 4'd14) begin
            flushing <= 1'b0; fidx <= '0; pos <= '0; frames_out <= frames_out + 32'd1;
            tmo_frame <= 1'b0;
            for (int i = 0; i < 15; i++) fbuf[i] <= DX_PAD;
          end else fidx <= fidx + 4'd1;
        end
      end else if (qtmo_hit) begin
        fbuf[0] <= DX_TRACE_TIMEOUT;
        for (int i = 1; i < 15; i++) fbuf[i] <= DX_PAD;
        flushing <= 1'b1; fidx <= '0; inhibited <= 1'b1; mid <= 1'b0; tmo_frame <= 1'b1;
        pad_frames <= pad_frames + 32'd1;
      end else if (ftmo_hit) begin
        for (int i = 0; i < 15; i++) if (4'(i) >= pos) fbuf[i] <= DX_PAD;
        flushing <= 1'b1; fidx <= '0; pad_frames <= pad_frames + 32'd1;
      end else if (!inhibited && !(wait_first && !(wr && wfirst))) begin
        logic [3:0] np;
        np = pos;
        if (wr) begin
          fbuf[pos] <= wdata; np = pos + 4'd1; wait_first <= 1'b0;
        end
        if (iend) mid <= 1'b0;
        else if (wr) mid <= 1'b1;
        if (np == 4'd15) begin
          flushing <= 1'b1; fidx <= '0; pos <= np;
        end else if (iend && np == 4'd14) begin
          fbuf[14] <= DX_PAD; flushing <= 1'b1; fidx <= '0; pos <= 4'd15;
          pad_frames <= pad_frames + 32'd1;
        end else pos <= np;
      end
    end
  end
endmodule
