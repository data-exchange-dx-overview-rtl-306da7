// dxb_return_arb: builds the DX Return Stream read by the HPU.
//
// Three tributary streams share one HPU read address (DXBR_DX_ReturnFIFO)
// so one DMA channel can move them all: type 0 TIS (Trigger Information
// Stream, high real-time priority), type 1 TMTS (Transition Module Trace
// Stream) and type 2 DXTS (DX Trace Stream). Every DMA frame is 16 words:
// the type word, then 15 data words taken from that stream's FIFO.
// A stream may be chosen when its FIFO holds a whole frame (15 words).
// Each stream has a 4-bit priority counter reloaded from its PRIOR_LOAD
// field of DXBR_Control when the stream is served; every other waiting
// stream's counter counts down by one per frame served. The waiting stream
// with the smallest counter wins, ties going to TIS, then TMTS, then DXTS.
// Smaller load values therefore mean higher priority, as the document
// says; the counter rule itself is this design's reading, since the
// document defers the details to the FPGA source.
// Read side: valid says a word is presented on rdata; rd takes it.
// frame_ready is high while a frame is available or in progress, for the
// HPU's DMA request.
module dxb_return_arb
  import dx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  load [3],
  input  logic [2:0]  frame_avail,
  input  logic [31:0] head [3],
  output logic [2:0]  pop,
  input  logic        rd,
  output logic        valid,
  output logic [31:0] rdata,
  output logic        frame_ready,
  output logic [31:0] frames [3]
);
  typedef enum logic [1:0] {R_IDLE, R_TYPE, R_DATA} rstate_e;
  rstate_e     st;
  logic [1:0]  cur, pick;
  logic [3:0]  cnt [3];
  logic [3:0]  widx;
  logic        any;

  always_comb begin
    logic [3:0] best;
    any = 1'b0; pick = 2'd0; best = 4'hF;
    for (int s = 0; s < 3; s++) begin
      if (frame_avail[s] && (!any || cnt[s] < best)) begin
        any = 1'b1; best = cnt[s]; pick = 2'(s);
      end
    end
  end

  assign valid       = (st == R_TYPE) || (st == R_DATA);
  assign rdata       = (st == R_TYPE) ? 32'(cur) : head[cur];
  assign frame_ready = valid || any;
  always_comb begin
    pop = '0;
    if (st == R_DATA && rd) pop[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; cur <= '0; widx <= '0;
      for (int s = 0; s < 3; s++) begin cnt[s] <= '0; frames[s] <= '0; end
    end else begin
      unique case (st)
        R_IDLE: if (any) begin
          st <= R_TYPE; cur <= pick;
          for (int s = 0; s < 3; s++) begin
            if (2'(s) == pick) cnt[s] <= load[s];
            else if (frame_avail[s] && cnt[s] != 4'd0) cnt[s] <= cnt[s] - 4'd1;
          end
        end
        R_TYPE: if (rd) begin st <= R_DATA; widx <= '0; end
        R_DATA: if (rd) begin
          if (widx == 4'd14) begin st <= R_IDLE; frames[cur] <= frames[cur] + 32'd1; end
          else widx <= widx + 4'd1;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
