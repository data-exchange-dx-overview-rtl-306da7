// dxd_srce_fifo: DPU source FIFO with block delimiting by discard addresses.
//
// The DSP writes words over the EMIF (wr, addr, data). Two input registers
// (the IFF/FF pair of the EMIF input) delay each write by two cycles before
// it reaches the FIFO. The low word addresses are special (document, "DPU
// EMIF FIFO Behavior"):
//   address 2 (Discard 2): marks the end of a block; only the block's
//                          length is kept (the document drops the word at
//                          the FIFO output; here it never enters the data
//                          FIFO, so a new block can start the cycle after
//                          the previous one ends),
//   address 1, 0:          not stored (they only push Discard 2 through the
//                          input pipeline in the original design).
// Any other address is a user word. A block is zero or more user words
// followed by Discard 2, so a block with no user words is legal.
// The FIFO stores {addr[15:0], data[31:0]} (Addr 256x16 + Data 256x32 as in
// the DXD figure). When Discard 2 arrives the block's user word count is
// pushed onto a small length FIFO, so the source sequencer knows a block's
// length before it starts sending it (it needs this to place write_end).
// Read side: head_data is the head user word; pop removes it; blk_done
// (in the cycle of the block's last pop, or alone for an empty block)
// removes the block's length entry.
// Status: blk_avail/blk_len for the head block, incmplt (part of a block
// has been written), hf (half full), lhf (less than half full and no
// incomplete block), ae (less than a quarter full), full, ovf (sticky).
// The length FIFO depth (LDEPTH) is this design's choice.
module dxd_srce_fifo #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned LDEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [15:0] addr,
  input  logic [31:0] data,
  input  logic        pop,
  input  logic        blk_done,
  output logic [31:0] head_data,
  output logic        blk_avail,
  output logic [8:0]  blk_len,
  output logic        empty,
  output logic        full,
  output logic        hf,
  output logic        lhf,
  output logic        ae,
  output logic        incmplt,
  output logic        ovf
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic        s1_v, s2_v;
  logic [15:0] s1_a, s2_a;
  logic [31:0] s1_d, s2_d;
  logic [8:0]  cur_len;
  logic        push, is_d2;
  logic [47:0] head;
  logic [CW-1:0] count;
  logic        lempty, lfull, dovf, lovf;
  logic        af_unused, dunf_unused, lunf_unused, laf_unused;
  logic [$clog2(LDEPTH+1)-1:0] lcount_unused;

  assign is_d2 = (s2_a == 16'd2);
  assign push  = s2_v && (s2_a > 16'd1) && (is_d2 || !full);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s1_a <= '0; s2_a <= '0; s1_d <= '0; s2_d <= '0;
      cur_len <= '0; ovf <= 1'b0;
    end else begin
      s1_v <= wr; s1_a <= addr; s1_d <= data;
      s2_v <= s1_v; s2_a <= s1_a; s2_d <= s1_d;
      if (push) cur_len <= is_d2 ? 9'd0 : cur_len + 9'd1;
      if (dovf || lovf) ovf <= 1'b1;
    end
  end

  dx_fifo #(.WIDTH(48), .DEPTH(DEPTH)) u_data (
    .clk, .rst_n, .wr(s2_v && (s2_a > 16'd2)), .wdata({s2_a, s2_d}),
    .rd(pop), .rdata(head), .empty, .full, .af(af_unused), .count,
    .ovf(dovf), .unf(dunf_unused));

  dx_fifo #(.WIDTH(9), .DEPTH(LDEPTH)) u_len (
    .clk, .rst_n, .wr(push && is_d2), .wdata(cur_len),
    .rd(blk_done), .rdata(blk_len), .empty(lempty), .full(lfull), .af(laf_unused),
    .count(lcount_unused), .ovf(lovf), .unf(lunf_unused));

  assign head_data = head[31:0];
  assign blk_avail = !lempty;
  assign incmplt   = (cur_len != 9'd0);
  assign hf        = (count >= CW'(DEPTH/2));
  assign lhf       = !hf && !incmplt;
  assign ae        = (count < CW'(DEPTH/4));
endmodule
