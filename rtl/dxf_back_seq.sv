// dxf_back_seq: DXF back sequencer, Output FIFO to DX Internal Bus.
//
// The Output FIFO holds the instruction stream and destination data as
// {tag, data} words (tag Lrrr FHTT). An instruction is sent only when all of
// its words are present (inst_avail: at least one word with the L tag bit
// is stored), so LAST is raised exactly once per instruction, on the word
// tagged L. Each word sent produces one WR cycle with
//   FIRST on the instruction word (tag type ttInstruction),
//   LAST  on the word tagged L,
//   D     the data, TAG the tag (so the DXB knows the word type).
// Words tagged H are also written to the Host FIFO (hf_wen). Output pauses
// (no WR) while the DXB Input FIFO (dxb_af) or the Host FIFO (hf_paf)
// is almost full. Outputs are registered. This is the single-side form of
// the sequencer: the DONE/ICOUNT hand-over between sides A and B is not
// included.
module dxf_back_seq
  import dx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [39:0] head,
  input  logic        empty,
  input  logic        inst_avail,
  input  logic        dxb_af,
  input  logic        hf_paf,
  output logic        pop,
  output logic        wr,
  output logic        first,
  output logic        last,
  output logic [31:0] d,
  output dx_tag_t     tag,
  output logic        hf_wen
);
  logic    busy;
  dx_tag_t htag;
  assign htag = dx_tag_t'(head[39:32]);
  assign pop  = !empty && !dxb_af && !hf_paf && (busy || inst_avail);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; wr <= 1'b0; first <= 1'b0; last <= 1'b0; d <= '0; tag <= '0; hf_wen <= 1'b0;
    end else begin
      wr <= pop; first <= pop && htag.tt == TT_INSTRUCTION; last <= pop && htag.last;
      hf_wen <= pop && htag.host;
      if (pop) begin d <= head[31:0]; tag <= htag; busy <= !htag.last; end
    end
  end
endmodule
