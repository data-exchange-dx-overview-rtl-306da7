// dxd_int_prio: DMA interrupt selection of the DPU EMIF FPGA.
//
// The DXD FPGA asks the DSP for DMA through four interrupt lines, one per
// FIFO: srce 0/1 (fill a source FIFO) and dest 0/1 (empty a destination
// FIFO). Only one request is raised at a time, chosen by the document's
// priority order, highest first:
//   1 DX needs SRCE  (the DX bus waits on this DPU's empty source FIFO)
//   2 DX needs DEST  (the DX bus waits on a full destination FIFO)
//   3 SRCE INCMPLT   (a source FIFO holds part of a block)
//   4 DEST pres      (a complete frame is in a destination FIFO)
//   5 SRCE LHF       (a source FIFO is less than half full, no partial block)
// Vetoes: an empty destination FIFO, a full or disabled source FIFO
// (S bit of DXFI_Control), disabled destination interrupts (D bit), and any
// pending EP request, which inhibits every interrupt.
// Within a class FIFO 0 wins over FIFO 1. The document's cell-by-cell
// inhibit table and its 1 us idle exceptions are not modelled: the
// strict-priority choice is this design's simplification of it.
// Output req = {dest1, dest0, srce1, srce0}, at most one bit set, registered.
module dxd_int_prio (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       srce_en,
  input  logic       dest_en,
  input  logic       ep_pending,
  input  logic [1:0] dx_needs_srce,
  input  logic [1:0] dx_needs_dest,
  input  logic [1:0] srce_incmplt,
  input  logic [1:0] dest_pres,
  input  logic [1:0] srce_lhf,
  input  logic [1:0] srce_full,
  input  logic [1:0] dest_empty,
  output logic [3:0] req
);
  logic [1:0] s_ok, d_ok;
  logic [3:0] req_n;
  assign s_ok = srce_en ? ~srce_full : 2'b00;
  assign d_ok = dest_en ? ~dest_empty : 2'b00;

  function automatic logic [1:0] pick(logic [1:0] v);
    return v[0] ? 2'b01 : (v[1] ? 2'b10 : 2'b00);
  endfunction

  always_comb begin
    req_n = '0;
    if (ep_pending)                        req_n = '0;
    else if (|(dx_needs_srce & s_ok))      req_n = {2'b00, pick(dx_needs_srce & s_ok)};
    else if (|(dx_needs_dest & d_ok))      req_n = {pick(dx_needs_dest & d_ok), 2'b00};
    else if (|(srce_incmplt & s_ok))       req_n = {2'b00, pick(srce_incmplt & s_ok)};
    else if (|(dest_pres & d_ok))          req_n = {pick(dest_pres & d_ok), 2'b00};
    else if (|(srce_lhf & s_ok))           req_n = {2'b00, pick(srce_lhf & s_ok)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req <= '0;
    else        req <= req_n;
  end
endmodule
