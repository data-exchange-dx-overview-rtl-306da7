// dxd_eioclk: EMIF I/O clock (EIOCLK) selection and extra-pulse (EP) engine.
//
// Logic on the EMIF side of the DXD FPGA is clocked by EIOCLK, normally the
// AND of the EMIF strobes AWE_N and ARE_N (figure "EMIF I/O Clock"). When
// data must be moved through that logic without a bus cycle, a state machine
// on the free-running DX_CLK inserts N extra EIOCLK rising edges by
// switching the mux to EPCLK, in the document's order:
//   clear ARDY; wait two clocks; assert USE_EPCLK; assert FORCE_EPCLK_HI;
//   assert FORCE_EPCLK_DX for N clocks; wait one clock; release USE_EPCLK;
//   release FORCE_EPCLK_HI and set ARDY.
// An EP request (ep_req, N = ep_n) is granted only after the EMIF has been
// idle (both strobes high) for idle_t DX_CLK cycles (DXD_EP_IDLE_T,
// default 50). ep_pending is high from request to completion; the interrupt
// logic inhibits all DMA requests meanwhile.
// EPCLK is DX_CLK itself while FORCE_EPCLK_DX is high, and otherwise high
// while FORCE_EPCLK_HI is set or ARDY is low (from the start of the
// sequence to its end). The idle EMIF strobes are high too, so switching
// USE_EPCLK either way gives no edge; the control flops change on the
// DX_CLK rising edge, when DX_CLK is 1, so each FORCE_EPCLK_DX cycle yields
// exactly one rising edge and nothing else does. That EPCLK formation is
// this design's own; the mux and strobe AND are from the figure. eioclk is a gated clock and
// is intended for the FPGA's clock routing, not for general logic.
module dxd_eioclk (
  input  logic       dx_clk,
  input  logic       rst_n,
  input  logic       awe_n,
  input  logic       are_n,
  input  logic       ep_req,
  input  logic [7:0] ep_n,
  input  logic [7:0] idle_t,
  output logic       ardy,
  output logic       use_epclk,
  output logic       force_hi,
  output logic       force_dx,
  output logic       ep_pending,
  output logic       ep_done,
  output logic       eioclk
);
  typedef enum logic [3:0] {E_IDLE, E_CLR, E_W1, E_USE, E_HI, E_DX, E_WAIT, E_REL_USE, E_REL} estate_e;
  estate_e st;
  logic [7:0] idle_cnt, n_left;
  logic       emif_idle, epclk;

  assign emif_idle = awe_n && are_n;
  assign epclk     = force_dx ? dx_clk : (force_hi || !ardy);
  assign eioclk    = use_epclk ? epclk : (awe_n & are_n);

  always_ff @(posedge dx_clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; ardy <= 1'b1; use_epclk <= 1'b0; force_hi <= 1'b0; force_dx <= 1'b0;
      idle_cnt <= '0; n_left <= '0; ep_pending <= 1'b0; ep_done <= 1'b0;
    end else begin
      ep_done <= 1'b0;
      if (!emif_idle) idle_cnt <= '0;
      else if (idle_cnt != 8'hFF) idle_cnt <= idle_cnt + 8'd1;
      if (ep_req) ep_pending <= 1'b1;
      unique case (st)
        E_IDLE: if ((ep_req || ep_pending) && emif_idle && idle_cnt >= idle_t) begin
                  ardy <= 1'b0; st <= E_CLR; n_left <= ep_n;
                end
        E_CLR:  st <= E_W1;
        E_W1:   begin use_epclk <= 1'b1; st <= E_USE; end
        E_USE:  begin force_hi <= 1'b1; st <= E_HI; end
        E_HI:   if (n_left != 8'd0) begin force_dx <= 1'b1; st <= E_DX; end
                else st <= E_WAIT;
        E_DX:   if (n_left == 8'd1) begin force_dx <= 1'b0; st <= E_WAIT; end
                else n_left <= n_left - 8'd1;
        E_WAIT: st <= E_REL_USE;
        E_REL_USE: begin use_epclk <= 1'b0; st <= E_REL; end
        E_REL:  begin force_hi <= 1'b0; ardy <= 1'b1; ep_pending <= 1'b0; ep_done <= 1'b1; st <= E_IDLE; end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
