// dx_fifo: synchronous first-word-fall-through FIFO used for every DX buffer
// (Instruction FIFO 256x32, Output FIFO 512x(32+8), DXB Input FIFO, ROL FIFO,
// DX Trace FIFO, TM FIFOs, source and destination FIFOs).
//
// The head word is visible on rdata whenever empty is low; rd pops it.
// wr while full and rd while empty are ignored and reported on the one-cycle
// ovf / unf pulses, which the owners turn into their overflow fault bits.
// count is the number of stored words; af is count >= AF_LEVEL.
// Depths and widths come from the figures; the memory is a plain array
// (one write and one read port), so it maps onto FPGA block RAM. A single
// clock is used for both sides; this is a simplification of the design,
// whose FIFOs also cross between the DX_CLK, DXINT_CLK and DCLK domains.
module dx_fifo #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned AF_LEVEL = DEPTH - 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       rd,
  output logic [WIDTH-1:0]           rdata,
  output logic                       empty,
  output logic                       full,
  output logic                       af,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       ovf,
  output logic                       unf
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign af    = (count >= AF_LEVEL[$clog2(DEPTH+1)-1:0]);
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; ovf <= 1'b0; unf <= 1'b0;
    end else begin
      ovf <= wr && full;
      unf <= rd && empty;
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end
endmodule
