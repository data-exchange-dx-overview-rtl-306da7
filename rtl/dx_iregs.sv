// dx_iregs: instruction-access registers of a DXF or DXD FPGA.
//
// Written by DX_WriteReg and read by DX_ReadReg through the DX Front Bus.
// The 6-bit register index is {R[1:0], r[3:0]} as in the register tables:
//   R=0 DXFI_Sequence[Q]  R=1 DXFI_JamData[Q]  R=2 DXFI_JamCount[Q] (8 bits)
//   R=3: r=0 Control, r=1 Timeout, r=3 Status (read only, from status_in),
//        r=7 InstructionCount, r=9/a/c/d device counters and read-only words
//        (ext_rdata), r=b LED control (DXD; the DXF's DownList is read-only
//        and comes in on ext_rdata), r=f Test.
// Registers outside this module (counters) get a write strobe on ext_wr[r]
// with the value on wdata. The standard Test register keeps any written
// value and is incremented after each read (rd strobe). Reads of unused
// indices return 0 (the document calls the value undefined).
// Reset values: sequences all 0xFFFFFFFF (empty list), jam files 0,
// Control M = 50 (the document's 50 MHz example), Timeout D=1, I=1000
// (the document's 1 ms example). These reset values are assumptions.
module dx_iregs #(
  parameter int unsigned NQ = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [5:0]  widx,
  input  logic [31:0] wdata,
  input  logic        rd,
  input  logic [5:0]  ridx,
  output logic [31:0] rdata,
  input  logic [3:0]  q,
  output logic [31:0] seq_word,
  output logic [31:0] jam_data,
  output logic [7:0]  jam_count,
  output logic [31:0] control,
  output logic [31:0] timeout,
  output logic [31:0] led_ctrl,
  output logic        control_wr,
  input  logic [31:0] status_in,
  input  logic [31:0] icount_in,
  input  logic [31:0] ext_rdata [16],
  output logic [15:0] ext_wr
);
  localparam int unsigned QW = $clog2(NQ);
  logic [31:0] seq  [NQ];
  logic [31:0] jamd [NQ];
  logic [7:0]  jamc [NQ];
  logic [31:0] test;

  assign seq_word  = seq[q[QW-1:0]];
  assign jam_data  = jamd[q[QW-1:0]];
  assign jam_count = jamc[q[QW-1:0]];
  assign control_wr = we && (widx == 6'h30);

  always_comb begin
    ext_wr = '0;
    if (we && widx[5:4] == 2'd3) ext_wr[widx[3:0]] = 1'b1;
  end

  always_comb begin
    rdata = '0;
    unique case (ridx[5:4])
      2'd0: rdata = (int'(ridx[3:0]) < NQ) ? seq[ridx[QW-1:0]] : 32'hFFFF_FFFF;
      2'd1: rdata = (int'(ridx[3:0]) < NQ) ? jamd[ridx[QW-1:0]] : '0;
      2'd2: rdata = (int'(ridx[3:0]) < NQ) ? {24'd0, jamc[ridx[QW-1:0]]} : '0;
      default: unique case (ridx[3:0])
        4'h0: rdata = control;
        4'h1: rdata = timeout;
        4'h3: rdata = status_in;
        4'h7: rdata = icount_in;
        4'hB: rdata = led_ctrl | ext_rdata[11];
        4'hF: rdata = test;
        default: rdata = ext_rdata[ridx[3:0]];
      endcase
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NQ; i++) begin
        seq[i] <= 32'hFFFF_FFFF; jamd[i] <= '0; jamc[i] <= '0;
      end
      control <= 32'd50; timeout <= {16'd1, 16'd1000}; led_ctrl <= '0; test <= '0;
    end else begin
      if (we && int'(widx[3:0]) < NQ) begin
        unique case (widx[5:4])
          2'd0: seq[widx[QW-1:0]]  <= wdata;
          2'd1: jamd[widx[QW-1:0]] <= wdata;
          2'd2: jamc[widx[QW-1:0]] <= wdata[7:0];
          default: ;
        endcase
      end
      if (we && widx == 6'h30) control  <= wdata;
      if (we && widx == 6'h31) timeout  <= wdata;
      if (we && widx == 6'h3B) led_ctrl <= wdata;
      if (we && widx == 6'h3F) test <= wdata;
      else if (rd && ridx == 6'h3F) test <= test + 32'd1;
    end
  end
endmodule
