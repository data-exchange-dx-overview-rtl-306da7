// dx_pkg: types and constants shared by the DX (Data Exchange) modules.
//
// The DX Front Bus command codes on DXC[9:7], the instruction word layout
// (opcode and field positions), the Output FIFO tag layout (Lrrr FHTT), the
// tag types and the trace special instruction words are all taken from the
// DX instruction summary and bus tables. The register index split into
// {R[1:0], r[3:0]} follows the instruction-access register tables.
// Field positions are numbered from bit 31 (leftmost printed digit) down to 0.
package dx_pkg;

  // DX Front Bus command on DXC[9:7]
  typedef enum logic [2:0] {
    DXC_NOP_LAST       = 3'b000,
    DXC_WR_INST_FIRST  = 3'b001,
    DXC_WR_INST        = 3'b010,
    DXC_WRITE          = 3'b011,
    DXC_NOP_END        = 3'b100,
    DXC_WRITE_END      = 3'b101,
    DXC_WRITE_LAST     = 3'b110,
    DXC_NOP            = 3'b111
  } dxc_cmd_e;

  // Major opcode, instruction word bits [31:28]
  localparam logic [3:0] OP_MISC     = 4'b0000;
  localparam logic [3:0] OP_RUNSEQ   = 4'b0010;
  localparam logic [3:0] OP_WRDATA   = 4'b0100;
  localparam logic [3:0] OP_WRREG    = 4'b0110;
  localparam logic [3:0] OP_RDREG    = 4'b1000;
  localparam logic [3:0] OP_RDREGDXB = 4'b1010;
  localparam logic [3:0] OP_SPECIAL  = 4'b1110;

  // Minor opcode of OP_MISC instructions, bits [27:24]
  localparam logic [3:0] MI_NOP         = 4'h0;
  localparam logic [3:0] MI_SETHOSTFIFO = 4'h1;
  localparam logic [3:0] MI_SETFIRST    = 4'h2;
  localparam logic [3:0] MI_WRREGDXB    = 4'h3;
  localparam logic [3:0] MI_SETBACKDEST = 4'h4;
  localparam logic [3:0] MI_SETTRACE    = 4'h5;
  localparam logic [3:0] MI_TRACENEXT   = 4'h6;

  // Special words placed in the DX Trace Stream
  localparam logic [31:0] DX_PAD           = 32'hE000_0000;
  localparam logic [31:0] DX_TRACE_TIMEOUT = 32'hE100_0000;
  localparam logic [31:0] DX_FAULT         = 32'hEF00_0000;

  // Output FIFO tag types
  typedef enum logic [1:0] {
    TT_INSTRUCTION = 2'd0,
    TT_PARAMETER   = 2'd1,
    TT_COUNT       = 2'd2,
    TT_DATA        = 2'd3
  } tag_type_e;

  // Output FIFO / Input FIFO tag: Lrrr FHTT
  typedef struct packed {
    logic       last;   // last word associated with an instruction
    logic [2:0] rsvd;
    logic       fixed;  // instruction of a fixed-length DX_RunSequence
    logic       host;   // word goes to the Host FIFO
    tag_type_e  tt;
  } dx_tag_t;

  // Return stream frame types
  localparam logic [31:0] RT_TIS  = 32'd0;
  localparam logic [31:0] RT_TMTS = 32'd1;
  localparam logic [31:0] RT_DXTS = 32'd2;

  // Instruction-access register indices {R, r}
  localparam logic [5:0] RI_CONTROL   = 6'h30;
  localparam logic [5:0] RI_TIMEOUT   = 6'h31;
  localparam logic [5:0] RI_STATUS    = 6'h33;
  localparam logic [5:0] RI_ICOUNT    = 6'h37;
  localparam logic [5:0] RI_SRCCOUNT  = 6'h39;
  localparam logic [5:0] RI_DSTCOUNT  = 6'h3A;
  localparam logic [5:0] RI_DOWNLIST  = 6'h3B;  // DXF; LED control in a DXD
  localparam logic [5:0] RI_SERSTAT   = 6'h3C;  // DXF
  localparam logic [5:0] RI_TEST      = 6'h3F;

  function automatic logic is_write(dxc_cmd_e c);
    return c == DXC_WRITE || c == DXC_WRITE_END || c == DXC_WRITE_LAST;
  endfunction

  function automatic logic is_last(dxc_cmd_e c);
    return c == DXC_NOP_LAST || c == DXC_WRITE_LAST;
  endfunction

  // Number of words of an instruction (Ni)
  function automatic logic [8:0] inst_len(logic [31:0] w);
    case (w[31:28])
      OP_WRDATA: return 9'd1 + 9'(w[7:0]);
      OP_WRREG:  return 9'd2;
      OP_MISC:   return (w[27:24] == MI_WRREGDXB) ? 9'd2 : 9'd1;
      default:   return 9'd1;
    endcase
  endfunction

  // Rounding of a parcel size: (value + mask) & ~mask
  function automatic logic [31:0] round_up(logic [31:0] v, logic [31:0] mask);
    return (v + mask) & ~mask;
  endfunction

endpackage
