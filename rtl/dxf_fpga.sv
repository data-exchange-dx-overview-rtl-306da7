// dxf_fpga: DXF FPGA, master of one DX Front Bus (front bus supervisor).
//
// The HPU writes instruction words into the Instruction FIFO (256x32)
// through the direct-access register DXFR_InstructionFIFO. The supervisor
// takes one instruction at a time, once all Ni of its words are present:
//   - an instruction that targets this side (BA bit of SIDE set; DX_RunSequence,
//     DX_WriteData, DX_WriteReg, DX_ReadReg) goes out as write_inst_first,
//     write_inst for the remaining words, then nop and nop_last;
//   - any other instruction (back-executed ones, or another side's) is
//     marked by a single nop_end so subordinates can count it.
// While a DX_WriteData destination is almost full the DXF sends nop
// between parameter words (protocol table: "nop if a destination is almost
// full"). Then the bus belongs to the sources (DPUs) until the DXF's own
// dx_front_tracker reports the instruction finished. The DXF drives nop on
// an idle bus.
// Every instruction is copied into the Output FIFO (512 words, 32 data +
// 8 tag bits) for the back end: the instruction word (ttInstruction), its
// parameter words (ttParameter), DX_RunSequence/DX_ReadReg data and jam
// words (ttData) when the Output FIFO is a destination, and the tag L bit
// on the last word. A one-word holding register delays each word by one so
// L can be set once the end of the instruction is known. When a
// DX_RunSequence with F=0 is traced with data counting, the DXF counts the
// data words and writes only a count word (ttCount); with full data trace
// it writes the data with H cleared so it never reaches Host or ROL FIFOs.
// Back-executed instructions handled here: DX_SetHostFIFO (snoop mode,
// MRS_N, LD_N), DX_SetFirstSide, DX_SetBackDest (H bit), DX_SetTraceMode,
// DX_TraceNext. The serial status of each DPU line is checked by
// dx_serial_rx. Direct-access registers (hpu_addr = EA[5:2]): 1 Instruction
// FIFO (W), 0 Status, 2 SerialStatus, 3 DownList, 7 Control (bit 0 =
// DX_RESET_N), f Test.
// Status layout: [31:16] I i b r SSSS BBBBBBBB, [15:8] 00 B U IIII,
// [7:0] 00 00 I iii with iii = 6 (the DXF's hard-wired ID).
module dxf_fpga
  import dx_pkg::*;
#(
  parameter int unsigned NDPU  = 6,
  parameter bit          SIDE  = 1'b0,
  parameter int unsigned IDEPTH = 256,
  parameter int unsigned ODEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // HPU direct access
  input  logic        hpu_wr,
  input  logic        hpu_rd,
  input  logic [3:0]  hpu_addr,
  input  logic [31:0] hpu_wdata,
  output logic [31:0] hpu_rdata,
  output logic        ififo_ready,
  output logic        dx_reset_n,
  // DX Front Bus
  input  dxc_cmd_e    bus_cmd,
  input  logic [31:0] bus_dxd,
  input  logic [NDPU-1:0] ser_in,
  output logic        drive,
  output dxc_cmd_e    out_cmd,
  output logic [31:0] out_dxd,
  input  logic        dest_af_in,
  output logic        ofifo_af,
  output logic [31:0] cur_iword,
  // DX Internal Bus
  input  logic        dxb_af,
  input  logic        hf_paf,
  output logic        ib_wr,
  output logic        ib_first,
  output logic        ib_last,
  output logic [31:0] ib_d,
  output dx_tag_t     ib_tag,
  output logic        hf_wen,
  output logic        hf_mrs_n,
  output logic        hf_ld_n
);
  // ---------------- direct-access registers ----------------
  logic [31:0] test_reg, status;
  logic [31:0] downlist, serstat;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin dx_reset_n <= 1'b1; test_reg <= '0; end
    else begin
      if (hpu_wr && hpu_addr == 4'h7) dx_reset_n <= hpu_wdata[0];
      if (hpu_wr && hpu_addr == 4'hF) test_reg <= hpu_wdata;
      else if (hpu_rd && hpu_addr == 4'hF) test_reg <= test_reg + 32'd1;
    end
  end
  always_comb begin
    unique case (hpu_addr)
      4'h0: hpu_rdata = status;
      4'h2: hpu_rdata = serstat;
      4'h3: hpu_rdata = downlist;
      4'h7: hpu_rdata = {31'd0, dx_reset_n};
      4'hF: hpu_rdata = test_reg;
      default: hpu_rdata = '0;
    endcase
  end

  // ---------------- instruction FIFO ----------------
  logic [31:0] if_head;
  logic        if_empty, if_full, if_af, if_pop, if_ovf, if_unf;
  logic [$clog2(IDEPTH+1)-1:0] if_count;
  dx_fifo #(.WIDTH(32), .DEPTH(IDEPTH), .AF_LEVEL(IDEPTH - 16)) u_ififo (
    .clk, .rst_n, .wr(hpu_wr && hpu_addr == 4'h1), .wdata(hpu_wdata), .rd(if_pop),
    .rdata(if_head), .empty(if_empty), .full(if_full), .af(if_af), .count(if_count),
    .ovf(if_ovf), .unf(if_unf));
  assign ififo_ready = !if_af;   // room for at least one 16-word DMA frame

  // ---------------- tracker, registers, timebase ----------------
  logic [3:0]  q;
  logic [31:0] seq_word, jam_data, control, timeout_reg, led_unused, iword, icount, rdata;
  logic [7:0]  jam_count;
  logic        control_wr, timeout, tmo_run, us_tick, trk_idle, inst_wr, data_wr, jam_wr;
  logic        inst_done, silent_inst, in_src, nxt_turn, nxt_chan, nxt_first, proto_err;
  logic [8:0]  inst_idx;
  logic [2:0]  cur_dpu, nxt_dpu;
  logic        cur_chan;
  logic [NDPU-1:0] down0, down1;
  logic [15:0] ext_wr;
  logic [31:0] ext_rdata [16];
  logic        reg_we, reg_rd;
  logic [5:0]  reg_widx;
  logic [31:0] reg_wdata;

  dx_front_tracker #(.NDPU(NDPU)) u_trk (
    .clk, .rst_n, .cmd(bus_cmd), .dxd(bus_dxd), .q, .seq_word, .jam_count,
    .timeout, .tmo_run, .dest_af(dest_af_in), .icount_wr(ext_wr[7]), .icount_wdata(reg_wdata),
    .idle(trk_idle), .iword, .inst_wr, .inst_idx, .data_wr, .jam_wr, .inst_done, .silent_inst,
    .cur_dpu, .cur_chan, .in_src, .nxt_turn, .nxt_dpu, .nxt_chan, .nxt_first,
    .src_down0(down0), .src_down1(down1), .icount, .proto_err);

  dx_iregs u_regs (.clk, .rst_n, .we(reg_we), .widx(reg_widx), .wdata(reg_wdata),
    .rd(reg_rd), .ridx(reg_widx), .rdata, .q, .seq_word, .jam_data, .jam_count,
    .control, .timeout(timeout_reg), .led_ctrl(led_unused), .control_wr, .status_in(status),
    .icount_in(icount), .ext_rdata, .ext_wr);

  dx_timebase u_tb (.clk, .rst_n, .mdiv(control[7:0]), .ctrl_wr(control_wr),
    .tdiv(timeout_reg[31:16]), .tint(timeout_reg[15:0]), .run(tmo_run), .us_tick, .timeout);

  // ---------------- serial status receivers ----------------
  logic [NDPU-1:0] s_valid, s_f, s_b, s_err;
  logic [1:0]      s_af [NDPU];
  for (genvar i = 0; i < NDPU; i++) begin : g_ser
    dx_serial_rx u_rx (.clk, .rst_n, .sin(ser_in[i]), .valid(s_valid[i]), .f_fault(s_f[i]),
      .b_fault(s_b[i]), .af(s_af[i]), .err(s_err[i]));
  end
  assign serstat  = {16'd0, 1'b0, 7'({(s_b & s_valid) | s_err, 1'b0}), 1'b0, 7'({s_f & s_valid, 1'b0})};
  assign downlist = {2'b00, 6'(down1), 2'b00, 6'(down0), 16'd0};
  always_comb begin
    for (int i = 0; i < 16; i++) ext_rdata[i] = '0;
    ext_rdata[11] = downlist;
    ext_rdata[12] = serstat;
  end

  // ---------------- supervisor ----------------
  typedef enum logic [2:0] {F_IDLE, F_ISSUE, F_SILENT, F_TAIL0, F_TAIL1, F_WAIT, F_FIN1, F_FIN2} fstate_e;
  fstate_e fs;
  logic [8:0]  k, nwords;
  logic [31:0] w;           // instruction being issued
  logic [1:0]  settle;
  logic        snoop, first_side, bd_h, bd_l, tnext_v;
  logic [11:0] tmode, tnext, eff_mode;
  logic [31:0] dcount;
  // output FIFO write path with one-word hold
  logic        pend_v, ow;
  logic [39:0] pend, owdata;
  logic        nw_v, nw_flush_last;
  logic [31:0] nw_data;
  dx_tag_t     nw_tag;
  logic [39:0] of_head;
  logic        of_empty, of_full, of_pop, of_ovf, of_unf;
  logic [$clog2(ODEPTH+1)-1:0] of_count;
  logic [9:0]  inst_cnt;
  logic        is_front, targeted, counting, trace_data;
  logic [3:0]  op;

  assign op       = if_head[31:28];
  assign is_front = (op == OP_RUNSEQ || op == OP_WRDATA || op == OP_WRREG || op == OP_RDREG);
  assign targeted = is_front && if_head[22 + int'(SIDE)];
  assign cur_iword = w;
  // DX_WriteData parameter words wait (nop) while a destination is almost full
  logic iss_wait;
  assign iss_wait = fs == F_ISSUE && k != 9'd0 && w[31:28] == OP_WRDATA && dest_af_in;
  // F=0 DX_RunSequence under trace: count (mm=01) or copy (mm=10) of D,n field
  assign counting   = w[31:28] == OP_RUNSEQ && !w[14] && eff_mode[3:2] == 2'b01;
  assign trace_data = w[31:28] == OP_RUNSEQ && !w[14] && eff_mode[3:2] == 2'b10;

  // words to send to the Output FIFO this cycle (at most one new word)
  always_comb begin
    nw_v = 1'b0; nw_data = '0; nw_tag = '0; nw_flush_last = 1'b0;
    if_pop = 1'b0; reg_we = 1'b0; reg_rd = 1'b0; reg_widx = w[5:0]; reg_wdata = if_head;
    unique case (fs)
      F_ISSUE, F_SILENT: if (!iss_wait) begin
        if_pop = 1'b1;
        nw_v = 1'b1; nw_data = if_head;
        nw_tag.tt = (k == 9'd0) ? TT_INSTRUCTION : TT_PARAMETER;
        nw_tag.host = snoop || (k != 9'd0 && w[31:28] == OP_WRDATA && w[14] && bd_h);
        if (fs == F_ISSUE && k == 9'd1 && w[31:28] == OP_WRREG && w[14]) reg_we = 1'b1;
      end
      F_TAIL0: if (w[31:28] == OP_RDREG && w[14]) begin
        reg_rd = 1'b1;
        nw_v = 1'b1; nw_data = rdata; nw_tag.tt = TT_DATA; nw_tag.host = snoop || w[26];
      end
      F_WAIT: if ((data_wr || jam_wr) && !trk_idle) begin
        if (w[31:28] == OP_RDREG || w[14] || trace_data) begin
          nw_v = 1'b1; nw_data = jam_wr ? jam_data : bus_dxd; nw_tag.tt = TT_DATA;
          nw_tag.host = snoop || (w[31:28] == OP_RDREG ? w[26] : (w[14] && bd_h));
        end
      end
      F_FIN1: if (counting) begin
        nw_v = 1'b1; nw_data = dcount; nw_tag.tt = TT_COUNT; nw_tag.host = snoop;
      end
      default: ;
    endcase
    nw_flush_last = (fs == F_FIN2);
  end

  // one-word hold: when a new word arrives, the held one goes out with L=0;
  // at the end, the held word goes out with L=1.
  always_comb begin
    ow = 1'b0; owdata = pend;
    if (nw_v) ow = pend_v;
    else if (nw_flush_last && pend_v) begin ow = 1'b1; owdata = {1'b1, pend[38:0]}; end
  end

  dx_fifo #(.WIDTH(40), .DEPTH(ODEPTH), .AF_LEVEL(ODEPTH - 64)) u_ofifo (
    .clk, .rst_n, .wr(ow), .wdata(owdata), .rd(of_pop), .rdata(of_head),
    .empty(of_empty), .full(of_full), .af(ofifo_af), .count(of_count), .ovf(of_ovf), .unf(of_unf));

  dxf_back_seq u_back (.clk, .rst_n, .head(of_head), .empty(of_empty),
    .inst_avail(inst_cnt != 10'd0), .dxb_af, .hf_paf, .pop(of_pop), .wr(ib_wr),
    .first(ib_first), .last(ib_last), .d(ib_d), .tag(ib_tag), .hf_wen);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inst_cnt <= '0;
    else inst_cnt <= inst_cnt + 10'(ow && owdata[39]) - 10'(of_pop && of_head[39]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs <= F_IDLE; k <= '0; nwords <= '0; w <= '0; settle <= '0;
      drive <= 1'b1; out_cmd <= DXC_NOP; out_dxd <= '0;
      snoop <= 1'b0; first_side <= 1'b0; bd_h <= 1'b0; bd_l <= 1'b0;
      hf_mrs_n <= 1'b1; hf_ld_n <= 1'b1;
      tmode <= '0; tnext <= '0; tnext_v <= 1'b0; eff_mode <= '0; dcount <= '0;
      pend_v <= 1'b0; pend <= '0;
    end else begin
      // hold register
      if (nw_v) begin pend_v <= 1'b1; pend <= {nw_tag, nw_data}; end
      else if (nw_flush_last) pend_v <= 1'b0;
      if (fs == F_WAIT && data_wr) dcount <= dcount + 32'd1;

      unique case (fs)
        F_IDLE: begin
          drive <= 1'b1; out_cmd <= DXC_NOP; out_dxd <= '0;
          if (!if_empty && trk_idle && settle == 2'd0 && !ofifo_af &&
              32'(if_count) >= 32'(inst_len(if_head))) begin
            w <= if_head; nwords <= inst_len(if_head); k <= '0; dcount <= '0;
            fs <= targeted ? F_ISSUE : F_SILENT;
            // back-executed instructions handled at the DXF
            if (op == OP_MISC) begin
              unique case (if_head[27:24])
                MI_SETHOSTFIFO: begin snoop <= if_head[2]; hf_mrs_n <= if_head[1]; hf_ld_n <= if_head[0]; end
                MI_SETFIRST:    first_side <= if_head[0];
                MI_SETBACKDEST: begin bd_h <= if_head[1]; bd_l <= if_head[0]; end
                MI_SETTRACE:    tmode <= if_head[11:0];
                MI_TRACENEXT:   begin tnext <= if_head[11:0]; tnext_v <= 1'b1; end
                default: ;
              endcase
            end
            if (!(op == OP_MISC && if_head[27:24] == MI_TRACENEXT)) begin
              eff_mode <= tnext_v ? tnext : tmode;
              tnext_v  <= 1'b0;
            end
          end
          if (settle != 2'd0) settle <= settle - 2'd1;
        end
        F_ISSUE: if (iss_wait) begin
          drive <= 1'b1; out_cmd <= DXC_NOP; out_dxd <= '0;
        end else begin
          drive <= 1'b1; out_dxd <= if_head;
          out_cmd <= (k == 9'd0) ? DXC_WR_INST_FIRST : DXC_WR_INST;
          k <= k + 9'd1;
          if (k + 9'd1 == nwords) fs <= F_TAIL0;
        end
        F_SILENT: begin
          drive <= 1'b1; out_dxd <= '0;
          out_cmd <= (k == 9'd0) ? DXC_NOP_END : DXC_NOP;
          k <= k + 9'd1;
          if (k + 9'd1 == nwords) begin fs <= F_FIN1; end
        end
        F_TAIL0: begin drive <= 1'b1; out_cmd <= DXC_NOP;      out_dxd <= '0; fs <= F_TAIL1; end
        F_TAIL1: begin drive <= 1'b1; out_cmd <= DXC_NOP_LAST; out_dxd <= '0; fs <= F_WAIT; settle <= 2'd3; end
        F_WAIT: begin
          // the bus belongs to the sources; keepers hold the last value
          drive <= 1'b0;
          if (settle != 2'd0) settle <= settle - 2'd1;
          else if (trk_idle) fs <= F_FIN1;
        end
        F_FIN1: begin drive <= 1'b1; out_cmd <= DXC_NOP; out_dxd <= '0; fs <= F_FIN2; end
        F_FIN2: begin fs <= F_IDLE; settle <= 2'd1; end
        default: fs <= F_IDLE;
      endcase
    end
  end

  assign status = {~if_af, if_empty, of_empty, 1'b0, 4'(proto_err), 8'(of_ovf | if_ovf),
                   2'b00, 1'b0, 1'b0, 4'd0,
                   4'd0, 1'(SIDE), 3'd6};
endmodule
