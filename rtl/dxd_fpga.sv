// dxd_fpga: DXD (DPU EMIF) FPGA, one per DPU, a subordinate on the DX Front Bus.
//
// It joins the DSP's EMIF to the DX Front Bus. The DSP fills two source
// FIFOs with blocks (see dxd_srce_fifo) and empties two destination FIFOs in
// DMA frames (dxd_dest_fifo). On the bus side a dx_front_tracker follows
// every instruction; from it this FPGA
//   - writes its instruction-access registers on DX_WriteReg when its bit of
//     the d field is set,
//   - sources one word (the register) per DX_ReadReg that names it in s,
//   - sources one block per source turn of a DX_RunSequence (nibble Sddd
//     with ddd = its ID, S = which source FIFO) through dxd_src_seq,
//   - writes DX_RunSequence data, DX_WriteData parameter words and jam
//     words to destination FIFO D when its bit of the d field is set.
// Bus outputs (drive, out_cmd, out_dxd) are registered; the bus inputs are
// not (the document: all I/O except DPU input is registered). The driver
// stays off until dx_unlock has seen the startup sequence and the E bit of
// DXFI_Control is set, and for good once a readback mismatch (value on the
// bus differs from the value driven) is seen: a DXD that detects this goes
// down. Its serial status (01FBdd) goes out on ser_out.
// The DPU's ID comes from the DXD_ID_Strap direct-access register, reset
// to 7 so an unconfigured DPU does not react. The DSP side is a simple
// word interface (srce_wr/dest_rd/reg_wr/reg_rd) standing in for the EMIF
// address decoding, which the document does not give.
// Direct-access registers (reg_addr = EA[7:4]): 0 LED_Level, 1 SDCKE,
// 3 TINP0_Period, 6 DSP_Control (F frame size, L loopback), 7 EP_IDLE_T,
// 8 LED_Pulse, 9 ID_Strap; reads: 1 Status, 6 DSP_Control, 9 ID_Strap.
// Loopback (L bits) is stored but not acted on.
// Status register layout (assumption where the printed layout is damaged):
// [31:16] DXD-specific status rFVP rSrs DDDD dddd, [15:8] subordinate
// status 00 B U IIII, [7:0] S S D D I iii.
module dxd_fpga
  import dx_pkg::*;
#(
  parameter int unsigned NDPU  = 6,
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dx_reset_n,
  // DX Front Bus
  input  dxc_cmd_e    bus_cmd,
  input  logic [31:0] bus_dxd,
  output logic        drive,
  output dxc_cmd_e    out_cmd,
  output logic [31:0] out_dxd,
  output logic        ser_out,
  input  logic        dest_af_in,
  output logic [1:0]  dest_af,
  // DSP side
  input  logic [1:0]  srce_wr,
  input  logic [15:0] srce_addr,
  input  logic [31:0] srce_wdata,
  input  logic [1:0]  dest_rd,
  output logic [31:0] dest_rdata [2],
  input  logic        reg_wr,
  input  logic [3:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic        awe_n,
  input  logic        are_n,
  input  logic        ep_req,
  input  logic [7:0]  ep_n,
  output logic        ardy,
  output logic        eioclk,
  output logic [3:0]  dsp_int,
  output logic        tinp0,
  output logic        led,
  output logic        sdcke
);
  // ---------------- direct-access registers ----------------
  logic [3:0]  id_strap;
  logic [31:0] dsp_control;
  logic [7:0]  ep_idle_t;
  logic        led_level, led_pulse;
  logic [16:0] tinp0_period;
  logic [31:0] status;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_strap <= 4'h7; dsp_control <= 32'd16; ep_idle_t <= 8'd50;
      led_level <= 1'b0; led_pulse <= 1'b0; sdcke <= 1'b0;
    end else begin
      led_pulse <= reg_wr && reg_addr == 4'h8;
      if (reg_wr) unique case (reg_addr)
        4'h0: led_level <= reg_wdata[0];
        4'h1: sdcke <= reg_wdata[0];
        4'h6: dsp_control <= reg_wdata & 32'h0000_037F;
        4'h7: ep_idle_t <= reg_wdata[7:0];
        4'h9: id_strap <= reg_wdata[3:0];
        default: ;
      endcase
    end
  end
  always_comb begin
    unique case (reg_addr)
      4'h1: reg_rdata = status;
      4'h3: reg_rdata = {15'd0, tinp0_period};
      4'h6: reg_rdata = dsp_control;
      4'h7: reg_rdata = {24'd0, ep_idle_t};
      4'h9: reg_rdata = {28'd0, id_strap};
      default: reg_rdata = '0;
    endcase
  end
  logic [2:0] id;
  logic       id_ok;
  assign id    = id_strap[2:0];
  assign id_ok = int'(id) < NDPU;

  // ---------------- front bus tracking ----------------
  logic [3:0]  q;
  logic [31:0] seq_word, jam_data, control, timeout_reg, led_ctrl, iword, icount, rdata;
  logic [7:0]  jam_count;
  logic        control_wr, timeout, tmo_run, us_tick, idle, inst_wr, data_wr, jam_wr;
  logic        inst_done, silent_inst, in_src, nxt_turn, nxt_chan, nxt_first, proto_err;
  logic [8:0]  inst_idx;
  logic [2:0]  cur_dpu, nxt_dpu;
  logic        cur_chan;
  logic [NDPU-1:0] down0, down1;
  logic [15:0] ext_wr;
  logic [31:0] ext_rdata [16];
  logic        unlocked, unlock_fault, drv_en, bus_fault;

  dx_unlock u_unlock (.clk, .rst_n, .dx_reset_n, .cmd(bus_cmd),
    .enable_drivers(control[31]), .unlocked, .fault(unlock_fault), .drv_en);

  dx_front_tracker #(.NDPU(NDPU)) u_trk (
    .clk, .rst_n, .cmd(bus_cmd), .dxd(bus_dxd), .q, .seq_word, .jam_count,
    .timeout, .tmo_run, .dest_af(dest_af_in), .icount_wr(ext_wr[7]), .icount_wdata(bus_dxd),
    .idle, .iword, .inst_wr, .inst_idx, .data_wr, .jam_wr, .inst_done, .silent_inst,
    .cur_dpu, .cur_chan, .in_src, .nxt_turn, .nxt_dpu, .nxt_chan, .nxt_first,
    .src_down0(down0), .src_down1(down1), .icount, .proto_err);

  logic        op_wrreg, op_rdreg, op_runseq, op_wrdata, my_d, reg_we, reg_rd;
  assign op_wrreg  = iword[31:28] == OP_WRREG;
  assign op_rdreg  = iword[31:28] == OP_RDREG;
  assign op_runseq = iword[31:28] == OP_RUNSEQ;
  assign op_wrdata = iword[31:28] == OP_WRDATA;
  assign my_d      = id_ok && iword[8 + id];
  assign reg_we    = inst_wr && inst_idx == 9'd1 && op_wrreg && my_d;

  dx_iregs u_regs (.clk, .rst_n, .we(reg_we), .widx(iword[5:0]), .wdata(bus_dxd),
    .rd(reg_rd), .ridx(iword[5:0]), .rdata, .q, .seq_word, .jam_data, .jam_count,
    .control, .timeout(timeout_reg), .led_ctrl, .control_wr, .status_in(status),
    .icount_in(icount), .ext_rdata, .ext_wr);

  dx_timebase u_tb (.clk, .rst_n, .mdiv(control[7:0]), .ctrl_wr(control_wr),
    .tdiv(timeout_reg[31:16]), .tint(timeout_reg[15:0]), .run(tmo_run), .us_tick, .timeout);

  // ---------------- sources ----------------
  logic [1:0]  s_pop, s_done, s_avail, s_empty, s_full, s_hf, s_lhf, s_ae, s_inc, s_ovf;
  logic [8:0]  s_len [2];
  logic [31:0] s_head [2];
  logic [1:0]  q_drive;
  dxc_cmd_e    q_cmd [2];
  logic [31:0] q_data [2];
  logic [31:0] q_sent [2];
  logic [1:0]  turn_n;
  logic [31:0] src_count, dst_count;

  for (genvar c = 0; c < 2; c++) begin : g_src
    assign turn_n[c] = nxt_turn && id_ok && nxt_dpu == id && nxt_chan == 1'(c) && drv_en && !bus_fault;
    dxd_srce_fifo #(.DEPTH(DEPTH)) u_sf (.clk, .rst_n, .wr(srce_wr[c]), .addr(srce_addr),
      .data(srce_wdata), .pop(s_pop[c]), .blk_done(s_done[c]), .head_data(s_head[c]),
      .blk_avail(s_avail[c]), .blk_len(s_len[c]), .empty(s_empty[c]), .full(s_full[c]),
      .hf(s_hf[c]), .lhf(s_lhf[c]), .ae(s_ae[c]), .incmplt(s_inc[c]), .ovf(s_ovf[c]));
    dxd_src_seq u_ss (.clk, .rst_n, .turn_next(turn_n[c]), .first_next(nxt_first),
      .reg_mode(op_rdreg), .reg_value(rdata), .blk_avail(s_avail[c]), .blk_len(s_len[c]),
      .head_data(s_head[c]), .dest_af(dest_af_in), .pop(s_pop[c]), .blk_done(s_done[c]),
      .drive(q_drive[c]), .cmd(q_cmd[c]), .data(q_data[c]), .words_sent(q_sent[c]));
  end
  assign reg_rd  = op_rdreg && q_drive[0] && is_write(q_cmd[0]);   // one read per word sent
  assign drive   = |q_drive;
  assign out_cmd = q_drive[1] ? q_cmd[1] : q_cmd[0];
  assign out_dxd = q_drive[1] ? q_data[1] : q_data[0];

  // readback check: what is on the bus must be what this DXD drives
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_fault <= 1'b0;
    else if (drive && (bus_cmd != out_cmd || (is_write(out_cmd) && bus_dxd != out_dxd))) bus_fault <= 1'b1;
  end

  // ---------------- destinations ----------------
  logic        d_wr_any;
  logic [31:0] d_wdata;
  logic [1:0]  d_dreq, d_empty;
  logic [3:0]  d_fault [2];
  logic [31:0] d_words [2];
  assign d_wr_any = my_d && ((op_runseq && (data_wr || jam_wr)) ||
                             (op_wrdata && inst_wr && inst_idx != 9'd0));
  assign d_wdata  = jam_wr ? jam_data : bus_dxd;
  for (genvar c = 0; c < 2; c++) begin : g_dst
    dxd_dest_fifo #(.DEPTH(DEPTH)) u_df (.clk, .rst_n,
      .wr(d_wr_any && iword[15] == 1'(c)), .wdata(d_wdata), .rd(dest_rd[c]),
      .rdata(dest_rdata[c]), .frame_size(dsp_control[6:0]), .dreq(d_dreq[c]),
      .empty(d_empty[c]), .af(dest_af[c]), .fault(d_fault[c]), .words_written(d_words[c]));
  end

  // ---------------- counters, status, register views ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin src_count <= '0; dst_count <= '0; end
    else begin
      if (ext_wr[9]) src_count <= bus_dxd;
      else if (drive && is_write(out_cmd)) src_count <= src_count + 32'd1;
      if (ext_wr[10]) dst_count <= bus_dxd;
      else if (d_wr_any) dst_count <= dst_count + 32'd1;
    end
  end
  assign status = {1'b0, 1'b0, 1'b0, proto_err, 1'b0, s_ovf[1], 1'b0, s_ovf[0], d_fault[1], d_fault[0],
                   2'b00, bus_fault, unlock_fault, 4'd0,
                   s_empty[1], s_empty[0], d_empty[1], d_empty[0], id_strap};
  always_comb begin
    for (int i = 0; i < 16; i++) ext_rdata[i] = '0;
    ext_rdata[9]  = src_count;
    ext_rdata[10] = dst_count;
  end

  // ---------------- serial status, interrupts, LED, TINP0, EIOCLK ----------------
  logic any_fault, ep_pending, ep_done;
  logic force_hi, force_dx, use_epclk;
  logic [1:0] needs_srce;
  assign any_fault = |d_fault[0] || |d_fault[1] || |s_ovf || unlock_fault;
  dx_serial_tx u_ser (.clk, .rst_n, .sreset(!dx_reset_n), .f_fault(any_fault),
    .b_fault(bus_fault || unlock_fault), .af(dest_af), .sout(ser_out));

  assign needs_srce[0] = in_src && id_ok && cur_dpu == id && !cur_chan && !s_avail[0] && op_runseq;
  assign needs_srce[1] = in_src && id_ok && cur_dpu == id &&  cur_chan && !s_avail[1] && op_runseq;
  dxd_int_prio u_int (.clk, .rst_n, .srce_en(control[29]), .dest_en(control[30]),
    .ep_pending, .dx_needs_srce(needs_srce), .dx_needs_dest(dest_af),
    .srce_incmplt(s_inc), .dest_pres(d_dreq), .srce_lhf(s_lhf), .srce_full(s_full),
    .dest_empty(d_empty), .req(dsp_int));

  dxd_led u_led (.clk, .rst_n, .enables(led_ctrl[7:0]), .min_ms(led_ctrl[23:16]), .us_tick,
    .events({led_level, led_pulse, |srce_wr, |dest_rd, any_fault || bus_fault,
             d_wr_any, drive && op_rdreg, 1'b1}), .led);

  dxd_tinp0 u_tinp0 (.clk, .rst_n, .period_wr(reg_wr && reg_addr == 4'h3),
    .period_wdata(reg_wdata), .us_tick, .period(tinp0_period), .tinp0);

  dxd_eioclk u_eio (.dx_clk(clk), .rst_n, .awe_n, .are_n, .ep_req, .ep_n, .idle_t(ep_idle_t),
    .ardy, .use_epclk, .force_hi, .force_dx, .ep_pending, .ep_done, .eioclk);
endmodule
