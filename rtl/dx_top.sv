// dx_top: one side of the DX (Data Exchange) system of a read-out driver.
//
// The HPU (host processor) sends a stream of DX instructions; the DX system
// moves data between the HPU, up to NDPU DPUs (each a DSP with a DXD "EMIF"
// FPGA) and the read-out link, and copies a trace of its own activity back
// to the HPU. Structure (figure "Data Exchange (DX) Overview"):
//
//   HPU --> dxf_fpga (Instruction FIFO, front bus supervisor, Output FIFO,
//           back sequencer)
//   DX Front Bus (DXC[9:7] command, DXD[31:0] data, DXC[5:0] serial status):
//           shared by the DXF (master) and NDPU dxd_fpga subordinates
//   DX Internal Bus (WR, FIRST, LAST, D, tag) --> dxb_fpga (Input FIFO,
//           input sequencer, ROL FIFO, DX Trace FIFO, return stream)
//   Host FIFO write strobe and data are brought out (the FIFO chip is external).
//
// Front bus electrical model: every device drives through registered
// outputs with an enable; the bus value is the OR of the enabled drivers
// (two drivers at once is a fault each driver detects by readback), and
// with no driver the DXC/DXD keepers hold the previous value. dpu_config
// says which DXD FPGAs are configured; an unconfigured one never drives
// and its serial status line floats high, as a missing DPU would.
// Only side A of the two-sided system is instantiated (SIDE = 0); the
// second DXF FPGA and the DONE/ICOUNT hand-over between sides are not.
// Destination almost-full: the DXDs' destination AF flags and the DXF
// Output FIFO AF are combined here into one wire for the current
// instruction's destinations (the system carries the DXD flags in the
// serial status; a direct wire is this design's simplification).
// All logic runs on one clock, standing for DX_CLK, DXINT_CLK and DCLK.
module dx_top
  import dx_pkg::*;
#(
  parameter int unsigned NDPU  = 6,
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [NDPU-1:0] dpu_config,
  // HPU: DXF direct-access registers
  input  logic        dxf_wr,
  input  logic        dxf_rd,
  input  logic [3:0]  dxf_addr,
  input  logic [31:0] dxf_wdata,
  output logic [31:0] dxf_rdata,
  output logic        ififo_ready,
  // HPU: DXB direct-access registers
  input  logic        dxb_wr,
  input  logic        dxb_rd,
  input  logic [3:0]  dxb_addr,
  input  logic [31:0] dxb_wdata,
  output logic [31:0] dxb_rdata,
  output logic        ret_frame_ready,
  // Host FIFO (external chip)
  input  logic        hf_paf,
  output logic        hf_wen,
  output logic [31:0] hf_d,
  output logic        hf_mrs_n,
  output logic        hf_ld_n,
  // DSP side of each DPU
  input  logic [1:0]  dsp_srce_wr [NDPU],
  input  logic [15:0] dsp_srce_addr [NDPU],
  input  logic [31:0] dsp_srce_wdata [NDPU],
  input  logic [1:0]  dsp_dest_rd [NDPU],
  output logic [31:0] dsp_dest_rdata [NDPU][2],
  input  logic        dsp_reg_wr [NDPU],
  input  logic [3:0]  dsp_reg_addr [NDPU],
  input  logic [31:0] dsp_reg_wdata [NDPU],
  output logic [31:0] dsp_reg_rdata [NDPU],
  input  logic        dsp_awe_n [NDPU],
  input  logic        dsp_are_n [NDPU],
  input  logic        dsp_ep_req [NDPU],
  input  logic [7:0]  dsp_ep_n [NDPU],
  output logic        dsp_ardy [NDPU],
  output logic        dsp_eioclk [NDPU],
  output logic [3:0]  dsp_int [NDPU],
  output logic        dsp_tinp0 [NDPU],
  output logic        dpu_led [NDPU],
  output logic        dpu_sdcke [NDPU],
  // transition module (CTM)
  input  logic        tis_wr,
  input  logic [31:0] tis_data,
  input  logic        tmts_wr,
  input  logic [31:0] tmts_data,
  input  logic        tm_cmd_rd,
  output logic [31:0] tm_cmd_data,
  output logic        tm_cmd_empty,
  input  logic [31:0] tm_status,
  output logic [4:0]  tm_ctrl,
  // read-out link
  input  logic        rol_rd,
  output logic [31:0] rol_data,
  output logic        rol_ctrl_n,
  output logic        rol_empty,
  // observation of the front bus
  output dxc_cmd_e    bus_cmd,
  output logic [31:0] bus_dxd,
  output logic [NDPU-1:0] bus_ser,
  output logic [31:0] trace_frames,
  output logic        trace_inhibited
);
  // ---------------- DX Front Bus ----------------
  logic        f_drive;
  dxc_cmd_e    f_cmd;
  logic [31:0] f_dxd;
  logic [NDPU-1:0] p_drive, p_ser;
  dxc_cmd_e    p_cmd [NDPU];
  logic [31:0] p_dxd [NDPU];
  logic [1:0]  p_af [NDPU];
  logic [2:0]  keep_cmd;
  logic [31:0] keep_dxd;
  logic        dx_reset_n, ofifo_af, dest_af;
  logic [31:0] cur_iword;

  always_comb begin
    logic [2:0]  c;
    logic [31:0] d;
    logic        any;
    any = f_drive; c = f_drive ? 3'(f_cmd) : 3'd0; d = f_drive ? f_dxd : 32'd0;
    for (int i = 0; i < NDPU; i++) begin
      if (p_drive[i] && dpu_config[i]) begin
        any = 1'b1; c = c | 3'(p_cmd[i]); d = d | p_dxd[i];
      end
    end
    bus_cmd = any ? dxc_cmd_e'(c) : dxc_cmd_e'(keep_cmd);
    bus_dxd = any ? d : keep_dxd;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin keep_cmd <= 3'(DXC_NOP); keep_dxd <= '0; end
    else begin keep_cmd <= 3'(bus_cmd); keep_dxd <= bus_dxd; end
  end
  for (genvar i = 0; i < NDPU; i++) begin : g_ser
    assign bus_ser[i] = dpu_config[i] ? p_ser[i] : 1'b1;
  end

  // almost-full of the current instruction's destinations
  always_comb begin
    dest_af = ofifo_af;
    if (cur_iword[31:28] == OP_RUNSEQ || cur_iword[31:28] == OP_WRDATA)
      for (int i = 0; i < NDPU; i++)
        if (cur_iword[8+i] && dpu_config[i] && p_af[i][cur_iword[15]]) dest_af = 1'b1;
  end

  // ---------------- DXF FPGA ----------------
  logic        ib_wr, ib_first, ib_last, dxb_af;
  logic [31:0] ib_d;
  dx_tag_t     ib_tag;
  dxf_fpga #(.NDPU(NDPU), .SIDE(1'b0), .IDEPTH(DEPTH), .ODEPTH(2*DEPTH)) u_dxf (
    .clk, .rst_n, .hpu_wr(dxf_wr), .hpu_rd(dxf_rd), .hpu_addr(dxf_addr),
    .hpu_wdata(dxf_wdata), .hpu_rdata(dxf_rdata), .ififo_ready, .dx_reset_n,
    .bus_cmd, .bus_dxd, .ser_in(bus_ser), .drive(f_drive), .out_cmd(f_cmd), .out_dxd(f_dxd),
    .dest_af_in(dest_af), .ofifo_af, .cur_iword,
    .dxb_af, .hf_paf, .ib_wr, .ib_first, .ib_last, .ib_d, .ib_tag, .hf_wen, .hf_mrs_n, .hf_ld_n);
  assign hf_d = ib_d;

  // ---------------- DXD FPGAs ----------------
  for (genvar i = 0; i < NDPU; i++) begin : g_dpu
    dxd_fpga #(.NDPU(NDPU), .DEPTH(DEPTH)) u_dxd (
      .clk, .rst_n, .dx_reset_n, .bus_cmd, .bus_dxd, .drive(p_drive[i]), .out_cmd(p_cmd[i]),
      .out_dxd(p_dxd[i]), .ser_out(p_ser[i]), .dest_af_in(dest_af), .dest_af(p_af[i]),
      .srce_wr(dsp_srce_wr[i]), .srce_addr(dsp_srce_addr[i]), .srce_wdata(dsp_srce_wdata[i]),
      .dest_rd(dsp_dest_rd[i]), .dest_rdata(dsp_dest_rdata[i]),
      .reg_wr(dsp_reg_wr[i]), .reg_addr(dsp_reg_addr[i]), .reg_wdata(dsp_reg_wdata[i]),
      .reg_rdata(dsp_reg_rdata[i]), .awe_n(dsp_awe_n[i]), .are_n(dsp_are_n[i]),
      .ep_req(dsp_ep_req[i]), .ep_n(dsp_ep_n[i]), .ardy(dsp_ardy[i]), .eioclk(dsp_eioclk[i]),
      .dsp_int(dsp_int[i]), .tinp0(dsp_tinp0[i]), .led(dpu_led[i]), .sdcke(dpu_sdcke[i]));
  end

  // ---------------- DXB FPGA ----------------
  dxb_fpga #(.DEPTH(DEPTH)) u_dxb (
    .clk, .rst_n, .ib_wr, .ib_first, .ib_last, .ib_d, .ib_tag, .dxb_af,
    .hpu_wr(dxb_wr), .hpu_rd(dxb_rd), .hpu_addr(dxb_addr), .hpu_wdata(dxb_wdata),
    .hpu_rdata(dxb_rdata), .ret_frame_ready, .tis_wr, .tis_data, .tmts_wr, .tmts_data,
    .tm_cmd_rd, .tm_cmd_data, .tm_cmd_empty, .tm_status, .tm_ctrl,
    .rol_rd, .rol_data, .rol_ctrl_n, .rol_empty, .trace_frames, .trace_inhibited);
endmodule
