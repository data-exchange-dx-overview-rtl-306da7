// dxb_fpga: DXB FPGA, back end of the DX system.
//
// Receives the DX Internal Bus (WR, FIRST, LAST, data and the 8-bit tag)
// into the Input FIFO (256 x (32+8)) and raises dxb_af to stall the DXF
// back ends when it is almost full. dxb_input_seq then follows the
// instruction stream and writes
//   - the ROL FIFO (256 x (32+1)): data for the read-out link with the K
//     control bit; it is read by the link (rol_rd), ctrl is presented
//     active-low as UCTRL_N;
//   - the DX Trace Stream, framed by dxb_trace_framer into the DX Trace
//     FIFO (256x32).
// The TM Return FIFO, shown as one 256x32 FIFO holding TIS and TMTS, is
// modelled as two 128-word FIFOs (this design's choice) written by the
// transition module side. The HPU writes the TM Command FIFO (256x32) and
// reads the DX Return Stream, merged in 16-word frames by dxb_return_arb.
// Direct-access registers (hpu_addr = EA[5:2]): 0 Status (R), 1 TM_Status
// (R), 7 Control (R/W), 8 TM_CommandFIFO (W) / DX_ReturnFIFO (R), f Test.
// Control bits 19:16, 15:12 and 11:8 are the priority reload values of
// TMTS, DX trace and TIS frames and 7:0 the DXINT_CLK rate in MHz (this
// design reads the document's shifted table that way); bits 31:27 go to
// the transition module unchanged.
// Status: 28 FAULT_INFIFO_OVF, 27 FAULT_ROFIFO_OVF, 26 FAULT_TCFIFO_OVF,
// 25 FAULT_TIFIFO_OVF, 24 FAULT_TMFIFO_OVF, 21 FAULT_TIFIFO_UNF,
// 20 FAULT_TMFIFO_UNF, 18 FAULT_INFIFO_FIRST_LAST, 17 FAULT_INFIFO_INST.
// All FIFOs use the one DXINT_CLK here.
module dxb_fpga
  import dx_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // DX Internal Bus
  input  logic        ib_wr,
  input  logic        ib_first,
  input  logic        ib_last,
  input  logic [31:0] ib_d,
  input  dx_tag_t     ib_tag,
  output logic        dxb_af,
  // HPU
  input  logic        hpu_wr,
  input  logic        hpu_rd,
  input  logic [3:0]  hpu_addr,
  input  logic [31:0] hpu_wdata,
  output logic [31:0] hpu_rdata,
  output logic        ret_frame_ready,
  // transition module (CTM) side
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
  // observability
  output logic [31:0] trace_frames,
  output logic        trace_inhibited
);
  localparam int unsigned CW = $clog2(DEPTH+1);
  logic [31:0] control, test_reg, status;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin control <= {12'd0, 4'd15, 4'd15, 4'd1, 8'd50}; test_reg <= '0; end
    else begin
      if (hpu_wr && hpu_addr == 4'h7) control <= hpu_wdata;
      if (hpu_wr && hpu_addr == 4'hF) test_reg <= hpu_wdata;
      else if (hpu_rd && hpu_addr == 4'hF) test_reg <= test_reg + 32'd1;
    end
  end
  assign tm_ctrl = control[31:27];

  // input FIFO
  logic [39:0] in_head;
  logic in_empty, in_full, in_pop, in_ovf, in_unf;
  logic [CW-1:0] in_count;
  logic first_err;
  dx_fifo #(.WIDTH(40), .DEPTH(DEPTH), .AF_LEVEL(DEPTH - 32)) u_in (.clk, .rst_n,
    .wr(ib_wr), .wdata({ib_tag, ib_d}), .rd(in_pop), .rdata(in_head), .empty(in_empty),
    .full(in_full), .af(dxb_af), .count(in_count), .ovf(in_ovf), .unf(in_unf));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_err <= 1'b0;
    else if (ib_wr && (ib_first != (ib_tag.tt == TT_INSTRUCTION) || ib_last != ib_tag.last)) first_err <= 1'b1;
  end

  // input sequencer
  logic        rol_full, rol_wr, tr_ready, tr_wr, tr_first, tr_end, resume, release_fr;
  logic [32:0] rol_wdata, rol_head;
  logic [31:0] tr_data, dxb_timeout, tm_status_unused;
  logic [1:0]  seq_fault;
  dxb_input_seq u_seq (.clk, .rst_n, .head(in_head), .empty(in_empty), .pop(in_pop),
    .rol_full, .rol_wr, .rol_wdata, .tr_ready, .tr_wr, .tr_first, .tr_end, .tr_data,
    .timeout_reg(dxb_timeout), .resume_trace(resume), .release_frame(release_fr),
    .status_in(status), .tm_status, .fault(seq_fault));
  assign tm_status_unused = tm_status;

  // ROL FIFO
  logic rol_af, rol_ovf, rol_unf;
  logic [CW-1:0] rol_count;
  dx_fifo #(.WIDTH(33), .DEPTH(DEPTH)) u_rol (.clk, .rst_n, .wr(rol_wr), .wdata(rol_wdata),
    .rd(rol_rd), .rdata(rol_head), .empty(rol_empty), .full(rol_full), .af(rol_af),
    .count(rol_count), .ovf(rol_ovf), .unf(rol_unf));
  assign rol_data   = rol_head[31:0];
  assign rol_ctrl_n = !rol_head[32];

  // trace framing and DX Trace FIFO
  logic us_tick, tmo_unused, tr_push, tr_full, tr_empty, tr_af, tr_ovf, tr_unf;
  logic [31:0] tr_push_data, tr_head, pad_frames;
  logic [CW-1:0] tr_count;
  dx_timebase u_us (.clk, .rst_n, .mdiv(control[7:0]), .ctrl_wr(hpu_wr && hpu_addr == 4'h7),
    .tdiv(16'd0), .tint(16'd0), .run(1'b0), .us_tick, .timeout(tmo_unused));
  dxb_trace_framer #(.TDEPTH(DEPTH)) u_fr (.clk, .rst_n, .wr(tr_wr), .wfirst(tr_first),
    .iend(tr_end), .wdata(tr_data), .ready(tr_ready), .us_tick,
    .frame_tmo(dxb_timeout[15:0]), .fifo_tmo(dxb_timeout[31:16]), .release_req(release_fr),
    .resume, .tfifo_count(tr_count), .tfifo_full(tr_full), .push(tr_push),
    .push_data(tr_push_data), .inhibited(trace_inhibited), .frames_out(trace_frames),
    .pad_frames);

  // return stream FIFOs: 0 TIS, 1 TMTS, 2 DXTS
  logic [2:0]  r_pop, r_avail, r_empty, r_ovf, r_unf;
  logic [31:0] r_head [3];
  logic [31:0] r_frames [3];
  logic [3:0]  r_load [3];
  logic [$clog2(DEPTH/2+1)-1:0] ti_count, tm_count;
  logic        ti_full, tm_full, ti_af, tm_af, ret_valid;
  logic [31:0] ret_data;
  dx_fifo #(.WIDTH(32), .DEPTH(DEPTH/2)) u_tis (.clk, .rst_n, .wr(tis_wr), .wdata(tis_data),
    .rd(r_pop[0]), .rdata(r_head[0]), .empty(r_empty[0]), .full(ti_full), .af(ti_af),
    .count(ti_count), .ovf(r_ovf[0]), .unf(r_unf[0]));
  dx_fifo #(.WIDTH(32), .DEPTH(DEPTH/2)) u_tmts (.clk, .rst_n, .wr(tmts_wr), .wdata(tmts_data),
    .rd(r_pop[1]), .rdata(r_head[1]), .empty(r_empty[1]), .full(tm_full), .af(tm_af),
    .count(tm_count), .ovf(r_ovf[1]), .unf(r_unf[1]));
  dx_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_trf (.clk, .rst_n, .wr(tr_push), .wdata(tr_push_data),
    .rd(r_pop[2]), .rdata(r_head[2]), .empty(r_empty[2]), .full(tr_full), .af(tr_af),
    .count(tr_count), .ovf(r_ovf[2]), .unf(r_unf[2]));
  assign r_avail = {tr_count >= CW'(15), tm_count >= 8'(15), ti_count >= 8'(15)};
  assign r_load[0] = control[11:8];
  assign r_load[1] = control[19:16];
  assign r_load[2] = control[15:12];
  dxb_return_arb u_arb (.clk, .rst_n, .load(r_load), .frame_avail(r_avail), .head(r_head),
    .pop(r_pop), .rd(hpu_rd && hpu_addr == 4'h8), .valid(ret_valid), .rdata(ret_data),
    .frame_ready(ret_frame_ready), .frames(r_frames));

  // TM command FIFO
  logic tc_full, tc_af, tc_ovf, tc_unf;
  logic [CW-1:0] tc_count;
  dx_fifo #(.WIDTH(32), .DEPTH(DEPTH)) u_tc (.clk, .rst_n, .wr(hpu_wr && hpu_addr == 4'h8),
    .wdata(hpu_wdata), .rd(tm_cmd_rd), .rdata(tm_cmd_data), .empty(tm_cmd_empty),
    .full(tc_full), .af(tc_af), .count(tc_count), .ovf(tc_ovf), .unf(tc_unf));

  // sticky status
  logic [8:0] st_bits;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_bits <= '0;
    else st_bits <= st_bits | {in_ovf, rol_ovf, tc_ovf, r_ovf[0], r_ovf[1], r_unf[0], r_unf[1],
                               first_err | seq_fault[1], seq_fault[0]};
  end
  assign status = {3'b000, st_bits[8:4], 2'b00, st_bits[3:2], 1'b0, st_bits[1:0], 1'b0, 16'd0};

  always_comb begin
    unique case (hpu_addr)
      4'h0: hpu_rdata = status;
      4'h1: hpu_rdata = tm_status;
      4'h7: hpu_rdata = control;
      4'h8: hpu_rdata = ret_valid ? ret_data : 32'd0;
      4'hF: hpu_rdata = test_reg;
      default: hpu_rdata = '0;
    endcase
  end
endmodule
