// tb_dx_env.svh: test environment for dx_top, included inside a testbench
// module that declares `int checks, failures;` and includes tb_check.svh.
//
// It instantiates dx_top with its default size (6 DPUs, 256-word FIFOs)
// and provides
//   - HPU tasks: write instruction words into the DXF Instruction FIFO,
//     DXF/DXB direct-access register writes, and instruction builders;
//   - one DSP model per DPU: writes source blocks (user words then
//     Discard 2), and serves destination-FIFO DMA interrupts by reading a
//     word whenever its "destination present" request is up (frame size 1);
//     a DPU's reading can be paused (dsp_hold) to fill its FIFO;
//   - a read-out link model that empties the ROL FIFO unless rol_hold;
//   - an HPU DMA model that reads the DX Return Stream in 16-word frames
//     unless ret_hold, sorting words into TIS and DX Trace queues;
//   - a Host FIFO model that collects Host FIFO writes; hf_paf is driven
//     by the testbench;
//   - a transition-module model that can push TIS frames.
// wait_quiet() waits until the instruction stream has fully drained.
`timescale 1ns/1ps
import dx_pkg::*;
localparam int NDPU = 6;
logic clk = 0, rst_n = 0;
logic [NDPU-1:0] dpu_config = '1;
logic dxf_wr = 0, dxf_rd = 0, dxb_wr = 0, dxb_rd = 0;
logic [3:0] dxf_addr = 0, dxb_addr = 0;
logic [31:0] dxf_wdata = 0, dxf_rdata, dxb_wdata = 0, dxb_rdata;
logic ififo_ready, ret_frame_ready;
logic hf_paf = 0, hf_wen, hf_mrs_n, hf_ld_n;
logic [31:0] hf_d;
logic [1:0]  dsp_srce_wr [NDPU];
logic [15:0] dsp_srce_addr [NDPU];
logic [31:0] dsp_srce_wdata [NDPU];
logic [1:0]  dsp_dest_rd [NDPU];
logic [31:0] dsp_dest_rdata [NDPU][2];
logic        dsp_reg_wr [NDPU];
logic [3:0]  dsp_reg_addr [NDPU];
logic [31:0] dsp_reg_wdata [NDPU];
logic [31:0] dsp_reg_rdata [NDPU];
logic        dsp_awe_n [NDPU];
logic        dsp_are_n [NDPU];
logic        dsp_ep_req [NDPU];
logic [7:0]  dsp_ep_n [NDPU];
logic        dsp_ardy [NDPU];
logic        dsp_eioclk [NDPU];
logic [3:0]  dsp_int [NDPU];
logic        dsp_tinp0 [NDPU];
logic        dpu_led [NDPU];
logic        dpu_sdcke [NDPU];
logic tis_wr = 0, tmts_wr = 0, tm_cmd_rd = 0, rol_rd, rol_ctrl_n, rol_empty, tm_cmd_empty;
logic [31:0] tis_data = 0, tmts_data = 0, tm_cmd_data, tm_status = 32'h5A5A_0001, rol_data;
logic [4:0] tm_ctrl;
dxc_cmd_e bus_cmd;
logic [31:0] bus_dxd, trace_frames;
logic [NDPU-1:0] bus_ser;
logic trace_inhibited;

dx_top dut (.*);
always #5 clk = ~clk;

// ---------------- DSP models ----------------
logic dsp_hold [NDPU];
logic [31:0] dest_q [NDPU][2][$];
for (genvar i = 0; i < NDPU; i++) begin : g_dsp
  initial begin
    dsp_srce_wr[i] = 0; dsp_srce_addr[i] = 0; dsp_srce_wdata[i] = 0; dsp_dest_rd[i] = 0;
    dsp_reg_wr[i] = 0; dsp_reg_addr[i] = 0; dsp_reg_wdata[i] = 0;
    dsp_awe_n[i] = 1; dsp_are_n[i] = 1; dsp_ep_req[i] = 0; dsp_ep_n[i] = 0; dsp_hold[i] = 0;
  end
  // destination DMA: one word per request, then let the request settle
  always @(negedge clk) begin
    dsp_dest_rd[i] = 2'b00;
    for (int c = 0; c < 2; c++)
      if (rst_n && !dsp_hold[i] && dsp_int[i][2 + c] && dsp_dest_rd[i] == 2'b00) begin
        dest_q[i][c].push_back(dsp_dest_rdata[i][c]);
        dsp_dest_rd[i][c] = 1'b1;
      end
    if (dsp_dest_rd[i] != 2'b00) begin
      @(negedge clk); dsp_dest_rd[i] = 2'b00; @(negedge clk);
    end
  end
end

task automatic dsp_reg_write(int i, logic [3:0] a, logic [31:0] v);
  @(negedge clk); dsp_reg_wr[i] = 1; dsp_reg_addr[i] = a; dsp_reg_wdata[i] = v;
  @(negedge clk); dsp_reg_wr[i] = 0;
endtask
// source FIFO fill levels seen by the DSP (its FIFO status interrupts)
int srce_words [NDPU][2];
int srce_blocks [NDPU][2];
for (genvar i = 0; i < NDPU; i++) begin : g_sobs
  for (genvar c = 0; c < 2; c++) begin : g_c
    assign srce_words[i][c]  = int'(dut.g_dpu[i].u_dxd.g_src[c].u_sf.count);
    assign srce_blocks[i][c] = int'(dut.g_dpu[i].u_dxd.g_src[c].u_sf.lcount_unused);
  end
end
task automatic dsp_block(int i, int c, logic [31:0] w[$]);
  // wait for room for the block and its Discard 2 word (plus words in flight)
  while (srce_words[i][c] + w.size() + 4 > 256 || srce_blocks[i][c] > 60) @(negedge clk);
  foreach (w[k]) begin
    @(negedge clk); dsp_srce_wr[i] = 2'(1 << c); dsp_srce_addr[i] = 16'h0100 + 16'(k); dsp_srce_wdata[i] = w[k];
  end
  @(negedge clk); dsp_srce_wr[i] = 2'(1 << c); dsp_srce_addr[i] = 16'd2; dsp_srce_wdata[i] = 0;
  @(negedge clk); dsp_srce_wr[i] = 0;
endtask

// ---------------- HPU ----------------
task automatic put(logic [31:0] w[$]);
  foreach (w[k]) begin
    @(negedge clk);
    while (!ififo_ready) @(negedge clk);
    dxf_wr = 1; dxf_addr = 4'h1; dxf_wdata = w[k];
    @(negedge clk); dxf_wr = 0;
  end
endtask
task automatic dxf_reg(logic [3:0] a, logic [31:0] v);
  @(negedge clk); dxf_wr = 1; dxf_addr = a; dxf_wdata = v; @(negedge clk); dxf_wr = 0;
endtask
function automatic logic [31:0] i_runseq(logic k, logic dch, logic f, logic [5:0] dm, logic [3:0] q);
  return {OP_RUNSEQ, 3'b000, k, 1'b0, 1'b1, 6'd0, dch, f, dm, 4'd0, q};
endfunction
function automatic logic [31:0] i_wrreg(logic f, logic [5:0] dm, logic [5:0] idx);
  return {OP_WRREG, 5'd0, 1'b1, 7'd0, f, dm, 2'b00, idx};
endfunction
function automatic logic [31:0] i_rdreg(logic h, logic l, logic k, logic f, logic [5:0] sm, logic [5:0] idx);
  return {OP_RDREG, 1'b0, h, l, k, 1'b0, 1'b1, 7'd0, f, sm, 2'b00, idx};
endfunction
function automatic logic [31:0] i_wrdata(logic k, logic dch, logic f, logic [5:0] dm, logic [7:0] c);
  return {OP_WRDATA, 3'b000, k, 1'b0, 1'b1, 6'd0, dch, f, dm, c};
endfunction
function automatic logic [31:0] i_misc(logic [3:0] minor, logic [23:0] low);
  return {OP_MISC, minor, low};
endfunction
task automatic wrreg(logic f, logic [5:0] dm, logic [5:0] idx, logic [31:0] v);
  put('{i_wrreg(f, dm, idx), v});
endtask
task automatic wrregdxb(logic [3:0] idx, logic [31:0] v);
  put('{i_misc(MI_WRREGDXB, 24'(idx)), v});
endtask

// ---------------- ROL, Host FIFO, return stream ----------------
logic rol_hold = 0;
logic [32:0] rol_q[$];
logic [31:0] hf_q[$];
assign rol_rd = rst_n && !rol_empty && !rol_hold;
always @(posedge clk) if (rst_n) begin
  if (rol_rd) rol_q.push_back({!rol_ctrl_n, rol_data});
  if (hf_wen) hf_q.push_back(hf_d);
end
logic ret_hold = 1;
logic [31:0] tis_q[$], trace_q[$];
int ret_frames[3] = '{0, 0, 0};
initial begin
  int t;
  wait (rst_n);
  forever begin
    @(negedge clk);
    if (!ret_hold && ret_frame_ready) begin
      dxb_addr = 4'h8;
      while (!dut.u_dxb.ret_valid) @(negedge clk);
      t = int'(dxb_rdata);
      `CHECK(t <= 2, "return stream type word");
      dxb_rd = 1; @(negedge clk);
      for (int k = 0; k < 15; k++) begin
        if (t == 0) tis_q.push_back(dxb_rdata);
        if (t == 2) trace_q.push_back(dxb_rdata);
        @(negedge clk);
      end
      dxb_rd = 0;
      if (t <= 2) ret_frames[t]++;
    end
  end
end
task automatic push_tis(int n);
  for (int k = 0; k < n; k++) begin
    @(negedge clk); tis_wr = 1; tis_data = 32'h7150_0000 + 32'(k);
  end
  @(negedge clk); tis_wr = 0;
endtask

// ---------------- mechanisms seen on the buses ----------------
int n_jam = 0, n_missing = 0, n_timeout = 0, n_front_stall = 0, n_back_stall = 0;
int n_src_turns = 0, n_silent = 0;
always @(posedge clk) if (rst_n) begin
  n_jam     += int'(dut.u_dxf.jam_wr);
  n_timeout += int'(dut.u_dxf.timeout);
  n_missing += int'(dut.u_dxf.u_trk.st == 3'd3 && dut.u_dxf.u_trk.first && is_last(bus_cmd));
  n_src_turns += int'(dut.u_dxf.u_trk.st == 3'd3 && dut.u_dxf.u_trk.first);
  n_front_stall += int'(dut.u_dxf.in_src && dut.dest_af && bus_cmd == DXC_NOP);
  n_back_stall  += int'(!dut.u_dxf.of_empty && (dut.dxb_af || hf_paf));
  n_silent  += int'(dut.u_dxf.silent_inst);
end

logic [NDPU-1:0] dest_empty_all, dxd_unlocked;
for (genvar i = 0; i < NDPU; i++) begin : g_obs
  assign dest_empty_all[i] = &dut.g_dpu[i].u_dxd.d_empty;
  assign dxd_unlocked[i]   = dut.g_dpu[i].u_dxd.unlocked;
end
task automatic wait_quiet();
  int idle;
  idle = 0;
  while (idle < 60) begin
    @(negedge clk);
    if (dut.u_dxf.if_empty && dut.u_dxf.fs == 3'd0 && dut.u_dxf.of_empty && dut.u_dxb.in_empty &&
        !dut.u_dxb.u_seq.xtra_v && (rol_empty || rol_hold) && (&dest_empty_all)) idle++;
    else idle = 0;
  end
endtask

// bring-up: reset, DPU IDs, frame size 1, DX_RESET_N pulse, unlock by the
// first instruction, then enable drivers and interrupts everywhere
task automatic bring_up(logic [5:0] config_mask);
  dpu_config = config_mask;
  repeat (3) @(negedge clk); rst_n = 1;
  for (int i = 0; i < NDPU; i++) begin dsp_reg_write(i, 4'h9, 32'(i)); dsp_reg_write(i, 4'h6, 32'd1); end
  dxf_reg(4'h7, 0); repeat (3) @(negedge clk); dxf_reg(4'h7, 1);
  repeat (10) @(negedge clk);
  wrreg(1'b1, 6'h3F, 6'h30, 32'hE000_0032);   // Control: E D S, M = 50
  wait_quiet();
endtask
