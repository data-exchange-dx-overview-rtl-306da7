// tb_dx_top: end-to-end test of one DX side (dx_top, default size: 6 DPUs).
//
// The HPU, DSP, read-out link, Host FIFO and transition-module models of
// tb_dx_env.svh surround the design. DPU 5 is left unconfigured (missing).
// The test runs, in order:
//   unlock       DX_RESET_N pulse, first instruction unlocks every DXD,
//                DX_WriteReg sets Control (E, D, S) in all devices;
//   transfer     DX_RunSequence with two DPU sources into a DPU destination
//                and the back end (SetBackDest L): DSP and ROL data checked;
//   write data   DX_WriteData to a DPU and to the ROL;
//   missing      a sequence naming the missing DPU: jam words then data;
//   timeout      a source with no block: stall timeout, jam, next source;
//   stall        a destination DSP stops reading: sources wait on almost-full;
//   back stall   the read-out link stops and the Host FIFO reports almost
//                full: the DX Internal Bus pauses, nothing is lost;
//   read reg     DX_ReadReg of two DPUs (post-incrementing Test register),
//                of the missing DPU (jam word), Host FIFO copies (H bit);
//   DXB regs     DX_WriteRegDXB / DX_ReadRegDXB through the ROL;
//   trace        full trace mode, return stream read by the HPU, frame
//                padding and frame timeout; then the HPU stops reading, the
//                Trace FIFO timeout inserts DX_TraceTimeout and tracing stops
//                until DXBI_ResumeTraceFIFO;
//   TIS          transition-module TIS frames merged into the return stream.
// Every mechanism has a counter; a mechanism that never occurred counts as
// a failure at the end.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dx_top;
  int checks = 0, failures = 0;
  `include "tb_dx_env.svh"
  initial begin #40_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  localparam logic [31:0] JAM0 = 32'hA5A5_0000, JAM1 = 32'hA5A5_0001, JAM2 = 32'hA5A5_0002;
  logic [31:0] exp_d [NDPU][2][$];
  logic [32:0] exp_rol[$];
  int n_unlock = 0, n_pad = 0, n_ttmo = 0, n_hf = 0, n_regrd = 0;

  function automatic void blk(ref logic [31:0] b[$], input int n, input logic [31:0] base);
    b = {};
    for (int k = 0; k < n; k++) b.push_back(base + 32'(k));
  endfunction
  task automatic expect_both(int i, int c, logic [31:0] w[$], logic to_rol, logic k);
    foreach (w[j]) begin
      exp_d[i][c].push_back(w[j]);
      if (to_rol) exp_rol.push_back({k, w[j]});
    end
  endtask
  task automatic compare(string what);
    wait_quiet();
    for (int i = 0; i < NDPU; i++) for (int c = 0; c < 2; c++) begin
      `CHECK(dest_q[i][c].size() == exp_d[i][c].size(), {what, ": destination word count"});
      for (int j = 0; j < dest_q[i][c].size() && j < exp_d[i][c].size(); j++)
        `CHECK(dest_q[i][c][j] == exp_d[i][c][j], {what, ": destination word"});
      dest_q[i][c] = {}; exp_d[i][c] = {};
    end
    `CHECK(rol_q.size() == exp_rol.size(), {what, ": ROL word count"});
    for (int j = 0; j < rol_q.size() && j < exp_rol.size(); j++)
      `CHECK(rol_q[j] == exp_rol[j], {what, ": ROL word"});
    if (rol_q.size() != exp_rol.size()) $display("  %s: ROL got %0d expected %0d", what, rol_q.size(), exp_rol.size());
    rol_q = {}; exp_rol = {};
  endtask

  initial begin
    logic [31:0] b1[$], b2[$], wd[$], tmp[$];
    int n0;
    // ---------------- unlock ----------------
    bring_up(6'h1F);
    n_unlock = $countones(dxd_unlocked);
    `CHECK((dxd_unlocked & 6'h1F) == 6'h1F, "configured DXDs unlocked");
    // sequences: Q0 = DPU1.0, DPU2.1   Q1 = DPU5.0 (missing), DPU1.0
    //            Q2 = DPU2.0 (no block: timeout), DPU1.0
    wrreg(1, 6'h3F, 6'h00, 32'hFFFF_FFA1);
    wrreg(1, 6'h3F, 6'h01, 32'hFFFF_FF15);
    wrreg(1, 6'h3F, 6'h02, 32'hFFFF_FF12);
    wrreg(1, 6'h3F, 6'h10, JAM0); wrreg(1, 6'h3F, 6'h11, JAM1); wrreg(1, 6'h3F, 6'h12, JAM2);
    wrreg(1, 6'h3F, 6'h20, 32'd3); wrreg(1, 6'h3F, 6'h21, 32'd2); wrreg(1, 6'h3F, 6'h22, 32'd1);
    wrreg(1, 6'h3F, 6'h31, {16'd1, 16'd20});            // stall timeout 20 us
    put('{i_misc(MI_SETBACKDEST, 24'h1)});               // back-end destination: ROL
    wait_quiet();

    // ---------------- transfer ----------------
    for (int r = 0; r < 4; r++) begin
      blk(b1, $urandom_range(30), 32'h1000_0000 + 32'(r << 16));
      blk(b2, $urandom_range(30), 32'h2000_0000 + 32'(r << 16));
      fork dsp_block(1, 0, b1); dsp_block(2, 1, b2); join
      put('{i_runseq(r[0], 1'b0, 1'b1, 6'b001000, 4'd0)});
      expect_both(3, 0, b1, 1, r[0]); expect_both(3, 0, b2, 1, r[0]);
    end
    compare("transfer");

    // ---------------- write data ----------------
    blk(wd, 5, 32'h3000_0000);
    tmp = wd; tmp.push_front(i_wrdata(1'b1, 1'b1, 1'b1, 6'b010000, 8'd5));
    put(tmp);
    expect_both(4, 1, wd, 1, 1'b1);
    compare("write data");

    // ---------------- missing source ----------------
    n0 = n_jam;
    blk(b1, 7, 32'h4000_0000); dsp_block(1, 0, b1);
    put('{i_runseq(1'b0, 1'b0, 1'b0, 6'b001000, 4'd1)});
    exp_d[3][0].push_back(JAM1); exp_d[3][0].push_back(JAM1);
    expect_both(3, 0, b1, 0, 0);
    compare("missing source");
    `CHECK(n_jam - n0 == 2 && n_missing > 0, "missing source jammed JamCount words");
    `CHECK(dut.u_dxf.down0[5], "missing DPU on the down list");

    // ---------------- timeout ----------------
    n0 = n_timeout;
    blk(b1, 4, 32'h5000_0000); dsp_block(1, 0, b1);
    put('{i_runseq(1'b0, 1'b0, 1'b0, 6'b001000, 4'd2)});
    exp_d[3][0].push_back(JAM2);
    expect_both(3, 0, b1, 0, 0);
    compare("timeout");
    `CHECK(n_timeout > n0 && dut.u_dxf.down0[2], "source timeout, DPU 2.0 down");
    wrreg(1, 6'h3F, 6'h31, {16'd1, 16'd1000});          // back to 1 ms

    // ---------------- destination stall ----------------
    dsp_hold[3] = 1;
    blk(b1, 150, 32'h6000_0000); blk(b2, 150, 32'h6100_0000);
    fork dsp_block(1, 0, b1); dsp_block(2, 1, b2); join
    put('{i_runseq(1'b0, 1'b0, 1'b0, 6'b001000, 4'd0)});
    expect_both(3, 0, b1, 0, 0); expect_both(3, 0, b2, 0, 0);
    repeat (3000) @(negedge clk);
    `CHECK(n_front_stall > 0, "front bus stalled on destination almost full");
    dsp_hold[3] = 0;
    compare("destination stall");

    // ---------------- back-end stall ----------------
    rol_hold = 1;
    for (int r = 0; r < 4; r++) begin
      blk(wd, 200, 32'h7000_0000 + 32'(r << 12));
      tmp = wd; tmp.push_front(i_wrdata(1'b0, 1'b0, 1'b1, 6'b000001, 8'd200));
      put(tmp);
      expect_both(0, 0, wd, 1, 1'b0);
    end
    repeat (2000) @(negedge clk);
    hf_paf = 1; repeat (500) @(negedge clk); hf_paf = 0;
    rol_hold = 0;
    compare("back-end stall");
    `CHECK(n_back_stall > 0, "DX Internal Bus stalled");

    // ---------------- read registers ----------------
    put('{i_wrreg(0, 6'b000010, 6'h3F), 32'h1111});
    put('{i_wrreg(0, 6'b001000, 6'h3F), 32'h3333});
    n0 = hf_q.size();
    put('{i_rdreg(1, 1, 0, 0, 6'b001010, 6'h3F)});
    put('{i_rdreg(0, 1, 1, 0, 6'b001010, 6'h3F)});
    put('{i_rdreg(0, 1, 0, 0, 6'b100010, 6'h3F)});        // DPU 5 missing: jam word
    exp_rol = '{{1'b0, 32'h1111}, {1'b0, 32'h3333}, {1'b1, 32'h1112}, {1'b1, 32'h3334},
                {1'b0, 32'h1113}, {1'b0, JAM0}};
    wait_quiet();
    compare("read register");
    `CHECK(hf_q.size() - n0 == 2 && hf_q[n0] == 32'h1111 && hf_q[n0 + 1] == 32'h3333, "ReadReg H copies to Host FIFO");
    n_regrd++; n_hf = hf_q.size();

    // ---------------- DXB registers ----------------
    wrregdxb(4'hF, 32'hB0B0);
    put('{{OP_RDREGDXB, 2'b00, 1'b1, 1'b0, 20'd0, 4'hF}});
    exp_rol.push_back({1'b0, 32'hB0B0});
    compare("DXB register");

    // ---------------- trace ----------------
    ret_hold = 0;
    wrregdxb(4'h1, {16'd0, 16'd20});                     // frame timeout 20 us
    put('{i_misc(MI_SETTRACE, 24'hFAA)});                 // N W R B, full data everywhere
    for (int r = 0; r < 6; r++) begin
      blk(wd, $urandom_range(12, 1), 32'h8000_0000 + 32'(r << 8));
      tmp = wd; tmp.push_front(i_wrdata(1'b0, 1'b0, 1'b0, 6'b000001, 8'(wd.size())));
      put(tmp);
      expect_both(0, 0, wd, 0, 0);
    end
    compare("traced write data");
    // leave a part-filled frame for the frame timeout (one-word instruction)
    if (dut.u_dxb.u_fr.pos == 4'd0) put('{i_misc(MI_SETBACKDEST, 24'h1)});
    repeat (3000) @(negedge clk);
    `CHECK(trace_q.size() > 0 && trace_q.size() % 15 == 0, "trace frames received");
    foreach (trace_q[j]) n_pad += int'(trace_q[j] == DX_PAD);
    `CHECK(n_pad > 0, "trace padding (frame timeout)");
    `CHECK(trace_q[$] == DX_PAD, "partial frame padded on timeout");
    // FIFO timeout
    ret_hold = 1; trace_q = {};
    wrregdxb(4'h1, {16'd30, 16'd0});                      // FIFO timeout 30 us
    for (int r = 0; r < 30; r++) begin
      blk(wd, 12, 32'h9000_0000 + 32'(r << 8));
      tmp = wd; tmp.push_front(i_wrdata(1'b0, 1'b0, 1'b0, 6'b000001, 8'd12));
      put(tmp);
      expect_both(0, 0, wd, 0, 0);
    end
    compare("traced under FIFO timeout");
    `CHECK(trace_inhibited, "trace inhibited after FIFO timeout");
    ret_hold = 0;
    repeat (3000) @(negedge clk);
    foreach (trace_q[j]) n_ttmo += int'(trace_q[j] == DX_TRACE_TIMEOUT);
    `CHECK(n_ttmo == 1, "one DX_TraceTimeout frame");
    wrregdxb(4'h2, 32'd0);                                // resume
    wait_quiet();
    `CHECK(!trace_inhibited, "trace resumed");

    // ---------------- TIS ----------------
    n0 = ret_frames[0];
    push_tis(30);
    repeat (500) @(negedge clk);
    `CHECK(ret_frames[0] - n0 == 2 && tis_q.size() == 30 && tis_q[29] == 32'h7150_001D, "TIS frames returned");

    // ---------------- summary of mechanisms ----------------
    $display("mechanisms: unlock=%0d turns=%0d jam=%0d missing=%0d timeout=%0d front_stall=%0d back_stall=%0d pad=%0d trace_timeout=%0d silent=%0d host=%0d dxts_frames=%0d tis_frames=%0d",
             n_unlock, n_src_turns, n_jam, n_missing, n_timeout, n_front_stall, n_back_stall,
             n_pad, n_ttmo, n_silent, n_hf, ret_frames[2], ret_frames[0]);
    `CHECK(n_unlock > 0, "mechanism: unlock");
    `CHECK(n_src_turns > 0, "mechanism: source turns");
    `CHECK(n_jam > 0 && n_missing > 0, "mechanism: jam / missing source");
    `CHECK(n_timeout > 0, "mechanism: stall timeout");
    `CHECK(n_front_stall > 0, "mechanism: front bus stall");
    `CHECK(n_back_stall > 0, "mechanism: back-end stall");
    `CHECK(n_pad > 0, "mechanism: trace padding");
    `CHECK(n_ttmo > 0, "mechanism: trace FIFO timeout");
    `CHECK(n_silent > 0, "mechanism: back-executed instructions");
    `CHECK(n_hf > 0, "mechanism: Host FIFO words");
    `CHECK(ret_frames[2] > 0 && ret_frames[0] > 0, "mechanism: return stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
