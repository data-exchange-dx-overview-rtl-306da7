// tb_dx_top_full: full-size random traffic test of dx_top (no parameter
// overrides: 6 DPUs, 256-word FIFOs, 512-word Output FIFO).
//
// All six DPUs are configured. Eight random source sequences (up to eight
// sources each, any DPU and channel, repeats allowed) are written to every
// device, then 300 DX_RunSequence instructions with random sequence,
// destination set, destination channel, back-end flag F and K bit are run
// with random blocks of 0..60 words. DX_WriteData instructions are mixed in.
// Every destination DSP stream and the read-out link stream are compared
// word by word with a model; instruction-only tracing runs the whole time
// and the HPU reads the return stream, which must arrive in whole frames.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dx_top_full;
  int checks = 0, failures = 0;
  `include "tb_dx_env.svh"
  initial begin #40_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [31:0] exp_d [NDPU][2][$];
  logic [32:0] exp_rol[$];
  logic [31:0] seqw [8];
  int words = 0;

  initial begin
    logic [31:0] b[$], tmp[$];
    int ns, src, qsel, n;
    logic [5:0] dm;
    logic dch, f, k;
    bring_up(6'h3F);
    `CHECK(dxd_unlocked == 6'h3F, "all DXDs unlocked");
    for (int q = 0; q < 8; q++) begin
      seqw[q] = 32'hFFFF_FFFF;
      ns = $urandom_range(8, 1);
      for (int j = 0; j < ns; j++) seqw[q][4*j +: 4] = 4'($urandom_range(1) << 3 | $urandom_range(5));
      wrreg(1, 6'h3F, 6'(q), seqw[q]);
    end
    put('{i_misc(MI_SETBACKDEST, 24'h1)});
    put('{i_misc(MI_SETTRACE, 24'hF55)});
    ret_hold = 0;
    for (int r = 0; r < 300; r++) begin
      dm = 6'($urandom); dch = 1'($urandom_range(1)); f = 1'($urandom_range(1)); k = 1'($urandom_range(1));
      if (r % 10 == 9) begin
        n = $urandom_range(40, 1); b = {};
        for (int j = 0; j < n; j++) b.push_back($urandom);
        tmp = b; tmp.push_front(i_wrdata(k, dch, f, dm, 8'(n)));
        put(tmp);
        foreach (b[j]) begin
          for (int i = 0; i < NDPU; i++) if (dm[i]) exp_d[i][dch].push_back(b[j]);
          if (f) exp_rol.push_back({k, b[j]});
        end
        words += n;
        continue;
      end
      qsel = $urandom_range(7);
      for (int j = 0; j < 8 && seqw[qsel][4*j +: 4] != 4'hF; j++) begin
        src = int'(seqw[qsel][4*j +: 3]);
        n = ($urandom_range(5) == 0) ? 0 : $urandom_range(60);
        b = {};
        for (int w = 0; w < n; w++) b.push_back($urandom);
        dsp_block(src, int'(seqw[qsel][4*j + 3]), b);
        foreach (b[w]) begin
          for (int i = 0; i < NDPU; i++) if (dm[i]) exp_d[i][dch].push_back(b[w]);
          if (f) exp_rol.push_back({k, b[w]});
        end
        words += n;
      end
      put('{i_runseq(k, dch, f, dm, 4'(qsel))});
      if (r % 20 == 19) wait_quiet();
    end
    wait_quiet();
    for (int i = 0; i < NDPU; i++) for (int c = 0; c < 2; c++) begin
      `CHECK(dest_q[i][c].size() == exp_d[i][c].size(), "destination word count");
      if (dest_q[i][c].size() != exp_d[i][c].size()) begin
        int m; m = -1;
        for (int j = 0; j < dest_q[i][c].size() && j < exp_d[i][c].size(); j++) if (m < 0 && dest_q[i][c][j] != exp_d[i][c][j]) m = j;
        $display("dest %0d.%0d got %0d exp %0d first mismatch %0d", i, c, dest_q[i][c].size(), exp_d[i][c].size(), m);
        if (m >= 0) $display("  got %h %h %h exp %h %h %h", dest_q[i][c][m], dest_q[i][c][m+1], dest_q[i][c][m+2], exp_d[i][c][m], exp_d[i][c][m+1], exp_d[i][c][m+2]);
      end
      for (int j = 0; j < dest_q[i][c].size() && j < exp_d[i][c].size(); j++)
        `CHECK(dest_q[i][c][j] == exp_d[i][c][j], "destination word");
    end
    `CHECK(rol_q.size() == exp_rol.size(), "ROL word count");
    for (int j = 0; j < rol_q.size() && j < exp_rol.size(); j++)
      `CHECK(rol_q[j] == exp_rol[j], "ROL word");
    `CHECK(n_jam == 0 && n_timeout == 0, "no jam or timeout with all DPUs present");
    repeat (2000) @(negedge clk);
    `CHECK(ret_frames[2] > 0 && trace_q.size() == 15 * ret_frames[2], "trace frames returned whole");
    $display("full-size run: %0d words moved, %0d source turns, %0d ROL words, %0d trace frames, front stalls %0d",
             words, n_src_turns, exp_rol.size(), ret_frames[2], n_front_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
