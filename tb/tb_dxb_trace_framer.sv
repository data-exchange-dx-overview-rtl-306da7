// tb_dxb_trace_framer: self-checking test of DX Trace frame packing.
// Phase 1: random traced instructions (1..20 words, FIRST on the first word,
// end flag on the last) are fed with random gaps; a reference packer
// predicts every 15-word frame, including the DX_Pad word added when an
// instruction ends in the 14th word. Phase 2: input stops after a complete
// instruction and the frame timeout must pad and send the part-filled
// frame; a release request must do the same at once. Phase 3: the Trace
// FIFO is reported almost full for longer than the FIFO timeout; a
// DX_TraceTimeout frame must follow, input must be dropped while inhibited,
// and after resume output restarts at the next instruction's first word.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxb_trace_framer;
  import dx_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, wfirst = 0, iend = 0, us_tick, release_req = 0, resume = 0;
  logic [31:0] wdata = 0, push_data, frames_out, pad_frames;
  logic [15:0] frame_tmo = 16'd0, fifo_tmo = 16'd0;
  logic [8:0] tfifo_count = 0;
  logic tfifo_full = 0, ready, push, inhibited;
  int checks = 0, failures = 0, cyc = 0, n_pad14 = 0, n_ftmo = 0, n_qtmo = 0;
  logic [31:0] expq[$], got[$], cur[$];
  dxb_trace_framer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign us_tick = (cyc % 10 == 0);
  always @(posedge clk) if (push) got.push_back(push_data);
  initial begin #100_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic close_frame();
    while (cur.size() < 15) cur.push_back(DX_PAD);
    foreach (cur[i]) expq.push_back(cur[i]);
    cur = {};
  endtask
  task automatic send_inst(int n, logic model);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      wr = 1; wfirst = (w == 0); iend = (w == n - 1); wdata = $urandom & 32'h7FFF_FFFF;
      if (model) begin
        cur.push_back(wdata);
        if (cur.size() == 15) close_frame();
        else if (iend && cur.size() == 14) begin close_frame(); n_pad14++; end
      end
      @(negedge clk); wr = 0; wfirst = 0; iend = 0;
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
    end
  endtask
  task automatic compare(string what);
    repeat (40) @(negedge clk);
    `CHECK(got.size() == expq.size(), {what, ": number of words"});
    for (int i = 0; i < got.size() && i < expq.size(); i++)
      `CHECK(got[i] == expq[i], {what, ": frame word"});
    got = {}; expq = {};
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // phase 1
    for (int i = 0; i < 300; i++) send_inst($urandom_range(20, 1), 1);
    // finish the open frame with single-word instructions
    while (cur.size() != 0) send_inst(1, 1);
    compare("packing");
    `CHECK(n_pad14 > 5, "14th-word padding exercised");
    // phase 2: frame timeout
    frame_tmo = 16'd20;
    for (int k = 0; k < 10; k++) begin
      send_inst($urandom_range(8, 1), 1);
      if (cur.size() == 0) continue;
      repeat (25 * 10 + 20) @(negedge clk);
      close_frame(); n_ftmo++;
      compare("frame timeout");
    end
    frame_tmo = 16'd0;
    send_inst(3, 1);
    repeat (100) @(negedge clk);
    `CHECK(got.size() == 0, "no timeout when disabled");
    release_req = 1; @(negedge clk); release_req = 0;
    close_frame(); compare("release");
    // phase 3: FIFO timeout
    fifo_tmo = 16'd5; tfifo_count = 9'd200;
    repeat (5 * 10 + 30) @(negedge clk);
    `CHECK(inhibited, "FIFO timeout inhibits tracing");
    expq.push_back(DX_TRACE_TIMEOUT); repeat (14) expq.push_back(DX_PAD); n_qtmo++;
    send_inst(5, 0);             // dropped
    compare("fifo timeout");
    tfifo_count = 0;
    @(negedge clk); resume = 1; @(negedge clk); resume = 0;
    `CHECK(!inhibited, "resume ends inhibit");
    // an instruction already in progress is not traced; the next one is
    @(negedge clk); wr = 1; wfirst = 0; wdata = 32'h1234; @(negedge clk); wr = 0;
    for (int i = 0; i < 5; i++) send_inst(3, 1);
    compare("after resume");
    `CHECK(n_ftmo > 3 && n_qtmo == 1 && pad_frames > 10, "timeouts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
