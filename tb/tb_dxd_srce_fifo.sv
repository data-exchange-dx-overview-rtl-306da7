// tb_dxd_srce_fifo: self-checking test of the DPU source FIFO.
// A DSP-side process writes blocks of 0..30 user words at random addresses
// (>= 3) closed by a write to Discard 2, with stray writes to addresses 0
// and 1 mixed in; a reader process retires blocks as the source sequencer
// would. Block lengths, word order, the incomplete flag, half-full and
// almost-empty levels are checked against a model, and a final burst with
// no reader must fill the FIFO and set the sticky overflow flag.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxd_srce_fifo;
  logic clk = 0, rst_n = 0, wr = 0, pop = 0, blk_done = 0;
  logic [15:0] addr = 0;
  logic [31:0] data = 0, head_data;
  logic blk_avail, empty, full, hf, lhf, ae, incmplt, ovf;
  logic [8:0] blk_len;
  int checks = 0, failures = 0, nblocks = 0;
  int stored = 0;                 // user words in the FIFO
  logic [31:0] exp[$][$];
  logic [31:0] cur[$];
  logic reading = 1;
  dxd_srce_fifo dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // writer
  initial begin
    int n;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 400; b++) begin
      n = (b % 9 == 0) ? 0 : $urandom_range(30);
      cur = {};
      for (int w = 0; w < n; w++) begin
        @(negedge clk);
        while (stored + 4 > 250) begin wr = 0; @(negedge clk); end
        if ($urandom_range(5) == 0) begin wr = 1; addr = 16'($urandom_range(1)); data = $urandom; @(negedge clk); end
        wr = 1; addr = 16'($urandom_range(16'hFFFF, 3)); data = $urandom; cur.push_back(data);
        @(negedge clk); wr = 0;
        repeat (2) @(negedge clk);
        `CHECK(incmplt, "incomplete block flagged");
      end
      @(negedge clk);
      while (stored + 4 > 250) @(negedge clk);
      wr = 1; addr = 16'd2; data = $urandom;
      exp.push_back(cur);
      @(negedge clk); wr = 0;
    end
    repeat (3) @(negedge clk);
    `CHECK(!incmplt, "no incomplete block at end");
  end
  // stored-word model: a write reaches the FIFO two cycles later
  logic v1 = 0, v2 = 0;
  always @(posedge clk) begin
    v1 <= wr && addr > 2; v2 <= v1;
    stored <= stored + int'(v2 && !full) - int'(pop && !empty);
  end
  // reader
  initial begin
    logic [31:0] e[$];
    wait (rst_n);
    while (nblocks < 400) begin
      @(negedge clk);
      `CHECK(hf == (stored >= 128) && ae == (stored < 64), "level flags");
      `CHECK(lhf == (!hf && !incmplt), "less-than-half-full flag");
      if (blk_avail && reading && $urandom_range(3) == 0) begin
        e = exp.pop_front();
        `CHECK(blk_len == 9'(e.size()), "block length");
        if (e.size() == 0) begin blk_done = 1; @(negedge clk); blk_done = 0; end
        for (int i = 0; i < e.size(); i++) begin
          `CHECK(head_data == e[i], "block word");
          pop = 1; blk_done = (i == e.size() - 1); @(negedge clk); pop = 0; blk_done = 0;
        end
        nblocks++;
      end
    end
    // overflow: fill with no reader
    `CHECK(!ovf, "no overflow in normal traffic");
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); wr = 1; addr = 16'h100; data = i;
    end
    @(negedge clk); wr = 0; repeat (3) @(negedge clk);
    `CHECK(full && ovf, "overflow sets full and sticky ovf");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
