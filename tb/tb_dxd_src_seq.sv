// tb_dxd_src_seq: self-checking test of the DPU source sequencer.
// The testbench plays the source FIFO (a queue of blocks of random length
// 0..20 words) and the front bus tracker (turn_next stays high from the
// turn's first cycle until the sequencer's _last command appears), and
// raises the destination almost-full input at random, also inside blocks.
// For every turn the commands must be: nops and writes (pauses anywhere
// before _end), then _end, one more command and _last, with exactly the
// block's words written; the words must come out in order and
// each block must be retired by blk_done exactly once. Register-read turns
// (reg_mode) must send exactly the register value.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxd_src_seq;
  import dx_pkg::*;
  logic clk = 0, rst_n = 0, turn_next = 0, first_next = 0, reg_mode = 0, dest_af = 0;
  logic [31:0] reg_value = 0, head_data, data, words_sent;
  logic blk_avail, pop, blk_done, drive;
  logic [8:0] blk_len;
  dxc_cmd_e cmd;
  int checks = 0, failures = 0, stalls = 0, zero_blocks = 0;
  typedef logic [31:0] blk_t[$];
  blk_t blocks[$];
  int hidx = 0;
  dxd_src_seq dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  assign blk_avail = blocks.size() > 0;
  assign blk_len   = blk_avail ? 9'(blocks[0].size()) : 9'd0;
  assign head_data = (blk_avail && hidx < blocks[0].size()) ? blocks[0][hidx] : 32'hDEAD_BEEF;
  always @(posedge clk) begin
    if (pop) hidx <= hidx + 1;
    if (blk_done) begin void'(blocks.pop_front()); hidx <= 0; end
  end
  initial begin
    int n, t, c, k, nblk;
    logic [31:0] exp[$];
    dxc_cmd_e seen[$];
    logic [31:0] got[$];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int turn = 0; turn < 600; turn++) begin
      @(negedge clk);
      if (blocks.size() < 3 && $urandom_range(3) != 0) begin
        blk_t b; b = {}; n = (turn % 7 == 0) ? 0 : $urandom_range(20);
        for (int w = 0; w < n; w++) b.push_back($urandom);
        blocks.push_back(b);
      end
      reg_mode = (turn % 11 == 5); reg_value = $urandom;
      nblk = blocks.size();
      exp = {};
      if (reg_mode) exp.push_back(reg_value);
      else if (nblk > 0) exp = blocks[0];
      dest_af = !reg_mode && ($urandom_range(3) == 0);
      turn_next = 1; first_next = 1; seen = {}; got = {}; c = 0;
      @(negedge clk); first_next = 0;
      // let dest_af or an empty source hold the turn with nops for a while
      while (1) begin
        if (drive) begin
          seen.push_back(cmd);
          if (is_write(cmd)) got.push_back(data);
          if (is_last(cmd)) break;
        end
        if (c > 8) dest_af = ($urandom_range(3) == 0);   // pauses inside the block
        if (c == 8) begin
          dest_af = 0;
          if (nblk == 0 && !reg_mode) begin   // supply the missing block now
            blk_t b; b = {}; n = $urandom_range(5);
            for (int w = 0; w < n; w++) b.push_back($urandom);
            blocks.push_back(b); exp = b; nblk = 1;
          end
        end
        c++;
        if (c > 300) break;
        #1; turn_next = !(drive && is_last(cmd));
        @(negedge clk);
      end
      turn_next = 0;
      // the transfer is n writes in order with pause nops anywhere before
      // _end; the last three commands are _end, one more, _last
      n = exp.size(); t = (n < 3) ? 3 : n;
      `CHECK(seen.size() >= t, "turn long enough");
      if (seen.size() > t) stalls++;
      if (seen.size() >= t) begin
        k = seen.size();
        `CHECK(seen[k-3] == ((n >= 3) ? DXC_WRITE_END : DXC_NOP_END), "_end three before the end");
        `CHECK(seen[k-2] == ((n >= 2) ? DXC_WRITE : DXC_NOP), "command after _end");
        `CHECK(seen[k-1] == ((n >= 1) ? DXC_WRITE_LAST : DXC_NOP_LAST), "_last at the end");
        for (int j = 0; j < k - 3; j++) `CHECK(seen[j] inside {DXC_NOP, DXC_WRITE}, "only nop/write before _end");
      end
      `CHECK(got == exp, "block data in order");
      if (n == 0) zero_blocks++;
      repeat (2) @(negedge clk);
      if (!reg_mode) `CHECK(blocks.size() == nblk - 1, "block retired once");
    end
    `CHECK(stalls > 50 && zero_blocks > 10, "stalls and empty blocks exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
