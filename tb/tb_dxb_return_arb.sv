// tb_dxb_return_arb: self-checking test of the DX Return Stream merger.
// Three stream sources (TIS, TMTS, DXTS) are modelled as queues of
// numbered words, refilled at random; frame_avail is "15 or more words".
// The HPU side reads with random pauses. Checks: every frame is one type
// word (0, 1 or 2) then 15 words of that stream in order; the chosen
// stream matches a reference model of the priority counters; with loads
// TIS=1, TMTS=4, DXTS=15 and all streams always full, TIS must get the most
// frames and DXTS the fewest.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxb_return_arb;
  logic clk = 0, rst_n = 0, rd = 0, valid, frame_ready;
  logic [3:0] load [3];
  logic [2:0] frame_avail, pop;
  logic [31:0] head [3], rdata, frames [3];
  int checks = 0, failures = 0;
  logic [31:0] sq[3][$];
  int seqn[3] = '{0, 0, 0};
  int served[3] = '{0, 0, 0};
  int mcnt[3] = '{0, 0, 0};
  dxb_return_arb dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  for (genvar s = 0; s < 3; s++) begin : g_s
    assign frame_avail[s] = sq[s].size() >= 15;
    assign head[s] = sq[s].size() > 0 ? sq[s][0] : 32'hBAD;
  end
  always @(posedge clk) for (int s = 0; s < 3; s++) if (pop[s]) void'(sq[s].pop_front());
  function automatic int ref_pick();
    int p = -1;
    for (int s = 0; s < 3; s++) if (frame_avail[s] && (p < 0 || mcnt[s] < mcnt[p])) p = s;
    return p;
  endfunction
  task automatic fill(int s, int n);
    repeat (n) begin sq[s].push_back(32'((s << 24) | seqn[s])); seqn[s]++; end
  endtask
  task automatic read_frames(int nframes, logic keep_full);
    int p, t;
    for (int f = 0; f < nframes; f++) begin
      @(negedge clk);
      if (keep_full) begin
        for (int s = 0; s < 3; s++) if (sq[s].size() < 20) fill(s, 20);
      end else if ($urandom_range(1)) fill($urandom_range(2), 15);
      @(negedge clk);
      while (!valid) begin
        if (!keep_full && frame_avail == 0) fill($urandom_range(2), 15);
        @(negedge clk);
      end
      t = int'(rdata);
      `CHECK(t <= 2, "type word");
      served[t]++;
      rd = 1; @(negedge clk);
      for (int w = 0; w < 15; w++) begin
        rd = 0;
        if ($urandom_range(3) == 0) @(negedge clk);
        `CHECK(valid && rdata[31:24] == 8'(t), "word of the chosen stream");
        rd = 1; @(negedge clk);
      end
      rd = 0;
    end
  endtask
  // counter reference, updated at each decision
  always @(posedge clk) if (rst_n && dut.st == 2'd0) begin
    int p;
    p = ref_pick();
    if (p >= 0) begin
      `CHECK(dut.pick == 2'(p), "priority choice");
      for (int s = 0; s < 3; s++)
        if (s == p) mcnt[s] = int'(load[s]);
        else if (frame_avail[s] && mcnt[s] > 0) mcnt[s]--;
    end
  end
  initial begin
    load[0] = 4'd1; load[1] = 4'd4; load[2] = 4'd15;
    repeat (2) @(posedge clk); rst_n = 1;
    read_frames(300, 1'b1);
    `CHECK(served[0] > served[1] && served[1] > served[2] && served[2] > 0, "load values set the share");
    `CHECK(frames[0] == 32'(served[0]) && frames[2] == 32'(served[2]), "frame counters");
    for (int s = 0; s < 3; s++) load[s] = 4'($urandom);
    read_frames(300, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
