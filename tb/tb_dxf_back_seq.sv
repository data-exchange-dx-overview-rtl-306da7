// tb_dxf_back_seq: self-checking test of the DXF back sequencer.
// The testbench models the Output FIFO as a queue that an instruction
// writer fills word by word (instruction word, then parameters/data, the
// last word tagged L, some words tagged H). Random DXB and Host FIFO
// almost-full stalls are applied. Checks: every word comes out once and in
// order with FIRST on instruction words, LAST on L-tagged words and the Host
// FIFO strobe on H-tagged words; no word moves in the cycle after a stall
// input was high; an instruction is only started once its L word is stored.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxf_back_seq;
  import dx_pkg::*;
  logic clk = 0, rst_n = 0, dxb_af = 0, hf_paf = 0;
  logic [39:0] head;
  logic empty, inst_avail, pop, wr, first, last, hf_wen;
  logic [31:0] d;
  dx_tag_t tag;
  int checks = 0, failures = 0, nlast = 0, stalls = 0, host = 0;
  logic [39:0] q[$], sent[$];
  dxf_back_seq dut (.*);
  always #5 clk = ~clk;
  initial begin #50_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int n_l();
    int n = 0;
    foreach (q[i]) n += int'(q[i][39]);
    return n;
  endfunction
  assign empty = (q.size() == 0);
  assign head  = empty ? 40'd0 : q[0];
  assign inst_avail = (n_l() > 0);
  // writer
  initial begin
    int n;
    dx_tag_t t;
    wait (rst_n);
    for (int i = 0; i < 500; i++) begin
      n = $urandom_range(8);
      for (int w = 0; w <= n; w++) begin
        @(negedge clk);
        while (q.size() > 200) @(negedge clk);
        t = '0; t.tt = (w == 0) ? TT_INSTRUCTION : (w == 1 ? TT_PARAMETER : TT_DATA);
        t.host = ($urandom_range(2) == 0); t.last = (w == n);
        q.push_back({t, 32'($urandom)});
        sent.push_back(q[$]);
        if ($urandom_range(3) == 0) repeat ($urandom_range(4)) @(negedge clk);
      end
    end
  end
  // stall inputs and checker
  logic prev_stall = 0, in_inst = 0;
  logic [39:0] e;
  always @(posedge clk) if (rst_n && pop) begin
    if (!in_inst) `CHECK(n_l() > 0, "instruction starts only when complete");
    in_inst = !q[0][39];
    void'(q.pop_front());
  end
  always @(negedge clk) if (rst_n) begin
    dxb_af <= ($urandom_range(9) == 0); hf_paf <= ($urandom_range(12) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    prev_stall <= dxb_af || hf_paf;
    #1;
    if (wr) begin
      `CHECK(!prev_stall, "no word after a stall input");
      e = sent.pop_front();
      `CHECK({tag, d} == e, "word and tag in order");
      `CHECK(first == (e[33:32] == 2'd0), "FIRST on instruction word");
      `CHECK(last == e[39] && hf_wen == e[34], "LAST and Host FIFO strobe");
      nlast += int'(last); host += int'(hf_wen);
    end
    stalls += int'(prev_stall);
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wait (nlast == 500);
    repeat (5) @(posedge clk);
    `CHECK(sent.size() == 0 && stalls > 100 && host > 100, "all words sent, stalls and host words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
