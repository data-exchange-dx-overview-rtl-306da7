// tb_dxb_input_seq: self-checking test of the DXB input sequencer.
// A random instruction stream, as the DXF back end writes it into the DXB
// Input FIFO ({tag, data} words), is offered through a queue:
//   DX_SetBackDest (L bit), DX_SetTraceMode (random mode word),
//   DX_RunSequence with F set (0..10 data words, random K) or F clear
//   (instruction word only), DX_WriteData with F set (1..6 parameters).
// The ROL FIFO and the trace framer are modelled as sinks that are full or
// not ready at random. An independent model predicts:
//   ROL:   {K, word} for every data/parameter word whose instruction has F
//          set while the back-end destination L bit is set;
//   trace: per instruction, by the mode fields for its kind (mm = 01 gives
//          the instruction word, plus a count word = number of data words
//          for a DX_RunSequence with F set; mm = 10 gives the instruction
//          and its parameter or data words); misc instructions are traced
//          when N is set. The first traced word of an instruction carries
//          tr_first and its last one tr_end.
// Both output streams and the instruction counter are compared at the end.
module tb_dxb_input_seq;
  import dx_pkg::*;
  int checks = 0, failures = 0;
  `include "tb_check.svh"

  logic clk = 0, rst_n = 0;
  logic [39:0] head;
  logic empty, pop, rol_full = 0, rol_wr, tr_ready = 1, tr_wr, tr_first, tr_end, resume_trace, release_frame;
  logic [32:0] rol_wdata;
  logic [31:0] tr_data, timeout_reg;
  logic [31:0] status_in = '0, tm_status = '0;
  logic [1:0] fault;

  dxb_input_seq dut (.*);

  always #5 clk = !clk;
  initial begin #5_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [39:0] in_q[$];
  logic [32:0] exp_rol[$], got_rol[$];
  logic [33:0] exp_tr[$], got_tr[$];    // {first, end, word}
  assign empty = in_q.size() == 0;
  assign head  = empty ? '0 : in_q[0];
  always @(posedge clk) if (rst_n) begin
    if (pop) void'(in_q.pop_front());
    if (rol_wr) begin
      `CHECK(!rol_full, "no ROL write while full");
      got_rol.push_back(rol_wdata);
    end
    if (tr_wr) begin
      `CHECK(tr_ready, "no trace write while not ready");
      got_tr.push_back({tr_first, tr_end, tr_data});
    end
    rol_full <= $urandom_range(0, 3) == 0;
    tr_ready <= $urandom_range(0, 3) != 0;
  end

  function automatic logic [39:0] w(tag_type_e tt, bit last, logic [31:0] d);
    dx_tag_t t;
    t = '0; t.tt = tt; t.last = last;
    return {t, d};
  endfunction

  // trace helper: push words with first/end flags
  function automatic void tr_push(logic [31:0] ws[$]);
    for (int i = 0; i < ws.size(); i++) exp_tr.push_back({i == 0, i == ws.size() - 1, ws[i]});
  endfunction

  initial begin
    logic bdl;
    logic [11:0] mode;
    int ninst;
    logic [31:0] ws[$];
    bdl = 0; mode = '0; ninst = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 1500; r++) begin
      int kind;
      logic [31:0] iw;
      logic k;
      kind = $urandom_range(0, 9);
      k = 1'($urandom);
      ws = {};
      ninst++;
      if (kind == 0) begin
        iw = {OP_MISC, MI_SETBACKDEST, 23'd0, 1'($urandom)};
        in_q.push_back(w(TT_INSTRUCTION, 1, iw));
        if (mode[11]) tr_push('{iw});
        bdl = iw[0];
      end else if (kind == 1) begin
        iw = {OP_MISC, MI_SETTRACE, 12'd0, 12'($urandom)};
        in_q.push_back(w(TT_INSTRUCTION, 1, iw));
        if (mode[11]) tr_push('{iw});
        mode = iw[11:0];
      end else if (kind <= 5) begin
        int n;
        logic [1:0] mm;
        n = $urandom_range(0, 10);
        iw = {OP_RUNSEQ, 3'b0, k, 1'b0, 1'b1, 6'd0, 1'b0, 1'b1, 6'h3F, 4'd0, 4'($urandom)};
        mm = mode[1:0];
        in_q.push_back(w(TT_INSTRUCTION, n == 0, iw));
        ws.push_back(iw);
        for (int i = 0; i < n; i++) begin
          logic [31:0] d;
          d = $urandom;
          in_q.push_back(w(TT_DATA, i == n - 1, d));
          if (bdl) exp_rol.push_back({k, d});
          if (mm == 2'b10) ws.push_back(d);
        end
        if (mm == 2'b01) ws.push_back(32'(n));
        if (mm == 2'b01 || mm == 2'b10) tr_push(ws);
      end else if (kind <= 7) begin
        logic [1:0] mm;
        iw = {OP_RUNSEQ, 3'b0, k, 1'b0, 1'b1, 6'd0, 1'b0, 1'b0, 6'h3F, 4'd0, 4'($urandom)};
        mm = mode[3:2];
        in_q.push_back(w(TT_INSTRUCTION, 1, iw));
        if (mm == 2'b01 || mm == 2'b10) tr_push('{iw});
      end else begin
        int c;
        logic [1:0] mm;
        c = $urandom_range(1, 6);
        iw = {OP_WRDATA, 3'b0, k, 1'b0, 1'b1, 6'd0, 1'b0, 1'b1, 6'h3F, 8'(c)};
        mm = mode[5:4];
        in_q.push_back(w(TT_INSTRUCTION, 0, iw));
        ws.push_back(iw);
        for (int i = 0; i < c; i++) begin
          logic [31:0] d;
          d = $urandom;
          in_q.push_back(w(TT_PARAMETER, i == c - 1, d));
          if (bdl) exp_rol.push_back({k, d});
          if (mm == 2'b10) ws.push_back(d);
        end
        if (mm == 2'b01 || mm == 2'b10) tr_push(ws);
      end
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
    end
    while (in_q.size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);
    `CHECK(got_rol.size() == exp_rol.size(), "ROL word count");
    for (int i = 0; i < got_rol.size() && i < exp_rol.size(); i++) `CHECK(got_rol[i] == exp_rol[i], "ROL word and K bit");
    `CHECK(got_tr.size() == exp_tr.size(), "trace word count");
    for (int i = 0; i < got_tr.size() && i < exp_tr.size(); i++) `CHECK(got_tr[i] == exp_tr[i], "trace word and first/end flags");
    `CHECK(dut.icount == 32'(ninst), "instruction counter");
    `CHECK(fault == 2'b00, "no fault");
    $display("input sequencer: %0d instructions, %0d ROL words, %0d trace words", ninst, got_rol.size(), got_tr.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
