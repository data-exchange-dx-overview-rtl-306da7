// tb_dx_front_tracker: self-checking test of the DX Front Bus tracker.
// The testbench plays every device on the bus at once, reacting to the
// tracker's own "next turn" outputs the way the real devices do:
//   - the DXF side starts DX_RunSequence (random Sequence register with up
//     to eight {FIFO#, DPU#} sources), DX_ReadReg (random DPU mask),
//     DX_WriteReg (two instruction words with random nops between them) and
//     silent instructions (nop_end), each followed by the nop, nop_last tail;
//   - a present source sends a block of 0..12 words (nop_end padding for
//     short blocks, random stall nops, write_end, then a _last command);
//   - an absent or already-down source leaves the keepers at nop_last, so
//     its first cycle carries _last;
//   - some turns stall and get a timeout pulse instead of finishing.
// An independent model derives the expected source order from the
// Sequence word or DPU mask, the down list, and the counts of data writes,
// jam words (JamCount[Q] per missing RunSequence source, 1 per missing
// ReadReg source, paused while dest_af is high), instruction words and
// instructions (icount). dest_af toggles at random. The tracker is reset
// every 8 instructions to clear its down list.
module tb_dx_front_tracker;
  import dx_pkg::*;
  int checks = 0, failures = 0;
  `include "tb_check.svh"

  localparam int NDPU = 6;
  logic clk = 0, rst_n = 0;
  dxc_cmd_e cmd = DXC_NOP;
  logic [31:0] dxd = '0;
  logic [3:0] q;
  logic [31:0] seq_word;
  logic [7:0] jam_count;
  logic timeout = 0, tmo_run, dest_af = 0, icount_wr = 0;
  logic [31:0] icount_wdata = '0;
  logic idle, inst_wr, data_wr, jam_wr, inst_done, silent_inst, cur_chan, in_src;
  logic nxt_turn, nxt_chan, nxt_first, proto_err;
  logic [31:0] iword, icount;
  logic [8:0] inst_idx;
  logic [2:0] cur_dpu, nxt_dpu;
  logic [NDPU-1:0] src_down0, src_down1;

  dx_front_tracker dut (.*);

  always #5 clk = !clk;
  initial begin #20_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // register files seen by the tracker
  logic [31:0] seqs [16];
  logic [7:0]  jams [16];
  assign seq_word  = seqs[q];
  assign jam_count = jams[q];

  // expected / observed counters
  int exp_data = 0, got_data = 0, exp_jam = 0, got_jam = 0, exp_iw = 0, got_iw = 0;
  int exp_silent = 0, got_silent = 0, exp_done = 0, got_done = 0, exp_icount = 0;
  int n_missing = 0, n_tmo = 0, n_turns = 0, n_stall_jam = 0;
  always @(posedge clk) if (rst_n) begin
    got_data   += int'(data_wr);
    got_jam    += int'(jam_wr);
    got_iw     += int'(inst_wr);
    got_silent += int'(silent_inst);
    got_done   += int'(inst_done);
    n_stall_jam += int'(dut.st == 3'd4 && dest_af);
    `CHECK(!proto_err, "no protocol error");
    `CHECK(tmo_run == (in_src && !is_write(cmd)), "timeout runs only while a source is silent");
  end

  typedef struct { dxc_cmd_e c; logic [31:0] d; logic tmo; } ent_t;
  ent_t pend[$];
  logic [3:0] srcs[$];          // expected {chan, dpu} order of the current instruction
  logic present [NDPU][2];
  logic down [NDPU][2];
  logic [31:0] cur_op;

  function automatic ent_t e(dxc_cmd_e c, logic [31:0] d = '0, logic tmo = 1'b0);
    ent_t r; r.c = c; r.d = d; r.tmo = tmo; return r;
  endfunction

  // one source block of n words; returns the number of writes queued
  function automatic int queue_block(int n, bit tmo);
    int w = 0;
    if (tmo) begin
      int k = $urandom_range(0, n > 2 ? n - 2 : 0);
      for (int i = 0; i < k; i++) begin pend.push_back(e(DXC_WRITE, $urandom)); w++; end
      for (int i = 0; i < int'($urandom_range(0, 3)); i++) pend.push_back(e(DXC_NOP));
      pend.push_back(e(DXC_NOP, '0, 1'b1));
      return w;
    end
    for (int i = n; i < 3; i++) pend.push_back(e(DXC_NOP_END));
    for (int i = 0; i < n; i++) begin
      if (i < n - 2) begin
        if ($urandom_range(0, 4) == 0) pend.push_back(e(DXC_NOP));
        pend.push_back(e(DXC_WRITE, $urandom));
      end else pend.push_back(e(i == n - 1 ? DXC_WRITE_LAST : DXC_WRITE_END, $urandom));
      w++;
    end
    if (n == 0) pend[$].c = DXC_NOP_LAST;
    return w;
  endfunction

  task automatic start_instruction();
    int kind = $urandom_range(0, 9);
    logic [31:0] w;
    srcs = {};
    if (kind == 0) begin
      pend.push_back(e(DXC_NOP_END)); exp_silent++; exp_icount++;
      return;
    end
    if (kind <= 6) begin
      logic [3:0] qq = 4'($urandom);
      w = {OP_RUNSEQ, 3'b0, 1'b0, 1'b0, 1'b1, 6'd0, 1'b0, 1'b0, 6'h3F, 4'd0, qq};
      for (int j = 0; j < 8; j++) begin
        if (seqs[qq][4*j +: 4] == 4'hF) break;
        srcs.push_back(seqs[qq][4*j +: 4]);
      end
    end else if (kind == 7) begin
      w = {OP_RDREG, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 7'd0, 1'b0, 6'($urandom), 2'b0, 6'h3F};
      for (int j = 0; j < NDPU; j++) if (w[8+j]) srcs.push_back({1'b0, 3'(j)});
    end else begin
      w = {OP_WRREG, 5'd0, 1'b1, 7'd0, 1'b0, 6'h3F, 2'b0, 6'h31};
    end
    cur_op = w;
    pend.push_back(e(DXC_WR_INST_FIRST, w)); exp_iw++; exp_icount++; exp_done++;
    if (w[31:28] == OP_WRREG) begin
      for (int i = 0; i < int'($urandom_range(0, 2)); i++) pend.push_back(e(DXC_NOP));
      pend.push_back(e(DXC_WR_INST, $urandom)); exp_iw++;
    end
    pend.push_back(e(DXC_NOP)); pend.push_back(e(DXC_NOP_LAST));
  endtask

  task automatic new_config();
    for (int i = 0; i < 16; i++) begin
      int n = $urandom_range(0, 8);
      seqs[i] = '1;
      for (int j = 0; j < n; j++) seqs[i][4*j +: 4] = {1'($urandom), 3'($urandom_range(0, NDPU - 1))};
      jams[i] = 8'($urandom_range(0, 4));
    end
    for (int d = 0; d < NDPU; d++) for (int c = 0; c < 2; c++) begin
      present[d][c] = $urandom_range(0, 15) != 0; down[d][c] = 1'b0;
    end
  endtask

  initial begin
    int ninst = 0;
    new_config();
    repeat (3) @(negedge clk); rst_n = 1;
    `CHECK(idle && icount == 0 && src_down0 == 0 && src_down1 == 0, "reset state");
    while (ninst < 600 || !idle || pend.size() != 0 || srcs.size() != 0) begin
      ent_t nx;
      @(negedge clk);
      nx = e(DXC_NOP_LAST);               // keepers / DXF during tail and jam
      if (pend.size() != 0) begin
        nx = pend.pop_front();
      end else if (nxt_first) begin
        logic [3:0] s;
        n_turns++;
        `CHECK(srcs.size() != 0, "tracker starts a turn the sequence does not have");
        s = srcs.size() != 0 ? srcs.pop_front() : 4'h0;
        `CHECK({nxt_chan, nxt_dpu} == s, "source order");
        `CHECK(nxt_turn == !down[s[2:0]][s[3]], "nxt_turn follows the down list");
        if (present[s[2:0]][s[3]] && !down[s[2:0]][s[3]]) begin
          bit tmo;
          int n;
          tmo = ($urandom_range(0, 24) == 0);
          n = (cur_op[31:28] == OP_RDREG) ? 1 : $urandom_range(0, 12);
          exp_data += queue_block(n, tmo);
          if (tmo) begin
            n_tmo++; down[s[2:0]][s[3]] = 1'b1;
            exp_jam += (cur_op[31:28] == OP_RUNSEQ) ? int'(jams[cur_op[3:0]]) : 1;
          end
          if (pend.size() != 0) nx = pend.pop_front();
        end else begin
          n_missing++; down[s[2:0]][s[3]] = 1'b1;
          exp_jam += (cur_op[31:28] == OP_RUNSEQ) ? int'(jams[cur_op[3:0]]) : 1;
        end
      end else if (idle && !inst_done && ninst < 600) begin
        if (ninst % 8 == 7) begin
          @(posedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
          `CHECK(src_down0 == 0 && src_down1 == 0 && icount == 0, "reset clears down list and count");
          exp_icount = 0; new_config();
        end
        start_instruction(); ninst++;
        nx = pend.pop_front();
      end else if (idle) nx = e(DXC_NOP);
      @(posedge clk);
      cmd <= nx.c; dxd <= nx.d; timeout <= nx.tmo; dest_af <= ($urandom_range(0, 3) == 0);
      #1;
      if (idle && pend.size() == 0) for (int d = 0; d < NDPU; d++) begin
        `CHECK(src_down0[d] == down[d][0] && src_down1[d] == down[d][1], "down list");
      end
    end
    repeat (200) @(negedge clk);
    `CHECK(srcs.size() == 0, "all sources of the last instruction were visited");
    `CHECK(got_data == exp_data, "data write count");
    `CHECK(got_jam == exp_jam, "jam word count");
    `CHECK(got_iw == exp_iw, "instruction word count");
    `CHECK(got_silent == exp_silent, "silent instruction count");
    `CHECK(got_done == exp_done, "completed instruction count");
    `CHECK(icount == 32'(exp_icount), "instruction counter");
    $display("tracker: %0d turns, %0d data words, %0d missing, %0d timeouts, %0d jam words, %0d jam stall cycles",
             n_turns, got_data, n_missing, n_tmo, got_jam, n_stall_jam);
    `CHECK(n_missing > 0 && n_tmo > 0 && n_stall_jam > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
