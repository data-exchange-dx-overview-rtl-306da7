// dx_front_tracker: follows the DX Front Bus and keeps every device in step.
//
// Every device on a DX Front Bus (the DXF FPGA and each DXD FPGA) holds one
// copy of this tracker and feeds it the bus values it samples each DX_CLK.
// Because all copies see the same DXC/DXD values and hold the same register
// files, they all reach the same conclusions in the same cycle: whose turn
// it is to drive, which word is a destination write, when a source is
// missing and jam words must be pushed. This is how the document's "all DXF
// devices do the following" is met without extra signalling.
//
// Phases of one instruction (document's bus protocol tables):
//   IDLE  write_inst_first starts an instruction; nop_end alone marks an
//         instruction for the other side (counted, nothing else happens).
//   INST  write_inst carries the remaining Ni-1 words (nops may be mixed in).
//   TAIL  two cycles (nop, nop_last) driven by the DXF.
//   SRC   one source turn per source of a DX_RunSequence (sequence
//         register nibbles Sddd, 0xF ends the list) or per s bit of a
//         DX_ReadReg. write/write_end/write_last carry data; a _last command
//         ends the turn. A _last command in the first cycle of a turn means
//         nobody drives (DXC keepers hold the previous _last): the source is
//         missing and is put on the down list.
//   JAM   after a missing or timed-out source: JamCount[Q] jam words (one
//         word for DX_ReadReg, an assumption) are pushed to the current
//         destinations, then the tracker waits for dest_af to clear and
//         moves to the next source.
// Outputs inst_wr/data_wr/jam_wr are combinational decodes of the current
// bus cycle; nxt_* give the next cycle's driver so that a source can
// register its first command in time. Timeout comes from dx_timebase,
// which counts while tmo_run is high (source turn without a write).
module dx_front_tracker
  import dx_pkg::*;
#(
  parameter int unsigned NDPU = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dxc_cmd_e    cmd,
  input  logic [31:0] dxd,
  // register file view (sequence, jam count at index q)
  output logic [3:0]  q,
  input  logic [31:0] seq_word,
  input  logic [7:0]  jam_count,
  input  logic        timeout,
  output logic        tmo_run,
  input  logic        dest_af,
  input  logic        icount_wr,
  input  logic [31:0] icount_wdata,
  // decoded bus activity
  output logic        idle,
  output logic [31:0] iword,
  output logic        inst_wr,
  output logic [8:0]  inst_idx,
  output logic        data_wr,
  output logic        jam_wr,
  output logic        inst_done,
  output logic        silent_inst,
  output logic [2:0]  cur_dpu,
  output logic        cur_chan,
  output logic        in_src,
  // next cycle's source turn
  output logic        nxt_turn,
  output logic [2:0]  nxt_dpu,
  output logic        nxt_chan,
  output logic        nxt_first,
  // status
  output logic [NDPU-1:0] src_down0,
  output logic [NDPU-1:0] src_down1,
  output logic [31:0] icount,
  output logic        proto_err
);
  typedef enum logic [2:0] {T_IDLE, T_INST, T_TAIL, T_SRC, T_JAM} tstate_e;
  tstate_e st, st_n;
  logic [8:0] left, left_n;
  logic       tail, tail_n;
  logic [3:0] idx, idx_n;
  logic       first, first_n;
  logic [7:0] jleft, jleft_n;
  logic [2:0] dpu_n;
  logic       chan_n;
  logic [31:0] iword_n;
  logic        mark_down;

  // next source at or after index k
  typedef struct packed { logic found; logic [3:0] idx; logic [2:0] dpu; logic chan; } src_t;
  function automatic src_t find_src(logic [31:0] iw, logic [31:0] sw, logic [3:0] k);
    src_t r;
    r = '0;
    if (iw[31:28] == OP_RUNSEQ) begin
      for (int j = 7; j >= 0; j--) begin
        if (4'(j) >= k && sw[4*j +: 4] != 4'hF) begin
          r.found = 1'b1; r.idx = 4'(j); r.dpu = sw[4*j +: 3]; r.chan = sw[4*j+3];
        end else if (4'(j) >= k) begin
          r = '0;  // 0xF ends the list: nothing at or beyond it counts
        end
      end
    end else if (iw[31:28] == OP_RDREG) begin
      for (int j = NDPU-1; j >= 0; j--) begin
        if (4'(j) >= k && iw[8+j]) begin
          r.found = 1'b1; r.idx = 4'(j); r.dpu = 3'(j); r.chan = 1'b0;
        end
      end
    end
    return r;
  endfunction

  function automatic logic is_down(logic [NDPU-1:0] d0, logic [NDPU-1:0] d1, logic [2:0] d, logic c);
    if (int'(d) >= NDPU) return 1'b1;
    return c ? d1[d] : d0[d];
  endfunction

  assign q = (iword[31:28] == OP_RUNSEQ) ? iword[3:0] : 4'd0;
  assign idle = (st == T_IDLE);
  assign in_src = (st == T_SRC);
  assign tmo_run = (st == T_SRC) && !is_write(cmd);

  always_comb begin
    src_t s;
    st_n = st; left_n = left; tail_n = tail; idx_n = idx; first_n = 1'b0;
    jleft_n = jleft; dpu_n = cur_dpu; chan_n = cur_chan; iword_n = iword;
    inst_wr = 1'b0; inst_idx = '0; data_wr = 1'b0; jam_wr = 1'b0;
    inst_done = 1'b0; silent_inst = 1'b0; proto_err = 1'b0; mark_down = 1'b0;
    s = '0;
    unique case (st)
      T_IDLE: begin
        if (cmd == DXC_WR_INST_FIRST) begin
          inst_wr = 1'b1; inst_idx = '0; iword_n = dxd;
          if (inst_len(dxd) > 9'd1) begin st_n = T_INST; left_n = inst_len(dxd) - 9'd1; end
          else begin st_n = T_TAIL; tail_n = 1'b0; end
        end else if (cmd == DXC_NOP_END) begin
          silent_inst = 1'b1;
        end else if (cmd != DXC_NOP && cmd != DXC_NOP_LAST) begin
          proto_err = 1'b1;
        end
      end
      T_INST: begin
        if (cmd == DXC_WR_INST) begin
          inst_wr = 1'b1; inst_idx = inst_len(iword) - left;
          left_n = left - 9'd1;
          if (left == 9'd1) begin st_n = T_TAIL; tail_n = 1'b0; end
        end else if (cmd != DXC_NOP) begin
          proto_err = 1'b1;
        end
      end
      T_TAIL: begin
        if (cmd != (tail ? DXC_NOP_LAST : DXC_NOP)) proto_err = 1'b1;
        tail_n = 1'b1;
        if (tail) begin
          s = find_src(iword, seq_word, 4'd0);
          if (s.found) begin
            st_n = T_SRC; idx_n = s.idx; dpu_n = s.dpu; chan_n = s.chan; first_n = 1'b1;
          end else begin
            st_n = T_IDLE; inst_done = 1'b1;
          end
        end
      end
      T_SRC: begin
        if ((first && is_last(cmd)) || timeout) begin
          mark_down = 1'b1;
          st_n = T_JAM;
          jleft_n = (iword[31:28] == OP_RUNSEQ) ? jam_count : 8'd1;
        end else begin
          data_wr = is_write(cmd);
          if (is_last(cmd)) begin
            s = find_src(iword, seq_word, idx + 4'd1);
            if (s.found) begin
              idx_n = s.idx; dpu_n = s.dpu; chan_n = s.chan; first_n = 1'b1;
            end else begin
              st_n = T_IDLE; inst_done = 1'b1;
            end
          end
        end
      end
      T_JAM: begin
        if (jleft != 8'd0) begin
          if (!dest_af) begin jam_wr = 1'b1; jleft_n = jleft - 8'd1; end
        end else if (!dest_af) begin
          s = find_src(iword, seq_word, idx + 4'd1);
          if (s.found) begin
            st_n = T_SRC; idx_n = s.idx; dpu_n = s.dpu; chan_n = s.chan; first_n = 1'b1;
          end else begin
            st_n = T_IDLE; inst_done = 1'b1;
          end
        end
      end
      default: st_n = T_IDLE;
    endcase
  end

  assign nxt_first = first_n;
  assign nxt_dpu   = dpu_n;
  assign nxt_chan  = chan_n;
  assign nxt_turn  = (st_n == T_SRC) && !is_down(src_down0, src_down1, dpu_n, chan_n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; left <= '0; tail <= 1'b0; idx <= '0; first <= 1'b0; jleft <= '0;
      cur_dpu <= '0; cur_chan <= 1'b0; iword <= '0; icount <= '0;
      src_down0 <= '0; src_down1 <= '0;
    end else begin
      st <= st_n; left <= left_n; tail <= tail_n; idx <= idx_n; first <= first_n;
      jleft <= jleft_n; cur_dpu <= dpu_n; cur_chan <= chan_n; iword <= iword_n;
      if (icount_wr) icount <= icount_wdata;
      else if ((st == T_IDLE) && (cmd == DXC_WR_INST_FIRST || cmd == DXC_NOP_END)) icount <= icount + 32'd1;
      if (mark_down && int'(cur_dpu) < NDPU) begin
        if (cur_chan) src_down1[cur_dpu] <= 1'b1;
        else          src_down0[cur_dpu] <= 1'b1;
      end
    end
  end
endmodule
