// dxb_input_seq: DXB input sequencer.
//
// Reads the {tag, data} words that the DXF back end wrote into the DXB Input
// FIFO and, following the instruction stream, decides for each word:
//   ROL FIFO   data destined for the back end (DX_RunSequence data and
//              DX_WriteData parameters with F set and the L bit of
//              DX_SetBackDest set, DX_ReadReg data with the instruction's L
//              bit, DX_ReadRegDXB register words with its L bit), stored
//              with the instruction's K bit as the S-LINK control bit;
//   Trace      words copied into the DX Trace Stream by the trace mode
//              (DX_SetTraceMode / DX_TraceNext, T = N W R B mm mm mm mm:
//              N others, W register writes, R DX_ReadReg, B DX_ReadRegDXB,
//              mm for HPU data not/destined, DPU data not/destined;
//              mm 01 = instruction only or instruction + count word,
//              10 = instruction + parameter/data words).
// Instruction words, count words and register writes never reach the ROL.
// It also executes the back-executed instructions (DX_SetBackDest,
// DX_SetTraceMode, DX_TraceNext, DX_WriteRegDXB, DX_ReadRegDXB) and keeps
// the DXB instruction-access registers: 0 Control, 1 Timeout,
// 2 Status / ResumeTraceFIFO, 3 TM_Status / ReleaseTraceFrame,
// 7 InstructionCount, 8/9 HostFIFO_Count0/1, a/b ROL_FIFO_Count0/1, f Test.
// A count word for a traced DX_RunSequence with F set is computed here and
// sent after the last data word; a register word for DX_ReadRegDXB is sent
// one cycle after its instruction word. Both use an extra cycle without
// popping the input. Outputs to ROL and trace are combinational strobes;
// the input is popped only when both can take a word.
// Status bits kept here: FAULT_INFIFO_INST (illegal opcode) and
// FAULT_INFIFO_FIRST_LAST (a word without an instruction before it).
module dxb_input_seq
  import dx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [39:0] head,
  input  logic        empty,
  output logic        pop,
  input  logic        rol_full,
  output logic        rol_wr,
  output logic [32:0] rol_wdata,
  input  logic        tr_ready,
  output logic        tr_wr,
  output logic        tr_first,
  output logic        tr_end,
  output logic [31:0] tr_data,
  output logic [31:0] timeout_reg,
  output logic        resume_trace,
  output logic        release_frame,
  input  logic [31:0] status_in,
  input  logic [31:0] tm_status,
  output logic [1:0]  fault
);
  dx_tag_t     tag;
  logic [31:0] d, iw, cnt, test_reg, control;
  logic [31:0] icount, hcount [2], rcount [2];
  logic [11:0] tmode, tnext, emode;
  logic        tnext_v, bd_l, have_inst;
  logic        xtra_v;
  logic [31:0] xtra_d;
  logic        xtra_rol, xtra_tr, xtra_end;
  logic        tr_inst, tr_param, tr_data_w, tr_count, rol_dest, cnt_mode;
  logic [3:0]  op;

  assign tag = dx_tag_t'(head[39:32]);
  assign d   = head[31:0];

  // trace decisions for the current instruction iw under mode m
  function automatic logic [3:0] trace_sel(logic [31:0] w, logic [11:0] m);
    // {inst, params, data, count}
    logic [1:0] mm;
    unique case (w[31:28])
      OP_WRREG:    return m[10] ? 4'b1100 : 4'b0000;
      OP_RDREG:    return m[9]  ? 4'b1010 : 4'b0000;
      OP_RDREGDXB: return m[8]  ? 4'b1010 : 4'b0000;
      OP_WRDATA: begin
        mm = w[14] ? m[5:4] : m[7:6];
        return (mm == 2'b01) ? 4'b1000 : (mm == 2'b10) ? 4'b1100 : 4'b0000;
      end
      OP_RUNSEQ: begin
        mm = w[14] ? m[1:0] : m[3:2];
        return (mm == 2'b01) ? 4'b1001 : (mm == 2'b10) ? 4'b1010 : 4'b0000;
      end
      OP_MISC:     return (w[27:24] == MI_WRREGDXB) ? (m[10] ? 4'b1100 : 4'b0000)
                                                    : (m[11] ? 4'b1000 : 4'b0000);
      default:     return m[11] ? 4'b1000 : 4'b0000;
    endcase
  endfunction

  logic [3:0] sel_new, sel_cur;
  logic       is_inst;
  assign is_inst = tag.tt == TT_INSTRUCTION;
  assign op      = d[31:28];
  assign sel_new = trace_sel(d, (op == OP_MISC && d[27:24] == MI_TRACENEXT) ? tmode : (tnext_v ? tnext : tmode));
  assign sel_cur = trace_sel(iw, emode);
  assign {tr_inst, tr_param, tr_data_w, tr_count} = is_inst ? sel_new : sel_cur;
  assign rol_dest = (iw[31:28] == OP_RUNSEQ || iw[31:28] == OP_WRDATA) ? (iw[14] && bd_l)
                  : (iw[31:28] == OP_RDREG) ? iw[25] : 1'b0;
  assign cnt_mode = iw[31:28] == OP_RUNSEQ && iw[14] && sel_cur[0];
  logic  cnt_new;   // a counted DX_RunSequence arriving with no data words
  assign cnt_new  = op == OP_RUNSEQ && d[14] && sel_new[0];

  logic w_rol, w_tr;
  always_comb begin
    w_rol = 1'b0; w_tr = 1'b0;
    if (!is_inst) unique case (tag.tt)
      TT_PARAMETER: begin w_rol = iw[31:28] == OP_WRDATA && rol_dest; w_tr = tr_param; end
      TT_DATA:      begin w_rol = rol_dest; w_tr = tr_data_w; end
      TT_COUNT:     begin w_rol = 1'b0; w_tr = tr_count; end
      default: ;
    endcase
    else w_tr = tr_inst;
  end

  logic can;
  assign can = !rol_full && tr_ready;
  assign pop = !xtra_v && !empty && can;

  always_comb begin
    rol_wr = 1'b0; rol_wdata = '0; tr_wr = 1'b0; tr_data = '0; tr_end = 1'b0; tr_first = 1'b0;
    if (xtra_v && can) begin
      rol_wr = xtra_rol; rol_wdata = {iw[24], xtra_d};
      tr_wr = xtra_tr; tr_data = xtra_d; tr_end = xtra_end;
    end else if (pop) begin
      rol_wr = w_rol; rol_wdata = {is_inst ? d[24] : iw[24], d};
      tr_wr = w_tr; tr_data = d; tr_first = is_inst;
      // end of the traced part of an instruction: its last word, or the
      // instruction word itself when none of the words after it is traced
      tr_end = is_inst ? (tag.last ? !(op == OP_RDREGDXB || cnt_new) : !(|sel_new[2:0]))
                       : (tag.last && !cnt_mode);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iw <= '0; cnt <= '0; tmode <= '0; tnext <= '0; emode <= '0; tnext_v <= 1'b0;
      bd_l <= 1'b0; have_inst <= 1'b0; xtra_v <= 1'b0; xtra_d <= '0;
      xtra_rol <= 1'b0; xtra_tr <= 1'b0; xtra_end <= 1'b0; test_reg <= '0; control <= '0;
      timeout_reg <= '0; icount <= '0; hcount[0] <= '0; hcount[1] <= '0;
      rcount[0] <= '0; rcount[1] <= '0; fault <= '0; resume_trace <= 1'b0; release_frame <= 1'b0;
    end else begin
      resume_trace <= 1'b0; release_frame <= 1'b0;
      if (xtra_v && can) xtra_v <= 1'b0;
      if (rol_wr) begin rcount[0] <= rcount[0] + 32'd1; rcount[1] <= rcount[1] + 32'd1; end
      if (pop) begin
        if (tag.host) begin hcount[0] <= hcount[0] + 32'd1; hcount[1] <= hcount[1] + 32'd1; end
        if (is_inst) begin
          iw <= d; have_inst <= 1'b1; cnt <= '0; icount <= icount + 32'd1;
          if (!(op inside {OP_MISC, OP_RUNSEQ, OP_WRDATA, OP_WRREG, OP_RDREG, OP_RDREGDXB}))
            fault[0] <= 1'b1;
          if (op == OP_MISC) unique case (d[27:24])
            MI_SETBACKDEST: bd_l <= d[0];
            MI_SETTRACE:    tmode <= d[11:0];
            MI_TRACENEXT:   begin tnext <= d[11:0]; tnext_v <= 1'b1; end
            default: ;
          endcase
          if (!(op == OP_MISC && d[27:24] == MI_TRACENEXT)) begin
            emode <= tnext_v ? tnext : tmode; tnext_v <= 1'b0;
          end
          if (tag.last && cnt_new) begin
            xtra_v <= 1'b1; xtra_d <= '0; xtra_rol <= 1'b0; xtra_tr <= 1'b1; xtra_end <= 1'b1;
          end
          if (op == OP_RDREGDXB) begin
            // register word follows the instruction word
            xtra_v <= 1'b1; xtra_rol <= d[25]; xtra_tr <= sel_new[3]; xtra_end <= 1'b1;
          end
        end else begin
          if (!have_inst) fault[1] <= 1'b1;
          if (tag.tt == TT_DATA) cnt <= cnt + 32'd1;
          if (tag.tt == TT_PARAMETER && iw[31:28] == OP_MISC && iw[27:24] == MI_WRREGDXB) begin
            unique case (iw[3:0])
              4'h0: control <= d;
              4'h1: timeout_reg <= d;
              4'h2: resume_trace <= 1'b1;
              4'h3: release_frame <= 1'b1;
              4'h7: icount <= d;
              4'h8: hcount[0] <= d;
              4'h9: hcount[1] <= d;
              4'hA: rcount[0] <= d;
              4'hB: rcount[1] <= d;
              4'hF: test_reg <= d;
              default: ;
            endcase
          end
          if (tag.last && cnt_mode) begin
            xtra_v <= 1'b1; xtra_d <= cnt + 32'(tag.tt == TT_DATA); xtra_rol <= 1'b0;
            xtra_tr <= 1'b1; xtra_end <= 1'b1;
          end
        end
      end
      if (pop && is_inst && op == OP_RDREGDXB) xtra_d <= reg_rd_next(d);
      if (xtra_v && can && iw[31:28] == OP_RDREGDXB && iw[3:0] == 4'hF) test_reg <= test_reg + 32'd1;
    end
  end

  // value of DXB register d[3:0] as seen by the instruction in d
  function automatic logic [31:0] reg_rd_next(logic [31:0] w);
    unique case (w[3:0])
      4'h0: return control;
      4'h1: return timeout_reg;
      4'h2: return status_in;
      4'h3: return tm_status;
      4'h7: return icount;
      4'h8: return hcount[0];
      4'h9: return hcount[1];
      4'hA: return rcount[0];
      4'hB: return rcount[1];
      4'hF: return test_reg;
      default: return '0;
    endcase
  endfunction
endmodule
