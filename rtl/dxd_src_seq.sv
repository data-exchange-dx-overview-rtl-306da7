// dxd_src_seq: DPU source sequencer, drives one block onto the DX Front Bus.
//
// When the front bus tracker says the next cycle is this source's turn
// (turn_next), the sequencer decides what to drive. It starts a block only
// when it knows all commands it will issue (document, transfer strategy 3):
// a complete block is in the source FIFO and no destination is almost full.
// Until then it drives nop. A block of n words takes T = max(n,3) cycles:
//   - the first T-n cycles carry no data (nop),
//   - cycle T-3 carries the end-of-source suffix (_end),
//   - cycle T-1 carries the _last suffix.
// So 0 words: nop_end nop nop_last; 2 words: nop_end write write_last;
// 4 words: write write_end write write_last (the protocol table's S1..S4).
// The first command of a turn is therefore never a _last command.
// While a destination is almost full the sequencer inserts nops, both
// before a block and inside it, up to the _end command; once _end is out
// the last two commands follow without a pause (transfer strategy 3: a
// source issues a write only when it knows its next two commands).
// For DX_ReadReg the block is one word, the register value (reg_mode).
// Outputs drive/cmd/data are registered (DXD outputs to the bus are
// registered); pop takes a word from the source FIFO in the cycle the word
// is registered; blk_done retires the block in the same cycle as the
// _last command is registered, so a following turn of the same FIFO
// already sees the next block.
// The document's command table says the last command comes "3 cycles" after
// write_end, while its protocol table shows it 2 cycles later; this design
// follows the protocol table.
module dxd_src_seq
  import dx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        turn_next,
  input  logic        first_next,
  input  logic        reg_mode,
  input  logic [31:0] reg_value,
  input  logic        blk_avail,
  input  logic [8:0]  blk_len,
  input  logic [31:0] head_data,
  input  logic        dest_af,
  output logic        pop,
  output logic        blk_done,
  output logic        drive,
  output dxc_cmd_e    cmd,
  output logic [31:0] data,
  output logic [31:0] words_sent
);
  logic       run, run_n;
  logic [8:0] i, i_n, n, n_n;
  logic       regm, regm_n;
  dxc_cmd_e   cmd_n;
  logic [31:0] data_n;

  always_comb begin
    logic [8:0] t, pad, ii, nn;
    logic       go, rm;
    run_n = run; i_n = i; n_n = n; regm_n = regm; cmd_n = DXC_NOP; data_n = '0;
    pop = 1'b0; blk_done = 1'b0; go = 1'b0; ii = i; nn = n; rm = regm;
    t = '0; pad = '0;
    if (turn_next) begin
      if (first_next || !run) begin
        // new turn, or still waiting for a block
        if (reg_mode) begin go = 1'b1; nn = 9'd1; rm = 1'b1; end
        else if (blk_avail && !dest_af) begin go = 1'b1; nn = blk_len; rm = 1'b0; end
        ii = 9'd0;
        run_n = go; n_n = nn; regm_n = rm;
      end else go = 1'b1;
      if (go) begin
        t   = (nn < 9'd3) ? 9'd3 : nn;
        pad = t - nn;
        if (dest_af && !rm && ii <= t - 9'd3) begin
          cmd_n = DXC_NOP;          // pause: a destination is almost full
        end else begin
          if (ii < pad) begin
            cmd_n = (ii == t - 9'd3) ? DXC_NOP_END : (ii == t - 9'd1) ? DXC_NOP_LAST : DXC_NOP;
          end else begin
            cmd_n = (ii == t - 9'd3) ? DXC_WRITE_END : (ii == t - 9'd1) ? DXC_WRITE_LAST : DXC_WRITE;
            data_n = rm ? reg_value : head_data;
            pop = !rm;
          end
          i_n = ii + 9'd1;
          if (ii == t - 9'd1) begin run_n = 1'b0; blk_done = !rm; end
        end
      end
    end else begin
      run_n = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; i <= '0; n <= '0; regm <= 1'b0; drive <= 1'b0; cmd <= DXC_NOP;
      data <= '0; words_sent <= '0;
    end else begin
      run <= run_n; i <= i_n; n <= n_n; regm <= regm_n;
      drive <= turn_next; cmd <= cmd_n; data <= data_n;
      if (turn_next && is_write(cmd_n)) words_sent <= words_sent + 32'd1;
    end
  end
endmodule
