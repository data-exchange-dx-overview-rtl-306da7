// tb_dxd_int_prio: self-checking test of the DMA interrupt selection.
// Random combinations of all request and veto inputs are applied; an
// independent reference (a scored ranking over the five request classes,
// FIFO 0 before FIFO 1) predicts the single registered request line.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_dxd_int_prio;
  logic clk = 0, rst_n = 0, srce_en, dest_en, ep_pending;
  logic [1:0] dx_needs_srce, dx_needs_dest, srce_incmplt, dest_pres, srce_lhf, srce_full, dest_empty;
  logic [3:0] req, expect_req;
  int checks = 0, failures = 0;
  int hits[5] = '{default: 0};
  dxd_int_prio dut (.*);
  always #5 clk = ~clk;
  initial begin #20_000_000; `CHECK(0, "watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // reference: lowest score wins; score = class*2 + fifo
  function automatic logic [3:0] ref_req(output int cls);
    int best; logic [3:0] r;
    best = 99; r = 0; cls = -1;
    if (ep_pending) return 0;
    for (int f = 0; f < 2; f++) begin
      logic sok, dok;
      sok = srce_en && !srce_full[f]; dok = dest_en && !dest_empty[f];
      if (dx_needs_srce[f] && sok && 0 * 2 + f < best) begin best = 0 * 2 + f; r = 4'(1 << f); end
      if (dx_needs_dest[f] && dok && 1 * 2 + f < best) begin best = 1 * 2 + f; r = 4'(4 << f); end
      if (srce_incmplt[f]  && sok && 2 * 2 + f < best) begin best = 2 * 2 + f; r = 4'(1 << f); end
      if (dest_pres[f]     && dok && 3 * 2 + f < best) begin best = 3 * 2 + f; r = 4'(4 << f); end
      if (srce_lhf[f]      && sok && 4 * 2 + f < best) begin best = 4 * 2 + f; r = 4'(1 << f); end
    end
    if (best != 99) cls = best / 2;
    return r;
  endfunction
  initial begin
    int cls;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      {srce_en, dest_en} = ($urandom_range(3) == 0) ? 2'($urandom) : 2'b11;
      ep_pending = ($urandom_range(7) == 0);
      dx_needs_srce = 2'($urandom & $urandom); dx_needs_dest = 2'($urandom & $urandom);
      srce_incmplt = 2'($urandom); dest_pres = 2'($urandom); srce_lhf = 2'($urandom);
      srce_full = 2'($urandom & $urandom); dest_empty = 2'($urandom & $urandom);
      expect_req = ref_req(cls);
      if (cls >= 0) hits[cls]++;
      @(negedge clk);
      `CHECK(req == expect_req, "selected interrupt");
      `CHECK($countones(req) <= 1, "at most one request");
    end
    foreach (hits[i]) `CHECK(hits[i] > 50, "every priority class selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
