// tb_fig2_xform: test of the single-destination transformation example.
//
// A reference model in the testbench tracks the four flip-flops, the
// "changed this cycle" flag of a and the metastable flags of b and y, and
// evaluates y's violation condition by hand in three-valued terms: with
// c = 0 nothing reaches y, with c = 1 an unknown a (just changed) or b
// (metastable) reaches y unless the other OR input is a known 1. Random
// ticks, inputs and random bits are applied for 5000 cycles; y's V, b's V,
// and all Q values are compared every cycle. The test also counts that a
// violation of y occurred, that c = 0 masked a hazard, and that a hazard
// was masked by a known 1 on the other OR input.
`timescale 1ns/1ps
module tb_fig2_xform;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_a, ce_b, a_in, c_in;
  logic [7:0] rnd;
  logic a_q, b_q, c_q, y_q;
  logic [3:0] viol, meta;
  int checks = 0, failures = 0;
  int n_yviol = 0, n_mask_c = 0, n_mask_or = 0, n_bviol = 0;

  fig2_xform dut (.clk, .rst_n, .ce_a, .ce_b, .a_in, .c_in, .rnd,
                  .a_q, .b_q, .c_q, .y_q, .viol, .meta);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic a_r, b_r, c_r, y_r, a_chg, b_meta, y_meta;
  logic a_unk, b_unk, yv, hazard;

  initial begin
    ce_a = 0; ce_b = 0; a_in = 0; c_in = 0; rnd = 0;
    a_r = 0; b_r = 0; c_r = 0; y_r = 0; a_chg = 0; b_meta = 0; y_meta = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      ce_a = $urandom % 2;
      ce_b = $urandom % 2;
      a_in = $urandom;
      c_in = ($urandom % 3) != 0;
      rnd  = 8'($urandom);
      #1;
      // expected violation of y before this edge
      a_unk  = a_chg;
      b_unk  = b_meta;
      hazard = a_unk || b_unk;
      yv     = c_r && hazard && !(!a_unk && a_r) && !(!b_unk && b_r);
      check(viol[3] == yv, "y violation");
      check(viol[1] == a_chg, "b violation");
      check(meta[1] == b_meta && meta[3] == y_meta, "metastable flags");
      if (ce_b && yv) n_yviol++;
      if (ce_b && hazard && !c_r) n_mask_c++;
      if (ce_b && hazard && c_r && !yv) n_mask_or++;
      if (ce_b && a_chg) n_bviol++;
      // reference update
      if (ce_b) begin
        if (yv) begin y_r = rnd[6]; y_meta = rnd[7]; end
        else begin y_r = (a_r | b_r) & c_r; y_meta = 0; end
        if (a_chg) begin b_r = rnd[2]; b_meta = rnd[3]; end
        else begin b_r = a_r; b_meta = 0; end
        c_r = c_in;
      end
      if (ce_a) begin
        a_chg = a_in != a_r;
        a_r   = a_in;
      end else begin
        a_chg = 0;
      end
      @(posedge clk);
      #1;
      check(a_q == a_r && b_q == b_r && c_q == c_r && y_q == y_r, "Q values");
    end
    check(n_yviol > 0, "y violated");
    check(n_mask_c > 0, "hazard masked by c = 0");
    check(n_mask_or > 0, "hazard masked by known 1");
    check(n_bviol > 0, "b violated");
    $display("y_viol=%0d mask_c=%0d mask_or=%0d b_viol=%0d", n_yviol, n_mask_c, n_mask_or, n_bviol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
