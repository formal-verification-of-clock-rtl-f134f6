// tb_cdc_full: one complete operation of cdc_top at its default parameters
// (8-bit data, both synchronizers, 4-bit counters, 8-bit configuration).
//
// Both domains tick every base cycle, which is the most hostile timing for
// the processed netlist: every transition collides with the other domain's
// tick. Three items are pushed through the source and the processed
// netlists, with random bits for the model flip-flops; each must arrive
// with its data, busy must stay high for the whole round trip, and no
// monitor may report an error. Then each small crossing circuit is stepped
// a few times and must settle to the domain-A value; the configuration is
// written while disabled and must be copied once enabled.
`timescale 1ns/1ps
module tb_cdc_full;
  import hs_pkg::*;

  localparam int W = 8, XN = 4, XNQ = 8;
  localparam int RW = 4 * (4 + W);
  localparam int XRW = 12*XN + 4*XNQ + 8*XN + 2 + 16 + 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_s = 1'b1, ce_r = 1'b1;
  logic src_send = 0, prc_send = 0, src_busy, prc_busy, src_valid, prc_valid;
  logic [W-1:0] src_din = 0, prc_din = 0, src_dout, prc_dout;
  logic [RW-1:0] prc_rnd = 0;
  hs_err_t src_err, prc_err;
  logic [31:0] src_nv, prc_nv;
  logic [RW/2-1:0] prc_viol, prc_meta;
  logic [3:0] f2_q, f2_viol, f2_meta;
  logic [XRW-1:0] xb_rnd = 0;
  logic xb_cnt_inc = 0, xb_cfg_we = 0, xb_cfg_en = 0, xb_mux_inc0 = 0, xb_mux_inc1 = 0;
  logic xb_mux_sel_in = 0, xb_comb_step = 0, xb_rc_step = 0;
  logic [XNQ-1:0] xb_cfg_in = 0, xb_cfg_a, xb_cfg_b;
  logic [1:0][XN-1:0] xb_cnt_a, xb_cnt_b, xb_mux_cnt_a;
  logic xb_mux_sel;
  logic [XN-1:0] xb_mux_cnt_b;
  logic [1:0][1:0] xb_comb_a, xb_rc_s_a, xb_rc_s_b;
  logic [1:0] xb_comb_f_a, xb_comb_y;
  logic [7:0] xb_viol;
  int checks = 0, failures = 0, n_viol = 0;

  cdc_top dut (
    .clk, .rst_n, .ce_s, .ce_r,
    .src_send, .src_data_in(src_din), .src_busy, .src_valid, .src_data_out(src_dout),
    .src_err, .src_n_valid(src_nv),
    .prc_send, .prc_data_in(prc_din), .prc_rnd, .prc_busy, .prc_valid,
    .prc_data_out(prc_dout), .prc_err, .prc_n_valid(prc_nv), .prc_viol, .prc_meta,
    .f2_ce_a(1'b1), .f2_ce_b(1'b1), .f2_a_in(1'b0), .f2_c_in(1'b0), .f2_rnd(8'h00),
    .f2_q, .f2_viol, .f2_meta,
    .xb_rnd, .xb_cnt_inc, .xb_cnt_a, .xb_cnt_b, .xb_cfg_we, .xb_cfg_in, .xb_cfg_en,
    .xb_cfg_a, .xb_cfg_b, .xb_mux_inc0, .xb_mux_inc1, .xb_mux_sel_in, .xb_mux_cnt_a,
    .xb_mux_sel, .xb_mux_cnt_b, .xb_comb_step, .xb_comb_a, .xb_comb_f_a, .xb_comb_y,
    .xb_rc_step, .xb_rc_s_a, .xb_rc_s_b, .xb_viol_any(xb_viol));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    prc_rnd = {$urandom, $urandom, $urandom};
    for (int j = 0; j < XRW; j += 32) xb_rnd[j +: 32] = $urandom;
    if (prc_viol != 0) n_viol++;
  end

  task automatic transfer(input logic [W-1:0] val);
    int n_busy = 0;
    logic got_s = 0, got_p = 0;
    @(negedge clk);
    src_send = 1; prc_send = 1; src_din = val; prc_din = val;
    @(negedge clk);
    src_send = 0; prc_send = 0;
    for (int c = 0; c < 40; c++) begin
      if (src_valid) begin got_s = 1; check(src_dout == val, "source data"); end
      if (prc_valid) begin got_p = 1; check(prc_dout == val, "processed data"); end
      if (prc_busy) n_busy++;
      @(negedge clk);
    end
    check(got_s && got_p, "both netlists delivered");
    check(n_busy >= 12, "busy for the whole four-phase round trip");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    transfer(8'hA5);
    transfer(8'h3C);
    transfer(8'hF0);
    check(src_err == '0 && prc_err == '0, "no property violated");
    check(src_nv == 3 && prc_nv == 3, "three items each");
    check(n_viol > 0, "synchronizer violations were modelled");
    // crossing circuits
    @(negedge clk);
    xb_cfg_we = 1; xb_cfg_in = 8'h96;
    @(negedge clk);
    xb_cfg_we = 0;
    repeat (3) begin
      xb_cnt_inc = 1; xb_mux_inc0 = 1; xb_mux_inc1 = 1; xb_comb_step = 1; xb_rc_step = 1;
      @(negedge clk);
      xb_cnt_inc = 0; xb_mux_inc0 = 0; xb_mux_inc1 = 0; xb_comb_step = 0; xb_rc_step = 0;
      repeat (5) @(negedge clk);
    end
    xb_cfg_en = 1;
    repeat (6) @(negedge clk);
    check(xb_cnt_a[0] == 3 && xb_cnt_a[1] == 3, "counters advanced");
    check(xb_cnt_b[0] == 3 && xb_cnt_b[1] == 3, "counters crossed");
    check(xb_mux_cnt_b == xb_mux_cnt_a[0], "multiplexed counter crossed");
    check(xb_cfg_b == 8'h96, "configuration copied");
    check(xb_comb_y == xb_comb_f_a, "gate outputs crossed");
    check(xb_rc_s_b == xb_rc_s_a, "reconverging states crossed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
