// tb_cdc_top: the synchronizer study on the complete top.
//
// Four copies of cdc_top run side by side, one per synchronizer
// configuration (none, sender only, receiver only, both). In each copy the
// source netlist and the processed netlist get their own random traffic:
// an item with random data whenever the sender is idle. Both domains tick at
// random base cycles and all random bits of the model flip-flops are fresh
// every cycle, which stands in for the free inputs a formal tool would
// explore. At the end the testbench prints, per configuration and property,
// whether a violation was seen, and checks:
//   * the source netlist never violates a property, in any configuration
//     (ordinary flip-flops cannot show a crossing failure);
//   * the processed netlist with both synchronizers never violates one;
//   * the processed netlist of each of the other three configurations
//     violates at least one property, i.e. the missing synchronizer is found,
//     and each configuration gives the verdicts recorded in PRC_EXPECT
//     (traffic pauses for longer than BOUND now and then, so that a lost
//     valid shows up as a blocked transfer);
//   * timing violations, metastable flip-flops and delivered items occurred
//     in every copy, and the single-destination example saw a violation of y;
//   * in the small crossing circuits, every circuit except the quasi-static
//     configuration saw violations, the XOR crossing captured a glitch, the
//     simultaneous reconvergence showed a state A never had, the binary
//     counter was seen jumping while the Gray counter never was.
`timescale 1ns/1ps
module tb_cdc_top;
  import hs_pkg::*;

  localparam int W = 8;
  localparam int RW = 4 * (4 + W);
  localparam int NCYC = 200000;
  bit quiet;
  // verdicts seen for the processed netlist, {correct, blocked, handshake},
  // 1 = violated; index = sender sync + 2 * receiver sync
  localparam hs_err_t PRC_EXPECT [4] = '{3'b111, 3'b110, 3'b101, 3'b000};

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_s, ce_r;
  int checks = 0, failures = 0;

  logic [3:0] src_send, src_busy, src_valid, prc_send, prc_busy, prc_valid;
  logic [W-1:0] src_din [4], src_dout [4], prc_din [4], prc_dout [4];
  logic [RW-1:0] prc_rnd [4];
  hs_err_t src_err [4], prc_err [4];
  logic [31:0] src_nv [4], prc_nv [4];
  logic [RW/2-1:0] prc_viol [4], prc_meta [4];
  logic [3:0] f2_q [4], f2_viol [4], f2_meta [4];
  logic f2_ce_a, f2_a_in, f2_c_in;
  logic [7:0] f2_rnd;
  int n_viol [4], n_meta [4], n_f2_viol;

  // crossing circuits (same stimulus in every copy)
  localparam int XN = 4, XNQ = 8;
  localparam int XRW = 12*XN + 4*XNQ + 8*XN + 2 + 16 + 32;
  logic [XRW-1:0] xb_rnd;
  logic xb_cnt_inc, xb_cfg_we, xb_cfg_en, xb_mux_inc0, xb_mux_inc1, xb_mux_sel_in;
  logic xb_comb_step, xb_rc_step;
  logic [XNQ-1:0] xb_cfg_in;
  logic [1:0][XN-1:0] xb_cnt_a [4], xb_cnt_b [4], xb_mux_cnt_a [4];
  logic [XNQ-1:0] xb_cfg_a [4], xb_cfg_b [4];
  logic xb_mux_sel [4];
  logic [XN-1:0] xb_mux_cnt_b [4];
  logic [1:0][1:0] xb_comb_a [4], xb_rc_s_a [4], xb_rc_s_b [4];
  logic [1:0] xb_comb_f_a [4], xb_comb_y [4];
  logic [7:0] xb_viol [4];
  int n_xb_viol [8];
  int rx_ticks = 0;
  int n_glitch = 0, n_reconv = 0, n_bin_bad = 0, n_gray_bad = 0;

  for (genvar k = 0; k < 4; k++) begin : g_cfg
    cdc_top #(.DATA_W(W), .SENDER_SYNC(k[0]), .RECEIVER_SYNC(k[1]), .BOUND(400)) dut (
      .clk, .rst_n, .ce_s, .ce_r,
      .src_send(src_send[k]), .src_data_in(src_din[k]), .src_busy(src_busy[k]),
      .src_valid(src_valid[k]), .src_data_out(src_dout[k]), .src_err(src_err[k]),
      .src_n_valid(src_nv[k]),
      .prc_send(prc_send[k]), .prc_data_in(prc_din[k]), .prc_rnd(prc_rnd[k]),
      .prc_busy(prc_busy[k]), .prc_valid(prc_valid[k]), .prc_data_out(prc_dout[k]),
      .prc_err(prc_err[k]), .prc_n_valid(prc_nv[k]),
      .prc_viol(prc_viol[k]), .prc_meta(prc_meta[k]),
      .f2_ce_a, .f2_ce_b(ce_r), .f2_a_in, .f2_c_in, .f2_rnd,
      .f2_q(f2_q[k]), .f2_viol(f2_viol[k]), .f2_meta(f2_meta[k]),
      .xb_rnd, .xb_cnt_inc, .xb_cnt_a(xb_cnt_a[k]), .xb_cnt_b(xb_cnt_b[k]),
      .xb_cfg_we, .xb_cfg_in, .xb_cfg_en, .xb_cfg_a(xb_cfg_a[k]), .xb_cfg_b(xb_cfg_b[k]),
      .xb_mux_inc0, .xb_mux_inc1, .xb_mux_sel_in, .xb_mux_cnt_a(xb_mux_cnt_a[k]),
      .xb_mux_sel(xb_mux_sel[k]), .xb_mux_cnt_b(xb_mux_cnt_b[k]),
      .xb_comb_step, .xb_comb_a(xb_comb_a[k]), .xb_comb_f_a(xb_comb_f_a[k]),
      .xb_comb_y(xb_comb_y[k]), .xb_rc_step, .xb_rc_s_a(xb_rc_s_a[k]),
      .xb_rc_s_b(xb_rc_s_b[k]), .xb_viol_any(xb_viol[k]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 4; k++) begin
      if (prc_viol[k] != 0) n_viol[k]++;
      if (prc_meta[k] != 0) n_meta[k]++;
    end
    if (f2_viol[0][3]) n_f2_viol++;
    for (int j = 0; j < 8; j++) if (xb_viol[0][j]) n_xb_viol[j]++;
    if (xb_comb_y[0][0]) n_glitch++;
    if (xb_rc_s_b[0][0] == 2'b00 || xb_rc_s_b[0][0] == 2'b11) n_reconv++;
    // a counter seen in B may lag A by a few counts, never lead it or jump
    if (4'(xb_cnt_a[0][0] - xb_cnt_b[0][0]) > 4'd6) n_bin_bad++;
    if (4'(xb_cnt_a[0][1] - xb_cnt_b[0][1]) > 4'd6) n_gray_bad++;
  end

  initial begin
    ce_s = 0; ce_r = 0; f2_ce_a = 0; f2_a_in = 0; f2_c_in = 0; f2_rnd = 0;
    src_send = 0; prc_send = 0;
    for (int k = 0; k < 4; k++) begin
      src_din[k] = 0; prc_din[k] = 0; prc_rnd[k] = 0; n_viol[k] = 0; n_meta[k] = 0;
    end
    n_f2_viol = 0;
    for (int j = 0; j < 8; j++) n_xb_viol[j] = 0;
    xb_rnd = '0; xb_cnt_inc = 0; xb_cfg_we = 0; xb_cfg_en = 0; xb_cfg_in = 0;
    xb_mux_inc0 = 0; xb_mux_inc1 = 0; xb_mux_sel_in = 0; xb_comb_step = 0; xb_rc_step = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      @(negedge clk);
      ce_s    = ($urandom % 3) != 0;
      ce_r    = ($urandom % 2) != 0;
      f2_ce_a = $urandom;
      f2_a_in = $urandom;
      f2_c_in = $urandom;
      f2_rnd  = 8'($urandom);
      for (int j = 0; j < XRW; j += 32) xb_rnd[j +: 32] = $urandom;
      // a Gray code only crosses safely if it moves at most once per
      // receiver period: step the counters only after two receiver ticks
      xb_cnt_inc   = ce_s && (rx_ticks >= 2) && ($urandom % 4 == 0);
      if (xb_cnt_inc) rx_ticks = 0;
      if (ce_r) rx_ticks++;
      xb_mux_inc0  = ($urandom % 4) == 0;
      xb_mux_inc1  = ($urandom % 5) == 0;
      if ($urandom % 500 == 0) xb_mux_sel_in = ~xb_mux_sel_in;
      xb_comb_step = ($urandom % 6) == 0;
      xb_rc_step   = ($urandom % 6) == 0;
      // configuration: written only while its user is disabled
      xb_cfg_we = 1'b0;
      if (i % 2000 == 0)  xb_cfg_en = 1'b0;
      if (i % 2000 == 50) begin xb_cfg_we = 1'b1; xb_cfg_in = XNQ'($urandom); end
      if (i % 2000 == 100) xb_cfg_en = 1'b1;
      // traffic pauses for longer than BOUND now and then, so that an item
      // whose valid was lost is not covered by the valid of a later item
      quiet = (i % 5000) >= 4400;
      for (int k = 0; k < 4; k++) begin
        prc_rnd[k] = {$urandom, $urandom};
        src_send[k] = ce_s && !quiet && !src_busy[k] && ($urandom % 4 == 0);
        if (src_send[k]) src_din[k] = W'($urandom);
        prc_send[k] = ce_s && !quiet && !prc_busy[k] && ($urandom % 4 == 0);
        if (prc_send[k]) prc_din[k] = W'($urandom);
      end
    end
    @(negedge clk);
    src_send = 0; prc_send = 0;
    xb_cnt_inc = 0; xb_mux_inc0 = 0; xb_mux_inc1 = 0; xb_comb_step = 0; xb_rc_step = 0;
    ce_s = 1; ce_r = 1;
    repeat (20) @(negedge clk);
    $display("config          source(corr,blk,hs)  processed(corr,blk,hs)  items(src,prc)  viol_cycles meta_cycles");
    for (int k = 0; k < 4; k++) begin
      $display("snd=%0d rcv=%0d        %b%b%b                  %b%b%b                    %0d,%0d   %0d %0d",
        k % 2, k / 2,
        src_err[k].correct_transfer, src_err[k].no_blocked_transfer, src_err[k].sender_handshake,
        prc_err[k].correct_transfer, prc_err[k].no_blocked_transfer, prc_err[k].sender_handshake,
        src_nv[k], prc_nv[k], n_viol[k], n_meta[k]);
      check(src_err[k] == '0, $sformatf("source netlist config %0d passes", k));
      if (k == 3) check(prc_err[k] == '0, "processed netlist with both synchronizers passes");
      else        check(prc_err[k] != '0, $sformatf("processed netlist config %0d fails", k));
      check(prc_err[k] == PRC_EXPECT[k], $sformatf("processed netlist config %0d verdicts", k));
      check(src_nv[k] > 100, "source items delivered");
      check(prc_nv[k] > 0, "processed items delivered");
      check(n_viol[k] > 0, "timing violations happened");
      check(n_meta[k] > 0, "metastable flip-flops happened");
    end
    check(prc_nv[3] > 100, "processed items delivered with both synchronizers");
    check(n_f2_viol > 0, "single-destination example violated");
    for (int j = 0; j < 8; j++)
      if (j != 2) check(n_xb_viol[j] > 0, $sformatf("crossing circuit %0d violated", j));
    check(n_xb_viol[2] == 0, "quasi-static configuration never violated");
    check(xb_cfg_b[0] == xb_cfg_a[0], "configuration copied");
    check(n_glitch > 0, "glitch behind XOR captured");
    check(n_reconv > 0, "reconvergence state seen");
    check(n_gray_bad == 0, "Gray counter never jumps");
    check(n_bin_bad > 0, "binary counter corrupted");
    $display("crossing circuits: viol=%p glitch=%0d reconv=%0d gray_bad=%0d bin_bad=%0d",
             n_xb_viol, n_glitch, n_reconv, n_gray_bad, n_bin_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
