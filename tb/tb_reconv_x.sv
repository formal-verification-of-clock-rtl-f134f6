// tb_reconv_x: reconvergence of two separately synchronized signals.
//
// Two copies step their domain-A state at the same random times: one moves
// both bits at once (01 <-> 10), the other one bit at a time (Gray walk).
// Every cycle the state registered in domain B must be a state A held within
// the last HIST base cycles. The one-bit-at-a-time copy must never break
// this; the simultaneous copy must break it at least once (B sees 00 or
// 11). Both must see synchronizer violations and settle to A's state once
// the steps stop.
`timescale 1ns/1ps
module tb_reconv_x;
  localparam int HIST = 24;
  localparam int NCYC = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_a, ce_b, step;
  logic [15:0] rnd_s, rnd_o;
  logic [1:0] sa_s, sb_s, sa_o, sb_o;
  logic [3:0] viol_s, meta_s, viol_o, meta_o;
  int checks = 0, failures = 0;
  int n_bad_sim = 0, n_viol = 0;

  reconv_x #(.ONE_AT_A_TIME(1'b0)) u_sim (.clk, .rst_n, .ce_a, .ce_b, .step, .rnd(rnd_s),
      .s_a(sa_s), .s_b(sb_s), .viol(viol_s), .meta(meta_s));
  reconv_x #(.ONE_AT_A_TIME(1'b1)) u_one (.clk, .rst_n, .ce_a, .ce_b, .step, .rnd(rnd_o),
      .s_a(sa_o), .s_b(sb_o), .viol(viol_o), .meta(meta_o));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 5000) @(posedge clk);
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

  logic [1:0] hist_s [$], hist_o [$];

  always @(posedge clk) if (rst_n) begin
    #1;
    hist_s.push_back(sa_s);
    hist_o.push_back(sa_o);
    if (hist_s.size() > HIST) void'(hist_s.pop_front());
    if (hist_o.size() > HIST) void'(hist_o.pop_front());
    check(sb_o inside {hist_o}, "one-bit-at-a-time state seen in B was held by A");
    check(sa_s == 2'b01 || sa_s == 2'b10, "simultaneous copy alternates 01/10");
    if (!(sb_s inside {hist_s})) n_bad_sim++;
    if (viol_s != 0 || viol_o != 0) n_viol++;
  end

  initial begin
    ce_a = 0; ce_b = 0; step = 0; rnd_s = 0; rnd_o = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      @(negedge clk);
      ce_a  = ($urandom % 2) != 0;
      ce_b  = ($urandom % 3) != 0;
      step  = ($urandom % 6) == 0;
      rnd_s = 16'($urandom);
      rnd_o = 16'($urandom);
    end
    @(negedge clk);
    step = 0; ce_a = 1; ce_b = 1;
    repeat (10) @(negedge clk);
    check(n_bad_sim > 0, "reconvergence of simultaneous changes found");
    check(n_viol > 0, "synchronizer violations occurred");
    check(sb_s == sa_s && sb_o == sa_o, "both settle to A's state");
    $display("simultaneous: bad states seen=%0d  violations=%0d", n_bad_sim, n_viol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
