// tb_comb_xing_x: glitch-prone (XOR) versus glitch-free (AND) gate in
// front of a synchronizer.
//
// Both copies see the same random steps of the two domain-A flip-flops,
// which always switch together. Every cycle the synchronized output y must
// equal a value f had in domain A within the last HIST base cycles. The
// AND copy must never break this; the XOR copy, whose f is constantly 0,
// must show a 1 at least once (a captured glitch). Both copies must have
// seen violations of their first synchronizer stage.
`timescale 1ns/1ps
module tb_comb_xing_x;
  localparam int HIST = 24;
  localparam int NCYC = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_a, ce_b, step;
  logic [7:0] rnd_x, rnd_a;
  logic [1:0] a_x, a_a, viol_x, viol_a, meta_x, meta_a;
  logic f_x, f_a, y_x, y_a;
  int checks = 0, failures = 0;
  int n_glitch = 0, n_viol_x = 0, n_viol_a = 0, n_rise_a = 0;

  comb_xing_x #(.GLITCH_FREE(1'b0)) u_xor (.clk, .rst_n, .ce_a, .ce_b, .step, .rnd(rnd_x),
      .a(a_x), .f_a(f_x), .y(y_x), .viol(viol_x), .meta(meta_x));
  comb_xing_x #(.GLITCH_FREE(1'b1)) u_and (.clk, .rst_n, .ce_a, .ce_b, .step, .rnd(rnd_a),
      .a(a_a), .f_a(f_a), .y(y_a), .viol(viol_a), .meta(meta_a));

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

  logic hist_a [$];
  logic y_a_d = 1'b0;

  always @(posedge clk) if (rst_n) begin
    #1;
    hist_a.push_back(f_a);
    if (hist_a.size() > HIST) void'(hist_a.pop_front());
    check(f_x == 1'b0, "XOR of inputs that switch together is 0");
    check(y_a == 1'b0 ? (0 inside {hist_a}) : (1 inside {hist_a}),
          "AND crossing shows only values f had");
    if (y_x) n_glitch++;
    if (viol_x[0]) n_viol_x++;
    if (viol_a[0]) n_viol_a++;
    if (y_a && !y_a_d) n_rise_a++;
    y_a_d <= y_a;
  end

  initial begin
    ce_a = 0; ce_b = 0; step = 0; rnd_x = 0; rnd_a = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      @(negedge clk);
      ce_a  = ($urandom % 2) != 0;
      ce_b  = ($urandom % 3) != 0;
      step  = ($urandom % 6) == 0;
      rnd_x = 8'($urandom);
      rnd_a = 8'($urandom);
    end
    check(n_glitch > 0, "glitch captured behind the XOR");
    check(n_viol_x > 0 && n_viol_a > 0, "first-stage violations occurred");
    check(n_rise_a > 10, "AND output crossed");
    $display("glitches=%0d viol_xor=%0d viol_and=%0d and_rises=%0d",
             n_glitch, n_viol_x, n_viol_a, n_rise_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
