// tb_gray_xfer_x: Gray-coded versus binary counter crossing.
//
// Two copies, GRAY = 1 and GRAY = 0, count the same random increments in
// domain A while both domains tick at random and the model flip-flops get
// fresh random bits every cycle. Every cycle the value seen in domain B must
// be a value the counter held within the last HIST base cycles (the
// synchronizer delay is far shorter). The Gray copy must never break this;
// the binary copy must break it at least once (data corruption found).
// Both must end equal to the counter once increments stop, and both must
// have seen synchronizer violations.
`timescale 1ns/1ps
module tb_gray_xfer_x;
  localparam int N = 4;
  localparam int HIST = 24;
  localparam int NCYC = 40000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_a, ce_b, inc;
  logic [6*N-1:0] rnd_g, rnd_b;
  logic [N-1:0] a_g, b_g, a_b, b_b;
  logic [2*N-1:0] viol_g, meta_g, viol_b, meta_b;
  int checks = 0, failures = 0;
  int n_bad_gray = 0, n_bad_bin = 0, n_viol_g = 0, n_viol_b = 0;

  gray_xfer_x #(.N(N), .GRAY(1'b1)) u_gray (.clk, .rst_n, .ce_a, .ce_b, .inc, .rnd(rnd_g),
      .cnt_a(a_g), .cnt_b(b_g), .viol(viol_g), .meta(meta_g));
  gray_xfer_x #(.N(N), .GRAY(1'b0)) u_bin (.clk, .rst_n, .ce_a, .ce_b, .inc, .rnd(rnd_b),
      .cnt_a(a_b), .cnt_b(b_b), .viol(viol_b), .meta(meta_b));

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

  logic [N-1:0] hist_g [$], hist_b [$];

  function automatic bit in_hist(input logic [N-1:0] v, input logic [N-1:0] h [$]);
    foreach (h[i]) if (h[i] == v) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    #1;
    hist_g.push_back(a_g);
    hist_b.push_back(a_b);
    if (hist_g.size() > HIST) void'(hist_g.pop_front());
    if (hist_b.size() > HIST) void'(hist_b.pop_front());
    checks++;
    if (!in_hist(b_g, hist_g)) begin
      n_bad_gray++;
      failures++;
    end
    if (!in_hist(b_b, hist_b)) n_bad_bin++;
    if (viol_g != 0) n_viol_g++;
    if (viol_b != 0) n_viol_b++;
  end

  initial begin
    ce_a = 0; ce_b = 0; inc = 0; rnd_g = 0; rnd_b = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      @(negedge clk);
      ce_a  = ($urandom % 2) != 0;
      ce_b  = ($urandom % 3) != 0;
      inc   = ($urandom % 4) == 0;
      rnd_g = {$urandom, $urandom};
      rnd_b = {$urandom, $urandom};
    end
    @(negedge clk);
    inc = 0; ce_a = 1; ce_b = 1;
    repeat (10) @(negedge clk);
    check(n_bad_bin > 0, "binary crossing shows a corrupted value");
    check(b_g == a_g && b_b == a_b, "both settle to the counter value");
    check(n_viol_g > 0 && n_viol_b > 0, "synchronizer violations occurred");
    $display("gray: bad=%0d viol=%0d  binary: bad=%0d viol=%0d",
             n_bad_gray, n_viol_g, n_bad_bin, n_viol_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
