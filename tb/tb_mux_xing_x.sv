// tb_mux_xing_x: multiplexer with a local select in front of a per-bit
// synchronizer.
//
// Two Gray counters in domain A advance at random; domain B switches its
// select now and then. Every cycle the decoded value in domain B must be a
// value the selected counter (or, within HIST cycles of a select change,
// either counter) held within the last HIST base cycles. A first-stage
// violation may only come from a bit of the selected counter that changed
// in the last base cycle. Violations, select switches and settling to the
// selected counter after the counters stop are checked too.
`timescale 1ns/1ps
module tb_mux_xing_x;
  localparam int N = 4;
  localparam int HIST = 24;
  localparam int NCYC = 30000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_a, ce_b, inc0, inc1, sel_in, sel;
  logic [8*N+1:0] rnd;
  logic [N-1:0] c0, c1, cb;
  logic [2*N-1:0] viol, meta;
  int checks = 0, failures = 0, n_viol = 0, n_sw = 0, since_sw = 0;

  mux_xing_x #(.N(N)) dut (.clk, .rst_n, .ce_a, .ce_b, .inc0, .inc1, .sel_in, .rnd,
      .cnt0_a(c0), .cnt1_a(c1), .sel, .cnt_b(cb), .viol, .meta);

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

  logic [N-1:0] h0 [$], h1 [$];
  logic [N-1:0] g0_prev = '0, g1_prev = '0;
  logic sel_prev = 1'b0;

  function automatic logic [N-1:0] gray(input logic [N-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // combinational check in the middle of each cycle: which bits may be
  // violated (those of the selected counter that changed at the last edge)
  always @(negedge clk) if (rst_n) begin
    #2;
    if (viol[N-1:0] != 0) n_viol++;
    for (int i = 0; i < N; i++) if (viol[i]) begin
      check(((sel ? gray(c1) ^ g1_prev : gray(c0) ^ g0_prev) >> i) & 1,
            "violation only from a changing bit of the selected counter");
    end
    g0_prev = gray(c0);
    g1_prev = gray(c1);
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    h0.push_back(c0);
    h1.push_back(c1);
    if (h0.size() > HIST) void'(h0.pop_front());
    if (h1.size() > HIST) void'(h1.pop_front());
    if (sel != sel_prev) begin
      since_sw = 0;
      n_sw++;
    end else if (since_sw < 1000) since_sw++;
    sel_prev = sel;
    if (since_sw > HIST)
      check(sel ? (cb inside {h1}) : (cb inside {h0}), "value of the selected counter");
    else
      check((cb inside {h0}) || (cb inside {h1}), "value of one of the counters");
  end

  initial begin
    ce_a = 0; ce_b = 0; inc0 = 0; inc1 = 0; sel_in = 0; rnd = 0;
    repeat (3) @(posedge clk);
    #4 rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      @(negedge clk);
      ce_a = ($urandom % 2) != 0;
      ce_b = ($urandom % 3) != 0;
      inc0 = ($urandom % 4) == 0;
      inc1 = ($urandom % 5) == 0;
      if ($urandom % 400 == 0) sel_in = ~sel_in;
      rnd  = {$urandom, $urandom};
    end
    @(negedge clk);
    inc0 = 0; inc1 = 0; ce_a = 1; ce_b = 1;
    repeat (10) @(negedge clk);
    check(cb == (sel ? c1 : c0), "settles to the selected counter");
    check(n_viol > 0, "first-stage violations occurred");
    check(n_sw > 10, "select switched");
    $display("violations=%0d select switches=%0d", n_viol, n_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
