// tb_sync2: checks that the two-flip-flop synchronizer delays its input by
// exactly two ticks of its domain and holds while ce is low, against a
// two-entry shift register kept in the testbench, over 3000 random cycles.
`timescale 1ns/1ps
module tb_sync2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ce, d, q;
  logic [1:0] ref_sr;
  int checks = 0, failures = 0, n_rise = 0;

  sync2 dut (.clk, .rst_n, .ce, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; d = 0; ref_sr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce = ($urandom % 3) != 0;
      d  = $urandom;
      if (ce) ref_sr = {ref_sr[0], d};
      @(posedge clk);
      #1;
      checks++;
      if (q !== ref_sr[1]) begin
        failures++;
        if (failures < 10) $display("FAIL q=%b exp=%b at %0t", q, ref_sr[1], $time);
      end
      if (ce && ref_sr == 2'b10) n_rise++;
    end
    checks++;
    if (n_rise == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
