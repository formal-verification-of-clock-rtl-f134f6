// tb_quasi_static_x: configuration register read in another domain without
// a synchronizer.
//
// Rounds of: disable domain B's copy (en = 0), write a random configuration
// in domain A, wait, enable the copy (en = 1) for a while. Under this rule
// no violation may ever be raised, and while en is high cfg_b must equal
// cfg_a from the second domain-B tick on. A final phase breaks the rule,
// writing while en is high, and then violations must be raised: the clean
// result comes from the usage, not from a detector that never fires.
`timescale 1ns/1ps
module tb_quasi_static_x;
  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_a, ce_b, cfg_we, en;
  logic [N-1:0] cfg_in, cfg_a, cfg_b, viol, meta;
  logic [4*N-1:0] rnd;
  int checks = 0, failures = 0, n_viol_ok = 0, n_viol_bad = 0, en_ticks = 0;
  bit misuse = 0;

  quasi_static_x #(.N(N)) dut (.clk, .rst_n, .ce_a, .ce_b, .cfg_we, .cfg_in, .en, .rnd,
                               .cfg_a, .cfg_b, .viol, .meta);

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

  always @(posedge clk) if (rst_n) begin
    if (viol != 0) begin
      if (misuse) n_viol_bad++;
      else        n_viol_ok++;
    end
    if (!misuse && en && ce_b) begin
      if (en_ticks >= 1) check(cfg_b == cfg_a, "copy equals configuration");
      en_ticks++;
    end
    if (!en) en_ticks = 0;
  end

  initial begin
    ce_a = 0; ce_b = 0; cfg_we = 0; en = 0; cfg_in = 0; rnd = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 40; r++) begin
      en = 0;
      repeat (5) @(negedge clk);
      repeat (1 + $urandom % 3) begin
        @(negedge clk);
        ce_a = 1; cfg_we = 1; cfg_in = N'($urandom);
        @(negedge clk);
        cfg_we = 0;
      end
      repeat (5) @(negedge clk);
      en = 1;
      repeat (200) begin
        @(negedge clk);
        ce_a = $urandom; ce_b = ($urandom % 3) != 0; rnd = $urandom;
      end
    end
    check(n_viol_ok == 0, "no violation while the configuration is quasi-static");
    misuse = 1;
    repeat (2000) begin
      @(negedge clk);
      ce_a = $urandom; ce_b = $urandom; rnd = $urandom;
      cfg_we = ($urandom % 8) == 0; cfg_in = N'($urandom);
    end
    check(n_viol_bad > 0, "writes during use are flagged");
    $display("violations: clean use=%0d misuse=%0d", n_viol_ok, n_viol_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
