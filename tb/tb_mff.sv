// tb_mff: self-checking test of the metastable flip-flop model.
//
// Drives random D, V (active or inactive), clock-enable and random bits for
// 2000 base cycles and compares Q, M and T against a reference model kept
// in the testbench: inactive V latches D and clears the metastable flag,
// active V latches r_val and sets the flag to r_meta; M is unknown exactly
// while the flag is set, T while the flag is set or Q changed at the last
// edge; inactive M and T carry Q. Also counts that every case occurred.
`timescale 1ns/1ps
module tb_mff;
  import tri_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce, d, r_val, r_meta, q;
  tri_t v, m, t;
  int checks = 0, failures = 0;
  int n_viol = 0, n_meta = 0, n_chg = 0;

  mff dut (.clk, .rst_n, .ce, .d, .v, .r_val, .r_meta, .q, .m, .t);

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
      $display("FAIL %s at %0t q=%b qr=%b m=%p t=%p meta=%b chg=%b", what, $time, q, q_ref, m, t, meta_ref, chg_ref);
    end
  endtask

  logic q_ref, meta_ref, chg_ref, q_nx;

  initial begin
    ce = 0; d = 0; v = TRI_0; r_val = 0; r_meta = 0;
    q_ref = 0; meta_ref = 0; chg_ref = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ce     = ($urandom % 4) != 0;
      d      = $urandom;
      r_val  = $urandom;
      r_meta = $urandom;
      case ($urandom % 3)
        0: v = TRI_X;
        1: v = TRI_0;
        default: v = TRI_1;
      endcase
      // reference next state
      if (ce) begin
        q_nx     = v.x ? r_val : d;
        chg_ref  = q_nx != q_ref;
        meta_ref = v.x & r_meta;
        q_ref    = q_nx;
        if (v.x) n_viol++;
      end else begin
        chg_ref = 1'b0;
      end
      @(posedge clk);
      #1;
      check(q == q_ref, "Q");
      check(m == (meta_ref ? TRI_X : tri_known(q_ref)), "M");
      check(t == ((meta_ref || chg_ref) ? TRI_X : tri_known(q_ref)), "T");
      if (meta_ref) n_meta++;
      if (chg_ref) n_chg++;
    end
    check(n_viol > 0, "violation case reached");
    check(n_meta > 0, "metastable case reached");
    check(n_chg > 0, "transition case reached");
    $display("violations=%0d metastable=%0d transitions=%0d", n_viol, n_meta, n_chg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
