// tb_hs_x: end-to-end test of the processed handshake pair
// (hs_sender_x + hs_receiver_x) with both synchronizers present.
//
// Both domains tick at random base cycles, the random bits of all model
// flip-flops are drawn afresh every cycle, and items with random data are
// sent whenever the sender is idle. A scoreboard checks that every item is
// delivered exactly once, in order, with the right data, and that busy rises
// one sender tick after send. Because both synchronizers are present, timing
// violations must occur at the first synchronizer stages (and some of them
// must leave those stages metastable), but never reach any other flip-flop.
`timescale 1ns/1ps
module tb_hs_x;
  import tri_pkg::*;

  localparam int W = 8;
  localparam int NF = 4 + W;
  localparam int N_ITEMS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_s, ce_r, send;
  logic [W-1:0] data_in;
  logic [2*NF-1:0] rnd_s, rnd_r;
  logic busy, stb_q, ack_q, valid;
  tri_t stb_t, ack_t;
  logic [W-1:0] data_q, data_out;
  tri_t [W-1:0] data_t;
  logic [NF-1:0] viol_s, meta_s, viol_r, meta_r;

  int checks = 0, failures = 0;

  hs_sender_x #(.DATA_W(W), .SYNC(1'b1)) u_snd (
    .clk, .rst_n, .ce(ce_s), .send, .data_in, .rnd(rnd_s), .busy,
    .stb_q, .stb_t, .data_q, .data_t, .ack_q, .ack_t, .viol(viol_s), .meta(meta_s));
  hs_receiver_x #(.DATA_W(W), .SYNC(1'b1)) u_rcv (
    .clk, .rst_n, .ce(ce_r), .stb_q, .stb_t, .data_q, .data_t, .rnd(rnd_r),
    .ack_q, .ack_t, .valid, .data_out, .viol(viol_r), .meta(meta_r));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  logic [W-1:0] q_items[$];
  int n_sent = 0, n_recv = 0;
  int n_sync_viol = 0, n_sync_meta = 0, n_stage2_viol = 0, n_other_viol = 0;
  logic hs_due = 1'b0;

  // drive inputs on the falling edge
  initial begin
    ce_s = 0; ce_r = 0; send = 0; data_in = 0; rnd_s = 0; rnd_r = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    forever begin
      @(negedge clk);
      ce_s  = ($urandom % 3) != 0;
      ce_r  = ($urandom % 2) != 0;
      rnd_s = {$urandom, $urandom};
      rnd_r = {$urandom, $urandom};
      send  = 1'b0;
      if (ce_s && !busy && !hs_due && n_sent < N_ITEMS && ($urandom % 2)) begin
        send    = 1'b1;
        data_in = W'($urandom);
      end
    end
  end

  // observe at the rising edge (before it takes effect)
  always @(posedge clk) if (rst_n) begin
    if (ce_s) begin
      if (hs_due) check(busy, "busy one tick after send");
      hs_due <= send;
      if (send) begin
        q_items.push_back(data_in);
        n_sent++;
      end
    end
    if (ce_r && valid) begin
      n_recv++;
      check(q_items.size() > 0, "valid without item");
      if (q_items.size() > 0) check(data_out == q_items.pop_front(), "data");
    end
    if (viol_s[0] || viol_r[0]) n_sync_viol++;
    if (meta_s[0] || meta_r[0]) n_sync_meta++;
    if (viol_s[1] || viol_r[1]) n_stage2_viol++;
    if (viol_s[NF-1:2] != 0 || viol_r[NF-1:2] != 0) n_other_viol++;
  end

  initial begin
    wait (rst_n);
    wait (n_sent == N_ITEMS && q_items.size() == 0 && !busy);
    repeat (50) @(posedge clk);
    check(n_recv == N_ITEMS, "every item delivered once");
    check(n_sync_viol > 0, "violations at first synchronizer stage");
    check(n_sync_meta > 0, "metastable first synchronizer stage");
    check(n_stage2_viol > 0, "late first stage upsets second stage");
    check(n_other_viol == 0, "no violation beyond the synchronizers");
    $display("sent=%0d received=%0d sync_viol=%0d sync_meta=%0d other_viol=%0d",
             n_sent, n_recv, n_sync_viol, n_sync_meta, n_other_viol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
