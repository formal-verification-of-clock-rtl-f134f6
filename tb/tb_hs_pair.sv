// tb_hs_pair: test of the source-netlist handshake pair (hs_sender +
// hs_receiver), with synchronizers (instance a) and without (instance b).
//
// Phase 1 ticks both domains every base cycle and checks the exact timing:
// valid is high after the 4th edge counting the one that takes send (3
// cycles later) with synchronizers and after the 2nd without,
// and busy stays high for 12 and 4 cycles respectively (the full four-phase
// round trip). Phase 2 ticks the domains at random and checks with a
// scoreboard that every item arrives once, in order, with its data. Ordinary
// flip-flops cannot misbehave here, so both variants must pass.
`timescale 1ns/1ps
module tb_hs_pair;
  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ce_s, ce_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // two pairs
  logic [1:0] send, busy, stb, ack, valid;
  logic [W-1:0] data_in [2];
  logic [W-1:0] data [2];
  logic [W-1:0] data_out [2];

  hs_sender   #(.DATA_W(W), .SYNC(1'b1)) u_sa (.clk, .rst_n, .ce(ce_s), .send(send[0]),
      .data_in(data_in[0]), .busy(busy[0]), .stb(stb[0]), .data(data[0]), .ack(ack[0]));
  hs_receiver #(.DATA_W(W), .SYNC(1'b1)) u_ra (.clk, .rst_n, .ce(ce_r), .stb(stb[0]),
      .data(data[0]), .ack(ack[0]), .valid(valid[0]), .data_out(data_out[0]));
  hs_sender   #(.DATA_W(W), .SYNC(1'b0)) u_sb (.clk, .rst_n, .ce(ce_s), .send(send[1]),
      .data_in(data_in[1]), .busy(busy[1]), .stb(stb[1]), .data(data[1]), .ack(ack[1]));
  hs_receiver #(.DATA_W(W), .SYNC(1'b0)) u_rb (.clk, .rst_n, .ce(ce_r), .stb(stb[1]),
      .data(data[1]), .ack(ack[1]), .valid(valid[1]), .data_out(data_out[1]));

  logic [W-1:0] q_items [2][$];
  int n_recv [2] = '{0, 0};
  int n_sent [2] = '{0, 0};
  logic random_phase = 1'b0;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 2; k++) begin
      if (ce_s && send[k]) begin
        q_items[k].push_back(data_in[k]);
        n_sent[k]++;
      end
      if (ce_r && valid[k]) begin
        n_recv[k]++;
        check(q_items[k].size() > 0, "valid without item");
        if (q_items[k].size() > 0) check(data_out[k] == q_items[k].pop_front(), "data");
      end
    end
  end

  // phase 1: measure latency of one transfer on pair k
  task automatic timed_transfer(input int k, input int exp_valid, input int exp_busy);
    int cyc, t_valid, n_busy;
    @(negedge clk);
    send[k] = 1'b1;
    data_in[k] = W'($urandom);
    @(negedge clk);
    send[k] = 1'b0;
    t_valid = -1;
    n_busy = 0;
    for (cyc = 1; cyc < 40; cyc++) begin
      if (valid[k] && t_valid < 0) t_valid = cyc;
      if (busy[k]) n_busy++;
      @(negedge clk);
    end
    check(t_valid == exp_valid, $sformatf("valid latency pair %0d: %0d", k, t_valid));
    check(n_busy == exp_busy, $sformatf("busy duration pair %0d: %0d", k, n_busy));
  endtask

  initial begin
    ce_s = 1; ce_r = 1; send = 0; data_in[0] = 0; data_in[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    timed_transfer(0, 4, 12);
    timed_transfer(1, 2, 4);
    // phase 2: random ticking
    random_phase = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      ce_s = ($urandom % 3) != 0;
      ce_r = ($urandom % 4) != 0;
      for (int k = 0; k < 2; k++) begin
        send[k] = 1'b0;
        if (ce_s && !busy[k] && ($urandom % 2)) begin
          send[k] = 1'b1;
          data_in[k] = W'($urandom);
        end
      end
    end
    @(negedge clk);
    send = 0;
    ce_s = 1; ce_r = 1;
    repeat (40) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      check(n_recv[k] == n_sent[k], $sformatf("all items delivered pair %0d", k));
      check(n_sent[k] > 100, "enough traffic");
    end
    $display("pair a: sent=%0d recv=%0d  pair b: sent=%0d recv=%0d",
             n_sent[0], n_recv[0], n_sent[1], n_recv[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
