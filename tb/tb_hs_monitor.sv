// tb_hs_monitor: directed test of the handshake property checker.
//
// The testbench plays both sides of the interface by hand and checks that
// each error bit stays clear on a correct transfer and is set by the
// specific misbehaviour it is meant to catch: wrong data with valid, a send
// that is never answered within BOUND cycles, and busy not rising after a
// send. Both domains tick every cycle here.
`timescale 1ns/1ps
module tb_hs_monitor;
  import hs_pkg::*;
  localparam int W = 8;
  localparam int BOUND = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic send, busy, valid;
  logic [W-1:0] data_in, data_out;
  hs_err_t err;
  logic [31:0] n_send, n_valid;
  int checks = 0, failures = 0;

  hs_monitor #(.DATA_W(W), .BOUND(BOUND)) dut (.clk, .rst_n, .ce_s(1'b1), .ce_r(1'b1),
    .send, .data_in, .busy, .valid, .data_out, .err, .n_send, .n_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t err=%b", what, $time, err);
    end
  endtask

  task automatic reset_dut();
    @(negedge clk);
    rst_n = 1'b0;
    send = 0; busy = 0; valid = 0; data_in = 0; data_out = 0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // a well-behaved transfer; bad_data / no_busy / no_valid inject a fault
  task automatic transfer(input logic [W-1:0] val, input bit bad_data,
                          input bit no_busy, input bit no_valid);
    @(negedge clk);
    send = 1; data_in = val;
    @(negedge clk);
    send = 0; busy = !no_busy; data_in = ~val;
    repeat (5) @(negedge clk);
    if (!no_valid) begin
      valid = 1; data_out = bad_data ? ~val : val;
      @(negedge clk);
      valid = 0;
    end
    repeat (3) @(negedge clk);
    busy = 0;
    @(negedge clk);
  endtask

  initial begin
    reset_dut();
    transfer(8'h5A, 0, 0, 0);
    transfer(8'hC3, 0, 0, 0);
    repeat (BOUND + 5) @(negedge clk);
    check(err == '0, "clean transfers raise no error");
    check(n_send == 2 && n_valid == 2, "counts");

    reset_dut();
    transfer(8'h11, 1, 0, 0);
    check(err.correct_transfer, "wrong data flagged");
    check(!err.sender_handshake && !err.no_blocked_transfer, "only data flagged");

    reset_dut();
    transfer(8'h22, 0, 1, 0);
    check(err.sender_handshake, "missing busy flagged");
    check(!err.correct_transfer, "data fine");

    reset_dut();
    transfer(8'h33, 0, 0, 1);
    repeat (BOUND - 15) @(negedge clk);
    check(!err.no_blocked_transfer, "not yet blocked before bound");
    repeat (15) @(negedge clk);
    check(err.no_blocked_transfer, "blocked transfer flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
