// hs_sender: sender half of the four-phase handshake data transfer
// (source netlist, ordinary flip-flops).
//
// Local interface: pulse `send` for one tick of this domain with `data_in`
// valid; when `busy` is low the item is captured into the data register,
// the strobe `stb` rises and `busy` rises one tick later (it is the
// registered start condition). The sender then waits for the receiver's
// `ack` to rise, drops `stb`, waits for `ack` to fall and drops `busy`.
// `data` is held constant from the capture until the next item is taken.
//
// With SYNC = 1 the incoming `ack` passes through a two-flip-flop
// synchronizer; with SYNC = 0 it is used directly, as in the
// "no sender synchronizer" variant of the case study. The next-state
// equations (this design's own, the behaviour follows the protocol
// description) are
//   start = send & ~busy
//   stb'  = start | stb & ~ack_s
//   busy' = start | busy & (stb | ack_s)
// Keeping busy in its own register, which also samples ack and gates the
// data load, is this design's choice: the described circuit has stb as its
// only state flip-flop, with no logic path from it to the data registers.
// Registers update on base-clock edges where `ce` is high.
module hs_sender #(
  parameter int unsigned DATA_W = 8,
  parameter bit          SYNC   = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              send,
  input  logic [DATA_W-1:0] data_in,
  output logic              busy,
  output logic              stb,
  output logic [DATA_W-1:0] data,
  input  logic              ack
);
  logic ack_s, start;
  logic stb_ff, busy_ff;
  logic [DATA_W-1:0] data_ff;

  if (SYNC) begin : g_sync
    sync2 u_sync (.clk, .rst_n, .ce, .d(ack), .q(ack_s));
  end else begin : g_nosync
    assign ack_s = ack;
  end

  assign start = send & ~busy_ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stb_ff  <= 1'b0;
      busy_ff <= 1'b0;
      data_ff <= '0;
    end else if (ce) begin
      stb_ff  <= start | (stb_ff & ~ack_s);
      busy_ff <= start | (busy_ff & (stb_ff | ack_s));
      if (start) data_ff <= data_in;
    end
  end

  assign busy = busy_ff;
  assign stb  = stb_ff;
  assign data = data_ff;

  // Environment rule of the protocol: no new item while busy.
  a_no_send_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    ce |-> !(send && busy_ff));
endmodule
