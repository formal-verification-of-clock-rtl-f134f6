// hs_receiver: receiver half of the four-phase handshake data transfer
// (source netlist, ordinary flip-flops).
//
// The sender's strobe `stb` is re-timed into this domain (`req_s`); with
// SYNC = 0 it is used directly. The acknowledge register simply follows
// the request, which closes the four-phase loop: ack rises after stb rises
// and falls after stb falls. On the tick where the request is seen high and
// ack is still low, the crossing bus `data` is captured into `data_out`
// and `valid` is high for exactly one tick of this domain. Equations (this
// design's own):
//   load  = req_s & ~ack
//   ack'  = req_s
//   valid'= load
//   data_out' = load ? data : data_out
module hs_receiver #(
  parameter int unsigned DATA_W = 8,
  parameter bit          SYNC   = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  logic              stb,
  input  logic [DATA_W-1:0] data,
  output logic              ack,
  output logic              valid,
  output logic [DATA_W-1:0] data_out
);
  logic req_s, load;
  logic ack_ff, valid_ff;
  logic [DATA_W-1:0] dout_ff;

  if (SYNC) begin : g_sync
    sync2 u_sync (.clk, .rst_n, .ce, .d(stb), .q(req_s));
  end else begin : g_nosync
    assign req_s = stb;
  end

  assign load = req_s & ~ack_ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_ff   <= 1'b0;
      valid_ff <= 1'b0;
      dout_ff  <= '0;
    end else if (ce) begin
      ack_ff   <= req_s;
      valid_ff <= load;
      if (load) dout_ff <= data;
    end
  end

  assign ack      = ack_ff;
  assign valid    = valid_ff;
  assign data_out = dout_ff;
endmodule
