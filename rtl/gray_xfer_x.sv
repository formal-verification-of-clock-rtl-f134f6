// gray_xfer_x: counter value sent across a clock-domain boundary without a
// handshake, every bit through its own two-flip-flop synchronizer
// (processed netlist, all flip-flops are mff models).
//
// Domain A (ticks on ce_a) holds an N-bit counter that advances by one on
// each tick with `inc` high. It is stored in Gray code when GRAY = 1, so
// one step changes one bit, or in plain binary when GRAY = 0, so one step
// can change many bits. Domain B (ticks on ce_b) synchronizes each stored
// bit separately and decodes the result into `cnt_b`.
// With Gray code a violated first stage can only resolve to the old or the
// new value of the single changing bit, so cnt_b always shows a value the
// counter really had. With binary code several bits can resolve
// independently and cnt_b can show a value the counter never had.
// The counter flip-flops have no hazardous source (only local inputs), so
// their V inputs are tied inactive.
// rnd: [2N-1:0] counter pairs, then 4 bits per synchronizer (bit i at
// 2N+4i). viol / meta: {sync stage 2 bits, sync stage 1 bits}.
module gray_xfer_x
  import tri_pkg::*;
  import xing_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter bit          GRAY = 1'b1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce_a,
  input  logic           ce_b,
  input  logic           inc,
  input  logic [6*N-1:0] rnd,
  output logic [N-1:0]   cnt_a,   // binary value of the counter (domain A)
  output logic [N-1:0]   cnt_b,   // value seen in domain B
  output logic [2*N-1:0] viol,
  output logic [2*N-1:0] meta
);
  function automatic logic [N-1:0] enc(input logic [N-1:0] b);
    if (GRAY) return N'(bin2gray(MAX_W'(b)));
    return b;
  endfunction

  function automatic logic [N-1:0] dec(input logic [N-1:0] c);
    if (GRAY) return N'(gray2bin(MAX_W'(c)));
    return c;
  endfunction

  logic [N-1:0] code_q, code_d, rx_q;
  tri_t [N-1:0] code_m, code_t;

  assign code_d = inc ? enc(dec(code_q) + 1'b1) : code_q;

  for (genvar i = 0; i < N; i++) begin : g_bit
    mff u_cnt (.clk, .rst_n, .ce(ce_a), .d(code_d[i]), .v(TRI_0),
               .r_val(rnd[2*i]), .r_meta(rnd[2*i+1]),
               .q(code_q[i]), .m(code_m[i]), .t(code_t[i]));
    mff_sync2 u_sync (.clk, .rst_n, .ce(ce_b), .d_q(code_q[i]), .d_t(code_t[i]),
                      .rnd(rnd[2*N+4*i +: 4]), .q(rx_q[i]),
                      .viol({viol[N+i], viol[i]}), .meta({meta[N+i], meta[i]}));
  end

  assign cnt_a = dec(code_q);
  assign cnt_b = dec(rx_q);
endmodule
