// hs_receiver_x: the handshake receiver after the metastability
// transformation (processed netlist).
//
// Same function and equations as hs_receiver, with every flip-flop an mff
// model and a three-valued copy of its next-state function driving its V
// input. Source classes:
//   * stb and the data bus from the sender domain:        T port (foreign)
//   * first synchronizer stage, and with SYNC = 0 the ack
//     and valid registers, which sample stb directly;
//     the data_out register, which always samples the
//     data bus directly:                                  M port (local hazard)
//   * every other source:                                 Q (safe)
// Whether the data bus can upset data_out therefore depends only on the
// load condition: while it is a known 0 the mux masks the bus, while it is
// a known 1 the bus must be still (T inactive) for the capture to be clean.
//
// Random bits: [1:0] first sync stage, [3:2] second sync stage, [5:4] ack,
// [7:6] valid, [9+2i:8+2i] data_out bit i (sync pairs unused when SYNC = 0).
// `viol` and `meta` report V and metastability per flip-flop in that order.
module hs_receiver_x
  import tri_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter bit          SYNC   = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    stb_q,
  input  tri_t                    stb_t,
  input  logic [DATA_W-1:0]       data_q,
  input  tri_t [DATA_W-1:0]       data_t,
  input  logic [2*(4+DATA_W)-1:0] rnd,
  output logic                    ack_q,
  output tri_t                    ack_t,
  output logic                    valid,
  output logic [DATA_W-1:0]       data_out,
  output logic [4+DATA_W-1:0]     viol,
  output logic [4+DATA_W-1:0]     meta
);

  function automatic tri_t f_valid(tri_t req_i, tri_t ack_i);
    return tri_and(req_i, tri_not(ack_i));
  endfunction

  function automatic tri_t f_dout(tri_t req_i, tri_t ack_i, tri_t din_i, tri_t dold_i);
    return tri_mux(tri_and(req_i, tri_not(ack_i)), dold_i, din_i);
  endfunction

  localparam src_class_e CLS_STATE = SYNC ? SRC_SAFE : SRC_LOCAL;

  logic ack, vld;
  tri_t ack_m, ack_tt, vld_m, vld_t;
  logic [DATA_W-1:0] dq;
  tri_t [DATA_W-1:0] dm, dt;

  // ---- re-timed request
  logic req_s;
  tri_t req_h;

  if (SYNC) begin : g_sync
    logic s1_q, s2_q;
    tri_t s1_m, s1_t, s2_m, s2_t;
    mff u_s1 (.clk, .rst_n, .ce, .d(stb_q), .v(stb_t),
              .r_val(rnd[0]), .r_meta(rnd[1]), .q(s1_q), .m(s1_m), .t(s1_t));
    mff u_s2 (.clk, .rst_n, .ce, .d(s1_q), .v(s1_m),
              .r_val(rnd[2]), .r_meta(rnd[3]), .q(s2_q), .m(s2_m), .t(s2_t));
    assign req_s = s2_q;
    assign req_h = tri_known(s2_q);
    assign viol[1:0] = {tri_active(s1_m), tri_active(stb_t)};
    assign meta[1:0] = {tri_active(s2_m), tri_active(s1_m)};
  end else begin : g_nosync
    assign req_s = stb_q;
    assign req_h = stb_t;
    assign viol[1:0] = 2'b00;
    assign meta[1:0] = 2'b00;
  end

  tri_t ack_h;
  assign ack_h = tri_src(CLS_STATE, ack, ack_m, ack_tt);

  // ---- ack follows the request; valid marks the first tick of a request
  tri_t ack_v, vld_v;
  assign ack_v = req_h;
  assign vld_v = f_valid(req_h, ack_h);

  mff u_ack (.clk, .rst_n, .ce, .d(req_s), .v(ack_v),
             .r_val(rnd[4]), .r_meta(rnd[5]), .q(ack), .m(ack_m), .t(ack_tt));
  mff u_vld (.clk, .rst_n, .ce, .d(f_valid(tri_known(req_s), tri_known(ack)).v), .v(vld_v),
             .r_val(rnd[6]), .r_meta(rnd[7]), .q(vld), .m(vld_m), .t(vld_t));

  assign viol[3:2] = {tri_active(vld_v), tri_active(ack_v)};
  assign meta[3:2] = {tri_active(vld_m), tri_active(ack_m)};

  // ---- captured data
  for (genvar i = 0; i < DATA_W; i++) begin : g_dout
    logic d_d;
    tri_t d_v;
    assign d_d = f_dout(tri_known(req_s), tri_known(ack), tri_known(data_q[i]), tri_known(dq[i])).v;
    assign d_v = f_dout(req_h, ack_h, data_t[i], dm[i]);
    mff u_d (.clk, .rst_n, .ce, .d(d_d), .v(d_v),
             .r_val(rnd[8+2*i]), .r_meta(rnd[9+2*i]), .q(dq[i]), .m(dm[i]), .t(dt[i]));
    assign viol[4+i] = tri_active(d_v);
    assign meta[4+i] = tri_active(dm[i]);
  end

  assign ack_q    = ack;
  assign ack_t    = ack_tt;
  assign valid    = vld;
  assign data_out = dq;

endmodule
