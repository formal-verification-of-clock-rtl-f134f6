// hs_sender_x: the handshake sender after the metastability transformation
// (processed netlist).
//
// Same function and next-state equations as hs_sender, but every flip-flop
// is an mff model and each one gets a path-sensitization detector: its
// next-state function evaluated a second time in three-valued logic, with
// each source seen through the port its class calls for:
//   * ack from the receiver domain:                    T port (foreign)
//   * a flip-flop of this domain that samples ack
//     directly (first synchronizer stage, or stb/busy
//     when there is no synchronizer):                  M port (local hazard)
//   * every other source, primary inputs included:     Q (safe)
// A detector whose result is unknown raises V of its flip-flop. The
// functional D inputs are the same functions evaluated on the Q values,
// which are always known, so the two copies cannot drift apart.
//
// Random bits: `rnd` holds one (r_val, r_meta) pair per model flip-flop:
// [1:0] first sync stage, [3:2] second sync stage, [5:4] stb, [7:6] busy,
// [9+2i:8+2i] data bit i. The sync pairs are unused when SYNC = 0.
// `viol` and `meta` report, per flip-flop in the same order, whether V is
// active and whether the model is metastable now.
module hs_sender_x
  import tri_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter bit          SYNC   = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    send,
  input  logic [DATA_W-1:0]       data_in,
  input  logic [2*(4+DATA_W)-1:0] rnd,
  output logic                    busy,
  // to the receiver domain: value and transition port of each bit
  output logic                    stb_q,
  output tri_t                    stb_t,
  output logic [DATA_W-1:0]       data_q,
  output tri_t [DATA_W-1:0]       data_t,
  // from the receiver domain
  input  logic                    ack_q,
  input  tri_t                    ack_t,
  output logic [4+DATA_W-1:0]     viol,
  output logic [4+DATA_W-1:0]     meta
);

  // Next-state functions, shared by data path and detectors.
  function automatic tri_t f_stb(tri_t send_i, tri_t busy_i, tri_t stb_i, tri_t ack_i);
    return tri_or(tri_and(send_i, tri_not(busy_i)), tri_and(stb_i, tri_not(ack_i)));
  endfunction

  function automatic tri_t f_busy(tri_t send_i, tri_t busy_i, tri_t stb_i, tri_t ack_i);
    return tri_or(tri_and(send_i, tri_not(busy_i)), tri_and(busy_i, tri_or(stb_i, ack_i)));
  endfunction

  function automatic tri_t f_data(tri_t send_i, tri_t busy_i, tri_t din_i, tri_t dold_i);
    return tri_mux(tri_and(send_i, tri_not(busy_i)), dold_i, din_i);
  endfunction

  localparam src_class_e CLS_STATE = SYNC ? SRC_SAFE : SRC_LOCAL;

  // ---- model flip-flop outputs
  logic stb, busy_q;
  tri_t stb_m, stb_tt, busy_m, busy_t;
  logic [DATA_W-1:0] dq;
  tri_t [DATA_W-1:0] dm, dt;

  // ---- synchronized acknowledge: functional value and detector view
  logic ack_s;
  tri_t ack_s_h;

  if (SYNC) begin : g_sync
    logic s1_q, s2_q;
    tri_t s1_m, s1_t, s2_m, s2_t;
    mff u_s1 (.clk, .rst_n, .ce, .d(ack_q), .v(ack_t),
              .r_val(rnd[0]), .r_meta(rnd[1]), .q(s1_q), .m(s1_m), .t(s1_t));
    mff u_s2 (.clk, .rst_n, .ce, .d(s1_q), .v(s1_m),
              .r_val(rnd[2]), .r_meta(rnd[3]), .q(s2_q), .m(s2_m), .t(s2_t));
    assign ack_s   = s2_q;
    assign ack_s_h = tri_known(s2_q);
    assign viol[1:0] = {tri_active(s1_m), tri_active(ack_t)};
    assign meta[1:0] = {tri_active(s2_m), tri_active(s1_m)};
  end else begin : g_nosync
    assign ack_s   = ack_q;
    assign ack_s_h = ack_t;
    assign viol[1:0] = 2'b00;
    assign meta[1:0] = 2'b00;
  end

  // ---- detector views of the local sources
  tri_t send_h, busy_h, stb_h;
  assign send_h = tri_known(send);
  assign busy_h = tri_src(CLS_STATE, busy_q, busy_m, busy_t);
  assign stb_h  = tri_src(CLS_STATE, stb, stb_m, stb_tt);

  // ---- stb and busy
  tri_t stb_v, busy_v;
  logic stb_d, busy_d;
  assign stb_d  = f_stb (send_h, tri_known(busy_q), tri_known(stb), tri_known(ack_s)).v;
  assign busy_d = f_busy(send_h, tri_known(busy_q), tri_known(stb), tri_known(ack_s)).v;
  assign stb_v  = f_stb (send_h, busy_h, stb_h, ack_s_h);
  assign busy_v = f_busy(send_h, busy_h, stb_h, ack_s_h);

  mff u_stb  (.clk, .rst_n, .ce, .d(stb_d), .v(stb_v),
              .r_val(rnd[4]), .r_meta(rnd[5]), .q(stb), .m(stb_m), .t(stb_tt));
  mff u_busy (.clk, .rst_n, .ce, .d(busy_d), .v(busy_v),
              .r_val(rnd[6]), .r_meta(rnd[7]), .q(busy_q), .m(busy_m), .t(busy_t));

  assign viol[3:2] = {tri_active(busy_v), tri_active(stb_v)};
  assign meta[3:2] = {tri_active(busy_m), tri_active(stb_m)};

  // ---- data register (samples no foreign signal: seen by itself through Q)
  for (genvar i = 0; i < DATA_W; i++) begin : g_data
    logic d_d;
    tri_t d_v;
    assign d_d = f_data(send_h, tri_known(busy_q), tri_known(data_in[i]), tri_known(dq[i])).v;
    assign d_v = f_data(send_h, busy_h, tri_known(data_in[i]), tri_known(dq[i]));
    mff u_d (.clk, .rst_n, .ce, .d(d_d), .v(d_v),
             .r_val(rnd[8+2*i]), .r_meta(rnd[9+2*i]), .q(dq[i]), .m(dm[i]), .t(dt[i]));
    assign viol[4+i] = tri_active(d_v);
    assign meta[4+i] = tri_active(dm[i]);
  end

  assign busy   = busy_q;
  assign stb_q  = stb;
  assign stb_t  = stb_tt;
  assign data_q = dq;
  assign data_t = dt;

endmodule
