// cdc_top: the sender/receiver case study, as source netlist and as
// processed netlist, side by side.
//
// Two copies of the same four-phase handshake transfer across two clock
// domains (sender ticks on ce_s, receiver on ce_r, one base clock clk):
//   * src_*: built from ordinary flip-flops (hs_sender, hs_receiver). It
//     cannot show a clock-domain-crossing failure, whatever the synchronizer
//     configuration, because its flip-flops never see a timing violation.
//   * prc_*: the same circuit after the transformation (hs_sender_x,
//     hs_receiver_x): every flip-flop is a metastable flip-flop model (mff)
//     whose V input is driven by a three-valued copy of its next-state logic.
//     The random bits prc_rnd decide what a violated flip-flop latches and
//     whether it stays metastable for a cycle; a formal tool would treat them
//     as free inputs, a simulation drives them randomly.
// Beside them stands fig2_xform, the transformation of a single destination
// flip-flop with one source of each class, with ports of its own.
// The remaining ports (xb_*) belong to xing_benches, a set of small
// independent crossing circuits in processed form (Gray and binary counter
// transfer, quasi-static configuration, multiplexer, glitch-prone and
// glitch-free gate, reconvergent synchronizers); they use ce_s as their
// domain A and ce_r as their domain B.
// Each copy has an hs_monitor that checks the three interface properties
// and reports sticky error bits.
//
// SENDER_SYNC / RECEIVER_SYNC select the four synchronizer configurations
// of the case study; both on (the correct design) is the default.
// prc_rnd layout: [2*(4+DATA_W)-1:0] sender, the rest receiver (see
// hs_sender_x / hs_receiver_x). prc_viol / prc_meta: {receiver, sender}
// per-flip-flop violation and metastability flags.
module cdc_top
  import tri_pkg::*;
  import hs_pkg::*;
#(
  parameter int unsigned DATA_W        = 8,
  parameter bit          SENDER_SYNC   = 1'b1,
  parameter bit          RECEIVER_SYNC = 1'b1,
  parameter int unsigned BOUND         = 256,
  parameter int unsigned XB_N          = 4,   // counter width of the crossing circuits
  parameter int unsigned XB_NQ         = 8,   // configuration register width
  localparam int unsigned XB_RND_W     = 12*XB_N + 4*XB_NQ + 8*XB_N + 2 + 16 + 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce_s,
  input  logic                    ce_r,
  // source netlist
  input  logic                    src_send,
  input  logic [DATA_W-1:0]       src_data_in,
  output logic                    src_busy,
  output logic                    src_valid,
  output logic [DATA_W-1:0]       src_data_out,
  output hs_err_t                 src_err,
  output logic [31:0]             src_n_valid,
  // processed netlist
  input  logic                    prc_send,
  input  logic [DATA_W-1:0]       prc_data_in,
  input  logic [4*(4+DATA_W)-1:0] prc_rnd,
  output logic                    prc_busy,
  output logic                    prc_valid,
  output logic [DATA_W-1:0]       prc_data_out,
  output hs_err_t                 prc_err,
  output logic [31:0]             prc_n_valid,
  output logic [2*(4+DATA_W)-1:0] prc_viol,
  output logic [2*(4+DATA_W)-1:0] prc_meta,
  // single-destination transformation example (independent of the above)
  input  logic                    f2_ce_a,
  input  logic                    f2_ce_b,
  input  logic                    f2_a_in,
  input  logic                    f2_c_in,
  input  logic [7:0]              f2_rnd,
  output logic [3:0]              f2_q,      // {y, c, b, a}
  output logic [3:0]              f2_viol,
  output logic [3:0]              f2_meta,
  // small crossing circuits (domain A = ce_s, domain B = ce_r), see xing_benches
  input  logic [XB_RND_W-1:0]     xb_rnd,
  input  logic                    xb_cnt_inc,
  output logic [1:0][XB_N-1:0]    xb_cnt_a,
  output logic [1:0][XB_N-1:0]    xb_cnt_b,
  input  logic                    xb_cfg_we,
  input  logic [XB_NQ-1:0]        xb_cfg_in,
  input  logic                    xb_cfg_en,
  output logic [XB_NQ-1:0]        xb_cfg_a,
  output logic [XB_NQ-1:0]        xb_cfg_b,
  input  logic                    xb_mux_inc0,
  input  logic                    xb_mux_inc1,
  input  logic                    xb_mux_sel_in,
  output logic [1:0][XB_N-1:0]    xb_mux_cnt_a,
  output logic                    xb_mux_sel,
  output logic [XB_N-1:0]         xb_mux_cnt_b,
  input  logic                    xb_comb_step,
  output logic [1:0][1:0]         xb_comb_a,
  output logic [1:0]              xb_comb_f_a,
  output logic [1:0]              xb_comb_y,
  input  logic                    xb_rc_step,
  output logic [1:0][1:0]         xb_rc_s_a,
  output logic [1:0][1:0]         xb_rc_s_b,
  output logic [7:0]              xb_viol_any
);
  localparam int unsigned RW = 2*(4+DATA_W);

  // ---------------- source netlist
  logic s_stb, s_ack;
  logic [DATA_W-1:0] s_data;
  logic [31:0] s_nsend;

  hs_sender #(.DATA_W(DATA_W), .SYNC(SENDER_SYNC)) u_src_snd (
    .clk, .rst_n, .ce(ce_s), .send(src_send), .data_in(src_data_in),
    .busy(src_busy), .stb(s_stb), .data(s_data), .ack(s_ack));

  hs_receiver #(.DATA_W(DATA_W), .SYNC(RECEIVER_SYNC)) u_src_rcv (
    .clk, .rst_n, .ce(ce_r), .stb(s_stb), .data(s_data),
    .ack(s_ack), .valid(src_valid), .data_out(src_data_out));

  hs_monitor #(.DATA_W(DATA_W), .BOUND(BOUND)) u_src_mon (
    .clk, .rst_n, .ce_s, .ce_r, .send(src_send), .data_in(src_data_in),
    .busy(src_busy), .valid(src_valid), .data_out(src_data_out),
    .err(src_err), .n_send(s_nsend), .n_valid(src_n_valid));

  // ---------------- processed netlist
  logic p_stb_q, p_ack_q;
  tri_t p_stb_t, p_ack_t;
  logic [DATA_W-1:0] p_data_q;
  tri_t [DATA_W-1:0] p_data_t;
  logic [31:0] p_nsend;

  hs_sender_x #(.DATA_W(DATA_W), .SYNC(SENDER_SYNC)) u_prc_snd (
    .clk, .rst_n, .ce(ce_s), .send(prc_send), .data_in(prc_data_in),
    .rnd(prc_rnd[RW-1:0]), .busy(prc_busy),
    .stb_q(p_stb_q), .stb_t(p_stb_t), .data_q(p_data_q), .data_t(p_data_t),
    .ack_q(p_ack_q), .ack_t(p_ack_t),
    .viol(prc_viol[RW/2-1:0]), .meta(prc_meta[RW/2-1:0]));

  hs_receiver_x #(.DATA_W(DATA_W), .SYNC(RECEIVER_SYNC)) u_prc_rcv (
    .clk, .rst_n, .ce(ce_r), .stb_q(p_stb_q), .stb_t(p_stb_t),
    .data_q(p_data_q), .data_t(p_data_t), .rnd(prc_rnd[2*RW-1:RW]),
    .ack_q(p_ack_q), .ack_t(p_ack_t), .valid(prc_valid), .data_out(prc_data_out),
    .viol(prc_viol[RW-1:RW/2]), .meta(prc_meta[RW-1:RW/2]));

  hs_monitor #(.DATA_W(DATA_W), .BOUND(BOUND)) u_prc_mon (
    .clk, .rst_n, .ce_s, .ce_r, .send(prc_send), .data_in(prc_data_in),
    .busy(prc_busy), .valid(prc_valid), .data_out(prc_data_out),
    .err(prc_err), .n_send(p_nsend), .n_valid(prc_n_valid));

  // ---------------- single-destination example y = f(a, b, c)
  fig2_xform u_fig2 (
    .clk, .rst_n, .ce_a(f2_ce_a), .ce_b(f2_ce_b), .a_in(f2_a_in), .c_in(f2_c_in),
    .rnd(f2_rnd), .a_q(f2_q[0]), .b_q(f2_q[1]), .c_q(f2_q[2]), .y_q(f2_q[3]),
    .viol(f2_viol), .meta(f2_meta));

  // ---------------- small crossing circuits
  xing_benches #(.N(XB_N), .NQ(XB_NQ)) u_xb (
    .clk, .rst_n, .ce_a(ce_s), .ce_b(ce_r), .rnd(xb_rnd),
    .cnt_inc(xb_cnt_inc), .cnt_a(xb_cnt_a), .cnt_b(xb_cnt_b),
    .cfg_we(xb_cfg_we), .cfg_in(xb_cfg_in), .cfg_en(xb_cfg_en),
    .cfg_a(xb_cfg_a), .cfg_b(xb_cfg_b),
    .mux_inc0(xb_mux_inc0), .mux_inc1(xb_mux_inc1), .mux_sel_in(xb_mux_sel_in),
    .mux_cnt_a(xb_mux_cnt_a), .mux_sel(xb_mux_sel), .mux_cnt_b(xb_mux_cnt_b),
    .comb_step(xb_comb_step), .comb_a(xb_comb_a), .comb_f_a(xb_comb_f_a), .comb_y(xb_comb_y),
    .rc_step(xb_rc_step), .rc_s_a(xb_rc_s_a), .rc_s_b(xb_rc_s_b),
    .viol_any(xb_viol_any));

endmodule
