// mux_xing_x: multiplexer in a clock-domain crossing path (processed
// netlist).
//
// Domain A holds two N-bit Gray-coded counters, advanced by inc0 / inc1.
// Domain B picks one of them with its local select register `sel` and
// passes the chosen bits through a two-flip-flop synchronizer per bit:
// stage 1 is y1[i]' = sel ? g1[i] : g0[i]. `cnt_b` is the decoded output of
// stage 2. A structural rule forbids logic in front of a synchronizer; a
// multiplexer with a local select is the standard exception, because only
// one crossing path to each stage-1 flip-flop is sensitized at a time. The
// three-valued multiplexer detector shows exactly that: with sel known,
// only the selected counter bit can raise V.
// rnd: [2N-1:0] g0 pairs, [4N-1:2N] g1 pairs, [8N-1:4N] four bits per
// synchronized bit i at 4N+4i (stage 1 pair, then stage 2 pair),
// [8N+1:8N] sel. viol / meta: {stage 2 bits, stage 1 bits}.
module mux_xing_x
  import tri_pkg::*;
  import xing_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce_a,
  input  logic             ce_b,
  input  logic             inc0,
  input  logic             inc1,
  input  logic             sel_in,
  input  logic [8*N+1:0]   rnd,
  output logic [N-1:0]     cnt0_a,
  output logic [N-1:0]     cnt1_a,
  output logic             sel,
  output logic [N-1:0]     cnt_b,
  output logic [2*N-1:0]   viol,
  output logic [2*N-1:0]   meta
);
  function automatic tri_t f_y1(tri_t s, tri_t a0, tri_t a1);
    return tri_mux(s, a0, a1);
  endfunction

  logic [N-1:0] g0, g1, g0_d, g1_d, y1_q, y2_q;
  tri_t [N-1:0] g0_m, g0_t, g1_m, g1_t, y1_m, y1_t, y2_m, y2_t;
  tri_t sel_m, sel_t;

  // next Gray code: decode, add one modulo 2^N, encode
  function automatic logic [N-1:0] gray_inc(input logic [N-1:0] g);
    logic [N-1:0] b;
    b = N'(gray2bin(MAX_W'(g))) + 1'b1;
    return N'(bin2gray(MAX_W'(b)));
  endfunction

  assign g0_d = inc0 ? gray_inc(g0) : g0;
  assign g1_d = inc1 ? gray_inc(g1) : g1;

  mff u_sel (.clk, .rst_n, .ce(ce_b), .d(sel_in), .v(TRI_0),
             .r_val(rnd[8*N]), .r_meta(rnd[8*N+1]), .q(sel), .m(sel_m), .t(sel_t));

  for (genvar i = 0; i < N; i++) begin : g_bit
    tri_t y1_v;
    mff u_g0 (.clk, .rst_n, .ce(ce_a), .d(g0_d[i]), .v(TRI_0),
              .r_val(rnd[2*i]), .r_meta(rnd[2*i+1]), .q(g0[i]), .m(g0_m[i]), .t(g0_t[i]));
    mff u_g1 (.clk, .rst_n, .ce(ce_a), .d(g1_d[i]), .v(TRI_0),
              .r_val(rnd[2*N+2*i]), .r_meta(rnd[2*N+2*i+1]), .q(g1[i]), .m(g1_m[i]), .t(g1_t[i]));
    assign y1_v = f_y1(tri_known(sel), g0_t[i], g1_t[i]);
    mff u_y1 (.clk, .rst_n, .ce(ce_b),
              .d(f_y1(tri_known(sel), tri_known(g0[i]), tri_known(g1[i])).v), .v(y1_v),
              .r_val(rnd[4*N+4*i]), .r_meta(rnd[4*N+4*i+1]), .q(y1_q[i]), .m(y1_m[i]), .t(y1_t[i]));
    mff u_y2 (.clk, .rst_n, .ce(ce_b), .d(y1_q[i]), .v(y1_m[i]),
              .r_val(rnd[4*N+4*i+2]), .r_meta(rnd[4*N+4*i+3]), .q(y2_q[i]), .m(y2_m[i]), .t(y2_t[i]));
    assign viol[i]   = tri_active(y1_v);
    assign viol[N+i] = tri_active(y1_m[i]);
    assign meta[i]   = tri_active(y1_m[i]);
    assign meta[N+i] = tri_active(y2_m[i]);
  end

  assign cnt0_a = N'(gray2bin(MAX_W'(g0)));
  assign cnt1_a = N'(gray2bin(MAX_W'(g1)));
  assign cnt_b  = N'(gray2bin(MAX_W'(y2_q)));
endmodule
