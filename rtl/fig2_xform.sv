// fig2_xform: the transformation applied to one destination flip-flop,
// y = f(a, b, c), with one source of each class.
//
//   a - domain A flip-flop (ticks on ce_a), loaded from input a_in. It is in
//       a different domain than y, so y sees it through its T port.
//   b - domain B flip-flop that samples a directly (a first synchronizer
//       stage). It can itself be late, so y sees it through its M port.
//   c - domain B flip-flop loaded from the local input c_in; never late, so
//       y sees it through Q.
//   y - domain B destination, D = f(a, b, c) = (a | b) & c.
// The function f is this design's choice: with c = 0 the AND masks both
// hazardous sources and y cannot be violated; with c = 1 a transition of a
// or a late b reaches y's D input and raises y's V.
// b's own detector is just a's T port (its D is a itself). a and c have no
// hazardous source, so they get no detector (V tied inactive).
// rnd holds (r_val, r_meta) pairs: [1:0] a, [3:2] b, [5:4] c, [7:6] y.
// viol / meta: {y, c, b, a}. y_viol is y's V after conversion (1 = active).
module fig2_xform
  import tri_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_a,
  input  logic       ce_b,
  input  logic       a_in,
  input  logic       c_in,
  input  logic [7:0] rnd,
  output logic       a_q,
  output logic       b_q,
  output logic       c_q,
  output logic       y_q,
  output logic [3:0] viol,
  output logic [3:0] meta
);
  function automatic tri_t f_y(tri_t a, tri_t b, tri_t c);
    return tri_and(tri_or(a, b), c);
  endfunction

  tri_t a_m, a_t, b_m, b_t, c_m, c_t, y_m, y_t;
  tri_t y_v;

  mff u_a (.clk, .rst_n, .ce(ce_a), .d(a_in), .v(TRI_0),
           .r_val(rnd[0]), .r_meta(rnd[1]), .q(a_q), .m(a_m), .t(a_t));
  mff u_b (.clk, .rst_n, .ce(ce_b), .d(a_q), .v(a_t),
           .r_val(rnd[2]), .r_meta(rnd[3]), .q(b_q), .m(b_m), .t(b_t));
  mff u_c (.clk, .rst_n, .ce(ce_b), .d(c_in), .v(TRI_0),
           .r_val(rnd[4]), .r_meta(rnd[5]), .q(c_q), .m(c_m), .t(c_t));

  // path-sensitization detector: a via T, b via M, c via Q
  assign y_v = f_y(a_t, b_m, tri_known(c_q));

  mff u_y (.clk, .rst_n, .ce(ce_b),
           .d(f_y(tri_known(a_q), tri_known(b_q), tri_known(c_q)).v), .v(y_v),
           .r_val(rnd[6]), .r_meta(rnd[7]), .q(y_q), .m(y_m), .t(y_t));

  assign viol = {tri_active(y_v), 1'b0, tri_active(a_t), 1'b0};
  assign meta = {tri_active(y_m), tri_active(c_m), tri_active(b_m), tri_active(a_m)};
endmodule
