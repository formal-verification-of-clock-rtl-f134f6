// mff_sync2: two-flip-flop synchronizer built from metastable flip-flop
// models (the processed form of sync2).
//
// The first stage samples a signal of another clock domain, so its V input
// is that signal's T port: it is violated whenever the signal changed in
// the same base cycle as this domain's tick. The second stage samples the
// first stage, which is a local hazardous source, so its V input is the
// first stage's M port. What the second stage outputs is seen by further
// logic through Q: metastability is taken not to travel past two stages.
// Both stages reset to RESET_VAL.
// rnd = {r_meta2, r_val2, r_meta1, r_val1}. viol / meta = {stage2, stage1}.
module mff_sync2
  import tri_pkg::*;
#(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       d_q,
  input  tri_t       d_t,
  input  logic [3:0] rnd,
  output logic       q,
  output logic [1:0] viol,
  output logic [1:0] meta
);
  logic s1_q;
  tri_t s1_m, s1_t, s2_m, s2_t;

  mff #(.RESET_VAL(RESET_VAL)) u_s1 (.clk, .rst_n, .ce, .d(d_q), .v(d_t), .r_val(rnd[0]), .r_meta(rnd[1]),
            .q(s1_q), .m(s1_m), .t(s1_t));
  mff #(.RESET_VAL(RESET_VAL)) u_s2 (.clk, .rst_n, .ce, .d(s1_q), .v(s1_m), .r_val(rnd[2]), .r_meta(rnd[3]),
            .q(q), .m(s2_m), .t(s2_t));

  assign viol = {tri_active(s1_m), tri_active(d_t)};
  assign meta = {tri_active(s2_m), tri_active(s1_m)};
endmodule
