// comb_xing_x: combinational gate in front of a synchronizer (processed
// netlist).
//
// Domain A holds two flip-flops a0, a1 that always change together: each
// tick with `step` high moves them between 00 and 11. Domain B computes
// f(a0, a1) and synchronizes it with two flip-flops, y1 then y2.
//   GLITCH_FREE = 0: f = a0 ^ a1. The function is constantly 0, but when
//     both inputs switch at once a real gate can pulse, and y1 can catch
//     the pulse: the XOR passes an unknown from either input, so y1's V is
//     raised and y1 may latch 1, a value f never had.
//   GLITCH_FREE = 1: f = a0 & a1. Switching 00 <-> 11 moves the AND output
//     once, without a pulse; y1 may still be violated, but it can only
//     settle to the old or the new value of f, both legitimate.
// Both variants break the structural "no logic before a synchronizer"
// rule; only the first one fails.
// rnd: [1:0] a0, [3:2] a1, [5:4] y1, [7:6] y2. viol / meta: {y2, y1}.
module comb_xing_x
  import tri_pkg::*;
#(
  parameter bit GLITCH_FREE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_a,
  input  logic       ce_b,
  input  logic       step,
  input  logic [7:0] rnd,
  output logic [1:0] a,      // {a1, a0}
  output logic       f_a,    // f evaluated on the domain-A values
  output logic       y,      // synchronized f in domain B
  output logic [1:0] viol,
  output logic [1:0] meta
);
  function automatic tri_t f_y1(tri_t x0, tri_t x1);
    return GLITCH_FREE ? tri_and(x0, x1) : tri_xor(x0, x1);
  endfunction

  tri_t a0_m, a0_t, a1_m, a1_t, y1_m, y1_t, y2_m, y2_t;
  tri_t y1_v;
  logic y1_q;

  mff u_a0 (.clk, .rst_n, .ce(ce_a), .d(a[0] ^ step), .v(TRI_0),
            .r_val(rnd[0]), .r_meta(rnd[1]), .q(a[0]), .m(a0_m), .t(a0_t));
  mff u_a1 (.clk, .rst_n, .ce(ce_a), .d(a[1] ^ step), .v(TRI_0),
            .r_val(rnd[2]), .r_meta(rnd[3]), .q(a[1]), .m(a1_m), .t(a1_t));

  assign f_a  = f_y1(tri_known(a[0]), tri_known(a[1])).v;
  assign y1_v = f_y1(a0_t, a1_t);

  mff u_y1 (.clk, .rst_n, .ce(ce_b), .d(f_a), .v(y1_v),
            .r_val(rnd[4]), .r_meta(rnd[5]), .q(y1_q), .m(y1_m), .t(y1_t));
  mff u_y2 (.clk, .rst_n, .ce(ce_b), .d(y1_q), .v(y1_m),
            .r_val(rnd[6]), .r_meta(rnd[7]), .q(y), .m(y2_m), .t(y2_t));

  assign viol = {tri_active(y1_m), tri_active(y1_v)};
  assign meta = {tri_active(y2_m), tri_active(y1_m)};
endmodule
