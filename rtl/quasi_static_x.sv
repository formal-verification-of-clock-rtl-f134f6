// quasi_static_x: configuration value used in another clock domain without
// any synchronizer (processed netlist).
//
// Domain A holds an N-bit configuration register written by `cfg_we` /
// `cfg_in` (typically by software during initialization). Domain B copies
// it into its own register `cfg_b` on every tick while its local enable
// `en` is high: cfg_b' = en ? cfg : cfg_b. The copy is safe without a
// synchronizer as long as the configuration is never written while en is
// high, a functional constraint of the system rather than a structural
// property. The detector of each cfg_b bit is the same multiplexer in
// three-valued logic: with en a known 0 the foreign bit is masked, with en
// a known 1 the bit only raises V in a cycle where it changed.
// cfg_b samples a foreign signal, so it sees itself through its M port.
// rnd: [2N-1:0] pairs of the A register, [4N-1:2N] pairs of cfg_b.
// viol / meta: per cfg_b bit.
module quasi_static_x
  import tri_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce_a,
  input  logic           ce_b,
  input  logic           cfg_we,
  input  logic [N-1:0]   cfg_in,
  input  logic           en,
  input  logic [4*N-1:0] rnd,
  output logic [N-1:0]   cfg_a,
  output logic [N-1:0]   cfg_b,
  output logic [N-1:0]   viol,
  output logic [N-1:0]   meta
);
  function automatic tri_t f_cp(tri_t en_i, tri_t old_i, tri_t new_i);
    return tri_mux(en_i, old_i, new_i);
  endfunction

  tri_t [N-1:0] a_m, a_t, b_m, b_t;

  for (genvar i = 0; i < N; i++) begin : g_bit
    tri_t b_v;
    mff u_a (.clk, .rst_n, .ce(ce_a), .d(cfg_we ? cfg_in[i] : cfg_a[i]), .v(TRI_0),
             .r_val(rnd[2*i]), .r_meta(rnd[2*i+1]), .q(cfg_a[i]), .m(a_m[i]), .t(a_t[i]));
    assign b_v = f_cp(tri_known(en), b_m[i], a_t[i]);
    mff u_b (.clk, .rst_n, .ce(ce_b),
             .d(f_cp(tri_known(en), tri_known(cfg_b[i]), tri_known(cfg_a[i])).v), .v(b_v),
             .r_val(rnd[2*N+2*i]), .r_meta(rnd[2*N+2*i+1]),
             .q(cfg_b[i]), .m(b_m[i]), .t(b_t[i]));
    assign viol[i] = tri_active(b_v);
    assign meta[i] = tri_active(b_m[i]);
  end
endmodule
