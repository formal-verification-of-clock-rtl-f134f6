// reconv_x: two signals synchronized separately and used together in the
// receiving domain (processed netlist).
//
// Domain A holds a two-bit state s = {s1, s0} that moves one step on each
// tick with `step` high:
//   ONE_AT_A_TIME = 0: s alternates 01 <-> 10, both bits switching at once;
//   ONE_AT_A_TIME = 1: s walks 00 -> 01 -> 11 -> 10 -> 00, one bit per step.
// Each bit crosses to domain B through its own two-flip-flop synchronizer
// and B registers the pair as `s_b` (a reconvergence point). Two
// synchronizers need not resolve in the same cycle, so when both bits move
// at once s_b can show 00 or 11, states A never had. When only one bit
// moves per step, s_b always shows the old or the new state.
// rnd: 4 bits per bit-synchronizer (bit i at 4i), then [9:8] s0, [11:10] s1,
// [13:12] / [15:14] the two s_b flip-flops.
// viol / meta: {bit 1 stage 2, bit 1 stage 1, bit 0 stage 2, bit 0 stage 1}.
module reconv_x
  import tri_pkg::*;
#(
  parameter bit ONE_AT_A_TIME = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce_a,
  input  logic        ce_b,
  input  logic        step,
  input  logic [15:0] rnd,
  output logic [1:0]  s_a,
  output logic [1:0]  s_b,
  output logic [3:0]  viol,
  output logic [3:0]  meta
);
  localparam logic [1:0] S_RESET = ONE_AT_A_TIME ? 2'b00 : 2'b01;

  logic [1:0] s_d, rx;
  tri_t [1:0] s_m, s_t, b_m, b_t;

  always_comb begin
    s_d = s_a;
    if (step) begin
      if (ONE_AT_A_TIME) s_d = {s_a[0], ~s_a[1]};   // 00 01 11 10
      else               s_d = ~s_a;                // 01 <-> 10
    end
  end

  for (genvar i = 0; i < 2; i++) begin : g_bit
    mff #(.RESET_VAL(S_RESET[i])) u_s (.clk, .rst_n, .ce(ce_a), .d(s_d[i]), .v(TRI_0),
             .r_val(rnd[8+2*i]), .r_meta(rnd[9+2*i]), .q(s_a[i]), .m(s_m[i]), .t(s_t[i]));
    mff_sync2 #(.RESET_VAL(S_RESET[i])) u_sync (.clk, .rst_n, .ce(ce_b), .d_q(s_a[i]), .d_t(s_t[i]),
                      .rnd(rnd[4*i +: 4]), .q(rx[i]),
                      .viol(viol[2*i +: 2]), .meta(meta[2*i +: 2]));
    // the reconvergence register samples only synchronized (safe) values
    mff #(.RESET_VAL(S_RESET[i])) u_b (.clk, .rst_n, .ce(ce_b), .d(rx[i]), .v(TRI_0),
             .r_val(rnd[12+2*i]), .r_meta(rnd[13+2*i]), .q(s_b[i]), .m(b_m[i]), .t(b_t[i]));
  end
endmodule
