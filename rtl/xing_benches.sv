// xing_benches: the small crossing circuits, each in its processed form
// (metastable flip-flop models plus path-sensitization detectors), side by
// side between one domain A (ticks on ce_a) and one domain B (ticks on
// ce_b). Each is independent of the others; this module only gathers them:
//   gray_xfer_x    [1] Gray-coded counter, [0] binary counter, per-bit sync
//   quasi_static_x     configuration register used without synchronizer
//   mux_xing_x         multiplexer with local select before a synchronizer
//   comb_xing_x    [0] XOR (glitch-prone), [1] AND (glitch-free) before a sync
//   reconv_x       [0] two bits switching at once, [1] one bit at a time,
//                      synchronized separately and reconverging in B
// rnd carries the random bits of every model flip-flop, in the order of the
// list above (see each module for its own layout). `viol_any` has one bit
// per circuit, set while any of its flip-flops has V active, in the order
// {reconv[1], reconv[0], comb[1], comb[0], mux, quasi, gray[1], gray[0]}.
module xing_benches #(
  parameter int unsigned N  = 4,   // counter width
  parameter int unsigned NQ = 8,   // configuration register width
  localparam int unsigned RND_W = 12*N + 4*NQ + 8*N + 2 + 16 + 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce_a,
  input  logic                ce_b,
  input  logic [RND_W-1:0]    rnd,
  // counters
  input  logic                cnt_inc,
  output logic [1:0][N-1:0]   cnt_a,
  output logic [1:0][N-1:0]   cnt_b,
  // configuration register
  input  logic                cfg_we,
  input  logic [NQ-1:0]       cfg_in,
  input  logic                cfg_en,
  output logic [NQ-1:0]       cfg_a,
  output logic [NQ-1:0]       cfg_b,
  // multiplexer
  input  logic                mux_inc0,
  input  logic                mux_inc1,
  input  logic                mux_sel_in,
  output logic [1:0][N-1:0]   mux_cnt_a,
  output logic                mux_sel,
  output logic [N-1:0]        mux_cnt_b,
  // combinational gate
  input  logic                comb_step,
  output logic [1:0][1:0]     comb_a,
  output logic [1:0]          comb_f_a,
  output logic [1:0]          comb_y,
  // reconvergence
  input  logic                rc_step,
  output logic [1:0][1:0]     rc_s_a,
  output logic [1:0][1:0]     rc_s_b,
  output logic [7:0]          viol_any
);
  localparam int unsigned O_Q = 12*N;          // offsets into rnd
  localparam int unsigned O_M = O_Q + 4*NQ;
  localparam int unsigned O_C = O_M + 8*N + 2;
  localparam int unsigned O_R = O_C + 16;

  for (genvar k = 0; k < 2; k++) begin : g_pair
    logic [2*N-1:0] gv, gm;
    logic [1:0] cv, cm;
    logic [3:0] rv, rm;

    gray_xfer_x #(.N(N), .GRAY(k[0])) u_gray (
      .clk, .rst_n, .ce_a, .ce_b, .inc(cnt_inc), .rnd(rnd[6*N*k +: 6*N]),
      .cnt_a(cnt_a[k]), .cnt_b(cnt_b[k]), .viol(gv), .meta(gm));

    comb_xing_x #(.GLITCH_FREE(k[0])) u_comb (
      .clk, .rst_n, .ce_a, .ce_b, .step(comb_step), .rnd(rnd[O_C+8*k +: 8]),
      .a(comb_a[k]), .f_a(comb_f_a[k]), .y(comb_y[k]), .viol(cv), .meta(cm));

    reconv_x #(.ONE_AT_A_TIME(k[0])) u_rc (
      .clk, .rst_n, .ce_a, .ce_b, .step(rc_step), .rnd(rnd[O_R+16*k +: 16]),
      .s_a(rc_s_a[k]), .s_b(rc_s_b[k]), .viol(rv), .meta(rm));

    assign viol_any[k]   = |gv;
    assign viol_any[4+k] = |cv;
    assign viol_any[6+k] = |rv;
  end

  logic [NQ-1:0] qv, qm;
  quasi_static_x #(.N(NQ)) u_quasi (
    .clk, .rst_n, .ce_a, .ce_b, .cfg_we, .cfg_in, .en(cfg_en), .rnd(rnd[O_Q +: 4*NQ]),
    .cfg_a, .cfg_b, .viol(qv), .meta(qm));
  assign viol_any[2] = |qv;

  logic [2*N-1:0] mv, mm;
  mux_xing_x #(.N(N)) u_mux (
    .clk, .rst_n, .ce_a, .ce_b, .inc0(mux_inc0), .inc1(mux_inc1), .sel_in(mux_sel_in),
    .rnd(rnd[O_M +: 8*N+2]), .cnt0_a(mux_cnt_a[0]), .cnt1_a(mux_cnt_a[1]),
    .sel(mux_sel), .cnt_b(mux_cnt_b), .viol(mv), .meta(mm));
  assign viol_any[3] = |mv;
endmodule
