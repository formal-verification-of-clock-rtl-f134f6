// mff: metastable flip-flop model.
//
// A drop-in replacement for a D flip-flop that can reproduce, in ordinary
// cycle-based simulation, what a real flip-flop does when its setup or hold
// time is violated. Besides D and Q it has a violation input V and two
// violation outputs M (metastable) and T (transition), all three-valued as
// defined in tri_pkg: unknown = active, known = inactive and equal to Q.
//
// Inside are two storage flip-flops. FF1 (q_ff) holds the data bit. FF2
// (meta_ff) records that the model is in a prolonged clock-to-Q transition
// during the current cycle of its clock domain. On a clock tick:
//   * V inactive: FF1 latches D and FF2 clears, as in a normal flip-flop.
//   * V active:   FF1 latches the random bit r_val (the value a violated
//                 flip-flop settles to is unpredictable) and FF2 latches the
//                 random bit r_meta (whether it stays metastable, i.e. is
//                 late, for the next cycle).
// M is active while FF2 is set. T is active in the base-clock cycle right
// after Q changed, and also while M is active (a late output is a late
// transition for any receiver). The two random bits are ports: a formal tool
// treats them as free inputs, a simulation drives them from any random
// source.
//
// Timing model (this design's choice): all domains run from one base clock
// `clk`; `ce` marks the base cycles in which this flip-flop's own domain
// clock ticks. Two domains that tick in the same base cycle have edges close
// enough to collide, which is what T reports. With ce tied high every base
// cycle is a tick of every domain, the fully asynchronous worst case.
// Reset (asynchronous, active low) clears Q and both flags.
module mff
  import tri_pkg::*;
#(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,      // this domain's clock tick
  input  logic d,
  input  tri_t v,       // input timing violation (unknown = active)
  input  logic r_val,   // random bit latched on a violation
  input  logic r_meta,  // random bit: become metastable after a violation
  output logic q,
  output tri_t m,       // prolonged clk-to-q this cycle (unknown = active)
  output tri_t t        // Q transitioned this cycle (unknown = active)
);

  logic q_ff;      // FF1: data storage
  logic meta_ff;   // FF2: metastable during the current domain cycle
  logic chg_ff;    // Q changed at the last base-clock edge
  logic viol;      // converted V
  logic q_next;

  assign viol   = tri_active(v);
  assign q_next = viol ? r_val : d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_ff    <= RESET_VAL;
      meta_ff <= 1'b0;
      chg_ff  <= 1'b0;
    end else if (ce) begin
      q_ff    <= q_next;
      meta_ff <= viol & r_meta;
      chg_ff  <= (q_next != q_ff);
    end else begin
      chg_ff  <= 1'b0;
    end
  end

  assign q = q_ff;
  assign m = tri_flag(meta_ff, q_ff);
  assign t = tri_flag(meta_ff | chg_ff, q_ff);

endmodule
