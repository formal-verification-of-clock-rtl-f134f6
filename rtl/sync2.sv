// sync2: conventional two-flip-flop synchronizer (source netlist version).
//
// Re-times a single-bit signal from another clock domain into the domain
// whose clock ticks are marked by `ce`. Output `q` follows `d` two ticks
// later. All domains share the base clock `clk` (see mff for the timing
// model); asynchronous active-low reset clears both stages.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic d,
  output logic q
);
  logic s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else if (ce) begin
      s1 <= d;
      s2 <= s1;
    end
  end

  assign q = s2;
endmodule
