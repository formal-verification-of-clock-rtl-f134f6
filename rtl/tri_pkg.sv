// tri_pkg: three-valued "violation" signals for the metastable flip-flop
// model and the path-sensitization logic built around it.
//
// The violation ports of the model (V in, M and T out) carry three values:
// an unknown value means "a timing violation is active", while a known 0 or
// 1 means "inactive" and, for M and T, repeats the flip-flop's Q. Classic
// four-valued simulators express the unknown as 1'bx. Synthesizable logic
// and two-state simulators have no x, so here every such signal is a
// two-bit dual-rail value: `x` set means unknown (active), otherwise `v`
// holds the known 0/1 value. By convention `v` is 0 whenever `x` is 1.
//
// The gate functions below follow Kleene's strong three-valued logic, which
// is exactly how a Verilog gate treats x: a controlling input (0 for AND,
// 1 for OR) masks an unknown on the other input, XOR never masks, and a
// multiplexer with an unknown select still gives a known output when both
// data inputs agree. Evaluating a copy of a destination flip-flop's
// next-state function with these gates tells whether an unknown can reach
// the flip-flop's D input, i.e. whether a sensitized path exists from a
// hazardous source.
//
// The converters `tri_active` and `tri_known` play the role of the model's
// converter blocks: {x, 0/1} -> {1, 0} and back.
//
// Source classes: how a source flip-flop is seen by one destination. A source
// in another clock domain is connected through its T port, a same-domain
// source that itself samples another domain through its M port, and any
// other source through Q.
package tri_pkg;

  typedef struct packed {
    logic x;   // 1: unknown, i.e. violation active
    logic v;   // known value when x is 0
  } tri_t;

  localparam tri_t TRI_X = '{x: 1'b1, v: 1'b0};
  localparam tri_t TRI_0 = '{x: 1'b0, v: 1'b0};
  localparam tri_t TRI_1 = '{x: 1'b0, v: 1'b1};

  typedef enum logic [1:0] {
    SRC_SAFE    = 2'd0,  // same domain, never late: use Q
    SRC_LOCAL   = 2'd1,  // same domain, may be metastable: use M
    SRC_FOREIGN = 2'd2   // other clock domain: use T
  } src_class_e;

  // Converter {1,0} -> {x, 0/1}: known copy of a two-valued bit.
  function automatic tri_t tri_known(input logic b);
    return '{x: 1'b0, v: b};
  endfunction

  // Converter {x, 0/1} -> {1,0}: is the violation active?
  function automatic logic tri_active(input tri_t a);
    return a.x;
  endfunction

  // Either the known value q or x, depending on an internal active flag.
  function automatic tri_t tri_flag(input logic active, input logic q);
    return active ? TRI_X : tri_known(q);
  endfunction

  function automatic logic tri_is0(input tri_t a);
    return !a.x && !a.v;
  endfunction

  function automatic logic tri_is1(input tri_t a);
    return !a.x && a.v;
  endfunction

  function automatic tri_t tri_not(input tri_t a);
    return a.x ? TRI_X : tri_known(!a.v);
  endfunction

  function automatic tri_t tri_and(input tri_t a, input tri_t b);
    if (tri_is0(a) || tri_is0(b)) return TRI_0;
    if (a.x || b.x)               return TRI_X;
    return TRI_1;
  endfunction

  function automatic tri_t tri_or(input tri_t a, input tri_t b);
    if (tri_is1(a) || tri_is1(b)) return TRI_1;
    if (a.x || b.x)               return TRI_X;
    return TRI_0;
  endfunction

  function automatic tri_t tri_xor(input tri_t a, input tri_t b);
    if (a.x || b.x) return TRI_X;
    return tri_known(a.v ^ b.v);
  endfunction

  // sel ? b : a
  function automatic tri_t tri_mux(input tri_t sel, input tri_t a, input tri_t b);
    if (!sel.x)            return sel.v ? b : a;
    if (!a.x && !b.x && (a.v == b.v)) return a;
    return TRI_X;
  endfunction

  // Pick the port through which a source is seen by a destination.
  function automatic tri_t tri_src(input src_class_e cls, input logic q,
                                   input tri_t m, input tri_t t);
    case (cls)
      SRC_LOCAL:   return m;
      SRC_FOREIGN: return t;
      default:     return tri_known(q);
    endcase
  endfunction

endpackage
