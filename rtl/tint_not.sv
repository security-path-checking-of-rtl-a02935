// tint_not: inverter with tint tracking.
//
// NOT is the third cell of the AND/OR/NOT set from which every tracked
// netlist is built. Its data output is o = !a. The method does not tabulate
// a tint rule for it; since the single input always decides the output, the
// tint label is carried straight through: o_t = a_t (this design's choice).
//
// Interface: a, a_t in; o, o_t out. Combinational.
module tint_not (
  input  logic a,
  input  logic a_t,
  output logic o,
  output logic o_t
);

  always_comb begin
    o   = ~a;
    o_t = a_t;
  end

  // A label can only come from a tinted input: clean in, clean out.
  always_comb begin
    if (!a_t) assert (!o_t) else $error("clean inputs gave a tinted output");
  end

endmodule
