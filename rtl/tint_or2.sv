// tint_or2: two-input OR gate with the method's tint rule.
//
// Data path: o = a | b. Tint path, as defined by the method's OR truth table:
//   o_t = (a & !b & a_t & !b_t)    only a tinted, and a alone sets o
//       | (!a & b & !a_t & b_t)    only b tinted, and b alone sets o
//       | (!a & !b & (a_t | b_t))  o is 0, so any tinted input could flip it
//       | (a & b & a_t & b_t)      both inputs 1 and both tinted
// Note that this rule is the method's own and is not the usual precise OR
// tracking rule: with both inputs tinted and exactly one of them 1 the output
// is reported clean. It is implemented exactly as tabulated. The first term is
// written so that it mirrors the second one, which is what the truth table
// requires.
//
// Interface: a, b, a_t, b_t in; o, o_t out. Combinational; the tint logic
// never feeds o.
module tint_or2 (
  input  logic a,
  input  logic b,
  input  logic a_t,
  input  logic b_t,
  output logic o,
  output logic o_t
);

  always_comb begin
    o   = a | b;
    o_t = (a & ~b & a_t & ~b_t)
        | (~a & b & ~a_t & b_t)
        | (~a & ~b & (a_t | b_t))
        | (a & b & a_t & b_t);
  end

  // A label can only come from a tinted input: clean in, clean out.
  always_comb begin
    if (!a_t && !b_t) assert (!o_t) else $error("clean inputs gave a tinted output");
  end

endmodule
