// tint_and2: two-input AND gate with gate-level tint (taint) tracking.
//
// Every data wire carries a one-bit tint label: 1 means the value is tinted
// (secret for a confidentiality check, untrusted for an integrity check),
// 0 means it is clean. The data path is an ordinary AND, o = a & b. The tint
// output is set only when a tinted input can actually change o:
//   o_t = (b & a_t) | (a & b_t) | (a_t & b_t)
// A tinted input that is masked by a clean 0 on the other input leaves the
// output clean. This is the rule the method defines for the AND cell, and it
// matches its printed truth table row for row.
//
// Interface: a, b and their labels a_t, b_t in; o and o_t out. Purely
// combinational; the tint logic never feeds the data output, so adding the
// labels does not change the function of the circuit.
module tint_and2 (
  input  logic a,
  input  logic b,
  input  logic a_t,
  input  logic b_t,
  output logic o,
  output logic o_t
);

  always_comb begin
    o   = a & b;
    o_t = (b & a_t) | (a & b_t) | (a_t & b_t);
  end

  // A label can only come from a tinted input: clean in, clean out.
  always_comb begin
    if (!a_t && !b_t) assert (!o_t) else $error("clean inputs gave a tinted output");
  end

endmodule
