// tint_full_adder: one-bit full adder built only from tracked AND, OR and NOT
// cells, so that tint labels travel through it gate by gate.
//
// Netlist (13 cells):
//   p    = a XOR b   = (a & !b) | (!a & b)
//   s    = p XOR cin = (p & !cin) | (!p & cin)
//   cout = (a & b) | (p & cin)
// Each cell is a tint_and2, tint_or2 or tint_not, so the labels s_t and
// cout_t are what the per-gate rules give for this particular netlist; a
// different netlist of the same adder may label its outputs differently.
// The gate structure is this design's choice; the method names the adder but
// does not give its netlist.
//
// Interface: a, b, cin and their labels in; s, cout and their labels out.
// Combinational.
module tint_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic a_t,
  input  logic b_t,
  input  logic cin_t,
  output logic s,
  output logic cout,
  output logic s_t,
  output logic cout_t
);

  // a XOR b
  logic na, na_t, nb, nb_t;
  logic x1, x1_t, x2, x2_t;
  logic p, p_t;
  tint_not u_na (.a(a), .a_t(a_t), .o(na), .o_t(na_t));
  tint_not u_nb (.a(b), .a_t(b_t), .o(nb), .o_t(nb_t));
  tint_and2 u_x1 (.a(a),  .b(nb), .a_t(a_t),  .b_t(nb_t), .o(x1), .o_t(x1_t));
  tint_and2 u_x2 (.a(na), .b(b),  .a_t(na_t), .b_t(b_t),  .o(x2), .o_t(x2_t));
  tint_or2  u_p  (.a(x1), .b(x2), .a_t(x1_t), .b_t(x2_t), .o(p),  .o_t(p_t));

  // p XOR cin
  logic np, np_t, nc, nc_t;
  logic y1, y1_t, y2, y2_t;
  tint_not u_np (.a(p),   .a_t(p_t),   .o(np), .o_t(np_t));
  tint_not u_nc (.a(cin), .a_t(cin_t), .o(nc), .o_t(nc_t));
  tint_and2 u_y1 (.a(p),  .b(nc),  .a_t(p_t),  .b_t(nc_t),  .o(y1), .o_t(y1_t));
  tint_and2 u_y2 (.a(np), .b(cin), .a_t(np_t), .b_t(cin_t), .o(y2), .o_t(y2_t));
  tint_or2  u_s  (.a(y1), .b(y2),  .a_t(y1_t), .b_t(y2_t),  .o(s),  .o_t(s_t));

  // carry
  logic g, g_t, t, t_t;
  tint_and2 u_g  (.a(a), .b(b),   .a_t(a_t), .b_t(b_t),   .o(g),    .o_t(g_t));
  tint_and2 u_t  (.a(p), .b(cin), .a_t(p_t), .b_t(cin_t), .o(t),    .o_t(t_t));
  tint_or2  u_co (.a(g), .b(t),   .a_t(g_t), .b_t(t_t),   .o(cout), .o_t(cout_t));

endmodule
