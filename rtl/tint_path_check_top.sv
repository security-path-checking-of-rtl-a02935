// tint_path_check_top: top level of the tint-tracked design.
//
// It holds the two kinds of tracked hardware side by side:
//   - the checked circuit, a WIDTH-bit tint_adder (built from the tracked
//     AND/OR/NOT cells), whose output labels show which output bits tinted
//     input bits can reach;
//   - one tracked sequential cell, tint_jk_ff, with its own clock, reset,
//     data and tint ports, showing how labels move through state.
// The two parts are not connected: no circuit printed for the method joins an
// adder to a flip-flop, so none is invented here.
//
// Interface: adder ports prefixed add_, flip-flop ports prefixed ff_. The
// adder is combinational; the flip-flop updates q and q_t on the rising edge
// of clk, with rst_n an asynchronous active-low reset.
module tint_path_check_top #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // tracked adder
  input  logic [WIDTH-1:0] add_a,
  input  logic [WIDTH-1:0] add_b,
  input  logic             add_cin,
  input  logic [WIDTH-1:0] add_a_t,
  input  logic [WIDTH-1:0] add_b_t,
  input  logic             add_cin_t,
  output logic [WIDTH-1:0] add_sum,
  output logic             add_cout,
  output logic [WIDTH-1:0] add_sum_t,
  output logic             add_cout_t,
  // tracked JK flip-flop
  input  logic             ff_j,
  input  logic             ff_k,
  input  logic             ff_j_t,
  input  logic             ff_k_t,
  output logic             ff_q,
  output logic             ff_q_t
);

  tint_adder #(.WIDTH(WIDTH)) u_adder (
    .a     (add_a),
    .b     (add_b),
    .cin   (add_cin),
    .a_t   (add_a_t),
    .b_t   (add_b_t),
    .cin_t (add_cin_t),
    .sum   (add_sum),
    .cout  (add_cout),
    .sum_t (add_sum_t),
    .cout_t(add_cout_t)
  );

  tint_jk_ff u_ff (
    .clk  (clk),
    .rst_n(rst_n),
    .j    (ff_j),
    .k    (ff_k),
    .j_t  (ff_j_t),
    .k_t  (ff_k_t),
    .q    (ff_q),
    .q_t  (ff_q_t)
  );

endmodule
