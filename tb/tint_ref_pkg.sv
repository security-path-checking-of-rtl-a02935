// tint_ref_pkg: reference tint rules for the testbenches.
//
// The rules are written as truth tables, one entry per tabulated row of the
// method's AND, OR and JK flip-flop tables, not as the equations the RTL
// uses, so a testbench compares two independent descriptions. Rows the
// tables leave out are filled from the method's prose: with no tinted input
// the output is clean; an AND with both inputs tinted is tinted; the JK label
// is 1 "in every other situation".
package tint_ref_pkg;

  // AND: index {a, b, a_t, b_t}
  function automatic logic and_t(input logic a, b, a_t, b_t);
    unique case ({a, b, a_t, b_t})
      4'b0001: return 1'b0;  // row 1
      4'b0010: return 1'b0;  // row 2
      4'b0101: return 1'b0;  // row 3
      4'b0110: return 1'b1;  // row 4
      4'b1001: return 1'b1;  // row 5
      4'b1010: return 1'b0;  // row 6
      4'b1101: return 1'b1;  // row 7
      4'b1110: return 1'b1;  // row 8
      4'b0000, 4'b0100, 4'b1000, 4'b1100: return 1'b0;  // nothing tinted
      default: return 1'b1;  // both inputs tinted
    endcase
  endfunction

  // OR: index {a, b, a_t, b_t}
  function automatic logic or_t(input logic a, b, a_t, b_t);
    unique case ({a, b, a_t, b_t})
      4'b0001: return 1'b1;  // row 1
      4'b0010: return 1'b1;  // row 2
      4'b0011: return 1'b1;  // row 3
      4'b0101: return 1'b1;  // row 4
      4'b0110: return 1'b0;  // row 5
      4'b0111: return 1'b0;  // row 6
      4'b1001: return 1'b0;  // row 7
      4'b1010: return 1'b1;  // row 8
      4'b1011: return 1'b0;  // row 9
      4'b1101: return 1'b0;  // row 10
      4'b1110: return 1'b0;  // row 11
      4'b1111: return 1'b1;  // row 12
      default: return 1'b0;  // nothing tinted
    endcase
  endfunction

  function automatic logic not_t(input logic a_t);
    return a_t;
  endfunction

  // JK label after a clock edge: index {j_t, k_t, q_n}. The table's 16 rows
  // repeat the same pattern for every J/K value, so J and K are not indexed.
  function automatic logic jk_qt(input logic j_t, k_t, q_n);
    unique case ({j_t, k_t, q_n})
      3'b010: return 1'b0;  // rows 1, 5, 9, 13
      3'b011: return 1'b1;  // rows 2, 6, 10, 14
      3'b100: return 1'b1;  // rows 3, 7, 11, 15
      3'b101: return 1'b0;  // rows 4, 8, 12, 16
      default: return 1'b1; // "in other situations"
    endcase
  endfunction

  function automatic logic jk_q(input logic j, k, q_n);
    unique case ({j, k})
      2'b00: return q_n;
      2'b01: return 1'b0;
      2'b10: return 1'b1;
      default: return ~q_n;
    endcase
  endfunction

  // Full adder evaluated cell by cell with the table rules, along the
  // netlist p = a^b, s = p^cin, cout = ab | p cin (XOR = x!y | !x y).
  function automatic logic [1:0] fa_t(input logic a, b, c, a_t, b_t, c_t);
    logic p, p_t, y1_t, y2_t, s_t, g_t, t_t, co_t;
    logic x1_t, x2_t;
    x1_t = and_t(a, ~b, a_t, not_t(b_t));
    x2_t = and_t(~a, b, not_t(a_t), b_t);
    p    = a ^ b;
    p_t  = or_t(a & ~b, ~a & b, x1_t, x2_t);
    y1_t = and_t(p, ~c, p_t, not_t(c_t));
    y2_t = and_t(~p, c, not_t(p_t), c_t);
    s_t  = or_t(p & ~c, ~p & c, y1_t, y2_t);
    g_t  = and_t(a, b, a_t, b_t);
    t_t  = and_t(p, c, p_t, c_t);
    co_t = or_t(a & b, p & c, g_t, t_t);
    return {co_t, s_t};
  endfunction

endpackage
