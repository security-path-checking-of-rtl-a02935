// tint_full_adder_tb: exhaustive check of the tracked full adder over all 64
// combinations of a, b, cin and their labels. Sum and carry are checked
// arithmetically; the labels against a cell-by-cell evaluation of the same
// netlist with the tabulated tint rules.
module tint_full_adder_tb;
  import tint_ref_pkg::*;

  logic a, b, c, a_t, b_t, c_t;
  logic s, co, s_t, co_t;
  logic [1:0] exp_t;
  int checks = 0, failures = 0;

  tint_full_adder dut (.a(a), .b(b), .cin(c), .a_t(a_t), .b_t(b_t), .cin_t(c_t),
                       .s(s), .cout(co), .s_t(s_t), .cout_t(co_t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {a, b, c, a_t, b_t, c_t} = 6'(v);
      #1;
      exp_t = fa_t(a, b, c, a_t, b_t, c_t);
      checks++;
      if ({co, s} !== 2'(a + b + c)) begin
        failures++;
        $display("FAIL data %b%b%b: cout,s=%b%b", a, b, c, co, s);
      end
      checks++;
      if ({co_t, s_t} !== exp_t) begin
        failures++;
        $display("FAIL tint %b%b%b/%b%b%b: got %b%b exp %b", a, b, c, a_t, b_t, c_t, co_t, s_t, exp_t);
      end
      if ({a_t, b_t, c_t} == 3'b000) begin
        checks++;
        if ({co_t, s_t} != 2'b00) begin failures++; $display("FAIL clean inputs gave a tinted output"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
