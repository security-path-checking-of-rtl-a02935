// tint_or2_tb: exhaustive check of the tracked OR cell against the OR
// truth table (all 16 combinations of a, b, a_t, b_t), data and label.
module tint_or2_tb;
  import tint_ref_pkg::*;

  logic a, b, a_t, b_t, o, o_t;
  int checks = 0, failures = 0;

  tint_or2 dut (.a(a), .b(b), .a_t(a_t), .b_t(b_t), .o(o), .o_t(o_t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, a_t, b_t} = 4'(v);
      #1;
      checks++;
      if (o !== (a | b)) begin
        failures++;
        $display("FAIL data %b%b%b%b: o=%b", a, b, a_t, b_t, o);
      end
      checks++;
      if (o_t !== or_t(a, b, a_t, b_t)) begin
        failures++;
        $display("FAIL tint %b%b%b%b: o_t=%b", a, b, a_t, b_t, o_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
