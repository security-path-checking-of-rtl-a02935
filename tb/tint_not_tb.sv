// tint_not_tb: exhaustive check of the tracked inverter: o = !a, and the
// label follows the input.
module tint_not_tb;
  import tint_ref_pkg::*;

  logic a, a_t, o, o_t;
  int checks = 0, failures = 0;

  tint_not dut (.a(a), .a_t(a_t), .o(o), .o_t(o_t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, a_t} = 2'(v);
      #1;
      checks++;
      if (o !== ~a) begin failures++; $display("FAIL data a=%b o=%b", a, o); end
      checks++;
      if (o_t !== not_t(a_t)) begin failures++; $display("FAIL tint a_t=%b o_t=%b", a_t, o_t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
