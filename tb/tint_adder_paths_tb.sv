// tint_adder_paths_tb: security-path check of the tracked adder, the way the
// method is applied to a multi-bit adder treated as a black box.
//
// Each input bit (a[i], b[i], cin) is tinted on its own, all others clean,
// and the adder is run over every data value. An input-to-output path is
// reported as a risk when, for at least one data value, the tinted input
// makes the output label 1. The resulting matrix is printed and compared
// with one computed from the tabulated gate rules. Two structural facts are
// also checked: in a ripple adder no input can reach a sum bit below its own
// position, and every input reaches at least one output.
module tint_adder_paths_tb;
  import tint_ref_pkg::*;

  localparam int W  = 4;          // tint_adder's default width
  localparam int NI = 2*W + 1;    // inputs: a[W-1:0], b[W-1:0], cin
  localparam int NO = W + 1;      // outputs: sum[W-1:0], cout

  logic [W-1:0] a, b, a_t, b_t, sum, sum_t;
  logic         cin, cin_t, cout, cout_t;
  logic [NO-1:0] reach     [NI];
  logic [NO-1:0] reach_ref [NI];
  int checks = 0, failures = 0;
  int data_errors = 0;

  tint_adder dut (
    .a(a), .b(b), .cin(cin), .a_t(a_t), .b_t(b_t), .cin_t(cin_t),
    .sum(sum), .cout(cout), .sum_t(sum_t), .cout_t(cout_t));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    checks++;
    if (data_errors != 0) begin
      failures++;
      $display("FAIL %0d wrong sums", data_errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NO-1:0] ref_labels(logic [W-1:0] ra, rb, rat, rbt, logic rc, rct);
    logic c, c_t;
    logic [1:0] r;
    logic [NO-1:0] out;
    c = rc; c_t = rct;
    for (int i = 0; i < W; i++) begin
      r = fa_t(ra[i], rb[i], c, rat[i], rbt[i], c_t);
      out[i] = r[0];
      c_t = r[1];
      c = (ra[i] & rb[i]) | (ra[i] & c) | (rb[i] & c);
    end
    out[W] = c_t;
    return out;
  endfunction

  function automatic string in_name(int i);
    if (i < W) return $sformatf("a[%0d]", i);
    if (i < 2*W) return $sformatf("b[%0d]", i - W);
    return "cin";
  endfunction

  initial begin
    logic [NI-1:0] tint;
    for (int i = 0; i < NI; i++) begin
      reach[i] = '0;
      reach_ref[i] = '0;
      tint = NI'(1) << i;
      {a_t, b_t, cin_t} = {tint[W-1:0], tint[2*W-1:W], tint[2*W]};
      for (int v = 0; v < (1 << NI); v++) begin
        {a, b, cin} = NI'(v);
        #1;
        if ({cout, sum} !== NO'(a + b + cin)) data_errors++;
        reach[i] |= {cout_t, sum_t};
        reach_ref[i] |= ref_labels(a, b, a_t, b_t, cin, cin_t);
      end
    end

    $display("input    reaches {cout, sum[%0d:0]}", W-1);
    for (int i = 0; i < NI; i++) begin
      $display("%-8s %b", in_name(i), reach[i]);
      checks++;
      if (reach[i] !== reach_ref[i]) begin
        failures++;
        $display("FAIL paths of %s: got %b exp %b", in_name(i), reach[i], reach_ref[i]);
      end
      checks++;
      if (reach[i] == '0) begin
        failures++;
        $display("FAIL %s reaches no output", in_name(i));
      end
      // input at bit position p cannot reach sum bits below p
      checks++;
      begin
        int p;
        p = (i < W) ? i : (i < 2*W) ? i - W : 0;
        if ((reach[i] & NO'((1 << p) - 1)) != '0) begin
          failures++;
          $display("FAIL %s reaches a lower sum bit", in_name(i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
