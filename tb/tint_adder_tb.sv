// tint_adder_tb: exhaustive check of the WIDTH-bit tracked adder. Every
// combination of a, b, cin and every tint pattern on them is applied
// (2^(4*WIDTH+2) vectors at WIDTH = 4). The sum is checked arithmetically;
// each output label against a ripple evaluation, bit by bit, of the
// full-adder netlist with the tabulated tint rules.
module tint_adder_tb;
  import tint_ref_pkg::*;

  localparam int W = 4;  // tint_adder's default width

  logic [W-1:0] a, b, a_t, b_t, sum, sum_t;
  logic         cin, cin_t, cout, cout_t;
  logic [W-1:0] exp_st;
  logic         exp_ct;
  int checks = 0, failures = 0;

  tint_adder dut (
    .a(a), .b(b), .cin(cin), .a_t(a_t), .b_t(b_t), .cin_t(cin_t),
    .sum(sum), .cout(cout), .sum_t(sum_t), .cout_t(cout_t));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_labels(output logic [W-1:0] st, output logic ct);
    logic c, c_t;
    logic [1:0] r;
    c = cin; c_t = cin_t;
    for (int i = 0; i < W; i++) begin
      r = fa_t(a[i], b[i], c, a_t[i], b_t[i], c_t);
      st[i] = r[0];
      c_t = r[1];
      c = (a[i] & b[i]) | (a[i] & c) | (b[i] & c);
    end
    ct = c_t;
  endtask

  initial begin
    for (int v = 0; v < (1 << (4*W + 2)); v++) begin
      {a, b, cin, a_t, b_t, cin_t} = (4*W+2)'(v);
      #1;
      ref_labels(exp_st, exp_ct);
      checks++;
      if ({cout, sum} !== (W+1)'(a + b + cin)) begin
        failures++;
        if (failures < 10) $display("FAIL data %h+%h+%b = %b %h", a, b, cin, cout, sum);
      end
      checks++;
      if ({cout_t, sum_t} !== {exp_ct, exp_st}) begin
        failures++;
        if (failures < 10)
          $display("FAIL tint %h+%h+%b t=%h,%h,%b: got %b %b exp %b %b",
                   a, b, cin, a_t, b_t, cin_t, cout_t, sum_t, exp_ct, exp_st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
