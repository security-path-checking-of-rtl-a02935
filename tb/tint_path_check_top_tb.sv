// tint_path_check_top_tb: end-to-end test of the top level at its default
// parameters. It runs a security-path scenario on the tracked adder and a
// sequence on the tracked flip-flop, checks every output against
// independent references, and counts how often each mechanism occurs:
//   adder: a tinted input reaching an output bit; a tinted input that is
//          masked so that no output is tinted; a label carried along the
//          carry chain from bit 0 to cout; clean inputs giving clean outputs;
//   flip-flop: hold, clear, set, toggle, label cleared, label set,
//          asynchronous reset.
// A mechanism that never occurs counts as a failure.
module tint_path_check_top_tb;
  import tint_ref_pkg::*;

  localparam int W = 4;  // the top's default width

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a, b, a_t, b_t, sum, sum_t;
  logic         cin, cin_t, cout, cout_t;
  logic j = 1'b0, k = 1'b0, j_t = 1'b0, k_t = 1'b0, q, q_t;
  logic exp_q, exp_qt;
  int checks = 0, failures = 0;
  bit adder_done = 1'b0;

  typedef enum int {
    M_REACH, M_MASKED, M_CARRY_CHAIN, M_CLEAN,
    M_HOLD, M_CLEAR, M_SET, M_TOGGLE, M_QT_CLEAN, M_QT_TINT, M_RESET, M_COUNT
  } mech_e;
  int seen [M_COUNT];
  string mech_name [M_COUNT] = '{"tint reaches output", "tint masked", "carry-chain tint",
    "clean in clean out", "ff hold", "ff clear", "ff set", "ff toggle",
    "ff label cleared", "ff label set", "ff reset"};

  tint_path_check_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_a(a), .add_b(b), .add_cin(cin), .add_a_t(a_t), .add_b_t(b_t), .add_cin_t(cin_t),
    .add_sum(sum), .add_cout(cout), .add_sum_t(sum_t), .add_cout_t(cout_t),
    .ff_j(j), .ff_k(k), .ff_j_t(j_t), .ff_k_t(k_t), .ff_q(q), .ff_q_t(q_t));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic check_adder();
    logic [W-1:0] st;
    logic ct;
    #1;
    ref_labels(st, ct);
    checks++;
    if ({cout, sum} !== (W+1)'(a + b + cin)) begin
      failures++;
      $display("FAIL adder data %h+%h+%b = %b %h", a, b, cin, cout, sum);
    end
    checks++;
    if ({cout_t, sum_t} !== {ct, st}) begin
      failures++;
      $display("FAIL adder tint %h+%h+%b t=%h,%h,%b: got %b %b exp %b %b",
               a, b, cin, a_t, b_t, cin_t, cout_t, sum_t, ct, st);
    end
    if ({a_t, b_t, cin_t} == '0) begin
      seen[M_CLEAN]++;
      checks++;
      if ({cout_t, sum_t} != '0) begin failures++; $display("FAIL clean inputs, tinted output"); end
    end else if ({cout_t, sum_t} != '0) begin
      seen[M_REACH]++;
    end else begin
      seen[M_MASKED]++;
    end
    if (cin_t && {a_t, b_t} == '0 && cout_t) seen[M_CARRY_CHAIN]++;
  endtask

  task automatic check_ff(string what);
    checks++;
    if (q !== exp_q) begin failures++; $display("FAIL %s q=%b exp %b", what, q, exp_q); end
    checks++;
    if (q_t !== exp_qt) begin failures++; $display("FAIL %s q_t=%b exp %b", what, q_t, exp_qt); end
  endtask

  // Adder scenario: the upper half of operand a is a secret (tinted), all
  // else clean, over every data value; then only the carry-in is tinted;
  // then random data with random labels.
  initial begin
    foreach (seen[m]) seen[m] = 0;
    for (int v = 0; v < (1 << (2*W + 1)); v++) begin
      {a, b, cin} = (2*W+1)'(v);
      a_t = {{(W/2){1'b1}}, {(W - W/2){1'b0}}};
      b_t = '0; cin_t = 1'b0;
      check_adder();
      a_t = '0;
      check_adder();
      cin_t = 1'b1;
      check_adder();
    end
    for (int n = 0; n < 20000; n++) begin
      {a, b, cin} = (2*W+1)'($urandom);
      {a_t, b_t, cin_t} = (2*W+1)'($urandom & $urandom);
      check_adder();
    end
    adder_done = 1'b1;
  end

  // Flip-flop sequence, then the final report.
  initial begin
    exp_q = 1'b0; exp_qt = 1'b0;
    #12 check_ff("reset");
    seen[M_RESET]++;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n == 0) rst_n = 1'b1;  // release reset between edges
      if (n % 500 == 300) begin
        rst_n = 1'b0;
        #1 exp_q = 1'b0; exp_qt = 1'b0;
        check_ff("async reset");
        seen[M_RESET]++;
        @(negedge clk);
        rst_n = 1'b1;
      end
      {j, k, j_t, k_t} = 4'($urandom);
      #1 check_ff("before edge");
      exp_qt = jk_qt(j_t, k_t, exp_q);
      unique case ({j, k})
        2'b00: seen[M_HOLD]++;
        2'b01: seen[M_CLEAR]++;
        2'b10: seen[M_SET]++;
        default: seen[M_TOGGLE]++;
      endcase
      if (exp_qt) seen[M_QT_TINT]++; else seen[M_QT_CLEAN]++;
      exp_q = jk_q(j, k, exp_q);
      @(posedge clk);
      #1 check_ff("after edge");
    end
    wait (adder_done);
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-20s seen %0d times", mech_name[m], seen[m]);
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL mechanism never seen: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
