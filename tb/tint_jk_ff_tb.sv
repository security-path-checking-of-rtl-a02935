// tint_jk_ff_tb: checks the tracked JK flip-flop against the JK truth table
// and the flip-flop tint table. Random J, K and labels are applied away from
// the clock edge; the testbench checks that q and q_t do not move before the
// edge and take the expected values one edge later. The asynchronous reset
// is pulsed a few times mid-run.
module tint_jk_ff_tb;
  import tint_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic j = 1'b0, k = 1'b0, j_t = 1'b0, k_t = 1'b0;
  logic q, q_t;
  logic exp_q, exp_qt;
  int checks = 0, failures = 0;
  int n_hold = 0, n_clr = 0, n_set = 0, n_tog = 0, n_clean = 0, n_tint = 0;

  tint_jk_ff dut (.clk(clk), .rst_n(rst_n), .j(j), .k(k), .j_t(j_t), .k_t(k_t), .q(q), .q_t(q_t));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== exp_q) begin failures++; $display("FAIL %s q=%b exp %b", what, q, exp_q); end
    checks++;
    if (q_t !== exp_qt) begin failures++; $display("FAIL %s q_t=%b exp %b", what, q_t, exp_qt); end
  endtask

  initial begin
    exp_q = 1'b0; exp_qt = 1'b0;
    #12 check("reset");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (n == 0) rst_n = 1'b1;  // release reset between edges
      if (n % 200 == 150) begin
        rst_n = 1'b0;
        #1;
        exp_q = 1'b0; exp_qt = 1'b0;
        check("async reset");
        @(negedge clk);
        rst_n = 1'b1;
      end
      {j, k, j_t, k_t} = 4'($urandom);
      #1 check("before edge");
      // expected after the next edge
      exp_qt = jk_qt(j_t, k_t, exp_q);
      unique case ({j, k})
        2'b00: n_hold++;
        2'b01: n_clr++;
        2'b10: n_set++;
        default: n_tog++;
      endcase
      if (exp_qt) n_tint++; else n_clean++;
      exp_q = jk_q(j, k, exp_q);
      @(posedge clk);
      #1 check("after edge");
    end
    checks++;
    if (n_hold == 0 || n_clr == 0 || n_set == 0 || n_tog == 0 || n_clean == 0 || n_tint == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
