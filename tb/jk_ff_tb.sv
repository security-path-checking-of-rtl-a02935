// jk_ff_tb: checks the plain JK flip-flop: hold, clear, set and toggle on
// the rising edge, nothing between edges, and the asynchronous reset.
module jk_ff_tb;
  import tint_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic j = 1'b0, k = 1'b0;
  logic q, exp_q;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  jk_ff dut (.clk(clk), .rst_n(rst_n), .j(j), .k(k), .q(q));

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
  endtask

  initial begin
    exp_q = 1'b0;
    #12 check("reset");
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (n == 0) rst_n = 1'b1;  // release reset between edges
      if (n % 250 == 100) begin
        rst_n = 1'b0;
        #1 exp_q = 1'b0;
        check("async reset");
        @(negedge clk);
        rst_n = 1'b1;
      end
      {j, k} = 2'($urandom);
      #1 check("before edge");
      seen[{j, k}]++;
      exp_q = jk_q(j, k, exp_q);
      @(posedge clk);
      #1 check("after edge");
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
