// jk_ff: plain (untinted) JK flip-flop of the cell library.
//
// On each rising edge of clk the state q holds (J=0,K=0), resets (J=0,K=1),
// sets (J=1,K=0) or toggles (J=1,K=1). It is the flip-flop the untracked
// model uses and the data half of tint_jk_ff.
//
// Interface: clk, rst_n, j, k in; q out. Timing: q changes one rising edge
// after j/k are presented. rst_n is an asynchronous active-low reset to
// q = 0; the reset is this design's addition, the method does not specify one.
module jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= 1'b0;
    end else begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= ~q;
      endcase
    end
  end

endmodule
