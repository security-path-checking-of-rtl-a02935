// tint_jk_ff: JK flip-flop with tint tracking.
//
// The data state q is an ordinary JK flip-flop (jk_ff instance). Beside it a
// tint register q_t is loaded on the same rising edge. Following the method's
// flip-flop rule, the new label is clean only when exactly one control input
// is tinted and that input cannot move the state:
//   - K tinted, J clean, previous q = 0: K can only clear a state that is
//     already 0, so q_t <= 0;
//   - J tinted, K clean, previous q = 1: J can only set a state that is
//     already 1, so q_t <= 0;
//   - in every other case q_t <= 1.
// The rule uses only j_t, k_t and the previous q; it does not look at the
// data values of J and K or at the previous label. Taken literally, "every
// other case" includes an edge with both labels clean, which therefore also
// marks the state tinted (a conservative label). That is the method's rule,
// kept as given.
//
// Interface: clk, rst_n, j, k, j_t, k_t in; q, q_t out. Timing: q and q_t
// update together one rising edge after the inputs. rst_n (asynchronous,
// active low, clears both) is this design's addition.
module tint_jk_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic j,
  input  logic k,
  input  logic j_t,
  input  logic k_t,
  output logic q,
  output logic q_t
);

  logic q_t_next;

  jk_ff u_data (
    .clk  (clk),
    .rst_n(rst_n),
    .j    (j),
    .k    (k),
    .q    (q)
  );

  always_comb begin
    if ((!j_t && k_t && !q) || (j_t && !k_t && q)) q_t_next = 1'b0;
    else                                           q_t_next = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_t <= 1'b0;
    else        q_t <= q_t_next;
  end

endmodule
