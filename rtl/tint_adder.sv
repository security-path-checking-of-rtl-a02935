// tint_adder: WIDTH-bit ripple-carry adder with a tint label on every bit.
//
// This is the circuit the security-path method is demonstrated on: a
// multi-bit adder treated as a black box, with each input bit marked clean
// or tinted and each output bit reporting whether tinted data can reach it.
// It is a chain of tint_full_adder cells; bit i's carry and carry label feed
// bit i+1. sum/cout are the plain sum a + b + cin; sum_t/cout_t are the
// labels produced by the per-gate tint rules along the chain.
//
// Interface: a, b, a_t, b_t (WIDTH bits), cin, cin_t in; sum, sum_t (WIDTH
// bits), cout, cout_t out. Combinational. The method does not give the width
// or the adder structure; WIDTH = 4 and ripple carry are this design's choice.
module tint_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic [WIDTH-1:0] a_t,
  input  logic [WIDTH-1:0] b_t,
  input  logic             cin_t,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] sum_t,
  output logic             cout_t
);

  logic [WIDTH:0] c;
  logic [WIDTH:0] c_t;

  assign c[0]   = cin;
  assign c_t[0] = cin_t;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    tint_full_adder u_fa (
      .a     (a[i]),
      .b     (b[i]),
      .cin   (c[i]),
      .a_t   (a_t[i]),
      .b_t   (b_t[i]),
      .cin_t (c_t[i]),
      .s     (sum[i]),
      .cout  (c[i+1]),
      .s_t   (sum_t[i]),
      .cout_t(c_t[i+1])
    );
  end

  assign cout   = c[WIDTH];
  assign cout_t = c_t[WIDTH];

endmodule
