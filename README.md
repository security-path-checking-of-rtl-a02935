# Gate-level tint tracking: tracked AND/OR/NOT cells, a tracked JK flip-flop and a tracked adder

Suppose a circuit gets a block from an IP supplier you do not fully trust, and
that block touches a secret key. Can secret bits leak to an output? Can
untrusted bits corrupt a value that must stay intact? This design answers such
questions at gate level. Each wire gets a one-bit *tint* label beside its data
value. A label of 1 means "this value may depend on tinted data". Tinted data
is secret data for a confidentiality check and untrusted data for an integrity
check. Each gate is replaced by a tracked cell that computes its normal output
plus an output label. The label says whether a tinted input could actually
have changed the output for the current input values.

Once a netlist is built from tracked cells, reading the output labels shows
which input-to-output paths carry tinted information. The tracked netlist can
be simulated, or handed to a formal tool to ask whether a label can ever reach
an output. The labels never feed the data path, so tracking does not change
what the circuit computes.

The RTL has:

| module | what it is |
|---|---|
| `tint_and2` | tracked 2-input AND |
| `tint_or2` | tracked 2-input OR |
| `tint_not` | tracked inverter |
| `jk_ff` | plain JK flip-flop (hold / clear / set / toggle) |
| `tint_jk_ff` | tracked JK flip-flop (a `jk_ff` plus a label register) |
| `tint_full_adder` | 1-bit full adder made of 13 tracked AND/OR/NOT cells |
| `tint_adder` | `WIDTH`-bit ripple-carry adder of tracked full adders |
| `tint_path_check_top` | top: the tracked adder and a tracked JK flip-flop side by side |

## The tracking rules

The hardest part to get right, and the part most worth reading, is the rule
for each cell. Every cell has ports `a`, `b` (data), `a_t`, `b_t` (labels),
`o` (data) and `o_t` (label). Flip-flop ports are named in the same way. If no
input of a combinational cell is tinted, its output is clean. The AND, OR and
NOT cells check this with an immediate assertion.

### AND (`tint_and2`)

    o   = a & b
    o_t = (b & a_t) | (a & b_t) | (a_t & b_t)

A tinted input matters only if the other input is 1, or is tinted too. A
tinted `b` next to a clean `a = 0` leaves the output clean, because the 0 fixes
the output whatever `b` is. This is the usual precise AND rule.

### OR (`tint_or2`)

    o   = a | b
    o_t = (a & !b & a_t & !b_t)
        | (!a & b & !a_t & b_t)
        | (!a & !b & (a_t | b_t))
        | (a & b & a_t & b_t)

This is the method's own OR rule, implemented exactly as tabulated. It is
**not** the usual precise OR rule (`(!a & b_t) | (!b & a_t) | (a_t & b_t)`),
which would tint more outputs. The two differ when both inputs are tinted and
exactly one of them is 1. For example, `a=0, b=1, a_t=1, b_t=1` gives a clean
output here, although `b` decides the output. Both inputs tinted and both 1
gives a tinted output. So the OR cell can under-report a flow. That matters
when you read the labels of any netlist that contains OR cells (see
"Trust and limits").

### NOT (`tint_not`)

    o = !a,  o_t = a_t

The method names NOT as the third basic cell but gives no tint rule for it.
An inverter's only input always decides its output, so the label passes
straight through. This rule is this design's choice.

### JK flip-flop (`tint_jk_ff`)

On each rising clock edge, the data state `q` follows the JK table: hold, clear,
set or toggle. At the same edge, the label register takes

    q_t <= 0   if  (j_t = 0, k_t = 1, q = 0)   K tinted, but it can only clear a 0
    q_t <= 0   if  (j_t = 1, k_t = 0, q = 1)   J tinted, but it can only set a 1
    q_t <= 1   otherwise

Here `q` is the state before the edge. The rule uses only the two control
labels and the old state. It ignores the data values of J and K and the old
label. Taken literally, "otherwise" includes an edge where both J and K are
clean, so every such edge tints the state. This is conservative: it
over-reports. It is kept because it is the method's rule. If you want a
tighter flip-flop, edit the `always_comb` block in `rtl/tint_jk_ff.sv`. The
data half is a plain `jk_ff` instance, so the label logic cannot disturb the
state.

Both flip-flops have an asynchronous active-low reset `rst_n` that clears `q`
(and `q_t`). The method specifies no reset; this one was added.

## The tracked adder and its paths

The method is demonstrated on a multi-bit adder treated as a black box. It
gives neither the width nor the netlist. Here, `tint_full_adder` uses only
AND/OR/NOT cells:

    p    = a XOR b    = (a & !b) | (!a & b)
    s    = p XOR cin  = (p & !cin) | (!p & cin)
    cout = (a & b) | (p & cin)

`tint_adder` chains `WIDTH` of these cells in ripple-carry form (default
`WIDTH = 4`). Labels are computed gate by gate, so they depend on this
netlist. A different netlist of the same adder, for instance one with a
native XOR cell, could label some outputs differently.

`tb/tint_adder_paths_tb.sv` runs the security-path check. It tints one input
bit at a time, sweeps all data values, and marks a path as a risk when that
input's label reaches an output label for at least one data value. At the
default width the result is:

    input    reaches {cout, sum[3:0]}
    a[0]     11111
    a[1]     11110
    a[2]     11100
    a[3]     11000
    b[0]     11111
    b[1]     11110
    b[2]     11100
    b[3]     11000
    cin      11111

Every input reaches its own sum bit, every higher sum bit and the carry out.
No input reaches a lower bit. In an adder every input really does affect the
outputs above it, so almost every path is flagged. That is the expected
result for this circuit.

## Top level

`tint_path_check_top #(WIDTH = 4)` has two independent parts:

- the tracked adder, with ports `add_a`, `add_b`, `add_cin`, their labels
  `add_*_t`, and outputs `add_sum`, `add_cout`, `add_sum_t`, `add_cout_t`
  (combinational);
- one tracked JK flip-flop, with ports `clk`, `rst_n`, `ff_j`, `ff_k`,
  `ff_j_t`, `ff_k_t`, `ff_q` and `ff_q_t` (one rising edge from input to
  output).

They are not connected, because no circuit described for the method joins
them. To track your own circuit, build its gate-level netlist from these
cells, with two-input AND/OR and NOT. Connect each data wire with its label
wire, as `tint_full_adder` does.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/tint_ref_pkg.sv` holds the reference
rules as truth tables, one entry per tabulated row. It does not reuse the
RTL's equations. With Verilator 5:

    verilator --binary --timing --assert --top-module tint_path_check_top_tb \
        -y rtl -y tb +libext+.sv tb/tint_ref_pkg.sv tb/tint_path_check_top_tb.sv
    ./obj_dir/Vtint_path_check_top_tb

To run another test, change the top module and the testbench file. The
testbenches are:

- `tint_and2_tb`, `tint_or2_tb`, `tint_not_tb`: every input combination.
- `jk_ff_tb`, `tint_jk_ff_tb`: random inputs. They check that nothing moves
  before the clock edge and that the state is right one edge later. They
  also pulse the reset.
- `tint_full_adder_tb`: all 64 combinations.
- `tint_adder_tb`: all 2^18 value/label combinations at width 4.
- `tint_adder_paths_tb`: the path matrix above.
- `tint_path_check_top_tb`: the whole top at its default parameters. It counts
  each mechanism and fails if one never occurs. The mechanisms are: a tint
  reaching an output, a tint being masked, a tint carried along the carry
  chain, clean inputs giving clean outputs, JK hold, clear, set and toggle, a
  label cleared, a label set, and reset.

## Trust and limits

- The AND, OR and JK rules match the method's truth tables in every row; the
  testbenches check every row. The OR and JK rules are the method's own, with
  the quirks described above (OR can under-report, JK over-reports). They are
  not corrected here.
- A printed equation form of the OR rule differs from its table in one term.
  This design follows the table: the first term has `!b_t`, mirroring the
  second. A printed equation form of the JK rule tests `J`/`K` where the
  table and the prose test `J_t`/`K_t`. This design follows the table and the
  prose.
- The NOT rule, the reset, the adder netlist, the ripple-carry structure and
  `WIDTH = 4` are this design's choices.
- Only the cells the method describes are provided: two-input AND and OR,
  NOT, and JK. There are no tracked NAND, NOR, XOR, D flip-flop or wider
  cells. Any such gate must be rewritten in these cells first.
- The method's surrounding flow is software and is not part of this RTL. That
  flow synthesises a design to gate level, converts the netlist to a
  model-checker description with tracked cells, and proves properties such as
  "a secret label never reaches this output". The testbenches answer the same
  questions by exhaustive simulation, which works only because the adder is
  small.
