// Run-time assert_no_overflow: once test_expr has reached MAX, its next
// different value must stay inside (MIN, MAX], i.e. it must not jump above MAX
// or wrap to MIN or below.
//
// One flip-flop remembers whether test_expr equalled MAX in the previous cycle;
// if it did, a current value above MAX or at/below MIN at a clock edge (outside
// reset and error scan) clears the error flip-flop of ovl_rt_err_cell. This is
// the usual counter-overflow rule of the standard checker; the one-bit history
// (two flip-flops in all) and the defaults are this design's choices.
// Deterministic: eo falls right after the edge that samples the overflow.
module assert_no_overflow #(
  parameter int          WIDTH = 1,
  parameter int unsigned MIN   = 0,
  parameter int unsigned MAX   = 1
) (
  input  logic             reset_n,
  input  logic             clk,
  input  logic [WIDTH-1:0] test_expr,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic at_max_q;
  logic fail;

  always_ff @(posedge clk) begin
    if (!reset_n) at_max_q <= 1'b0;
    else          at_max_q <= (32'(test_expr) == MAX);
  end

  assign fail = at_max_q && ((32'(test_expr) > MAX) || (32'(test_expr) <= MIN));

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
