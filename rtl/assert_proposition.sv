// Run-time assert_proposition: test_expr must be true at all times, not only at
// clock edges.
//
// A catch flip-flop is set asynchronously as long as test_expr is low, so a
// glitch between two clk edges is not lost; at the next clk edge the catch flag
// (or a test_expr that is low right then) clears the error flip-flop of
// ovl_rt_err_cell, and the catch flag is cleared again when test_expr is high.
// Two flip-flops in all. Using test_expr as the asynchronous set of the catch
// flop is this design's way of making the unclocked check synthesizable.
// Timing: eo falls after the first clk edge following the low pulse.
// Lint reports test_expr as used both synchronously and as an asynchronous
// set; that dual use is the point of the catch flop and is intended.
module assert_proposition (
  input  logic reset_n,
  input  logic clk,
  input  logic test_expr,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic seen_low_q;
  logic fail;

  always_ff @(posedge clk or negedge test_expr) begin
    if (!test_expr) seen_low_q <= 1'b1;
    else            seen_low_q <= 1'b0;
  end

  assign fail = seen_low_q || !test_expr;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
