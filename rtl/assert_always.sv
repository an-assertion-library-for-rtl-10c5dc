// Run-time assert_always: test_expr must be true at every rising clk edge.
//
// The check is a single gate; a false test_expr at a clock edge (outside reset
// and outside error scan) clears the assertion's error flip-flop, which is also
// a stage of the error scan chain (see ovl_rt_err_cell). Deterministic: eo falls
// on the clock edge that samples the false expression. Ports follow the
// run-time assertion pin set: reset_n, clk, test_expr plus the scan pins
// escen, esclk, esci, esco and the error chain ei/eo.
module assert_always (
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
  logic fail;
  assign fail = !test_expr;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
