// Run-time assert_decrement: whenever test_expr changes, it must have gone down
// by exactly VALUE (modulo 2**WIDTH).
//
// A WIDTH-bit register keeps the value of the previous cycle; on a change the
// difference previous - test_expr is compared with VALUE, and a mismatch at a
// clock edge (outside reset and error scan) clears the error flip-flop of
// ovl_rt_err_cell. During reset the register loads the current value, so the
// first cycle after reset compares against a valid history. Deterministic: eo
// falls right after the edge that samples the wrong step. Wrap-around counts as
// a legal step here; that and the defaults are this design's choices.
module assert_decrement #(
  parameter int          WIDTH = 1,
  parameter int unsigned VALUE = 1
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
  logic [WIDTH-1:0] prev_q;
  logic [WIDTH-1:0] step;
  logic             fail;

  always_ff @(posedge clk) prev_q <= test_expr;

  assign step = prev_q - test_expr;
  assign fail = reset_n && (test_expr != prev_q) && (step != WIDTH'(VALUE));

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
