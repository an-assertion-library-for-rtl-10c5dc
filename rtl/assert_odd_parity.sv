// Run-time assert_odd_parity: test_expr must hold an odd number of ones at every
// rising clk edge.
//
// A WIDTH-input XOR tree; even parity at a clock edge (outside reset and error
// scan) clears the error flip-flop of ovl_rt_err_cell. Deterministic: eo falls
// right after the failing edge. WIDTH is a parameter of the assertion; its
// default of 1 is this design's choice.
module assert_odd_parity #(
  parameter int WIDTH = 1
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
  logic fail;
  assign fail = ~(^test_expr);

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
