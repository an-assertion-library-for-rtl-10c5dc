// Run-time assert_zero_one_hot: at most one bit of test_expr may be set at every
// rising clk edge.
//
// The test is (x & (x - 1)) == 0; a violation at a clock edge (outside reset and
// error scan) clears the error flip-flop of ovl_rt_err_cell. Deterministic: eo
// falls right after the failing edge.
module assert_zero_one_hot #(
  parameter int WIDTH = 2
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
  assign fail = (test_expr & (test_expr - 1'b1)) != '0;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
