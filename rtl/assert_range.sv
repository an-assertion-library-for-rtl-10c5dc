// Run-time assert_range: test_expr must lie within [MIN, MAX] at every rising
// clk edge.
//
// Two unsigned magnitude comparators; a value outside the range at a clock edge
// (outside reset and error scan) clears the error flip-flop of ovl_rt_err_cell.
// Deterministic: eo falls right after the failing edge. The inclusive bounds
// follow the standard checker; the defaults are this design's choice.
module assert_range #(
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
  logic fail;
  assign fail = (32'(test_expr) < MIN) || (32'(test_expr) > MAX);

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
