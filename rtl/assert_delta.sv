// Run-time assert_delta: whenever test_expr changes, the size of the change
// must lie within [MIN, MAX].
//
// A WIDTH-bit register keeps the value of the previous cycle; on a change the
// absolute difference |test_expr - previous| is compared against both bounds and
// a violation at a clock edge (outside reset and error scan) clears the error
// flip-flop of ovl_rt_err_cell. The history register simply follows test_expr
// every cycle, reset included. Deterministic: eo falls right after the edge that
// samples the bad step. Defaults are this design's choice.
module assert_delta #(
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
  logic [WIDTH-1:0] prev_q;
  logic [WIDTH-1:0] diff;
  logic             fail;

  always_ff @(posedge clk) prev_q <= test_expr;

  assign diff = (test_expr > prev_q) ? test_expr - prev_q : prev_q - test_expr;
  assign fail = reset_n && (test_expr != prev_q) &&
                ((32'(diff) < MIN) || (32'(diff) > MAX));

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
