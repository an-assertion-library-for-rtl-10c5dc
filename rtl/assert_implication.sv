// Run-time assert_implication: whenever antecedent_expr is true at a rising clk
// edge, consequent_expr must be true at the same edge.
//
// One gate (antecedent and not consequent) feeds the error flip-flop of
// ovl_rt_err_cell; outside reset and error scan it clears on a violation.
// Deterministic: eo falls right after the failing edge. The check is the
// standard checker's rule; the pins beyond the scan set are its usual ones.
module assert_implication (
  input  logic reset_n,
  input  logic clk,
  input  logic antecedent_expr,
  input  logic consequent_expr,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic fail;
  assign fail = antecedent_expr && !consequent_expr;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
