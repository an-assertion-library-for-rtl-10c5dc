// Run-time assert_one_cold: exactly one bit of test_expr must be 0 at every
// rising clk edge.
//
// INACTIVE may allow one idle code as well, in the standard checker's
// numbering: 0 all zeros allowed, 1 all ones allowed, 2 neither. The one-cold
// test is (~x) one-hot, i.e. ~x != 0 and (~x & (~x - 1)) == 0. A violation at a
// clock edge (outside reset and error scan) clears the error flip-flop of
// ovl_rt_err_cell. Deterministic: eo falls right after the failing edge.
module assert_one_cold #(
  parameter int WIDTH    = 2,
  parameter int INACTIVE = 2
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
  logic [WIDTH-1:0] inv;
  logic             one_cold, idle_ok, fail;

  assign inv      = ~test_expr;
  assign one_cold = (inv != '0) && ((inv & (inv - 1'b1)) == '0);
  assign idle_ok  = (INACTIVE == 0 && test_expr == '0) ||
                    (INACTIVE == 1 && test_expr == '1);
  assign fail     = !one_cold && !idle_ok;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
