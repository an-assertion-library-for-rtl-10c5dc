// Run-time assert_width: each high pulse of test_expr must last at least
// MIN_CKS and at most MAX_CKS cycles (a bound of 0 is not checked).
//
// A saturating counter holds the length of the current high run. A run that
// reaches MAX_CKS + 1 cycles fails in that cycle; a run that ends (test_expr low
// after a high run) shorter than MIN_CKS fails in the first low cycle. Either
// failure, outside reset and error scan, clears the error flip-flop of
// ovl_rt_err_cell. Non-deterministic: checked only once a pulse starts.
module assert_width #(
  parameter int MIN_CKS = 1,
  parameter int MAX_CKS = 1
) (
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
  localparam int LIM = (MAX_CKS > MIN_CKS ? MAX_CKS : MIN_CKS) + 1;
  localparam int CW  = $clog2(LIM + 1);

  logic [CW-1:0] run_q;
  logic [CW-1:0] run_now;
  logic          fail;

  assign run_now = (run_q == CW'(LIM)) ? run_q : run_q + 1'b1;

  always_ff @(posedge clk) begin
    if (!reset_n)       run_q <= '0;
    else if (test_expr) run_q <= run_now;
    else                run_q <= '0;
  end

  assign fail = test_expr ? (MAX_CKS != 0 && run_now == CW'(MAX_CKS + 1))
                          : (run_q != '0 && 32'(run_q) < MIN_CKS);

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
