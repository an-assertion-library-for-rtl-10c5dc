// Run-time assert_next: test_expr must be true NUM_CKS cycles after every
// start_event.
//
// An NUM_CKS-stage shift register carries each start_event forward, so
// overlapping requests are all checked; when a marked cycle leaves the last
// stage, a false test_expr (outside reset and error scan) clears the error
// flip-flop of ovl_rt_err_cell. Non-deterministic: the failure shows NUM_CKS
// cycles after its trigger.
module assert_next #(
  parameter int NUM_CKS = 1
) (
  input  logic reset_n,
  input  logic clk,
  input  logic start_event,
  input  logic test_expr,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic [NUM_CKS-1:0] pend_q;
  logic               fail;

  always_ff @(posedge clk) begin
    if (!reset_n) pend_q <= '0;
    else          pend_q <= NUM_CKS'({pend_q, start_event});
  end

  assign fail = pend_q[NUM_CKS-1] && !test_expr;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
