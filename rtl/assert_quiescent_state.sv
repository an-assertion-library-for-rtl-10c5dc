// Run-time assert_quiescent_state: whenever sample_event rises, state_expr must
// equal check_value.
//
// A flip-flop keeps sample_event of the previous cycle; in a cycle where it has
// risen, state_expr is compared with check_value and a mismatch (outside reset
// and error scan) clears the error flip-flop of ovl_rt_err_cell. Deterministic:
// eo falls right after the failing edge. The standard checker's extra check at
// the end of a simulation has no meaning in hardware and is left out.
module assert_quiescent_state #(
  parameter int WIDTH = 1
) (
  input  logic             reset_n,
  input  logic             clk,
  input  logic [WIDTH-1:0] state_expr,
  input  logic [WIDTH-1:0] check_value,
  input  logic             sample_event,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic samp_q;
  logic fail;

  always_ff @(posedge clk) begin
    if (!reset_n) samp_q <= 1'b0;
    else          samp_q <= sample_event;
  end

  assign fail = sample_event && !samp_q && (state_expr != check_value);

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
