// Run-time assert_no_transition: test_expr must never move directly from
// start_state to next_state.
//
// One flip-flop remembers whether test_expr equalled start_state in the previous
// cycle. If it did and test_expr now differs from start_state, the new value is
// compared with next_state; a match at a clock edge (outside reset and error
// scan) clears the error flip-flop of ovl_rt_err_cell. start_state and
// next_state are inputs so that they may come from design registers; they are
// assumed stable across the two cycles of a transition. Keeping one bit of
// history (two flip-flops per assertion in all) is this design's choice.
// Deterministic: eo falls right after the edge that samples the forbidden value.
module assert_no_transition #(
  parameter int WIDTH = 1
) (
  input  logic             reset_n,
  input  logic             clk,
  input  logic [WIDTH-1:0] test_expr,
  input  logic [WIDTH-1:0] start_state,
  input  logic [WIDTH-1:0] next_state,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic at_start_q;
  logic fail;

  always_ff @(posedge clk) begin
    if (!reset_n) at_start_q <= 1'b0;
    else          at_start_q <= (test_expr == start_state);
  end

  assign fail = at_start_q && (test_expr != start_state) && (test_expr == next_state);

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
