// Run-time assert_window: test_expr must be true in every cycle of a window
// that opens the cycle after start_event and closes with the cycle in which
// end_event is seen.
//
// One flip-flop holds the window state: set by start_event while closed,
// cleared by end_event while open. While open, a false test_expr at a clock edge
// (outside reset and error scan) clears the error flip-flop of ovl_rt_err_cell,
// the end_event cycle included. Two flip-flops in all. Non-deterministic: the
// check only runs once start_event has happened.
module assert_window (
  input  logic reset_n,
  input  logic clk,
  input  logic start_event,
  input  logic test_expr,
  input  logic end_event,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic win_q;
  logic fail;

  always_ff @(posedge clk) begin
    if (!reset_n)                 win_q <= 1'b0;
    else if (!win_q)              win_q <= start_event;
    else if (end_event)           win_q <= 1'b0;
  end

  assign fail = win_q && !test_expr;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
