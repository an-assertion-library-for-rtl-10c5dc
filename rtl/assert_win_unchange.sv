// Run-time assert_win_unchange: test_expr must keep its value in a window that
// opens the cycle after start_event and closes with the end_event cycle.
//
// One flip-flop holds the window state, a WIDTH-bit register the value of the
// previous cycle (it follows test_expr every cycle). While the window is open a
// value different from the previous cycle's at a clock edge (outside reset and
// error scan) clears the error flip-flop of ovl_rt_err_cell; the change from the
// start_event cycle to the first window cycle already counts. Non-deterministic:
// the check only runs once start_event has happened.
module assert_win_unchange #(
  parameter int WIDTH = 1
) (
  input  logic             reset_n,
  input  logic             clk,
  input  logic             start_event,
  input  logic [WIDTH-1:0] test_expr,
  input  logic             end_event,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic             win_q;
  logic [WIDTH-1:0] prev_q;
  logic             fail;

  always_ff @(posedge clk) begin
    prev_q <= test_expr;
    if (!reset_n)       win_q <= 1'b0;
    else if (!win_q)    win_q <= start_event;
    else if (end_event) win_q <= 1'b0;
  end

  assign fail = win_q && (test_expr != prev_q);

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
