// Run-time assert_win_change: test_expr must change at least once in a window
// that opens the cycle after start_event and closes with the end_event cycle.
//
// One flip-flop holds the window state, a WIDTH-bit register the value of the
// previous cycle and one flip-flop records that a change was seen inside the
// window. When end_event arrives with the window open and no change seen (the
// end_event cycle itself included), the error flip-flop of ovl_rt_err_cell is
// cleared (outside reset and error scan). Non-deterministic: the failure shows
// only when the window closes.
module assert_win_change #(
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
  logic             changed_q;
  logic [WIDTH-1:0] prev_q;
  logic             change_now;
  logic             fail;

  assign change_now = (test_expr != prev_q);

  always_ff @(posedge clk) begin
    prev_q <= test_expr;
    if (!reset_n) begin
      win_q     <= 1'b0;
      changed_q <= 1'b0;
    end
    else if (!win_q) begin
      win_q     <= start_event;
      changed_q <= 1'b0;
    end
    else if (end_event) begin
      win_q     <= 1'b0;
      changed_q <= 1'b0;
    end
    else if (change_now) changed_q <= 1'b1;
  end

  assign fail = win_q && end_event && !changed_q && !change_now;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
