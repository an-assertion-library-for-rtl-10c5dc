// Run-time assert_change: once start_event is seen, test_expr must change value
// within the NUM_CKS following cycles.
//
// A WIDTH-bit register keeps the previous cycle's value and a down-counter of
// clog2(NUM_CKS+1) bits forms the window: start_event while the counter is zero
// loads NUM_CKS. Each window cycle either sees a change (the window closes,
// satisfied) or counts down; reaching the last window cycle without a change
// clears the error flip-flop of ovl_rt_err_cell (outside reset and error scan).
// A start_event inside a running window is ignored. Non-deterministic: the
// failure shows NUM_CKS cycles after the triggering start_event.
module assert_change #(
  parameter int WIDTH   = 1,
  parameter int NUM_CKS = 1
) (
  input  logic             reset_n,
  input  logic             clk,
  input  logic             start_event,
  input  logic [WIDTH-1:0] test_expr,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  localparam int CW = $clog2(NUM_CKS + 1);

  logic [CW-1:0]    cnt_q;
  logic [WIDTH-1:0] prev_q;
  logic             change_now;
  logic             fail;

  assign change_now = (test_expr != prev_q);

  always_ff @(posedge clk) begin
    prev_q <= test_expr;
    if (!reset_n)                cnt_q <= '0;
    else if (cnt_q != '0)        cnt_q <= change_now ? '0 : cnt_q - 1'b1;
    else if (start_event)        cnt_q <= CW'(NUM_CKS);
  end

  assign fail = (cnt_q == CW'(1)) && !change_now;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
