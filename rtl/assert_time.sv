// Run-time assert_time: once start_event is seen, test_expr must be true in
// each of the NUM_CKS following cycles.
//
// A down-counter of clog2(NUM_CKS+1) bits is the window: start_event while it is
// zero loads NUM_CKS, and every later cycle with the counter non-zero checks
// test_expr and counts down. A false test_expr inside the window at a clock edge
// (outside reset and error scan) clears the error flip-flop of ovl_rt_err_cell.
// A start_event inside a running window is ignored. Non-deterministic: nothing
// is checked until start_event occurs.
module assert_time #(
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
  localparam int CW = $clog2(NUM_CKS + 1);

  logic [CW-1:0] cnt_q;
  logic          fail;

  always_ff @(posedge clk) begin
    if (!reset_n)              cnt_q <= '0;
    else if (cnt_q != '0)      cnt_q <= cnt_q - 1'b1;
    else if (start_event)      cnt_q <= CW'(NUM_CKS);
  end

  assign fail = (cnt_q != '0) && !test_expr;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
