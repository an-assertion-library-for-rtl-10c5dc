// Run-time assert_always_on_edge: test_expr must be true at every clk edge at
// which sampling_event shows the selected transition.
//
// A flip-flop keeps sampling_event of the previous cycle. EDGE_TYPE selects the
// transition: 0 none (check every cycle), 1 rising, 2 falling, 3 either, the
// standard checker's numbering. A false test_expr on a selected edge (outside
// reset and error scan) clears the error flip-flop of ovl_rt_err_cell.
// Deterministic: eo falls right after the failing edge. The previous-sample
// flop is cleared by reset, so a sampling_event already high when reset ends
// counts as a rising edge; that is this design's choice.
module assert_always_on_edge #(
  parameter int EDGE_TYPE = 0
) (
  input  logic reset_n,
  input  logic clk,
  input  logic sampling_event,
  input  logic test_expr,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  logic samp_q;
  logic edge_seen;
  logic fail;

  always_ff @(posedge clk) begin
    if (!reset_n) samp_q <= 1'b0;
    else          samp_q <= sampling_event;
  end

  always_comb begin
    unique case (EDGE_TYPE)
      1:       edge_seen = sampling_event && !samp_q;
      2:       edge_seen = !sampling_event && samp_q;
      3:       edge_seen = sampling_event != samp_q;
      default: edge_seen = 1'b1;
    endcase
  end

  assign fail = edge_seen && !test_expr;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
