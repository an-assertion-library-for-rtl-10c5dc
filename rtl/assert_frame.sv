// Run-time assert_frame: after start_event rises, test_expr must not become true
// before MIN_CKS cycles have passed, and must become true within MAX_CKS cycles
// (MAX_CKS = 0 leaves the upper bound unchecked).
//
// A flip-flop detects the rising start_event and a counter numbers the cycles
// since then (1 in the first cycle after the rise). The frame closes when
// test_expr is seen: too early (count below MIN_CKS) is a failure. When the count
// reaches MAX_CKS without test_expr the frame closes with a failure. A rise of
// start_event inside an open frame is ignored. Failures, outside reset and error
// scan, clear the error flip-flop of ovl_rt_err_cell. Non-deterministic.
module assert_frame #(
  parameter int MIN_CKS = 0,
  parameter int MAX_CKS = 0
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
  localparam int LIM = (MAX_CKS > MIN_CKS ? MAX_CKS : MIN_CKS) + 1;
  localparam int CW  = $clog2(LIM + 1);

  logic          start_q;
  logic          open_q;
  logic [CW-1:0] cnt_q;
  logic          too_early, too_late, fail;

  assign too_early = open_q && test_expr && (32'(cnt_q) < MIN_CKS);
  assign too_late  = open_q && !test_expr && (MAX_CKS != 0) && (32'(cnt_q) == MAX_CKS);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      start_q <= 1'b0;
      open_q  <= 1'b0;
      cnt_q   <= '0;
    end
    else begin
      start_q <= start_event;
      if (open_q) begin
        if (test_expr || too_late) open_q <= 1'b0;
        else if (cnt_q != CW'(LIM)) cnt_q <= cnt_q + 1'b1;
      end
      else if (start_event && !start_q) begin
        open_q <= 1'b1;
        cnt_q  <= CW'(1);
      end
    end
  end

  assign fail = too_early || too_late;

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
