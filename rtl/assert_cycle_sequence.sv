// Run-time assert_cycle_sequence: a sequence of events must follow one another
// in consecutive cycles. event_sequence[NUM_CKS-1] is the first event and
// event_sequence[0] the last.
//
// NECESSARY_CONDITION, in the standard checker's numbering:
//   0 - if all events but the last occur in consecutive cycles, the last must
//       occur in the next cycle;
//   1 - once the first event occurs, every later event must occur in its cycle
//       (sequences may overlap, one pipeline stage per event).
// A shift register of NUM_CKS-1 stages tracks how far each started sequence has
// got. A missing event, outside reset and error scan, clears the error
// flip-flop of ovl_rt_err_cell. Non-deterministic: nothing is checked until the
// first event. NUM_CKS must be at least 2.
module assert_cycle_sequence #(
  parameter int NUM_CKS             = 2,
  parameter int NECESSARY_CONDITION = 0
) (
  input  logic               reset_n,
  input  logic               clk,
  input  logic [NUM_CKS-1:0] event_sequence,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  // stage_q[i] = the first i+1 events occurred in the last i+1 cycles
  logic [NUM_CKS-2:0] stage_q;
  logic [NUM_CKS-2:0] stage_d;
  logic               fail;

  always_comb begin
    stage_d[0] = event_sequence[NUM_CKS-1];
    fail       = 1'b0;
    for (int i = 1; i < NUM_CKS - 1; i++) begin
      if (NECESSARY_CONDITION == 1) begin
        stage_d[i] = stage_q[i-1];
        if (stage_q[i-1] && !event_sequence[NUM_CKS-1-i]) fail = 1'b1;
      end
      else stage_d[i] = stage_q[i-1] && event_sequence[NUM_CKS-1-i];
    end
    if (stage_q[NUM_CKS-2] && !event_sequence[0]) fail = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) stage_q <= '0;
    else          stage_q <= stage_d;
  end

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
