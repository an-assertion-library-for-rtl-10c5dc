// Error scan cell shared by every run-time assertion.
//
// Each run-time assertion owns one error flip-flop. It holds 1 while the
// assertion has never failed and drops to 0 (sticky) on the first clock edge at
// which the checker reports a failure. The flip-flop doubles as one stage of the
// error scan chain, so a monitor outside the chip can read out which assertion
// fired:
//   * escen = 0 : normal operation, a failure (fail = 1) clears the flip-flop.
//   * escen = 1 : failures are ignored; while esclk is high at a clock edge the
//                 flip-flop loads esci (one shift per clk cycle with esclk high).
//   * esco      : the flip-flop itself, fed to the esci of the next cell.
//   * eo        : active-low error chain, eo = ei & flop, so a 0 anywhere in
//                 the chain pulls the chip's error output low.
// Timing: eo/esco change one clk edge after the failing cycle; one bit moves per
// esclk pulse. The cell is synchronous to clk with a synchronous active-low
// reset that restores "no error". Sampling esclk as a shift enable on clk, the
// synchronous reset, and clearing the error bit on reset are this design's
// choices; the pins, the active-low error chain and the zero-means-violated
// scan output follow the run-time assertion scheme.
module ovl_rt_err_cell (
  input  logic clk,
  input  logic reset_n,
  input  logic fail,     // checker failure in this cycle
  input  logic escen,    // error scan enable
  input  logic esclk,    // error scan shift strobe
  input  logic esci,     // error scan input from previous cell
  output logic esco,     // error scan output to next cell
  input  logic ei,       // error chain input (active low)
  output logic eo        // error chain output (active low)
);
  logic ok_q;

  always_ff @(posedge clk) begin
    if (!reset_n)    ok_q <= 1'b1;
    else if (escen) begin
      if (esclk)     ok_q <= esci;
    end
    else if (fail)   ok_q <= 1'b0;
  end

  assign esco = ok_q;
  assign eo   = ei & ok_q;
endmodule
