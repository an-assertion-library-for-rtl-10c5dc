// Run-time assert_handshake: req and ack must follow a request/acknowledge
// protocol.
//
// A request starts at a rising edge of req and ends at the next rising edge of
// ack; the cycle of the req rise counts as cycle 0 of the request. The checker
// fails, outside reset and error scan, on:
//   * an ack rise with no request open (ack without req);
//   * a req rise while a request is still open (request repeated);
//   * an ack rise before cycle MIN_ACK_CYCLE of the request;
//   * no ack rise by cycle MAX_ACK_CYCLE (0: unchecked); the request is dropped;
//   * with REQ_DROP = 1, req going low while the request is open.
// Registers: previous req and ack, the open flag and a cycle counter.
// Non-deterministic. The rule set is a subset of the standard checker's chosen
// for this design; the limits on ack length and on req release after ack are
// not checked.
module assert_handshake #(
  parameter int MIN_ACK_CYCLE = 0,
  parameter int MAX_ACK_CYCLE = 0,
  parameter bit REQ_DROP      = 1'b0
) (
  input  logic reset_n,
  input  logic clk,
  input  logic req,
  input  logic ack,
  input  logic escen,
  input  logic esclk,
  input  logic esci,
  output logic esco,
  output logic eo,
  input  logic ei
);
  localparam int LIM = (MAX_ACK_CYCLE > MIN_ACK_CYCLE ? MAX_ACK_CYCLE : MIN_ACK_CYCLE) + 1;
  localparam int CW  = $clog2(LIM + 1);

  logic          req_q, ack_q, open_q;
  logic [CW-1:0] cnt_q;
  logic [CW-1:0] cnt_now;
  logic          req_rise, ack_rise, open_now;
  logic          f_noreq, f_again, f_early, f_late, f_drop, fail;

  assign req_rise = req && !req_q;
  assign ack_rise = ack && !ack_q;
  assign open_now = open_q || req_rise;
  assign cnt_now  = open_q ? cnt_q : '0;

  assign f_noreq = ack_rise && !open_now;
  assign f_again = req_rise && open_q;
  assign f_early = ack_rise && open_now && (32'(cnt_now) < MIN_ACK_CYCLE);
  assign f_late  = !ack_rise && open_now && (MAX_ACK_CYCLE != 0) &&
                   (32'(cnt_now) == MAX_ACK_CYCLE);
  assign f_drop  = REQ_DROP && open_q && !req && !ack_rise;
  assign fail    = f_noreq || f_again || f_early || f_late || f_drop;

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      req_q  <= 1'b0;
      ack_q  <= 1'b0;
      open_q <= 1'b0;
      cnt_q  <= '0;
    end
    else begin
      req_q <= req;
      ack_q <= ack;
      if (ack_rise || f_late) open_q <= 1'b0;
      else                    open_q <= open_now;
      if (cnt_now != CW'(LIM)) cnt_q <= cnt_now + 1'b1;
      else                     cnt_q <= cnt_now;
    end
  end

  ovl_rt_err_cell u_err (.clk, .reset_n, .fail, .escen, .esclk, .esci, .esco, .ei, .eo);
endmodule
