// Non-deterministic assertion group of the run-time assertion chip.
//
// One instance of every non-deterministic run-time assertion (checked only
// after a triggering event), each watching its own field of the
// nondet_probe_t struct and configured by the constants of ovl_rt_pkg. The
// assertions are threaded, in the order of rt_assert_id_e, onto one error scan
// chain (esci -> ... -> esco) and one active-low error chain (ei -> ... -> eo),
// so the group drops into a design hierarchy like any other module and links
// into the chip-level chains through its six scan pins. Purely structural: the
// timing is that of the assertions (eo falls one clk edge after a violation,
// one scan bit per esclk pulse). Grouping by assertion class is this design's
// choice.
module rt_nondet_group
  import ovl_rt_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  nondet_probe_t probe,
  input  logic   escen,
  input  logic   esclk,
  input  logic   esci,
  output logic   esco,
  input  logic   ei,
  output logic   eo
);
  // sc[i] / ec[i]: scan and error chain into assertion i; index N_NONDET is the exit
  logic [N_NONDET:0] sc;
  logic [N_NONDET:0] ec;

  assign sc[0] = esci;
  assign ec[0] = ei;

  assert_change #(.WIDTH(PW), .NUM_CKS(CHANGE_CKS)) u_change (
    .reset_n, .clk, .start_event(probe.chg_start), .test_expr(probe.chg_expr),
    .escen, .esclk, .esci(sc[0]), .esco(sc[1]), .eo(ec[1]), .ei(ec[0]));

  assert_cycle_sequence #(.NUM_CKS(CS_LEN), .NECESSARY_CONDITION(CS_COND)) u_cycle_sequence (
    .reset_n, .clk, .event_sequence(probe.cs_events),
    .escen, .esclk, .esci(sc[1]), .esco(sc[2]), .eo(ec[2]), .ei(ec[1]));

  assert_frame #(.MIN_CKS(FRAME_MIN), .MAX_CKS(FRAME_MAX)) u_frame (
    .reset_n, .clk, .start_event(probe.fr_start), .test_expr(probe.fr_expr),
    .escen, .esclk, .esci(sc[2]), .esco(sc[3]), .eo(ec[3]), .ei(ec[2]));

  assert_handshake #(.MIN_ACK_CYCLE(HS_MIN_ACK), .MAX_ACK_CYCLE(HS_MAX_ACK), .REQ_DROP(HS_REQ_DROP)) u_handshake (
    .reset_n, .clk, .req(probe.hs_req), .ack(probe.hs_ack),
    .escen, .esclk, .esci(sc[3]), .esco(sc[4]), .eo(ec[4]), .ei(ec[3]));

  assert_next #(.NUM_CKS(NEXT_CKS)) u_next (
    .reset_n, .clk, .start_event(probe.nx_start), .test_expr(probe.nx_expr),
    .escen, .esclk, .esci(sc[4]), .esco(sc[5]), .eo(ec[5]), .ei(ec[4]));

  assert_range #(.WIDTH(PW), .MIN(RANGE_MIN), .MAX(RANGE_MAX)) u_range (
    .reset_n, .clk, .test_expr(probe.rng_expr),
    .escen, .esclk, .esci(sc[5]), .esco(sc[6]), .eo(ec[6]), .ei(ec[5]));

  assert_time #(.NUM_CKS(TIME_CKS)) u_time (
    .reset_n, .clk, .start_event(probe.tm_start), .test_expr(probe.tm_expr),
    .escen, .esclk, .esci(sc[6]), .esco(sc[7]), .eo(ec[7]), .ei(ec[6]));

  assert_unchange #(.WIDTH(PW), .NUM_CKS(UNCHANGE_CKS)) u_unchange (
    .reset_n, .clk, .start_event(probe.unc_start), .test_expr(probe.unc_expr),
    .escen, .esclk, .esci(sc[7]), .esco(sc[8]), .eo(ec[8]), .ei(ec[7]));

  assert_width #(.MIN_CKS(WIDTH_MIN), .MAX_CKS(WIDTH_MAX)) u_width (
    .reset_n, .clk, .test_expr(probe.wd_expr),
    .escen, .esclk, .esci(sc[8]), .esco(sc[9]), .eo(ec[9]), .ei(ec[8]));

  assert_win_change #(.WIDTH(PW)) u_win_change (
    .reset_n, .clk, .start_event(probe.wc_start), .test_expr(probe.wc_expr), .end_event(probe.wc_end),
    .escen, .esclk, .esci(sc[9]), .esco(sc[10]), .eo(ec[10]), .ei(ec[9]));

  assert_win_unchange #(.WIDTH(PW)) u_win_unchange (
    .reset_n, .clk, .start_event(probe.wu_start), .test_expr(probe.wu_expr), .end_event(probe.wu_end),
    .escen, .esclk, .esci(sc[10]), .esco(sc[11]), .eo(ec[11]), .ei(ec[10]));

  assert_window u_window (
    .reset_n, .clk, .start_event(probe.win_start), .test_expr(probe.win_expr), .end_event(probe.win_end),
    .escen, .esclk, .esci(sc[11]), .esco(sc[12]), .eo(ec[12]), .ei(ec[11]));

  assign esco = sc[N_NONDET];
  assign eo   = ec[N_NONDET];
endmodule
