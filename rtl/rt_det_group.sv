// Deterministic assertion group of the run-time assertion chip.
//
// One instance of every deterministic run-time assertion (each fails in the
// very cycle its rule is broken), each watching its own field of the
// det_probe_t struct and configured by the constants of ovl_rt_pkg. The
// assertions are threaded, in the order of rt_assert_id_e, onto one error scan
// chain (esci -> ... -> esco) and one active-low error chain (ei -> ... -> eo),
// so the group drops into a design hierarchy like any other module and links
// into the chip-level chains through its six scan pins. Purely structural: the
// timing is that of the assertions (eo falls one clk edge after a violation,
// one scan bit per esclk pulse). Grouping by assertion class is this design's
// choice.
module rt_det_group
  import ovl_rt_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  det_probe_t probe,
  input  logic   escen,
  input  logic   esclk,
  input  logic   esci,
  output logic   esco,
  input  logic   ei,
  output logic   eo
);
  // sc[i] / ec[i]: scan and error chain into assertion i; index N_DET is the exit
  logic [N_DET:0] sc;
  logic [N_DET:0] ec;

  assign sc[0] = esci;
  assign ec[0] = ei;

  assert_always u_always (
    .reset_n, .clk, .test_expr(probe.always_expr),
    .escen, .esclk, .esci(sc[0]), .esco(sc[1]), .eo(ec[1]), .ei(ec[0]));

  assert_always_on_edge #(.EDGE_TYPE(AOE_EDGE)) u_always_on_edge (
    .reset_n, .clk, .sampling_event(probe.aoe_sample), .test_expr(probe.aoe_expr),
    .escen, .esclk, .esci(sc[1]), .esco(sc[2]), .eo(ec[2]), .ei(ec[1]));

  assert_decrement #(.WIDTH(PW), .VALUE(DEC_VALUE)) u_decrement (
    .reset_n, .clk, .test_expr(probe.dec_value),
    .escen, .esclk, .esci(sc[2]), .esco(sc[3]), .eo(ec[3]), .ei(ec[2]));

  assert_delta #(.WIDTH(PW), .MIN(DELTA_MIN), .MAX(DELTA_MAX)) u_delta (
    .reset_n, .clk, .test_expr(probe.delta_value),
    .escen, .esclk, .esci(sc[3]), .esco(sc[4]), .eo(ec[4]), .ei(ec[3]));

  assert_even_parity #(.WIDTH(PW)) u_even_parity (
    .reset_n, .clk, .test_expr(probe.even_par),
    .escen, .esclk, .esci(sc[4]), .esco(sc[5]), .eo(ec[5]), .ei(ec[4]));

  assert_implication u_implication (
    .reset_n, .clk, .antecedent_expr(probe.imp_ante), .consequent_expr(probe.imp_cons),
    .escen, .esclk, .esci(sc[5]), .esco(sc[6]), .eo(ec[6]), .ei(ec[5]));

  assert_increment #(.WIDTH(PW), .VALUE(INC_VALUE)) u_increment (
    .reset_n, .clk, .test_expr(probe.inc_value),
    .escen, .esclk, .esci(sc[6]), .esco(sc[7]), .eo(ec[7]), .ei(ec[6]));

  assert_never u_never (
    .reset_n, .clk, .test_expr(probe.never_expr),
    .escen, .esclk, .esci(sc[7]), .esco(sc[8]), .eo(ec[8]), .ei(ec[7]));

  assert_no_overflow #(.WIDTH(PW), .MIN(OVF_MIN), .MAX(OVF_MAX)) u_no_overflow (
    .reset_n, .clk, .test_expr(probe.ovf_value),
    .escen, .esclk, .esci(sc[8]), .esco(sc[9]), .eo(ec[9]), .ei(ec[8]));

  assert_no_underflow #(.WIDTH(PW), .MIN(UNF_MIN), .MAX(UNF_MAX)) u_no_underflow (
    .reset_n, .clk, .test_expr(probe.unf_value),
    .escen, .esclk, .esci(sc[9]), .esco(sc[10]), .eo(ec[10]), .ei(ec[9]));

  assert_no_transition #(.WIDTH(PW)) u_no_transition (
    .reset_n, .clk, .test_expr(probe.ntr_state), .start_state(probe.ntr_start), .next_state(probe.ntr_next),
    .escen, .esclk, .esci(sc[10]), .esco(sc[11]), .eo(ec[11]), .ei(ec[10]));

  assert_odd_parity #(.WIDTH(PW)) u_odd_parity (
    .reset_n, .clk, .test_expr(probe.odd_par),
    .escen, .esclk, .esci(sc[11]), .esco(sc[12]), .eo(ec[12]), .ei(ec[11]));

  assert_one_cold #(.WIDTH(PW), .INACTIVE(ONE_COLD_INACT)) u_one_cold (
    .reset_n, .clk, .test_expr(probe.one_cold),
    .escen, .esclk, .esci(sc[12]), .esco(sc[13]), .eo(ec[13]), .ei(ec[12]));

  assert_one_hot #(.WIDTH(PW)) u_one_hot (
    .reset_n, .clk, .test_expr(probe.one_hot),
    .escen, .esclk, .esci(sc[13]), .esco(sc[14]), .eo(ec[14]), .ei(ec[13]));

  assert_proposition u_proposition (
    .reset_n, .clk, .test_expr(probe.prop_expr),
    .escen, .esclk, .esci(sc[14]), .esco(sc[15]), .eo(ec[15]), .ei(ec[14]));

  assert_quiescent_state #(.WIDTH(PW)) u_quiescent_state (
    .reset_n, .clk, .state_expr(probe.qs_state), .check_value(probe.qs_check), .sample_event(probe.qs_sample),
    .escen, .esclk, .esci(sc[15]), .esco(sc[16]), .eo(ec[16]), .ei(ec[15]));

  assert_transition #(.WIDTH(PW)) u_transition (
    .reset_n, .clk, .test_expr(probe.tr_state), .start_state(probe.tr_start), .next_state(probe.tr_next),
    .escen, .esclk, .esci(sc[16]), .esco(sc[17]), .eo(ec[17]), .ei(ec[16]));

  assert_zero_one_hot #(.WIDTH(PW)) u_zero_one_hot (
    .reset_n, .clk, .test_expr(probe.zoh),
    .escen, .esclk, .esci(sc[17]), .esco(sc[18]), .eo(ec[18]), .ei(ec[17]));

  assign esco = sc[N_DET];
  assign eo   = ec[N_DET];
endmodule
