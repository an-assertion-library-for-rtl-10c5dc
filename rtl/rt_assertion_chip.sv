// Run-time assertion chip: on-chip white-box verification through an error
// scan chain.
//
// The chip carries synthesizable assertions that keep checking its internal
// signals after deployment. Every assertion owns a sticky error flip-flop
// (1 = never failed). Two chains link them through the design hierarchy:
//   * the error chain, an AND of all error flip-flops, drives the active-low pin
//     eo: it falls one clk edge after any assertion fails;
//   * the error scan chain links the error flip-flops into a shift register.
//     A monitor that sees eo low raises escen (assertion evaluation stops and
//     the last chain position appears on esco), then pulses esclk once per
//     bit: each pulse (esclk high at one clk edge) moves the chain one place,
//     so after CHAIN_LEN-1 pulses every assertion has been read, a 0 marking a
//     failed one. Ones are shifted in behind, so a full scan of CHAIN_LEN
//     pulses also clears all errors.
// Two groups form the hierarchy: rt_det_group (deterministic assertions) feeds
// rt_nondet_group (non-deterministic assertions), whose output drives esco;
// rt_assert_id_e in ovl_rt_pkg gives the order. The scan input and the error
// input of the first group are tied to 1, as only eo, esco, escen and esclk
// are chip pins. The signals under check come in through det_probe and
// nondet_probe; in a product they would be wired to the design's own nets.
module rt_assertion_chip
  import ovl_rt_pkg::*;
(
  input  logic          clk,
  input  logic          reset_n,
  input  det_probe_t    det_probe,
  input  nondet_probe_t nondet_probe,
  input  logic          escen,
  input  logic          esclk,
  output logic          esco,
  output logic          eo
);
  logic sc_mid, ec_mid;

  rt_det_group u_det (
    .clk, .reset_n, .probe(det_probe), .escen, .esclk,
    .esci(1'b1), .esco(sc_mid), .ei(1'b1), .eo(ec_mid));

  rt_nondet_group u_nondet (
    .clk, .reset_n, .probe(nondet_probe), .escen, .esclk,
    .esci(sc_mid), .esco, .ei(ec_mid), .eo);
endmodule
