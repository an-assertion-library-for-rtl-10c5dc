// End-to-end testbench for rt_assertion_chip at its default configuration.
//
// It plays the part of the off-chip debug monitor and of the design under
// check:
//   1. legal traffic on every probe for 300 cycles: eo must stay high;
//   2. a full scan with no error: 30 ones must be read from esco;
//   3. for each of the 30 assertions in chain order: reset, quiet probes, then a
//      short sequence that breaks exactly that assertion's rule. eo must still
//      be high at the falling edge before the violating clk edge and low at the
//      one after it (the exact detection latency). The monitor then raises
//      escen, reads esco and pulses esclk once per bit; the word read must
//      have a single 0 at the position of that assertion (rt_assert_id_e), and
//      eo must be high again afterwards because the scan shifted ones in;
//   4. a violation while escen is high must leave no error behind;
//   5. two assertions broken together must both read back as 0.
// Counts of each mechanism (legal cycles, detections, scans, masked
// violations, multiple errors, resets) are printed; one that never happened is
// a failure. The expected values come from the rules of each assertion, worked
// out by hand for each sequence, not from the RTL.
module tb_rt_assertion_chip;
  import ovl_rt_pkg::*;

  logic          clk = 1'b0;
  logic          reset_n = 1'b0;
  logic          escen = 1'b0, esclk = 1'b0;
  logic          esco, eo;
  det_probe_t    d;
  nondet_probe_t n;

  int checks = 0, failures = 0;
  int n_legal = 0, n_detect = 0, n_scan = 0, n_masked = 0, n_multi = 0, n_reset = 0;

  always #5 clk = ~clk;

  rt_assertion_chip dut (.clk, .reset_n, .det_probe(d), .nondet_probe(n), .escen, .esclk, .esco, .eo);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t: %s", $time, what);
    end
  endtask

  task automatic step();
    @(posedge clk); #2;
  endtask

  // probe values that satisfy every assertion while held
  task automatic quiet();
    d = '0;
    d.always_expr = 1'b1;  d.aoe_expr = 1'b1;
    d.dec_value = 8'd100;  d.delta_value = 8'd100; d.inc_value = 8'd100;
    d.even_par = 8'h00;    d.odd_par = 8'h01;
    d.ovf_value = 8'd5;    d.unf_value = 8'd50;
    d.ntr_start = 8'd1;    d.ntr_next = 8'd2;     d.ntr_state = 8'd0;
    d.tr_start  = 8'd1;    d.tr_next  = 8'd2;     d.tr_state  = 8'd0;
    d.one_cold = 8'hFE;    d.one_hot = 8'h01;     d.zoh = 8'h00;
    d.prop_expr = 1'b1;
    n = '0;
    n.chg_expr = 8'd7;     n.nx_expr = 1'b1;      n.rng_expr = 8'd100;
    n.tm_expr = 1'b1;      n.unc_expr = 8'd9;     n.wc_expr = 8'd3;
    n.wu_expr = 8'd4;      n.wu_end = 1'b1;       n.win_expr = 1'b1; n.win_end = 1'b1;
  endtask

  task automatic do_reset();
    quiet();
    reset_n = 1'b0;
    step(); step();
    reset_n = 1'b1;
    n_reset++;
  endtask

  // legal traffic, period 10
  task automatic legal(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      int p;
      step();
      p = c % 10;
      d.inc_value   = d.inc_value + 8'd1;
      d.dec_value   = d.dec_value - 8'd1;
      d.delta_value = (c % 2 == 0) ? d.delta_value + 8'd3 : d.delta_value - 8'd2;
      d.ovf_value   = (d.ovf_value == 8'd200) ? 8'd100 : d.ovf_value + 8'd1;
      d.unf_value   = (d.unf_value == 8'd10)  ? 8'd100 : d.unf_value - 8'd1;
      d.tr_state    = (d.tr_state == 8'd2)  ? 8'd0 : d.tr_state + 8'd1;   // 0 1 2
      d.ntr_state   = (d.ntr_state == 8'd0) ? 8'd1 : (d.ntr_state == 8'd1) ? 8'd3 : 8'd0;
      d.one_hot     = {d.one_hot[6:0], d.one_hot[7]};
      d.one_cold    = {d.one_cold[6:0], d.one_cold[7]};
      d.zoh         = (c % 2 == 0) ? 8'h00 : 8'(1 << (c % 8));
      d.even_par    = 8'($urandom()); if (^d.even_par) d.even_par[0] = ~d.even_par[0];
      d.odd_par     = 8'($urandom()); if (!(^d.odd_par)) d.odd_par[7] = ~d.odd_par[7];
      d.imp_ante    = $urandom_range(1);
      d.imp_cons    = d.imp_ante | 1'($urandom_range(1));
      d.aoe_sample  = p[0];
      d.always_expr = 1'b1; d.never_expr = 1'b0; d.prop_expr = 1'b1; d.aoe_expr = 1'b1;
      d.qs_check    = 8'(c);
      d.qs_state    = 8'(c);
      d.qs_sample   = (p == 5);
      n.rng_expr    = 8'($urandom_range(RANGE_MAX, RANGE_MIN));
      n.chg_start = (p == 0); n.fr_start = (p == 0); n.nx_start = (p == 0);
      n.tm_start  = (p == 0); n.unc_start = (p == 0); n.wc_start = (p == 0);
      n.wu_start  = (p == 0); n.win_start = (p == 0);
      n.cs_events = (p == 0) ? 3'b100 : (p == 1) ? 3'b010 : (p == 2) ? 3'b001 : 3'b000;
      n.wd_expr   = (p <= 2);
      n.hs_req    = (p <= 2);
      n.hs_ack    = (p == 2 || p == 3);
      n.fr_expr   = (p == 3);
      n.nx_expr   = 1'b1; n.tm_expr = 1'b1; n.win_expr = 1'b1;
      if (p == 2) begin n.chg_expr = n.chg_expr + 8'd1; n.wc_expr = n.wc_expr + 8'd1; end
      if (p == 6) begin n.unc_expr = n.unc_expr + 8'd1; n.wu_expr = n.wu_expr + 8'd1; end
      n.wc_end = (p == 4); n.wu_end = (p == 4); n.win_end = (p == 4);
      @(negedge clk);
      check(eo === 1'b1, $sformatf("eo fell during legal traffic, cycle %0d", c));
      n_legal++;
    end
  endtask

  // drive the sequence that breaks assertion id; returns with the violating
  // inputs applied, so the next clk edge must detect it
  task automatic violate(input rt_assert_id_e id);
    case (id)
      A_ALWAYS:          d.always_expr = 1'b0;
      A_ALWAYS_ON_EDGE:  begin d.aoe_sample = 1'b1; d.aoe_expr = 1'b0; end
      A_DECREMENT:       d.dec_value = 8'd97;
      A_DELTA:           d.delta_value = 8'd110;
      A_EVEN_PARITY:     d.even_par = 8'h01;
      A_IMPLICATION:     begin d.imp_ante = 1'b1; d.imp_cons = 1'b0; end
      A_INCREMENT:       d.inc_value = 8'd105;
      A_NEVER:           d.never_expr = 1'b1;
      A_NO_OVERFLOW:     begin d.ovf_value = 8'd200; step(); d.ovf_value = 8'd0; end
      A_NO_UNDERFLOW:    begin d.unf_value = 8'd10;  step(); d.unf_value = 8'd5; end
      A_NO_TRANSITION:   begin d.ntr_state = 8'd1;   step(); d.ntr_state = 8'd2; end
      A_ODD_PARITY:      d.odd_par = 8'h03;
      A_ONE_COLD:        d.one_cold = 8'hFF;
      A_ONE_HOT:         d.one_hot = 8'h00;
      A_PROPOSITION:     d.prop_expr = 1'b0;
      A_QUIESCENT_STATE: begin d.qs_state = 8'd3; d.qs_sample = 1'b1; end
      A_TRANSITION:      begin d.tr_state = 8'd1;    step(); d.tr_state = 8'd3; end
      A_ZERO_ONE_HOT:    d.zoh = 8'h03;
      A_CHANGE: begin
        n.chg_start = 1'b1;
        repeat (CHANGE_CKS) begin step(); n.chg_start = 1'b0; end
      end
      A_CYCLE_SEQUENCE:  begin n.cs_events = 3'b100; step(); n.cs_events = 3'b010; step(); n.cs_events = 3'b000; end
      A_FRAME:           begin n.fr_start = 1'b1; step(); n.fr_start = 1'b0; n.fr_expr = 1'b1; end
      A_HANDSHAKE:       n.hs_ack = 1'b1;
      A_NEXT:            begin n.nx_start = 1'b1; step(); n.nx_start = 1'b0; step(); n.nx_expr = 1'b0; end
      A_RANGE:           n.rng_expr = 8'd5;
      A_TIME:            begin n.tm_start = 1'b1; step(); n.tm_start = 1'b0; n.tm_expr = 1'b0; end
      A_UNCHANGE:        begin n.unc_start = 1'b1; step(); n.unc_start = 1'b0; n.unc_expr = 8'd10; end
      A_WIDTH:           begin n.wd_expr = 1'b1; step(); n.wd_expr = 1'b0; end
      A_WIN_CHANGE:      begin n.wc_start = 1'b1; step(); n.wc_start = 1'b0; n.wc_end = 1'b1; end
      A_WIN_UNCHANGE:    begin n.wu_start = 1'b1; step(); n.wu_start = 1'b0; n.wu_expr = 8'd5; end
      A_WINDOW:          begin n.win_start = 1'b1; step(); n.win_start = 1'b0; n.win_expr = 1'b0; end
      default: ;
    endcase
  endtask

  // monitor: raise escen, read CHAIN_LEN bits from esco with one esclk pulse
  // after each read; bit k read lands at chain position CHAIN_LEN-1-k
  task automatic scan_read(output logic [CHAIN_LEN-1:0] got);
    step();
    escen = 1'b1; esclk = 1'b0;
    for (int k = 0; k < CHAIN_LEN; k++) begin
      @(negedge clk);
      got[CHAIN_LEN-1-k] = esco;
      step(); esclk = 1'b1;
      step(); esclk = 1'b0;
    end
    step();
    escen = 1'b0;
    n_scan++;
  endtask

  logic [CHAIN_LEN-1:0] got, want;

  initial begin
    do_reset();
    // 1. legal traffic
    legal(300);
    // 2. scan with no error
    scan_read(got);
    check(got == '1, $sformatf("clean scan read %b", got));

    // 3. one violation per assertion
    for (int i = 0; i < CHAIN_LEN; i++) begin
      rt_assert_id_e id;
      id = rt_assert_id_e'(i);
      do_reset();
      repeat (8) step();
      @(negedge clk);
      check(eo === 1'b1, $sformatf("%s: eo low before violation", id.name()));
      step();
      violate(id);
      @(negedge clk);
      check(eo === 1'b1, $sformatf("%s: eo low one cycle early", id.name()));
      step();
      quiet();
      // keep the histories of the stateful rules consistent after the violation
      if (id == A_NO_OVERFLOW) d.ovf_value = 8'd0;
      if (id == A_NO_UNDERFLOW) d.unf_value = 8'd5;
      if (id == A_NO_TRANSITION) d.ntr_state = 8'd2;
      if (id == A_TRANSITION) d.tr_state = 8'd3;
      @(negedge clk);
      check(eo === 1'b0, $sformatf("%s: eo not low after violation", id.name()));
      if (eo === 1'b0) n_detect++;
      repeat (3) step();
      scan_read(got);
      want = '1;
      want[i] = 1'b0;
      check(got == want, $sformatf("%s: scan read %b, expected %b", id.name(), got, want));
      @(negedge clk);
      check(eo === 1'b1, $sformatf("%s: eo still low after the scan", id.name()));
    end

    // 4. violation masked by escen
    do_reset();
    repeat (4) step();
    escen = 1'b1;
    d.always_expr = 1'b0;
    d.never_expr  = 1'b1;
    step();
    d.always_expr = 1'b1;
    d.never_expr  = 1'b0;
    step();
    escen = 1'b0;
    @(negedge clk);
    check(eo === 1'b1, "violation during escen was recorded");
    scan_read(got);
    check(got == '1, $sformatf("masked scan read %b", got));
    if (eo === 1'b1 && got == '1) n_masked++;

    // 5. two assertions at once
    do_reset();
    repeat (4) step();
    d.one_hot = 8'h00;
    n.rng_expr = 8'd250;
    step();
    quiet();
    repeat (2) step();
    scan_read(got);
    want = '1;
    want[A_ONE_HOT] = 1'b0;
    want[A_RANGE]   = 1'b0;
    check(got == want, $sformatf("double error read %b, expected %b", got, want));
    if (got == want) n_multi++;

    $display("legal=%0d detected=%0d scans=%0d masked=%0d multi=%0d resets=%0d",
             n_legal, n_detect, n_scan, n_masked, n_multi, n_reset);
    check(n_legal > 0,  "no legal traffic");
    check(n_detect == CHAIN_LEN, "not every assertion detected");
    check(n_scan > 0,   "no scan");
    check(n_masked > 0, "no masked violation");
    check(n_multi > 0,  "no multiple error");
    check(n_reset > 0,  "no reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
