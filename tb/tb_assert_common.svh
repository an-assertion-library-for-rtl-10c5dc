// Shared harness for the run-time assertion testbenches, included inside each
// testbench module.
//
// The including testbench instantiates one assertion, connects it to the
// signals declared here, and provides:
//   * logic fail_now   - its own reference model of the check: 1 when the
//                        assertion must report a failure at the next clk edge;
//   * task stim()      - drives the assertion's design-side inputs for one cycle.
// The harness models the error flip-flop and scan stage independently of the
// RTL (expected value exp_q), drives the scan pins at random (clearing a
// captured error through the chain, holding, shifting in a 0, toggling ei) and
// compares eo and esco with the model at every falling clk edge, so the exact
// cycle of every failure is checked. It also counts the mechanisms exercised:
// failures captured, errors cleared by scanning, failures masked by escen and
// zeros shifted in; a mechanism that never happened counts as a failure.

  logic clk     = 1'b0;
  logic reset_n = 1'b0;
  logic escen   = 1'b0;
  logic esclk   = 1'b0;
  logic esci    = 1'b1;
  logic ei      = 1'b1;
  logic eo, esco;

  int checks   = 0;
  int failures = 0;
  int n_capture = 0, n_clear = 0, n_masked = 0, n_shift0 = 0;
  logic exp_q = 1'b1;

  always #5 clk = ~clk;

  // Independent model of the error flip-flop / scan stage.
  always @(posedge clk) begin
    if (!reset_n) exp_q <= 1'b1;
    else if (escen) begin
      if (fail_now) n_masked++;
      if (esclk) begin
        if (!exp_q && esci) n_clear++;
        if (!esci)          n_shift0++;
        exp_q <= esci;
      end
    end
    else if (fail_now) begin
      if (exp_q) n_capture++;
      exp_q <= 1'b0;
    end
  end

  always @(negedge clk) begin
    if (reset_n) begin
      checks++;
      if (eo !== (ei & exp_q) || esco !== exp_q) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH t=%0t eo=%b esco=%b expected eo=%b esco=%b",
                   $time, eo, esco, ei & exp_q, exp_q);
      end
    end
  end

  // final mechanism checks; the testbench then prints its result line
  task automatic report();
    checks++;
    if (n_capture == 0) begin failures++; $display("never captured a failure"); end
    checks++;
    if (n_clear == 0)   begin failures++; $display("never cleared an error by scan"); end
    checks++;
    if (n_masked == 0)  begin failures++; $display("never masked a failure with escen"); end
    checks++;
    if (n_shift0 == 0)  begin failures++; $display("never shifted a zero in"); end
    $display("captures=%0d scan_clears=%0d masked=%0d zero_shifts=%0d",
             n_capture, n_clear, n_masked, n_shift0);
  endtask

  // Reset, then n random cycles of design stimulus and scan activity.
  task automatic run(int n);
    reset_n = 1'b0;
    repeat (3) begin @(posedge clk); #2; stim(); end
    reset_n = 1'b1;
    repeat (n) begin
      @(posedge clk); #2;
      stim();
      escen = 1'b0; esclk = 1'b0; esci = 1'b1;
      if (!exp_q && $urandom_range(3) == 0) begin
        escen = 1'b1; esclk = 1'b1;              // scan a one in: clear
      end
      else if ($urandom_range(15) == 0) begin
        escen = 1'b1; esclk = 1'($urandom_range(1)); // hold or shift
        esci  = $urandom_range(3) != 0;
      end
      ei = $urandom_range(7) != 0;
    end
    escen = 1'b0; esclk = 1'b0; esci = 1'b1; ei = 1'b1;
    @(posedge clk); #2;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
