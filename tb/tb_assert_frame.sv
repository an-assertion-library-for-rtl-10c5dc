// Testbench for assert_frame: after a start_event rise, test_expr must come no sooner than 2 and no later than 5 cycles.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_frame;
  logic start_event = 1'b0, test_expr = 1'b0, prev_s = 1'b0;
  int   k_m = 0;   // cycles since the start rise, 0 when no frame is open
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) begin
    prev_s <= reset_n && start_event;
    if (!reset_n)                         k_m <= 0;
    else if (k_m > 0)                     k_m <= (test_expr || k_m == 5) ? 0 : k_m + 1;
    else if (start_event && !prev_s)      k_m <= 1;
  end
  assign fail_now = (k_m > 0 && ((test_expr && k_m < 2) || (!test_expr && k_m == 5)));

  task automatic stim();
    start_event = $urandom_range(3) == 0;
    test_expr   = $urandom_range(4) == 0;
  endtask

  assert_frame #(.MIN_CKS(2), .MAX_CKS(5)) dut (.reset_n, .clk, .start_event, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
