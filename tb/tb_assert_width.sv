// Testbench for assert_width: high pulses must last 2 to 4 cycles.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_width;
  logic test_expr = 1'b0;
  int   run_m = 0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) run_m <= (reset_n && test_expr) ? run_m + 1 : 0;
  assign fail_now = (test_expr ? (run_m + 1 > 4) : (run_m > 0 && run_m < 2));

  task automatic stim();
    if ($urandom_range(2) == 0) test_expr = !test_expr;
  endtask

  assert_width #(.MIN_CKS(2), .MAX_CKS(4)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
