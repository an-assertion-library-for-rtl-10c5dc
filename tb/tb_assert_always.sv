// Testbench for assert_always: fails whenever test_expr is false.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_always;
  logic test_expr = 1'b1;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = (test_expr == 1'b0);

  task automatic stim();
    test_expr = $urandom_range(9) != 0;
  endtask

  assert_always  dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
