// Testbench for assert_never: fails whenever test_expr is true.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_never;
  logic test_expr = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = (test_expr == 1'b1);

  task automatic stim();
    test_expr = $urandom_range(9) == 0;
  endtask

  assert_never  dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
