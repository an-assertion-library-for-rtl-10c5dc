// Testbench for assert_one_hot: fails unless exactly one of 4 bits is set.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_one_hot;
  logic [3:0] test_expr = 4'b0001;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = ($countones(test_expr) != 1);

  task automatic stim();
    if ($urandom_range(3) == 0) test_expr = 4'($urandom());
    else test_expr = 4'(1 << $urandom_range(3));
  endtask

  assert_one_hot #(.WIDTH(4)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
