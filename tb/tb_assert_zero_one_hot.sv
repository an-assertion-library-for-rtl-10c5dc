// Testbench for assert_zero_one_hot: no more than one of 4 bits may be set.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_zero_one_hot;
  logic [3:0] test_expr = 4'b0000;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = ($countones(test_expr) > 1);

  task automatic stim();
    case ($urandom_range(4))
      0:       test_expr = 4'($urandom());
      1:       test_expr = 4'h0;
      default: test_expr = 4'(1 << $urandom_range(3));
    endcase
  endtask

  assert_zero_one_hot #(.WIDTH(4)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
