// Testbench for assert_even_parity: fails on an odd count of ones (5 bits).
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_even_parity;
  logic [4:0] test_expr = 5'b00000;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = (((test_expr[0] + test_expr[1] + test_expr[2] + test_expr[3] + test_expr[4]) % 2) == 1);

  task automatic stim();
    test_expr = 5'($urandom());
  endtask

  assert_even_parity #(.WIDTH(5)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
