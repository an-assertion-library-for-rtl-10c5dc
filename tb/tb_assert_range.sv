// Testbench for assert_range: fails outside [3, 11] (4 bits).
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_range;
  logic [3:0] test_expr = 4'd5;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = (int'(test_expr) < 3 || int'(test_expr) > 11);

  task automatic stim();
    test_expr = 4'($urandom());
  endtask

  assert_range #(.WIDTH(4), .MIN(3), .MAX(11)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
