// Testbench for assert_implication: antecedent true with consequent false fails.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_implication;
  logic antecedent_expr = 1'b0, consequent_expr = 1'b0;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = (antecedent_expr && !consequent_expr);

  task automatic stim();
    antecedent_expr = $urandom_range(2) == 0;
    consequent_expr = $urandom_range(5) != 0;
  endtask

  assert_implication  dut (.reset_n, .clk, .antecedent_expr, .consequent_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
