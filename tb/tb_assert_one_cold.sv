// Testbench for assert_one_cold: exactly one of 4 bits low, or all ones (INACTIVE 1).
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_one_cold;
  logic [3:0] test_expr = 4'b1110;
  logic fail_now;

  `include "tb_assert_common.svh"


  assign fail_now = !($countones(test_expr) == 3 || test_expr == 4'hF);

  task automatic stim();
    case ($urandom_range(5))
      0:       test_expr = 4'($urandom());
      1:       test_expr = 4'hF;
      default: test_expr = ~4'(1 << $urandom_range(3));
    endcase
  endtask

  assert_one_cold #(.WIDTH(4), .INACTIVE(1)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
