// Testbench for assert_delta: fails when a change has a size outside [2, 5].
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_delta;
  logic [4:0] test_expr = 5'd10;
  int prev_m = 10;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) prev_m <= int'(test_expr);
  assign fail_now = (reset_n && int'(test_expr) != prev_m && ((int'(test_expr) - prev_m) * (int'(test_expr) - prev_m) < 4 || (int'(test_expr) - prev_m) * (int'(test_expr) - prev_m) > 25));

  task automatic stim();
    case ($urandom_range(4))
      0:       test_expr = 5'($urandom());
      1:       ;
      2:       test_expr = 5'(int'(test_expr) + $urandom_range(6));
      default: test_expr = 5'(int'(test_expr) - $urandom_range(6));
    endcase
  endtask

  assert_delta #(.WIDTH(5), .MIN(2), .MAX(5)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
