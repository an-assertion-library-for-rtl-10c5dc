// Testbench for assert_decrement: fails when a change is not -2 modulo 16.
// Random stimulus is checked cycle by cycle against the reference model below
// through the shared scan harness.
module tb_assert_decrement;
  logic [3:0] test_expr = 4'd0;
  int prev_m = 0;
  logic fail_now;

  `include "tb_assert_common.svh"

  always @(posedge clk) prev_m <= int'(test_expr);
  assign fail_now = (reset_n && int'(test_expr) != prev_m && ((prev_m - int'(test_expr) + 16) % 16) != 2);

  task automatic stim();
    case ($urandom_range(5))
      0:       test_expr = 4'($urandom());
      1, 2:    ;
      default: test_expr = 4'((int'(test_expr) + 14) % 16);
    endcase
  endtask

  assert_decrement #(.WIDTH(4), .VALUE(2)) dut (.reset_n, .clk, .test_expr, .escen, .esclk, .esci, .esco, .eo, .ei);

  initial begin
    run(4000);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
